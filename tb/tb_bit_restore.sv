// tb_bit_restore: self-checking test of bit_restore at M = 8, PIX_BITS = 8.
// Builds digit groups from known pixels by hand (group d, bit p = pixel p,
// bit d) and checks that the block returns the pixels. A watchdog ends the
// run after a fixed number of cycles.
module tb_bit_restore;
  localparam int M = 8, PB = 8;
  logic clk = 1'b0;
  logic [PB*M-1:0] grp;
  logic [M*PB-1:0] pix;
  int checks = 0, failures = 0, cycles = 0;

  bit_restore #(.M(M), .PIX_BITS(PB)) dut (.grp_i(grp), .pix_o(pix));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [7:0] px [M]);
    for (int d = 0; d < PB; d++)
      for (int p = 0; p < M; p++) grp[d*M + p] = px[p][d];
    #1;
    for (int p = 0; p < M; p++) begin
      checks++;
      if (pix[p*PB +: PB] !== px[p]) begin
        failures++;
        $display("FAIL pixel %0d got %h want %h", p, pix[p*PB +: PB], px[p]);
      end
    end
  endtask

  initial begin
    logic [7:0] px [M];
    for (int p = 0; p < M; p++)
      for (int d = 0; d < PB; d++) begin
        foreach (px[i]) px[i] = '0;
        px[p][d] = 1'b1;
        check_one(px);
      end
    for (int n = 0; n < 300; n++) begin
      foreach (px[i]) px[i] = 8'($urandom);
      check_one(px);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
