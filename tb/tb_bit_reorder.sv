// tb_bit_reorder: self-checking test of bit_reorder at M = 8, PIX_BITS = 8.
// Drives random and structured pixel sets and checks every digit group
// against a reference built from per-pixel byte arrays: bit p of group d must
// be bit d of pixel p. A watchdog ends the run after a fixed number of cycles.
module tb_bit_reorder;
  localparam int M = 8, PB = 8;
  logic clk = 1'b0;
  logic [M*PB-1:0] pix;
  logic [PB*M-1:0] grp;
  int checks = 0, failures = 0, cycles = 0;

  bit_reorder #(.M(M), .PIX_BITS(PB)) dut (.pix_i(pix), .grp_o(grp));

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
    logic [M-1:0] g;
    for (int p = 0; p < M; p++) pix[p*PB +: PB] = px[p];
    #1;
    for (int d = 0; d < PB; d++) begin
      for (int p = 0; p < M; p++) g[p] = px[p][d];
      checks++;
      if (grp[d*M +: M] !== g) begin
        failures++;
        $display("FAIL group %0d got %b want %b", d, grp[d*M +: M], g);
      end
    end
  endtask

  initial begin
    logic [7:0] px [M];
    // one-hot pixel / one-hot bit: exactly one bit set in exactly one group
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
