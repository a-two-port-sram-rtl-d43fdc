// tb_read_circuit: self-checking test of read_circuit at M = 8, GROUPS = 8.
// Writes random groups through a reference inversion made in the testbench
// (random flags), feeds the stored form to the read circuit and checks that
// the original groups come back. A watchdog ends the run after a fixed
// number of cycles.
module tb_read_circuit;
  localparam int M = 8, G = 8;
  logic clk = 1'b0;
  logic [G*M-1:0] stored, orig, outg;
  logic [G-1:0]   flag;
  int checks = 0, failures = 0, cycles = 0;

  read_circuit #(.M(M), .GROUPS(G)) dut (.data_i(stored), .flag_i(flag), .grp_o(outg));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      orig = {$urandom, $urandom};
      flag = 8'($urandom);
      if (n == 0) flag = '0;
      if (n == 1) flag = '1;
      for (int g = 0; g < G; g++)
        stored[g*M +: M] = flag[g] ? ~orig[g*M +: M] : orig[g*M +: M];
      #1;
      for (int g = 0; g < G; g++) begin
        checks++;
        if (outg[g*M +: M] !== orig[g*M +: M]) begin
          failures++;
          $display("FAIL group %0d flag %b got %h want %h", g, flag[g], outg[g*M +: M], orig[g*M +: M]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
