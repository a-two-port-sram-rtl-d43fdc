// tb_majority_logic: exhaustive self-checking test of majority_logic.
// Runs all 256 groups at M = 8 and all 128 at M = 7 and compares the
// decision with a count of 0s made in the testbench: invert when the 0s are
// at least half (ties invert). For M = 8 it also checks the expected
// read-bitline discharges of random data: 837 zeros over all 256 groups
// including the flag bit, i.e. 3.27 per 9-bit word against 4 per 8-bit word
// without the logic. A watchdog ends the run after a fixed number of cycles.
module tb_majority_logic;
  logic clk = 1'b0;
  logic [7:0] g8;
  logic [6:0] g7;
  logic inv8, inv7;
  int checks = 0, failures = 0, cycles = 0;

  majority_logic #(.M(8)) dut8 (.grp_i(g8), .inv_o(inv8));
  majority_logic #(.M(7)) dut7 (.grp_i(g7), .inv_o(inv7));

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
    int zeros, total_zeros, stored_zeros;
    logic want;
    total_zeros = 0;
    for (int v = 0; v < 256; v++) begin
      g8 = 8'(v);
      #1;
      zeros = 8 - $countones(g8);
      want = (zeros >= 4);
      checks++;
      if (inv8 !== want) begin
        failures++;
        $display("FAIL M=8 %b got %b want %b", g8, inv8, want);
      end
      // zeros on the 9 read bitlines after the write circuit
      stored_zeros = inv8 ? (8 - zeros) : zeros;
      stored_zeros += inv8 ? 0 : 1;
      total_zeros += stored_zeros;
    end
    checks++;
    if (total_zeros != 837) begin
      failures++;
      $display("FAIL random-data RBL discharges %0d/256, want 837/256", total_zeros);
    end else
      $display("random data: %0.3f discharges per word (plain 8-bit: 4.000)", real'(total_zeros) / 256.0);
    for (int v = 0; v < 128; v++) begin
      g7 = 7'(v);
      #1;
      zeros = 7 - $countones(g7);
      want = (2 * zeros >= 7);
      checks++;
      if (inv7 !== want) begin
        failures++;
        $display("FAIL M=7 %b got %b want %b", g7, inv7, want);
      end
    end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
