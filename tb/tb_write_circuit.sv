// tb_write_circuit: self-checking test of write_circuit at M = 8, GROUPS = 8.
// For random and hand-picked groups it checks, group by group, the flag
// (1 when the group has at least four 0s), the stored bits (the group,
// inverted when flagged) and the property the circuit exists for: no stored
// group has more 0s than 1s. A watchdog ends the run after a fixed number of
// cycles.
module tb_write_circuit;
  localparam int M = 8, G = 8;
  logic clk = 1'b0;
  logic [G*M-1:0] grp, data;
  logic [G-1:0]   flag;
  int checks = 0, failures = 0, cycles = 0;

  write_circuit #(.M(M), .GROUPS(G)) dut (.grp_i(grp), .data_o(data), .flag_o(flag));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec(input logic [G*M-1:0] v);
    logic [M-1:0] gi, want_d;
    logic want_f;
    grp = v;
    #1;
    for (int g = 0; g < G; g++) begin
      gi = v[g*M +: M];
      want_f = ($countones(gi) <= M / 2);
      want_d = want_f ? ~gi : gi;
      checks++;
      if (flag[g] !== want_f || data[g*M +: M] !== want_d) begin
        failures++;
        $display("FAIL group %0d in %b: flag %b data %b, want %b %b",
                 g, gi, flag[g], data[g*M +: M], want_f, want_d);
      end
      checks++;
      if ($countones(data[g*M +: M]) < M / 2) begin
        failures++;
        $display("FAIL group %0d stored with 1s in the minority", g);
      end
    end
  endtask

  initial begin
    check_vec('0);
    check_vec('1);
    check_vec({8{8'h0F}});               // ties: every group inverted
    check_vec({8'h1F, 8'h07, 8'h03, 8'h01, 8'hFE, 8'hF0, 8'h7F, 8'hE0});
    for (int n = 0; n < 400; n++) begin
      check_vec({$urandom, $urandom});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
