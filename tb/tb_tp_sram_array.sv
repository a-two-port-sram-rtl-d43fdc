// tb_tp_sram_array: self-checking test of tp_sram_array at its default size
// (1024 x 72). Fills every word, then runs one write and one read in every
// cycle at random addresses against a reference array kept in the testbench,
// including same-address read/write (old word expected) and cycles without a
// read (rdata must hold). Read data is checked one cycle after re. A watchdog
// ends the run after a fixed number of cycles.
module tb_tp_sram_array;
  localparam int WORDS = 1024, W = 72, AW = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  ref_mem [WORDS];
  logic [W-1:0]  expect_q;
  logic          check_q = 1'b0;
  int checks = 0, failures = 0, cycles = 0, same_addr = 0;

  tp_sram_array #(.WORDS(WORDS), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare at the falling edge after the read's rising edge
  task automatic compare();
    if (check_q) begin
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL cycle %0d rdata %h want %h", cycles, rdata, expect_q);
      end
    end
  endtask

  initial begin
    logic [W-1:0] last;
    repeat (2) @(posedge clk);
    checks++;
    if (rdata !== '1) begin failures++; $display("FAIL reset value %h", rdata); end
    rst_n <= 1'b1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {8'($urandom), $urandom, $urandom};
      ref_mem[a] = wdata;
    end
    last = '1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      compare();
      we    = ($urandom % 4) != 0;
      re    = ($urandom % 5) != 0;
      waddr = AW'($urandom);
      raddr = (n % 7 == 0) ? waddr : AW'($urandom);
      wdata = {8'($urandom), $urandom, $urandom};
      if (re) begin
        expect_q = ref_mem[raddr];   // old data on a same-address write
        if (we && raddr == waddr) same_addr++;
        last = expect_q;
      end else
        expect_q = last;
      check_q = 1'b1;
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk);
    compare();
    we = 1'b0; re = 1'b0;
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL no same-address cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
