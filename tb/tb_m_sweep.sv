// tb_m_sweep: group-size sweep of the majority-logic SRAM.
//
// Instantiates mlr_sram_top with M = 4, 8 and 16 pixels per digit group (the
// candidate group sizes of the power/area trade-off) and streams the same
// 4096-pixel synthetic luma image through each: 1920-pixel lines, a slow
// gradient, a periodic edge and deterministic noise of +/-6. Every word is
// read back and checked against the pixels written; the 0s on the read
// bitlines are compared with the 0s of the raw pixels. Checks: data
// integrity, a saving for every M, and the flag overhead 1/M (25%, 12.5%,
// 6.25%). The read-bitline power ratio per M is printed. A watchdog ends
// the run after a fixed number of cycles.
module tb_m_sweep;
  localparam int PB = 8, NPIX = 4096;
  localparam int MS [3] = '{4, 8, 16};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, cycles = 0, done = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  end

  function automatic logic [7:0] pixel(input int i);
    int x, y, v;
    x = i % 1920;
    y = i / 1920;
    v = 60 + x / 16 + 3 * y + (((x / 40) % 2 == 1) ? 50 : 0)
        + ((x * 7919 + y * 104729 + (x >> 3) * 31) % 13) - 6;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction

  for (genvar k = 0; k < 3; k++) begin : g_m
    localparam int M = MS[k];
    localparam int WORDS = NPIX / M;
    localparam int AW = $clog2(WORDS);
    localparam int DW = M * PB;
    localparam int SW = DW + PB;
    logic we = 1'b0, re = 1'b0, rvalid;
    logic [AW-1:0] waddr = '0, raddr = '0;
    logic [DW-1:0] wpix = '0, rpix;
    logic [SW-1:0] rbl_o;

    mlr_sram_top #(.M(M), .PIX_BITS(PB), .WORDS(WORDS)) dut (
      .clk, .rst_n, .we, .waddr, .wpix, .re, .raddr, .rpix, .rvalid, .rbl_o
    );

    function automatic logic [DW-1:0] word(input int a);
      logic [DW-1:0] w;
      for (int p = 0; p < M; p++) w[p*PB +: PB] = pixel(a * M + p);
      return w;
    endfunction

    initial begin
      longint rz, pz;
      real overhead;
      rz = 0; pz = 0;
      wait (rst_n);
      for (int a = 0; a < WORDS; a++) begin
        @(negedge clk);
        we = 1'b1; waddr = AW'(a); wpix = word(a);
      end
      @(negedge clk);
      we = 1'b0;
      for (int a = 0; a <= WORDS; a++) begin
        @(negedge clk);
        if (a > 0) begin
          checks++;
          if (!rvalid || rpix !== word(a - 1)) begin
            failures++;
            $display("FAIL M=%0d word %0d: %h want %h", M, a - 1, rpix, word(a - 1));
          end
          rz += longint'(SW) - longint'($countones(rbl_o));
          pz += longint'(DW) - longint'($countones(rpix));
        end
        re = (a < WORDS);
        raddr = AW'(a);
      end
      overhead = real'(SW - DW) / real'(DW);
      $display("M=%0d: read-bitline power %0.3f of plain, flag overhead %0.2f%%",
               M, real'(rz) / real'(pz), 100.0 * overhead);
      checks++;
      if (rz >= pz) begin failures++; $display("FAIL M=%0d saves nothing", M); end
      checks++;
      if (overhead != 1.0 / real'(M)) begin failures++; $display("FAIL M=%0d overhead", M); end
      done++;
    end
  end

  initial begin
    wait (done == 3);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
