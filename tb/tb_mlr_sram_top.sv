// tb_mlr_sram_top: end-to-end test of mlr_sram_top at its default size
// (M = 8 pixels of 8 bits per word, 1024 words, 72-bit stored words).
//
// Phase 1 fills the whole memory with a synthetic, smooth luma image
// (a slow gradient plus small noise, so neighbouring pixels share their upper
// bits) and reads every word back. Phase 2 does the same with uniformly random
// pixels. Phase 3 issues one write and one read in every cycle at random
// addresses, including same-address cycles and cycles without a read.
// Every read is checked one cycle later against a pixel reference, and the
// stored word on the read bitlines (rbl_o) against a stored form computed in
// the testbench from the pixels. The 0s of rbl_o are counted as read-bitline
// discharges and compared with the 0s a plain 64-bit memory would read:
// random data must give 3.27/4 of the plain count (within 0.08) and the
// smooth image must save more than random data does. Write-bitline toggles
// (no precharge, so only changes cost power) of the smooth image may not
// exceed the plain memory's by more than 10%. Each mechanism (group
// inverted, group kept, tie inverted, read and write in one cycle, same
// address, read hold) is counted and must occur. A watchdog ends the run.
module tb_mlr_sram_top;
  localparam int M = 8, PB = 8, WORDS = 1024, AW = 10, DW = 64, SW = 72;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wpix = '0, rpix;
  logic          rvalid;
  logic [SW-1:0] rbl_o;

  mlr_sram_top dut (.*);

  logic [DW-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0, cycles = 0;
  int n_inv = 0, n_keep = 0, n_tie = 0, n_rw = 0, n_same = 0, n_hold = 0;
  longint rbl_zeros = 0, plain_zeros = 0, wbl_toggles = 0, plain_wbl_toggles = 0;
  logic [SW-1:0] last_stored = '1;
  logic [DW-1:0] last_plain = '1;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stored form of M pixels, worked out from bytes: group d = bit d of each
  // pixel, inverted with flag 1 when it holds at most M/2 ones
  function automatic logic [SW-1:0] stored_form(input logic [DW-1:0] px);
    logic [7:0] b [M];
    logic [M-1:0] g;
    logic [SW-1:0] s;
    for (int p = 0; p < M; p++) b[p] = px[p*PB +: PB];
    for (int d = 0; d < PB; d++) begin
      for (int p = 0; p < M; p++) g[p] = b[p][d];
      s[DW + d] = ($countones(g) <= M / 2);
      s[d*M +: M] = s[DW + d] ? ~g : g;
    end
    return s;
  endfunction

  function automatic void count_groups(input logic [DW-1:0] px);
    logic [M-1:0] g;
    for (int d = 0; d < PB; d++) begin
      for (int p = 0; p < M; p++) g[p] = px[p*PB + d];
      if ($countones(g) == M / 2) n_tie++;
      if ($countones(g) <= M / 2) n_inv++; else n_keep++;
    end
  endfunction

  // expected read of the previous cycle
  logic          exp_valid = 1'b0;
  logic [DW-1:0] exp_pix = '0;
  logic          measure = 1'b0;

  task automatic compare();
    checks++;
    if (rvalid !== exp_valid) begin
      failures++;
      $display("FAIL cycle %0d rvalid %b want %b", cycles, rvalid, exp_valid);
    end
    if (exp_valid || n_hold > 0) begin
      checks++;
      if (rpix !== exp_pix) begin
        failures++;
        $display("FAIL cycle %0d rpix %h want %h", cycles, rpix, exp_pix);
      end
      checks++;
      if (rbl_o !== stored_form(exp_pix)) begin
        failures++;
        $display("FAIL cycle %0d rbl %h want %h", cycles, rbl_o, stored_form(exp_pix));
      end
    end
    if (exp_valid && measure) begin
      rbl_zeros   += longint'(SW) - longint'($countones(rbl_o));
      plain_zeros += longint'(DW) - longint'($countones(exp_pix));
    end
  endtask

  // one cycle: apply at the falling edge, check the last read first
  task automatic cycle(input logic w, input logic [AW-1:0] wa, input logic [DW-1:0] wd,
                       input logic r, input logic [AW-1:0] ra);
    logic [SW-1:0] st;
    @(negedge clk);
    compare();
    we = w; waddr = wa; wpix = wd; re = r; raddr = ra;
    if (r) exp_pix = ref_mem[ra];          // old data on a same-address write
    else if (exp_valid == 1'b0 && rst_n) n_hold++;
    exp_valid = r;
    if (w && r) n_rw++;
    if (w && r && wa == ra) n_same++;
    if (w) begin
      ref_mem[wa] = wd;
      count_groups(wd);
      st = stored_form(wd);
      wbl_toggles       += $countones(st ^ last_stored);
      plain_wbl_toggles += $countones(wd ^ last_plain);
      last_stored = st;
      last_plain  = wd;
    end
  endtask

  function automatic logic [DW-1:0] smooth_word(input int a);
    logic [DW-1:0] w;
    int x, y, v;
    for (int p = 0; p < M; p++) begin
      x = (a % 240) * M + p;     // 1920-pixel line = 240 words
      y = a / 240;
      v = 40 + x / 24 + 6 * y + int'($urandom % 5) - 2;
      if (v < 0) v = 0;
      if (v > 255) v = 255;
      w[p*PB +: PB] = 8'(v);
    end
    return w;
  endfunction

  real ratio_img, ratio_rnd;

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (rvalid !== 1'b0 || rbl_o !== '1) begin failures++; $display("FAIL reset state"); end
    rst_n = 1'b1;

    // phase 1: smooth image
    for (int a = 0; a < WORDS; a++) cycle(1'b1, AW'(a), smooth_word(a), 1'b0, '0);
    measure = 1'b1;
    for (int a = 0; a < WORDS; a++) cycle(1'b0, '0, '0, 1'b1, AW'(a));
    cycle(1'b0, '0, '0, 1'b0, '0);
    measure = 1'b0;
    ratio_img = real'(rbl_zeros) / real'(plain_zeros);
    $display("smooth image: %0d RBL discharges vs %0d plain, ratio %0.3f", rbl_zeros, plain_zeros, ratio_img);
    $display("smooth image writes: %0d WBL toggles vs %0d plain", wbl_toggles, plain_wbl_toggles);
    // write bitlines are not precharged: the flag bits must not add write power
    checks++;
    if (real'(wbl_toggles) > 1.1 * real'(plain_wbl_toggles)) begin
      failures++;
      $display("FAIL write-bitline toggles grow by more than 10%%");
    end

    // phase 2: random pixels
    rbl_zeros = 0; plain_zeros = 0;
    for (int a = 0; a < WORDS; a++) cycle(1'b1, AW'(a), {$urandom, $urandom}, 1'b0, '0);
    measure = 1'b1;
    for (int a = 0; a < WORDS; a++) cycle(1'b0, '0, '0, 1'b1, AW'(a));
    cycle(1'b0, '0, '0, 1'b0, '0);
    measure = 1'b0;
    ratio_rnd = real'(rbl_zeros) / real'(plain_zeros);
    $display("random data: %0d RBL discharges vs %0d plain, ratio %0.3f (expected 0.817)", rbl_zeros, plain_zeros, ratio_rnd);
    checks++;
    if (ratio_rnd < 0.737 || ratio_rnd > 0.897) begin failures++; $display("FAIL random-data ratio"); end
    checks++;
    if (!(ratio_img < ratio_rnd)) begin failures++; $display("FAIL smooth image saves no more than random data"); end

    // phase 3: one write and one read per cycle
    for (int n = 0; n < 3000; n++) begin
      logic [AW-1:0] wa;
      wa = AW'($urandom);
      cycle(($urandom % 4) != 0, wa, (n % 3 == 0) ? smooth_word(int'(wa)) : {$urandom, $urandom},
            ($urandom % 5) != 0, (n % 9 == 0) ? wa : AW'($urandom));
    end
    cycle(1'b0, '0, '0, 1'b0, '0);
    cycle(1'b0, '0, '0, 1'b0, '0);
    // throughput: a read issued in every cycle returns in every cycle
    for (int a = 0; a < 16; a++) cycle(1'b1, AW'(a), {$urandom, $urandom}, 1'b1, AW'(a + 100));
    cycle(1'b0, '0, '0, 1'b0, '0);

    $display("mechanisms: inverted groups %0d, kept groups %0d, ties %0d, read+write cycles %0d, same-address %0d, holds %0d",
             n_inv, n_keep, n_tie, n_rw, n_same, n_hold);
    checks++; if (n_inv  == 0) begin failures++; $display("FAIL no inverted group"); end
    checks++; if (n_keep == 0) begin failures++; $display("FAIL no kept group"); end
    checks++; if (n_tie  == 0) begin failures++; $display("FAIL no tie"); end
    checks++; if (n_rw   == 0) begin failures++; $display("FAIL no read+write cycle"); end
    checks++; if (n_same == 0) begin failures++; $display("FAIL no same-address cycle"); end
    checks++; if (n_hold == 0) begin failures++; $display("FAIL no read hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
