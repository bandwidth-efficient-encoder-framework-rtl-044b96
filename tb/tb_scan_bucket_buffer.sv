// tb_scan_bucket_buffer: 4 buckets of depth 4, regions of 64 words. Random
// symbols go to random buckets while the external memory model accepts words
// with random back-pressure. Checks: every burst stays inside its bucket's
// region and is address-contiguous, full buckets go out as bursts of exactly
// BDEPTH words with `last` on the final one, the region contents after the
// frame-end flush equal each bucket's input in order, scan_count matches,
// flush_done pulses once, and a region overrun raises overflow.
module tb_scan_bucket_buffer;
  import svc_pkg::*;
  localparam int NB = 4, BD = 4, AW = 8, RL = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic fs, iv, ir, fls, fd, wv, wr, wl, ovf;
  logic [1:0] ib; fgs_sym_t isym; logic [AW-1:0] wa; logic [31:0] wd;
  logic [RL:0] cnt [NB];

  scan_bucket_buffer #(.NBUCKET(NB), .BDEPTH(BD), .EXT_AW(AW), .REGION_LOG2(RL)) dut (
    .clk, .rst_n, .frame_start(fs), .in_valid(iv), .in_ready(ir), .in_bucket(ib), .in_sym(isym),
    .flush_start(fls), .flush_done(fd), .ext_wr_valid(wv), .ext_wr_ready(wr), .ext_wr_addr(wa),
    .ext_wr_data(wd), .ext_wr_last(wl), .scan_count(cnt), .overflow(ovf));

  logic [31:0] ext [1 << AW];
  int burst_len = 0, burst_region = 0, last_addr = 0, n_bursts = 0, n_full_bursts = 0, n_done = 0;
  always_ff @(posedge clk) wr <= ($urandom_range(0, 2) != 0);
  always_ff @(posedge clk) begin
    if (rst_n && fd) n_done++;
    if (rst_n && wv && wr) begin
      ext[wa] = wd;
      if (burst_len == 0) burst_region = int'(wa) >> RL;
      else begin
        check("burst region", int'(wa) >> RL, burst_region);
        check("burst contiguous", int'(wa), last_addr + 1);
      end
      last_addr = int'(wa);
      burst_len++;
      if (wl) begin
        n_bursts++;
        if (burst_len == BD) n_full_bursts++;
        checks++;
        if (burst_len > BD) begin failures++; $display("FAIL burst of %0d", burst_len); end
        burst_len = 0;
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q [NB][$];
    int expect_full;
    fs = 0; iv = 0; ib = 0; isym = '0; fls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    fs <= 1; @(posedge clk); fs <= 0;
    for (int n = 0; n < 150; n++) begin
      fgs_sym_t s;
      int b;
      b = $urandom_range(0, NB - 1);
      s.kind = sym_kind_e'($urandom_range(0, 2));
      s.mb = MBW'($urandom); s.blk = BLKW'($urandom); s.val = coef_t'($urandom);
      q[b].push_back(32'(s));
      @(negedge clk);
      iv = 1; ib = 2'(b); isym = s;
      while (!ir) @(negedge clk);
      @(posedge clk);
      #1 iv = 0;
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    expect_full = 0;
    for (int b = 0; b < NB; b++) expect_full += q[b].size() / BD;
    fls <= 1; @(posedge clk); fls <= 0;
    while (!fd) @(posedge clk);
    repeat (3) @(posedge clk);
    check("flush_done pulses", n_done, 1);
    check("full bursts", n_full_bursts >= expect_full, 1);
    for (int b = 0; b < NB; b++) begin
      check($sformatf("scan_count %0d", b), cnt[b], q[b].size());
      foreach (q[b][i]) check($sformatf("region %0d word %0d", b, i), ext[(b << RL) + i], q[b][i]);
    end
    check("no overflow", ovf, 0);
    // overrun bucket 1: 64 words fit, the 65th overflows
    fs <= 1; @(posedge clk); fs <= 0;
    for (int n = 0; n < 68; n++) begin
      @(negedge clk);
      iv = 1; ib = 2'd1; isym = '0;
      while (!ir) @(negedge clk);
      @(posedge clk);
      #1 iv = 0;
    end
    repeat (40) @(posedge clk);
    check("overflow", ovf, 1);
    check("count capped", cnt[1], 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
