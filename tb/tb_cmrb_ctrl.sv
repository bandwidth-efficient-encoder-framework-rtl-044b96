// tb_cmrb_ctrl: default parameters (44 MBs per row, +-16 row buffer,
// +-64 maximal vertical range, +-128 horizontal range).
// Gather: rows of random base-layer vertical MVs; the centre must be the
// rounded mean of the doubled vectors, limited to +-48; a row of large
// vectors checks the limit. Check: random predictors against an independent
// containment test, boundary cases on both edges of the window, the
// refinement-region origin, the request counter, and the one-cycle latency
// with back-pressure.
module tb_cmrb_ctrl;
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

  logic rc, gv, vcv, cv, crdy, ov, ordy, oref;
  logic signed [9:0] gy, vc, cx, cy;
  logic [7:0] mbx, mby;
  logic signed [10:0] omx, omy;
  logic signed [12:0] orx, ory;
  logic [15:0] rcnt;

  cmrb_ctrl dut (.clk, .rst_n, .row_clear(rc), .gat_valid(gv), .gat_mvy(gy), .vc_valid(vcv), .vcenter(vc),
    .chk_valid(cv), .chk_ready(crdy), .chk_mb_x(mbx), .chk_mb_y(mby), .chk_mvx(cx), .chk_mvy(cy),
    .out_valid(ov), .out_ready(ordy), .out_mvx(omx), .out_mvy(omy), .out_refine(oref), .out_rx(orx),
    .out_ry(ory), .refine_count(rcnt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic gather_row(int lo, int hi, output int expc);
    int s = 0, a;
    for (int i = 0; i < 44; i++) begin
      automatic int m = $urandom_range(0, hi - lo) + lo;
      s += 2 * m;
      @(negedge clk); gv = 1; gy = 10'(m);
    end
    @(negedge clk); gv = 0;
    a = (s >= 0) ? (s + 22) / 44 : -((-s + 22) / 44);
    if (a > 48) a = 48;
    if (a < -48) a = -48;
    expc = a;
    while (!vcv) @(negedge clk);
  endtask

  task automatic do_check(int x, int y, int mvx, int mvy, bit exp_ref);
    int ux = 2 * mvx, uy = 2 * mvy;
    @(negedge clk);
    cv = 1; mbx = 8'(x); mby = 8'(y); cx = 10'(mvx); cy = 10'(mvy);
    @(negedge clk);
    cv = 0;
    check("out_valid", ov, 1);
    check("refine", oref, exp_ref);
    check("mvx", omx, ux); check("mvy", omy, uy);
    check("rx", orx, 16 * x + ux - 8); check("ry", ory, 16 * y + uy - 8);
  endtask

  initial begin
    int c, nref;
    rc = 0; gv = 0; gy = 0; cv = 0; mbx = 0; mby = 0; cx = 0; cy = 0; ordy = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      gather_row(-20, 20, c);
      check("vcenter", vc, c);
    end
    gather_row(40, 60, c);
    check("vcenter clamped", vc, 48);
    check("clamp value", c, 48);
    // centre 48: window [32, 64)
    nref = 0;
    do_check(3, 2, 0, 18, 0);   // uy 36: 32..40 inside
    do_check(3, 2, 0, 29, 0);   // uy 58: 54..62 inside
    do_check(3, 2, 0, 30, 1); nref++;   // uy 60: 64 outside
    do_check(3, 2, 0, 17, 1); nref++;   // uy 34: 30 outside
    do_check(5, 7, 62, 20, 1); nref++;  // ux 124: 120..128 -> 128 not < 128
    do_check(5, 7, 61, 20, 0);  // ux 122: ..126 inside
    do_check(5, 7, -62, 20, 0); // ux -124: -128 inside
    do_check(5, 7, -63, 20, 1); nref++;
    repeat (300) begin
      automatic int mx = $urandom_range(0, 160) - 80, my = $urandom_range(0, 80) - 40;
      automatic bit e = !((2*my - 4 >= 32) && (2*my + 4 < 64) && (2*mx - 4 >= -128) && (2*mx + 4 < 128));
      nref += e;
      do_check($urandom_range(0, 43), $urandom_range(0, 35), mx, my, e);
    end
    check("refine count", rcnt, nref);
    // back-pressure: result held, no new accept
    @(negedge clk); ordy = 0;
    @(negedge clk); cv = 1; cx = 10'sd1; cy = 10'sd20;
    @(negedge clk); check("held valid", ov, 1); check("ready low", crdy, 0);
    cx = 10'sd5;
    @(negedge clk); check("held mvx", omx, 2);
    cv = 0; ordy = 1;
    @(negedge clk); check("released", ov, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
