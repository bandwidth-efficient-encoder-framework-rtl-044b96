// tb_sr_loader: default (4CIF, CMRB) parameters: 704 x 576 frames, B-frame
// window 288 x 48 (+-128 x +-16), key window 416 x 48 (+-192 x +-16).
// An external memory model returns pixel value hash(address) after a random
// latency. For each command the testbench predicts, for every write into the
// search-range memory or the refinement buffer, the frame position it must
// come from (window origin, Level C strip position, CMRB centre, clamping at
// the frame edges, reference base) and checks the pixel and the number of
// pixels fetched: N*(2*SRV+N) = 768 per reference per MB step. Covers
// B-frame and key-frame row starts, MB steps, a left/top edge row and a
// refinement load with its reported origin.
module tb_sr_loader;
  import svc_pkg::*;
  localparam int FW = 704, FH = 576;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic cv, crdy, cref, rqv, rqr, rsv, srrs, sradv, srwe, srwr, rbwe, rbwr, rbld, rblr, busy;
  ld_op_e op; me_mode_e cmode, srm;
  logic [7:0] mbx, mby; logic signed [9:0] vc; logic [23:0] bases [2]; logic signed [12:0] rx, ry;
  logic [23:0] rqa; logic [7:0] rsd, srwd, rbwd; logic [8:0] srwx; logic [5:0] srwy; logic [4:0] rbwx, rbwy;
  logic signed [12:0] rbox, rboy; logic [31:0] pc;

  sr_loader dut (.clk, .rst_n, .cmd_valid(cv), .cmd_ready(crdy), .cmd_op(op), .cmd_mode(cmode), .cmd_mb_x(mbx),
    .cmd_mb_y(mby), .cmd_vcenter(vc), .cmd_ref_base(bases), .cmd_ref(cref), .cmd_rx(rx), .cmd_ry(ry),
    .rd_req_valid(rqv), .rd_req_ready(rqr), .rd_req_addr(rqa), .rd_resp_valid(rsv), .rd_resp_data(rsd),
    .sr_mode(srm), .sr_row_start(srrs), .sr_advance(sradv), .sr_wr_en(srwe), .sr_wr_ref(srwr), .sr_wr_x(srwx),
    .sr_wr_y(srwy), .sr_wr_data(srwd), .rb_wr_en(rbwe), .rb_wr_ref(rbwr), .rb_wr_x(rbwx), .rb_wr_y(rbwy),
    .rb_wr_data(rbwd), .rb_load_done(rbld), .rb_load_ref(rblr), .rb_load_ox(rbox), .rb_load_oy(rboy),
    .pix_count(pc), .busy);

  function automatic logic [7:0] pix(int a);
    return 8'((a * 37) ^ (a >> 7) ^ (a >> 13));
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // external memory model
  int lat = 0; bit pend = 0; int paddr = 0;
  always_ff @(posedge clk) begin
    rsv <= 1'b0;
    rqr <= ($urandom_range(0, 3) != 0);
    if (rst_n) begin
      if (pend) begin
        if (lat == 0) begin rsv <= 1'b1; rsd <= pix(paddr); pend = 0; end
        else lat--;
      end else if (rqv && rqr) begin
        paddr = int'(rqa); pend = 1; lat = $urandom_range(0, 2);
      end
    end
  end

  // write checker: expected source of a window write
  int exp_x0, exp_y0, exp_dcol, n_sr, n_rb, n_rs, n_adv, n_ld;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (srrs) n_rs++;
      if (sradv) n_adv++;
      if (rbld) n_ld++;
      if (srwe) begin
        int fx, fy;
        fx = clampi(exp_x0 + int'(srwx) - exp_dcol, 0, FW - 1);
        fy = clampi(exp_y0 + int'(srwy), 0, FH - 1);
        n_sr++;
        check("sr pixel", srwd, pix(int'(bases[srwr]) + fy * FW + fx));
      end
      if (rbwe) begin
        int fx, fy;
        fx = clampi(exp_x0 + int'(rbwx), 0, FW - 1);
        fy = clampi(exp_y0 + int'(rbwy), 0, FH - 1);
        n_rb++;
        check("rb pixel", rbwd, pix(int'(bases[rbwr]) + fy * FW + fx));
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(ld_op_e o, me_mode_e m, int x, int y, int v, int xe0, int ye0, int dc);
    exp_x0 = xe0; exp_y0 = ye0; exp_dcol = dc; n_sr = 0; n_rb = 0;
    @(negedge clk);
    while (!crdy) @(negedge clk);
    cv = 1; op = o; cmode = m; mbx = 8'(x); mby = 8'(y); vc = 10'(v);
    @(negedge clk); cv = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    int p0;
    n_rs = 0; n_adv = 0; n_ld = 0; n_sr = 0; n_rb = 0; exp_x0 = 0; exp_y0 = 0; exp_dcol = 0;
    cv = 0; op = LD_ROW_START; cmode = ME_B_FRAME; mbx = 0; mby = 0; vc = 0; cref = 0; rx = 0; ry = 0;
    bases[0] = 24'h100000; bases[1] = 24'h200000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // B-frame row 10, centre -6: rows 160-6-16 = 138.., window x from -128
    issue(LD_ROW_START, ME_B_FRAME, 0, 10, -6, -128, 138, 0);
    check("row start pixels", n_sr, 2 * 288 * 48);
    check("row start pulse", n_rs, 1);
    check("mode", srm, ME_B_FRAME);
    for (int m = 1; m < 4; m++) begin
      p0 = int'(pc);
      issue(LD_MB_STEP, ME_B_FRAME, m, 10, 33, 16 * m - 128 + 288 - 16, 138, 288 - 16);
      check("mb step pixels", n_sr, 2 * 16 * 48);
      check("Level C bandwidth per MB", int'(pc) - p0, 2 * 16 * (2 * 16 + 16));
    end
    check("advance pulses", n_adv, 3);
    // key frame, last MB row near the bottom edge, centre +40
    issue(LD_ROW_START, ME_KEY, 40, 35, 40, 640 - 192, 560 + 40 - 16, 0);
    check("key row start pixels", n_sr, 416 * 48);
    check("key mode", srm, ME_KEY);
    p0 = int'(pc);
    issue(LD_MB_STEP, ME_KEY, 41, 35, 0, 656 - 192 + 416 - 16, 584, 416 - 16);
    check("key mb step pixels", n_sr, 16 * 48);
    check("key Level C bandwidth", int'(pc) - p0, 16 * 48);
    // refinement region for reference 1 at (-5, 20)
    cref = 1; rx = -13'sd5; ry = 13'sd20;
    issue(LD_REFINE, ME_B_FRAME, 0, 0, 0, -5, 20, 0);
    check("refine pixels", n_rb, 32 * 32);
    check("refine done", n_ld, 1);
    check("refine ref", rblr, 1);
    check("refine ox", rbox, -5);
    check("refine oy", rboy, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
