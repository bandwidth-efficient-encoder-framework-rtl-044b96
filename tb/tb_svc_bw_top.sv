// tb_svc_bw_top: end-to-end test of the whole design at its default
// parameters (4CIF, three FGS enhancement layers, 4x4 blocks, 16-deep
// buckets, +-128/+-192 x +-16 search windows).
//
// FGS: NMB macroblocks (1584 = one whole 704x576 frame by default) of 24
// blocks x 16 random coefficients with random QPs are streamed in. An
// independent model runs the quantization cascade and the FGS scan rule and
// predicts the base-layer levels and, for every enhancement layer, the
// symbols in frame-level coding order (scan 0 of all blocks, then scan 1,
// ...). External memories are behavioural: random write back-pressure, reads
// answered after a random latency, random back-pressure at the outputs.
//
// ME: ME_ROWS MB rows (two B-frame rows, one of them with large vertical
// motion, then a key-frame row), each with the CMRB centre computed from
// random base-layer MVs, a row start, MB steps over the whole row, and a
// predictor check per MB. The search-range memory, the refinement buffer and
// the loaded-pixel count are compared with the model frame.
//
// CIF and QCIF: lc_sr_agent drives each lower-layer search-range port
// group (B-frame rows at the top and bottom frame edges, a key-frame row),
// checking Level C pixel counts and window contents.
//
// Every mechanism is counted and must occur at least once: cascade stall,
// refinement (RC) symbols, NC runs that skip RCs, NC-end symbols, full-bucket
// bursts, frame-end partial bursts, output back-pressure, CMRB centre limit,
// refinement-region loads, predictors inside the row buffer, B and key
// windows, Level C steps, and the lower layers' steps and windows. RC truncation to +-1 is counted but not required:
// with the rounding quantizer and QP-6 per layer an RC residual is at most
// half the previous step, i.e. one new step, so its level never exceeds 1
// when the cascade is fed consistently; tb_fgs_quant_stage drives arbitrary
// accumulators to exercise the limiter.
module tb_svc_bw_top;
  import svc_pkg::*;
  localparam int NMB = 1584;
  localparam int ME_ROWS = 3;
  localparam int NE = 3, FW = 704, FH = 576, SRHB = 128, SRHK = 192;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- DUT ----------------
  logic fs, fe, cv, crdy, bv;
  coef_t cf, bl; logic [5:0] cqp; logic [10:0] cmb, bmb; logic [4:0] cblk, bblk;
  logic ewv [NE], ewr [NE], ewl [NE], erv [NE], err [NE], ersv [NE];
  logic [23:0] ewa [NE], era [NE]; logic [31:0] ewd [NE], ersd [NE];
  logic ev [NE], erdy [NE], edone [NE], ebusy [NE], eovf [NE]; logic [3:0] escan [NE]; fgs_sym_t esym [NE];
  logic rclr, gv, vcv, mcv, mcr, pv, prdy, pref, lcv, lcr, mrv, mrr, mrsv, rbclr, rbref, mbusy;
  logic signed [9:0] gy, vc, mcx, mcy; logic [7:0] mcbx, mcby, lbx, lby;
  logic signed [10:0] pmx, pmy; ld_op_e lop; me_mode_e lmode, mmode;
  logic [23:0] rbase [2], mra; logic [7:0] mrsd;
  logic [8:0] srx [2]; logic [5:0] sry [2]; logic [7:0] srd [2];
  logic [4:0] rbx, rby; logic [7:0] rbd; logic [1:0] rbv; logic signed [12:0] rbox [2], rboy [2];
  logic [31:0] mpc; logic [15:0] rcnt;

  logic cif_cv, cif_cr, cif_cstep, cif_rv, cif_rr, cif_rsv, cif_busy, cif_done;
  me_mode_e cif_cmode, cif_mode; logic [7:0] cif_cx, cif_cy, cif_rsd; logic [23:0] cif_base [2], cif_ra;
  logic [31:0] cif_pc; logic [7:0] cif_sx [2]; logic [6:0] cif_sy [2]; logic [7:0] cif_sd [2];
  int cif_checks, cif_fail, cif_step, cif_brow, cif_krow;
  logic qcif_cv, qcif_cr, qcif_cstep, qcif_rv, qcif_rr, qcif_rsv, qcif_busy, qcif_done;
  me_mode_e qcif_cmode, qcif_mode; logic [7:0] qcif_cx, qcif_cy, qcif_rsd; logic [23:0] qcif_base [2], qcif_ra;
  logic [31:0] qcif_pc; logic [6:0] qcif_sx [2]; logic [5:0] qcif_sy [2]; logic [7:0] qcif_sd [2];
  int qcif_checks, qcif_fail, qcif_step, qcif_brow, qcif_krow;

  svc_bw_top dut (
    .clk, .rst_n, .frame_start(fs), .frame_end(fe), .coef_valid(cv), .coef_ready(crdy), .coef(cf),
    .coef_qp(cqp), .coef_mb(cmb), .coef_blk(cblk), .base_valid(bv), .base_level(bl), .base_mb(bmb),
    .base_blk(bblk), .ext_wr_valid(ewv), .ext_wr_ready(ewr), .ext_wr_addr(ewa), .ext_wr_data(ewd),
    .ext_wr_last(ewl), .ext_rd_valid(erv), .ext_rd_ready(err), .ext_rd_addr(era),
    .ext_rd_resp_valid(ersv), .ext_rd_resp_data(ersd), .enh_valid(ev), .enh_ready(erdy),
    .enh_scan(escan), .enh_sym(esym), .enh_done(edone), .enh_busy(ebusy), .fgs_overflow(eovf),
    .mv_row_clear(rclr), .mv_gat_valid(gv), .mv_gat_mvy(gy), .vc_valid(vcv), .vcenter(vc),
    .mb_chk_valid(mcv), .mb_chk_ready(mcr), .mb_chk_x(mcbx), .mb_chk_y(mcby), .mb_chk_mvx(mcx),
    .mb_chk_mvy(mcy), .pred_valid(pv), .pred_ready(prdy), .pred_mvx(pmx), .pred_mvy(pmy),
    .pred_refined(pref), .ld_cmd_valid(lcv), .ld_cmd_ready(lcr), .ld_cmd_op(lop), .ld_cmd_mode(lmode),
    .ld_cmd_mb_x(lbx), .ld_cmd_mb_y(lby), .ref_base(rbase), .me_rd_valid(mrv), .me_rd_ready(mrr),
    .me_rd_addr(mra), .me_rd_resp_valid(mrsv), .me_rd_resp_data(mrsd), .sr_rd_x(srx), .sr_rd_y(sry),
    .sr_rd_data(srd), .rb_clear(rbclr), .rb_rd_ref(rbref), .rb_rd_x(rbx), .rb_rd_y(rby),
    .rb_rd_data(rbd), .rb_valid(rbv), .rb_origin_x(rbox), .rb_origin_y(rboy), .me_mode(mmode),
    .me_busy(mbusy), .me_pix_count(mpc), .refine_count(rcnt),
    .cif_cmd_valid(cif_cv), .cif_cmd_ready(cif_cr), .cif_cmd_step(cif_cstep), .cif_cmd_mode(cif_cmode),
    .cif_cmd_mb_x(cif_cx), .cif_cmd_mb_y(cif_cy), .cif_ref_base(cif_base), .cif_rd_valid(cif_rv),
    .cif_rd_ready(cif_rr), .cif_rd_addr(cif_ra), .cif_rd_resp_valid(cif_rsv), .cif_rd_resp_data(cif_rsd),
    .cif_sr_rd_x(cif_sx), .cif_sr_rd_y(cif_sy), .cif_sr_rd_data(cif_sd), .cif_mode(cif_mode),
    .cif_busy(cif_busy), .cif_pix_count(cif_pc),
    .qcif_cmd_valid(qcif_cv), .qcif_cmd_ready(qcif_cr), .qcif_cmd_step(qcif_cstep), .qcif_cmd_mode(qcif_cmode),
    .qcif_cmd_mb_x(qcif_cx), .qcif_cmd_mb_y(qcif_cy), .qcif_ref_base(qcif_base), .qcif_rd_valid(qcif_rv),
    .qcif_rd_ready(qcif_rr), .qcif_rd_addr(qcif_ra), .qcif_rd_resp_valid(qcif_rsv), .qcif_rd_resp_data(qcif_rsd),
    .qcif_sr_rd_x(qcif_sx), .qcif_sr_rd_y(qcif_sy), .qcif_sr_rd_data(qcif_sd), .qcif_mode(qcif_mode),
    .qcif_busy(qcif_busy), .qcif_pix_count(qcif_pc));

  // CIF and QCIF search-range layers: own stimulus and checks
  lc_sr_agent #(.FRAME_W(352), .FRAME_H(288), .SRH_B(64), .SRV_B(32), .SRH_K(96), .SRV_K(48),
                .XW(8), .YW(7), .BASE0(24'h300000), .BASE1(24'h380000)) ag_cif (
    .clk, .rst_n, .start(rst_n), .cmd_valid(cif_cv), .cmd_ready(cif_cr), .cmd_step(cif_cstep),
    .cmd_mode(cif_cmode), .cmd_mb_x(cif_cx), .cmd_mb_y(cif_cy), .ref_base(cif_base),
    .rd_req_valid(cif_rv), .rd_req_ready(cif_rr), .rd_req_addr(cif_ra), .rd_resp_valid(cif_rsv),
    .rd_resp_data(cif_rsd), .rd_x(cif_sx), .rd_y(cif_sy), .rd_data(cif_sd), .mode(cif_mode),
    .busy(cif_busy), .pix_count(cif_pc), .checks(cif_checks), .failures(cif_fail),
    .n_step(cif_step), .n_brow(cif_brow), .n_krow(cif_krow), .done(cif_done));
  lc_sr_agent #(.FRAME_W(176), .FRAME_H(144), .SRH_B(32), .SRV_B(16), .SRH_K(48), .SRV_K(24),
                .XW(7), .YW(6), .BASE0(24'h400000), .BASE1(24'h440000)) ag_qcif (
    .clk, .rst_n, .start(rst_n), .cmd_valid(qcif_cv), .cmd_ready(qcif_cr), .cmd_step(qcif_cstep),
    .cmd_mode(qcif_cmode), .cmd_mb_x(qcif_cx), .cmd_mb_y(qcif_cy), .ref_base(qcif_base),
    .rd_req_valid(qcif_rv), .rd_req_ready(qcif_rr), .rd_req_addr(qcif_ra), .rd_resp_valid(qcif_rsv),
    .rd_resp_data(qcif_rsd), .rd_x(qcif_sx), .rd_y(qcif_sy), .rd_data(qcif_sd), .mode(qcif_mode),
    .busy(qcif_busy), .pix_count(qcif_pc), .checks(qcif_checks), .failures(qcif_fail),
    .n_step(qcif_step), .n_brow(qcif_brow), .n_krow(qcif_krow), .done(qcif_done));


  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_trunc = 0, n_rc = 0, n_skip_rc = 0, n_eob = 0, n_full_burst = 0, n_part_burst = 0;
  int n_backpressure = 0, n_clamp = 0, n_refine = 0, n_inside = 0, n_brow = 0, n_krow = 0, n_step = 0;

  // ---------------- FGS reference model ----------------
  function automatic int step16(int q);
    int t[6] = '{10, 11, 13, 14, 16, 18};
    return t[q % 6] * (1 << (q / 6));
  endfunction

  logic [30:0] exp_sym [NE][16][$];
  int          exp_base [$];

  function automatic logic [30:0] pack(sym_kind_e k, int mb, int blk, int v);
    fgs_sym_t s;
    s.kind = k; s.mb = MBW'(mb); s.blk = BLKW'(blk); s.val = coef_t'(v);
    return 31'(s);
  endfunction

  task automatic model_block(int mb, int blk, int c[16], int qp0);
    int lv [NE+1][16]; bit rc [NE+1][16];
    for (int i = 0; i < 16; i++) begin
      int acc = 0, q = qp0; bit sig = 0;
      for (int n = 0; n <= NE; n++) begin
        int d = c[i] - acc, s = (d < 0), m = s ? -d : d, l, r;
        l = (m * 16 + step16(q) / 2) / step16(q);
        if (l > 4095) l = 4095;
        rc[n][i] = (n > 0) && sig;
        if (rc[n][i] && l > 1) begin l = 1; n_trunc++; end
        r = (l * step16(q) + 8) / 16;
        acc += s ? -r : r;
        sig = rc[n][i] || (l != 0);
        lv[n][i] = s ? -l : l;
        q = (q >= 6) ? q - 6 : 0;
      end
      exp_base.push_back(lv[0][i]);
    end
    for (int n = 1; n <= NE; n++) begin
      bit coded [16];
      for (int i = 0; i < 16; i++) coded[i] = 0;
      for (int k = 0; k < 16; k++) begin
        if (rc[n][k]) exp_sym[n-1][k].push_back(pack(SYM_RC, mb, blk, lv[n][k]));
        else if (!coded[k]) begin
          bit found = 0;
          for (int i = k; i < 16; i++) if (!rc[n][i] && lv[n][i] != 0) found = 1;
          if (!found) begin
            exp_sym[n-1][k].push_back(pack(SYM_EOB, mb, blk, 0));
            for (int i = k; i < 16; i++) coded[i] = 1;
          end else
            for (int i = k; i < 16; i++) begin
              if (rc[n][i]) begin n_skip_rc++; continue; end
              exp_sym[n-1][k].push_back(pack(SYM_NC, mb, blk, lv[n][i]));
              coded[i] = 1;
              if (lv[n][i] != 0) break;
            end
        end
      end
    end
  endtask

  // ---------------- external memory models (FGS) ----------------
  logic [31:0] emem [NE][int];
  int blen [NE];
  int rlat [NE]; bit rpend [NE]; int raddr [NE];
  int got_n [NE]; int got_scan [NE]; int got_idx [NE];
  bit done_seen [NE];

  always_ff @(posedge clk) begin
    for (int n = 0; n < NE; n++) begin
      ewr[n]  <= ($urandom_range(0, 3) != 0);
      err[n]  <= ($urandom_range(0, 3) != 0);
      erdy[n] <= ($urandom_range(0, 4) != 0);
      ersv[n] <= 1'b0;
      if (!rst_n) begin
        blen[n] = 0; rpend[n] = 0; got_n[n] = 0; got_scan[n] = 0; got_idx[n] = 0; done_seen[n] = 0;
      end else begin
        if (ewv[n] && ewr[n]) begin
          emem[n][int'(ewa[n])] = ewd[n];
          blen[n]++;
          if (ewl[n]) begin
            if (blen[n] == 16) n_full_burst++; else n_part_burst++;
            blen[n] = 0;
          end
        end
        if (rpend[n]) begin
          if (rlat[n] == 0) begin
            ersv[n] <= 1'b1;
            ersd[n] <= emem[n].exists(raddr[n]) ? emem[n][raddr[n]] : 32'hdeadbeef;
            rpend[n] = 0;
          end else rlat[n]--;
        end else if (erv[n] && err[n]) begin
          raddr[n] = int'(era[n]); rpend[n] = 1; rlat[n] = $urandom_range(0, 2);
        end
        if (ev[n] && !erdy[n]) n_backpressure++;
        if (ev[n] && erdy[n]) begin
          // skip to the next non-empty expected scan
          while (got_scan[n] < 16 && got_idx[n] >= exp_sym[n][got_scan[n]].size()) begin
            got_scan[n]++; got_idx[n] = 0;
          end
          if (got_scan[n] >= 16) begin
            check("extra symbol", 1, 0);
          end else begin
            check("enh scan", escan[n], got_scan[n]);
            check("enh symbol", 31'(esym[n]), exp_sym[n][got_scan[n]][got_idx[n]]);
            if (esym[n].kind == SYM_EOB) n_eob++;
            if (esym[n].kind == SYM_RC) n_rc++;
            got_idx[n]++;
          end
          got_n[n]++;
        end
        if (edone[n]) begin
          done_seen[n] = 1;
          check("reader idle at done", ebusy[n], 0);
        end
      end
    end
  end

  // base-layer check
  int base_i = 0;
  always_ff @(posedge clk) if (rst_n && bv) begin
    if (base_i < exp_base.size()) check("base level", bl, exp_base[base_i]);
    base_i++;
  end
  always_ff @(posedge clk) if (rst_n && cv && !crdy) n_stall++;

  // ---------------- ME frame model ----------------
  function automatic logic [7:0] pix(int a);
    return 8'((a * 37) ^ (a >> 7) ^ (a >> 13));
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  int mlat = 0; bit mpend = 0; int maddr = 0;
  always_ff @(posedge clk) begin
    mrsv <= 1'b0;
    mrr  <= ($urandom_range(0, 3) != 0);
    if (rst_n) begin
      if (mpend) begin
        if (mlat == 0) begin mrsv <= 1'b1; mrsd <= pix(maddr); mpend = 0; end
        else mlat--;
      end else if (mrv && mrr) begin
        maddr = int'(mra); mpend = 1; mlat = $urandom_range(0, 2);
      end
    end
  end

  task automatic ld_cmd(ld_op_e o, me_mode_e m, int x, int y);
    @(negedge clk);
    lcv = 1; lop = o; lmode = m; lbx = 8'(x); lby = 8'(y);
    while (!lcr) @(negedge clk);
    @(negedge clk); lcv = 0;
    while (mbusy) @(negedge clk);
  endtask

  task automatic me_row(int y, me_mode_e m, int lo, int hi);
    int s = 0, c, y0, srh, w, nref, p0;
    // gather the row's base-layer vertical MVs
    @(negedge clk); rclr = 1; @(negedge clk); rclr = 0;
    for (int i = 0; i < FW / 16; i++) begin
      automatic int mv = int'($urandom_range(0, hi - lo)) + lo;
      s += 2 * mv;
      gv = 1; gy = 10'(mv); @(negedge clk);
    end
    gv = 0;
    while (!vcv) @(negedge clk);
    c = (s >= 0) ? (s + 22) / 44 : -((-s + 22) / 44);
    if (c > 48) begin c = 48; n_clamp++; end
    if (c < -48) begin c = -48; n_clamp++; end
    check("vcenter", vc, c);
    srh  = (m == ME_KEY) ? SRHK : SRHB;
    w    = 2 * 16 + 2 * srh;
    nref = (m == ME_KEY) ? 1 : 2;
    y0   = 16 * y + c - 16;
    p0 = int'(mpc);
    ld_cmd(LD_ROW_START, m, 0, y);
    check("row start pixels", int'(mpc) - p0, nref * w * 48);
    if (m == ME_KEY) n_krow++; else n_brow++;
    check("me mode", mmode, m);
    for (int mb = 0; mb < FW / 16; mb++) begin
      automatic int mvx = int'($urandom_range(0, 40)) - 20;
      automatic int mvy = c / 2 + int'($urandom_range(0, 16)) - 8;
      automatic bit e;
      if (mb > 0) begin
        p0 = int'(mpc);
        ld_cmd(LD_MB_STEP, m, mb, y);
        check("Level C pixels per MB", int'(mpc) - p0, nref * 16 * 48);
        n_step++;
      end
      // search-range memory against the frame
      repeat (8) begin
        automatic int x = $urandom_range(0, w - 1), yy = $urandom_range(0, 47);
        automatic int fx = clampi(16 * mb - srh + x, 0, FW - 1), fy = clampi(y0 + yy, 0, FH - 1);
        @(negedge clk); srx[0] = 9'(x); sry[0] = 6'(yy); srx[1] = 9'(x); sry[1] = 6'(yy);
        @(negedge clk);
        check("sr ref0", srd[0], pix(int'(rbase[0]) + fy * FW + fx));
        if (m == ME_B_FRAME) check("sr ref1", srd[1], pix(int'(rbase[1]) + fy * FW + fx));
      end
      // predictor check
      e = !((2 * mvy - 4 >= c - 16) && (2 * mvy + 4 < c + 16) && (2 * mvx - 4 >= -128) && (2 * mvx + 4 < 128));
      p0 = int'(mpc);
      @(negedge clk); mcv = 1; mcbx = 8'(mb); mcby = 8'(y); mcx = 10'(mvx); mcy = 10'(mvy);
      while (!mcr) @(negedge clk);
      @(negedge clk); mcv = 0;
      while (!pv) @(negedge clk);
      check("refined", pref, e);
      check("pred mvy", pmy, 2 * mvy);
      if (e) begin
        n_refine++;
        check("refine pixels", int'(mpc) - p0, nref * 32 * 32);
        check("refine valid", rbv, (m == ME_KEY) ? 2'b01 : 2'b11);
        check("refine ox", rbox[0], 16 * mb + 2 * mvx - 8);
        check("refine oy", rboy[0], 16 * y + 2 * mvy - 8);
        repeat (4) begin
          automatic int x = $urandom_range(0, 31), yy = $urandom_range(0, 31);
          automatic int fx = clampi(16 * mb + 2 * mvx - 8 + x, 0, FW - 1);
          automatic int fy = clampi(16 * y + 2 * mvy - 8 + yy, 0, FH - 1);
          rbref = 0; rbx = 5'(x); rby = 5'(yy);
          @(negedge clk);
          check("refine pixel", rbd, pix(int'(rbase[0]) + fy * FW + fx));
        end
      end else n_inside++;
      prdy = 1; @(negedge clk); prdy = 0;
      rbclr = 1; @(negedge clk); rbclr = 0;
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    #80000000;  // 8M cycles; the full frame needs about 3.5M
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fs = 0; fe = 0; cv = 0; cf = 0; cqp = 0; cmb = 0; cblk = 0;
    rclr = 0; gv = 0; gy = 0; mcv = 0; mcbx = 0; mcby = 0; mcx = 0; mcy = 0; prdy = 0;
    lcv = 0; lop = LD_ROW_START; lmode = ME_B_FRAME; lbx = 0; lby = 0; rbclr = 0; rbref = 0; rbx = 0; rby = 0;
    rbase[0] = 24'h010000; rbase[1] = 24'h080000;
    srx[0] = 0; srx[1] = 0; sry[0] = 0; sry[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      // ---- FGS frame ----
      begin
        @(negedge clk); fs = 1; @(negedge clk); fs = 0;
        for (int mb = 0; mb < NMB; mb++) begin
          automatic int qp0 = $urandom_range(24, 36);
          for (int b = 0; b < 24; b++) begin
            int c [16];
            for (int i = 0; i < 16; i++) begin
              automatic int r = $urandom_range(0, 99);
              c[i] = (r < 55) ? 0 : (r < 92) ? $urandom_range(1, 60) : $urandom_range(61, 2000);
              if ($urandom_range(0, 1)) c[i] = -c[i];
            end
            model_block(mb, b, c, qp0);
            for (int i = 0; i < 16; i++) begin
              cv = 1; cf = coef_t'(c[i]); cqp = 6'(qp0); cmb = 11'(mb); cblk = 5'(b);
              #1;
              while (!crdy) @(negedge clk);
              @(posedge clk); #1;
            end
            cv = 0;
          end
        end
        cv = 0;
        @(negedge clk); fe = 1; @(negedge clk); fe = 0;
        for (int n = 0; n < NE; n++) while (!done_seen[n]) @(negedge clk);
        repeat (10) @(negedge clk);
      end
      // ---- ME rows ----
      begin
        me_row(3, ME_B_FRAME, -6, 6);
        me_row(20, ME_B_FRAME, 28, 40);
        if (ME_ROWS > 2) me_row(35, ME_KEY, -10, 4);
      end
      // ---- lower spatial layers ----
      begin
        while (!(cif_done && qcif_done)) @(negedge clk);
      end
    join
    // final FGS checks
    check("base levels", base_i, exp_base.size());
    for (int n = 0; n < NE; n++) begin
      automatic int tot = 0;
      for (int k = 0; k < 16; k++) tot += exp_sym[n][k].size();
      check($sformatf("layer %0d symbols", n + 1), got_n[n], tot);
      $display("layer %0d: %0d symbols for %0d coefficients", n + 1, tot, NMB * 384);
      check("no overflow", eovf[n], 0);
    end
    check("refine count", rcnt, n_refine);
    $display("mechanisms: stall=%0d trunc=%0d RC=%0d skipRC=%0d NCend=%0d fullBurst=%0d partBurst=%0d backpressure=%0d clamp=%0d refine=%0d inside=%0d Brow=%0d keyRow=%0d step=%0d",
             n_stall, n_trunc, n_rc, n_skip_rc, n_eob, n_full_burst, n_part_burst, n_backpressure, n_clamp,
             n_refine, n_inside, n_brow, n_krow, n_step);
    check("mech stall", n_stall > 0, 1);
    check("mech refinement symbols", n_rc > 0, 1);
    check("mech NC run skipping RC", n_skip_rc > 0, 1);
    check("mech NC end", n_eob > 0, 1);
    check("mech full-bucket burst", n_full_burst > 0, 1);
    check("mech frame-end burst", n_part_burst > 0, 1);
    check("mech back-pressure", n_backpressure > 0, 1);
    check("mech CMRB limit", n_clamp > 0, 1);
    check("mech refinement load", n_refine > 0, 1);
    check("mech predictor inside", n_inside > 0, 1);
    check("mech B-frame window", n_brow > 0, 1);
    check("mech key-frame window", n_krow > 0, 1);
    check("mech Level C step", n_step > 0, 1);
    $display("lower layers: CIF steps=%0d B rows=%0d key rows=%0d, QCIF steps=%0d B rows=%0d key rows=%0d",
             cif_step, cif_brow, cif_krow, qcif_step, qcif_brow, qcif_krow);
    check("mech CIF Level C step", cif_step > 0, 1);
    check("mech CIF B and key windows", (cif_brow > 0) && (cif_krow > 0), 1);
    check("mech QCIF Level C step", qcif_step > 0, 1);
    check("mech QCIF B and key windows", (qcif_brow > 0) && (qcif_krow > 0), 1);
    checks += cif_checks + qcif_checks;
    failures += cif_fail + qcif_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
