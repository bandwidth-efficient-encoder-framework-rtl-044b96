// svc_bw_top: bandwidth-efficient memory subsystem of a scalable (SVC)
// H.264/AVC encoder for one 4CIF spatial layer.
//
// Two independent datapaths cut the external-memory traffic that SVC adds to
// an H.264/AVC encoder:
//
// FGS (fine granularity SNR scalability). Transform coefficients enter one
// per cycle (zigzag order, NCOEF per 4x4 block, with MB and block index). A
// base loop and NUM_ENH enhancement loops (fgs_quant_stage, QP lowered by 6
// per loop) produce the base-layer levels and, per enhancement layer, levels
// classified as new or refinement coefficients. Each enhancement layer then
// runs the scan bucket algorithm: fgs_scan_analyzer decides at MB level which
// symbols each FGS scan codes, scan_bucket_buffer collects them in one
// on-chip bucket per scan and writes full buckets to external memory as
// bursts, and after frame_end (once the cascade has drained and the
// partly filled buckets are written) fgs_scan_reader reads the external
// regions back scan by scan, delivering the symbols in FGS coding order on
// enh_* for the enhancement-layer entropy coder. The cascade advances only
// when every analyzer can take a coefficient (global stall: coef_ready).
//
// ME search range. cmrb_ctrl gathers the upsampled base-layer vertical MVs of
// an MB row and places the centric moving row buffer; ld_cmd_* (row start,
// MB step) drive sr_loader, which fills sr_memory with the Level C window
// placed at that centre, two windows for a B-frame or one enlarged window
// for a key frame. For each MB, mb_chk_* presents its base-layer predictor;
// if the upsampled predictor falls outside the row buffer, a 32x32
// refinement region is loaded into refine_buffer for each reference before
// the predictor is handed on (pred_*). The motion estimator itself reads
// sr_rd_* / rb_rd_*.
//
// Lower spatial layers. The CIF and QCIF layers of the same encoder are
// small enough for full-search ME with a window covering the whole vertical
// range; u_cif and u_qcif (level_c_sr) hold their Level C windows (B-frame
// and key-frame modes as above, sizes from the level 1 and level 0 search
// ranges of each format) behind cif_* / qcif_* ports of the same kind.
//
// External memories are outside: each enhancement layer has a word write
// port and a word read port (ext_wr_*, ext_rd_*), the search-range fetch has
// a pixel read port (me_rd_*). All handshakes are valid/ready; read
// responses come any number of cycles after the request, in order.
// The base-layer level stream (base_*) has no back-pressure. enh_busy is
// high while a layer's reader is still reading its regions back. Bit 31 of
// ext_wr_data is always 0 (symbols are 31 bits) and bit 0 of pred_mvx /
// pred_mvy is always 0 (the predictor is twice the base-layer MV).
//
// From the paper: three FGS layers with QP lowered by 6 each, the NC/RC
// classification and +-1 RC truncation, the scan rule, one bucket per scan
// with burst writes and scan-ordered read-back; Level C reuse, the CMRB row
// centred on the base-layer vertical MVs, 32x32 refinement regions when a
// predictor leaves the row, and the key-frame window built from the two
// B-frame memories. Own choices: the scalar quantizer, the symbol word
// format, the fixed 2^REGION_LOG2-word region per scan, one outstanding read
// per reader, the centre as the rounded mean of the row's MVs, and the
// sequencing and port protocol.
module svc_bw_top
  import svc_pkg::*;
#(
  parameter int NUM_ENH     = 3,
  parameter int NCOEF       = 16,
  parameter int BDEPTH      = 16,
  parameter int EXT_AW      = 24,
  parameter int REGION_LOG2 = 20,
  parameter int FRAME_W     = 704,
  parameter int FRAME_H     = 576,
  parameter int N           = 16,
  parameter int SRH_B       = 128,
  parameter int SRH_K       = 192,
  parameter int SRV_C       = 16,
  parameter int SRV_MAX     = 64,
  parameter int RW          = 32,
  parameter int MVW         = 10,
  parameter int CW          = 12,
  // lower spatial layers (full-range Level C, Table 1 levels 1 and 0)
  parameter int CIF_W       = 352,
  parameter int CIF_H       = 288,
  parameter int CIF_SRH_B   = 64,
  parameter int CIF_SRV_B   = 32,
  parameter int CIF_SRH_K   = 96,
  parameter int CIF_SRV_K   = 48,
  parameter int QCIF_W      = 176,
  parameter int QCIF_H      = 144,
  parameter int QCIF_SRH_B  = 32,
  parameter int QCIF_SRV_B  = 16,
  parameter int QCIF_SRH_K  = 48,
  parameter int QCIF_SRV_K  = 24,
  localparam int KW   = $clog2(NCOEF),
  localparam int RCW  = REGION_LOG2 + 1,
  localparam int W_B  = 2 * N + 2 * SRH_B,
  localparam int H_B  = 2 * SRV_C + N,
  localparam int W_K  = 2 * N + 2 * SRH_K,
  localparam int XW   = $clog2((W_K > W_B) ? W_K : W_B),
  localparam int YW   = $clog2(H_B),
  localparam int RXW  = $clog2(RW),
  localparam int CXW  = $clog2((2 * N + 2 * CIF_SRH_K > 2 * N + 2 * CIF_SRH_B) ? 2 * N + 2 * CIF_SRH_K : 2 * N + 2 * CIF_SRH_B),
  localparam int CYW  = $clog2((2 * CIF_SRV_K > 2 * CIF_SRV_B) ? 2 * CIF_SRV_K + N : 2 * CIF_SRV_B + N),
  localparam int QXW  = $clog2((2 * N + 2 * QCIF_SRH_K > 2 * N + 2 * QCIF_SRH_B) ? 2 * N + 2 * QCIF_SRH_K : 2 * N + 2 * QCIF_SRH_B),
  localparam int QYW  = $clog2((2 * QCIF_SRV_K > 2 * QCIF_SRV_B) ? 2 * QCIF_SRV_K + N : 2 * QCIF_SRV_B + N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---------------- FGS ----------------
  input  logic                  frame_start,
  input  logic                  frame_end,
  input  logic                  coef_valid,
  output logic                  coef_ready,
  input  coef_t                 coef,
  input  logic [QPW-1:0]        coef_qp,
  input  logic [MBW-1:0]        coef_mb,
  input  logic [BLKW-1:0]       coef_blk,
  output logic                  base_valid,
  output coef_t                 base_level,
  output logic [MBW-1:0]        base_mb,
  output logic [BLKW-1:0]       base_blk,
  output logic                  ext_wr_valid [NUM_ENH],
  input  logic                  ext_wr_ready [NUM_ENH],
  output logic [EXT_AW-1:0]     ext_wr_addr  [NUM_ENH],
  output logic [EXT_DW-1:0]     ext_wr_data  [NUM_ENH],
  output logic                  ext_wr_last  [NUM_ENH],
  output logic                  ext_rd_valid [NUM_ENH],
  input  logic                  ext_rd_ready [NUM_ENH],
  output logic [EXT_AW-1:0]     ext_rd_addr  [NUM_ENH],
  input  logic                  ext_rd_resp_valid [NUM_ENH],
  input  logic [EXT_DW-1:0]     ext_rd_resp_data  [NUM_ENH],
  output logic                  enh_valid [NUM_ENH],
  input  logic                  enh_ready [NUM_ENH],
  output logic [KW-1:0]         enh_scan  [NUM_ENH],
  output fgs_sym_t              enh_sym   [NUM_ENH],
  output logic                  enh_done  [NUM_ENH],
  output logic                  enh_busy  [NUM_ENH],
  output logic                  fgs_overflow [NUM_ENH],
  // ---------------- ME search range ----------------
  input  logic                  mv_row_clear,
  input  logic                  mv_gat_valid,
  input  logic signed [MVW-1:0] mv_gat_mvy,
  output logic                  vc_valid,
  output logic signed [MVW-1:0] vcenter,
  input  logic                  mb_chk_valid,
  output logic                  mb_chk_ready,
  input  logic [CW-5:0]         mb_chk_x,
  input  logic [CW-5:0]         mb_chk_y,
  input  logic signed [MVW-1:0] mb_chk_mvx,
  input  logic signed [MVW-1:0] mb_chk_mvy,
  output logic                  pred_valid,
  input  logic                  pred_ready,
  output logic signed [MVW:0]   pred_mvx,
  output logic signed [MVW:0]   pred_mvy,
  output logic                  pred_refined,
  input  logic                  ld_cmd_valid,
  output logic                  ld_cmd_ready,
  input  ld_op_e                ld_cmd_op,
  input  me_mode_e              ld_cmd_mode,
  input  logic [CW-5:0]         ld_cmd_mb_x,
  input  logic [CW-5:0]         ld_cmd_mb_y,
  input  logic [EXT_AW-1:0]     ref_base [2],
  output logic                  me_rd_valid,
  input  logic                  me_rd_ready,
  output logic [EXT_AW-1:0]     me_rd_addr,
  input  logic                  me_rd_resp_valid,
  input  logic [7:0]            me_rd_resp_data,
  input  logic [XW-1:0]         sr_rd_x [2],
  input  logic [YW-1:0]         sr_rd_y [2],
  output logic [7:0]            sr_rd_data [2],
  input  logic                  rb_clear,
  input  logic                  rb_rd_ref,
  input  logic [RXW-1:0]        rb_rd_x,
  input  logic [RXW-1:0]        rb_rd_y,
  output logic [7:0]            rb_rd_data,
  output logic [1:0]            rb_valid,
  output logic signed [CW:0]    rb_origin_x [2],
  output logic signed [CW:0]    rb_origin_y [2],
  output me_mode_e              me_mode,
  output logic                  me_busy,
  output logic [31:0]           me_pix_count,
  output logic [15:0]           refine_count,
  // CIF layer search range (level_c_sr)
  input  logic                  cif_cmd_valid,
  output logic                  cif_cmd_ready,
  input  logic                  cif_cmd_step,
  input  me_mode_e              cif_cmd_mode,
  input  logic [CW-5:0]         cif_cmd_mb_x,
  input  logic [CW-5:0]         cif_cmd_mb_y,
  input  logic [EXT_AW-1:0]     cif_ref_base [2],
  output logic                  cif_rd_valid,
  input  logic                  cif_rd_ready,
  output logic [EXT_AW-1:0]     cif_rd_addr,
  input  logic                  cif_rd_resp_valid,
  input  logic [7:0]            cif_rd_resp_data,
  input  logic [CXW-1:0]        cif_sr_rd_x [2],
  input  logic [CYW-1:0]        cif_sr_rd_y [2],
  output logic [7:0]            cif_sr_rd_data [2],
  output me_mode_e              cif_mode,
  output logic                  cif_busy,
  output logic [31:0]           cif_pix_count,
  // QCIF layer search range (level_c_sr)
  input  logic                  qcif_cmd_valid,
  output logic                  qcif_cmd_ready,
  input  logic                  qcif_cmd_step,
  input  me_mode_e              qcif_cmd_mode,
  input  logic [CW-5:0]         qcif_cmd_mb_x,
  input  logic [CW-5:0]         qcif_cmd_mb_y,
  input  logic [EXT_AW-1:0]     qcif_ref_base [2],
  output logic                  qcif_rd_valid,
  input  logic                  qcif_rd_ready,
  output logic [EXT_AW-1:0]     qcif_rd_addr,
  input  logic                  qcif_rd_resp_valid,
  input  logic [7:0]            qcif_rd_resp_data,
  input  logic [QXW-1:0]        qcif_sr_rd_x [2],
  input  logic [QYW-1:0]        qcif_sr_rd_y [2],
  output logic [7:0]            qcif_sr_rd_data [2],
  output me_mode_e              qcif_mode,
  output logic                  qcif_busy,
  output logic [31:0]           qcif_pix_count
);

  // =====================================================================
  // FGS quantization cascade
  // =====================================================================
  localparam int ACCW = COEFW + 3;
  localparam int TAGW = MBW + BLKW;

  logic                   st_valid [NUM_ENH+1];
  coef_t                  st_coef  [NUM_ENH+1];
  logic signed [ACCW-1:0] st_acc   [NUM_ENH+1];
  logic                   st_sig   [NUM_ENH+1];
  logic [QPW-1:0]         st_qp    [NUM_ENH+1];
  logic [TAGW-1:0]        st_tag   [NUM_ENH+1];
  coef_t                  st_level [NUM_ENH+1];
  logic                   st_rc    [NUM_ENH+1];

  logic                   ana_in_ready [NUM_ENH];
  logic                   ana_idle     [NUM_ENH];
  logic                   en;

  always_comb begin
    en = 1'b1;
    for (int n = 0; n < NUM_ENH; n++) en &= ana_in_ready[n];
  end
  assign coef_ready = en;

  fgs_quant_stage #(.ENH(1'b0), .ACCW(ACCW), .TAGW(TAGW)) u_base_q (
    .clk, .rst_n, .en,
    .in_valid(coef_valid), .in_coef(coef), .in_acc('0), .in_sig(1'b0), .in_qp(coef_qp),
    .in_tag({coef_mb, coef_blk}),
    .out_valid(st_valid[0]), .out_coef(st_coef[0]), .out_acc(st_acc[0]), .out_sig(st_sig[0]),
    .out_qp(st_qp[0]), .out_tag(st_tag[0]), .out_level(st_level[0]), .out_rc(st_rc[0]));

  assign base_valid = st_valid[0] && en;
  assign base_level = st_level[0];
  assign {base_mb, base_blk} = st_tag[0];

  // frame-end drain detection
  logic fe_pend;
  logic drained;
  logic flush_go;
  always_comb begin
    drained = !coef_valid;
    for (int n = 0; n <= NUM_ENH; n++) drained &= !st_valid[n];
    for (int n = 0; n < NUM_ENH; n++)  drained &= ana_idle[n];
  end
  assign flush_go = fe_pend && drained;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              fe_pend <= 1'b0;
    else if (frame_end)      fe_pend <= 1'b1;
    else if (flush_go)       fe_pend <= 1'b0;
  end

  for (genvar n = 1; n <= NUM_ENH; n++) begin : g_enh
    logic            a_valid, a_ready;
    logic [KW-1:0]   a_bucket;
    fgs_sym_t        a_sym;
    logic            flush_done;
    logic [RCW-1:0]  scan_count [NCOEF];

    fgs_quant_stage #(.ENH(1'b1), .ACCW(ACCW), .TAGW(TAGW)) u_q (
      .clk, .rst_n, .en,
      .in_valid(st_valid[n-1]), .in_coef(st_coef[n-1]), .in_acc(st_acc[n-1]), .in_sig(st_sig[n-1]),
      .in_qp(st_qp[n-1]), .in_tag(st_tag[n-1]),
      .out_valid(st_valid[n]), .out_coef(st_coef[n]), .out_acc(st_acc[n]), .out_sig(st_sig[n]),
      .out_qp(st_qp[n]), .out_tag(st_tag[n]), .out_level(st_level[n]), .out_rc(st_rc[n]));

    fgs_scan_analyzer #(.NCOEF(NCOEF)) u_ana (
      .clk, .rst_n,
      .in_valid(st_valid[n] && en), .in_ready(ana_in_ready[n-1]),
      .in_level(st_level[n]), .in_rc(st_rc[n]),
      .in_mb(st_tag[n][TAGW-1:BLKW]), .in_blk(st_tag[n][BLKW-1:0]),
      .out_valid(a_valid), .out_ready(a_ready), .out_bucket(a_bucket), .out_sym(a_sym),
      .idle(ana_idle[n-1]));

    scan_bucket_buffer #(.NBUCKET(NCOEF), .BDEPTH(BDEPTH), .EXT_AW(EXT_AW), .REGION_LOG2(REGION_LOG2)) u_bkt (
      .clk, .rst_n, .frame_start,
      .in_valid(a_valid), .in_ready(a_ready), .in_bucket(a_bucket), .in_sym(a_sym),
      .flush_start(flush_go), .flush_done(flush_done),
      .ext_wr_valid(ext_wr_valid[n-1]), .ext_wr_ready(ext_wr_ready[n-1]), .ext_wr_addr(ext_wr_addr[n-1]),
      .ext_wr_data(ext_wr_data[n-1]), .ext_wr_last(ext_wr_last[n-1]),
      .scan_count(scan_count), .overflow(fgs_overflow[n-1]));

    fgs_scan_reader #(.NBUCKET(NCOEF), .EXT_AW(EXT_AW), .REGION_LOG2(REGION_LOG2)) u_rd (
      .clk, .rst_n, .start(flush_done), .scan_count(scan_count),
      .rd_req_valid(ext_rd_valid[n-1]), .rd_req_ready(ext_rd_ready[n-1]), .rd_req_addr(ext_rd_addr[n-1]),
      .rd_resp_valid(ext_rd_resp_valid[n-1]), .rd_resp_data(ext_rd_resp_data[n-1]),
      .out_valid(enh_valid[n-1]), .out_ready(enh_ready[n-1]), .out_scan(enh_scan[n-1]),
      .out_sym(enh_sym[n-1]), .busy(enh_busy[n-1]), .done(enh_done[n-1]));
  end

  // =====================================================================
  // ME search range: CMRB control, loader, SR memory, refinement buffer
  // =====================================================================
  logic                  c_valid, c_ready, c_refine;
  logic signed [MVW:0]   c_mvx, c_mvy;
  logic signed [CW:0]    c_rx, c_ry;

  cmrb_ctrl #(.MB_COLS(FRAME_W / N), .SRV_C(SRV_C), .SRV_MAX(SRV_MAX), .SRH(SRH_B), .REF(4),
              .RW(RW), .MVW(MVW), .CW(CW)) u_cmrb (
    .clk, .rst_n, .row_clear(mv_row_clear), .gat_valid(mv_gat_valid), .gat_mvy(mv_gat_mvy),
    .vc_valid, .vcenter,
    .chk_valid(mb_chk_valid), .chk_ready(mb_chk_ready), .chk_mb_x(mb_chk_x), .chk_mb_y(mb_chk_y),
    .chk_mvx(mb_chk_mvx), .chk_mvy(mb_chk_mvy),
    .out_valid(c_valid), .out_ready(c_ready), .out_mvx(c_mvx), .out_mvy(c_mvy),
    .out_refine(c_refine), .out_rx(c_rx), .out_ry(c_ry), .refine_count);

  // refinement sequencer: load one region per reference, then hand on
  typedef enum logic [2:0] {P_IDLE, P_REF0, P_REF1, P_WAIT, P_OUT} pst_e;
  pst_e p_st;

  logic                  l_valid, l_ready, l_ref;
  ld_op_e                l_op;
  me_mode_e              sr_mode;
  logic                  l_busy;
  logic                  refine_cmd;

  assign refine_cmd = (p_st == P_REF0) || (p_st == P_REF1);
  assign l_valid    = refine_cmd || (ld_cmd_valid && p_st == P_IDLE && !(c_valid && c_refine));
  assign l_op       = refine_cmd ? LD_REFINE : ld_cmd_op;
  assign l_ref      = (p_st == P_REF1);
  assign ld_cmd_ready = l_ready && !refine_cmd && p_st == P_IDLE && !(c_valid && c_refine);
  assign pred_valid   = (p_st == P_OUT);
  assign pred_mvx     = c_mvx;
  assign pred_mvy     = c_mvy;
  assign pred_refined = c_refine;
  assign c_ready      = (p_st == P_OUT) && pred_ready;
  assign me_mode      = sr_mode;
  assign me_busy      = l_busy || (p_st != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_st <= P_IDLE;
    else case (p_st)
      P_IDLE: if (c_valid) p_st <= c_refine ? P_REF0 : P_OUT;
      P_REF0: if (l_ready) p_st <= (sr_mode == ME_KEY) ? P_WAIT : P_REF1;
      P_REF1: if (l_ready) p_st <= P_WAIT;
      P_WAIT: if (!l_busy) p_st <= P_OUT;
      P_OUT:  if (pred_ready) p_st <= P_IDLE;
      default: p_st <= P_IDLE;
    endcase
  end

  logic                sr_row_start, sr_advance, sr_we, sr_wref;
  logic [XW-1:0]       sr_wx;
  logic [YW-1:0]       sr_wy;
  logic [7:0]          sr_wd;
  logic                rb_we, rb_wref, rb_ld, rb_ldref;
  logic [RXW-1:0]      rb_wx, rb_wy;
  logic [7:0]          rb_wd;
  logic signed [CW:0]  rb_ox, rb_oy;

  sr_loader #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .N(N), .SRH_B(SRH_B), .SRV_B(SRV_C),
              .SRH_K(SRH_K), .SRV_K(SRV_C), .RW(RW), .EXT_AW(EXT_AW), .CW(CW), .MVW(MVW)) u_ld (
    .clk, .rst_n,
    .cmd_valid(l_valid), .cmd_ready(l_ready), .cmd_op(l_op), .cmd_mode(ld_cmd_mode),
    .cmd_mb_x(ld_cmd_mb_x), .cmd_mb_y(ld_cmd_mb_y), .cmd_vcenter(vcenter), .cmd_ref_base(ref_base),
    .cmd_ref(l_ref), .cmd_rx(c_rx), .cmd_ry(c_ry),
    .rd_req_valid(me_rd_valid), .rd_req_ready(me_rd_ready), .rd_req_addr(me_rd_addr),
    .rd_resp_valid(me_rd_resp_valid), .rd_resp_data(me_rd_resp_data),
    .sr_mode, .sr_row_start, .sr_advance, .sr_wr_en(sr_we), .sr_wr_ref(sr_wref), .sr_wr_x(sr_wx),
    .sr_wr_y(sr_wy), .sr_wr_data(sr_wd),
    .rb_wr_en(rb_we), .rb_wr_ref(rb_wref), .rb_wr_x(rb_wx), .rb_wr_y(rb_wy), .rb_wr_data(rb_wd),
    .rb_load_done(rb_ld), .rb_load_ref(rb_ldref), .rb_load_ox(rb_ox), .rb_load_oy(rb_oy),
    .pix_count(me_pix_count), .busy(l_busy));

  sr_memory #(.N(N), .SRH_B(SRH_B), .SRV_B(SRV_C), .SRH_K(SRH_K), .SRV_K(SRV_C)) u_srm (
    .clk, .rst_n, .mode(sr_mode), .row_start(sr_row_start), .advance(sr_advance),
    .wr_en(sr_we), .wr_ref(sr_wref), .wr_x(sr_wx), .wr_y(sr_wy), .wr_data(sr_wd),
    .rd_x(sr_rd_x), .rd_y(sr_rd_y), .rd_data(sr_rd_data));

  refine_buffer #(.RW(RW), .NREF(2), .CW(CW)) u_rb (
    .clk, .rst_n, .clear(rb_clear), .wr_en(rb_we), .wr_ref(rb_wref), .wr_x(rb_wx), .wr_y(rb_wy),
    .wr_data(rb_wd), .load_done(rb_ld), .load_ref(rb_ldref), .load_ox(rb_ox), .load_oy(rb_oy),
    .rd_ref(rb_rd_ref), .rd_x(rb_rd_x), .rd_y(rb_rd_y), .rd_data(rb_rd_data),
    .region_valid(rb_valid), .origin_x(rb_origin_x), .origin_y(rb_origin_y));

  // =====================================================================
  // Lower spatial layers: full-range Level C search windows
  // =====================================================================
  level_c_sr #(.FRAME_W(CIF_W), .FRAME_H(CIF_H), .N(N), .SRH_B(CIF_SRH_B), .SRV_B(CIF_SRV_B),
               .SRH_K(CIF_SRH_K), .SRV_K(CIF_SRV_K), .EXT_AW(EXT_AW), .CW(CW)) u_cif (
    .clk, .rst_n, .cmd_valid(cif_cmd_valid), .cmd_ready(cif_cmd_ready), .cmd_step(cif_cmd_step),
    .cmd_mode(cif_cmd_mode), .cmd_mb_x(cif_cmd_mb_x), .cmd_mb_y(cif_cmd_mb_y), .ref_base(cif_ref_base),
    .rd_req_valid(cif_rd_valid), .rd_req_ready(cif_rd_ready), .rd_req_addr(cif_rd_addr),
    .rd_resp_valid(cif_rd_resp_valid), .rd_resp_data(cif_rd_resp_data),
    .rd_x(cif_sr_rd_x), .rd_y(cif_sr_rd_y), .rd_data(cif_sr_rd_data),
    .mode(cif_mode), .busy(cif_busy), .pix_count(cif_pix_count));

  level_c_sr #(.FRAME_W(QCIF_W), .FRAME_H(QCIF_H), .N(N), .SRH_B(QCIF_SRH_B), .SRV_B(QCIF_SRV_B),
               .SRH_K(QCIF_SRH_K), .SRV_K(QCIF_SRV_K), .EXT_AW(EXT_AW), .CW(CW)) u_qcif (
    .clk, .rst_n, .cmd_valid(qcif_cmd_valid), .cmd_ready(qcif_cmd_ready), .cmd_step(qcif_cmd_step),
    .cmd_mode(qcif_cmd_mode), .cmd_mb_x(qcif_cmd_mb_x), .cmd_mb_y(qcif_cmd_mb_y), .ref_base(qcif_ref_base),
    .rd_req_valid(qcif_rd_valid), .rd_req_ready(qcif_rd_ready), .rd_req_addr(qcif_rd_addr),
    .rd_resp_valid(qcif_rd_resp_valid), .rd_resp_data(qcif_rd_resp_data),
    .rd_x(qcif_sr_rd_x), .rd_y(qcif_sr_rd_y), .rd_data(qcif_sr_rd_data),
    .mode(qcif_mode), .busy(qcif_busy), .pix_count(qcif_pix_count));

endmodule
