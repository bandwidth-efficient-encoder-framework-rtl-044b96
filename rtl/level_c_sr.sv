// level_c_sr: search-range subsystem of a lower spatial layer (QCIF, CIF):
// plain Level C data reuse with a search window tall enough for the whole
// vertical range, feeding full-search motion estimation.
//
// Small frames are cheap to search exhaustively, so they get no centric
// moving row buffer and no refinement regions: the window of MB (mb_x, mb_y)
// covers columns [16*mb_x - SRH, 16*mb_x - SRH + 2N + 2SRH) and rows
// [16*mb_y - SRV, 16*mb_y + N + SRV). A row start loads the whole window;
// each MB step loads only the N new columns, N*(2SRV+N) pixels per
// reference. B-frames keep one window per reference in the two banks of
// sr_memory; key frames use the two banks as one window with the wider
// level-0 range. This module is sr_loader (with the row centre fixed at 0)
// plus sr_memory. The default sizes are the CIF layer's: B-frame +-64 x +-32
// (160 x 80 per reference), key frame +-96 x +-48 (224 x 112 in the 25600
// bytes of both banks); with SRH_B = 32, SRV_B = 16, SRH_K = 48, SRV_K = 24
// it is the QCIF layer (2 x 96 x 48 = 9216 bytes).
//
// Interface: command valid/ready; cmd_step = 0 is a row start, 1 an MB step;
// cmd_mode selects B-frame or key-frame windows (taken at row start). The
// external pixel read port is as sr_loader's (one request outstanding,
// address ref_base + y*FRAME_W + x). The motion estimator reads window
// coordinates on rd_x/rd_y, one-cycle latency; port p is reference p in
// B-frame mode. pix_count counts fetched pixels. The sizes follow the
// document's tables; the module boundary and command encoding are this
// design's own. The loader's refinement-buffer outputs are unused here.
module level_c_sr
  import svc_pkg::*;
#(
  parameter int FRAME_W = 352,
  parameter int FRAME_H = 288,
  parameter int N       = 16,
  parameter int SRH_B   = 64,
  parameter int SRV_B   = 32,
  parameter int SRH_K   = 96,
  parameter int SRV_K   = 48,
  parameter int EXT_AW  = 24,
  parameter int CW      = 12,
  localparam int W_B = 2 * N + 2 * SRH_B,
  localparam int H_B = 2 * SRV_B + N,
  localparam int W_K = 2 * N + 2 * SRH_K,
  localparam int H_K = 2 * SRV_K + N,
  localparam int XW  = $clog2((W_K > W_B) ? W_K : W_B),
  localparam int YW  = $clog2((H_K > H_B) ? H_K : H_B)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_step,
  input  me_mode_e          cmd_mode,
  input  logic [CW-5:0]     cmd_mb_x,
  input  logic [CW-5:0]     cmd_mb_y,
  input  logic [EXT_AW-1:0] ref_base [2],
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [EXT_AW-1:0] rd_req_addr,
  input  logic              rd_resp_valid,
  input  logic [7:0]        rd_resp_data,
  input  logic [XW-1:0]     rd_x [2],
  input  logic [YW-1:0]     rd_y [2],
  output logic [7:0]        rd_data [2],
  output me_mode_e          mode,
  output logic              busy,
  output logic [31:0]       pix_count
);
  localparam int MVW = 10;

  logic            sr_row_start, sr_advance, sr_we, sr_wref;
  logic [XW-1:0]   sr_wx;
  logic [YW-1:0]   sr_wy;
  logic [7:0]      sr_wd;
  // refinement-buffer side of the loader: never commanded here
  logic            rb_we, rb_wref, rb_ld, rb_ldref;
  logic [4:0]      rb_wx, rb_wy;
  logic [7:0]      rb_wd;
  logic signed [CW:0] rb_ox, rb_oy;

  sr_loader #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .N(N), .SRH_B(SRH_B), .SRV_B(SRV_B),
              .SRH_K(SRH_K), .SRV_K(SRV_K), .RW(32), .EXT_AW(EXT_AW), .CW(CW), .MVW(MVW)) u_ld (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op(cmd_step ? LD_MB_STEP : LD_ROW_START), .cmd_mode,
    .cmd_mb_x, .cmd_mb_y, .cmd_vcenter('0), .cmd_ref_base(ref_base), .cmd_ref(1'b0),
    .cmd_rx('0), .cmd_ry('0),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .sr_mode(mode), .sr_row_start, .sr_advance, .sr_wr_en(sr_we), .sr_wr_ref(sr_wref),
    .sr_wr_x(sr_wx), .sr_wr_y(sr_wy), .sr_wr_data(sr_wd),
    .rb_wr_en(rb_we), .rb_wr_ref(rb_wref), .rb_wr_x(rb_wx), .rb_wr_y(rb_wy), .rb_wr_data(rb_wd),
    .rb_load_done(rb_ld), .rb_load_ref(rb_ldref), .rb_load_ox(rb_ox), .rb_load_oy(rb_oy),
    .pix_count, .busy);

  sr_memory #(.N(N), .SRH_B(SRH_B), .SRV_B(SRV_B), .SRH_K(SRH_K), .SRV_K(SRV_K)) u_srm (
    .clk, .rst_n, .mode, .row_start(sr_row_start), .advance(sr_advance),
    .wr_en(sr_we), .wr_ref(sr_wref), .wr_x(sr_wx), .wr_y(sr_wy), .wr_data(sr_wd),
    .rd_x, .rd_y, .rd_data);
endmodule
