// sr_loader: search-range fetch engine (Level C data reuse with a centric
// moving row buffer, plus refinement regions).
//
// The search window of the MB at (mb_x, mb_y) covers frame columns
// [16*mb_x - SRH, 16*mb_x - SRH + W) with W = 2N + 2*SRH: the search
// regions of the current MB and of the next one. Its rows are
// [16*mb_y + vcenter - SRV, ... + H) with H = 2*SRV + N, where vcenter is
// the row centre chosen by the CMRB control (0 gives the plain Level C
// window). Three commands:
//   LD_ROW_START  pulse sr_row_start and load the whole W x H window of
//                 every reference (the row's vertical placement is kept);
//   LD_MB_STEP    pulse sr_advance and load only the N new columns
//                 [16*mb_x - SRH + W - N, +N) of every reference into window
//                 columns W-N..W-1: N*H pixels per reference per MB, the
//                 Level C bandwidth;
//   LD_REFINE     load an RW x RW region at (rx, ry) of reference `ref` into
//                 the refinement buffer and report its origin.
// In B-frame mode two references (forward, backward) are loaded with the
// B-frame range SRH_B/SRV_B; in key mode one reference with SRH_K/SRV_K.
// Pixels outside the frame are replaced by the nearest edge pixel
// (clamped coordinates), this design's choice.
//
// Interface: command valid/ready (ready only when idle); external memory
// read port addressed in pixels (ref_base + y*FRAME_W + x), one pixel per
// request, one request outstanding, the response any number of cycles
// later; write ports into sr_memory and refine_buffer. pix_count counts the
// pixels fetched since reset. Timing: L + 2 cycles per pixel when the
// response comes L cycles after the request.
module sr_loader
  import svc_pkg::*;
#(
  parameter int FRAME_W = 704,
  parameter int FRAME_H = 576,
  parameter int N       = 16,
  parameter int SRH_B   = 128,
  parameter int SRV_B   = 16,
  parameter int SRH_K   = 192,
  parameter int SRV_K   = 16,
  parameter int RW      = 32,
  parameter int EXT_AW  = 24,
  parameter int CW      = 12,
  parameter int MVW     = 10,
  localparam int W_B = 2 * N + 2 * SRH_B,
  localparam int H_B = 2 * SRV_B + N,
  localparam int W_K = 2 * N + 2 * SRH_K,
  localparam int H_K = 2 * SRV_K + N,
  localparam int XW  = $clog2((W_K > W_B) ? W_K : W_B),
  localparam int YW  = $clog2((H_K > H_B) ? H_K : H_B),
  localparam int RXW = $clog2(RW)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // command
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  ld_op_e                cmd_op,
  input  me_mode_e              cmd_mode,
  input  logic [CW-5:0]         cmd_mb_x,
  input  logic [CW-5:0]         cmd_mb_y,
  input  logic signed [MVW-1:0] cmd_vcenter,
  input  logic [EXT_AW-1:0]     cmd_ref_base [2],
  input  logic                  cmd_ref,
  input  logic signed [CW:0]    cmd_rx,
  input  logic signed [CW:0]    cmd_ry,
  // external memory
  output logic                  rd_req_valid,
  input  logic                  rd_req_ready,
  output logic [EXT_AW-1:0]     rd_req_addr,
  input  logic                  rd_resp_valid,
  input  logic [7:0]            rd_resp_data,
  // search-range memory
  output me_mode_e              sr_mode,
  output logic                  sr_row_start,
  output logic                  sr_advance,
  output logic                  sr_wr_en,
  output logic                  sr_wr_ref,
  output logic [XW-1:0]         sr_wr_x,
  output logic [YW-1:0]         sr_wr_y,
  output logic [7:0]            sr_wr_data,
  // refinement buffer
  output logic                  rb_wr_en,
  output logic                  rb_wr_ref,
  output logic [RXW-1:0]        rb_wr_x,
  output logic [RXW-1:0]        rb_wr_y,
  output logic [7:0]            rb_wr_data,
  output logic                  rb_load_done,
  output logic                  rb_load_ref,
  output logic signed [CW:0]    rb_load_ox,
  output logic signed [CW:0]    rb_load_oy,
  output logic [31:0]           pix_count,
  output logic                  busy
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} st_e;
  st_e                 st;
  logic                to_rb;          // destination: refinement buffer
  logic                ref_cur, ref_last;
  logic signed [CW:0]  x0, y0, row_y0;
  logic [XW-1:0]       w, dcol0;
  logic [YW-1:0]       h;
  logic [XW-1:0]       c;
  logic [YW-1:0]       r;
  logic [EXT_AW-1:0]   base [2];

  logic signed [CW+1:0] fx, fy;
  logic [CW-1:0]        cx, cy;

  // clamped frame coordinates of the current pixel
  always_comb begin
    fx = (CW+2)'(x0) + (CW+2)'(c);
    fy = (CW+2)'(y0) + (CW+2)'(r);
    if (fx < 0)                      cx = '0;
    else if (fx > (CW+2)'(FRAME_W - 1)) cx = CW'(FRAME_W - 1);
    else                             cx = CW'(fx);
    if (fy < 0)                      cy = '0;
    else if (fy > (CW+2)'(FRAME_H - 1)) cy = CW'(FRAME_H - 1);
    else                             cy = CW'(fy);
  end

  assign cmd_ready    = (st == S_IDLE);
  assign busy         = (st != S_IDLE);
  assign rd_req_valid = (st == S_REQ);
  assign rd_req_addr  = base[ref_cur] + EXT_AW'(cy) * EXT_AW'(FRAME_W) + EXT_AW'(cx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      sr_mode      <= ME_B_FRAME;
      to_rb        <= 1'b0;
      ref_cur      <= 1'b0;
      ref_last     <= 1'b0;
      x0           <= '0;
      y0           <= '0;
      row_y0       <= '0;
      w            <= '0;
      h            <= '0;
      dcol0        <= '0;
      c            <= '0;
      r            <= '0;
      base[0]      <= '0;
      base[1]      <= '0;
      sr_row_start <= 1'b0;
      sr_advance   <= 1'b0;
      sr_wr_en     <= 1'b0;
      sr_wr_ref    <= 1'b0;
      sr_wr_x      <= '0;
      sr_wr_y      <= '0;
      sr_wr_data   <= '0;
      rb_wr_en     <= 1'b0;
      rb_wr_ref    <= 1'b0;
      rb_wr_x      <= '0;
      rb_wr_y      <= '0;
      rb_wr_data   <= '0;
      rb_load_done <= 1'b0;
      rb_load_ref  <= 1'b0;
      rb_load_ox   <= '0;
      rb_load_oy   <= '0;
      pix_count    <= '0;
    end else begin
      sr_row_start <= 1'b0;
      sr_advance   <= 1'b0;
      sr_wr_en     <= 1'b0;
      rb_wr_en     <= 1'b0;
      rb_load_done <= 1'b0;
      case (st)
        S_IDLE: if (cmd_valid) begin
          logic key;
          logic signed [CW:0] mbx16, mby16, srh, srv, ww;
          key   = (cmd_op != LD_REFINE) ? (cmd_mode == ME_KEY) : (sr_mode == ME_KEY);
          mbx16 = (CW+1)'({cmd_mb_x, 4'b0});
          mby16 = (CW+1)'({cmd_mb_y, 4'b0});
          srh   = key ? (CW+1)'(SRH_K) : (CW+1)'(SRH_B);
          srv   = key ? (CW+1)'(SRV_K) : (CW+1)'(SRV_B);
          ww    = key ? (CW+1)'(W_K) : (CW+1)'(W_B);
          base  <= cmd_ref_base;
          c     <= '0;
          r     <= '0;
          st    <= S_REQ;
          case (cmd_op)
            LD_ROW_START: begin
              sr_mode      <= cmd_mode;
              sr_row_start <= 1'b1;
              to_rb        <= 1'b0;
              ref_cur      <= 1'b0;
              ref_last     <= !key;
              x0           <= mbx16 - srh;
              y0           <= mby16 + (CW+1)'(cmd_vcenter) - srv;
              row_y0       <= mby16 + (CW+1)'(cmd_vcenter) - srv;
              w            <= XW'(ww);
              h            <= key ? YW'(H_K) : YW'(H_B);
              dcol0        <= '0;
            end
            LD_MB_STEP: begin
              sr_advance   <= 1'b1;
              to_rb        <= 1'b0;
              ref_cur      <= 1'b0;
              ref_last     <= !key;
              x0           <= mbx16 - srh + ww - (CW+1)'(N);
              y0           <= row_y0;
              w            <= XW'(N);
              h            <= key ? YW'(H_K) : YW'(H_B);
              dcol0        <= XW'(ww - (CW+1)'(N));
            end
            default: begin
              to_rb        <= 1'b1;
              ref_cur      <= cmd_ref;
              ref_last     <= cmd_ref;
              x0           <= cmd_rx;
              y0           <= cmd_ry;
              w            <= XW'(RW);
              h            <= YW'(RW);
              dcol0        <= '0;
            end
          endcase
        end
        S_REQ: if (rd_req_ready) st <= S_WAIT;
        S_WAIT: if (rd_resp_valid) begin
          pix_count <= pix_count + 1;
          if (to_rb) begin
            rb_wr_en   <= 1'b1;
            rb_wr_ref  <= ref_cur;
            rb_wr_x    <= RXW'(c);
            rb_wr_y    <= RXW'(r);
            rb_wr_data <= rd_resp_data;
          end else begin
            sr_wr_en   <= 1'b1;
            sr_wr_ref  <= ref_cur;
            sr_wr_x    <= dcol0 + c;
            sr_wr_y    <= r;
            sr_wr_data <= rd_resp_data;
          end
          st <= S_REQ;
          if (c == w - 1'b1) begin
            c <= '0;
            if (r == h - 1'b1) begin
              r <= '0;
              if (ref_cur == ref_last) begin
                st <= S_IDLE;
                if (to_rb) begin
                  rb_load_done <= 1'b1;
                  rb_load_ref  <= ref_cur;
                  rb_load_ox   <= x0;
                  rb_load_oy   <= y0;
                end
              end else ref_cur <= 1'b1;
            end else r <= r + 1'b1;
          end else c <= c + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
