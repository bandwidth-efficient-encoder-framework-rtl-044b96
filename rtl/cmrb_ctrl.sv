// cmrb_ctrl: centric moving row buffer (CMRB) control of the adaptive
// spatial-temporal hierarchical motion estimation.
//
// In an enhancement spatial layer the base layer has already been encoded, so
// its motion vectors, upsampled by the dyadic scaling ratio (x2), predict
// where the current MVs lie. Instead of a search window as tall as the whole
// vertical MV range, the search-range memory holds a short window
// (+-SRV_C rows) whose vertical centre follows the motion of the current MB
// row:
//   * gather: the upsampled vertical MVs of the MBs of one row are summed;
//     after MB_COLS of them the row centre is their mean, rounded to the
//     nearest integer and limited so the window stays inside the maximal
//     vertical range (|centre| <= SRV_MAX - SRV_C). `vc_valid` pulses.
//   * check: for each MB the upsampled predictor must fit, with the +-REF
//     pixel refinement around it, inside the window horizontally
//     [-SRH, SRH) and vertically [centre - SRV_C, centre + SRV_C). If it does
//     not, a refinement region of RW x RW pixels is requested at
//     (16*mb_x + mvx - RW/4, 16*mb_y + mvy - RW/4) so that the +-4 search and
//     the 6-tap interpolation margins around the predicted block are covered.
// Vectors are in integer pixels. Using the mean as the "most probable"
// vertical position, the integer-pel vectors and the placement of the
// refinement region are this design's choices.
//
// Interface: gather and check inputs are single-cycle valid strobes; the check
// result is registered (one-cycle latency) and held until out_ready;
// chk_ready is low while a result is waiting. refine_count counts refinement
// requests since reset. Bit 0 of out_mvx / out_mvy is always 0: the
// predictor is twice an integer base-layer vector.
module cmrb_ctrl #(
  parameter int MB_COLS = 44,   // MBs per row (704 / 16)
  parameter int SRV_C   = 16,   // CMRB vertical half range
  parameter int SRV_MAX = 64,   // maximal vertical MV range
  parameter int SRH     = 128,  // horizontal search range
  parameter int REF     = 4,    // refinement range around the predictor
  parameter int RW      = 32,   // refinement region size
  parameter int MVW     = 10,   // MV component width (integer pel)
  parameter int CW      = 12    // frame coordinate width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // gather: base-layer MVs of the MBs of the next row
  input  logic                  row_clear,
  input  logic                  gat_valid,
  input  logic signed [MVW-1:0] gat_mvy,
  output logic                  vc_valid,
  output logic signed [MVW-1:0] vcenter,
  // check: one MB of the current row
  input  logic                  chk_valid,
  output logic                  chk_ready,
  input  logic [CW-5:0]         chk_mb_x,
  input  logic [CW-5:0]         chk_mb_y,
  input  logic signed [MVW-1:0] chk_mvx,
  input  logic signed [MVW-1:0] chk_mvy,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [MVW:0]   out_mvx,   // upsampled predictor
  output logic signed [MVW:0]   out_mvy,
  output logic                  out_refine,
  output logic signed [CW:0]    out_rx,    // refinement region origin
  output logic signed [CW:0]    out_ry,
  output logic [15:0]           refine_count
);

  localparam int SW = MVW + 2 + $clog2(MB_COLS + 1);
  localparam int VLIM = SRV_MAX - SRV_C;

  logic signed [SW-1:0]  sum;
  logic [$clog2(MB_COLS+1)-1:0] cnt;
  logic signed [SW-1:0]  up_y, avg;
  logic signed [MVW:0]   ux, uy;
  logic signed [MVW+1:0] lo_y, hi_y, lo_x, hi_x;
  logic                  in_win;

  // rounded mean of the gathered vertical vectors
  always_comb begin
    up_y = SW'(gat_mvy) <<< 1;
    if (sum >= 0) avg = (sum + SW'(MB_COLS / 2)) / SW'(MB_COLS);
    else          avg = -((-sum + SW'(MB_COLS / 2)) / SW'(MB_COLS));
    if (avg > SW'(VLIM))       avg = SW'(VLIM);
    else if (avg < -SW'(VLIM)) avg = -SW'(VLIM);
  end

  always_comb begin
    ux   = (MVW+1)'(chk_mvx) <<< 1;
    uy   = (MVW+1)'(chk_mvy) <<< 1;
    lo_y = (MVW+2)'(uy) - (MVW+2)'(REF);
    hi_y = (MVW+2)'(uy) + (MVW+2)'(REF);
    lo_x = (MVW+2)'(ux) - (MVW+2)'(REF);
    hi_x = (MVW+2)'(ux) + (MVW+2)'(REF);
    in_win = (lo_y >= (MVW+2)'(vcenter) - (MVW+2)'(SRV_C)) &&
             (hi_y <  (MVW+2)'(vcenter) + (MVW+2)'(SRV_C)) &&
             (lo_x >= -(MVW+2)'(SRH)) && (hi_x < (MVW+2)'(SRH));
  end

  assign chk_ready = !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum          <= '0;
      cnt          <= '0;
      vc_valid     <= 1'b0;
      vcenter      <= '0;
      out_valid    <= 1'b0;
      out_mvx      <= '0;
      out_mvy      <= '0;
      out_refine   <= 1'b0;
      out_rx       <= '0;
      out_ry       <= '0;
      refine_count <= '0;
    end else begin
      vc_valid <= 1'b0;
      if (row_clear) begin
        sum <= '0;
        cnt <= '0;
      end else if (cnt == ($clog2(MB_COLS+1))'(MB_COLS)) begin
        vcenter  <= MVW'(avg);
        vc_valid <= 1'b1;
        sum      <= '0;
        cnt      <= '0;
      end else if (gat_valid) begin
        sum <= sum + up_y;
        cnt <= cnt + 1'b1;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (chk_valid && chk_ready) begin
        out_valid  <= 1'b1;
        out_mvx    <= ux;
        out_mvy    <= uy;
        out_refine <= !in_win;
        out_rx     <= (CW+1)'({chk_mb_x, 4'b0}) + (CW+1)'(ux) - (CW+1)'(RW / 4);
        out_ry     <= (CW+1)'({chk_mb_y, 4'b0}) + (CW+1)'(uy) - (CW+1)'(RW / 4);
        if (!in_win) refine_count <= refine_count + 1'b1;
      end
    end
  end

endmodule
