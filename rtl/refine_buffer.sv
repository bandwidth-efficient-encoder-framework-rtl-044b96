// refine_buffer: refinement-region store of the CMRB motion estimation.
//
// When an upsampled base-layer predictor points outside the centric moving
// row buffer, a small region around it (RW x RW pixels, 32 x 32 by default:
// +-4 pixel refinement plus the 6-tap interpolation margins around a 16x16
// block) is loaded from external memory so the MB can still be refined. One
// region per reference is kept. Each region remembers its frame origin (the
// loader reports it with `load_done`) and a valid flag, so the motion
// estimator can turn a frame position into a region position; `clear`
// drops both regions at the start of the next MB.
//
// Interface: one pixel write per cycle in region coordinates; one read port
// with one-cycle latency; origin/valid outputs per reference. Keeping one
// region per reference is this design's choice.
module refine_buffer #(
  parameter int RW   = 32,
  parameter int NREF = 2,
  parameter int CW   = 12,
  localparam int XW  = $clog2(RW),
  localparam int RFW = (NREF > 1) ? $clog2(NREF) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                wr_en,
  input  logic [RFW-1:0]      wr_ref,
  input  logic [XW-1:0]       wr_x,
  input  logic [XW-1:0]       wr_y,
  input  logic [7:0]          wr_data,
  input  logic                load_done,
  input  logic [RFW-1:0]      load_ref,
  input  logic signed [CW:0]  load_ox,
  input  logic signed [CW:0]  load_oy,
  input  logic [RFW-1:0]      rd_ref,
  input  logic [XW-1:0]       rd_x,
  input  logic [XW-1:0]       rd_y,
  output logic [7:0]          rd_data,
  output logic [NREF-1:0]     region_valid,
  output logic signed [CW:0]  origin_x [NREF],
  output logic signed [CW:0]  origin_y [NREF]
);

  logic [7:0] mem [NREF * RW * RW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[(int'(wr_ref) * RW + int'(wr_y)) * RW + int'(wr_x)] <= wr_data;
    rd_data <= mem[(int'(rd_ref) * RW + int'(rd_y)) * RW + int'(rd_x)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      region_valid <= '0;
      for (int r = 0; r < NREF; r++) begin
        origin_x[r] <= '0;
        origin_y[r] <= '0;
      end
    end else if (clear) begin
      region_valid <= '0;
    end else if (load_done) begin
      region_valid[load_ref] <= 1'b1;
      origin_x[load_ref]     <= load_ox;
      origin_y[load_ref]     <= load_oy;
    end
  end

endmodule
