// sr_memory: reconfigurable search-range (SR) memory for hierarchical-B and
// key-frame motion estimation.
//
// A B-frame is predicted from two references, so the encoder keeps two
// Level C search windows of W_B x H_B pixels (W_B = 2N + 2*SRH_B,
// H_B = 2*SRV_B + N), one per bank. A key frame is predicted from one
// reference that is much farther away in time and needs a larger range; in
// that mode (mode = ME_KEY) the two banks are used as one window of
// W_K x H_K pixels (W_K = 2N + 2*SRH_K, H_K = 2*SRV_K + N), which must fit in
// the 2*W_B*H_B bytes of both banks. With the defaults (N = 16, B-frames
// +-64 x +-32, key frames +-96 x +-48) a bank is 160 x 80 = 12800 bytes and
// the key window 224 x 112 = 25088 bytes.
//
// Level C data reuse: when the current block moves one MB to the right only
// N new columns are loaded. Columns are therefore addressed circularly:
// window column x is stored at physical column (x + col_base) mod W;
// `advance` moves col_base by N (the oldest N columns become the newest) and
// `row_start` resets it. In key mode the window is laid out row-major over
// bank 0 then bank 1 (linear address y*W_K + column, bank = address / bank
// size).
//
// Interface: one pixel write per cycle (window coordinates, reference 0/1,
// ignored in key mode); two read ports with one-cycle latency, port p reads
// reference p in B-frame mode and the single key window in key mode.
// Coordinates outside the window are not allowed (assertion). The
// row-major key-window layout and the pixel-wide ports are this design's
// choices.
module sr_memory
  import svc_pkg::*;
#(
  parameter int N     = 16,
  parameter int SRH_B = 64,
  parameter int SRV_B = 32,
  parameter int SRH_K = 96,
  parameter int SRV_K = 48,
  localparam int W_B  = 2 * N + 2 * SRH_B,
  localparam int H_B  = 2 * SRV_B + N,
  localparam int W_K  = 2 * N + 2 * SRH_K,
  localparam int H_K  = 2 * SRV_K + N,
  localparam int BANK = W_B * H_B,
  localparam int XW   = $clog2((W_K > W_B) ? W_K : W_B),
  localparam int YW   = $clog2((H_K > H_B) ? H_K : H_B),
  localparam int AW   = $clog2(BANK)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  me_mode_e      mode,
  input  logic          row_start,
  input  logic          advance,
  input  logic          wr_en,
  input  logic          wr_ref,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  logic [7:0]    wr_data,
  input  logic [XW-1:0] rd_x [2],
  input  logic [YW-1:0] rd_y [2],
  output logic [7:0]    rd_data [2]
);

  if (W_K * H_K > 2 * BANK) begin : g_size_check
    $error("key-frame window does not fit in the two B-frame banks");
  end

  logic [7:0]    bank0 [BANK];
  logic [7:0]    bank1 [BANK];
  logic [XW-1:0] col_base;

  // window coordinates -> bank and offset
  function automatic logic [AW:0] locate(input me_mode_e m, input logic r, input logic [XW-1:0] x,
                                          input logic [YW-1:0] y, input logic [XW-1:0] base);
    int w, pc, lin;
    w   = (m == ME_KEY) ? W_K : W_B;
    pc  = int'(x) + int'(base);
    if (pc >= w) pc -= w;
    lin = int'(y) * w + pc;
    if (m == ME_KEY) begin
      if (lin >= BANK) return {1'b1, AW'(lin - BANK)};
      else             return {1'b0, AW'(lin)};
    end
    return {r, AW'(lin)};
  endfunction

  logic [AW:0] wloc;
  logic [AW:0] rloc [2];

  always_comb begin
    wloc = locate(mode, wr_ref, wr_x, wr_y, col_base);
    for (int p = 0; p < 2; p++) rloc[p] = locate(mode, 1'(p), rd_x[p], rd_y[p], col_base);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) col_base <= '0;
    else if (row_start) col_base <= '0;
    else if (advance) begin
      if (int'(col_base) + N >= ((mode == ME_KEY) ? W_K : W_B))
        col_base <= XW'(int'(col_base) + N - ((mode == ME_KEY) ? W_K : W_B));
      else
        col_base <= col_base + XW'(N);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wloc[AW]) bank1[wloc[AW-1:0]] <= wr_data;
      else          bank0[wloc[AW-1:0]] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      rd_data[p] <= rloc[p][AW] ? bank1[rloc[p][AW-1:0]] : bank0[rloc[p][AW-1:0]];
  end

  a_wr_in_window: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (int'(wr_x) < ((mode == ME_KEY) ? W_K : W_B)) && (int'(wr_y) < ((mode == ME_KEY) ? H_K : H_B)));

endmodule
