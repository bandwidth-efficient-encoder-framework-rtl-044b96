// fgs_quant_stage: one reconstruction loop of the FGS quantization cascade.
//
// The FGS encoder runs cascaded reconstruction loops over the same transform
// coefficients. Loop n quantizes what the preceding loops have not yet
// represented: d = coef - acc, where acc is the sum of the inverse-quantized
// values of loops 0..n-1, with a step size one QP-octave finer
// (QP_n = QP_{n-1} - 6, i.e. half the step). In an enhancement loop
// (ENH = 1) each coefficient is classified: a coefficient that was significant
// in any preceding loop is a refinement coefficient (RC) and its level is
// truncated to {-1,0,+1}; otherwise it is a new coefficient (NC) and keeps its
// whole value. The truncated level is inverse-quantized and added to acc, so
// the next loop sees exactly what a decoder would reconstruct. The base loop
// (ENH = 0) quantizes without classification.
//
// Quantizer (this design's choice): a scalar quantizer with round-half-up,
// level = (|d|*16 + Qstep/2) / Qstep with Qstep in 1/16 units from
// svc_pkg::qstep, saturated to the coefficient width; inverse
// quantization is (|level|*Qstep + 8) >> 4 with the sign restored. With this
// scalar quantizer the reconstruction is already on the coefficient scale, so
// the separate normalisation step of a matrix-based H.264 quantizer is not
// needed. QP values are clamped at 0 when QP - 6 would go negative.
//
// Interface: one coefficient per cycle, with a tag (position, block, MB)
// passed through unchanged. The stage is one register deep; `en` advances it
// (global stall of the cascade). out_qp is the QP of the next loop.
module fgs_quant_stage
  import svc_pkg::*;
#(
  parameter bit ENH  = 1'b1,    // 1: enhancement loop (classify + truncate)
  parameter int ACCW = COEFW + 3,
  parameter int TAGW = 24
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   in_valid,
  input  coef_t                  in_coef,
  input  logic signed [ACCW-1:0] in_acc,
  input  logic                   in_sig,
  input  logic [QPW-1:0]         in_qp,
  input  logic [TAGW-1:0]        in_tag,
  output logic                   out_valid,
  output coef_t                  out_coef,
  output logic signed [ACCW-1:0] out_acc,
  output logic                   out_sig,
  output logic [QPW-1:0]         out_qp,
  output logic [TAGW-1:0]        out_tag,
  output coef_t                  out_level,
  output logic                   out_rc
);

  localparam int DW = ACCW + 1;
  localparam logic [COEFW-1:0] LVL_MAX = {1'b0, {(COEFW-1){1'b1}}};

  logic signed [DW-1:0]   d;
  logic [DW-1:0]          mag;
  logic [15:0]            qs;
  logic [DW+4:0]          num;
  logic [DW+4:0]          quo;
  logic [COEFW-1:0]       lvl_mag;
  logic                   neg;
  logic                   rc;
  coef_t                  lvl_t;
  logic [COEFW-1:0]       lvl_t_mag;
  logic [COEFW+16:0]      rec_mag;
  logic signed [ACCW-1:0] rec;

  always_comb begin
    d    = DW'(in_coef) - DW'(in_acc);
    neg  = d[DW-1];
    mag  = neg ? DW'(-d) : DW'(d);
    qs   = qstep(in_qp);
    num  = ((DW+5)'(mag) << 4) + (DW+5)'(qs >> 1);
    quo  = num / (DW+5)'(qs);
    lvl_mag = (quo > (DW+5)'(LVL_MAX)) ? LVL_MAX : quo[COEFW-1:0];
    rc   = ENH && in_sig;
    // truncation of refinement coefficients to {-1,0,+1}
    if (rc && lvl_mag > 1) lvl_t_mag = 1;
    else                   lvl_t_mag = lvl_mag;
    lvl_t   = neg ? -coef_t'(lvl_t_mag) : coef_t'(lvl_t_mag);
    rec_mag = ((COEFW+17)'(lvl_t_mag) * (COEFW+17)'(qs) + 8) >> 4;
    rec     = neg ? -ACCW'(rec_mag) : ACCW'(rec_mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_coef  <= '0;
      out_acc   <= '0;
      out_sig   <= 1'b0;
      out_qp    <= '0;
      out_tag   <= '0;
      out_level <= '0;
      out_rc    <= 1'b0;
    end else if (en) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_coef  <= in_coef;
        out_acc   <= in_acc + rec;
        out_sig   <= (ENH && in_sig) || (lvl_t_mag != 0);
        out_qp    <= (in_qp >= 6) ? in_qp - 6 : '0;
        out_tag   <= in_tag;
        out_level <= lvl_t;
        out_rc    <= rc;
      end
    end
  end

endmodule
