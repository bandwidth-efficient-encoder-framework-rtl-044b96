// svc_pkg: types and constants shared by the FGS scan-bucket path and the
// motion-estimation search-range path of the SVC encoder framework.
//
// Coefficients are 13-bit signed values, the coefficient length the design is
// dimensioned for. An FGS symbol is what one enhancement layer hands from the
// MB-level scan analysis to the frame-level entropy coder: a new coefficient
// (NC) value, a refinement coefficient (RC) value in {-1,0,+1}, or an
// end-of-new-coefficients marker ("NC end"), tagged with the macroblock and
// 4x4-block it belongs to. The symbol is 31 bits and is stored in external
// memory as one 32-bit word (zero-extended). The MB and block field widths
// (11 and 5 bits: 1584 MBs of a 704x576 frame, 24 4x4 blocks per MB) and the
// quantizer step table are this design's choices.
package svc_pkg;

  localparam int COEFW = 13;   // coefficient length in bits
  localparam int MBW   = 11;   // macroblock index within a frame
  localparam int BLKW  = 5;    // 4x4 block index within a macroblock
  localparam int QPW   = 6;    // quantization parameter 0..51
  localparam int EXT_DW = 32;  // external memory word width

  typedef logic signed [COEFW-1:0] coef_t;

  typedef enum logic [1:0] {
    SYM_NC  = 2'd0,   // new coefficient: zero or significant value
    SYM_RC  = 2'd1,   // refinement coefficient, value in {-1,0,+1}
    SYM_EOB = 2'd2    // "NC end": no significant new coefficient left in the block
  } sym_kind_e;

  typedef struct packed {
    sym_kind_e         kind;
    logic [MBW-1:0]    mb;
    logic [BLKW-1:0]   blk;
    coef_t             val;
  } fgs_sym_t;

  localparam int SYMW = $bits(fgs_sym_t);

  // Quantizer step size in 1/16 units: Qstep(QP) = QS_BASE[QP%6] << (QP/6).
  // QP - 6 halves the step, so the FGS layers (QP_n = QP_{n-1} - 6) refine
  // by a factor of two each.
  function automatic logic [15:0] qstep(input logic [QPW-1:0] qp);
    logic [4:0] b;
    case (qp % 6)
      0: b = 5'd10;
      1: b = 5'd11;
      2: b = 5'd13;
      3: b = 5'd14;
      4: b = 5'd16;
      default: b = 5'd18;
    endcase
    return 16'(b) << (qp / 6);
  endfunction

  // search-range memory operating mode
  typedef enum logic {
    ME_B_FRAME = 1'b0,   // two windows, forward and backward reference
    ME_KEY     = 1'b1    // one enlarged window over both banks
  } me_mode_e;

  // search-range loader commands
  typedef enum logic [1:0] {
    LD_ROW_START = 2'd0,  // load the whole window at the start of an MB row
    LD_MB_STEP   = 2'd1,  // slide by one MB: load one N-column strip
    LD_REFINE    = 2'd2   // load a refinement region
  } ld_op_e;

endpackage
