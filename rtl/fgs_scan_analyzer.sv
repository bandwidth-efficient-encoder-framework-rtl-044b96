// fgs_scan_analyzer: MB-level half of the FGS scan bucket algorithm.
//
// FGS codes an enhancement layer in many scans over the whole frame. In scan k
// every block is visited in turn and its k-th coefficient (zigzag order) is
// considered:
//   * a refinement coefficient (RC) at position k is coded on its own;
//   * a new coefficient (NC) at position k that has not been coded yet starts
//     a run: all NCs from k up to and including the next significant NC are
//     coded, RCs on the way are skipped (they wait for their own scan);
//     if no significant NC is left in the block, a single "NC end" symbol is
//     coded instead and the block has no NCs left;
//   * an NC at k that an earlier run already covered codes nothing.
// Since which symbols a block contributes to each scan depends only on that
// block, this module works it out block by block at MB level and tags every
// symbol with its scan number k, the bucket it belongs to. Buckets are then
// collected (scan_bucket_buffer) and read back scan by scan.
//
// Interface: coefficients of a block arrive one per cycle in zigzag order
// (level, RC flag, MB and block index) under a valid/ready handshake; after
// NCOEF of them the block is analysed while the next block is collected
// (two block registers). Symbols leave on a valid/ready stream with their
// bucket number, in increasing bucket order within a block. Timing: at most
// one symbol per cycle; a block takes at most 2*NCOEF cycles (one per scan
// position plus one per skipped RC inside runs). `idle` is high when no
// coefficient is held. The serial walk and the two block registers are this
// design's choices.
module fgs_scan_analyzer
  import svc_pkg::*;
#(
  parameter int NCOEF = 16,
  localparam int KW = $clog2(NCOEF),
  localparam int PW = $clog2(NCOEF + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  coef_t           in_level,
  input  logic            in_rc,
  input  logic [MBW-1:0]  in_mb,
  input  logic [BLKW-1:0] in_blk,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [KW-1:0]   out_bucket,
  output fgs_sym_t        out_sym,
  output logic            idle
);

  // collect register
  coef_t           c_lvl [NCOEF];
  logic [NCOEF-1:0] c_rc;
  logic [PW-1:0]   c_cnt;
  logic [MBW-1:0]  c_mb;
  logic [BLKW-1:0] c_blk;
  logic            c_full;

  // work register
  coef_t           w_lvl [NCOEF];
  logic [NCOEF-1:0] w_rc;
  logic [MBW-1:0]  w_mb;
  logic [BLKW-1:0] w_blk;
  logic            busy;

  typedef enum logic {ST_SCAN, ST_RUN} st_e;
  st_e           st;
  logic [KW-1:0] k;         // current scan position
  logic [KW-1:0] j;         // position inside an NC run
  logic [PW-1:0] nc_next;   // first NC position not coded yet

  logic [NCOEF-1:0] sig_nc;
  logic             any_sig_k;
  logic             emit;
  sym_kind_e        e_kind;
  coef_t            e_val;
  logic             fire;
  logic             k_adv;   // leave position k this cycle
  logic             k_last;

  assign c_full   = (c_cnt == PW'(NCOEF));
  assign in_ready = !c_full;
  assign idle     = !busy && (c_cnt == '0);
  assign k_last   = (k == KW'(NCOEF - 1));

  always_comb begin
    for (int i = 0; i < NCOEF; i++) sig_nc[i] = !w_rc[i] && (w_lvl[i] != '0);
    any_sig_k = |(sig_nc >> k);
  end

  // what to emit this cycle
  always_comb begin
    emit   = 1'b0;
    e_kind = SYM_NC;
    e_val  = '0;
    k_adv  = 1'b0;
    if (busy) begin
      if (st == ST_SCAN) begin
        if (w_rc[k]) begin
          emit = 1'b1; e_kind = SYM_RC; e_val = w_lvl[k];
          k_adv = out_ready;
        end else if (PW'(k) < nc_next) begin
          k_adv = 1'b1;                      // covered by an earlier run
        end else if (!any_sig_k) begin
          emit = 1'b1; e_kind = SYM_EOB;
          k_adv = out_ready;
        end else begin
          emit = 1'b1; e_kind = SYM_NC; e_val = w_lvl[k];
          k_adv = out_ready && (w_lvl[k] != '0);
        end
      end else begin
        if (!w_rc[j]) begin
          emit = 1'b1; e_kind = SYM_NC; e_val = w_lvl[j];
          k_adv = out_ready && (w_lvl[j] != '0);
        end
      end
    end
  end

  assign out_valid      = emit;
  assign out_bucket     = k;
  assign out_sym.kind   = e_kind;
  assign out_sym.mb     = w_mb;
  assign out_sym.blk    = w_blk;
  assign out_sym.val    = e_val;
  assign fire           = emit && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_cnt   <= '0;
      c_rc    <= '0;
      c_mb    <= '0;
      c_blk   <= '0;
      w_rc    <= '0;
      w_mb    <= '0;
      w_blk   <= '0;
      busy    <= 1'b0;
      st      <= ST_SCAN;
      k       <= '0;
      j       <= '0;
      nc_next <= '0;
      for (int i = 0; i < NCOEF; i++) begin
        c_lvl[i] <= '0;
        w_lvl[i] <= '0;
      end
    end else begin
      logic done;
      done = busy && k_adv && k_last;
      // collect
      if (in_valid && in_ready) begin
        c_lvl[c_cnt[KW-1:0]] <= in_level;
        c_rc[c_cnt[KW-1:0]]  <= in_rc;
        if (c_cnt == '0) begin
          c_mb  <= in_mb;
          c_blk <= in_blk;
        end
        c_cnt <= c_cnt + 1'b1;
      end
      // analysis walk
      if (busy) begin
        if (st == ST_SCAN) begin
          if (!w_rc[k] && PW'(k) >= nc_next) begin
            if (!any_sig_k) begin
              if (fire) nc_next <= PW'(NCOEF);
            end else if (fire) begin
              if (w_lvl[k] != '0) nc_next <= PW'(k) + 1'b1;
              else begin
                st <= ST_RUN;
                j  <= k + 1'b1;
              end
            end
          end
        end else begin
          if (w_rc[j]) j <= j + 1'b1;
          else if (fire) begin
            if (w_lvl[j] != '0) begin
              nc_next <= PW'(j) + 1'b1;
              st      <= ST_SCAN;
            end else j <= j + 1'b1;
          end
        end
        if (k_adv) k <= k + 1'b1;
        if (done) busy <= 1'b0;
      end
      // hand the collected block to the walk
      if (c_full && (!busy || done)) begin
        w_lvl   <= c_lvl;
        w_rc    <= c_rc;
        w_mb    <= c_mb;
        w_blk   <= c_blk;
        busy    <= 1'b1;
        st      <= ST_SCAN;
        k       <= '0;
        nc_next <= '0;
        c_cnt   <= '0;
      end
    end
  end

endmodule
