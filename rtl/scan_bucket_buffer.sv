// scan_bucket_buffer: on-chip buckets of the FGS scan bucket algorithm, with
// external memory used as a transpose memory.
//
// There is one bucket per FGS scan. Symbols from the MB-level scan analysis
// are appended to the bucket of their scan. When a bucket holds BDEPTH
// symbols it is written out as one burst of BDEPTH words to its scan's region
// of external memory (region k starts at k << REGION_LOG2 words, filled in
// order), so external traffic is regular burst writes instead of the scattered
// frame-level accesses of a direct FGS implementation. At frame end
// (flush_start, remembered if it comes during a burst) every partly filled
// bucket is written out as a shorter burst, and flush_done pulses once all
// are written. scan_count[k] is the number of
// words in region k for the frame: what the frame-level reader needs to
// read the regions back scan by scan. frame_start clears the counts.
//
// Interface: symbol input with valid/ready (ready is low while a burst is
// being written); external write port with valid/ready per word, a word
// address and `last` on the final word of a burst; symbols are zero-extended
// to 32-bit words. overflow is sticky (until frame_start) and set if a
// region would exceed 2**REGION_LOG2 words; the frame's data is then not
// valid and its scan_count stops growing. Timing: one symbol per cycle
// while no burst is in progress; a burst takes one cycle per word plus one.
// The bucket depth, the region layout and the word format are this design's
// choices.
module scan_bucket_buffer
  import svc_pkg::*;
#(
  parameter int NBUCKET    = 16,
  parameter int BDEPTH     = 16,
  parameter int EXT_AW     = 24,
  parameter int REGION_LOG2 = 20,
  localparam int KW = $clog2(NBUCKET),
  localparam int FW = $clog2(BDEPTH + 1),
  localparam int CW = REGION_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [KW-1:0]     in_bucket,
  input  fgs_sym_t          in_sym,
  input  logic              flush_start,
  output logic              flush_done,
  output logic              ext_wr_valid,
  input  logic              ext_wr_ready,
  output logic [EXT_AW-1:0] ext_wr_addr,
  output logic [EXT_DW-1:0] ext_wr_data,
  output logic              ext_wr_last,
  output logic [CW-1:0]     scan_count [NBUCKET],
  output logic              overflow
);

  fgs_sym_t        mem  [NBUCKET*BDEPTH];
  logic [FW-1:0]   fill [NBUCKET];

  typedef enum logic [1:0] {S_IDLE, S_BURST, S_SEEK} st_e;
  st_e             st;
  logic            all;      // flushing everything at frame end
  logic            flush_pend; // frame-end flush requested during a burst
  logic [KW-1:0]   fb;       // bucket being written
  logic [FW-1:0]   idx;
  logic [KW-1:0]   seek;
  logic            in_fire;
  logic            word_fire;
  logic            burst_end;
  logic [CW-1:0]   waddr;

  assign in_ready    = (st == S_IDLE) && !flush_start && !flush_pend;
  assign in_fire     = in_valid && in_ready;
  assign waddr       = scan_count[fb] + CW'(idx);
  assign ext_wr_valid = (st == S_BURST);
  assign ext_wr_addr = EXT_AW'({fb, waddr[REGION_LOG2-1:0]});
  assign ext_wr_data = EXT_DW'(mem[int'(fb) * BDEPTH + int'(idx)]);
  assign ext_wr_last = (idx == fill[fb] - 1'b1);
  assign word_fire   = ext_wr_valid && ext_wr_ready;
  assign burst_end   = word_fire && ext_wr_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      all        <= 1'b0;
      flush_pend <= 1'b0;
      fb         <= '0;
      idx        <= '0;
      seek       <= '0;
      flush_done <= 1'b0;
      overflow   <= 1'b0;
      for (int b = 0; b < NBUCKET; b++) begin
        fill[b]       <= '0;
        scan_count[b] <= '0;
      end
    end else begin
      flush_done <= 1'b0;
      if (frame_start) begin
        for (int b = 0; b < NBUCKET; b++) scan_count[b] <= '0;
        overflow <= 1'b0;
      end
      if (flush_start && st != S_IDLE) flush_pend <= 1'b1;
      case (st)
        S_IDLE: begin
          if (flush_start || flush_pend) begin
            flush_pend <= 1'b0;
            all  <= 1'b1;
            seek <= '0;
            st   <= S_SEEK;
          end else if (in_fire) begin
            mem[int'(in_bucket) * BDEPTH + int'(fill[in_bucket])] <= in_sym;
            fill[in_bucket] <= fill[in_bucket] + 1'b1;
            if (fill[in_bucket] == FW'(BDEPTH - 1)) begin
              fb  <= in_bucket;
              idx <= '0;
              st  <= S_BURST;
            end
          end
        end
        S_SEEK: begin
          if (fill[seek] != '0) begin
            fb  <= seek;
            idx <= '0;
            st  <= S_BURST;
          end else if (seek == KW'(NBUCKET - 1)) begin
            all        <= 1'b0;
            flush_done <= 1'b1;
            st         <= S_IDLE;
          end else seek <= seek + 1'b1;
        end
        S_BURST: begin
          if (word_fire) idx <= idx + 1'b1;
          if (word_fire && waddr[REGION_LOG2]) overflow <= 1'b1;
          if (burst_end) begin
            if (!overflow && !waddr[REGION_LOG2])
              scan_count[fb] <= scan_count[fb] + CW'(fill[fb]);
            fill[fb] <= '0;
            st <= all ? S_SEEK : S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // a burst never starts on an empty bucket
  a_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    (st == S_BURST) |-> (fill[fb] != '0));

endmodule
