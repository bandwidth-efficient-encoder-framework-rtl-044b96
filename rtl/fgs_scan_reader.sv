// fgs_scan_reader: frame-level half of the FGS scan bucket algorithm.
//
// After a frame's buckets have been written to external memory (region k holds
// the symbols of scan k, in block order), the enhancement layer is entropy
// coded scan by scan: all of scan 0 for the whole frame, then scan 1, and so
// on. This module reads region 0 from its first word to scan_count[0]-1, then
// region 1, ..., region NBUCKET-1, and delivers the symbols in that order
// together with their scan number. The accesses are purely sequential
// within each region, which is what makes the external traffic regular.
//
// Interface: `start` (pulse) begins a read-back; scan_count must stay stable
// until `done` pulses. External read port: request valid/ready with a word
// address; the response (rd_resp_valid, rd_resp_data) may come any number of
// cycles later. One read is outstanding at a time (this design's choice);
// the read word is held on the symbol output until out_ready. Timing: when
// the response comes L cycles after the request, L + 3 cycles per symbol
// (request, response, output, next) plus one cycle per scan.
module fgs_scan_reader
  import svc_pkg::*;
#(
  parameter int NBUCKET     = 16,
  parameter int EXT_AW      = 24,
  parameter int REGION_LOG2 = 20,
  localparam int KW = $clog2(NBUCKET),
  localparam int CW = REGION_LOG2 + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CW-1:0]     scan_count [NBUCKET],
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [EXT_AW-1:0] rd_req_addr,
  input  logic              rd_resp_valid,
  input  logic [EXT_DW-1:0] rd_resp_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [KW-1:0]     out_scan,
  output fgs_sym_t          out_sym,
  output logic              busy,
  output logic              done
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_OUT} st_e;
  st_e           st;
  logic [KW-1:0] scan;
  logic [CW-1:0] idx;

  assign busy         = (st != S_IDLE);
  assign rd_req_valid = (st == S_REQ) && (idx != scan_count[scan]);
  assign rd_req_addr  = EXT_AW'({scan, idx[REGION_LOG2-1:0]});
  assign out_valid    = (st == S_OUT);
  assign out_scan     = scan;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      scan    <= '0;
      idx     <= '0;
      done    <= 1'b0;
      out_sym <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          scan <= '0;
          idx  <= '0;
          st   <= S_REQ;
        end
        S_REQ: begin
          if (idx == scan_count[scan]) begin
            // region finished: next scan
            idx <= '0;
            if (scan == KW'(NBUCKET - 1)) begin
              done <= 1'b1;
              st   <= S_IDLE;
            end else scan <= scan + 1'b1;
          end else if (rd_req_ready) st <= S_WAIT;
        end
        S_WAIT: if (rd_resp_valid) begin
          out_sym <= fgs_sym_t'(rd_resp_data[SYMW-1:0]);
          st      <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          idx <= idx + 1'b1;
          st  <= S_REQ;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
