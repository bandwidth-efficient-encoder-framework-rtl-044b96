// tb_fgs_scan_reader: 8 regions of up to 64 words, filled with random
// symbols and random counts (some regions empty). An external memory model
// answers each read after a random 1..4 cycle latency, and the consumer
// applies random back-pressure. Checks: the symbols come out region by region
// in address order with the right scan number, nothing more, done pulses
// once at the end; then a second run with a memory answering one cycle after
// each request checks the cycle bound (4 cycles per symbol + 1 per scan).
module tb_fgs_scan_reader;
  import svc_pkg::*;
  localparam int NB = 8, AW = 9, RL = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic start, rqv, rqr, rsv, ov, ordy, busy, done;
  logic [AW-1:0] rqa; logic [31:0] rsd; logic [2:0] osc; fgs_sym_t osym;
  logic [RL:0] cnt [NB];

  fgs_scan_reader #(.NBUCKET(NB), .EXT_AW(AW), .REGION_LOG2(RL)) dut (
    .clk, .rst_n, .start, .scan_count(cnt), .rd_req_valid(rqv), .rd_req_ready(rqr), .rd_req_addr(rqa),
    .rd_resp_valid(rsv), .rd_resp_data(rsd), .out_valid(ov), .out_ready(ordy), .out_scan(osc),
    .out_sym(osym), .busy, .done);

  logic [31:0] ext [1 << AW];
  bit fixed_lat = 0;
  int lat = 0, n_done = 0;
  logic [AW-1:0] pend;
  bit pending = 0;
  typedef struct { int scan; logic [30:0] w; } ent_t;
  ent_t got[$];

  // memory model: accept a request, answer after a latency
  always_ff @(posedge clk) begin
    rsv <= 1'b0;
    if (rst_n) begin
      if (done) n_done++;
      if (ov && ordy) got.push_back('{int'(osc), 31'(osym)});
      if (pending) begin
        if (lat == 0) begin
          rsv <= 1'b1; rsd <= ext[pend]; pending = 0;
        end else lat--;
      end else if (rqv && rqr) begin
        pend = rqa; pending = 1;
        lat = fixed_lat ? 0 : $urandom_range(0, 3);
      end
    end
  end
  always_ff @(posedge clk) begin
    rqr  <= fixed_lat ? 1'b1 : ($urandom_range(0, 1) == 1);
    ordy <= fixed_lat ? 1'b1 : ($urandom_range(0, 2) != 0);
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, t0;
    start = 0;
    total = 0;
    for (int i = 0; i < (1 << AW); i++) ext[i] = {1'b0, 31'($urandom)};
    for (int s = 0; s < NB; s++) begin
      cnt[s] = (s % 3 == 1) ? '0 : (RL+1)'($urandom_range(1, 64));
      total += int'(cnt[s]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      fixed_lat = (pass == 1);
      got.delete(); n_done = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t0 = $time / 10;
      while (!done) @(posedge clk);
      repeat (3) @(posedge clk);
      check("done once", n_done, 1);
      check("busy low", busy, 0);
      check("symbols", got.size(), total);
      begin
        automatic int n = 0;
        for (int s = 0; s < NB; s++)
          for (int i = 0; i < int'(cnt[s]); i++) begin
            if (n < got.size()) begin
              check("scan", got[n].scan, s);
              check("word", got[n].w, ext[(s << RL) + i][30:0]);
            end
            n++;
          end
      end
      if (pass == 1) begin
        checks++;
        if ($time / 10 - t0 > 4 * total + NB + 6) begin
          failures++;
          $display("FAIL cycles %0d for %0d symbols", $time / 10 - t0, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
