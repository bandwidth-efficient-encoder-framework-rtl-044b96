// tb_fgs_scan_analyzer: two parts.
// 1) The four-block, eight-coefficient example of the FGS scan description:
//      block 0: 0 0 0 1 0 A 0 0     block 1: B 0 1 C 0 0 0 0
//      block 2: 1 1 D 0 0 0 0 0     block 3: 0 E F 0 G 1 0 0
//    (digits: new coefficients, letters: refinement coefficients). The
//    buckets must fill exactly as in the worked example:
//      bucket 0: 0,0,0,1 | B | 1 | 0,0,1     bucket 1: 0,1 | 1 | E
//      bucket 2: D | F   bucket 3: C | end   bucket 4: end | end | G
//      bucket 5: A       bucket 6: end       bucket 7: (empty)
// 2) Random 16-coefficient blocks with random output back-pressure against a
//    reference written from the scan rule (per scan, per block), plus a
//    bound on the cycles per block (2*NCOEF + 2 when never stalled).
module tb_fgs_scan_analyzer;
  import svc_pkg::*;
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

  typedef struct { int bucket; int kind; int blk; int val; } ent_t;

  // ---------------- DUT 1: NCOEF = 8 ----------------
  logic v8, r8, ov8, ordy8, idle8; coef_t l8; logic rc8; logic [BLKW-1:0] b8; logic [2:0] ob8; fgs_sym_t os8;
  fgs_scan_analyzer #(.NCOEF(8)) u8 (.clk, .rst_n, .in_valid(v8), .in_ready(r8), .in_level(l8), .in_rc(rc8),
    .in_mb('0), .in_blk(b8), .out_valid(ov8), .out_ready(ordy8), .out_bucket(ob8), .out_sym(os8), .idle(idle8));

  // ---------------- DUT 2: NCOEF = 16 ----------------
  logic v16, r16, ov16, ordy16, idle16; coef_t l16; logic rc16; logic [MBW-1:0] m16; logic [BLKW-1:0] b16;
  logic [3:0] ob16; fgs_sym_t os16;
  fgs_scan_analyzer #(.NCOEF(16)) u16 (.clk, .rst_n, .in_valid(v16), .in_ready(r16), .in_level(l16), .in_rc(rc16),
    .in_mb(m16), .in_blk(b16), .out_valid(ov16), .out_ready(ordy16), .out_bucket(ob16), .out_sym(os16), .idle(idle16));

  ent_t got8[$], got16[$], exp16[$];
  bit stall_en;
  always_ff @(posedge clk) begin
    if (ov8 && ordy8) got8.push_back('{int'(ob8), int'(os8.kind), int'(os8.blk), int'(os8.val)});
    if (ov16 && ordy16) got16.push_back('{int'(ob16), int'(os16.kind), int'(os16.blk), int'(os16.val)});
  end
  always_ff @(posedge clk) ordy16 <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  // reference: scan rule applied scan by scan to one block
  task automatic ref_block(int n, int lv[], bit rc[], int blk, ref ent_t q[$]);
    bit coded[];
    coded = new[n];
    for (int i = 0; i < n; i++) coded[i] = 0;
    for (int k = 0; k < n; k++) begin
      if (rc[k]) q.push_back('{k, SYM_RC, blk, lv[k]});
      else if (!coded[k]) begin
        bit found = 0;
        for (int i = k; i < n; i++) if (!rc[i] && lv[i] != 0) found = 1;
        if (!found) begin
          q.push_back('{k, SYM_EOB, blk, 0});
          for (int i = k; i < n; i++) coded[i] = 1;
        end else begin
          for (int i = k; i < n; i++) begin
            if (rc[i]) continue;
            q.push_back('{k, SYM_NC, blk, lv[i]});
            coded[i] = 1;
            if (lv[i] != 0) break;
          end
        end
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // example: letters are RCs with values A=1 B=-1 C=0 D=1 E=-1 F=1 G=0
  int ex_lv [4][8] = '{'{0,0,0,1,0, 1,0,0}, '{-1,0,1,0,0,0,0,0}, '{1,1,1,0,0,0,0,0}, '{0,-1,1,0,0,1,0,0}};
  bit ex_rc [4][8] = '{'{0,0,0,0,0,1,0,0}, '{ 1,0,0,1,0,0,0,0}, '{0,0,1,0,0,0,0,0}, '{0,1,1,0,1,0,0,0}};

  initial begin
    ent_t bk [8][$];
    int t0, t1, nblk;
    v8 = 0; l8 = 0; rc8 = 0; b8 = 0; ordy8 = 1;
    v16 = 0; l16 = 0; rc16 = 0; m16 = 0; b16 = 0; stall_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // ---- part 1 ----
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        v8 = 1; l8 = coef_t'(ex_lv[b][i]); rc8 = ex_rc[b][i]; b8 = BLKW'(b);
        while (!r8) @(negedge clk);
        @(posedge clk);
        #1 v8 = 0;
      end
    repeat (80) @(posedge clk);
    check("idle after example", idle8, 1);
    foreach (got8[i]) bk[got8[i].bucket].push_back(got8[i]);
    begin
      // expected buckets: {blk, kind, val}
      int e [8][$] ;
      e[0] = '{0,0,0, 0,0,0, 0,0,0, 0,0,1, 1,1,-1, 2,0,1, 3,0,0, 3,0,0, 3,0,1};
      e[1] = '{1,0,0, 1,0,1, 2,0,1, 3,1,-1};
      e[2] = '{2,1,1, 3,1,1};
      e[3] = '{1,1,0, 2,2,0};
      e[4] = '{0,2,0, 1,2,0, 3,1,0};
      e[5] = '{0,1,1};
      e[6] = '{3,2,0};
      e[7] = '{};
      for (int b = 0; b < 8; b++) begin
        check($sformatf("bucket %0d size", b), bk[b].size(), e[b].size() / 3);
        for (int i = 0; i < bk[b].size() && i < e[b].size() / 3; i++) begin
          check($sformatf("bucket %0d entry %0d blk", b, i), bk[b][i].blk, e[b][3*i]);
          check($sformatf("bucket %0d entry %0d kind", b, i), bk[b][i].kind, e[b][3*i+1]);
          check($sformatf("bucket %0d entry %0d val", b, i), bk[b][i].val, e[b][3*i+2]);
        end
      end
    end
    // ---- part 2a: throughput without stalls ----
    nblk = 40;
    for (int pass = 0; pass < 2; pass++) begin
      stall_en = (pass == 1);
      got16.delete(); exp16.delete();
      t0 = $time / 10;
      for (int b = 0; b < nblk; b++) begin
        int lv[] = new[16]; bit rc[] = new[16];
        for (int i = 0; i < 16; i++) begin
          rc[i] = ($urandom_range(0, 3) == 0);
          lv[i] = rc[i] ? int'($urandom_range(0, 2)) - 1 :
                  (($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 40)) - 20 : 0);
        end
        ref_block(16, lv, rc, b % 24, exp16);
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          v16 = 1; l16 = coef_t'(lv[i]); rc16 = rc[i]; b16 = BLKW'(b % 24); m16 = MBW'(b / 24);
          while (!r16) @(negedge clk);
          @(posedge clk);
          #1 v16 = 0;
        end
      end
      @(posedge clk);
      while (!idle16) @(posedge clk);
      t1 = $time / 10;
      if (pass == 0) begin
        checks++;
        if (t1 - t0 > nblk * (2 * 16 + 2) + 20) begin
          failures++;
          $display("FAIL cycles %0d for %0d blocks", t1 - t0, nblk);
        end
      end
      check("symbol count", got16.size(), exp16.size());
      foreach (exp16[i]) if (i < got16.size()) begin
        check("bucket", got16[i].bucket, exp16[i].bucket);
        check("kind", got16[i].kind, exp16[i].kind);
        check("blk", got16[i].blk, exp16[i].blk);
        check("val", got16[i].val, exp16[i].val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
