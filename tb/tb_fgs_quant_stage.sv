// tb_fgs_quant_stage: checks one enhancement loop and one base loop against
// an integer reference model (random coefficients, accumulators, QPs and
// significance), plus a hand-worked three-loop example:
// coef 107 at QP 24 (step 10) -> level 11, rec 110; at QP 18 (step 5) the
// residual -3 gives level -1, acc 105; at QP 12 (step 2.5) the residual 2 of
// the now-significant coefficient is a refinement +1, acc 108.
// Also checks the one-cycle latency and that `en` low holds the outputs.
module tb_fgs_quant_stage;
  import svc_pkg::*;
  localparam int ACCW = COEFW + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, v;
  coef_t c; logic signed [ACCW-1:0] acc; logic sig; logic [QPW-1:0] qp; logic [23:0] tag;
  logic ov [2]; coef_t oc [2]; logic signed [ACCW-1:0] oacc [2]; logic osig [2];
  logic [QPW-1:0] oqp [2]; logic [23:0] otag [2]; coef_t olvl [2]; logic orc [2];

  fgs_quant_stage #(.ENH(1'b1)) u_enh (.clk, .rst_n, .en, .in_valid(v), .in_coef(c), .in_acc(acc),
    .in_sig(sig), .in_qp(qp), .in_tag(tag), .out_valid(ov[1]), .out_coef(oc[1]), .out_acc(oacc[1]),
    .out_sig(osig[1]), .out_qp(oqp[1]), .out_tag(otag[1]), .out_level(olvl[1]), .out_rc(orc[1]));
  fgs_quant_stage #(.ENH(1'b0)) u_base (.clk, .rst_n, .en, .in_valid(v), .in_coef(c), .in_acc(acc),
    .in_sig(sig), .in_qp(qp), .in_tag(tag), .out_valid(ov[0]), .out_coef(oc[0]), .out_acc(oacc[0]),
    .out_sig(osig[0]), .out_qp(oqp[0]), .out_tag(otag[0]), .out_level(olvl[0]), .out_rc(orc[0]));

  function automatic int step16(int q);
    int t[6] = '{10, 11, 13, 14, 16, 18};
    return t[q % 6] * (1 << (q / 6));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_out(int e, int coef, int accv, bit sigv, int qpv);
    int d, m, s, l, r; bit rc;
    d = coef - accv; s = (d < 0); m = s ? -d : d;
    l = (m * 16 + step16(qpv) / 2) / step16(qpv);
    if (l > 4095) l = 4095;
    rc = e && sigv;
    if (rc && l > 1) l = 1;
    r = (l * step16(qpv) + 8) / 16;
    check("valid", ov[e], 1);
    check("level", olvl[e], s ? -l : l);
    check("rc", orc[e], rc);
    check("acc", oacc[e], accv + (s ? -r : r));
    check("sig", osig[e], rc || (l != 0));
    check("qp", oqp[e], qpv >= 6 ? qpv - 6 : 0);
    check("coef", oc[e], coef);
  endtask

  task automatic drive(int coef, int accv, bit sigv, int qpv);
    v = 1; c = coef_t'(coef); acc = ACCW'(accv); sig = sigv; qp = QPW'(qpv); tag = 24'h5a5a5a;
    @(posedge clk); #1;
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cf, ac, q; bit sg;
    en = 1; v = 0; c = 0; acc = 0; sig = 0; qp = 0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    // hand-worked cascade (drive the enh stage as if it were three loops)
    drive(107, 0, 0, 24);
    check("hand L0 level", olvl[0], 11); check("hand L0 acc", oacc[0], 110);
    drive(107, 110, 1'b0, 18);
    check("hand L1 level", olvl[1], -1); check("hand L1 acc", oacc[1], 105); check("hand L1 nc", orc[1], 0);
    drive(107, 105, 1'b1, 12);
    check("hand L2 level", olvl[1], 1); check("hand L2 rc", orc[1], 1); check("hand L2 acc", oacc[1], 108);
    // a large refinement is truncated
    drive(-900, 0, 1'b1, 12);
    check("trunc level", olvl[1], -1); check("base no trunc", olvl[0], -360);
    // random
    repeat (400) begin
      cf = $urandom_range(0, 8190) - 4095;
      ac = $urandom_range(0, 2000) - 1000;
      sg = $urandom_range(0, 1);
      q  = $urandom_range(0, 51);
      drive(cf, ac, sg, q);
      expect_out(1, cf, ac, sg, q);
      expect_out(0, cf, ac, sg, q);
      check("tag", otag[1], 24'h5a5a5a);
    end
    // stall holds outputs
    drive(50, 0, 0, 20);
    en = 0;
    drive(-3000, 0, 1, 40);
    expect_out(1, 50, 0, 0, 20);
    en = 1; v = 0;
    @(posedge clk); #1;
    check("bubble", ov[1], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
