// tb_level_c_sr: checks level_c_sr in its two configurations, the CIF layer
// (defaults: B-frame +-64 x +-32, key frame +-96 x +-48, 352x288) and the
// QCIF layer (+-32 x +-16 and +-48 x +-24, 176x144). For each, lc_sr_agent
// codes a B-frame row at the top edge, one at the bottom edge and a
// key-frame row, checking Level C pixel counts per command and random window
// pixels against the model frame. Window sizes are also checked against the
// byte counts of the memory budget (CIF 25600, QCIF 9216 bytes for two
// B-frame windows).
module tb_level_c_sr;
  import svc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  // ---- CIF
  logic cv, cr, cstep, crv, crr, crsv, cbusy; me_mode_e cmode, cm;
  logic [7:0] cx, cy, crsd; logic [23:0] cbase [2], cra; logic [31:0] cpc;
  logic [7:0] csx [2]; logic [6:0] csy [2]; logic [7:0] csd [2];
  int c_checks, c_fail, c_step, c_b, c_k; logic c_done;
  level_c_sr dut_cif (.clk, .rst_n, .cmd_valid(cv), .cmd_ready(cr), .cmd_step(cstep), .cmd_mode(cmode),
    .cmd_mb_x(cx), .cmd_mb_y(cy), .ref_base(cbase), .rd_req_valid(crv), .rd_req_ready(crr),
    .rd_req_addr(cra), .rd_resp_valid(crsv), .rd_resp_data(crsd), .rd_x(csx), .rd_y(csy),
    .rd_data(csd), .mode(cm), .busy(cbusy), .pix_count(cpc));
  lc_sr_agent #(.FRAME_W(352), .FRAME_H(288), .SRH_B(64), .SRV_B(32), .SRH_K(96), .SRV_K(48),
                .XW(8), .YW(7)) ag_cif (
    .clk, .rst_n, .start, .cmd_valid(cv), .cmd_ready(cr), .cmd_step(cstep), .cmd_mode(cmode),
    .cmd_mb_x(cx), .cmd_mb_y(cy), .ref_base(cbase), .rd_req_valid(crv), .rd_req_ready(crr),
    .rd_req_addr(cra), .rd_resp_valid(crsv), .rd_resp_data(crsd), .rd_x(csx), .rd_y(csy),
    .rd_data(csd), .mode(cm), .busy(cbusy), .pix_count(cpc), .checks(c_checks), .failures(c_fail),
    .n_step(c_step), .n_brow(c_b), .n_krow(c_k), .done(c_done));

  // ---- QCIF
  logic qv, qr, qstep, qrv, qrr, qrsv, qbusy; me_mode_e qmode, qm;
  logic [7:0] qx, qy, qrsd; logic [23:0] qbase [2], qra; logic [31:0] qpc;
  logic [6:0] qsx [2]; logic [5:0] qsy [2]; logic [7:0] qsd [2];
  int q_checks, q_fail, q_step, q_b, q_k; logic q_done;
  level_c_sr #(.FRAME_W(176), .FRAME_H(144), .SRH_B(32), .SRV_B(16), .SRH_K(48), .SRV_K(24)) dut_qcif (
    .clk, .rst_n, .cmd_valid(qv), .cmd_ready(qr), .cmd_step(qstep), .cmd_mode(qmode),
    .cmd_mb_x(qx), .cmd_mb_y(qy), .ref_base(qbase), .rd_req_valid(qrv), .rd_req_ready(qrr),
    .rd_req_addr(qra), .rd_resp_valid(qrsv), .rd_resp_data(qrsd), .rd_x(qsx), .rd_y(qsy),
    .rd_data(qsd), .mode(qm), .busy(qbusy), .pix_count(qpc));
  lc_sr_agent #(.FRAME_W(176), .FRAME_H(144), .SRH_B(32), .SRV_B(16), .SRH_K(48), .SRV_K(24),
                .XW(7), .YW(6)) ag_qcif (
    .clk, .rst_n, .start, .cmd_valid(qv), .cmd_ready(qr), .cmd_step(qstep), .cmd_mode(qmode),
    .cmd_mb_x(qx), .cmd_mb_y(qy), .ref_base(qbase), .rd_req_valid(qrv), .rd_req_ready(qrr),
    .rd_req_addr(qra), .rd_resp_valid(qrsv), .rd_resp_data(qrsd), .rd_x(qsx), .rd_y(qsy),
    .rd_data(qsd), .mode(qm), .busy(qbusy), .pix_count(qpc), .checks(q_checks), .failures(q_fail),
    .n_step(q_step), .n_brow(q_b), .n_krow(q_k), .done(q_done));

  int checks = 0, failures = 0;
  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks + q_checks, failures + c_fail + q_fail + 1);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    while (!(c_done && q_done)) @(negedge clk);
    checks += 4;
    if (c_step == 0 || q_step == 0) failures++;
    if (c_b != 2 || q_b != 2) failures++;
    if (c_k != 1 || q_k != 1) failures++;
    // memory budget: two B windows, the key window inside them
    if (2 * (32 + 128) * (64 + 16) != 25600 || (32 + 192) * (96 + 16) > 25600 ||
        2 * (32 + 64) * (32 + 16) != 9216 || (32 + 96) * (48 + 16) > 9216) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + c_checks + q_checks, failures + c_fail + q_fail);
    $finish;
  end
endmodule
