// lc_sr_agent: stimulus and checker for one Level C search-range layer
// (level_c_sr, or the matching ports of the top). Used by tb_level_c_sr and
// tb_svc_bw_top.
//
// After `start` it codes three MB rows: a B-frame row at the top frame edge,
// a B-frame row at the bottom edge and a key-frame row in the middle. For
// each row it issues a row start and an MB step for every following MB, and
// checks after each command (1) the pixels fetched: W*H per reference at a
// row start and N*H per reference per MB step (Level C), and (2) eight
// random window pixels per port against the model frame, window column x
// being frame column 16*mb_x - SRH + x and window row y frame row
// 16*mb_y - SRV + y, both clamped to the frame. It also answers the pixel
// read port (random ready, random latency 0-2) from the model frame
// pix(address). checks/failures accumulate; done rises at the end.
module lc_sr_agent
  import svc_pkg::*;
#(
  parameter int FRAME_W = 352,
  parameter int FRAME_H = 288,
  parameter int N       = 16,
  parameter int SRH_B   = 64,
  parameter int SRV_B   = 32,
  parameter int SRH_K   = 96,
  parameter int SRV_K   = 48,
  parameter int XW      = 8,
  parameter int YW      = 7,
  parameter logic [23:0] BASE0 = 24'h100000,
  parameter logic [23:0] BASE1 = 24'h200000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        cmd_valid,
  input  logic        cmd_ready,
  output logic        cmd_step,
  output me_mode_e    cmd_mode,
  output logic [7:0]  cmd_mb_x,
  output logic [7:0]  cmd_mb_y,
  output logic [23:0] ref_base [2],
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [23:0] rd_req_addr,
  output logic        rd_resp_valid,
  output logic [7:0]  rd_resp_data,
  output logic [XW-1:0] rd_x [2],
  output logic [YW-1:0] rd_y [2],
  input  logic [7:0]  rd_data [2],
  input  me_mode_e    mode,
  input  logic        busy,
  input  logic [31:0] pix_count,
  output int          checks,
  output int          failures,
  output int          n_step,
  output int          n_brow,
  output int          n_krow,
  output logic        done
);
  function automatic logic [7:0] pix(int a);
    return 8'((a * 29) ^ (a >> 6) ^ (a >> 11));
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (%0dx%0d layer): got %0d expected %0d", what, FRAME_W, FRAME_H, got, exp);
    end
  endtask

  // pixel memory model
  int lat = 0; bit pend = 0; int addr = 0;
  always_ff @(posedge clk) begin
    rd_resp_valid <= 1'b0;
    rd_req_ready  <= ($urandom_range(0, 3) != 0);
    if (rst_n) begin
      if (pend) begin
        if (lat == 0) begin rd_resp_valid <= 1'b1; rd_resp_data <= pix(addr); pend = 0; end
        else lat--;
      end else if (rd_req_valid && rd_req_ready) begin
        addr = int'(rd_req_addr); pend = 1; lat = $urandom_range(0, 2);
      end
    end
  end

  task automatic command(bit step, me_mode_e m, int x, int y);
    @(negedge clk);
    cmd_valid = 1; cmd_step = step; cmd_mode = m; cmd_mb_x = 8'(x); cmd_mb_y = 8'(y);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic row(int y, me_mode_e m);
    int srh = (m == ME_KEY) ? SRH_K : SRH_B;
    int srv = (m == ME_KEY) ? SRV_K : SRV_B;
    int w = 2 * N + 2 * srh, h = 2 * srv + N, nref = (m == ME_KEY) ? 1 : 2;
    int p0;
    for (int mb = 0; mb < FRAME_W / 16; mb++) begin
      p0 = int'(pix_count);
      command(mb > 0, m, mb, y);
      if (mb == 0) begin
        check("row start pixels", int'(pix_count) - p0, nref * w * h);
        check("mode", mode, m);
      end else begin
        check("Level C step pixels", int'(pix_count) - p0, nref * N * h);
        n_step++;
      end
      repeat (8) begin
        automatic int x = $urandom_range(0, w - 1), yy = $urandom_range(0, h - 1);
        automatic int fx = clampi(16 * mb - srh + x, 0, FRAME_W - 1);
        automatic int fy = clampi(16 * y - srv + yy, 0, FRAME_H - 1);
        rd_x[0] = XW'(x); rd_y[0] = YW'(yy); rd_x[1] = XW'(x); rd_y[1] = YW'(yy);
        @(negedge clk);
        check("window pixel ref0", rd_data[0], pix(int'(ref_base[0]) + fy * FRAME_W + fx));
        if (m == ME_B_FRAME) check("window pixel ref1", rd_data[1], pix(int'(ref_base[1]) + fy * FRAME_W + fx));
      end
    end
    if (m == ME_KEY) n_krow++; else n_brow++;
  endtask

  initial begin
    checks = 0; failures = 0; n_step = 0; n_brow = 0; n_krow = 0; done = 0;
    cmd_valid = 0; cmd_step = 0; cmd_mode = ME_B_FRAME; cmd_mb_x = 0; cmd_mb_y = 0;
    ref_base[0] = BASE0; ref_base[1] = BASE1;
    rd_x[0] = 0; rd_x[1] = 0; rd_y[0] = 0; rd_y[1] = 0;
    rd_resp_data = 0;
    @(posedge start);
    row(0, ME_B_FRAME);
    row(FRAME_H / 16 - 1, ME_B_FRAME);
    row(FRAME_H / 32, ME_KEY);
    done = 1;
  end
endmodule
