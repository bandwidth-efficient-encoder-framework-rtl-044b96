// tb_sr_memory: default sizes (two 160 x 80 B-frame windows, one 224 x 112
// key window). A model keeps the logical window contents and shifts them
// by N columns on `advance`. B-frame mode: fill both windows, read back
// every pixel of both on the two ports; slide 12 times (wrapping the
// circular column base), loading only the newest N columns each time, and
// check random reads against the shifted model. Key mode: fill the enlarged
// window (it spans both banks), slide and check the same way, and check the
// one-cycle read latency.
module tb_sr_memory;
  import svc_pkg::*;
  localparam int N = 16, WB = 160, HB = 80, WK = 224, HK = 112;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  me_mode_e mode; logic rs, adv, we, wref; logic [7:0] wx, wd; logic [6:0] wy; logic [7:0] rx [2]; logic [6:0] ry [2]; logic [7:0] rd [2];
  sr_memory dut (.clk, .rst_n, .mode, .row_start(rs), .advance(adv), .wr_en(we), .wr_ref(wref), .wr_x(wx),
    .wr_y(wy), .wr_data(wd), .rd_x(rx), .rd_y(ry), .rd_data(rd));

  byte unsigned model [2][WK][HK];
  int w, h;

  task automatic wr(int r, int x, int y, int v);
    @(negedge clk); we = 1; wref = r[0]; wx = 8'(x); wy = 7'(y); wd = 8'(v);
    model[r][x][y] = 8'(v);
    @(negedge clk); we = 0;
  endtask

  task automatic rd2(int x0, int y0, int x1, int y1, int r0, int r1);
    @(negedge clk); rx[0] = 8'(x0); ry[0] = 7'(y0); rx[1] = 8'(x1); ry[1] = 7'(y1);
    @(negedge clk);
    check("port0", rd[0], model[r0][x0][y0]);
    check("port1", rd[1], model[r1][x1][y1]);
  endtask

  task automatic slide(int nref, int seed);
    @(negedge clk); adv = 1; @(negedge clk); adv = 0;
    for (int r = 0; r < nref; r++)
      for (int x = 0; x < w - N; x++)
        for (int y = 0; y < h; y++) model[r][x][y] = model[r][x + N][y];
    for (int r = 0; r < nref; r++)
      for (int x = w - N; x < w; x++)
        for (int y = 0; y < h; y++) wr(r, x, y, (seed * 7 + x * 3 + y * 5 + r * 11) % 256);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = ME_B_FRAME; rs = 0; adv = 0; we = 0; wref = 0; wx = 0; wy = 0; wd = 0;
    rx[0] = 0; ry[0] = 0; rx[1] = 0; ry[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- B-frame mode ----
    w = WB; h = HB;
    @(negedge clk); rs = 1; @(negedge clk); rs = 0;
    for (int r = 0; r < 2; r++)
      for (int x = 0; x < w; x++)
        for (int y = 0; y < h; y++) wr(r, x, y, $urandom_range(0, 255));
    for (int x = 0; x < w; x++)
      for (int y = 0; y < h; y++) rd2(x, y, x, y, 0, 1);
    for (int s = 0; s < 12; s++) begin
      slide(2, s);
      repeat (200) begin
        automatic int x0 = $urandom_range(0, w - 1), y0 = $urandom_range(0, h - 1);
        automatic int x1 = $urandom_range(0, w - 1), y1 = $urandom_range(0, h - 1);
        rd2(x0, y0, x1, y1, 0, 1);
      end
    end
    // ---- key-frame mode ----
    mode = ME_KEY; w = WK; h = HK;
    @(negedge clk); rs = 1; @(negedge clk); rs = 0;
    for (int x = 0; x < w; x++)
      for (int y = 0; y < h; y++) wr(0, x, y, $urandom_range(0, 255));
    for (int x = 0; x < w; x++)
      for (int y = 0; y < h; y += 2) rd2(x, y, x, y + 1, 0, 0);
    for (int s = 0; s < 16; s++) begin
      slide(1, s + 50);
      repeat (200) rd2($urandom_range(0, w - 1), $urandom_range(0, h - 1),
                       $urandom_range(0, w - 1), $urandom_range(0, h - 1), 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
