// tb_refine_buffer: fills both 32 x 32 regions with random pixels, reads
// every pixel back (one-cycle latency), overwrites a few, and checks the
// origin/valid bookkeeping: load_done marks a region valid with its origin,
// clear invalidates both.
module tb_refine_buffer;
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

  logic clr, we, wref, ld, lref, rref; logic [4:0] wx, wy, rx, ry; logic [7:0] wd, rd;
  logic signed [12:0] lox, loy; logic [1:0] rv; logic signed [12:0] ox [2], oy [2];
  refine_buffer dut (.clk, .rst_n, .clear(clr), .wr_en(we), .wr_ref(wref), .wr_x(wx), .wr_y(wy), .wr_data(wd),
    .load_done(ld), .load_ref(lref), .load_ox(lox), .load_oy(loy), .rd_ref(rref), .rd_x(rx), .rd_y(ry),
    .rd_data(rd), .region_valid(rv), .origin_x(ox), .origin_y(oy));

  byte unsigned model [2][32][32];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; we = 0; wref = 0; ld = 0; lref = 0; rref = 0; wx = 0; wy = 0; rx = 0; ry = 0; wd = 0; lox = 0; loy = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("valid after reset", rv, 0);
    for (int r = 0; r < 2; r++)
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          model[r][x][y] = 8'($urandom);
          we = 1; wref = r[0]; wx = 5'(x); wy = 5'(y); wd = model[r][x][y];
          @(negedge clk);
        end
    we = 0;
    ld = 1; lref = 1; lox = -13'sd7; loy = 13'sd100; @(negedge clk); ld = 0;
    check("valid ref1", rv, 2'b10); check("ox", ox[1], -7); check("oy", oy[1], 100);
    ld = 1; lref = 0; lox = 13'sd300; loy = -13'sd2; @(negedge clk); ld = 0;
    check("valid both", rv, 2'b11); check("ox0", ox[0], 300); check("oy0", oy[0], -2);
    for (int r = 0; r < 2; r++)
      for (int y = 0; y < 32; y++)
        for (int x = 0; x < 32; x++) begin
          rref = r[0]; rx = 5'(x); ry = 5'(y);
          @(negedge clk);
          check("pixel", rd, model[r][x][y]);
        end
    // overwrite and read back
    we = 1; wref = 1; wx = 5'd31; wy = 5'd0; wd = 8'hA5; @(negedge clk); we = 0;
    rref = 1; rx = 5'd31; ry = 5'd0; @(negedge clk); check("overwrite", rd, 8'hA5);
    rref = 0; @(negedge clk); check("other ref untouched", rd, model[0][31][0]);
    clr = 1; @(negedge clk); clr = 0;
    check("cleared", rv, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
