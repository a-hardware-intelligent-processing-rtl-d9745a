// tb_gradient_unit: drives random windows, small-difference windows around
// the threshold and exact sector-boundary cases, and compares the direction
// code and the valid bit with a reference that takes the angle from $atan2
// and the magnitude as |fx| + |fy|.
module tb_gradient_unit;
  import mrcohog_pkg::*;
  import mrcohog_ref_pkg::ref_dir;
  logic clk = 0, rst_n = 0;
  logic win_valid = 0;
  logic [X_W-1:0] win_x = 0;
  logic [Y_W-1:0] win_y = 0;
  pix_t win [3][3];
  grad_t g;
  int checks = 0, failures = 0;
  int n_weak = 0, n_dir [8];

  gradient_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic apply(input int l, input int r, input int u, input int d);
    int e;
    @(negedge clk);
    foreach (win[i, j]) win[i][j] = pix_t'($urandom);
    win[1][0] = pix_t'(l); win[1][2] = pix_t'(r); win[0][1] = pix_t'(u); win[2][1] = pix_t'(d);
    win_valid = 1; win_x = X_W'($urandom); win_y = Y_W'($urandom);
    @(negedge clk);
    win_valid = 0;
    e = ref_dir(r - l, d - u, 15);
    check(g.valid, "result valid");
    check(g.x == win_x && g.y == win_y, "coordinates");
    check(g.d.valid == (e >= 0), $sformatf("threshold l=%0d r=%0d u=%0d d=%0d", l, r, u, d));
    if (e >= 0) begin
      check(int'(g.d.dir) == e, $sformatf("direction l=%0d r=%0d u=%0d d=%0d got %0d exp %0d", l, r, u, d, g.d.dir, e));
      n_dir[e]++;
    end else n_weak++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) apply($urandom_range(255), $urandom_range(255), $urandom_range(255), $urandom_range(255));
    for (int i = 0; i < 3000; i++) begin
      int b;
      b = 100;
      apply(b, b + int'($urandom_range(24)) - 12, b, b + int'($urandom_range(24)) - 12);
    end
    // Sector boundaries: axes and diagonals in all directions.
    for (int a = -1; a <= 1; a++)
      for (int c = -1; c <= 1; c++)
        for (int m = 5; m <= 40; m += 7)
          apply(128, 128 + a * m, 128, 128 + c * m);
    apply(0, 255, 255, 0);
    apply(255, 0, 0, 255);
    foreach (n_dir[k]) check(n_dir[k] > 0, "every direction seen");
    check(n_weak > 0, "weak gradients seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
