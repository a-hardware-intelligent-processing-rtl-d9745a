// tb_sync_fifo: checks the 32-bit x 512 FIFO against a queue model under
// random pushes and pops, including filling it completely (pushes while
// full are dropped) and draining it (pops while empty are ignored).
module tb_sync_fifo;
  localparam int DEPTH = 512;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 5) $display("FAIL %s q=%0d count=%0d full=%0d", what, q.size(), count, full); end
  endtask

  // One cycle: sample outputs against the model, apply wr/rd, update model.
  task automatic step(input bit w, input bit r);
    wr_en = w; rd_en = r; wr_data = $urandom;
    #1;
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == DEPTH), "full flag");
    check(count == ($clog2(DEPTH)+1)'(q.size()), "count");
    if (q.size() > 0) check(rd_data == q[0], "head data");
    @(posedge clk);
    begin
      bit was_full, was_empty;
      was_full  = (q.size() == DEPTH);
      was_empty = (q.size() == 0);
      if (r && !was_empty) void'(q.pop_front());
      if (w && !was_full) q.push_back(wr_data);
    end
    #1;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 2000; i++) step($urandom_range(1), $urandom_range(1));
    for (int i = 0; i < DEPTH + 20; i++) step(1, 0);         // fill past full
    check(full, "full after fill");
    for (int i = 0; i < 200; i++) step(1, 1);                // full, both
    for (int i = 0; i < DEPTH + 20; i++) step(0, 1);         // drain past empty
    check(empty, "empty after drain");
    for (int i = 0; i < 2000; i++) step($urandom_range(3) != 0, $urandom_range(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
