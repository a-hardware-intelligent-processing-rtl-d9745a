// tb_accel_ctrl: plays the roles of the FIFOs and the processing units
// around the sequencer and checks the order and timing of its pulses: idle
// while the input FIFO is empty, clear + scan start together, vote start
// FLUSH_CYCLES cycles after scan done, classify start with vote done, and a
// push only when the output FIFO has room (write stall counted).
module tb_accel_ctrl;
  logic clk = 0, rst_n = 0;
  logic in_empty = 1, scan_done = 0, vote_done = 0, cls_done = 0, out_full = 0;
  logic clear, scan_start, vote_start, cls_start, out_push, busy, write_stall;
  int checks = 0, failures = 0;
  int cyc, n_stall;

  accel_ctrl #(.FLUSH_CYCLES(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Waits for a pulse on sig while checking that no other pulse fires.
  // Samples mid-cycle (the outputs are decoded from the state), returns the
  // number of cycles waited in n, and leaves the caller just after the edge
  // that ends the pulse cycle.
  task automatic expect_pulse(input int which, input int maxc, output int n);
    logic s [5];
    n = 0;
    forever begin
      @(negedge clk);
      s = '{scan_start, vote_start, cls_start, out_push, clear};
      for (int k = 0; k < 4; k++) if (k != which) check(!s[k], $sformatf("unexpected pulse %0d", k));
      if (s[which]) break;
      n++;
      if (n > maxc) begin check(0, $sformatf("pulse %0d missing", which)); break; end
      @(posedge clk); #1;
    end
  endtask
  int nw;

  always @(posedge clk) if (write_stall) n_stall++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) begin @(posedge clk); #1 check(!busy && !scan_start, "idle while empty"); end
    for (int roi = 0; roi < 3; roi++) begin
      in_empty = 0;
      expect_pulse(0, 3, nw);
      check(clear, "clear with scan start");
      check(nw == 0, "scan starts at once");
      @(posedge clk); #1 in_empty = 1;
      repeat (20) begin @(posedge clk); #1 check(busy && !vote_start, "loading"); end
      scan_done = 1; @(posedge clk); #1 scan_done = 0;
      expect_pulse(1, 10, nw);
      check(nw == 3, $sformatf("flush length %0d", nw + 1));
      @(posedge clk); #1;
      repeat (7) begin @(posedge clk); #1 check(!cls_start, "voting"); end
      vote_done = 1;
      #0 check(cls_start, "classify start with vote done");
      @(posedge clk); #1 vote_done = 0;
      repeat (4) @(posedge clk);
      out_full = (roi == 1);
      #1 cls_done = 1; @(posedge clk); #1 cls_done = 0;
      if (roi == 1) begin
        repeat (6) begin @(posedge clk); #1 check(!out_push && busy, "stall while full"); end
        out_full = 0;
      end
      expect_pulse(3, 3, nw);
      @(posedge clk); #1 check(!busy, "back to idle");
    end
    check(n_stall >= 6, "write stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
