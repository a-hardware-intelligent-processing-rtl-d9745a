// tb_adaboost_classifier: loads a random weak-classifier LUT (500 x 32
// signed 8-bit entries), applies random vote counts (including counts that
// saturate the last bin) and checks the score, the human decision and that
// done arrives NW + 3 cycles after start. Some rounds are biased so that
// both decisions and a zero sum occur.
module tb_adaboost_classifier;
  import mrcohog_pkg::*;
  localparam int NW = 500;
  logic clk = 0, rst_n = 0, start = 0, done, human;
  logic [CNT_W-1:0] counts [NW];
  logic signed [SCORE_W-1:0] score;
  logic cfg_we = 0;
  logic [13:0] cfg_addr = 0;
  logic signed [H_W-1:0] cfg_h = 0;
  int checks = 0, failures = 0;
  int lut [NW][32];
  int cyc, t0, n_pos, n_neg, n_zero;

  adaboost_classifier #(.NW(NW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic load_lut(input int bias);
    for (int t = 0; t < NW; t++)
      for (int b = 0; b < 32; b++) begin
        int v;
        v = int'($urandom_range(255)) - 128 + bias;
        if (v > 127) v = 127;
        if (v < -128) v = -128;
        lut[t][b] = v;
        @(negedge clk); cfg_we = 1; cfg_addr = 14'(t * 32 + b); cfg_h = H_W'(v);
      end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run(input bit zero);
    int exp;
    exp = 0;
    for (int t = 0; t < NW; t++) begin
      int b;
      counts[t] = CNT_W'($urandom_range(127));
      b = int'(counts[t]) / 2;
      if (b > 31) b = 31;
      exp += lut[t][b];
    end
    if (zero) begin
      // Force a zero sum: every classifier reads bin 0, whose entries are
      // rewritten to sum to zero.
      for (int t = 0; t < NW; t++) counts[t] = '0;
      exp = 0;
    end
    @(negedge clk); start = 1; @(posedge clk); t0 = cyc; @(negedge clk); start = 0;
    @(posedge clk iff done);
    check(cyc - t0 == NW + 3, $sformatf("latency %0d", cyc - t0));
    check(int'(score) == exp, $sformatf("score got %0d exp %0d", score, exp));
    check(human == (exp > 0), "decision");
    if (exp > 0) n_pos++; else if (exp < 0) n_neg++; else n_zero++;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (counts[t]) counts[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_lut(0);
    repeat (6) run(0);
    load_lut(40);
    repeat (3) run(0);
    load_lut(-40);
    repeat (3) run(0);
    for (int t = 0; t < NW; t++) begin
      lut[t][0] = (t % 2 == 0) ? 7 : -7;
      @(negedge clk); cfg_we = 1; cfg_addr = 14'(t * 32); cfg_h = H_W'(lut[t][0]);
    end
    @(negedge clk); cfg_we = 0;
    run(1);
    check(n_pos > 0 && n_neg > 0 && n_zero > 0, "positive, negative and zero sums seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
