// tb_realloc: self-checking test of realloc (data re-allocation).
// Feeds a ramp, sample n = n, so that every window element names the
// sample it holds, and checks after each word that
// win[j] = m - (W - P) + j with x(m) the first sample of the newest word,
// one cycle after the word enters; also that the window holds still while
// in_valid is low and that unfilled history reads as zero after reset.
module tb_realloc;
  localparam int P = 8, S = 128, N = 4;
  localparam int W = P + S + N - 2;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [15:0] in_x [P];
  logic signed [15:0] win [W];

  realloc #(.P(P), .S(S), .N(N)) dut (.*);

  int checks = 0, failures = 0;
  int words = 0;   // words accepted so far

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic check_window();
    int m;
    m = (words - 1) * P;
    for (int j = 0; j < W; j++) begin
      int e;
      e = m - (W - P) + j;
      if (e < 0) e = 0;   // reset history
      chk(win[j] == 16'(e), $sformatf("word %0d win[%0d]=%0d exp %0d", words, j, win[j], e));
    end
  endtask

  initial begin
    for (int k = 0; k < P; k++) in_x[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int w = 0; w < 60; w++) begin
      for (int k = 0; k < P; k++) in_x[k] <= 16'(words * P + k);
      in_valid <= (w % 7 != 5);
      @(posedge clk);
      if (w % 7 != 5) words++;
      @(negedge clk);
      chk(out_valid == (w % 7 != 5), "out_valid follows in_valid one cycle later");
      if (words > 0) check_window();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
