// tb_aligner: self-checking test of aligner (frame-aligned equaliser
// window). The window carries a ramp so each element names its position.
// Checks: nothing valid before a detection; on detection with lane k the
// next output has first = 1, locked = 1, lane = k and
// aw[j] = win[k + CURSOR + S + 1 - N - P + j] of the detection cycle; later
// detections with other lanes do not move the offset; clear drops the
// lock and a new detection re-locks on the new lane.
module tb_aligner;
  localparam int P = 8, S = 128, N = 4, CURSOR = 1;
  localparam int W = P + S + N - 2, AW = P + N - 1;
  localparam int BASE = CURSOR + S + 1 - N - P;

  logic clk = 0, rst_n = 0, clear = 0;
  always #1 clk = ~clk;

  logic signed [15:0] win [W];
  logic det = 0;
  logic [2:0] det_lane = 0;
  logic locked, out_valid, first;
  logic [2:0] lane;
  logic signed [15:0] aw [AW];

  aligner #(.P(P), .S(S), .N(N), .CURSOR(CURSOR)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // drive one cycle with window base b (win[j] = b + j)
  task automatic step(int b, bit d, int l, bit c);
    for (int j = 0; j < W; j++) win[j] <= 16'(b + j);
    det <= d; det_lane <= 3'(l); clear <= c;
    @(posedge clk);
    @(negedge clk);
  endtask

  task automatic expect_out(int b, int k, bit f);
    chk(out_valid && locked, "valid and locked");
    chk(first == f, $sformatf("first=%0d exp %0d", first, f));
    chk(lane == 3'(k), $sformatf("lane %0d exp %0d", lane, k));
    for (int j = 0; j < AW; j++)
      chk(aw[j] == 16'(b + k + BASE + j), $sformatf("aw[%0d]=%0d exp %0d", j, aw[j], b + k + BASE + j));
  endtask

  initial begin
    for (int j = 0; j < W; j++) win[j] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 5; t++) begin
      step(100 * t, 0, 0, 0);
      chk(!out_valid && !locked && !first, "idle before detection");
    end
    step(1000, 1, 5, 0);
    expect_out(1000, 5, 1);
    for (int t = 1; t < 6; t++) begin
      step(1000 + 8 * t, (t == 3), 2, 0);   // a later detection must not move it
      expect_out(1000 + 8 * t, 5, 0);
    end
    step(2000, 0, 0, 1);
    chk(!out_valid && !locked, "clear drops the lock");
    step(2100, 0, 0, 0);
    chk(!out_valid, "stays unlocked after clear");
    step(3000, 1, 7, 0);
    expect_out(3000, 7, 1);
    step(3008, 0, 0, 0);
    expect_out(3008, 7, 0);
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
