// tb_p_sync: self-checking test of p_sync (parallel header correlation).
// Drives the window directly with random PAM-4 level samples and, at
// chosen cycles, places the header (computed by the testbench's own PRBS
// model) starting at lane k. Checks that det pulses exactly
// 2 + log2(S) = 9 cycles later with det_lane = k and det_corr equal to the
// correlation computed in the testbench, and that random data never
// triggers the detector. Every other header event adds a weaker second
// copy at another lane: the detector must report the stronger one.
module tb_p_sync;
  import tb_pam4_model_pkg::*;
  localparam int P = 8, S = 128, N = 4;
  localparam int W = P + S + N - 2;
  localparam int CORR_W = 16 + 3 + $clog2(S);
  localparam int LAT = 2 + $clog2(S);

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0;
  logic signed [15:0] win [W];
  logic signed [CORR_W-1:0] threshold;
  logic det;
  logic [2:0] det_lane;
  logic signed [CORR_W-1:0] det_corr;

  p_sync #(.P(P), .S(S), .N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_events = 0, n_double = 0;
  int hw [S];
  int lvl [4] = '{-8192, -2731, 2731, 8192};
  // expected detection per cycle: lane (or -1) and correlation
  int exp_lane [int];
  longint exp_corr [int];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d %s", cyc, msg);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (exp_lane.exists(cyc)) begin
        chk(det, "header detected");
        chk(det_lane == 3'(exp_lane[cyc]), $sformatf("lane %0d exp %0d", det_lane, exp_lane[cyc]));
        chk(det_corr == CORR_W'(exp_corr[cyc]), $sformatf("corr %0d exp %0d", det_corr, exp_corr[cyc]));
      end else begin
        chk(!det, "no false detection");
      end
    end
  end

  initial begin
    int st;
    longint peak;
    st = SEED_HDR;
    peak = 0;
    for (int j = 0; j < S; j++) begin
      hw[j] = 2 * gray2sym(prbs_pair(st)) - 3;
      peak += hw[j] * lvl[(hw[j] + 3) / 2];
    end
    threshold = CORR_W'(peak * 6 / 10);
    for (int j = 0; j < W; j++) win[j] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 200; t++) begin
      int k;
      k = -1;
      for (int j = 0; j < W; j++) win[j] <= 16'(lvl[$urandom_range(3)]);
      if (t % 23 == 10) begin
        longint c, best;
        int k2, bl;
        logic signed [15:0] v [W];
        k  = (t / 23) % P;
        k2 = (k + 5) % P;
        for (int j = 0; j < W; j++) v[j] = 16'(lvl[$urandom_range(3)] / 2);
        for (int j = 0; j < S; j++) v[k + j] = 16'(lvl[(hw[j] + 3) / 2]);
        // every other event: a weaker second copy at another lane
        if ((t / 23) % 2 == 1)
          for (int j = 0; j < S; j++) v[k2 + j] = v[k2 + j] + 16'(lvl[(hw[j] + 3) / 2] * 3 / 4);
        best = threshold;
        bl = -1;
        for (int l = 0; l < P; l++) begin
          c = 0;
          for (int j = 0; j < S; j++) c += hw[j] * v[l + j];
          if (c > best) begin best = c; bl = l; end
        end
        for (int j = 0; j < W; j++) win[j] <= v[j];
        if (bl >= 0) begin
          exp_lane[cyc + LAT + 1] = bl;
          exp_corr[cyc + LAT + 1] = best;
        end
        n_events += (bl >= 0);
        n_double += ((t / 23) % 2 == 1);
      end
      in_valid <= 1;
      @(posedge clk);
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_events < 8) failures++;
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
