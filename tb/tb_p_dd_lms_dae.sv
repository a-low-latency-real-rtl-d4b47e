// tb_p_dd_lms_dae: self-checking test of the deep-parallel DD-LMS equaliser.
//   1. One adaptation step: from the start coefficients (tap 1 = 1.0), one
//      training word with adapt = 1. Its outputs must be y = x (main tap),
//      e = d - y, and afterwards every coefficient must equal
//      (acc0 + floor(sum_k e_k * x_k(n-i) / 2^11)) / 2^8, the look-ahead
//      update of all P lanes at once, computed in the testbench.
//   2. Training then decision-directed tracking on an ISI channel
//      (0.1 pre-cursor, 0.25 post-cursor): err_ok must appear, the final
//      errors must be small, the taps must take the signs that invert the
//      channel, and in decision-directed mode every decision must equal
//      the transmitted symbol.
//   3. Frozen coefficients (adapt = 0): every lane's y must equal
//      sat((sum_i c_i x_k(n-i)) >>> 14) and its decision the slicer of y,
//      4 + log2(N) = 6 cycles after the input word.
module tb_p_dd_lms_dae;
  localparam int P = 8, N = 4, CURSOR = 1;
  localparam int AW = P + N - 1;
  localparam int LAT = 4 + $clog2(N);

  logic clk = 0, rst_n = 0, init = 0;
  always #1 clk = ~clk;

  logic in_valid = 0, use_ts = 0, adapt = 0;
  logic signed [15:0] aw [AW];
  logic [1:0] ref_sym [P];
  logic out_valid, err_ok;
  logic [1:0] y_sym [P];
  logic signed [15:0] y_eq [P];
  logic signed [15:0] err [P];
  logic signed [15:0] coef [N];

  p_dd_lms_dae #(.P(P), .N(N), .CURSOR(CURSOR)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int lvl [4] = '{-8192, -2731, 2731, 8192};

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL @%0d %s", cyc, msg);
    end
  endtask

  function automatic int slice_m(int y);
    if (y >= 5461) return 3;
    if (y >= 0) return 2;
    if (y >= -5461) return 1;
    return 0;
  endfunction

  function automatic int rnd(int lo, int hi);
    int u;
    u = $urandom_range(hi - lo);
    return lo + u;
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint floor_div(longint a, longint b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  // symbol / channel stream for part 2
  int  sy [];
  int  rxs [];
  localparam int NW2 = 900;

  initial begin
    sy  = new[(NW2 + 4) * P];
    rxs = new[(NW2 + 4) * P];
    for (int i = 0; i < sy.size(); i++) sy[i] = $urandom_range(3);
    for (int i = 0; i < sy.size(); i++) begin
      real a;
      a = lvl[sy[i]];
      if (i + 1 < sy.size()) a += 0.10 * lvl[sy[i+1]];
      if (i >= 1) a += 0.25 * lvl[sy[i-1]];
      a += real'(rnd(-100, 100));
      rxs[i] = $rtoi(a);
    end
  end

  initial begin
    int xv [AW];
    int dv [P];
    int ev [P];
    int acc0 [N];
    int n_ok;
    for (int j = 0; j < AW; j++) aw[j] = 0;
    for (int k = 0; k < P; k++) ref_sym[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // ---------- 1. one look-ahead update ----------
    chk(coef[0] == 0 && coef[1] == 16384 && coef[2] == 0 && coef[3] == 0, "start coefficients");
    for (int j = 0; j < AW; j++) begin xv[j] = lvl[$urandom_range(3)] + rnd(-1000, 1000); aw[j] = 16'(xv[j]); end
    for (int k = 0; k < P; k++) begin dv[k] = $urandom_range(3); ref_sym[k] = 2'(dv[k]); end
    in_valid = 1; use_ts = 1; adapt = 1;
    @(negedge clk);
    in_valid = 0; adapt = 0;
    for (int c = 1; c < LAT; c++) begin
      chk(!out_valid, "no output before the pipeline latency");
      @(negedge clk);
    end
    chk(out_valid, "output after 4 + log2(N) cycles");
    for (int k = 0; k < P; k++) begin
      ev[k] = sat16(lvl[dv[k]] - xv[k + N - 1 - CURSOR]);
      chk(y_eq[k] == 16'(xv[k + N - 1 - CURSOR]), $sformatf("step: y[%0d]", k));
      chk(err[k] == 16'(ev[k]), $sformatf("step: e[%0d]=%0d exp %0d", k, err[k], ev[k]));
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      longint s, a;
      s = 0;
      for (int k = 0; k < P; k++) s += longint'(ev[k]) * xv[k + N - 1 - i];
      a = ((i == CURSOR) ? (longint'(1) << 22) : 0) + floor_div(s, 2048);
      chk(coef[i] == 16'(floor_div(a, 256)), $sformatf("step: c[%0d]=%0d exp %0d", i, coef[i], floor_div(a, 256)));
    end

    // ---------- 2. training, then decision-directed ----------
    init = 1;
    @(negedge clk);
    init = 0;
    n_ok = 0;
    for (int w = 0; w < NW2; w++) begin
      for (int j = 0; j < AW; j++) aw[j] = 16'(rxs[w * P + j]);
      for (int k = 0; k < P; k++) ref_sym[k] = 2'(sy[w * P + k + N - 1 - CURSOR]);
      in_valid = 1; adapt = 1;
      use_ts = (w < 400);
      @(negedge clk);
      if (err_ok) n_ok++;
      // decisions of the word LAT words back
      if (w >= 450 + LAT) begin
        int wb;
        wb = w - LAT + 1;
        for (int k = 0; k < P; k++)
          chk(y_sym[k] == 2'(sy[wb * P + k + N - 1 - CURSOR]), $sformatf("DD decision w=%0d k=%0d", wb, k));
      end
    end
    in_valid = 0; adapt = 0;
    repeat (LAT + 2) @(negedge clk);
    $display("after training: coef %0d %0d %0d %0d, err_ok words %0d", coef[0], coef[1], coef[2], coef[3], n_ok);
    chk(n_ok > 100, "err_ok reached");
    chk(coef[0] < -300 && coef[2] < -1500 && coef[1] > 14000, "taps invert the channel");

    // ---------- 3. frozen coefficients, latency ----------
    begin
      int cf [N];
      int exp_y [$];
      int sent_cyc [$];
      for (int i = 0; i < N; i++) cf[i] = coef[i];
      for (int w = 0; w < 60; w++) begin
        for (int j = 0; j < AW; j++) begin xv[j] = rnd(-12000, 12000); aw[j] = 16'(xv[j]); end
        for (int k = 0; k < P; k++) begin
          longint s;
          s = 0;
          for (int i = 0; i < N; i++) s += longint'(cf[i]) * xv[k + N - 1 - i];
          exp_y.push_back(sat16(floor_div(s, 16384)));
        end
        in_valid = (w % 4 != 3); use_ts = 0; adapt = 0;
        if (w % 4 == 3) repeat (P) void'(exp_y.pop_back());
        else sent_cyc.push_back(cyc);
        @(negedge clk);
        if (out_valid) begin
          chk(cyc - sent_cyc.pop_front() == LAT, "latency 4 + log2(N)");
          for (int k = 0; k < P; k++) begin
            int e;
            e = exp_y.pop_front();
            chk(y_eq[k] == 16'(e), $sformatf("frozen y[%0d]=%0d exp %0d", k, y_eq[k], e));
            chk(y_sym[k] == 2'(slice_m(e)), "frozen decision");
          end
        end
      end
      for (int i = 0; i < N; i++) chk(coef[i] == 16'(cf[i]), "no update with adapt = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
