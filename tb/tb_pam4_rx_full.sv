// tb_pam4_rx_full: one complete 80000-symbol frame through the receiver at
// its default parameters (P = 8, N = 4, S = 128, 8000 training symbols).
//
// Drives the receiver with a behavioural transmitter, channel and ADC
// (tb_pam4_model_pkg): zero padding, then frames of header, training
// sequence and payload, through a channel with one pre-cursor and two
// post-cursors strong enough to close the eye without equalisation, plus
// noise, sampled at 4 samples per symbol (the receiver keeps phase 1; the
// other phases carry a distorted copy). The testbench checks:
//   - header lock, on the lane offset predicted from the frame position;
//   - the training -> decision-directed switch before the training ends;
//   - every payload word against an independently generated PRBS;
//   - the BER counters (bits counted, zero errors);
//   - the equaliser coefficients against the channel (main tap, first
//     post-cursor tap of opposite sign);
//   - the data-path latency: 13 cycles from the ADC word holding the first
//     payload symbol to its bits (3 normalisation, 1 re-allocation,
//     1 waiting for the post-cursor sample, 1 alignment, 6 equaliser,
//     1 de-map);
// and counts each mechanism (lock, convergence switch, frame wrap, payload
// restart seen only with two or more frames), failing for any that never happened.
module tb_pam4_rx_full;
  import tb_pam4_model_pkg::*;

  localparam int P         = 8;
  localparam int OSR       = 4;
  localparam int N         = 4;
  localparam int S         = 128;
  localparam int TS_LEN    = 8000;
  localparam int FRAME_LEN = 80000;
  localparam int NFR       = 1;          // frames sent
  localparam int CLEAR_FR  = -1;     // clear during this frame (-1: never)
  localparam int ZP        = 163;            // zero-padding symbols before frame 0
  localparam int TAIL      = 64 * P;
  localparam int NSYM      = ZP + NFR * FRAME_LEN + TAIL;
  localparam int NWORD     = NSYM / P;
  localparam int PAY_WORDS = (FRAME_LEN - S - TS_LEN) / P;
  localparam int LAT_EXP   = 13;
  localparam int CORR_W    = 16 + 3 + $clog2(S);

  // channel taps: s(n+1), s(n), s(n-1), s(n-2)
  localparam real H_PRE = 0.10, H_0 = 1.0, H_1 = 0.25, H_2 = 0.05;
  localparam real NOISE = 0.02;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  always #1 clk = ~clk;

  logic                     in_valid;
  logic [9:0]               in_adc [P*OSR];
  logic [1:0]               ds_phase;
  logic [9:0]               norm_offset;
  logic [15:0]              norm_gain;
  logic signed [CORR_W-1:0] sync_threshold;
  logic                     out_valid, out_payload, locked, dd_mode;
  logic [2*P-1:0]           out_bits;
  logic signed [15:0]       eq_sample [P];
  logic signed [15:0]       eq_error  [P];
  logic [2:0]               sync_lane;
  logic signed [CORR_W-1:0] sync_peak;
  logic [15:0]              frame_cnt;
  logic signed [15:0]       coef [N];
  logic [47:0]              bit_cnt, err_cnt;

  pam4_rx_top dut (
    .clk, .rst_n, .clear,
    .in_valid, .in_adc, .ds_phase, .norm_offset, .norm_gain, .sync_threshold,
    .out_valid, .out_bits, .out_payload, .eq_sample, .eq_error,
    .locked, .sync_lane, .sync_peak, .dd_mode, .frame_cnt, .coef,
    .bit_cnt, .err_cnt
  );

  int checks = 0, failures = 0;
  int n_lock = 0, n_conv = 0, n_wrap = 0, n_restart = 0, n_clear = 0;
  int n_payload_words = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- stimulus: symbol stream ----------------
  int  sym [];        // symbol index, -1 = zero padding
  real rx  [];        // channel output per symbol

  initial begin
    int st_h, st_t, st_p, base;
    sym = new[NSYM];
    rx  = new[NSYM];
    for (int i = 0; i < NSYM; i++) sym[i] = -1;
    for (int f = 0; f < NFR; f++) begin
      base = ZP + f * FRAME_LEN;
      st_h = SEED_HDR; st_t = SEED_TS; st_p = SEED_PAY;
      for (int j = 0; j < S; j++)      sym[base + j] = gray2sym(prbs_pair(st_h));
      for (int j = 0; j < TS_LEN; j++) sym[base + S + j] = gray2sym(prbs_pair(st_t));
      for (int j = S + TS_LEN; j < FRAME_LEN; j++) sym[base + j] = gray2sym(prbs_pair(st_p));
    end
    for (int i = 0; i < NSYM; i++) begin
      real a;
      a = 0.0;
      if (i + 1 < NSYM && sym[i+1] >= 0) a += H_PRE * sym_level(sym[i+1]);
      if (sym[i] >= 0)                   a += H_0   * sym_level(sym[i]);
      if (i >= 1 && sym[i-1] >= 0)       a += H_1   * sym_level(sym[i-1]);
      if (i >= 2 && sym[i-2] >= 0)       a += H_2   * sym_level(sym[i-2]);
      rx[i] = a + noise(NOISE);
    end
  end

  // ---------------- drive ----------------
  int  cyc = 0;
  int  word_idx = -1;
  int  a0_word, a0_cycle = -1, out_cycle = -1;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    real thr;
    int  st;
    // correlation threshold: 0.6 of the ideal peak sum(3|l|^2 * 8192)
    st = SEED_HDR;
    thr = 0.0;
    for (int j = 0; j < S; j++) begin
      real l;
      l = sym_level(gray2sym(prbs_pair(st)));
      thr += 3.0 * l * l * 8192.0;
    end
    sync_threshold = CORR_W'($rtoi(0.6 * thr));
    ds_phase    = 2'd1;
    norm_offset = 10'd512;
    norm_gain   = 16'(gain_q8_8());
    in_valid    = 1'b0;
    for (int i = 0; i < P*OSR; i++) in_adc[i] = 10'd512;
    a0_word = (ZP + S + TS_LEN) / P;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int w = 0; w < NWORD; w++) begin
      for (int k = 0; k < P; k++) begin
        real r;
        r = rx[w*P + k];
        for (int ph = 0; ph < OSR; ph++)
          in_adc[k*OSR + ph] <= 10'(adc_code(ph == 1 ? r : 0.6 * r + 0.3));
      end
      in_valid <= 1'b1;
      word_idx <= w;
      if (CLEAR_FR >= 0 && w == (ZP + CLEAR_FR * FRAME_LEN + FRAME_LEN / 2) / P) begin
        clear <= 1'b1;
        n_clear++;
      end else begin
        clear <= 1'b0;
      end
      @(posedge clk);
    end
    clear <= 1'b0;
    repeat (40) @(posedge clk);
    finish_checks();
  end

  // ---------------- output checking ----------------
  int  st_ref = SEED_PAY;
  int  pw = 0;             // payload word within the frame
  int  exp_lane;
  bit  prev_locked = 0, prev_dd = 0;
  int  prev_frame = 0;
  int  frames_done = 0;    // payload sections completed since (re)lock

  initial exp_lane = (ZP + S + N - 2) % P;

  always @(posedge clk) begin
    if (word_idx == a0_word && a0_cycle < 0) a0_cycle = cyc;
    if (rst_n) begin
      if (clear) begin
        st_ref = SEED_PAY;
        pw = 0;
      end
      if (locked && !prev_locked) begin
        n_lock++;
        check(sync_lane == 3'(exp_lane), $sformatf("lock lane %0d, expected %0d", sync_lane, exp_lane));
      end
      if (dd_mode && !prev_dd) begin
        n_conv++;
        $display("decision-directed from frame word %0d (training budget %0d words)",
                 dut.u_ctrl.wc_now, TS_LEN / P);
        // must switch on convergence, before the training words are used up
        check(int'(dut.u_ctrl.wc_now) < TS_LEN / P - 1,
              $sformatf("switch to decision mode only at word %0d", dut.u_ctrl.wc_now));
      end
      if (frame_cnt != 16'(prev_frame) && frame_cnt != 0) n_wrap++;
      if (out_valid && out_payload) begin
        logic [2*P-1:0] e;
        if (pw == 0) n_restart++;
        if (out_cycle < 0) out_cycle = cyc;
        for (int k = 0; k < P; k++) begin
          int b;
          b = prbs_pair(st_ref);
          e[2*k +: 2] = 2'(b);
        end
        check(out_bits == e, $sformatf("payload word %0d: got %h expected %h", pw, out_bits, e));
        n_payload_words++;
        pw++;
        if (pw == PAY_WORDS) begin
          pw = 0;
          st_ref = SEED_PAY;
          frames_done++;
        end
      end
      prev_locked = locked;
      prev_dd     = dd_mode;
      prev_frame  = int'(frame_cnt);
    end
  end

  task automatic finish_checks();
    int frames_after;
    $display("lock=%0d conv_switch=%0d frame_wrap=%0d payload_restart=%0d clear=%0d payload_words=%0d",
             n_lock, n_conv, n_wrap, n_restart, n_clear, n_payload_words);
    $display("coef = %0d %0d %0d %0d  bits=%0d errors=%0d latency=%0d",
             coef[0], coef[1], coef[2], coef[3], bit_cnt, err_cnt, out_cycle - a0_cycle);
    check(n_lock == 1 + n_clear, "lock count");
    check(n_conv == 1 + n_clear, "convergence switch count");
    check(n_restart >= 1, "payload seen");
    check(NFR < 2 || n_wrap >= 1, "frame wrap seen");
    check(CLEAR_FR < 0 || n_clear == 1, "clear applied");
    // all payload words since the last (re)lock were counted, with no error
    frames_after = (CLEAR_FR < 0) ? NFR : NFR - CLEAR_FR - 1;
    check(bit_cnt == 48'(frames_after * PAY_WORDS * 2 * P),
          $sformatf("bit count %0d, expected %0d", bit_cnt, frames_after * PAY_WORDS * 2 * P));
    check(err_cnt == 0, "BER counter errors");
    // equaliser: main tap near 1/H_0 (within 25%), first post tap negative
    check(coef[1] > 16'sd12288 && coef[1] < 16'sd20480, "main tap magnitude");
    check(coef[2] < -16'sd1000, "post-cursor tap sign");
    check(coef[0] < -16'sd300, "pre-cursor tap sign");
    check(out_cycle - a0_cycle == LAT_EXP,
          $sformatf("latency %0d, expected %0d", out_cycle - a0_cycle, LAT_EXP));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (NWORD + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
