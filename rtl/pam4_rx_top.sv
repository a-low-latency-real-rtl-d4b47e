// pam4_rx_top: deep-parallel real-time PAM-4 receiver.
//
// Receives a 1.25 GBd PAM-4 stream sampled at 4 samples per symbol and
// delivered as NIN = P*OSR = 32 parallel 10-bit ADC samples per clock, and
// processes P = 8 symbols per clock, every stage in parallel down to the
// multiply-add level so that no frame memory is needed:
//
//   norm_ds   pick one sample per symbol, remove offset, scale   (3 cycles)
//   realloc   one shared window of P+S+N-2 consecutive samples    (1 cycle)
//   p_sync    P parallel header correlators, peak detector        (side path)
//   aligner   frame-aligned P+N-1 sample equaliser window         (1 cycle)
//   rx_ctrl   frame word count, training / decision-directed mode
//   ts_rom    training symbols, P per word
//   p_dd_lms_dae  P-lane LMS equaliser, look-ahead update          (4+log2 N)
//   demap     Gray de-mapping                                     (1 cycle)
//   ber_calc  payload bit-error counter                           (3+log2 P)
//
// Synchronisation runs beside the data path: once it has found the header,
// the aligner fixes the lane offset and the controller knows which frame
// word is on the bus, so the data never waits for the correlators.
// The stream is expected to be continuous once in_valid rises (the ADC
// interface streams without gaps). `clear` restarts the receiver: new
// header search, start coefficients, training mode, BER counters zeroed.
// out_bits/out_valid/out_payload give the recovered bits of each word and
// whether it was payload. The receiver chain follows the reference design;
// parameter defaults are its operating point (P = 8, N = 4, S = 128,
// 8000 training symbols, 80000-symbol frames, step 2mu = 2^-7 for the
// reference mu = 0.004).
module pam4_rx_top
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P          = 8,
  parameter int unsigned OSR        = 4,
  parameter int unsigned N          = 4,
  parameter int unsigned S          = 128,
  parameter int unsigned CURSOR     = 1,
  parameter int unsigned TS_LEN     = 8000,
  parameter int unsigned FRAME_LEN  = 80000,
  parameter int unsigned MU_SHIFT   = 7,
  parameter int unsigned ERR_TH     = 1024,
  parameter int unsigned CONV_WORDS = 64,
  localparam int unsigned NIN       = P * OSR,
  localparam int unsigned PH_W      = (OSR > 1) ? $clog2(OSR) : 1,
  localparam int unsigned CORR_W    = DATA_W + 3 + $clog2(S),
  localparam int unsigned LANE_W    = (P > 1) ? $clog2(P) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  // ADC interface
  input  logic                     in_valid,
  input  adc_t                     in_adc [NIN],
  // configuration
  input  logic [PH_W-1:0]          ds_phase,
  input  adc_t                     norm_offset,
  input  logic [15:0]              norm_gain,
  input  logic signed [CORR_W-1:0] sync_threshold,
  // recovered data
  output logic                     out_valid,
  output logic [2*P-1:0]           out_bits,
  output logic                     out_payload,
  output sample_t                  eq_sample [P],
  output sample_t                  eq_error  [P],
  // status
  output logic                     locked,
  output logic [LANE_W-1:0]        sync_lane,
  output logic signed [CORR_W-1:0] sync_peak,
  output logic                     dd_mode,
  output logic [15:0]              frame_cnt,
  output coef_t                    coef [N],
  output logic [47:0]              bit_cnt,
  output logic [47:0]              err_cnt
);

  localparam int unsigned W        = P + S + N - 2;
  localparam int unsigned AW       = P + N - 1;
  localparam int unsigned DAE_LAT  = 4 + ((N > 1) ? $clog2(N) : 0);
  localparam int unsigned TS_WORDS = TS_LEN / P;
  localparam int unsigned TA_W     = (TS_WORDS > 1) ? $clog2(TS_WORDS) : 1;

  // ---------------- normalisation / down-sampling ----------------
  sample_t x_n [P];
  logic    x_v;

  norm_ds #(.P(P), .OSR(OSR)) u_norm (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_adc   (in_adc),
    .phase    (ds_phase),
    .offset   (norm_offset),
    .gain     (norm_gain),
    .out_valid(x_v),
    .out_x    (x_n)
  );

  // ---------------- re-allocation ----------------
  sample_t win [W];
  logic    win_v;

  realloc #(.P(P), .S(S), .N(N)) u_realloc (
    .clk, .rst_n,
    .in_valid (x_v),
    .in_x     (x_n),
    .out_valid(win_v),
    .win      (win)
  );

  // ---------------- synchronisation ----------------
  logic                     det;
  logic [LANE_W-1:0]        det_lane;

  p_sync #(.P(P), .S(S), .N(N)) u_sync (
    .clk, .rst_n,
    .in_valid (win_v),
    .win      (win),
    .threshold(sync_threshold),
    .det      (det),
    .det_lane (det_lane),
    .det_corr (sync_peak)
  );

  sample_t aw [AW];
  logic    aw_v, aw_first;

  aligner #(.P(P), .S(S), .N(N), .CURSOR(CURSOR)) u_align (
    .clk, .rst_n, .clear,
    .win      (win),
    .det      (det & ~clear),
    .det_lane (det_lane),
    .locked   (locked),
    .lane     (sync_lane),
    .out_valid(aw_v),
    .first    (aw_first),
    .aw       (aw)
  );

  // ---------------- control and training ROM ----------------
  logic [TA_W-1:0] ts_addr;
  logic            use_ts, adapt, in_payload, pay_start, err_ok;
  sym_t            ts_sym [P];

  rx_ctrl #(
    .P(P), .S(S), .TS_LEN(TS_LEN), .FRAME_LEN(FRAME_LEN),
    .FIRST_WORD(sync_latency(S) - 1), .CONV_WORDS(CONV_WORDS)
  ) u_ctrl (
    .clk, .rst_n, .clear,
    .locked    (locked),
    .first     (aw_first),
    .err_ok    (err_ok),
    .ts_addr   (ts_addr),
    .use_ts    (use_ts),
    .adapt     (adapt),
    .in_payload(in_payload),
    .pay_start (pay_start),
    .dd_mode   (dd_mode),
    .frame_cnt (frame_cnt)
  );

  ts_rom #(.P(P), .TS_LEN(TS_LEN)) u_ts (
    .addr(ts_addr),
    .sym (ts_sym)
  );

  // ---------------- equaliser ----------------
  sym_t    y_sym [P];
  logic    y_v;

  p_dd_lms_dae #(
    .P(P), .N(N), .CURSOR(CURSOR), .MU_SHIFT(MU_SHIFT), .ERR_TH(ERR_TH)
  ) u_dae (
    .clk, .rst_n,
    .init     (clear),
    .in_valid (aw_v),
    .aw       (aw),
    .ref_sym  (ts_sym),
    .use_ts   (use_ts),
    .adapt    (adapt),
    .out_valid(y_v),
    .y_sym    (y_sym),
    .y_eq     (eq_sample),
    .err      (eq_error),
    .err_ok   (err_ok),
    .coef     (coef)
  );

  // ---------------- de-mapping and BER ----------------
  logic [1:0] flags_d;

  delay_line #(.WIDTH(2), .DEPTH(DAE_LAT + 1)) u_dflags (
    .clk, .rst_n,
    .d({in_payload & aw_v, pay_start & aw_v}),
    .q(flags_d)
  );

  demap #(.P(P)) u_demap (
    .clk, .rst_n,
    .in_valid (y_v),
    .sym      (y_sym),
    .out_valid(out_valid),
    .bits     (out_bits)
  );

  // after `clear`, words still in the equaliser pipeline belong to the old
  // lock: keep them out of the payload flag and the BER count
  logic [$clog2(DAE_LAT + 2)-1:0] flush;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          flush <= '0;
    else if (clear)      flush <= ($clog2(DAE_LAT + 2))'(DAE_LAT + 1);
    else if (flush != 0) flush <= flush - 1'b1;
  end

  assign out_payload = flags_d[1] & ~clear & (flush == 0);

  ber_calc #(.P(P)) u_ber (
    .clk, .rst_n, .clear,
    .in_valid  (out_valid),
    .bits      (out_bits),
    .in_payload(out_payload),
    .pay_start (flags_d[0] & out_payload),
    .bit_cnt   (bit_cnt),
    .err_cnt   (err_cnt)
  );

endmodule
