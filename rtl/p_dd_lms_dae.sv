// p_dd_lms_dae: deep-parallel decision-directed LMS adaptive equaliser.
//
// P lanes equalise P consecutive symbols per clock with one shared set of
// N coefficients (T-spaced FIR, main tap at CURSOR):
//   y_k(n)      = sum_i c_i(n-D) * x_k(n-i)                         (lane k)
//   e_k(n)      = d_k(n) - y_k(n)
//   c_i(n+1)    = c_i(n) + 2mu * sum_{k=0}^{P-1} e_k(n-D) * x_k(n-D-i)
// d_k is the training symbol while use_ts is set, otherwise the lane's own
// hard decision (decision-directed mode). Summing the P error/sample
// products before a single coefficient update is the look-ahead
// computation that lets all P errors of a cycle contribute to one update
// (rather than keeping one error and discarding P-1), so training needs P
// times fewer clock cycles.
//
// Input aw holds P+N-1 consecutive samples, oldest first; lane k uses
// aw[k .. k+N-1] (aw[k+N-1] = x_k(n)). ref_sym, use_ts and adapt belong to
// the same word as aw.
//
// Pipeline (each step one register; latency in to out = 4 + ceil(log2 N)):
//   input register -> P-FIR products -> ceil(log2 N) adder levels ->
//   slicer + error -> output register.
// Update loop: the error register feeds P*N registered e*x products (the
// samples reach them through the delay-compensation line), then the
// products are summed over lanes, scaled by 2mu = 2^-MU_SHIFT and added
// to the coefficients. Loop delay D = 4 + ceil(log2 N) cycles from a
// coefficient change to the first error computed with it.
//
// Fixed point: samples Q2.13, coefficients Q1.14 for the filter, kept with
// CEXT extra fraction bits in the accumulators so that small updates are
// not lost; every result is saturated. With mu = 0.004 of the reference
// experiment, 2mu ~ 2^-7 (MU_SHIFT = 7). `init` reloads the start
// coefficients (CURSOR tap = 1.0, others 0). err_ok flags an output word
// whose P errors are all below ERR_TH in magnitude; the controller uses it
// to leave training. Structure (P-FIR, symbol recovery, reference switch,
// delay compensation, shifter, coefficient registers) follows the
// reference design; widths and the exact register placement are this
// design's.
module p_dd_lms_dae
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P        = 8,
  parameter int unsigned N        = 4,
  parameter int unsigned CURSOR   = 1,
  parameter int unsigned MU_SHIFT = 7,
  parameter int unsigned CEXT     = 8,
  parameter int unsigned ERR_TH   = 1024,
  localparam int unsigned AW      = P + N - 1,
  localparam int unsigned L       = (N > 1) ? $clog2(N) : 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    init,
  input  logic    in_valid,
  input  sample_t aw      [AW],
  input  sym_t    ref_sym [P],
  input  logic    use_ts,
  input  logic    adapt,
  output logic    out_valid,
  output sym_t    y_sym   [P],
  output sample_t y_eq    [P],
  output sample_t err     [P],
  output logic    err_ok,
  output coef_t   coef    [N]
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + L;
  localparam int unsigned ACC_W  = COEF_W + CEXT;
  localparam int unsigned EX_W   = 2 * DATA_W;
  localparam int unsigned EXS_W  = EX_W + ((P > 1) ? $clog2(P) : 0);
  // e*x is Q.26; coefficient accumulator is Q.(14+CEXT)
  localparam int unsigned UPD_SH = 2 * DATA_FRAC - COEF_FRAC - CEXT + MU_SHIFT;

  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  // ---------------- coefficient registers ----------------
  logic signed [ACC_W-1:0] acc [N];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) coef[i] = coef_t'(acc[i] >>> CEXT);
  end

  // ---------------- input register ----------------
  sample_t xw0  [AW];
  sym_t    ref0 [P];
  logic    v0, ts0, ad0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; ts0 <= 1'b0; ad0 <= 1'b0;
      for (int unsigned j = 0; j < AW; j++) xw0[j] <= '0;
      for (int unsigned k = 0; k < P; k++) ref0[k] <= '0;
    end else begin
      v0   <= in_valid;
      ts0  <= use_ts;
      ad0  <= adapt;
      xw0  <= aw;
      ref0 <= ref_sym;
    end
  end

  // ---------------- P-FIR lanes ----------------
  logic signed [SUM_W-1:0] yf   [P];
  logic                    yf_v [P];

  for (genvar k = 0; k < P; k++) begin : g_fir
    sample_t xl [N];
    for (genvar i = 0; i < N; i++) begin : g_x
      assign xl[i] = xw0[k + i];
    end
    pfir #(.N(N)) u_fir (
      .clk, .rst_n,
      .in_valid (v0),
      .xw       (xl),
      .c        (coef),
      .out_valid(yf_v[k]),
      .y        (yf[k])
    );
  end

  // ---------------- delay compensation ----------------
  // reference symbols and flags: to the error stage input (1 + L cycles)
  logic [2*P+1:0] refd_in, refd_out;
  always_comb begin
    for (int unsigned k = 0; k < P; k++) refd_in[2*k +: 2] = ref0[k];
    refd_in[2*P]   = ts0;
    refd_in[2*P+1] = ad0;
  end
  delay_line #(.WIDTH(2*P+2), .DEPTH(1 + L)) u_dref (
    .clk, .rst_n, .d(refd_in), .q(refd_out));

  // samples: to the error register output (2 + L cycles)
  logic [AW*DATA_W-1:0] xd_in, xd_out;
  sample_t              xd [AW];
  always_comb begin
    for (int unsigned j = 0; j < AW; j++) begin
      xd_in[j*DATA_W +: DATA_W] = xw0[j];
      xd[j] = sample_t'(xd_out[j*DATA_W +: DATA_W]);
    end
  end
  delay_line #(.WIDTH(AW*DATA_W), .DEPTH(2 + L)) u_dx (
    .clk, .rst_n, .d(xd_in), .q(xd_out));

  // ---------------- symbol recovery and error ----------------
  sample_t e_c  [P];
  sample_t y_c  [P];
  logic    ok_c;

  always_comb begin
    ok_c = 1'b1;
    for (int unsigned k = 0; k < P; k++) begin
      logic signed [SUM_W-1:0] ys;
      sample_t                 dk;
      logic signed [DATA_W:0]  ek;
      ys = yf[k] >>> COEF_FRAC;
      if (ys > SUM_W'(32767))       y_c[k] = 16'sh7FFF;
      else if (ys < -SUM_W'(32768)) y_c[k] = 16'sh8000;
      else                          y_c[k] = sample_t'(ys);
      dk = refd_out[2*P] ? sym2level(refd_out[2*k +: 2]) : sym2level(slice(y_c[k]));
      ek = (DATA_W+1)'(dk) - (DATA_W+1)'(y_c[k]);
      if (ek > (DATA_W+1)'(32767))       e_c[k] = 16'sh7FFF;
      else if (ek < -(DATA_W+1)'(32768)) e_c[k] = 16'sh8000;
      else                               e_c[k] = sample_t'(ek);
      if (e_c[k] >= sample_t'(ERR_TH) || e_c[k] <= -sample_t'(ERR_TH)) ok_c = 1'b0;
    end
  end

  sample_t e_r  [P];
  sample_t y_r  [P];
  sym_t    s_r  [P];
  logic    v_e, ad_e, ok_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_e <= 1'b0; ad_e <= 1'b0; ok_e <= 1'b0;
      for (int unsigned k = 0; k < P; k++) begin
        e_r[k] <= '0; y_r[k] <= '0; s_r[k] <= '0;
      end
    end else begin
      v_e  <= yf_v[0];
      ad_e <= refd_out[2*P+1];
      ok_e <= ok_c & yf_v[0];
      for (int unsigned k = 0; k < P; k++) begin
        e_r[k] <= e_c[k];
        y_r[k] <= y_c[k];
        s_r[k] <= slice(y_c[k]);
      end
    end
  end

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err_ok    <= 1'b0;
      for (int unsigned k = 0; k < P; k++) begin
        y_sym[k] <= '0; y_eq[k] <= '0; err[k] <= '0;
      end
    end else begin
      out_valid <= v_e;
      err_ok    <= ok_e;
      y_sym     <= s_r;
      y_eq      <= y_r;
      err       <= e_r;
    end
  end

  // ---------------- LMS update (look-ahead) ----------------
  logic signed [EX_W-1:0] ex [P][N];
  logic                   v_u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_u <= 1'b0;
      for (int unsigned k = 0; k < P; k++)
        for (int unsigned i = 0; i < N; i++) ex[k][i] <= '0;
    end else begin
      v_u <= v_e & ad_e;
      for (int unsigned k = 0; k < P; k++)
        for (int unsigned i = 0; i < N; i++)
          ex[k][i] <= EX_W'(e_r[k]) * EX_W'(xd[k + N - 1 - i]);
    end
  end

  logic signed [ACC_W-1:0] acc_nxt [N];

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      logic signed [EXS_W-1:0] sum;
      logic signed [EXS_W:0]   nxt;
      sum = '0;
      for (int unsigned k = 0; k < P; k++) sum += EXS_W'(ex[k][i]);
      nxt = (EXS_W+1)'(acc[i]) + (EXS_W+1)'(sum >>> UPD_SH);
      if (nxt > (EXS_W+1)'(ACC_MAX))      acc_nxt[i] = ACC_MAX;
      else if (nxt < (EXS_W+1)'(ACC_MIN)) acc_nxt[i] = ACC_MIN;
      else                                acc_nxt[i] = ACC_W'(nxt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++)
        acc[i] <= (i == CURSOR) ? ACC_W'(1 << (COEF_FRAC + CEXT)) : '0;
    end else if (init) begin
      for (int unsigned i = 0; i < N; i++)
        acc[i] <= (i == CURSOR) ? ACC_W'(1 << (COEF_FRAC + CEXT)) : '0;
    end else if (v_u) begin
      acc <= acc_nxt;
    end
  end

endmodule
