// pfir: fully parallel N-tap FIR filter lane (P-FIR).
//
// Computes y = sum_{i=0}^{N-1} c_i * x(n-i) for one output sample per clock
// with dedicated hardware: N multipliers whose products are registered,
// followed by a pipelined adder tree of ceil(log2 N) levels. Latency is
// therefore 1 + ceil(log2 N) cycles, and a new sample is accepted every
// cycle. Input xw holds the N most recent samples oldest first, so
// xw[N-1] = x(n) and xw[N-1-i] = x(n-i). The output is the full-precision
// sum (sample fraction bits + coefficient fraction bits); the caller
// rescales it. Structure as in the parallel FIR of the reference design
// (multipliers, pipeline registers, adder tree); the coefficients come in
// as a port because the equaliser adapts them.
module pfir
  import pam4_rx_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned PROD_W = DATA_W + COEF_W,
  localparam int unsigned SUM_W  = PROD_W + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  sample_t                 xw [N],
  input  coef_t                   c  [N],
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] y
);

  logic signed [PROD_W-1:0] prod [N];
  logic                     prod_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_v <= 1'b0;
      for (int unsigned i = 0; i < N; i++) prod[i] <= '0;
    end else begin
      prod_v <= in_valid;
      for (int unsigned i = 0; i < N; i++)
        prod[i] <= PROD_W'(c[i]) * PROD_W'(xw[N-1-i]);
    end
  end

  adder_tree #(.NUM(N), .IN_W(PROD_W)) u_tree (
    .clk, .rst_n,
    .in_valid (prod_v),
    .in_data  (prod),
    .out_valid(out_valid),
    .out_sum  (y)
  );

endmodule
