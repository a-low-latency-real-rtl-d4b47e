// p_sync: parallel symbol synchronisation by header correlation.
//
// The transmitted frame starts with an S-symbol PAM-4 synchronisation
// header. For each of the P lanes this block correlates S consecutive
// samples of the re-allocated window against the known header,
//   corr_k = sum_{j=0}^{S-1} h_j * win[k + j],   h_j in {-3, -1, +1, +3},
// so that all P candidate alignments of one clock cycle are tested at
// once (the deep-parallel form of the auto-correlation synchroniser; a
// serial version would need S cycles per alignment). The products are
// registered, summed in a pipelined adder tree of log2(S) levels, and a
// peak detector registers the result: if any lane exceeds `threshold`, the
// lane with the largest correlation is reported with a one-cycle `det`
// pulse. det_lane = k means the header's first symbol is win[k] of the
// window seen sync_latency(S) = 2 + log2(S) cycles before the pulse.
// Header weights come from pam4_rx_pkg::hdr_weight (a PRBS-15 segment).
// The document gives the correlation principle, the parallel structure and
// the 1 + log2(S) processing latency; the threshold/arg-max peak rule and
// the header sequence are this design's choice.
module p_sync
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned S = 128,
  parameter int unsigned N = 4,
  localparam int unsigned W      = P + S + N - 2,
  localparam int unsigned PROD_W = DATA_W + 3,
  localparam int unsigned CORR_W = PROD_W + $clog2(S),
  localparam int unsigned LANE_W = (P > 1) ? $clog2(P) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  sample_t                  win [W],
  input  logic signed [CORR_W-1:0] threshold,
  output logic                     det,
  output logic [LANE_W-1:0]        det_lane,
  output logic signed [CORR_W-1:0] det_corr
);

  // header weights, fixed at elaboration
  logic signed [2:0] hw [S];
  for (genvar j = 0; j < S; j++) begin : g_hw
    assign hw[j] = hdr_weight(j);
  end

  logic signed [CORR_W-1:0] corr   [P];
  logic                     corr_v [P];

  for (genvar k = 0; k < P; k++) begin : g_lane
    logic signed [PROD_W-1:0] prod [S];
    logic                     prod_v;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        prod_v <= 1'b0;
        for (int unsigned j = 0; j < S; j++) prod[j] <= '0;
      end else begin
        prod_v <= in_valid;
        for (int unsigned j = 0; j < S; j++)
          prod[j] <= PROD_W'(win[k + j]) * PROD_W'(hw[j]);
      end
    end
    adder_tree #(.NUM(S), .IN_W(PROD_W)) u_tree (
      .clk, .rst_n,
      .in_valid (prod_v),
      .in_data  (prod),
      .out_valid(corr_v[k]),
      .out_sum  (corr[k])
    );
  end

  // peak detection over the P lanes of one cycle
  logic                     best_hit;
  logic [LANE_W-1:0]        best_lane;
  logic signed [CORR_W-1:0] best_corr;

  always_comb begin
    best_hit  = 1'b0;
    best_lane = '0;
    best_corr = threshold;
    for (int unsigned k = 0; k < P; k++) begin
      if (corr_v[k] && corr[k] > best_corr) begin
        best_hit  = 1'b1;
        best_lane = LANE_W'(k);
        best_corr = corr[k];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det      <= 1'b0;
      det_lane <= '0;
      det_corr <= '0;
    end else begin
      det      <= best_hit;
      det_lane <= best_lane;
      det_corr <= best_corr;
    end
  end

endmodule
