// norm_ds: normalisation and down-sampling of the parallel ADC stream.
//
// The ADC interface delivers NIN = P*OSR samples per clock (32 at the
// reference operating point: 8 lanes after 4x down-sampling of a 5 GS/s
// stream carrying 1.25 GBd). This block keeps one sample per symbol and
// scales it into the receiver's 16-bit sample format, in three registered
// steps, matching the 3-cycle latency of this stage in the receiver's
// latency budget:
//   1. down-sampling: lane k takes input OSR*k + phase (phase is a run-time
//      choice of sampling instant within the symbol);
//   2. offset removal: the 10-bit offset-binary code minus `offset`;
//   3. gain: (code - offset) * gain >>> GAIN_FRAC, saturated to 16 bits.
// Input sample 0 is the oldest in time, NIN-1 the newest; the output keeps
// that order. The document names this stage "normalization & down-sampling"
// and gives its latency; the offset/gain form of the normalisation and the
// run-time phase select are this design's choice. The stream is assumed
// continuous once in_valid rises; in_valid only travels with the data.
module norm_ds
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P         = 8,
  parameter int unsigned OSR       = 4,
  parameter int unsigned GAIN_W    = 16,
  parameter int unsigned GAIN_FRAC = 8,
  localparam int unsigned NIN      = P * OSR,
  localparam int unsigned PH_W     = (OSR > 1) ? $clog2(OSR) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  adc_t              in_adc [NIN],
  input  logic [PH_W-1:0]   phase,
  input  adc_t              offset,
  input  logic [GAIN_W-1:0] gain,
  output logic              out_valid,
  output sample_t           out_x [P]
);

  localparam int unsigned PROD_W = ADC_W + 1 + GAIN_W + 1;
  localparam logic signed [PROD_W-1:0] SAT_MAX = PROD_W'(32767);
  localparam logic signed [PROD_W-1:0] SAT_MIN = -PROD_W'(32768);

  adc_t                     ds   [P];
  logic signed [ADC_W:0]    cen  [P];
  logic [2:0]               v;

  sample_t                  sat  [P];

  always_comb begin
    for (int unsigned k = 0; k < P; k++) begin
      logic signed [PROD_W-1:0] prod;
      prod = (PROD_W'(cen[k]) * $signed({1'b0, gain})) >>> GAIN_FRAC;
      if (prod > SAT_MAX)      sat[k] = 16'sh7FFF;
      else if (prod < SAT_MIN) sat[k] = 16'sh8000;
      else                     sat[k] = sample_t'(prod);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      for (int unsigned k = 0; k < P; k++) begin
        ds[k]    <= '0;
        cen[k]   <= '0;
        out_x[k] <= '0;
      end
    end else begin
      v <= {v[1:0], in_valid};
      for (int unsigned k = 0; k < P; k++) begin
        ds[k]    <= in_adc[OSR*k + 32'(phase)];
        cen[k]   <= $signed({1'b0, ds[k]}) - $signed({1'b0, offset});
        out_x[k] <= sat[k];
      end
    end
  end

  assign out_valid = v[2];

endmodule
