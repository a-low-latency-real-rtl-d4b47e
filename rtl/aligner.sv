// aligner: frame-aligned equaliser window (the "P to P+N-1" re-allocation).
//
// After the synchroniser has found the header, every equaliser lane must
// see the samples of its own symbol. This block latches the lane offset of
// the first header detection and from then on selects, every cycle, P+N-1
// consecutive samples from the shared re-allocation window:
//   aw[j] = win[off + BASE + j],  BASE = CURSOR + S + 1 - N - P,
// so that lane k of the equaliser (using aw[k .. k+N-1]) produces the
// estimate of symbol k of the current data word, with the equaliser's main
// tap at position CURSOR (tap 1 in the reference set-up). The first data
// symbol after the header is symbol 0 of data word 0; because detection
// takes sync_latency(S) cycles, the first word this block outputs is data
// word sync_latency(S) - 1, flagged by `first`. The offset holds until
// `clear` (`lane` shows it). Timing: one register stage. The selection rule is derived from
// the re-allocation scheme of the reference design; the exact indexing is
// this design's.
module aligner
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P      = 8,
  parameter int unsigned S      = 128,
  parameter int unsigned N      = 4,
  parameter int unsigned CURSOR = 1,
  localparam int unsigned W      = P + S + N - 2,
  localparam int unsigned AW     = P + N - 1,
  localparam int unsigned LANE_W = (P > 1) ? $clog2(P) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  sample_t           win [W],
  input  logic              det,
  input  logic [LANE_W-1:0] det_lane,
  output logic              locked,
  output logic [LANE_W-1:0] lane,
  output logic              out_valid,
  output logic              first,
  output sample_t           aw [AW]
);

  localparam int unsigned BASE = CURSOR + S + 1 - N - P;

  logic [LANE_W-1:0] off;
  logic              lock_now;
  logic [LANE_W-1:0] off_now;

  assign lane     = off;
  assign lock_now = locked | det;
  assign off_now  = locked ? off : det_lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked    <= 1'b0;
      off       <= '0;
      out_valid <= 1'b0;
      first     <= 1'b0;
      for (int unsigned j = 0; j < AW; j++) aw[j] <= '0;
    end else if (clear) begin
      locked    <= 1'b0;
      out_valid <= 1'b0;
      first     <= 1'b0;
    end else begin
      locked    <= lock_now;
      off       <= off_now;
      out_valid <= lock_now;
      first     <= det & ~locked;
      for (int unsigned j = 0; j < AW; j++)
        aw[j] <= win[32'(off_now) + BASE + j];
    end
  end

endmodule
