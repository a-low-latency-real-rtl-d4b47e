// realloc: data re-allocation, P parallel samples -> W consecutive samples.
//
// The core idea of the deep-parallel receiver: instead of writing the
// parallel stream into a large memory and reading it back serially, every
// lane of every downstream filter is handed all the consecutive samples it
// needs in the same clock cycle. This block keeps the last ceil(W/P) input
// words in a short register chain and presents the W most recent samples as
// one flat window, oldest first:
//   win[j] = x(m - (W - P) + j),  j = 0 .. W-1,
// where x(m) .. x(m+P-1) is the most recently registered input word
// (win[W-P .. W-1]). One window of W = P + S + N - 2 samples is shared by
// the symbol synchronisation (P + S - 1 samples per cycle) and the
// equaliser (P + N - 1 samples per cycle), as in the reference design,
// which uses a single re-allocation block for the whole receiver.
// Timing: one register stage; the window changes by one word per valid
// input. Before W samples have arrived the older part holds zeros (reset).
module realloc
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P = 8,
  parameter int unsigned S = 128,
  parameter int unsigned N = 4,
  localparam int unsigned W      = P + S + N - 2,
  localparam int unsigned DEPTH  = (W + P - 1) / P
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_x  [P],
  output logic    out_valid,
  output sample_t win   [W]
);

  // chain[0] is the newest word
  sample_t chain [DEPTH][P];
  logic    v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= 1'b0;
      for (int unsigned d = 0; d < DEPTH; d++)
        for (int unsigned k = 0; k < P; k++) chain[d][k] <= '0;
    end else begin
      v <= in_valid;
      if (in_valid) begin
        chain[0] <= in_x;
        for (int unsigned d = 1; d < DEPTH; d++) chain[d] <= chain[d-1];
      end
    end
  end

  // flatten: sample index t (0 = oldest of DEPTH*P) -> chain word/lane
  always_comb begin
    for (int unsigned j = 0; j < W; j++) begin
      win[j] = chain[(W - 1 - j) / P][P - 1 - ((W - 1 - j) % P)];
    end
  end

  assign out_valid = v;

endmodule
