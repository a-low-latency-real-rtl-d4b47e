// prbs_gen: parallel PRBS-15 generator, 2*P bits (P PAM-4 symbols) per
// clock.
//
// Generates x^15 + x^14 + 1 sequence bits, 2*P per word, in the order used
// by the transmitter: symbol k of the word has its first bit at
// word[2k+1] and its second at word[2k]. `word` is the word for the current
// state; `load` restarts the sequence so that the word shown in the same
// cycle is the first word after `seed`; `en` advances by one word. Used as
// the reference of the BER counter.
module prbs_gen
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [14:0]    seed,
  input  logic           en,
  output logic [2*P-1:0] word
);

  logic [14:0] state, cur, nxt;

  always_comb begin
    logic [14:0] s;
    cur = load ? seed : state;
    s   = cur;
    for (int unsigned k = 0; k < P; k++) begin
      s = prbs15_step(s);
      word[2*k+1] = s[0];
      s = prbs15_step(s);
      word[2*k]   = s[0];
    end
    nxt = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          state <= SEED_PAY;
    else if (load | en)  state <= nxt;
  end

endmodule
