// ts_rom: training-sequence ROM of the adaptive equaliser.
//
// Holds the TS_LEN-symbol training sequence that follows the header of a
// frame, organised as TS_LEN/P words of P symbols so that all equaliser
// lanes get their reference symbol in the same cycle. Symbol i of the
// sequence is word i/P, lane i%P. Read is asynchronous (a distributed ROM),
// so the word appears in the cycle its address is presented.
// Contents: PRBS-15 (x^15 + x^14 + 1) from seed SEED_TS, two bits per
// symbol, first bit as MSB, Gray-mapped to a symbol index (see
// pam4_rx_pkg). The 8000-symbol length is the one used in the reference
// experiment; the sequence itself is this design's choice, and the ROM is
// filled at start-up by stepping the generator (ROM initialisation).
module ts_rom
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P      = 8,
  parameter int unsigned TS_LEN = 8000,
  localparam int unsigned WORDS  = (TS_LEN + P - 1) / P,
  localparam int unsigned ADDR_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic [ADDR_W-1:0] addr,
  output sym_t              sym [P]
);

  sym_t rom [WORDS][P];

  initial begin
    logic [14:0] s;
    logic [1:0]  b;
    s = SEED_TS;
    for (int unsigned w = 0; w < WORDS; w++) begin
      for (int unsigned k = 0; k < P; k++) begin
        s      = prbs15_step(s);
        b[1]   = s[0];
        s      = prbs15_step(s);
        b[0]   = s[0];
        rom[w][k] = bits2sym(b);
      end
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < P; k++)
      sym[k] = (32'(addr) < WORDS) ? rom[32'(addr) % WORDS][k] : 2'd0;
  end

endmodule
