// pam4_rx_pkg: types, constants and sequence generators shared by the
// deep-parallel PAM-4 receiver.
//
// Number formats (this design's choice; the receiver works at 16-bit
// internal precision and takes 10-bit ADC samples, as the reference
// implementation does):
//   sample_t : signed 16 bit, 13 fraction bits (1.0 = 8192). After
//              normalisation the four PAM-4 levels sit at -1, -1/3, +1/3, +1.
//   coef_t   : signed 16 bit, 14 fraction bits (1.0 = 16384).
//   sym_t    : 2-bit symbol index, 0..3 for the levels -1, -1/3, +1/3, +1.
//
// Bit mapping is Gray (00, 01, 11, 10 from the lowest level up).
// The header, training sequence and payload are taken from a PRBS-15
// generator (x^15 + x^14 + 1) started from different seeds, two bits per
// symbol, first bit as the MSB.
package pam4_rx_pkg;

  localparam int unsigned ADC_W     = 10;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned DATA_FRAC = 13;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 14;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [1:0]               sym_t;
  typedef logic [ADC_W-1:0]         adc_t;

  // PAM-4 levels and decision thresholds in sample_t units
  localparam sample_t LVL_P1  = 16'sd8192;   // +1
  localparam sample_t LVL_P13 = 16'sd2731;   // +1/3
  localparam sample_t LVL_N13 = -16'sd2731;  // -1/3
  localparam sample_t LVL_N1  = -16'sd8192;  // -1
  localparam sample_t THR_HI  = 16'sd5461;   // +2/3
  localparam sample_t THR_LO  = -16'sd5461;  // -2/3

  // PRBS seeds of the three sequences
  localparam logic [14:0] SEED_HDR = 15'h1ACE;
  localparam logic [14:0] SEED_TS  = 15'h2B3D;
  localparam logic [14:0] SEED_PAY = 15'h7FFF;

  // Advance PRBS-15 by one bit. Returns the new state; the produced bit is
  // the new state's LSB.
  function automatic logic [14:0] prbs15_step(input logic [14:0] s);
    return {s[13:0], s[14] ^ s[13]};
  endfunction

  // Symbol index -> level
  function automatic sample_t sym2level(input sym_t s);
    case (s)
      2'd0:    return LVL_N1;
      2'd1:    return LVL_N13;
      2'd2:    return LVL_P13;
      default: return LVL_P1;
    endcase
  endfunction

  // Hard decision (symbol recovery) on an equalised sample
  function automatic sym_t slice(input sample_t y);
    if (y >= THR_HI)      return 2'd3;
    else if (y >= 0)      return 2'd2;
    else if (y >= THR_LO) return 2'd1;
    else                  return 2'd0;
  endfunction

  // Gray bit pair -> symbol index, and back
  function automatic sym_t bits2sym(input logic [1:0] b);
    case (b)
      2'b00:   return 2'd0;
      2'b01:   return 2'd1;
      2'b11:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  function automatic logic [1:0] sym2bits(input sym_t s);
    case (s)
      2'd0:    return 2'b00;
      2'd1:    return 2'b01;
      2'd2:    return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  // Symbol j of the PRBS sequence started at seed (two bits per symbol)
  function automatic sym_t prbs_sym(input logic [14:0] seed, input int unsigned j);
    logic [14:0] s;
    logic [1:0]  b;
    s = seed;
    for (int unsigned k = 0; k <= j; k++) begin
      s    = prbs15_step(s);
      b[1] = s[0];
      s    = prbs15_step(s);
      b[0] = s[0];
    end
    return bits2sym(b);
  endfunction

  // Header symbol as the small integer weight used by the correlator:
  // -3, -1, +1, +3
  function automatic logic signed [2:0] hdr_weight(input int unsigned j);
    case (prbs_sym(SEED_HDR, j))
      2'd0:    return -3'sd3;
      2'd1:    return -3'sd1;
      2'd2:    return 3'sd1;
      default: return 3'sd3;
    endcase
  endfunction

  // Synchronisation pipeline latency: product register, log2(S) adder
  // levels, peak-detect register.
  function automatic int unsigned sync_latency(input int unsigned s);
    return 2 + $clog2(s);
  endfunction

endpackage
