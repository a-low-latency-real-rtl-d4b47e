// tb_pam4_model_pkg: behavioural transmitter / channel / ADC model used by
// the receiver testbenches. Written independently of the RTL package: its
// own PRBS-15 (x^15 + x^14 + 1), Gray map and level table, so that a
// mistake shared with the RTL would have to be made twice.
//   - sequences: header, training and payload, two PRBS bits per symbol,
//     first bit as MSB; seeds as in the receiver specification (header
//     15'h1ACE, training 15'h2B3D, payload 15'h7FFF);
//   - Gray map: bits 00, 01, 11, 10 -> symbol 0..3 -> level -1, -1/3, +1/3, +1;
//   - channel: 4-tap T-spaced ISI (one pre-cursor, two post-cursors) plus
//     uniform noise, quantised by a 10-bit offset-binary ADC.
package tb_pam4_model_pkg;

  localparam int SEED_HDR = 'h1ACE;
  localparam int SEED_TS  = 'h2B3D;
  localparam int SEED_PAY = 'h7FFF;

  // ADC scaling: code = 512 + round(ADC_SCALE * r)
  localparam real ADC_SCALE = 300.0;

  // one PRBS step on an int state; returns the new bit
  function automatic int prbs_bit(ref int st);
    int b;
    b  = ((st >> 14) ^ (st >> 13)) & 1;
    st = ((st << 1) | b) & 'h7FFF;
    return b;
  endfunction

  // next two bits (first bit as MSB)
  function automatic int prbs_pair(ref int st);
    int hi, lo;
    hi = prbs_bit(st);
    lo = prbs_bit(st);
    return (hi << 1) | lo;
  endfunction

  function automatic int gray2sym(int b);
    case (b & 3)
      0: return 0;
      1: return 1;
      3: return 2;
      default: return 3;
    endcase
  endfunction

  function automatic real sym_level(int s);
    return (2.0 * s - 3.0) / 3.0;
  endfunction

  function automatic int adc_code(real r);
    int c;
    c = $rtoi(512.0 + ADC_SCALE * r + 1000.5) - 1000;
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    return c;
  endfunction

  // normalisation gain mapping ADC_SCALE codes to 1.0 = 8192 (Q8.8 gain)
  function automatic int gain_q8_8();
    return $rtoi(8192.0 * 256.0 / ADC_SCALE + 0.5);
  endfunction

  // uniform noise in [-a, a]
  function automatic real noise(real a);
    int u;
    u = $urandom_range(20000);
    return a * real'(u - 10000) / 10000.0;
  endfunction

endpackage
