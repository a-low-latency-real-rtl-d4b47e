// demap: PAM-4 symbol de-mapping, P symbols per clock.
//
// Turns each recovered symbol index (0..3 for the levels -1, -1/3, +1/3,
// +1) into its two bits with the Gray map 00, 01, 11, 10 from the lowest
// level up, so that the most likely decision error (a neighbouring level)
// costs one bit. Lane k's bits are bits[2k+1] (first bit) and bits[2k].
// One register stage, the 1-cycle latency of this stage in the receiver's
// budget. The document names the stage; the Gray map is this design's
// choice.
module demap
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  sym_t           sym [P],
  output logic           out_valid,
  output logic [2*P-1:0] bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      for (int unsigned k = 0; k < P; k++) bits[2*k +: 2] <= sym2bits(sym[k]);
    end
  end

endmodule
