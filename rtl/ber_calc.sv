// ber_calc: bit-error counter of the receiver.
//
// Compares the de-mapped payload bits, 2*P per clock, with the known
// payload pattern (PRBS-15 from SEED_PAY, restarted at the first payload
// word of every frame, pay_start) and accumulates the number of compared
// bits and of bit errors; BER = err_cnt / bit_cnt. Only words flagged
// in_payload are counted. Pipeline: XOR register, per-lane error count
// register, a ceil(log2 P)-level adder tree over the lanes, then the
// accumulators: 3 + ceil(log2 P) cycles from a word to the counters, the
// latency this stage has in the receiver's budget. `clear` zeroes the
// counters and discards the words then in the pipeline. The document names the stage and gives its latency; the
// pattern and counter widths are this design's choice.
module ber_calc
  import pam4_rx_pkg::*;
#(
  parameter int unsigned P     = 8,
  parameter int unsigned CNT_W = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [2*P-1:0]   bits,
  input  logic             in_payload,
  input  logic             pay_start,
  output logic [CNT_W-1:0] bit_cnt,
  output logic [CNT_W-1:0] err_cnt
);

  localparam int unsigned LP = (P > 1) ? $clog2(P) : 0;

  logic [2*P-1:0] ref_w;
  logic           use_w;

  assign use_w = in_valid & in_payload;

  prbs_gen #(.P(P)) u_ref (
    .clk, .rst_n,
    .load(pay_start & in_valid),
    .seed(SEED_PAY),
    .en  (use_w),
    .word(ref_w)
  );

  logic [2*P-1:0]    xr;
  logic              xv;
  logic signed [2:0] lane_err [P];
  logic              lv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; xv <= 1'b0; lv <= 1'b0;
      for (int unsigned k = 0; k < P; k++) lane_err[k] <= '0;
    end else begin
      xr <= use_w ? (bits ^ ref_w) : '0;
      xv <= use_w;
      lv <= xv;
      for (int unsigned k = 0; k < P; k++)
        lane_err[k] <= 3'(xr[2*k]) + 3'(xr[2*k+1]);
    end
  end

  logic signed [2+LP:0] word_err;
  logic                 wv;

  adder_tree #(.NUM(P), .IN_W(3)) u_tree (
    .clk, .rst_n,
    .in_valid (lv),
    .in_data  (lane_err),
    .out_valid(wv),
    .out_sum  (word_err)
  );

  // after `clear`, words already inside the pipeline are not counted
  logic [$clog2(LP + 4)-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt <= '0;
      err_cnt <= '0;
      hold    <= '0;
    end else if (clear) begin
      bit_cnt <= '0;
      err_cnt <= '0;
      hold    <= ($clog2(LP + 4))'(LP + 2);
    end else if (hold != 0) begin
      hold <= hold - 1'b1;
    end else if (wv) begin
      bit_cnt <= bit_cnt + CNT_W'(2 * P);
      err_cnt <= err_cnt + CNT_W'(unsigned'(word_err));
    end
  end

endmodule
