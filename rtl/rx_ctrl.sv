// rx_ctrl: frame timing and reference selection of the receiver.
//
// A frame is FRAME_LEN symbols: an S-symbol synchronisation header, a
// TS_LEN-symbol training sequence, then payload; frames repeat (80000,
// 128 and 8000 symbols in the reference experiment). Once the aligner
// reports the first frame-aligned word (`first`, which is data word
// FIRST_WORD of the frame, because synchronisation takes that many cycles)
// this block counts data words, word 0 being the first training word, and
// for the word the aligner presents in the same cycle it gives:
//   ts_addr    training ROM address (the word count);
//   use_ts     reference = training symbol (else the decision). It is set
//              in the training part of the first frame until the equaliser
//              has converged: CONV_WORDS consecutive words with err_ok, or
//              the end of the training sequence. Then dd_mode is set and
//              stays set (one training sequence at start-up suffices);
//   adapt      coefficient update enable (whenever locked);
//   in_payload the word is payload; pay_start marks its first word;
//   frame_cnt  number of frames entered after lock.
// The document gives the rule "training first, switch to the decided
// symbols when the error is below a threshold"; the consecutive-word
// counter and the forced switch at the end of the sequence are this
// design's choice. FRAME_LEN, S and TS_LEN must be multiples of P.
// Outputs other than dd_mode and frame_cnt are combinational.
module rx_ctrl #(
  parameter int unsigned P          = 8,
  parameter int unsigned S          = 128,
  parameter int unsigned TS_LEN     = 8000,
  parameter int unsigned FRAME_LEN  = 80000,
  parameter int unsigned FIRST_WORD = 8,
  parameter int unsigned CONV_WORDS = 64,
  localparam int unsigned FRAME_WORDS = FRAME_LEN / P,
  localparam int unsigned TS_WORDS    = TS_LEN / P,
  localparam int unsigned HDR_WORDS   = S / P,
  localparam int unsigned WC_W        = $clog2(FRAME_WORDS + 1),
  localparam int unsigned TA_W        = (TS_WORDS > 1) ? $clog2(TS_WORDS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            locked,
  input  logic            first,
  input  logic            err_ok,
  output logic [TA_W-1:0] ts_addr,
  output logic            use_ts,
  output logic            adapt,
  output logic            in_payload,
  output logic            pay_start,
  output logic            dd_mode,
  output logic [15:0]     frame_cnt
);

  logic [WC_W-1:0] wc_reg, wc_now;
  logic            run;
  logic [15:0]     conv_cnt;
  logic            in_ts;

  assign wc_now     = first ? WC_W'(FIRST_WORD) : wc_reg;
  assign in_ts      = (run | first) && frame_cnt == 16'd0 && wc_now < WC_W'(TS_WORDS);
  assign use_ts     = in_ts & ~dd_mode;
  assign ts_addr    = TA_W'(wc_now);
  assign adapt      = locked & (run | first);
  assign in_payload = (run | first) && wc_now >= WC_W'(TS_WORDS)
                      && wc_now < WC_W'(FRAME_WORDS - HDR_WORDS);
  assign pay_start  = (run | first) && wc_now == WC_W'(TS_WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wc_reg    <= '0;
      run       <= 1'b0;
      conv_cnt  <= '0;
      dd_mode   <= 1'b0;
      frame_cnt <= '0;
    end else if (clear) begin
      wc_reg    <= '0;
      run       <= 1'b0;
      conv_cnt  <= '0;
      dd_mode   <= 1'b0;
      frame_cnt <= '0;
    end else if (run | first) begin
      run <= locked;
      if (wc_now == WC_W'(FRAME_WORDS - 1)) begin
        wc_reg    <= '0;
        frame_cnt <= frame_cnt + 16'd1;
      end else begin
        wc_reg <= wc_now + WC_W'(1);
      end
      if (!dd_mode && in_ts) begin
        conv_cnt <= err_ok ? conv_cnt + 16'd1 : '0;
        if ((err_ok && conv_cnt + 16'd1 >= 16'(CONV_WORDS))
            || wc_now == WC_W'(TS_WORDS - 1))
          dd_mode <= 1'b1;
      end
    end
  end

endmodule
