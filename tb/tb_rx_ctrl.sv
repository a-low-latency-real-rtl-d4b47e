// tb_rx_ctrl: self-checking test of rx_ctrl (frame timing and reference
// selection) at small sizes: P = 8, S = 16, TS_LEN = 64 (8 words),
// FRAME_LEN = 256 (32 words), FIRST_WORD = 3, CONV_WORDS = 4.
// Run 1: err_ok held high -> decision mode after 4 training words.
// Run 2 (after clear): err_ok low -> forced switch at the last training
// word. Every cycle the outputs are compared with a reference model of the
// frame: word count, ROM address, use_ts, payload window, payload start and
// frame counter over three frames.
module tb_rx_ctrl;
  localparam int P = 8, S = 16, TS_LEN = 64, FRAME_LEN = 256;
  localparam int FIRST_WORD = 3, CONV_WORDS = 4;
  localparam int FW = FRAME_LEN / P, TW = TS_LEN / P, HW = S / P;

  logic clk = 0, rst_n = 0, clear = 0;
  always #1 clk = ~clk;

  logic locked = 0, first = 0, err_ok = 0;
  logic [2:0] ts_addr;
  logic use_ts, adapt, in_payload, pay_start, dd_mode;
  logic [15:0] frame_cnt;

  rx_ctrl #(.P(P), .S(S), .TS_LEN(TS_LEN), .FRAME_LEN(FRAME_LEN),
            .FIRST_WORD(FIRST_WORD), .CONV_WORDS(CONV_WORDS)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // one run: lock, then nwords words; conv: err_ok level
  task automatic run(bit conv, int switch_word);
    int wc, fr, ok_cnt;
    bit dd;
    wc = FIRST_WORD; fr = 0; dd = 0; ok_cnt = 0;
    @(negedge clk);
    locked = 1; first = 1; err_ok = conv;
    for (int t = 0; t < 3 * FW; t++) begin
      #0.5;
      chk(dd_mode == dd, $sformatf("t=%0d dd_mode %0d exp %0d", t, dd_mode, dd));
      chk(int'(ts_addr) == (wc % 8), $sformatf("t=%0d ts_addr", t));
      chk(use_ts == (fr == 0 && wc < TW && !dd), $sformatf("t=%0d use_ts %0d", t, use_ts));
      chk(adapt, "adapt while locked");
      chk(in_payload == (wc >= TW && wc < FW - HW), $sformatf("t=%0d in_payload", t));
      chk(pay_start == (wc == TW), $sformatf("t=%0d pay_start", t));
      chk(frame_cnt == 16'(fr), $sformatf("t=%0d frame_cnt %0d exp %0d", t, frame_cnt, fr));
      // model the next state
      if (!dd && fr == 0 && wc < TW) begin
        if (wc == switch_word) dd = 1;
      end
      @(negedge clk);
      first = 0;
      wc++;
      if (wc == FW) begin wc = 0; fr++; end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(negedge clk);
    #0.5;
    chk(!use_ts && !in_payload && !pay_start && !adapt && !dd_mode, "idle before lock");
    // run 1: converged from the start -> CONV_WORDS words with err_ok
    run(1, FIRST_WORD + CONV_WORDS - 1);
    @(negedge clk);
    clear = 1; locked = 0;
    @(negedge clk);
    clear = 0;
    #0.5;
    chk(!dd_mode && frame_cnt == 0 && !use_ts, "clear resets");
    // run 2: never converged -> switch on the last training word
    run(0, TW - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
