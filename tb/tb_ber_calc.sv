// tb_ber_calc: self-checking test of ber_calc (payload bit-error counter).
// Sends payload words equal to the testbench's own PRBS-15 payload model
// with bit errors injected at random positions, non-payload words in
// between (garbage, must not be counted), and a restart of the pattern
// (pay_start) for a second frame. Checks the bit and error counts, and that
// each word reaches the counters exactly 3 + log2(P) = 6 cycles after it
// is presented; then clear must zero the counters and discard words in
// flight.
module tb_ber_calc;
  import tb_pam4_model_pkg::*;
  localparam int P = 8;
  localparam int LAT = 3 + $clog2(P);

  logic clk = 0, rst_n = 0, clear = 0;
  always #1 clk = ~clk;

  logic in_valid = 0, in_payload = 0, pay_start = 0;
  logic [2*P-1:0] bits = '0;
  logic [47:0] bit_cnt, err_cnt;

  ber_calc #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_bits = 0, exp_errs = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic send_frame(int nwords, int nerr_words);
    int st;
    st = SEED_PAY;
    for (int w = 0; w < nwords; w++) begin
      logic [2*P-1:0] ref_w, flip;
      for (int k = 0; k < P; k++) ref_w[2*k +: 2] = 2'(prbs_pair(st));
      flip = '0;
      if (w < nerr_words) begin
        int nb;
        nb = $urandom_range(1, 3);
        for (int b = 0; b < nb; b++) flip[$urandom_range(2*P-1)] = 1'b1;
      end
      bits = ref_w ^ flip;
      in_valid = 1; in_payload = 1; pay_start = (w == 0);
      exp_bits += 2 * P;
      exp_errs += $countones(flip);
      @(negedge clk);
    end
    // non-payload words: not counted
    for (int w = 0; w < 5; w++) begin
      bits = 16'($urandom); in_payload = 0; pay_start = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    // latency: one error word alone
    begin
      int st;
      st = SEED_PAY;
      for (int k = 0; k < P; k++) bits[2*k +: 2] = 2'(prbs_pair(st));
      bits[3] = ~bits[3];
      in_valid = 1; in_payload = 1; pay_start = 1;
      @(negedge clk);
      in_payload = 0; pay_start = 0;
      for (int c = 1; c <= LAT + 2; c++) begin
        if (c < LAT) chk(bit_cnt == 0, $sformatf("not counted before %0d cycles", LAT));
        if (c == LAT) chk(bit_cnt == 16 && err_cnt == 1, $sformatf("counted after %0d cycles", LAT));
        @(negedge clk);
      end
      exp_bits = 16; exp_errs = 1;
    end
    send_frame(200, 40);
    send_frame(150, 150);
    in_valid = 0;
    repeat (LAT + 2) @(negedge clk);
    chk(bit_cnt == 48'(exp_bits), $sformatf("bits %0d exp %0d", bit_cnt, exp_bits));
    chk(err_cnt == 48'(exp_errs), $sformatf("errors %0d exp %0d", err_cnt, exp_errs));
    // clear with words in flight
    in_valid = 1; in_payload = 1; bits = '1;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0; in_payload = 0;
    repeat (LAT + 3) @(negedge clk);
    chk(bit_cnt == 0 && err_cnt == 0, "clear zeroes and flushes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
