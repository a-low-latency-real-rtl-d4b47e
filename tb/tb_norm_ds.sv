// tb_norm_ds: self-checking test of norm_ds (normalisation and 4x
// down-sampling). Random 10-bit ADC words, random sampling phase, offset
// and gain (including gains that saturate); every output lane is compared
// with (code[4k+phase] - offset) * gain / 256, floored and saturated to
// 16 bits, computed in the testbench, and must appear exactly 3 cycles
// after its input word.
module tb_norm_ds;
  localparam int P = 8, OSR = 4, NIN = P * OSR;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid = 0;
  logic [9:0]  in_adc [NIN];
  logic [1:0]  phase;
  logic [9:0]  offset;
  logic [15:0] gain;
  logic        out_valid;
  logic signed [15:0] out_x [P];

  norm_ds #(.P(P), .OSR(OSR)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int exp_q [$];   // P entries per word, lane 0 first
  int in_cyc_q [$];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic int model(int code, int off, int g);
    longint v;
    v = longint'(code - off) * g;
    v = (v >= 0) ? (v / 256) : -((-v + 255) / 256);   // floor division
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return int'(v);
  endfunction

  always @(posedge clk) if (rst_n && in_valid) in_cyc_q.push_back(cyc);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e [P];
      int c0;
      for (int k = 0; k < P; k++) e[k] = exp_q.pop_front();
      c0 = in_cyc_q.pop_front();
      checks++;
      if (cyc - c0 != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - c0);
      end
      for (int k = 0; k < P; k++) begin
        checks++;
        if (out_x[k] != 16'(e[k])) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d got %0d exp %0d", k, out_x[k], e[k]);
        end
      end
    end
  end

  initial begin
    phase = 0; offset = 512; gain = 256;
    for (int i = 0; i < NIN; i++) in_adc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blk = 0; blk < 40; blk++) begin
      // configuration is static during a burst and the pipeline drains
      phase  <= 2'($urandom_range(3));
      offset <= 10'($urandom_range(400, 620));
      gain   <= (blk % 5 == 4) ? 16'($urandom_range(20000, 65535)) : 16'($urandom_range(100, 8000));
      @(posedge clk);
      for (int w = 0; w < 20; w++) begin
        int e [P];
        int codes [NIN];
        for (int i = 0; i < NIN; i++) codes[i] = $urandom_range(1023);
        for (int i = 0; i < NIN; i++) in_adc[i] <= 10'(codes[i]);
        for (int k = 0; k < P; k++) e[k] = model(codes[OSR*k + int'(phase)], int'(offset), int'(gain));
        for (int k = 0; k < P; k++) exp_q.push_back(e[k]);
        in_valid <= 1;
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (5) @(posedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
