// tb_pfir: self-checking test of pfir (parallel N-tap FIR lane). A new
// random sample window and random coefficients every cycle (full 16-bit
// range, including the extremes); each output must equal
// sum_i c_i * xw[N-1-i] computed in the testbench and appear exactly
// 1 + log2(N) = 3 cycles after its inputs, one output per cycle.
module tb_pfir;
  localparam int N = 4;
  localparam int LAT = 1 + $clog2(N);
  localparam int SUM_W = 32 + $clog2(N);

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic signed [15:0] xw [N];
  logic signed [15:0] c [N];
  logic signed [SUM_W-1:0] y;

  pfir #(.N(N)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  longint exp_q [$];
  int cyc_q [$];

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && in_valid) cyc_q.push_back(cyc);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint e;
      int c0;
      e = exp_q.pop_front();
      c0 = cyc_q.pop_front();
      checks += 2;
      if (y != SUM_W'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d exp %0d", y, e);
      end
      if (cyc - c0 != LAT) begin
        failures++;
        $display("FAIL latency %0d", cyc - c0);
      end
    end
  end

  function automatic int rnd16(int t);
    case (t % 10)
      0: return 32767;
      1: return -32768;
      default: return int'($urandom_range(65535)) - 32768;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin xw[i] = 0; c[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 500; t++) begin
      int xv [N], cv [N];
      longint e;
      e = 0;
      for (int i = 0; i < N; i++) begin
        xv[i] = rnd16($urandom_range(99));
        cv[i] = rnd16($urandom_range(99));
      end
      for (int i = 0; i < N; i++) e += longint'(cv[i]) * xv[N-1-i];
      for (int i = 0; i < N; i++) begin xw[i] <= 16'(xv[i]); c[i] <= 16'(cv[i]); end
      exp_q.push_back(e);
      in_valid <= (t % 13 != 7) ? 1'b1 : 1'b0;
      if (t % 13 == 7) void'(exp_q.pop_back());
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL missing outputs");
    end
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
