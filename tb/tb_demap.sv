// tb_demap: self-checking test of demap (PAM-4 Gray de-mapping). Random
// symbol words; each lane's bit pair must follow the Gray table
// 0 -> 00, 1 -> 01, 2 -> 11, 3 -> 10 (lane k at bits [2k+1:2k]) one cycle
// after the input, and adjacent levels must always differ in one bit.
module tb_demap;
  localparam int P = 8;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [1:0] sym [P];
  logic [2*P-1:0] bits;

  demap #(.P(P)) dut (.*);

  int checks = 0, failures = 0;
  int gray [4] = '{0, 1, 3, 2};

  initial begin
    for (int k = 0; k < P; k++) sym[k] = 0;
    for (int s = 0; s < 3; s++) begin
      checks++;
      if ($countones(gray[s] ^ gray[s+1]) != 1) failures++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      int sv [P];
      for (int k = 0; k < P; k++) begin sv[k] = $urandom_range(3); sym[k] = 2'(sv[k]); end
      in_valid = (t % 5 != 2);
      @(negedge clk);
      checks++;
      if (out_valid != (t % 5 != 2)) failures++;
      for (int k = 0; k < P; k++) begin
        checks++;
        if (bits[2*k +: 2] != 2'(gray[sv[k]])) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d sym %0d bits %b", k, sv[k], bits[2*k +: 2]);
        end
      end
    end
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
