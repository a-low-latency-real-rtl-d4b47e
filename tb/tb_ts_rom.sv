// tb_ts_rom: self-checking test of ts_rom (training-sequence ROM). Reads
// every word (in order, then at random addresses) and compares each symbol
// with the testbench's own PRBS-15 / Gray model of the 8000-symbol
// training sequence; the read is asynchronous, so data is checked in the
// cycle the address is presented.
module tb_ts_rom;
  import tb_pam4_model_pkg::*;
  localparam int P = 8, TS_LEN = 8000, WORDS = TS_LEN / P;

  logic [9:0] addr;
  logic [1:0] sym [P];

  ts_rom #(.P(P), .TS_LEN(TS_LEN)) dut (.*);

  int checks = 0, failures = 0;
  int ref_sym [TS_LEN];

  task automatic check_word(int a);
    addr = 10'(a);
    #1;
    for (int k = 0; k < P; k++) begin
      checks++;
      if (sym[k] != 2'(ref_sym[a * P + k])) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d lane %0d got %0d exp %0d", a, k, sym[k], ref_sym[a*P+k]);
      end
    end
  endtask

  initial begin
    int st;
    st = SEED_TS;
    for (int i = 0; i < TS_LEN; i++) ref_sym[i] = gray2sym(prbs_pair(st));
    #1;
    for (int a = 0; a < WORDS; a++) check_word(a);
    for (int r = 0; r < 200; r++) check_word($urandom_range(WORDS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
