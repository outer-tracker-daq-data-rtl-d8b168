// tb_ot_error_pp_formatter: self-checking test of the error-bank section of
// one PP FPGA.
//
// Covers the four section shapes (PP enabled with and without error, PP
// disabled; each with and without a RAW bank in the event): checks n_words
// against the 7/8/21/22-word lengths and every word against the reference
// model's W/E interleaving.
module tb_ot_error_pp_formatter;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  logic [EVINFO_WORDS-1:0][31:0] evinfo;
  logic        pp_en, pp_error, raw_bank;
  logic [15:0] proc_bytes;
  logic [4:0]  idx, n_words;
  logic [31:0] word;

  ot_error_pp_formatter dut (.*);

  int checks = 0, failures = 0;
  int seen[int];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wq_t info, exp;
    int len;
    for (int iter = 0; iter < 200; iter++) begin
      info = {};
      for (int i = 0; i < 17; i++) begin
        evinfo[i] = $urandom;
        info.push_back(evinfo[i]);
      end
      pp_en      = iter[0];
      pp_error   = iter[1];
      raw_bank   = iter[2];
      proc_bytes = 16'($urandom_range(2000)) * 16'd4;
      exp = err_pp(info, pp_en, pp_error, int'(proc_bytes), raw_bank);
      len = (pp_en && pp_error) ? 21 : 7;
      if (raw_bank) len++;
      #1;
      check(exp.size() == len, "model length");
      check(n_words == 5'(len), $sformatf("n_words %0d exp %0d", n_words, len));
      seen[len] = 1;
      for (int i = 0; i < len; i++) begin
        idx = 5'(i);
        #1;
        check(word === exp[i], $sformatf("case %0d word %0d got %08x exp %08x", iter, i, word, exp[i]));
      end
    end
    check(seen.num() == 4, "all four section lengths seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
