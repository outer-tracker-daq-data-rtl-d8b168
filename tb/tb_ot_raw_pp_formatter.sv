// tb_ot_raw_pp_formatter: self-checking test of the RAW-bank word selector
// of one PP FPGA.
//
// For random fragments on the six links and random event-information words,
// walks idx over all 233 words and compares each with the reference model's
// RAW block (Fig. 7 byte arrangement, then W1..W17).  Also checks that the
// selector returns zero beyond the block.
module tb_ot_raw_pp_formatter;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  link_frag_t [LINKS_PER_PP-1:0] links;
  logic [EVINFO_WORDS-1:0][31:0] evinfo;
  logic [7:0]                    idx;
  logic [31:0]                   word;

  ot_raw_pp_formatter dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_frag_t lk[24];
    wq_t info, exp;
    ttc_t t;
    for (int iter = 0; iter < 20; iter++) begin
      t = ttc_t'({$urandom, $urandom});
      for (int l = 0; l < 24; l++) lk[l] = '0;
      for (int l = 0; l < 6; l++) begin
        lk[l] = rand_link($urandom_range(1000), t, 5'($urandom));
        links[l] = lk[l];
      end
      info = {};
      for (int i = 0; i < 17; i++) begin
        evinfo[i] = $urandom;
        info.push_back(evinfo[i]);
      end
      exp = raw_pp(lk, 0, info);
      if (exp.size() != 233) begin
        failures++;
        $display("FAIL: model size %0d", exp.size());
      end
      for (int i = 0; i < 240; i++) begin
        idx = 8'(i);
        #1;
        checks++;
        if (word !== ((i < 233) ? exp[i] : 32'h0)) begin
          failures++;
          if (failures < 10) $display("FAIL: idx %0d got %08x exp %08x", i, word, (i < 233) ? exp[i] : 32'h0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
