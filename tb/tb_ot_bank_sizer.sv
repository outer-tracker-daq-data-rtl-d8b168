// tb_ot_bank_sizer: self-checking test of the bank length computation.
//
// Random fragments, link modes, link and PP enables, error-section lengths
// and bank selections; the expected lengths are counted from the reference
// model's words (GOL blocks, RAW blocks), not from a length formula.  Also
// reproduces the hitmap example of the format note: 9 links with hits in
// hitmap mode give a 49-word event body after the MEP headers, i.e. a
// processed bank of 2 + 1 + 9 + 36 = 48 words.
module tb_ot_bank_sizer;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  link_frag_t [N_LINKS-1:0] links;
  logic [N_LINKS-1:0]       link_en, zs_mode;
  logic [N_PP-1:0]          pp_en;
  logic [N_PP-1:0][4:0]     err_words;
  logic                     raw_bank, err_bank;
  logic [N_PP-1:0][15:0]    pp_proc_bytes;
  logic [15:0]              proc_len, raw_len, err_len, event_len;

  ot_bank_sizer dut (.*);

  int checks = 0, failures = 0;

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
    ttc_t t;
    int ppb[4];
    int pl, rl, el, evl;
    t = '0;
    for (int iter = 0; iter < 300; iter++) begin
      bit hm_example;
      hm_example = (iter == 0);
      pp_en   = hm_example ? 4'b0011 : 4'($urandom);
      zs_mode = hm_example ? '0 : 24'($urandom);
      raw_bank = hm_example ? 1'b0 : 1'($urandom);
      err_bank = hm_example ? 1'b0 : 1'($urandom);
      for (int l = 0; l < 24; l++) begin
        links[l]   = rand_link(hm_example ? 200 : $urandom_range(1000), t, 5'b0);
        link_en[l] = hm_example ? (l < 9) : ((pp_en[l/6]) & 1'($urandom));
      end
      for (int p = 0; p < 4; p++) err_words[p] = 5'($urandom_range(22, 7));
      pl = 12; rl = 8; el = 8;
      for (int p = 0; p < 4; p++) begin
        ppb[p] = 0;
        for (int i = 0; i < 6; i++)
          if (link_en[6*p+i]) ppb[p] += 4 * gol_block(links[6*p+i], zs_mode[6*p+i], 10'd0, 1'b1).size();
        pl += ppb[p];
        if (pp_en[p]) rl += 4 * 233;
        el += 4 * int'(err_words[p]);
      end
      evl = pl + (raw_bank ? rl : 0) + (err_bank ? el : 0);
      #1;
      for (int p = 0; p < 4; p++) check(pp_proc_bytes[p] == 16'(ppb[p]), $sformatf("pp %0d bytes", p));
      check(proc_len == 16'(pl), $sformatf("proc_len %0d exp %0d", proc_len, pl));
      check(raw_len == 16'(rl), "raw_len");
      check(err_len == 16'(el), "err_len");
      check(event_len == 16'(evl), "event_len");
      if (hm_example) check(proc_len == 16'(48 * 4), $sformatf("hitmap example %0d bytes", proc_len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
