// tb_ot_event_info: self-checking test of the event information section
// (W1..W17) and the PP error flag.
//
// Random link fragments with injected OTIS header faults, random receiver
// flags, random link and PP enables, PP address, TTC data and flags.  Each
// case compares all 17 words, the error flag and the enabled-GOL count with
// the reference model, and counts how many cases had the PP in error and
// how many were clean, so both outcomes are covered.
module tb_ot_event_info;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  link_frag_t   [LINKS_PER_PP-1:0] links;
  link_status_t [LINKS_PER_PP-1:0] lstat;
  logic [LINKS_PER_PP-1:0]         link_en;
  logic                            pp_en;
  logic [1:0]                      pp_addr;
  ttc_t                            ttc;
  logic                            gen_error, datagen_en, raw_bank;
  logic [EVINFO_WORDS-1:0][31:0]   w;
  logic                            pp_error;
  logic [15:0]                     n_gols;

  ot_event_info dut (.*);

  int checks = 0, failures = 0, n_err = 0, n_ok = 0;

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
    link_frag_t lk[24];
    link_status_t st[24];
    cfg_t cfg;
    wq_t exp;
    logic pe;
    int ng, p;
    for (int iter = 0; iter < 400; iter++) begin
      bit clean;
      clean = (iter % 3 == 0);
      ttc = ttc_t'({$urandom, $urandom});
      p = $urandom_range(3);
      cfg = default_cfg();
      cfg.pp_en = 4'($urandom);
      cfg.link_en = 24'($urandom);
      cfg.datagen_en = 1'($urandom);
      for (int l = 0; l < 24; l++) begin
        lk[l] = rand_link($urandom_range(300), ttc, clean ? 5'b0 : (($urandom_range(9) == 0) ? 5'(1 << $urandom_range(4)) : 5'b0));
        st[l] = clean ? '0 : rand_stat(100);
      end
      for (int i = 0; i < 6; i++) begin
        links[i] = lk[6*p+i];
        lstat[i] = st[6*p+i];
      end
      link_en = cfg.link_en[6*p +: 6];
      pp_en = cfg.pp_en[p];
      pp_addr = 2'(p);
      gen_error = 1'($urandom);
      datagen_en = cfg.datagen_en;
      raw_bank = 1'($urandom);
      exp = evinfo(cfg, lk, st, ttc, p, gen_error, raw_bank, pe, ng);
      #1;
      for (int i = 0; i < 17; i++)
        check(w[i] === exp[i], $sformatf("iter %0d W%0d got %08x exp %08x", iter, i+1, w[i], exp[i]));
      check(pp_error === pe, $sformatf("iter %0d pp_error", iter));
      check(n_gols == 16'(ng), $sformatf("iter %0d n_gols", iter));
      if (pe) n_err++; else n_ok++;
    end
    check(n_err > 0 && n_ok > 0, "both error and clean cases seen");
    $display("cases in error %0d clean %0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
