// tb_ot_event_builder: self-checking test of the per-event bank sequencer.
//
// Random events under random configurations: link and PP enables, per-link
// mode, forced RAW/error banks, trigger type 0x5, injected receiver and OTIS
// header errors, occupancies up to 100 %, random output back-pressure.  The
// output stream is compared word by word with the reference model, and
// o_sop/o_eop, o_ev_len and o_ev_id are checked.  Without back-pressure the
// event must leave in words + 2 + (enabled GOLs) cycles (capture, flag
// evaluation, one start cycle per GOL block).  Counts how often each bank
// combination and each trigger of the optional banks occurred.
module tb_ot_event_builder;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t                       cfg;
  logic                       ev_valid, ev_ready;
  link_frag_t   [N_LINKS-1:0] ev_links;
  link_status_t [N_LINKS-1:0] ev_stat;
  ttc_t                       ev_ttc;
  logic                       o_valid, o_sop, o_eop, o_ready, o_raw_bank, o_err_bank;
  logic [31:0]                o_data, o_ev_id;
  logic [15:0]                o_ev_len;

  ot_event_builder dut (.*);

  int checks = 0, failures = 0;
  int n_raw_forced = 0, n_raw_trig = 0, n_err_forced = 0, n_err_auto = 0, n_plain = 0;
  int n_hitmap = 0, n_zs = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_event(int iter, bit bp);
    link_frag_t lk[24];
    link_status_t st[24];
    wq_t exp;
    logic raw, errb;
    int n, cyc, ngol;
    int occ;
    bit with_err;
    occ = (iter % 5 == 0) ? $urandom_range(1000) : $urandom_range(150);
    with_err = ($urandom_range(3) == 0);
    cfg = default_cfg();
    cfg.pp_en      = (iter % 4 == 0) ? 4'($urandom) : 4'b0011;
    cfg.link_en    = (iter % 4 == 0) ? 24'($urandom) : 24'h0001FF;
    cfg.zs_mode    = 24'($urandom);
    cfg.force_raw  = ($urandom_range(5) == 0);
    cfg.force_info = ($urandom_range(5) == 0);
    cfg.datagen_en = 1'($urandom);
    ev_ttc = ttc_t'({$urandom, $urandom});
    if ($urandom_range(5) == 0) ev_ttc.trig_type = 3'h5;
    else if (ev_ttc.trig_type == 3'h5) ev_ttc.trig_type = 3'h1;
    for (int l = 0; l < 24; l++) begin
      lk[l] = rand_link(occ, ev_ttc, (with_err && $urandom_range(7) == 0) ? 5'(1 << $urandom_range(4)) : 5'b0);
      st[l] = with_err ? rand_stat(50) : '0;
      ev_links[l] = lk[l];
      ev_stat[l]  = st[l];
    end
    exp = event_words(cfg, lk, st, ev_ttc, raw, errb);
    ngol = 0;
    for (int l = 0; l < 24; l++) if (link_on(cfg, l)) begin
      ngol++;
      if (cfg.zs_mode[l]) n_zs++; else n_hitmap++;
    end
    if (cfg.force_raw) n_raw_forced++;
    else if (raw) n_raw_trig++;
    if (cfg.force_info) n_err_forced++;
    else if (errb) n_err_auto++;
    if (!raw && !errb) n_plain++;

    @(negedge clk);
    while (!ev_ready) @(negedge clk);
    ev_valid = 1;
    @(negedge clk);
    ev_valid = 0;
    for (int l = 0; l < N_LINKS; l++) ev_links[l] = '0;
    n = 0; cyc = 1;
    forever begin
      o_ready = bp ? 1'($urandom) : 1'b1;
      #1;
      cyc++;
      if (o_valid && o_ready) begin
        if (n < exp.size())
          check(o_data == exp[n], $sformatf("event %0d word %0d got %08x exp %08x", iter, n, o_data, exp[n]));
        check(o_sop == (n == 0), "o_sop");
        check(o_eop == (n == exp.size() - 1), $sformatf("event %0d o_eop at %0d of %0d", iter, n, exp.size()));
        if (n == 0) begin
          check(o_ev_len == 16'(4 * exp.size()), "o_ev_len");
          check(o_ev_id == ev_ttc.l0_evid, "o_ev_id");
          check(o_raw_bank == raw && o_err_bank == errb, "bank flags");
        end
        n++;
        if (o_eop || n > exp.size() + 4) begin
          @(negedge clk);
          break;
        end
      end
      @(negedge clk);
    end
    check(n == exp.size(), $sformatf("event %0d words %0d exp %0d", iter, n, exp.size()));
    if (!bp) check(cyc == exp.size() + 2 + ngol, $sformatf("event %0d cycles %0d exp %0d", iter, cyc, exp.size() + 2 + ngol));
  endtask

  initial begin
    ev_valid = 0; o_ready = 1; for (int l = 0; l < N_LINKS; l++) ev_links[l] = '0; ev_stat = '0; ev_ttc = '0; cfg = default_cfg();
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) run_event(i, i[0]);
    $display("raw forced %0d raw by trigger %0d err forced %0d err by error %0d plain %0d zs %0d hitmap %0d",
             n_raw_forced, n_raw_trig, n_err_forced, n_err_auto, n_plain, n_zs, n_hitmap);
    check(n_raw_forced > 0, "RAW bank forced by configuration");
    check(n_raw_trig > 0, "RAW bank requested by trigger type 0x5");
    check(n_err_forced > 0, "error bank forced by configuration");
    check(n_err_auto > 0, "error bank raised by an error");
    check(n_plain > 0, "processed bank alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
