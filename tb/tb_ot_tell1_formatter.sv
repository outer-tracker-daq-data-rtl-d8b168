// tb_ot_tell1_formatter: end-to-end test of the TELL1 output formatter at
// its default size (24 links, 16384-word MEP buffer).
//
// Four phases, each a sequence of events whose expected MEPs come from the
// reference model (bank model, then MEP packing):
//   A  hitmap mode, 9 links, MEP factor 12, every link hit: each event
//      must take 49 words (1 sub-header + 48 bank words), i.e. 197 bytes per
//      event including a twelfth of the MEP header, as in the format note's
//      hitmap size estimate;
//   B  zero-suppress mode, 9 links, 11.6 % occupancy, MEP factor 12: the
//      average event size is reported against the note's 80-word budget;
//   C  error bank forced with errors on both enabled PP FPGAs;
//   D  random mix: per-link modes, disabled links and PP FPGAs, forced and
//      trigger-type RAW banks, automatic and forced error banks,
//      occupancies up to 100 %, MEP factor 32 so that MEPs also close early.
// The MEP output is back-pressured at random in phases B and D.  Every
// mechanism (each bank trigger, both GOL modes, hit-less and disabled
// links, disabled PPs, full and early MEP closing, output stalls) is
// counted, and one that never happened counts as a failure.
// The monitoring histograms are checked in every phase: the testbench notes
// which accepted events found the histogrammer free, and at the end of the
// phase reads back all 3072 hit counters (and, in phase D, all 24576
// drift-time bins) through the read port.
module tb_ot_tell1_formatter;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t                       cfg;
  logic                       ev_valid, ev_ready;
  link_frag_t   [N_LINKS-1:0] ev_links;
  link_status_t [N_LINKS-1:0] ev_stat;
  ttc_t                       ev_ttc;
  logic                       m_valid, m_last, m_ready;
  logic [31:0]                m_data;
  logic                       ev_raw_bank, ev_err_bank, mep_early_close;
  logic                       hist_clear, hist_busy;
  logic [14:0]                hist_addr;
  logic [15:0]                hist_rdata;
  logic [31:0]                hist_events, hist_skipped;

  ot_tell1_formatter dut (.*);

  int checks = 0, failures = 0;
  bit bp;

  // mechanism counters
  int c_zs = 0, c_hitmap = 0, c_nohit = 0, c_link_off = 0, c_pp_off = 0;
  int c_raw_cfg = 0, c_raw_trig = 0, c_err_cfg = 0, c_err_auto = 0, c_err_info = 0;
  int c_mep_full = 0, c_mep_early = 0, c_stall = 0;
  int c_hist_taken = 0, c_hist_skipped = 0, ph_taken = 0;
  int exp_hit[3072];
  int exp_dt[24576];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (mep_early_close) c_mep_early++;
    if (m_valid && !m_ready) c_stall++;
  end

  // One event's stimulus.
  typedef struct {
    cfg_t         cfg;
    link_frag_t   lk[24];
    link_status_t st[24];
    ttc_t         ttc;
  } ev_t;

  ev_t  evq[$];
  wq_t  ewords[$];
  logic [31:0] eids[$];

  function automatic void add_event(ev_t e);
    logic raw, errb;
    wq_t w;
    w = event_words(e.cfg, e.lk, e.st, e.ttc, raw, errb);
    evq.push_back(e);
    ewords.push_back(w);
    eids.push_back(e.ttc.l0_evid);
    for (int l = 0; l < 24; l++) begin
      if (!e.cfg.pp_en[l/6]) continue;
      if (!e.cfg.link_en[l]) begin c_link_off++; continue; end
      if (nhits_link(e.lk[l]) == 0) c_nohit++;
      else if (e.cfg.zs_mode[l]) c_zs++;
      else c_hitmap++;
    end
    for (int p = 0; p < 4; p++) if (!e.cfg.pp_en[p]) c_pp_off++;
    if (e.cfg.force_raw) c_raw_cfg++; else if (raw) c_raw_trig++;
    if (e.cfg.force_info) c_err_cfg++; else if (errb) c_err_auto++;
    // error sections with W4..W17 present (E2 = 0x0038...)
    if (errb) foreach (w[j]) if (w[j] == {16'h0038, 16'h8E00}) c_err_info++;
  endfunction

  task automatic drive();
    foreach (evq[e]) begin
      @(negedge clk);
      while (!ev_ready) @(negedge clk);
      cfg = evq[e].cfg;
      for (int l = 0; l < 24; l++) begin
        ev_links[l] = evq[e].lk[l];
        ev_stat[l]  = evq[e].st[l];
      end
      ev_ttc   = evq[e].ttc;
      ev_valid = 1;
      if (!hist_busy) begin
        c_hist_taken++;
        ph_taken++;
        for (int l = 0; l < 24; l++) begin
          if (!(evq[e].cfg.link_en[l] && evq[e].cfg.pp_en[l/6])) continue;
          for (int o = 0; o < 4; o++)
            for (int c = 0; c < 32; c++)
              if (evq[e].lk[l][o].hit[c]) begin
                exp_hit[l*128 + o*32 + c]++;
                exp_dt[(l*4 + o)*256 + int'(evq[e].lk[l][o].data[c])]++;
              end
        end
      end else c_hist_skipped++;
      @(negedge clk);
      ev_valid = 0;
    end
  endtask

  task automatic collect(wq_t meps[$], int n_meps);
    for (int m = 0; m < n_meps; m++) begin
      int n = 0;
      forever begin
        m_ready = bp ? ($urandom_range(3) != 0) : 1'b1;
        @(posedge clk);
        if (m_valid && m_ready) begin
          if (n < meps[m].size())
            check(m_data == meps[m][n], $sformatf("MEP %0d word %0d got %08x exp %08x", m, n, m_data, meps[m][n]));
          check(m_last == (n == meps[m].size() - 1), $sformatf("MEP %0d m_last at %0d", m, n));
          n++;
          if (m_last) break;
        end
        #1;
      end
      #1;
      check(n == meps[m].size(), $sformatf("MEP %0d size %0d exp %0d", m, n, meps[m].size()));
    end
  endtask

  // Compares the histograms with the expected counts of this phase.
  task automatic check_hist(string name, bit drift);
    int bad = 0, n = drift ? 3072 + 24576 : 3072;
    @(negedge clk);
    while (hist_busy) @(negedge clk);
    for (int a = 0; a < n; a++) begin
      int ex = (a < 3072) ? exp_hit[a] : exp_dt[a - 3072];
      hist_addr = (a < 3072) ? 15'(a) : 15'(4096 + a - 3072);
      @(negedge clk);
      if (hist_rdata != 16'(ex)) begin
        bad++;
        if (bad < 4) $display("  hist addr %0d got %0d exp %0d", hist_addr, hist_rdata, ex);
      end
    end
    check(bad == 0, $sformatf("phase %s: %0d histogram entries wrong", name, bad));
    check(hist_events == 32'(ph_taken), $sformatf("phase %s: histogrammed events %0d exp %0d", name, hist_events, ph_taken));
    $display("  histograms: %0d events entered", ph_taken);
    ph_taken = 0;
    foreach (exp_hit[i]) exp_hit[i] = 0;
    foreach (exp_dt[i]) exp_dt[i] = 0;
  endtask

  // Runs the queued events; returns the number of MEP words compared.
  task automatic run_phase(string name, int factor, output int words);
    wq_t meps[$];
    int n_early, n_cmp;
    // let the histograms finish clearing after reset
    @(negedge clk);
    while (hist_busy) @(negedge clk);
    mep_pack(ewords, eids, factor, 32'hEDED1D1D, meps, n_early);
    n_cmp = meps.size();
    // an incomplete last MEP stays in the buffer and is not compared
    if (meps[n_cmp-1][1][15:0] != 16'(factor)) n_cmp--;
    words = 0;
    for (int m = 0; m < n_cmp; m++) begin
      words += meps[m].size();
      if (meps[m][1][15:0] == 16'(factor)) c_mep_full++;
    end
    fork
      drive();
      collect(meps, n_cmp);
    join
    $display("phase %s: %0d events, %0d MEPs compared, %0d MEP words", name, evq.size(), n_cmp, words);
    check_hist(name, factor == 32);
    evq = {}; ewords = {}; eids = {};
    repeat (5) @(posedge clk);
    rst_n = 0;
    @(posedge clk);
    rst_n = 1;
  endtask

  function automatic ev_t make_event(cfg_t c, int occ, int err_pm, logic [31:0] id, bit force_trig5);
    ev_t e;
    e.cfg = c;
    e.ttc = ttc_t'({$urandom, $urandom});
    e.ttc.l0_evid = id;
    if (force_trig5) e.ttc.trig_type = 3'h5;
    else if (e.ttc.trig_type == 3'h5) e.ttc.trig_type = 3'h2;
    for (int l = 0; l < 24; l++) begin
      e.lk[l] = rand_link(occ, e.ttc, (err_pm > 0 && $urandom_range(999) < err_pm) ? 5'(1 << $urandom_range(4)) : 5'b0);
      e.st[l] = rand_stat(err_pm);
    end
    return e;
  endfunction

  initial begin
    cfg_t c;
    logic [31:0] id;
    int words;
    ev_valid = 0; m_ready = 1; hist_clear = 0; hist_addr = '0; for (int l = 0; l < N_LINKS; l++) ev_links[l] = '0; ev_stat = '0; ev_ttc = '0;
    cfg = default_cfg();
    id = 32'h0000_1000;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A: hitmap size estimate (9 links, MEP factor 12)
    c = default_cfg();
    c.zs_mode = '0;
    cfg = c;
    for (int i = 0; i < 24; i++) begin
      ev_t e;
      e = make_event(c, 300, 0, id++, 1'b0);
      for (int l = 0; l < 9; l++) if (nhits_link(e.lk[l]) == 0) e.lk[l][0].hit[0] = 1'b1;
      add_event(e);
    end
    bp = 0;
    run_phase("A hitmap", 12, words);
    check(words == 2 * (3 + 12 * 49), $sformatf("hitmap MEP words %0d exp %0d", words, 2 * (3 + 12 * 49)));
    $display("  hitmap: %0d bytes per event (MEP header shared by 12 events)", (4 * words) / 24);
    check((4 * words) / 24 == 197, "197 bytes per event in hitmap mode");

    // B: zero-suppress at 11.6 % occupancy
    c = default_cfg();
    cfg = c;
    for (int i = 0; i < 36; i++) add_event(make_event(c, 116, 0, id++, 1'b0));
    bp = 1;
    run_phase("B zero-suppress 11.6%", 12, words);
    $display("  zero-suppress: %0.2f words per event (budget 80)", real'(words) / 36.0);

    // C: error bank with errors on both enabled PP FPGAs
    c = default_cfg();
    c.force_info = 1'b1;
    cfg = c;
    for (int i = 0; i < 12; i++) begin
      ev_t e;
      e = make_event(c, 50, 0, id++, 1'b0);
      e.st[0].tlk_err = 1'b1;
      e.st[6].buf_empty = 1'b1;
      add_event(e);
    end
    bp = 0;
    run_phase("C error bank", 12, words);

    // D: random mix, MEP factor 32
    for (int i = 0; i < 80; i++) begin
      c = default_cfg();
      c.mep_factor = 6'd32;
      if (i % 3 == 0) begin
        c.pp_en   = 4'($urandom_range(15, 1));
        c.link_en = 24'($urandom);
      end else if (i % 3 == 1) begin
        c.pp_en   = 4'b1111;
        c.link_en = '1;
      end
      c.zs_mode    = 24'($urandom);
      c.force_raw  = (i % 3 == 1) || ($urandom_range(4) == 0);
      c.force_info = ($urandom_range(4) == 0);
      c.datagen_en = 1'($urandom);
      add_event(make_event(c, (i % 4 == 0) ? $urandom_range(1000) : $urandom_range(150),
                           (i % 2 == 0) ? 40 : 0, id++, $urandom_range(4) == 0));
    end
    cfg = c;
    bp = 1;
    run_phase("D mix", 32, words);

    $display("GOL blocks: zs %0d hitmap %0d no-hit %0d; links off %0d; PP off %0d",
             c_zs, c_hitmap, c_nohit, c_link_off, c_pp_off);
    $display("RAW banks: forced %0d trigger 0x5 %0d; error banks: forced %0d error %0d, sections with W4-W17 %0d",
             c_raw_cfg, c_raw_trig, c_err_cfg, c_err_auto, c_err_info);
    $display("MEPs: full %0d early %0d; output stall cycles %0d", c_mep_full, c_mep_early, c_stall);
    $display("histograms: events taken %0d, skipped while busy %0d", c_hist_taken, c_hist_skipped);
    check(c_zs > 0, "zero-suppressed GOL block");
    check(c_hitmap > 0, "hitmap GOL block");
    check(c_nohit > 0, "GOL block without hits");
    check(c_link_off > 0, "disabled link");
    check(c_pp_off > 0, "disabled PP FPGA");
    check(c_raw_cfg > 0, "RAW bank forced by configuration");
    check(c_raw_trig > 0, "RAW bank requested by trigger type 0x5");
    check(c_err_cfg > 0, "error bank forced by configuration");
    check(c_err_auto > 0, "error bank raised by an error");
    check(c_err_info > 0, "error section with event information");
    check(c_mep_full > 0, "MEP closed at the MEP factor");
    check(c_mep_early > 0, "MEP closed early for buffer space");
    check(c_stall > 0, "output back-pressure");
    check(c_hist_taken > 0, "event entered in the histograms");
    check(c_hist_skipped > 0, "event skipped by the busy histogrammer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
