// tb_ot_mep_builder: self-checking test of MEP assembly.
//
// Feeds streams of synthetic events (random lengths from 3 to 3000 words,
// random data, L0 IDs counting up) with random input gaps and random output
// back-pressure, for several MEP factors including 1 and 32.  The expected
// MEPs are built independently: header {first L0 ID; total bytes incl. the
// 3-word header, event count; partition ID}, then per event the sub-header
// {event bytes, L0 ID[15:0]} and its words.  A MEP closes after `mep_factor`
// events, or earlier when the next event would take it beyond 16383 words
// (the largest length the 16-bit byte field can state); the test counts
// both kinds of closing and fails if either never happened.
module tb_ot_mep_builder;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0]  mep_factor;
  logic [31:0] partition_id;
  logic        i_valid, i_sop, i_eop, i_ready, m_valid, m_last, m_ready, m_early;
  logic [31:0] i_data, i_ev_id, m_data;
  logic [15:0] i_ev_len;

  ot_mep_builder dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_early = 0, n_early_pulse = 0;
  bit bp;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && m_early) n_early_pulse++;

  wq_t evs[$];
  logic [31:0] ids[$];
  wq_t meps[$];

  // Build the expected MEPs for the event list.
  task automatic model(int factor);
    int i = 0;
    while (i < evs.size()) begin
      wq_t m;
      int nev = 0, words = 3;
      logic [31:0] first = ids[i];
      m = {};
      while (i < evs.size() && nev < factor &&
             (nev == 0 || words + 1 + evs[i].size() <= 16383)) begin
        m.push_back({16'(4 * evs[i].size()), ids[i][15:0]});
        foreach (evs[i][j]) m.push_back(evs[i][j]);
        words += 1 + evs[i].size();
        nev++;
        i++;
      end
      if (nev == factor) n_full++; else if (i < evs.size()) n_early++;
      m.push_front(32'hEDED1D1D);
      m.push_front({16'(4 * words), 16'(nev)});
      m.push_front(first);
      meps.push_back(m);
    end
  endtask

  task automatic drive();
    foreach (evs[e]) begin
      for (int j = 0; j < evs[e].size(); j++) begin
        i_valid  = 1;
        i_sop    = (j == 0);
        i_eop    = (j == evs[e].size() - 1);
        i_data   = evs[e][j];
        i_ev_len = 16'(4 * evs[e].size());
        i_ev_id  = ids[e];
        @(posedge clk);
        while (!i_ready) @(posedge clk);
        #1;
        i_valid = 0;
        if ($urandom_range(7) == 0) @(posedge clk);
        #1;
      end
    end
  endtask

  task automatic collect(int n_meps);
    for (int m = 0; m < n_meps; m++) begin
      int n = 0;
      forever begin
        m_ready = bp ? 1'($urandom) : 1'b1;
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

  int factors[] = '{1, 3, 12, 32};

  initial begin
    logic [31:0] id;
    i_valid = 0; i_sop = 0; i_eop = 0; i_data = 0; i_ev_len = 0; i_ev_id = 0; m_ready = 1;
    partition_id = 32'hEDED1D1D;
    mep_factor = 1;
    id = 32'h1234_0000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (factors[f]) begin
      evs = {}; ids = {}; meps = {};
      mep_factor = 6'(factors[f]);
      bp = f[0];
      for (int e = 0; e < 2 * factors[f] + 3; e++) begin
        wq_t w;
        int len = (factors[f] == 32) ? $urandom_range(3000, 300) : $urandom_range(60, 3);
        for (int j = 0; j < len; j++) w.push_back($urandom);
        evs.push_back(w);
        ids.push_back(id);
        id++;
      end
      model(factors[f]);
      // the last MEP may be incomplete: drop it from the comparison
      if (meps.size() > 1) begin
        fork
          drive();
          collect(meps.size() - 1);
        join_any
        // let the driver finish the tail events into the open MEP
        wait fork;
      end
      // flush the open MEP by completing it
      repeat (5) @(posedge clk);
      rst_n = 0;
      @(posedge clk);
      rst_n = 1;
    end
    $display("MEPs closed full %0d early %0d (pulses %0d)", n_full, n_early, n_early_pulse);
    check(n_full > 0, "MEP closed at mep_factor");
    check(n_early > 0 && n_early_pulse > 0, "MEP closed early for buffer space");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
