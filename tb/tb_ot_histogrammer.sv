// tb_ot_histogrammer: self-checking test of the hit-map and drift-time
// histograms.  Random events (random occupancy, random link enables) are
// offered back to back, so some arrive while the histogrammer is busy and
// must be skipped; the testbench keeps its own counts of the events that
// were taken and compares every hit counter and every drift bin through the
// read port.  A clear pulse must bring all counters back to zero, and a
// counter driven past full scale must saturate (tested with a narrow CNT_W).
module tb_ot_histogrammer;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  localparam int N_HIT = 3072, N_DRIFT = 24576;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     sample, clear, busy, busy4;
  link_frag_t [N_LINKS-1:0] links;
  logic [N_LINKS-1:0]       link_en;
  logic [14:0]              rd_addr, rd_addr4;
  logic [15:0]              rd_data;
  logic [3:0]               rd_data4;
  logic [31:0]              n_events, n_skipped, n_events4, n_skipped4;

  ot_histogrammer dut (
    .clk, .rst_n, .sample, .links, .link_en, .clear, .busy,
    .rd_addr, .rd_data, .n_events, .n_skipped
  );

  // 4-bit counters to see saturation
  ot_histogrammer #(.CNT_W(4)) dut4 (
    .clk, .rst_n, .sample, .links, .link_en, .clear, .busy(busy4),
    .rd_addr(rd_addr4), .rd_data(rd_data4), .n_events(n_events4), .n_skipped(n_skipped4)
  );

  int checks = 0, failures = 0;
  int exp_hit[N_HIT];
  int exp_dt[N_DRIFT];
  int taken = 0, skipped = 0;

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

  task automatic read(input logic [14:0] a, output logic [15:0] d);
    @(negedge clk);
    rd_addr = a;
    @(negedge clk);
    d = rd_data;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy || busy4) @(negedge clk);
  endtask

  task automatic compare_all(string tag);
    logic [15:0] d;
    int bad = 0;
    for (int a = 0; a < N_HIT; a++) begin
      read(15'(a), d);
      if (d != 16'(exp_hit[a])) begin
        bad++;
        if (bad < 4) $display("  %s hit[%0d] got %0d exp %0d", tag, a, d, exp_hit[a]);
      end
    end
    check(bad == 0, $sformatf("%s: %0d hit counters wrong", tag, bad));
    bad = 0;
    for (int a = 0; a < N_DRIFT; a++) begin
      read(15'(4096 + a), d);
      if (d != 16'(exp_dt[a])) begin
        bad++;
        if (bad < 4) $display("  %s drift[%0d] got %0d exp %0d", tag, a, d, exp_dt[a]);
      end
    end
    check(bad == 0, $sformatf("%s: %0d drift bins wrong", tag, bad));
    read(15'(3072), d);
    check(d == 0, "unmapped address reads zero");
    read(15'h7FFF, d);
    check(d == 0, "address beyond the drift map reads zero");
  endtask

  initial begin
    ttc_t t;
    int total_hits;
    total_hits = 0;
    sample = 0; clear = 0; rd_addr = '0; rd_addr4 = '0; link_en = '0;
    for (int l = 0; l < N_LINKS; l++) links[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(busy, "clearing after reset");
    wait_idle();
    compare_all("after reset");

    // random events, offered every few cycles whether busy or not
    for (int e = 0; e < 60; e++) begin
      int occ;
      t = ttc_t'({$urandom, $urandom});
      occ = (e % 5 == 0) ? 1000 : $urandom_range(200);
      @(negedge clk);
      link_en = (e % 4 == 0) ? '1 : 24'($urandom);
      for (int l = 0; l < N_LINKS; l++) links[l] = rand_link(occ, t, 5'b0);
      sample = 1;
      if (!busy) begin
        taken++;
        for (int l = 0; l < N_LINKS; l++) begin
          if (!link_en[l]) continue;
          for (int o = 0; o < 4; o++)
            for (int c = 0; c < 32; c++)
              if (links[l][o].hit[c]) begin
                exp_hit[l*128 + o*32 + c]++;
                exp_dt[(l*4 + o)*256 + int'(links[l][o].data[c])]++;
                total_hits++;
              end
        end
      end else skipped++;
      @(negedge clk);
      sample = 0;
      repeat ($urandom_range(300)) @(negedge clk);
    end
    wait_idle();
    $display("events taken %0d skipped %0d, %0d hits entered", taken, skipped, total_hits);
    check(taken > 0 && skipped > 0, "both taken and skipped events");
    check(n_events == 32'(taken), $sformatf("n_events %0d exp %0d", n_events, taken));
    check(n_skipped == 32'(skipped), $sformatf("n_skipped %0d exp %0d", n_skipped, skipped));
    compare_all("after events");

    // saturation: 20 events with one hit, same channel and drift time;
    // the 4-bit copy must stop at 15
    begin
      logic [15:0] d16;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      wait_idle();
      foreach (exp_hit[i]) exp_hit[i] = 0;
      foreach (exp_dt[i]) exp_dt[i] = 0;
      for (int l = 0; l < N_LINKS; l++) links[l] = '0;
      links[5][3].hit[7]     = 1'b1;
      links[5][3].data[7]    = 8'h42;
      link_en = '1;
      for (int e = 0; e < 20; e++) begin
        wait_idle();
        sample = 1;
        @(negedge clk);
        sample = 0;
      end
      wait_idle();
      exp_hit[5*128 + 3*32 + 7] = 20;
      exp_dt[(5*4 + 3)*256 + 8'h42] = 20;
      read(15'(5*128 + 3*32 + 7), d16);
      check(d16 == 20, $sformatf("hit counter %0d exp 20", d16));
      rd_addr4 = 15'(5*128 + 3*32 + 7);
      @(negedge clk);
      @(negedge clk);
      check(rd_data4 == 4'd15, $sformatf("4-bit hit counter %0d, exp saturated 15", rd_data4));
      rd_addr4 = 15'(4096 + (5*4 + 3)*256 + 8'h42);
      @(negedge clk);
      @(negedge clk);
      check(rd_data4 == 4'd15, $sformatf("4-bit drift bin %0d, exp saturated 15", rd_data4));
      compare_all("repeated hit");
    end

    // clear
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(busy, "busy while clearing");
    wait_idle();
    foreach (exp_hit[i]) exp_hit[i] = 0;
    foreach (exp_dt[i]) exp_dt[i] = 0;
    compare_all("after clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
