// tb_ot_gol_processor: self-checking test of the GOL data block builder.
//
// Sends random link fragments at occupancies from 0 % to 100 % in both
// zero-suppress and hitmap mode, with random output back-pressure, and
// compares every word and the o_last position with the reference model.
// Also checks the rate: without back-pressure a block of N words takes
// N cycles after the cycle that starts it.
module tb_ot_gol_processor;
  import ot_pkg::*;
  import ot_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, zs_mode, opt_ok, busy, o_valid, o_last, o_ready;
  link_frag_t  frag;
  logic [9:0]  gol_id;
  logic [31:0] o_data;

  ot_gol_processor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int occ, bit zs, bit bp);
    wq_t exp;
    ttc_t t;
    int n, cyc;
    t = '0;
    frag    = rand_link(occ, t, 5'($urandom));
    zs_mode = zs;
    gol_id  = 10'($urandom);
    opt_ok  = 1'($urandom);
    exp = gol_block(frag, zs_mode, gol_id, opt_ok);
    @(negedge clk);
    check(!busy, "idle before start");
    start = 1;
    @(negedge clk);
    start = 0;
    frag  = '0;          // the block must have captured its inputs
    n = 0; cyc = 0;
    forever begin
      o_ready = bp ? 1'($urandom) : 1'b1;
      #1;
      cyc++;
      if (o_valid && o_ready) begin
        check(n < exp.size(), "too many words");
        if (n < exp.size()) begin
          check(o_data == exp[n], $sformatf("word %0d: got %08x exp %08x", n, o_data, exp[n]));
          check(o_last == (n == exp.size() - 1), $sformatf("o_last at word %0d", n));
        end
        n++;
        if (o_last) begin
          @(negedge clk);
          break;
        end
      end
      @(negedge clk);
    end
    check(n == exp.size(), $sformatf("word count %0d exp %0d", n, exp.size()));
    if (!bp) check(cyc == exp.size(), $sformatf("cycles %0d exp %0d", cyc, exp.size()));
  endtask

  int occs[] = '{0, 5, 30, 116, 500, 1000};

  initial begin
    start = 0; o_ready = 1; frag = '0; zs_mode = 1; gol_id = 0; opt_ok = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (occs[i])
      for (int r = 0; r < 20; r++) begin
        run_block(occs[i], 1'b1, r[0]);
        run_block(occs[i], 1'b0, r[0]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
