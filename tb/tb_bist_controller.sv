// Self-checking test of bist_controller against a scripted environment.
// The test bench plays both the pattern source (valid stalls at random) and
// the comparator: for every fault (line, stuck) it holds a random index of
// the pattern that detects it, or none. It checks that the fault-free pass
// writes patterns 0..n-1 with no fault injected, that faults come in the
// order line 0 sa0, line 0 sa1, line 1 sa0, ..., that each fault stops at its
// detecting pattern (det) or after the last pattern (undet), that the source
// is restarted once per fault, the cycle count of a run without stalls, and
// that stop aborts a run.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int NL = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, det_mode = 0;
  logic [PAT_W-1:0] n_pat_rnd = 8'd22, n_pat_det = 8'd5;
  logic pat_valid = 0, mismatch;
  logic det_sel, tpg_restart, tpg_next, sig_we, inj_en, clear, det, undet, busy, done;
  logic [PAT_W-1:0] pat_idx;
  logic [LINE_W-1:0] line;
  stuck_e stuck;
  always #5 clk = ~clk;

  bist_controller dut (.*);

  int detect_at [NL][2];     // -1: never detected
  bit stalls;
  int restarts, n_det, n_undet, gold_writes, exp_fault;
  int exp_idx;

  // Scripted comparator.
  always_comb mismatch = inj_en && pat_valid && (detect_at[line][stuck] == int'(pat_idx));

  always @(negedge clk) pat_valid <= stalls ? ($urandom_range(2) != 0) : 1'b1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // Observe one run and compare with the script.
  task automatic run(input bit mode, input int npat, output int cycles);
    int f;
    restarts = 0; n_det = 0; n_undet = 0; gold_writes = 0; f = 0; cycles = 0;
    @(negedge clk); det_mode = mode; start = 1;
    @(negedge clk); start = 0;
    chk(det_sel == mode, "mode latched");
    while (!done) begin
      @(posedge clk);
      cycles++;
      if (tpg_restart) restarts++;
      if (sig_we) begin
        chk(!inj_en, "no fault while writing table");
        chk(int'(pat_idx) == gold_writes, "golden pattern order");
        gold_writes++;
      end
      if (det || undet) begin
        int l, s, d;
        l = f / 2; s = f % 2;
        d = detect_at[l][s];
        chk(int'(line) == l && int'(stuck) == s, $sformatf("fault order %0d", f));
        if (d >= 0 && d < npat) chk(det && int'(pat_idx) == d, $sformatf("fault %0d detected at %0d", f, d));
        else                    chk(undet && int'(pat_idx) == npat - 1, $sformatf("fault %0d escapes", f));
        if (det) n_det++; else n_undet++;
        f++;
      end
      if (cycles > 20000) break;
    end
    chk(gold_writes == npat, "golden pass length");
    chk(f == 2 * NL, "all faults graded");
    chk(restarts == 2 * NL, "one restart per fault");  // the start clock is not observed
  endtask

  initial begin
    int cyc, exp_cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      bit mode;
      int npat;
      mode = trial[0];
      npat = mode ? 5 : 22;
      stalls = (trial >= 2);
      exp_cyc = 1 + npat;          // golden pass (the start clock counted as 1)
      for (int l = 0; l < NL; l++)
        for (int s = 0; s < 2; s++) begin
          detect_at[l][s] = ($urandom_range(4) == 0) ? -1 : $urandom_range(npat - 1);
          exp_cyc += 1 + ((detect_at[l][s] < 0) ? npat : detect_at[l][s] + 1);
        end
      run(mode, npat, cyc);
      if (!stalls) chk(cyc == exp_cyc, $sformatf("cycle count %0d exp %0d", cyc, exp_cyc));
    end
    // stop aborts
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (30) @(negedge clk);
    chk(busy, "busy during run");
    stop = 1; @(negedge clk); stop = 0;
    chk(!busy && !done, "stop returns to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
