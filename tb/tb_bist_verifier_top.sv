// End-to-end test of bist_verifier_top.
// Two engines run side by side: dut at its default configuration (22
// pseudorandom patterns, 5 deterministic ones) and dut_short limited to 3
// pseudorandom patterns, so that some faults escape. The expected results
// are computed here independently: a reference pattern generator
// (((ran * 16807) mod 2^32) mod (2^31 - 1), 64-bit arithmetic), a reference
// C17 model with one forced net, and a reference fault-grading loop. The
// default pseudorandom run must also match the published C17 grading:
// 22 of 22 faults, first detected by patterns 1..6 as 9, 2, 0, 4, 4, 3.
// Checked: totals, every per-pattern counter, every log record, the cycle
// count of a run, and that each mechanism happened: fault-free pass,
// detection, escape, source switch (random / deterministic) and stop.
module tb_bist_verifier_top;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, det_mode = 0;
  always #5 clk = ~clk;

  // Outputs of the two engines.
  logic busy [2], done [2];
  logic [7:0] detected_total [2], fault_total [2], cnt_rd_data [2];
  logic [PAT_W-1:0] patterns_used [2];
  logic [PAT_W-1:0] cnt_rd_addr = 0;
  logic [4:0] log_rd_addr = 0, log_count [2];
  fault_rec_t log_rd_data [2];
  logic [1:0] mut_response [2];

  bist_verifier_top dut (
    .clk, .rst_n, .start, .stop, .det_mode, .busy(busy[0]), .done(done[0]),
    .detected_total(detected_total[0]), .fault_total(fault_total[0]),
    .patterns_used(patterns_used[0]), .cnt_rd_addr, .cnt_rd_data(cnt_rd_data[0]),
    .log_rd_addr, .log_rd_data(log_rd_data[0]), .log_count(log_count[0]),
    .mut_response(mut_response[0])
  );
  bist_verifier_top #(.N_PAT_RANDOM(3)) dut_short (
    .clk, .rst_n, .start, .stop, .det_mode, .busy(busy[1]), .done(done[1]),
    .detected_total(detected_total[1]), .fault_total(fault_total[1]),
    .patterns_used(patterns_used[1]), .cnt_rd_addr, .cnt_rd_data(cnt_rd_data[1]),
    .log_rd_addr, .log_rd_data(log_rd_data[1]), .log_count(log_count[1]),
    .mut_response(mut_response[1])
  );

  // ---------------- reference models ----------------
  function automatic logic [1:0] ref_c17(input logic [4:0] v, input int fl, input bit fv);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    n1 = (fl == 0) ? fv : v[0];
    n2 = (fl == 1) ? fv : v[1];
    n3 = (fl == 2) ? fv : v[2];
    n6 = (fl == 3) ? fv : v[3];
    n7 = (fl == 4) ? fv : v[4];
    n10 = (fl == 7)  ? fv : !(n1 && n3);
    n11 = (fl == 8)  ? fv : !(n3 && n6);
    n16 = (fl == 9)  ? fv : !(n2 && n11);
    n19 = (fl == 10) ? fv : !(n11 && n7);
    n22 = (fl == 5)  ? fv : !(n10 && n16);
    n23 = (fl == 6)  ? fv : !(n16 && n19);
    return {n23, n22};
  endfunction

  logic [4:0] pats [22];
  localparam logic [4:0] DETV [5] = '{5'b00000, 5'b10000, 5'b10100, 5'b01010, 5'b11101};
  localparam int PUBLISHED [6] = '{9, 2, 0, 4, 4, 3};

  int exp_cnt [22];
  int exp_line [22], exp_stuck [22], exp_idx [22];
  int exp_det, exp_cycles;

  // Reference grading, in the engine's fault order.
  task automatic grade(input bit mode, input int npat);
    exp_det = 0;
    exp_cycles = npat * (mode ? 1 : 6);  // start clock and fault-free pass, up to done
    for (int p = 0; p < 22; p++) exp_cnt[p] = 0;
    for (int l = 0; l < 11; l++)
      for (int s = 0; s < 2; s++) begin
        int found;
        found = -1;
        for (int p = 0; p < npat && found < 0; p++) begin
          logic [4:0] v;
          v = mode ? DETV[p] : pats[p];
          if (ref_c17(v, l, s[0]) != ref_c17(v, -1, 1'b0)) found = p;
        end
        exp_cycles += 1 + (mode ? 1 : 6) * ((found < 0) ? npat : found + 1);
        if (found >= 0) begin
          exp_cnt[found]++;
          exp_line[exp_det] = l; exp_stuck[exp_det] = s; exp_idx[exp_det] = found;
          exp_det++;
        end
      end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_golden = 0, n_detect = 0, n_escape = 0, n_switch = 0, n_stop = 0;
  always @(posedge clk) begin
    if (dut.sig_we) n_golden++;
    if (dut.det || dut_short.det) n_detect++;
    if (dut.undet || dut_short.undet) n_escape++;
  end

  // Run both engines, then check engine k against the reference.
  task automatic run_and_check(input bit mode, input int k, input int npat);
    int cyc;
    logic [4:0] v;
    @(negedge clk); det_mode = mode; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;   // the start clock
    while (!(done[0] && done[1]) && cyc < 100000) begin
      @(negedge clk);
      if (!done[k]) cyc++;
    end
    grade(mode, npat);
    chk(patterns_used[k] == PAT_W'(npat), "patterns used");
    chk(int'(detected_total[k]) == exp_det, $sformatf("engine %0d mode %0d detected %0d exp %0d", k, mode, detected_total[k], exp_det));
    chk(fault_total[k] == 8'd22, "faults graded");
    chk(int'(log_count[k]) == exp_det, "log entries");
    chk(cyc == exp_cycles, $sformatf("engine %0d mode %0d cycles %0d exp %0d", k, mode, cyc, exp_cycles));
    for (int p = 0; p < npat; p++) begin
      cnt_rd_addr = PAT_W'(p); #1;
      chk(int'(cnt_rd_data[k]) == exp_cnt[p], $sformatf("engine %0d mode %0d counter[%0d]=%0d exp %0d", k, mode, p, cnt_rd_data[k], exp_cnt[p]));
    end
    for (int e = 0; e < exp_det; e++) begin
      log_rd_addr = 5'(e); #1;
      v = mode ? DETV[exp_idx[e]] : pats[exp_idx[e]];
      chk(int'(log_rd_data[k].line) == exp_line[e] && int'(log_rd_data[k].stuck) == exp_stuck[e] &&
          int'(log_rd_data[k].pat_idx) == exp_idx[e] && log_rd_data[k].pattern == v &&
          log_rd_data[k].response == ref_c17(v, exp_line[e], exp_stuck[e][0]),
          $sformatf("engine %0d log record %0d", k, e));
    end
  endtask

  initial begin
    longint unsigned ran;
    ran = 64'd1050420308;
    for (int p = 0; p < 22; p++)
      for (int b = 0; b < 5; b++) begin
        ran = ((ran * 64'd16807) & 64'hFFFF_FFFF) % 64'd2147483647;
        pats[p][b] = ran[0];
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. pseudorandom source, full pattern count, and the published profile
    run_and_check(1'b0, 0, 22);
    for (int p = 0; p < 6; p++) begin
      cnt_rd_addr = PAT_W'(p); #1;
      chk(int'(cnt_rd_data[0]) == PUBLISHED[p], $sformatf("published counter %0d", p));
    end
    chk(detected_total[0] == 8'd22, "published coverage 100%");
    run_and_check(1'b0, 1, 3);          // escapes

    // 2. switch to the deterministic source
    run_and_check(1'b1, 0, 5);
    n_switch++;
    run_and_check(1'b1, 1, 5);

    // 3. back to pseudorandom: the result must repeat
    run_and_check(1'b0, 0, 22);
    n_switch++;

    // 4. stop in the middle of a run
    @(negedge clk); det_mode = 0; start = 1;
    @(negedge clk); start = 0;
    repeat (200) @(negedge clk);
    chk(busy[0] && busy[1], "busy mid-run");
    stop = 1; @(negedge clk); stop = 0;
    chk(!busy[0] && !done[0] && !busy[1] && !done[1], "stopped");
    n_stop++;
    chk(fault_total[0] < 8'd22, "stopped before the end");

    $display("mechanisms: golden_writes=%0d detections=%0d escapes=%0d switches=%0d stops=%0d",
             n_golden, n_detect, n_escape, n_switch, n_stop);
    chk(n_golden > 0, "fault-free pass happened");
    chk(n_detect > 0, "detection happened");
    chk(n_escape > 0, "escape happened");
    chk(n_switch > 0, "source switch happened");
    chk(n_stop > 0, "stop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
