// Full-size run of bist_verifier_top with every parameter at its default:
// one complete pseudorandom fault-grading run of C17 (22 patterns, 22
// faults) and one deterministic run (5 patterns). The pseudorandom result
// must reproduce the published grading of C17 with seed 1050420308: all 22
// faults detected, first detected by patterns 1..6 as 9, 2, 0, 4, 4, 3 and by
// none later. The deterministic set must also detect all 22 faults.
module tb_bist_verifier_full;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, det_mode = 0;
  logic busy, done;
  logic [7:0] detected_total, fault_total, cnt_rd_data;
  logic [PAT_W-1:0] patterns_used, cnt_rd_addr = 0;
  logic [4:0] log_rd_addr = 0, log_count;
  fault_rec_t log_rd_data;
  logic [1:0] mut_response;
  always #5 clk = ~clk;

  bist_verifier_top dut (.*);

  localparam int PUBLISHED [22] = '{9, 2, 0, 4, 4, 3, 0, 0, 0, 0, 0,
                                    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bit mode);
    @(negedge clk); det_mode = mode; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(1'b0);
    chk(patterns_used == 8'd22, "22 patterns");
    chk(detected_total == 8'd22 && fault_total == 8'd22, "coverage 22/22");
    for (int p = 0; p < 22; p++) begin
      cnt_rd_addr = PAT_W'(p); #1;
      chk(int'(cnt_rd_data) == PUBLISHED[p], $sformatf("test %0d: %0d faults detected, published %0d", p + 1, cnt_rd_data, PUBLISHED[p]));
    end
    run(1'b1);
    chk(patterns_used == 8'd5, "5 deterministic patterns");
    chk(detected_total == 8'd22 && fault_total == 8'd22 && log_count == 5'd22, "deterministic coverage 22/22");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
