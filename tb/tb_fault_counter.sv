// Self-checking test of fault_counter: random increments at random pattern
// indices against a model, checked through the read port and the total;
// clear zeroes all; a counter saturates at 255.
module tb_fault_counter;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, inc = 0;
  logic [PAT_W-1:0] idx = 0, rd_idx = 0;
  logic [7:0] rd_count, total;
  int model [MAX_PAT];
  int mtotal;
  always #5 clk = ~clk;

  fault_counter dut (.clk, .rst_n, .clear, .inc, .idx, .rd_idx, .rd_count, .total);

  task automatic check_all();
    for (int a = 0; a < MAX_PAT; a++) begin
      rd_idx = PAT_W'(a); #1;
      checks++;
      if (rd_count !== 8'(model[a])) begin
        failures++;
        $display("FAIL count[%0d]=%0d exp %0d", a, rd_count, model[a]);
      end
    end
    checks++;
    if (total !== 8'(mtotal)) begin failures++; $display("FAIL total %0d exp %0d", total, mtotal); end
  endtask

  initial begin
    for (int a = 0; a < MAX_PAT; a++) model[a] = 0;
    mtotal = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    check_all();
    for (int k = 0; k < 150; k++) begin
      int a;
      @(negedge clk);
      a = (k % 3 == 0) ? $urandom_range(4) : $urandom_range(MAX_PAT - 1);
      idx = PAT_W'(a);
      inc = ($urandom_range(3) != 0);
      if (inc) begin model[a]++; mtotal++; end
      @(posedge clk); #1; inc = 0;
    end
    check_all();
    @(negedge clk);
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int a = 0; a < MAX_PAT; a++) model[a] = 0;
    mtotal = 0;
    check_all();
    // saturation of one counter and of the total
    @(negedge clk);
    idx = 8'd7; inc = 1;
    repeat (300) @(posedge clk);
    #1; inc = 0;
    model[7] = 255; mtotal = 255;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
