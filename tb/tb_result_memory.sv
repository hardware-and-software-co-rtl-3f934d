// Self-checking test of result_memory: random records are appended and read
// back in order; writes past the 22-entry depth are dropped; clear empties.
module tb_result_memory;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, we = 0;
  fault_rec_t wdata, rd_data;
  logic [4:0] rd_addr = 0, count;
  fault_rec_t model [22];
  always #5 clk = ~clk;

  result_memory dut (.clk, .rst_n, .clear, .we, .wdata, .rd_addr, .rd_data, .count);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(count, 0, "count after reset");
    for (int round = 0; round < 2; round++) begin
      int n;
      n = (round == 0) ? 25 : 9;
      for (int k = 0; k < n; k++) begin
        wdata = fault_rec_t'($urandom);
        if (k < 22) model[k] = wdata;
        we = 1; @(posedge clk); #1; we = 0;
        @(posedge clk); #1;
      end
      chk(count, (n > 22) ? 22 : n, "count");
      for (int k = 0; k < ((n > 22) ? 22 : n); k++) begin
        rd_addr = 5'(k); #1;
        chk(32'(rd_data), 32'(model[k]), $sformatf("record %0d", k));
      end
      clear = 1; @(posedge clk); #1; clear = 0;
      chk(count, 0, "count after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
