// Self-checking test of ff_signature_table: fill all 199 entries with random
// responses, read every one back, overwrite some and read again; writes to
// out-of-range addresses are ignored and such reads return 0.
module tb_ff_signature_table;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [PAT_W-1:0] waddr = 0, raddr = 0;
  logic [1:0] wdata = 0, rdata;
  logic [1:0] model [MAX_PAT];
  always #5 clk = ~clk;

  ff_signature_table dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic write(input int a, input logic [1:0] d);
    we = 1; waddr = PAT_W'(a); wdata = d;
    @(posedge clk); #1; we = 0;
  endtask

  task automatic check_all();
    for (int a = 0; a < MAX_PAT; a++) begin
      raddr = PAT_W'(a); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %b exp %b", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < MAX_PAT; a++) begin
      model[a] = 2'($urandom);
      write(a, model[a]);
    end
    check_all();
    for (int k = 0; k < 50; k++) begin
      int a;
      a = $urandom_range(MAX_PAT - 1);
      model[a] = 2'($urandom);
      write(a, model[a]);
    end
    write(MAX_PAT, 2'b11);
    check_all();
    raddr = PAT_W'(MAX_PAT); #1;
    checks++;
    if (rdata !== 2'b00) begin failures++; $display("FAIL out-of-range read"); end
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
