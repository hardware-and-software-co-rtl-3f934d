// Self-checking test of dtpg: the five default C17 vectors appear in order,
// one per consume, valid drops after the last, restart starts over, and a
// pattern is held while next is low.
module tb_dtpg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, next = 0;
  logic [4:0] pattern;
  logic valid;
  always #5 clk = ~clk;

  dtpg dut (.clk, .rst_n, .restart, .next, .pattern, .valid);

  // Expected set, bits {N7,N6,N3,N2,N1}: N1..N7 = 00000 00001 00101 01010 10111.
  localparam logic [4:0] EXP [5] = '{5'b00000, 5'b10000, 5'b10100, 5'b01010, 5'b11101};

  task automatic chk(input logic [5:0] got, input logic [5:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 5; i++) begin
        #1;
        chk({valid, pattern}, {1'b1, EXP[i]}, $sformatf("vector %0d", i));
        @(posedge clk); #1;
        chk({valid, pattern}, {1'b1, EXP[i]}, "hold");
        next = 1; @(posedge clk); #1; next = 0;
      end
      chk({5'b0, valid}, 6'b0, "valid low after last");
      restart = 1; @(posedge clk); #1; restart = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
