// Self-checking test of ptpg. The expected bit stream is computed here with
// 64-bit arithmetic: ran <- ((ran * 16807) mod 2^32) mod (2^31 - 1), bit =
// ran mod 2. The first 22 C17 patterns are also checked against the
// published pattern list for seed 1050420308 (N1 N2 N3 N6 N7, first 11):
// 01110 00010 01110 00001 01010 10101 10000 00010 10101 10000 11110.
// Checks the N_IN-clock pattern time, the hold while next is low, restart,
// and a wider instance (36 inputs, the width of C432) for bit ordering.
module tb_ptpg;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, next = 0;
  logic [4:0]  pattern;
  logic        valid;
  logic [35:0] pattern36;
  logic        valid36;
  logic        next36 = 0;
  always #5 clk = ~clk;

  ptpg dut (.clk, .rst_n, .restart, .next, .pattern, .valid);
  ptpg #(.N_IN(36)) dut36 (.clk, .rst_n, .restart, .next(next36), .pattern(pattern36), .valid(valid36));

  longint unsigned ran;
  function automatic logic step();
    ran = ((ran * 64'd16807) & 64'hFFFF_FFFF) % 64'd2147483647;
    return ran[0];
  endfunction

  // Published patterns, written N1..N7 left to right.
  localparam logic [4:0] PUB [11] = '{5'b01110, 5'b00010, 5'b01110, 5'b00001, 5'b01010,
                                      5'b10101, 5'b10000, 5'b00010, 5'b10101, 5'b10000, 5'b11110};

  function automatic logic [4:0] rev5(input logic [4:0] x);
    return {x[0], x[1], x[2], x[3], x[4]};
  endfunction

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int cyc;
    logic [4:0] e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ran = 64'd1050420308;
    for (int p = 0; p < 22; p++) begin
      cyc = 0;
      while (!valid) begin @(posedge clk); #1; cyc++; end
      if (p == 0) expect_eq(cyc, 5, "cycles to first pattern");
      else        expect_eq(cyc, 5, "cycles per pattern");
      for (int b = 0; b < 5; b++) e[b] = step();
      expect_eq(pattern, e, $sformatf("pattern %0d", p));
      if (p < 11) expect_eq(pattern, rev5(PUB[p]), $sformatf("published pattern %0d", p));
      // hold while not consumed
      repeat (3) @(posedge clk);
      #1;
      expect_eq({valid, pattern}, {1'b1, e}, "hold");
      next = 1; @(posedge clk); #1; next = 0;
    end
    // restart returns to the seed
    restart = 1; @(posedge clk); #1; restart = 0;
    expect_eq(valid, 0, "valid cleared by restart");
    while (!valid) begin @(posedge clk); #1; end
    expect_eq(pattern, rev5(PUB[0]), "first pattern after restart");
    // 36-bit instance
    ran = 64'd1050420308;
    while (!valid36) begin @(posedge clk); #1; end
    for (int r = 0; r < 3; r++) begin
      logic [35:0] e36;
      while (!valid36) begin @(posedge clk); #1; end
      for (int b = 0; b < 36; b++) e36[b] = step();
      expect_eq(pattern36, e36, $sformatf("36-bit pattern %0d", r));
      next36 = 1; @(posedge clk); #1; next36 = 0;
    end
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
