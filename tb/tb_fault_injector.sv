// Self-checking test of fault_injector: for every line and both stuck
// values exactly the addressed line gets the force code, all others pass;
// with en low every line passes.
module tb_fault_injector;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  logic [LINE_W-1:0] line;
  stuck_e stuck;
  logic [1:0] sel [C17_N_LINES];

  fault_injector dut (.en, .line, .stuck, .sel);

  task automatic check_all(input bit e, input int l, input bit s);
    for (int i = 0; i < C17_N_LINES; i++) begin
      logic [1:0] exp;
      exp = (e && i == l) ? (s ? 2'b10 : 2'b01) : 2'b00;
      checks++;
      if (sel[i] !== exp) begin
        failures++;
        $display("FAIL en=%0d line=%0d stuck=%0d sel[%0d]=%b exp %b", e, l, s, i, sel[i], exp);
      end
    end
  endtask

  initial begin
    for (int l = 0; l < C17_N_LINES; l++)
      for (int s = 0; s < 2; s++)
        for (int e = 0; e < 2; e++) begin
          en = e[0]; line = LINE_W'(l); stuck = stuck_e'(s[0]);
          #1;
          check_all(e[0], l, s[0]);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
