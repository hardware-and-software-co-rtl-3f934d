// Self-checking test of c17_mut. A reference model of C17 written from its
// gate equations, with one net forced at a time, is compared with the module
// for all 32 input patterns, fault-free and with each of the 22 single
// stuck-at faults. Lines are numbered as in bist_pkg::c17_line_e.
module tb_c17_mut;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] pi;
  logic [1:0] sel [C17_N_LINES];
  logic [1:0] po;

  c17_mut dut (.pi, .sel, .po);

  // Reference: f_line < 0 means fault-free.
  function automatic logic [1:0] ref_c17(input logic [4:0] v, input int f_line, input bit f_val);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    n1 = (f_line == 0) ? f_val : v[0];
    n2 = (f_line == 1) ? f_val : v[1];
    n3 = (f_line == 2) ? f_val : v[2];
    n6 = (f_line == 3) ? f_val : v[3];
    n7 = (f_line == 4) ? f_val : v[4];
    n10 = (f_line == 7)  ? f_val : !(n1 && n3);
    n11 = (f_line == 8)  ? f_val : !(n3 && n6);
    n16 = (f_line == 9)  ? f_val : !(n2 && n11);
    n19 = (f_line == 10) ? f_val : !(n11 && n7);
    n22 = (f_line == 5)  ? f_val : !(n10 && n16);
    n23 = (f_line == 6)  ? f_val : !(n16 && n19);
    return {n23, n22};
  endfunction

  initial begin
    for (int f = -1; f < int'(C17_N_LINES); f++)
      for (int s = 0; s < 2; s++) begin
        if (f < 0 && s == 1) continue;
        for (int i = 0; i < C17_N_LINES; i++)
          sel[i] = (i == f) ? (s ? 2'b10 : 2'b01) : ((i % 2) ? 2'b11 : 2'b00);
        for (int v = 0; v < 32; v++) begin
          pi = 5'(v);
          #1;
          checks++;
          if (po !== ref_c17(pi, f, s[0])) begin
            failures++;
            $display("FAIL line=%0d sa%0d pi=%b po=%b exp %b", f, s, pi, po, ref_c17(pi, f, s[0]));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
