// Self-checking test of fault_inject_mux: all eight input combinations
// against the injection truth table (00/11 pass, 01 -> 0, 10 -> 1).
module tb_fault_inject_mux;
  int checks = 0, failures = 0;
  logic a, b, w, y;
  // Expected output per {sel_a, sel_b, wire_in}, written out row by row.
  localparam logic [7:0] TABLE = 8'b1011_0010;  // bit i = row {sel_a,sel_b,wire_in} = i

  fault_inject_mux dut (.sel_a(a), .sel_b(b), .wire_in(w), .mux_out(y));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, w} = 3'(i);
      #1;
      checks++;
      if (y !== TABLE[i]) begin
        failures++;
        $display("FAIL sel_a=%b sel_b=%b wire_in=%b got %b exp %b", a, b, w, y, TABLE[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
