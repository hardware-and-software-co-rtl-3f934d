// Self-checking test of response_comparator over all response / expected /
// valid combinations.
module tb_response_comparator;
  int checks = 0, failures = 0;
  logic valid, mismatch;
  logic [1:0] response, expected, diff;

  response_comparator dut (.valid, .response, .expected, .diff, .mismatch);

  initial begin
    for (int i = 0; i < 32; i++) begin
      {valid, response, expected} = 5'(i);
      #1;
      checks++;
      if (mismatch !== (valid && (response != expected)) ||
          diff !== (valid ? (response ^ expected) : 2'b00)) begin
        failures++;
        $display("FAIL v=%b r=%b e=%b mismatch=%b diff=%b", valid, response, expected, mismatch, diff);
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
