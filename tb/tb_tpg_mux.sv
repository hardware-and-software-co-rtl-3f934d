// Self-checking test of tpg_mux with random inputs: the selected source's
// pattern and valid come out, and next reaches only the selected source.
module tb_tpg_mux;
  int checks = 0, failures = 0;
  logic det_sel, rnd_valid, det_valid, next, rnd_next, det_next, valid;
  logic [4:0] rnd_pattern, det_pattern, pattern;

  tpg_mux dut (.*);

  initial begin
    for (int i = 0; i < 200; i++) begin
      {det_sel, rnd_valid, det_valid, next} = 4'($urandom);
      rnd_pattern = 5'($urandom);
      det_pattern = 5'($urandom);
      #1;
      checks++;
      if (pattern !== (det_sel ? det_pattern : rnd_pattern) ||
          valid !== (det_sel ? det_valid : rnd_valid) ||
          rnd_next !== (next && !det_sel) || det_next !== (next && det_sel)) begin
        failures++;
        $display("FAIL sel=%b pat=%b valid=%b rn=%b dn=%b", det_sel, pattern, valid, rnd_next, det_next);
      end
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
