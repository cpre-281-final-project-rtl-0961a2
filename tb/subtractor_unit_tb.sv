// subtractor_unit_tb: every pair of 4-digit codes (65536 pairs); code_match
// must be 1 exactly when the codes are equal.
module subtractor_unit_tb;
  import door_lock_pkg::*;
  code_t entered, stored;
  logic code_match;
  int checks = 0, failures = 0, n_equal = 0;
  subtractor_unit dut (.entered, .stored, .code_match);
  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        entered = 8'(a);
        stored  = 8'(b);
        #1;
        checks++;
        if (code_match) n_equal++;
        if (code_match !== (a == b)) begin
          failures++;
          if (failures < 10) $display("FAIL entered=%h stored=%h match=%b", a, b, code_match);
        end
      end
    checks++;
    if (n_equal != 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
