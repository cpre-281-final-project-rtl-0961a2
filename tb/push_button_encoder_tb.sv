// push_button_encoder_tb: each single pressed (low) button must give its
// index as the 2-bit code.
module push_button_encoder_tb;
  logic [3:0] button_n;
  logic [1:0] code;
  int checks = 0, failures = 0;
  push_button_encoder dut (.button_n, .code);
  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int k = 0; k < 4; k++) begin
        button_n = ~(4'b1 << k);
        #1;
        checks++;
        if (code !== 2'(k)) begin failures++; $display("FAIL button %0d code=%0d", k, code); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
