// two_to_four_decoder_tb: exhaustive check; expected output is 1 << address
// when enabled and 0 otherwise.
module two_to_four_decoder_tb;
  logic w0, w1, en;
  logic [3:0] y;
  int checks = 0, failures = 0;
  two_to_four_decoder dut (.w0, .w1, .en, .y);
  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [3:0] exp;
      {en, w1, w0} = 3'(v);
      #1;
      exp = en ? 4'(1 << (2 * w1 + w0)) : 4'b0;
      checks++;
      if (y !== exp) begin failures++; $display("FAIL v=%0d y=%b exp=%b", v, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
