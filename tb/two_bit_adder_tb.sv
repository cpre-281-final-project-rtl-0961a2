// two_bit_adder_tb: exhaustive check of the 2-bit ripple adder against
// integer addition, carry out included.
module two_bit_adder_tb;
  logic [1:0] x, y, s;
  logic c_in, c_out;
  int checks = 0, failures = 0;
  two_bit_adder dut (.x, .y, .c_in, .s, .c_out);
  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      {c_in, y, x} = 5'(v);
      #1;
      total = int'(x) + int'(y) + int'(c_in);
      checks++;
      if ({c_out, s} !== 3'(total)) begin failures++; $display("FAIL x=%0d y=%0d c=%0d got %0d", x, y, c_in, {c_out, s}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
