// full_adder_tb: exhaustive check of sum and carry against integer addition.
module full_adder_tb;
  logic xi, yi, ci, si, ci_1;
  int checks = 0, failures = 0;
  full_adder dut (.xi, .yi, .ci, .si, .ci_1);
  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {xi, yi, ci} = 3'(v);
      #1;
      total = int'(xi) + int'(yi) + int'(ci);
      checks++;
      if ({ci_1, si} !== 2'(total)) begin failures++; $display("FAIL v=%0d got %b%b", v, ci_1, si); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
