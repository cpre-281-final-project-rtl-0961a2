// two_to_one_mux_tb: exhaustive check of the 1-bit 2-to-1 mux.
module two_to_one_mux_tb;
  logic s, x0, x1, z;
  int checks = 0, failures = 0;
  two_to_one_mux dut (.s, .x0, .x1, .z);
  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, x1, x0} = 3'(v);
      #1;
      checks++;
      if (z !== (s ? x1 : x0)) begin failures++; $display("FAIL v=%0d z=%b", v, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
