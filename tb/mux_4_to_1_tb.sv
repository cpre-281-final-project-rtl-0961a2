// mux_4_to_1_tb: exhaustive check of the 4-to-1 mux over all 64 input
// combinations against the index {s1,s0} of the data bits.
module mux_4_to_1_tb;
  logic s1, s0, d0, d1, d2, d3, sel;
  int checks = 0, failures = 0;
  mux_4_to_1 dut (.s1, .s0, .dat0(d0), .dat1(d1), .dat2(d2), .dat3(d3), .sel);
  initial begin
    for (int v = 0; v < 64; v++) begin
      logic exp;
      {s1, s0, d3, d2, d1, d0} = 6'(v);
      #1;
      case ({s1, s0}) 2'b00: exp = d0; 2'b01: exp = d1; 2'b10: exp = d2; default: exp = d3; endcase
      checks++;
      if (sel !== exp) begin failures++; $display("FAIL v=%0d sel=%b exp=%b", v, sel, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
