// enable_seven_segs_tb: exhaustive; display k is on when more than k digits
// are entered and the counter is not full.
module enable_seven_segs_tb;
  logic a0, a1, e, s0, s1, s2;
  int checks = 0, failures = 0;
  enable_seven_segs dut (.addr0(a0), .addr1(a1), .endstate(e), .seven0(s0), .seven1(s1), .seven2(s2));
  initial begin
    for (int v = 0; v < 8; v++) begin
      int n;
      logic [2:0] exp;
      {e, a1, a0} = 3'(v);
      n = 2 * a1 + a0;
      #1;
      for (int k = 0; k < 3; k++) exp[k] = !e && (n > k);
      checks++;
      if ({s2, s1, s0} !== exp) begin failures++; $display("FAIL v=%0d got %b exp %b", v, {s2, s1, s0}, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
