// reg_content_selector_tb: random codes on both inputs, both select values;
// the output must equal the selected code.
module reg_content_selector_tb;
  import door_lock_pkg::*;
  code_t d0, d1, q;
  logic s;
  int checks = 0, failures = 0;
  reg_content_selector dut (.set_data0(d0), .set_data1(d1), .s, .out_data(q));
  initial begin
    for (int i = 0; i < 1000; i++) begin
      d0 = 8'($urandom);
      d1 = 8'($urandom);
      s  = 1'(i);
      #1;
      checks++;
      if (q !== (s ? d1 : d0)) begin failures++; $display("FAIL s=%b d0=%h d1=%h q=%h", s, d0, d1, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
