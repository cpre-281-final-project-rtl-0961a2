// attempt_counter_tb: sends attempt pulses and checks that the limit
// indicator rises on exactly the fifth pulse, stays up on further pulses,
// and drops on reset; repeated with resets after fewer pulses.
module attempt_counter_tb;
  logic inc = 0, rst = 0, full;
  int checks = 0, failures = 0;
  attempt_counter dut (.inc_attempts(inc), .async_reset_attempts(rst), .hard_reset_indicator(full));

  task automatic pulse();
    #5 inc = 1; #5 inc = 0;
  endtask

  task automatic expect_full(logic e, string what);
    #1; checks++;
    if (full !== e) begin failures++; $display("FAIL %s: full=%b", what, full); end
  endtask

  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    #5 rst = 0;
    for (int round = 0; round < 4; round++) begin
      int stop = (round == 3) ? 4 : 7;
      for (int p = 1; p <= stop; p++) begin
        pulse();
        expect_full(p >= 5, $sformatf("round %0d pulse %0d", round, p));
      end
      #5 rst = 1;
      expect_full(0, "reset");
      #5 rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
