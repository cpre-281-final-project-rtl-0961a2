// button_press_detection_logic_tb: random presses of random buttons, held
// for 1..6 clocks with random gaps. z must be high in the cycle after the
// first clock edge that sees a button down, and only then: one pulse per
// press however long it is held.
module button_press_detection_logic_tb;
  logic clk = 0;
  logic [3:0] button_n = 4'hF;
  logic z;
  int checks = 0, failures = 0, presses = 0, pulses = 0;
  logic seen_now = 0, seen_prev = 0;
  button_press_detection_logic dut (.clk, .button_n, .z);
  always #5 clk = ~clk;

  // reference: the tb's own record of what each clock edge sampled
  always @(posedge clk) begin
    seen_prev <= seen_now;
    seen_now  <= (button_n != 4'hF);
  end

  always @(negedge clk) if ($time > 30) begin
    checks++;
    if (z) pulses++;
    if (z !== (seen_now && !seen_prev)) begin failures++; $display("FAIL t=%0t z=%b", $time, z); end
  end

  initial begin
    repeat (3) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      button_n = ~(4'b1 << ($urandom % 4));
      presses++;
      repeat (1 + $urandom % 6) @(negedge clk);
      button_n = 4'hF;
      repeat (1 + $urandom % 4) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (pulses != presses) begin failures++; $display("FAIL pulses=%0d presses=%0d", pulses, presses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
