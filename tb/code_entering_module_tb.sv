// code_entering_module_tb: types random four-digit codes with random hold
// and gap times, plus extra presses after the fourth digit, and checks:
//   - the digit is offered (load_data, write_enable) in the clock cycle
//     after the first clock edge that sees the press, for exactly one cycle;
//   - digits land at addresses 0,1,2,3 in order (captured here the way a
//     register file would capture them);
//   - display enables follow the number of digits, and all go dark and
//     transition_signal rises after the fourth digit;
//   - presses after the fourth write nothing; the clear restarts at address 0.
module code_entering_module_tb;
  logic clk = 0, clr = 1;
  logic [3:0] button_n = 4'hF;
  logic button_pressed, transition, we;
  logic [2:0] en7;
  logic [1:0] load_data, wa;
  logic [1:0] captured [4];
  int checks = 0, failures = 0, writes = 0, pulses = 0, blocked = 0;

  code_entering_module dut (.clk, .async_clr(clr), .button_n, .button_pressed,
    .transition_signal(transition), .en7, .load_data, .write_address(wa), .write_enable(we));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (we) begin captured[wa] <= load_data; writes++; end
    if (button_pressed) pulses++;
    if (button_pressed && !we) blocked++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // press button k, hold, release; check the one-cycle write offer
  task automatic press(int k, bit expect_write);
    button_n = ~(4'b1 << k);
    @(negedge clk);                       // edge 1 has sampled the press
    check(button_pressed === 1'b1, "press pulse");
    check(we === expect_write, "write enable on press");
    check(load_data === 2'(k), "load data");
    repeat (1 + $urandom % 4) @(negedge clk);
    check(we === 1'b0, "write enable one cycle only");
    button_n = 4'hF;
    repeat (2 + $urandom % 3) @(negedge clk);
  endtask

  initial begin
    foreach (captured[i]) captured[i] = 0;
    repeat (4) @(negedge clk);
    clr = 0;
    for (int round = 0; round < 20; round++) begin
      int digits [4];
      int w0;
      w0 = writes;
      check(wa === 2'd0 && transition === 1'b0 && en7 === 3'b000, "starts empty");
      for (int d = 0; d < 4; d++) begin
        digits[d] = $urandom % 4;
        press(digits[d], 1'b1);
        if (d < 3) begin
          check(wa === 2'(d + 1), $sformatf("address after digit %0d", d));
          check(en7 === 3'((1 << (d + 1)) - 1), $sformatf("display enables after digit %0d", d));
          check(transition === 1'b0, "no transition yet");
        end
      end
      check(transition === 1'b1, "transition after four digits");
      check(en7 === 3'b000, "displays dark when full");
      for (int d = 0; d < 4; d++) check(captured[d] === 2'(digits[d]), $sformatf("digit %0d stored", d));
      press($urandom % 4, 1'b0);          // ignored: counter full
      check(writes - w0 == 4, "exactly four writes");
      // clear, sometimes in the middle of a code
      if (round % 3 == 0) begin
        clr = 1; @(negedge clk); clr = 0;
        press(1, 1'b1);
        check(wa === 2'd1, "partial code");
      end
      clr = 1; @(negedge clk); clr = 0;
      @(negedge clk);
    end
    check(blocked == 20, "presses blocked while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
