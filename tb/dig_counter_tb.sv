// dig_counter_tb: random increments and asynchronous resets against a
// counter model that saturates at four. Checks the address bits, the
// transition flag, and that a full counter ignores increments.
module dig_counter_tb;
  logic clk = 0, rst = 0, inc = 0;
  logic x1, x0, transition;
  int checks = 0, failures = 0, saturated = 0, model = 0;
  dig_counter dut (.clk, .async_reset(rst), .increment(inc), .x1, .x0, .transition);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && inc) begin
    if (model == 4) saturated++;
    else model <= model + 1;
  end

  task automatic check();
    checks++;
    if ({transition, x1, x0} !== 3'(model)) begin
      failures++; $display("FAIL t=%0t got %0d model %0d", $time, {transition, x1, x0}, model);
    end
  endtask

  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      inc = ($urandom % 3) != 0;
      if ($urandom % 40 == 0) begin
        #2 rst = 1; model = 0; #1 check(); rst = 0;
      end
      @(negedge clk);
      check();
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
