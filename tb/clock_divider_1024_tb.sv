// clock_divider_1024_tb: default size. After reset the output must be low
// for 512 input clocks and high for the next 512, repeating: a period of
// exactly 1024 input clocks.
module clock_divider_1024_tb;
  logic clk_in = 0, rst = 0, clk_out;
  int checks = 0, failures = 0, n = 0, rises = 0;
  logic last = 0;
  clock_divider_1024 dut (.clk_in, .rst, .clk_out);
  always #5 clk_in = ~clk_in;
  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    #1; checks++; if (clk_out !== 1'b0) failures++;
    @(negedge clk_in); rst = 0;
    for (n = 1; n <= 5000; n++) begin
      @(negedge clk_in);
      checks++;
      if (clk_out !== ((n % 1024) >= 512)) begin
        failures++;
        if (failures < 10) $display("FAIL after %0d edges clk_out=%b", n, clk_out);
      end
      if (clk_out && !last) rises++;
      last = clk_out;
    end
    checks++;
    if (rises != 5) begin failures++; $display("FAIL rises=%0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
