// debouncer_tb: DIV_BITS = 2, so the sampling clock is the board clock / 16.
// The switch input bounces randomly on every board clock. The tb keeps its
// own pair of cascaded divide-by-4 counters and the value of the switch at
// each rising edge of the slow clock; the output must equal that value at
// every board clock, and must have changed several times.
module debouncer_tb;
  localparam int DB = 2;
  logic board = 0, rst = 0, manual = 0, out;
  int checks = 0, failures = 0, changes = 0;
  int c1 = 0, c2 = 0;
  logic mid = 0, slow = 0, exp = 0, last_out = 0;

  debouncer #(.DIV_BITS(DB)) dut (.board, .rst, .manual, .out);
  always #5 board = ~board;

  always @(posedge board) if (!rst) begin
    int n1, n2;
    n1 = (c1 + 1) % (1 << DB);
    n2 = c2;
    if (!mid && n1 >= (1 << (DB - 1))) begin               // mid clock rises
      n2 = (c2 + 1) % (1 << DB);
      if (!slow && n2 >= (1 << (DB - 1))) exp = manual;    // slow clock rises
      slow = n2 >= (1 << (DB - 1));
    end
    mid = n1 >= (1 << (DB - 1));
    c1 = n1;
    c2 = n2;
  end

  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    @(negedge board); #1 checks++; if (out !== 1'b0) failures++;
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // mostly long stable stretches with bursts of bounce
      if ((i / 40) % 2 == 0) manual = $urandom % 2;
      else if (i % 40 == 0) manual = ~manual;
      @(negedge board);
      checks++;
      if (out !== exp) begin failures++; if (failures < 10) $display("FAIL i=%0d out=%b exp=%b", i, out, exp); end
      if (out != last_out) changes++;
      last_out = out;
    end
    checks++;
    if (changes < 5) begin failures++; $display("FAIL output changed only %0d times", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
