// mod_reg_file_tb: random writes (with and without wr) against an array
// model; all four registers are compared after every clock, and the
// asynchronous clear is applied at random times.
module mod_reg_file_tb;
  logic clk = 0, rst = 0, wr = 0, wa0 = 0, wa1 = 0;
  logic [1:0] ld = 0;
  logic [3:0][1:0] data;
  logic [1:0] model [4];
  int checks = 0, failures = 0, writes = 0;
  mod_reg_file dut (.clk, .as_reset(rst), .ld_data(ld), .wa0, .wa1, .wr, .data);
  always #5 clk = ~clk;

  always @(posedge clk) if (wr && !rst) begin
    model[{wa1, wa0}] <= ld;
    writes++;
  end

  task automatic compare();
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (data[r] !== model[r]) begin failures++; $display("FAIL t=%0t reg %0d = %0d model %0d", $time, r, data[r], model[r]); end
    end
  endtask

  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    foreach (model[r]) model[r] = 0;
    @(negedge clk); compare(); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      {wa1, wa0} = 2'($urandom);
      ld = 2'($urandom);
      wr = ($urandom % 2) == 1;
      if ($urandom % 100 == 0) begin
        #1 rst = 1; foreach (model[r]) model[r] = 0; #1 compare(); rst = 0;
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
