// fsm_tb: random select_in and lock for thousands of cycles, with random
// resets, against a table model of the lock's state machine (next state for
// each lock/select_in pair and the output word of every state). Every state
// B..H must be visited and every output word compared each cycle.
module fsm_tb;
  logic clk = 0, rst = 0, sel_in = 0, lock = 0;
  logic s1, s0, btn, add, ll, hl, nc, sw, att;
  int checks = 0, failures = 0;
  int visits [8];
  int st = 1;  // model state, B after reset

  // next state, indexed [state][{lock, select_in}]
  int nxt [8][4] = '{'{1,1,1,1}, '{1,2,1,2}, '{2,3,2,3}, '{6,4,6,4},
                     '{4,5,1,1}, '{5,4,5,4}, '{1,7,1,7}, '{7,7,7,7}};
  // outputs {s1,s0,btn_ctr_reset,add_attempt,lock_light,hard_lock_light,new_code_light,switch_regs,att_reset}
  logic [8:0] outs [8] = '{9'b00_1_0_0_0_0_1_1, 9'b00_1_0_0_0_0_1_0, 9'b01_0_0_0_0_0_1_0,
                           9'b10_0_0_0_0_0_1_0, 9'b00_1_0_1_0_0_0_1, 9'b01_0_0_1_0_1_0_0,
                           9'b11_0_1_0_0_0_1_0, 9'b11_0_0_0_1_0_1_0};

  fsm dut (.clk, .async_reset(rst), .select_in(sel_in), .lock, .select1(s1), .select0(s0),
           .btn_ctr_reset(btn), .add_attempt(add), .lock_light(ll), .hard_lock_light(hl),
           .new_code_light(nc), .switch_regs(sw), .att_reset(att));
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) st <= nxt[st][{lock, sel_in}];

  task automatic compare();
    checks++;
    visits[st]++;
    if ({s1, s0, btn, add, ll, hl, nc, sw, att} !== outs[st]) begin
      failures++;
      $display("FAIL t=%0t state %0d outputs %b expected %b", $time, st, {s1, s0, btn, add, ll, hl, nc, sw, att}, outs[st]);
    end
  endtask

  initial begin
    #1 rst = 1;  // a real edge for the asynchronous reset
    foreach (visits[i]) visits[i] = 0;
    #2; @(negedge clk); rst = 0; st = 1;
    for (int i = 0; i < 5000; i++) begin
      sel_in = ($urandom % 3) != 0;
      lock   = ($urandom % 4) == 0;
      if ($urandom % 25 == 0) begin
        #1 rst = 1; st = 1; #1 compare(); rst = 0;
      end
      @(negedge clk);
      compare();
    end
    for (int s = 1; s < 8; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
