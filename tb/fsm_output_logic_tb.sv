// fsm_output_logic_tb: the output word of all 8 states against the lock's
// output table {s1,s0,btn_ctr_reset,add_attempt,lock_light,hard_lock_light,
// new_code_light,switch_regs,att_reset}.
module fsm_output_logic_tb;
  import door_lock_pkg::*;
  state_t state;
  logic s1, s0, btn, add, ll, hl, nc, sw, att;
  int checks = 0, failures = 0;
  logic [8:0] outs [8] = '{9'b00_1_0_0_0_0_1_1, 9'b00_1_0_0_0_0_1_0, 9'b01_0_0_0_0_0_1_0,
                           9'b10_0_0_0_0_0_1_0, 9'b00_1_0_1_0_0_0_1, 9'b01_0_0_1_0_1_0_0,
                           9'b11_0_1_0_0_0_1_0, 9'b11_0_0_0_1_0_1_0};
  fsm_output_logic dut (.state, .select1(s1), .select0(s0), .btn_ctr_reset(btn), .add_attempt(add),
                        .lock_light(ll), .hard_lock_light(hl), .new_code_light(nc), .switch_regs(sw),
                        .att_reset(att));
  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int s = 0; s < 8; s++) begin
        state = state_t'(s);
        #1;
        checks++;
        if ({s1, s0, btn, add, ll, hl, nc, sw, att} !== outs[s]) begin
          failures++; $display("FAIL state %0d: %b expected %b", s, {s1, s0, btn, add, ll, hl, nc, sw, att}, outs[s]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
