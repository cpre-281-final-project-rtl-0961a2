// fsm_next_state_logic_tb: all 8 states x 4 input pairs against the
// lock's state-assignment table, indexed [state][{lock, select_in}].
module fsm_next_state_logic_tb;
  import door_lock_pkg::*;
  state_t state, state_next;
  logic select_in, lock;
  int checks = 0, failures = 0;
  int nxt [8][4] = '{'{1,1,1,1}, '{1,2,1,2}, '{2,3,2,3}, '{6,4,6,4},
                     '{4,5,1,1}, '{5,4,5,4}, '{1,7,1,7}, '{7,7,7,7}};
  fsm_next_state_logic dut (.state, .select_in, .lock, .state_next);
  initial begin
    for (int s = 0; s < 8; s++)
      for (int i = 0; i < 4; i++) begin
        state = state_t'(s);
        {lock, select_in} = 2'(i);
        #1;
        checks++;
        if (int'(state_next) != nxt[s][i]) begin
          failures++; $display("FAIL state %0d lock %b sel %b -> %0d expected %0d", s, lock, select_in, state_next, nxt[s][i]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
