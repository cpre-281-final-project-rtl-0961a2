// simple_door_lock_tb: end-to-end run of the lock at its default size
// (system clock = board clock / 1024, lock switch sampled every 2**20 board
// clocks). It follows a user through:
//   1. hard reset, unlock with the reset code 1111;
//   2. while unlocked, set the new code 3214 (new-code light, digits shown);
//   3. close the lock switch, reopen it;
//   4. four wrong attempts with the old code (no lockout yet);
//   5. type "43", clear it with the clear switch, then type 3214: unlocks,
//      which also clears the attempt count;
//   6. lock again, five wrong attempts: the fifth locks the lock for good,
//      even the right code no longer opens it;
//   7. hard reset restores code 1111, which opens the lock again.
// After every key the three displays are compared with the digits typed so
// far (blank after the fourth). The time from the press of the fourth digit
// to the unlock light is measured in system clocks: the press is sampled on
// one edge, written on the next, the FSM then needs one clock to see
// "four digits" and one to compare, so the light comes on at the 4th edge.
// Each mechanism (unlock, new code, relock by switch, clear, wrong attempt,
// lockout, hard reset restoring the code, display blanking) is counted and
// must occur at least once.
module simple_door_lock_tb;
  import door_lock_pkg::*;

  localparam int SYS = 1024;          // board clocks per system clock
  localparam int SLOW = 1024 * 1024;  // board clocks per lock-switch sample

  logic Board_Clk = 0, hard_reset = 0, lck = 0, clr = 0;
  logic [3:0] button_n = 4'hF;
  logic lock_light, new_code_light, hard_lock_light;
  seg_t [2:0] hex;

  int checks = 0, failures = 0;
  int n_unlock = 0, n_new_code = 0, n_relock = 0, n_clear = 0, n_wrong = 0,
      n_lockout = 0, n_restore = 0, n_blank = 0;

  simple_door_lock dut (.Board_Clk, .hard_reset, .lck, .clr_entered_code(clr), .button_n,
                        .lock_light, .new_code_light, .hard_lock_light, .hex);

  always #5 Board_Clk = ~Board_Clk;

  // ---- expected display patterns, from the segments that draw each digit
  function automatic seg_t glyph(int digit);  // digit 1..4
    string s [4] = '{"bc", "abdeg", "abcdg", "bcfg"};
    seg_t m = '1;
    foreach (s[digit - 1][i]) m[s[digit - 1][i] - "a"] = 1'b0;
    return m;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic sys_cycles(int n);
    repeat (n * SYS) @(negedge Board_Clk);
  endtask

  task automatic check_display(int typed [$]);
    for (int i = 0; i < 3; i++) begin
      seg_t e = (i < typed.size() && typed.size() < 4) ? glyph(typed[i]) : 7'h7F;
      check(hex[i] === e, $sformatf("display %0d after %0d digits: %b expected %b", i, typed.size(), hex[i], e));
    end
  endtask

  // press one key (digit 1..4), hold and release
  task automatic key(int digit);
    button_n = ~(4'b1 << (digit - 1));
    sys_cycles(3);
    button_n = 4'hF;
    sys_cycles(3);
  endtask

  // type a code, checking the displays after every key; returns the number
  // of system clocks from the last press to the unlock light (0 if none)
  task automatic type_code(int code [4], output int latency);
    int typed [$];
    latency = 0;
    for (int d = 0; d < 4; d++) begin
      if (d == 3) begin
        button_n = ~(4'b1 << (code[d] - 1));
        for (int e = 1; e <= 8; e++) begin
          @(posedge dut.clk);
          #1 if (lock_light && latency == 0) latency = e;
        end
        button_n = 4'hF;
        sys_cycles(3);
      end else key(code[d]);
      typed.push_back(code[d]);
      check_display(typed);
    end
    if (hex === {3{7'h7F}}) n_blank++;
  endtask

  task automatic set_lock_switch(logic v);
    lck = v;
    repeat (2 * SLOW + 4 * SYS) @(negedge Board_Clk);
  endtask

  task automatic do_hard_reset();
    hard_reset = 1;
    sys_cycles(3);
    hard_reset = 0;
    sys_cycles(2);
  endtask

  int lat;
  int c1111 [4] = '{1, 1, 1, 1};
  int c3214 [4] = '{3, 2, 1, 4};
  int c4444 [4] = '{4, 4, 4, 4};

  initial begin
    // 1. hard reset, reset code opens the lock
    do_hard_reset();
    check(!lock_light && !new_code_light && !hard_lock_light, "all lights off after reset");
    check(hex === {3{7'h7F}}, "displays blank after reset");
    type_code(c1111, lat);
    check(lock_light && !new_code_light, "1111 unlocks after hard reset");
    check(lat == 4, $sformatf("unlock light %0d system clocks after the 4th press, expected 4", lat));
    if (lock_light) n_unlock++;

    // 2. set a new code while unlocked
    key(3);
    check(lock_light && new_code_light, "new-code light on after first digit");
    check(hex[0] === glyph(3) && hex[1] === 7'h7F, "new code digit shown");
    key(2); key(1); key(4);
    sys_cycles(3);
    check(lock_light && !new_code_light, "back to unlocked after new code");
    if (lock_light && !new_code_light) n_new_code++;

    // 3. close the lock switch
    set_lock_switch(1);
    check(!lock_light, "lock switch locks");
    if (!lock_light) n_relock++;
    set_lock_switch(0);
    check(!lock_light, "stays locked when switch reopens");

    // 4. old code is wrong now: four wrong attempts
    for (int a = 0; a < 4; a++) begin
      type_code(c1111, lat);
      sys_cycles(3);
      check(!lock_light && !hard_lock_light, $sformatf("wrong attempt %0d rejected", a + 1));
      n_wrong++;
    end

    // 5. type 43, clear, then the new code
    begin
      int typed [$];
      key(4); typed.push_back(4); key(3); typed.push_back(3);
      check_display(typed);
      clr = 1; sys_cycles(2); clr = 0; sys_cycles(2);
      check(hex === {3{7'h7F}}, "displays blank after clear");
      if (hex === {3{7'h7F}}) n_clear++;
    end
    type_code(c3214, lat);
    check(lock_light, "new code 3214 unlocks after clear");
    check(lat == 4, $sformatf("unlock latency %0d", lat));
    if (lock_light) n_unlock++;

    // 6. lock, then five wrong attempts; the attempt count was cleared by
    //    the unlock, so the fifth (not the first) locks out
    set_lock_switch(1);
    set_lock_switch(0);
    for (int a = 1; a <= 5; a++) begin
      type_code(c4444, lat);
      sys_cycles(3);
      check(hard_lock_light == (a == 5), $sformatf("lockout light after wrong attempt %0d", a));
      n_wrong++;
    end
    if (hard_lock_light) n_lockout++;
    // locked out: the digit counter stays full, keys are ignored
    foreach (c3214[d]) key(c3214[d]);
    sys_cycles(3);
    check(hex === {3{7'h7F}}, "keys ignored while locked out");
    check(hard_lock_light && !lock_light, "right code ignored while locked out");

    // 7. hard reset restores 1111
    do_hard_reset();
    check(!hard_lock_light, "hard reset clears lockout");
    type_code(c1111, lat);
    check(lock_light, "1111 opens after hard reset");
    if (lock_light) n_restore++;

    check(n_unlock > 0,  "mechanism: unlock");
    check(n_new_code > 0, "mechanism: new code");
    check(n_relock > 0,  "mechanism: relock by switch");
    check(n_clear > 0,   "mechanism: clear switch");
    check(n_wrong > 0,   "mechanism: wrong attempt");
    check(n_lockout > 0, "mechanism: lockout");
    check(n_restore > 0, "mechanism: hard reset restores code");
    check(n_blank > 0,   "mechanism: display blanks after fourth digit");
    $display("mechanisms: unlock=%0d new_code=%0d relock=%0d clear=%0d wrong=%0d lockout=%0d restore=%0d blank=%0d",
             n_unlock, n_new_code, n_relock, n_clear, n_wrong, n_lockout, n_restore, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
