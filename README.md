# Simple four-digit door lock

A combination lock for a small FPGA board with four push buttons, three switches, three
LEDs and three seven-segment digits. A code is four digits, each 1 to 4, typed one digit
per button. The right code opens the lock. While the lock is open the user can type a new
code. Five wrong codes in a row lock the lock until a hard reset, and a hard reset also
sets the code back to 1111.

The whole lock is a small Moore state machine plus a datapath built from textbook parts:
a press detector, a digit counter, two 4 x 2-bit register files, a subtract-and-NOR
comparator, an attempt counter and seven-segment decoders. The idea that holds it
together is that the FSM has **one** condition input. Each state tells a 4-to-1 mux which
single condition it is waiting for: a key press, "four digits typed", "codes match" or
"attempt limit reached". The FSM therefore stays at two inputs: `select_in` and the lock
switch.

## Board interface (`simple_door_lock`)

| Port | Dir | Meaning |
|---|---|---|
| `Board_Clk` | in | board clock (50 MHz on the intended board) |
| `hard_reset` | in | active high, asynchronous: FSM to idle, stored code to 1111, attempts to 0 |
| `lck` | in | lock switch, 1 = close the lock (debounced inside) |
| `clr_entered_code` | in | clear switch, 1 = throw away the digits typed so far |
| `button_n[3:0]` | in | push buttons, **active low**; `button_n[k]` types digit k+1 |
| `lock_light` | out | lock is open (also on while a new code is typed) |
| `new_code_light` | out | a new code is being typed |
| `hard_lock_light` | out | locked out until hard reset |
| `hex[2:0]` | out | display digits, `hex[0]` = first digit typed; segments `{g,f,e,d,c,b,a}`, active low |

Parameter `DIV_BITS` (default 10) sets the system clock to `Board_Clk / 2**DIV_BITS`.
The lock-switch sampling clock is `Board_Clk / 2**(2*DIV_BITS)`.

Digits are stored as 2-bit values: 00 = 1, 01 = 2, 10 = 3, 11 = 4. A register file cleared
to all zeros therefore holds the code 1111.

## The control FSM (`fsm`)

`fsm` holds the 3-bit state register. The transition function is in `fsm_next_state_logic`
and the output decode in `fsm_output_logic`.

The state encoding is `y2 y1 y0`. Code 000 (state A) is never entered; the FSM treats it as a
path to B. The FSM's outputs depend only on its state.

| State | Code | Meaning | mux input watched (`s1 s0`) | Outputs set |
|---|---|---|---|---|
| B | 001 | idle, waiting for the first digit | key press (00) | `btn_ctr_reset`, `switch_regs` |
| C | 010 | typing an unlock code | four digits typed (01) | `switch_regs` |
| D | 011 | compare | codes match (10) | `switch_regs` |
| E | 100 | open | key press (00) | `lock_light`, `btn_ctr_reset`, `att_reset` |
| F | 101 | typing a new code | four digits typed (01) | `lock_light`, `new_code_light` |
| G | 110 | wrong code: one more attempt | attempt limit (11) | `add_attempt`, `switch_regs` |
| H | 111 | locked out | (11, ignored) | `hard_lock_light`, `switch_regs` |

Transitions (`sel` = the watched condition):

```
B: sel -> C          C: sel -> D          D: sel -> E, else -> G
E: lock -> B, else sel -> F               F: sel -> E
G: sel -> H, else -> B                    H: stays until hard_reset
```

The other outputs have these jobs:

- `switch_regs` = 1 sends key writes to the *entered* code register. It is 0 in E and F,
  where writes go to the *stored* code register, so typing a new code overwrites the
  stored code in place.
- `btn_ctr_reset` holds the digit counter at zero in B and E. The first key typed in
  either state is therefore digit 0.
- `att_reset` clears the attempt counter whenever the lock is open (E). "Five wrong
  codes" therefore means five in a row, with no correct code between them.
- `add_attempt` is high for the one clock spent in G.

A `hard_reset` during H is the only way out of the lockout.

## Typing a digit: the timing that matters

`code_entering_module` turns the buttons into register writes. The only subtle timing in
the lock lies here. Take edge 1 to be the first system-clock edge that sees a button down:

| When | What happens |
|---|---|
| edge 1 | the press detector's first flip-flop takes "a button is down"; the encoded digit goes into `load_data` |
| after edge 1 | `button_pressed` = `write_enable` = 1 for exactly one clock (a rising-edge detector over two flip-flops) |
| edge 2 | the selected register file stores `load_data` at `write_address`; the FSM acts on the press (B→C, E→F) |
| falling edge after edge 2 | the digit counter steps to the next address (the press pulse is delayed one flip-flop before it reaches the counter) |

The counter must step **after** edge 2, for two reasons:

- The write at edge 2 has to use the old address.
- In B and E the FSM holds the counter in reset until edge 2. The step has to come after
  that reset has been released, or the first digit would not be counted.

The source design gets this order from the delay of a flip-flop that clocks the counter.
Here the counter is stepped on the falling edge of the system clock, which gives the same
order exactly and without a race.

After the fourth digit the counter sits at 4 (`transition`). At that point:

- writes are blocked (`write_enable = press & ~transition`);
- the displays go dark;
- the FSM moves on.

From the clock edge that first sees the fourth key to the unlock light is four system
clocks: sample, write, "four digits" seen by the FSM in C, comparison in D. The testbench
measures this latency.

The clear switch passes through one flip-flop and is ORed with `btn_ctr_reset`. It only
resets the digit counter. Digits already written stay in the register, but the next four
keys overwrite them.

## Codes, comparison and attempts

- `mod_reg_file`, two instances. Each is four 2-bit registers, all read out in parallel,
  with a 2-to-4 write decoder and a hold/load mux in front of every flip-flop. The
  stored-code file is cleared (to 1111) by `hard_reset`. The entered-code file has no
  clear.
- `subtractor_unit` computes `entered - stored` for each digit with a 2-bit ripple adder:
  the stored digit is inverted and the carry-in is 1. A NOR over the eight difference bits
  gives `code_match`.
- `attempt_counter` is a 3-bit counter whose clock is `add_attempt` itself. The count
  therefore changes as the FSM *enters* G, and in the same state the FSM already sees
  whether the count has reached 5. A synchronous counter enabled by `add_attempt` would
  update one state too late and allow six attempts. The counter is reset by
  `hard_reset | att_reset` and stops at 5.

## Displays

`reg_content_selector` picks the register being written (`switch_regs`): the entered code
while unlocking, the stored code while typing a new one. `enable_seven_segs` lights
display k once more than k digits are typed and blanks all three at four digits, so a
finished code never stays on the display. This is why there is no fourth display.
`seven_seg_decoder` draws 1 to 4 and blanks when `en` = 0.

## Clocks and resets

- `clock_divider_1024` is a free-running counter whose top bit is the system clock. The
  instance in the top has no reset. It keeps running during `hard_reset`, so the press
  detector's flip-flops, which have no reset, fill with "no button" while reset is held.
- `debouncer` samples `lck` on a second, cascaded divide-by-1024: about 48 Hz from
  50 MHz. A bounce on the switch therefore cannot reach the FSM. As a result a lock-switch
  change takes up to 2**20 board clocks, about 20 ms, to reach the FSM. `hard_reset`
  clears the debouncer (the switch reads "open").
- Three clocks are derived from flip-flops or state, as in the source design:
  - the system clock;
  - the debouncer's slow clock;
  - `add_attempt`, which clocks the attempt counter.

  This is fine on an FPGA at these rates, but it is the first thing to change if the
  design is moved into a strictly single-clock flow.

## Files

`rtl/door_lock_pkg.sv` holds the shared types: `code_t`, `seg_t`, the state enum and the
mux select codes. Each other module sits in `rtl/<module>.sv`; hierarchy:

```
simple_door_lock
├── clock_divider_1024
├── debouncer ── clock_divider_1024 ×2
├── fsm ── fsm_next_state_logic, fsm_output_logic
├── mux_4_to_1
├── attempt_counter
├── code_entering_module
│   ├── button_press_detection_logic
│   ├── push_button_encoder
│   ├── dig_counter
│   └── enable_seven_segs
├── mod_reg_file ×2 ── two_to_four_decoder, two_to_one_mux
├── subtractor_unit ── two_bit_adder ×4 ── full_adder ×2
├── reg_content_selector
└── seven_seg_decoder ×3
```

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    --top-module simple_door_lock_tb rtl/door_lock_pkg.sv tb/simple_door_lock_tb.sv -o sim
./obj_dir/sim
```

Substitute any other testbench name for a unit test. `-y rtl` finds each module by its file
name; the package is named explicitly.

`simple_door_lock_tb` runs the lock at its full default size, about 9 million board
clocks, in a few seconds. It walks through these steps:

1. hard reset, then unlock with 1111;
2. set the new code 3214;
3. close and reopen the lock switch;
4. make four wrong attempts;
5. type "43", clear it, then unlock with 3214;
6. relock, then make five wrong attempts, which locks the lock out; the correct code is
   then ignored;
7. hard reset, then unlock with 1111 again.

It checks the displays after every key. It also checks that each mechanism (unlock, new
code, relock, clear, wrong attempt, lockout, code restore, display blanking) happened.

The unit testbenches cover the following:

- Combinational blocks are tested exhaustively. The comparator runs all 65,536 code pairs.
- The FSM runs 5,000 random cycles against a table model and visits every state.
- The register file, counters, press detector and debouncer are compared against small
  reference models.

## Interpretations and departures

These are the points where the source design was unclear or was changed:

- **FSM next-state table.** The source gives the FSM both as a state table and as reduced
  gate equations, and the two disagree in a few cells (state D with no match, state A).
  This design follows the state table, which matches the state diagram and the intended
  behaviour (D: match → E, no match → G).
- **`lock_light` in state F.** It stays on in F, as the source's output equation says. One
  of its K-maps shows it off in F.
- **Display selector.** The selector shows the register selected by `switch_regs`, so the
  code being typed is always the one displayed. The prose of the source connects the two
  register files to the opposite selector inputs. That would show the stored code while an
  unlock code is typed.
- **Display enable.** Segments light when `en` = 1, following the decoder's truth table.
  One sentence of the source says the opposite.
- **Digit counter step.** The step is taken on the falling clock edge (see above). In the
  source, a flip-flop output clocks the counter.
- **Added resets.**
  - The debouncer gets an asynchronous reset.
  - The clock divider module gets a reset port, which the top ties off.
  - The attempt counter stops at 5 instead of wrapping.
- **Button input patterns.** The source leaves multiple or absent key presses as don't-care.
  Here the highest-numbered pressed button wins and no button gives 00.
