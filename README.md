# A reprogrammable hardware template for Moore FSMs

This is a finite state machine whose behaviour lives entirely in RAM. The
circuit is fixed: a state register, a few small RAMs and some multiplexers.
Loading different words into the RAMs turns it into a different FSM. Any
machine fits that stays within the template's limits:

* L inputs
* N outputs
* 2^R state codes
* at most 2^G successors per state, which means at most G input variables
  that a state's transitions depend on

Every transition takes one clock cycle, whatever the machine. Each RAM has a
second write port, so the machine can be reprogrammed while it runs, word by
word.

The default size is L=16, N=10, R=4, G=2, r=2, where r is the number of
"local" state-code bits (see below). It holds the 10-state example machine
used in the testbench.

## Why the transition memory is split

A plain RAM-based FSM looks up the next state and the outputs in a single
table. That table is addressed by the state code and by the inputs the
transition depends on. To keep the address narrow, a multiplexer first picks,
for each state, the G inputs that matter; these become p_1..p_G. The table
then needs 2^(R+G) words of R+N bits. This design shrinks it in two ways.

1. **Outputs are separated.** The machine is a Moore machine, so its outputs
   depend on the state only. A 2^R x N output RAM (`oram`) holds them.
2. **The next-state code is split in two.**
   * The last R-r bits name a *group*: all the successors of the current
     state. They are chosen by the state assignment so that they depend on
     the current state only. A 2^R x (R-r) group RAM (`gstram`) gives them.
   * Only the first r bits depend on the inputs. They pick one state within
     the group. A 2^(R+G) x r local RAM (`lstram`) gives them.

At the default size the RAMs hold 160 + 32 + 128 = 320 bits. A single
transition-and-output table would need 2^6 x 14 = 896 bits. The multiplexer
RAMs are not counted on either side.

## Datapath and timing

```
            +------------------- riv -------------------+
  x[L-1:0] -+-> G x (L:1 mux) <-- G x mram[state] ------+--> p[G-1:0]
            +-------------------------------------------+        |
 state ---+--> gstram[state]         --> d[R-RL-1:0]             |
          +--> lstram[{state, p}]    --> d[R-1:R-RL]  <----------+
          +--> oram[state]           --> y[N-1:0]
          +--- fsm_memory (R D flip-flops) <-- d
```

* All RAM reads are asynchronous, like distributed RAM in an FPGA. The chain
  state -> MRAM -> mux -> local RAM -> d is combinational. The state register
  loads `d` on every rising edge, so each transition takes exactly one cycle.
* `y` follows the state register in the same cycle, through `oram`.
* Bit order is most significant bit first, as codes are written by hand:
  * `state[R-1]` is T_1, the leftmost bit of a written code.
  * `y[N-1]` is y_1.
  * `p[G-1]` is p_1.
  * The local RAM address is `{state, p_1, ..., p_G}`.
* `rst` is synchronous and active high, and loads code 0...0. It does not
  touch the RAMs: their contents are undefined until written.

## Programming the template: state assignment

This is the part that needs care. The RTL does not check it. It only works
if the state codes are chosen so that the group bits never depend on the
inputs.

* Write each state code as r *row* bits followed by R-r *column* bits.
* **All successors of a given state must share one column.** The column is
  the group that `gstram` outputs. The row is what `lstram` picks.
* One way to find such codes is a map with 2^r rows and 2^(R-r) columns,
  filled under these rules:
  * The successor set of every state sits inside one column.
  * Each cell holds at most one state.
  * A state may appear in several cells, which gives it several codes.
  * Every state appears at least once.
* A state with several codes must be programmed under each of its codes:
  * the same output word in `oram` at each code;
  * the same `gstram` and `lstram` entries at each code.
  This costs no extra logic.

Then, for each code K of each state s:

* **`mram` g, address K:** the index i of the input x_i that becomes p_g
  while in s. Any value will do where s uses fewer than G variables.
* **`gstram`, address K:** the column shared by the successors of s.
* **`lstram`, address K·2^G + p:** the row bits of the successor that s
  takes for selected-variable values p. This holds for all 2^G values of p,
  including those s does not test. If s has a single successor, all 2^G
  words are the same.
* **`oram`, address K:** the outputs of s.

Unused codes may hold anything. The circuit never enters them if the used
entries are consistent.

Finding codes and selected variables that keep the number of successors
per group within 2^G and the codes within R bits is an offline step, done
in software. It is not part of this RTL.

## Configuration port

The second port of every RAM is reached through one shared write port on
`ht_fsm`:

| signal     | meaning |
|------------|---------|
| `cfg_we`   | write at this rising edge |
| `cfg_sel`  | `SEL_MRAM`, `SEL_GSTRAM`, `SEL_LSTRAM`, `SEL_ORAM` (type `ht_pkg::ram_sel_e`) |
| `cfg_idx`  | which MRAM; 0 drives p_1 |
| `cfg_addr` | R+G bits for `lstram`; the low R bits for the others, with the top G bits zero (this is asserted) |
| `cfg_data` | the word, right-aligned to the target RAM's width |

* One word is written per cycle.
* A word written at an edge is used by the FSM from the next cycle on.
* Writes are allowed while the machine runs. If a change spans several
  words, the machine must not read a half-updated set. Either hold it where
  it cannot reach those words, or hold the inputs so that only the
  already-rewritten words are addressed. The end-to-end testbench does the
  latter.

The port format, the reset and the asynchronous reads are choices of this
implementation.

## Worked example

`tb/tb_ht_fsm.sv` loads a ten-state machine a0..a9:

* inputs x1..x9, driven on `x[0]..x[8]`;
* outputs y1..y8, with y9 and y10 held at 0;
* 15 codes, five states having two codes; code 1100 is unused.

The next-state rules, as the loaded RAM contents define them:

| state (codes)     | p_1, p_2 | next state                                  | outputs |
|-------------------|----------|---------------------------------------------|---------|
| a0 (0000)         | x1, x2   | x1: a1; !x1 x2: a2; !x1 !x2: a3             | -       |
| a1 (0001, 0010)   | x3, x4   | x3: a1; !x3 x4: a4; !x3 !x4: a3             | y1 y3   |
| a2 (0100, 0101)   | x5, x6   | 00: a6; 01: a5; 10: a7; 11: a8              | y2..y5  |
| a3 (1101)         | -        | a4                                          | y2 y4 y6|
| a4 (1001, 1010)   | -        | a2                                          | y6      |
| a5 (0011)         | x7       | x7: a4; else a6                             | y7 y8   |
| a6 (0110, 0111)   | x8       | x8: a8; else a2                             | y6 y8   |
| a7 (1111)         | x9       | x9: a1; else a9                             | y4      |
| a8 (1000, 1011)   | -        | a9                                          | y2      |
| a9 (1110)         | -        | a0                                          | y7      |

The testbench compares the template against a model of this table cycle by
cycle.

## Where the RTL departs from, or adds to, the method it implements

* **Multiplexer select.** The select code i picks `x[i]`. The example
  machine's select words (code 0 for x1) therefore assume x_k is wired to
  `x[k-1]`.
* **Example contents.** The example machine's RAM words are the published
  ones. Two points needed a choice:
  * local-RAM address 9 (a1 under code 0010, p = 01) is loaded with 10,
    which leads to a4, the same as address 5 (a1 under code 0001);
  * a7 has two successors: a1 when x9 is 1, a9 otherwise.
* **Output width.** The template has N=10 outputs and the example uses
  eight. The two extra output bits are loaded with 0.
* **Not built:**
  * A variant in which the group RAM gives a full R-bit code and p is OR-ed
    into part of it before the local RAM. It is not specified in enough
    detail.
  * The ROM version for fixed machines. Leaving the write port unused gives
    the same behaviour.
  * The matrix-processing datapaths (orthogonality, ones-count and cover
    tests) that such FSMs control in applications. They are only named,
    with no sizes or interfaces.

## Files

| file | contents |
|------|----------|
| `rtl/ht_pkg.sv`     | default sizes, `ram_sel_e` |
| `rtl/ht_fsm.sv`     | top: the template |
| `rtl/fsm_memory.sv` | state register |
| `rtl/riv.sv`        | G multiplexers with their MRAMs (input-variable replacement) |
| `rtl/mram.sv`       | multiplexer-select RAM |
| `rtl/gstram.sv`     | group transition RAM |
| `rtl/lstram.sv`     | local transition RAM |
| `rtl/oram.sv`       | output RAM |
| `tb/tb_*.sv`        | one self-checking testbench per module |
| `tb/tb_ht_fsm_random.sv` | two random machines run one after the other on one template, at a non-default size |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

* **Unit testbenches.** They fill each RAM through its write port and read
  every address back through the FSM port. The group and output RAMs are
  loaded with the example's contents, which are given there in an
  independent form. Random rewrites are then checked against a scoreboard.
  `tb_riv` checks that each p_g follows exactly the selected input.
* **`tb_ht_fsm`.** It runs at the default parameters, for about 6000
  cycles. It checks the state and the outputs every cycle. It counts, and
  requires to be non-zero:
  * one- and two-variable conditional transitions;
  * unconditional transitions;
  * entries into a state under its second code;
  * a reset in the middle of a run;
  * visits to every state;
  * three run-time rewrites, each then exercised: the input that a5 tests
    (MRAM), a3's outputs (ORAM), and a9's successor (local RAM).
* **`tb_ht_fsm_random`.** It builds the template with L=12, N=6, R=5, G=3
  and r=3. It generates a random 32-state machine from an abstract
  description, loads it and runs it, then does the same with a second
  machine on the same hardware. Some states test input indices 12 to 15,
  which lie past the last input. The template must read such a selected
  variable as 0.

To simulate one testbench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ht_pkg.sv tb/tb_ht_fsm.sv --top-module tb_ht_fsm
./obj_dir/Vtb_ht_fsm
```

The RAMs are not reset, so a simulator that starts variables at random
values is fine as long as every word the machine can read has been
written.
