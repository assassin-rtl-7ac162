# Self-timed one-hot control units (ASSASSIN style)

This RTL implements the control units described in the ASSASSIN paper ("A CAD
System for Self-Timed Control-Unit Design"). In that paper a control unit is a
graph of states and transitions. It is built as a **token-passing machine**:

- every state has its own latch (one-hot encoding);
- every transition has two logic rows;
- a transition moves the token from state to state by a handshake, so the
  circuit does not depend on any gate delay.

The same mapping takes the paper's FORK (split the token) and JOIN (merge
tokens) constructs without extra effort. That is why a fully decoded one-hot
encoding was chosen over an encoded state register.

Four control units are built, all from one shared transition array:

| unit | module | what it shows |
|---|---|---|
| Read_Init_Parameters of the INM_OUT Internet-Protocol submodule, with its datapath | `read_init_parameters` (`rip_control` + `rip_datapath`) | a real 12-state controller with request/acknowledge handshakes to three other modules |
| CompileTest9 | `cu_test9` | every construct: MOVE, FORK, two JOINs, a two-state loop, state and transition outputs, held and latched outputs |
| FORK/JOIN example | `cu_fork_join` | two concurrent paths |
| simple example | `cu_simple` | a three-state ring with two held outputs |

`assassin_top` places all four side by side. They share only the clock and the
master reset.

## How a transition works

`st_onehot_array` is the core. Transition *t* has a set of source states and a
set of destination states. A MOVE has one of each, a FORK has several
destinations, and a JOIN has several sources. Each transition has two rows:

```
forward row  fwd[t] = all sources on
                      AND all predecessors of the sources off
                      AND condition                    -> set the destinations
reverse row  rev[t] = all destinations on
                      AND reverse condition            -> reset the sources
```

The **predecessor guard** is the self-timed part. A predecessor of state S is
any state that has a transition into S. While the machine goes from B to C,
both B and C are on for a moment. C must not pass the token on to D until B is
really off. Without the guard, a fast C→D could finish before C resets B. The
machine would then hold tokens in B and D, two states that should never be on
together.

The array works out the predecessor masks from the `SRC`/`DST` tables when it
is elaborated.

Timing, with the latches sampled on `clk` (see "Clocking" below), for a MOVE
A→B followed by B→C, every condition true:

```
clock         0     1     2     3     4
A             1     1     0     0     0
B             0     1     1     1     0
C             0     0     0     1     1
fwd A->B      1     1     0     0     0
fwd B->C      0     0     1     1     0   (waits at clock 1: A, a predecessor of B, is still on)
```

- A MOVE takes two clocks.
- Two states that follow each other overlap for one clock.
- A chain of transitions advances one state every two clocks.

Held outputs of adjacent states therefore overlap and never leave a gap. The
paper points out that this lets such outputs be ORed without glitches.

### FORK and JOIN

- **FORK:** the forward row sets all its destinations at once. The reverse row
  resets the source only when *every* destination is on.
- **JOIN:** the forward row needs every source on, the predecessors of every
  source off, and the conditions that each source attaches to the JOIN ANDed
  together. Its reverse row resets all the sources.

### Two-state loops

In a two-state loop (D→F and F→D) both states are on during either transition.
Each reverse row would then see "my destination is on", both would fire, and
the token would be lost.

The paper's remedy is to give each reverse row an extra input condition.
`cond_r` carries it:

- in `cu_test9`, D is reset after D→F only while I8 is still high (the
  paper's rule);
- F is reset after F→D only while I7 is low. This is the mirror-image rule,
  chosen for this design.

A consequence is worth knowing. If I7 rises in D while I8 is low, D and F both
stay on until I8 rises or I7 falls. The testbenches exercise this stall on
purpose.

A second rule is an assertion in the array: two transitions leaving the same
state must never fire together. Keeping their conditions mutually exclusive is
the environment's job, as in the paper.

## Outputs

- **Ephemeral (HOLD) outputs** are combinational. Each is the OR of the states
  (or forward rows) that hold it, ANDed with the Boolean condition where one is
  given. A transition's outputs are gated with its forward row, so they are on
  while the transition is in progress.
- **Enduring (SET/RESET) outputs** are `output_latch` cells. The paper warns
  that adjacent states can SET and RESET the same output together, which would
  make a real latch metastable. CompileTest9 does this: its JOIN B,C→F resets
  O3 while B sets it when I3 is high. The same JOIN sets O4 while B resets it
  when I4 or I5 is high. In this RTL the reset wins and `o_collide` flags the
  event. The CompileTest9 testbench checks that both collisions happen and are
  flagged.

## Clocking: the main departure from the paper

The paper's state latches are cross-coupled NMOS inverters with no clock. This
RTL samples every latch on the rising edge of `clk`, so that it can be
synthesised with a standard flow and simulated cycle by cycle. Each element
still waits for the previous one:

- rows still wait for latches;
- latches still change only when their rows say so;
- a DON or ACK still rises only after the work is done.

So the *order* of events is the paper's, and the clock period does not change
the function. A control unit built this way is not speed-independent at the
gate level. Its `clk` must be fast compared with the external handshakes. Any
input that comes from another clock domain has to be synchronised first.

`mr` is the paper's MasterReset. It is synchronous and active high. It loads
the start state, clears every other state latch, and clears the enduring
outputs (clearing them is this design's choice).

## Read_Init_Parameters

This task belongs to INM_OUT, the output side of a hardware Internet-Protocol
implementation. It loads INM_OUT's initialisation parameters. One "accept GO"
operation runs as follows:

1. **RIP0.** INITNUM.REG follows the 3-bit server command bus, which carries
   the number K of address octets. The other counters are preset:
   - INITNUM.CTR and TOS.ROW.CTR are cleared;
   - REG.CTR, TOS.COL.CTR and TOS.ADR.CTR are loaded with their maximum, so
     that their first increment gives 0.

   The unit leaves RIP0 when GO.REQ is high and both DONs have answered.
2. **RIP1 → RIP1A → RIP2, K times.** For each SRV.REQ from INM_SRV:
   - the octet on the command bus goes to the memory module (MEM.REQ with
     MEM.SEND);
   - INITNUM.CTR is incremented;
   - the unit answers SRV.ACK and waits until SRV.REQ and MEM.ACK have both
     dropped.

   INITNUM.CMP.EQ (counter = register) ends the loop. GO.RESPONSE is set on
   the first pass and stays set.
3. **RIP3 → RIP4 → RIP5, 8 times.** REG.CTR is incremented and one octet is
   read from memory. The register decoder steers REG.DECODE.ENA to the
   register REG.CTR selects. MEM.REQ stays high through RIP4 so that the data
   stays valid. The selected register's DON comes back as REG.ACK. The
   registers, in counter order, are:
   - LNM-MAX-PACKET.LO/HI;
   - LNM-ADDR-LENGTH;
   - LNM-TIME-OUT.LO/HI;
   - ACK-TYPE;
   - TOS.COL.REG (row size);
   - TOS.ROW.REG (number of rows).

   REG.CTR.EQ7 ends the loop.
4. **RIP6 → RIP7 → RIP8, then RIP9 → RIPA.** This reads the type-of-service
   table into the TOS RAM at TOS.ADR.CTR. The column loop ends when
   TOS.COL.CTR = TOS.COL.REG. RIP9 reloads the column counter with its maximum
   and increments the row counter. The row loop ends when
   TOS.ROW.CTR = TOS.ROW.REG.
5. **RIPA.** GO.ACK is held until GO.REQ drops, then the unit goes back to
   RIP0.

With the counters preset as in the paper, every row holds
**TOS.COL.REG + 1** octets and there are **TOS.ROW.REG** rows. One operation
therefore reads 8 + rows × (cols + 1) octets. The environment must keep this
within N = 32 words. The largest table the paper's field widths allow is
3 × 8 = 24 words. Setting TOS.ROW.REG = 0 or INITNUM = 0 makes the matching
loop wrap round the full counter range, exactly as the hardware would.

Every datapath unit answers a held command with a DON line using a four-phase
handshake:

- `hs_counter` carries out CLR, MAX or INC once, on the first clock edge that
  sees the command. DON is high from then on while the command is held, and
  drops as soon as the command is released.
- `hs_register` follows its bus while LOD is held and keeps the value after.
  DON rises once the bus has been captured.
- `tos_ram` is written while TOS.REG.LOD is held. TOS.REG.DON rises once the
  word is written.

`rip_pkg` bundles the controller's commands (`rip_cmd_t`) and the datapath's
answers (`rip_sts_t`).

External handshakes are four-phase: GO with the rest of INM_OUT, SRV with
INM_SRV, and MEM with the memory module. Assertions in `read_init_parameters`
check the environment's side:

- SRV.REQ and GO.REQ are only withdrawn after their acknowledge;
- MEM.REQ never rises while MEM.ACK is still high.

## CompileTest9 in detail

- States: A (start), B, C, D, E, F. Inputs: I1..I8. Input expression:
  BIG = I1 and (I2 or not I3).
- Transitions:

| # | kind | from → to | condition | action |
|---|---|---|---|---|
| t0 | FORK | A → B, C | BIG | |
| t1 | MOVE | A → D | not BIG | |
| t2 | JOIN | B, C → F | I4 and I5 (from B), I6 (from C) | RESET O3; if BIG, SET O4 |
| t3 | JOIN | B, E → F | I4 or I5 (from B), TRUE (from E) | |
| t4 | MOVE | C → E | not I6 | |
| t5 | MOVE | D → F | I7 | SET O3 |
| t6 | MOVE | F → A | I8 | |
| t7 | MOVE | F → D | not I8 | |

- State outputs:
  - A: HOLD O1, O2; RESET O3; SET O4.
  - B: HOLD O1; if I3, SET O3; if I4 or I5, RESET O4 and HOLD O2, O5.
  - C: HOLD O1.

## Files

`rtl/`:

| file | role |
|---|---|
| `state_latch.sv` | one state latch (set/reset, true and complement outputs) |
| `output_latch.sv` | latch for an enduring output, with collision flag |
| `st_onehot_array.sv` | state latches plus forward/reverse rows, parameterised by transition tables |
| `cu_simple.sv`, `cu_fork_join.sv`, `cu_test9.sv` | the three example control units |
| `rip_pkg.sv` | command/answer structs and register indices of Read_Init_Parameters |
| `rip_control.sv` | the Read_Init_Parameters controller |
| `hs_counter.sv`, `hs_register.sv`, `reg_decoder.sv`, `tos_ram.sv` | datapath units |
| `rip_datapath.sv` | the Read_Init_Parameters datapath |
| `read_init_parameters.sv` | controller + datapath |
| `assassin_top.sv` | all four units side by side |

Parameters:

- `N` (default 32) is the number of TOS RAM words. The address and TOS
  register width is M = ceil(log2 N).
- `st_onehot_array` takes `NS`, `NT`, `START`, `SRC` and `DST`. Transition *t*
  occupies bits `[t*NS +: NS]` of `SRC` and `DST`.

To add a new control unit:

1. Write its `SRC`/`DST` tables and its `cond_f`/`cond_r` vectors.
2. Write its output logic from `state` and `fwd`.
3. Give any enduring output an `output_latch`.

`cu_test9.sv` is the most complete template.

## Testbenches

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/mem_model.sv` is a behavioural model of
the memory module. It is a four-phase slave with random response delays.

- `tb_read_init_parameters` runs three complete GO operations at N = 32:
  - K = 1, 3 and 7 address octets;
  - tables of 1×1, 2×4 and 3×8 words.

  It checks the forwarded address octets, the octet count, all eight
  registers and every TOS RAM word.
- `tb_cu_test9` walks CompileTest9 through both exits of A, both JOINs, the
  two-state loop and every output rule. It evaluates BIG for I2/I3 = 1/0,
  0/1 and 0/0 with I1 high, because only the second makes BIG false.
- `tb_assassin_top` runs the whole design at its default parameters. All four
  units run concurrently. It counts how often each mechanism happens: address,
  register, column and row loops; waits for MEM.ACK; forks; a join waiting for
  a late branch; the two-state-loop stall; set/reset collisions; held-output
  overlap. A mechanism that never happens counts as a failure.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/rip_pkg.sv tb/tb_assassin_top.sv --top-module tb_assassin_top
./obj_dir/Vtb_assassin_top
```

Change the last file and `--top-module` to run another testbench. Include
`rtl/rip_pkg.sv` for anything that uses the Read_Init_Parameters modules.

## Where this RTL departs from the paper, or fills gaps

- **Clock-sampled latches** instead of unclocked NMOS latches (see
  "Clocking").
- **Column counter in RIP9.** The flow graph and its prose *clear* the column
  counter in RIP9. The CUDL listing loads its *maximum*. This RTL follows the
  listing, so every row of the TOS table has the same length.
- **Reverse row of F→D in CompileTest9** requires I7 low. This mirrors the
  rule the paper gives for D→F.
- **CompileTest9 C→E** is taken on *not I6*, following the drawn graph.
- **Enduring-output collisions.** Reset wins and the event is flagged. The
  paper only warns of metastability.
- **Master reset** also clears the enduring outputs and the datapath
  registers.
- **N** is a symbol in the paper's block diagram; 32 is this design's value.
- **Widths.** LNM-MAX-PACKET.LO is 8 bits like the other octet registers.
  Narrow registers (ACK-TYPE, TOS.COL.REG, TOS.ROW.REG) take the low bits of
  the memory bus.
- **TOS RAM** has a second read port for whatever later uses the table.
- **Not built:**
  - SRV.RESPONSE, which is drawn in the block diagram but driven by no
    statement of the controller;
  - the table-overflow check in the original task code;
  - the PPL layout itself (row/column placement, NMOS cells).
- **Other modules.** The memory module, INM_SRV and the rest of INM_OUT are
  not designed here. Their handshakes are ports of `read_init_parameters` and
  `assassin_top`.
