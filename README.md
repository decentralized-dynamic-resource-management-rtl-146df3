# Decentralized resource exploration for processor arrays

A massively parallel processor array is a mesh of small processing
elements (PEs). Applications start and stop at run time, and each one needs a
group of free PEs whose shape suits it: a linear chain, or a rectangle. If a
central processor keeps the occupancy table and searches it, every request
costs time in proportion to the whole search. This design puts a small
*invasion controller* beside every PE instead. A PE that needs resources sends
one command to its own controller. The controller claims ("invades") itself
and then asks a free neighbour to go on with the rest of the request. The
request travels from controller to controller and claims PEs on the way. Then
the answer travels back along the same path. Nothing central takes part. A
chain of n PEs costs about 2n clock cycles, and a rectangle costs about twice
its height plus twice its width.

This RTL has three controller flavours, as in the original publication:

* a hard-wired controller for **linear** regions, with three walk policies:
  straight, random and meander (`inv_ctrl_lin`);
* a hard-wired controller for **rectangular** regions (`inv_ctrl_rect`);
* a small **programmable** VLIW controller (`inv_ctrl_prog`). It runs an
  exploration program from a 64-line instruction memory. Two programs come
  with the testbenches: a meander linear walk and a rectangle.

`ic_array` builds a ROWS x COLS mesh (default 5 x 5) from one flavour.
The top, `invasion_mppa`, holds one 5 x 5 plane of each flavour side by side.
Each plane has its own PE ports. The PEs themselves are not part of this
design: the top's ports are their command and answer links and their busy
flags.

## Commands

Every link carries one 20-bit command, `inv_pkg::inv_msg_t`:

| field | bits | meaning |
|---|---|---|
| `op` | 2 | `OP_INV` invade, `OP_RET` retreat (release), `OP_ACK` acknowledge, `OP_REJ` reject |
| `sub` | 1 | `SUB_LIN` linear region, `SUB_RECT` rectangle |
| `prm.policy` | 2 | linear: `POL_STR`, `POL_RND`, `POL_MEA` |
| `prm.west` | 1 | rectangle: the region grows West, else East. Meander: the walk's last horizontal heading was West |
| `prm.flag` | 1 | rectangle: this request is for a column, not a row |
| `prm.north` | 1 | rectangle: the region grows North, else South |
| `a` | 8 | linear: PEs still wanted. Rectangle: rows. ACK: PEs claimed |
| `b` | 8 | rectangle: columns |

The four-part form (operation, sub-operation, parameters, operands) follows
the publication. The field widths and codes are this design's own. The 8-bit
operands limit one region to 255 PEs (`OPND_W`).

## Links and handshake

Each controller has five ports: 0..3 are the neighbours N, E, S and W, and
4 is its own PE. Each port has one input and one output link. A link is
`valid`/`ready` with a one-message input slot on the receiving side: `ready`
means the slot is empty. `inv_link_io` holds the slots and the output
registers. An assertion in it checks that a sender keeps a message stable
until the message is taken.

Each controller also drives `avail_out`, which means "I am neither claimed nor
busy", to its four neighbours. Each neighbour sees this as one bit of
`avail_in`. A controller only sends an invasion to a neighbour that shows
free. At the edge of the array, links are tied off and the missing neighbour
shows as not free, so nothing is ever sent off the array. PE (r, c) is
element r*COLS + c of every per-PE port. r grows to the South and c to the
East.

## Linear invasion

A controller that receives `INV LIN a` does one of these:

1. **Rejects it** if it is busy, already claimed, or the command is for a
   rectangle. It answers `REJ` on the port the command came from.
2. **Claims itself and answers `ACK 1`** if a = 1.
3. **Claims itself and forwards `INV a-1`** to one free neighbour, chosen by
   the policy. It remembers the predecessor's port and the successor's port.
   If it has no free neighbour, it rejects instead.

When the successor answers `ACK k`, the controller sends `ACK k+1` to its
predecessor. When the successor answers `REJ`, the controller releases itself
and passes `REJ` back. So a failed request leaves nothing claimed, and the
PE that started it gets one clear answer. `RET` from the predecessor releases
the controller and goes on to the successor. An answer from a port other than
the successor's is dropped, and so is a `RET` from a port other than the
predecessor's.

The policies decide the order in which neighbours are tried. The incoming
port gives the heading. The first PE tries E, S, W, N.

* **STR (straight):** ahead, then a right turn, then a left turn. The walk
  keeps a straight line until it meets the edge or an occupied PE.
* **MEA (meander):** a walk that sweeps row by row. When heading East or
  West: ahead, then South, then North. After a vertical step it turns back
  against its last horizontal heading, which the `west` bit carries along.
  After that it tries ahead, and then the same horizontal heading again.
* **RND (random):** a 16-bit LFSR in each controller picks which free
  neighbour to try first.

These orders are this design's reading of the walks the publication draws.
`tb_ic_array` replays its 5 x 5 examples with the same occupied PEs, and the
STR and meander walks claim exactly the PEs drawn. There is no backtracking:
a chain that runs into a dead end fails and is released, even if another
branch could have found room.

## Rectangular invasion

`INV RECT rows x cols` with a corner direction (`north`, `west`) claims the
first row horizontally. Each PE of that row claims its own column vertically.
All the columns grow at the same time. A row PE sends two commands in the
same cycle:

* the rest of the row, `rows x (cols-1)`, to the horizontal neighbour;
* its column, `(rows-1) x 1` with `flag` set, to the vertical neighbour.

A column PE sends only the vertical command. A PE answers only after all its
successors have answered. If all answered `ACK`, it sends `ACK` with their
sum plus one. If any answered `REJ`, it sends `RET` to the successors that
succeeded, releases itself and answers `REJ`. A neighbour that is missing
or not free fails the request at once.

## Timing of the hard-wired controllers

A controller handles a message in the cycle it arrives and puts the result
in an output register, so every hop costs one cycle on the way out and one
on the way back.

* A linear region of n PEs is answered **2n-1** cycles after the command is
  taken.
* An N x M rectangle is answered **2(N-1) + 2(M-1) + 1** cycles after. For
  example, 3 x 5 takes 13 cycles.

These match the publication's 2 cycles per PE for both hard-wired
controllers, and L_V = L_H = 2 for the rectangle. A controller that wants to
send while its output register is still full (the receiver has not taken the
last message) waits, and raises `stall` for those cycles. It takes no new
message while it waits.

## The programmable controller

`inv_ctrl_prog` has the three parts of the publication's programmable
controller:

* **Register file.** The five port slots and output registers (`inv_link_io`),
  and NREG = 8 data registers of 8 bits. `TAKE` copies the waiting message
  into a received-message register and frees its slot. Each field of that
  message is a separate source operand, and so is the port it came from.
  Outgoing commands are built field by field in an output message register.
  `SEND p` copies that register to port p. Bit 0 of R7 is the claim flag: it
  drives `invaded` and, together with `pe_busy`, `avail_out`.
* **Execution unit.** NUM_FU functional units (1 by default) working in
  parallel. The operations are `MOV ADD SUB AND OR XOR SHL SHR CMP BIT SEND
  TAKE`. Sources are R0..R7, an immediate, the message fields, the arrival
  port, `avail_in`, the free output registers and the LFSR.
* **Control unit.** A program counter and an IMEM_DEPTH-line instruction
  memory (64 by default). Each instruction carries a branch. Its condition is
  one product term over eight flags: zero and sign of FU0, message waiting,
  PE busy, and the four neighbour-free bits. The condition is evaluated in
  the same cycle. Each FU slot is predicated *always*, *if*, *if not* or
  *never* on that condition, so a one-line if-then-else is possible.

Instruction word (`inv_prog_pkg`): a 26-bit control part `{br, cmask, cval,
target}` and one 28-bit slot per FU `{pred, op, dst, srca, srcb, imm}`. An
instruction runs in one cycle. If its `SEND` finds the output register full,
the whole instruction waits (`stall`). The program is written through
`imem_we/imem_addr/imem_wdata` while `run` is low. `run` high starts it at
line 0. In `ic_array` the program port is shared by all controllers.

The condition always tests the flags left by the *previous* instruction. So
the usual pattern is a compare, followed by an instruction that branches on
the compare and does the next piece of work at the same time.

`tb/tb_inv_programs.sv` holds a small two-pass assembler (labels resolved in
the second pass) and the two programs. Both use the same message protocol as
the hard-wired controllers:

* **meander** (60 lines): the MEA walk above. Measured: 23 cycles from taking
  an invasion to forwarding it, and 10 cycles from taking the answer to
  passing it back. A 15-PE meander takes 520 cycles end to end, 34.7 cycles
  per PE. The publication reports 35.
* **rect** (63 lines): the rectangle above. A 3 x 4 rectangle takes 232
  cycles. That is slower than the publication's L_V = 27, L_H = 23, which give
  27*3 + 23*4 = 173. Most of each step goes on checks and on building
  the two outgoing commands one field at a time.

## Files

| file | contents |
|---|---|
| `rtl/inv_pkg.sv` | command format, directions, policies |
| `rtl/inv_link_io.sv` | input slots, output registers, handshake assertion |
| `rtl/inv_lfsr.sv` | 16-bit Galois LFSR for the random policy |
| `rtl/inv_ctrl_lin.sv` | hard-wired linear controller |
| `rtl/inv_ctrl_rect.sv` | hard-wired rectangular controller |
| `rtl/inv_prog_pkg.sv` | instruction format of the programmable controller |
| `rtl/inv_ctrl_prog.sv` | programmable controller |
| `rtl/ic_array.sv` | ROWS x COLS mesh of one flavour |
| `rtl/invasion_mppa.sv` | top: one plane per flavour |
| `tb/tb_inv_programs.sv` | assembler and the meander and rectangle programs |
| `tb/tb_inv_ctrl_lin.sv`, `tb/tb_inv_ctrl_rect.sv`, `tb/tb_inv_ctrl_prog.sv` | single-controller tests, ports driven directly |
| `tb/tb_ic_array.sv` | the 5 x 5 example walks, regions and latencies |
| `tb/tb_invasion_mppa.sv` | end-to-end test of the top at its default size |
| `tb/tb_success_ratio.sv` | success ratio of the linear policies against the claim ratio |

## Simulating

With Verilator 5, from the project root. Packages come first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/inv_pkg.sv rtl/inv_prog_pkg.sv tb/tb_inv_programs.sv \
  rtl/inv_link_io.sv rtl/inv_lfsr.sv rtl/inv_ctrl_lin.sv rtl/inv_ctrl_rect.sv \
  rtl/inv_ctrl_prog.sv rtl/ic_array.sv rtl/invasion_mppa.sv \
  tb/tb_invasion_mppa.sv --top-module tb_invasion_mppa
./obj_dir/Vtb_invasion_mppa
```

Swap the last file and the top module to run another testbench. Each
testbench prints `TB_RESULT checks=N failures=M`.

The testbenches check:

* **Single-controller tests:** every policy decision, the one-cycle steps of
  the hard-wired controllers, and every answer, reject and retreat path. For
  the programs they also check the step times.
* **`tb_ic_array`:** the drawn STR and meander regions with the drawn
  occupied PEs, the 29-cycle answer for 15 PEs, random walks, a request
  larger than the free area, and rectangles in two corner directions with
  the 13-cycle answer.
* **`tb_invasion_mppa`:** runs all three planes at the default size. This
  covers concurrent requests from the four corners, random busy PEs, a stall
  behind an untaken answer, and release after failure. It checks that the
  programmable plane claims exactly the PEs the hard-wired planes claim. It
  counts each mechanism and fails if any never happened.

## Success ratio of the linear policies

`tb_success_ratio` repeats the publication's success-ratio experiment on
the 5 x 5 linear plane. Each trial occupies a random 0 to 40 % of the PEs
and starts a request for R_clm x 25 PEs from a random free PE. The same
occupation is then tried with each policy. A trial succeeds when exactly
that many PEs are claimed. A typical run, 400 trials per claim ratio, gives
these success rates in %:

| R_clm | 10 % | 30 % | 50 % | 70 % | 90 % |
|---|---|---|---|---|---|
| STR | 92 | 64 | 34 | 19 | 7 |
| RND | 92 | 63 | 30 | 15 | 2 |
| MEA | 92 | 64 | 33 | 12 | 3 |

Success falls steeply with the claim ratio, and the random walk is the
weakest, as the publication reports. Here the meander walk does not beat the
straight walk, although the publication finds it the best linear policy.
This array is small, the walks never backtrack, and the turn orders are
this design's own. Any of these may account for the difference. The size of
the publication's array is not known here.

## How this relates to the published design, and its limits

* The publication builds an array from a single controller flavour. This top
  holds one plane of each, so that all three are built and tested.
* The message encoding, the handshake, the neighbour orders of the policies,
  the first PE's order, reporting the count in `ACK`, release on failure, and
  the whole instruction set and encoding of the programmable controller are
  this design's own. The publication fixes none of them.
* The programmable controller's instruction memory is a register array. The
  publication uses a block RAM.
* No backtracking: a linear walk that reaches a dead end fails as a whole.
* Two requests that meet can both fail, each having taken PEs the other
  needed. Nothing arbitrates between them.
* No region may exceed 255 PEs with 8-bit operands. Arrays larger than
  5 x 5 are a parameter change. The speedup study of the publication goes up
  to 1000 PEs and would need a wider `OPND_W` as well.
* The processing elements and the centralized software baseline the
  publication compares against are not part of this RTL.
* Lint notes: verilator reports `SYNCASYNCNET`, because the handshake
  assertion samples `rst_n` in its disable clause while the flops use it as an
  asynchronous reset. It also reports unused bits: the high LFSR bits, the
  direction MSB, the unused program counter output in the array, and the
  program port of the hard-wired planes. None of these is a circuit fault.
