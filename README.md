# List processor: summing a linked list, from direct RTL to a pipelined datapath

The problem: a memory holds a singly linked list of 8-bit two's-complement
numbers. Each node is two consecutive bytes, a pointer to the next node
followed by the number. The first node is always at address 0, the last node's
pointer is 0, and the list has at least one node. A circuit must walk the list
and return the sum of the numbers. The memory has one port, an 8-bit address
and an 8-bit data bus, and reads asynchronously: data follows the address
within the same cycle, but only one access per cycle is possible.

This repository implements that circuit six times. Each version is a step of
the classic controller-plus-datapath refinement of the problem as taught in
UC Berkeley's EECS151/251A (Spring 2018, Lecture 16, "Register Transfer
Language, List Processor Example, Design Optimization"). The first version is
the direct translation of the algorithm. Each later version moves, shares or
pipelines work to shorten the clock period or the cycle count:

| version | module | idea | cycles per node | latency, START edge to DONE | critical path (lecture's component delays) |
|---|---|---|---|---|---|
| 1 | `list_proc1` | direct implementation | 2 | 2k+1 | 31 ns |
| 2 | `list_proc2` | add a NUMA register so the address add moves out of the long cycle | 2 | 2k+1 | 23 ns |
| 3 | `list_proc3` | version 2 with its two adders merged into one | 2 | 2k+1 | 23 ns |
| 4 | `list_proc4` | pipelined: X and NUMA act as pipeline registers, no cycle has a read followed by an add | 2 | 2k+2 | 13 ns |
| 4a | `list_proc4a` | version 4 for nodes at even addresses: no address add, the controller supplies the low address bit | 2 | 2k+2 | not given |
| 5 | `list_proc5` | nodes aligned to even addresses and a 16-bit memory: a whole node per read | 1 | k+2 | not given |

Version 4 is the end point of the refinement. Versions 4a and 5 are further
variants that only apply when the nodes can be aligned. The two small
register-transfer examples that introduce the method are also included
(`rt_acc_example`, `rt_abc_example`). The top level, `lecture16_top`, places
everything side by side.

The clock periods in the table come from the lecture's component library:
register clk-to-Q 0.5 ns, setup 0.5 ns, 2:1 mux 1 ns, memory read 10 ns,
n-bit adder 2·log2(n)+2 ns (8 ns at 8 bits, 10 ns at 15 bits), zero compare
0.5·log2(n) ns. They are not properties of this RTL, which has no timing of
its own; they explain why each step is made.

## The algorithm and the register-transfer notation

The behaviour is written as register transfers. A comma joins transfers that
happen in the same clock cycle; a semicolon separates cycles. Version 1 is

    if (START) NEXT <- 0, SUM <- 0;
    repeat {
        SUM  <- SUM + Memory[NEXT+1];      -- cycle COMPUTE_SUM
        NEXT <- Memory[NEXT];              -- cycle GET_NEXT
    } until (NEXT == 0);
    R <- SUM, DONE <- 1;

NEXT points at the current node and SUM accumulates. Every transfer becomes a
register with a clock enable (`ce_reg`) fed by a 2:1 mux, and the controller
is a state machine whose states are the cycles of this program. `R` is the SUM
register itself.

### Number width

The numbers are 8 bits, but SUM is 15 bits (`lp_pkg::SUM_W`). An 8-bit
address space holds at most 128 two-byte nodes, and 128 numbers in
−128…127 sum to −16384…16256, which fits 15 bits. The lecture's timing
analysis uses a 15-bit adder for SUM for the same reason. One figure of the
lecture draws the R output 8 bits wide; this implementation follows the
15-bit adder. Numbers are sign-extended into the adder.

### START, DONE and reset

START is sampled on the rising edge. START=1 sends every controller to its
initial state from any state, so START doubles as the reset. There is no
other reset: like the lecture's registers, the datapath registers have none,
and outputs mean nothing before the first START. A START during a run
abandons the run and starts over. DONE stays high, with R holding the sum,
until the next START. The latencies in the table count rising edges from the
last edge at which START=1 to the edge after which DONE is 1; k is the number
of nodes.

## Version 1: direct implementation (`list_proc1`)

`lp1_datapath` has the registers NEXT and SUM, an 8-bit incrementer that
forms NEXT+1, an address mux (A_SEL: 0 selects NEXT, 1 selects NEXT+1), the
SUM adder, and muxes that load either zero or the new value (SUM_SEL,
NEXT_SEL). NEXT_ZERO is the zero compare on the value presented to NEXT, that
is, on the pointer being read in GET_NEXT. The controller therefore decides
to stop in the same cycle that fetches the last pointer.

`lp_ctrl` is a one-hot state machine with four flip-flops:

| state | LD_SUM | SUM_SEL | LD_NEXT | NEXT_SEL | A_SEL | DONE | next state |
|---|---|---|---|---|---|---|---|
| START | 1 | 0 | 1 | 0 | 0 | 0 | COMPUTE_SUM if START=0 |
| COMPUTE_SUM | 1 | 1 | 0 | 0 | 1 | 0 | GET_NEXT |
| GET_NEXT | 0 | 0 | 1 | 1 | 0 | 0 | DONE if NEXT_ZERO, else COMPUTE_SUM |
| DONE | 0 | 0 | 0 | 0 | 0 | 1 | DONE |

START=1 overrides every transition. The START flip-flop simply samples the
START input. It also drives an ADD_SEL output (equal to COMPUTE_SUM) that
only version 3 uses. An assertion checks that the state stays one-hot once it
is one-hot.

COMPUTE_SUM is the slow cycle: it contains the 8-bit add (NEXT+1), the
address mux, the memory read, the 15-bit add and the SUM mux in series
(0.5+8+1+10+10+1+0.5 = 31 ns).

## Version 2: moving the address add (`list_proc2`)

A register NUMA holds the address of the current node's number, so COMPUTE_SUM
no longer has to compute it:

    if (START) NEXT <- 0, SUM <- 0, NUMA <- 1;
    repeat {
        SUM <- SUM + Memory[NUMA];
        NUMA <- Memory[NEXT] + 1, NEXT <- Memory[NEXT];
    } until (NEXT == 0);

NUMA shares the enable (LD_NEXT) and the select (NEXT_SEL) of NEXT: it loads
1 in START and Memory[NEXT]+1 in GET_NEXT. The address mux now picks NEXT or
NUMA. The controller is unchanged. COMPUTE_SUM drops to 23 ns and GET_NEXT
grows to 21 ns (read, then 8-bit add).

## Version 3: one shared adder (`list_proc3`)

After version 2 each loop cycle adds exactly once, so one adder serves both.
Its first operand is the memory data. Its second is chosen by ADD_SEL: SUM in
COMPUTE_SUM, the constant 1 in GET_NEXT. The adder is 15 bits wide; NUMA
takes its low 8 bits, which equal the 8-bit D+1. The cost drops by an adder
and grows by one mux; the clock period is unchanged.

## Version 4: the pipelined list processor (`list_proc4`)

This is the version whose working is least obvious. In versions 1-3 every
loop cycle still does a memory read and then an add, in series. Version 4
adds a register X for the fetched number and re-splits the loop so that no
cycle does both in series:

    step 1:  X <- Memory[NUMA],   NUMA <- NEXT + 1;
    step 2:  NEXT <- Memory[NEXT], SUM <- SUM + X;

In each step the memory and the adder work on different nodes, so up to
three list iterations are in flight at once. Cycle by cycle, for nodes
0 … k−1 (node i's number is x_i, node i+1's address a_{i+1}):

| cycle | state | memory reads | adder computes |
|---|---|---|---|
| 1 | INIT | – | – (NEXT=0, NUMA=1, SUM=0, X=0) |
| 2 | STEP2 | pointer of node 0: NEXT=a_1 | SUM + X, with X=0 |
| 3 | STEP1 | x_0 into X | NUMA = a_1 + 1 |
| 4 | STEP2 | pointer of node 1: NEXT=a_2 | SUM + x_0 |
| 5 | STEP1 | x_1 into X | NUMA = a_2 + 1 |
| … | … | … | … |
| 2k+1 | STEP1 | x_{k−1} into X (NEXT is now 0) | (unused) |
| 2k+2 | LAST | – | SUM + x_{k−1} |

Both the memory and the single adder are busy in every loop cycle. The rate is still
2 cycles per node, but the clock period becomes max(read, add) plus mux and
register overhead: 0.5+1+10+1+0.5 = 13 ns for both steps.

`lp4_datapath` has NEXT, NUMA, X and SUM, all clock-enabled. One 15-bit adder
takes ADD_SEL1 (SUM or 1) and ADD_SEL2 (X sign-extended, or NEXT
zero-extended). NEXT loads 0 or the memory data. NUMA loads 1 or the adder's
low 8 bits; as in the lecture's diagram, its mux is steered by NEXT_SEL. X
loads 0 or the memory data. The address mux picks NEXT (A_SEL=0) or NUMA
(A_SEL=1). Here NEXT_ZERO tests the NEXT register's output.

`lp4_ctrl` (binary-encoded enum) has five states:

| state | transfers | next state |
|---|---|---|
| INIT | NEXT <- 0, NUMA <- 1, SUM <- 0, X <- 0 | STEP2 |
| STEP2 | NEXT <- Memory[NEXT], SUM <- SUM + X | STEP1 |
| STEP1 | X <- Memory[NUMA], NUMA <- NEXT + 1 | LAST if NEXT_ZERO, else STEP2 |
| LAST | SUM <- SUM + X | DONE |
| DONE | DONE = 1 | DONE |

Entering the loop at STEP2 is what fills the pipeline. After the first STEP2
the registers hold x=0, numa=1, sum=0 and next=Memory[0], the loop's required
starting point. STEP2 then adds a harmless 0. The exit works as follows. When
STEP1 finds NEXT=0, the node whose number it is fetching is the last one. So
STEP1 is allowed to finish, and LAST adds that final number. The lecture
specifies the loop, the initial register values and the count of control
states outside the loop: one to initialise and two to finish. The placement
of the exit test in STEP1 and the choice of LAST and DONE as the two
finishing states are this implementation's reading of that specification.

## Version 4a: aligned nodes, byte-wide memory (`list_proc4a`)

If every node starts at an even address, node p's pointer is at
{p[7:1], 0} and its number at {p[7:1], 1}. The number's address therefore
needs no add. NUMA becomes a plain copy of NEXT, and the low address bit is
simply A_SEL:

    step 1:  X <- Memory[{NUMA[7:1],1}],  NUMA <- NEXT;
    step 2:  NEXT <- Memory[{NEXT[7:1],0}], SUM <- SUM + X;

`lp4a_datapath` is driven by the unchanged `lp4_ctrl`, so timing and latency
are those of version 4. Its single adder only accumulates. NUMA loads 0 in
INIT, so the first number is read at address 1.

## Version 5: aligned nodes and a 16-bit memory (`list_proc5`)

If every node starts at an even address, a memory with a 16-bit data port
returns a whole node per read. NUMA and its add disappear and the loop is one
cycle:

    {NEXT, X} <- Memory[NEXT], SUM <- SUM + X;

X is still a pipeline register: a number is added the cycle after it is read.
The memory word address is NEXT without its low bit. The even (pointer) byte
is in bits [7:0], the odd (number) byte in bits [15:8]. The end of the list is
detected by a zero compare on the pointer byte being read. The controller is
INIT (clear NEXT, X and SUM), LOOP, LAST (add the final X) and DONE. Only the
loop line above comes from the lecture; the word layout, the zero test and
the extra states are this implementation's choices. Lists whose nodes are at
odd addresses give wrong results on this version.

## Building blocks

- `ce_reg`: an n-bit register with clock enable and no reset. It loads D on an
  edge with CE=1 and holds otherwise.
- `list_mem`: the list memory, `DATA_W` × 2^`ADDR_W` bits (default 8 × 256).
  It has one address port, combinational read data, and a clocked write with
  byte enables. The processors never write. The write exists so that a host
  can load a list.
- `lp_pkg`: widths (`DATA_W`=8, `ADDR_W`=8, `SUM_W`=15) and the control
  bundles `lp_ctrl_t` (versions 1-3) and `lp4_ctrl_t` (version 4).

## The two register-transfer examples

`rt_acc_example` implements the datapath of three registers R0, R1 and ACC.
R0 and R1 are each fed by a mux that either recirculates the register
(select 1) or takes a shared bus (select 0). Bus mux S3 picks the output of
S2 or ACC. Mux S2 picks R0 or R1 and feeds the adder, whose other operand is
ACC. A three-step controller repeats:

    ACC <- ACC + R0, R1 <- R0;
    ACC <- ACC + R1, R0 <- R1;
    R0 <- ACC;

`load` sets the three registers from `*_init` and restarts at the first step.
While `run`=1 one step is done per cycle; with `run`=0 everything holds. ACC
has a clock enable so that it holds in the third step. The original datapath
drawing shows ACC without one.

`rt_abc_example` implements the datapath that the program
`regA <- IN; regB <- IN; regC <- regA + regB; regB <- regC;` implies. IN fans
out to regA and regB, an adder combines regA and regB into regC, and regB
takes its input from a mux that selects IN or regC. A five-state controller
(IDLE and one state per transfer) runs the four transfers in four cycles
after `start`. `done` is high in IDLE and `rst` is synchronous.

In both examples the 8-bit width and the handshakes (`load`, `run`, `start`,
`rst`, `done`) are this implementation's choices.

## Top level (`lecture16_top`)

Versions 1-4 and 4a each get a 256-byte `list_mem`. Version 5 gets a 16-bit ×
128-word `list_mem`. One load port (`load_we`, `load_addr`, `load_data`)
writes each byte into every memory, into the matching byte lane of the 16-bit
memory. A mux in front of each memory's single address port gives the load
priority, so load only while the processors are idle or done. `start` is
shared. `done[0..3]` and `r[0..3]` belong to versions 1-4, `done[4]`/`r[4]`
to version 5 and `done[5]`/`r[5]` to version 4a. The register-transfer
examples have their own `acc_*` and `abc_*` ports. Parameter `RT_W` (default
8) is their width.

## Verification

Each testbench in `tb/` checks the outputs against values it computes
itself. It ends by printing `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

- `tb_list_proc1` … `tb_list_proc5` and `tb_list_proc4a` run the shared
  harness `lp_harness` on one version each. Every test builds a random list, starts the processor, and
  checks R and the exact latency from the table above, and then that DONE and
  R hold. The lists include:
  - a single node;
  - 128 nodes filling every even address, all −128 (sum −16384) and all +127
    (sum +16256);
  - random lengths and placements, with odd addresses for versions 1-4.

  Some runs hold START for several cycles. Others are restarted in mid-run.
- `tb_lp_ctrl` compares every output of the one-hot controller, every cycle,
  with a reference state machine under random START and NEXT_ZERO.
- `tb_ce_reg`, `tb_list_mem`, `tb_rt_acc_example` and `tb_rt_abc_example`
  test those blocks against models written in the testbench.
- `tb_lecture16_top` exercises the whole top level at its default parameters.
  It loads lists through the load port, checks all six processors on each
  list (aligned lists, which all six can run, and unaligned lists for
  versions 1-4), and then runs both register-transfer examples. It counts
  each case (single node, full memory, negative sum, restart, long START,
  unaligned list) and fails if one never occurred.
- `tb_example_list` runs a four-node list with nodes at 0x00, 0x05, 0x0E and
  0x0A. Versions 1-4 must return its sum in 9 cycles (versions 1-3) or
  10 cycles (version 4).

With Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/lp_pkg.sv tb/tb_lecture16_top.sv --top-module tb_lecture16_top
    ./obj_dir/Vtb_lecture16_top +verilator+rand+reset+2

Read `rtl/lp_pkg.sv` first; the other files are found through `-y`.

## Limits and departures

- The clock-period figures are analysis results of the lecture, not
  measurements of this RTL.
- SUM and R are 15 bits wide, not the 8 bits drawn on R in the lecture's
  block diagram.
- No reset: START is the only initialisation, as in the lecture.
- The memory write port, the load multiplexer, the controllers of versions 4
  and 5, and the details of version 4a are this implementation's additions
  or readings. The same
  holds for the ACC enable in the first register-transfer example and for the
  handshakes of both examples.
- Resource-usage figures and cost comparisons from the lecture are not
  reproduced.
