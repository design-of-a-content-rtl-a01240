# CBADP: an associative dataflow processor for complex binary numbers

This design is a small parallel processor that evaluates dataflow graphs whose
values are complex numbers. It rests on two ideas.

- **Complex binary numbers.** A complex number is kept as one string of bits in
  base (-1+j): digit k weighs (-1+j)^k. There is no separate real and imaginary
  word and no sign bit. For example, `1` is 1, `11` is j, `111` is -j,
  `11101` is -1 and `1100` is 2. One adder and one multiplier handle whole
  complex numbers.
- **Associative dataflow.** A classic dataflow machine sends operand tokens
  between instructions and matches them one by one. Here every graph node is
  one word of a content-addressable memory (CAM). The graph is first *searched*:
  each parent node finds all its children with one parallel CAM search. It is
  then *executed* level by level. Up to four nodes of a level run at the same
  time on four complex binary ALUs, and each result is written straight into
  its parent's operand field.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). The top module is
`cbadp`.

## Complex binary arithmetic

Most of what is unusual in this design is the arithmetic, so it comes first.

### Addition

The digit rules are 0+0 = 0, 0+1 = 1 and 1+1 = `1100`. Two ones in position n
leave a 0 in position n and carry a 1 into position n+2 **and** a 1 into
position n+3 (2 = (-1+j)^3 + (-1+j)^2). Carries therefore travel upwards by two
and three places. A chain of carries can also cancel itself out completely:
`11 + 111 = 0` (the "zero rule", the counterpart of 1 + 111...1 = 0 in two's
complement).

`cbns_adder` works on whole words. It forms the sum digits as `a ^ b` and the
carry positions as `a & b`, shifted up by 2 and by 3. That leaves three words.
Each later pass reduces three words digit by digit: the XOR gives the new sum
digits, and any position holding two or more ones makes the next pair of
carries. Every pass moves the lowest carry up by at least two places, so after
W/2 + 2 passes no carry is left inside a W-digit word. The result is exact
modulo (-1+j)^W, which is the same wrap-around behaviour as a two's-complement
adder. It is a purely combinational array of W/2 + 2 layers of 3-input
XOR/majority gates.

### Other operations (`cbalu`)

| opcode | name  | result          | how it is formed                            |
|-------:|-------|-----------------|---------------------------------------------|
| 0      | PASSA | A               |                                             |
| 1      | ADD   | A + B           | one adder                                   |
| 2      | SUB   | A - B           | A + (B x `11101`)                           |
| 3      | MUL   | A x B           | shift and add, one digit of B per clock     |
| 4      | NEG   | -A              | A x `11101` = A + A<<2 + A<<3 + A<<4        |
| 5      | MULJ  | j x A           | A x `11` = A + A<<1                         |
| 6      | MULNJ | -j x A          | A x `111` = A + A<<1 + A<<2                 |
| 7-10   | AND, OR, XOR, NOT | bitwise |                                   |
| 11     | PASSB | B               |                                             |
| 12     | CONV  | re + j·im       | `cbns_convert`, see below                   |

CONV takes `re` from the low 12 bits of A and `im` from the low 12 bits of B.
Both are ordinary two's-complement integers. The result is the same complex
number in base (-1+j).

Operands and results have 24 digits (`DATA_W`). Inside the ALU, sums are formed
10 digits wider and products 2x24+10 digits wide. That is enough to hold every
exact result: a sum or difference of two n-digit numbers needs at most n+8
digits, and a product at most 2n+5. So the flags describe the exact result:

- **overflow**: the exact result needs more than 24 digits. The 24-digit
  result is then the exact value modulo (-1+j)^24.
- **carry**: for ADD and SUB only, a carry left the top digit during the
  addition. This can happen without overflow: under the zero rule the carries
  run off the top and the result is still exact.
- **zero**: the result is 0.
- **negative**: the real part of the result is below zero. Complex numbers have
  no sign, so this is one possible choice.

Timing: `start` is accepted when `busy` is low. Every opcode except MUL
delivers its result and flags with a one-cycle `done` pulse in the next cycle.
MUL takes 24 + 2 = 26 cycles from `start` to `done`.

**Left out:** division, and arithmetic on fractions. The ALU's
24 digits all lie above the radix point. `cbns_convert` can produce
fractional digits, but the ALU cannot hold or compute with them.
Division would be done as a reciprocal by Newton-Raphson,
z(i+1) = z(i)(2 - w z(i)), starting from (-1+j)^-k and, if that fails to
converge, from j(-1+j)^-k. It needs a fixed-point format and a convergence
test that are not specified. The original instruction set has 21 instructions
and room for 64 (6-bit opcode). Only the 13 operations above exist here, with
this design's own numbering.

### Converting ordinary numbers (`cbns_convert`)

The converter takes a real and an imaginary part, each a two's-complement
fixed-point number: `IN_W` integer bits (12) and `FRAC_W` fraction bits (4).
It returns one complex binary string with 2·`FRAC_W` digits after the radix
point, so `z[2*FRAC_W]` is the units digit.

A non-negative integer N is converted in four steps:

1. Write N in base 4. Each pair of bits is one digit.
2. Negate every digit in an odd position. This gives a base -4 number with the
   same value.
3. Normalize the digits to 0..3, going from the lowest digit upwards.
   - A negative digit gets 4 added, and 1 is added to the digit on its left.
   - A digit of 4 becomes 0, and 1 is taken from the digit on its left.
4. Replace each base -4 digit with four complex binary digits:
   0 → `0000`, 1 → `0001`, 2 → `1100`, 3 → `1101`.
   This works because (-1+j)^4 = -4.

A fraction is a sum of powers of 1/2. Each 2^-i whose bit is set is replaced
by its complex binary string, and the strings are added:

| value | string       |
|-------|--------------|
| 1/2   | `1.11`       |
| 1/4   | `1.1101`     |
| 1/8   | `0.000011`   |
| 1/16  | `0.00000001` |

Since (-1+j)^2 = -2j, 2^-i is (-j)^i moved 2i places to the right. So the four
strings repeat, eight places further right, for 1/32 to 1/256, and so on. The
integer and fraction strings of one magnitude are added.

Signs and the imaginary part are handled with multiplications:
- A negative real part is converted as |re| and then multiplied by `11101` (-1).
- The imaginary part is converted as |im| and then multiplied by `11` (j) or
  by `111` (-j).
- The two parts are then added.

Each multiplication by a constant is a few shifted additions. The block is
combinational. Its 48 output digits hold every exact result: 12-bit integer
parts need at most 36 digits above the point.

The ALU's CONV opcode uses the same block with no fraction bits, since the
ALU datapath holds integers only. There, `overflow` is set when the result
does not fit in 24 digits.

## The node word

The associative memory holds 64 words of 80 bits. An action node (an
arithmetic or logic operation) uses all 80 bits. A control node (a branch) uses
only the first 18, which are laid out the same way in both kinds of word, so one
search can look at both. This layout is this design's own. Field names are in
`cbadp_pkg::node_word_t`.

| bits    | field      | meaning                                                      |
|---------|------------|--------------------------------------------------------------|
| 79      | is_action  | 1 = action node, 0 = control node                            |
| 78      | enable     | node may fire                                                |
| 77:74   | level      | level in the inverted graph, 0 = root                        |
| 73:68   | node_id    | node number                                                  |
| 67:62   | parent_id  | action: node that takes the result; control: node it enables |
| 61      | slot       | result goes to parent's operand A (0) or B (1)               |
| 60:55   | opcode     | see the table above                                          |
| 54, 53  | a_rdy, b_rdy | operand present                                            |
| 52:48   | (reserved) |                                                              |
| 47:24   | opa        | operand A, 24 complex binary digits                          |
| 23:0    | opb        | operand B                                                    |

The 24-digit operand width follows from the 80-bit word: two operands and the
32 header bits must fit.

## The two phases

Levels are numbered from the root: the root (the node that produces the final
result) is at level 0, and the nodes that feed it are at level 1, and so on.
The graph may have up to 16 levels (4-bit level numbers). The memory is sized
for up to four nodes per level. The loader (the host) writes the levels into
the words, and writes the highest level into the level register.

### Search phase (`cu_sp`)

The search phase starts at level 0 and goes up to the highest level. The
4-bit level incrementer advances the level. At each level:

1. One search (comparand: the level, mask: the level field) finds every node of
   the level. The responders are kept as that level's list of parents.
2. The parents are visited one at a time, lowest address first. Each visit
   counts the node counter up and reports a `NODE_FOUND` event.
3. For an action-node parent below the highest level, a second search finds all
   its children at once. Children are the action nodes whose `parent_id` is the
   parent's number and whose level is one more (the incrementer's output goes
   into the comparand). Each child is recorded in a child→parent link table and
   reported with a `CHILD_LINK` event.

At the end, the node count goes into the counter-value register. A search that
finds no node at level 0 is unsuccessful: `sp_error` pulses with `sp_done`, and
the counter-value register is left marked not valid.

### Execution phase (`cu_ep`)

The execution phase starts at the highest level and steps down to level 0. The
same level unit decrements the level. At each level:

1. **Control nodes.** One search finds the level's *enabled* control nodes.
   Each one fires in turn: a search for its target's node number finds the
   target, and the target's `enable` bit is set (`CTRL_FIRED` event). This is
   how branches work. The host enables or inhibits control nodes before the
   phase starts. Only the action node behind an enabled control node becomes
   able to run. Since execution moves towards the root, a control node must sit
   at a higher level than its target.
2. **Action nodes.** One search finds the level's action nodes that are enabled
   and have both operands present (the dataflow firing rule). Up to four of
   them are read and started together, one per ALU, in the same cycle. When all
   started ALUs have signalled `done`, each result is written into its parent's
   operand field A or B (using the node's slot bit and the link table), with
   that operand's present bit set (`NODE_EXEC` event). If more than four nodes
   are ready, they are issued in groups of four.

Every fired control node and every executed action node counts the node counter
down. After a complete run the counter shows how many nodes did not run (for
example, inhibited branches). Each ALU's last result and flags also stay in its
output register (ZR0..ZR3) and flags register (FR0..FR3). The root runs alone at
level 0 on ALU0, so the graph's final result is in ZR0/FR0. It is also in the
root's word.

The order of steps in both phases is this design's own reading of how an
associative dataflow machine runs. The original control units were written as
24 and 23 control steps, which are not published. Cycle costs: a comparand
load, a search and taking the responders cost 1 cycle each. Each visited node,
linked child and fired control node costs 1 cycle. Each group of ALUs costs
1 cycle per issued node, 1 to start, the ALU latency and 1 cycle per
write-back.

## Level unit and node counter

Both are built gate for gate from published sum-of-products equations.

`level_incdec` takes X0..X3 (X0 = MSB) and E (0 = up, 1 = down) and gives
L0..L3. For example, L2 = E xor X2 xor X3 and L3 = X3'. The last term of the
equations for L0 and L1 applies to both directions. Read that way, the
equations give exactly +1/-1 modulo 16.

`updown_counter` is the 6-bit node counter, state x2..x7 (x2 = MSB), direction
x1 (0 = up). Two of the published terms do not give a counter as printed. They
are replaced as follows:

- In y1's up-count bracket, the product x2.x4.x5.x6.x7 becomes
  x3'.x4.x5.x6.x7. With x2, the count would go from 15 to 0 and from 63 to 16.
- y0's down-count bracket becomes x3 + x5 + x6 + x7. With the shared
  x2.(x4 xor x5) term, this gives y0 = x2 xor x3'.x4'.x5'.x6'.x7'.

All other terms are used as published. Both units are tested against a plain
+1/-1 count for every input.

The counter is 6 bits wide, so a graph of exactly 64 nodes counts to 0.

## Blocks and files

| file                         | block                                                 |
|------------------------------|-------------------------------------------------------|
| `rtl/cbadp_pkg.sv`           | sizes, word layout, opcodes, flags, CAM command and event types |
| `rtl/cbadp.sv`               | top: everything below wired together, host port       |
| `rtl/assoc_memory.sv`        | CAM: comparand and mask registers, 64x80 array, responder |
| `rtl/control_unit.sv`        | the two sequencers, the link table, phase interlock   |
| `rtl/cu_sp.sv`, `rtl/cu_ep.sv` | search-phase and execution-phase sequencers         |
| `rtl/cbpu.sv`                | processing unit: four `cbalu`                         |
| `rtl/cbalu.sv`               | complex binary ALU                                    |
| `rtl/cbns_adder.sv`          | complex binary adder array                            |
| `rtl/cbns_convert.sv`        | fixed-point to complex binary conversion              |
| `rtl/level_incdec.sv`        | 4-bit level incrementer/decrementer                   |
| `rtl/updown_counter.sv`      | 6-bit node counter                                    |
| `rtl/level_register.sv`      | highest level of the graph                            |
| `rtl/counter_value_register.sv` | node count of the last successful search           |
| `rtl/flags_registers.sv`     | FR0..FR3                                              |
| `rtl/output_registers.sv`    | ZR0..ZR3                                              |

The connections follow the published block diagram. The level register feeds
the control unit. The control unit drives the memory, the processing unit, the
level unit and the counter. The counter feeds the counter-value register. The
ALUs feed the flags and output registers. The input/output system that loads
the processor and reads the registers is not part of this RTL; its side is the
`cbadp` host port.

The published diagram also draws a path from the flags registers back into the
processing unit, without saying what it is for. No operation here takes a flag
as an input, so that path is absent. The path from the level unit to the
memory runs through the control unit, which loads the new level into the
comparand register. ALU results reach the memory the same way.

Additions of this design, beyond the published description:
- occupied bits in the CAM, with multiple-response resolution (lowest address
  first);
- bit-selective writes to the CAM;
- the child→parent link table;
- the valid bit of the counter-value register;
- the event stream, which stands in for the interrupts the host receives.

## Using the top module

Sizes are constants in `cbadp_pkg` (64 words, 80-bit words, 4 ALUs, 4-bit
levels, 6-bit counter, 24-digit data). They are tied together by the word
layout, so they are not module parameters.

To run a graph:

1. Pulse `io_clear`. Then write each node word with `io_wr_en`, `io_wr_addr`
   and `io_wr_data`. Any address will do.
   - Operands that come from a child node: leave the field 0 and its `*_rdy`
     bit 0.
   - Constant operands: set the value and `*_rdy` = 1.
   - Single-operand opcodes: still set `b_rdy` = 1.
2. Load the highest level: `io_level_load` with `io_level`.
3. Pulse `io_sp_start` and wait for `sp_done`. `counter_value` then holds the
   node count.
4. Pulse `io_ep_start` and wait for `ep_done`. Read the result from `zr[0]` and
   `fr[0]`, from `io_zr_data`/`io_fr_data` (selected by `io_reg_sel`), or from
   the root word via `io_rd_addr`/`io_rd_data`.

Other rules:
- Writes and level loads are ignored while a phase runs.
- A start request for one phase is ignored while the other phase runs.
- `ev` is valid for one cycle at a time: code, node number, memory address.
- Reset is asynchronous and active low. It does not clear the memory array
  itself, only its occupied bits.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/cbns_ref_pkg.sv`, which converts complex binary strings to Gaussian
integers (re + j·im) and back by repeated division by (-1+j). It never uses
the RTL's adder.

- `tb_cbadp` runs the whole processor at its real sizes. It runs the
  a+b+c+d graph, a 16-level graph of 59 nodes, 40 random graphs (random
  opcodes, random addresses, levels with more than four nodes), a branch
  chosen by control nodes, the zero rule and a failed search. It checks every
  node's operand fields after execution, the root result and flags, the
  execution order and the counter. It also counts the mechanisms it exercises
  and fails if one never occurs.
- `tb_control_unit` checks the exact event sequence of both phases for a small
  graph.
- `tb_cbns_convert` converts every 16-bit fixed-point real part and every
  imaginary part, plus random pairs, and compares each result with the
  reference. It also checks the four fraction strings directly.
- The other testbenches check one block each (the ALU including its 1-cycle
  and 26-cycle latencies, the CAM against a reference search, the level unit
  and counter for all inputs, the registers).

With plain Verilator, for example:

```
verilator --binary --timing --top-module tb_cbadp -y rtl -y tb +libext+.sv \
    rtl/cbadp_pkg.sv tb/cbns_ref_pkg.sv tb/tb_cbadp.sv -o sim
./obj_dir/sim
```

Use the same command for any other testbench. Change the top module and the
file name.
