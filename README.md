# Bit-serial associative processor for neural classification

This is the data path of a SIMD processor for pattern classification. It
follows the associative processor published by Thissen, Verleysen and Legat
(UCL, 1995). A thousand or so very small processors each hold one prototype
of a classifier, such as an RCE neuron. They all compute their distance to an
input vector at the same time. A few global units then answer the questions
that involve all of them: how many are active, which one is first, and which
one is nearest.

Each elementary processor (EP) handles one bit per cycle. Words are processed
serially, bit by bit, while all EPs work in parallel on the same bit
position: the array is *bit-serial, word-parallel*. Every EP receives the same
memory address, the same opcode and the same broadcast data bit every cycle.
The EPs differ only in their memory contents and in their 1-bit **status**
flag, which says whether the EP takes part in conditional operations.

The default build has 1024 EPs with 256 bits of memory each. The published
figures use this size. One chip of the original held 128 EPs, and chips were
chained; set `NUM_EP = 128` to get one chip.

## Structure

```
               raddr          waddr (delayed 2)
                 |               |
           +-----v---------------v-----+
           | read decoder  write decoder|       ap_addr_decoder x2
           +---------------------------+
   row 0   | cell cell cell ... cell   |
   ...     |     256 rows x NUM_EP     |       ap_memory
   row 255 | cell cell cell ... cell   |
           +--|----|----|--------|-----+
      read bus|    |    |        |   ^ write bus (OB, per-EP enable)
           +--v-+--v-+--v-+   +--v-+ |
ctl(d1) -->| EP | EP | EP |...| EP |-+       ap_pe = ap_alu + ap_status_reg
           +-+--+-+--+-+--+   +-+--+
             |S   |S   |S       |S
           +-v----v----v--------v--+
           | election (token+bypass)|-> first[]      ap_elect   (tok_in/tok_out)
           +------------------------+
           | OR of responses        |-> rsp_any (read-out of one EP)
           | OR of extremum cands   |-> ext_any (back to every EP)
           | pipelined adder tree   |-> rsp_sum, sum_vld         ap_sum_tree
           +------------------------+
```

The memory is stored as bit planes. Row *a* holds bit *a* of every EP, so one
decoded address drives a whole row. There is a separate read bus and write
bus, so the array reads one row and writes a different row in the same
cycle.

## The instruction and its three stages

The processor's main trick is its pipeline, and it is also where the design is
easiest to misuse. An external controller, the microprogram sequencer, is not
part of this RTL. It presents one instruction per clock on the ports of
`ap_top`:

| field | stage | meaning |
|---|---|---|
| `rd_en`, `raddr` | read, cycle t | row `raddr` is loaded into every EP's input buffer (IB) |
| `ctl.op`, `ctl.cond`, `ctl.cin`, `ctl.d` | ALU, cycle t+1 | the operation works on IB and updates OB, the carry, the latch R or the status S |
| `wr_en`, `waddr` | write, cycle t+2 | OB is written to row `waddr` in every EP that executed the operation |

`ap_top` delays the ALU fields by one cycle and the write address by two.
Consecutive instructions therefore overlap: in any cycle, instruction *k*
reads, *k−1* computes and *k−2* writes. Two consequences follow:

* **Throughput.** A field of *n* bits combined with a broadcast constant
  (`X + A → C`) takes *n* instructions. The last result bit is written
  *n + 2* cycles after the first instruction. A memory–memory operation
  (`B + A → C`) needs two reads per bit: first `OP_LATCH` of the A bit into the
  latch R, then the add on the B bit. It takes *2n + 2* cycles. With 1024 EPs at
  100 MHz this gives 10.24 G 8-bit additions per second with a constant and
  5.69 G with two memory operands, which matches the published rates.
* **Hazards are the controller's job.** An instruction that reads a row in the
  cycle when an earlier instruction writes that row gets the *old* contents.
  An assertion in `ap_top` (`a_no_rw_same_row`) flags such a read. The status
  flag and the carry change at the end of the ALU stage. A status operation
  therefore affects conditional execution from the next instruction's ALU
  stage on. The `status` port shows the new value one cycle after the status
  operation has been issued.

`ctl.cond = 1` makes an operation conditional. An EP whose status is 0 then
keeps all its registers and writes nothing. This is how data-dependent work
is done in a SIMD array: set S from a comparison, then run the operation
conditionally.

## Operations (`ap_pkg::ep_op_e`)

M is the input-buffer bit, D the broadcast bit, R the operand latch, C the
carry and S the status. `cin` selects the carry-in of the arithmetic ops:
`CIN_KEEP` (the carry left by the previous bit), `CIN_ZERO` (first bit of an
add) or `CIN_ONE` (first bit of a subtract). Bits are processed LSB first.

| op | effect | op | effect |
|---|---|---|---|
| `OP_MOV` | OB = M | `OP_S_SETD` | S = D |
| `OP_SETD` | OB = D | `OP_S_LDM` | S = M (retrieve status) |
| `OP_NOT` | OB = ¬M | `OP_S_MATCH` | S = S ∧ (M = D) |
| `OP_AND/OR/XOR` | OB = M op R | `OP_S_ORM` | S = S ∨ M |
| `OP_STS` | OB = S (store status) | `OP_S_CARRY` | S = C ⊕ D |
| `OP_LATCH` | R = M | `OP_S_ANDC` | S = S ∧ (C ⊕ D) |
| `OP_ADDD` | {C,OB} = M + D + cin | `OP_S_NOT` | S = ¬S |
| `OP_SUBD` | {C,OB} = M + ¬D + cin | `OP_S_FIRST` | S = 1 only in the first active EP |
| `OP_RSUBD` | {C,OB} = ¬M + D + cin | `OP_S_EXTR` | T = S ∧ (M = D); S = T if any T, else S |
| `OP_ADDR/SUBR/RSUBR` | as above with R instead of D | `OP_NOP` | nothing |

A comparison is a subtraction whose final carry is moved into S. After
`A − B` with `CIN_ONE`, C = 1 means A ≥ B, so `OP_S_CARRY` with D = 1 sets S
where A < B.

## Collective operations

These units see all EPs at once. They are the reason the array is more than
a bank of separate bit-serial ALUs.

**Election of the first active EP (`ap_elect`, `OP_S_FIRST`).** A token
enters at EP 0 and ripples through the status flags. The first EP with S = 1
keeps it. On its own this is a 1024-stage combinational chain. To shorten it,
the EPs are grouped by 32. Each group computes the OR of its flags, and the
token jumps over a group whose OR is 0, as in a carry-skip adder. The critical
path is then about 32 group hops plus two 32-stage ripples instead of 1024
stages. The original used some form of bypass, but its circuit and group size
are not known; the skip scheme and the group size of 32 are choices made
here. `tok_in` and `tok_out` carry the token across chained arrays. Tie
`tok_in` to 1 on the first array. `tok_out` = 1 means that no EP here (or
before) is active.

Typical uses:

* Pick one EP to write into: make the free EPs active, elect, then write with
  conditional `OP_SETD`.
* Read a value out of the array: elect, then issue conditional `OP_MOV` on
  the field's bits. **`rsp_any`**, the OR of all EP responses, then carries
  that EP's bits two cycles after each instruction.

**Adder tree (`ap_sum_tree`).** Each EP's response is its output buffer,
counted only if the last operation loaded it in that EP. A binary tree of
adders with one register per level (10 levels for 1024 EPs) sums these
responses. `rsp_sum` is valid 12 cycles after the instruction was issued and
is marked by `sum_vld`. A new set of responses can enter every cycle.

* Counting active EPs: issue `OP_SETD` with D = 1, conditional.
* Summing a field over the active EPs: stream conditional `OP_MOV` over its
  bits, then add the plane counts, each weighted by 2^bit.

**Extremum search (`OP_S_EXTR`).** Issue `OP_S_EXTR` for each bit, MSB first,
with D = 1 for a maximum and D = 0 for a minimum. Among the active EPs, those
whose bit equals D stay active, unless none does. The "unless none does" test
is a global OR of candidates fed back to every EP in the same cycle, so a
search over an n-bit field takes n cycles. At the end, the active EPs are the
ones that hold the extremum, and `OP_S_FIRST` breaks ties. The original adds
hardware for extremum searches but does not describe it; this one-cycle step
is this design's version.

## Example microprogram: RCE classification

The testbench `tb/tb_ap_top.sv` acts as the controller. It runs the RCE
(Restricted Coulomb Energy) classifier with one neuron per EP, and it is the
best reference for how to program the array. Each EP's memory holds the
neuron's centre (DIM × NB bits), its radius, a distance, a temporary field,
its class, an in-use flag and two one-bit save slots. For an input vector x:

1. **Distance.** Clear D. For each coordinate k:
   * T = C_k − x_k for all EPs.
   * S = borrow.
   * Where S is set, conditionally compute T = x_k − C_k. T is now |C_k − x_k|.
   * Set S = 1 everywhere.
   * D = D + T, using the latch, two cycles per bit.
2. **Activation.** Compute D − R with `CIN_ONE` and without writing. Set S =
   borrow (D < R), then AND S with the in-use flag.
3. **Classification.** Count the active EPs with the tree. Store S, elect the
   first active EP and read its class out through `rsp_any`. Reload S, match
   the class bits, and count again. Equal counts mean that exactly one class
   was proposed.
4. **Learning.**
   * Among the active EPs, those of the wrong class take their radius from
     their distance: a conditional copy of D to R.
   * If no active EP has the right class, the free EPs (in-use = 0) are made
     active and the first one is elected. It receives x, an initial radius and
     the class.

With DIM = 2 and 8-bit coordinates, this takes about 152 cycles per learned
vector and 164 per classified vector, including a nearest-prototype search.
At 100 MHz that is roughly 6.5·10^5 and 6·10^5 vectors per second. This is the
same order as the published curves (about 4·10^5 learned and 6·10^5
classified at this size, worst case).

`tb/tb_ap_rce.sv` runs the same microprogram, without the nearest-prototype
search, for 2 to 32 input dimensions on the full array:

| dimension | bits per coordinate | cycles per learned vector | cycles per classified vector | classified per second at 100 MHz |
|---|---|---|---|---|
| 2 | 8 | 134 | 131 | 7.6·10^5 |
| 4 | 8 | 230 | 204 | 4.9·10^5 |
| 8 | 8 | 435 | 347 | 2.9·10^5 |
| 16 | 8 | 824 | 658 | 1.5·10^5 |
| 32 | 6 | 1267 | 1039 | 9.6·10^4 |

The cost grows with the dimension because each coordinate takes about 4·NB
cycles: two subtractions and a memory–memory add. It is the same order as
the published curves at these sizes.

Memory size limits the problem size. With the layout above, a neuron needs
`DIM·NB + 2·(NB + ⌈log2 DIM⌉) + NB + 5` bits. That fits in 256 bits for any
accuracy up to 32 bits at DIM ≤ 4. The limit is NB ≤ 22 at DIM = 8, NB ≤ 12
at DIM = 16 and NB ≤ 6 at DIM = 32. The published curves go to 32 bits at
32 dimensions, which this memory cannot hold with this layout.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_EP` | 1024 | `ap_top`, `ap_memory`, `ap_elect`, `ap_sum_tree` | number of EPs (published: 1024 for performance, 128 per chip) |
| `MEM_BITS` | 256 | `ap_top`, `ap_memory` | bits of memory per EP (published) |
| `GROUP` | 32 | `ap_top`, `ap_elect` | EPs per bypass group of the election chain (own choice) |
| `AW`, `LEVELS`, `SW` | derived | | address width, tree depth, sum width |

## Files

* `rtl/ap_pkg.sv`: opcodes, carry-in choice, the ALU control word `ep_ctl_t`.
* `rtl/ap_alu.sv`: the 1-bit ALU (full adder, operand selection, logic).
* `rtl/ap_status_reg.sv`: the status flag and its update rules.
* `rtl/ap_pe.sv`: one EP (input/output buffers, carry, latch, ALU, status).
* `rtl/ap_addr_decoder.sv`: binary to one-hot row select.
* `rtl/ap_memory.sv`: bit-plane memory with separate read and write buses.
* `rtl/ap_elect.sv`: first-active election with group bypass.
* `rtl/ap_sum_tree.sv`: pipelined adder tree.
* `rtl/ap_top.sv`: the data path; instruction pipeline registers and assertions.
* `tb/tb_*.sv`: one self-checking testbench per module, plus
  `tb_ap_arith.sv` for the multiply and divide microprograms and
  `tb_ap_rce.sv` for RCE rates across input dimensions. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ap_pkg.sv rtl/ap_*.sv \
          tb/tb_ap_top.sv --top-module tb_ap_top
./obj_dir/Vtb_ap_top
```

Replace `tb_ap_top` with any other testbench name. Variables that nothing
initialises start random in a two-state simulator (`+verilator+rand+reset+2`).
The testbenches initialise everything they read, and the microprograms clear
the in-use flags before learning.

`tb_ap_top` runs the design at its default size, with 1024 EPs and 256-bit
memories. It does the following:

* It runs X + A, X − A and B + A on all EPs at 8, 16 and 32 bits. It checks
  every EP's result, the A ≥ X status and the cycle counts (n + 2, n + 2 and
  2n + 2).
* It sums a field over the active EPs through the tree.
* It learns 1000 points of a two-class disc-and-ring set and classifies 300
  new points. Counts, elected classes, ambiguity and minimum distances are
  compared with an integer RCE model.
* It checks election with `tok_in` low.
* It counts how often each mechanism occurs: overlap of the three stages,
  conditional skip, status store and load, election past the first bypass
  group, tree counts, read-out, extremum steps with and without candidates,
  radius shrinking, neuron creation and ambiguous classification. A
  mechanism that never occurs is a failure.

The arithmetic operands are written into the memory array directly from the
testbench, to save the time of 1024 elections. Everything in the RCE part goes
through the ports. The run takes about 10 s after a one-minute build.

## How far to trust it, and where it departs from the original

The published description gives the structure and function of the EP, its
three overlapping operations, the two-bus memory, the two collective
functions, the sizes (1024 × 256 bits; 128 EPs per chip) and the performance
figures. It does **not** give any of the following, so all of them are this
design's own:

* The instruction format, the opcode set and the carry-in handling.
* The operand latch used for memory–memory operations.
* The exact pipeline timing and the hazard rule.
* The bypass circuit of the election and its group size.
* The adder tree's pipeline depth.
* The extremum-search hardware.
* How the status side of the common bus is read out (`rsp_any`, `rsp_sum`,
  the `status` vector).
* How chips chain: only the election token crosses arrays here. The adder
  tree outputs of several arrays would have to be added outside. The
  extremum OR does not cross arrays, so an extremum search covers one array
  only.
* Reset values.

Known differences in behaviour:

* Subtraction with a constant takes n + 2 cycles here. The published rate for
  X − A implies n + 3, probably one cycle to preset the carry, which the
  `cin` field makes unnecessary.
* Multiplication and division are microprograms, as in the original.
  `tb/tb_ap_arith.sv` runs shift-and-add multiplication and restoring
  division at 8 and 16 bits on all 1024 EPs. At 8 bits, B × A takes 162
  cycles and X / A or B / A 242 cycles. This is faster than the published
  rates, which must come from different microprograms. 32-bit and
  floating-point programs are not written.
* The memory is a register array, not the full-custom static cell of the
  original 1 µm chip. Nothing about the 100 MHz clock or the 6 × 6 mm area is
  modelled.
* The microprogram controller, and the larger system this data path belongs
  to, are not part of the RTL. Its signals are the ports of `ap_top`.
