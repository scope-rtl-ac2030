# SCoPE — a systolic chain of processing elements for SVM classification

SCoPE classifies an image window with a support vector machine (SVM) in hardware.
The usual obstacle is that an SVM has hundreds of support vectors (SVs) of hundreds of
elements each. Giving every SV its own kernel unit costs too much hardware. Broadcasting
the input vector to many units costs too much wiring.

SCoPE splits the job differently:

- the SVs are spread over a **chain of identical processing elements (PEs)**, each with
  a small local SV memory;
- the input vector **streams through the chain** one element per cycle, passed from
  neighbour to neighbour, so no signal fans out to all PEs;
- each PE computes the dot product of the input vector with one of its SVs;
- the PE results then **shift out of the same chain** into a single shared kernel unit
  and a single shared multiply-accumulate (MAC) unit, which form the SVM decision.

This repository holds synthesizable SystemVerilog for that chain. It also holds the
multi-row extension, in which several chains share the SV memories of the first row.
Each part has a self-checking testbench.

The default configuration is the face-detection prototype:

| quantity | value |
|---|---|
| PEs in the chain, n | 100 |
| elements per vector, k | 400 (a 20×20 8-bit grayscale window) |
| support vectors, m | 818, i.e. 9 SV slots per PE (82 slots are padding) |
| kernel | polynomial with γ = 1, r = 0, d = 2: K(x, s) = (x·s)² |
| alpha coefficients | 18-bit signed |
| cycles per classification | (n + k + (n + 2)) · ⌈m/n⌉ = 602 · 9 = **5,418**, plus 2 |

## What is computed

For input vector x, the design computes

    score = Σ_j  c_j · (x · s_j)²  + b          class_pos = (score >= 0)

- c_j = α_j·y_j is the SV weight with its ±1 label folded in. It is stored as one
  signed 18-bit number.
- b is the bias.
- All arithmetic is exact integer arithmetic:
  - the elements are unsigned 8-bit values;
  - the dot product is 25 bits wide, which is enough because 400·255² < 2²⁵;
  - the squared value is 50 bits;
  - the accumulator is 75 bits.
- Any fixed-point binary point of the coefficients is a scale common to the whole sum.
  The bias must be given in that same scale.

## The chain word

In the processing phase, each PE forwards a 25-bit word to its neighbour every cycle
(`scope_pkg::chain_word_t`):

| bits | field | meaning |
|---|---|---|
| 24 | `unused` | reserved |
| 23 | `acc_reset` | this element starts a new dot product: clear the PE's accumulator first |
| 22 | `mac_en` | the element field is valid; accumulate |
| 21 | `nd_sv` | read strobe ("new address") for the SV memories |
| 20..13 | `elem` | input vector element |
| 12..0 | `sv_addr` | SV memory address (12 bits are used at the default size) |

The same register also carries the 25-bit dot products in the transfer phase. The word is
then just a number, so the PEs ignore its fields while `xfer_en` is high.

## One group of n SVs, cycle by cycle

This section explains most of the design's behaviour.

A classification is ⌈m/n⌉ *groups*. In a group, every PE computes the dot product of x
with the SV in one of its slots, and the n results are drained through the back end.
The control unit (`scope_ctrl`) gives each group exactly n + k + (n + 2) cycles, in two
phases.

**PROCESS, n + k cycles.**
- In cycles 0 … k−1, the front-end address generators issue element e and SV address
  g·k + e, where g is the slot.
- The input vector memory has a synchronous read. The control bits of the word are
  registered next to it, so the complete word for element e sits in the *front word
  register* in cycle e+1.
- PE i holds the word in its register one cycle after PE i−1. The last element reaches
  the back-end PE (PE n−1) at the end of the phase.

**How the SV memories stay aligned (read-ahead).** Each PE's SV memory also has a
synchronous read. To add no cycle per PE, PE i does not read with the address in its
input word. It reads with the address in the word that PE i−1 is *about to register*:
the output of PE i−1's multiplexer, or the address generator output for PE 0. The SV
element therefore leaves the memory in the same cycle that the matching input element
arrives in `word_in`. The MAC adds their product at the end of that cycle.

**The accumulator reset travels with the data.** The first element of every group
carries `acc_reset`. A PE that sees it together with `mac_en` replaces its old sum with
the new product. No separate reset word is needed, so the reset costs no cycle.

**TRANSFER, n + 2 cycles.**
1. In cycle 0 the control unit raises `xfer_load`, the PE multiplexer select. Every PE
   loads its finished dot product into its transfer register.
2. With the select low again, each register takes its neighbour's value, so the chain
   becomes a shift register. The back-end PE presents result n−1, then n−2, …, then
   result 0, in cycles 1 … n.
3. The kernel stage squares each result (one register stage).
4. The alpha memory is read in step with the kernel stage.
5. The MAC adds c·K one cycle later.

The last result is therefore accumulated at the end of cycle n+1, which is where the
"+2" comes from. The next group can then start at once: after n shifts the chain holds
only the empty words that the front end fed in behind the results.

After the last group, which the SV address generator signals with its `last` flag:
- one BIAS cycle adds b;
- `done` is high in the next cycle.

From the start pulse to `done` takes 5,418 + 1 cycles at the default size. The
end-to-end testbenches check these counts exactly.

**PE states.** Each PE reports the state it is in:
- `PE_PROCESSING`: an input element is valid;
- `PE_TRANSFERRING`: transfer phase;
- `PE_IDLE`: otherwise.

## Processing element (`scope_pe`)

Each PE contains:
- an SV memory bank (`sv_mem`, 3,600 × 8 bits);
- an 8×8 unsigned multiplier with a 25-bit accumulator;
- a 2-to-1 multiplexer (own result or incoming word);
- the 25-bit transfer register.

The MAC control works like this:
- the MAC is enabled when the word's element is valid **and** the SV data are valid
  (the read strobe, delayed one cycle);
- it is cleared by the global reset **or** by the word's `acc_reset` bit.

The front-end, middle and back-end PEs are the same module. What differs is their
wiring:
- PE 0 takes its word from the front word register, and its read address from the
  address generator;
- PE n−1's register feeds the kernel.

## Back end

- **`kernel_unit`** squares the 25-bit result into 50 bits, with one register stage.
  It is built from logic, not a look-up table. Other kernels (linear, sigmoid, RBF)
  would replace this module. The chain does not change.
- **`alpha_mem`** holds 900 signed 18-bit coefficients.
  - Entry `g·n + (n−1−p)` belongs to slot g of PE p. That is the order in which the
    results leave the chain.
  - Slots without an SV must hold 0. Whatever their SV memory contains then adds nothing.
- **`backend_mac`** sign-extends the coefficient, multiplies it by the zero-extended
  kernel value and accumulates in 75 bits. It adds the bias when `bias_en` is high.
  `class_pos` is the inverted sign bit.

## Several rows sharing the SV memories (`ROWS` > 1)

Setting `scope_top`'s `ROWS` parameter above 1 builds an array of chains that classify
ROWS different windows at once.

- Only row 0 has SV memories.
- Every PE registers the SV element it used and hands it to the PE below
  (`sv_out` → `sv_in`). The lower rows' PEs are built with `HAS_SV_MEM = 0`.
- Row r runs exactly r cycles behind row 0. Its words, its SV elements and every
  control signal arrive one cycle later per row. The control signals come from one
  control unit through a per-row delay line.
- The alpha coefficients read for row 0 are delayed the same way.
- Each row has its own input vector memory, element address generator, kernel unit and
  MAC, and a `score[r]` / `class_pos[r]` output.
- All rows share the bias.
- `done` comes ROWS−1 cycles after row 0 has finished.

With ROWS = 5 and the default sizes, five windows take 5,418 + 2 + 4 cycles. For a
320×240 frame searched with 2,745 windows at 100 MHz, that is 33.6 frames/s, against
6.7 frames/s for one chain. The default is a single chain (ROWS = 1).

## Using the design

Loading happens through `scope_top`'s write ports, only while `busy` is low:

| memory | ports | address |
|---|---|---|
| SV memories | `sv_we`, `sv_wpe` (PE), `sv_waddr`, `sv_wdata` | `slot·k + element` |
| coefficients | `alpha_we`, `alpha_waddr`, `alpha_wdata` | `slot·n + (n−1−PE)` |
| input vector | `iv_we`, `iv_row`, `iv_waddr`, `iv_wdata` | element index |

The testbenches place SV j in PE `j mod n`, slot `j div n`. Any placement works if the
coefficients follow it.

To run a classification:
1. Write the k input elements of every row. Writing element k−1 of the last row makes
   `vec_ready` rise.
2. Pulse `start`. It is ignored unless `vec_ready` is high, and it clears `vec_ready`, so
   each vector is written in full before its start.
3. `busy` rises.
4. `score` and `class_pos` are valid from the `done` cycle until the next start.

Reset (`rst`) is synchronous and active high. It clears all control state, but not the
memory contents.

## Where this implementation makes its own choices

The published description gives the block structure, the PE internals, the word fields,
the sizes, the widths and the cycle formula. The following points are this
implementation's choices:

- **Word layout:** the placement of the element and address fields inside bits 20..0.
- **SV address width:** the SV memory uses 12 address bits, because 9 × 400 = 3,600
  words need them; the published block diagram labels that bus 11 bits.
- **Read-ahead** of the SV memories from the neighbour's multiplexer output.
- **Reset word:** the accumulator reset rides on the first element of a group instead
  of being a separate word.
- **Transfer:** the parallel-load-then-shift reading of the transfer phase.
- **Coefficients:** folding y_i into the coefficient; treating the coefficient as an
  integer; bias as a 75-bit input added in an extra cycle; score ≥ 0 gives class +1.
- **Host interface:** the write ports and the start / busy / done / vec_ready handshake.
- **Multi-row array:** the row skew, the shared control unit and alpha memory, and the
  shared bias. The published text describes the vertical SV flow and the per-row kernel
  and MAC, but no further detail.

Not built:
- the hardware that cuts windows out of a frame and writes them into the input vector
  memory;
- multi-class arrays in which each row holds its own SVs;
- kernels other than the square.

## Files

| file | content |
|---|---|
| `rtl/scope_pkg.sv` | sizes, chain word struct, PE state enum |
| `rtl/scope_top.sv` | the whole design (front end, chain(s), back end, control) |
| `rtl/scope_ctrl.sv` | control FSM |
| `rtl/scope_pe.sv` | processing element |
| `rtl/sv_mem.sv`, `rtl/iv_mem.sv`, `rtl/alpha_mem.sv` | memories (synchronous read) |
| `rtl/addr_gen.sv` | address generator (counter with last flag) |
| `rtl/kernel_unit.sv`, `rtl/backend_mac.sv` | back end |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/scope_top_tb.sv` | end to end, n = 4, k = 10, m = 10, three rows |
| `tb/scope_top_full_tb.sv` | end to end at the default size, two vectors |
| `tb/scope_frame_tb.sv` | a whole 320×240 frame (2,745 windows) through five full-size rows |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. Each has a
watchdog that counts a failure if the run hangs.

With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/scope_pkg.sv \
        tb/scope_top_tb.sv --top-module scope_top_tb -Mdir obj_top
    ./obj_top/Vscope_top_tb

Replace the testbench file and top module name to run another test.

What the testbenches check:
- The end-to-end tests compare every score and class with a model computed in the
  testbench. They also check the cycle counts.
- They count that each mechanism occurred:
  - a start refused for lack of a vector;
  - one `acc_reset` word and one transfer load per group;
  - padded slots;
  - SV elements passed to a lower row;
  - every PE of every row in each of its three states;
  - both classes.
- The full-size test builds in a few seconds and runs in about one second.
- The frame test searches a random 320×240 image with 20×20 windows at a 5-pixel step
  (61 × 45 = 2,745 windows). It classifies every window with five full-size rows and
  checks each result and each batch's 5,424 cycles. It reports 2,977,776 compute
  cycles, i.e. 33.58 frames/s at 100 MHz. The same test with `ROWS = 1` reports
  14,877,900 cycles, i.e. 6.72 frames/s. The frame test takes about a minute.

Any size can be simulated by overriding `N`, `K`, `M` and `ROWS` on `scope_top`. The
derived parameters (slots per PE, memory depths, address widths) follow automatically.
Two limits apply:
- the alpha address is 11 bits, so `⌈M/N⌉·N` must not exceed 2,048;
- the SV address field is 13 bits.

Elaboration-time assertions check both.
