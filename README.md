# Vector co-processor with a microcoded VLIW controller

This is a SIMD co-processor for image processing, meant to sit in an FPGA
beside a host processor. A row of identical processors all execute the same
very wide instruction word in lock-step. The instruction words come from a
microcode RAM, stepped through by a small sequencer (the *VLIW controller*).
Everything the processors do is spelled out bit by bit in the microcode, so a
new image operation, or a new way of pipelining an old one, needs only new RAM
contents. Rebuilding the FPGA is not required. Hardware changes are needed only
when an operation needs a data path the processors do not have.

The organisation follows a published FPGA vector co-processor that was built on
a Virtex-II Pro and reported at 32 processors and 125 MHz. That description
gives the architecture and the list of operations, but not the encodings, widths
or timing. Everything at that level of detail is this implementation's own, as
listed in [Departures and choices](#departures-and-choices).

```
            params  start/start_addr                     ucode load port
               |        |                                      |
         +-----v--------v-----+   next address   +-------------v-----+
         |  vliw_controller   |----------------->| microcode_memory  |
         |  pc, call stack,   |<-----------------| 1024 x 95 bits    |
         |  waits             |  current word    +-------------------+
         +--+------------+----+        (sequencing part to the controller,
   in_valid |  in_ready  | issue        processor part to the bus)
   in_data  v            v
         VLIW bus = {valid, processor field (75 b), scalar data word (17 b)}
                         |
               +---------v----------+  registered fan-out tree, FANOUT 4,
               |  vliw_buffer_tree  |  ceil(log4 N)+1 register levels
               +--+-----+------+----+
                  |     |      |
            +-----v+ +--v---+ ... N_PROC x vector_processor
            |store A| |      |     (store A, store B, pe_maths)
            |store B| |      |
            | maths | |      |
            +---+---+ +--+---+
                |        |
            +---v--------v-------+  pipelined adder tree: vector sum,
            |  vector_sum_tree   |  or single-lane read-out
            +---------+----------+
                      v
                  out_fifo  --> out_valid / out_ready / out_data
```

## Files

| File | Contents |
|---|---|
| `rtl/vcp_pkg.sv` | widths, encodings, the microcode word and the VLIW bus as packed structs |
| `rtl/vcp_core.sv` | top level |
| `rtl/vliw_controller.sv` | sequencer |
| `rtl/microcode_memory.sv` | microcode block RAM |
| `rtl/vliw_buffer_tree.sv` | registered fan-out tree |
| `rtl/vector_processor.sv` | one processing element |
| `rtl/pe_maths.sv` | masked pixel maths (combinational) |
| `rtl/pe_store.sv` | local store, 1024 x 17 bits |
| `rtl/vector_sum_tree.sv` | adder tree on the processor outputs |
| `rtl/out_fifo.sv` | output FIFO |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus three workload tests |
| `tb/vcp_asm_pkg.sv`, `tb/vcp_host.sv`, `tb/diff_scaling_unit.sv` | microcode-building helpers, a host model and a core-plus-host unit for the workload tests |

## The microcode word

The hardest part to get right is writing microcode, so its word is described
first. One 95-bit word (`uinstr_t`) is read per cycle. It has two parts.

**Sequencing field (`seq_ctrl_t`, 20 bits), used only by the controller:**

| Field | Bits | Meaning |
|---|---|---|
| `op` | 3 | `NEXT`, `BRANCH` (pc + signed `target`), `CALL` (push pc+1, pc = `target`), `RET` (pop; on an empty stack the function ends), `HALT` (the function ends) |
| `cond` | 2 | `ALWAYS`, `PARAM_SET` / `PARAM_CLR` (tests `params[cond_bit]`), `STACK_EMPTY`. When the condition is false, the word behaves as `NEXT`. |
| `cond_bit` | 4 | which host parameter bit to test |
| `target` | 10 | absolute address for `CALL`, two's-complement offset for `BRANCH` |
| `wait_in` | 1 | the word takes one word from the input stream as its scalar data, and waits until one is available |

**Processor field (`pe_ctrl_t`, 75 bits), broadcast to every processor:**

| Field | Bits | Meaning |
|---|---|---|
| `lane_all`, `lane_sel` | 1+6 | which processors may write their stores and contribute to the output: all of them, or the one numbered `lane_sel` |
| `a_op`/`a_imm`, `b_op`/`b_imm`, `w_op`/`w_imm` | 3 x (2+10) | update of the store-A read address, store-B read address and write address: hold, load immediate, +1, -1 |
| `opb_sel` | 2 | operand B: store B, the scalar data word, the immediate, or the previous word's operand A |
| `alu_op` | 3 | pass A, pass B, add, subtract (A-B), multiply, absolute value, zero where A's mask is 0 |
| `mask_op` | 3 | result mask: mA&mB, mA\|mB, mA, mB, 1, 0, A>B, mA&(A>B) |
| `shift` | 4 | arithmetic right shift applied to a product |
| `imm` | 16 | immediate operand (its mask is 1) |
| `wr_a`, `wr_b`, `wr_src` | 3 | write the result, or the scalar word, into store A and/or B at the write address |
| `out_push` | 1 | send the result to the sum tree and the output stream |

A word with `out_push` set also waits until the output FIFO is sure to have
room for its result (see below). An all-zero processor field does nothing.

### Pipeline timing seen by microcode

For a word issued by the controller in cycle *t*, with `L = ceil(log4 N)+1`
(4 for 32 processors):

| Cycle | What happens |
|---|---|
| t | The controller issues the word; `wait_in` words capture `in_data` |
| t+1 ... t+L | The word travels down the buffer tree |
| t+L (S0) | Address registers update; the stores are read at the **new** addresses |
| t+L+1 (S1) | Maths; the result is registered; the previous-operand register is updated |
| t+L+2 (S2) | Write-back into store A/B at the write address; `out_push` enters the sum tree |
| t+L+2+1+log2 N | The sum reaches the output FIFO |

There are no interlocks. The microcode is expected to be scheduled by hand,
which is the way the original system was programmed. Two rules follow:

* A word that reads an address written by an earlier word must come at least
  three words after it, counting issued words. (Read-during-write returns the
  old data.)
* `OPB_PREV_A` uses operand A of the **previously issued** word. This makes
  differentiation along a row cost one word per pixel. Issue a priming word
  first (for example, pass A with no write), then one subtract per pixel, with
  the A address incrementing.

Because the controller issues one word per cycle with no delay slots, a function
of *k* words with no waits issues in exactly *k* cycles. The pipeline then needs
`L + 3 + 1 + log2 N` more cycles to drain (13 at 32 processors). `busy` covers
both. This drain is the fixed per-call cost that makes many small images slower
than one large one: in the row-differentiation test, 2^10 pixels take 46, 60
and 88 cycles as 1, 2 or 4 images.

## VLIW controller

`vliw_controller` is a program counter with a little general-purpose logic. It
has conditional relative branches forwards and backwards, calls and returns
through an 8-entry stack, and conditions taken from the 16 host `params` bits
or from the stack being empty. It has no loop counters. A loop can only be
controlled by a static parameter, so a host processes a large image by calling
a fixed-size patch function repeatedly. The testbenches do exactly this.

The microcode RAM has a synchronous read. Its output register is the
instruction register: the controller computes the next address from the
current word in the same cycle and presents it to the RAM.

There are two reasons a word waits:

* `wait_in` is set and `in_valid` is low.
* `out_push` is set and the number of output words issued but not yet taken by
  the consumer has reached `FIFO_DEPTH`.

A waiting word is re-read every cycle and nothing is issued, so the processors
see no-operation cycles. The credit count guarantees that every result still in
the pipeline has a FIFO slot, so back-pressure never has to stop the processor
pipeline itself.

A function starts with a one-cycle `start` and its `start_addr` while the core
is idle. `done` pulses in the cycle its last word (`HALT`, or `RET` on an empty
stack) issues. A `CALL` on a full stack still jumps but loses its return
address; it sets the sticky `stack_err`. An assertion also reports it in simulation.

## Processors

Each `vector_processor` has two 1024-word stores of 16-bit signed pixels plus
one mask bit, and a maths unit. Operand A is always read from store A. Operand B
comes from store B, the scalar word, the immediate or the previous operand A.
The mask bit marks a pixel as valid, as needed when mosaicing images. It is
processed by its own small logic in the same cycle as the arithmetic:

* Masked add, subtract and multiply combine masks with `MASK_AND`.
* *Threshold into mask* is pass A with `MASK_GT_AND` and the threshold as
  operand B.
* *Zero by mask* is `ALU_ZERO`.

Arithmetic wraps at 16 bits. A product keeps the low 16 bits after the shift.

Data reach the stores in two ways:

* A load word with `wait_in`, `wr_src = SCALAR` and `lane_sel = j` writes one
  input pixel into processor *j*. One call of a 32- or 64-word load function
  fills one address in every lane.
* Results are written back with `wr_src = RESULT`.

## Vector sum tree and output

`vector_sum_tree` adds the results of the lanes selected by the word, with a
register after every level: 1 + log2 N cycles, one vector per cycle. It also
ORs their masks. The output word is 22 bits of sum plus the mask, which is
enough for 64 lanes of 16-bit pixels without overflow. It has two uses:

* With `lane_all` set, the tree adds a vector up without involving the
  controller.
* With one lane selected, it is the read-out multiplexer for that lane's pixel.

Its output goes through `out_fifo` (32 words by default) to the valid/ready
output stream.

## Top-level interface (`vcp_core`)

| Port | Dir | Width | Use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of all control state (RAM contents are not reset) |
| `ucode_we`, `ucode_addr`, `ucode_data` | in | 1, 10, 95 | write one microcode word per cycle; do not write while a function runs |
| `start`, `start_addr`, `params` | in | 1, 10, 16 | call a function; `params` must stay stable while it runs |
| `busy`, `done`, `stack_err` | out | 1 | see above |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, 17 | input stream; `in_ready` is the pop strobe, a word moves when both are high |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1, 1, 23 | output stream `{mask, sum}` |

Parameters: `N_PROC` (32; 1 to 64), `FANOUT` (4), `STORE_DEPTH_LOG2` (10),
`STACK_DEPTH` (8, a power of two), `FIFO_DEPTH` (32, a power of two).

## Departures and choices

These come from the published design:

* The SIMD vector of identical processors with two stores and a maths unit
  each.
* The VLIW controller, with its program counter, conditional add/subtract on
  the PC, return stack, parameter conditions and waits for input data and
  output room.
* The microcode in block RAM.
* The registered buffer tree for the wide bus.
* The tree that adds a vector.
* The mask bit per pixel.
* The operations: differentiation along rows, add, subtract, multiply, absolute
  value, threshold into mask and zero by mask.
* The default of 32 processors.

These are this implementation's choices:

* All field encodings and widths.
* 16-bit signed pixels and store depth 1024.
* Microcode depth 1024.
* Fan-out 4 and stack depth 8.
* The three-stage processor pipeline.
* Per-processor address registers.
* The lane-select field.
* Reading results out through the sum tree.
* The output FIFO with credit counting.
* The whole host interface.

The published bus was "over 100 bits" wide. Here the microcode word is 95 bits
and the broadcast bus is 93, because this processor has fewer controls than the
original.

Not built:

* The host processor, its software and the Ethernet link.
* The FPGA-side memory that exchanged images with host memory.
* Data paths between neighbouring processors. These were suggested only as a
  possible extension.

The buffer tree is a chain of registers with identical contents. Synthesis tools
merge such registers unless told to keep them, so an FPGA build needs the
vendor's keep / no-merge attribute on `vliw_buffer_tree`.

## Capacity

With the defaults, each lane holds 1024 pixels in each store: 32 K pixels per
store across 32 lanes. Two square masked images of up to 181 x 181 pixels
therefore fit at once. The summing test runs 50 x 50, 100 x 100 and 150 x 150
images. Larger images, such as 200 to 300 pixels wide or a full 1024 x 1024
frame (32 K pixels per lane), have to be streamed through in patches by repeated
host calls.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator, from
the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vcp_core \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vcp_pkg.sv tb/tb_vcp_core.sv
./obj_dir/Vtb_vcp_core
```

For the workload tests (`tb_sum_masked_images`, `tb_row_differentiation`,
`tb_processor_scaling`), add `tb/vcp_asm_pkg.sv` to the file list.

| Testbench | What it shows |
|---|---|
| `tb_vcp_core` | Runs at full default size. It loads microcode and two 32 x 8 masked images, then checks add, lane-by-lane read-out, differentiation, threshold and zero, multiply and absolute value. It uses nested calls, parameter-controlled calls and branches, input gaps and a slow consumer. It counts input waits, output waits, a full FIFO, calls, returns, branches, false conditions and both ways of ending, and requires each to happen at least once. It also checks that an 8-word function issues in 8 cycles. |
| `tb_sum_masked_images` | Streams masked images 50, 100 and 150 pixels wide in once, then runs 128 masked-add passes over them (B = A + B, 1024 pixels per 32-cycle call). It reads the result back, checks every pixel, and prints the cycles spent loading, computing and reading. At 150 x 150 these are roughly 67 k, 134 k and 37 k: moving images in and out costs nearly as much as 128 operations. |
| `tb_row_differentiation` | Differentiates 2^10 pixels along rows as 1, 2 and 4 images. Every pixel is checked, and the total time must grow linearly with the image count (32 + 14 K cycles). |
| `tb_processor_scaling` | Runs the same 2^10-pixel differentiation on cores of 4, 8, 16, 32 and 64 processors side by side (`tb/diff_scaling_unit.sv` is one core with its host). The call issues 1024/N words, and the call time must fall as N rises. It measures 139, 76, 46 and 31 cycles from 8 to 64 processors. |
| `tb_vliw_controller` | Checks execution traces against hand-worked traces, with and without random waits. |
| `tb_vector_processor` | Exercises every operation, operand source, write-back path, lane select and the result latency of one processor. |
| `tb_pe_maths`, `tb_pe_store`, `tb_microcode_memory`, `tb_vliw_buffer_tree`, `tb_vector_sum_tree` | Unit checks against reference models, including the latencies of both trees. |

The end-to-end test reads a few internal controller signals by hierarchical
name to count mechanisms, so it works only with this `vcp_core`.
