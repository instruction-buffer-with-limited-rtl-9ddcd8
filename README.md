# Loop instruction buffer with early-exit and loop-nest support

Wide-instruction processors (VLIW, TTA) running DSP kernels spend most of
their time in a few small loops, and every instruction of those loops is read
again from a large, power-hungry instruction memory. This design adds a small
**instruction buffer** next to the instruction memory. The buffer is sized
for the application's hottest loop. The loop body is copied into the buffer
during its first iteration. Later iterations are issued from the buffer while
the memory is deselected.

Unlike a loop cache, the buffer stores **no addresses**. It is filled from
entry 0 and played back in order. Two things decide when to use it:

* **Two marking bits in every instruction word.** The program's binary marks
  which instructions belong to the buffered loop and where the buffer
  content stops being useful.
* **One stored address: the loop start.** On every taken jump the
  controller compares the target with this address. A jump to the loop start
  repeats the loop from the buffer. A jump anywhere else leaves it. That one
  comparison is enough to buffer loops that hold an early `continue`
  (a jump back to the start from mid-body) or an early `break`.

Because the "invalidate" marker is a separate instruction, the compiler can
place it after the inner loop, or further out. Put after the outer loops of
a nest, it keeps the innermost loop's body valid across re-entries, so the
body is copied only once.

## Files

| file | contents |
|---|---|
| `rtl/ibuf_pkg.sv` | widths (268-bit payload + 2 control bits = 270), control-field enum, state enum, event struct |
| `rtl/ibuf_ctrl.sv` | the buffer controller state machine |
| `rtl/ibuf_store.sv` | buffer storage, 1 write + 1 read port |
| `rtl/imem.sv` | instruction memory with read enable and a program-load port |
| `rtl/ifetch_pc.sv` | program counter / next-PC mux |
| `rtl/ibuf_fetch_top.sv` | the fetch subsystem: all of the above wired together |
| `tb/tb_*.sv` | self-checking testbenches (see *Verification*) |
| `tb/tta_core_model.sv` | behavioural processor used by the system testbenches |

The default parameters are the DCT 8x8 configuration: a 128 x 270 memory and
a 76-entry buffer. The Viterbi configuration is `IMEM_DEPTH=2048,
BUF_DEPTH=89`. The ADPCM configuration is `IMEM_DEPTH=2048, BUF_DEPTH=32`.

## The instruction marking

Bits 269:268 of each stored word form the control field. Bit 1 is *run* and
bit 0 is *invalidate*.

| code | name | meaning |
|---|---|---|
| `00` | execute from memory | ordinary instruction (default) |
| `10` | execute and copy | belongs to the loop body that may live in the buffer |
| `01` | invalidate | the buffer content becomes invalid when this executes |
| `11` | execute and invalidate | loop-body instruction; invalidates the buffer if it leaves the buffer by a jump. If that jump leaves from the buffer, copying of the jump target starts at once, so two loops in a row can be buffered with no instruction between them |

Every instruction of the buffered loop body carries `10` or `11`. The
processor only sees the 268-bit payload (`instr`); the controller reads the
two bits.

The four markings come from the design this RTL follows. Which bit is which
is this implementation's choice. So is the rule that all loop-body
instructions, not only the first, carry the run bit.

## The controller (`ibuf_ctrl`)

Three states, each with fixed enables:

| state | memory | buffer |
|---|---|---|
| `S_RUN_MEM` (run from memory) | read | idle |
| `S_COPY` (copy to buffer and run from memory) | read | written |
| `S_RUN_BUF` (run from buffer) | deselected | read |

The registers are `buf_start` (loop start address), `buf_valid`,
`buf_valid_cnt` (how many entries hold the loop), `counter` (current
entry) and `run_out_of_buffer`.

Each decision uses the instruction issued in the current cycle: its control
field, the processor's `jump` answer and `next_pc`.

**Run from memory**
* A run-marked instruction with the buffer invalid starts a copy. It is
  written to entry 0, and its address becomes `buf_start`.
* A run-marked instruction at `buf_start`, with the buffer valid and no
  jump, hands over to the buffer from entry 1. So each re-entry of a valid
  loop fetches its first instruction from memory.
* `run_out_of_buffer` blocks both actions while the tail of a loop longer
  than the buffer runs. A taken jump or an unmarked instruction clears it.
* `01` invalidates the buffer. `11` invalidates it when it jumps somewhere
  other than `buf_start`.

**Copy**
* Every issued instruction is written at `counter`.
* A jump to `buf_start` closes the loop: `buf_valid_cnt = counter+1`, the
  buffer becomes valid, and the next instruction comes from entry 0.
* Filling the last entry without such a jump marks all entries valid and
  sets `run_out_of_buffer`. The rest of that loop runs from memory. Later
  iterations play the buffered head, then fall back to memory for the tail.
* A jump anywhere else (an early exit in the first iteration) abandons the
  copy. The buffer stays invalid.

**Run from buffer**
* A jump to `buf_start` restarts at entry 0.
* A jump elsewhere by a `11` instruction invalidates the buffer and starts
  copying at the jump target.
* Any other jump returns to memory. The buffer content is kept unless the
  instruction's invalidate bit is set.
* Running past the last valid entry without a jump returns to memory with
  `run_out_of_buffer` set. This is how a loop leaves by falling through its
  final branch, and how the tail of an over-long loop is reached.

Three points are this implementation's own. The design it follows does not
fix them:
* the pc == `buf_start` test for re-entering a valid buffer (the original
  diagram compares a counter with the buffer size);
* the abandoned copy;
* the clearing rule for `run_out_of_buffer`.

The original text says "once the buffer is full, all further execution comes
from the buffer". Its state diagram, however, leaves the copy state for
memory when the buffer fills without a jump. The RTL follows the diagram.

### Timing

Both memories read synchronously. In the cycle an instruction issues, the
controller works out the next state. `mem_en`, or `buf_re` with
`buf_raddr`, then request the next instruction, so an instruction issues
every cycle with no bubble when switching source. `mem_en` and `buf_re` are
never both high.

A copied word is the memory's output in the cycle it issues. It is written at
the next clock edge.

`jump` and `jump_target` must be valid in the same cycle as the instruction
they belong to. The model is therefore a processor without jump delay slots.
A core with delay slots would need the target comparison moved to the cycle
in which the jump takes effect.

### Reset

`rst` is synchronous and active high. It selects run-from-memory with the
buffer invalid, and loads the PC with `RESET_PC`. While `rst` is high the
memory reads `RESET_PC`. The first instruction therefore issues in the first
cycle after reset, provided `rst` was high for at least one clock.

## Top level (`ibuf_fetch_top`)

`ifetch_pc` computes `next_pc` (the jump target or pc+1), which addresses
`imem`. The buffer is written with the memory output. The issued word is the
buffer output when `src_buf` is high, otherwise the memory output.

The processor itself is not part of this RTL. The top hands it `instr` and
`pc` and takes back `jump` and `jump_target`. `prog_*` loads the memory.

For power work, `mem_en`, `buf_re` and `buf_we` give per-cycle activity.
`events` gives one-cycle strobes for copy start, copy done, copy abandoned,
buffer full, buffer re-entry, repeat, exit, run-out, invalidate and
execute-and-invalidate.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ibuf_ctrl` | scripted cycle-by-cycle walk through every transition, with a 4-entry buffer |
| `tb_ibuf_store`, `tb_imem` | full read/write coverage; output held while not enabled |
| `tb_ifetch_pc` | increment, wrap and jumps against a reference |
| `tb_ibuf_fetch_top` | default size (128/76). DCT-like 3-deep loop nest, plus a program that triggers every controller event |
| `tb_viterbi` | 2048/89. Viterbi-like two-loop nest, 1.5 M cycles per run |
| `tb_adpcm` | 2048/32. 31-instruction loop with two early exits |
| `tb_ibuf_random` | 8-entry buffer. 150 random programs with random markings and branches, 4000 cycles each, against the golden model |

The system testbenches run a behavioural processor (`tta_core_model`) on
the design's output. A second copy of that model runs on a plain program
array with no buffer, and every issued instruction and pc must match it.

They also check the cycle count and the number of buffer copies, words
copied and instructions issued from the buffer, against numbers worked out
by hand in each file's header. The loop trip counts are chosen so that the
simple-buffer runs reproduce the profiled counts of the original
evaluation exactly:

* DCT: 2432 words copied, 17024 instructions from the buffer;
* Viterbi: 46992 copied, 1456752 from the buffer.

Moving the invalidate marker outward cuts the DCT copies from 32 to 4 to 1,
and the Viterbi copies from 528 to 1.

Run one, for example:

```
verilator --binary --timing --assert rtl/ibuf_pkg.sv rtl/ibuf_store.sv rtl/ibuf_ctrl.sv \
  rtl/imem.sv rtl/ifetch_pc.sv rtl/ibuf_fetch_top.sv tb/tta_core_model.sv \
  tb/tb_ibuf_fetch_top.sv --top-module tb_ibuf_fetch_top
./obj_dir/Vtb_ibuf_fetch_top
```

## Limits and departures

* Only the fetch side is implemented. The processor, its global control unit
  and the loop-detection/profiling flow that places the markers are outside
  this RTL; the markers must come with the program image.
* The memory is an RTL array with a read enable, not a memory macro. No power
  figures can be derived from it without a technology library.
* A loop whose first iteration leaves early is never buffered on that entry.
* The buffer storage is write-first: a one-instruction loop is played from
  entry 0 in the cycle right after it is written.
* Buffering decoded or decompressed instructions is not implemented.
