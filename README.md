# 16 x 8 FIFO buffer with pointer-derived status flags

A FIFO buffer sits between a producer and a consumer that cannot run in
lockstep. It takes words when the producer has them and gives them up in the
same order when the consumer asks. This design holds 16 bytes. It never shifts
data. A write pointer marks the next free slot and a read pointer marks the
oldest word. Every status output is derived from those two pointers: full,
empty, a half-full threshold, and sticky overflow and underflow flags. A
separate counter reports how many words are held.

The structure is a pointer-based FIFO of the kind used as the locally
synchronous part of a globally-asynchronous, locally-synchronous (GALS)
system. All of it runs on one clock. No asynchronous wrapper or handshake
interface is included (see "Scope" below).

## Block map

```
            wr ──►┌───────────────┐ fifo_we ┌──────────────┐
                  │ write_pointer ├────────►│              │
     fifo_full ──►│  (gate + ctr) ├─wptr───►│ memory_array │── data_out
                  └───────────────┘         │   16 x 8     │
data_in ───────────────────────────────────►│              │
            rd ──►┌───────────────┐  rptr   │              │
                  │ read_pointer  ├────────►│              │
    fifo_empty ──►│  (gate + ctr) │         └──────────────┘
                  └───────┬───────┘
                  fifo_rd │   wptr, rptr, wr, rd, fifo_we
                          ▼
                  ┌───────────────┐── fifo_full, fifo_empty (back to the pointers)
                  │ status_signal │── fifo_threshold
                  └───────────────┘── fifo_overflow, fifo_underflow
                  ┌───────────────┐
fifo_we, fifo_rd ►│ fifo_counter  │── fifo_counter (0..16)
                  └───────────────┘
```

| Module | File | Role |
|---|---|---|
| `fifo_buffer` | `rtl/fifo_buffer.sv` | Top level: wires the five blocks together |
| `write_pointer` | `rtl/write_pointer.sv` | `fifo_we = wr & ~fifo_full`; 5-bit write pointer advanced by each accepted write |
| `read_pointer` | `rtl/read_pointer.sv` | `fifo_rd = rd & ~fifo_empty`; 5-bit read pointer advanced by each accepted read |
| `memory_array` | `rtl/memory_array.sv` | 16 x 8 storage: synchronous write at `wptr[3:0]`, combinational read at `rptr[3:0]` |
| `status_signal` | `rtl/status_signal.sv` | Full, empty and threshold from the pointers; registered overflow and underflow |
| `fifo_counter` | `rtl/fifo_counter.sv` | Occupancy counter: +1 per write, −1 per read, held when both happen |
| `fifo_pkg` | `rtl/fifo_pkg.sv` | Shared sizes: `DATA_WIDTH=8`, `DEPTH=16`, pointer and counter widths |

## Telling full from empty: the wrap bit

This is the one subtle part of the design. The memory has 16 slots, so four
address bits would be enough. With only four bits, though, "the read pointer
equals the write pointer" would hold both when nothing is stored and when all
16 slots are filled. Each pointer therefore carries a fifth bit. That bit flips
each time the pointer wraps past slot 15. `status_signal` compares the pointers
in two parts:

* `pointer_equal` is true when the low four bits match, so both pointers name the same slot.
* `fbit_comp` is the XOR of the two fifth bits. It is 1 when the writer has wrapped once more than the reader.

| `pointer_equal` | `fbit_comp` | Meaning |
|---|---|---|
| 1 | 0 | **empty**: the reader has caught up with the writer |
| 1 | 1 | **full**: the writer is exactly one lap (16 words) ahead |
| 0 | x | partly filled |

The same 5-bit pointers also give the occupancy directly: `wptr − rptr`
(mod 32) is always in 0..16. `fifo_threshold` is the OR of bits 4 and 3 of
that difference, so it is high when 8 or more words are held (half of 16).

Because full and empty depend only on the pointers, they change in the same
cycle as the pointer that moves. They then feed back into the pointer blocks to
gate the next request. `wr` and `rd` never reach the pointer registers
directly. A write while full and a read while empty are therefore refused
without corrupting anything.

## Overflow and underflow

A refused request is not silent. `status_signal` keeps two sticky flags in
flip-flops that have an asynchronous clear:

* `fifo_overflow` is set at the clock edge where `wr` is high while the FIFO is full (`overflow_set`). It stays high until the next accepted read makes room.
* `fifo_underflow` is set at the clock edge where `rd` is high while the FIFO is empty (`underflow_set`). It stays high until the next accepted write.

Both flags rise one clock after the refused request. Both are cleared by
`rst_n`.

## Cycle timing

Inputs are sampled on the rising edge of `clk`. The testbenches change them on
the falling edge. `rst_n` is active low and asynchronous. It clears both
pointers, the counter and the two sticky flags. It does not clear the storage.

* **Write:** with `wr=1` and `fifo_full=0`, `data_in` is stored at the rising edge and `wptr` advances.
* **Read:** the read port has no delay. While the FIFO is not empty, `data_out` already shows the oldest word (first-word fall-through). With `rd=1`, that word is taken during the cycle, and at the edge `rptr` moves on to the next word. When the FIFO is empty, `data_out` shows a stale slot and has no meaning.
* **Throughput:** one write and one read can be accepted in every cycle, in the same cycle if need be. A simultaneous read and write leaves `fifo_counter` unchanged. From empty, 16 writes on 16 consecutive clocks make `fifo_full` rise right after the 16th edge. 16 reads then bring `fifo_empty` back after the 16th read edge.
* **Flags:** `fifo_full`, `fifo_empty` and `fifo_threshold` are combinational from the pointer registers. `fifo_overflow`, `fifo_underflow` and `fifo_counter` are registers.

## Top-level interface (`fifo_buffer`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `wr` | in | 1 | write request |
| `rd` | in | 1 | read request |
| `data_in` | in | 8 | word to write |
| `data_out` | out | 8 | oldest word (valid while not empty) |
| `fifo_full` | out | 1 | 16 words held |
| `fifo_empty` | out | 1 | no word held |
| `fifo_threshold` | out | 1 | 8 or more words held |
| `fifo_overflow` | out | 1 | a write was refused because the FIFO was full (sticky until a read) |
| `fifo_underflow` | out | 1 | a read was refused because the FIFO was empty (sticky until a write) |
| `fifo_counter` | out | 5 | number of words held, 0..16 |

Parameters: `DATA_WIDTH` (default 8) and `DEPTH` (default 16). `DEPTH` must be
a power of two. Pointer and counter widths are derived from it. Synthesised,
the whole FIFO is about 35 word-level cells, 17 flip-flops and a 128-bit memory.

## What is original and what is chosen here

These follow the source design:

* the split into write pointer, read pointer, memory array and status flag generator, with the port names used above;
* the 16 x 8 size and the 5-bit pointers;
* full and empty decided by comparing the pointers;
* a threshold output produced from the pointer difference;
* overflow and underflow held in clock-enabled flip-flops with clear;
* pointers reset to zero;
* the occupancy counter and its rule that a simultaneous read and write leaves it unchanged.

These are choices made here, where the source says nothing or is ambiguous:

* **Threshold level.** `fifo_threshold` means "at least half full" (bits 4 and 3 of the pointer difference).
* **Sticky-flag rules.** Overflow clears on the next accepted read. Underflow clears on the next accepted write.
* **Read port.** The read port is combinational, so the FIFO is first-word fall-through. The memory block is drawn with no read enable, only the read pointer. A simulation trace of the original design instead shows the output at 0 until the first read. That suggests the original registered its output on a read. If you need that behaviour, register `data_out` on `fifo_rd` in `fifo_buffer`.
* **Reset polarity.** Reset is active low (`rst_n`), as in the block diagram. The simulation trace uses an active-high `rst`.
* **The counter.** It is a separate register, not a value derived from the pointers. An assertion in `fifo_buffer` checks that the two always agree.
* **Reads after filling.** The original simulation starts reading once the FIFO reports full. This is treated as the behaviour of the surrounding system, not of the FIFO. `rd` is an ordinary input.

## Scope

* **Single clock.** The buffer is one locally synchronous block. The source describes the GALS idea in general terms: synchronous blocks, each wrapped in an asynchronous request/acknowledge interface. It gives no signals, protocol or circuit for that wrapper, so none is included here. A dual-clock version would need Gray-coded pointers synchronised into the other clock domain. That is also outside this design.
* **No storage reset.** The storage is not reset. Nothing reads a slot before it has been written, except `data_out` while the FIFO is empty.

## Assertions

* `status_signal`: full and empty are never high together.
* `fifo_counter`: the counter never counts past `DEPTH` or below zero.
* `fifo_buffer`: `fifo_counter` equals `wptr − rptr`.

All three are concurrent assertions, disabled during reset.

## Simulating

Each block has a self-checking testbench in `tb/`. Each compares the block
against a reference model written in the testbench and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it exercises |
|---|---|
| `write_pointer_tb`, `read_pointer_tb` | gating by full/empty, increment, wrap from 31 to 0, asynchronous clear |
| `memory_array_tb` | every address with both wrap-bit values; random writes with and without `fifo_we` |
| `status_signal_tb` | every occupancy 0..16 at every pointer rotation; sticky flag set/clear rules; asynchronous clear |
| `fifo_counter_tb` | 16 writes to 16, 16 reads to 0, random traffic with simultaneous operations |
| `fifo_buffer_tb` | the full design at its default size; see below |

`fifo_buffer_tb` first runs the classic fill-and-drain sequence. It writes 16
bytes on consecutive clocks and checks that the counter climbs by one per clock
and that full rises after exactly 16 writes. A 17th write must be refused and
must raise overflow. The 16 bytes are then read back in order, and empty must
rise after exactly 16 reads. A further read must raise underflow. Next come
3000 cycles of random traffic checked against a queue model. The test counts
how often each mechanism occurred: full, empty, threshold, overflow,
underflow, refused writes and reads, simultaneous read+write, and pointer
wrap. It fails if any of them never occurred.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fifo_pkg.sv tb/fifo_buffer_tb.sv --top-module fifo_buffer_tb
./obj_dir/Vfifo_buffer_tb
```

To run another block's test, substitute its testbench name. Each run takes
well under a second. The package must come first on the command line. Lint
a module with `verilator --lint-only -Wall -Wno-fatal rtl/fifo_pkg.sv rtl/<module>.sv -y rtl`.
Lint reports three kinds of warning, all expected:

* unused wrap bits in `memory_array`;
* unused package constants;
* `SYNCASYNCNET` on `rst_n`, because the assertions use it in their `disable iff` while the flip-flops use it as an asynchronous clear.
