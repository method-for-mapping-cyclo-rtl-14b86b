# Cyclo-dynamic dataflow on a one-cycle pipeline: a sequence detector and an LZW decoder

Many stream algorithms have a fixed outer loop (one word, one code) but an
inner loop whose length depends on the data: a word of the input language
has as many letters as it has, an LZW code expands to as many bytes as its
dictionary string holds. Such an algorithm is a *cyclo-dynamic dataflow*
graph. The idea behind this RTL is to map that graph onto hardware the same
way a synchronous dataflow graph is mapped onto a pipeline: every graph node
becomes a small piece of combinational logic, every edge that carries a
delay becomes a register, a buffered edge becomes a FIFO in RAM, and the
data-dependent control becomes a small FSM whose state register is just
another delayed edge. The datapath then does one unit of work per clock,
and the variable length of the inner loop only changes how many clocks an
outer iteration takes; nothing stalls the clock and nothing needs an
instruction sequencer.

Two designs built this way are included and sit side by side in the top
module `cddf_top`:

* `seq_detector`: recognises the words `START` and `STOP` in a byte stream,
  using an input FIFO and a recogniser FSM.
* `lzw_decompressor`: decodes a stream of 12-bit LZW codes into bytes.

They share nothing but the clock and the reset.

## Graph elements as modules

The mapping uses a handful of recurring elements. Each is a module of its
own, and the two designs are assembled from them.

| element | module | what it is |
|---|---|---|
| counter | `cddf_counter` | increment node and register in a loop, with enable and initialise inputs. `cnt` is the register output and `inc` the incrementer output (`cnt+1`), so both forms of the element are available |
| RAM, combinational read | `cddf_ram` | write node, register-array storage and read multiplexer. The read address register is whatever register drives `raddr` |
| RAM, registered read | `cddf_ram_sync` | the same element with an output register (one cycle of latency, read-first), which is how an FPGA block RAM is built |
| FSM | `seq_fsm`, and the control of `lzw_decompressor` | next-state logic (`always_comb`), state register (`always_ff`), output logic decoded from the state |

Clock-edge processes hold only register transfers. Combinational
processes give every output a default before any `if` or `case`, and
every `case` has a `default`, so no latch can be inferred. Every loop in
the graph passes through a register, so no combinational loop can form.

## Sequence detector

### Data path

```
 di, ed ──► BUF[pw] (16 x 8)  ──symb = BUF[pr]──► seq_fsm ──► strt, stop, ok, err
             ▲        │                             │
      pw: cddf_counter │ full = (pw - pr) >= 8      │ ipr
             │        └── empty = (pw == pr) ───────►│
      pr: cddf_counter ◄─────────────────────────────┘
```

`sym_fifo` is a circular buffer of 16 bytes with two 4-bit pointers. Each
`ed` writes `di` at `pw` and advances `pw`. The FSM's `ipr` advances `pr`.
The head symbol `symb = BUF[pr]` is read combinationally. `full` is
asserted while at least 8 symbols are waiting. It is the token that lets
the FSM start, so the FSM never begins on an almost empty buffer.

### The recogniser

Words are separated by the zero byte (called ε below). The FSM accepts
`ST(ART | OP)`:

| state | meaning | on the head symbol |
|---|---|---|
| S1 | after reset or `start` | waits for `full`, then goes to S (reads nothing) |
| S  | between words | ε → S, `S` → A, other → E |
| A  | seen `S` | `T` → B, other → E |
| B  | seen `ST` | `A` → C, `O` → H, other → E |
| C  | seen `STA` | `R` → D, other → E |
| D  | seen `STAR` | `T` → G, other → E |
| G  | seen `START` | ε → R with `strt`, other → E |
| H  | seen `STO` | `P` → K, other → E |
| K  | seen `STOP` | ε → R with `stop`, other → E |
| E  | wrong word, `err = 1` | drops symbols until ε, then → S |
| R  | word found, `ok = 1` | → S (reads nothing) |

Each state except S1 and R consumes exactly one symbol per clock. If the
FIFO is empty, the FSM holds its state until a symbol arrives. A word that
ends early (ε in A, B, C, D or H) sends the FSM to E *without* consuming
the ε, so E consumes it and the next word starts cleanly in S.

### Timing and interface

* `ok` is high for one clock per recognised word. `strt` or `stop` is high in
  the same clock and says which word it was. `err` is high for as long as
  the FSM stays in E, once per wrong word.
* A recognised word of n letters plus its separator takes n + 2 clocks:
  n + 1 reads and the R clock. A wrong word takes one clock per symbol,
  plus one if it ended early.
* `rst` is asynchronous and active high. `start` is synchronous: it clears
  both pointers and returns the FSM to S1. A word in flight is discarded,
  and so is a write in the same clock.
* The writer gets no back-pressure. It must not run more than 15 symbols
  ahead of the reader. Its average rate must stay below the FSM's
  (slightly under one symbol per clock). An assertion in `sym_fifo` flags
  an overrun in simulation.

## LZW decompressor

### Algorithm

Codes 0–255 stand for single bytes. Each later code is a dictionary entry
stored as *(prefix code, last byte)*, so the string of a code is the
string of its prefix followed by its last byte. After the first code of a
stream, every code adds one entry at the next free code. The new entry is
(previous code, first byte of the current string). New codes are assigned
from 256 up to 4095. After that the dictionary is frozen (`dict_full`), and
decoding continues with the entries it has. There is no clear code: a new
stream begins with `start`.

One case needs care. A code may equal the next free code, which the
encoder emits for runs such as `aaaa`. The string is then the previous
string followed by its own first byte. The decoder handles it by pushing
that remembered first byte and then walking the previous code.

### Structure

* **Dictionary:** `cddf_ram_sync` of 4096 × 20 bits, holding a 12-bit
  prefix and an 8-bit byte. It is addressed directly by code. Words 0–255
  are unused.
* **Stack RAM:** one `cddf_ram_sync` of 4096 × 8 bits that holds two
  last-in first-out stacks. Side 0 grows up from address 0 and side 1
  grows down from address 4095. Its read register is the decoder's output
  register `out_sym`.
* **Walker FSM** (IDLE, WALK):
  * IDLE accepts a code on the `in_valid`/`in_ready` handshake into the
    side the popper has freed, and starts the first dictionary read.
  * WALK follows the prefix chain, one read and one push per clock. It
    collects the string from its last byte back to its root byte.
  * At the root (a code below 256), it writes the new dictionary entry,
    marks its side as holding a complete string, and moves to the other
    side.
* **Popper FSM:** empties the complete strings in order, alternating
  sides, one byte per clock. It obeys `out_ready`.

The two FSMs run concurrently, so code k+1 is walked while code k is
emitted. The walker can be at most one string ahead, because two sides
exist.

The walk loop is a dataflow cycle through the dictionary's read register.
The read data gives the next address directly. That is what keeps it at
one step per clock with a synchronous RAM.

The two stacks share 4096 bytes. Each string is at most 3841 bytes, but
two consecutive strings can together exceed the RAM, for example in a
very long run of a single byte. In that case the walker waits until the
popper has made room. It can never deadlock: the popper's side only
shrinks.

### Timing and interface

* With the output always ready, a code whose string has L bytes keeps the
  walker busy for L + 1 clocks: 1 to accept and L to walk. The special
  case takes L clocks, because its first push happens while accepting.
  The popper is busy for L clocks.
* A string's first byte appears on the output two clocks after its walk
  ends.
* In a steady stream the decoder delivers L bytes every L + 1 clocks. At
  2:1 compression, 12-bit codes average 3 bytes each, which gives 0.75
  bytes per clock.
* A stalled output (`out_ready` low) holds the popper. The walker then
  stops one string later.
* `rst` is asynchronous. `start` is synchronous and empties the dictionary
  and both stacks for a new stream.
* Precondition: the first code of a stream is below 256, and each later
  code is at most the next free code. Assertions check both.
* Memory: 81,920 dictionary bits and 32,768 stack bits, which is seven
  18-kbit FPGA block RAMs.

## Top level

`cddf_top` brings out both designs, with `det_*` ports for the detector and
`lzw_*` ports for the decoder. Its parameters are `DET_DEPTH` (16),
`DET_FULL_LEVEL` (8), `LZW_CODE_W` (12) and `LZW_SYM_W` (8). The
detector's symbol type and state names are in `cddf_pkg`.

## What follows the original design and what does not

These parts follow the original design:

* the detector's FIFO: its size, pointers and half-full start condition
* the detector's state set and transitions through G and K
* the reset of the state to S1
* the graph elements (counter with two output taps, RAM, FSM)

These are choices made here:

* **E and R states.** The original specifies the states E and R only as
  "error" and "final". Their behaviour here is E dropping symbols up to ε,
  and R a one-clock report state that reads nothing.
* **G and K on a wrong symbol** go to E, as the word-recognition rule
  requires. If they stayed in place instead, a word such as `STARTX`
  would be reported as `START`.
* **`start`** clears the pointers as well as the FSM, and takes priority in
  every state.
* **When the FSM reads.** The FSM reads in every state but S1 and R, and
  stalls on an empty FIFO. The original relies on a steady input rate
  instead.
* **`strt` and `stop`** are single-clock pulses aligned with `ok`.
* **No FIFO initialisation.** The FIFO storage is not zero-initialised,
  because it is never read while empty.
* **The whole LZW decoder structure.** Only the decoder's function and its
  results were available: about 360 MHz, 205 MB/s (≈ 0.57 bytes per
  clock) and seven block RAMs on a Kintex-7, built from two FSMs and
  three FIFO-like buffers. This decoder keeps the two FSMs and the memory
  budget. Its buffers are the dictionary and a two-ended stack, and a
  handshake replaces an input FIFO. The code width and dictionary size
  are assumed (12 bits, 4096). Its rate of 0.75 bytes per clock at 2:1
  compression is higher than the reported figure, but no clock rate has
  been measured for it.

No FPGA timing or LUT counts were measured for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_cddf_counter` | count, initialise and enable priority, incrementer tap, asynchronous reset |
| `tb_cddf_ram`, `tb_cddf_ram_sync` | random read/write against a model array; same-address read-during-write; read-enable hold |
| `tb_sym_fifo` | head symbol, `full` and `empty` every clock against a queue model, the level swept from 0 to 15, `clr` |
| `tb_seq_fsm` | events for 300 random words against a software classifier. Checks the exact clock count (one per symbol, plus one per found word or early-ended wrong word). Checks that nothing is read before `full`, and a `start` in mid-word |
| `tb_seq_detector` | the full detector with random write gaps: no report before 8 symbols, event order, restart |
| `tb_lzw_decompressor` | round trip against a software LZW encoder. The first stream has many special-case codes, and its clock count must equal a cycle model of the two FSMs exactly. A 60,000-byte stream fills the dictionary under random input/output stalls. A third stream follows `start`. A 2.42-million-byte run of one byte, with the output stalled near the end, makes the two stacks meet |
| `tb_lzw_workload` | 150,000 bytes of text at about 2:1 compression, decoded at default size. Measures 0.73 bytes per clock and requires at least 0.57 |
| `tb_cddf_top` | both designs at default sizes, concurrently. Every mechanism must occur at least once: wait for half-full, empty stall, START, STOP, error, restart, LZW special case, full dictionary, output back-pressure, stacks meeting |

Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cddf_pkg.sv tb/tb_cddf_top.sv --top-module tb_cddf_top
./obj_dir/Vtb_cddf_top
```

`tb_cddf_top` runs the top with no parameter overrides in a few seconds.

Verilator's lint reports `SYNCASYNCNET` on the modules with assertions. This comes from `disable iff (rst)` sampling the asynchronous
reset and does not affect the logic.
