# Self-attention score core: Q·Kᵀ in Q8.8 on a small FPGA

Self-attention is dominated by one matrix product: the score matrix
S = Q·Kᵀ, for n tokens with key dimension d_k. This core does just that
product, and does it with almost no hardware. It uses one 16×16 multiplier, one
accumulator and a few block RAMs. A host sends Q, K and V over a UART. The core
stores them on chip and streams all n²·d_k multiply-accumulates through a
two-stage pipeline at one per clock. It then sends the n×n score matrix back over
the same UART. Softmax, the 1/√d_k scaling and the product with V stay on the host:

    Attention(Q,K,V) = softmax(Q·Kᵀ / √d_k)·V      (only Q·Kᵀ is computed here)

The design targets a Xilinx Artix-7 (XC7A100T) at 100 MHz. Its RTL is
vendor-neutral SystemVerilog.

## Arithmetic: Q8.8, truncating products, a wide accumulator

All data are 16-bit signed Q8.8 fixed point. The value is the integer divided by
256, so the range is −128 … +127.996 in steps of 1/256. The host quantizes with
`round(x·256)`.

Each score is

    S(i,j) = sat16( Σ_k  floor( Q(i,k)·K(j,k) / 256 ) )

- Every 32-bit product is rescaled back to Q8.8 right away by an arithmetic
  shift right of 8. This rounds toward minus infinity, so −1/256 · 1/256 gives
  −1/256, not 0. Any bit-exact software reference must do the same.
- The rescaled terms are summed in a 32-bit accumulator (`ACC_W`). The sum loses
  no precision and does not wrap for any d_k below 512.
- The finished sum is clamped to the Q8.8 range [−32768, 32767] (raw integers)
  before it is stored and sent. A clamp sets the sticky `sat_seen` output. The
  full-width sum is also available inside the MAC (`acc_out`).

The accumulator width and the clamp are this design's choices. The source only
requires that accumulation lose no precision and that overflow behaviour be
defined.

## Host link

The link is a UART, 8N1: a start bit, eight data bits with the LSB first, one
stop bit, so 10 bit times per byte. The default rate is 115200 baud from the
100 MHz clock (`CLKS_PER_BIT = 868`). The bit rate and the byte order below are
this design's choices.

| direction | content | order | bytes |
|---|---|---|---|
| host → core | Q, then K, then V, each N×DK, row-major | each word low byte first | 3·N·DK·2 |
| core → host | S, N×N, row-major (S(0,0), S(0,1), …) | each score low byte first | N·N·2 |

A new run starts with the first byte the host sends while the core is idle. No
command byte is needed. The core drops a frame whose stop bit is low and raises
the sticky `rx_frame_err`. Both sticky flags clear when the next load begins.
The core ignores bytes that arrive while it is computing or sending.

At the default size (N = 16, DK = 64) the times are:

| phase | amount | time |
|---|---|---|
| load | 6144 frames | 0.53 s |
| compute | 16384 MACs + 4 cycles | 0.164 ms |
| return | 512 frames | 44 ms |

The serial line takes almost all of the end-to-end time. The compute itself
sustains 100 M MAC/s.

## Block structure

```
uart_rx ─► word_assembler ─► sa_controller ──load──► qkv_memory (Q | K | V BRAMs)
                                  │  addresses, first/last tags      │ Q, K in parallel
                                  │                                  ▼
                                  │                            mac_datapath (2 stages)
                                  │  score address/data ◄────────────┘
                                  ▼
                          bram_sdp (N×N scores) ─► score_sender ─► uart_tx
```

| file | role |
|---|---|
| `sa_pkg.sv` | Q8.8 type, state enum, saturation function |
| `uart_rx.sv`, `uart_tx.sv` | 8N1 serial receive / transmit |
| `word_assembler.sv` | two bytes → one 16-bit word |
| `qkv_memory.sv` | three block RAMs for Q, K, V; one linear load port; Q and K read ports side by side; one V read port |
| `bram_sdp.sv` | simple dual-port RAM with a one-cycle registered read, used for every matrix |
| `mac_datapath.sv` | pipelined multiply, >>8, accumulate, clamp |
| `sa_controller.sv` | six-state FSM, all addressing and sequencing |
| `score_sender.sv` | reads the scores and feeds them to the UART two bytes at a time |
| `self_attention_top.sv` | wires the blocks together |

The control path (FSM and address counters) is kept apart from the datapath
(memories and MAC). The datapath has no control logic of its own beyond the
first/last tags that travel with each operand pair.

## The controller and the streaming schedule

The controller is the part that takes the most care to follow. Its six states
are IDLE, LOAD, COMPUTE, ACCUMULATE, STORE and DONE:

| state | what happens | leaves when |
|---|---|---|
| IDLE | waits; the first received word goes to load address 0 | a word arrives |
| LOAD | each received word goes to the next load address | 3·N·DK words loaded |
| COMPUTE | one Q read and one K read every cycle, for the i, j, k loops | the last (i, j, k) read is issued |
| ACCUMULATE | the MAC pipeline drains; the final dot product completes | the last MAC result appears (3 cycles) |
| STORE | the last score is written to the score RAM | after 1 cycle |
| DONE | `done` rises and the score sender starts | the sender has sent the last byte |

COMPUTE does not stop between dot products. Score S(i,j) needs the pairs
(Q(i,k), K(j,k)) for k = 0 … DK−1. The controller issues these reads
back-to-back for every (i, j), so the MAC sees N·N·DK consecutive valid pairs.
Two tags travel with each pair, delayed one cycle to match the BRAM latency:
`first` (k = 0) makes the accumulator restart from this term instead of adding
to the previous sum, and `last` (k = DK−1) marks the result as finished. Each
finished score is written to the score RAM one cycle after the MAC presents it,
while COMPUTE goes on reading the next pairs. So ACCUMULATE and STORE are not
per-element phases. They are the drain at the end of the stream, and every
earlier score is accumulated and stored while COMPUTE runs.

Cycle by cycle, for the last pair (read issued in cycle c):

```
c     COMPUTE     Q/K read of the last pair
c+1   ACCUMULATE  pair at MAC input (BRAM output), tagged last
c+2   ACCUMULATE  product register (stage 1)
c+3   ACCUMULATE  accumulator / result register (stage 2), out_valid
c+4   STORE       final score written
c+5   DONE
```

COMPUTE through STORE therefore takes N·N·DK + 4 cycles. The MAC alone, from
its first pair to its last result, takes N·N·DK + 2 cycles: one MAC per cycle
plus the two-stage fill.

Addresses come from running pointers, not from multiplying i·DK. The K pointer
just counts through K's row-major storage: after the last element of row j comes
row j+1. The Q pointer goes back to the start of row i after each dot product.
After the last K row, it moves on to row i+1 while the K pointer returns to 0.

## The MAC pipeline

- Stage 1: the signed 16×16 → 32-bit product of the two BRAM outputs goes into
  a register. On an FPGA this maps onto one DSP slice.
- Stage 2: the product is shifted right by 8 (arithmetic) and added to the
  accumulator, or replaces it when tagged `first`.
- The result registers load when the pair tagged `last` passes stage 2.

An assertion checks that a `last` pair only arrives while a dot product is
open. A second assertion, in the controller, checks that MAC results only arrive
during COMPUTE or ACCUMULATE.

## Memories

Q, K and V each sit in their own N·DK × 16 block RAM, and the scores in an
N·N × 16 one. At the defaults that is 3 × 16 384 + 4 096 = 53 248 bits. The read
is registered, with one cycle of latency, and reads are read-first on a
same-address collision. Only the controller reads Q and K, one word of each per
cycle. V is stored but this core never uses it. Its read port is brought out to
the top level (`v_rd_en`, `v_rd_addr`, `v_rd_data`) for a later stage. The
arrays carry `ram_style = "block"` so that the tools infer block RAM.

## Parameters (`self_attention_top`)

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | sequence length (rows of Q, K, V; size of S) |
| `DK` | 64 | key dimension d_k |
| `CLK_HZ` | 100 000 000 | clock frequency |
| `BAUD` | 115 200 | UART bit rate |
| `CLKS_PER_BIT` | `CLK_HZ / BAUD` (868) | clocks per UART bit; may be set directly |
| `ACC_W` | 32 | accumulator width |

`N` and `DK` are fixed when the design is built. To run a different matrix size,
rebuild with new values. Any positive sizes work; memory use grows as 3·N·DK +
N·N words. The ports are: `clk`, `rst` (synchronous, active high), `uart_rx`,
`uart_tx`, `done`, `state`, `sat_seen`, `rx_frame_err`, and the V read port.

## How far this follows its source, and where it departs

These parts follow the published architecture:

- Q8.8 data with the >>8 truncation after every product.
- The two-stage MAC at one operation per clock.
- Dedicated on-chip Q/K/V memories with single-cycle reads.
- The six named controller states.
- The UART link in both directions, with each 16-bit word carried as two frames.
- The 100 MHz target clock.
- Softmax and ×V left to the host.

These are this design's own choices, because the source does not give them:

- The default sizes N = 16, DK = 64.
- The bit rate, the 8N1 frame and the low-byte-first order.
- The Q, K, V load order.
- The 32-bit accumulator and the clamp to Q8.8 on store.
- How the work is split between COMPUTE, ACCUMULATE and STORE (a continuous
  stream with a drain at the end).
- Starting a run on the first received word.
- The status pins and the V read port.

The source reports a post-implementation footprint of 34 LUTs, 10 registers,
3 DSP slices and 6 block RAM tiles. No implementation that holds a UART, the
counters and a 32-bit accumulator can reach 10 registers. Expect this RTL to use
a few hundred flip-flops: about 300 in a generic synthesis. It still uses a
small fraction of the device. The RTL has not been tuned toward those figures,
and no FPGA implementation results are given here.

## Simulation

Each testbench in `tb/` checks its own results. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. They all
run with plain Verilator 5:

    verilator --binary --timing --assert -y rtl +libext+.sv rtl/sa_pkg.sv \
              tb/tb_self_attention_top.sv --top-module tb_self_attention_top -Mdir obj
    ./obj/Vtb_self_attention_top

| testbench | what it checks |
|---|---|
| `tb_self_attention_top` | End to end at N = 4, DK = 8, 4 clocks per bit. The bench acts as the host over the serial lines and runs four operations: random data, extreme values that clamp in both directions, alternating signs, and random data after a bad frame. It compares every score with an independent reference, times COMPUTE…STORE as N·N·DK + 4 cycles, reads V back, and counts that each mechanism occurred. |
| `tb_self_attention_full` | One operation at the default size and real bit rate, with no parameters overridden (about 58 M clock cycles; roughly 30 s in Verilator). It also checks that loading takes the 3·N·DK·2·10 bit times of the transfer. |
| `tb_self_attention_sizes` | Six sizes side by side (1×1, 2×3, 3×16, 7×5, 8×8, 5×32), each through three operations: random full-range, alternating ±128 extremes and small values. Every score is compared and the cycle count checked. Its per-size host is `tb/sa_size_run.sv`; build it with `-y tb` as well. |
| `tb_mac_datapath` | Back-to-back and gapped dot products; results, clamp, overflow flag, and exact two-cycle latency |
| `tb_sa_controller` | Load addresses, read-address sequence, tag alignment, score writes, and time spent in each state, over two runs |
| `tb_qkv_memory`, `tb_bram_sdp` | Partitioned load, parallel reads, read-first behaviour and hold |
| `tb_uart_rx`, `tb_uart_tx`, `tb_word_assembler`, `tb_score_sender` | Serial framing, bit timing, framing error and glitch rejection, byte pairing, and score byte order |

The simulator has two states. Every register that is read after reset is reset.
The RAM arrays are not reset, but they are always written before they are read.

## Not included

- Softmax, the 1/√d_k scale and the product with V. These are host software in
  this architecture.
- The host's quantization and its UART driver.
- Run-time-variable sequence length.
- Multi-head operation.
