# Low power FIR DSP IP for an ARM/AMBA system

This is a small DSP block that filters data in memory. It is meant to sit in an
ARM based system-on-chip with a two-level AMBA bus. The CPU programs it over the
low-bandwidth peripheral bus (APB). The IP then fetches the samples itself over
the high-bandwidth system bus (AHB), runs them through a direct form FIR filter,
and writes the results back to memory.

Power is saved in three ways:

- **Coefficient segmentation.** Each coefficient `h` is split into `h = s + m`.
  `s` is a signed power of two and `m >= 0` is smaller than `|s|`. The filter
  multiplies the sample by the short operand `m` and adds a *shifted* copy of the
  sample for `s`. This unit is the MASU (multiply-add-shift unit).
- **Clock gating under a power management unit (PMU).** When the host allows it
  and the core is idle, the IP switches off its own clocks. Only the PMU keeps
  running, waiting for a `wakeup` from the bus bridge.
- **Two clock domains.** The configuration registers run on the slow peripheral
  clock. Only the datapath runs on the fast system clock.

The RTL follows the structure of the paper "Re-Usable Low Power DSP IP embedded in
an ARM based SoC Architecture". That paper gives the block structure, the
segmentation rule and the bus protocols. Almost all widths, encodings, handshakes
and the register map are this implementation's own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Structure

```
             hclk (sbclk) domain                         |  gated by PMU
  AHB <-> ahb_target_wrapper <-BVCI-> vc_initiator_if <-> lp_dsp_core
                                                           |  pmu       (free sbclk)
                                                           |  dmu       RFIFO, WFIFO (sync_fifo)
                                                           |  fir_core  HRAM, XRAM (sram_1r1w),
                                                           |            coef_segment, HREG/XREG, masu
  ---------------------------------------------------------+---------------------------
             pclk (pbclk) domain                           |
  APB <-> apb_initiator_wrapper <-PVCI-> vc_target_if <-> register_block
                                          clock_gate x2 (one per domain, enable from PMU)
  wakeup -> pmu,  pmu -> sleep   (to/from the AHB-to-APB bridge)
```

| Module | Role |
|---|---|
| `lp_dsp_subsystem` | Top level: the IP plus both bus wrappers. Has an AHB master port, an APB slave port, `wakeup` and `sleep`. |
| `lp_dsp_ip` | The IP itself: DSP core, register block, both VC interfaces and the clock gates. |
| `ahb_target_wrapper` | Turns BVCI requests into AHB (AMBA 2.0) single transfers as bus master. |
| `apb_initiator_wrapper` | Turns APB transfers into PVCI requests. |
| `vc_initiator_if` | BVCI initiator. It merges the DMU's read and write channels, keeps up to 2 requests outstanding and routes the responses back. |
| `vc_target_if` | PVCI target. It answers every request in the same cycle and decodes register offsets. |
| `register_block` | Configuration and status registers, on the peripheral clock. |
| `clock_gate` | Glitch-free latch-and-AND clock gate. |
| `lp_dsp_core` | Contains the PMU, DMU and FIR core. |
| `pmu` | Sleep/wake state machine. Drives the clock enables and `sleep`. |
| `dmu` | Data movement between memory and the FIR core. Raises `active` while a block runs. |
| `sync_fifo` | The DMU's RFIFO and WFIFO. |
| `fir_core` | Folded FIR filter with an FSM, HRAM, XRAM, HREG, XREG and the MASU. |
| `sram_1r1w` | Generic RAM used for HRAM and XRAM. |
| `coef_segment` | Splits `h` into `s` and `m` on the way into HRAM. |
| `masu` | The multiply-add-shift unit with its accumulator. |
| `dsp_pkg` | Shared widths, bus cell structs, the register map and the segmentation function. |

## Coefficient segmentation and the MASU

HRAM does not store `h`. It stores the segmented form `{m, sh, neg, nz}`, so that
`h = m + (nz ? (neg ? -2^sh : 2^sh) : 0)`. `coef_segment` computes this when a
coefficient is written:

- `h > 0`: `s = 2^k` with `2^k <= h < 2^(k+1)`, and `m = h - s` (so `m < 2^k`).
- `h < 0`: `s = -2^k` with `k` the smallest value so that `2^k >= |h|`, and
  `m = h + 2^k` (so `0 <= m < 2^(k-1)`).
- `h = 0`: `s = 0` and `m = 0`.

For 16-bit coefficients, `m` is always non-negative and below `2^14` (it is
stored in a 15-bit field). The
multiplier therefore sees a small positive operand that has a lot of leading
zeros, and that is where the power saving comes from. One MASU step is:

```
y <= (first tap ? 0 : y) + x * m + (nz ? (neg ? -(x << sh) : (x << sh)) : 0)
```

The result is exactly `y + x*h`, bit for bit. The accumulator is
`16 + 16 + log2(64) = 38` bits wide, so a 64-tap sum of full-scale products cannot
overflow.

## The folded FIR core and the doubled XRAM

The core computes `y[n] = sum_{k=0}^{T-1} h[k] x[n-k]` for each input sample
(`T = ntaps`, 1..64). It uses one MASU, one tap per clock. Samples before the
first sample of a block count as zero. The pipeline is:

1. The FSM puts tap `k` on the HRAM read address and `(n-k) mod 128` on the XRAM
   read address.
2. HREG and XREG capture the two read words.
3. The MASU accumulates them one clock later.

Each output takes `T + 3` clocks: one idle or decision cycle, `T` read cycles, one
drain cycle and one output cycle. That gives 45 clocks per sample for a 42-tap
filter and 64 clocks for a 61-tap filter. The end-to-end simulation measures
exactly these figures, so AHB traffic is not the bottleneck.

XRAM holds 128 samples, twice the HRAM depth. It is a circular buffer written in
arrival order. While output `n` is computed, the core reads samples `n-T+1 .. n`.
New samples may arrive at the same time, up to `2*64 - T` samples ahead of `n`,
and they never overwrite a sample still in use (`x_ready` enforces this). The
DMU can therefore keep streaming, and the MAC loop never has to wait for input
in the middle of an output. With `T <= 64`, at least 64 samples of look-ahead
are always allowed.

## Two clock domains without synchronisers

The system clock must be an integer multiple of the peripheral clock, with
rising edges aligned. The testbenches use ratios of 2 and 3. Signals can then
cross between the domains without synchronisers:

- The register block's configuration outputs feed the fast domain directly. They
  must not change while a block runs, because the DMU latches them at start.
- Commands are **toggles**: start, entersleepmode and "write one coefficient".
  Each command flips a bit. The receiver compares the bit with its last sample
  and makes a one-clock pulse. The data that goes with a coefficient write
  (address and value) is held in registers until the next write.
- Status (`active`, `done`, `error`, `sleep`) is read in the slow domain as a
  level.

## Power management

`pmu` has two states. In AWAKE it raises `clk_en`. That enables both clock gates,
one in front of the fast-domain logic and one in front of the register block.

The CPU controls sleep with two bits in CTRL:

- `sleepmode` (bit 1) allows sleeping.
- Writing 1 to `entersleepmode` (bit 2) requests it.

The PMU holds a request until the DMU drops `active`, then enters SLEEP. It drops
a request if `sleepmode` is 0. In SLEEP both clocks stop, `sleep` is high, and
only the PMU runs on the free system clock. A high `wakeup` returns it to AWAKE
on the next clock.

In a full system, the AHB-to-APB bridge would decode an address to produce
`wakeup`. It would also answer register accesses with an AHB error while `sleep`
is high. That bridge behaviour is outside this RTL. Here, a read during sleep
returns the current register values, because reads are combinational, and a
write during sleep is lost.

## Bus side

**BVCI** (between `vc_initiator_if` and `ahb_target_wrapper`):

- The request cell carries `cmd`, `address`, `be`, `wdata`, `plen` and `eop`, and
  is qualified by `cmdval`/`cmdack`.
- The response cell carries `rdata`, `reop` and `rerror`, and is qualified by
  `rspval`/`rspack`.
- The two handshakes are independent. An initiator may have several requests
  outstanding, and the responses come back in order.
- Every transfer is one 32-bit word.

**AHB** (`ahb_target_wrapper`):

- The wrapper requests the bus, waits for `HGRANT` together with `HREADY`, then
  runs one NONSEQ/SINGLE word transfer at a time.
- Wait states are honoured.
- ERROR, RETRY and SPLIT all come back as `rerror`. Retry and split are not
  handled.

**PVCI / APB** (`apb_initiator_wrapper`, `vc_target_if`):

- In the APB setup cycle the wrapper raises `val`.
- The target acknowledges it in the same cycle. A write takes effect at the end
  of that cycle.
- Read data is registered onto `PRDATA` for the enable cycle.
- `rerror` (unknown offset, or a write without all byte enables) appears on the
  extra output `perr`.

## Programming

Registers are 32-bit words, at byte offsets from the IP's APB base address.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | CTRL | W / R | bit 0: start (write 1). bit 1: sleepmode. bit 2: entersleepmode (write 1). Reads back sleepmode only. |
| 0x04 | STATUS | R | bit 0: active. bit 1: done (held until the next start). bit 2: error (an AHB error response during the block). bit 3: sleep. |
| 0x08 | SRC | R/W | Byte address of the first sample. One sample per word, in bits 15:0. |
| 0x0C | DST | R/W | Byte address of the first result. One 32-bit result per word. |
| 0x10 | NSAMP | R/W | Number of samples, which is also the number of results. |
| 0x14 | NTAPS | R/W | Number of coefficients, 1..64. |
| 0x18 | OSHIFT | R/W | The 38-bit sum is shifted right arithmetically by this amount, then truncated to 32 bits. |
| 0x1C | COEFADDR | R/W | HRAM address for the next coefficient write. |
| 0x20 | COEFDATA | W | Writes a 16-bit two's complement `h` to HRAM[COEFADDR], then increments COEFADDR. |

To filter one block:

1. Write COEFADDR = 0, then write COEFDATA once per tap.
2. Write SRC, DST, NSAMP, NTAPS and OSHIFT.
3. Write CTRL = 1 (or CTRL = 3 to also allow sleep).
4. Poll STATUS until `done` is set.

Result `i` is `(sum_k h[k] * x[i-k]) >>> OSHIFT`, truncated to 32 bits.

## Parameters

| Constant / parameter | Value | Origin |
|---|---|---|
| sample width `XW` | 16 | Same as the source paper |
| coefficient width `CW` | 16 | Own choice |
| HRAM depth `HMAX` | 64 | Own choice: the smallest power of two that holds a 61-tap filter |
| XRAM depth | 128 = 2 × HMAX | The source paper's rule |
| accumulator | 38 bits | Own choice: `XW + CW + log2(HMAX)` |
| bus data / address | 32 / 32 | Own choice |
| RFIFO / WFIFO depth | 4 / 4 | Own choice (`lp_dsp_ip` parameters `RF_DEPTH`, `WF_DEPTH`) |
| BVCI requests in flight | 2 | Own choice (`MAXOUT`) |

## Departures and own choices

- **Folded structure.** The filter uses one MASU, as in the source block diagram.
  The paper's power figures come from an *unfolded* simulation model, which is
  not reproduced here.
- **Own design decisions.** Nothing of the following is specified in the source:
  the choice of `s`, segmentation in hardware at write time, the FSM and its
  `T + 3` timing, the masking of samples before the start of a block, the memory
  layout, output scaling, FIFO depths, arbitration, the register map and the
  toggle scheme.
- **Generic RAMs.** HRAM and XRAM are plain arrays with an asynchronous read
  port, followed by HREG/XREG. A real implementation would use technology RAM
  macros for anything above 256 bits; these RAMs are 1344 and 2048 bits.
- **Limited bus wrappers.** The AHB wrapper does single transfers only, with no
  bursts and no RETRY/SPLIT handling. The APB wrapper assumes zero-wait-state
  AMBA 2.0 APB.
- **No reset of RAM contents.** There is one asynchronous active-low reset for
  both domains.
- **Not built.** The rest of the SoC is outside this RTL: CPU, memories, DMA,
  arbiter, decoder, bus bridge and peripherals. The conventional MAU that the
  source compares against is also not included. Power was not estimated.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Every testbench
ends with a line `TB_RESULT checks=N failures=M`. Two behavioural models support them:

- `tb/ahb_mem_model.sv`: an AHB memory with a one-master arbiter, random wait
  states, random grant delay and an error region.
- `tb/bvci_mem_model.sv`: a BVCI memory with independent random request and
  response delays.

`tb_lp_dsp_subsystem` runs the top level at its default parameters:

- It filters 512 random 16-bit samples with a 42-tap and a 61-tap low pass
  filter: Hamming-windowed sinc designs, quantised to Q15.
- It compares every result word with a reference convolution.
- It tests immediate sleep, sleep deferred while busy, a request dropped while
  `sleepmode` is 0, wakeup, and AHB error responses.
- It counts each mechanism (RFIFO full, the XRAM look-ahead limit, read/write
  arbitration, AHB waits and grant delays, sleep/wake, clock gating, negative
  `s`) and fails if one never occurs.

It runs in well under a second.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lp_dsp_subsystem \
  -y rtl -y tb +libext+.sv rtl/dsp_pkg.sv tb/tb_lp_dsp_subsystem.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run any other testbench. The
testbenches start from random initial state and use `$urandom` stimulus.
