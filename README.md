# Smart DMA controller with a built-in dual-MAC

A DSP needs its data to arrive in awkward orders: circular buffers, mirrored blocks, strided taps and bit-reversed FFT inputs. It also spends most of its time on multiply-accumulate loops. This design gives that work to a DMA controller instead of the processor. The Smart DMA controller (SDMAC) has two channels. Each channel moves data between two on-chip banks and APB peripherals, and its address generators produce the DSP access patterns directly. On the way, a channel can feed a four-multiplier arithmetic unit, the dual-MAC. The same hardware therefore streams:

- inner products;
- convolutions;
- complex FIR taps;
- radix-2 FFT butterflies.

It reaches one word pair per clock, with no processor instructions in the loop. The processor only writes a few registers and waits for an interrupt.

The RTL is in `rtl/` and the self-checking testbenches are in `tb/`. All sizes default to the figures of the original design: 32-bit data, 512 × 32 banks, 8-word FIFOs, 40-bit accumulators, 8 APB peripherals and a 16 × 16 register bank.

## Subsystem (`sdma_top`)

`sdma_top` contains:

- the controller (`sdmac`);
- two single-port 512 × 32 data banks, RAM_A and RAM_B (`sram_sp`);
- an I2S receiver on APB peripheral 0 (`i2s_rx`);
- an I2S transmitter on APB peripheral 1 (`i2s_tx`).

Peripherals 2–7 are brought out as an external APB port with their DMA request lines.

The dual-core RISC processor of the original system is not part of this design. Its connections to the SDMAC are top-level pins instead:

- the 16-bit register-bank port (`reg_cen`, `reg_wen`, `reg_a`, `reg_d`, `reg_q`);
- one direct access port per bank (`memA_*`, `memB_*`).

The two interrupt lines are `irq_n[1:0]`. Butterfly results are written back to the banks. They are also visible on `bfly_valid`, `bfly_y0` and `bfly_y1`.

## Controller (`sdmac`)

`sdmac` connects:

- the register bank;
- two channel controllers, each with its own interrupt controller;
- the arbiter;
- one memory interface per bank;
- the APB master;
- the dual-MAC.

Every bus access of a channel is a request for one of three resources: bank A, bank B or the APB. Each channel has three requesters: read, MAC operand and write. That makes six requesters in total.

## Channel controller (`sdma_channel`)

A channel has:

- a reading controller and a writing controller, each a small IDLE → SETUP → ENABLE state machine;
- an 8-word FIFO between them;
- one address generator for the source and one for the destination.

**Transfer types.** TransferType bit 1 marks the source as a peripheral and bit 0 the destination. Together they give memory-to-memory, peripheral-to-memory, memory-to-peripheral and peripheral-to-peripheral transfers. A peripheral is read or written only while its DMA request line is high. Each peripheral access is one two-phase APB transfer.

**Different banks.** When source and destination are in different banks, reads and writes overlap. The channel moves one word per clock.

**Same bank.** When source and destination share a bank, the channel works in bursts. It reads until the FIFO is full, or the last word has been read, and then writes the FIFO out.

**Sequence transfer** (SeqTran) never counts down, so the channel runs until Halt. **Halt** stops reading. The job ends once the words already read have been written.

**MAC functions.** With a MAC function selected (MAC, CFIR or FFT), the channel feeds the dual-MAC instead of the FIFO:

- Each step reads two words in the same cycle: the source word, and an operand word at the destination address in the other bank.
- The pair is loaded into the channel's MAC lane: lane 0 for channel 0, lane 1 for channel 1.
- The two operands must be in different banks. Peripherals cannot feed the dual-MAC.

**FFT write-back.** In FFT mode the butterfly results come back to the channels and are written in place:

- channel 1 writes Y0 over its source word, A;
- channel 0 writes Y1 over its operand word, B.

A channel fetches its next word only after its write-back, so a stalled write can never be overtaken.

## FIFO (`sdma_fifo`)

The FIFO is a circular buffer with push and pop pointers and a counter of the stored words. It has three flags:

- `empty` when the count is 0;
- `full` when the count is 8;
- `half` when the count is at least 4.

The output shows the word at the pop pointer before the pop happens. A push into a full FIFO is ignored, and so is a pop from an empty one.

## Address generator (`sdma_addr_gen`)

| Mode | Register setting | Sequence |
|---|---|---|
| increase / decrease | Inc or Dec | address ± step |
| hold | neither | constant (peripheral data register) |
| index-based | Base = step (0 means 1) | address ± Base |
| circular | block size N, Circular = 0 | address + idx, idx wraps in 0..N−1, starting at Offset |
| mirror | block size N, Circular = 1 | idx runs 0..N−1, N−1..0, 0..: the end element repeats |
| bit-reversed | Inc and Dec both set, block size N (0 means 256) | address + bitrev(k) over log2 N bits |

## Arbiter (`sdma_arbiter`)

Priority is fixed:

1. the processor;
2. channel 0;
3. channel 1.

A processor access to a bank always wins, and a channel waits while the processor holds the bank. When both channels want the same resource, channel 1 waits. Within one channel the order is read, then MAC operand, then write. The APB is not granted while a transfer on it is still in progress.

## Register bank (`sdma_reg_bank`)

The processor sees 16 locations of 16 bits. It writes when CEN and WEN are low and reads when CEN is low and WEN is high. Q is valid after the clock edge and is 32 bits wide, so the accumulator reads in one access.

For channel c, the locations start at base 7·c:

| Offset | Register | Fields |
|---|---|---|
| +0 | source high | {Circular/Mirror, Base[7:0], Offset[6:0]} |
| +1 | source low | {Device (0 = A, 1 = B), Address[14:0]} |
| +2 | destination high | as source high |
| +3 | destination low | as source low |
| +4 | control high | {source block size[7:0], destination block size[7:0]} |
| +5 | control low | {SrcInc, SrcDec, DestInc, DestDec, SrcWidth, DestWidth, TransferSize[9:0]} |
| +6 | configuration | {Halt, IntEn, SrcPer[2:0], DestPer[2:0], TransferType[1:0], SeqTran, Func[2:0], ACClr, ChEn} |

The shared locations are:

| Location | Register | Contents |
|---|---|---|
| 14 | status | one byte per channel: {Interrupt (active low), Full, Empty, Half, ChSel, Err[2:0]} |
| 15 | ACC | write: 16-bit preload; read: see below |

Reading ACC returns the 40-bit ACC saturated to a signed 32-bit value. In complex FIR mode it returns {ACCR, ACCI} instead, each saturated to 16 bits.

The Func codes are:

| Func | Function |
|---|---|
| 000 | normal transfer |
| 001 | real MAC |
| 010 | complex FIR |
| 100 | FFT butterfly |

Register behaviour:

- Writing a configuration word with ChEn set starts the channel.
- The channel clears ChEn itself when the job ends.
- ACClr clears the accumulators and lasts one cycle.
- While a channel runs, TransferSize reads back the number of words left.
- Writing the status location clears both interrupt flags.

## Interrupt controller (`sdma_irq`)

When a job with IntEn set finishes, `irq_n` goes low for two clock cycles. The channel's interrupt bit in the status register stays low until the processor writes status.

## Memory interface and data banks (`sdma_mem_if`, `sram_sp`)

Each bank is a synchronous single-port 512 × 32 SRAM with pins CK, CS, OE, WEB, A, DI and DO. WEB low means write. DO is registered.

The memory interface drives the pins from one of two sources:

- the processor port, when it is active;
- otherwise the channel request the arbiter granted on that bank.

## APB master (`sdma_apb_master`)

The APB master does one transfer at a time: a SETUP cycle, then an ACCESS cycle, with no wait states. The channel's device number selects one of the 8 PSEL lines. PADDR is the low 8 bits of the channel address.

## Dual-MAC (`sdma_dual_mac`)

The dual-MAC has four 16 × 16 signed multipliers, two 40-bit accumulators (ACCR, ACCI) and their sum, ACC. A 32-bit word carries two 16-bit halves: {real, imaginary}, or simply {high, low}.

| Mode | Per clock |
|---|---|
| real MAC | ACCR += CH·DH + CL·DL (lane 0); ACCI += AH1·BH1 + AL1·BL1 (lane 1); ACC = ACCR + ACCI. That is four real MACs per cycle when both channels run. |
| complex FIR | on one lane: ACCR += CR·XR − CI·XI, ACCI += CR·XI + CI·XR. Lane 0 goes first. |
| FFT butterfly | W and B from channel 0, A from channel 1: T = W·B in Q15, rounded to nearest; Y0 = A + T, Y1 = A − T, saturated to 16 bits, written back over A and B |

An accumulator overflow sets a sticky error bit, which shows in the status Err field.

**Throughput.** The arithmetic unit finishes a complex MAC or a butterfly in one cycle. Sustained rates are limited by the two single-port banks:

| Job | Sustained rate |
|---|---|
| inner product or real FIR | one word pair (two products) per clock |
| complex FIR | one tap per clock |
| FFT | one butterfly every 6 clocks |

An inner product split over both channels does not run faster, because both channels need both banks.

For the FFT, each butterfly needs bank A three times (read W, read A, write Y0) and bank B twice (read B, write Y1). A channel also waits for its write-back before its next fetch.

Some totals, for comparison with the original design's published counts:

| Job | This design | Original design |
|---|---|---|
| 256-point FFT | 6160 clocks for the eight stages, plus reordering by the processor between stages | 2060 cycles |
| 36-point DCT | 77 clocks per output | 44 cycles |

## I2S receiver and transmitter (`i2s_rx`, `i2s_tx`)

Both are I2S slaves: SCK and WS come from outside. The inputs are resynchronised to the system clock, which must be at least four times faster than SCK. A word is 32 SCK cycles, MSB first, and starts one SCK after WS changes.

Each block has two APB registers, selected by address bit 0:

| Address bit 0 | Receiver | Transmitter |
|---|---|---|
| 0 | data | data |
| 1 | status {overrun, WS, valid} | status {underrun, empty} |

The DMA request line is high in these cases:

- receiver: while a received word is waiting;
- transmitter: while its holding register is empty.

## Departures and design choices

The original design fixes the register fields, the addressing modes, the channel structure, the fixed priorities and the arithmetic of the dual-MAC. The following are choices of this implementation, or places where it differs:

- **Throughput.** The original design rates the arithmetic unit at one butterfly per clock, and at four real MACs per clock when both channels run. The unit here meets those rates, but the two single-port banks do not feed it that fast. Measured rates are in the Dual-MAC section.
- **Mirror blocks** repeat the end element (…, N−2, N−1, N−1, N−2, …). That is the symmetric extension a DCT-II needs.
- **Bit-reversed mode** is selected by setting Inc and Dec together. A block size of 0 means 256 points.
- **TransferType bits.** Bit 7 marks the source as a peripheral and bit 6 the destination.
- **Complex ACC read.** In complex FIR mode the ACC location returns {ACCR, ACCI}, each saturated to 16 bits.
- **Arbitration granularity.** Grants are made per access. Within a channel, read goes before the MAC operand, which goes before the write. The processor's bank access beats both channels.
- **MAC operand fetch.** The operand is read at the destination address in the other bank. FFT results are written back in place.
- **APB.** There is no PREADY. A transfer is SETUP plus ACCESS, followed by one idle cycle.
- **16-bit width.** SrcWidth or DestWidth set means the low 16 bits are moved and the upper half is zero.
- **Butterfly scaling.** The butterfly uses Q15 twiddles with rounding to nearest and saturation.
- **I2S blocks** are slaves, with the register layout given in their section.

## What is not built

- **The dual-core processor.** Only its opcode list is known: the instruction format, the semantics of most instructions, the stall rules and how the two cores share data are not specified. Its SDMA-facing ports are top-level pins instead.
- **Program ROM, memory BIST, scan insertion and I/O pads.** These are off-chip, tool-generated or process-specific parts with no logic to describe.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv` that uses random stimulus and a watchdog. Each prints `TB_RESULT checks=… failures=…`.

`tb_sdma_top` runs the whole subsystem at its default sizes. A processor model and an I2S master model drive it through these jobs:

- the 510-term inner product Σ i² = 44 347 135, in at most 518 clocks;
- the 510-term convolution Σ (510−k)·k = 22 108 415;
- the same inner product split across both channels, where channel 1 waits for channel 0;
- a bank-to-bank move while the processor holds bank A;
- an in-bank move with a decreasing destination (burst phases);
- circular, mirror, index-based and 32-point bit-reversed moves;
- a 3-tap complex FIR, checked for rate and result;
- eight FFT butterflies, written back in place, at most 6 clocks apart;
- I2S receive-to-memory and memory-to-transmit at the same time;
- I2S receive-to-transmit;
- a sequence transfer stopped by Halt;
- accumulator overflow.

The test counts each mechanism: arbitration waits, processor priority, FIFO full, burst phases, interrupts, APB transfers, butterflies and MAC lane 1. A mechanism that never happened counts as a failure.

`tb_sdmac` covers two opposite bank-to-bank moves at once, and peripheral transfers under random request lines.

Two more testbenches run complete transforms on `sdma_top`, with the processor model doing only what the processor would do: write registers, place data and read results.

- `tb_sdma_fft` computes random 32-point and 256-point complex FFTs:
  - An SDMA bit-reversed copy reorders the input.
  - Each stage then runs as one FFT job over both channels, written back in place.
  - The processor model gathers the butterfly operands between stages.
  - Results are bit-exact against a Q15 model of the same arithmetic.
  - Against the exact DFT, the signal-to-error ratio is about 50 dB.
  - A 256-point stage (128 butterflies) takes 770 clocks.
- `tb_sdma_dct` computes a 36-point DCT-II. It runs on the original design's 36-sample test input, then on random samples:
  - The samples are stored once in bank B and read as a mirror block, x0…x35, x35…x0. The symmetric extension that the DCT needs is never stored.
  - The 72 coefficients of each output are streamed against the mirror block as one real-MAC job of 77 clocks.
  - All 36 outputs are exact against the integer sum.
  - Against the exact DCT, the signal-to-error ratio is about 87 dB.
- `tb_sdma_fir` runs filters, with every output checked against an integer model:
  - A 32-tap real FIR. The taps are packed two per word. The samples are stored as overlapping pairs {x[m], x[m−1]} and read downwards with index-based step 2. That gives two taps per word pair, and an output takes 21 clocks from the configuration write to the interrupt.
  - A 32-point circular convolution. The samples form a circular block read downwards from Offset = n, so the wrap-around costs nothing.
  - A 16-tap complex FIR at one tap per clock.

## Running a testbench

Every testbench is a top module with no ports. Build and run one with Verilator 5, for example the full subsystem test:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/sdma_pkg.sv tb/tb_sdma_top.sv \
  --top-module tb_sdma_top -o sim
obj_dir/sim
```

A run ends with a `TB_RESULT checks=… failures=…` line. Replace `tb_sdma_top` with any other testbench name. Only the block testbenches of the FIFO, memory interface, SRAM and I2S blocks override parameters, to shorten their runs. Everything else runs at the default sizes.
