# Hardware accelerator for real-time blind signal separation

Blind signal separation (BSS) recovers a target speaker from several
microphones that each pick up a mixture of the speaker and background noise.
In the frequency domain, each bin is separated by a small complex unmixing
matrix W(ω). Those matrices are adapted on line by joint diagonalisation of
the microphone covariance matrices. An output selector based on kurtosis and
an adaptive noise canceller then clean up the result. Most of the run time
goes into two kernels:

* the short-time FFT of every microphone frame and the inverse FFT that
  rebuilds the time signal, and
* 4×4 complex matrix products: the gradient of the diagonalisation error,
  the weight update and the filtering Y(ω) = W(ω)·X(ω).

This RTL is the coprocessor for those two kernels. A host processor runs
everything else in software (the adaptation loop, kurtosis selection, noise
canceller). It hands the kernels to this block over two coprocessor-bus
channels, using LOAD and STORE instructions. Several FFT units and several
matrix units sit behind each channel. They work in parallel on different
frames and bins, so the design scales by adding instances. The default is
two FFT/IFFT units and five matrix multipliers. That is the largest
configuration that fits the original Virtex-4 target, rated there at about
22,760 samples/s for four microphones.

```
             FFT channel                               CMM channel
   instr / load / store / irq                  instr / load / store / irq
              |                                            |
        +-----------+                                +-----------+
        |  fcb_if   |  decoder FSM + FIFO            |  fcb_if   |
        +-----------+                                +-----------+
          |       |                                   |   |   ...   |
     fft_ifft  fft_ifft     (unit 0, 1)              cmm cmm  ...  cmm  (unit 0..4)
          |       |                                   ^   ^         ^
          +---+---+  result streams                   |   |         |
              v                                       |   |         |
        +-----------------------------------------------------------+
        | fft_buffer: 4 microphones x 256 bins, read per bin vector |
        +-----------------------------------------------------------+
```

## Number formats

* Matrix unit: 32-bit two's complement, 12 integer and 20 fraction bits
  (Q12.20). The unit saturates and never wraps. The range is ±2048.
* FFT/IFFT: 24-bit words. This design reads them as Q4.20, so a value
  passes from the FFT to the matrix unit by sign extension alone. On the
  bus, a 24-bit word sits in the low bits of a 32-bit word, sign-extended.
* Complex values are always a pair of words: the real word, then the
  imaginary word.

## Programming model

This is the part a software writer needs. The RTL implements it in
`fcb_if.sv` and in the address decoding of `bss_accelerator.sv`.

### Instructions

Each channel takes one instruction at a time: `instr_valid` with
`instr_ready`. The instruction type is `bss_pkg::fcb_instr_t`:

| field | bits | meaning |
|-------|------|---------|
| `op`   | 2  | `FCB_NOP`, `FCB_LOAD`, `FCB_STORE` |
| `go`   | 1  | LOAD only: start the unit after this load's data are written |
| `mode` | 4  | options passed to the unit with the start |
| `unit` | 3  | which unit of the channel (unit numbers that do not exist are ignored) |
| `addr` | 10 | first element address (LOAD) or the element to read (STORE) |

### The load/store state machine

Each channel has the same four-state machine:

* **IDLE**: waits for an instruction. A NOP leaves it in IDLE.
* **LOAD**: takes exactly 96 bytes, as 24 words of 32 bits, on
  `ld_valid`/`ld_ready`. It then returns to IDLE.
* **STORE**: returns exactly 8 bytes on `st_valid`/`st_data`: the real
  word, then the imaginary word of one element. It then returns to IDLE.
* **WAIT**: a STORE to a unit that is still computing enters WAIT first.
  WAIT moves on to STORE when that unit's result is ready.

`fsm_state` shows the current state. The processor must always accept store
words, because `st_valid` has no ready signal.

A LOAD's words first go into a 32-entry FIFO. Behind the state machine, the
FIFO is drained at one word per cycle. Each pair of words (real, imaginary)
becomes one element write, at addresses `addr`, `addr+1`, … `addr+11`. When
all 12 elements are written, `ld_written` pulses. If `go` was set, the unit
starts at that point. The channel accepts no new instruction until that
moment. A load therefore always finishes before anything that could depend
on it.

### Finding out that a unit has finished

The processor can find out in two ways:

* **Polling.** A STORE from address `STATUS_ADDR` (all ones) returns
  `{16'b0, busy[7:0], done[7:0]}` with one bit per unit. The imaginary word
  is zero. This read never waits, and it clears the done bits it reports.
  `result_ready` is the OR of the done bits.
* **Interrupt.** With `irq_en` high, `irq` stays high while any done bit is
  set. A status read clears it.

A STORE from a result address also works as a blocking read: it waits in
WAIT until the unit has finished.

### Address maps

| unit | LOAD addresses | STORE addresses | `mode` with `go` |
|------|----------------|-----------------|------------------|
| FFT/IFFT | 0..255: sample n (real word = sample; imaginary word = 0 for real input). Addresses 256 and up are ignored. | 0..255: bin k (FFT) or sample n (IFFT) | bit 0: inverse; bit 1: stream the result into the FFT buffer; bits 3:2: microphone number for that stream |
| matrix | 0..15: A[a/4][a%4]; 16..31: B; 32: bin base for the buffer fill (low 8 bits of the real word). Other addresses are ignored. | 0..15: C[a/4][a%4] | bit 0: fill B from the FFT buffer before multiplying |

A 256-point frame takes 22 LOADs. The last one writes four elements past the
frame, which the unit ignores. A full A and B take three LOADs, at
addresses 0, 12 and 24. The third one also writes the bin base.

### Typical sequence for one block of samples

1. Load each microphone frame into an FFT unit. Set `go`, with mode =
   forward, stream to buffer, and the microphone number. Two units can
   transform two microphones at once.
2. For the weight work, load W and the operand matrix into a matrix unit,
   set `go`, and read C back. The five matrix units can be loaded one after
   another, so one computes while the next is being loaded.
3. For the filtering, load W into A and the bin base into address 32. Start
   the unit with mode bit 0. It fills column c of B with the microphone
   vector [X₀(k+c) … X₃(k+c)] for k = bin base, and returns C = W·B.
4. Load the processed spectrum into an FFT unit with mode = inverse, and
   read the time samples back.

## The matrix multiplier (`cmm`)

The unit has five parts:

* **`matrix_buffer` (A and B)**: each holds separate real and imaginary
  register buffers. Its read controller presents one line of four complex
  elements: a row of A, or a column of B.
* **`cmac4`**: computes the sum of A_k·B_k for k = 0..3. The eight real
  products are kept at full 64-bit precision and added exactly. The sum is
  shifted right by 20 (rounding toward minus infinity) and saturated once.
  It has one register stage.
* **`output_buffer`**: writes the result C[i][j] at the row of A and the
  column of B it came from. A read returns an element on
  `REAL_OUT`/`IMAG_OUT` one cycle later.
* **`mm4x4_controller`**: issues the 16 products in row-major order, one per
  cycle. It delays each (i, j) by the CMAC4 latency to form the write
  address. With the buffer fill enabled, it first requests four bins from
  the buffer and writes one column of B per returned vector.

The multiplier is time-multiplexed: one complex 4-term MAC per unit,
reused 16 times per matrix. Writes to A or B are ignored while the unit
is busy.

## The FFT/IFFT (`fft_ifft`)

The transform is an in-place, iterative, radix-2 decimation-in-time FFT:

* Samples are written to bit-reversed addresses.
* There are log₂N stages of N/2 butterflies, one butterfly per clock. Each
  butterfly reads and writes its two words of the working memory in the
  same cycle.
* The twiddle factors cos/sin(2πk/N) are computed at elaboration into a
  Q2.22 constant table. No data file is needed.
* Every butterfly output is halved and saturated. The forward transform
  therefore returns DFT(x)/N, and the inverse returns the exact inverse DFT
  of its input. A round trip returns x/N.

With `to_buf`, the N results are then streamed into the FFT buffer, tagged
with the microphone number, under back-pressure from the buffer. After
that, `done` pulses. The results can also be read back by STORE in natural
order.

## The FFT buffer (`fft_buffer`)

The buffer holds one 256-bin spectrum per microphone. A matrix unit reads a
whole microphone vector of one bin in one access.

* FFT streams write one word per cycle. When several want to write, the
  lowest-numbered FFT unit wins, and the others wait (`w_ready` low).
* Matrix units read one bin per cycle, also granted lowest number first.
  The data arrive one cycle after the grant, sign-extended to 32 bits.

## Timing

| operation | cycles |
|-----------|--------|
| LOAD of 96 bytes | 24 word cycles (plus processor gaps), drained one word per cycle behind them |
| STORE of 8 bytes | 1 cycle to issue the read, then 2 word cycles |
| FFT/IFFT, N = 256 | 1024 cycles from start to `done` ((N/2)·log₂N) |
| the same, streaming to the buffer | + 256 cycles when there is no contention |
| 4×4 complex product | 18 cycles from start to `done` |
| the same, with the buffer fill | + 5 cycles when there is no contention |

The testbenches check these latencies. The processor-side rate of the whole
system depends on the software and is not modelled here.

### Cost of one block in the accelerator

`tb_block_throughput` drives the hardware part of one 256-sample block the
way the host would. The host side moves one bus word per cycle. Three
phases are timed:

* forward FFTs of the four microphone frames into the buffer;
* filtering of every bin, Y(k) = W(k)·X(k), with a separate random 4×4
  matrix W(k) per bin, reading back all four outputs of each bin;
* the IFFT of the first output and the read-back of its 256 samples.

It runs two configurations side by side:

| configuration | FFTs | filtering | IFFT | total cycles | share of 16 ms at 184.8 MHz |
|---------------|------|-----------|------|--------------|-----------------------------|
| 1 FFT/IFFT + 1 matrix unit | 7,528 | 30,720 | 2,650 | 40,898 | 1.4 % |
| 2 FFT/IFFT + 5 matrix units | 4,360 | 24,855 | 2,650 | 31,865 | 1.1 % |

The same run compares the fixed-point outputs with a double-precision
model. The separated outputs Y(k) stay within 5.8 LSB of Q12.20, about
5.5·10⁻⁶. The IFFT output stays within 3.9 LSB of an exact inverse DFT of
those Y(k). The inputs peak near 2²¹ LSB.

A block at 16 kHz lasts 16 ms, which is 256 / 16000 s × 184.8 MHz =
2,956,800 cycles. Filtering a bin costs three 96-byte loads and four
stores. That bus traffic, not the 18-cycle product, sets the filtering
time. More matrix units help only because one unit computes while the next
is loaded. Nearly all of a block's time in the original system goes to the
adaptation software on the host, and these numbers leave that out.

## How this RTL relates to the published design

These parts follow the published design:

* the partition between host software and accelerator;
* the two coprocessor channels, each with a decoder FSM and a FIFO;
* the four states and the transitions of the load/store machine, with its
  96-byte loads and 8-byte stores;
* polling and interrupt completion;
* the structure and signal names of the matrix multiplier (MATRIX A/B,
  CMAC4, output buffer, MM4x4 controller);
* the Q12.20 saturating arithmetic;
* the 24-bit, 256-point transform;
* the buffer between FFT and matrix units;
* the instance counts.

These are this design's own choices, because the source says nothing about
them:

* the instruction encoding, the 32-bit bus word and the address maps;
* the status word;
* how an operation is started (the `go` bit on a LOAD);
* the FIFO depth;
* all latencies;
* rounding by truncation;
* the FFT's per-stage scaling.

These depart from the published design:

* **FFT/IFFT.** The original uses a vendor FFT core. `fft_ifft` is a
  simple replacement with the same size and word width. It is not tuned
  for speed: one butterfly per cycle, with a register-based working memory.
* **Buffer fill.** Filling matrix B with four bins of microphone vectors is
  one reading of how the buffer feeds the matrix units. The source shows
  only the connection.
* **Resources.** The figures of the original implementation (72 DSP
  blocks, 8 block RAMs, 185 MHz on Virtex-4) are not a target of this RTL.
  Each `cmac4` here uses sixteen 32×32 multiplies, and the memories are
  written as plain arrays.
* **Software parts.** The BSS adaptation itself, kurtosis selection and the
  noise canceller are software on the host and are not part of this RTL.
  The same holds for the processor, its bus bridge, the memory and the
  peripherals.

Rules of the bus handshake and of internal alignment are written as
SystemVerilog assertions. Examples: store data only in STORE, load words
only in LOAD, start only after the FIFO has drained, and the controller's
write strobe aligned with the CMAC4 output.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `bss_pkg.sv` | number formats, complex types, instruction and state types, saturation functions |
| `bss_accelerator.sv` | top: the two channels, the FFT and matrix units, the buffer and the address decoding |
| `fcb_if.sv`, `fcb_fifo.sv` | channel interface logic: decoder FSM and load FIFO |
| `fft_ifft.sv` | the FFT/IFFT unit |
| `fft_buffer.sv` | the buffer between the FFT and matrix units |
| `cmm.sv`, `matrix_buffer.sv`, `cmac4.sv`, `output_buffer.sv`, `mm4x4_controller.sv` | the matrix multiplier |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

`tb_bss_accelerator` runs the whole design at its default size. It drives
the design as the host software would:

* transforms four random-plus-tone microphone frames, two units at a time,
  with the two streams contending for the buffer;
* checks the spectra against a double-precision DFT;
* runs all five matrix units from the buffer, one of them into saturation,
  plus one with the buffer bypassed, and checks every element exactly;
* sends a spectrum back through the IFFT.

It counts each mechanism and fails if one never happened: buffer
contention, parallel FFT units, one matrix unit computing while another is
loaded, WAIT on both channels, polling, interrupt, saturation, buffer fill,
buffer bypass and the inverse transform.

`tb_block_throughput` (with its driver `bss_block_run.sv`) times one whole
block on two configurations; see *Cost of one block in the accelerator*.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/bss_pkg.sv tb/tb_bss_accelerator.sv --top-module tb_bss_accelerator
./obj_dir/Vtb_bss_accelerator
```

Replace `bss_accelerator` with any module name to run its own testbench.
`tb_block_throughput` also needs `-y tb`, which finds its driver module.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bss_pkg.sv rtl/<module>.sv`.
The full-size end-to-end run takes well under a second.

## Changing the design

* `N_FFT` and `N_CMM` on `bss_accelerator` set the instance counts. Each
  can be 1 to 8, because the instruction's unit field is 3 bits. Every row
  of the original instance table can be built this way.
* `N` sets the transform length. The matrix unit's buffer fill uses an
  8-bit bin base, so other lengths up to 256 work as they are.
* `MICS` sets the number of microphone frames held in the buffer. The
  matrix size itself is `bss_pkg::MDIM = 4`.
* `LOAD_BYTES`, `STORE_BYTES` and `FIFO_DEPTH` on `fcb_if` set the transfer
  sizes. A LOAD must carry whole (real, imaginary) pairs.
* The number format is set by `DW`, `FW` and `FFT_W` in `bss_pkg`.
  `sat_fx` and `sat_fw` are written for 32-bit and 24-bit words and must be
  changed with them.
