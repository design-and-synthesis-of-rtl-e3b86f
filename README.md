# Digital core for a CMOS microelectrode-array chip, and a real-time PCA stimulation-artifact remover

A CMOS microelectrode array (MEA) records the electrical activity of neurons
cultured on top of the chip and can also stimulate them. This repository holds
SystemVerilog for the two digital parts of such a system:

1. **The chip's digital core.** The analog front end (1024 recording
   channels with filters, programmable-gain amplifiers and ADCs, plus
   impedance-measurement, current-source, voltage-clamp and stimulation
   blocks) is set up entirely through 8-bit registers. The core has three
   parts. An SPI slave receives 12-bit commands from the board. A 1024 x 8
   register memory holds every analog setting. A transmitter packs the
   recorded data into 1170-word frames of 10-bit words.
2. **A real-time stimulation-artifact remover.** A stimulation pulse shows up
   on every electrode, and is far larger than a neuron's spike. A spike shows
   up only on one electrode and its neighbours. For each channel, the remover
   learns the shape the pulses share from two other channels. It uses
   principal component analysis (PCA), computed through a singular value
   decomposition (SVD). It then subtracts that shape by least squares, which
   leaves the spikes. This includes spikes that occur during the pulse itself.
   It handles ten channels in blocks of 145 samples at 30 kS/s on a 10 MHz
   clock.

The two designs share no signals and run on separate clocks. `mea_top` puts
them side by side. In the original system the remover ran on an FPGA board
downstream of the chip.

## Part 1 - the MEA digital core

### SPI commands (`spi_slave`)

Five off-chip pins: `spi_clk`, `spi_rst`, `ssel` (active low), `mosi`,
`miso`. Each command is 12 bits long and is sent MSB first:

```
 bit  11 10 | 9 8 | 7 6 5 4 3 2 1 0
      op    |  address (10 bits)
      op    |  -   | data byte
```

| op | meaning |
|----|---------|
| 00 | write the data byte at the current address |
| 01 | load the 10-bit address pointer |
| 10 | write the data byte at the current address, then increment the pointer |
| 11 | read the register at the 10-bit address in the command |

With op 10, a run of registers can be written without resending the
address: one `01` command, then a stream of `10` commands.

Timing: `mosi` is sampled on each rising edge of `spi_clk`. The command is
decoded while its 12th bit is on `mosi`. `wrt` or `rd`, `addr` and `dout`
are therefore valid in the 12th clock cycle, and the register memory writes
on the 12th rising edge. No extra clock is needed after a command. A read
loads the byte into an 8-bit output register on that same edge. The byte
then comes out on `miso`, MSB first, during the first eight bit slots of the
*next* command. `miso` changes after each rising edge, and the master
samples it before the following rising edge. Raising `ssel` in the middle
of a command discards it. `miso` is 0 while the chip is not selected. The
synthesis constraints of the original design used a 20 MHz SPI clock.

### Register memory (`register_memory`)

There are 1024 registers of 8 bits, on the SPI internal bus: `addr`, `dout`
(write data), `din` (read data), `rd` and `wrt`. Writes are synchronous to
the SPI clock. Reads are combinational, so the SPI block captures the data
on the same edge, and `din` is 0 when `rd` is low. Reset clears every
register. The `cfg` output array carries all 1024 registers to the analog
blocks.

### Output frame (`tx_framer`)

Four 10-bit on-chip buses (North, South, East, West) bring data from the
analog blocks. An 11-bit counter steps through the frame's 1170 words, one
per `tx_clk` cycle. The counter is an output, so the analog block that owns
the current word can drive its bus. Even words come from West or North, odd
words from East or South:

| words | content | buses |
|-------|---------|-------|
| 0-9 | impedance-measurement settings | W/E |
| 10-19 | voltage-recording settings | N/S |
| 20-29 | current-source settings | N/S |
| 30-39 | voltage-clamp settings | W/E |
| 40-49 | stimulation settings | W/E |
| 50-81 | impedance data (32) | W/E |
| 82-1105 | voltage-recording data (1024 channels) | N/S |
| 1106-1169 | voltage-clamp data (64) | W/E |

The word selected for counter value *n* is registered. It appears on
`tx_data_out` one cycle later, and `tx_frm_sync` is high while word 0 is
out. Frames follow each other without a gap while `tx_enbl` is high.
Dropping `tx_enbl` returns the counter to word 0.

`mea_digital_core` wires these three parts together. The SPI block and the
register memory use the SPI clock and reset. The transmitter has its own
clock, reset and enable.

## Part 2 - stimulation-artifact removal by PCA

### Idea

Take one object channel *c* with samples *y* over a block of N = 145
samples. Its neighbours *c ± 1* may see the same spike, so they are
skipped. The reference matrix A (N x 2) holds the two channels after them,
*c+2* and *c+3* (modulo 10). The stimulation artifact is the structure
these channels share with *y*. Its estimate, the template, is the
projection of *y* onto the principal components of A:

```
G = A^T A = [g11 g12; g12 g22],      r = A^T y
lambda1,2 = ((g11+g22) +/- sqrt((g11-g22)^2 + 4 g12^2)) / 2     (roots of det(G - lambda I) = 0)
sigma_i   = sqrt(lambda_i),          v_i solves (G - lambda_i I) v_i = 0,   u_i = A v_i / sigma_i
template  = sum_i u_i (u_i^T y) = A beta,   beta = sum_i v_i (v_i . r) / lambda_i
cleaned   = y - template
```

A component is used only if its eigenvalue is at least `LAMBDA_MIN` (145,
that is, about one LSB² per sample). When both are used, the template is
the ordinary least-squares fit of *y* on the two reference channels. When
the references are collinear, only the first component is used. When they
are silent, no template is subtracted. The output `out_comps` tells which
case applied.

### Data path (`artifact_remover`)

```
in_sample[10] -> pca_sample_buffer (2 banks x 145 time points)
                     |
   for c = 0..9:     v
     pass 1 (145 cycles): accumulate g11, g12, g22, r1, r2
     svd2_unit  (~330 cycles): lambda1,2, sigma1,2, v1, v2
     lsqr_unit  (~200 cycles): beta1, beta2, comps
     pass 2 (145 cycles): out = y - round(beta1 a + beta2 b)  -> out_* stream
```

The ten channels are handled one after another, while the other buffer bank
fills. A block takes 8,201 cycles in simulation. At 30 kS/s and 10 MHz, a
new block arrives every 48,340 cycles, so the remover keeps up with about
six times margin. `block_cycles` reports the measured figure for the last
block. If samples arrive faster than blocks can be processed, a time point
that finds both banks full is dropped, and `overflow` pulses.

`svd2_unit` computes the decomposition in closed form with integers. It
shares one restoring square-root unit (`isqrt_seq`) and one restoring
divider (`udiv_seq`) across four square roots and two divisions. The
eigenvector of lambda1 is taken as (lambda1 - g22, g12) when g11 >= g22, and
as (g12, lambda1 - g11) otherwise; this choice never vanishes. It is scaled
up to full width before normalisation, and v2 is v1 turned by 90 degrees.

### Number formats - the part to understand before changing anything

- Samples are 16-bit two's complement. Block sums of products are 40 bits.
  Eigenvalues are 41 bits.
- Eigenvectors have 30 fraction bits, which may look excessive but is needed.
  A strong artifact puts nearly all the energy of the reference channels into
  the first component, so lambda2 can be 10^5 times smaller than lambda1.
  The fit divides by lambda2, which amplifies the angle error of v by that
  ratio. By that estimate, 15 fraction bits would give template errors of
  thousands of LSBs on such blocks. With 30, the tests see errors within
  2 LSB.
- beta has 24 fraction bits and saturates at ±2^15. The cleaned sample
  saturates to 16 bits.

These widths live in `pca_pkg`. Dividers and square-root units size
themselves from them, and their latency grows linearly with the widths.

## Files

| file | content |
|------|---------|
| `rtl/mea_pkg.sv` | SPI op-codes, widths, frame layout and bus-selection function |
| `rtl/spi_slave.sv`, `rtl/register_memory.sv`, `rtl/tx_framer.sv`, `rtl/mea_digital_core.sv` | digital core |
| `rtl/pca_pkg.sv` | sizes and number formats of the remover |
| `rtl/pca_sample_buffer.sv`, `rtl/svd2_unit.sv`, `rtl/lsqr_unit.sv`, `rtl/artifact_remover.sv` | artifact remover |
| `rtl/isqrt_seq.sv`, `rtl/udiv_seq.sv` | sequential square root and divider |
| `rtl/mea_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb_mea_top` runs everything at full size |
| `tb/tb_workload_1s.sv` | one second of ten-channel recording through the artifact remover |

All parameters default to the sizes of the original system. These are 10
channels, 145 samples, 1024 registers and 1170 frame words.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/mea_pkg.sv rtl/pca_pkg.sv tb/tb_mea_top.sv --top-module tb_mea_top
./obj_dir/Vtb_mea_top
```

Replace `tb_mea_top` with any other testbench name. The full-size run of
`tb_mea_top` takes about two seconds. It drives:

- SPI configuration with all four op-codes and read-back;
- two transmitted frames, plus a restart of the transmitter;
- four blocks of ten channels at the real sample rate:
  - a recording-like block with spikes on channel 7, one of them during the pulse;
  - a block of exact multiples of one pulse, where only one component is kept;
  - a silent block, where no component is kept;
  - another recording-like block;
- a sample stream too fast to keep up with, to show overflow.

It counts each of these mechanisms and fails if one never occurs.
`tb_workload_1s` streams one second of recording: 207 blocks of ten
channels, with a pulse in every block and spikes on channel 7. It checks
all 300,000 cleaned samples against a floating-point model of the
algorithm, and takes about 15 seconds to run.
`tb_artifact_remover` compares every cleaned sample, to within 2 LSB,
against a floating-point model of the same algorithm. Its data follows a
power law of distance from the stimulating electrode.

## Where this RTL departs from, or adds to, the original description

- The original remover was generated from C++ by high-level synthesis. Its
  latency was 18,020 cycles per block at 10 MHz. It processed channels in
  parallel where resources allowed. This RTL is hand-written and sequential
  over channels, and takes 8,201 cycles per block.
- U = A V / Sigma is not formed sample by sample. The template is built from
  V, lambda and A directly, which gives the same result. The singular values
  are computed but nothing downstream uses them.
- These choices are not specified by the original description:
  - the reference channels (*c+2*, *c+3* modulo 10);
  - dropping components below `LAMBDA_MIN`;
  - no mean removal before the PCA;
  - the sample width and all number formats;
  - the two-bank buffer and drop-on-overflow policy;
  - the streaming interfaces.
- In the digital core, these are also choices of this design:
  - the SPI bit order, with the op-code sent first;
  - the active-low `ssel`;
  - the read-data timing on `miso`;
  - post-increment for op 10;
  - the read address taken from the read command;
  - reset values;
  - the registered transmitter output;
  - the behaviour when `tx_enbl` is low.
- The counter of the transmitter gives the word number in the frame. The
  analog blocks decode which of them owns that word.
- Not in this RTL: the electrode array, the analog front end, the
  stimulation circuits, and the impedance, current-source and voltage-clamp
  blocks. These are analog circuits. The RTL sees them only through `cfg`,
  `counter` and the four data buses, which `mea_top` brings out as ports.
