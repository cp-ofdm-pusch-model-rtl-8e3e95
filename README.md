# CP-OFDM PUSCH transmitter for 5G NR, in SystemVerilog

This RTL builds the baseband samples of a 5G NR uplink data channel (PUSCH)
from an already-encoded codeword, on up to four antenna ports. It runs the
standard PUSCH steps in order: scrambling, symbol modulation, layer mapping,
codebook precoding, resource mapping, and CP-OFDM modulation.

The whole chain runs on one clock. That clock is 245.76 MHz, 16 times the
15.36 MHz output sample rate. Nothing is buffered to change rate. Instead,
the first block raises a valid signal only on the clocks that need data, and
every stage behind it simply follows. The ports' 16-bit complex samples leave
together on one 128-bit stream. The parameters can be changed between
transmissions over AXI4-Lite.

The target waveform has these settings:

| Item | Value |
|---|---|
| Subcarrier spacing | 60 kHz |
| Channel bandwidth | 10 MHz |
| FFT size | 256 points |
| Active subcarriers | 132 (11 resource blocks) |
| Cyclic prefix | extended, 64 samples |
| Symbols per transmission | 48 (one 1 ms subframe) |
| Modulation | π/2-BPSK, QPSK, 16QAM, 64QAM, 256QAM |
| Layers | 1 to 4 |
| Antenna ports | 1, 2 or 4 |

## Signal chain

```
 AXI4-Lite ──► pusch_axil_regs ──cfg,start──┐
                                            ▼
 AXI4-Stream ─► pusch_input_proc ─► pusch_scrambler ─► pusch_symbol_mod ─► pusch_layer_map
 (codeword)     store + pacing       Gold sequence       B bits → symbol     1..4 layers
                                                                                 │
 128-bit  ◄── 4 × pusch_ofdm_mod ◄── pusch_re_mapper ◄── pusch_precoder ◄───────┘
 samples      IFFT + CP, per port     β scaling, bin       W·x, TPMI codebook
              (pusch_ifft256 inside)
```

The blocks pass data forward with valid signals. Each block registers its
outputs, so each adds one clock of delay. The top level is `pusch_tx_top`.
The shared types and constants are in `pusch_pkg`:

- `cplx16_t`: a complex sample, 16-bit signed real and imaginary parts in
  Q2.14 format.
- `mod_e`: the modulation scheme.
- `cfg_t`: the runtime parameters.

| Module | What it does |
|---|---|
| `pusch_axil_regs` | Holds the parameter registers and turns a CTRL write into a start pulse. |
| `pusch_input_proc` | Stores the codeword and paces it out as groups of B bits (B = bits per symbol). |
| `pusch_scrambler` | XORs the codeword with the Gold sequence c(n) of TS 38.211. |
| `pusch_symbol_mod` | Maps B bits to a Gray-coded constellation point. |
| `pusch_layer_map` | Deals symbol i to layer i mod N_l and emits one vector per N_l symbols. |
| `pusch_precoder` | Computes y = W·x. W comes from the codebook, selected by ports, layers and TPMI. |
| `pusch_re_mapper` | Multiplies by the amplitude factor β and assigns subcarrier k to IFFT bin (k − 66) mod 256. |
| `pusch_ofdm_mod` | One per port. Runs the IFFT, keeps two output banks, and sends the CP followed by the symbol. |
| `pusch_ifft256` | In-place radix-2 inverse FFT with one butterfly per clock. |

## Pacing: the timing that holds everything together

This is the part to understand before changing anything.

### One OFDM symbol takes 5,120 clocks

- One OFDM symbol is 256 + 64 = 320 output samples.
- One output sample takes R = 16 clocks.
- So one symbol takes 320 × 16 = 5,120 clocks.

`pusch_input_proc` divides those clocks into 320 *slots* of 16 clocks each.

- **Slots 0 to 131** are the data slots, one per active subcarrier. In each
  one, `valid` is high on the first N_l clocks. Each valid carries the B
  bits of one modulation symbol.
- **Slots 132 to 319** are idle. They leave room for the guard band and the
  cyclic prefix.

### Input rate

While a symbol's data is arriving, the input rate is B·N_l/R bits per clock.
That is the rate the output needs:

- π/2-BPSK on one layer gets one valid every 16 clocks.
- 256QAM on four layers gets four valids of 8 bits every 16 clocks.

Each valid carries a whole symbol, so the scrambler advances its sequence by
B steps per valid, up to 8 steps in one clock.

### What happens downstream

1. Five clocks after each valid, the mapped subcarrier is written into every
   port's IFFT memory. The five clocks are the five registered stages. Bins
   outside the 132 active subcarriers are never written and stay zero.
2. The write of subcarrier 131 starts the transform. The transform takes
   1,024 butterfly clocks and then 256 clocks to read out. That adds up to
   about 1,280 of the 3,008 idle clocks that follow the last data slot.
3. The IFFT has one working memory and cannot accept the next symbol while
   it computes. This fits because the next symbol's data starts only after
   the idle slots.
4. The result goes into whichever of the two output banks is free.
5. The sender plays a full bank at one sample per 16 clocks:
   - first the last 64 samples of the bank, which form the cyclic prefix,
   - then all 256 samples.

   When it finishes a bank, it moves straight on to the other bank if that
   one is full.

Because the input produces exactly one symbol per 5,120 clocks, the output
is gap-free for the whole subframe. The tests check the 16-clock spacing on
every sample across all 48 symbols.

If symbols were pushed in faster than one per 5,120 clocks, a finished
transform would find both banks full. That symbol is then dropped and
`overrun` is raised.

### Start-up and latency

The IFFT memories clear themselves for 256 clocks after reset. When a
transmission starts, the scrambler takes 100 clocks to run its Gold sequence
1,600 steps ahead, at 16 steps per clock.

The input block holds off until both are done. It waits for `dn_ready`,
which the top drives from the scrambler's `ready` and every port's IFFT
`ready`.

The first output sample appears about 3,490 clocks after the start bit is
written, about 14 µs.

## Arithmetic and accuracy

**Modulation.** The constellation points are the odd integer levels of
TS 38.211 §5.1, multiplied by 1/√E, with E = 2, 10, 42 or 170. The scale
constants have 20 fractional bits and the result is rounded to Q2.14. Every
point is within half an LSB of its exact value.

**Precoding.** Every codebook entry is 0, ±1 or ±j times one common factor:
1, 1/√2, 1/2, 1/(2√2), 1/(2√3) or 1/4. The precoder therefore needs only
adders, sign changes and real/imaginary swaps, followed by one constant
multiply. The factor has 18 fractional bits, so it adds at most 1/8 LSB of
error.

**Amplitude factor β.** β is unsigned Q1.14 and is applied in the resource
mapper.

**IFFT.** The IFFT works internally on 26-bit words with no scaling between
stages, so it cannot overflow. Its twiddles are 16-bit Q1.14, computed with
`$cos` and `$sin` while the design elaborates. The output is divided by 16
(1/√256), then rounded and saturated to Q2.14.

**Measured error.** The end-to-end tests compare against a floating-point
model with no intermediate rounding:

| Test | Max absolute error | Mean absolute error |
|---|---|---|
| 2-symbol test, 11 configurations | 2.9·10⁻⁴ (2^-11.8) | 1.4·10⁻⁵ (2^-16.1) |
| Two full subframes, 64QAM and 256QAM, 4 layers, 4 ports | 1.8·10⁻⁴ (2^-12.4) | 2.1·10⁻⁵ (2^-15.6) |

The limits for this transmitter are 2^-11 for the maximum error and 2^-13
for the mean.

**Saturation.** An OFDM symbol with a high peak can saturate at ±2. This
happens most easily with one port and β = 1. Lower β if headroom matters.

## Host interface

**Codeword input.** The codeword arrives on a 32-bit AXI4-Stream (`s_axis_*`)
while the transmitter is idle. Codeword bit 0 goes in bit 0 of the first
word. `tlast` rewinds the write pointer. The store holds 6,336 words,
202,752 bits. That is a full subframe at 256QAM on four layers:
48 × 132 × 4 × 8 bits.

**Output.** `m_axis_tdata[32p+31:32p]` carries port p, with the imaginary
part in the upper 16 bits. `m_axis_tvalid` is high for one clock every 16
clocks. The output is paced and has no `tready`. Ports that are not in use
output zeros.

**Registers.** AXI4-Lite, 32-bit registers, byte addresses:

| Addr | Name | Contents |
|---|---|---|
| 0x00 | CTRL | Write bit 0 = start. Read: bit 0 busy, bit 1 done, bit 2 unsupported TPMI seen, bit 3 overrun |
| 0x04 | MOD | 0 π/2-BPSK, 1 QPSK, 2 16QAM, 3 64QAM, 4 256QAM (reset: 1) |
| 0x08 | LAYERS | 1..4 (reset: 1) |
| 0x0C | PORTS | 1, 2 or 4 (reset: 1) |
| 0x10 | TPMI | precoding matrix indicator |
| 0x14 | RNTI | n_RNTI, 16 bits |
| 0x18 | NID | n_ID, 10 bits |
| 0x1C | NRAPID | random-access preamble index, 6 bits |
| 0x20 | MSGA | bit 0: use the msgA scrambling initialisation |
| 0x24 | BETA | amplitude factor, unsigned Q1.14 (reset: 0x4000 = 1.0) |

**Scrambling initialisation.** c_init = n_RNTI·2^15 + n_ID. With MSGA set,
c_init = n_RNTI·2^16 + n_RAPID·2^10 + n_ID. Both are taken modulo 2^31.

The parameters are captured at start and held for the whole transmission.

## What comes from the reference design and what is added here

This RTL re-creates a published PUSCH transmitter. That design was built
with a model-based flow for a Zynq UltraScale+ RFSoC (ZCU216 board) and
only describes the behaviour of its blocks, not their insides.

**Taken from the reference design:**
- the chain and its order: input processing, scrambling, symbol
  modulation, layer mapping, codebook precoding, and then CP-OFDM
  modulation;
- no transform precoding stage;
- precoding selected at run time by layers, ports and TPMI;
- amplitude scaling before resource mapping, with the input block's pacing
  deciding which resource elements get data;
- the waveform: 10 MHz, 60 kHz SCS, 132 subcarriers, a 256-point FFT and
  extended CP;
- one clock of 245.76 MHz with R = 16 and a valid signal for pacing, and
  the input rate B·N_l/R per clock;
- counters that leave room after each symbol's data for the cyclic prefix
  and guard band;
- the runtime parameters: modulation, layers, ports, TPMI, RNTI, n_ID and
  the preamble index, written over AXI4-Lite;
- the codeword in and the samples out over AXI4-Stream, as one 16-bit
  Q2.14 complex sample per port packed into 128 bits;
- the accuracy limits, 2^-11 maximum and 2^-13 mean absolute error. The
  reference design reported 3.59·10⁻⁴ and 1.09·10⁻⁴ on hardware.

The standard 3GPP TS 38.211 supplies the scrambling sequence, the
constellations, the layer mapping rule, the codebook matrices and the
64-sample extended CP.

**This design's own choices:**
- the insides of every block;
- the memory-based radix-2 IFFT. The reference used a vendor OFDM
  modulator block;
- the two output banks;
- the `dn_ready` start-up handshake;
- the 16-step-per-clock warm-up of the scrambler;
- the scale constants;
- the register map and status bits;
- the codeword bit order and the port order in the 128-bit word;
- no `tready`;
- the `unsupported` and `overrun` flags;
- 48 symbols per transmission, one 1 ms subframe at 60 kHz with
  extended CP;
- a direct (non-interleaved) virtual-to-physical resource block mapping,
  with the grid centred on DC.

**Run-time parameters.** The reference design computes the amount of input
data per subframe from B and N_l at run time. Here that is the slot
counter together with the B·N_l bits taken per subcarrier.

**Input rate.** The reference design's text says 64QAM on four layers
gives valid data on every clock. Its own rate formula gives 1.5 bits per
clock for that case. This design follows the formula and carries one
modulation symbol per valid. 64QAM on four layers therefore has valid
high on 4 of every 16 clocks.

## Where this RTL stops

- **Codebook coverage.** All the codebooks for transform precoding disabled
  are built:
  - 1 port: the identity.
  - 2 ports: 1 layer TPMI 0–5; 2 layers TPMI 0–2.
  - 4 ports: 1 layer TPMI 0–27; 2 layers TPMI 0–21; 3 layers TPMI 0–6;
    4 layers TPMI 0–4.

  Any other combination gives zero output and raises `unsupported`:
  - a TPMI past the end of its table,
  - more layers than ports,
  - 3 ports.
- **No transform precoding.** DFT-s-OFDM transform precoding is not part of
  the design. Only the codebook for transform precoding disabled is used.
- **Fixed waveform.** Only one waveform is supported: extended cyclic prefix
  with a 256-point FFT and 132 subcarriers. Every subcarrier of every symbol
  carries PUSCH data. There are no DM-RS or other reference signals, and the
  grid is contiguous and centred on DC.
- **Transmission length.** A transmission is always P_NSYM symbols, 48 by
  default.
- **Not in the RTL.** The RFSoC data converters, the interpolation in
  front of the DACs and the processor system are not part of this RTL.
- **Memories.** The codeword store, the IFFT memory and the output banks
  are plain arrays. A synthesis tool maps them to block RAM or distributed
  RAM. The IFFT memory has two write ports and three asynchronous read
  ports, which suits distributed RAM.

## Simulating

Every block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

| Testbench | Checks |
|---|---|
| `tb_pusch_scrambler` | Against the Gold sequence evaluated from its recursions |
| `tb_pusch_symbol_mod` | Every bit pattern of every scheme, against real-valued constellations |
| `tb_pusch_layer_map` | Layer order and zeroing of unused layers |
| `tb_pusch_precoder` | Every supported codebook entry, against a separately written table |
| `tb_pusch_re_mapper` | Bin placement and β scaling |
| `tb_pusch_ifft256` | Against a direct inverse DFT, and the latency (1,026 clocks) |
| `tb_pusch_ofdm_mod` | Cyclic prefix, gap-free output, overrun |
| `tb_pusch_input_proc` | Slot pattern, bit order, done timing |
| `tb_pusch_axil_regs` | Register read/write, strobes, start pulse, status |
| `tb_pusch_tx_top` | 2-symbol transmissions over 11 configurations (details below) |
| `tb_pusch_tx_full` | Two full 48-symbol subframes at default parameters, 4 layers and 4 ports: 64QAM (identity matrix), then 256QAM (coherent TPMI 3) with the codeword store full |

`tb_pusch_tx_top` covers all modulation schemes, 1 to 4 layers, 1, 2 and 4
ports, msgA scrambling and one unsupported TPMI. It also covers
non-coherent, partially coherent and fully coherent 4-port matrices. It
counts the guard/CP pauses, the symbol hand-overs, each scheme, layer count
and port count, msgA runs and unsupported flags. It fails if any count
stays at zero.

Both end-to-end tests use `pusch_tx_driver`. It holds a floating-point model
of the whole chain and checks every output sample against the error limits
above.

Run a test from the top folder:

```
verilator --binary --timing --assert -y rtl -y tb rtl/pusch_pkg.sv \
    tb/tb_pusch_tx_full.sv --top-module tb_pusch_tx_full
./obj_dir/Vtb_pusch_tx_full
```

Replace the testbench name to run any other test. The full-size run
simulates about 520,000 clocks and takes about 20 seconds.

## Changing it

- **Transmission length.** `pusch_tx_top #(.P_NSYM(n))` sets how many
  symbols one start sends. Grow `CW_WORDS` in `pusch_input_proc` if n goes
  above 48.
- **Waveform constants.** These are in `pusch_pkg`: `NFFT`, `NSC`, `NCP`,
  `OSR` and `NSYM_SF`.
  - The IFFT and the OFDM modulator take the transform size as a parameter.
  - The pacing assumes that one transform plus its read-out
    (NFFT/2·log2 NFFT + NFFT clocks) fits in the idle slots:
    (NFFT + NCP − NSC)·OSR clocks.
  - Keep `OUT_SHIFT` of the IFFT at log2(NFFT)/2 to keep the unitary
    scaling.
- **A different output layout or codeword width.** These are local to
  `pusch_tx_top` and `pusch_input_proc`.
