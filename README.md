# LHCb Preshower / SPD front-end board — digital logic in SystemVerilog

The LHCb preshower (PS) and scintillator pad detector (SPD) sit in front of
the electromagnetic calorimeter. Each front-end board serves one 64-channel
photomultiplier: it receives 64 ten-bit ADC samples (PS) and 64 hit bits (SPD)
every 25 ns. Each sample goes two ways:

* **DAQ path.** Each PS sample is corrected (pedestal, gain, pile-up) and
  compressed to 8 bits. It waits in a latency pipeline for the level-0 (L0)
  decision. Accepted events are sent to the board's sequencer in four 20-bit
  words per FPGA.
* **Trigger path.** Every 25 ns a threshold turns each corrected PS sample into
  a trigger bit. The board answers the two ECAL boards that face it: for each
  ECAL candidate address it returns the PS and SPD bits of the 2×2 cluster of
  cells at that address, including cells that belong to neighbouring boards.
  It also counts the SPD hits.

The RTL holds the board's own logic: eight **FE_PGA**s, each handling 8
channels, and one **TRIG_PGA**. Their ECS (slow control) register banks come
with them. The top is `ps_feb`. Everything runs on the single 40 MHz board
clock. Separately phased clocks are used only to take in the inputs.

```
 adc[64], spd_in[64] ──► 8 x fe_pga ──► ps_trig/spd (64+64) ──► trig_pga ──► val1/addr1, val2/addr2, spd_mult
                          │   │                                     ▲  │
         L0, rd_req ──────┘   └─► sdata[8] (4 x 20 bit per event)    │  └─► top_out, right_out (to neighbours)
                                             ecal1/2 addr+BCID, top_in, right_in
 I2C buses (9) ──► i2c_slave ──► fe_ecs / trig_ecs register banks in every FPGA
```

## 1. The FE_PGA channel data path

Each of the eight channels of an FE_PGA (`fe_chan_proc`) runs a four-stage
pipeline on every clock:

| stage | block | operation | number format |
|---|---|---|---|
| 1 | `fe_offset_sub` | `D = Dr − offset`, negative → 0 | offset 8 bit, in ADC LSB |
| 2 | `fe_gain_corr` | `D = D + ε·D`, > 1023 → 1023 | ε 8 bit, value ε/256; product ε × D[9:1] (8×9 multiplier) scaled by 1/128 |
| 3 | `fe_alpha_corr` | `D = Dn − α·Dn−1`, negative → 0 | α 8 bit, value α/512 (so α < 0.5) |
| 4 | threshold + `fe_transcode` | `trig = D > thr`; 10 → 8 bit transcoding | threshold 8 bit, compared with the 10-bit D |

**Two integrators per channel.** The analog front end integrates with two
interleaved integrators that take turns every 25 ns. Each one has its own
pedestal and its own gain, so every channel has two offsets and two ε
values. The one-bit `sub` in `fe_pga` tracks which integrator produced the
current sample:

* it toggles every clock;
* the VFE reset (the OR of the TTC bunch-counter and event-counter resets)
  clears it;
* it travels down the pipeline beside the data, so each stage picks the right
  parameter.

The α stage subtracts a fraction of the previous sample. That sample is the
previous output of the gain stage, so it comes from the other integrator.

**Transcoding** is piecewise linear, with boundaries at 128, 256 and 512:

```
d8 = d10                        d10 < 128
d8 = 128 + (d10 − 128)/2        128 ≤ d10 < 256
d8 = 192 + (d10 − 256)/8        256 ≤ d10 < 512
d8 = 224 + (d10 − 512)/16       512 ≤ d10
```

Decoding happens off the board. There, code d8 maps back to the lower edge of
its bin: `d8`, `2·d8 − 128`, `8·d8 − 1280` or `16·d8 − 3072`, plus up to half a
bin width to land on the bin centre.

**Processing bypass** is set by CTRL bits 3:2. Value 10 outputs the 8 LSBs and
value 11 the 8 MSBs of the raw sample instead of the transcoded value. The
trigger bit is still computed.

### Behind the channels (`fe_pga`)

1. **Input sampling.** ADC and SPD inputs are registered twice: first on their
   phase clock (`clk_adc`, `clk_spd`), then on `clk`. The SPD deserialiser's
   clock is sampled as well, and any toggle clears the SPD-clock-stable bit
   of STATUSCLK.
2. **Injection.** When CTRL bit 1 is set, the 88-bit injection RAM (8 × 10-bit
   PS plus 8 SPD bits per word) replaces the sampled inputs.
3. **Channel mapping** (`fe_chan_map`) reorders channels to the read-out order
   of the top or bottom half of the detector (CTRL bit 7: 1 = top):

   | input channel | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
   |---|---|---|---|---|---|---|---|---|
   | top output    | 1 | 5 | 7 | 3 | 0 | 4 | 6 | 2 |
   | bottom output | 6 | 2 | 0 | 4 | 7 | 3 | 1 | 5 |

4. **Alignment pipelines** (`prog_delay`, 128 deep). PSPIPE and SPDPIPE align
   PS and SPD; SPD bits arrive 4 clocks before the processed PS data of the
   same crossing, so SPDPIPE = 4 aligns them when PSPIPE = 0. A virtual depth
   of 0 bypasses a pipeline, and depth d delays by d clocks.
5. **MASK.** Bit = 1 forces that output channel's PS trigger bit and SPD bit
   to 0.
6. **Outputs.** The 80-bit record `{SPD, trig, PS[7:0]} × 8` goes three ways:
   * to the L0 path;
   * to the spy RAM;
   * through the trigger pipeline (TRIGDEL, 256 deep) to the TRIG_PGA, as
     {SPD, trig} bits.

**Latency.** An ADC sample at the pins reaches the TRIG_PGA inputs 7 clocks
later when all pipelines are at 0: 2 sampling clocks, 4 processing clocks and
1 output register.

### L0 path (`fe_l0seq`)

1. The record enters a 256-deep pipeline whose virtual depth is L0LAT.
2. On an L0 accept, the record that entered L0LAT clocks earlier is pushed
   into a 16-event derandomiser. An accept that finds it full is dropped and
   pulses `derand_ovf`.
3. Each `rd_req` from the sequencer sends the oldest event as four 20-bit
   words on consecutive clocks (`svalid`, `sfirst` on word 0), starting two
   clocks after the request. Word k carries channels 2k (bits 9:0) and 2k+1
   (bits 19:10).

For an L0 asserted at clock n, the event read out is the ADC sample applied
n − L0LAT − 6 clocks earlier.

## 2. The TRIG_PGA: 2×2 clusters across board borders

The TRIG_PGA (`trig_pga`) takes the 64 PS trigger bits and 64 SPD bits (FE_PGA
k, output channel j → bit 8k+j) and arranges them as an 8×8 grid:

* **Top mapping** (CTRL bit 0 = 1): row k, column j.
* **Bottom mapping:** the same grid turned by 180° (bit i → cell 63 − i).

Each ECAL board sends the address of its highest-energy cell for its half of
the board: 5 bits = {row[1:0], column[2:0]} inside an 8×4 half. ECAL 1 covers
rows 0–3 and ECAL 2 rows 4–7.

`roi_search` returns, for PS and for SPD, the addressed cell ("own") and three
neighbours: Right (column + 1), Top (row + 1) and the corner diagonal. The
answer is 8 bits:

```
val = {SPD top, SPD corner, SPD right, SPD own, PS top, PS corner, PS right, PS own}
```

A hit in the addressed cell only, in both PS and SPD, gives 00010001.

**Border cells.** Cells beyond the grid belong to other boards:

* `right_in`: the left column of the board to the right, plus the corner cell
  above-right of this board;
* `top_in`: the bottom row of the board above.

Symmetrically, the board sends:

* `top_out`: its own bottom row, for the board below;
* `right_out`: its own left column, plus the corner bit it received from
  above, for the board on the left.

CTRL bits 2 and 3 zero the Right and Top neighbours. They are used where the
detector granularity changes. A **half board** (CTRL bit 1) uses only FE_PGAs
0–3: rows 4–7 are empty, the Top neighbours join row 3, and the Bottom
mapping turns the 8×4 half by 180°.

**SPD multiplicity** (`spd_mult`) counts the 64 SPD bits in one registered
stage. It uses a 4-input look-up per nibble and an adder tree.

**Alignment.** Every input group has its own programmable pipeline. The latency
from an input register to the outputs is 3 clocks plus the programmed depth:

| input | control | built range | document |
|---|---|---|---|
| PS/SPD bits | TALAT[2:0] | 3–10 | 3–9 |
| Top neighbours | TALAT[4:3] | 3–6 | 3–5 |
| Right neighbours | TALAT[7:5] | 3–10 | 3–9 |
| ECAL 1 and 2 | ECALPIPE | 3–258 | 3–258 |

ECAL and Top inputs are taken first on their phase clocks and then on `clk`,
so they enter one clock before PS/SPD data applied at the same time.

**BCID check.** An 8-bit local BCID counter is loaded with BXOFFSET at the
BCID reset. DELTABX1 and DELTABX2 give each ECAL BCID minus the local BCID,
modulo 128 and sign-extended. The ECAL BCID is taken as 7 bits.

**Injection and acquisition.**

* The 52-bit injection RAM word is `{right 18, top 16, all-ones 1, BCID 7,
  addr2 5, addr1 5}`. INJCTRL bit 6 replaces the ECAL inputs from it and bit
  7 the neighbour inputs. The all-ones bit forces every PS and SPD input bit
  to 1.
* The 80-bit acquisition RAM records, per ACQCTRL bit 7:
  * normally: `{right_out, top_out, mult, addr2, val2, addr1, val1, BCID}`;
  * in bypass mode: the mapped PS grid with the Top inputs (bit 3 = 0), or
    the mapped SPD grid with the Right inputs (bit 3 = 1).

## 3. Test facilities shared by both FPGAs

**Injection RAM** (`inj_ram`, 256 deep, INJDEPTH words, 0 = 256):

* *Synchronised*: a trigger (L0 or the test sequence) starts it, and it plays
  the words once, either one per clock or one per trigger.
* *Not synchronised*: it runs freely, looping unless "no loop" is set.
* *Counter reset by trigger* (TRIG_PGA only): each trigger restarts it at
  word 0.

The output is zero when no word is being played.

**Spy RAM** (`acq_ram`, 256 deep) records the data on one of four triggers
(L0, or the test sequence when selected):

* every clock the trigger is high;
* a burst of 256 clocks;
* the leading edge only;
* a gate of 8 or 16 clocks opened by each leading edge.

It stops when full, so ECS reads a frozen picture. CMD rewinds it.

## 4. Slow control (ECS)

Each FPGA has its own I2C bus. The TRIG_PGA answers at addresses
0x0C..0x0F and each FE_PGA at 0x08..0x0B (parameters `TRIG_I2C_BASE` and
`FE_I2C_BASE` of `ps_feb`). The two low address bits select one of four
channels. SDA is open-drain: `i2c_sda` is the line level and `i2c_sda_oe`
pulls it low.

`i2c_slave` samples SCL and SDA with the 40 MHz clock, so each SCL phase must
last at least four clock periods (up to about 2.5 MHz SCL). It does no clock
stretching. It acknowledges only its own four addresses, and a repeated START
opens a new frame. It turns the bus traffic into byte strobes for the
register bank:

* `start` with `ch` opens a frame;
* `wr`/`wdata` write the next byte;
* `rd` reads the next byte, answered on `rdata` one clock later;
* `stop` closes the frame.

On a read, `rd` is issued during the address acknowledge and after each
master acknowledge. None is issued after the final not-acknowledge, so the
register bank sees exactly the bytes the master took.

Frames may be short: byte i always goes to register i.

| FPGA | ch | write frame | read frame |
|---|---|---|---|
| FE | 0 | CTRL, CMD, L0LAT, PSPIPE, SPDPIPE, MASK, ACQCTRL, INJDEPTH, TRIGDEL | CTRL, L0LAT, PSPIPE, SPDPIPE, MASK, ACQCTRL, INJDEPTH, FLAGS, STATUSCLK, ACQCNT, INJCNT, PSCNT, TRIGDEL |
| FE | 1 / 2 | 33 bytes = 12 SEC-DED words (22 bits, LSB first) for channels 0–3 / 4–7 | same |
| FE | 3 | 11 bytes per injection word (PS 80 bits, then SPD) | 24 bytes per address: spy PS[8], trig, SPD, spy counter, injection PS (10 bytes), SPD, injection counter, 0xA5 |
| TRIG | 0 | CMD, CTRL, ECALPIPE, TALAT, BXOFFSET, ACQCTRL, INJCTRL, INJDEPTH | CTRL, ECALPIPE, TALAT, BXOFFSET, FLAGS, ACQCTRL, INJCTRL, INJDEPTH, DELTABX2, DELTABX1 |
| TRIG | 1 | 7 bytes per injection word | same |
| TRIG | 3 | — | 10 bytes per acquisition word |

**CMD:**

* FE_PGA: bit 0 rewinds the spy counter and bit 1 the injection counter.
* TRIG_PGA: a CMD with bit 0 set rewinds the acquisition counter; one with bit
  0 clear rewinds the injection counter.

Either kind of rewind also resets the ECS RAM address. That address advances
after each complete RAM word, read or written.

**FLAGS** are sticky and are cleared when read:

* FE_PGA:
  * bits 7/6: SEC-DED error in parameter group 1/2;
  * bit 5: ADC power-switch fault;
  * bit 3: voting error on the control registers;
  * bit 0: voting error on the frame byte counter.
* TRIG_PGA:
  * bit 0: ECALPIPE;
  * bit 1: INJDEPTH;
  * bit 2: frame byte counter;
  * bit 5: CTRL;
  * bit 6: ACQCTRL, INJCTRL or TALAT.

## 5. Radiation protection

* **Control registers** (`tmr_reg`) are held in three copies. The output is
  the majority vote, and the vote is written back every clock, so a single
  upset lasts one clock and raises `err` for FLAGS. An `upset` input flips
  copy 0 for tests.
* **Frame byte counter.** The counter that places each ECS byte in its
  register is also kept in three voted copies, rewritten with the vote every
  clock. A disagreement sets a FLAGS bit. `upset_cnt` flips one copy in the
  block tests; inside the FPGAs it is tied low.
* **Processing parameters** (`fe_param_bank`). Each group of four channels
  holds 12 words of 16 data bits plus 6 check bits (Hamming(21,16) plus
  overall parity: one error corrected, two detected). The word layout for
  channel c of a group is:
  * word 3c = {off1, off0};
  * word 3c+1 = {gain1, gain0};
  * word 3c+2 = {thr, alpha}.

  The data bits drive the data path directly.
* **Scrubbing.** A single decoder (`hamming_secded`) visits one word per clock
  and writes back the corrected word. It pauses while an ECS frame is open on
  a parameter channel, because ECS writes the words in 8-bit slices. The code
  is the plain positional Hamming code:
  * data bits sit at the non-power-of-two positions 3, 5, 6, 7, 9, … of a
    21-bit word;
  * check bit k is the XOR of the data bits whose position has bit k set;
  * a parity bit over all 21 bits is added on top.

  The stored layout is `{parity, check[4:0], data[15:0]}`.

## 6. Where this RTL departs from, or fills in, the description

These are choices made where the description is silent or loose. The details
of each live in the module headers.

* **Correction order** is offset → gain → α, in the order in which the
  corrections are introduced. The α stage works on gain-corrected samples.
* **Threshold:** the trigger fires when the corrected value is strictly
  greater than the threshold.
* **MASK polarity:** 1 = masked.
* **Derandomiser and read-out protocol.** The derandomiser depth (16), the
  `rd_req` / `svalid` / `sfirst` handshake with the sequencer, and the order
  of channels in the four read-out words are own choices.
* **Parameter bank size.** The shared decoder serves 12 words per group of
  four channels. The description mentions 16 registers and 544 bits per
  FE_PGA, against 528 bits here.
* **TRIG_PGA pipeline ranges** come from 3-bit and 2-bit TALAT fields. They are
  one clock longer at the top than the ranges quoted for the original chip.
* **Bottom mapping** is read as a 180° rotation of the Top mapping, and the
  half-board geometries follow from it.
* **STATUSCLK.** There is no PLL, so the PLL-lock bit is a constant 1. The
  SPD clock-lock bit means that no toggle of the deserialiser clock was seen
  since the last FLAGS read.
* **FLAGS coverage.** The FE_PGA's voting-error bits 4, 2 and 1 (the RAM
  counters are not triplicated) and the TRIG_PGA's bit 3, ECAL-pipeline and
  TALAT-neighbour bits are not produced.
* **Outside the RTL.** The SPECS/ECS glue FPGA, the
  sequencer FPGA that builds the DAQ event, the ADCs and drivers, the
  delay chips, the SPD deserialisers, the latch-up protection switches and the
  LEDs are not part of the RTL. Their signals are ports of `ps_feb`: the
  phase clocks, `adc_fault`, the I2C buses, `rd_req` / `sdata`, and
  `vfe_rst`.
* **Fault-injection ports.** `upset_*` on the top exist only to exercise the
  protection logic. Tie them to 0 in use.

## 7. Files and simulation

`rtl/` holds one module per file. `ps_pkg.sv` holds the shared types:

* `chan_par_t`, the per-channel parameters;
* `inj_cfg_t` and `acq_cfg_t`, the RAM modes;
* `acq_mode_e`;
* the Hamming encode and check functions.

The module hierarchy:

```
ps_feb
├── i2c_slave ×9
├── fe_pga ×8
│   ├── fe_ecs ── tmr_reg ×8
│   ├── fe_param_bank ×2 ── hamming_secded
│   ├── inj_ram, acq_ram
│   ├── fe_chan_proc ×8 ── fe_offset_sub, fe_gain_corr, fe_alpha_corr, fe_transcode
│   ├── fe_chan_map ×2, prog_delay ×3
│   └── fe_l0seq ── prog_delay
└── trig_pga
    ├── trig_ecs ── tmr_reg ×7
    ├── inj_ram, acq_ram, prog_delay ×4
    ├── roi_search ×2
    └── spd_mult
```

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the block against an independent model and prints
`TB_RESULT checks=N failures=M`.

`tb_ps_feb` runs the whole board at its default sizes:

* it configures all nine FPGAs through their I2C buses, with a bit-level
  I2C master in the testbench;
* it drives random detector, neighbour and ECAL data;
* it checks every TRIG_PGA output clock by clock, and the L0 events read out,
  against a model.

It also exercises, and counts, each of these:

* both mappings and the pipeline delays;
* derandomiser overflow;
* raw read-out (bypass);
* injection and the spy RAM;
* a corrected parameter upset and a TMR voting error;
* the VFE reset.

It runs in about half a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ps_pkg.sv tb/tb_ps_feb.sv -y rtl -y tb \
          --top-module tb_ps_feb
./obj_dir/Vtb_ps_feb
```

Replace `tb_ps_feb` with any other testbench name. The testbenches use only
two-state values, `$urandom` and plain queues and associative arrays.
