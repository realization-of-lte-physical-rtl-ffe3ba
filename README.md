# LTE uplink baseband for narrowband IoT: SC-FDMA transmitter and on/off receiver

This is synthesizable SystemVerilog for a small LTE uplink baseband built around one
80 MHz clock. Two channel chains, PUCCH for control bits and PUSCH for user data, carry bits
through the uplink transmit steps:

    bits -> scrambling -> modulation -> layer mapping -> DFT transform precoding -> resource grid

PRACH resource elements go straight into the grid. A minimal receiver reads back eight
resource elements, turns them into bits, and makes an ON/OFF decision for a device. The
architecture follows a published FPGA design for NB-IoT uplink baseband processing. The
structure and its main numbers come from that design: an 8-bit LFSR scrambler, BPSK/QPSK/16QAM
tables, an 8-point FFT, and a 54 x 7 grid split into three 12-row channel sections. Where the
description left details open, this RTL fills them in and says so. The
[Departures and open points](#departures-and-open-points) section lists those choices.

## Block structure

```
              chan_sel, lm_mode
                    |
 ctrl bits --> tx_chain (PUCCH) --+
                                   |    re_mapper
 data bits --> tx_chain (PUSCH) --+--> FIFOs + row/col scan --> grid[ant 0], grid[ant 1]
                                   |    (section_decoder x3)        |        |
 PRACH REs -----------------------+                                 | rd_*   | rx port
                                                                    v        v
                                                    re_demapper --> detector --> device_on

 tx_chain = scr_rate -> scrambler -> modulation_mapper -> layer_mapper
            -> transform_precoder (port 0), transform_precoder (port 1)
 transform_precoder = 8-entry RAM -> fft8 (16 x w8_mul) -> output buffer
```

| module | role |
|---|---|
| `lte_pkg` | shared types (`mod_e`, `chan_sel_e`, `lm_mode_e`, `cplx16_t`, `cfix_t`), float constants, number conversions |
| `scr_rate` | rate enable: one scrambler step every 4 / 2 / 1 clocks for BPSK / QPSK / 16QAM |
| `scrambler` | 8-bit LFSR, feedback `Y7^Y6^Y2^Y1`, output = data XOR `Y1` |
| `modulation_mapper` | groups 1/2/4 bits into a constellation point, 16-bit float I and Q |
| `layer_mapper` | single antenna, transmit diversity, spatial multiplexing |
| `fft8`, `w8_mul` | combinational 8-point DFT in butterfly form, constant twiddle multipliers |
| `transform_precoder` | collects 8 symbols, converts them to fixed point, runs the FFT, streams X0..X7 |
| `tx_chain` | one complete channel chain |
| `section_decoder` | Start/Stop decoding of the grid row counter for one channel section |
| `sync_fifo` | section input queue of the mapper |
| `re_mapper` | writes one slot of both antenna grids; two read ports |
| `re_demapper` | reads 8 REs of a section and column; one hard bit per RE |
| `detector` | nearest of the two reference words 11111111 / 00000000; holds `device_on` |
| `lte_nbiot_top` | everything wired together |

## Top-level interface (`lte_nbiot_top`)

| signals | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 80 MHz clock, asynchronous active-low reset |
| `chan_sel[1:0]`, `lm_mode[1:0]` | in | channel/modulation and layer mapping selection (below) |
| `ctrl_valid`, `ctrl_bit`, `ctrl_ready` | in/in/out | PUCCH control bits; a bit is taken in a clock where valid and ready are both high |
| `data_valid`, `data_bit`, `data_ready` | in/in/out | PUSCH data bits, same handshake |
| `prach_valid`, `prach_re` | in | PRACH resource elements (`cfix_t`), queued for the PRACH section of port 0 |
| `slot_start`, `slot_busy`, `slot_done` | in/out/out | start and progress of one slot scan |
| `slot_num[4:0]`, `subframe_num[3:0]` | out | frame position of the next slot |
| `overflow[2:0]` | out | sticky: a section FIFO (PUCCH, PUSCH, PRACH) dropped an RE |
| `rd_ant`, `rd_row[5:0]`, `rd_col[2:0]`, `rd_re` | in/out | asynchronous grid read port |
| `rx_start`, `rx_sec[1:0]`, `rx_col[2:0]` | in | start the receiver on a section and column |
| `rx_bits[7:0]`, `rx_valid`, `rx_data`, `device_on` | out | hard bits, decision strobe, decision, held ON/OFF output |

## Selection codes

`chan_sel` picks the channel that takes bits and its modulation. Only that chain's `*_ready`
goes high.

| `chan_sel` | channel | modulation | bit rate at 80 MHz |
|---|---|---|---|
| 00 | PUSCH | QPSK | 40 Mbit/s (1 bit per 2 clocks) |
| 01 | PUSCH | 16QAM | 80 Mbit/s (1 bit per clock) |
| 10 | PUCCH | BPSK | 20 Mbit/s (1 bit per 4 clocks) |
| 11 | PUCCH | QPSK | 40 Mbit/s |

In every mode, a chain makes one modulation symbol every four clocks (20 Msymbol/s). The original
design makes a slower clock for each mode. Here a clock enable does that job, so the whole
design stays in one clock domain.

`lm_mode` selects the layer mapping. The codes 01 and 10 both select transmit diversity,
because the source gives both codes for that mode.

| `lm_mode` | ports | mapping |
|---|---|---|
| 00 | 1 | x0(i) = d(i) |
| 10 or 01 | 2 | x0(i) = x1(i) = d(i) (transmit diversity) |
| 11 | 2 | x0(i) = d(2i), x1(i) = d(2i+1) (spatial: even symbols on port 0, odd on port 1) |

## Number formats

The hardest part to follow is how values change representation along the chain.

1. **Modulation symbols** (`cplx16_t`, 32 bits) hold the upper 16 bits of the IEEE 754
   single-precision I and Q values. This is the same layout as bfloat16: sign, 8-bit exponent and
   7-bit fraction. The constants are 1/sqrt2 = `3F35`, 1/sqrt10 = `3EA1` and 3/sqrt10 = `3F72`,
   with bit 15 set for negative values. The layer mapper passes these words through unchanged.
2. **Resource elements** (`cfix_t`, 64 bits) hold 32-bit two's complement I and Q in Q15.16.
   The transform precoder converts each 16-bit float with `bf16_to_fix`, which shifts the 8-bit
   significand by (exponent - 118). The conversion is exact for every constellation value.
3. **The FFT** leaves out the 1/sqrt(8) scaling, so outputs reach up to 8 x 0.95. Q15.16 has
   plenty of headroom for that. A multiplication by 1/sqrt2 is a 32 x 32 bit product with the
   Q1.30 constant `2D413CCD`; the 64-bit result is shifted right by 30 and cut to 32 bits. With this
   truncation, results are within about 1e-4 of a floating-point DFT.

Float words are never added as plain integers. They are always converted to fixed point first,
so the precoder output is a true DFT of the constellation values.

### FFT structure

`fft8` uses the butterfly form with twiddles c_k = exp(-j 2 pi k / 8):

    P_n = x_n + x_{n+4},   M_n = x_n - x_{n+4}                  (n = 0..3)
    X_{2m}   = sum_n c_{(2m n) mod 8}     * P_n
    X_{2m+1} = sum_n c_{((2m+1) n) mod 8} * M_n

Multiplying by c0, c2, c4 or c6 is only a swap or a sign change. c1, c3, c5 and c7 each need two
multiplications by 1/sqrt2. That gives 16 real constant multiplications per FFT.

## Resource grid and the mapping scan

Each antenna port has a grid of 54 rows (subcarriers) x 7 columns (SC-FDMA symbols), one 0.5 ms
slot. Counting rows from 0:

| rows | section |
|---|---|
| 0-11 | PUCCH |
| 12-23 | PUSCH |
| 24-35 | PRACH |
| 36-53 | unused, written 0 |

Each section has its own input FIFO (`FIFO_DEPTH` = 16 entries). An entry is the RE for port 0,
the RE for port 1, and a 2-bit antenna enable. A pulse on `slot_start` starts a scan. The scan
writes one RE per clock: rows 0..53 of column 0, then column 1, and so on. A scan takes 378
clocks (`slot_busy`), and `slot_done` pulses at the end. Three `section_decoder`s compare the row
counter with each section's first and last row, giving Start/Stop and an in-section flag. When the
scan is inside a section, the RE takes the next FIFO entry of that section, or 0 if the FIFO is
empty. So a section fills column by column, 12 REs per column. A port whose enable bit is clear
gets 0. A write into a full FIFO is dropped and sets that section's bit in the sticky `overflow`
output. Data can arrive during a scan; the scan uses it if the FIFO has it when the scan reaches
that row.

The grid is rewritten completely on every scan. One grid holds one slot, not a whole frame.
`slot_num` (0..19) counts the scans modulo one 10 ms frame, and `subframe_num` = `slot_num` / 2.
Both give the position of the next slot to be written.

## Receiver

`rx_start` reads eight REs of antenna port 0, one per clock, from rows FIRST..FIRST+7 of section
`rx_sec` in column `rx_col`. Bit i is 1 when the real part of the RE in row FIRST+i is not
negative. The detector computes the squared distances of the 8-bit word to 11111111 and to
00000000, and decides 1 when the word is nearer the all-ones word, that is, when it has more than
four ones. A tie decides 0. The decision appears on `rx_data` with `rx_valid`, and `device_on`
holds it. The source example of a received `11111001` decides ON.

With the default seed, sending 11111111 on PUCCH with BPSK and a single antenna gives 8 received
bits 11111111, so the device turns ON (`tb_onoff_demo`). The same word on the other three channel
selections gives 00000011 (PUCCH QPSK), 11101011 (PUSCH QPSK) and 11000000 (PUSCH 16QAM).

This receiver does **not** undo the transmitter: there is no inverse DFT, descrambling or
equalization. It is a majority vote on the signs of the grid values. This matches the on/off
demonstration the architecture was built for. Do not expect it to recover the transmitted bits.

## Timing summary (80 MHz clock)

| path | latency |
|---|---|
| bit taken (`*_valid && *_ready`) -> scrambled bit | 1 clock |
| last bit of a symbol -> layer-mapped symbol | 3 clocks |
| last bit of the 8th layer-mapped symbol -> X0 at the precoder output | 4 clocks, then X1..X7 on the next 7 clocks |
| `slot_start` -> `slot_done` | 379 clocks (378 REs) |
| `rx_start` -> `rx_valid` | 10 clocks |

## Departures and open points

These choices are this design's own. They either fill gaps in the source description or settle
places where it contradicts itself.

- **Clocks.** The source derives 20/40/80 MHz scrambler clocks with delay-register dividers (a
  figure labels them 10/20/40 MHz). Here `scr_rate` makes clock enables with the same 1:2:4 ratio.
- **QPSK table.** The two QPSK tables in the source disagree for 01 and 10. This design uses
  01 -> (+, -) and 10 -> (-, +), which is also the LTE standard mapping.
- **Spatial layer mapping** splits whole symbols (even/odd index). A figure describes splitting the
  bits of one symbol instead; that version is not built.
- **FFT twiddles.** The printed twiddle table cannot be decoded consistently. The FFT equations
  match the DFT only with c_k = exp(-j 2 pi k/8), which is what this design uses. The source
  specifies a 12-subcarrier allocation (M_sc = 12) but an 8-point FFT. The 8-point FFT is built, so
  a 12-point DFT allocation is not supported.
- **Number formats.** Precoded REs are 64-bit Q15.16. The source stores 32-bit grid words
  and adds the float words directly.
- **Section decoders** compare the row counter with constants. The printed gate-level decoders
  could not be read reliably.
- **Mapper queues, scan trigger, zero fill** and the **receiver's bit slicing** are not
  specified by the source. The LFSR seed (`8'hFF`) and all handshakes are this design's choice too.
- **Two codewords.** The LTE layer mapping table also maps two codewords onto two layers. Each
  chain here carries a single codeword, so that case is not built.
- **Decision rule.** The source calls its receiver both MMSE and maximum likelihood. What is built
  is the nearest-reference-word decision described above; no channel estimate is involved.
- **PRACH** has no processing chain. Its REs are written to antenna port 0 as given.
- The source lists 32 adders and 19 multipliers for its FFT. This FFT needs 16 constant
  multiplications by 1/sqrt2, because the trivial twiddles are only swaps and sign changes.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops with
`$finish`, and a watchdog ends it if it hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/lte_pkg.sv tb/tb_ref_pkg.sv tb/tb_lte_nbiot_top.sv --top-module tb_lte_nbiot_top
./obj_dir/Vtb_lte_nbiot_top
```

Replace `tb_lte_nbiot_top` with any other testbench name. `tb/tb_ref_pkg.sv` holds the reference
models: an LFSR model, the constellation as real numbers, a float/bfloat16 conversion, and a
floating-point 8-point DFT.

| testbench | checks |
|---|---|
| `tb_scr_rate` | enable spacing 4/2/1, restart on a mode change |
| `tb_scrambler` | random bits and enables against the LFSR model |
| `tb_modulation_mapper` | every bit group of every modulation, latency, partial group dropped |
| `tb_layer_mapper` | all mode codes, pairing in spatial mode |
| `tb_fft8` | impulses and random vectors against a float DFT |
| `tb_transform_precoder` | random constellation blocks, output order and timing |
| `tb_tx_chain` | bits to precoded REs for 3 modulations x 4 mode codes, rates, inactive chain |
| `tb_section_decoder` | Start/Stop/in-section over full row sweeps |
| `tb_re_mapper` | full grid contents of both ports, zero fill, data during a scan, overflow |
| `tb_re_demapper` | hard bits and timing for random grids |
| `tb_detector` | all 256 words, hold of `device_on` |
| `tb_onoff_demo` | the control word 11111111 on each of the four channel selections, through grid and receiver |
| `tb_lte_nbiot_top` | end to end at default parameters: PUCCH/PUSCH in every modulation and layer mode, PRACH, two slots, receiver ON and OFF, overflow; it counts each mechanism and fails if one never occurs |

All parameters default to the source's sizes: a 54 x 7 grid, 12-row sections, 2 antenna ports,
an 8-point FFT and an 80 MHz rate plan. The end-to-end testbench runs the top without overriding
any parameter and finishes in well under a second.
