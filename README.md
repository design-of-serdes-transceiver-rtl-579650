# Fixed-latency 8b/10b serial link

Most multi-gigabit serializer/deserializer (SerDes) pairs do not come back
with the same latency after a reset, a loss of lock or a power cycle. The
word boundary the receiver finds can differ by any number of bits. The
recovered parallel clock can land on any of ten phases. Elastic buffers can
start with a different fill level. For telecom traffic this does not matter.
For clock distribution, precise time protocols and trigger systems it does.

This RTL is a complete link that always has the same latency and the same
recovered-clock phase. It is built around a transceiver of the Xilinx GTP
kind, which is configured so it adds no variable latency of its own, plus a
small amount of control logic in the FPGA fabric. Three ideas make the
latency fixed:

1. **Transmit side.** The serializer's parallel clock (XCLK) comes out of a
   PLL multiply-and-divide chain, so its phase is random at each power-up.
   A phase-align circuit pulls XCLK onto the user transmit clock (TXUSRCLK).
   TXUSRCLK itself has a fixed phase to the reference clock. With the two
   clocks aligned, the transmit FIFO is bypassed.
2. **Receive clock.** The deserializer moves the word boundary by shifting
   its recovered clock, not by shuffling bits (the "PMA mode" of bit
   sliding). Clock shifts come in 2-UI steps. A one-bit barrel shifter
   covers odd shifts.
3. **Odd shifts are refused.** A fabric aligner measures how many one-bit
   slides (n) the first comma needs. If n is odd, it resets the receiver
   and waits for a new lock. If n is even, it slides n times. After that the
   barrel shifter is idle and the recovered clock sits in the one phase that
   goes with the byte boundary. Every accepted lock therefore gives the
   same clock phase and the same latency.

The end-to-end testbench power-cycles both ends six times with a random
XCLK phase, a random clock-recovery phase and random bit pairing. Every time
it measures 165 bit periods (UI) from the generator output to the decoder
output, with the recovered clock in the same phase.

## Link structure

```
 payload_gen ──8+K──► gtp_tx_pcs ──10──► gtp_tx_pma ──serial──► (line) ──2 samples/HSCLK──►
   (pattern)          interface reg       PISO, XCLK
                      enc_8b10b            phase adjust ◄── TXPHASE ── tx_phase_align_ctrl ◄── pll_lock
                      FIFO-bypass reg

 ──► gtp_rx_pma ──10──► gtp_rx_pcs ──10──► comma_aligner ──aligned──► dec_10b8b ──8+K──► payload
     rx_clk_div_shifter    comma-bypass x3     │  ▲
     rx_sipo               elastic_buffer      │  └── raw words
     rx_barrel_shift       interface x2        ├── rxslide ──► gtp_rx_pma
                                               └── gtp_reset ─► receive PCS reset, clock recovery relock
```

`fl_link_top` connects these blocks. The analog and clocking parts are
**ports**. The test environment has to drive them:

| Port(s) | Stands for |
|---|---|
| `serclk` | Serial bit clock from the shared PLL |
| `txusrclk` | Transmit user clock: 1/10 of the bit rate, fixed phase (fabric DLL, ×4 of the reference output) |
| `xclk_phase`, `pll_lock` | Power-up phase of XCLK, and PLL lock |
| `hsclk`, `rx_din[1:0]` | Clock recovery: clock at half the bit rate, two samples per cycle (`rx_din[1]` earlier) |
| `rx_relock`, `rx_lock_phase` | A new lock of clock recovery, and the phase the divide-by-5 counter takes |
| `rx_gtp_reset` (output) | Aligner's request to reset the receiver and lock again |
| `tx_p`, `tx_n` | Serial output pair |

The recovered clock `rxrecclk` drives the whole receive fabric: PCS read
side, aligner and decoder.

## Transmitter

- **`payload_gen`** plays a 16-entry pattern of `{is_k, byte}` characters
  in a loop. The pattern can be reprogrammed at run time through
  `prog_we/prog_addr/prog_char` and `prog_len`. The reset pattern is K28.5
  followed by the bytes 1 to 15. This sends a comma every 16 words, which
  the receiver needs to find the byte boundary.
- **`gtp_tx_pcs`** has an interface register, the 8b/10b encoder and the
  FIFO-bypass register. It takes 1 + 1 + 1 = 3 TXUSRCLK cycles.
- **`enc_8b10b`** is a registered encoder with running-disparity control:
  - EDCBA goes through the 5b/6b table and HGF through the 3b/4b table.
  - The encoder starts at RD−.
  - The alternate D.x.A7 forms are used where needed to avoid runs of five.
  - `kerr` flags a K request for a byte that is not one of the 12 control
    characters.
  - `force_disp`/`disp_in` and `disp_out` expose the disparity.
  - Output bit 9 is `a`, the first bit on the line. The group is
    `abcdei fghj`.
- **`tx_phase_align_ctrl`** waits `SETTLE_CYCLES` after PLL lock, then
  holds TXPHASE for `PHASE_CYCLES`, then reports `done`. Loss of lock starts
  it again.
- **`gtp_tx_pma`** is the parallel-in serial-out register (PISO):
  - XCLK is modelled as a modulo-10 count of the bit clock. Its starting
    value is `xclk_phase`.
  - While TXPHASE is high, the count is re-set from sampled TXUSRCLK rising
    edges. After that, XCLK loads the PISO `LOAD_OFFSET` bit clocks after
    each TXUSRCLK rise, whatever the power-up phase.
  - Data is shifted out MSB (bit `a`) first.

## Receiver deserializer (PMA-mode bit slide)

This is the core of the receiver. It has three blocks, wrapped by
`gtp_rx_pma`.

- **`rx_sipo`** is a double-data-rate shift register. It takes two bits per
  HSCLK cycle. The 10-bit parallel register captures it on the rising edge
  of `rxrecclk`.
- **`rx_clk_div_shifter`** makes `rxrecclk`:
  - HSCLK is divided by 5, because HSCLK runs at half the bit rate and a
    word is 10 bits.
  - The divided clock runs through a 5-bit shift register. Its taps are one
    HSCLK apart, which is 2 UI.
  - A modulo-10 counter Q counts RXSLIDE pulses. Q[3:1] picks the tap,
    which is re-registered on HSCLK to form `rxrecclk`. Each step of Q[3:1]
    delays the recovered clock by 2 UI, and with it the word boundary in
    the SIPO.
  - Q[0] goes to the barrel shifter.
  - `relock` clears Q and puts the divider in the phase given by
    `lock_phase`. That is how a new lock of clock recovery shows up.
- **`rx_barrel_shift`** covers the odd steps. With Q[0] = 0 it passes the
  held word (bits 9..0). With Q[0] = 1 it outputs bits 8..0 of the held
  word followed by bit 9 of the next word, which is the boundary one bit
  later. It has one recovered-clock cycle of latency either way.

Each RXSLIDE pulse therefore moves the boundary exactly one bit later. An
even total is done entirely with clock phase. An odd total leaves the barrel
shifter in use, one UI from the even alignment, with the clock in a
different phase.

## Receiver PCS and elastic buffer

`gtp_rx_pcs` passes **raw 10-bit words**. The transceiver's internal comma
aligner and decoder are switched off, because they align by shuffling data
and would bring back a variable phase.

| Stage | Cycles |
|---|---|
| Bypassed comma stage (three registers) | 3 |
| `elastic_buffer` | 5 |
| Interface registers | 2 |
| **Total** | **10** |

**`elastic_buffer`** is a dual-clock FIFO with Gray-coded pointers and
two-flop synchronizers. It fixes its own latency as follows:

- The read side stays idle until `START_LEVEL` words are in the buffer.
- From then on it reads every clock.
- The fill level is therefore the same after every reset, so the latency is
  too.

With equal clocks and `START_LEVEL = 1` the latency is 5 clocks. Overflow
and underflow are flagged and sticky. They show on `rx_buf_err`.

## Comma aligner

`comma_aligner` runs on the recovered clock and looks at the last two raw
words (20 bits).

**Search.** It looks for the 7-bit comma `0011111` / `1100000` that starts
K28.1, K28.5 and K28.7. The comma's offset s from the start of the older
word (0..9) is the number of one-bit slides needed: n = s.

**n odd.** It asserts `gtp_reset` for `RESET_CYCLES`. This resets the
receive PCS and asks clock recovery to lock again. It then waits
`LOCK_WAIT` clocks and searches again.

**n even.** It gives n RXSLIDE pulses, `SLIDE_GAP` clocks apart, so the
slide reaches the clock and the pipeline refills between pulses. It waits
`SETTLE` clocks, then raises `aligned`.

**While aligned.** If a comma shows up anywhere other than offset 0,
alignment is taken as lost. The aligner resets and starts again.

The decoder only receives words while `aligned` is high. `last_n`,
`n_odd_seen` and `n_even_seen` are monitor outputs.

Refusing odd locks costs on average about one extra lock per power-up. In
return, sliding is needed only in the even direction, so every accepted
lock ends with Q[0] = 0 and the same recovered-clock phase.

## Decoder

`dec_10b8b` decodes one group per clock, with one clock of latency:

- It looks up each sub-block against both disparity columns of the same
  tables the encoder uses. K28.y is recognised from its 6-bit part.
- It then re-encodes the result to classify it. A group that is in the code
  but has the wrong disparity raises `disp_err`. A group that is not in the
  code raises `code_err`.
- The running disparity starts at RD−. It follows every group that is in
  the code.

Outputs are the payload byte, `is_k` (IS_K), the two error flags and a
valid strobe.

## Latency budget

Latency is counted in parallel clock cycles of 10 UI.

| Section | Nominal | This RTL |
|---|---|---|
| Transmit interface + encoder + FIFO bypass | 1 + 1 + 1 | 3 (checked) |
| Transmit serial section | 2 | XCLK load 5 UI after TXUSRCLK, then the shift-out |
| Receive serial section | 1.5 | SIPO capture + barrel register |
| Comma stage (bypassed) + FIFO + interface | 3 + 5 + 2 | 3 + 5 + 2 (checked) |
| Decoder | 1 | 1 (checked) |
| **End to end** | **17.5 cycles = 175 UI** | **165 UI, identical at every power-up** |

The clocked stages account for 14 cycles (140 UI). The other 25 UI are the
serializer load offset and shift-out, the one-bit line delay in the
testbench and the deserializer registers. The serial sections of the real
transceiver are analog and not modelled cycle for cycle, so the 10 UI
difference from the nominal budget is in those parts. What matters for the
design is that the number does not change.

The nominal budget assumes a 4 ns parallel clock, which is 2.5 Gb/s with
10-bit words. The testbench uses that rate. The RTL itself has no rate.
Higher line rates (up to 11.5 Gb/s) are a matter of the transceiver and
its clocking, not of this logic.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `fl_link_top` | `PATTERN_DEPTH` | 16 | Pattern memory depth |
| `fl_link_top` | `PHASE_CYCLES` | 8192 | TXPHASE duration in TXUSRCLK cycles |
| `tx_phase_align_ctrl` | `SETTLE_CYCLES` | 64 | Wait after PLL lock |
| `gtp_tx_pma` | `LOAD_OFFSET` | 5 | XCLK load point after TXUSRCLK, in UI |
| `gtp_rx_pcs` / `elastic_buffer` | `FIFO_DEPTH` / `DEPTH` | 8 | Buffer depth |
| `gtp_rx_pcs` / `elastic_buffer` | `START_LEVEL` | 1 | Read start level, sets the 5-cycle latency |
| `comma_aligner` | `RESET_CYCLES`, `LOCK_WAIT`, `SLIDE_GAP`, `SETTLE` | 8, 32, 4, 32 | Aligner timing |

All of these are choices of this implementation, except the pipeline
depths, which follow the nominal budget above. Shared types, the K28.5
constants, the comma patterns and the 8b/10b functions are in
`serdes_pkg.sv`.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. Example with plain
Verilator 5:

```
verilator --binary --timing -y rtl -Irtl rtl/serdes_pkg.sv tb/tb_fl_link_top.sv \
          --top-module tb_fl_link_top
./obj_dir/Vtb_fl_link_top +verilator+seed+1 +verilator+rand+reset+2
```

Replace the testbench name for the unit tests. The test modules declare
their own `timeunit`, so no `--timescale` option is needed.

| Testbench | What it checks |
|---|---|
| `tb_fl_link_top` | Whole link at default parameters, six power cycles. Decoded stream against the pattern, with no code, disparity or buffer error. Latency measured with a marker byte: the same every time, and 165 UI. Same recovered-clock phase every time. Fails if any of these never happened: an odd-n reset, even-n locks with n = 0 and n > 0, barrel-shifter use, a recovered-clock phase step, an XCLK phase adjustment. |
| `tb_enc_8b10b` | Table vectors in both disparities (including A7 and K28.x). Random stream: disparity rule, run length ≤ 5, comma only at K28.1/5/7 symbol starts, `kerr`, one-clock latency. |
| `tb_dec_10b8b` | Legal table sequence, error flags, random round trip through the encoder. |
| `tb_gtp_tx_pcs`, `tb_gtp_rx_pcs` | 3-cycle and 10-cycle latencies. |
| `tb_gtp_tx_pma` | Serial bit order. Load point equal to `LOAD_OFFSET` after alignment, from any power-up phase. |
| `tb_rx_clk_div_shifter` | Period, lock phase, 2-UI step per even slide. |
| `tb_gtp_rx_pma` | Boundary moves one bit per RXSLIDE. |
| `tb_comma_aligner` | Odd and even offsets, slide counts, loss of alignment. |
| Others | Their block against an independent model. |

## Departures and limits

- **Analog and clocking parts are not built:** PLL, DLL, clock and data
  recovery, line driver and receive buffer, reference oscillators. The
  testbench models them ideally, with both ends on one time base, so there
  is no ppm offset and no jitter.
- **XCLK phase alignment** is a behavioural stand-in for the transceiver's
  hard phase-align circuit. It is a counter re-set from TXUSRCLK edges, not
  the vendor circuit. The controller's wait times are likewise not taken
  from a vendor procedure.
- **Internal comma aligner and decoder.** Only the bypass path is built for
  the transmit FIFO and for the transceiver's internal comma
  detector/aligner. Those paths are unused in the fixed-latency
  configuration.
- **Encoder controls.** The encoder has no "force code" input.
- **Roulette alternative not built.** A simpler alternative accepts only
  locks with n = 0 and resets otherwise, with no sliding. It is not built.
  The transmit and receive halves are one simplex link. A duplex link would
  use two instances. Re-transmitting on the recovered clock would need
  clock clean-up outside this logic.
- **Serial sections.** The serial-section latencies are those of this
  model, not of silicon. See the latency budget above.
