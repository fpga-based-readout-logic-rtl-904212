# ALFA Roman Pot readout logic: Alfa-R local and Alfa-M global controllers

This is the readout logic of one Roman Pot of the ATLAS ALFA luminosity monitor.
The pot holds 23 front-end modules (PMFs). Each has a 64-channel front-end chip
(Maroc) and a small local controller, **Alfa-R**. The local controller keeps every
bunch crossing's 64 hit bits until the first-level trigger has decided about that
crossing. It keeps the accepted ones until the motherboard asks for them. On the
motherboard a global controller, **Alfa-M**, collects the 23 fragments of each
accepted event over 23 one-bit serial links. It checks that they really belong to
the same event, and writes one data block per event into a buffer that feeds an
optical link. All controllers sit on one SPI bus, through which software sets the
channel masks and the front-end configuration and reads status.

Everything runs on the 40 MHz LHC clock. The design is written in synthesizable
SystemVerilog. It follows the published description of these controllers. Where
that description gives no detail (widths of a few flags, handshake edges, reset
and overflow behaviour), this RTL makes a choice, and the choice is named below.

## Data flow of one event

```
 Maroc 64b ──AND mask──┐
 BC counter[3:0] ──────┴─► pipeline (68b, 256 clk) ──L1A──► derandomizer ──► P→S ──ser_data/Data_Ready──┐
                          L1 counter[2:0] ─────────────┘   (71b x 256)            ▲ Data_Req          │
                                                                                     │                    │
 TTC: L1A, BCID[11:0], EVCNT[23:0] ──► L1 accept buffer (256) ──► packet builder ────┘   23 deserializers ◄┘
                                                                    │    ▲ 7-bit tag, 32-bit half
                                                                    │    └── 23:1 mux ─ register ─ 64:32 mux
                                                                    ▼
                                                         output link buffer (32b x 256) ──► optical link
```

1. **Masking and tagging (Alfa-R).** Each clock, the 64 front-end bits are
   AND-ed with four 16-bit mask registers, so dead or noisy channels read as 0.
   The result is joined with the 4 least significant bits of a free-running local
   bunch-crossing counter, giving a 68-bit word.
2. **Pipeline (Alfa-R).** The 68-bit word goes into a delay line of
   `PIPE_LATENCY` = 256 clocks. The word comes out in the very clock in which the
   L1 decision for its crossing arrives. It is a circular RAM whose single
   pointer is both the write and the read address.
3. **Derandomizer (Alfa-R).** On an L1 accept, the pipeline output is joined
   with the 3 LSBs of a local accept counter. The 71-bit event goes into a
   256-deep FIFO, and then the counter advances. Without an accept, the word is
   simply overwritten 256 clocks later.
4. **Request and serial transfer.** Alfa-M raises one `Data_Req` line that goes
   to all 23 Alfa-R. Each Alfa-R pops its oldest event and shifts it out MSB first:
   first the L1 tag (bits 70..68), then the BC tag (67..64), then data bits 63..0.
   `Data_Ready` is high for exactly the 71 clocks that carry valid bits. It rises
   one clock after the request is seen. Alfa-M must keep `Data_Req` high until
   `Data_Ready` has fallen. If the request falls early, Alfa-R records a
   transmission error, which is visible in its status register. The transfer
   still completes, so the link stays in step.
5. **Deserialize, check, build (Alfa-M).** Alfa-M does not wait for the data to
   write the first words of the block. While the fragments arrive, it already
   writes SOF, BCID and EVCNT into the output buffer. It drops `Data_Req` when
   every link has delivered 71 bits and dropped `Data_Ready`. If a link is
   missing, it drops the request after `DESER_TIMEOUT` = 80 clocks instead. Then
   it walks the 23 deserializers twice through the multiplexer and register:
   - **Check pass.** For each PMF it compares the L1 tag with `EVCNT[2:0]` and
     the BC tag with `BCID[3:0]`. A mismatch, or a fragment that never came, sets
     that PMF's bit in PMFERR.
   - **Copy pass.** It writes each PMF's low and high 32-bit halves.

   PARITY and EOF close the block.

The tags do not time-stamp events. They only catch a PMF that has slipped by an
accept or a crossing. For the tags to match, the local counters and the TTC
counters must start together. Here all of them are reset by the same `rst_n`.
The TTC BCID must also count crossings modulo a multiple of 16.

### Output data block (53 words for 23 PMFs)

| word | name | content |
|---|---|---|
| 1 | SOF | `0xB0F00000` |
| 2 | BCID | `{20'b0, BCID[11:0]}` |
| 3 | EVCNT | `{8'b0, EVCNT[23:0]}` |
| 4 | PMFERR | `{7'b0, PMFERR[24:0]}`, bit k-1 = PMF k failed the check |
| 5 | NPMF | `{24'b0, 23}` |
| 6, 7 | PMF1L, PMF1H | PMF 1 data bits 31..0, then 63..32 |
| ... | | PMF 2 .. PMF 23 |
| 6+2N | PARITY | XOR of words 2 .. 5+2N (every word before it except SOF) |
| 7+2N | EOF | `0xE0F00000` |

A PMF that never answered contributes zero data, and its PMFERR bit is set.
The builder waits whenever the output buffer is full. Block order and content are
unaffected, and the serial links simply wait for the next request.

## Timing and rates

- Serial transfer: 1 clock of request latency, then 71 bits, so 72 clocks.
  That is about 1.8 µs.
- Alfa-M per event: 1 (pop) + ≤80 (deserialization, header written meanwhile)
  + 46 (check, 2 clocks per PMF) + 2 (PMFERR, NPMF) + 69 (copy, 3 clocks per PMF)
  + 2 (PARITY, EOF). That is about 200 clocks, or 5 µs, with a free output link.
- At a 100 kHz mean L1 rate, accepts come every 400 clocks on average, so the
  chain runs at about half load. Bursts of accepts wait in the 256-slot
  derandomizers and in the 256-slot L1 accept buffer, which stay in step because
  they see the same accepts.
- The output buffer (256 x 32 bit) holds 4 whole blocks of 1696 bits.

## SPI register access

A frame is 32 bits, sent MSB first on `cmd_in` while `cmd_sel_n` is low, with one
`cmd_clk` strobe per bit:

| bits | 31..27 | 26 | 25..20 | 19..16 | 15..0 |
|---|---|---|---|---|---|
| field | ADDR (0 = Alfa-M, 1..25 = PMF, 31 = all PMFs) | R/W (1 = write) | OFFSET | unused | DATA |

- **Writes** carry all 32 bits. The write takes effect after the 32nd strobe.
- **Reads** carry only bits 31..16 on `cmd_in`. The addressed client then drives
  `cmd_out` with the register value, MSB first, for strobes 15..0.
- **Sampling.** A client takes `cmd_in` on the rising `cmd_clk` edge and changes
  `cmd_out` after the falling edge.
- **Bus speed.** The bus is sampled by the 40 MHz clock, so each `cmd_clk` phase
  must last at least 3 clock periods (75 ns). The ELMB's SPI is far slower than
  that.
- **Broadcasts.** A broadcast write reaches every Alfa-R but not Alfa-M.
  Broadcast reads are not answered.
- **Short frames.** A frame cut short before 32 strobes has no effect.

### Alfa-R registers (16 bit)

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CONTROL | W | 15 TEST_MODE, 14 GAIN_ENABLE, 13 DAC_ENABLE, 12 MUX_CLOCK (write 1 = step) |
| 0x01 | STATUS | R | 15 TEST_MODE, 14 GAIN_ENABLE, 13 DAC_ENABLE, 12 MUX_HOLD, 11 reserved, 10..5 MUX_CNT, 0 TX_ERROR |
| 0x02..0x05 | MASK1..4 | RW | channel enables, MASK1 = channels 15..0 … MASK4 = 63..48, reset all 1 |
| 0x06 | STREAM | RW | 5 RST_GAIN, 4 D_GAIN, 3 CLK_GAIN, 2 RST_DAC, 1 D_DAC, 0 CLK_DAC |

- **STREAM register.** The STREAM bits drive the Maroc GAIN and DAC serial ports
  directly. Software produces a serial waveform by writing one vector per time
  slice. For example, writing 100, 000, 110, 111 to bits 5..3 produces the first
  four slices of a gain-port reset-and-load sequence.
- **Disabled ports.** A port whose enable flag is 0 holds all three of its lines
  high.
- **Charge multiplexer.** Each write of CONTROL with bit 12 set steps the 6-bit
  charge-multiplexer counter and gives a one-clock pulse on `cfg.mux_clk`.
  MUX_HOLD is 1 after reset. It falls on the first step and rises again on the
  64th step, when the counter wraps.
- **CONTROL writes.** A write to CONTROL always rewrites the three flags as well,
  so software writes them together with MUX_CLOCK.

### Alfa-M registers

| offset | name | access | content |
|---|---|---|---|
| 0x00 | CONTROL | W | 15 TEST_MODE |
| 0x01 | STATUS | R | 15 TEST_MODE, 14 GOL_READY, 13 TTC_READY, 12 QPLL_ERROR, 11 QPLL_LOCK |

Bits 14..11 are the live levels of the optical-link serializer, TTC receiver and
QPLL status lines. `gol_ready` also serves as the "link free" signal. The output
buffer hands one word to the link in each clock where `link_valid` and
`gol_ready` are both high.

## Choices made where the description is silent or inconsistent

- **Tag widths.** The BC tag is 4 bits, the L1 tag is 3 bits, and the pipeline
  is 68 bits wide. The block diagram and the serial timing diagram agree on
  this. The prose instead mentions 3 BC bits, 4 L1 bits and a 67-bit pipeline.
  Both add up to the same 71-bit event.
- **Control and status layout.** The control and status layouts come from the
  bit descriptions: "enables …" and "writing 1 steps …" describe control bits,
  while the HOLD flag and counter value are status. The two register tables are
  labelled the other way round.
- **Status bit positions.** TX_ERROR sits at Alfa-R STATUS bit 0. Its position
  was not given.
- **Masks.** The masks reset to all ones, so every channel is enabled after
  reset.
- **Overflow.** An accept that finds a full derandomizer or a full L1 accept
  buffer is lost. The event counts then disagree and later PMFERR bits show it.
  Assertions in `alfa_r` and `alfa_m` report such an overflow in simulation.
- **Test mode.** TEST_MODE is stored and reported in both controllers. No test
  vectors are generated, because their content is not specified.
- **Configuration lines.** The Alfa-R configuration output has 8 lines: six
  STREAM lines, the multiplexer HOLD and the multiplexer clock. The block
  diagram counts 9 configuration lines but does not name them.
- **Timeout and PMFERR.** The deserialization timeout is 80 clocks (parameter
  `DESER_TIMEOUT`). PMFERR is written after the check, so the words prepared
  during deserialization are SOF, BCID and EVCNT.
- **Shared SPI line.** The shared `cmd_out` line is modelled as the OR of every
  client's output gated by its enable.
- **Reset.** A single asynchronous active-low reset is used everywhere.

Not built, because they are external parts:
- the Maroc front-end chip;
- the ELMB CAN-to-SPI card (the testbenches contain an SPI master model);
- the TTC receiver;
- the QPLL;
- the GOL optical serializer;
- the test-vector generator.

## Files

`rtl/`:

- `alfa_pkg.sv`: widths, register offsets and bit positions, SOF/EOF, and the
  `event_word_t`, `l1a_entry_t` and `maroc_cfg_t` types.
- `alfa_readout_top.sv`: 23 × `alfa_r` plus one `alfa_m`, the shared SPI line,
  broadcast L1 accept and `Data_Req`.
- `alfa_r.sv`: local controller, made of:
  - `pipeline_buffer.sv`;
  - `sync_fifo.sv` (used as the derandomizer);
  - `alfa_r_serializer.sv`;
  - `spi_client.sv`;
  - `alfa_r_regs.sv`.
- `alfa_m.sv`: global controller, made of:
  - `sync_fifo.sv`, used twice (as the L1 accept buffer and as the output link
    buffer);
  - `alfa_m_deserializer.sv` (×23);
  - `alfa_m_word_select.sv` (multiplexer, register, 64→32 multiplexer);
  - `alfa_m_builder.sv` (controller engine and packet builder);
  - `spi_client.sv`;
  - `alfa_m_regs.sv`.

The top's parameters are `N_PMF` (23), `PIPE_LATENCY` (256), `DERAND_DEPTH`
(256), `L1A_DEPTH` (256), `OUT_DEPTH` (256) and `DESER_TIMEOUT` (80). FIFO depths
must be powers of two. `N_PMF` may be at most 25.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. Shared testbench pieces:

- `spi_master_bfm.sv`: an SPI master interface with `write_reg` and `read_reg`
  tasks.
- `alfa_tb_pkg.sv`: an independent model of the output block and a
  deterministic front-end data pattern.

`tb_alfa_readout_top` runs the complete system at the default sizes, in about
10 000 clocks:

- It configures masks and front-end lines over SPI.
- It triggers 14 events: single, back-to-back, and a burst of 8 while the
  optical link is blocked, so that the output buffer fills and the builder
  stalls.
- The TTC model sends one wrong BCID, so one event is checked for all 23 PMFERR
  bits.
- It compares all 742 output words with the model.

`tb_alfa_readout_rate` runs the complete system under the nominal trigger load.
It sends 300 accepts with random spacing of mean 400 clocks (100 kHz), checks
every output word, and reports the backlog and the readout latency. In that
run, the deepest backlog was 5 events. The longest time from an accept to the
EOF word of its block was 943 clocks (about 24 µs), and the mean was about 300
clocks.

The timeout and `Data_Req` violation paths cannot occur in a healthy system.
They are exercised in `tb_alfa_m`, `tb_alfa_m_builder` and
`tb_alfa_r_serializer` / `tb_alfa_r` instead.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/alfa_pkg.sv tb/alfa_tb_pkg.sv \
  tb/tb_alfa_readout_top.sv --top-module tb_alfa_readout_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Every testbench runs in a few
seconds. For synthesis, read `rtl/alfa_pkg.sv` first and then the rest of
`rtl/`. The pipelines and FIFOs are plain arrays, so they map to block or
distributed RAM.
