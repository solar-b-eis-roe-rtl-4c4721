# EIS read-out electronics: digital board

This is synthesizable SystemVerilog for the digital board of the read-out
electronics (ROE) of the EUV Imaging Spectrometer camera. The camera has two
CCDs, and each CCD has two output nodes. The board sits between the
instrument control unit (ICU) and the CCD camera head. It has four jobs:

- It accepts commands from the ICU over a 9600 baud serial link and answers
  on a second 9600 baud status link.
- It generates every CCD clock and every analogue-chain timing signal from a
  small micro-programmed engine, the **clock sequence generator (CSG)**. The
  CSG runs programs that the ICU loads into two RAMs.
- It writes the analogue board's bias and control registers, and reads the
  power-supply housekeeping ADC, over a back-plane bus.
- It sends the digitised pixels to the ICU over a 32 Mbit/s data-strobe
  serial link.

After power-on, the board does not wait for the ICU. It runs a built-in
**default mode**, so the camera can still take images if the command link is
dead. Default mode replays a command stream from a PROM, then repeats this
cycle for ever: flush the CCDs, integrate for 8 s, read out a 1024 x 512
frame, wait 12 ms, and read the frame out again. The cycle ends when the ICU
sends *Exit default*.

The code targets IEEE 1800-2017. It builds with Verilator 5 and with
slang-based tools.

## Structure

```
 cmd_rx ─► uart_rx ─┐                           ┌─► ae_bus_if ──► back-plane A/D/WR_EN/RD_EN
                    ├─► cmd_interpreter ────────┼─► hk_adc_if ──► HK_MUX_SEL/HK_CONV_START_N/...
 default_prom ─► default_mode_ctrl ─┘   │  │    └─► status_link ─► status_tx
        (replay, flush/integrate/readout)  │           ▲
                                           ▼           │ end-of-sequence (0x0C)
                        csg_ram (2 x 128K x 12, ECC) ◄─┤
                                           ▲           │
                                           └── csg (csg_sequencer + csg_output_demux)
                                                 ├─► ccd (row/line clocks, both CCDs, both sides)
                                                 ├─► CONVST_N, CLAMP_N, ISOLATE, STIM_R/L, EOS, ...
                                                 └─► charge_pump_sel ─► chrg_pump
 adc_valid/adc_data ─► science_link_tx ─► sci_data / sci_strobe
 por_n ─► reset_gen ─► sys_reset_n (whole board and back-plane)
```

| Module | Role |
|---|---|
| `roe_top` | The board. Its ports are the logic-level sides of the line drivers and receivers. |
| `roe_pkg` | Command and status codes, command lengths, CSG opcodes, pattern bit positions, the control-register reset value, the Hamming(12,8) functions. |
| `reset_gen` | Power-on reset and the *Reset* command combined into one synchronously released reset. |
| `uart_rx`, `uart_tx` | 8N1 serial receiver and transmitter (divisor = `CLK_HZ/BAUD`, 3333 at 32 MHz). |
| `status_link` | Queue of two-byte status messages. Each message goes out as two back-to-back bytes. |
| `cmd_interpreter` | Command parser and executor, including default-mode gating, bad-header NACK and time-out NACK. |
| `default_prom`, `default_mode_ctrl` | Default-mode command image and the flush / integrate / readout / gap sequencer. |
| `csg_ram` | Program and pattern RAMs with check bits, single-error correction, write-back and the SEU counter. |
| `csg_sequencer` | The micro-program engine. |
| `csg_output_demux` | Steers the pattern bits onto the clock lines of each CCD side. |
| `csg` | The sequencer, the de-multiplexers and the end-of-sequence report. |
| `charge_pump_sel` | Drives the -10 V charge pump from the CSG or from a 500 kHz oscillator. |
| `ae_bus_if` | Analogue-board register write and read cycles. |
| `hk_adc_if` | Housekeeping ADC conversion and read. |
| `science_link_tx` | Data-strobe transmitter for the science link. |

## The clock sequence generator

The CSG is the hardest part of the board, and it is where most of the
flexibility of the camera lives.

### Memory

There are two banks of 128K bytes:

- The *program* bank mostly holds opcodes.
- The *pattern* bank mostly holds output patterns.

Both banks split into 64 blocks of 2K, and each block is one sequence. The
byte address is `{block[5:0], page[4:0], offset[5:0]}`. The ICU writes a
64-byte page with one *Set up CSG* command. The RAM selector is bit 7 of the
block byte: 0 selects the program bank, 1 the pattern bank.

Each byte is stored with four Hamming check bits as a 12-bit word, with the
check bits at code positions 1, 2, 4 and 8. Every read is corrected. When the
sequencer fetches a word with a single-bit error:

1. The RAM signals `seq_err`.
2. The corrected word is written back on the next cycle.
3. The sequencer inserts one idle 125 ns slot.
4. The 8-bit, saturating SEU counter counts up.

The ICU reads the SEU counter as analogue parameter 7 (*Dump AE* 0x49 with
byte 2 = 7). The code corrects single errors only. A double error is
"corrected" into a wrong value and is not flagged. Four check bits per byte
cannot both correct single errors and reliably detect double errors.

### Instructions and timing

Each instruction is one program byte (bits 15..8) and one pattern byte
(bits 7..0) taken from the same address. Bits 15..11 are the opcode.

- An instruction takes four 32 MHz clocks: fetch, latch, decode, execute.
  That gives 125 ns per output update.
- An instruction that updates the outputs dwells a further `4 * n` clocks,
  where `n` is bits 9..0 of the dwell register. It therefore lasts
  `(n+1) * 125 ns`, and the new pattern appears at the end of that time.

| Opcode bits 15..11 | Instruction | Effect |
|---|---|---|
| `00000` | HALT p | Outputs p, then stops. A new START restarts it. |
| `00001`..`00101` | CTRLREG0..4 d | Loads 11 bits of the 55-bit de-multiplexer control register. |
| `00110` | LDWL d | Bit 10 selects the group updated by the following instructions (0 = row, 1 = line). Bits 9..0 set the dwell. |
| `01010`, `01011` | LDSIG0J, LDSIG1J | Jump register n = address of the next instruction. |
| `10nn` + 12 bits | LOADn c | Loop counter n = c (1..4095). Return register n = next address. |
| `110nn` | DJNZn p | Outputs p. Decrements counter n. Jumps to return register n unless the count reached zero. A count of 1 runs the loop once. |
| `1110n` | JBOSn p | Outputs p. Jumps to jump register n, unless signal n has arrived since the last JBOSn. In that case it clears the signal and falls through. |
| `11111` | NOP p | Outputs p. |

The other codes are spare. They execute as a no-operation without output.

The usual way to end an endless program is a JBOS loop:

1. An LDSIGnJ marks the top of the loop.
2. The loop runs until the ICU sends *CSG Sig* (0x48).
3. The program then falls out of the loop into its ending.

### Pattern groups

There are two 11-bit pattern registers. Every output bit is written as the
level its pin needs, so the active-low clocks hold 0 when active.

| Bit | Row (pixel) group | Line group |
|---|---|---|
| 0 | R phi 1 | I phi 1 |
| 1 | R phi 2 | I phi 2 |
| 2 | R phi 3 | I phi 3 |
| 3 | reset gate | dump gate |
| 4 | summing well | shutdown (science ADCs off) |
| 5 | ISOLATE | EOS (end of frame on the science link) |
| 6 | CONVST_N | end of readout |
| 7 | CLAMP_N | end of flush |
| 8 | STIM_R | +15 V line clocks on |
| 9 | STIM_L | charge pump under CSG control |
| 10 | CHRG_SYNC | spare |

When the *end of flush* or *end of readout* bit rises, the board sends the
status message `0x0C <block>`.

When *charge pump under CSG control* is 1, the -10 V pump follows CHRG_SYNC.
When it is 0, a free-running 500 kHz divider (half period 32 clocks) drives
the pump.

Reset values:

- Row pattern: 0x0DF.
- Line pattern: 0x00F.

Both leave every clock inactive and the analogue switches idle.

### Output de-multiplexers

Both CCDs run from the same two pattern registers, so the 55-bit control
register holds a two-bit selector for each physical clock line:

| Selector | Output |
|---|---|
| `00` | 0 |
| `01` | first source |
| `10` | second source |
| `11` | 1 |

For the serial clocks R phi 1 and R phi 2 of each side of each CCD, the two
sources are row bits R phi 1 and R phi 2. Choosing between them reverses the
direction in which that half of the serial register shifts. The other lines
(R phi 3, reset, summing well, the three image phases and the dump gate) have
one selector per CCD, and both of its sources are the same pattern bit.

Control register bit map:

| Bits | Selectors |
|---|---|
| 1..0, 3..2, 5..4, 7..6 | R phi 1: A right, A left, B right, B left |
| 15..8 | R phi 2, same order |
| 19..16 | R phi 3 (A, B) |
| 23..20 | reset |
| 27..24 | summing well |
| 32..28 | spare |
| 34..33 up to 48..47 | I phi 1, I phi 2, I phi 3, dump gate (A then B) |

After reset every selector is `01`, except R phi 2, which is `10`. The reset
value is `55'h0000_AAAA_0555_AA55`.

## Commands and status

| ID | Length | Command | Reply |
|---|---|---|---|
| 0x40 | 1 | Reset: the whole board, including the back-plane, returns to default mode | none |
| 0x41 | 1 | Exit default mode | 03 00 |
| 0x42 | 2 | Start CSG at block b | 03 00 |
| 0x43 | 4 | Dump CSG byte (block/bank, page, offset) | 30 data |
| 0x44 | 5 | Write one CSG byte (block/bank, page, offset, data) | 03 00 |
| 0x45 | 9 | Set up analogue board: bytes 2..8 go to registers 0..6 | 03 00 |
| 0x46 | 67 | Set up CSG: block/bank, page, 64 data bytes | 03 00 |
| 0x47 | 2 | HK request, channel c | C0 data |
| 0x48 | 2 | CSG signal 0 or 1 | 03 00 |
| 0x49 | 2 | Dump analogue parameter p (7 = SEU counter) | C0 data |

An unknown first byte gets `03 01`. If a command stops arriving for 250 ms,
it is dropped with `03 FF`.

In default mode, *Exit default* is the only ICU command the board obeys. Any
other ICU command is read to its full length and then ignored, with no reply.
Commands from the PROM are always executed and never answered.

## Default mode

The PROM image (`rtl/default_prom.hex`, 2021 bytes in a 2048-byte PROM) has this layout:

1. A two-byte big-endian byte count.
2. The command stream: one *Set up AE* command, then *Set up CSG* commands.

The default image holds:

- Analogue set-up: bytes 0x88, 0x88, 0x88, 0x3C, 0x0F, 0, 0.
- Block 0: a flush program. It runs 1024 line-clock cycles of 6 steps each,
  with a 4 us dwell and the dump gate open, then raises *end of flush*.
- Block 1: a readout program. Each of 512 lines has 6 line-clock steps of
  2 us. After them come 50 discarded pixels and 1024 converted pixels. Each
  pixel is 16 row updates of 125 ns (2 us), with reset, clamp, three serial
  phases, summing well and one CONVST_N pulse. At the end the program raises
  *end of readout* and EOS.
- Block 6: the stimulus pattern, described in the next section.

The controller (`default_mode_ctrl`):

- feeds the image into the interpreter through the same byte port the
  command UART uses;
- then starts block 0 and waits for HALT;
- waits `INTEG_CYC` (8 s);
- starts block 1, waits for HALT, waits `GAP_CYC` (12 ms), and starts block 1
  again;
- repeats the cycle.

*Exit default* stops further starts. A sequence that is already running
completes. The clock waveforms inside the two programs are an example set
chosen for this RTL; the real values depend on the CCDs.

Each instruction is one program byte and one pattern byte. The image encodes
each program as one *Set up CSG* command per bank and page: `0x46,
{bank, block}, page`, then 64 bytes, padded with zeros.

## Stimulus pattern (block 6)

Block 6 holds a test pattern. It reads out the CCDs as a normal 512-line frame
of 1024 pixels per output, and it raises STIM_L and STIM_R for the whole 2 us
of every "light" pixel. The analogue chains then add a signal to those
pixels. The same timing drives both sides, and each side is read from its own
end. So the image looks like a 2048 x 512 pair of CCDs, with the pattern
mirrored about each CCD's centre. It is best run with the shutter closed.

| Lines | Content |
|---|---|
| 0..242 | stripes |
| 243..257 | dark |
| 258..506 | stripes |
| 507..511 | light |

A stripe line is a series of runs, alternating dark and light and starting
dark. There are four runs of 1 pixel, then four runs each of 2, 4, 8, 16, 32,
64 and 128 pixels, then four more runs of 1 pixel. That totals 1024 pixels.

The program uses the loop counters as follows:

- Counter 0 counts lines.
- Counter 1 counts the discarded pixels and the dark runs.
- Counter 3 counts the light runs.
- Counter 2 repeats each dark/light pair twice.

The DJNZ of counter 2 adds one 125 ns update between pairs. The program is
796 instructions long. The ICU runs it with *Start CSG* 6.

## Science link

A pixel group is four 14-bit words, one per CCD side. Each word becomes a
16-bit character `{ccd, node, data}`, sent MSB first. The order is:

1. CCD A left
2. CCD A right
3. CCD B left
4. CCD B right

The link runs one bit per clock (32 Mbit/s), so a group takes exactly the 2 us
of a pixel. The coding is data-strobe: the strobe toggles whenever a bit
equals the previous one, so data XOR strobe changes once per bit.

The transmitter buffers one group. A group that arrives while the buffer is
full, or during a Period of Silence, is dropped and flagged on `overflow`.

A rising edge of the EOS pattern bit queues the 8-bit end-of-frame character
0xCC. After it, the link holds still for the sending Period of Silence
(`TX_POS_CYC`, 10 ms) and then forces data and strobe to 0. The receiver's
Period of Silence is 9.9 ms in this design. That is shorter than 10 ms, so
the transmitter never times out before the receiver.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `roe_top` | `CLK_HZ` | 32,000,000 | system clock |
| `roe_top` | `BAUD` | 9600 | command and status links |
| `roe_top` | `TIMEOUT_CYC` | 8,000,000 | 250 ms command time-out |
| `roe_top` | `INTEG_CYC` | 256,000,000 | 8 s default integration |
| `roe_top` | `GAP_CYC` | 384,000 | 12 ms gap between readouts |
| `roe_top` | `TX_POS_CYC` | 320,000 | 10 ms sending Period of Silence |
| `roe_top` | `HK_SETTLE` | 320 | 10 us HK multiplexer settling |
| `roe_top` | `PROM_DEPTH`, `PROM_FILE` | 2048, `rtl/default_prom.hex` | default-mode image |
| `csg_ram` | `ADDR_W` | 17 | 128K per bank |
| `ae_bus_if` | `SETUP`, `PULSE` | 2, 4 | back-plane address set-up and strobe width, in clocks |
| `hk_adc_if` | `PULSE`, `WAIT_MAX` | 4, 32000 | convert pulse width; limit for HK_DATA_RDY |
| `reset_gen` | `HOLD` | 16 | reset release delay |

## Where this design makes its own choices

The command codes, lengths and field layouts follow the original board
design. So do the status codes, the link rates and framing, the CSG memory
organisation, instruction set, timing, pattern bits and de-multiplexer
coding, the control-register reset value, the default-mode cycle and the
science-link protocol.

These points are this design's own:

- **Bank and encoding choices.** RAM-selector polarity (bit 7 = 1 is the
  pattern bank). The Hamming bit layout. The SEU counter is 8 bits and
  readable as analogue parameter 7.
- **Default-mode command handling.** ICU commands other than *Exit default*
  are ignored silently in default mode, and PROM commands get no replies.
- **Reset values.** The pattern registers reset to 0x0DF and 0x00F.
- **Sequencer details.** Spare opcodes behave as NOP without output. A START
  during a running sequence restarts at the new block.
- **Default-mode timing.** The gap is measured from the end of the first
  readout. The flush and readout clock waveforms and the analogue set-up
  values are examples. In the stimulus program, the stim signals are active
  high and span whole pixels.
- **Back-plane timing.** Analogue register write and read cycles: 2 clocks of
  address set-up and a 4-clock WR_EN or RD_EN. HK ADC: multiplexer select,
  10 us settling, a 4-clock convert pulse, wait for HK_DATA_RDY, then read
  the byte on D with HK_OE_N. HK_SHUT_DOWN_N holds the ADC in nap between
  requests.
- **Status link.** The queue holds 4 messages, and end-of-sequence messages
  go ahead of command replies.
- **Science link transmitter.** It is part of this top level so the science
  path is complete. On the flight hardware it lives on the analogue board.
  The ADC words enter on `adc_valid`/`adc_data`.
- **Unreported flags.** Some flags are not reported, because no status
  message carries them: UART framing and overrun errors, science-link
  overflow, and the busy flags of the back-plane engines.

## Not included

- **Line drivers and receivers.** The RS422 and LVDS parts are outside this
  RTL. The top's ports carry their logic-level signals.
- **CCD clock drivers.** The 13.5 V drivers are outside this RTL. `ccd`
  brings out the logic-level clocks.
- **Reset and clock hardware.** The power-on reset circuit, the 32 MHz
  oscillator and the -10 V charge pump itself are outside this RTL.
- **Double-error detection.** See *Memory*.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The helpers are:

- `tb/uart_mon.sv`: serial decoder.
- `tb/sci_link_rx.sv`: science-link receiver model.
- `tb/prom_small.hex`: a small default image with 4 flush lines and 3 lines
  x 5 pixels with 2 discarded pixels.

**`tb_roe_top`** runs the whole board with a 2 Mbaud link and short times.
It covers:

- the default-mode cycle, with the integration and gap lengths measured;
- ICU commands ignored in default mode;
- *Exit default*, the bad-header and time-out NACKs;
- HK and analogue-register access;
- CSG programming, dump and window write;
- a JBOS loop broken by *CSG Sig*, with the charge pump following CHRG_SYNC;
- a readout after flipping one bit in each RAM: it checks correction,
  write-back and the SEU counter;
- a science-link overflow;
- the *Reset* command.

It checks every science character against the ADC model's words. It counts
each of these mechanisms and fails if any of them never happened.

**`tb_roe_full`** uses the default parameters. It runs the real default
image from power-on:

- the 1024-line flush;
- the full 8 s integration;
- one 1024 x 512 readout, which checks all 2,097,152 characters, the 2 us
  pixel period and the readout time;
- *Exit default* at 9600 baud.

This is about 292 million clocks. It takes about 5 minutes in Verilator.

**`tb_roe_stim`** also uses the default parameters. It leaves default mode
after the power-on flush and runs block 6. At every conversion it compares
STIM_L and STIM_R with the stripe image. It counts the light and dark science
characters of the whole 512 x 1024 x 4 frame.

To run a testbench:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/roe_pkg.sv \
    tb/tb_roe_top.sv --top-module tb_roe_top -o sim
./obj_dir/sim
```

Run it from the directory that holds `rtl/` and `tb/`, because the PROM
images are read by relative paths.
