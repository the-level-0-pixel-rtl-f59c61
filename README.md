# Level 0 Pixel Trigger for the ALICE Silicon Pixel Detector (SystemVerilog RTL)

The ALICE Silicon Pixel Detector has 1200 readout chips. Each chip has a
*Fast-OR* output that says whether any of its 8192 pixels was hit in the
last 100 ns. The detector already sends these bits off the detector
alongside its normal data. Each of the 120 half staves (40 in the inner
layer, 80 in the outer) uses one 800 Mb/s G-Link optical fibre, and its 10
Fast-OR bits ride in one G-Link *control word* every 100 ns. The Pixel
Trigger taps these fibres through a passive optical splitter. It pulls out
the 1200 bits, applies a programmable function (multiplicity, layer
coincidence and so on), and drives one input of the Level 0 Central Trigger
Processor (CTP).

The system's hardest limit is latency. The whole chain from collision to CTP
input must fit in 800 ns. The detector electronics use 400 ns and the fibres
150 ns, so 250 ns remain for deserializing, extracting and deciding. The
deserializer chip takes about 88 ns of that. This RTL goes from deserializer
output to CTP input in **7 clocks of 80.16 MHz (87.3 ns)**, about 175 ns in
all.

## System structure

```
 120 fibres ─► 10 OPTIN boards (12 G-Link receiver chips each)
                 optin_fpga ×10 ── 64 DDR lines each (640 total) ──► BRAIN board
                                                                     brain_fpga ──► ctp_l0
               ctrl_fpga (on the BRAIN) ── local bus ──► registers of all 12 FPGAs
                         ├── firmware SRAM
                         └── JTAG ──► PROM of the processing FPGA
```

| Module | What it is |
|---|---|
| `pixel_trigger_top` | The whole system: 10 `optin_fpga`, one `brain_fpga` and one `ctrl_fpga`, plus the local-bus response OR. |
| `optin_fpga` | FPGA of one OPTIN board. It holds 12 `fastor_chan_rx`, one `frame_align` and one `ddr_bus_tx`, plus its registers. |
| `fastor_chan_rx` | For one link: takes the Fast-OR payload out of the G-Link control words and counts errors. |
| `frame_align` | Gathers the parts of one 100 ns frame that arrive at different times. Used on the OPTIN boards (12 links) and in the BRAIN (10 boards). |
| `ddr_bus_tx`, `ddr_bus_rx` | Double-data-rate output and input registers for the 64-line bus between boards. |
| `brain_fpga` | Processing FPGA. It holds 10 `ddr_bus_rx`, a parity check, one `frame_align`, one `trigger_proc`, the CTP pulse logic and its registers. |
| `trigger_proc` | Level 0 decision from the 1200 bits. |
| `ctrl_fpga` | Slow control. It turns link command words into register accesses, SRAM writes and JTAG operations. |
| `jtag_player` | Walks the JTAG TAP and shifts instructions, or bitstream data from the SRAM. |
| `ptrig_pkg` | Constants, the G-Link word struct, local-bus structs and frame bit positions. |

Parts that are not logic are not modelled in `rtl/`, and their signals are
ports of the top:
- the optical receivers and the passive splitter;
- the HDMP-1034 deserializer chips (their parallel outputs are inputs of the top);
- the SRAM and the flash PROM;
- the data-link interface card (replaced by a plain command-word port);
- the CTP.

## Clocking

There is one system clock, `clk`, at 80.16 MHz. That is twice the LHC bunch
clock, so one 100 ns frame is 8 clocks. `clk90` is the same clock delayed by
a quarter period. It is used only in `ddr_bus_rx`, to sample each half of a
DDR bit time in its middle. In an FPGA both clocks come from a clock manager.

G-Link words arrive at 40 MHz, one every 2 clocks. The design assumes the
receiver outputs have already been brought into the `clk` domain, with a
one-cycle strobe per word (`rx_stb`). The resynchronisation of the 120
recovered clocks is not part of this RTL.

## The data path, clock by clock

A control word that completes a frame, strobed in clock *t*, moves as
follows:

| clock | where |
|---|---|
| t | word on `rx_word[j]`, `rx_stb[j]` high |
| t+1 | `fastor_chan_rx` has latched the 10 bits, `fo_new` pulses |
| t+2 | OPTIN `frame_align` releases the frame (`rel`) |
| t+3 | frame on the 64 OPTIN lines: bits 0–63 while `clk` is high, bits 64–127 while it is low |
| t+4 | `ddr_bus_rx` output in the BRAIN |
| t+5 | BRAIN `frame_align` releases the 1200-bit frame |
| t+6 | counts, sum and threshold compare in one combinational path; decision registered |
| t+7 | `ctp_l0` high for 2 clocks (one 25 ns bunch crossing) |

### Board frame format (128 bits per clock on 64 lines)

| bits | content |
|---|---|
| 0–119 | Fast-OR bits. Link *j* of the board (0–11), chip *i* (0–9) is bit `10*j+i`. |
| 120 | frame valid. It is set in only one clock per frame. |
| 121 | even parity of bits 0–119 |
| 122 | the frame was released by timeout; missing links read as zeros |
| 123–127 | zero |

Across the system, the Fast-OR bit of chip *i* on global link *L* is bit
`10*L+i` of the 1200-bit vector. Global link *L* is channel `L % 12` of
board `L / 12`.

### Frame alignment and the timeout

The links have different phases. The boards can also deliver at different
times. `frame_align` does not wait for a fixed slot. It releases the frame
one clock after the **last** enabled source has delivered, so the latency
follows the slowest link and nothing else.

A source takes part if it is enabled:
- on an OPTIN board: its bit in the link mask register is set and its receiver reports lock;
- in the BRAIN: its bit in the board mask is set.

If an enabled source has not delivered within `TIMEOUT` = 6 clocks of the
first arrival, the frame is released anyway. Its `missing` bits are zeroed
and the timeout is counted. The two levels of timeout nest. A board that
times out delivers at most 10 clocks after its first link. The BRAIN waits 6
clocks after its first board, and that board arrives no earlier than 4
clocks after its last link. So a single silent link costs one board timeout
and does not also cause a BRAIN timeout, as long as that board's first link
arrives no later than the last link of the earliest board. This holds when
all links share one phase window. A frame decided this way reaches the CTP
after 13 clocks, not 7 (162 ns, 250 ns with the deserializer), which uses up
the whole latency budget. Treat the timeout
as a fault mode.

### Trigger algorithms (`trigger_proc`)

The `algo` field of BRAIN register 0x001 selects the function:

| `algo` | output is 1 when |
|---|---|
| 0 | at least one Fast-OR bit is set (minimum bias) |
| 1 | total count ≥ `th_lo` (multiplicity) |
| 2 | inner count ≥ `th_in` **and** outer count ≥ `th_out` (layer coincidence) |
| 3 | `th_lo` ≤ total ≤ `th_hi` (centrality window) |

Links 0–39 are taken as the inner layer. A new algorithm beyond these four is
meant to be loaded as new firmware of the processing FPGA, which the control
path below supports.

## Control path

### Local bus

`ctrl_fpga` is the only master of the local bus. A request (`lbus_req_t`:
`we`, `re`, 16-bit `addr`, 32-bit `wdata`) lasts one clock. The addressed
device answers in the next clock with `ack` and `rdata`, and all others drive
zero, so the top ORs the responses. `addr[15:12]` selects the device: 0–9 are
the OPTIN boards, 10 is the BRAIN, 11 is the control FPGA itself. `addr[11:0]`
is the register word address. The control FPGA answers reads of its own
registers without a bus cycle: 0x000 ID, 0x001 {JTAG busy [24], SRAM
pointer}, 0x002 last 32 TDO bits, 0x003 command headers received.

OPTIN registers:

| address | register |
|---|---|
| 0x000 | ID |
| 0x001 | link enable mask [11:0] |
| 0x002 | link lock status |
| 0x003 | frames sent |
| 0x004 | timeouts |
| 0x010+ch | {error words, good control words} of channel ch |
| 0x020+ch | frame-spacing errors of channel ch |

BRAIN registers:

| address | register |
|---|---|
| 0x000 | ID |
| 0x001 | `algo` [1:0], board mask [25:16] |
| 0x002 | `th_lo` |
| 0x003 | `th_hi` |
| 0x004 | `th_in` |
| 0x005 | `th_out` |
| 0x006 | triggers sent |
| 0x007 | frames decided |
| 0x008 | last multiplicity |
| 0x009 | parity errors |
| 0x00A | timeouts |

### Command words (`ctrl_fpga`)

Commands arrive as 32-bit words with valid/ready. A header word is
`{op[31:28], len[27:16], addr[15:0]}`:

| op | command | data words | action |
|---|---|---|---|
| 1 | REG_WR | `len` | written to `addr`, `addr+1`, … |
| 2 | REG_RD | — | `len` response words; 0xFFFFFFFF if no device acknowledges within 15 clocks |
| 3 | SRAM_PTR | 1 | sets the SRAM word pointer |
| 4 | SRAM_WR | `len` | stored from the pointer on |
| 5 | JTAG_RST | — | TAP reset, then Run-Test/Idle |
| 6 | JTAG_IR | — | shifts instruction `addr[7:0]` |
| 7 | JTAG_DR | 1 (bit count) | shifts that many bits from the SRAM, starting at the pointer, LSB first |
| 8 | RUNTEST | 1 (clock count) | that many TCK cycles in Run-Test/Idle |
| 9 | STATUS | — | one response word: the last 32 TDO bits |

Reprogramming the processing FPGA takes five steps:
1. Download the bitstream with SRAM_PTR and SRAM_WR.
2. Send the PROM's program instructions with JTAG_IR.
3. Shift the data with JTAG_DR and insert waits with RUNTEST.
4. Send the FPGA's configuration instruction with JTAG_IR.
5. Check an IDCODE with JTAG_DR and STATUS.

The instruction codes and the order of erase, program and verify steps
belong to the PROM and FPGA vendor and are not built in. The host composes
them from these commands.

TCK runs at half the system clock. TMS and TDI change while TCK is low. Before
each new 32-bit SRAM word, TCK is held low for 3 extra clocks while the word
is read. The SRAM is synchronous, 32 bits wide, with a 20-bit word address.

## Where this RTL departs from, or adds to, the source design

- **The source design fixes these:**
  - 120 links of 10 Fast-OR bits every 100 ns, carried in G-Link control words;
  - 10 OPTIN boards of 12 links;
  - 64 DDR lines per board at 80.16 MHz, 640 in all;
  - 40 inner and 80 outer half staves;
  - the 250 ns budget;
  - a decision within 15 ns of the frame (one 12.5 ns clock here; whether the
    1200-bit count meets that clock on a given FPGA is for synthesis to show);
  - a local bus to status and configuration registers in every FPGA;
  - firmware download to SRAM, JTAG programming of the PROM and a JTAG-launched reconfiguration.
- **Choices made here:**
  - the G-Link word flags (`ready`, `cav`, `dav`, `error`) and the bit position of each chip;
  - one shared clock plus a quarter-period capture clock;
  - the 128-bit board frame with parity and error bit;
  - release on last arrival and the 6-clock timeout;
  - the four algorithms and their thresholds;
  - the inner/outer link numbering;
  - the 2-clock CTP pulse;
  - the register maps, the command format and the JTAG operation set.
- **Not modelled:**
  - resynchronising the 120 recovered G-Link clocks into `clk`;
  - the data-link protocol;
  - USB debug access.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
Testbenches under `tb/`:

| testbench | what it does |
|---|---|
| `tb_pixel_trigger_top` | End to end at full size. It sends random Fast-OR patterns over all 120 links with per-link phases. It checks every decision and its 7-clock latency under all four algorithms. It also covers a masked link, a link losing lock, a silent link (timeout), register access, an absent device, SRAM download, JTAG bitstream transfer and the reconfiguration instruction. |
| `tb_optin_fpga` | One board. Frames are decoded from the DDR lines; it checks bits, parity, flags, latency, mask, lock loss, timeout and registers. |
| `tb_brain_fpga` | Ten DDR buses with skew. It checks decisions, the 4-clock latency, pulse width, parity error, missing and masked boards, and registers. |
| `tb_trigger_proc`, `tb_frame_align`, `tb_fastor_chan_rx`, `tb_ddr_bus`, `tb_jtag_player`, `tb_ctrl_fpga` | Unit tests. |
| `jtag_tap_model`, `sram_model` | Behavioural models of the TAP and the SRAM, used by the tests. |

For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ptrig_pkg.sv tb/tb_pixel_trigger_top.sv --top-module tb_pixel_trigger_top
./obj_dir/Vtb_pixel_trigger_top
```

The end-to-end test runs the design at its default parameters. It builds in
about half a minute and runs in well under a second.
