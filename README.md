# POPi: FPGA hardware for a mail-to-screen message board

POPi fetches a text message (an SMS forwarded to an e-mail account) from a
POP3 mail server over Ethernet and shows it on a VGA monitor. A MicroBlaze
soft processor runs the TCP/IP stack, the POP3 client and a terminal
program. The processor's program and data do not fit in on-chip block RAM,
so they run from an external 256K x 16 SRAM. The SRAM shares its pins with
an NE2000-compatible Ethernet chip. The hardware in this repository is
what sits between the processor's on-chip peripheral bus (OPB) and those
parts:

* **`sram_ethernet`**, the SRAM/Ethernet bridge. This is one OPB slave that
  serves byte, halfword and word loads and stores to the 16-bit SRAM, and
  16-bit register accesses to the much slower Ethernet chip, over one
  shared board bus.
* **`vga_text`**, an 80-column text display. The processor writes
  characters and a font into it, and it scans them out to VGA.
* **`popi_top`**, which puts both slaves on one OPB.

The processor, the OPB itself, the SRAM and Ethernet chips and the FPGA pad
buffers are not part of the RTL. The top's ports are the OPB master signals,
the shared board bus and the VGA signals.

## Bit numbering and byte lanes

All OPB and board-bus vectors keep the IBM/Xilinx big-endian numbering:
bit 0 is the most significant bit (`logic [0:31]`, `logic [0:17]`,
`logic [0:15]`). Byte lane 0 is OPB bits 0..7 and holds the byte at the
lowest address. On the board bus, bits 0..7 are the SRAM's upper byte
(selected by UB#) and bits 8..15 its lower byte (LB#). So the byte at an
even address is the upper byte of its halfword.

The processor repeats a byte store on all four lanes and a halfword store
on both halves of the data bus. The bridge relies on this: for every store
that is not a full word, it writes OPB bits 0..15 and lets UB#/LB# pick
the bytes. Any other OPB master must repeat its data the same way.

## Address map (defaults)

| Range | Device |
|---|---|
| `0x0000_0000 – 0x0007_FFFF` | SRAM, 512 KB (bit 12 of the address = 0) |
| `0x0008_0000 – 0x000F_FFFF` | Ethernet chip. Register *n* is at byte offset 2*n*, so `0x0008_0000 + 2n` (bit 12 = 1) |
| `0xFEFF_1000 – 0xFEFF_195F` | Screen characters, one byte per cell. Cell (col, row) is at offset `col + 80*row` |
| `0xFEFF_1A00 – 0xFEFF_1FFF` | Font: 96 glyphs × 16 bytes, for character codes 32..127 |

The bridge decodes address bits 0..11 against `C_BASEADDR`, which gives a
1 MB window. Bit 12 chooses the chip. Bits 13..30 are the halfword address
on the board bus (A0–A17). Bit 31 is dropped: it is covered by the byte
enables.

## The bridge: how one OPB transfer becomes board-bus cycles

The bridge is split into four parts:

* `bridge_decode` is the chip select logic.
* `bridge_datapath` registers the request. It also forms the halfword
  address, the UB#/LB# strobes and the write halfword, and assembles the
  read word.
* `bridge_fsm` is the controller.
* `bridge_io_regs` is one register per board-bus pin, meant to be packed
  into the FPGA's I/O blocks.

Because of that pin register stage, everything the controller asks for
appears on the pins **one clock later**. Read data reaches the bridge one
clock after it was on the pins. The controller's sequences are built
around these two delays.

A transfer is a word access when all four byte enables are set. Any other
pattern is a byte or halfword access, with UB# = NOT(BE0 or BE2) and
LB# = NOT(BE1 or BE3).

A word access uses two board-bus cycles at consecutive halfword addresses.
The controller's `sel32` output is ORed into the address LSB, which turns
the even halfword address into the odd one. The same signal switches the
write data from OPB bits 0..15 to bits 16..31. On reads, the even halfword
goes to OPB bits 0..15 ("low" load) and the odd one to bits 16..31 ("high"
load). A halfword or byte read loads the same halfword into both halves,
so the processor finds its data on whichever lane it reads.

The controller states for each transfer, clock by clock, starting from the
first clock of OPB_select. On the pins, each row appears one clock later.

| Transfer | Clocks | States (what each drives) |
|---|---|---|
| SRAM byte/halfword store | 3 | IDLE · SEL_RAM (CE#, WE#, drive, UB#/LB#) · XFER (ack) |
| SRAM word store | 4 | IDLE · SEL_RAM (WE#, first halfword) · WR32 (WE#, sel32, second halfword) · XFER |
| SRAM byte/halfword load | 5 | IDLE · SEL_RAM (CE#, OE#) · RD16_A (OE#) · RD16_B (OE#, load both halves) · XFER |
| SRAM word load | 6 | IDLE · SEL_RAM (OE#) · RD32_A (OE#, sel32) · RD32_B (OE#, load low) · RD32_C (OE#, load high) · XFER |
| Ethernet store | 7 | IDLE · SEL_ETH (CS#, BHE, AEN) · WRE_A/B/C (IOW#, drive) · WRE_D (drive only) · XFER |
| Ethernet load | 7 | IDLE · SEL_ETH (CS#) · RDE_A/B/C (IOR#) · RDE_D (IOR#, load both halves) · XFER |

Notes on the table:

* During a word store, WE# stays low across both halfwords while the
  address changes. The SRAM model used in the testbenches writes while the
  strobe is low, sampling once per clock. Check this against the timing of
  the real part before using it at speed.
* The Ethernet chip gets three clocks of IOW# with data set up before the
  strobe. The data is then held one more clock after IOW# rises.
* On Ethernet loads, IOR# has been low for two clocks when the data is
  captured.
* Sln_xferAck is high for one clock, in XFER, and Sln_DBus carries the read
  data in that clock only. At all other times Sln_DBus is zero, as the OPB
  requires of a slave that is not answering.
* If the master drops OPB_select before XFER, the controller returns to
  IDLE without acknowledging.
* Sln_errAck, Sln_retry and Sln_toutSup are always 0.
* The other devices on the board's shared bus (Flash, SDRAM, ADC, audio,
  USB, NVRAM) are held deselected.

`bridge_fsm` checks these bus rules with assertions:

* never both chip selects at once;
* never OE# together with WE#;
* never drive the data bus while OE# is low;
* the acknowledge lasts one clock only.

## The text display

`vga_text` has two byte-wide memories, each with one port for the
processor and one for the raster scan:

* **Character memory:** 80 × 30 bytes.
* **Font memory:** 96 glyphs × 16 rows.

The processor transfers one byte per OPB access, at the address given,
and the acknowledge comes in the second clock. Read data is returned on
all four lanes. Stores outside the two memories are dropped, and loads
there return zero.

The scan uses standard 640 × 480 / 60 Hz timing (`vga_timing`) with a
pixel enable every `PIX_DIV` = 2 OPB clocks, that is 25 MHz from a 50 MHz
OPB. Each pixel goes through three pipeline stages:

1. read the character of the cell under the beam;
2. read that glyph's row from the font;
3. pick the bit, with bit 7 as the leftmost pixel.

Sync and blank are delayed through the same three stages, so they stay
aligned with the pixels. The output is one bit per pixel: 1 for
foreground, 0 for background, for blanking, and for character codes
outside 32..127.

The terminal software does all cursor handling, scrolling and font loading.
The hardware holds no font.

## Where this RTL departs from, or adds to, the original design

* **No write strobe during word reads.** The original controller pulsed
  the write strobe in the last two states of a word read. That would
  overwrite SRAM with undriven data. Here those states assert OE#.
* **Ethernet reads return data.** The original controller never loaded
  Ethernet read data into the OPB return register, so the processor would
  have read zeros. Its fourth read state was also unreachable. Here the
  read runs through all four states and loads the data in the last one.
* **Unused chip outputs left out.** The Ethernet chip's IOCS16#, RDY/DTACK
  and IREQ outputs were declared but never used, and are left out.
* **No pad buffers.** The bidirectional data pads are not instantiated.
  The data bus appears as `pb_dout`, `pb_din` and the tristate bit
  `pb_ctrl.d_t`. One tristate register serves all 16 bits.
* **The text display is this design's own.** Only its programming model
  comes from the terminal software: 80 columns, cell address
  `col + 80*row`, font at offset 0xA00, a 4 KB window at 0xFEFF1000, and
  30 rows. The system's description calls the screen 80 × 25, but its
  software clears and scrolls 30 rows, and 30 rows of 16-line cells fill
  480 lines. The following are choices made here:
  * 8 × 16 cells;
  * a 96-glyph font;
  * VGA timing;
  * the OPB handshake;
  * a one-bit pixel.
* **Reset.** All registers are reset asynchronously by `opb_rst`, active
  high. The display memories are not cleared: the software blanks the
  screen at start-up.

## Files

`rtl/`:

* `popi_pkg.sv` – widths, the board-bus strobe struct `pb_ctrl_t`, and the
  controller state type;
* `bridge_decode.sv`, `bridge_datapath.sv`, `bridge_fsm.sv`,
  `bridge_io_regs.sv`, `sram_ethernet.sv` – the bridge;
* `vga_timing.sv`, `vga_text.sv` – the display;
* `popi_top.sv` – the top.

`tb/`:

* one self-checking bench per module (`tb_<module>.sv`), each ending with
  a `TB_RESULT checks=N failures=M` line;
* `sram_model.sv` – a 256K × 16 asynchronous SRAM model;
* `eth_model.sv` – a model of the Ethernet chip's register interface. It
  ignores IOW# pulses shorter than three clocks, and returns garbage until
  IOR# has been low for two clocks. A bridge with cycles that are too short
  fails against it.
* `ne2000_model.sv` – a larger model of the same chip with the same host
  timing. It adds register pages, the reset port, word-mode remote DMA
  into the chip's buffer memory, and packet transmission. Registers 0x12,
  0x13 and 0x16 return the fixed values that the driver's diagnostic
  expects of the board's chip.

## Simulating

With Verilator 5, from the repository root:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/popi_pkg.sv tb/tb_popi_top.sv --top-module tb_popi_top -Mdir obj_top
./obj_top/Vtb_popi_top
```

To run another bench, replace `tb_popi_top` with its name. Each bench
compares the hardware against values it computes itself.

* **`tb_popi_top`** runs one whole operation at the default sizes, in
  about 5 s:
  1. initialise the Ethernet chip's registers and read them back;
  2. store a 63-character message in SRAM, one character per halfword
     store, as the main program does, and read it back. With its
     terminator, the message fills the program's 64-byte buffer;
  3. run word, halfword and byte traffic, plus abandoned loads;
  4. load a font and write the message to the screen;
  5. check every visible pixel of one frame.

  It checks the clock count of every transfer, and fails if any mechanism
  (each access size, Ethernet load and store, abandoned transfer, display
  store and load, frame) never occurred.
* **`tb_ne2000_send`** runs the driver's packet transmit through the
  whole design at default sizes, using `ne2000_model`. It covers:
  * reset;
  * controller initialisation;
  * the register page test, and the check of three fixed registers above
    the data port (0x12, 0x13 and 0x16);
  * two 204-byte packets, each sent as 102 byte-swapped data-port stores,
    followed by DMA-complete and transmit-complete polling.

  It checks that the transmitted bytes equal the packet.
* **`tb_sram_ethernet`** runs about 1500 random transfers against a shadow
  memory.
* **`tb_bridge_fsm`** compares the controller clock by clock with the
  table above.
* **`tb_vga_text`** runs at `PIX_DIV` = 1 to keep the frame short.

Verilator's `-Wall` lint reports every ascending bit range, because of the
big-endian vectors. These warnings are expected.
