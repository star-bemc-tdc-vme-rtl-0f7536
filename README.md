# BEMC Tower Data Collector crate — VME register model in SystemVerilog

The Tower Data Collector (TDC) gathers the digitised tower data of the
STAR Barrel Electromagnetic Calorimeter. Fiber links from the front-end
crates deliver 164 twelve-bit words per event (160 ADC values and 4 header
words) into per-channel event memories indexed by the event's **token
number**. When an event is triggered, its data are read out of those memories
by token. One VME crate holds the system:

* five **Input Cards**, each with six fiber channels (30 channels in all);
  every channel owns a 1 Meg x 12 bit memory: 4096 tokens x 256 word
  locations, of which 164 are used;
* one **Output Card**, which receives the trigger (trigger command, DAQ
  command, token) from the trigger distribution cable and keeps the
  triggered tokens in a FIFO that the DAQ and Level-2 sides consume
  independently.

The hard part of the design is how the host reaches memory that is not
mapped into VME space. Each channel has a small set of pointer registers.
The host reads and writes the memory one word at a time by triggering RAM
cycles through these registers. The fiber receiver writes into the same RAM
at the same time. This repository gives synthesizable RTL for the VME side
of both card types, for the channel register sets with their RAM sequencer,
for the event memories, for the trigger FIFO and for the FPGA configuration
ports. It also has self-checking testbenches.

## Address map

Each card decodes a 256-byte window of VME A16 space. The window's base
address bits A15..A8 are set by the card's 8-position DIP switch (closed = 0).
The intended layout is:

| window | card |
|---|---|
| base + 0x000 | Output Card |
| base + 0x100*(N+1) | Input Card N, N = 0..4 |

All cards accept D16 word cycles and D8 cycles on either byte. The even byte
address is the most significant byte (D15..D8), as VME requires. D32 cycles
(LWORD* low) are not answered. A byte write to a register that triggers an
action triggers it again for every byte written.

### Input Card (`tdc_input_card`)

Channel `c` (0..5) occupies `B + 0x20*c`; `B+0xC0..0xFF` holds no channel.
Register offsets inside a channel window:

| offset | write | read |
|---|---|---|
| 0x00 | TEST token, clears TEST counter | TEST token |
| 0x02 | DAQ token, clears DAQ counter | DAQ token |
| 0x04 | L2 token, clears L2 counter | L2 token |
| 0x06 | RXWRITE token, clears RXWRITE counter | RXWRITE token |
| 0x08 | RAM[TEST token, TEST counter] → TEST buffer; counter+1 | TEST counter |
| 0x0A | RAM[DAQ token, DAQ counter] → HOLD buffer; counter+1 | DAQ counter |
| 0x0C | RAM[L2 token, L2 counter] → HOLD buffer; counter+1 | L2 counter |
| 0x0E | TEST buffer → RAM[TEST token, TEST counter]; counter+1 | RXWRITE counter |
| 0x10 | TEST buffer | TEST buffer |
| 0x1C | odd byte: FPGA MASK; even byte bit 2 (word bit 10): enable PROGRAM | FPGA DONE |
| 0x1E | odd byte: FPGA DATA (one CCLK) | FPGA INIT |

The card's internal bus is 12 bits wide. Bits 15..12 are dropped on writes
and read as 0. The two FPGA registers appear at 0x1C/0x1E in all eight
0x20-byte windows, and each copy reaches the same registers. Every other
location reads 0.

### Output Card (`tdc_output_card`)

| offset | write | read |
|---|---|---|
| 0x00..0x1E | – | card ID "VMEIDIUCFTDC10", one character per word in the low byte |
| 0x40 | – | trigger word of the last TCD word: {status, trigger cmd, DAQ cmd} |
| 0x42 | – | token of the last TCD word |
| 0x44 | FIFO L2 next | token of the last entry written into the FIFO |
| 0x46 | FIFO DAQ next | trigger word of the last entry written |
| 0x48 / 0x4A | – | token at the L2 / DAQ head |
| 0x4C / 0x4E | – | trigger word at the L2 / DAQ head |
| 0xFC / 0xFE | FPGA MASK, enable PROGRAM / FPGA DATA | FPGA DONE / INIT |

Trigger word: `[15:13]` 0, `[12]` DAQ busy input, `[11]` FIFO overflow
(sticky), `[10]` FIFO full, `[9]` L2 side empty, `[8]` DAQ side empty,
`[7:4]` trigger command, `[3:0]` DAQ command. The trigger words stored in the
FIFO have status bits 0.

## Event memory access through pointer registers

Every channel (`inrx_channel`) has four **token registers** (TEST, DAQ,
L2, RXWRITE) and four matching 8-bit **word address counters**. A RAM address
is always `{token, counter}`. Writing a token register sets it and clears its
counter. Writing a counter register does not load it. It starts a RAM cycle
at that register's `{token, counter}` address, and the counter then advances.
The TEST buffer is the host's one-word window onto the data.

To read 164 words of token T the host does:

    write TEST token = T
    repeat 164: write 0x08 (any value); read TEST buffer

To write 164 words the host does:

    write TEST token = T
    repeat 164: write TEST buffer = value; write 0x0E (any value)

The DAQ and L2 pointers work the same way. Their data go to the channel's
HOLD buffer, which appears on the `hold_data` port with a one-clock
`hold_valid` strobe and `hold_src` (0 = DAQ, 1 = L2). The consumer of the HOLD
buffer, the card's IMUX FPGA and the inter-card TDC bus, is not part of this
model.

**Sharing the RAM with the fiber.** Each RAM (`channel_ram`) is
single-ported and synchronous. A fiber word (`rx_valid`, `rx_data`) is
written at `{RXWRITE token, RXWRITE counter}` in the clock in which it
arrives, and the counter advances. The fiber cannot be stalled, so it always
wins. A host RAM cycle waits in the sequencer until a clock without a fiber
word, then issues, then captures the read data one clock later. Only then is
the request acknowledged. The VME cycle is simply stretched: DTACK* comes
later. The host never sees a half-finished access, so the read-after-trigger
sequence above is always safe.

Counters wrap at 256. If the host writes the RXWRITE token in the same clock
as a fiber word arrives, the clear wins over the increment.

## FPGA configuration port (`fpga_prog_port`)

The cards' Xilinx XC4010XL FPGAs are loaded by the VME host in slave-serial
mode. The Input Card has eight FPGAs: INRX0..5, IMUX and an alternate IMUX.
The Output Card has two: SCORE and GLMUX.

* **MASK** (odd byte of word 0): one bit per FPGA. **0 selects** the FPGA.
* **Enable PROGRAM** (word bit 10, the even byte of word 0): while set,
  PROGRAM* is low on every selected FPGA.
* **DATA** (odd byte of word 1): each write sets DIN[i] = bit i and gives
  one CCLK pulse to every selected FPGA. Writing 0xFF or 0x00 therefore sends
  a 1 or a 0 to all selected devices. A write to the even byte alone gives no
  pulse.
* DONE and INIT read back in the low byte, through two synchronising
  flip-flops.

CCLK rises `SETUP_CYCLES` clocks after the write and stays high
`HIGH_CYCLES` clocks (defaults 2 and 4). The write is acknowledged only after
CCLK has fallen, so the host's write rate cannot violate the pulse timing.
Choose the two parameters for the card clock against the FPGA data sheet's
DIN setup and CCLK high/low minimums. The host procedure:

1. Write MASK = 0x00 and PROGRAM = 0x04, wait, then write PROGRAM = 0x00.
2. Check DONE = 0 and INIT = all ones.
3. Select one group (Input Card: MASK 0xC0 for the INRX group, 0x3F for the
   IMUX group; Output Card: 0xFE for SCORE, 0xFD for GLMUX).
4. Send that group's bit stream, least significant bit of each byte first.
5. Check that DONE is all ones.

## Trigger path (`tcd_receiver`, `trigger_fifo`)

The 20 lines of the trigger cable are read as trigger command [19:16],
DAQ command [15:12] and token [11:0], valid at the rising edge of
`tcd_strobe`. The strobe is synchronised to the card clock. On its rising
edge the word is captured, and it becomes the "last TCD word" registers at
0x40/0x42. If the trigger command is non-zero, the word is also written into
the trigger FIFO.

The FIFO (default 16 entries) has one write pointer and two read pointers.
The L2 and DAQ consumers each see their own head entry, and each advances
only its own pointer ("FIFO L2 next" at 0x44, "FIFO DAQ next" at 0x46). An
entry is freed only when both sides have passed it. The FIFO is full when
either side holds 16 entries. A trigger that arrives then is dropped and sets
the sticky overflow bit, which only reset clears. "Next" on an empty side
does nothing.

## VME slave (`vme_a16_slave`)

AS* and both DS* pass through two-flip-flop synchronisers. When a data strobe
falls while AS* is low, the slave checks the base address, the address
modifier (0x29 or 0x2D), IACK* high and LWORD* high. On a match it issues one
request on the card's internal register bus (`tdc_pkg::lbus_req_t`: address
bits 7..1, byte enables from DS1*/DS0*, write data). It holds the request
until the addressed block acks. The read data are then latched, and DTACK*
and the data drivers stay on until both strobes are released. A cycle that
does not match is ignored until its strobes go away.

DTACK* comes 5 clocks after DS* falls for a plain register, counted with the
synchroniser and the one-clock register ack. A RAM cycle adds 2 clocks plus
any clocks spent waiting for the fiber. A DATA write adds the CCLK pulse.

The crate top (`tdc_crate`) models the backplane. The cards' data outputs
are OR-ed under their enables, and DTACK* is the wired AND of the cards'
DTACK*. An assertion checks that at most one card drives the data bus.

## What this RTL decides where the card description is silent

* All cards run on one clock `clk`. The fiber words are assumed to be
  already in that clock domain, one 12-bit word per clock with a valid flag.
  Fiber framing is not interpreted: every word is stored.
* The RAM is a synchronous single-port array with one clock of read
  latency. It stands in for the board's static RAM chips.
* The layout of the trigger cable, "non-zero trigger command = trigger",
  the FIFO depth, the full and overflow rules, and the status bit positions
  in the trigger word are choices made here. Only the presence of a DAQ busy
  input is known, so here it only shows up as a status bit.
* Enable PROGRAM is bit 10 of the MASK word. This matches the programming
  procedure, which writes 0x04 to the even byte at 0x1C. One version of the
  register table lists that bit with the DATA register instead.
* The Output Card's window 0x00..0x1E is read as the card ID. An
  alternative reading of that window, a remote view of Input Card 0
  channel 0 over the TDC bus, is not built.
* Reset deselects all FPGAs, turns PROGRAM off, and clears all tokens,
  counters and buffers.

## Not modelled

* The HOTLink fiber receivers and the two Glink transmitters (to DAQ and
  to Level 2). The parallel side of each receiver is a port. The format of
  the data sent to DAQ and L2 is not specified.
* The 64-line TDC bus on the P2 user pins between the cards, the IMUX
  FPGA of the Input Cards, and the SCORE/GLMUX FPGAs of the Output Card. Only
  their names and their configuration are known. The configuration port is
  modelled.
* The Input Card's card-number switch S1, whose use is not specified.
* The registers of the earlier prototype Output Card: global bus
  read-back, Glink receive FIFO, and the L2 score board.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `N_INPUT_CARDS` | 5 | Input Cards in the crate |
| `N_CHANNELS` | 6 | fiber channels per Input Card |
| `TOKEN_BITS` | 12 | 4096 tokens per channel |
| `WORD_BITS` | 8 | 256 word locations per token (164 used) |
| `FIFO_DEPTH` | 16 | trigger FIFO entries |
| `SETUP_CYCLES`, `HIGH_CYCLES` | 2, 4 | CCLK timing of the FPGA port |

At the defaults the crate holds 30 x 2^20 x 12 bits of event memory (45 MiB).
That matches 9 MB per Input Card. All RTL defaults are the full-size values.

## Files

`rtl/`: `tdc_pkg` (internal bus structs, register indices, byte merge),
`vme_a16_slave`, `fpga_prog_port`, `channel_ram`, `inrx_channel`,
`tdc_input_card`, `card_id_rom`, `tcd_receiver`, `trigger_fifo`,
`tdc_output_card`, `tdc_crate` (top).

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `vme_master_if`: VME master tasks for D16, D8 and D32 cycles, with a
  bus-error timeout;
* `xc4000_config_model`: a behavioural model of an FPGA's PROGRAM*, INIT,
  DONE, CCLK and DIN pins, for testbenches only.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_tdc_crate \
        -y rtl -y tb +libext+.sv -Irtl rtl/tdc_pkg.sv tb/tb_tdc_crate.sv
    ./obj_dir/Vtb_tdc_crate

`tb_tdc_crate` runs the whole crate at its full default size in one run:

1. It configures all 42 FPGAs.
2. It streams one 164-word event into all 30 channels while using the TEST
   path on one channel.
3. It sends the trigger for the event token and reads the token from the
   DAQ side of the FIFO.
4. It reads all 30 channels out into the HOLD buffers and compares the data.
5. It reads through the L2 side.
6. It checks D8, D32 and empty-address cycles.
7. It drives the trigger FIFO to full and overflow.

Each of these mechanisms is counted, and a mechanism that never occurs fails
the test. The run takes well under a minute.

The other testbenches check one block each:

* `tb_inrx_channel` runs both host procedures against a reference memory
  while fiber words collide with host RAM cycles.
* `tb_trigger_fifo` compares the FIFO against two reference queues.
* `tb_fpga_prog_port` checks the CCLK count, DIN order, masking and the ack
  latency.
* `tb_vme_a16_slave` checks byte lanes and the cycles that must be refused.
