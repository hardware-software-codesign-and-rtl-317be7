# ISO 7816-3 smart card reader controller

This is a reader for contact smart cards, built as a small processor peripheral.
It gives a card its clock and reset and then talks to it over the card's single
I/O wire. The reader collects the card's answer to reset (ATR) byte by byte and
uses the ATR to choose the bit order and the bit rate for everything that
follows. After that it writes command bytes to the card and reads the card's
replies. Software sees four registers. It polls a "byte ready" flag, reads each
received byte together with its index, and writes command bytes.

The RTL follows an FPGA reader design: a Spartan-3E board at 50 MHz with a
MicroBlaze soft processor on the PLB bus. The reference card was an ACOS6
multi-application card, which runs T=0 at 9600 bit/s. The processor, the bus and
the I/O pad are not included here. The top level offers a plain register port
and separate I/O pad signals in their place.

## The card interface

| pin | signal        | direction | meaning                                            |
|-----|---------------|-----------|----------------------------------------------------|
| C3  | `card_clk`    | out       | card clock, 50 MHz / 14 = 3.571 MHz                 |
| C2  | `card_rst`    | out       | card reset, active low                             |
| C7  | `card_io_I/O/T` | in/out  | half-duplex serial line; connect to a tristate pad |
| –   | `card_enable` | in        | card-present switch of the card slot               |

The line is open-drain with a pull-up on the card side. `card_io_T = 1` releases
the line. `card_io_T = 0` drives `card_io_O`. `card_io_I` is the level read back,
which includes the reader's own bits while it transmits. Vcc and GND come from
the board, and the reader does not switch them.

Activation works like this. While `card_enable` is high and the reader is out of
reset, `card_clk` runs. `card_rst` stays low for `RST_LOW_CLKS` (400) card clocks
and then rises. The card answers with its ATR. When `card_enable` falls, the
reader stops the clock, pulls `card_rst` low and releases the line. It also
clears its ATR state and its byte counter.

## Timing: etu, character frames and where bits are sampled

This part takes the most care to understand.

All serial timing is counted in **card clocks**, not in system clocks. The clock
divider (`sc_clock_divider`) produces `card_clk` and also a one-`clk` `tick` per
card clock period. Every counter in the reader advances on `tick`, so the whole
design stays in the `clk` domain.

One bit lasts one **elementary time unit** (etu). An etu is F/D card clocks:

* During the ATR, F/D = 372. That gives 3.571 MHz / 372 = 9600 bit/s.
* After the ATR, F/D comes from the card's TA1 byte. For TA1 = 95h, F = 512 and
  D = 16, so one etu is 32 card clocks (448 `clk`). F/D is rounded down to whole
  card clocks.

One **character** takes 12 etu: a start bit (low), 8 data bits, a parity bit and
2 etu of guard time with the line high. `sc_bit_counter` numbers the etu of a
frame from 0 to 11. `sc_baud_counter` counts the card clocks inside each etu and
gives two pulses: `mid` halfway through the etu and `done` on its last card
clock.

**Receiving a character** (state machine states in *italics*):

1. In *WaitForData*, a low level on the synchronised line counts as a start bit.
   It clears both counters, so the etu count starts at that edge, and the reader
   enters *ReadData*.
2. The line is sampled at `mid` of etu 1 to 9, which covers the 8 data bits and
   the parity bit. Each sample shifts into `sc_shift_register`.
3. When the bit counter reaches 11 (the end of the first guard etu), the
   character is complete. *ProcessData* lasts one `clk`. In it the byte passes
   through the convention converter, goes to the ATR parser, and is latched by
   the byte encoder.
4. The byte encoder holds `data_out` and raises `data_ready` for one etu, then
   sets `data_out` back to 00. The window starts between two ticks, so it
   lasts one etu to within one card clock. The byte counter `byte_out` advances
   when `data_ready` falls. While `data_ready` is high, `byte_out` is therefore
   the 0-based index of the byte on `data_out`.

The reader leaves *ReadData* one etu before the end of the frame, so it is back
in *WaitForData* during the second guard etu. A card may start its next
character exactly 12 etu after the previous one, and that start bit still
arrives while the reader is waiting. If the reader waited for the full 12 etu,
its delay in detecting each start bit could add up from character to character.

**Transmitting a byte.** In *WaitForData* with a command byte pending, the
reader loads `{parity, data, start}` into the shift register and enters
*WriteCommand*. It drives the line for 10 etu (start, data, parity) and shifts
one bit at the end of each etu. It then releases the line for the two guard etu.
When the end of etu 11 arrives, the write is done, and *ProcessData*
acknowledges it. Receiving takes priority over a pending write.

## Answer to reset and communication mode selection

`sc_atr_parser` reads the ATR as it arrives:

* **TS** sets the convention. A direct-convention card sends 3Bh. An
  inverse-convention card sends 3Fh, with its bits in MSB-first order and low
  meaning 1. Read as direct, that looks like 03h. Any other TS is an error.
  `sc_convention` converts in both directions: it reverses and inverts the bits
  in inverse convention and passes them through in direct. The TS byte itself is
  decoded with the convention it selects, so it appears on `data_out` as 3B or
  3F.
* **T0**: the high nibble lists which of TA1, TB1, TC1 and TD1 follow. The low
  nibble is the number of historical bytes.
* **TAi, TBi, TCi, TDi** follow in that order. TA1 gives Fi/Di. Each TDi announces
  the next group and names a protocol. The protocol in TD1 is reported on
  `protocol`.
* Then come the **historical bytes**, and finally **TCK** if any TDi named a
  protocol other than T=0. The XOR of T0 through TCK must be 0.

When the last ATR byte has arrived, the etu switches to F/D from TA1. If TA1 was
absent, it stays at 372. `atr_error` is set for:

* an unknown TS,
* a reserved Fi or Di code,
* a wrong TCK,
* more than 33 characters.

Bytes after the ATR do not change the parser.

Example: the ACOS6 ATR is
`3B BE 95 00 00 41 03 00 00 00 00 00 00 00 00 00 02 90 00`.

* TS = 3B, so the convention is direct.
* T0 = BE, so TA1, TB1 and TD1 follow, then 14 historical bytes.
* TA1 = 95, so one etu is 512/16 = 32 card clocks.
* TD1 = 00, so the protocol is T=0 and no TCK follows.

That makes 19 bytes, and `byte_out` reads 19 at the end.

## State machine

`sc_fsm` has five states: IDLE, WaitForData, ReadData, WriteCommand and
ProcessData.

* **IDLE** is entered on reset or when the card is removed. It is also where
  the reset hold is timed.
* **WaitForData** moves to ReadData on a start bit, or to WriteCommand when a
  command byte is pending.
* **ReadData** and **WriteCommand** each move to ProcessData when their frame is
  done.
* **ProcessData** always returns to WaitForData.

Two assertions check the bus rules. The reader drives the line only in
WriteCommand. A write is acknowledged only at bit 11.

## Sending commands

There are two sources of command bytes, and both feed a one-byte buffer:

* **Host:** put the byte on `data_in` and give `Command_ready` a rising edge. One
  pulse sends one byte. A level held high is taken once. The buffer holds one
  byte, so the host must leave at least one character time (12 etu, plus any
  reply the card sends) before it writes the next byte. There is no status bit
  that shows when the buffer is free.
* **ROM:** a rising edge on `rom_write` sends the `ROM_N` (6) bytes of
  `ROM_CONTENT` one after another. Each byte waits for the previous write to
  complete. The default contents `80 CA 00 00 00 00` are a placeholder. Set the
  parameter to the command your card expects.

The reader handles single characters only. It does not handle the T=0 procedure
bytes (ACK, NULL, 61xx/6Cxx) or T=1 blocks. Software has to sequence those.

## Register map (`sc_controller_ip`)

The register port is word-addressed (`bus_addr` 0–15). Writes happen on `clk`.
Reads are combinational.

| index | access | contents |
|-------|--------|----------|
| 6  | R  | bit 0 `data_ready` |
| 7  | R  | bits 7:0 `data_out` |
| 8  | R  | bits 7:0 `byte_out` (characters received since reset/insertion) |
| 9  | RW | bit 31 reset (1 holds the reader in reset), bit 30 `Command_ready`, bits 29:22 `data_in` |
| 10 | R  | bit 0 `atr_error`, bits 7:4 protocol from TD1 |
| other | R | 0 |

Register 9 uses the bit positions of the original MSB-first bus: bits 0, 1 and
2–9 there are bits 31, 30 and 29–22 here. To read the ATR, software writes 0 to
register 9. It then polls register 6, and each time `data_ready` is 1 it reads
registers 7 and 8. A byte stays readable for one etu, which is about 104 µs
during the ATR. The reader is also held in reset while `bus_rst` is high.

## Files and hierarchy

```
sc_controller_ip          top: registers + controller, card pins as ports
├── sc_slave_regs         register file
└── smartcard_controller  the reader (ports of the original controller entity)
    ├── sc_clock_divider  card clock and tick
    ├── sc_baud_counter   card clocks within an etu, mid and done pulses
    ├── sc_bit_counter    etu within a 12-etu frame
    ├── sc_fsm            five-state control
    ├── sc_shift_register receive SIPO / transmit frame
    ├── sc_convention     (x2) direct/inverse conversion, receive and transmit
    ├── sc_atr_parser     communication mode selection
    ├── sc_byte_encoder   data_out / data_ready for one etu
    ├── sc_byte_counter   byte_out
    └── sc_cmd_rom        stored command sequence
sc_pkg                    states, constants, Fi/Di tables
```

Testbenches are in `tb/`, one per module, named `tb_<module>`.
`tb/sc_card_model.sv` is a behavioural card for simulation. It sends the ACOS6
ATR in direct convention, in inverse convention, or with a bad TS. After the
ATR it receives bytes at the TA1 rate and checks their parity, and after every
6 bytes it answers 90 00.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `smartcard_controller`, `sc_controller_ip` | `CLK_DIV` | 14 | 50 MHz → 3.571 MHz |
| same | `RST_LOW_CLKS` | 400 | card clocks with `card_rst` low (ISO minimum) |
| `smartcard_controller` | `ROM_N`, `ROM_CONTENT` | 6, `80CA00000000` | stored command |
| `sc_pkg` | `F_DEFAULT`, `FRAME_ETU`, `ATR_MAX` | 372, 12, 33 | ISO 7816-3 |

## Simulating

Verilator 5 (with `--timing`) is all you need. For example, the end-to-end test
at default parameters:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_pkg.sv \
    tb/tb_sc_controller_ip.sv --top-module tb_sc_controller_ip
./obj_dir/Vtb_sc_controller_ip
```

Every testbench finishes by printing `TB_RESULT checks=N failures=M`. The
end-to-end test runs about 3.7 million `clk` cycles in roughly 2 seconds. It
walks through:

* the direct-convention ATR;
* the etu switch to TA1;
* a 6-byte command written through the registers, with parity and a 10-etu drive
  window checked at the new etu;
* the card's reply;
* the ROM command;
* card removal and an inverse-convention card, including a command written
  to it in inverse convention;
* a software reset;
* an ATR with an unknown TS, which sets `atr_error`.

It counts how often each of these mechanisms happens and fails if any of them
never does. Two other testbenches set their block's parameters to keep runs
short: `tb_smartcard_controller` uses a divide-by-4 card clock, and `tb_sc_fsm`
uses an 8-tick etu.

## How far to trust it, and where it departs from its origin

Verified in simulation only, and only against the behavioural card model. Not
tried on hardware or against a real card.

Taken from the original design:

* the block structure;
* the port names;
* the divide-by-14 clock;
* 372 card clocks per etu during the ATR, then F/D from TA1;
* the 12-etu frame and the bit-11 end of a write;
* the five states;
* the register numbers and bit positions;
* the 6-byte ROM sent by a switch.

Choices made in this design:

* The 400-clock reset hold.
* `reset_button` is active high. The original is contradictory on the polarity;
  this design follows its simulation and software.
* Edge detection of `Command_ready`.
* Read priority over writes.
* Leaving ReadData after the first guard etu.
* The ATR error rules and register 10.
* The ROM contents.

Departures from ISO 7816-3 that come with the original design:

* The reader switches to the TA1 bit rate right after the ATR, without a PPS
  exchange. A card in negotiable mode would keep 372 until a PPS, so against
  such a card the reader loses sync after the ATR. To keep 372, remove the etu
  update at the end of the ATR in `sc_atr_parser`.
* Received parity is not checked. A parity error from the card (the line pulled
  low in the guard time) is not detected, and characters are not repeated.
* There is no Vcc class selection or deactivation sequencing. Only the clock,
  reset and I/O are controlled.

A smaller point: `data_ready` lasts one etu to within one card clock.
