# VME64x slave interface of the TCS board (chip logic V1012)

This is the glue logic that turns a 9U VME board of the TCS system into a
VME64x slave. A crate master finds the board by its slot, with no address
jumpers. It reads the board's identity from a configuration ROM and then
assigns it an A32 address window. Everything happens in two address spaces:

* **CR/CSR space** (address modifier 0x2F). Every slot owns a 512 KiB window
  chosen by A[23:19]. The board compares those bits with the geographical
  address on the backplane pins GA4*..GA0*. In the window lie the
  configuration ROM (CR), a user ROM with chip id, version and serial number,
  a 512-byte configuration RAM (CRAM) and the control/status registers (CSR).
* **Function space** (A32). The master writes a base address (A31-A25) and an
  address modifier into ADER0 and/or ADER1, then sets the module-enable bit.
  From then on any A32 cycle that matches goes to the board's local logic as
  a single or block transfer. The local address is A[24:1], and it counts up
  from beat to beat during block transfers.

The chip runs on one clock (`clk`, 100 MHz in the testbenches) and
synchronises all VME strobes to it. It drives only the byte lane D[7:0],
because CR/CSR accesses are single bytes. Function data (D16) go between the
bus and the local logic outside this chip. The chip supplies the address, the
access type, the transceiver controls and the DTACK*/BERR* handshake.

## Finding the board: slot address and amnesia address

`geo_addr` inverts GA4*..GA0* to `ga_int` and compares it with A[23:19]. If
every GA pin is open (`ga_int == 0`), the board is in a crate without
geographical addressing. It then answers at the *amnesia address* 0x1E
instead. A CR/CSR cycle is for this board when

    AM == 0x2F  and  A[23:19] == (ga_int != 0 ? ga_int : 0x1E)

The BAR register (offset 0x7FFFF) reads back the slot in bits 7:3.

## The CR/CSR map

Only single-byte cycles on the odd byte lane are decoded (DS0* low, DS1* and
LWORD* high, A1 = 1). So only every fourth offset holds a byte: 0x…3, 0x…7,
0x…B, 0x…F. A ROM or RAM word index is therefore the offset shifted right by
2.

| Offsets           | Contents                                   | Module     |
|-------------------|--------------------------------------------|------------|
| 0x00003 – 0x007FF | configuration ROM, 512 × 8                 | `cr_rom`   |
| 0x01003 – 0x0103F | chip id, version, serial number, 16 × 8    | `user_cr`  |
| 0x03003 – 0x037FF | configuration RAM, 512 × 8, read/write     | `cram`     |
| 0x05003, 0x05007  | test-output selection (write strobes only) | top ports  |
| 0x7FF63 – 0x7FF6F | ADER0 bytes 3..0                           | `csr`      |
| 0x7FF73 – 0x7FF7F | ADER1 bytes 3..0                           | `csr`      |
| 0x7FFF7           | BCR, bit clear register                    | `csr`      |
| 0x7FFFB           | BSR, bit set register                      | `csr`      |
| 0x7FFFF           | BAR, read only                             | `csr`      |

The configuration ROM describes one function. It is D16 only (DAWPR 0x83),
takes AM 0x09 and 0x0D (AMCAP byte 1 = 0x22) and decodes A31-A25 (ADEM
0xFE000000). It also holds the signature "CR", board ID 0xA0123456, revision
ID 0xB9876543, and the 24-bit offsets of user CR, CRAM, user CSR and serial
number. Checksum and ROM length are zero. Every other byte is zero.

The user ROM returns chip id 0x0001_5n11, version 0x0000_1012 and the
serial number "TCS". The nibble `n` (offset 0x0100B, low four bits) is not
stored in the ROM. It comes from the `card_nr` input, the card-number
jumpers. This lets one configuration image serve several cards in a crate.

The two user-CSR bytes at 0x05003/0x05007 have no register behind them in
this version. The chip only brings out their write strobes,
`wr_test_out_12` and `wr_test_out_34`.

## The CSR registers and their set/clear behaviour

ADER0 and ADER1 are four plain read/write bytes each. Byte 3 bits 7:1 hold
A31-A25, and byte 0 bits 7:2 hold the AM code. Bytes 2 and 1 can be read and
written but have no effect.

BSR and BCR work differently from a textbook VME64x CSR. Each one is an
ordinary 8-bit register that **keeps the last byte written to it**. Three
status flags are recomputed on every clock from the bytes held there:

| Bit | Flag          | Set when        | Cleared when               |
|-----|---------------|-----------------|----------------------------|
| 7   | `reset_mode`  | BSR[7] = 1      | BCR[7] = 1 and BSR[7] = 0  |
| 4   | `mod_enabled` | BSR[4] = 1      | BCR[4] = 1 and BSR[4] = 0  |
| 3   | `berr_flag`   | BSR[3] = 1 or the board drives BERR* | BCR[3] = 1 and BSR[3] = 0 |

A flag keeps its value when neither condition holds. SYSRESET* clears
every CSR register and flag. In practice:

* Writing BSR = 0x10 enables the module. It stays enabled even if BCR
  already holds 0x10, because the set bit wins.
* To disable the module, BSR must no longer hold bit 4. Write BSR = 0x00,
  then BCR = 0x10, or the other way round: as soon as both are true the
  flag clears.
* The same goes for the BERR flag. The BSCR read-back (at either BSR or BCR)
  is `{reset_mode, 0, 0, mod_enabled, berr_flag, 0, 0, 0}`.

`reset_mode` is only a register bit brought out as a port. Nothing inside
the chip acts on it.

## Function accesses and block transfers

`ader_ext` reports a match for function *x* when the module is enabled and
A[31:25] and AM equal the values in ADER*x*. A match is a **single
transfer** if the AM is an A32 data code (AM[1:0] = 01, i.e. 0x09/0x0D). It
is a **block transfer (BLT)** if the AM is an A32 BLT code (AM[1:0] = 11,
i.e. 0x0B/0x0F). Each ADER holds exactly one AM code. To serve both 0x09 and
0x0D, as the ROM advertises, program the same base into ADER0 and ADER1 with
the two codes.

During a BLT the address stays on the bus unchanged while the data strobes
toggle once per beat. `addr_cnt_reg` therefore generates the local address
itself:

* At the start of the first beat it stores A[24:1] and AM, and loads two
  10-bit counters: A[10:1] for D16 and A[11:2] for D32. It also freezes the
  width of the cycle (D16: both data strobes, LWORD* high; D32: LWORD* low).
* `vme_timing` sets EN_BLT_CNT at the end of the first beat. The flag stays
  set until AS* is released.
* At the start of every later beat, the counter of the frozen width advances
  by one: 2 bytes for D16, 4 bytes for D32. The output `loc_a` is built from
  the counter: `{A[24:11], cnt16}` or `{A[24:12], cnt32, 0}`.
* The counters wrap inside a 2 KiB (D16) or 4 KiB (D32) window. A VME BLT
  never crosses a 256-byte boundary, so the wrap never happens with a legal
  master.

`loc_strobe` is one clock high per beat of a function access. It comes one
clock after the beat starts, when `loc_a` already holds that beat's address.

## Handshake and timing

AS*, DS0*, DS1*, WRITE* and LWORD* each pass two flip-flops. The synchronised
levels give:

| Signal    | Meaning                                                        |
|-----------|----------------------------------------------------------------|
| `ascyc`   | AS* asserted                                                   |
| `dscyc`   | a data strobe asserted                                         |
| `dspuls`  | one clock at the start of a beat; write strobes use it         |
| `dssync`  | `dscyc` one clock later; read enables use it                   |
| `en_blt_cnt` | set after the first beat of a cycle, cleared with AS*       |

The address and AM are held in a transparent latch (`addr_in_latch`). The
latch is open while AS* is high and closes when AS* falls. This is the only
latch in the design, and it is intentional.

Counting clock edges after DS* falls:

* **Edge 2:** `dscyc` rises.
* **Edge 3:** a CR/CSR write takes effect, read data appear on `d_out`, and
  `loc_strobe` is high.
* **Edge 4:** DTACK* falls. That is 30–40 ns after DS* at 100 MHz.

DTACK* rises again 2–3 clocks after the master releases the data strobes.

Bus errors come only from the local logic. When `berr_ext` is high, the BERR
flip-flop sets and holds itself until the data strobes are released. DTACK*
is withheld while BERR or `berr_ext` is high, so the local logic must raise
`berr_ext` in the clock after `loc_strobe`. CR/CSR cycles never end in a bus
error. A CR/CSR cycle to an unused offset in the board's window is still
acknowledged, and reads return 0x00.

Transceiver control: `nvme_oe` is low while a data phase addressed to this
board runs (CR/CSR, single or BLT). `vme_dir` is the inverse of WRITE, i.e.
high on reads. NIRQ1* and RETRY* are tied inactive, because the board does
not interrupt.

## Module overview

| Module          | Role                                                      |
|-----------------|-----------------------------------------------------------|
| `vme64x_chip`   | top; wires the blocks and ORs the byte sources onto `d_out` |
| `vme64x_pkg`    | AM code, amnesia address, offsets, strobe struct `csr_sel_t` |
| `vme_timing`    | strobe synchronisers, DSCYC/DSSYNC/DSPULS, EN_BLT_CNT      |
| `addr_in_latch` | AS*-gated address/AM latch                                |
| `geo_addr`      | slot recognition, amnesia address                         |
| `cr_csr_decode` | AM 0x2F, sub-range and register decodes, read/write strobes |
| `cr_rom`, `user_cr`, `cram` | ROM, user ROM, RAM                            |
| `csr`           | ADER0/1, BSR/BCR and flags, BAR                           |
| `ader_ext`      | function match, single/BLT classification                 |
| `addr_cnt_reg`  | local address register and BLT counters                   |
| `dtack_berr`    | DTACK*, BERR*, transceiver enable/direction               |

All internal read paths are data/enable pairs rather than tri-state buses.
An assertion in the top checks that at most one source drives `d_out`, and
another checks that DTACK* and BERR* are never asserted together.

## How far to trust it, and where it departs from the original

These parts follow the original schematics and listings closely:

* the CR/CSR contents and offsets;
* the register layout and the set/clear priorities of the CSR;
* the BAR contents and the amnesia address;
* the BERR flip-flop, NVME_OE and VME_DIR gates;
* the register, counter and selection structure of `addr_cnt_reg`;
* the AS*-gated address latch.

These are this implementation's own choices, made where the original is not
specific:

* **Clocking.** The original clocks registers with several strobe-derived
  clocks and uses level-sensitive logic for the CSR flags. Here every
  flip-flop runs on `clk` with single-cycle enables. The one exception is
  the asynchronous clear of BERR by DSCYC, kept from the original.
* **Synchronisers and DTACK timing**, including the exact number of clocks
  above.
* **The function decoder** (`ader_ext`): an exact compare of A31-A25 and AM,
  gated by module enable. The XAM and DFS bits of ADER byte 0 are ignored.
* **GEO_ADDR_OK** = "at least one GA pin grounded". GA parity is not
  checked.
* **Data-width classification**, following the VME64x data-strobe rules.
* **SYSRESET\*** disables the module and clears the BERR flag, even if the
  board is driving BERR* at that moment.
* **Interrupts and retry** are not implemented. NIRQ1* and NRETRY* are tied
  inactive, as on the original I/O sheet. A further pass-through net there,
  IRQ_X, has no stated purpose and is not brought out.

The chip was checked in simulation only. No timing closure or hardware test
was done.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on its own. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/vme64x_pkg.sv tb/tb_vme64x_chip.sv --top-module tb_vme64x_chip
    ./obj_dir/Vtb_vme64x_chip

Replace `tb_vme64x_chip` with any other `tb_<module>` to test one block.
`tb_vme64x_chip` contains a VME master model that runs a full bring-up:

* ROM and user-ROM reads, BAR read, CRAM write/read;
* ADER programming, the module-enable sequence;
* single D16 writes and D16/D32 block transfers, checking every beat's
  local address;
* a local bus error;
* a cycle for another slot, the amnesia address, SYSRESET*;
* the DS*-to-DTACK* latency.

It counts each of these mechanisms and fails if one never happened. The
simulation takes well under a second.

`tb_crcsr_scan` does what a crate master does when it configures the system.
It walks the whole CR/CSR window of one slot over VME:

* all 512 ROM bytes, compared with the table by offset;
* all 16 user-ROM bytes;
* all 512 CRAM bytes, written with a pattern and read back;
* every byte of the CSR page;
* random offsets outside the sub-ranges, which must be acknowledged and read
  as zero with the data driver off.

## Changing it

* Board identity: the parameters `MANUFACTURER_ID`, `BOARD_ID` and
  `REVISION_ID` of `cr_rom`, and `CHIP_ID`, `VERSION` and `SERIAL` of
  `user_cr`. The ROM table in `cr_rom` is a `case` on the word index: the CR
  offset is `4*index + 3`.
* Address map: the range and register constants live in `vme64x_pkg`.
  `cr_csr_decode` derives every decode from them.
* CRAM size: `cram` takes `AW`/`DW`. The CR offsets that announce the CRAM
  range (ROM words 0x026–0x02B) must be changed to match.
