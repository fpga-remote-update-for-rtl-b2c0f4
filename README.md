# Remote SPI-flash update over PCIe: the FPGA Code Management unit

An FPGA board in a fusion-reactor hall may sit in a cubicle that people can no
longer walk into. Its configuration still lives in an SPI NOR flash, so a new
firmware has to reach that flash without a JTAG cable on site, and a failed
update (a dropped link, a power cut half-way) must never leave the board unable
to boot. This RTL solves that with the **FPGA Code Management (FCM) unit**. Every
firmware image carries this small block. It lets a host PC on the PCIe fabric
(an ATCA shelf controller, for example) write the *next* image into the flash
while the current one keeps running.

The safety comes from how the flash is laid out, not from the logic itself:

| flash region | contents | touched by an update? |
|---|---|---|
| header | a *critical switch word*, then a warm-boot jump sequence | switch word: erased first, reprogrammed last |
| initial image | the factory image, written once by cable | never |
| update image area | the newest image | erased and rewritten |

At power-on the FPGA's configuration engine reads the header. If the switch word
holds the sync pattern (switch **ON**), the engine runs the jump sequence and
boots the update image. If the word is erased (switch **OFF**), the engine skips
the header and boots the initial image. The FCM unit switches the header OFF
before it touches the update area, and switches it ON only after the new image
has been read back and found correct. Any interruption in between therefore
falls back to the known-good initial image.

## How an update runs

The host side (software, not part of this RTL) does the following:

1. writes the first (`A`) and last (`B`) byte address of the update area;
2. sets Enable, then issues Start;
3. polls STATUS until Busy drops ("flash ready"), sends a burst of up to 256
   image words, and repeats;
4. polls until Done or Error.

After the update the board is power-cycled or reset, and it boots whichever
image the switch word selects.

Inside the FCM unit, the **SPI state machine** (`spi_flash_sm`) carries out these
steps, in the order given by the update method:

| step | SPI commands issued |
|---|---|
| Initialize | none; latches `A`/`B` and checks them |
| Check ID | READ ID (9Fh), 3 bytes, compared with `FLASH_ID` |
| address mode | WRITE ENABLE, ENTER 4-BYTE ADDRESS (B7h), only if `ADDR_BYTES == 4` |
| Erase switch word | WRITE ENABLE, SUBSECTOR ERASE (20h) at `SWITCH_ADDR`, status polls |
| Erase update area | for each 64 KiB sector from `A` to the one holding `B`: WRITE ENABLE, SECTOR ERASE (D8h), polls |
| Program update area | for each 256-byte page: WRITE ENABLE, PAGE PROGRAM (02h) fed from the FIFO, polls |
| Verify update area | a single READ (03h) of `A..B` |
| Program switch word | WRITE ENABLE, PAGE PROGRAM of `SWITCH_WORD` (4 bytes) at `SWITCH_ADDR`, polls |
| Done / Error | none |

"Polls" means READ STATUS (05h) repeated until the write-in-progress bit clears.

**Verification without a copy of the image.** The unit streams the image and
keeps no copy of it. Each byte sent to the flash is folded into a CRC-32. The
verify step reads the whole area back in one long READ command and folds those
bytes into a second CRC-32. The switch word is programmed only if the two CRCs
match. A mismatch ends in Error (cause `verify`), with the switch still OFF.

**Stalling inside a page.** Page programs stream straight from the FIFO. If the
FIFO runs dry in the middle of a page, the state machine keeps the flash
selected and stops issuing bytes. SCK then rests low until the next word
arrives, which SPI NOR parts allow. Pages are split at 256-byte boundaries. A
short last page is allowed.

**Flow control.** Busy is low only when the unit is in the programming step and
the FIFO has room for one whole burst (`BURST_WORDS`). During Check ID and the
erases Busy stays high, so the host waits. This is the "flash ready" loop of the
host flow.

**Guarding the initial image.** A sector erase at `A` would also wipe any bytes
below `A` in the same sector. Start is therefore refused with Error (cause
`range`) unless `A` is sector aligned, `B >= A` and `B - A + 1` is a whole number
of words. Clearing Enable aborts at once: the flash is deselected, the FIFO is
emptied and the unit returns to Initialize. The switch stays OFF.

## Blocks

```
          host (PCIe)                        SPI configuration flash
              |                                   ^
   req_*/rsp_* register port                      | spi_clk, spi_cs_n, spi_mosi / spi_miso
              v                                   |
  +-----------------+ File words +-------------+  |
  | pcie_regs       |----------->| update_fifo |  |
  | (PCIe engine    |            +-------------+  |
  |  register side) |                  | words    |
  |                 | Enable, Start,   v          |
  |                 | A, B   +-------------------------------+
  |                 |------->| flash_programmer              |
  |                 |<-------|  spi_flash_sm --> spi_serdes  |--> led_done, led_error
  +-----------------+ Busy,  +-------------------------------+
                      Done, Error
```

| module | role |
|---|---|
| `fcm_pkg` | register offsets, STATUS bits, SPI opcodes, step and error enums, byte-wise CRC-32 |
| `fcm_top` | the FCM unit: wires the blocks together; its ports are the endpoint's register port, the flash pins and two LEDs |
| `pcie_regs` | turns register writes into Enable, Start, `A`, `B` and FIFO pushes, and answers reads |
| `update_fifo` | 1024 x 32 first-word-fall-through buffer; flushed on Start, on Error and while disabled |
| `flash_programmer` | the state machine and the SER-DES together |
| `spi_flash_sm` | the update algorithm described above |
| `spi_serdes` | byte-wide SPI mode-0 master. Handshake: Enable (chip select), Start/Send, Done/Receive |

Outside this RTL:

- **PCIe endpoint core.** The vendor IP and its transceivers. `fcm_top` expects
  its user side as a plain register port: `req_wr`/`req_rd` with a byte offset
  and write data, and the read answer on `rsp_valid`/`rsp_rdata` one clock later.
- **Startup primitive.** On 7-series FPGAs the user SPI clock reaches the
  configuration clock pin only through this primitive. `spi_clk` is a plain
  output here.
- **The flash itself.**

### Register map (BAR byte offsets, 32-bit registers)

| offset | name | access | contents |
|---|---|---|---|
| 00h | VERSION | RO | `FW_VERSION`, default 3 |
| 04h | CONTROL | RW | bit 0 Enable; bit 1 Start, a write-1 pulse that acts only together with Enable; reads back Enable |
| 08h | ADDR_A | RW | first byte of the update area |
| 0Ch | ADDR_B | RW | last byte of the update area (inclusive) |
| 10h | DATA | WO | one image word; byte 0 of the file in bits 7:0 |
| 14h | STATUS | RO | 0 Busy, 1 Done, 2 Error, 3 active, 7:4 step, 11:8 error cause (1 ID, 2 range, 3 verify) |
| 18h | FIFO_FREE | RO | free FIFO words |

Done and Error are sticky until the next Start. A word written while the FIFO is
full is lost, and an assertion in `fcm_top` flags it. The host must respect
Busy.

### Host-side address arithmetic

The image-building script reports the update area of the factory flash file
(`A0`..`B0`) and the span of each new update file (`A1`..`B1`). The addresses to
write are `A = A0` and `B = A0 + (B1 - A1)`.

## Timing

- One clock domain: the endpoint's user clock (125 MHz in the testbenches).
- The SPI clock is `clk / (2*SCK_HALF)`: 31.25 MHz with the default `SCK_HALF = 2`.
- Mode 0, MSB first, single-bit I/O.
- One SPI byte takes `16*SCK_HALF` clocks, plus two handshake clocks to the next
  byte.
- Between commands the flash is deselected for `GAP_CYCLES + 1` clocks.
- A 3 MiB image costs about 72 clocks per byte of SPI traffic (write plus
  read-back), 1.8 s at 125 MHz. The wall-clock time of a real update is set by
  the flash's erase and program times. With typical N25Q figures (0.7 s per
  sector, 0.5 ms per page) that is about 40 s for 3 MiB. Updates of this size
  are reported to take about 100 s in the field.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FW_VERSION` | 3 | value of the version register |
| `ADDR_BYTES` | 4 | SPI address bytes: 4 for the 256 Mbit N25Q256, 3 for the 128 Mbit N25Q128 |
| `FLASH_ID` | 20BA19h | expected JEDEC ID (N25Q256; the N25Q128 is 20BA18h) |
| `SWITCH_ADDR` | 0 | byte address of the critical switch word |
| `SWITCH_WORD` | AA995566h | switch-ON value: the 7-series configuration sync word |
| `SECTOR_BYTES` / `PAGE_BYTES` | 65536 / 256 | erase and program granularity |
| `FIFO_DEPTH` | 1024 | buffer depth in 32-bit words (a power of two) |
| `BURST_WORDS` | 256 | free space required before Busy drops |
| `GAP_CYCLES` | 4 | deselect time between commands |
| `SCK_HALF` | 2 | clocks per SPI half period |

## What follows the method and what is this design's own

The following come from the published update method and the board it targets:

- the three-region flash layout and the switch-word rule;
- the order of the steps;
- the block split: PCIe engine, FIFO, SPI state machine, SPI SER-DES;
- the signals between the blocks (Addresses, Start, Enable, File, Busy, Done,
  Error, and the SER-DES Enable/Start/Send/Done/Receive);
- 32-bit image words;
- the firmware version register;
- the flash parts.

The following are this design's own choices, because nothing on them was
available:

- the register map and status layout;
- the FIFO depth and burst size;
- the SPI mode and clock rate, and single-bit rather than quad I/O;
- the N25Q opcodes, the ID value and 4-byte mode, taken from the flash family's
  datasheet conventions;
- CRC-32 as the verify criterion;
- the range check and the abort on Enable low;
- the byte order inside a word;
- `SWITCH_ADDR`/`SWITCH_WORD`.

Keep in mind these limits:

- **The jump sequence is not rewritten.** Erasing the switch word erases its
  whole 4 KiB subsector. The layout must therefore keep the header's jump
  sequence out of that subsector, or the jump sequence must be restored by other
  means. The unit programs only the 4-byte switch word.
- **Flash status is read only for write-in-progress.** The flag status register
  of the N25Q is not read, so an erase or program failure the flash reports is
  not seen directly. It is caught by the CRC verify instead.
- **Version checking is left to the host.** Nothing in the logic checks image
  headers or version numbers.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Build any of
them with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_fcm_top \
    rtl/fcm_pkg.sv tb/tb_fcm_top.sv -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` and `tb/` by name. The package file
is given first because the modules import it.

| testbench | what it shows | run time |
|---|---|---|
| `tb_fcm_top` | six updates at the default parameters against a flash model: a good update; a verify failure (switch stays OFF, so the initial image would boot); a wrong flash ID; an unaligned `A`; an abort mid-programming; a second good update. It also counts that each mechanism (Busy waits, full buffer, multi-sector erase, partial page, busy polls, each error kind, abort) occurred | ~20 s |
| `tb_fcm_fig5_image` | a full 3,145,728-byte image into the 256 Mbit flash, every byte checked | ~2 min |
| `tb_flash_programmer` | programmer plus flash model in the 128 Mbit, 3-byte-address configuration; SCK period | ~3 s |
| `tb_spi_flash_sm` | the exact command sequence against an independently written list, byte order, stalls on an empty FIFO, verify failure | <1 s |
| `tb_spi_serdes` | bytes both ways against a mode-0 slave; 16*`SCK_HALF` clocks per byte | <1 s |
| `tb_update_fifo` | random traffic against a queue model, including full, drop and flush | <1 s |
| `tb_pcie_regs` | register map, Start gating, status layout, read latency | <1 s |

`tb/spi_flash_model.sv` is a behavioural N25Q model with these properties:

- a sparse array in which unwritten bytes read as FFh;
- write-enable rules; programming can only clear bits;
- busy time counted in status polls;
- counters of erases and programs, and of commands a real part would refuse;
- a hook that corrupts one read-back byte.
