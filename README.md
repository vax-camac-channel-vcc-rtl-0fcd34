# VAX CAMAC Channel and Branch Driver system

A VAX 11/780 and a large CAMAC installation do not fit together easily. The VAX has
32-bit longwords, byte addresses and a UNIBUS with its own handshakes. CAMAC has
24-bit data words, addresses made of crate, station (module) and subaddress, and
dataway timing that the host has to generate. A particle detector also needs many
CAMAC branches, some far away, and wants to move large blocks of data without the
CPU.

This RTL models the Mark II detector's answer to that. A programmable **channel**,
the VAX CAMAC Channel (VCC), sits between the UNIBUS and CAMAC. The VAX writes a few
words that point the VCC at a *channel program* in memory and then leaves it alone.
The VCC fetches each packet, sets up the CAMAC side and runs the CAMAC cycles. It
packs CAMAC words into longwords, moves the data by DMA, writes a status block and
raises one interrupt at the end.

Below the VCC is a second level of indirection. The VCC talks over one branch to
**System Crates**, and each System Crate holds **Branch Drivers**. A Branch Driver is
given a 24-bit Control Word once. From then on it runs cycles on its own highway of
up to 7 crates, and after every cycle it steps the crate, module and subaddress by
itself, using the X and Q responses to decide how. Block transfers, address
scanning and "repeat until Q=0" style reads therefore cost the VCC only one
dataway cycle each.

At the default parameters there are 7 System Crates of 8 Branch Drivers. That
gives 56 highways of 7 crates each, 392 crates in all.

```
VAX UNIBUS ── unibus_interface ─┐                         ┌─ system_crate_dataway (crate 1) ─┬─ branch_driver ── highway (7 crates)
                                │  DB, Y, status,         │                                  ├─ branch_driver ── highway
     vcc_channel_ctrl ──────────┼─ I/O ucode buses        │  ...                             └─ ... (8 per crate)
     vcc_scratch_ram            │                         │
                                └─ camac_interface ───────┴─ system_crate_dataway (crate 7) ─ ...
                                     (byte_shifter, camac_cycle_ctrl, terminate_decoder)
```

## The Control Word (CTLW)

Each packet carries one 32-bit CTLW. The VCC keeps the top byte for itself. It
sends the low 24 bits to the Branch Driver with F(17).

| bits  | name       | meaning |
|-------|------------|---------|
| 31    | –          | unused |
| 30    | S          | wait for R (crate ready) before S1/S2 of each data cycle |
| 29    | XM2        | end the transfer when X=0 |
| 28    | QM2        | end the transfer when Q=0 |
| 27    | XM1        | transfer the cycle's data only if X=1 |
| 26    | QM1        | transfer the cycle's data only if Q=1 |
| 25    | P16        | 16-bit packing |
| 24    | P8         | 8-bit packing (wins if P16 is also set) |
| 23:21 | C          | initial crate |
| 20:16 | N          | initial module (station) |
| 15:12 | A          | initial subaddress |
| 11    | I          | CAMAC Inhibit line |
| 10    | C          | CAMAC Clear line |
| 9     | IN         | if X=0: reset the least significant scanned counter, step the next |
| 8     | ILQ        | step the least significant scanned counter only if Q=0 |
| 7:5   | SC, SM, SA | scan crate, module, subaddress |
| 4:0   | F          | CAMAC function code |

The low half of this layout and the field set of the top byte are those of the
original system. The order of the bits inside the VCC byte, and crate above module
in bits 23..16, are this implementation's reading. They live only in `vcc_pkg`
(`vcc_ctl_t`, `bd_ctlw_t`).

## Running a channel program

This is what `vcc_channel_ctrl` does. It is the hardest part of the design to
follow.

**Start I/O.** The VAX writes five 16-bit words, one after another, to the Start
I/O register at `BASE` (default `18'o764000`). If the VCC has not yet read a word,
the next write gets no SSYN until it has. The five words are:

| # | word |
|---|------|
| 0 | channel program address ÷ 4 |
| 1 | data buffer address ÷ 4 |
| 2 | status buffer address ÷ 4 |
| 3 | data buffer length in bytes |
| 4 | CAMAC cycle speed, in 1.6 µs steps (0 is taken as 1) |

The controller stores them in the 256×16 scratch RAM.

**Packets.** The channel program is a list of packets, each three longwords (12
bytes) long:

| longword | contents |
|----------|----------|
| 0 | CTLW |
| 1 | bit 31 command chain; bits 23..16 Branch Driver address (System Crate number in 23..21, station in 20..16); bits 15..0 maximum byte count |
| 2 | bits 15..0 offset of this packet's data from the start of the data buffer |

**Per packet**, following the original microcode flow chart:

1. Fetch the packet by DMA.
2. Load the branch register and the VCC byte. Write CTLW[23:0] to the Branch
   Driver with F(17).
3. Work out where the data goes. F0–F7 read CAMAC, F16–F23 write it, and any other
   function moves no data (the byte count still advances). If offset plus maximum
   count is larger than the buffer, the packet fails with *buffer too small*.
4. Pick the packing mode. For writes, fetch the first data word(s).
5. Loop. Run a data cycle (F(0) or F(16) to the Branch Driver). The CAMAC
   interface reports one of three results:
   - *data transferred*: add 4, 2 or 1 bytes (no packing, P16, P8), then send the
     data to the VAX or fetch the next write data;
   - *no data* (XM1/QM1 not met): run the cycle again;
   - *terminate*: XM2/QM2 not met, End of Scan, or an R time-out.

   The loop also ends when the byte count reaches the maximum. The cycle that ends
   a scan keeps its data. A cycle ended by XM2/QM2 does not.
6. Align to a longword. A half-filled 8-bit-packed word is written out, and the
   data pointer is padded with zero words to a longword boundary.
7. Read the Branch Driver's CTLW with F(1). Its address fields now hold the
   address where the scan stopped.
8. Write four status words to the status buffer:
   - CTLW sense bits 15..0;
   - the VCC byte and CTLW sense bits 23..16;
   - the byte count;
   - TDV.

   Status blocks follow one another, 8 bytes per packet.
9. If there was no error and the chain bit is set, go on to the next packet.

**End.** The controller loads the Test Device (TDV) register, which the VAX can
read at `BASE+2`. It then raises a vectored interrupt (vector `16'o300`). TDV bits:

| bit | meaning |
|-----|---------|
| 0 | done |
| 1 | error |
| 2 | R time-out |
| 3 | non-existent memory |
| 4 | data buffer too small |
| 5 | ended by XM2/QM2 |
| 6 | ended by End of Scan |
| 7 | ended by byte count |
| 15..8 | packets completed |

Errors stop the program after the failing packet's status. A non-existent memory
error stops it at once.

**No data buffer.** A program may run without a data buffer. Read data is then
dropped, and CAMAC writes send zero. A data length of 0 in Start I/O word 3
selects this mode. Likewise, a status buffer address of 0 means no status block
is written. The behaviour follows the original; using 0 to select it is this
implementation's choice.

The Start I/O words, packet layout, status word order and TDV bits are this
implementation's own. The original system names what they contain but not how
they are laid out.

## Packing modes

| mode | CAMAC cycles per longword | longword bytes D C B A come from |
|------|---------------------------|----------------------------------|
| none | 1 | 0, R[23:16], R[15:8], R[7:0] |
| P16  | 2 | cycle 2 R[15:0], cycle 1 R[15:0] |
| P8   | 4 | R[7:0] of cycles 4, 3, 2, 1 |

For writes, CAMAC bits that receive no data are driven as zero. The original
leaves them undefined. `byte_shifter` does the byte moves between the 16-bit CPU
buses and the 24-bit CAMAC registers. The controller picks the lane for each
word.

## A CAMAC cycle

`camac_cycle_ctrl` makes the dataway timing, as the SLAC protocol requires of the
host side. A cycle lasts `speed × CLK_PER_STEP` clocks. `CLK_PER_STEP` is 16, which
is 1.6 µs at the assumed 10 MHz clock. The cycle is split into four equal phases:
address, S1, S2 and release. With S set in the CTLW, a data cycle first waits for
the R line of the addressed crate. If R does not come within `RDY_TIMEOUT` clocks,
the cycle ends as a time-out with no strobes. The B (Busy) line is high for the
whole cycle after R has come.

The CAMAC interface takes read data, X and Q at the end of S1, and L at the end of
the cycle. `terminate_decoder` turns these, with XM1, QM1, XM2 and QM2, into the
cycle result.

The Branch Driver passes S1, S2 and B straight through to its highway, so a
highway cycle lasts exactly as long as the VCC makes it.

## Branch Driver scanning

`scan_sequencer` holds a 3-bit crate, 5-bit module and 4-bit subaddress counter.
The counters enabled by SC, SM and SA form one chain: subaddress is least
significant and crate most. After each highway data cycle, at the falling edge of
S2:

- with IN set and X=0, the least significant counter is reset and the next one is
  stepped;
- otherwise, with ILQ set and Q=1, nothing changes, so the same address is read
  again;
- otherwise the least significant counter is stepped, and an overflow carries into
  the next enabled counter.

A carry out of the most significant enabled counter sets End of Scan. The Branch
Driver shows End of Scan on its L line until the next F(17).

The counter ranges (subaddress 0–15, module 1–23, crate 1–7) and the values a reset
counter takes are assumptions.

The Branch Driver answers F(17) (load CTLW) and F(1) (read CTLW with the current
address) itself. F(0) and F(16) become a highway cycle with the CTLW's function
code. Inhibit follows the I bit as a level. Clear comes with S2 of each highway
cycle while the C bit is set.

## The VCC buses and the I/O microcode

As in the original, the interfaces are peripherals of the CPU on four buses:

- the Y bus (16 bits, CPU to peripherals);
- the DB bus (16 bits, peripherals to CPU; here the OR of both interfaces'
  drives);
- a 2-bit status bus from each interface;
- an 8-bit I/O ucode bus.

Codes `8'h0x` go to the UNIBUS interface and `8'h8x` to the CAMAC interface; see
`io_op_t` in `vcc_pkg`. Single-clock codes load or read a register. DMA, interrupt
and CAMAC-cycle codes start an operation, and the status bus reads *busy* until it
ends:

| status bus | values |
|------------|--------|
| UNIBUS | idle / Start I/O word waiting / busy / non-existent memory |
| CAMAC | busy / data / no data / terminate |

The UNIBUS side is simplified, with one BR level and one-clock deskew. DMA moves
one 16-bit word per request: NPR, NPG, SACK, BBSY, then MSYN/SSYN. The address
register then steps by 2. No SSYN within `SSYN_TIMEOUT` clocks (10 µs) is a
non-existent memory error. Bidirectional bus lines appear as separate in, out and
enable ports. A test bench resolves them.

## Files

| file | contents |
|------|----------|
| `rtl/vcc_pkg.sv` | CTLW structs, branch and highway structs, I/O codes, status codes |
| `rtl/vcc_camac_system.sv` | top: VCC + 7 System Crates × 8 Branch Drivers |
| `rtl/vcc_channel_ctrl.sv` | channel program state machine |
| `rtl/vcc_scratch_ram.sv` | 256×16 scratch RAM |
| `rtl/unibus_interface.sv` | Start I/O, TDV, DMA, interrupt |
| `rtl/camac_interface.sv` | branch/write/read/status registers, cycle control, terminate decoder |
| `rtl/camac_cycle_ctrl.sv`, `rtl/terminate_decoder.sv`, `rtl/byte_shifter.sv` | parts of the CAMAC interface |
| `rtl/system_crate_dataway.sv` | System Crate routing (branch receiver + crate controller) |
| `rtl/branch_driver.sv`, `rtl/scan_sequencer.sv` | Branch Driver |
| `tb/tb_*.sv` | one self-checking bench per module |
| `tb/unibus_host_model.sv` | behavioural VAX memory, arbiter, interrupt taker, programmed-I/O tasks |
| `tb/camac_highway_model.sv` | behavioural crates and modules on a highway |

## Simulating

Each bench prints `TB_RESULT checks=N failures=M` and stops itself. The package
must come first on the command line; the other modules are found in `rtl/` and
`tb/` by name. `-Wno-fatal` is needed because lint warns that the reset also
disables the assertions. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/vcc_pkg.sv tb/tb_vcc_camac_system.sv --top-module tb_vcc_camac_system -o sim
./obj_dir/sim
```

`tb_vcc_camac_system` runs the full-size top at its default parameters and takes
well under a second. Its first channel program chains six packets. Between them they
use:

- R synchronisation;
- all three packing modes;
- reads and writes;
- subaddress, module and crate scanning;
- the ILQ and IN rules;
- no-data cycles;
- termination by XM2, by End of Scan and by byte count;
- the longword flush;
- Clear and Inhibit;
- command chaining.

Three more programs each end in one error: buffer too small, R time-out and
non-existent memory. Two more run with no data buffer and with no status
buffer. Another scans crates 1 to 7 on the last highway (System Crate 7,
Branch Driver 8). The last one writes with 16-bit packing and ends by QM2. The
bench counts each of these mechanisms and fails if any never happened.

To change the system size, override `NUM_SYS_CRATES` and `NUM_BD` on
`vcc_camac_system`. The highway port arrays scale with them.

At the default size, a generic yosys synthesis of the top gives about 6,800
cells, 2,014 flip-flop bits and the 4,096-bit scratch RAM. Most of the logic is
the 56 Branch Drivers.

## How far to trust it, and where it departs from the original

- **The CPU is not built.** The original VCC is a 16-bit AMD 2900 bit-slice
  processor (2903, 2904, 2902, 2910) with a 64-bit × 256-word microprogram PROM.
  Its microcode and microword format are not available, so `vcc_channel_ctrl` carries out the microcode's
  flow chart as a hard-wired state machine on the same buses. One state stands
  for one microinstruction that touches a peripheral.
- **Loop speed.** The original needs 8 microinstructions per 2-byte (P16) CAMAC
  cycle. This controller also takes 8 states, not counting waits. It reaches that
  by loading the DMA address only when the next word does not follow the last
  one; the UNIBUS interface steps the address by itself.
- **Left out:**
  - the microcoded self-test routines;
  - the Branch Driver's separate LAM system;
  - the crate controller functions beyond routing;
  - conditional branches in the channel program (never implemented in the
    original either);
  - the VAX driver software, including its default data length of 4 bytes.
- **Assumed timing.** The clock rate, the time-outs, the UNIBUS register
  addresses, the I/O code values and every sampling point are assumptions.
  Change them in the parameters and in `vcc_pkg`.
- **Constant Z.** The VCC never drives Z (dataway initialise), so the highway Z
  outputs are constant.
- **Assertions.** The assertions in the two interfaces check that no operation is
  started while the previous one is still running.
