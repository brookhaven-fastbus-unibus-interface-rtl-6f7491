# FASTBUS/UNIBUS interface

This is synthesizable SystemVerilog for a bridge between a PDP-11 **UNIBUS** and one
segment of **Brookhaven FASTBUS**, the data-acquisition bus of a high-energy physics
experiment. The two buses look alike at first: both use aperiodic master/slave
handshakes and both have a read/write bit alongside the address. Underneath they
differ in three ways:

| | UNIBUS | Brookhaven FASTBUS |
|---|---|---|
| address / data | 18-bit address and 16-bit data on separate lines (*space multiplexed*) | one 32-bit AD field carrying address, then data (*time multiplexed*) |
| handshake | one (MSYN/SSYN) per word | two: address (AS/AK), then data (DS/DK) |
| failure reporting | none: the slave simply never answers | the address is not acknowledged, the data is not acknowledged, or BUSY/EMPTY is returned with the data |
| block transfers | no | one address cycle followed by many data cycles |

The interface works in both directions:

- It is a **slave on UNIBUS and a master on FASTBUS** when the PDP-11 reaches out to FASTBUS.
- It is a **slave on FASTBUS and a DMA master on UNIBUS** when a FASTBUS master reads or writes PDP-11 memory.

It keeps almost no data of its own. Where it can, it *clamps* the two buses together: one bus's cycle is held open until the other bus's cycle ends, so data pass straight through. Only the halves of a 32-bit word are latched.

It also logs anything unusual in a control/status register (CSR) and an interrupt register (IR), and can interrupt the PDP-11. It issues local and global broadcasts, and it is the central arbiter of its FASTBUS segment.

## From UNIBUS to FASTBUS: the address map

The PDP-11 sees FASTBUS through a **4096-byte window** in its address space. The
default window is at `760000`–`767777` (octal). The 12-bit offset into the window is
turned into a 32-bit FASTBUS address by sixteen **mapping registers**:

```
offset[11:8]  -> selects mapping register r (base[r]: 32 bits, ctrl[r]: 5 bits)
offset[7:0]   -> shifted right by 2 (32-bit data), 1 (16-bit data) or 0 (bytes)
FASTBUS addr  =  base[r] | shifted offset
```

Each mapping register therefore opens a block of 64 32-bit words, 128 16-bit words or
256 bytes on FASTBUS. The program loads each base with the start of the block it wants. Because the offset is ORed in, not added, a base should be aligned to the block size.

Mapping-register control field (`map_ctrl_t` in `fbu_pkg`):

| bit | name | meaning |
|---|---|---|
| 0 | `w32` | 32-bit FASTBUS words (two UNIBUS words each) |
| 1 | `byte8` | 8-bit FASTBUS data (when `w32` = 0); otherwise 16-bit |
| 2 | `beie` | BUSY/EMPTY events from this block may interrupt |
| 3 | `susp` | hold interrupts until the second word of a 32-bit pair is done |
| 4 | spare | stored and read back |

### 32-bit words as two UNIBUS words

This is the subtle part of the design. A 32-bit FASTBUS word occupies two UNIBUS words:

- the even address holds bits 15:0;
- the next address (+2) holds bits 31:16.

A 32-bit FASTBUS transfer should hold FASTBUS for about as long as one of the two UNIBUS cycles, not both.

* **Write.** The first (low) UNIBUS word goes only into the **low-word latch (LWL)**.
  FASTBUS is not touched, and the CSR "second word pending" bit is set. The
  second (high) word starts one FASTBUS write. The data multiplexer composes
  `{UNIBUS word, LWL}` for it.
* **Read.** The first word starts one FASTBUS read. The low half goes straight to the
  UNIBUS data lines, because the FASTBUS data cycle is held until MSYN falls. The high half is
  captured in the **high-word latch (HWL)**. The second word is answered from the HWL
  without a FASTBUS cycle.
* **Alignment.** If the second word disagrees with the first on read/write, or comes
  without a first, nothing moves on FASTBUS. An alignment error (flag code 6) is
  logged instead.

With 16-bit mappings every UNIBUS cycle is one FASTBUS cycle. With byte mappings the
FASTBUS byte travels in AD[7:0], and the UNIBUS byte lane is chosen by address bit 0.

### The FASTBUS master cycle (`fb_master`)

1. **Arbitration.** The interface requests its own segment arbiter, where it is master 0.
2. **Address cycle.** The address goes on AD and AS is raised. The sequencer waits for AK, **4 ms**, or it reports flag code 1.
3. **Data cycle.** The data go on AD for a write, and DS is raised. The sequencer waits for DK, **3 ms**, or it reports code 2. BUSY, EMPTY or both sampled with DK give codes 3, 4 and 5. The transfer itself still completes.
4. **Word limit.** The whole word, arbitration included, must finish in **10 ms**, or it reports code 7.
5. **Hold.** The cycle is then held, with read data clamped through, until the UNIBUS side releases it.
6. **Release.** DS falls, the sequencer waits for DK to fall, then AS falls and it waits for AK to fall.

A broadcast is an address cycle only, with BC raised, and GL raised too for a global one. The AD field carries the 32-bit broadcast word.

The UNIBUS cycle is always answered with SSYN, also after a FASTBUS error. Any data read in that case are meaningless, and the error is in the IR.

## From FASTBUS to UNIBUS: DMA and block transfers

A FASTBUS master reaches PDP-11 memory through a **DMA window** on FASTBUS: addresses
whose AD[31:20] equal `DMA_BASE` (default `0x7F0`). The address cycle loads AD[19:0], a
FASTBUS word address, into the **address counter/shifter**. The counter shifts it left by 2 for
32-bit words or 1 for 16-bit words, giving a UNIBUS byte address; N FASTBUS words cover 4N or
2N UNIBUS bytes. CSR bit FB32 chooses the width.

Each data cycle (DS) moves one word, and the counter then steps by one FASTBUS
word. Several data cycles under one AS form a **block transfer**. Only the handshaked block mode is built: the
non-handshaked mode trades reliability for a speed UNIBUS cannot use.

* **32-bit write:** the low half goes straight to UNIBUS in the first DMA write (DATO). The high half is
  latched in the HWL. DK is returned as soon as the first word is done. The second DATO, from the HWL at
  address + 2, then runs while FASTBUS is free.
* **32-bit read:** the first DMA read (DATI) goes into the LWL. The second DATI is clamped through as
  `{UNIBUS word, LWL}` together with DK. The UNIBUS cycle ends when DS falls.
* When AS falls after more than one data cycle, a **block-end event** (flag code 8) is
  logged.
* If a UNIBUS word is not done in 10 ms (no grant, or no memory answering), code 7 is logged.
  DK is then withheld, so the FASTBUS master sees the missing data handshake.

`ub_master` runs the UNIBUS side as a non-processor-request (NPR) master with one grant per word. The sequence is NPR, then NPG, then SACK; once the bus is free it takes BBSY, puts address and C1/C0 on the lines, raises MSYN and waits for SSYN.

## Status, errors and interrupts

**IR** (interrupt register, 16 bits):

- For cases 1–8 it holds the flag code in [15:12] and the 12-bit UNIBUS address of the transaction in [11:0].
- For a FASTBUS message (case 9) it holds a leading 1 and 15 data bits.

| code | event | interrupt enabled by |
|---|---|---|
| 1 | FASTBUS slave gave no address handshake within 4 ms | CSR[0] |
| 2 | no data handshake within 3 ms | CSR[1] |
| 3 / 4 / 5 | BUSY / EMPTY / both returned with the data handshake | mapping register `beie` |
| 6 | alignment error in a 32-bit pair | CSR[2] |
| 7 | a word on either bus not done within 10 ms (arbitration included) | CSR[3] |
| 8 | last word of a DMA block transfer | CSR[4] |
| 9 | message written by a FASTBUS master (IR = 1, data[14:0]) | CSR[5] |

**CSR** (16 bits):

| bits | meaning | access |
|---|---|---|
| 5:0 | interrupt enables (table above) | read/write |
| 6 | FB32: FASTBUS-initiated DMA uses 32-bit words | read/write |
| 7 | second UNIBUS word of a 32-bit pair pending | read |
| 8 | last transaction was a read | read |
| 9 | last transaction was part of a block transfer | read |
| 10 | last transaction was initiated by FASTBUS | read |
| 12:11 | class of the last logged event: 01 = cases 1–7, 10 = case 8, 11 = case 9 | read |
| 13 | ERROR | write 0 to clear |
| 14 | INTERRUPT OVERFLOW | write 0 to clear |
| 15 | INTERRUPT | write 0 to clear |

**Logging.** Every event sets ERROR. It also loads the IR, unless the IR is locked.

**Interrupts.** An enabled event sets INTERRUPT, which locks the IR until software clears INTERRUPT. A later enabled event then only sets OVERFLOW, so the first event's information is kept.

**Suspension.** When the mapping register of a 32-bit pair has `susp` set, an interrupt raised between the two words is held back, and the IR is locked, until the second word is done. An interrupt in the middle of a pair could otherwise break the pairing of later words.

**Vector delivery.** `intr_logic` turns the rise of INTERRUPT into one UNIBUS interrupt:

1. It raises BR and answers the grant BG with SACK.
2. It waits for BBSY to clear, then takes BBSY and drives the vector (default `300` octal) with INTR.
3. It ends when the processor answers SSYN.

A grant it did not ask for passes on through BG_OUT.

## Broadcasts

**From UNIBUS.** The program first writes the low 16 bits into the **LBR** (low-order
broadcast register). It then writes the high 16 bits to one of two dummy locations, one for a local and one for a global broadcast. That write runs a FASTBUS broadcast of `{high, LBR}`.

**From FASTBUS.** A master writes a 32-bit word into the **FBR** (FASTBUS broadcast register): FB_REG+0 for a local broadcast, FB_REG+1 for a global one. The interface then runs the broadcast on FASTBUS as soon as its UNIBUS-side control section is idle.

## Register and address maps (defaults)

UNIBUS register page at `REG_BASE` = `772400` (octal), byte offsets:

| offset | register |
|---|---|
| `8*i + 0`, `+2`, `+4` (i = 0..15) | mapping register i: base[15:0], base[31:16], control |
| `0x80` | CSR |
| `0x82` | IR |
| `0x84` | LBR |
| `0x86` | write: local broadcast, high half |
| `0x88` | write: global broadcast, high half |

FASTBUS:

| address | meaning |
|---|---|
| AD[31:20] = `DMA_BASE` | DMA window; AD[19:0] is the word address |
| `FB_REG` + 0 | FBR: write for a local broadcast; read returns the FBR |
| `FB_REG` + 1 | FBR: write for a global broadcast |
| `FB_REG` + 2 | message port: write raises case 9; read returns {CSR, IR}, so FASTBUS masters can see the status as well |

## Arbitration

The interface contains the central arbiter of its FASTBUS segment, `fb_arbiter`:

- Each master has one request line and one grant line.
- The lowest index has the highest priority, and the interface is index 0.
- A grant is kept until its holder drops the request.

The top brings out the request and grant lines of masters 1 to `N_MASTERS-1`.

## Signal conventions and timing

* **One clock.** Everything runs on one clock, `clk`. The timeouts are counted in its cycles; the defaults (40 000, 30 000 and 100 000 cycles) are 4, 3 and 10 ms at 10 MHz.
* **Synchronous inputs.** Bus inputs are taken as already synchronous to `clk`. In hardware, add synchronisers in front of them.
* **Split bus lines.** Each bus line is split in two. `*_in` is what the *other* devices drive. `*_out` is the interface's own drive, with `*_oe` enables for the address and data fields. All lines are active high.
* **Outside the RTL.** The open-collector UNIBUS and ECL FASTBUS drivers and receivers, with their level shifting, are not part of this RTL.
* **Reset.** `rst` or UNIBUS INIT resets the whole interface; registers reset to zero.
* **Latency.** A UNIBUS slave cycle adds one clock of address deskew before it acts. Each handshake edge costs one clock in the state machines.

## Modules

| file | role |
|---|---|
| `fbu_pkg.sv` | shared types: flag codes, CSR bits, mapping control field, register offsets, mux selects |
| `fbu_top.sv` | top level: wires everything below and the internal data paths |
| `ub_decoder.sv` | UNIBUS address decode (window, register page, register selects) |
| `addr_map.sv` | sixteen mapping registers and the 12→32-bit translation |
| `data_mux.sv` | combinational composition/decomposition and byte lanes |
| `word_latch.sv` | HWL, LWL, LBR (16 bits), FBR (32 bits) |
| `addr_counter.sv` | FASTBUS→UNIBUS address shifter and block counter |
| `ub_ctrl.sv` | control section for UNIBUS-initiated transfers (UNIBUS slave) |
| `fb_master.sv` | FASTBUS master sequencer with timeouts and broadcast |
| `fb_ctrl.sv` | control section for FASTBUS-initiated transfers (FASTBUS slave) |
| `ub_master.sv` | UNIBUS DMA master |
| `status_error.sv` | CSR, IR, event logging, interrupt lock/overflow/suspend |
| `intr_logic.sv` | UNIBUS interrupt request and vector |
| `fb_arbiter.sv` | FASTBUS segment arbiter |

There is no separate internal 32-bit bus. Its job is done by multiplexers in `fbu_top` and `data_mux`.

## Simulating

Every module has a self-checking testbench in `tb/` named `tb_<module>.sv`. The testbenches for the HWL/LWL/LBR/FBR and the status register are `tb_word_latch.sv` and `tb_status_error.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/fbu_pkg.sv rtl/*.sv tb/tb_fbu_top.sv \
          --top-module tb_fbu_top -Mdir obj && obj/Vtb_fbu_top
verilator --binary --timing --assert -Wno-fatal rtl/fbu_pkg.sv rtl/addr_map.sv \
          tb/tb_addr_map.sv --top-module tb_addr_map -Mdir obj_map && obj_map/Vtb_addr_map
```

`tb_fbu_top` runs the whole interface at its default parameters, real 4/3/10 ms timeouts
included, in well under a second. Its environment is:

- on UNIBUS, a processor model with its NPR/BR arbiter and memory;
- on FASTBUS, a slave model with normal, DK-less and BUSY/EMPTY regions, and a second FASTBUS master.

It walks through every mechanism:

- map programming;
- 32-bit pairs, 16-bit and byte transfers;
- alignment error, address and data timeouts, BUSY, EMPTY and both;
- interrupt overflow and suspension;
- UNIBUS and FBR broadcasts;
- DMA write, DMA read and a 16-bit block with its block-end interrupt;
- a FASTBUS message, a 10 ms UNIBUS timeout and arbitration waits.

It counts each mechanism and fails if any of them never happened. It also measures how long FASTBUS is held during a 32-bit pair. The pair starts exactly one FASTBUS cycle, and AS stays up for 9 clocks, less than the 11 clocks of the processor's MSYN
for the UNIBUS word that carries it. That figure uses the testbench's bus timing.

## Where this RTL fills gaps in the published description

The original description gives these parts of the design:

- the architecture, its blocks and their widths;
- the address mapping;
- the 32-bit pairing rules;
- the nine event cases, the meaning of the CSR bits, the IR layout;
- IR locking, overflow and the suspend option;
- the timeout values and the broadcast scheme.

It does not give the following; each is this design's own choice:

* clock rate, state machines, and handling the bus inputs as synchronous;
* all register addresses, CSR bit positions, the vector and the BR level;
* the meaning of the control bits beyond "16 or 32 bit", BUSY/EMPTY enable and suspend;
* the choice of the six CSR interrupt enables (one each for cases 1, 2, 6, 7, 8, 9);
* write-0-to-clear for the CSR flags;
* the CSR bit that selects the width of FASTBUS-initiated DMA;
* names, polarity and sequencing of the FASTBUS signals (AS/AK, DS/DK, BUSY, EMPTY, BC, GL), and how local and global broadcasts are told apart;
* the FASTBUS DMA window and register addresses;
* the 20-bit word address and its truncation to 18 UNIBUS bits;
* case 8 being raised when AS falls after more than one data cycle;
* only C1 of the UNIBUS cycle code being used: DATIP acts as DATI, and DATOB writes the whole word except under a byte mapping;
* UNIBUS SSYN still being returned after a FASTBUS error, and DK withheld after a UNIBUS timeout;
* the UNIBUS NPR and interrupt sequences, which follow the usual UNIBUS protocol;
* arbiter size and priority order;
* broadcasts requested through the FBR being run by the UNIBUS-side control section, which owns the FASTBUS master sequencer;
* the original control sections are Moore machines with "pseudo-synchronous" clocking; here they are plain synchronous state machines;
* the bus line electrical interface (TTL/ECL level shifting, bidirectional buffering) is represented only by the split `_in`/`_out`/`_oe` ports.
