# LAPD interface: shared-memory arbitration and HOST glue logic for an MC68020 system

This is synthesizable SystemVerilog for the glue logic of a LAPD (ISDN layer 2,
Q.921) termination board. It follows the MC68020-based design described in the
NJIT thesis *Design of an MC68020-Based LAPD Interface with Shared Memory
Arbitration*. Four bus masters share a single 16-bit memory port:

| master | part | what it does with the shared memory |
|---|---|---|
| HOST | Motorola MC68020 | builds the data structures and queues, loads the protocol code |
| MLC | AT&T T7130 multi-channel LAPD controller | reads the LAPD code from EEPROM; reads and writes descriptors and frames |
| SPYDER-T | AT&T T7115A synchronous protocol data formatter | DMA of HDLC frames for 32 channels |
| EX_CPU | optional external processor | system control and message exchange |

The memory behind that port is the Shared Memory Array (SMA). It holds 512 KB
of SRAM, the Common Shared Array (CSA), and 64 KB of EEPROM holding the
T7130's protocol code. The logic here decides who owns the port and generates
each master's strobes, chip selects and acknowledges. It also watches for
illegal accesses.

It also contains the rest of the HOST's support logic:
- address decode of the HOST's private program/data SRAM and program EEPROM;
- peripheral selects;
- the control and status registers;
- interrupt steering;
- the wait-state and bus-error logic;
- reset generation.

The processors, the interrupt controllers (MC68153 BIM, MC68901 MFP), the
HIFI-64 and the HOST's private memories are not part of this RTL. Their pins
are ports of the top module `lapd_interface`.

On the original board the logic sits in about twenty PAL devices plus a few
counters and gates. The RTL keeps that partitioning: one module per
programmable device or per function, with the original active-low signal
names in lower case plus an `_n` suffix. For example, `CPSMBGL` becomes
`cpsmbg_n`. Signals whose original name ends in `H` are active high and keep
an `_h` suffix.

## Address maps

Each master sees the shared memory at its own addresses.

| master | CSA SRAM (512 KB) | LAPD EEPROM (64 KB) |
|---|---|---|
| HOST | A22..19 = 1111 with A24 = 0; A23 is not decoded, so 0xF80000-0xFFFFFF (and its image at 0x780000) | A22..18 = 01000 (0x200000) |
| MLC | A23..19 = 11111 (0xF80000-0xFFFFFF) | A23..20 = 0010 (0x200000), read only |
| SPYDER-T | A23..19 = 11111 | none |
| EX_CPU | its own strobe `sbas_n`, 18 address bits | none |

The SMA address bit 18 chooses the upper or lower SRAM half. Bits 17..1 are
the word address within the half, and the two byte lanes are the even (D15..8)
and odd (D7..0) bytes.

The rest of the HOST map:

| HOST space | A22..18 | contents |
|---|---|---|
| program EEPROM | 00000 | four 64K x 8 devices, 16-bit port, banks chosen by A17 |
| program/data SRAM | 0010x | four 128K x 8 devices, 32-bit port; the lower half (A18 = 0) is write-protected |
| LAPD EEPROM | 01000 | in the SMA, 16-bit port |
| peripherals | 011xx | MFP 0x00-0x17, BIM 0x30-0x3F (odd), HIFI-64 0x80, UART 0xC0, registers 0xF0-0xF8 |
| GPIT | 100xx | select only |
| CSA | 1111x | in the SMA, 16-bit port |

Registers in peripheral space (data on D31..24):

| address | register | bits |
|---|---|---|
| 0xF0 | IRR, interrupt request | write D31 = 0: interrupt the EX_CPU (latched, read back on D31); write D30 = 0: interrupt the MLC (pulse) |
| 0xF2 | CR0, resets | D31 MFP, D30 BIM, D28 HIFI-64, D27 T7130, D26 T7115A: 0 holds the device in reset. Writing D24 = 0 pulses the SPYDER-T attention pin (SA) and is not stored |
| 0xF4 | CR1, write enables | D31 program EEPROM, D30 program SRAM, D29 LAPD EEPROM; D28..24 spare |
| 0xF6 | ISR, write violations | D31 program EEPROM, D30 program SRAM, D29 LAPD EEPROM; any write clears all three |
| 0xF8 | general-purpose status | select only |

The EX_CPU has three registers of its own:
- **System Control.** D31 HOST RST, which clears itself. D30 HOST HLT. D29 HOST INTEN, which enables the HOST-to-EX_CPU interrupt.
- **Exception vector.** The status read with it carries the HOST function code and reset state.
- **EX_CPU-to-HOST interrupt.**

## Arbitration

Arbitration is the heart of the design and is the least obvious part. Three
modules work together:
- `smbr_sync` synchronises the requests;
- `arb_fsm` is the state machine;
- `mlc_grant` derives the MLC and delayed grants.

All three run on ARBCLK (40 MHz).

**Request synchronisation.** The SPYDER-T, EX_CPU and HOST requests are
registered on the rising ARBCLK edge. The MLC request is registered on the
falling edge of MLCLK (ARBCLK / 2, also generated by the arbiter). This gives
the MLC its request one MLC clock earlier than a two-stage path would.

**States.** There is one state per owner, plus two extra states for the MLC:

```
           spy                  request order from IDLE or S1:
  IDLE ----------> S1 SPYDER-T     SPYDER-T > EX_CPU > HOST > MLC
   |  \--sys-----> S2 EX_CPU    (S2, S3 hold while their master requests;
   |   \--cp-----> S3 HOST       on release: SPYDER-T, then the other one,
   |    \--mlc---> S4 MLC 1st    then the MLC, else IDLE)
   |               |
   |               v
   |              S5 MLC held ---- no request -----> IDLE
   |               | any other master requests
   |               v
   |              S6 MLC release: wait for the MLC to drop its request,
   |                 then SPYDER-T, or EX_CPU / HOST if exactly one asks,
   |                 otherwise VOID -> IDLE
```

The SPYDER-T, EX_CPU and HOST keep the bus for as long as they request it.
The MLC can be pre-empted: any other request in S5 moves the machine to S6.
In S6 the MLC's bus grant `mlcsmbg_n` is removed at the next falling ARBCLK
edge. Its cycle-control grant `mlcbg_n` stays asserted through S6, so the transfer in progress can finish with
valid chip selects. The next owner is granted only after the MLC has withdrawn
its request.

If the EX_CPU and the HOST both ask when the MLC releases, the machine passes
through the VOID state (no state bit set on the original one-hot machine) and
IDLE. It then picks by priority.

**Grant timing.** Grants that steer addresses and chip selects come straight
from the state, which changes on the rising ARBCLK edge. Grants that enable
write strobes are delayed to the following falling edge:
- `cpsm2dbg_n` for the HOST;
- `sysmdbg_n` for the EX_CPU;
- the registered S4/S5 term inside `mlc_grant`.

This way a write strobe never starts before the address and chip select are
stable. As a side effect, the MLC's grant outlasts S5 by half an ARBCLK
period. The HOST also has a rising-edge copy, `cpsmdbg_n`, that the DSACK
logic uses. It is cleared as soon as the HOST drops its address strobe.

Power-on reset clears all requests and grants and starts in IDLE. In
simulation, `arb_fsm` asserts that at most one grant is active, and
`sma_bus_mux` checks the same on its grant inputs.

## Bus cycles and acknowledges

**HOST.** DSACK0 and DSACK1 come from `host_dsack`, which uses a four-stage
shift register on SPYCLK (16.67 MHz). The register is held cleared between
slow cycles and fills one stage per clock. Its taps W2/W4/W6/W8 are one to
four SPYCLK periods into the cycle.

| HOST access | acknowledge | wait |
|---|---|---|
| program/data SRAM | DSACK0 + DSACK1 (32-bit) | none |
| CSA | DSACK1 (16-bit) | as soon as the HOST's grant `cpsmdbg_n` is asserted |
| LAPD EEPROM | DSACK1 | W6, three SPYCLK after the delayed grant |
| program EEPROM | DSACK1 | W8, four SPYCLK |
| IRR, HIFI-64 | DSACK0 (8-bit) | W6 |
| CR0/CR1/ISR/status | DSACK0 | W2 |
| MFP, BIM, UART, interrupt acknowledge | the device's own DTACK passed to DSACK0 | device |

Peripheral cycles also pass through `periph_select`. Two PERIFCLK registers
delay the peripheral select by two PERIFCLK edges after the data strobe, which
gives the slow parts their address set-up time.

**MLC.** CSA accesses get DTACK at once from the chip-select decode. LAPD
EEPROM reads wait: `mlc_dtack` counts two rising MFPCLK (4 MHz) edges after the
read strobe, so DTACK arrives 250 to 500 ns into the access. The EEPROM needs
at least 250 ns.

**SPYDER-T.** The SPYDER-T has no acknowledge; its accesses are zero-wait SRAM
cycles. Each of its address strobes is instead checked when it ends. If the
SPYDER-T was outside the SMA space while it held the bus, the latch `spyia_n`
goes low and requests BIM channel 2. The latch is re-clocked by every
SPYDER-T cycle. The channel 2 interrupt acknowledge clears it.

**Bus errors.** A `bus_error_timer` watches each of the MLC and the HOST. It
counts clocks while the address strobe is active without an acknowledge, and
asserts bus error at the terminal count. Negating the strobe clears both the
counter and the error.
- **MLC:** 128 clocks of the 20 MHz MLC clock (6.4 us).
- **HOST:** 255 SPYCLK (15.3 us).

## Write protection and the ISR

After reset, CR1 is zero, so the program EEPROM, the program half of the
program/data SRAM and the LAPD EEPROM are all write-protected. A HOST write
into a protected space produces no write strobe but is still acknowledged.
Instead it sets the matching flag in the ISR (`isr_violation`). Any set flag
drives WRTVL, the BIM channel 3 request. A HOST write to the ISR clears all
flags.

## Interrupts

- **EX_CPU → HOST.** The EX_CPU writes its interrupt register, `hostint_n`, which goes to the MFP.
- **HOST → EX_CPU.** The HOST writes the IRR with D31 = 0. `cpuirq_n` follows while HOST INTEN is set. The EX_CPU's acknowledge, `sysiack_n`, clears the request.
- **HOST → MLC.** The HOST writes the IRR with D30 = 0. `mlcirq_n` is also driven by the SPYDER-T's interrupt output.
- **10 ms timer → HOST.** The timer flip-flop requests BIM channel 1. The channel 1 acknowledge clears it.
- **BIM channel steering.** `iack_ctrl` decodes which BIM channel is being acknowledged, from INTAEL/INTAL1..0:
  - channel 0 passes the acknowledge to the MFP;
  - channel 1 clears the timer;
  - channel 2 clears the SPYDER-T latch.
- **HOST priority level.** The seven interrupt lines from the BIM and MFP are priority-encoded onto IPL2..0 (`irq_prio_enc`, a 74LS148).

## Resets and clocks

`host_reset` resets the MC68020 in three cases:
- **Power-on.** The reset lasts at least three BFRM edges after power-on ends.
- **The EX_CPU's HOST RST bit.** Two BFRM edges after the bit is set, the System Control Register is cleared, so the bit clears itself.
- **A GPIT reset request.** The request sets a latch that a two-flop BFRM synchroniser releases, so even a short request resets the HOST for three BFRM edges.

The HOST reset is also the interface reset. It clears CR0, CR1, the ISR, the
IRR and the timer request. As a result, every peripheral returns to reset and
every write protection is re-armed.

`clock_gen` divides the oscillators:

| source | outputs |
|---|---|
| 66.66 MHz | CPCLK 33.3 MHz, SPYCLK 16.7 MHz, PERIFCLK 8.3 MHz |
| 40 MHz | M20CLK and HIFICLK, both 20 MHz |

## Modules

| file | function |
|---|---|
| `rtl/lapd_pkg.sv` | arbiter state type, address-map and register constants |
| `rtl/lapd_interface.sv` | top level, wires everything together |
| `rtl/smbr_sync.sv`, `rtl/arb_fsm.sv`, `rtl/mlc_grant.sv` | arbitration |
| `rtl/sma_bus_mux.sv` | selects the granted master's address, data and strobes onto the SMA |
| `rtl/sma_chip_select.sv` | SRAM half and EEPROM chip selects, MLC zero-wait DTACK |
| `rtl/sma_memory.sv` | the CSA SRAM (2 x 2 x 128K bytes) and LAPD EEPROM (2 x 32K bytes) as arrays |
| `rtl/spy_sma_ctrl.sv` | SPYDER-T strobes and space decode |
| `rtl/host_mem_decode.sv` | HOST space decode, write protection, SMA request |
| `rtl/host_sma_strobes.sv`, `rtl/lapd_ee_strobes.sv` | HOST byte strobes into the SMA and the LAPD EEPROM |
| `rtl/host_pd_cs.sv`, `rtl/host_ee_cs.sv` | HOST private SRAM byte lanes, program EEPROM selects |
| `rtl/periph_select.sv` | peripheral and register selects |
| `rtl/host_dsack.sv`, `rtl/mlc_dtack.sv`, `rtl/bus_error_timer.sv` | acknowledges and time-outs |
| `rtl/host_ctrl_regs.sv`, `rtl/isr_violation.sv`, `rtl/irq_ctrl.sv`, `rtl/sys_regs.sv` | registers |
| `rtl/iack_ctrl.sv`, `rtl/irq_prio_enc.sv` | interrupt acknowledge, priority encoding, timer request |
| `rtl/host_reset.sv`, `rtl/clock_gen.sv` | resets and clocks |

Parameters:
- `sma_memory`: `SRAM_AW = 17` and `EE_AW = 15`, the board's device sizes.
- `bus_error_timer`: `TIMEOUT_CLKS`, 128 by default. The top sets 255 for the HOST instance.
- `mlc_dtack`: `WAIT_CLKS = 2`, in MFPCLK periods.

## Where this RTL departs from the board

- **Clocking.** Each register is clocked by the clock the original device uses: rising or falling ARBCLK, falling MLCLK, SPYCLK, PERIFCLK, MFPCLK, BFRM, or a strobe edge. The register writes, ISR flags and interrupt latches are clocked by the bus strobes, as on the board. The design is therefore not single-clock, and timing closure needs these clocks declared.
- **Flags and latches.** The ISR flags and the SPYDER-T latch are flip-flops with one asynchronous control each. The ISR clear acts on the leading edge of the ISR write, not as a level. The GPIT reset latch, a feedback latch on the board, is a flip-flop with asynchronous set.
- **Tri-state buses become multiplexers.** The tri-state transceivers of the SMA bus and the HOST data bus are multiplexers selected by the grants and read enables. The DSACK outputs are driven inactive instead of floating outside a cycle.
- **Arbiter encoding.** The arbiter is an encoded state machine. The original is seven one-hot registers; the transitions are the same.
- **SPYDER-T interrupt channel.** The SPYDER-T illegal-address interrupt uses BIM channel 2. One description of the board puts it on channel 1, but the channel assignment table and the acknowledge decode use channel 2.
- **System Control bit 31.** This bit is HOST RST. The register table's label differs, but the register's description is followed.
- **Design choices, not taken from the board:**
  - BFRM's frequency is not specified; the tests use 1 MHz.
  - The HOST bus-error time-out (255 SPYCLK).
  - The placement of the status fields in the EX_CPU vector/status word.
  - The length of the HOST-to-MLC interrupt pulse.
- **EEPROM model.** The LAPD EEPROM is modelled as writable like SRAM. Its programming time is not modelled.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Some compare against a reference model, some
sweep all inputs, and the sequential ones check their timing edge by edge.
Verilator 5 builds them as they are. The tests give their delays in
nanoseconds without a timescale of their own, so pass one:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/lapd_pkg.sv tb/tb_lapd_interface.sv --top-module tb_lapd_interface
./obj_dir/Vtb_lapd_interface
```

`tb_lapd_interface` runs the top at its default sizes. It drives:
- reads and writes from all four masters against one shared scoreboard, one after another and all at once;
- a fixed-priority race and an MLC pre-emption through S6;
- the EEPROM wait states and both bus-error time-outs;
- the write-protection violations and the ISR;
- the SPYDER-T illegal-address interrupt, the timer and the IRR interrupts;
- the SA pulse and the three HOST reset sources.

It counts each of these mechanisms and fails if any never happens. It runs in
well under a second.

## Limits

- The correctness of this RTL rests on the device equations and descriptions of the original board. Where those were unclear, the choices are listed above. The testbenches check this RTL against models written from the same reading, so they cannot catch a misreading of the original.
- The external parts are represented only by their pins in the testbenches. The real MC68020, T7130 and T7115A bus timing has not been modelled, so set-up and hold margins on the board's strobes are not verified:
  - MC68020: a simple asynchronous bus model that holds AS/DS until DSACK;
  - T7130: one transfer per grant;
  - T7115A: one word per grant.
