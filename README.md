# PCI Prototyping Platform — a minimal 32-bit PCI target in SystemVerilog

A PCI add-in card that does as little as a Plug and Play PCI device can do and still be
useful as a starting point for other PCI projects. It is a target only (it never masters
the bus), runs at 32 bits and 33 MHz, and answers four bus commands:

| Command               | C/BE#[3:0] | What it reaches                                   |
|-----------------------|-----------|----------------------------------------------------|
| Configuration Read    | 1010      | the Type 0 configuration header                    |
| Configuration Write   | 1011      | the writable fields of that header                 |
| I/O Read              | 0010      | Registers 1, 2, 3 in the I/O window given by BAR0  |
| I/O Write             | 0011      | the same registers, with byte enables              |

The configuration software finds the card by its header, sizes Base Address Register 0
(BAR0), gives it an I/O base address and turns on I/O decoding. After that, a program
reads and writes three 32-bit scratch registers with plain `in`/`out` instructions.
Parity is generated for every dword the card drives and checked for every address phase
and every write data phase. Errors are reported on PERR# and SERR# and logged in the
Status register.

The three registers, the Type 0 header with an I/O BAR, parity generation and checking,
the four commands and the two tri-state test inputs (TST_AD, TST_PAR) are the original
design's. The original description gives no register map, timing diagram or state
machine. The bus timing, the decode speed, the burst handling and the ID values below are
this implementation's choices. They follow the PCI Local Bus Specification (revision 2.x)
where it leaves no room, and are the simplest legal option where it does.

## Structure

```
pci_proto_top
 ├─ pci_target_ctrl   bus sequencer: address phase, decode, DEVSEL#/TRDY#/STOP#, read data, write strobes
 ├─ pci_config_space  Type 0 header: IDs, Command, Status, BAR0, Interrupt Line
 ├─ pci_io_regs       Register 1..3 (NUM_REGS x 32 bits)
 └─ pci_parity        PAR generation, address/data parity checks, PERR#, SERR#
pci_pkg               command encodings, header dword numbers, Command/Status bits, reg_req_t
```

`pci_target_ctrl` talks to the configuration space and to the register file over the same
small local bus, `reg_req_t`: a one-cycle write strobe with the dword number, active-high
byte enables and data. Reads are combinational on a separate dword index. The controller
selects the read data one clock before it puts it on AD.

## Pins: split tri-states and the test inputs

A shared PCI line is brought out as three signals: its value (`*_o`), its enable (`*_oe`),
and the sampled bus value as an input (`*_i`). The FPGA pads, or a testbench, join them
into the real line.

| Line(s)               | Driven when                  | Notes                                          |
|-----------------------|------------------------------|------------------------------------------------|
| AD[31:0]              | `ad_oe`                      | read data only; forced off by `tst_ad = 1`     |
| PAR                   | `par_oe` (ad_oe one clock late) | forced off by `tst_par = 1`                 |
| DEVSEL#, TRDY#, STOP# | `ctl_oe`                     | driven high one clock before release           |
| PERR#                 | `perr_oe`                    | driven high one clock before release           |
| SERR#                 | `serr_oe` pulls the line low | open drain                                     |
| FRAME#, IRDY#, IDSEL, C/BE#, RST#, CLK | inputs only  |                                                |

`tst_ad` and `tst_par` were added for bench testing with a pattern generator. Setting one
of them to 1 floats the AD lines or the PAR line, whatever the card is doing. With both at
0 the card behaves as a normal PCI target.

## Transaction timing

This part matters most for anyone who changes the controller. Clock A is the address
phase: FRAME# low in the clock after an idle bus clock (FRAME# and IRDY# both high).

```
clock        A        A+1          A+2                  A+3 ...
FRAME#       low      (high if last phase)
AD           address  write data / turnaround   read data (card)   ...
C/BE#        command  byte enables
card         latches  decodes      DEVSEL#=0, TRDY#=0, (STOP#=0)
             AD,C/BE#,IDSEL        read data on AD
```

* **Claim.** In clock A+1 the card decodes the latched address phase. It claims an I/O
  command when Command bit 0 (I/O Space) is set and AD[31:4] equals the BAR0 base. It
  claims a configuration command when IDSEL was high and AD[1:0] = 00 (Type 0). It ignores
  every other command, including memory cycles, special cycles and Type 1 configuration.
* **Medium decode.** DEVSEL# and TRDY# go low together in clock A+2. Status bits 10:9
  read 01 (medium). A read needs its turnaround clock in A+1, so the card can drive AD in
  A+2 at the earliest, and that is when it does. Reads and writes therefore have the same
  initial latency of two clocks, well inside the 16-clock limit for a target.
* **Data transfer** happens at the first rising edge where IRDY# and TRDY# are both low.
  The master may add wait states by holding IRDY# high. The card holds TRDY# and the read
  data until it sees IRDY#. A write reaches its register at that same edge.
* **One data phase, disconnect with data.** The card supports no bursts. If FRAME# is still
  low at the end of A+1, STOP# is asserted together with TRDY# in A+2. FRAME# can still be
  low because the master wants a burst, or because it is inserting wait states. Either
  way, exactly one data phase completes. After it, TRDY# goes high and STOP#/DEVSEL#
  stay low until the master takes FRAME# high. A single-phase master with wait states
  also sees STOP#; that is harmless, since its only phase still completes.
* **Release.** After the last transfer the card drives DEVSEL#, TRDY# and STOP# high for
  one clock and then floats them. The next address phase must follow an idle bus clock:
  fast back-to-back transactions are not recognised.
* **Not claimed.** The card stays idle and the master's master-abort timeout ends the
  cycle.

A complete single-phase transaction with no wait states takes four bus clocks, address
phase to idle bus: roughly 33 MB/s of register traffic at 33 MHz.

## Configuration header

Every dword not listed reads as zero: BAR1–5, CardBus CIS, Expansion ROM, Capabilities,
BIST/Header Type/Latency Timer/Cache Line Size. Header type 0 is single-function.

| Dword | Field(s)                    | Value / behaviour                                          |
|-------|-----------------------------|------------------------------------------------------------|
| 00h   | Device ID, Vendor ID        | `DEVICE_ID`, `VENDOR_ID` parameters (placeholders 0001h, 1234h) |
| 01h   | Command                     | bit 0 I/O Space, bit 6 Parity Error Response, bit 8 SERR# Enable are R/W; others 0 |
|       | Status                      | 15 Detected Parity Error, 14 Signaled System Error (write 1 to clear); 10:9 = 01 |
| 02h   | Class Code, Revision ID     | `CLASS_CODE` (FF0000h, "no defined class"), `REVISION_ID` (01h) |
| 04h   | BAR0                        | I/O BAR: bit 0 = 1, bits 3:1 = 0, bits 31:4 R/W → 16-byte window |
| 0Bh   | Subsystem ID, Subsystem Vendor ID | parameters, default 0                                |
| 0Fh   | Interrupt Line              | R/W byte; Interrupt Pin = 0 (the card has no interrupt)    |

Byte enables apply to every write. Writing FFFF_FFFFh to BAR0 and reading it back gives
FFFF_FFF1h, which means 16 bytes of I/O space. The window is 16 bytes because BARs
decode power-of-two sizes and three dwords need 12 bytes. The IDs are placeholders: a
real card needs a vendor ID assigned by the PCI-SIG.

## Registers 1–3

| I/O offset | Register   |
|-----------:|------------|
| 0h         | Register 1 |
| 4h         | Register 2 |
| 8h         | Register 3 |
| Ch         | none: reads 0, writes ignored |

Each register is 32 bits, resets to zero and is written byte by byte under C/BE#. The
card does not check AD[1:0] against the byte enables, and it never target-aborts.

## Parity and error reporting

PCI parity is even over AD[31:0], C/BE#[3:0] and PAR. PAR always lags its data by one
clock.

* **Generation.** In the clock after the card drives read data, PAR is the XOR of that AD
  value and the C/BE# the master drove with it.
* **Address phase check.** Every address phase on the bus is checked, claimed or not. On a
  mismatch, Status bit 15 is set. If Parity Error Response and SERR# Enable are both set,
  SERR# is pulled low for one clock, two clocks after the address phase, and Status bit 14
  is set. The transaction still goes ahead normally.
* **Write data check.** The data of every write the card accepts is checked. On a
  mismatch, Status bit 15 is set and, if Parity Error Response is set, PERR# is low two
  clocks after the data phase. The card drives PERR# during that clock and the next
  (high), then releases it. The data is still written.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
itself through a watchdog if it hangs. Files needed beyond the unit under test:
`rtl/pci_pkg.sv` for every block except the parity unit; `tb/pci_tb_pkg.sv` and `tb/pci_master_bfm.sv` for the
bus-level tests.

```sh
# whole card, default parameters, on a modelled bus with a behavioural host
verilator --binary --timing --assert -Irtl -Itb \
  rtl/pci_pkg.sv tb/pci_tb_pkg.sv rtl/pci_*.sv tb/pci_master_bfm.sv \
  tb/tb_pci_proto_top.sv --top-module tb_pci_proto_top -Mdir obj_top
./obj_top/Vtb_pci_proto_top

# one block, e.g. the parity unit
verilator --binary --timing --assert rtl/pci_parity.sv tb/tb_pci_parity.sv \
  --top-module tb_pci_parity -Mdir obj_par && ./obj_par/Vtb_pci_parity
```

| Testbench             | What it covers |
|-----------------------|----------------|
| `tb_pci_proto_top`    | host flow: ID reads, BAR0 sizing and assignment, I/O enable, random I/O traffic with byte enables and wait states, master aborts, burst disconnects, PERR#, SERR#, parity response off, Status write-1-to-clear, TST_AD, TST_PAR. Bus monitors check for contention, check read PAR on every clock, and check the PERR#/SERR# timing. Each mechanism is counted and must occur. |
| `tb_pci_target_ctrl`  | controller alone with modelled registers: claim rules, the exact DEVSEL#/TRDY# clock, write strobes, STOP# rules, parity-check strobes |
| `tb_pci_config_space` | all 64 header dwords after reset, BAR0 sizing, Command/Status bits, Interrupt Line |
| `tb_pci_io_regs`      | random byte-enable writes against a reference model |
| `tb_pci_parity`       | PAR generation, error detection and PERR#/SERR# timing and enables |

`pci_master_bfm` is a behavioural PCI initiator, not synthesizable. It drives one
transaction per call: any command, optional wait states, an optional two-phase burst
attempt, and optionally wrong address or data parity. It follows the PCI rules for ending
a transaction, including the master abort after five clocks without DEVSEL#. It drives at
the falling clock edge, so the card samples clean values at the rising edge.

The simulator used is two-state. Every register the card reads is reset by RST#, so the
card never depends on x values.

## Trust and limits

* Tested against the PCI rules as coded in the testbenches, not against a PCI compliance
  checklist or real hardware. The timing of every claimed transaction is checked to the
  clock.
* Not implemented: burst transfers, fast back-to-back transactions, memory space, bus
  mastering, interrupts, target abort, 64-bit operation, 66 MHz. The original design
  names burst transfer, data stepping, fast back-to-back and 64-bit operation as future
  work.
* The pads (5 V PCI signalling) are outside this RTL. The top exposes value, enable and
  input signals for them.
* The original design fit in under 400 CLBs of a Xilinx XC4000E part. No XC4000 mapping of
  this RTL has been done. A generic synthesis gives about 230 flip-flops, most of them
  the 96 register bits, the 32-bit read-data register and the BAR/address latches.

## Changing it

* **More registers:** raise `NUM_REGS` and, if they no longer fit in 16 bytes, `IO_SIZE_LOG2`
  (window = 2^IO_SIZE_LOG2 bytes, at least 8).
* **Identity:** set `VENDOR_ID`, `DEVICE_ID`, `REVISION_ID`, `CLASS_CODE` on `pci_proto_top`.
* **Faster decode:** claim in clock A+1 by decoding straight from `ad_i` in `S_IDLE`. Status
  bits 10:9 (`DEVSEL_MEDIUM` in `pci_pkg`) must then change too.
* **Bursts:** stay in `S_DATA` while FRAME# is low, step the register index, and stop
  asserting STOP# from the decode state.
