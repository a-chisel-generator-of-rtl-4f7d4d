# JTAG to memory-mapped bus master bridge

A small bus master that is driven entirely over JTAG. A host with a JTAG cable
(four wires: TCK, TMS, TDI, TDO) scans instruction codes and data words into the
bridge. The bridge turns them into write, read, burst-write and burst-read
transactions on an AXI4 or TileLink-UL bus, and returns read data serially on
TDO. Peripherals with memory-mapped registers can be configured, tested and
debugged this way with no processor in the system, or with the processor kept
off the bus.

The architecture follows the bridge described in *A Chisel Generator of JTAG to
Memory-Mapped Bus Master Bridge for Agile Slave Peripherals Configuration,
Testing and Validation*. That work ships a Chisel generator built on library
code. This is an independent SystemVerilog implementation of the same
structure, instruction set and bus state machine. Wherever the published
description is silent, the choices made here are listed under
[Departures and own choices](#departures-and-own-choices).

```
            TCK domain                                 system clock domain
   TCK ──►┌──────────────────┐  instruction[IR_W]   ┌──────────────────────┐
   TMS ──►│                  │─────────────────────►│ bridge_cmd_regs      │
   TDI ──►│ jtag_controller  │  data_out[DR_W]      │  (decode, registers, │
TDO_data ◄│  TAP FSM,        │─────────────────────►│   burst buffer,      │
TDO_drv  ◄│  IR/DR shift and │  update_tgl          │   transfer flags)    │
async_rst►│  update regs,    │─────────────────────►│                      │
          │  read buffer     │   data_in, valid_in  │ axi4_controller  or  │──► AXI4 master
          │                  │◄─────────────────────│ tilelink_controller  │──► TL-UL master
          │                  │   received_in/_end   │  (bus FSM, burst and │
          │                  │─────────────────────►│   timeout counters)  │
          └──────────────────┘                      └──────────────────────┘
```

## Instruction set

Instruction codes are `IR_W` bits wide (4 by default) and scanned LSB first. Every code
not listed below is a no-operation.

| Code | Name | Needs a DR scan | Effect |
|------|------|-----------------|--------|
| 0x01 | write | no | write the data register to the address held in the address register |
| 0x02 | address acquire | yes | DR value becomes the address |
| 0x03 | data acquire | yes | DR value becomes the single-write data |
| 0x04 | read | no | read from the address; the word is then shifted out on TDO |
| 0x08 | burst length acquire | yes | DR value becomes the number of transfers (limited to `MAX_BURST`) |
| 0x09 | burst write | no | write buffer words 0..N-1 to consecutive addresses |
| 0x0A | index acquire | yes | DR value selects a burst-buffer entry |
| 0x0B | indexed data acquire | yes | DR value is stored in the burst buffer at that index |
| 0x0C | burst read | no | read N consecutive words; each is shifted out on TDO in turn |

An acquire is an IR scan that selects the code, followed by a DR scan of
`DR_W = max(DATA_W, ADDR_W)` bits that carries the value. When the widths
differ, a data value still takes a full `DR_W`-bit scan, and the low
`DATA_W` bits are used. A transfer is a single IR scan. Typical sequences:

* **Write:** IR 0x02, DR address; IR 0x03, DR data; IR 0x01.
* **Read:** IR 0x02, DR address; IR 0x04; keep TCK running for a few cycles;
  then do one DR scan of `DATA_W` bits. The bits seen on TDO are the word, LSB
  first. The data shifted in during that scan is ignored.
* **Burst write of N words:** for each i, IR 0x0A, DR i, then IR 0x0B, DR word i.
  Then IR 0x08, DR N; IR 0x02, DR base address; IR 0x09.
* **Burst read of N words:** IR 0x08, DR N; IR 0x02, DR base; IR 0x0C; then one
  DR scan per word.

Consecutive transfers go to `base + i * DATA_W/8`. Each transfer is a
single-beat bus transaction. The bridge does not use AXI4 bursts.

### Rules the host must follow

* **The same transfer instruction twice in a row runs only once.** A transfer
  starts when the instruction code *changes* to a transfer code. To repeat a
  write, put another instruction (a NOP or an acquire) between the two writes.
  This edge detection is also why the DR scans used to read data out do not
  restart the read.
* **While a transfer is in progress (`busy`), every instruction is ignored.**
  This includes acquires. Wait until the transfer has finished, or allow for
  its bus latency, before scanning the next value.
* Bring the TAP to Test-Logic-Reset (five TCK cycles with TMS=1) before first
  use. Test-Logic-Reset also loads the initial instruction `INIT_INSTR`
  (default 0x0, a NOP).
* **TCK must be slower than the system clock, and must keep running** while
  the bridge returns read data. The read handshake only advances on TCK edges,
  so idle in Run-Test/Idle with TCK toggling. The reference setup is a 15 MHz
  TCK against a 100 MHz system clock.

## The JTAG side (`jtag_controller`, `jtag_tap_fsm`)

`jtag_tap_fsm` is the standard 16-state IEEE 1149.1 TAP state machine. It is
clocked on rising TCK, steered by TMS, and reset asynchronously by
`async_reset`. The controller has an IR shift register of `IR_W` bits and one
DR shift register of `DR_W = max(DATA_W, ADDR_W)` bits. Both shift right, with
TDI entering at the MSB, so the first bit sent ends up as the LSB. Update-IR
copies the IR shift register into `instruction`. Update-DR copies the DR shift
register into `data_out`.

TDO is split into `tdo_data` and `tdo_driven`. Both are launched on the
falling edge of TCK. `tdo_driven` is high during Shift-DR and Shift-IR.
Capture-IR loads `...0001`. Capture-DR loads the read buffer, so a DR scan
shifts the last word read out on TDO while it shifts a new word in.

## Crossing between TCK and the system clock

This is the part of the design that needs the most care. The two halves run
on unrelated clocks.

**Instructions and data (TCK → system clock).** Every Update-IR and Update-DR
flips `update_tgl` in the same TCK edge that loads `instruction` or
`data_out`. Entering Test-Logic-Reset with a non-initial instruction also flips
it. `bridge_cmd_regs` synchronizes the toggle with two flops. On the second
system clock after the flip it sees the change (an *update event*), and it
samples the multi-bit buses in that cycle. They are safe to sample because
they cannot change again before the next Update state, which is at least three
TCK cycles away. Registers and flags change on the third system clock after
the flip.

An IR scan that selects an acquire code also produces an update event, and
that event loads the *old* `data_out` into the selected register. The DR scan
that follows overwrites it with the intended value. Keep this in mind only if
you select an acquire code without following it with its DR scan.

**Read data (system clock → TCK)** uses a four-phase handshake, with
`data_in/valid_in` from the bus controller and `received_in/received_end` from
the JTAG controller:

1. The bus controller holds the word in `S_DATA_FORWARD`. It raises `valid_in`
   only when `received_end` is high (the JTAG read buffer is empty) and
   `received_in` is low (the previous handshake is finished).
2. On a TCK edge the JTAG controller sees the synchronized `valid_in`. It
   copies `data_in` into its read buffer, raises `received_in`, and lowers
   `received_end` (buffer full).
3. The bus controller sees `received_in`, drops `valid_in` and moves on, to
   the next burst transfer or back to idle. The JTAG side then drops
   `received_in`.
4. `received_end` rises again at the Update-DR of the first DR scan that
   shifted at least `DATA_W` bits out of the full buffer. A shorter scan leaves
   the word in place.

During a burst read, word *k+1* is fetched from the bus while word *k* waits
in the JTAG buffer. Word *k+1* is then held in the bus controller until the
host has shifted word *k* out. No word is ever overwritten.

## The bus controllers

Both controllers contain the same `bridge_cmd_regs`. It holds the address,
write-data, burst-length and index registers, a `MAX_BURST`-word burst buffer,
and one flag per transfer instruction. The flag is set when the instruction
code changes to that transfer. All flags are cleared through `done` when the
bus state machine returns to idle, and `busy` is the OR of the flags.

### AXI4 (`axi4_controller`, default)

| State | Bus action | Leaves when |
|-------|-----------|-------------|
| `S_IDLE` | none | a transfer flag is set |
| `S_SET_DATA_AND_ADDRESS` | AWVALID and WVALID with address and data; each dropped after its own handshake | both handshakes are done → `S_RESET_COUNTER_W`; timeout → idle |
| `S_RESET_COUNTER_W` | clears the timeout counter | after one cycle |
| `S_SET_READY_B` | BREADY | BVALID → next transfer or idle; timeout → idle |
| `S_SET_READ_ADDRESS` | ARVALID with address | ARREADY → `S_RESET_COUNTER_R`; timeout → idle |
| `S_RESET_COUNTER_R` | clears the timeout counter | after one cycle |
| `S_SET_READY_R` | RREADY, RDATA captured | RVALID → `S_DATA_FORWARD`; timeout → idle |
| `S_DATA_FORWARD` | offers the word to the JTAG side | `received_in` → next transfer or idle |

A burst counter tracks completed transfers. When a transfer completes, the
FSM returns to `S_IDLE` only if the counter has reached the burst length.
Otherwise it goes straight to `S_SET_DATA_AND_ADDRESS` or
`S_SET_READ_ADDRESS` for the next word.

The timeout counter stops the FSM from hanging on a dead slave. It counts
system clocks in every waiting state and is cleared on each state change. At
`TIMEOUT` cycles the whole instruction is abandoned. In the tests an address
phase that is never accepted keeps `busy` high for exactly `TIMEOUT + 1`
clocks. A timeout withdraws VALID without a handshake, which a strict AXI4
slave does not expect. This is deliberate: the slave has stopped responding
at that point.

AXI4 fields are fixed: LEN=0, SIZE=log2(DATA_W/8), BURST=INCR, all write
strobes set, WLAST=1, ID=0, PROT=0. BRESP and RRESP are not checked.

### TileLink-UL (`tilelink_controller`, `USE_TILELINK = 1`)

This controller uses only channels A and D. It has the states `S_IDLE`,
`S_SEND_A` (PutFullData or Get until `a_ready`), `S_RESET_COUNTER_A`,
`S_WAIT_D` (`d_ready` until `d_valid`, capturing AccessAckData), and
`S_DATA_FORWARD`. Bursts, the timeout and the read return work as in the AXI4
controller. Every request uses a_size=log2(DATA_W/8), a full mask, source 0
and param 0. `d_denied` and `d_corrupt` are not checked.

### Address window

`ADDR_BASE`..`ADDR_LAST` is the set of addresses the master may access. The
default is the whole space. A transfer whose address falls outside the window
is not put on the bus, and the instruction ends at that point. Later words of
a burst are dropped too.

## Parameters (`jtag_mm_bridge`)

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `IR_W` | 4 | instruction code width |
| `DATA_W` | 32 | data width: 32 or 64 |
| `ADDR_W` | 32 | address width: 32 or 64 |
| `MAX_BURST` | 16 | burst buffer depth and burst length limit (own choice) |
| `TIMEOUT` | 256 | system clocks before a waiting state gives up (own choice) |
| `INIT_INSTR` | 0x0 | instruction loaded at reset and Test-Logic-Reset; should be a NOP code |
| `ADDR_BASE`, `ADDR_LAST` | 0, all ones | accessible address window |
| `USE_TILELINK` | 0 | 0: AXI4 master, 1: TileLink-UL master |
| `ID_W`, `SRC_W`, `SINK_W`, `SIZE_W` | 4, 4, 1, 3 | AXI ID and TileLink field widths (own choice) |

The DR width is `max(DATA_W, ADDR_W)`. The top always has both master ports.
The port that is not selected drives zeros and ignores its inputs.

Clocks and resets: `clk` with `reset` (synchronous, active high) for the bus
side, and `tck` with `async_reset` (asynchronous, active high) for the JTAG
side. `busy` is a status output in the `clk` domain.

## Files

| File | Content |
|------|---------|
| `rtl/jtag_bridge_pkg.sv` | instruction codes, TAP state enum, flag struct, bus constants |
| `rtl/jtag_tap_fsm.sv` | TAP state machine |
| `rtl/jtag_controller.sv` | TCK-domain controller |
| `rtl/cdc_sync.sv` | two-flop synchronizer |
| `rtl/bridge_cmd_regs.sv` | instruction decode, registers, burst buffer, flags |
| `rtl/axi4_controller.sv` | AXI4 master controller |
| `rtl/tilelink_controller.sv` | TileLink-UL master controller |
| `rtl/jtag_mm_bridge.sv` | top level |
| `tb/jtag_host_if.sv` | JTAG host with reset/IR-scan/DR-scan tasks |
| `tb/axi4_mem_model.sv`, `tb/tl_mem_model.sv` | slave memories with random latency and stall / mute / slow modes |
| `tb/axi4_decoder_model.sv` | one-master, three-slave AXI4 address decoder for the system tests |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus end-to-end tests of the top |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/jtag_bridge_pkg.sv tb/tb_jtag_mm_bridge.sv --top-module tb_jtag_mm_bridge
./obj_dir/Vtb_jtag_mm_bridge
```

Replace the testbench name to run another one:

* `tb_jtag_tap_fsm`: random TMS against a reference table, plus five-ones reset from every state.
* `tb_jtag_controller`: scans, update toggle, read buffer, short scans, TLR, async reset.
* `tb_bridge_cmd_regs`: acquires, burst buffer, flag edge rule, busy lock-out, latency.
* `tb_axi4_controller` and `tb_tilelink_controller`: single and burst transfers,
  address-phase and response timeouts, address window, read-return handshake.
* `tb_jtag_mm_bridge`: the default configuration end to end over real JTAG
  scans. It counts every mechanism (single and burst transfers, read-buffer
  back-pressure, timeout, busy lock-out, repeated-instruction rule, TLR
  restore, maximum-length burst) and fails if one never happens.
* `tb_jtag_mm_bridge_tl`: the same with the TileLink master and a 64 KiB address window.
* `tb_jtag_mm_bridge_w64`: 64-bit data and addresses.
* `tb_jtag_mm_bridge_a64`: 32-bit data with 64-bit addresses.
* `tb_jtag_mm_bridge_tl64`: TileLink master with 64-bit data and addresses.
* `tb_jtag_mm_bridge_sys3`: a small system at the default parameters. The
  bridge is the only master. A behavioural AXI4 decoder (`tb/axi4_decoder_model.sv`,
  slave selected by address bits [29:28]) sits in front of three
  register-file slaves. The slaves stand in for a stream multiplexer, an
  oscillator and a transform block. The test configures all three, reads
  them back, and checks that each slave saw only its own transactions.
* `tb_jtag_mm_bridge_tck30`: the same system with a 30 MHz TCK, twice the
  usual rate.
* `tb_jtag_mm_bridge_ir8`: the same system with 8-bit instruction codes
  and 0xFF as the initial instruction. It also checks that code 0x81 is a NOP.

Each runs in well under a second.

## How far it can be trusted

* Every module has a self-checking testbench. All of them pass, and each one
  fails when a deliberate fault is put into its module.
* The end-to-end tests drive the real JTAG pin protocol against randomly
  stalling slave models. They cover the default parameters, the TileLink
  master at 32 and 64 bits, 64-bit data and addresses, 32-bit data with
  64-bit addresses, 8-bit instruction codes, and a three-slave interconnect.
* The bus rules are written as assertions in the RTL: VALID and payload are
  held until the handshake except on a timeout, and the forwarded read word is
  held until it is acknowledged. Another assertion checks that at most one
  transfer flag is set.
* Simulated TCK:clk ratios are about 1:6.6 (15 MHz against 100 MHz) and
  1:3.3 (30 MHz).
* Not verified: operation on real hardware, static timing of the crossing,
  and error responses from slaves (they are ignored).
* Lint warnings that remain are all intentional:
  * unused bus response inputs;
  * a window compare that is constant with the default full window;
  * the system reset drives both synchronous flops and the asynchronous reset
    of the synchronizers.

## Departures and own choices

The published description gives the instruction set, the TAP, the split
into a JTAG controller and a bus controller joined by
instruction/dataOut/dataIn/validIn/receivedIn/receivedEnd, the AXI4 state
list, and the generator parameters. The following details are this
implementation's own choices:

* Registers are loaded at Update-IR/Update-DR. One passage of the original
  description says capture; the update states are used because only they hold
  the complete scanned value.
* The update toggle and the exact handshake meaning of `received_in` and
  `received_end`. The original only says that internal signals keep the two
  domains in step.
* Transfer flags are cleared when the FSM returns to idle, not in
  `S_SET_READY_B` or `S_DATA_FORWARD`. For single transfers the effect is the
  same, and bursts need the flag for their whole length.
* The TileLink state machine. The original gives no states for it, only that
  it works on the same principles as the AXI4 one.
* Default values of `MAX_BURST`, `TIMEOUT` and `INIT_INSTR`, the capture
  values, and the handling of out-of-window addresses, of burst length 0 (the
  instruction ends with no bus transfer), and of out-of-range indexes (the
  word is dropped).
* The `busy` output.
* Not included: the AXI4 interconnect and the slave peripherals of a
  complete system. The bridge brings out one master port, and an interconnect
  is needed to reach several slaves.
