# Ethernet over PCI Express adaptor

An Ethernet switch can be built from an ordinary PCI Express switch. Each
Ethernet port gets an adaptor card that sits in a PCIe slot. The adaptor
wraps every received Ethernet frame in a PCIe memory-write TLP. The TLP is
addressed to the adaptor that serves the frame's destination MAC address,
and the PCIe switch delivers it there by peer-to-peer address routing. The
receiving adaptor unwraps it and sends the frame out on its Ethernet port.
The PCIe fabric does the switching. The adaptor only has to map MAC
addresses to PCIe addresses and convert between the two framings.

This repository holds the adaptation logic of one such adaptor, in
SystemVerilog. It sits between two third-party cores, which are not
included:

- a 10G Ethernet MAC with a 64-bit AXI4-Stream client interface;
- a PCIe endpoint core with a descriptor/data application interface.

It also contains Priority-based Dynamic Flow Control with Memory (PDFC). PDFC
is a per-class flow-control scheme that computes each pause time from how
fast a queue is filling and from how well the previous pause time worked.

The design follows the published description of this adaptor, the thesis
"PCI Express-based Ethernet Switch". Where this RTL departs from that
description, the departure is listed below under *Departures and open
points*.

## Block diagram and clocks

```
                     mac_rx_clk | user_clk (125 MHz)                  | mac_tx_clk
 MAC Rx  ──► MAC Rx FIFO ──┬──► output address lookup ──► result ─┐  |
 (AXI4-S)   (async, 512)   ├──► PCIe Tx FIFO (256) ──────────────┐ │  |
                           └──► PCIe Tx interface ◄──────────────┴─┘  |
                                      │ tx_req/tx_desc/tx_data ─► PCIe endpoint core
                                                                       |
 PCIe endpoint core ─► PCIe Rx interface ──► MAC Tx FIFO (async, 512) ─┴─► MAC Tx
                                                                   (AXI4-S)
 PDFC:  pdfc_level[c] ─► queue monitor[c] ─► frame generator ─► pdfc_axis_* (mac_tx_clk)
        MAC Rx stream ─► flow control ─► class_paused[c]                     (mac_rx_clk)
```

There are three clock domains:

- `mac_rx_clk` and `mac_tx_clk`: 156.25 MHz, the 10G MAC clocks.
- `user_clk`: 125 MHz, the PCIe user clock.

Each domain has its own active-low asynchronous reset; assert all three
together. The two MAC FIFOs are the only crossings. They use Gray-coded
pointers with two-flop synchronisers.

### Byte order

On every 64-bit bus in the design, byte 0 (`data[7:0]`) is the first octet on
the wire. So a MAC address is held as the 48-bit value of `data[47:0]`.
For example, the station whose address goes out on the wire as
01-02-03-04-05-06 is written to the table as `48'h060504030201`.

## Receive path: from Ethernet frame to TLP

A data phase leaves the MAC Rx FIFO only when both the lookup and the PCIe Tx
interface can take it. All three of these blocks see the same phase in the
same cycle:

- the lookup parses it;
- the Tx interface counts it;
- the PCIe Tx FIFO stores it.

### Output address lookup (`output_addr_lookup`)

The lookup has three parts: a parser, a CAM and an array.

- **Parser (`eth_parser`).** A four-state FSM: IDLE, READ_WORD_1,
  READ_WORD_2, WAIT_LAST.
  - The first phase holds the destination address and the first 16 bits of
    the source address.
  - The second phase holds the rest of the source address and the
    length/type field.
  - If the length/type field is the VLAN TPID (8100h), the same phase also
    carries the TCI. Its PCP field is mapped to a PCIe traffic class through
    the `PCP_TO_TC` table, which is the identity by default. Untagged frames
    get TC0.
  - `complete` pulses once per frame.
- **CAM (`mac_cam`).** 16 words of 48 bits.
  - A compare answers one cycle after the address is presented, with
    `match` and `match_addr`. When several words match, the lowest address
    wins.
  - A write raises `busy` for one cycle and is visible two cycles after
    `we`.
  - Words that were never written do not match.
- **Array (`route_array`).** Indexed by the CAM address. Each entry holds:
  - a valid bit and a 2-bit age;
  - the 64-bit routing address (the destination adaptor's BAR);
  - the destination's bus/device/function.

  Clearing the valid bit deletes an entry.

The result (`res_valid`, `res_match`, routing address, BDF and TC) appears
three cycles after `complete`. While the CAM is busy with a write, the lookup
holds off new phases, so a compare never sees a half-written word.

The table is filled by software. Every frame's source address is reported on
`src_valid`/`src_mac`. The driver then writes each MAC address with the
routing address of the adaptor that saw it.

### PCIe Tx interface (`pcie_tx_if`)

The Tx interface is a ten-state FSM. The state numbers are fixed, because
they are visible on the `state` output:

| # | state | what happens |
|---|---|---|
| 0 | IDLE | wait for a frame |
| 1 | COUNT_LENGTH | count phases, keep the last `tkeep` and `tuser`, wait for the lookup result |
| 2 | SEND_DESC | `tx_req` with the descriptor |
| 3 | DISCARD | clear the PCIe Tx FIFO (no match, bad FCS, frame too large, or `tx_err`) |
| 4 | SEND_DATA | stream phases from the PCIe Tx FIFO |
| 5 | WAIT_ACK | descriptor presented, `tx_ack` not yet seen |
| 6 | WAIT_FIFO | PCIe Tx FIFO empty at decision time (cannot occur, see below) |
| 7 | WAIT_STATE_1 | core asserts `tx_ws` before the descriptor |
| 8 | WAIT_STATE_2 | core asserts `tx_ws` during the payload |
| 9 | LAST_DATA | last phase, `tx_dfr` low |

The TLP length field must be known before the payload starts. So the whole
frame is stored before the descriptor is sent (store and forward).

The descriptor is a memory write (MWr) TLP header:

- **Format.** A 3-DW header when the routing address fits in 32 bits,
  otherwise a 4-DW header.
- **Length.** `ceil(octets/4)` DW.
- **Byte enables.** First BE is `F`. Last BE masks the 1 to 4 octets that
  are valid in the final DW. A one-DW TLP carries its mask in the first BE
  and has last BE `0`.
- **Other fields.** Traffic class from the lookup. Requester ID from the
  `req_id` input.
- **Layout.** DW0 is in `tx_desc[127:96]`.

Handshake with the core:

- `tx_req` and `tx_dfr` stay high with the descriptor until `tx_ack`.
- Payload starts the cycle after `tx_ack`.
- A phase is transferred in every cycle with `tx_dv` high and `tx_ws` low.
- `tx_dfr` is low only for the last phase, and `tx_be` carries that phase's
  `tkeep`.
- If the core raises `tx_err`, the rest of the frame is discarded.

## Transmit path: from TLP to Ethernet frame

### PCIe Rx interface (`pcie_rx_if`)

The Rx interface is a nine-state FSM: IDLE, ACK, WAIT_FIFO_1, WAIT_ABORT,
RX_DATA, WAIT_FIFO_2, ABORT, LAST_DATA, ERROR.

- **Request check.** On `rx_req` the descriptor is checked. Only memory
  writes with data, 3- or 4-DW, are accepted.
  - Anything else is throttled for one cycle with `rx_ws` (WAIT_ABORT), then
    refused with `rx_abort` (ABORT).
  - A write is acknowledged with a one-cycle `rx_ack`. If the MAC Tx FIFO
    cannot take data yet, the interface first waits in WAIT_FIFO_1.
- **Payload.** Phases are taken when `rx_dv` is high and `rx_ws` low. They
  are registered and written to the MAC Tx FIFO with `keep = rx_be`. The
  phase with `rx_dfr` low is marked `last`.
- **Back-pressure.** When the FIFO stops accepting, the core is held off
  with `rx_ws` (WAIT_FIFO_2).
- **Errors.** If the core raises `rx_err` mid-payload, the interface enters
  ERROR and stays there while `rx_err` is high. It then closes the partly
  written frame with a zero-keep phase carrying `last` and `user`, which
  tells the MAC to abandon the frame.

## PDFC: priority-based dynamic flow control with memory

Each traffic class has its own queue with three watermarks: L, M and H. When
a queue rises through M or H, the receiver sends a PDFC frame that pauses
only that class at the sender. The pause time is computed in hardware by
`pdfc_queue_monitor`, one instance per class:

```
T_M = 32768 * F1 * F2        F1 = min(1, R1 * dL/dt)      F2 = min(1, R2 * T_M_real / T_M_last)
T_H = 65535 * F3 * F4        F3 = min(1, R3 * (dL/dt)^2)  F4 = min(1, R4 * T_H_real / T_H_last)
```

The terms are:

- **dL/dt.** The increase in queue length over the last 64-cycle window, or
  0 if the queue fell.
- **T_x_last.** The pause time issued at the previous crossing of the same
  watermark.
- **T_x_real.** The measured time, in pause quanta, from that crossing until
  the queue drained to L.

The effect of the two factors:

- A queue that fills fast gets a longer pause. At H the rate is squared.
- A previous pause that let the queue drain too early shortens the next one.

Without history (`T_last = 0`) the ratio factor is 1.

Numeric details:

- **R1..R4** are operator inputs in unsigned Q8.16 (65536 = 1.0).
- **F factors** are Q16 fractions clamped to 1.0.
- **The ratio** `R * T_real / T_last` is computed by a 16-step restoring
  divider. A request therefore comes out 18 cycles after the crossing, or
  one cycle when no division is needed.
- **One pause quantum** is 512 bit times, that is 8 cycles of the 64-bit
  path.

`pdfc_frame_gen` merges the requests of all classes into one 60-octet frame
(the MAC adds the FCS):

| octets | content |
|---|---|
| 0-5 | DA 01-80-C2-00-00-01 |
| 6-11 | station MAC |
| 12-13 | 88-08 |
| 14-15 | opcode 01-01 |
| 17 | class-enable vector |
| 18-33 | one 16-bit timer per class |

On the sending side, `pdfc_flow_ctrl` watches the received frames. It accepts
a PDFC frame only if the MAC marked its FCS good. It then loads the timers of
the enabled classes and holds `class_paused[c]` high until timer `c` has
counted down; a zero timer releases the class at once.

The top brings PDFC out as ports:

- the per-class queue levels and settings;
- the frame stream `pdfc_axis_*`;
- `class_paused`.

The classified queues that PDFC watches and gates are not part of this
design. Neither is a merge of `pdfc_axis_*` into the MAC transmit stream.

## Departures and open points

- **Descriptor length and last BE.** The reference simulation shows, for a
  60-octet frame, a descriptor with length 012h and last BE 0. This RTL
  follows the PCIe rule instead: 15 DW and last BE `F`. The format (4-DW
  write) and the address (`00000300_0000000C`) agree with the reference.
- **End-to-end CRC.** The descriptor leaves the TLP digest bit (TD) at 0
  and the adaptor appends no ECRC. The end-to-end CRC over header and
  payload belongs to the transaction layer, which here is the endpoint
  core's; a core that does not add it would need a CRC-32 stage after the
  Tx interface.
- **`tx_err` direction.** One description of the endpoint's transmit
  interface lists `tx_err` as driven by the adaptor. The prose says the core
  reports errors on it. Here it is an input from the core.
- **CAM construction.** The CAM is built from registers and comparators
  rather than a block-RAM bit grid. Timing and ports are those of the
  original CAM (1-cycle read, 2-cycle write with BUSY).
- **WAIT_FIFO_1.** The original state table has WAIT_FIFO_1 send an ACK. Here
  the ACK is sent once, in ACK, after the wait, so data cannot start before
  the FIFO can take it.
- **WAIT_FIFO is unreachable.** Because the Tx interface stores the whole
  frame first, the PCIe Tx FIFO is never empty when the frame is accepted.
  The state is kept so that the state numbering stays the same.
- **Sizes not given by the original description:**
  - FIFO depths (512, 256 and 512 phases);
  - the PCP-to-TC table;
  - the PDFC rate window and number formats;
  - the station address.
- **MAC Rx overflow.** The MAC cannot be back-pressured. A phase arriving at
  a full MAC Rx FIFO is lost, and `rx_fifo_full` is raised.
- **Throughput.** The receive path handles one frame at a time: it counts a
  frame, then sends it, on a 64-bit bus at 125 MHz. Sustained throughput for
  long frames is therefore about 4 Gb/s, and about 8 million frames/s for
  40-octet frames. A 10G port needs 31.25 million per second. Bursts up to
  the MAC Rx FIFO depth are absorbed.
- **Left to the host and the cores.** The 2-bit age field is stored for
  software: the driver's timer advances it (00 fresh, 01 idle, 10 timed
  out, 11 permanent) and clears the valid bit of a timed-out entry by an
  array write. A frame with a bad FCS is dropped and reported on `fcs_err`
  (a pulse) and `fcs_err_count`; how that report reaches the driver over
  PCIe is left open.
- **Not built.** The adaptor has no per-class queues of its own; their
  levels are inputs (`pdfc_level`). Averaging over several past pause
  periods, suggested as an improvement of PDFC, is not built.
- **`pcie_tx_if` outputs that never change.** Synthesis reports many
  constant output bits in `pcie_tx_if`. These are the fixed fields of the
  MWr descriptor (type, reserved bits, attributes), not a fault.

## Files

| file | contents |
|---|---|
| `rtl/eth_pcie_pkg.sv` | shared types (`axis_beat_t`, `route_entry_t`, `bdf_t`), FSM state enums, Ethernet and TLP constants, descriptor builder |
| `rtl/pcie_eth_adaptor.sv` | top level |
| `rtl/eth_parser.sv`, `rtl/mac_cam.sv`, `rtl/route_array.sv`, `rtl/output_addr_lookup.sv` | output address lookup |
| `rtl/axis_async_fifo.sv`, `rtl/axis_sync_fifo.sv` | MAC FIFOs and PCIe Tx FIFO |
| `rtl/pcie_tx_if.sv`, `rtl/pcie_rx_if.sv` | PCIe transmit and receive interfaces |
| `rtl/pdfc_queue_monitor.sv`, `rtl/pdfc_frame_gen.sv`, `rtl/pdfc_flow_ctrl.sv` | PDFC |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl \
          rtl/eth_pcie_pkg.sv tb/tb_pcie_eth_adaptor.sv \
          --top-module tb_pcie_eth_adaptor -o tb && ./obj_dir/tb
```

Substitute any other `tb_*` for the unit tests; modules are found through
`-Irtl`. `-Wno-fatal` keeps the lint warnings (unused signals and
parameters) from stopping the build.

`tb_pcie_eth_adaptor` runs the top at its default parameters. The PCIe
transmit interface is looped back into the PCIe receive interface, as in the
original functional simulation. The stimulus and checks are:

- **Reference frames.** It sends the four reference frames, one of them with
  a bad FCS. It checks every descriptor and payload against values computed
  in the testbench, and every frame that reaches the MAC transmit client.
- **Forwarding cases.** VLAN priority, unknown destinations, and a table
  write during traffic. A deleted entry, and 1514-octet frames against a
  stalled MAC.
- **Core faults.** Wait states from the core, a core error mid-payload, and
  an unsupported TLP.
- **PDFC.** One class queue is ramped through M and H. The generated PDFC
  frames are checked against the equations worked out by hand (T_M = 512,
  T_H = 4095) and fed back into the MAC receive side. The class must then
  stay paused for 4095 quanta.

Each of these mechanisms is counted, and one that never happens counts as a
failure.

The unit testbenches compare each block with an independent model:

- a reference queue for the FIFOs;
- a core model for the PCIe interfaces;
- integer evaluation of the PDFC equations;
- a frame parser for the PDFC frames.
