# UART-driven IEEE 1687 instrument access network

On-chip instruments (sensors, BIST engines, monitors) are usually reached
through an IEEE 1687 (IJTAG) network. That network is a reconfigurable scan
path driven by a JTAG TAP. This design drops the TAP. Instead, a host PC talks
to the network over an ordinary serial UART (8 data bits, no parity, 1 stop bit,
115200 baud).

Driving TDI/TCK bit by bit over a slow serial link would waste almost all of the
link on overhead. So the host sends a compact, command-level description of an
*apply group*: which instruments to read, which to write, and the write data. A
hardware master controller next to the network turns that description into the
full shift/capture/update sequence. The controller also throws away every bit
the network shifts out that the host did not ask for. As a result, the only
traffic on the serial line is:

* one 16-bit word per accessed instrument,
* one 16-bit word per apply group,
* the data bits themselves.

Reading one 8-bit instrument costs 40 bits on the line. Writing all 150
instruments of the default network costs 5216 bits, of which 2800 are data.

```
            rx ──►┌──────────────┐ rx_data/rx_done ┌──────────────────────────────────┐ tdi   ┌──────────────────────┐
  host PC         │     UART     │────────────────►│        master_controller         │──────►│    ijtag_network     │
            tx ◄──│  transceiver │◄────────────────│ interpreter → SCR ─┐             │ shift │ SIB0─SIB1─...─SIBN-1 │
                  └──────────────┘ tx_data/tx_send │ ILM ──────────► fsm_1687 ─► ODU  │ capt. │  │    │        │     │
                                                   │                                  │ upd.  │ SR0  SR1  ...  SRN-1 │
                                                   │                                  │◄──────│ inv  inv       inv   │
                                                   └──────────────────────────────────┘ tdo   └──────────────────────┘
```

## The network

`ijtag_network` is a flat 1687 network: a single chain of `NUM_INSTR` Segment
Insertion Bits (SIBs) between `tdi` and `tdo`. Each SIB hosts one segment, which
is a scan register connected in parallel to one instrument.

* **SIB (`sib`).** A shift flip-flop S and an update flip-flop U.
  * While `shift_en` is high, S loads from a host multiplexer. The multiplexer
    picks `tdi` when U = 0, so the segment is bypassed. It picks the segment's
    return `fso` when U = 1, so the segment is in the path.
  * `update_en` copies S into U.
  * Keeper multiplexers hold both flip-flops otherwise.
  * `tsi` (to the segment) is `tdi`. `to_sel` (segment selected) is U.
  * A synchronous `clr` closes the SIB. The controller uses it at the end of
    every group.
* **Instrument lengths.** Segment *i* is 8, 16 or 32 bits for *i* mod 3 = 0, 1
  or 2. Segment 0 is the one next to `tdi`. A 150-instrument network holds
  2800 data bits.
* **Instruments (`inverter_instrument`).**
  * Each instrument is a register that loads its scan register on an update.
  * It presents the bitwise inverse of its contents for the next capture.
  * So writing 0xAA and reading back gives 0x55. A never-written instrument
    reads all ones.
* **Scan register (`scan_register`).** It shifts (`tsi` enters at the top, bit 0
  leaves at `fso`) and captures only while its SIB is open.

## The serial protocol

All words are 16 bits, sent high byte first. For each apply group, the host
sends four things in order:

1. **Setup word, one per accessed instrument**, in any order.
   * Bits 15:14 are the command: `00` = read, `01` = write.
   * Bits 13:0 are the instrument address, where 0 is the instrument next to
     `tdi`.
   * Example: `00 00` reads instrument 0; `40 00` writes it.
2. **Apply word.**
   * Bit 15 = 1.
   * Bits 14:0 are the number of write-data bytes that follow (zero for a
     read-only group).
   * Example: `80 01` means one data byte follows.
3. **Write data.**
   * Instruments are sent in scan order, i.e. **highest address first**.
   * Within one instrument, the least significant byte comes first.
   * Each UART byte is sent LSB first, as usual.
4. **Read data comes back** on `tx` in the same order, packed the same way. Only
   the bits of instruments that were read are returned.

Addresses at or above `NUM_INSTR` are ignored. The 14-bit address field would
allow up to 16384 instruments. The package constant `MAX_INSTR` = 1000 is the
intended size limit.

### Host rule for groups that mix reads and writes

The link has no flow control, and the controller buffers only one incoming data
byte.

* A write-only group may be sent at full speed. The controller simply stalls the
  shift whenever the next data byte has not arrived yet.
* A group that mixes reads and writes needs one extra step: before sending the
  data of a write instrument, the host must wait until it has received all bytes
  read from instruments ahead of it in scan order, meaning those with higher
  addresses.
  * Reason: while those bytes are going out, the controller is stalled on the
    UART transmitter and cannot accept data.
  * If the host breaks the rule, a byte can be overwritten. The sticky `overrun`
    output then rises and stays high until reset.

## The master controller

`master_controller` wires together five blocks:

| block | role |
|---|---|
| `uart_interpreter` | Parses the byte stream. Setup words become writes into the SCR. The apply word raises `control_ready` and loads a data byte count. Data bytes are handed on through a one-byte valid/take register. |
| `sib_control_register` (SCR) | Two bits per instrument: off, read or write. The main FSM copies it and clears it when a group starts, so the host can queue the next group's setups while the current one runs. |
| `ilm` (Instrument Length Memory) | The length of every segment, read combinationally by the main FSM. A sequencer fills it with the 8/16/32 pattern in the `NUM_INSTR` clocks after reset, and `ready` holds off the first group until then. |
| `fsm_1687` | The main state machine. It stands in for the TAP controller and produces `tdi`, `shift_en`, `capture_en`, `update_en` and `sib_reset`. |
| `odu` (Output Discard Unit) | Keeps only the `tdo` bits of read segments and packs them into bytes. Hands the bytes to the UART and stalls the main FSM while it cannot take another bit. |

### One apply group, step by step

The group starts from IDLE once `control_ready` (and ILM `ready`) is high. Then:

1. **SHIFT_CONTROL.** `NUM_INSTR` clocks. Every SIB is closed at this point, so
   the path is exactly the S bits. The FSM shifts a 1 for every instrument whose
   SCR entry is not off, farthest SIB first.
2. **UPDATE_CONTROL.** One `update_en` pulse opens those SIBs. No segment is
   selected yet, so no instrument is loaded.
3. **CAPTURE.** One `capture_en` pulse. Each newly opened scan register loads
   the value of its instrument.
4. **SHIFT_DATA.** The FSM walks the new scan path from the `tdo` end, so the
   bit shifted first travels farthest:
   `S(N-1), [segment N-1], S(N-2), ..., S(0), [segment 0]`.
   * SIB bits are shifted again with their current value, which keeps the
     configuration.
   * A write segment receives host data. A new byte is needed every 8 bits;
     the shift stalls until it arrives.
   * A read segment receives zero dummy bits. The bits it pushes out at `tdo`
     are marked valid for the ODU. If the ODU cannot accept a bit (both of its
     byte registers are full while the UART is sending), the shift stalls.
   * Bits of SIBs and write segments reach `tdo` too, but they are not marked
     valid and the ODU discards them.
5. **UPDATE_DATA.** One `update_en` pulse loads every open segment into its
   instrument.
6. **RESET_STATE.** `fin` pulses and `sib_reset` closes every SIB. Back to
   IDLE.

**Timing.** Without stalls, a group takes 1 + N + 2 + P + 2 clocks, where P is
the length of the data-phase path (N + the lengths of the open segments). In
practice the group is paced by the UART. One byte takes `10 × CLKS_PER_BIT`
clocks, i.e. 8680 clocks at the defaults, against 1 clock per shifted bit.

## Where this design departs from, or fills in, the reference description

The reference design (a flat network with a UART port, plus its "full-featured"
controller) gives the block structure, the FSM state names, the SIB schematic,
the protocol's example byte sequences and the overhead figures. The points
below are this design's own.

* **All SIBs closed at the end of every group.** The reference FSM always
  shifts exactly `NUM_INSTR` configuration bits. That only works if every group
  starts from the all-closed network, so RESET_STATE closes every SIB through
  an added `sib_reset`/`clr` line.
* **Reads are destructive.** The data-phase update reaches every open segment,
  so an instrument that was read is loaded with the zero dummy bits. With the
  inverter instruments, a second read of the same instrument returns all ones.
  The reference does not say what a read leaves behind.
* **ILM contents are generated in hardware.** The reference describes the
  lengths both as sent by the host and as something that saves the host from
  sending them. The protocol has no length bytes, so the memory is filled from
  the fixed 8/16/32 pattern after reset. For other instrument lengths, change
  the `ilm` sequencer and `ijtag_pkg::instr_len`.
* **No wait in IDLE for the first data byte.** After CAPTURE the FSM goes
  straight to SHIFT_DATA and stalls there for missing write data. The result
  is the same shift sequence.
* **The reference output FSM's WRITE_WAIT state** is replaced by that stall plus
  the host rule above.
* **Encodings the reference does not give** are this design's choice:
  * byte and bit order of write data and read data,
  * the SCR codes (`00` off, `01` read, `10` write),
  * the interpreter-to-FSM handshake (`control_ready` held until the group
    starts),
  * the two-flop `rx` synchroniser and the stop-bit check in the UART.
* **Size check.** `NUM_INSTR` above the reference limit of 1000 stops
  elaboration with an error.
* **Reset** is asynchronous and active high everywhere.
* **`CLKS_PER_BIT` = 868** assumes a 100 MHz clock. The reference board has
  one, but the reference text does not state the clock frequency.

The cheaper variants the reference measures against are not built here:
* bit-banging the TAP signals over the UART,
* a controller without SCR/ILM/ODU,
* one without the ODU,
* one without the ILM.

The host-side software that translates PDL into bytes is also not included. A
task-based model of its encoding is in `tb/ijtag_host_tasks.svh`.

## Files

| file | contents |
|---|---|
| `rtl/ijtag_pkg.sv` | constants, SCR enum, `instr_len()` |
| `rtl/uart_transceiver.sv` | 8N1 receiver and transmitter |
| `rtl/sib.sv`, `rtl/scan_register.sv`, `rtl/inverter_instrument.sv` | network cells |
| `rtl/ijtag_network.sv` | chain of `NUM_INSTR` segments |
| `rtl/uart_interpreter.sv`, `rtl/sib_control_register.sv`, `rtl/ilm.sv`, `rtl/fsm_1687.sv`, `rtl/odu.sv` | controller parts |
| `rtl/master_controller.sv` | controller |
| `rtl/uart_ijtag_top.sv` | top: UART + controller + network |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/ijtag_host_tasks.svh` | host model and reference model shared by the two top-level testbenches |
| `tb/tb_uart_ijtag_top_full.sv` | the top at default size |
| `tb/tb_uart_ijtag_workloads_n50.sv`, `tb/tb_uart_ijtag_workloads_n100.sv` | the same apply groups on 50- and 100-instrument networks |
| `tb/ijtag_workload_groups.svh` | the apply-group sequence and bit counting shared by the three workload testbenches |

### Top-level ports (`uart_ijtag_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; asynchronous active-high reset |
| `rx`, `tx` | in/out | 1 | serial lines to the host |
| `busy` | out | 1 | a group is running, returned bytes are pending, or the ILM is still initialising |
| `fin` | out | 1 | one-clock pulse per completed group |
| `overrun` | out | 1 | sticky: a write-data byte was lost |
| `sib_open` | out | `NUM_INSTR` | U bit of every SIB, for observation |

### Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_INSTR` | 150 | instruments in the network (the largest size in the reference evaluation, which also uses 50 and 100) |
| `CLKS_PER_BIT` | 868 | clock cycles per UART bit (100 MHz / 115200) |

At the default size, synthesis gives about 6700 flip-flop bits:

* 5900 in the network: 2800 scan register bits, 2800 instrument bits and
  2 per SIB. The reference FPGA implementation of the same network reports
  5906 flip-flops.
* 722 in the controller, plus the 900-bit ILM memory. The reference controller
  reports 600 flip-flops.
* 62 in the UART.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes on its
own. Each also has a watchdog that counts a failure if the design hangs.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_uart_ijtag_top rtl/ijtag_pkg.sv tb/tb_uart_ijtag_top.sv
./obj_dir/Vtb_uart_ijtag_top
```

Replace the top module name to run any other testbench. The testbenches use
`$urandom` for stimulus and run correctly in a two-state simulator.

* **`tb_uart_ijtag_top`.** 12 instruments, 8 clocks per bit. The host model
  runs:
  * write 0xAA / read 0x55 on instrument 0,
  * write-all and read-all,
  * an empty group,
  * 20 random groups that mix reads and writes.

  After every group, it checks the returned bytes against a reference model. It
  also checks:
  * the SIB states at the data update,
  * that all SIBs are closed afterwards,
  * the number of configuration and data shift clocks,
  * `fin` and `overrun`.

  Finally, it requires each mechanism to have happened at least once: output
  stall, write-data stall, discarded and returned bits, SIBs opened and closed,
  read-only, write and mixed groups.
* **`tb_uart_ijtag_top_full`.** The top with no parameter overrides: 150
  instruments at 115200 baud. It runs the reference evaluation's apply groups
  and counts the bits exchanged on the serial line:

  | group | bits on the line (overhead + data) |
  |---|---|
  | read one 8-bit instrument | 40 (32 + 8) |
  | write one 8-bit instrument | 40 (32 + 8) |
  | write all 150 | 5216 (2416 + 2800) |
  | read all 150 | 5216 (2416 + 2800) |
  | BASTION TreeFlat: all written and read in one group each, then each instrument written and read in its own groups | 25632 (14432 + 11200) |

  These totals equal the overhead and useful-bit figures reported for the
  reference full-featured controller.
* **`tb_uart_ijtag_workloads_n50` and `tb_uart_ijtag_workloads_n100`.** The
  same groups on 50- and 100-instrument networks, at 16 clocks per bit to keep
  the runs short. The bit counts do not depend on the UART speed.

  | group | N = 50 | N = 100 |
  |---|---|---|
  | iRead 1 / iWrite 1 | 40 | 40 |
  | write all / read all | 1736 (816 + 920) | 3472 (1616 + 1856) |
  | BASTION | 8512 (4832 + 3680) | 17056 (9632 + 7424) |
 The run takes under a minute of
  simulation time on a desktop machine.
* **Block testbenches.**
  * The UART is tested at 16 clocks per bit, including framing errors.
  * The SIB, scan register, instrument and SCR are tested with random stimulus
    against small models.
  * The network is tested at 7 instruments, by shifting whole paths.
  * The FSM is tested at 8 instruments, against the real network and ILM.
  * The ODU and the controller are tested against a modelled transmitter.

## Known limitations

* No flow control on the serial link: see the host rule for mixed groups.
* A read overwrites the instrument with zeros.
* Instrument lengths must be whole bytes. The ODU sends only full bytes.
* The concurrent assertions use `disable iff (rst)` with the asynchronous reset.
  Some lint tools report that as a reset used both synchronously and
  asynchronously. It has no effect on synthesis.
