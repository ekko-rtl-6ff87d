# EKKO microcontroller system in SystemVerilog

EKKO is a small, open microcontroller meant for an FPGA. Its CPU is a
two-stage RV32IMC RISC-V core, and a JTAG debug unit loads programs and controls
the CPU. Around them sit 128 KB of on-chip RAM, an AXI4-Lite peripheral bus and
three peripherals: two 64-bit timers and an I2C master. One timer
serves as the tick of a real-time operating system. The I2C master talks to
sensors and clock chips.

This repository holds the part of EKKO that is its own logic: the system
bus, the RAM, the AXI4-Lite bridge and interconnect, the timer and the I2C
peripheral, all joined in the top module `ekko_top`. The CPU and the
debug unit are existing cores and are **not** included. Their bus ports are
ports of `ekko_top`, so either core can be attached, and a testbench can play
them.

```
 CPU instr port ─┐                              ┌─ RAM 128 KB      0x00000-0x1FFFF
 CPU data port  ─┼─ system_bus ─────────────────┼─ debug module    DEBUG_BASE (4 KB)
 debug host     ─┘  (arbiter + decoder)         └─ axi_master ── axi_interconnect
                                                                   ├─ timer 0  0x20000
                                                                   ├─ timer 1  0x21000
                                                                   └─ i2c      0x22000
 timer 0 irq ── CPU timer interrupt         timer 1 irq, i2c irq ── top-level ports
```

The design uses one clock (40 MHz in the reference system) and one active-low
asynchronous reset.

## Memory map

| Region | Address | Size | Notes |
|---|---|---|---|
| RAM | 0x00000 – 0x1FFFF | 128 KB | code and data below 0x1E000; the stack is the top 8 KB, from 0x1E000 (a linker convention, not hardware) |
| Timer 0 | 0x20000 – 0x20FFF | 4 KB | system tick; its interrupt is the CPU timer interrupt |
| Timer 1 | 0x21000 – 0x21FFF | 4 KB | general purpose |
| I2C | 0x22000 – 0x22FFF | 4 KB | |
| Debug module | 0x1A110000 (`DEBUG_BASE`) | 4 KB | requests go out on `dm_req_o` |
| anything else | | | answered with `err` set and zero data |

All the constants are in `rtl/ekko_pkg.sv`.

## The system bus

All hosts speak one request/grant/valid protocol, carried as the packed
structs `obi_req_t` {req, we, be, addr, wdata} and `obi_rsp_t` {gnt, rvalid,
rdata, err}. A host:

1. holds `req` with its address, write flag, byte enables and data until it
   sees `gnt`;
2. then waits for `rvalid`, which carries the read data, or confirms a write.

This is the CPU's native memory interface, and the debug unit's bus host uses
the same protocol.

`system_bus` serves the hosts one at a time, by fixed priority:

1. the debug host;
2. the CPU data port;
3. the instruction fetch.

A host that loses waits with `gnt` low: this is the bus stall. Only one
transaction is in flight. The next request can be granted in the cycle in
which the previous answer arrives. All hosts see the same `rdata`, and
`rvalid` goes only to the host that owns the transaction. The signals
`req_ram_o` and `req_axi_o` show which target the current request goes to.

Latencies, counted from the grant to `rvalid`:

| Access | Cycles | Notes |
|---|---|---|
| RAM | 1 | back-to-back accesses run at one per cycle |
| unmapped address | 1 | answered with an error |
| peripheral write | 5 | |
| peripheral read | 4 | |

A peripheral access passes through the AXI master, the interconnect and the
peripheral's register port. The CPU waits for all of this, because nothing
overlaps.

## The AXI4-Lite path

`axi_master` turns one bus access into one AXI4-Lite transaction:

- A write raises AW and W together; each drops at its own handshake, and then
  the master waits for B. The byte enables become WSTRB.
- A read raises AR and then waits for R.
- SLVERR or DECERR comes back as `err` on the bus.

`axi_interconnect` decodes the address and latches which slave it chose. That
takes one cycle. It then connects the master's channels straight to that
slave until the response handshake. Writes and reads are routed
independently. An address outside the three windows gets DECERR from the
interconnect itself. The system bus already sends only the three windows to
the AXI master, so this case arises only when the interconnect is reused
elsewhere.

Each peripheral uses the helper `axil_reg_slave`, which turns AXI4-Lite into a
simple register port:

- one write strobe with address, data and byte strobes;
- one read strobe whose data is sampled in the same cycle.

The AXI channels are the packed structs `axil_req_t` and `axil_rsp_t`, so a
whole channel set is one port.

## Timer

Each timer has a 64-bit counter and a 64-bit compare value. It is split into
two modules:

- a datapath, `timer_datapath`, which counts while `count` is high, clears
  while it is low, and raises `done` when the counter equals the compare value;
- a control unit, `timer_control_unit`.

The control unit has three states:

- **IDLE**: waits for a start.
- **COUNT**: counts until `done`.
- **STOP**: one cycle. It raises the interrupt if INT is set, then goes back
  to COUNT if AUTO RELOAD is set, and otherwise to IDLE.

Clearing EN forces IDLE from any state.

Registers, at byte offsets from the timer's base:

| Offset | Register | Bits |
|---|---|---|
| 0x00 | conf | 31 START (write 1 to start, reads 0) · 30 EN · 29 INT · 28 AUTO RELOAD · 27 OVERFLOW · 26:0 unused, stored |
| 0x04 | value_high | counter[63:32], read only |
| 0x08 | value_low | counter[31:0], read only |
| 0x0C | cmp_high | compare[63:32] |
| 0x10 | cmp_low | compare[31:0] |

Timing:

- The counter starts at 0 and counts one per clock.
- With AUTO RELOAD set, the interrupt pulses every **compare + 2** cycles:
  the counter runs 0…compare, and STOP adds one cycle.
- The first pulse comes compare + 4 cycles after the AXI write of START is
  accepted.
- For a 10 ms tick at 40 MHz, software loads 400,000. The period is then
  400,002 cycles, which is 10.00005 ms.
- A 5-minute interval at 40 MHz is a compare value of 1.2·10¹⁰. It needs the
  upper compare word, and it fits easily in 64 bits.

The interrupt is a one-cycle pulse per overflow.

OVERFLOW is a status bit:

- With INT off, it is set when the compare value is reached, and software
  clears it by writing 0 to it.
- With INT on, it is held at 0, because the interrupt reports the event
  instead.

Writing a 1 to OVERFLOW leaves it unchanged. So a read-modify-write of another
bit does not clear it by accident.

The two counter words are read separately. A read of both while the timer
counts is therefore not atomic.

## I2C master

The I2C peripheral is the most involved block. `i2c` holds the registers, and
`i2c_master` runs the bus, one complete transaction per START. `i2c_master`
joins two parts:

- a control unit, `i2c_control_unit`, the state machine below. Each cycle it
  tells the datapath the SCL level, what to do with SDA and the shift
  register, and when to sample.
- a datapath, `i2c_datapath`. It drives the SCL and SDA lines and times the
  SCL half periods with a counter. It also holds the address, the bytes to
  send, the shift register, the acknowledge and the received byte.

### Registers

| Offset | Register | Bits |
|---|---|---|
| 0x00 | conf0 | 31:16 PRESCALER · 13 INT · 12 EN · 11 VALID RX · 10 VALID TX · 9 ERROR · 8 START (write 1, reads 0) · 7:0 address byte (bit 0 = R/W) |
| 0x04 | conf1 | bytes 0–3 to send; byte 0 in 31:24 |
| 0x08 | conf2 | bytes 4–7 to send; byte 4 in 31:24 |
| 0x0C | conf3 | 31:24 byte 8 to send · 23:16 DATA SIZE (bytes to write, at most 9) · 15:8 DATA RECEIVED (read only) |

- **Status bits.** VALID RX, VALID TX and ERROR are read only. They are
  cleared when a transaction starts.
- **Byte strobes.** Writes honour them, so the bytes of conf0 can be written
  one at a time.
- **When START acts.** START takes effect one cycle after the write that sets
  it. The address, size and data written in the same word are therefore
  already in place.
- **When START is ignored.** START is ignored while EN is 0 or a
  transaction is still running.
- **Interrupt.** It is a one-cycle pulse when a transaction ends with VALID
  TX or VALID RX while INT is set. An error does not interrupt; software sees
  it in ERROR.

### Transactions

A write is started with address bit 0 = 0. It sends:

1. a start condition;
2. the address byte;
3. DATA SIZE data bytes, byte 0 first;
4. a stop condition.

The slave must acknowledge each byte. A size of 0 sends only the address, and
sizes above 9 count as 9.

A read is started with address bit 0 = 1. It reads one register of a slave,
the usual way for sensors and clock chips. Byte 0 of conf1 is the register
number. The master sends:

1. a start condition;
2. the address with bit 0 cleared;
3. the register number;
4. a repeated start;
5. the address with bit 0 set.

It then reads one byte, answers it with NACK and sends a stop condition. The
byte lands in DATA RECEIVED.

The control unit steps through these states:

`START → ADDR → ADDR_ACK → WRITE → WRITE_ACK → (WRITE … | REPEATED_START → ADDR → ADDR_ACK → READ → READ_NACK) → STOP`

After ADDR_ACK, a flag set in REPEATED_START (`addr_sent`) chooses READ over
WRITE.

If a NACK arrives where an acknowledge was expected, the machine goes to
ERROR:

1. ERROR records the error;
2. the bus is released with a stop condition;
3. then the ERROR bit is set.

VALID TX, VALID RX or ERROR is set in the first cycle after the stop
condition. This is also the first cycle in which the peripheral accepts the
next START.

### Bit timing

One SCL half period lasts PRESCALER + 1 clock cycles:

- PRESCALER = f_clk / (2 · f_SCL) − 1;
- at 40 MHz this gives 199 for 100 kHz and 49 for 400 kHz;
- PRESCALER must be at least 3.

SDA changes in the middle of the SCL-low half. It is sampled in the middle of
the SCL-high half.

Phase lengths:

| Phase | Length |
|---|---|
| start condition | two half periods |
| repeated start | three half periods |
| stop condition | three half periods |
| write of n bytes | (23 + 18·n) · (PRESCALER + 1) cycles |
| read | 80 · (PRESCALER + 1) cycles |

A two-byte write in standard mode therefore takes 11,800 cycles (295 µs).

Both lines are open drain. `i2c_scl_o` and `i2c_sda_o` at 0 pull the line low,
and at 1 they release it, so the board provides pull-ups. The master does not
read SCL back, so it does not support clock stretching by slaves. There is no
high-speed mode (no master code).

## What is outside, and how to attach it

`ekko_top` ports:

- **CPU ports.** `cpu_instr_req_i`/`cpu_instr_rsp_o` and
  `cpu_data_req_i`/`cpu_data_rsp_o` map one-to-one onto the request,
  grant, valid, address, data and error signals of a RISC-V core with a
  request/grant memory interface. The core's error inputs may use `err`,
  which is set for unmapped addresses.
- **CPU timer interrupt.** `cpu_irq_timer_o` is timer 0's pulse. In the
  reference system the other interrupt inputs are tied low. `timer1_irq_o`
  and `i2c_irq_o` are ports, ready to be wired to fast interrupt inputs.
- **Debug unit.** `dbg_host_req_i`/`dbg_host_rsp_o` is the debug unit's bus
  host, through which it loads programs into RAM.
  `dm_req_o`/`dm_rsp_i` is the debug module's slave window, from which the
  CPU runs its debug code. Its base `DEBUG_BASE` = 0x1A110000 is the debug
  module's customary address. Change it in `ekko_pkg` to match the core's
  debug-module address parameter. The debug request from the debug module to
  the CPU does not pass through this design.
- **RAM contents.** `MEM_INIT_FILE` (a `$readmemh` file, empty by default)
  can preload the RAM for simulation. The RAM is not cleared by reset.

## Departures from the original EKKO description, and choices made here

Places where the original register tables and software disagreed, and the
software was followed:

- Timer EN, INT and AUTO RELOAD, and the compare registers, read back.
  The tables list them write-only. The driver updates single bits by
  read-modify-write, which needs them readable.
- Timer OVERFLOW is cleared by writing 0. The table lists it read-only, but
  the driver clears it that way.
- The I2C INT bit is read/write. The table lists it read-only, but the driver
  writes it.
- The timer's unused conf bits 26:0 are stored. The original bus test writes
  8 to 0x20000 (timer 0's conf) and reads 8 back, which needs those bits
  stored.

Choices of this design where the original gives no detail:

- the bus priority order and the one-transaction-in-flight rule;
- the error responder and the DECERR responder;
- all cycle latencies;
- the interrupt pulses;
- START acting one cycle after its write;
- the I2C bit timing within a half period, the master's NACK after a read,
  and ERROR ending with a stop condition;
- the timer clearing EN to IDLE;
- `DEBUG_BASE`.

The timer's STOP state costs a cycle, so an auto-reload period is compare + 2
rather than compare.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Two behavioural models are included:

- `i2c_slave_model` is a small real-time-clock-like I2C slave with 16
  registers that counts start and stop conditions. It is used by `tb_i2c_master`,
  `tb_i2c` and `tb_ekko_top`.
- `axil_mem_model` is an AXI4-Lite memory. It is used by `tb_axi_master` and
  `tb_axi_interconnect`.

To build and run one testbench with Verilator 5 (shown for the full system):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    rtl/ekko_pkg.sv $(ls rtl/*.sv | grep -v ekko_pkg) \
    tb/i2c_slave_model.sv tb/tb_ekko_top.sv --top-module tb_ekko_top -Mdir obj
./obj/Vtb_ekko_top
```

| Testbench | What it exercises |
|---|---|
| `tb_ekko_top` | The whole system at default sizes. It exercises bus collisions between three hosts, a program image loaded and fetched, stack writes, byte writes at the top of RAM, AXI round trips (including write 8 / read 8 at 0x20000), the timer-0 tick with auto reload and its period, timer 1 counting and its overflow flag, I2C write register 2 = 0x0A to a clock chip and read-back via repeated start, a NACK error, the I2C interrupt, a bus error and a debug-module access. It counts each of these mechanisms and fails if one never happened. |
| `tb_system_tick` | The reference system's timer set-up at 40 MHz: timer 0 as a 10 ms tick (a pin toggled per tick gives 50 Hz) and timer 1 loaded for 5 minutes and read as elapsed seconds. It simulates 2 million cycles. |
| `tb_system_bus` | Random traffic from three hosts against RAM, AXI, debug and unmapped targets; priority; one RAM access per cycle. |
| `tb_ram` | Word and byte writes, read latency. |
| `tb_axi_master`, `tb_axi_interconnect` | Random transactions with random ready delays; decode; DECERR. |
| `tb_timer_control_unit`, `tb_timer_datapath`, `tb_timer` | The state sequence against a reference model, counting and compare, and the register behaviour and interrupt timing. |
| `tb_i2c_datapath` | Half-period timing for several prescalers, SCL and SDA commands, address and data loading with the 9-byte limit, shifting out and in, acknowledge sampling. |
| `tb_i2c_control_unit` | The state sequence of each kind of transaction, the end pulses, the number of bytes loaded and the transaction lengths. |
| `tb_i2c_master`, `tb_i2c` | Writes of 0–9 bytes, reads, NACK on address and data, SCL period (16 cycles, and 400 cycles in standard mode), transaction lengths, register fields and interrupt. |

The 5-minute overflow itself (1.2·10¹⁰ cycles) is checked only arithmetically.
