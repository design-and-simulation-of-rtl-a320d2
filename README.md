# I2C single master, three slaves

This is a small I2C system in synthesizable SystemVerilog. One master and three
slaves share a two-wire bus: SCL (clock) and SDA (data). The master
addresses a slave by its 7-bit address. It then sends a register address and
either writes data bytes into the slave or reads them back. Every byte on the
bus is followed by an acknowledge bit. The receiver pulls SDA low to
acknowledge (ACK), or leaves it high to refuse (NACK).

The design follows a published description of an I2C master/slave pair with
three slaves, whose simulated examples read:

| slave | address   | register  | data returned |
|-------|-----------|-----------|---------------|
| 1     | `1001001` | `1001010` | `00011101`    |
| 2     | `1000001` | `1001010` | `10000001`    |
| 3     | `1101011` | `1001010` | not given (preset here to `00000000`) |

These are the defaults of `i2c_top`. The end-to-end testbench repeats all
three reads.

## Files

| file | what it is |
|------|------------|
| `rtl/i2c_pkg.sv` | shared constants and enums (master states, slave states, bit quarters) |
| `rtl/i2c_top.sv` | master + three slaves + bus |
| `rtl/i2c_master.sv` | master state machine, with its clock divider and two FIFOs |
| `rtl/i2c_clk_gen.sv` | SCL clock divider with clock-stretch hold |
| `rtl/i2c_fifo.sv` | byte FIFO (the master's transmit and receive data registers) |
| `rtl/i2c_slave.sv` | slave with a 128-byte register file |
| `rtl/i2c_bus.sv` | open-drain lines as a wired-AND |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The bus: open drain as a wired-AND

No device ever drives a line high. Each device has one "pull low" output per
line, and a pull-up resistor returns the line high when nobody pulls. In
logic, each line is the NOR of all pull-low requests (`i2c_bus`). Every device
reads the resolved level back through its own `scl_i`/`sda_i`. Each
`*_pull_low` output maps directly onto the gate of an open-drain pad
transistor. The pads and the resistor are not modelled.

Two things follow from this:
- a slave can hold SCL low ("clock disable"), and the master sees it;
- an ACK is simply a slave pulling SDA low while the master has let go.

## Transfer format

```
write:  S | ADDR(7) W | A | REG(8) | A | DATA | A | DATA | A ... | P
read:   S | ADDR(7) R | A | REG(8) | A | DATA | a | DATA | a ... | DATA | N | P
          S = START, P = STOP, A = ACK from the slave,
          a = ACK from the master, N = NACK from the master
```

- START is SDA falling while SCL is high. STOP is SDA rising while SCL is high.
- The address and data are sent MSB first. R/W = 0 means write and 1 means read.
- **The register address is sent in the read transfer itself**, right after
  the address byte with R/W = 1. There is no repeated START. This follows
  the source design. It is not standard I2C: a standard device expects a
  write of the register address, then a repeated START and a read. So this
  master and slave work with each other, but not with off-the-shelf I2C
  parts for reads. Writes have the usual layout.
- The slave uses the low 7 bits of the register byte, one of 128 registers.
  The pointer steps on after every byte, so several bytes can be written or
  read in one transfer.
- During a read, the master ACKs every byte except the last one it asked for
  (`rd_len`), which it NACKs before STOP.
- After register 127 has been written in a transfer, the slave cannot accept
  any more bytes. It NACKs the next byte and drops it, and the master
  then sends STOP.
- If no slave ACKs the address, the master goes straight back to Ready
  without a STOP, as the state diagram below shows, and raises `ack_err`.
  The unaddressed slaves are idle and resynchronise at the next START.

## Bit timing and clock stretching

This is the part that needs the most care. `i2c_clk_gen` divides the
system clock so that each SCL bit has four equal quarters of
`QUARTER = CLK_HZ / (4*SCL_HZ)` cycles:

```
quarter   Q0      Q1      Q2      Q3
SCL       low     high    high    low
SDA       change  stable  stable  stable
                  ^ master samples SDA at the Q1/Q2 boundary
```

START and STOP use the same frame. START lowers SDA in Q1 with SCL high.
STOP holds SDA low through Q0 and Q1, then releases it in Q2 with SCL high.

The master sends the pull-low outputs through a register, and reads SCL/SDA
through two-flop synchronizers. When it releases SCL at the start of Q1, its
synchronized SCL therefore reads low for about three more cycles, even on a
free bus. A naive "stop counting while SCL reads low" rule would slow every
bit by those cycles. The divider instead ignores `hold` during the first
`HOLD_GRACE` (4) counts of each quarter. After that, `hold` freezes the
counter for as long as SCL stays low. So:

- on a free bus, a bit is exactly `4*QUARTER` cycles (500 cycles, i.e.
  100 kbit/s, at the defaults);
- when a slave stretches SCL, the high quarter starts only once SCL is
  really high.

The minimum `QUARTER` is `HOLD_GRACE + 3 = 7`. An elaboration-time assertion
enforces it.

Slaves oversample the bus with the system clock: two synchronizer stages
plus one edge-detect stage. A slave changes SDA 3 cycles after it sees SCL
fall, which is well inside the two low quarters. The master and the slaves
must share the system clock, or at least have comparable ones.

A slave stretches the clock when its `stretch` input is high. It must be
addressed (`selected`), and the hold starts at the next SCL falling edge.
SCL is held low until `stretch` drops. When a real slave would need this
(for example, waiting for data) is left to the integrator.

Transfer time, from the cycle `ena` is sampled to the `done` pulse, with no
stretching:

```
write or read of N data bytes:  4*QUARTER * (2 + 9*(N+2)) + 1 cycles
address not acknowledged:       4*QUARTER * 10 + 1 cycles
```

## Master state machine

| state  | SCL / SDA activity | leaves to |
|--------|--------------------|-----------|
| Ready  | both released | Start when `ena` is high |
| Start  | START condition | Sl_sel |
| Sl_sel | 7 address bits + R/W, then samples ACK | Rw_c on ACK; Ready on NACK |
| Rw_c   | one clock cycle, chooses on R/W | RD or WR |
| WR     | register address, then each byte from the transmit FIFO, ACK sampled after each | Stop on NACK or when the FIFO is empty |
| RD     | register address (ACK sampled), then receives `rd_len` bytes into the receive FIFO | Stop after the last byte or on NACK |
| Stop   | STOP condition, `done` pulse | Ready |

`bit_cnt` counts 0–7 for data bits, and 8 is the acknowledge slot. The
state encoding is `i2c_pkg::m_state_e` and appears on `i2c_top.master_state`.

User side of the master (also the ports of `i2c_top`):
- `ena`, `rw`, `address[6:0]`, `reg_addr[7:0]`, `rd_len[3:0]`: the request,
  sampled in Ready. `rd_len` of 0 counts as 1.
- `tx_push`/`data[7:0]`/`tx_full`: load the bytes to write **before**
  raising `ena`. A write sends whatever the FIFO holds. After a data NACK,
  any bytes not yet sent stay queued for the next write.
- `rx_pop`/`rx_data`/`rx_empty`: show-ahead receive FIFO.
- `busy`, `done` (one-cycle pulse), `ack_err` (an ACK was expected and not
  received).

The FIFOs are 4 deep by default (`FIFO_DEPTH`), so a single write carries
at most 4 data bytes. A read of more than 4 bytes needs `rx_pop` while the
transfer runs.

## Slave

`i2c_slave` detects START, STOP and both SCL edges from its synchronized
inputs. It receives the address and compares it with `SLAVE_ADDR`. On a
match it pulls SDA low for the ACK clock. Then it takes the register byte,
and either stores or returns bytes as described above. Reset clears all 128
registers and loads `PRESET_DATA` at `PRESET_REG`; that is how the example
bytes get into slaves 1 and 2. Because of that reset, the register file
synthesizes to flip-flops (about 1 kbit per slave). Drop the reset loop if
you want a RAM.

## Parameters (defaults)

| parameter | default | origin |
|-----------|---------|--------|
| `SCL_HZ` | 100 000 | standard-mode rate of the source design |
| `CLK_HZ` | 50 000 000 | own choice |
| `QUARTER` | `CLK_HZ/(4*SCL_HZ)` = 125 | own choice |
| `FIFO_DEPTH` | 4 | own choice |
| `S1_ADDR`, `S2_ADDR`, `S3_ADDR` | 1001001, 1000001, 1101011 | source design |
| `PRESET_REG` | 1001010 | source design |
| `S1_DATA`, `S2_DATA` | 00011101, 10000001 | source design |
| `S3_DATA` | 00000000 | own choice |
| `REG_AW` (slave) | 7 | source design (7-bit register field) |

At 50 MHz, fast mode (`SCL_HZ = 400_000`) gives `QUARTER = 31`, about 403
kbit/s (`tb_i2c_fast_mode` runs it). The source design also lists the 3.4 Mbit/s high-speed mode.
That mode needs `QUARTER >= 7`, so a system clock of at least 95.2 MHz.
Its own signalling (master code, current-source pull-up) is not
implemented.

## What is this design's own, and what it leaves out

Taken from the source design:
- the block split (core logic FSM, FIFO data register, clock divider);
- the master states and their transitions;
- 7-bit addresses, 8-bit data, the R/W coding and ACK = SDA low;
- the register address sent before the data of a read;
- NACK from the master after the last byte read;
- NACK from a slave that can accept no more;
- the slave clock-disable path on SCL;
- one master with three slaves, and the addresses and data above.

Own choices:
- the system clock;
- the four-quarter bit timing and the stretch grace window;
- FIFO depth and handshake;
- the 128-byte register file with an auto-incrementing pointer and a preset
  byte;
- the `stretch` input;
- the slave 3 preset value;
- an asynchronous active-low reset.

The source design also credits a slave with a "negative acknowledgement"
when it matches. This RTL follows its other statement, and I2C itself:
a match pulls SDA low.

Not built:
- multi-master arbitration (mentioned only as future work);
- the high-speed mode signalling;
- 10-bit addressing and general call (never described);
- repeated START;
- the electrical side of the bus.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/i2c_pkg.sv tb/tb_i2c_top.sv --top-module tb_i2c_top -o sim
./obj_dir/sim
```

Replace `tb_i2c_top` with any other testbench name.

| testbench | what it covers |
|-----------|----------------|
| `tb_i2c_top` | whole system at the default parameters (100 kbit/s from 50 MHz). Runs the three example reads, multi-byte write and read, a write past register 127 (slave NACK), an absent address (NACK, back to Ready), and a read with clock stretching. A bus monitor decodes every byte and ACK bit from SCL/SDA, and the data is compared with a reference copy of every slave's registers. The time of every transfer is checked to the cycle. The test counts each mechanism and every master state, and fails if any never occurs. Runs in well under a second. |
| `tb_i2c_fast_mode` | whole system at `SCL_HZ = 400_000`. Checks the example reads, the transfer time, and a measured SCL period of 124 cycles. |
| `tb_i2c_master` | the master against a behavioural slave written in the testbench (QUARTER = 16). Covers ACK/NACK handling in every state, the leftover FIFO bytes after a data NACK, and stretch timing. |
| `tb_i2c_slave` | a slave driven by a bit-banged master: address match and mismatch, the preset byte, auto-increment, the full NACK, and stretching only when addressed. |
| `tb_i2c_clk_gen` | quarter length, quarter sequence, the hold grace window, hold stretching, idle with `run` low. |
| `tb_i2c_fifo` | 3000 cycles of random push/pop against a queue model. |
| `tb_i2c_bus` | all pull-low combinations. |

Assertions check the bus rules while simulating:
- the master and the slaves change SDA only while SCL is low, apart from
  START and STOP;
- at most one slave is selected;
- no FIFO overflow or underflow.

## Size

After coarse synthesis, `i2c_top` has about 1 200 word-level cells and
3 200 flip-flop bits. Almost all of the flip-flops are the three 128-byte
slave register files. The master alone is about 230 cells, 61 flip-flops and
two 4×8 FIFO memories.
