# SPAC: a Manchester-coded serial control link for front-end boards

This design is a control network for detector front-end boards. One master sits at the end of an optical link. It reaches up to 15 slave chips in a crate through a shared copper bus. Each slave chip sits on a board and gives the master two ways into it:

- a byte-wide parallel bus to the board's registers and memories;
- two I2C buses to the board's I2C components.

The link is half-duplex, at 10 Mbit/s with Manchester coding. The master asks and exactly one slave answers. Every line is duplicated for redundancy:

- **Downstream lines MS1 and MS2.** The master sends each frame on one of them and leaves the other idle.
- **Upstream lines SM1 and SM2.** A slave always answers on both.

A slave finds the active downstream line by itself. It recovers the bit clock from the data. It tolerates a ±10 % difference between its 40 MHz clock and the master's.

The RTL contains the master protocol engine, the complete slave chip, and a top that wires one master to 15 slaves the way the crate bus does.

## Line code and frame format

**Bits.** Each bit lasts 100 ns, which is 4 cycles of the 40 MHz clock. There is always a transition in the middle of a bit:

- a 1 is low then high;
- a 0 is high then low;
- the idle line is low.

**Words.** Everything is sent in 9-bit words: a data byte, least significant bit first, followed by a *continue* bit. The continue bit is 1 when more words follow and 0 on the last word of the frame. A word therefore lasts 0.9 µs.

**Frames.** A frame is:

| word | content |
|------|---------|
| preamble | `$35`, continue 1 |
| address | bit 7 = direction (1 master→slave, 0 slave→master), bits 6:0 = slave address |
| sub-address | bit 7 = R/W (1 = read), bits 6:0 = resource on the board |
| data | 0 … n bytes |
| checksum | sum modulo 256 of all bytes after the preamble, continue 0 |

**Write frames.** A write frame carries the bytes to write. The slave does not answer it.

**Read requests.** A read request carries the number of bytes wanted in its data field:

- an empty field means one byte;
- otherwise the count is one byte, or two bytes with the low byte first.

The slave answers with address word `{0, own address}`, the same sub-address word, the bytes, and a checksum.

**Addresses.** The values below are choices of this design (`spac_pkg`):

| address | meaning |
|---------|---------|
| `$7F` | global broadcast: every slave executes the write |
| `$70 + g` | local broadcast to group g (g = 0…14, set by the `bcast_group` pins; a slave in group 15 gets only global broadcasts) |
| others | point-to-point |

Broadcasts are write-only. Sub-addresses `$7C…$7F` reach the slave's internal I2C registers, and every other sub-address goes to the parallel bus.

**Interrupt frame.** When a slave receives a corrupted frame, it holds SM1/SM2 high for 1 µs (40 cycles). This happens only when its `intr_en` pin is high. A frame is corrupted if:

- the preamble is wrong;
- the checksum is wrong;
- the frame ends inside a word;
- bits follow the last word.

Manchester data is never high for more than one bit period, so the master (`intr` output) and the slaves recognise this as a level held high.

## Timing of a transaction

- The master sends words back to back.
- A slave starts its answer one word time (0.9 µs) after the request ends.
- A write of n bytes therefore takes (n + 4) × 0.9 µs.
- A read takes (request words + answer words + 1) × 0.9 µs.

| bytes | write | read |
|------:|------:|-----:|
| 1 | 4.5 µs | 9.0 µs |
| 2 | 5.4 µs | 10.8 µs |
| 4 | 7.2 µs | 12.6 µs |
| 15 | 17.1 µs | 22.5 µs |

`tb_spac_table2` runs all eight operations from a master to a slave and measures these times on the wire to within 50 ns. `tb_spac_slave` and `tb_spac_network` check the read times too.

An I2C access costs far more. Each I2C byte takes 9 SCL periods (3.6 µs at 2.5 MHz), on top of the SPAC frames that:

- load the FIFO;
- start the transfer;
- poll the status;
- read the result.

With the sequence used in `tb_spac_table2` (status polled back to back), the totals at 2.5 MHz are:

| bytes | I2C write | I2C read |
|------:|------:|-----:|
| 1 | 28.6 µs | 33.3 µs |
| 2 | 29.5 µs | 35.1 µs |
| 4 | 40.7 µs | 46.2 µs |
| 15 | 88.0 µs | 93.5 µs |

These totals depend mostly on how the host polls: the status read alone is a 9 µs round trip.

## Clock recovery (`spac_sampler`, `spac_manch_dec`)

This is the least obvious part of the design.

**Sampling.** The slave samples each serial input on both edges of its 40 MHz clock, through two-flop synchronisers. That gives one sample every 12.5 ns, eight per bit.

**Locking on.** The decoder processes the two new samples of each cycle in time order and locks onto the *mid-bit* transitions:

1. The first transition accepted must be rising (the first bit of `$35` is a 1), because a frame starts from an idle low line.
2. After accepting a transition, the decoder ignores transitions for `ACCEPT - 1` = 5 half cycles. A bit-boundary transition comes 4 half cycles after a mid-bit one.
3. The next transition after that window is the next mid-bit transition. The new line level is the bit value.
4. No transition for `TIMEOUT` = 12 half cycles (1.5 bits) means the frame is over (`frame_end`).
5. A high level lasting `BRK_HALVES` = 32 half cycles (0.8 µs) is an interrupt frame (`brk_det`).

**Clock tolerance.** The decoder re-times itself on every bit, so it works over ±10 % clock offset. `tb_spac_manch_dec` runs streams at +8, −8, +10 and −10 %, and `tb_spac_slave` runs a whole transaction with the master clock 9 % slow and 9 % fast.

**Duty cycle.** Because both clock edges are used, the margins also depend on the slave clock's duty cycle. A duty cycle far from 50 % shifts every other sample.

**Measured margins.** `tb_spac_clock_margin` runs a master and a slave on separate clocks. With the slave at 40 MHz, transfers are error-free with the master clock anywhere from 80 % to 125 % of nominal. At nominal frequency, they are error-free for slave duty cycles from 10 % to 90 %. The simulation has ideal edges and no jitter, so margins in silicon are smaller.

**Tuning.** To retune the decoder for a different ratio of clock to bit rate, keep these conditions:

- `ACCEPT` must lie between the boundary transition (half a bit) and the next mid-bit transition (one bit);
- `TIMEOUT` must exceed one bit plus the worst clock offset.

## Finding the active line (`spac_line_sel`)

`spac_line_sel` watches the sample groups of MS1 and MS2. It moves to the other line when both of these hold:

- that line rises;
- the current line has had no transition for 16 half cycles (two bits), which is longer than any gap inside a frame.

The switch is decided on the very samples that are passed on to the decoder. This way, the first edge of a frame on the newly chosen line is not lost. A frame in progress never loses its line. A line stuck high or low is abandoned at the first frame on the other line. The `line_sel` output shows the line in use.

## The slave chip (`spac_slave`)

```
ms1, ms2 -> spac_sampler x2 -> spac_line_sel -> spac_manch_dec -> spac_frame_rx
         -> spac_slave_ctrl -> spac_par_if  (sub-addresses $00..$7B)
                            -> spac_i2c_if  (sub-addresses $7C..$7F)
         -> spac_frame_tx -> spac_manch_enc -> sm1 = sm2
```

**`spac_frame_rx`** cuts the bit stream into words. It checks the preamble and then the checksum, and reports each data word with its position.

**`spac_slave_ctrl`** is the protocol engine:

- It matches the address against the slave's own address, the global broadcast address and its group's address.
- It sends write bytes to the resource as they arrive. Blocks can be of any length, so nothing is buffered. The checksum is therefore only known after the writes, and a corrupted write frame can already have changed the board. The interrupt frame is how the master learns of it.
- For a read, it waits for the end of the frame and a good checksum. Then it waits out the turnaround and streams the answer, fetching each byte from the resource while the previous byte is being sent.
- A read request with more than two count bytes is ignored.

**`spac_frame_tx`** and **`spac_manch_enc`** build the answer. The transmitter holds one byte. When no byte is ready at a word boundary, it closes the frame with the checksum. It also produces the interrupt frame.

**Timing constant.** `spac_slave` sets the controller's `TA_CYCLES` so that the answer starts exactly 0.9 µs after the request ends, once the synchroniser and decoder delays are counted.

**Reset.** `rst_n` is asynchronous and active low. It comes from an external power-on reset on the board.

### Parallel interface (`spac_par_if`)

Byte-wide access to the board:

- `pi_addr`: the 7-bit sub-address, which selects a register or memory.
- `pi_idx`: the byte number inside a block, 16 bits, counting from 0 within the frame.
- `pi_wdata`: the byte to write.
- `pi_wr` and `pi_rd`: one-cycle strobes.

Read data on `pi_rdata` is sampled `RD_WAIT` = 2 cycles after `pi_rd`. Wider registers are handled by the board as consecutive bytes.

### I2C interface (`spac_i2c_if`, `spac_i2c_master`, `spac_fifo`)

The slave drives the board's two I2C buses through four internal registers:

| sub-address | register |
|-------------|----------|
| `$7C` DATA | write: push into the 16-byte emission FIFO; read: pop from the 16-byte reception FIFO (0 when empty) |
| `$7D` CFG | byte 0: bits 3:0 divider, bit 4 bus select |
| `$7E` CMD | byte 0: I2C address byte (device address and R/W); byte 1: data length 0…15, and writing it starts the transfer |
| `$7F` STAT | bit 0 busy, bit 1 no-acknowledge, bit 2 emission FIFO empty, bit 3 reception FIFO empty |

**Clock and bus outputs.** SCL runs at 40 MHz / (16 × (div + 1)), from 2.5 MHz (div = 0) down to 156 kHz (div = 15). The buses are open-drain: `scl_oe`/`sda_oe` pull a line low, and `sda_i` reads it back.

**Transfers.** A transfer is START, the address byte, the data bytes, then STOP:

- write data comes from the emission FIFO;
- read data goes to the reception FIFO, with the last byte not acknowledged.

**Error cases.** A missing acknowledge, or a write that finds the emission FIFO empty, stops the transfer and sets the no-acknowledge bit. There is no repeated start, no clock stretching and no multi-master arbitration.

**Typical sequence** (the one `tb_spac_slave` runs):

1. Write the pointer and data bytes to DATA.
2. Write `{dev<<1|0, n}` to CMD.
3. Poll STAT.
4. For a read: write `{dev<<1|1, n}` to CMD, wait, then read n bytes from DATA.

## The master (`spac_master`)

The master takes one command at a time on a valid/ready interface. A command gives:

- read or write;
- the address and sub-address;
- the byte count;
- the downstream line to send on (`ms_sel`) and the upstream line to listen to (`sm_sel`).

**Writes.** Write bytes stream in on `wd_valid`/`wd_ready`.

**Reads.** For a read, the master checks the answer's address word, sub-address word, length and checksum, and delivers the bytes on `rd_valid`/`rd_data`.

**Completion.** `done` pulses at the end, with `ok`. A read ends with `ok` = 0 when either of these happens:

- no answer comes within `ANS_TIMEOUT` = 400 cycles (10 µs);
- an interrupt frame comes instead of the answer.

The command interface stands in for the VME interface of a master board.

## The network top (`spac_network`)

`spac_network` holds one `spac_master` and `NSLAVES` = 15 `spac_slave`s.

**Lines.** The master's line outputs (`mst_ms1/2`) and the crate bus inputs (`bus_ms1/2`) are separate ports, because the optical link and the controller board that join them are outside this design. A testbench simply connects them. The slaves' upstream outputs are ORed onto `bus_sm1/2`, since the lines idle low and only one slave talks at a time.

**Per-slave ports.** The slaves' configuration pins and board-side buses are arrays of ports, indexed by slave.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=… failures=…` and has a watchdog. `tb/i2c_dev_model.sv` is a behavioural I2C memory: its first written byte sets the pointer, unless it is built with `HAS_PTR = 0`.

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl --top-module tb_spac_network \
    rtl/spac_pkg.sv rtl/*.sv tb/i2c_dev_model.sv tb/tb_spac_network.sv
./obj_dir/Vtb_spac_network
```

The testbenches use delays in ns and µs, so the `--timescale 1ns/1ps` option is needed.

**`tb_spac_network`** runs the full-size network (15 slaves, default parameters) end to end. It exercises and counts each of these at least once:

- point-to-point writes and reads;
- the read timing of the table above;
- global and local broadcasts;
- traffic on MS2 and SM2;
- an answer timeout to a missing slave;
- an interrupt frame from a corrupted frame;
- an I2C transfer.

**`tb_spac_table2`** measures the transfer times above.

**`tb_spac_clock_margin`** sweeps the master clock frequency and the slave clock duty cycle and prints the errors at each point. It requires no errors within ±10 % and for duty cycles of 40–60 %.

**Unit testbenches** check the timing they depend on:

- SCL period and the duration of I2C transfers;
- encoder bit period and word length;
- decoder clock tolerance;
- parallel-bus strobe timing.

## Choices this design makes

The protocol fixes the line code, word and frame structure, preamble, rates, address widths, FIFO sizes, the I2C limits and the interrupt frame. The following were left open and were chosen here:

- checksum = sum of the bytes modulo 256;
- broadcast address values (`$7F`, `$70…$7E`) and the internal sub-addresses (`$7C…$7F`) with their register layout;
- answer turnaround of one word time, chosen because it reproduces the measured read times exactly;
- the clock-recovery algorithm and its thresholds, and the line-selection rule. The whole slave runs on its 40 MHz clock with clock enables; it does not derive separate 10 and 20 MHz bit clocks;
- the parallel-bus handshake, the I2C transfer format, and the master's command interface and timeout;
- writes executed before the checksum is known, as described above;
- an upstream bus modelled as a wired OR.

**Not included:** the VME interface, the optical links and controller board, the analog monitoring line, LVDS pads, the power-on-reset cell and the clock source. The top brings out the signals where these would connect.
