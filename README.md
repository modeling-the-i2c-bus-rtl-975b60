# A layered I2C master and EEPROM in SystemVerilog

This is an I2C bus controller built as a stack of small protocol layers.
Each layer is a state machine that turns the units it understands into the
units of the layer below:

- at the top, whole transactions ("write these 3 bytes to 0x50, then read
  8 bytes back");
- below that, byte actions (START, write a byte, read a byte, STOP);
- below that, bus symbols (START, STOP, a 0 bit, a 1 bit);
- at the bottom, levels on the two open-drain wires, SCL and SDA.

A master is the full stack, from transactions down to the wires. A slave
is the same stack used the other way round. Its top layer is a set of four
callbacks: *address*, *read*, *write* and *stop*. The slave built here
behind those callbacks is a 24AA256-style serial EEPROM: 32 KB, 64-byte
write pages.

The layering follows an executable Haskell model of the I2C protocol (the
thesis *Modeling the I2C Bus*). That model was tested against a real
24AA256. Its point is that each layer has a narrow, precisely defined
interface, so that the layers can be tested, and eventually proved
correct, one at a time. This RTL keeps those interfaces as hardware
interfaces. Each layer is a separate module with its own testbench.

The top module, `i2c_system`, puts a master stack and the EEPROM slave
stack on one bus. A third pair of open-drain drivers is brought out to
ports, so that testbench logic or other hardware can share the bus: a
second master, or a device that stretches the clock. Beside the bus
stands a *direct path*: the same transaction applied straight to a second
EEPROM through the four callbacks, with no bus at all. It is the reference
that the wire-level path must match. A third path connects a second master
stack and a third EEPROM at the symbol level, one bus symbol per clock.

```
 host ── txn / reply ──┐                          ┌── hs_req / hs_rsp ── i2c_eeprom
                 i2c_hmaster                 i2c_hslave_adapter
                  act │ ▲ res                  react │ ▲ ev
                 i2c_bmaster                     i2c_bslave
             next_sym │ ▲ sym            release_sda │ ▲ sym
              i2c_smaster_device             i2c_sslave_device
                      │ ▲  (uses i2c_symbol_reader)  │ ▲
                  i2c_timing                      i2c_timing
                      │ ▲                            │ ▲
                      └─┴──────── i2c_bus ───────────┴─┘ ◄── ext_*_drive_low
                               (wired-AND, SCL + SDA)

 host ── same descriptors ── i2c_hslave_run ── hs_req / hs_rsp ── second i2c_eeprom
                                 (direct path: no bus, one call per clock)

 host ── same descriptors ── i2c_hmaster ─ i2c_bmaster ─┐
                                                  i2c_symbol_merge ── bus symbol register
   third i2c_eeprom ─ i2c_hslave_adapter ─ i2c_bslave ─┘    (symbol-level path: one symbol per clock)
```

## How the layers talk: one call per step

This convention is the part of the design that is hardest to follow. Most
of the timing behaviour comes from it.

In the reference model every layer is a function of the form
`state -> input -> (state, output)`. The lower layer calls the upper one
only when it has something to report:

- a symbol was seen;
- a byte action has finished;
- a byte has been received.

The upper layer answers at once with what it wants next. The RTL maps each
such call onto one clock cycle:

- The lower layer raises a valid flag (`sym_valid`, `res_valid`,
  `ev_valid`, `up_valid`) and presents the event.
- The upper layer answers **combinationally in the same cycle**
  (`next_sym`, `act`, `react`, `up_next`, `hs_rsp`).
- Both layers update their registers on the clock edge that ends the
  cycle.
- A layer that is not called keeps its state and drives a harmless default
  answer.

So a whole stack moves by at most one event per step, and a step is one
clock cycle. No layer can see its own answer within a cycle, so the stack
never forms a combinational loop. Each module computes its upward event in
an `always_comb` block that does not look at the answer. The next-state
logic that uses the answer is a separate block.

Two places need a look-ahead, and both behave as in the model:

- **Acknowledge after a read (byte master).** When a byte has been read,
  the master must send ACK if another byte follows and NACK otherwise.
  The byte layer therefore reports the byte first and takes the *next*
  action in the same call. It then sends ACK (0) if that action is another
  READ, and NACK (1) otherwise.
  - A consequence: the action that follows a read can still fail, with
    arbitration lost or an undefined condition, during that acknowledge
    bit.
- **Read address (slave adapter).** When the address byte of a read
  arrives, the adapter issues *address* and *read* in the same cycle. The
  EEPROM applies them in that order: it decides the ACK, then returns the
  first byte to send. The request is fixed before the response, so the
  request never depends on the response.

## Wires and timing (`i2c_timing`, `i2c_bus`)

`i2c_bus` is the wired-AND. A line is high unless some device pulls it
low. The model merges the devices' outputs the same way in each step.

`i2c_timing` sits between each device and the wires. It does three jobs:

- **Sampling.** A two-flop synchronizer delivers `bus_sample` two clocks
  late.
- **Stepping.** A divider emits a `step` pulse every `STEP_DIV` clocks.
  The device above acts only on step cycles, so `STEP_DIV` sets the bit
  rate. One data bit takes two master steps when no one stretches the
  clock.
- **Driving.** The device asks for a line state (`dev_bus`, 1 = release).
  The timing layer applies changes one line at a time:
  1. a falling SCL goes first, immediately;
  2. then SDA changes;
  3. then SCL rises.

  Every change except a falling SCL waits until `EDGE_GAP` clocks have
  passed since the previous change. So SDA is set up before SCL rises and
  held after SCL falls. It changes while SCL is high only when the device
  means a START or STOP. The model asks only for this ordering (SDA first
  before a rising SCL, with set-up time). The synchronizer, the divider
  and the gap counter are this design's own.

`STEP_DIV` must be 1 or larger than `2*EDGE_GAP + 4`. This ensures a step
sees the lines that the previous step asked for. An initial assertion
checks it.

With a 50 MHz clock, the master defaults give:

- `STEP_DIV = 250`: 5 µs steps, which puts SCL in Standard mode;
- `EDGE_GAP = 13`: 260 ns, above the 250 ns data set-up time of Standard
  mode.

In `i2c_system` the slave side uses `S_STEP_DIV = 1`: it samples every
clock, so it never misses a transition the master makes.

## Symbol layer

### Symbol reader (`i2c_symbol_reader`)

The symbol reader is shared by masters and slaves. It compares each sample
with the previous one, and remembers one bit: whether the receiver is
*active*.

| previous → current                       | symbol reported                      | receiver |
|------------------------------------------|--------------------------------------|----------|
| SCL high, SDA 1 → 0                      | START                                | inactive |
| SCL high, SDA 0 → 1                      | STOP                                 | inactive |
| SCL 1 → 0                                | bit = previous SDA, only if active    | active   |
| both lines high, receiver inactive       | IDLE (bus free)                      | —        |
| anything else                            | nothing                              | —        |

A bit is reported when SCL falls, with the SDA value seen while SCL was
high. The first SCL fall after a START or STOP reports nothing; it only
makes the receiver active. IDLE means the last symbol was STOP and both
lines are high. IDLE is the only symbol reported without any line changing,
so an idle master is called once per step and can start when it likes.

### Master symbol generator (`i2c_smaster_device`)

The master generator produces each requested symbol as a sequence of wire
states. It holds each state until the bus actually shows it. So a device
that holds SCL low (clock stretching) just delays the sequence; no extra
logic is needed.

| state           | requests                          | leaves when                                  |
|-----------------|-----------------------------------|----------------------------------------------|
| `TX_IDLE`       | both lines released               | the layer above asks for a symbol            |
| `TX_START_WAIT` | both released, then SDA low       | the bus shows SCL high / SDA low             |
| `TX_STOP_WAIT`  | SCL high, SDA low                 | seen: release both (STOP)                    |
| `TX_BIT_PREP`   | SCL low with SDA = bit            | SCL seen low: release SCL                    |
| `TX_BIT_WAIT`   | SCL released, SDA = bit           | SCL seen high: pull SCL low and release SDA  |

While SCL is low, SDA is released. The model names this as the simplest of
several possible choices.

The layer above must follow the model's sequencing rules, or extra symbols
appear on the bus:

- no START directly after a START or an IDLE;
- no STOP directly after a STOP or an IDLE;
- no IDLE between two bits.

The byte master always follows these rules.

### Slave symbol layer (`i2c_sslave_device`)

The slave side reports the symbols it reads, and keeps one register: the
SDA decision returned by the layer above. That decision turns the next
1 bit into a 0 bit. With no symbol, the register holds. A slave here never
drives SCL: the model accepts clock stretching but does not generate it.

## Byte layer

### Byte master (`i2c_bmaster`)

| action   | symbols sent                              | possible results                    |
|----------|-------------------------------------------|-------------------------------------|
| START    | START                                     | OK, UNDEF                           |
| STOP     | STOP                                      | OK, UNDEF                           |
| WRITE b  | 8 data bits, MSB first, then a released 1 | OK (ACK), NACK, ARB_LOST, UNDEF     |
| READ     | eight released 1s                         | READ b, UNDEF                       |
| IDLE     | nothing                                   | OK at the next symbol               |

Errors are detected as follows:

- **Arbitration loss (`ARB_LOST`):** the master sent a 1 and read a 0.
- **Undefined condition (`UNDEF`):** any other unexpected symbol, such as
  a START in the middle of a byte, or a bit where a STOP should be.

After an arbitration loss, the layer stays silent and calls up again only
after a STOP. A START from another master while this one is idle also
marks the bus busy until the next STOP.

### Byte slave (`i2c_bslave`)

Events go up on four occasions:

- START;
- STOP;
- every received byte;
- every transmitted byte that the master acknowledged.

The reaction is one of three:

- **RECEIVE:** acknowledge, if the event was a received byte, and receive
  the next byte.
- **TRANSMIT b:** acknowledge likewise, then send b.
- **IDLE:** ignore the bus until the next START or STOP. A received byte
  is then not acknowledged.

The transfer ends silently in two cases:

- the slave sent a 1 and read a 0 (arbitration loss);
- the master did not acknowledge a transmitted byte (NACK).

For an IDLE reaction to a received byte, the layer uses the corrected
behaviour that came out of the model's randomized testing.

## Transaction layer

### Transaction master (`i2c_hmaster`)

A transaction is a list of 1 to `MAX_MSGS` messages, each a read or a
write to a 7-bit address.

Each message:

- starts with START and its address byte;
- for a read of N bytes, reads N bytes, acknowledging all but the last.
  With `variable` set, the value of the first byte is added to N; this is
  the SMBus block read, whose first byte is a length.

The transaction ends with a single STOP. Messages after the first start
with a repeated START.

Each message gets a reply (`msg_reply_t`):

- `acked`: whether its address was acknowledged;
- `count`: bytes read, or written bytes that were acknowledged.

A NACK of an address or of a written byte aborts the transaction: the
master sends STOP at once, and the remaining messages get `acked = 0`. A
message with `non_critical` set continues instead. This is for the I2C
START byte, for example, which is never acknowledged.

An arbitration loss or undefined condition ends the transaction at once
with status `TR_ARB_LOST` or `TR_UNDEFINED`. Retrying is up to the host.

Host handshake:

1. The host sets `txn_valid` and holds `n_msgs`, `msgs` and `wr_data`
   steady.
2. `txn_ready` pulses when the master takes the transaction. This happens
   only while the bus is free. The host then drops `txn_valid`, but must
   keep the descriptors until the reply.
3. `reply_valid` pulses with `reply_status`.
4. `replies` and `rd_data` keep their values until the next transaction
   is taken.

An assertion rejects three kinds of transaction:

- empty transactions;
- reads of size 0, which the model forbids;
- writes longer than `MAX_BYTES`.

### Slave adapter (`i2c_hslave_adapter`)

The adapter turns byte events into calls to the slave:

| event                     | call                                            | reaction                                     |
|---------------------------|-------------------------------------------------|----------------------------------------------|
| START                     | —                                               | receive                                      |
| first byte after START    | *address*(byte[7:1], read = byte[0]), plus *read* for a read address | IDLE if not acknowledged, else TRANSMIT first byte / receive |
| later byte                | *write*(byte)                                   | receive if acknowledged, else IDLE           |
| master ACK                | *read*                                          | TRANSMIT the returned byte                   |
| STOP                      | *stop*                                          | —                                            |

## The EEPROM (`i2c_eeprom`)

The EEPROM behaves like the 24AA256, including two behaviours that the
model's authors found only by testing the real part.

- **Address register.** The register has `ADDR_BITS` = 15 bits and is set
  by the first two bytes of a write message, MSB first. It is a shift
  register: a write that supplies only one address byte shifts in one
  extra bit, 1 if a repeated START follows and 0 if a STOP follows.
- **Reads.** A read returns the byte at the register and increments it,
  wrapping at the end of storage. A read can be any length.
- **Writes.** Data bytes go to a page buffer at the register's offset,
  wrapping inside the 64-byte aligned page.
  - Only a STOP copies the buffer to storage.
  - A repeated START discards it.

Two choices are this design's own:

- **Written mask.** The model copies the whole page into the buffer on the
  first data byte. Here each buffer byte has a "written" bit instead, and
  the commit writes only the marked bytes. Storage ends up the same, and
  no full page read is needed.
- **Commit time.** The commit writes one byte per clock, so it takes
  `PAGE_BYTES` clocks. During that time `busy` is high and the device does
  not acknowledge its address, as the real part does during its (much
  longer, 5 ms) write cycle. The model itself has no write time.

The storage is a plain array (`2**ADDR_BITS` bytes) and is not reset.
There is no write-protect pin.

## The direct path (`i2c_hslave_run`)

What should a slave see when the master runs a given transaction? The
model's answer is a function that skips every layer and calls the slave
directly. `i2c_hslave_run` is that function as a small state machine, one
call per clock:

1. *address*(addr, direction). If the slave refuses, the message gets a
   NACK reply.
2. For a write, *write* each byte until the slave refuses one. The reply
   counts the accepted bytes.
3. For a read, *read* `len` bytes. With `variable`, the value of the first
   byte is added to the size.
4. After a refusal in a message without `non_critical`, the remaining
   messages get NACK replies. Either way, exactly one *stop* ends the
   transaction.

The status is always success, because nothing can be lost without a bus.

In the top, this block drives a second EEPROM with the same parameters. It
reads the same descriptors (`n_msgs`, `msgs`, `wr_data`) as the
transaction master, under its own handshake (`d_txn_valid`,
`d_txn_ready`), and returns its reply on `d_*` ports. If the same
transactions go both ways, the two replies and the two memories must stay
equal. The end-to-end testbench checks exactly that.

The direct path is fast enough to reach its EEPROM while that EEPROM is
still committing a page, which the wires never are. So a host must not
start it while `d_eeprom_busy` is high.

## The symbol-level path

The model can also join devices one layer higher, at the symbol level. The
top does this with a second transaction master and byte master, and a
third EEPROM behind its own adapter and byte slave:

- A register holds the symbol on the bus in this clock.
- Every clock, both byte layers are called with that symbol. The master
  answers with the symbol it wants next, and the slave answers with its
  SDA decision for the next bit.
- The merge below combines the two answers into the next bus symbol.

So one symbol takes one clock, with no wires, timing or symbol layers. The
byte layers cannot tell the difference: over the wires they are also
called once per symbol, and they see their own symbols echoed back, with a
slave's 0 winning over a master's 1.

With a single master the merge can never report a race or a deadlock, and
an assertion checks this. The path shares the descriptors with the other
two (`s_txn_valid`, `s_txn_ready`, replies on `s_*`). Like the direct
path, it is fast enough to reach its EEPROM during a page commit, so the
host waits while `s_eeprom_busy` is high.

## Symbol-level bus (`i2c_symbol_merge`)

The model can also connect devices directly at the symbol level, without
wires. It then has to decide what symbol a step produces when several
masters and slaves disagree. `i2c_symbol_merge` is that decision as
combinational logic:

- A 0 bit from any master wins.
- A 1 bit against a slave pulling SDA low gives a 0 bit.
- A 1 bit together with another master's START or STOP is a **race**, the
  I2C "undefined condition". `race` is set; `sym` is the bit (0 against
  STOP, 1 against START) and `alt_sym` is the START or STOP.
- A slave pulling SDA low while no master sends a bit is a **deadlock**.
- Otherwise STOP beats START, and START beats IDLE.

The symbol-level path uses a copy for one master and one slave. A second
copy, for `SM_MASTERS` masters and `SM_SLAVES` slaves, stands beside the
system with its own `sm_*` ports, so that races and deadlocks can be
driven from outside.

## Top level (`i2c_system`)

| parameter         | default | meaning                                           |
|-------------------|---------|---------------------------------------------------|
| `M_STEP_DIV`      | 250     | clocks per master step (sets the bit rate)        |
| `S_STEP_DIV`      | 1       | clocks per slave step                             |
| `EDGE_GAP`        | 13      | clocks between line changes                       |
| `MAX_MSGS`        | 4       | messages per transaction                          |
| `MAX_BYTES`       | 32      | stored bytes per message                          |
| `EEPROM_BUS_ADDR` | 7'h50   | EEPROM bus address                                |
| `ADDR_BITS`       | 15      | EEPROM data address bits (32 KB)                  |
| `PAGE_BYTES`      | 64      | EEPROM write page                                 |
| `SM_MASTERS`      | 2       | masters at the symbol-level merge                 |
| `SM_SLAVES`       | 1       | slaves at the symbol-level merge                  |

Most of the logic is EEPROM storage: 262,656 memory bits per EEPROM,
counting the page buffer, and the top has three EEPROMs, one per path.
Each transaction master, and the direct path, holds about 1,100
flip-flops of reply tables at the defaults.

## Where this departs from the model, and what is missing

Departures:

- **Fixed tables.** Transactions and data use fixed-size tables
  (`MAX_MSGS`, `MAX_BYTES`), where the model uses lists of any length.
  Read bytes beyond `MAX_BYTES` are counted but not stored.
- **Step timing.** Step rates and edge gaps are concrete numbers here. The
  model leaves timing to an abstract lowest layer.
- **EEPROM.** It uses the written mask and a short busy time (see above).
- **Transaction master.** It inserts one idle step between a reply and the
  next transaction.
- **Direct and symbol-level paths.** These run one call or one symbol per
  clock, and their hosts must wait out the EEPROM's commit time. The model
  has no time at all, so the question does not arise there.

Missing:

- generation of clock stretching by slaves (accepted, not generated);
- bus clear;
- ten-bit addressing;
- retries;
- the SMBus/PMBus layers.

The model leaves all of these out too; it sketches some of them as
possible extensions.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs. To run one with Verilator, from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_i2c_system \
    -y rtl -Irtl rtl/i2c_pkg.sv tb/tb_i2c_system.sv --Mdir obj_sys
./obj_sys/Vtb_i2c_system
```

Replace `tb_i2c_system` with any other testbench name.

| testbench                | what it checks                                                                                      |
|--------------------------|-----------------------------------------------------------------------------------------------------|
| `tb_i2c_system`          | End to end, all parameters at their defaults (81 ms of simulated time, about 10 s to run). Details below the table.     |
| `tb_i2c_symbol_reader`   | Directed sequences and 4000 random samples against a reference parser.                              |
| `tb_i2c_smaster_device`  | Symbols looped back through a wired-AND: one-for-one echo, exact step counts per bit, stretching.   |
| `tb_i2c_sslave_device`   | Symbols reported, SDA follows the last answer, SCL never pulled.                                    |
| `tb_i2c_bmaster`         | 3000 random actions against a symbol-level bus, with ACK, NACK, arbitration loss, undefined condition and busy bus. |
| `tb_i2c_bslave`          | 600 random frames with a random upper layer: receive, transmit, NACK, loss, IDLE reactions.         |
| `tb_i2c_hslave_adapter`  | Random events and slave answers against the call table.                                             |
| `tb_i2c_hslave_run`      | 2000 random transactions on a table-driven slave: exact call list, replies, one clock per call.     |
| `tb_i2c_hmaster`         | 2000 random transactions; exact action sequence, replies, bytes read.                               |
| `tb_i2c_eeprom`          | 1500 random messages against a reference; busy window; full storage compare.                        |
| `tb_i2c_timing`          | Step period, synchronizer delay, change ordering and gaps.                                          |
| `tb_i2c_bus`             | All driver combinations.                                                                            |
| `tb_i2c_symbol_merge`    | All 500 combinations of three masters and two slaves.                                               |

`tb_i2c_system` in detail:

- It runs 160 random transactions against a transaction-level reference
  EEPROM: page writes with wrap-around, random reads, and wrong addresses,
  both critical and non-critical.
- It also covers writes cut by a repeated START, partial addresses, and
  SMBus-style block reads.
- It then adds clock stretching, an arbitration loss and an undefined
  condition caused by a third device, and checks a step budget for each
  transaction.
- It applies every single-master transaction again on the direct path and
  on the symbol-level path. Their EEPROMs start as copies of the first.
  Replies and bytes must equal those that came over the wires.
- At the end it compares all three 32 KB memories with the reference,
  counts 17 mechanisms, and requires each of them to have occurred.

The two-state simulator does not model X. Whatever the logic reads is reset
or written first. The EEPROM storage starts with random contents, and the
testbenches copy them into their reference models.
