# AXI4 master and memory slave

An AMBA AXI4 slave moves data over five independent channels: write address (AW),
write data (W), write response (B), read address (AR) and read data (R). Each channel
moves one item whenever its source holds VALID high and its destination holds READY
high in the same clock cycle. A transaction is a *burst*: one address and control
item, then 1 to 256 data beats whose addresses the slave works out for itself.

This RTL is a point-to-point AXI4 system. It has one master (`axi4_master`) and one
memory slave (`axi4_slave`), wired together in `axi4_system`. The slave is the
interesting part. It accepts FIXED, INCR and WRAP bursts of 1 to 256 beats with
1-, 2- or 4-byte beats and byte strobes. It stores the data in a 512 KiB memory and
returns it on reads. Each response is tagged with the ID of the request it answers.
The master is a plain command-driven traffic source that drives the slave and checks
its answers.

The design follows the AXI4 slave of the paper *UVM Based Test Bench to Verify AMBA
AXI4 Slave Protocol*. That paper describes the slave's behaviour and its bus signals,
not its internal structure. The internal structure here (state machines, memory
organisation, pipelining) is this design's own. The section "Where this design makes
its own choices" lists every point that goes beyond the reference.

## Bus parameters

| field | width | notes |
|---|---|---|
| address (AxADDR) | 32 | byte address |
| data (WDATA, RDATA) | 32 | 4 byte lanes |
| strobe (WSTRB) | 4 | one bit per byte lane |
| ID (AWID, ARID, BID, RID) | 4 | 16 IDs |
| length (AxLEN) | 8 | beats - 1, up to 256 beats (AXI4) |
| size (AxSIZE) | 3 | bytes per beat = 2^size; 0..2 are useful on a 32-bit bus |
| burst (AxBURST) | 2 | 0 FIXED, 1 INCR, 2 WRAP |
| lock / cache / prot | 2 / 4 / 3 | carried, ignored by the slave |
| qos / region | 4 / 4 | carried, ignored by the slave |
| response (BRESP, RRESP) | 2 | 0 OKAY, 2 SLVERR |

The payload of each channel is a packed struct defined in `axi4_pkg`:
`ax_chan_t` for AW and AR, and `w_chan_t`, `b_chan_t` and `r_chan_t` for the others.
VALID and READY are separate one-bit signals next to the struct. The write data
channel has no ID, as in AXI4.

## Burst addressing

All of the slave's address arithmetic is in `axi4_burst_addr`. This combinational
unit maps the current beat address to the next one. Let `bytes = 2^size`. Then:

- **FIXED**: the next address equals the current one. Every beat goes to the same
  location, as with a FIFO register.
- **INCR**: `next = align_down(addr, bytes) + bytes`. An unaligned start address
  therefore moves only the first beat. From the second beat on, beats fall on
  multiples of the beat size. For example, a 4-beat, 4-byte burst from `0x00001000`
  uses `0x1000, 0x1004, 0x1008, 0x100C`.
- **WRAP**: the burst lives in an aligned block of `(len+1) * bytes` bytes. For the
  legal wrap lengths of 2, 4, 8 and 16 beats, that block size is a power of two. With
  `mask = block - 1`, the next address is
  `(addr & ~mask) | ((align_down(addr) + bytes) & mask)`. It steps like INCR but wraps
  to the block's lower end when it passes the upper end. For example, an 8-beat,
  4-byte WRAP burst from `0x38` uses `0x38, 0x3C, 0x20, 0x24, … 0x34`.

The reserved burst type 3 behaves as INCR. The unit does not check the AXI rule that
a burst must not cross a 4 KiB boundary: keeping to it is the master's job.

Narrow beats (size 0 or 1) use only the byte lanes of their address. The slave writes
exactly the lanes whose WSTRB bit is set, so correct narrow and unaligned writes need
the matching strobes from the master. On a read, the slave returns the whole word,
and the master takes the lanes it asked for.

## The slave

```
            +---------------------- axi4_slave -----------------------+
 AW,W ----> | axi4_slave_write --(write port)--> axi4_slave_mem        |
 B   <----  |   (axi4_burst_addr)                     |                |
 AR  ---->  | axi4_slave_read  --(read port)---------+                 |
 R   <----  |   (axi4_burst_addr)   <---- rd_data (1-cycle latency)    |
            +----------------------------------------------------------+
```

The write side and the read side are independent. The memory has a write port and a
read port, so a write burst and a read burst can be in progress in the same cycles.
Each side takes one burst at a time. A second address waits in the master until the
current burst of that direction has finished.

### Write side (`axi4_slave_write`)

The write side steps through three states:

1. **ADDR**: when AWVALID is seen, AWREADY is raised in the next cycle. An address is
   therefore always accepted exactly one cycle after the master first drives it. The
   handshake latches ID, address, length, size and burst type.
2. **DATA**: WREADY is held high. Each accepted beat goes straight to the memory
   write port at the current beat address, with its strobes. After that the address
   steps through `axi4_burst_addr`. The beat count taken from AWLEN ends the burst.
3. **RESP**: BVALID is raised in the cycle after the last beat. BID equals the
   burst's AWID, and BRESP is OKAY. BVALID and BID stay put until BREADY.

If WLAST is missing from the last beat, or appears on an earlier one, the burst still
ends after AWLEN+1 beats, but the response is SLVERR.

### Read side (`axi4_slave_read`)

1. **ADDR**: ARREADY is raised one cycle after ARVALID, as on the write side.
2. **DATA**: a beat is fetched from the memory whenever the R output is empty or being
   emptied in this cycle (`!RVALID || RREADY`). The memory's output register is the
   RDATA register. A fetch in cycle *n* therefore shows up as RVALID with data in
   cycle *n+1*. RVALID stays low until data is really there.

   RID is the latched ARID, RRESP is OKAY, and RLAST marks beat ARLEN+1. While RREADY
   is low the beat, including its data, is held: the memory is simply not read again.
   After the beat with RLAST has been taken, the side returns to ADDR.

### Memory (`axi4_slave_mem`)

The memory holds `2^WORD_W` words of 32 bits (default `WORD_W = 17`, 512 KiB). Writes
are byte-strobed. The synchronous read has one cycle of latency. If a read and a write
hit the same word in one cycle, the read returns the old contents. Memory contents are
not reset. The slave decodes byte-address bits `[WORD_W+1:2]` and ignores the higher
bits, so the memory repeats every 512 KiB of address space.

### Timing

All figures below assume the other side never stalls:

| event | cycle |
|---|---|
| AxVALID first high | 0 |
| AxREADY high, handshake | 1 |
| write: beats accepted | 2 … 2+len (one per cycle when WVALID is high) |
| write: BVALID | the cycle after the last beat |
| read: first RVALID | 3 (fetch in cycle 2, data in cycle 3) |
| read: further beats | one per cycle while RREADY is high |

With these figures, a 4-beat read delivers its beats in four back-to-back cycles.

Every AXI output of the slave comes from a register, or from a decode of registers.
No slave AXI input reaches a slave AXI output through logic, as AXI requires. Reset
is synchronous and active low (`aresetn`).

## The master (`axi4_master`)

The master's user side has these ports:

- A write command port and a read command port. Each command is an `ax_chan_t` with
  valid/ready.
- A write data port that feeds a 16-entry FIFO.
- A one-cycle `wr_done` pulse that carries BID and BRESP.
- A read beat port (`rd_beat`, `rd_beat_valid`, `rd_ready`).

Each direction runs one burst at a time:

- **Write**: AWVALID is held until AWREADY. The W beats are then taken from the FIFO,
  with WLAST set on beat AWLEN+1. BREADY is raised, and the B response is passed to
  `wr_done`. Write data always follows the address handshake.
- **Read**: ARVALID is held until ARREADY. R beats then pass to the user. RREADY
  follows `rd_ready`.

The master checks every answer. BID must equal AWID, RID must equal ARID, and RLAST
must mark exactly the last beat. A miss sets the sticky `resp_err` output, which only
reset clears. All of the master's AXI outputs come from registers. RREADY depends on
the user's `rd_ready`, but not on any AXI input.

## Top level (`axi4_system`)

`axi4_system` instantiates the master and the slave and joins them over the five
channels. It brings out:

- the master's user ports;
- `resp_err`;
- copies of all five channels (`mon_*`), so that a bus monitor or waveform viewer can
  follow the traffic.

It has two parameters: `WORD_W` (slave memory depth) and `WFIFO_DEPTH` (master write
FIFO).

## Checks built into the RTL

Concurrent assertions check the VALID/READY rule on the outputs of each block: once
VALID is high, VALID and the payload stay unchanged until READY. Verilator checks
them when run with `--assert`.

## Where this design makes its own choices

The reference fixes the bus widths, the five channels and the VALID/READY handshake.
It also fixes the three burst types and the timings "address accepted one cycle after
it is driven" and "RVALID low until data is available". Finally, it fixes the rules
BID = AWID, RID = ARID, BRESP = OKAY and RLAST on the final beat. Everything below is
this design's own:

- **AxLEN width**: AxLEN is 8 bits (AXI4, up to 256 beats). The 4-bit AXI3 length
  field is not supported.
- **Extra and missing signals**: WSTRB, QOS and REGION are included. There is no
  write data ID (WID).
- **One burst per direction**: each direction handles one burst at a time. There are
  no outstanding transactions and no reordering. AXI permits both, but the reference
  traffic does not need them.
- **Memory**: the size (512 KiB), the synchronous read and the address aliasing above
  it are this design's choices.
- **Error response**: SLVERR for a misplaced WLAST is an addition. Otherwise every
  response is OKAY. Exclusive access (lock) is not supported.
- **Stall-free slave**: WREADY stays high for the whole data phase. The slave never
  inserts wait states of its own, apart from the one-cycle address acceptance and the
  memory latency.
- **Master**: the user-side ports and the write FIFO are new. The reference uses its
  master only as a stimulus source.
- **Single link**: the system is one master on one slave. A multi-master, multi-slave
  AXI interconnect (up to 16 of each) is outside this design.

## Testbenches

Each testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The shared reference address
model is in `tb/axi4_ref_pkg.sv`. It computes beat addresses with integer division
instead of the masks the RTL uses, so the two are independent.

| testbench | what it checks |
|---|---|
| `tb_axi4_burst_addr` | 9,000 random FIXED/INCR/WRAP cases against the reference; a full INCR walk and a full WRAP walk |
| `tb_axi4_slave_mem` | random strobed writes and same-cycle reads against a byte model; read latency; read-during-write; hold |
| `tb_axi4_slave_write` | AWREADY one cycle after AWVALID; beat addresses, data and strobes at the memory port; B timing, BID, hold under BREADY low; SLVERR on a misplaced WLAST |
| `tb_axi4_slave_read` | ARREADY timing; beat data, RID, RLAST; first beat two cycles after the handshake and one beat per cycle; R held under back-pressure |
| `tb_axi4_slave` | the full slave over AXI: the reference sequence, then concurrent random writes and reads with gaps, against a byte model of the memory |
| `tb_axi4_master` | the master against a randomly stalling slave model: AW/W/AR payloads, WLAST, pass-through of B and R, and detection of a wrong BID, a wrong RID and a missing RLAST |
| `tb_axi4_system` | end to end at the default sizes (see below) |

The reference sequence has two parts:

1. Five INCR write bursts, each of 4 beats of 4 bytes. They use IDs 1 to 5 and start
   at `0x00001000`, `0x00011000`, `0x00021000`, `0x00031000` and `0x00041000`. Burst
   *k* carries the words `0x000k0001` to `0x000k0004`.
2. Five read bursts of the same addresses.

`tb_axi4_system` runs this sequence with its cycle counts. A write completes 8 cycles
after its command is presented, and a read delivers its last beat 8 cycles after its
command. The testbench then runs concurrent random traffic. It counts how often each
of these happened, and fails if any count is zero:

- an address accepted one cycle late;
- each burst type, and a WRAP burst actually wrapping;
- narrow beats, partial strobes and unaligned starts;
- gaps in the write data;
- read back-pressure;
- a write burst and a read burst in flight together.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/axi4_pkg.sv tb/axi4_ref_pkg.sv tb/tb_axi4_system.sv \
    --top-module tb_axi4_system -Mdir obj_tb_axi4_system
./obj_tb_axi4_system/Vtb_axi4_system
```

Replace the testbench name to run another one. Leave out `tb/axi4_ref_pkg.sv` for
`tb_axi4_slave_mem` and `tb_axi4_master`, which do not use it. Every testbench runs in
well under a second. Verilator has only two logic states, so every signal that is read
is reset or initialised. The one exception is the slave memory, whose unwritten
contents start at whatever value the simulator chooses. The testbenches only compare
bytes that have been written.

## Files

- `rtl/axi4_pkg.sv`: widths, channel structs, burst and response enums.
- `rtl/axi4_burst_addr.sv`: next-beat address unit.
- `rtl/axi4_slave_mem.sv`: the slave's two-port, byte-strobed memory.
- `rtl/axi4_slave_write.sv`: the slave's write side.
- `rtl/axi4_slave_read.sv`: the slave's read side.
- `rtl/axi4_slave.sv`: the slave.
- `rtl/axi4_fifo.sv`: small valid/ready FIFO, used for the master's write data.
- `rtl/axi4_master.sv`: the master.
- `rtl/axi4_system.sv`: the top level, master plus slave.
- `tb/`: one testbench per module above (except the FIFO), plus `axi4_ref_pkg.sv`.
