# AXI4 master and memory slave

This is a small, complete AXI4 system in synthesizable SystemVerilog: one
master and one memory slave joined by the five AXI channels. The master turns
simple user-side requests (a write command plus a stream of data beats, or a
read command) into AXI bursts; the slave stores what is written into a
byte-strobed 4 KiB memory and returns it on reads. Every channel uses the
VALID/READY handshake, every bus output is a flip-flop, and everything the
bus drives is zero while `ARESETn` is low.

The design follows the paper "Design of AXI4 Slave Device Using VERILOG"
(Harish T L, Chandrashekhar M C), which describes the per-channel behaviour of
such a master/slave pair at 100 MHz with bursts of up to 256 transfers. The
paper describes how each channel behaves but not how the blocks are built, so
much of the inside of the blocks is this design's own. The section
"Departures and choices" lists where that is so.

## The five channels

| channel | direction | carries | ends a transfer with |
|---|---|---|---|
| AW, write address | master to slave | `AWID AWADDR AWLEN AWSIZE AWBURST AWLOCK AWCACHE AWPROT` | `AWVALID && AWREADY` |
| W, write data | master to slave | `WID WDATA WSTRB WLAST` | `WVALID && WREADY` |
| B, write response | slave to master | `BID BRESP` | `BVALID && BREADY` |
| AR, read address | master to slave | `ARID ARADDR ARLEN ARSIZE ARBURST ARLOCK ARCACHE ARPROT` | `ARVALID && ARREADY` |
| R, read data | slave to master | `RID RDATA RRESP RLAST` | `RVALID && RREADY` |

A transfer happens at a rising edge of `ACLK` where VALID and READY are both
high. The source keeps VALID and every payload signal unchanged until that
edge. When no transfer is pending, VALID is low and the payload signals are
zero.

Widths: IDs 4 bits, addresses 32, burst length 8 (`len` = beats - 1, so up to
256 beats), size 3, burst type 2, lock 1, cache 4, protection 3. The data bus
is 64 bits with 8 strobe bits. It has to be at least that wide because the
design issues 8-byte beats (`AxSIZE = 3`). These widths are set in
`rtl/axi_pkg.sv`.

## Bursts: length, addresses and lanes

A burst has `AxLEN + 1` beats. The last beat carries `WLAST` or `RLAST`.
Each beat moves `2**AxSIZE` bytes. The slave works out the address of every
beat. That logic is the shared function `axi_pkg::next_addr`, and both sides
of the slave use it:

* **INCR** (`AxBURST = 1`, the type in normal use): the first beat is at the
  start address, even if that address is not aligned to the beat size. Each
  later beat is at the aligned start plus `i * 2**AxSIZE`.
* **FIXED** (`0`): every beat is at the start address.
* **WRAP** (`2`): as INCR, but the address stays inside the block of
  `(AxLEN+1) * 2**AxSIZE` bytes that holds the start address. It wraps to
  the bottom of that block. A legal wrap has 2, 4, 8 or 16 beats and an
  aligned start.

The memory is organised as 64-bit words. A beat always touches the word at
`address[11:3]`. On writes, `WSTRB` chooses which bytes of that word change,
so it is the master's job to set the strobes of a narrow or unaligned beat to
the byte lanes its address selects. The system testbench does this. On reads
the slave returns the whole word, and the master picks out the lanes it
asked for. These are the AXI4 rules for narrow transfers.

Addresses wrap modulo the memory size, so the upper address bits are ignored.
Every response is `OKAY`.

## The master (`axi_master`)

```
 user write cmd ──► axi_master_aw ──► AW
        │
        └─(AWID, AWLEN)─► axi_fifo (CMD_DEPTH) ─► axi_master_w ──► W
 user write data ───────────────────────────────────┘
 user read cmd  ──► axi_master_ar ──► AR
 user ◄── B, R (BREADY/RREADY = user's ready inputs)
```

* **AW and AR drivers** (`axi_master_aw`, `axi_master_ar`) are one register
  stage each. A command accepted from the user side is placed on the bus with
  VALID high and held while READY is low. After the handshake the next
  waiting command follows on the very next clock. Otherwise VALID drops and
  the fields go to zero. The user-side `cmd_ready` is
  `!AxVALID || AxREADY`.
* **W driver** (`axi_master_w`) needs to know how long each burst is. When a
  write command is accepted, its ID and length are pushed into a small queue
  (`CMD_DEPTH` = 4 entries). The W driver pops an entry when it sends that
  burst's first beat. It then copies beats from the user's data stream onto W,
  with `WID = AWID`, and raises `WLAST` on beat `AWLEN + 1`. Bursts follow one
  another with no idle cycle. W may run ahead of the AW handshake, as AXI
  allows. It may also run behind it by up to `CMD_DEPTH` bursts. When the
  queue is full, new write commands wait.
* **B and R** go straight to the user side. `BREADY` and `RREADY` are the
  user's `wr_rsp_ready` and `rd_data_ready`.

No bus output depends combinationally on a bus input. The user-side ready
outputs do depend on bus READY inputs.

## The slave (`axi_slave`)

The slave has a write side and a read side. They run independently and share
one memory (`axi_slave_mem`: 512 x 64-bit words, one byte-strobed write port,
one combinational read port, not cleared by reset).

**Write side** (`axi_slave_wr`), three states:

| state | outputs | leaves when | to |
|---|---|---|---|
| IDLE | `AWREADY = 1` | AW handshake (command stored) | DATA |
| DATA | `WREADY = 1`; each beat written to memory at the beat's address | beat with `WLAST` taken | RESP |
| RESP | `BVALID = 1`, `BID = AWID`, `BRESP = OKAY` | `BREADY` high | IDLE (B fields back to 0) |

**Read side** (`axi_slave_rd`), two states. In IDLE, `ARREADY = 1` and an AR
handshake stores the command. In BURST, whenever the R register is empty or
its beat is being taken, the next beat is read from memory and driven with
`RVALID`, `RID = ARID` and `RRESP = OKAY`. `RLAST` is set on the last beat.
After the last beat is taken, R goes back to zero and `ARREADY` rises.

Timing, with all READYs high:

| event | clock edge |
|---|---|
| AW handshake | t |
| first W beat can be taken | t+1 (`WREADY` is high from t) |
| `BVALID` | the edge that takes `WLAST` |
| next AW handshake | the edge after the B handshake |
| AR handshake | t |
| first R beat on the bus | t+1, then one beat per clock |
| `ARREADY` again | the edge that takes `RLAST` |

Each side handles one burst at a time. While a write burst runs, the next
write command waits on AW with `AWREADY` low, and the master holds it.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `MEM_BYTES` | `axi_system`, `axi_slave`, `axi_slave_wr`, `axi_slave_rd`, `axi_slave_mem` | 4096 | slave memory size in bytes (power of two) |
| `CMD_DEPTH` | `axi_system`, `axi_master` | 4 | write bursts the W driver may lag behind AW (power of two) |
| `ID_W`, `ADDR_W`, `DATA_W`, `LEN_W` | `axi_pkg` | 4, 32, 64, 8 | field widths |

`DATA_W` must stay 64. The memory, the strobes and the slave's address split
assume 8-byte words.

## Departures and choices

From the paper:
* the five channels, one master and one slave;
* the field widths: 4-bit IDs, 32-bit addresses, 8-bit lengths, 3-bit size,
  2-bit burst, 1-bit lock, 4-bit cache, 3-bit protection;
* zero outputs in reset;
* VALID held with its payload until READY;
* `WID = AWID`;
* `WLAST`/`RLAST` on the final beat;
* the slave answering on B once `WLAST` arrives and clearing the response
  after `BREADY`;
* the slave holding each read beat until `RREADY`;
* no combinational path from bus input to bus output;
* 100 MHz operation;
* bursts of up to 256 transfers.

Choices and resolutions made here:
* **Burst length is `AxLEN + 1` beats.** In places the paper counts `AxLEN`
  beats. That count could not give 256 transfers with an 8-bit length, so
  the AXI4 rule is used.
* **`WID` is kept**, as the paper's design has it, although AXI4 dropped it.
  The slave asserts that it matches `AWID` but does not otherwise use it.
* **ARREADY is driven by the slave**, like AWREADY.
* 64-bit data bus, 4 KiB memory, address aliasing, OKAY-only responses.
* One outstanding burst per direction in the slave. W is accepted only after
  AW.
* FIXED and WRAP sequencing and the narrow/unaligned rules are taken from
  AXI4. The paper only exercises INCR bursts.
* `AxLOCK`, `AxCACHE` and `AxPROT` are carried by the master and ignored by
  the slave. There are no exclusive accesses.
* The user-side interface of the master, the burst queue, and an asynchronous
  active-low reset.
* The paper also notes that AXI can connect 16 masters and 16 slaves. No
  interconnect is built here.

Synthesis notes: `axi_master` and `axi_slave_wr` pass some signals through
unregistered. These are B and R to the user side, and the write data and
strobes to the memory port. Synthesis reports them as outputs wired straight
to inputs. `BRESP`/`RRESP` are constant OKAY.

## Assertions

`axi_slave_wr` and `axi_slave_rd` check the master's side of the protocol with
concurrent assertions:
* AW and AR are held while not ready;
* W is held while not ready;
* `WLAST` comes exactly on beat `AWLEN + 1`;
* `WID` matches the stored `AWID`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | exercises |
|---|---|
| `tb_axi_master_aw`, `tb_axi_master_ar` | a reference command sequence and 200 random commands under random READY; hold, zero-when-idle, back-to-back issue, reset |
| `tb_axi_master_w` | a 22-beat burst of 24..45 on consecutive clocks, 60 random bursts (1-256 beats), WLAST/WID/data order under random WREADY |
| `tb_axi_master` | AW/W/AR ordering, WID per burst, queue limit with W blocked, B/R hand-over |
| `tb_axi_slave_mem` | strobed writes and reads against a byte model |
| `tb_axi_slave_wr`, `tb_axi_slave_rd` | per-beat addresses from closed-form AXI4 formulas for FIXED/INCR/WRAP, B/R timing and back-pressure |
| `tb_axi_slave` | memory fill, then 300 random reads and writes checked against a byte model |
| `tb_axi_system` | end to end at default parameters; see below |

`tb_axi_system` runs three phases. The first is a reference run. It writes
22 beats of 24..45, then five writes with IDs 11/9/5/3/7 at addresses
23/30/20/50/70 in 1-, 2- and 8-byte beats. It then makes four reads with IDs
9/5/3/7 of 6 to 9 beats. Every burst must cross the bus on consecutive
clocks. The second phase makes 32-beat writes and reads of the same and of
different locations, and one 256-beat write and read. The third phase is
random traffic with back-pressure. For each channel, the test prints the
number of cycles with VALID high, the number of those spent waiting for
READY ("busy"), and the utilisation. It also counts AW and W waits, B and R
back-pressure, W running behind AW, narrow and unaligned beats and 256-beat
bursts, and fails if any of them never happened.

`tb/tb_axi_pkg.sv` holds the reference helpers: closed-form beat addresses
and random legal commands.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/axi_pkg.sv tb/tb_axi_pkg.sv \
    tb/tb_axi_system.sv --top-module tb_axi_system -Mdir obj_sys
./obj_sys/Vtb_axi_system
```

Replace `tb_axi_system` with any other testbench name. `-y` lets Verilator
find each module in the file of the same name. The packages are listed first
so that they are read before the modules that import them. `-Wno-fatal`
keeps lint warnings from stopping the build; most of them are width
extensions in the testbenches. The testbenches use
only two-state values, and `$urandom` for stimulus.
