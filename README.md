# AXI4 to APB4 bridge

Simple peripherals such as timers, UARTs and GPIO blocks rarely need what
AXI4 offers: independent read and write channels, bursts, IDs. They talk
APB, a two-phase bus with one transfer at a time. This bridge lets a
processor on an AXI4 interconnect reach such peripherals. On one side it is
an AXI4 slave clocked by `ACLK`; on the other it is an APB4 master clocked
by `PCLK`. Every AXI4 beat becomes one APB transfer. An AXI4 burst is thus
*downgraded* into a string of single APB transfers at the addresses the
burst type implies.

```
            ACLK domain                               PCLK domain
 AXI4   +------------------+   cmd  +---------------+  +------------+  PSEL[0] -> peripheral 0
 master | axi_slave_ctrl   |------->| cdc_handshake |->| apb_master |  PSEL[1] -> peripheral 1
 -----> |  burst_addr_gen  |<-------|  (toggle req/ |<-|            |<-> apb_decoder
        +------------------+   rsp  |   ack, sync)  |  +------------+  (select / return mux)
```

The top module is `axi4_apb_bridge`. All RTL is in `rtl/`, one module or
package per file; testbenches and simulation models are in `tb/`.

## What happens to a burst

The AXI side (`axi_slave_ctrl`) serves one burst at a time.

* **Read burst.** `ARREADY` is given while the controller is idle. For each
  beat the controller sends a read command to the APB side and waits for
  its result. It then presents the data on the R channel until `RREADY`.
  `RLAST` is set on the last beat. Only then is the next beat's address
  computed and the next command sent.
* **Write burst.** `AWREADY` is given while idle. For each beat, `WREADY` is
  raised only when the beat can be sent to the APB side at once. So write
  data is taken from the master no faster than the APB bus can write it.
  After the last beat, one B response is returned. It is the worst of the
  beat responses: DECERR over SLVERR over OKAY.
* **Both at once.** If `ARVALID` and `AWVALID` are both high in the idle
  state, the grant alternates between read and write.

The number of beats comes from `AxLEN` (1 to 256 beats). `WLAST` is not
used to end a burst. An assertion flags a `WLAST` that disagrees with
`AWLEN`.

### Beat addresses (`burst_addr_gen`)

The address of beat *i* depends on `AxBURST`. Here
`step = 2**AxSIZE` bytes.

| burst | address of beat i | example (`AxSIZE=2`, `AxLEN=3`, start `0x38`) |
|-------|-------------------|------------------------------------------------|
| FIXED | the start address for every beat | 38, 38, 38, 38 |
| INCR  | start, then `align(start) + i*step` | 38, 3C, 40, 44 |
| WRAP  | as INCR, but kept inside the block of `(AxLEN+1)*step` bytes that holds the start address | 38, 3C, 30, 34 |

With full-width transfers (`AxSIZE = 2` for 32 bits), `step` is the APB data
width, so INCR and WRAP move one APB word per beat. Narrower transfers step
by their own size, as AXI4 requires. The bridge passes `WSTRB` unchanged to
`PSTRB`, so the master must give byte strobes that fit the address. WRAP
bursts must start aligned to `AxSIZE` and have 2, 4, 8 or 16 beats. This
is the AXI4 rule; the bridge does not check it. The reserved `AxBURST`
encoding is treated as INCR.

The generator keeps the current address in a register. `load` captures a
new burst and `advance` steps to the next beat. The wrap mask
`(AxLEN+1)*2**AxSIZE - 1` is computed once at load. The next WRAP address
is then `(addr & ~mask) | ((align(addr) + step) & mask)`.

## Crossing from ACLK to PCLK (`cdc_handshake`)

The two sides have their own clocks and resets. They exchange exactly one
command at a time through a toggle handshake:

1. The AXI side registers the command (address, direction, write data,
   strobes, protection: the packed struct `apb_cmd_t`) and flips `req_tog`.
2. `req_tog` reaches PCLK through a `SYNC_STAGES`-deep synchroniser.
   `dst_valid = req_sync ^ ack_tog` then stays high until the APB master
   reports `dst_done`.
3. On `dst_done`, the PCLK side registers the result (`apb_rsp_t`: read
   data and response) and flips `ack_tog`.
4. `ack_tog` reaches ACLK through a second synchroniser. A one-cycle
   `src_rsp_valid` pulse delivers the result.

Only the two toggle bits pass through synchronisers. The command and result
registers do not change while the other side reads them. This holds because
a new command can only start after the previous acknowledge has come back.
The scheme works for any ratio between the two clocks.

`SYNC_STAGES = 0` removes the synchronisers. Use it only when `ACLK` and
`PCLK` are the same clock. Both resets must be asserted together, since a
reset on one side only would leave the toggles out of step.

## APB side

`apb_master` runs the APB state machine:

* **IDLE.** Waits for a command. The command's address goes to
  `apb_decoder`. If no peripheral claims it, the command ends at once with
  DECERR and no APB transfer takes place. Otherwise PADDR, PWRITE, PWDATA,
  PSTRB and PPROT are registered.
* **SETUP.** `PSEL` is high for one cycle.
* **ACCESS.** `PSEL` and `PENABLE` stay high until `PREADY`. The read
  data and the response (SLVERR if `PSLVERR` is high) are then returned.

`PSTRB` is zero for reads. Assertions check three rules: `PENABLE` implies
`PSEL`, SETUP is followed by ACCESS, and the bus signals hold steady during
wait states.

`apb_decoder` gives each peripheral an address window: peripheral *i* is
selected when `(PADDR & SLV_MASK[i]) == SLV_BASE[i]`. It drives that
peripheral's `PSEL` bit and routes back its `PRDATA`, `PREADY` and
`PSLVERR`. The default map has two peripherals of 4 KB each:

| peripheral | addresses |
|-----------|-----------|
| 0 | `0x0000_0000`–`0x0000_0FFF` |
| 1 | `0x0000_1000`–`0x0000_1FFF` |
| none (DECERR) | everything else |

The master goes back to IDLE after every transfer. So `PSEL` drops between
the beats of a burst while the next command crosses over. This differs
from drawings in which `PSEL` stays high for a whole burst.

## Timing

The design has one burst in flight, and within it one beat at a time. With
no APB wait states, each beat costs the following. The numbers follow
from the state machines; `tb_bridge_beat_timing` checks them.

* **Read beat.** 1 ACLK cycle to issue the command, plus `SYNC_STAGES`
  PCLK cycles to cross, plus 1 PCLK cycle in IDLE, plus 2 PCLK cycles for
  SETUP and ACCESS, plus `SYNC_STAGES` ACLK cycles back, plus 1 ACLK cycle
  to take the result, plus 1 ACLK cycle on R. With one clock and
  `SYNC_STAGES = 0` this is 6 cycles per beat.
* **Write beat.** One cycle less than a read beat, because the beat is
  taken together with the command: 5 cycles at `SYNC_STAGES = 0`. The B
  response appears one write-beat period after the last W handshake.
* **First read beat.** It arrives one read-beat period after the AR
  handshake.
* **Same clock, `SYNC_STAGES = 2`.** Each crossing adds 2 cycles: 10
  cycles per read beat and 9 per write beat.
* **Wait states.** Each cycle with `PREADY` low adds one PCLK cycle.

This is a low-cost bridge, not a fast one. Reads and writes never overlap,
and beats are not pipelined across the crossing.

## Interface

Parameters of `axi4_apb_bridge`:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 32 | address width; must equal `axi_apb_pkg::BUS_ADDR_W` |
| `DATA_W` | 32 | data width on both buses; must equal `axi_apb_pkg::BUS_DATA_W` |
| `ID_W` | 4 | AXI ID width; `BID`/`RID` return the burst's ID |
| `NUM_SLAVES` | 2 | number of APB peripherals, one `PSEL` bit each |
| `SYNC_STAGES` | 2 | synchroniser depth; 0 only for a shared clock |
| `SLV_BASE`, `SLV_MASK` | see above | address window of each peripheral |

Ports:

* **Clocks and resets:** `ACLK`/`ARESETn` and `PCLK`/`PRESETn`. The resets
  are active low and asynchronous.
* **AXI4 channels:** AW (`AWID`, `AWADDR`, `AWLEN`, `AWSIZE`, `AWBURST`,
  `AWPROT`, `AWVALID`, `AWREADY`), W (`WDATA`, `WSTRB`, `WLAST`,
  `WVALID`, `WREADY`), B (`BID`, `BRESP`, `BVALID`, `BREADY`), AR (as
  AW), and R (`RID`, `RDATA`, `RRESP`, `RLAST`, `RVALID`, `RREADY`).
  Cache, lock, QoS, region and user signals are not present. Tie them off
  at the interconnect.
* **APB4 outputs:** shared `PADDR`, `PENABLE`, `PWRITE`, `PWDATA`,
  `PSTRB` and `PPROT`, plus `PSEL[NUM_SLAVES-1:0]`.
* **APB4 inputs:** `PRDATA[NUM_SLAVES-1:0][DATA_W-1:0]`,
  `PREADY[NUM_SLAVES-1:0]` and `PSLVERR[NUM_SLAVES-1:0]`, one per
  peripheral.

The package `axi_apb_pkg` holds the burst and response encodings and the
two records that cross the clock boundary. The other widths are fixed there
too, so changing the data width means editing the package as well as the
parameter. An elaboration-time check catches a mismatch.

## What is specified and what is chosen here

The specification this bridge implements fixes the system and the
interfaces. An AXI4 slave with write address, write data, write response,
read address and read data channels faces a CPU. An APB master faces two
peripherals. The AXI and APB sides have separate clocks and resets. Each
burst beat becomes one APB transfer, with RLAST on the last read beat and a
single OKAY write response. Beat addresses follow the FIXED, INCR and WRAP
rules. Its example waveforms show 4-beat bursts with both clocks drawn
alike.

Everything else is this design's own choice:

* **Widths.** Address and data are 32 bits, equal on both sides. There is
  no data-width conversion.
* **Bursts.** Full AXI4 bursts are accepted. The specification also
  speaks of AXI4-Lite, whose single-beat accesses are simply the case
  `AxLEN = 0`.
* **Clock crossing.** The toggle-handshake crossing and its depth.
* **Arbitration.** Read and write alternate, with one burst at a time.
* **Errors.** `PSLVERR` gives SLVERR. An unmapped address gives DECERR. A
  write burst reports the worst of its beats.
* **Address map.** As in the table above.
* **Timing.** This departs from the example waveforms in two ways. Read
  data is registered and crosses back before it appears on R, rather than
  on R in the same cycle as the APB access phase. `PSEL` is released
  between beats, keeping APB's one-cycle SETUP rule, rather than staying
  high for a whole burst.

## Verification

Each module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_burst_addr_gen` | beat addresses of 300 random FIXED/INCR/WRAP bursts against a reference model, including wrap-arounds and the top of the address space |
| `tb_cdc_handshake` | 200 commands from a 10 ns to a 7 ns clock: delivered once, in order, intact; responses returned; one-cycle response pulse; latency bounds |
| `tb_apb_master` | SETUP/ACCESS sequence, bus signals, PSTRB on reads, random wait states, SLVERR, DECERR without a transfer, exactly 2 + wait cycles per transfer |
| `tb_apb_decoder` | hit, PSEL routing and return multiplexing for addresses in and out of both windows |
| `tb_axi_slave_ctrl` | per-beat commands, R beats with RLAST and ID, merged B response, R/B back-pressure, simultaneous AR/AW |
| `tb_axi4_apb_bridge` | whole bridge at default parameters, ACLK 10 ns and PCLK 13 ns, two APB memory models (`tb/apb_mem_model.sv`) with 0–3 random wait states |
| `tb_axi4_apb_bridge_1clk` | the same test with a single clock and `SYNC_STAGES = 0` |
| `tb_bridge_beat_timing` | a 4-beat INCR read and write with zero wait states on one clock, for `SYNC_STAGES` 0 and 2: data, RLAST, BRESP and the exact cycle counts of the Timing section |

The two end-to-end tests start with a 4-beat INCR read and a 4-beat INCR
write. They then run about 200 random bursts. A shadow copy of both
memories gives the expected read data. A bus monitor checks every APB
transfer against the expected beat address, data, strobes and protection.
The tests also count each mechanism and fail if any of them never occurs:

* reads, writes, FIXED, INCR and WRAP bursts, and actual wrap-arounds;
* APB wait states, SLVERR and DECERR;
* R and B back-pressure;
* simultaneous AR/AW;
* accesses to each peripheral.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/axi_apb_pkg.sv rtl/sync_bit.sv rtl/burst_addr_gen.sv rtl/axi_slave_ctrl.sv \
    rtl/cdc_handshake.sv rtl/apb_master.sv rtl/apb_decoder.sv rtl/axi4_apb_bridge.sv \
    tb/apb_mem_model.sv tb/tb_axi4_apb_bridge.sv --top-module tb_axi4_apb_bridge
./obj_dir/Vtb_axi4_apb_bridge
```

For a unit testbench, list the package, the module and its submodules, and
the testbench. Each test runs in a few seconds.

Lint is clean apart from Verilator's `SYNCASYNCNET` note. That note comes
from the assertions using the asynchronous resets in `disable iff`.

## Limits

* No data-width conversion: an AXI data bus wider than the APB bus is not
  supported.
* No outstanding transactions: one burst at a time, and beats are not
  pipelined.
* A burst that runs past a 4 KB boundary is not checked. AXI4 forbids such
  bursts.
* Exclusive accesses are not supported. `AxLOCK` is absent, so EXOKAY is
  never returned.
