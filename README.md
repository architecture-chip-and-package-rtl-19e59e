# ROCKET-64: a 64-core RISC-V system as 27 chiplets

ROCKET-64 splits a 64-core RISC-V machine into chiplets on a silicon
interposer:

- eight Rocket chiplets with eight cores each;
- eight L2 chiplets, one per Rocket chiplet;
- one NoC chiplet;
- one memory controller chiplet with four DRAM channels;
- eight DLDO chiplets (digital low-dropout regulators);
- one IVR chiplet (integrated buck regulator).

The chiplets only talk to each other over narrow flit channels, using a
small protocol called Hybrid-Link. This keeps the number of chiplet I/Os
low. Hybrid-Link has two modes:

- **lightweight**: point-to-point traffic, here a core talking to its own
  L2 slice;
- **extended**: routed traffic that carries a transaction ID and a
  destination ID, here anything that must cross the NoC to memory.

This repository holds synthesizable SystemVerilog for the digital part of
every chiplet, a top level that wires them together, and a self-checking
testbench for every block and for the whole system. The cores, their L1
caches, the periphery devices, the DRAM and all analog circuits are not
included. Their connections are ports of the top.

## How a memory access travels

```
 core k ──FIFO──► system bus ──► L1-to-L2 interface ──► 3 bridges ──► mux/demux ═╗
                    │   │                                                        ║ Rocket chiplet c
                    │   └─► error device                                         ║ ⇅ one flit channel
                    └─────► periphery port (CLINT/PLIC/Bootrom/Debug, external)  ║
                                                                                 ║ L2 chiplet c
   ┌──────────── md_up ◄══════════════════════════════════════════════════════════╝
   │  lightweight → bridge A → L2 slice → bridge B ─┐
   │  extended    → pass-through ───────────────────┤
   └──────────────────────────────────────────── md_dn ⇄ NoC port c
                                                        NoC crossbar (9 ports)
                                                        port 8 ⇄ bridge ⇄ memory controller ⇄ 4 DRAM channels
```

Core k is tile k mod 8 of Rocket chiplet k / 8. Its global number k is the
transaction ID (TID) of everything it sends. The address picks the path:

| address              | path                                                    | mode on the wire |
|----------------------|---------------------------------------------------------|------------------|
| `0x8000_0000`–`0xFFFF_FFFF` | cacheable, served by the core's own L2 slice     | lightweight      |
| `0x4000_0000`–`0x7FFF_FFFF` | uncached, passed through the L2 chiplet and the NoC to memory | extended |
| `0x0000_0000`–`0x0FFF_FFFF` | periphery bus port of the Rocket chiplet         | —                |
| anything else        | error device (response with `err = 1`)                  | —                |

The memory controller ignores address bits 31:30. The cacheable and
uncached windows are therefore two views of the same DRAM words. Because
the L2 slices are write-through, the DRAM always holds the latest value.
Even so, an uncached write does not update a copy of that word already
held in an L2 slice. Software must not mix the two windows for the same
word while it is cached.

Three rules keep one core's accesses in order:

- A request goes to bridge `addr[11:2] mod 3`, so all accesses to one word
  use one bridge.
- Each bridge allows only one read in flight.
- Writes are posted: a write gets no response.

A read answered by the L2 slice takes one channel crossing each way. A
miss adds a round trip through the NoC to the memory controller.

## Hybrid-Link

Each channel carries one 40-bit flit per cycle, plus one `ready` wire
running the other way. A flit moves on a rising edge where its `valid`
bit and `ready` are both 1.

```
header : [39] L/E  [38] valid  [37:35] CMD  [34:32] length  [31:0] address
body   : [39] L/E  [38] valid  [37:32] reserved (0)          [31:0] payload
```

- `L/E` is 0 for lightweight and 1 for extended.
- `CMD` is 1 for a read request, 2 for a write request and 3 for a read
  response.
- `length` counts 4-byte words. It is always 1.
- An extended packet's second flit carries TID in payload bits 11:6 and
  the destination ID (DID) in bits 5:0.

| mode        | read request     | write (4 B)              | read response (4 B)      |
|-------------|------------------|--------------------------|--------------------------|
| lightweight | header           | header, data             | header, data             |
| extended    | header, TID/DID  | header, TID/DID, data    | header, TID/DID, data    |

A read response repeats the request's address in its header. The L2
chiplet uses that address to tell fills from pass-through responses.

DIDs are NoC ports: 0–7 are the L2 chiplets and 8 is the memory
controller. The memory controller answers to DID = TID / 8, which is the
requesting core's chiplet.

`hl_bridge` converts between whole transactions (`hl_txn_t`) and flits in
both directions:

- Transmit: it takes the next transaction in the cycle the previous
  packet's last flit leaves.
- Receive: it holds one assembled transaction and stops taking flits until
  that transaction is consumed.

`hl_muxdemux` shares one channel among several bridges:

- It merges their flit streams with a round-robin arbiter that holds the
  grant for a whole packet.
- It steers each incoming packet, as a whole, by one of three rules:
  - protocol mode (L2 side, towards the cache or the pass-through);
  - address bit 31 (L2 side, fills or responses going back up);
  - address slot (Rocket side, back to the bridge that owns the address).

## The L2 slice

Each of the eight slices holds 1 MB: 2^18 one-word lines.

- **Mapping:** direct mapped. Index is `addr[19:2]`, tag is `addr[31:20]`.
- **Read hit:** answered one cycle after the request is taken.
- **Read miss:** blocks the slice. It sends one extended read to the
  memory node, waits for the fill, writes the line and answers.
- **Write:** write-through with allocate. The line is updated and the
  write goes on to memory in the same cycle. The slice takes a write only
  when the downstream side is ready.
- **Reset:** after reset the slice clears one tag per cycle, which takes
  2^18 cycles. `init_done` and the top's `l2_ready` go high when every
  slice has finished. Requests wait until then.

The slices are not kept coherent with each other. A core only ever
reaches the slice of its own chiplet.

## NoC crossbar

`noc_xbar` is the single, centralized arbiter between the eight L2
chiplets and the memory controller.

- **Store and forward:** each input port collects a whole packet (at most
  three flits) before asking for the output named by its DID.
- **Arbitration:** one arbiter looks at all waiting packets every cycle.
  Each free output grants the next waiting input in round-robin order.
- **Streaming:** the output stays reserved until the packet's last flit
  has left.
- **Drops:** lightweight packets and unknown DIDs are taken and dropped.
- **Events:** `ev_drop` flags a drop. `ev_conflict` flags a cycle where two
  inputs wanted the same output.

## Memory controller

- **Interleaving:** words are spread over the four channels by address
  bits 3:2, so up to four reads can be in flight at once.
- **Per channel:** each channel holds one request and serves its requests
  in order.
- **Completion:** a write is done when the DRAM port accepts it. A read
  keeps its channel busy until the data has come back and been answered.
- **DRAM port:** a plain word interface: request valid/ready, then read
  data with a one-cycle `rvalid`, any number of cycles later.

## Power-delivery control

**DLDO (`dldo_ctrl`, one per Rocket chiplet).**

- A clocked comparator reports whether the rail is below its reference.
- The controller adds one power switch per cycle while the rail is low and
  removes one while it is high, within 0 to 32 switches.
- The enables are the thermometer code of the count.
- After reset, 16 switches are on.
- In steady state the count moves back and forth by one around the load's
  need. `ev_sat` flags the count pushing past either end.

**IVR (`ivr_ctrl` = `pid_comp` + `dpwm`).** The buck loop is
ADC → PID compensator → DPWM → gate drivers.

- The DPWM counts 256 clocks per period and drives the PMOS and NMOS gate
  commands `duty_p` and `duty_n`. Two clocks of dead time separate them,
  so they are never on together (this is an assertion).
- At each period start the DPWM requests an ADC conversion.
- The compensator is a velocity-form PID with 8-bit gains and 6
  fractional bits:
  `u += Kp·(e−e1) + Ki·e + Kd·(e−2e1+e2)`.
- `u` is clamped to the duty range, and the duty word is `u >> 6`.
- A new duty takes effect from the next PWM period.

## Debug link

Each Rocket chiplet has a `serdes` for its debug port. It sends a 32-bit
word over one wire as a start bit followed by the data, LSB first. The
receiver looks for the start bit and shifts the word in.

## What is outside the RTL

The following appear only as ports of `rocket64_top`:

- the cores and their L1 caches (`core_req*`, `core_resp*`: a one-word
  load/store port per core);
- the periphery devices (`periph_*`);
- the DRAM (`dram_*`);
- the DLDO power switches and comparator (`ldo_*`);
- the IVR power stage and ADC (`ivr_*`);
- the debug pins (`dbg_*`).

The interposer wires and I/O drivers are direct connections.

## Where this design makes its own choices

The published architecture gives:

- the chiplet partitioning and the block names inside each chiplet;
- 64 cores, an 8 MB L2, a centralized NoC arbiter and four memory
  channels;
- the 40-bit flit, its field list and the flits of each packet kind.

The following are this implementation's own choices and should be judged
as such:

- the bit positions inside a flit, the command codes and the TID/DID
  layout;
- the ready wire and the reset behaviour;
- the address map;
- how requests are spread over the three bridges;
- the L2 organisation (direct mapped, one-word lines, write-through);
- the crossbar structure of the NoC;
- the memory interleaving;
- the DLDO counter loop, the PID form and its widths, and the DPWM
  resolution and dead time;
- the serial debug format.

The following limits are known:

- Transfers are single 32-bit words, with no bursts and no cache lines
  longer than one word.
- There is no coherence between L2 slices.
- Lightweight and unroutable packets are dropped at the NoC without an
  error response.

## Parameters of `rocket64_top`

| parameter     | default | meaning                                  |
|---------------|---------|------------------------------------------|
| `N_CHIPLETS`  | 8       | Rocket/L2 chiplet pairs                  |
| `TILES`       | 8       | cores per Rocket chiplet                 |
| `L2_IDX_BITS` | 18      | log2 of words per L2 slice (1 MB)        |
| `N_MEM_CH`    | 4       | DRAM channels                            |
| `N_SW`        | 32      | DLDO power switches per chiplet          |
| `DBG_W`       | 32      | debug word width                         |
| `ADC_W`, `DUTY_W` | 8   | IVR ADC and duty resolution              |

## Files

- `rtl/hl_pkg.sv` holds the shared types, flit helpers and address map.
- Chiplet wrappers:
  - `rocket_chiplet.sv`
  - `l2_chiplet.sv`
  - `memctrl_chiplet.sv`
  - `ivr_ctrl.sv`
- The top is `rocket64_top.sv`.
- Blocks:
  - `hl_bridge`, `hl_muxdemux`, `sync_fifo`
  - `sys_bus`, `error_dev`, `l1_l2_if`
  - `l2_cache`, `noc_xbar`, `mem_ctrl`
  - `dldo_ctrl`, `pid_comp`, `dpwm`, `serdes`
- `tb/tb_<block>.sv` is a self-checking testbench per block. Each ends by
  printing `TB_RESULT checks=N failures=M`.
- `tb/tb_rocket64_harness.sv` is the system testbench body. It models 64
  cores, DRAM, periphery, DLDO power stages, a buck converter and a debug
  loop-back. It checks every read against a shadow memory and fails if any
  of these mechanisms never happened:
  - L2 hits and misses;
  - uncached reads;
  - periphery and error responses;
  - NoC conflicts;
  - several DRAM channels busy at once;
  - core stalls;
  - DLDO tracking and saturation;
  - IVR regulation;
  - debug transfers.
- The harness runs in two configurations:
  - `tb_rocket64_top` uses 16-line L2 slices, so that evictions are
    frequent.
  - `tb_rocket64_full` uses every parameter at its default: 64 cores and
    eight 1 MB slices. After the 262,144-cycle tag sweep each core makes 12
    accesses. It finishes in a few seconds.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/hl_pkg.sv tb/tb_rocket64_top.sv --top-module tb_rocket64_top
./obj_dir/Vtb_rocket64_top
```

Replace the file and top name to run any other testbench. Every testbench
uses a 10 ns clock:

- Inputs change after the falling edge.
- Outputs are sampled 1–2 ns later.
- Handshakes complete on the next rising edge.
- Every testbench has a watchdog that ends the run with a failure.
