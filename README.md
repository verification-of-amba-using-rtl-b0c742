# AMBA 2.0 AHB + APB system with a priority arbiter and split masking

This is a small, complete AMBA 2.0 bus system written in synthesizable SystemVerilog. It follows a
cycle-level model of AMBA that was built for formal verification of latency, arbitration, coherence
and deadlock freedom. The system has:

* an **AHB** (Advanced High-performance Bus) with 8 masters and 16 slave slots, a fixed-priority
  arbiter that remembers split masters, an address decoder and a central multiplexer;
* an **APB** (Advanced Peripheral Bus) with 4 register peripherals;
* an **AHB-to-APB bridge**. It is an ordinary slave on the AHB (slot 15) and the only master on the
  APB.

The masters and slaves are generic. A master carries out commands that its user gives it. A slave
is a register file that answers each transfer as its environment tells it: OK after some wait
states, RETRY, SPLIT or ERROR. This keeps every bus mechanism reachable from the outside. The
design's real content is the protocol machinery between the masters and slaves, not the masters and
slaves themselves.

```
 cmd[0..7] ──► ahb_master ×8 ──┐ m_ctl / m_wdata        ┌──► ahb_slave ×15  (slots 0..14)
               ▲  hbusreq      ▼                        │        ▲ slv_ctl (waits/resp/unsplit)
               │           ┌────────┐  bus_ctl  ┌────────────┐
               │  hgrant   │ahb_mux │──────────►│ahb_decoder │── hsel
               └───────────┤        │◄──────────┤            │
                ahb_arbiter│        │  s_rsp    └────────────┘
                 (mask)    └────────┘                 │
                    ▲ hsplit (OR of all slaves)      └──► apb_bridge (slot 15) ──► apb_slave ×4
```

## Files

| file | contents |
|---|---|
| `rtl/amba_pkg.sv` | Transfer and response encodings, the address/control and response structs, command and slave-control structs, bus sizes |
| `rtl/ahb_arbiter.sv` | Fixed-priority arbiter with split masking; tracks the address-phase and data-phase owners |
| `rtl/ahb_decoder.sv` | One-hot slave select from `HADDR[31:28]` |
| `rtl/ahb_mux.sv` | Routes the owners' address/control and write data to the slaves, and the data-phase slave's response to the masters |
| `rtl/ahb_master.sv` | Generic master: SINGLE or INC bursts, one optional BUSY, restart/abort on responses |
| `rtl/ahb_slave.sv` | Generic register slave: wait states, two-cycle RETRY/SPLIT/ERROR, one outstanding split |
| `rtl/apb_bridge.sv` | AHB slave and APB master: IDLE/SETUP/ENABLE |
| `rtl/apb_slave.sv` | APB register peripheral |
| `rtl/amba_top.sv` | Connects everything together |
| `tb/tb_*.sv` | One self-checking testbench per module, plus `tb_amba_top` and `tb_amba_properties` for the whole system |

## How a transfer moves through the AHB

The AHB is pipelined. Each transfer has a one-cycle **address phase**, in which the master drives
`HTRANS`, `HADDR`, `HWRITE` and the burst bit. This is followed by a **data phase** that lasts until
the addressed slave raises `HREADY`. The address phase of the next transfer happens during the data
phase of the current one. Slaves stretch the data phase with wait states (`HREADY` low). While
`HREADY` is low, the next address phase on the bus is held as well. An address phase therefore only
moves forward on a clock edge where `HREADY` is high.

`HTRANS` takes four values:

| code | name | meaning |
|---|---|---|
| `00` | IDLE | no transfer |
| `01` | BUSY | the master pauses inside a burst; no data phase follows |
| `10` | NSQ (non-sequential) | first beat of a transfer |
| `11` | SEQ | a following beat of a burst, at the previous address + 4 |

The burst signal is one bit: SINGLE (one beat) or INC (an incrementing burst of up to 16 beats).

Bus ownership is pipelined in the same way. The arbiter keeps three pieces of state:

| register | what it records | when it changes |
|---|---|---|
| `hgrant` | who will own the next address phase | each cycle while the bus shows IDLE and the granted master already owns it; held otherwise |
| `hmaster` | who owns the current address phase | on each edge with `HREADY` high, it takes the grant |
| `hmaster_data` | who owns the current data phase | on each edge with `HREADY` high, it takes `hmaster` |

Routing in the multiplexer follows these registers:

* The address/control of master `hmaster` goes to the slaves.
* The write data comes from `hmaster_data`.
* The response comes from the slave that was selected in the last accepted address phase. That
  slave select is registered inside the mux.

A zero-wait SINGLE transfer takes two cycles from its NSQ cycle to its READY/OK cycle. A
16-beat INC burst can take at most 34 cycles: 1 address cycle, 16 data beats, at most 16 wait
states (the slave's budget for the whole burst) and at most one BUSY cycle. Both numbers are checked
cycle-exactly in `tb_ahb_master`. The bridge inserts one wait state per beat, so a burst to the APB
also fits the 34-cycle bound: 1 + 16 × 2 + 1.

## Arbitration and split masking

Masters are numbered 0 to 7 in increasing priority. After reset, master 7 is granted and owns the
bus. The rules:

* **Re-arbitration only on an idle bus.** When the bus shows `HTRANS = IDLE` and the granted master
  already owns the bus, the next grant goes to the highest-numbered master that requests and is not
  masked.
* **Default master.** If no master qualifies, master 0 is granted.
* **No regrant during a transfer.** While the bus shows NSQ, SEQ or BUSY, the grant is held, so a
  burst keeps the bus.
* **Handover.** Ownership moves on an edge with `HREADY` high, which is when the current transfer's
  phase completes.

A master does not hold on to its request. It drops `HBUSREQ` as soon as its last address phase has
been accepted. The IDLE it then drives lets the arbiter hand the bus on while its last data phase is
still running.

The arbiter holds a grant until its master has actually become the owner. A master only starts a
transfer (NSQ) while it owns the bus and is still granted. Together these two rules mean a burst is
never cut. Once a master's NSQ is on the bus, the next NSQ from that master is either a new command
or a restart after RETRY/SPLIT. The end-to-end test checks this.

The master can still resume a burst with a fresh NSQ if the bus is taken from it in the middle.
That makes it usable with other AHB arbiters, and `tb_ahb_master` tests it.

**Masking.** A SPLIT response masks a master. In the first cycle of the response (`HRESP = SPLIT`,
`HREADY` low), the arbiter sets the mask bit of the **data-phase** owner. A masked master keeps
requesting but is not granted. The one exception is master 0, which is still the default grant when
nobody else qualifies. The slave that split the master later raises that master's bit of `HSPLIT`.
That clears the mask, and the master wins the bus again by normal priority. If a SPLIT and an HSPLIT
arrive for the same master in the same cycle, the SPLIT wins.

**Fairness.** The scheme is deliberately not fair: only master 7 is sure to be served. Under the
end-to-end test's load, master 7 completes about 400 command pairs in the time master 0 completes
2.

## Slaves: wait states and the two-cycle responses

`ahb_slave` takes an address phase when it is selected, `HREADY` is high and the transfer is NSQ or
SEQ. IDLE and BUSY get an immediate OK. The slave reads its `slv_ctl` input in that same cycle to
decide how to answer:

* **OK after `waits` wait states.** `HREADY` is low and `HRESP` is OK until the last cycle. A write
  updates the register on the completing edge. A read returns the register in the completing cycle.
  A burst may have at most 16 wait states in total. The budget starts again at each NSQ, and further
  requests are cut to what is left.
* **ERROR, RETRY or SPLIT.** These are always two cycles after any wait states: `HREADY` low with the
  response, then `HREADY` high with the same response. The first cycle gives the master time to
  switch its next address phase to IDLE. The register is not touched.
* **SPLIT.** A SPLIT-capable slave records `hmaster` of the address phase. It splits on one master
  at a time. It may release that master (`slv_ctl.unsplit`) only after the SPLIT response is
  complete, so that the arbiter has already set the mask. It raises `HSPLIT` only for the master it
  split on.
* **SPLIT turned into RETRY.** A slave that is not SPLIT-capable, or one that already holds a split,
  answers RETRY where SPLIT was asked for.

In the top level, slots 0 to 7 are SPLIT-capable and slots 8 to 14 are not (`SPLIT_CAPABLE`
parameter).

## Masters

`ahb_master` takes one command at a time through `cmd` and `cmd_ready`. A command has:

* a direction (read or write);
* SINGLE or INC;
* a beat count from 1 to 16;
* a word address.

Write data is pulled beat by beat: during the data phase of beat `wbeat`, the user supplies `wdata`
combinationally. Each read beat appears on `rvalid`/`rdata`/`rbeat` one cycle after it completes.
`done` pulses after the last beat. `done_err` pulses with it if the command was aborted.

The master reacts to the slave's answer as follows:

| response | master's reaction |
|---|---|
| wait state | holds its address and write data |
| RETRY | restarts the **whole command** from beat 0 |
| SPLIT | restarts the **whole command** from beat 0, once the arbiter lets it back on the bus |
| ERROR | aborts the command |

With `busy_req` set during an INC burst, the master inserts exactly one BUSY cycle, never on the
first beat.

## The APB and the bridge

An APB transfer always takes two cycles: SETUP (`PSEL` high, `PENABLE` low, address, direction and
write data valid), then ENABLE (`PENABLE` high, everything stable). The bridge starts an APB
transfer from the AHB address phase. It holds the AHB data phase with one wait state during SETUP,
and ends it together with ENABLE, returning `PRDATA` as `HRDATA`:

```
cycle        a          a+1         a+2
AHB     NSQ addr     data (wait)   data (READY)
APB      IDLE          SETUP        ENABLE  -> SETUP if the next AHB transfer is for the bridge, else IDLE
```

`PWDATA` is the AHB write data. The AHB master holds it for the whole data phase. An APB register
changes on the edge that ends ENABLE. The bridge always answers OK.

## Address map

| bits | meaning |
|---|---|
| `HADDR[31:28]` | AHB slot; 15 is the bridge |
| `PADDR[13:12]` | APB peripheral (inside the bridge window `0xF000_0000`) |
| `[5:2]` | one of 16 registers in any slave |

## Where this RTL goes beyond or departs from the model it follows

The model describes the protocol and the arbiter precisely. It leaves masters and slaves abstract.
These choices are this design's own:

* **Widths and encodings.** Data is 32 bits; the AHB may have up to 128 and the APB up to 32.
  `HTRANS` and `HRESP` use the AMBA 2.0 encodings. The burst signal is a single SINGLE/INC bit.
* **Grant held while the bus is busy.** The model's arbiter equation would fall back to master 0
  whenever the bus is not idle. Holding the grant instead matches the model's own statement that
  ownership only changes when a transfer completes.
* **Mask polarity.** The model's equation writes the mask as both "may be granted" and "is masked".
  This RTL uses one bit meaning "masked".
* **Which master is masked.** The master masked on SPLIT is the data-phase owner. The model names the
  address owner, which is a different master once handover has happened.
* **Release timing.** A slave may only release a split after its SPLIT response is complete.
  Releasing earlier could leave a master masked forever.
* **Two extra arbiter/master conditions.** The grant is held until the granted master owns the bus,
  and a master starts a transfer only while it is still granted. The model's arbiter equation
  re-arbitrates on every idle cycle. Without these conditions, a grant could move on before its
  master issued its first beat, and that burst would be cut after one beat. That would break the
  model's own property that no NSQ appears inside a burst until it ends or is answered with
  RETRY/SPLIT/ERROR.
* **Requests and wait states.** A master drops its request after its last address phase. During
  wait states it holds its address and control rather than switching to IDLE.
* **Wait-state budget.** The 16-wait-state limit applies per burst, which is what makes the 34-cycle
  bound hold. Elsewhere the model also prints 10 cycles for this bound. This design keeps 34.
* **Slave and peripheral contents.** Register files of 16 words, the address map, which slots can
  split, bridge slot 15 and 4 APB peripherals are all this design's choices.
* **Example peripherals not built.** The example system drawn around such buses (processor, DMA
  engine, on-chip and off-chip RAM, UART, timer, keypad, PIO) is not built. The generic masters and
  register slaves take their places.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends it
with a failure if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/amba_pkg.sv \
    tb/tb_amba_top.sv --top-module tb_amba_top -o sim
./obj_dir/sim
```

Replace `tb_amba_top` with any other testbench name. All testbenches run in seconds.

| testbench | what it checks |
|---|---|
| `tb_ahb_arbiter` | 20,000 random cycles against a reference model of the grant, ownership and mask rules |
| `tb_ahb_decoder` | the select for every slot |
| `tb_ahb_mux` | routing of address/control, write data and the response each cycle |
| `tb_ahb_master` | NSQ/SEQ/BUSY protocol, data, exact latencies (2 and 34 cycles), restart after RETRY/SPLIT, abort on ERROR, resume after losing the bus |
| `tb_ahb_slave` | data, data-phase lengths, two-cycle response shape, wait budget, SPLIT→RETRY, single `HSPLIT` to the right master |
| `tb_apb_slave` | writes only at the end of ENABLE |
| `tb_apb_bridge` | SETUP/ENABLE sequencing, two-cycle APB and AHB timing, back-to-back transfers, data both ways |
| `tb_amba_top` | the full default system, below |
| `tb_amba_properties` | directed scenarios on the full system: 2-cycle SINGLE, exactly 34 cycles for a 16-beat burst with 16 waits and one BUSY, master 7 granted the cycle after IDLE, service order 7-6-4, split masking and release, APB register written two cycles after SETUP, back-to-back APB transfers, every master able to start and finish a transfer |

`tb_amba_top` runs the full default configuration for 30,000 cycles. All 8 masters write and read
back their own regions in slots 0 to 14 and behind the bridge. Slaves inject random wait states,
RETRY, SPLIT, ERROR (reads only) and split releases. The test checks:

* every read-back;
* every SINGLE data-phase length;
* that every command no RETRY/SPLIT/ERROR touched ends within 34 cycles of its NSQ (the longest
  observed is exactly 34);
* that no burst is cut by a new NSQ;
* that no masked master (other than master 0) is granted;
* that each mechanism happened at least once: wait states, RETRY, SPLIT, ERROR, BUSY, SINGLE and
  INC, masking, `HSPLIT`, handover, default grant, APB and back-to-back APB transfers.

Concurrent assertions in the RTL check further protocol rules while simulating:

* one-hot grant;
* masked masters not granted;
* two-cycle response shape;
* one-hot `HSPLIT`;
* SETUP always followed by ENABLE, with stable signals;
* held addresses during wait states.
