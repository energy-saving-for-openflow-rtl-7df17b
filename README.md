# Balance Switch power manager: stopping an OpenFlow switch's core clock between bursts

An OpenFlow switch built on a NetFPGA-1G board clocks its packet-processing core at
125 MHz all the time, even when no packets are moving. Most of that core (the User Data
Path, CPU DMA queues, register blocks) has nothing to do between packets. The MAC receive
queues, however, run on their own receive clock and can hold packets on their own.

The Balance Switch uses this split. It stops the core clock (0 MHz) whenever the core is
idle and lets arriving packets collect in the receive queues. It restarts the clock when a
queue holds "enough" to be worth forwarding. "Enough" is set by four software thresholds,
an approach called *queue engineering*:

| Threshold          | Unit    | Wakes the core when…                                         |
|--------------------|---------|--------------------------------------------------------------|
| Max Queue Length   | bytes   | a receive queue holds at least this many bytes               |
| Max Packet Number  | packets | a receive queue holds at least this many complete packets    |
| Wait Timeout       | clocks  | the first complete packet in a queue has waited this long    |
| Idle Timeout       | clocks  | (not a wake condition) how long the core stays idle before its clock stops |

This repository is the synthesizable SystemVerilog for the two added blocks:

* the **power manager**, which decides when the core may sleep, and
* the **clock controller**, which gates the core clock.

It also holds self-checking testbenches and a behavioural model of the surrounding switch,
used only in the testbenches.

## Two ready-made settings

The same hardware is tuned entirely through the threshold registers. Two settings are
defined:

| Setting    | Idle Timeout | Max Queue Length | Max Packet Number | Wait Timeout            |
|------------|--------------|------------------|-------------------|-------------------------|
| Low Power  | 5 (40 ns)    | 2000 bytes       | 1                 | 12 500 clocks (100 µs)  |
| Save Power | 5 (40 ns)    | 5120 bytes       | 127               | 12 500 000 clocks (100 ms) |

* **Low Power** wakes the core as soon as one packet is completely received. The only
  cost in latency is the wake-up itself, which takes 3 clocks in this RTL.
* **Save Power** lets packets pile up until a queue reaches 5120 bytes. A lone packet can
  wait up to 100 ms. The clock therefore stays off longer, at the price of latency.

The registers reset to the Low Power values. The receive queue of the MAC is 8096 bytes,
so the largest Max Queue Length used (5120) leaves room for more than two further
maximum-size frames while the core wakes up. Packets are never dropped because of
sleeping.

## Operating modes

`packets_manager` holds one of three modes:

```
            any of mac_grp_core_en, dma_vld_c2n, working_state
   IDLE  ------------------------------------------------------>  WORKING
   clock on  <------------------------------------------------  clock on
     |        none of mac_grp_core_en, dma_vld_c2n, working_state    ^
     | Idle Timeout clocks in IDLE                                   |
     v                                                               |
   SLEEP  -----------------------------------------------------------+
   clock off       mac_grp_core_en or dma_vld_c2n
```

* **WORKING** is normal operation.
* **IDLE** means nothing is being processed, but the clock still runs in case more packets
  come.
* **SLEEP** is entered after Idle Timeout clocks of IDLE. In SLEEP the core has no clock.
  Only two things can wake it:
  * a receive-queue condition (`mac_grp_core_en`);
  * a DMA transfer announced by the host (`dma_vld_c2n`).

  `working_state` cannot wake the core, because the blocks that drive it are the ones
  that have stopped.

The clock is also kept running, without leaving SLEEP, while the register group is busy
or the PCI bus announces a register access. This lets software read and write registers,
including the thresholds, on a sleeping switch.

## Inside the power manager

All of it runs on `gtx_clk`, the 125 MHz transmit clock, which is never gated.
`power_manager` joins six sub-blocks:

| Module              | Output               | Rule |
|---------------------|----------------------|------|
| `system_states`     | `working_state`      | OR of four activity groups: UDP input side (`udp_in_wr`, `vlan_remover_out_wr`, lookup FIFO not empty); UDP output side (`vlan_adder_out_wr`, `udp_out_wr`); CPU TX DMA (`cpu_q_dma_wr_pkt_vld`, `cpu_q_dma_wr`); CPU RX DMA (`cpu_q_dma_pkt_avail`, `cpu_q_dma_rd_rdy`) |
| `pm_registers`      | thresholds struct    | four 32-bit software registers |
| `queue_condition`   | `mac_grp_core_en`    | for any of the 4 receive queues: `rx_data_count >= Max Queue Length`, or `rx_packet_count >= Max Packet Number`, or wait time `>= Wait Timeout` |
| `packets_manager`   | `core_clk_packet_en` | the mode machine above; 1 unless in SLEEP |
| `registers_manager` | `core_clk_reg_en`    | `work_reg_grp` OR `pci_bus_dv` |
| `core_clock_enable` | `core_clk_en`        | `core_clk_packet_en` OR `core_clk_reg_en` |

**Wait time.** Each receive queue has its own wait timer.
* It starts when the queue's packet count leaves zero, i.e. when the first packet is
  completely received.
* It counts once per clock and saturates at its maximum.
* It clears when the queue is empty again.

A packet that is only partly received counts in `rx_data_count`, but not in
`rx_packet_count` or the timer.

**Register map** (word address, 32-bit data):

| Address | Register          | Reset |
|---------|-------------------|-------|
| 0       | Idle Timeout      | 5     |
| 1       | Max Queue Length  | 2000  |
| 2       | Max Packet Number | 1     |
| 3       | Wait Timeout      | 12500 |

**Register bus.** A request is a one-cycle `reg_req`:
* `reg_rd_wr_L` is 1 for a read and 0 for a write;
* `reg_addr` holds the word address and `reg_wr_data` the write data;
* `reg_ack` follows one clock later, with `reg_rd_data` valid in the same cycle.

A threshold written as 0 is always met, which keeps the switch awake.

## Clock gating and wake-up timing

`clock_controller` plays the role of the vendor clock multiplexer: a high `core_clk_en`
passes the clock, a low one outputs a constant 0. It captures `core_clk_en` on the
falling edge of the core clock and ANDs the captured value with the clock. Because the
captured enable only changes while the clock is low, no shortened pulse can appear on
`core_clk_int`.

**The gate's one requirement.** `core_clk_en` comes from the `gtx_clk` domain. The gate
assumes that `gtx_clk` and `core_clk` come from one 125 MHz source and are in phase. If
they are unrelated, put a synchronizer in front of `clock_controller`.

**Wake-up sequence**, counted in rising clock edges from the edge at which a queue count
first meets a threshold:

| Edge | Event |
|------|-------|
| 0    | `queue_condition` registers `mac_grp_core_en` |
| 1    | `packets_manager` enters WORKING |
| 2    | `core_clock_enable` raises `core_clk_en` |
| 3    | (captured at the falling edge before it) first rising edge of `core_clk_int` |

The core thus restarts 3 clocks (24 ns) after the trigger. A `dma_vld_c2n` request
bypasses the first register and restarts the clock after 2 clocks. Going to sleep takes
Idle Timeout clocks of IDLE, plus the same 2–3 register stages before the clock stops.

The DCM (clock de-skew) and global buffer drawn around the multiplexer on the FPGA are
vendor primitives. They are not part of this RTL: `core_clk` is used directly.

## Files

* `rtl/pm_pkg.sv`: mode enum, register map, thresholds struct, and the Low Power and
  Save Power constants.
* `rtl/system_states.sv`, `pm_registers.sv`, `queue_condition.sv`, `packets_manager.sv`,
  `registers_manager.sv`, `core_clock_enable.sv`: the six sub-blocks.
* `rtl/power_manager.sv`: the six sub-blocks wired together.
* `rtl/clock_controller.sv`: the clock gate.
* `rtl/balance_switch_top.sv`: power manager and clock controller.
  * Its ports carry the status signals of the NetFPGA core, the register bus, the two
    125 MHz clocks and the gated clock `core_clk_int`.

Top-level parameters (defaults in brackets):
* `NUM_PORTS` (4): receive queues;
* `NUM_CPU_Q` (4): CPU DMA queues;
* `DATA_CNT_W` (16), `PKT_CNT_W` (8): queue counter widths;
* `TIMER_W` (24): wait-timer width. It holds 12 500 000; widen it for longer Wait Timeouts.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pm_pkg.sv tb/tb_balance_switch_top.sv --top-module tb_balance_switch_top
./obj_dir/Vtb_balance_switch_top
```

Replace the top module name to run another testbench:

| Testbench                   | What it exercises |
|-----------------------------|-------------------|
| `tb_system_states`, `tb_registers_manager`, `tb_core_clock_enable` | random inputs against the expected logic, one clock later |
| `tb_pm_registers`           | reset values, Save Power writes, random read/write, `reg_ack` timing |
| `tb_queue_condition`        | four randomly filling queues under several threshold sets; each of the three conditions must fire |
| `tb_packets_manager`        | random bursts and idle timeouts against a mode model; every transition must occur |
| `tb_clock_controller`       | random enable; every gated pulse full width, gated edge count exact |
| `tb_power_manager`          | all inputs random, thresholds rewritten by the register bus; mode and `core_clk_en` against a cycle model |
| `tb_balance_switch_top`     | end to end, default parameters; see below |
| `tb_power_modes_workload`   | both settings over the throughput sweep; see below |

### The end-to-end test

`tb_balance_switch_top` wraps the design in a model of the switch:
* four receive queues filling at 1 byte per clock per port;
* a core on `core_clk_int` that reads packets at 8 bytes per clock.

The test checks that:
* every wake-up mechanism occurs: the three queue conditions, a DMA request, core
  activity pulling IDLE back to WORKING, IDLE to SLEEP, and register access while in
  SLEEP;
* each wake-up takes 2–4 clocks;
* the gated clock never runs without `core_clk_en`;
* no queue passes 8096 bytes;
* every packet sent is forwarded.

### The workload test

`tb_power_modes_workload` sends 1000-byte packets into one port at 0, 10, 50, 100, 300,
500, 700, 900 and 1000 Mbit/s, in both settings. For each run it measures the share of
clocks in which the core clock is stopped:

| Mbit/s     | 0     | 10    | 100   | 500   | 1000  |
|------------|-------|-------|-------|-------|-------|
| Low Power  | 99.99 | 99.86 | 98.66 | 93.23 | 86.65 |
| Save Power | 99.99 | 100.0 | 98.73 | 93.66 | 87.32 |

The test also checks the rule that decides whether the switch sleeps between two packets: it
sleeps only if the gap between them is longer than the processing time plus Idle Timeout. A
line-rate stream of 64-byte packets leaves about 50 idle clocks between packets. With Idle
Timeout 100 the switch never sleeps during it; with Idle Timeout 20 it sleeps between every
two packets.

In Low Power, every packet is read at most 4 clocks after it has fully arrived. In Save
Power, packets at low rates wait up to hundreds of thousands of clocks. The test also
holds one packet for the full Save Power Wait Timeout. The packet is held for
12 500 002 clocks before the core wakes (about 100 ms).

These figures give clock-off time, not power. How much power a stopped core clock saves
depends on the FPGA and on how much logic sits behind the gate. Board-level power
measurements of this scheme report roughly 30–35 % savings against an always-clocked
switch.

`pm_registers` and `packets_manager` also carry assertions. They check that `reg_ack`
answers every request one clock later, and that SLEEP is entered only from IDLE and left
only towards WORKING.

## Where this RTL makes its own choices

Threshold semantics:
* Thresholds compare with `>=`, so a queue that reaches a threshold, and does not
  just exceed it, wakes the core.
* The switch stays in IDLE for exactly Idle Timeout clocks (at least one) before it
  sleeps.
* Each receive queue has its own wait timer, and the four queues' conditions are ORed.

Interfaces:
* The members of each activity group are ORed; the lookup FIFO's empty flag counts as
  activity when low.
* The register bus, the register map, the 32-bit width and the Low Power reset values
  are choices of this RTL.

Registers and reset:
* Each sub-block has an output register. Together they set the 3-clock wake-up.
* The reset state is WORKING, with the clock running.

Clocking:
* The clock multiplexer is written as a falling-edge-captured AND gate.
* The DCM is omitted, and the power manager's clock is assumed to be in phase with the
  core clock.
* All status inputs are assumed to be synchronous to `gtx_clk`; no synchronizers are
  included.

Not included: the switch itself (MACs, User Data Path, CPU queues, DMA, PCI and register
blocks, PHY) and the vendor clock primitives. Only the status signals of the switch
appear, as ports of the top.
