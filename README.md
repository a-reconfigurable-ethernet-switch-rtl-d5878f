# Reconfigurable dual-port Ethernet switch with lossless hand-over

A network node in a line or ring of nodes forwards Fast Ethernet traffic
between its two ports. When traffic is light, a small *software switch* is
enough: two plain MACs, and the processor copies every frame that is not for
this node from one MAC to the other. When load rises, a *hardware switch*
forwards frames on its own and relieves the processor, at the cost of much
more logic. This RTL holds both implementations side by side, with a
multiplexer on each port. It hands the ports over from one to the other
while traffic keeps flowing, without losing a frame. The hand-over uses the
inter-frame gap of Ethernet: an owner change happens only when the line is
idle.

The structure and the hand-over method follow the published design "A
Reconfigurable Ethernet Switch for Self-Optimizing Communication Systems".
Widths, encodings, interfaces and everything else that description leaves
open are this implementation's own choices. They are listed under
"Departures and own choices" below.

```
            processor queues (byte streams)            processor queues
          sw_*[0]          sw_*[1]                  hw_*[0]     hw_*[1]
             |                |                         |           |
        +---------+      +---------+         +----------------------------+
        | eth_mac |      | eth_mac |         |          hw_switch          |
        | port 0  |      | port 1  |         |  hw_subswitch  hw_subswitch |
        +---------+      +---------+         |   port 0  <-fwd->  port 1   |
           |   |            |   |            +----------------------------+
           |   |            |   |                 |   |         |   |
           |   +------------|---|---------+-------+   |         |   |
           |                |   |         |           |         |   |
        +--------------------+ +--------------------+ |         |   |
        | mii_mux  port 0    | | mii_mux  port 1    |<+---------+   |
        | Rx_1 / Tx_1        | | Rx_2 / Tx_2        |<--------------+
        +--------------------+ +--------------------+
                  |                      |
               MII port 0             MII port 1

        reconfig_ctrl: drives the owner requests of both multiplexers and
        the transmit enables of both switches
```

## Clocking and line format

Everything runs on one clock, `clk`. It is taken to be the 25 MHz MII clock
of 100 Mbit/s Ethernet, so one nibble moves per clock on each direction of
each port. The receive and transmit clocks of the PHY are assumed to be this
same clock, so there is no clock-domain crossing. The minimum inter-frame gap
of 0.96 us is 24 clocks. Frames are 64 to 1518 bytes from destination
address to FCS, plus 8 bytes of preamble and SFD on the wire. Reset is
active-low and asynchronous (`rst_n`). It empties all buffers and gives both
ports to the software switch.

## The hand-over

This is the subtle part of the design. `reconfig_ctrl` sequences it, and the
two `mii_mux` instances carry it out. Receive and transmit of each port move
separately:

1. **Receive moves at once.** When a hand-over starts, the controller asks
   both multiplexers to give the receive lines to the new switch. A
   multiplexer changes the receive owner only in a clock where RX_DV is low
   and was low the clock before. A frame already arriving therefore finishes
   in the old switch, and every later frame lands in the new one.
2. **Frames left in the old receive queues are moved by the processor.** It
   reads them and writes them into the *new* switch's transmit queue of the
   other port. The hand-over is not finished until both old receive queues
   are empty.
3. **Transmit moves when the old side is drained.** The old switch keeps a
   port's transmit lines until both receive processes have moved, its
   transmit queues are empty, its transmitter is idle, and the minimum gap
   since its last frame has passed (`tx_drained`). Only then is the
   transmit multiplexer asked to switch. The first condition matters when
   leaving the hardware switch. Without it, a frame still arriving at the
   hardware switch could be forwarded into a transmitter that no longer
   owns its port. Until the multiplexer has switched, the new switch's transmitter on that port is held
   (`tx_enable` low), so frames queued there wait. The gap rule thus holds on
   the wire even across the change of owner.
4. The hand-over ends when all four owners (receive and transmit, two ports)
   point to the new switch and the old receive queues are empty.
   `reconf_done` pulses, `cfg` changes, and `reconf_cycles` holds the
   duration in clocks.

Consequences that a user must know:

- **No frame is lost**, provided the buffers do not overflow during the
  hand-over. The new switch starts receiving at once, so the buffering need
  is small.
- **Frame order can change during a hand-over.** A frame received by the new
  switch can leave before an older frame that the processor is still copying.
  The published design discusses two other methods that keep the order or
  need no buffer status. They are not implemented here.
- The same sequence works in both directions (software to hardware and
  back).

A hand-over starts when `reconf_start` is pulsed with `reconf_target`.
With `reconf_auto` high, it also starts automatically from the software switch
to the hardware switch in two cases: when a software-switch port's measured
load exceeds 20 % (`sw_load_high`), or when a receive buffer is about to
overflow (`sw_ovf_warn`). The warning is raised when two frames wait in a
receive buffer, or when less than one maximum frame of space is left.
A start request toward the switch already in use, or one made during a
hand-over, is ignored.

## Load measurement

`load_monitor` measures each port's receive load independently of frame
size:

    L = (K * IFGmin + RXactive) / T

Here RXactive is the number of clocks with RX_DV high in the interval T, and
K is the number of frames that ended in it (falling edges of RX_DV). Each
frame is charged one minimum gap, so a fully loaded line reads 100 %
whatever the frame size. At the end of every interval the block updates
`load_pct` (integer percent, saturating at 100) and `load_high`
(L > 20 %). T is 1 ms (25 000 clocks) by default. A frame that straddles
an interval boundary is counted partly in each interval.

## Hardware switch

`hw_switch` is two `hw_subswitch` instances, one per port. Each one
receives on its own port and writes every frame into two buffers at once:
the processor receive queue and a forwarding buffer. When the frame ends,
each buffer either keeps or discards its copy:

| received frame                        | processor queue | forwarding buffer |
|---------------------------------------|-----------------|-------------------|
| destination = `my_addr`               | kept            | discarded         |
| broadcast                             | kept            | kept              |
| any other destination                 | discarded       | kept              |
| bad FCS, runt, oversize, odd nibbles  | discarded       | discarded         |

This is store-and-forward: a frame is only sent once it has been received
completely and checked, so corrupt frames are never forwarded. The
forwarding buffer of one sub-switch feeds the transmitter of the other.

Each transmitter has two sources: the processor's transmit queue and the
frames forwarded by the other sub-switch. A monitor examines one source per
clock, alternating between them, and locks onto the first source that holds
a frame until that frame's last byte. A forwarded frame that becomes ready
while the monitor is examining the processor queue waits one extra clock
(`hw_poll_miss` counts these clocks). Forwarding starts 2 to 8 clocks
after a frame has been received completely. The latency from the first
nibble in to the first nibble out is therefore that delay plus 2 clocks per
frame byte. Both ports run at full line rate at the same time.

## Software switch MAC

`eth_mac` is the same receive and transmit path without the forwarding
buffer. The forwarding decision is left to the processor. Both kinds of MAC
give the processor the same queue interface, so one driver serves both
configurations.

## Processor queues

The processor bus is not part of this RTL. Each queue is a byte stream
instead, indexed by port in the top level:

- **Receive queue** (`*_rx_valid/data/last/ready`, plus `*_rx_len`). Only
  whole, checked frames appear, one byte per clock while `ready` is high.
  `rx_last` marks the final byte (the last FCS byte). `rx_len` is the length
  of the frame being read, or of the next one. `*_rx_pkts` counts waiting
  frames.
- **Transmit queue** (`*_tx_valid/data/last`). A frame is written from
  destination address to FCS, and `tx_last` commits it. The FCS must be
  supplied: the transmitter sends the bytes unchanged. `tx_ready` is always
  high. The writer must check that `*_tx_free` is at least the frame length.
  Otherwise the frame is dropped whole and counted.

All buffers are `pkt_buffer` instances: a 6144-byte circular byte memory
plus a FIFO of frame lengths. A frame becomes readable only after it is
committed, and `wr_abort` rewinds a frame that should not be kept. The
memory is read synchronously, so it maps to block RAM.

## Parameters

| parameter   | default | meaning                                                         | origin |
|-------------|---------|-----------------------------------------------------------------|--------|
| `BUF_DEPTH` | 6144    | bytes per buffer (4 in the software switch, 6 in the hardware switch) | 24 kByte and 36 kByte of buffering in the published design, split evenly |
| `WARN_PKTS` | 2       | waiting frames that raise the overflow warning                  | the published lossless-reconfiguration test |
| `LOAD_T`    | 25000   | load measurement interval in clocks (1 ms)                      | own choice |
| `LOAD_PCT`  | 20      | load threshold in percent                                       | published |
| `IFG_CYCLES` (`mii_tx`) | 24 | minimum gap in clocks (0.96 us)                         | Ethernet |

With the default depth the design holds 10 x 6 kByte = 60 kByte of frame
buffering. This matches the 24 + 36 kByte that the published design needs
while both switches are active.

## Departures and own choices

- Both switches are always present. In the published design the hardware
  switch is loaded into the FPGA by partial reconfiguration (about 10 ms)
  before the hand-over, and removed again afterwards. That device
  configuration step is not modelled. Only the phase with both switches
  active is built.
- Only the first of the three published hand-over methods is built (fast
  activation, order may change).
- The processor, its memory and the system bus are outside the RTL. Status
  that the processor would read over the bus (load, overflow warning, queue
  fill) appears as output ports.
- The automatic start rule (load or overflow warning, software to hardware
  only) is in hardware behind `reconf_auto`. In the published design the
  processor takes this decision from the same status.
- Own choices: the MII details (4-bit data, low nibble first, RX_ER not
  used), the FCS and length checks, broadcast delivery to both the processor
  and the other port, the station address as an input (`my_addr`), the
  descriptor FIFO depth (128 frames), the 1 ms load interval, and reset
  behaviour.

## Verification

Each block has a self-checking testbench in `tb/`, all driven with frames
whose FCS is computed by an independent bit-serial CRC model
(`tb/tb_eth_pkg.sv`). Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_pkt_buffer` | commit and abort, read-back under random back-pressure, whole-frame drop on overflow |
| `tb_mii_rx` | good, corrupted, runt, odd-nibble and back-to-back frames |
| `tb_mii_tx` | preamble, data, 16 + 2 clocks per byte, 24-clock gap, suspend |
| `tb_load_monitor` | formula against hand-worked loads, threshold at exactly 20 % |
| `tb_eth_mac` | processor receive and transmit, overflow warning, drained status |
| `tb_hw_subswitch` | switching decision table, processor frames mixed with forwarded frames, monitor delay |
| `tb_hw_switch` | full line rate on both ports, store-and-forward delay |
| `tb_mii_mux` | owner changes only on an idle line (also an assertion in the RTL) |
| `tb_reconfig_ctrl` | hand-over order, completion rule, automatic triggers, return |
| `tb_reconfig_eth_switch` | the whole design at default sizes with a processor model, see below |
| `tb_latency_sweep` | latency against packet size through the whole design, software then hardware switch |
| `tb_handover_stress` | 16 hand-overs back and forth at random moments under random traffic on both ports |

`tb_reconfig_eth_switch` runs five phases: software switching; five
100-byte frames back to back with a slow processor, so the overflow warning
starts the hand-over; full-rate traffic in both directions through the
hardware switch; a requested return to software while traffic flows; and a
load above 20 % starting the hand-over again. It checks that every frame
leaves the right port exactly once, that gaps on the wire never drop below
24 clocks, and that each mechanism occurred. With its processor model, the
overflow-triggered hand-over takes about 3000 clocks (about 120 us). That time
is set mostly by the model's software delay of 1500 clocks per frame.

`tb_latency_sweep` sends one frame at a time, with payloads of 100 to 1500
bytes. Through the hardware switch the latency from the first nibble in to
the first nibble out is 16 + 2 x (payload + 18) clocks plus about 6 clocks.
That is 10.3 us at 100 bytes and 122.3 us at 1500 bytes, or 0.08 us per
byte. The processor model of the software switch moves one byte per clock
and gives twice that slope. A real processor is slower: it copies each
frame into memory and out again, and the published measurements show a
slope 3.92 times that of the hardware switch.

`tb_handover_stress` sends 150 frames into each port, of random size
(46 to 800 payload bytes), destination and gap, and requests 16 hand-overs
in alternating directions at random moments. It checks that no frame is
lost, duplicated or dropped by a full buffer, and that wire gaps stay at 24
clocks or more. The mean load is about 30 % per port, because the
software switch model cannot carry more than about half the line rate of
both ports together; above that its receive buffers fill and drop frames,
as a real software switch would. A different random seed
(`+verilator+seed+N`) gives a different run.

To run a testbench with plain Verilator (from the folder that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/eth_pkg.sv tb/tb_eth_pkg.sv tb/tb_reconfig_eth_switch.sv \
    --top-module tb_reconfig_eth_switch -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The whole-design run takes
about 10 seconds.
