# Random neural network routing engine for a cognitive packet network

A cognitive packet network (CPN) routes traffic with the help of *smart packets*.
These probe the network and pick their next hop at each router. When a smart packet
reaches its destination, an *acknowledgment* (ACK) travels back along the recorded
path. Each router on that path then uses the measured reward to teach a small
random neural network (RNN) which of its output ports is best for that class of
traffic.

This repository is synthesizable SystemVerilog for such a router. Its core is
the *smart packet processor* (SPP), which does two jobs:

* It answers a routing request within a few clock cycles, using a stored
  decision or a random choice.
* In parallel, it runs the reinforcement-learning update that produces those
  stored decisions.

The RNN is the *reduced* form. A router with n ports keeps 2n weights per
traffic class instead of the 2n² of a fully connected RNN:

* one excitatory weight w⁺ᵢ and one inhibitory weight w⁻ᵢ per neuron (port);
* every neuron sees the same sum of all neuron outputs.

For 4 ports that is 8 weights instead of 32. For 32 ports it is 64 instead of 2048.

## Number formats

All arithmetic is unsigned fixed point with 15 fraction bits:

| quantity | bits | format | 1.0 = |
|---|---|---|---|
| weight w⁺, w⁻ | 18 | 3.15 | `18'h08000` |
| neuron output q, reward R, threshold T | 16 | 1.15 | `16'h8000` |
| rates r, Λ, λ | 22 | 7.15 | `22'h008000` |

A traffic class is identified by its QoS/source/destination triple (QSD). The QSD is
68 bits: 4 bits of QoS, a 32-bit source address and a 32-bit destination address
(`cpn_pkg::qsd_t`).

Package `cpn_pkg` holds every constant and type. The defaults are:

* `N_PORTS=4`
* 16 stored models
* default weight 1.0
* default threshold `0x0100`
* exogenous excitation Λ = 3.0
* external inhibition λ = 0
* smoothing constant α = 127/128

## The neuron model

Each neuron computes

    q_i = (w⁺_i · Σq + Λ) / (r + w⁻_i · Σq + λ)

`rnn_neuron` does this in one combinational step. It uses two multipliers, two
adders and a divider, truncates each result and saturates it at `0xFFFF`. A zero
denominator gives `0xFFFF`.

`neuron_array` holds the N outputs in registers:

* `load` sets every q to 0.5.
* Each `step` performs one Jacobi iteration: all neurons use the sum from the
  previous iteration.
* `converged` goes high one cycle later when no q moved by more than `TOL` (2 LSB).

## The learning update (`rl_algorithm`)

An ACK brings a reward R for the port k that this router chose earlier for the
QSD. The update runs in this order:

1. **Fetch** the model for the QSD through table port 2. On a miss it starts
   from all weights 1.0 and threshold `0x0100`.
2. **Compare** R with the smoothed threshold T. If T ≤ R (the decision was good):
   * w⁺_k += T;
   * w⁻_j += T/(n−1) for every other port j.

   Otherwise (punishment):
   * w⁻_k += T;
   * w⁺_j += T/(n−1) for every other port j.
3. **Update the threshold** to `T' = (α·T + (1−α)·R)`, computed as
   `(ALPHA*T + (0x8000-ALPHA)*R) >> 15`.
4. **Normalize.**
   * The firing rate is the sum of all weights. Before the update it is
     r_old = 2n = 8.0 for unit weights. After the update it is r*.
   * The factor `floor(r_old·2¹⁵ / r*)` is formed once.
   * Every weight is multiplied by it and truncated, so the total returns to
     r_old.
5. **Iterate** the neuron array, with r = r_old, until it converges. This takes
   at least 2 and at most 24 iterations.
6. **Sort.** The highest q becomes the primary port and the next highest the
   secondary port. A tie goes to the lower port number.
7. **Write back** through table port 2: the weights, the threshold and the two
   decisions.

This exact order and rounding reproduce the reference results bit for bit. Starting
from default weights with threshold `0x0100`:

* A reward on port 0 gives:
  * w⁺ = `0AA0E 071FB 071FB 071FB`;
  * w⁻ = `071FB 084AB 084AB 084AB`;
  * q ≈ `4A0F` for port 0 and `3CC4` for the others.
* A punishment gives weights `080B3 / 08012 / 07FC3` and q values `4009 / 3FE1`.

`tb_rl_algorithm` checks these values. It also checks random cases against an
independent model written in the testbench. The longest update measured takes
19 clock cycles.

## The model table (`weight_storage_table`)

The models are kept in a dual-port, content-addressed store:

* `qsd_cam` is a 16 × 68-bit CAM with two search ports. Each search port drives
  one-hot match lines.
* `wst_ram` is 16 × 164 bits per word:
  * bits [3:0] hold the primary and secondary decision, which is all that port 1
    reads;
  * bits [163:4] hold the 160-bit model (8 weights of 18 bits plus the 16-bit
    threshold), which port 2 reads and writes.
* `sp_table_ctrl` serves port 1. It latches the match lines, does a registered
  read and reports `done`/`hit` two clock edges after `start`.
* `ack_table_ctrl` serves port 2, which reads, or writes:
  * On a hit, the write overwrites the matching word.
  * On a miss, the write allocates the first free word. When all words are used,
    it replaces the next word in round-robin order and also writes its CAM key.

The two ports work independently. A routing lookup is therefore never blocked by
a learning update.

## The routing decision (`sp_interface`)

On `start`, the SP interface looks up the QSD:

* **Hit:** the candidate order is:
  1. the stored primary port;
  2. the stored secondary port;
  3. every port in turn, starting from a pseudo-random one.
* **Miss:** both first candidates come from a 16-bit LFSR (the secondary is the
  next port).

A candidate is accepted only if its link is up and it is not the port the packet
came in on. If none qualifies, the packet goes back out of its incoming port.

With a hit and an acceptable primary, `done` comes at most 6 cycles after `start`.
Each rejected candidate adds 2 cycles.

The random order after the secondary matters. With a fixed order, one cut link in
the test network made packets bounce between two routers until their path record
filled up.

## The SPP (`spp`)

`spp` joins the SP interface, the learning block, the neuron array and the table.
It has two independent request/response sides:

* **Smart packet side:** `start_sp`, `qsd_sp`, `inc_port_sp` → `done_sp`,
  `out_port_sp`.
* **ACK side:** `start_ack`, `qsd_ack`, `inc_port_ack`, `rew_val` → `done_ack`,
  plus the outcome flags `ack_rewarded` and `ack_hit`.

Smart packets are served while a learning update runs.

## The router (`cpn_router`, top)

The router has N ports, each with an input and an output port controller:

* `input_port_ctrl` holds one received packet. It raises a request to the system
  controller (smart packet) or the mailbox (ACK). Dumb packets are discarded,
  because this router has no data-packet switch.
* `output_port_ctrl` holds one packet to send. The system controller has priority
  over the mailbox.

`system_controller` takes one smart packet at a time from the lowest-numbered
requesting port and handles it in one of three ways:

* **It is the destination.** It turns the packet into an ACK:
  * source and destination are swapped;
  * the path record is reversed;
  * the ACK is sent toward the first recorded hop.
* **The destination is a direct neighbour on a live link.** It sends the packet
  straight there.
* **Otherwise.** It asks the SPP for a port.

Before a smart packet leaves, the controller appends an entry
{neighbour address, link reward} to the packet's *cognitive map* (CM), which is its
path record. A packet whose CM is full is dropped.

`ack_mailbox` takes ACKs:

1. It finds its own address in the CM.
2. It takes the reward recorded with the hop it chose earlier, starts the SPP's
   learning update and waits for it to finish.
3. It then forwards the ACK to the next router in the CM, or consumes it when
   this router is the original source.

The packet type is `cpn_pkg::packet_t`:

* a 2-bit type;
* the QSD;
* a CM length;
* 8 CM entries, each a 32-bit address and a 16-bit reward.

Links are whole-packet valid/ready transfers.

The router's configuration comes in as inputs:

* `my_addr`: this router's address;
* `neighbor_addr[N]`: the address of the neighbour on each port;
* `link_up`: which links are connected;
* `link_reward[N]`: the reward value of each link.

The router reports event pulses (`ev_*`) for:

* arrival, direct forward and SPP forward;
* learning, reward and punishment;
* model hit, delivery and drop.

## The network test (`tb_cpn_network`)

`tb_cpn_network` builds a six-router network with addresses 8, 1, 2, 3, 4 and 5.
Its links are 8–1, 8–2, 1–2, 1–3, 1–4, 2–3, 2–4, 3–4, 3–5 and 4–5. Router 8 sends
QoS-1 smart packets to router 5. Link rewards favour the path 8–1–3–5.

The test runs in three phases:

1. **Learning.** It checks that the path converges to 8–1–3–5.
2. **Link 3–5 cut.** Router 3 must find another way, and it settles on 8–1–3–4–5.
3. **Link restored.** The path returns.

The test counts the following, and counts a failure for any that never happens:

* arrivals;
* table misses and hits;
* rejected candidates;
* direct and SPP forwards;
* rewards and punishments;
* smart packets served during learning;
* drops.

It uses every parameter at its default and finishes in well under a second of
wall time.

Every other module has its own self-checking testbench, `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=… failures=…` and has a watchdog.

## Where this design departs from or adds to the reference

* The smoothing constant α, the excitation Λ = 3.0 and the firing rate r = 8.0 are
  not given numerically. Λ and r were chosen because they reproduce the reference
  neuron outputs exactly.
* With α = 127/128, the reference threshold example (`0100` → `017B`) gives `017D`
  here. Every weight and q value matches.
* In the punishment example, the neuron that loses is given as q = 0.4990, which
  is `3FE1`. That value is used.
* Each RAM word holds the 4 decision bits next to the 160-bit model, 164 bits per
  word.
* These are this design's own choices:
  * the replacement policy of the table;
  * all handshakes, latencies and the packet layout;
  * CM depth 8;
  * one-packet port buffers;
  * dropping on CM overflow;
  * the random candidate order after the secondary port.
* The reward is the link reward recorded in the CM, not a measured delay.
* The ACK generated at the destination goes straight to an output port. No
  learning happens at the destination.
* Not built:
  * the data-packet switch;
  * security;
  * QoS buffering and scheduling;
  * the genetic-algorithm unit;
  * reconfiguration.

  The router carries smart packets and ACKs only.
* `N_PORTS` is a package constant. The SPP checks at elaboration that its `N`
  parameter equals it, so changing the port count means editing `cpn_pkg`.

## Simulating

With Verilator 5, for example the network test:

    verilator --binary --timing -Irtl -Wno-fatal rtl/cpn_pkg.sv rtl/*.sv \
        tb/tb_cpn_network.sv --top-module tb_cpn_network
    ./obj_dir/Vtb_cpn_network

List `cpn_pkg.sv` first. The second `rtl/*.sv` match of it is harmless, or list the
files explicitly. Any other testbench works the same way with its module name.
