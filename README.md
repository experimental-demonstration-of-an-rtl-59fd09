# Low-latency control plane for an optical packet switch

An optical crossbar built from semiconductor optical amplifier (SOA) gates can
switch in a few nanoseconds, but it cannot store a packet. Something has to
decide, for every packet, which input connects to which output, and has to
decide it before the packet arrives. That decision usually dominates latency.
This RTL implements a control plane that keeps the decision short. It also
lets the sender stop caring about the decision.

- **Send and forget.** A server's network interface sends only a tiny
  request: the destination port and a valid bit, over a parallel electrical
  link. It holds the packet for a fixed guard time and then transmits it,
  whether or not the request won. It never waits for a grant and never keeps
  a copy.
- **Recirculation buffer per switch input.** A packet that lost arbitration
  is not dropped. The scheduler opens the write path of that input's buffer,
  and the packet is stored there. A buffered packet requests its output
  again and is re-sent through the crossbar when granted. Buffered packets
  always win over new packets on the same input, so packets from one source
  stay in order.
- **A scheduler that answers in four clock cycles.** Two cycles synchronize
  the request, one allocates the output, and one drives the SOA gates.

The default configuration is a 32 x 32 switch. It uses a 9.6 ns scheduler
clock, a 3.2 ns interface clock (32-bit words at 10 Gb/s), a 4-cycle request,
a 10-cycle guard time and 1024-entry switch buffers.

## Parts and clock domains

```
 interface clock (Ttx = 3.2 ns)          |  scheduler clock (Tsch = 9.6 ns or 5.5 ns)
                                         |
 pkt_gen --> net_if --req_valid/dest-----+--> scheduler: request_sync
                     |                   |                 alloc_single | alloc_two_stage
                     |                   |                 switch_config
                     |                   |                   | soa, source gates, buffer rd/wr
                     +--packet (fibre)---+--> soa_crossbar <-+---- switch_buffer (x N)
                     <--pause------------+-------------------------- full
                                         |        |
                                         |     outputs (fibre to receivers)
```

| File | Role |
| --- | --- |
| `ops_pkg.sv` | Packet word `pkt_t`: valid, 6-bit source, 6-bit destination, 64-bit payload |
| `pkt_gen.sv` | Traffic source. It has a periodic mode with two alternating destinations and a Bernoulli mode with a load setting and uniform destinations. The payload comes from an LFSR. |
| `net_if.sv` | Server network interface: packet FIFO, request controller, packet controller with guard time, pause input |
| `request_sync.sv` | Two-flop synchronizer per input, followed by a first-cycle detector |
| `rr_arbiter.sv` | N-bit round-robin arbiter (one per output) |
| `alloc_single.sv` | Single-stage output-port allocator (the default) |
| `alloc_two_stage.sv` | Two-stage parallel allocator for a faster scheduler clock |
| `switch_config.sv` | Turns grants into timed SOA gate pulses and buffer read/write enables |
| `scheduler.sv` | `request_sync` + one allocator (`TWO_STAGE`) + `switch_config` |
| `sync_fifo.sv` | Show-ahead FIFO used by the interface and the buffers |
| `switch_buffer.sv` | Recirculation buffer at one switch input, with its FIFO-full signal |
| `soa_crossbar.sv` | Behavioural model of the SOA crossbar: a packet word passes where the gates are open |
| `ops_top.sv` | N sources and N interfaces on the interface clock, plus the scheduler, N buffers and the crossbar on the scheduler clock |

The two clocks are asynchronous by design. The only signals that cross
between them are the requests and the pause line. Each goes through a
two-flop synchronizer at the receiving side. Cables, fibres, transceivers and
receivers are not logic. `ops_top` brings their ends out as ports
(`ni_req_*` → `sch_req_*`, `ni_tx_pkt` → `sw_in_pkt`, `sw_out_pkt` →
`sw_rx_pkt`, `sw_full` → `ni_pause`), and the testbench adds the delays.

## Timing of one packet

For one uncontended packet (single-stage scheduler, cycle counts at the
default parameters):

1. The interface finds a packet at the head of its FIFO. It moves the packet
   into the packet controller and drives `req_valid`/`req_dest` for
   `REQ_HOLD` = 4 Ttx (12.8 ns). The request must be longer than one
   scheduler period, or the scheduler could miss it.
2. The scheduler registers the request after one to two Tsch in its
   synchronizer. Because the request lasts 12.8 ns and Tsch is 9.6 ns, the
   synchronized level can be high for one or two scheduler cycles.
   `request_sync` keeps only the first cycle (`new_req`), so each request is
   allocated exactly once.
3. The allocator grants one cycle later (`srv_gnt` or, on a loss, `srv_wr`).
4. In the next cycle `switch_config` turns on the SOA gate `soa[in][out]` and
   the input's source gate. They stay on for `PULSE` scheduler cycles:
   2 x 9.6 = 19.2 ns, or 3 x 5.5 = 16.5 ns with the two-stage allocator.
   The pulse must cover the packet length, the SOA switching time and the
   up-to-one-cycle uncertainty in when the request was sampled.
5. The interface releases the packet `GUARD` = 10 Ttx (32 ns) after issuing
   the request, for `PKT_CYCLES` = 2 Ttx (6.4 ns). 32 ns covers the worst-case
   four scheduler cycles (38.4 ns) minus the request cable delay. The packet
   therefore reaches the switch while the gates are open.

From a request that arrives just after a scheduler edge, the gates open 4 Tsch
later. This is the worst case, and the guard time is sized for it.

In the testbenches the links are 10 ns (request cable), 18 ns (fibre into the
switch, which includes the extra length inside the switch) and 10 ns (fibre
out). An uncontended packet then takes exactly Ttx + 32 + 18 + 10 + 6.4 =
69.6 ns from being accepted by its interface to the tail arriving at the
receiver. With the two-stage scheduler at 5.5 ns and a guard of 5 Ttx it
takes 53.6 ns. The end-to-end testbenches check that no packet is faster than
this and that the fastest packets show exactly this figure.

## Output-port allocation

Both allocators take the same inputs in the scheduler clock domain:

- new requests from the synchronizer (`srv_req`, `srv_dest`);
- head-of-line requests of the N switch buffers (`buf_req`, `buf_dest`);
- `buf_occ` per input: the buffer holds a packet or a write into it is in
  progress;
- `in_busy`/`out_busy` from `switch_config`: ports whose pulse is still
  running after the next cycle.

They produce registered, one-cycle grant vectors:

- `srv_gnt`: send the new packet through;
- `buf_gnt`: read and send the buffered head packet;
- `srv_wr`: the new packet lost, so store it in the buffer;
- `gnt_dest`: the output that was granted to each input.

Each input has at most one granted output and each output at most one granted
input. Both designs take two register stages after the synchronizer. This
keeps the four-cycle figure for both.

### Single-stage (`alloc_single`, default)

1. **Stage 1** only registers the two request sets (they come from different
   places and at different times).
2. **Stage 2** does all the work in one cycle:
   - *Merge with buffer precedence.* If an input's buffer is occupied, that
     input offers only its buffer's request. A new packet arriving there
     cannot go first; it will be written behind the buffered ones. This is
     what keeps per-source order.
   - *Remove what is already granted.* An input or output granted in the
     previous cycle is still held by its pulse. Such requests are removed
     using the grant register itself as feedback. For pulses longer than two
     cycles, the `in_busy`/`out_busy` flags extend this.
   - *Arbitrate.* The result forms an N x N request matrix. Each column
     (output) goes to its own N-bit round-robin arbiter. The arbiters work in
     parallel, so a single pass decides every output. An input requests only
     one output at a time, so two outputs never grant the same input.
   - *Split.* Each winning input is marked as a new-packet grant or a buffer
     grant, depending on where its request came from. A new request that did
     not win, or that was blocked by its own occupied buffer or by a busy
     port, becomes `srv_wr`.

The critical path is the merge, the filter and the N-bit arbiter, all in one
cycle. That path limits the scheduler clock.

### Two-stage (`alloc_two_stage`, `TWO_STAGE=1`)

1. **Stage 1** runs two banks of N arbiters in parallel. One bank handles the
   new requests; the other handles the buffer requests. Each bank registers
   its grant matrix.
2. **Stage 2** merges them:
   - a buffer grant wins its output;
   - a new-packet grant is dropped if that output already has a buffer grant,
     or if that input's buffer is occupied;
   - grants that collide with the previous cycle's grants or with busy ports
     are filtered out.

   Every dropped new request turns into `srv_wr`.

The arbiter now sits alone between two registers, so the clock can be
shorter. The price is that a stage-1 winner can still be filtered in stage 2.
When that happens, that arbiter's pointer has already moved on.

### Round-robin arbiter (`rr_arbiter`)

The arbiter is a programmable priority encoder. It uses a thermometer mask
with the priority pointer placed just after the last winner. It first looks
for the lowest requesting bit at or above the pointer (`x & (~x + 1)` on the
masked requests). If there is none, it takes the lowest request overall. The
grant is combinational; the pointer updates on `advance`. Because the search
is written as an add, the synthesis tool can build it with the FPGA's carry
chain, which is fast.

## Configuration pulse and feedback (`switch_config`)

For each input, a small counter holds the granted output and whether the
source is the interface or the buffer, for `PULSE` cycles. During that time:

- `soa[in][out]` and one of `src_srv_en`/`src_buf_en` are on.
- For a buffer grant, `buf_rd` is high in the first pulse cycle. This pops the
  buffer, which then keeps driving the popped packet for the rest of the
  pulse.
- For a `srv_wr`, a write window (`buf_wr_en`) of the same length and timing
  opens instead. `buf_wr_last` marks the cycle in which the buffer stores the
  packet that its receiver has captured.

The outputs are decoded combinationally from the registered state. The gates
therefore follow the allocator's grant register by one cycle.
`in_busy`/`out_busy` are high while a pulse has two or more cycles left. An
assertion checks that no grant ever lands on a busy input.

## Switch buffers and backpressure (`switch_buffer`)

Each switch input has one FIFO of `DEPTH` = 1024 packets.

- **Requests and reads.** The buffer's head packet drives `req_valid` and
  `req_dest` to the allocator. The request is withdrawn in the cycle the head
  is read, so the same packet is never granted twice.
- **Occupied.** `occupied` is high when the FIFO is non-empty or a write
  window is open. The allocators use it to give buffer precedence, so a new
  packet cannot slip past one that is still being written.
- **Full.** `full` is registered. It rises when the count, plus a write in
  progress, plus `FULL_FREE` = 1, reaches the depth. The one spare slot is
  for the packet that may already be on its way when the server sees the
  signal.
- **Pause.** `full` is the only signal from the switch back to a server. The
  interface synchronizes it and stops issuing requests. A packet that is
  already requested is still sent.
- **Errors.** A write that cannot be stored raises `overflow`. A write window
  that closes without a valid packet raises `miss`. The end-to-end
  testbenches check that neither ever happens.

## Network interface (`net_if`) and traffic source (`pkt_gen`)

The interface has a FIFO (`DEPTH` = 64) and two small controllers:

- The **request controller** issues a request when the head of the FIFO is
  valid, the interface is not paused, and at least `MIN_GAP` = 10 Ttx have
  passed since the last request.
- The **packet controller** takes the packet out of the FIFO at the same
  moment. It counts the guard time and then presents the packet on `tx_pkt`
  for `PKT_CYCLES`.

The 10-cycle spacing is the minimum time between two requests that the slower
scheduler can still tell apart. It follows from the 12.8 ns request, up to two
9.6 ns sampling cycles, and the pulse. It limits one interface to one packet
every 32 ns.

`pkt_gen` has two modes:

- **Periodic** (`period` ≠ 0): one packet every `period` cycles, with
  alternating destinations `dest_a`/`dest_b`. This is how the single-source
  and two-source experiments are driven.
- **Random** (`period` = 0): in each cycle a packet appears with probability
  `load`/65536, with a uniform destination. The draws come from a 32-bit
  LFSR (x^32+x^22+x^2+x+1): `rnd[15:0] < load` decides, and
  `rnd[31:16] mod N` is the destination.

The payload comes from a 64-bit LFSR (x^64+x^63+x^61+x^60+1). The generator
stalls while the interface's FIFO is full.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. They need Verilator 5
with timing support. A block testbench, for example:

```
verilator --binary --timing -Wno-fatal rtl/ops_pkg.sv $(ls rtl/*.sv | grep -v ops_pkg) \
          tb/tb_alloc_single.sv --top-module tb_alloc_single -o sim
./obj_dir/sim

The end-to-end testbenches (`tb_ops_top`, `tb_ops_full`, `tb_ops_load`) need `tb/delay_line.sv` and
`tb/ops_harness.sv` in the list as well.
```

The end-to-end tests also need `tb/delay_line.sv` (transport delay of a link)
and `tb/ops_harness.sv`. The harness generates the clocks and the links, runs
the traffic phases, and checks every packet.

| Testbench | What it covers |
| --- | --- |
| `tb_rr_arbiter`, `tb_request_sync`, `tb_alloc_single`, `tb_alloc_two_stage`, `tb_switch_config` | Each block against an independent reference model, with random traffic |
| `tb_scheduler` | Both scheduler variants with a buffer model. Latency from request to gates is 3–4 Tsch. Packets are conserved. |
| `tb_net_if`, `tb_pkt_gen`, `tb_switch_buffer`, `tb_soa_crossbar` | Cycle counts (request width, guard, spacing), LFSR sequences, full/overflow thresholds, gating |
| `tb_ops_top` | Two small systems side by side: 4 x 4 single-stage at 9.6 ns, and 4 x 4 two-stage at 5.5 ns with a 3-cycle pulse and a 5-cycle guard. Each runs the one-to-two and two-to-one scenarios, random traffic, and a hot-spot phase that fills 8-entry buffers until backpressure is raised. The test counts direct switching, buffering, re-sending, buffer precedence, requests sampled twice, full and pause, and fails if any of them never happens. |
| `tb_ops_full` | `ops_top` at its default parameters (32 x 32, 1024-entry buffers). It runs the two scenarios and then 10 µs of uniform random traffic from all 32 sources. |
| `tb_ops_load` | Mean latency against offered load on the full 32 x 32 system: six systems side by side (both allocators at 2 %, 5 % and 9 % of interface cycles, 10 µs each). Checks that the mean rises with load and that the two-stage system is faster at every load. |

Mean end-to-end latency measured by `tb_ops_load` (uniform random
destinations; the load is the fraction of interface cycles in which a source
produces a packet):

| Load | Single-stage, 9.6 ns | Two-stage, 5.5 ns |
| --- | --- | --- |
| 2 % | 130 ns | 109 ns |
| 5 % | 193 ns | 148 ns |
| 9 % | 1211 ns | 354 ns |

At 9 % an interface is close to its ceiling of one request per 10 cycles,
and packets queue in the interface as well as in the switch buffers. Most of
the latency added with load comes from head-of-line blocking in the single
FIFO per input.

## Parameters

| Parameter | Default | Meaning |
| --- | --- | --- |
| `N` | 32 | Switch ports; up to 64 fit the 6-bit address fields of `pkt_t` |
| `TWO_STAGE` | 0 | Choose the allocator |
| `PULSE` | 2 | Configuration pulse length in scheduler cycles (use 3 at 5.5 ns) |
| `REQ_HOLD` | 4 | Request width in interface cycles |
| `GUARD` | 10 | Cycles from request to packet release |
| `MIN_GAP` | 10 | Minimum cycles between requests of one interface |
| `PKT_CYCLES` | 2 | Packet length on the link |
| `NI_DEPTH`, `BUF_DEPTH` | 64, 1024 | FIFO depths |
| `FULL_FREE` | 1 | Slots still free when `full` rises |

The timing parameters depend on one another. `REQ_HOLD` x Ttx must exceed
Tsch. `GUARD` x Ttx plus the fibre delay must land the packet inside the
pulse for every sampling phase of the request. `PULSE` must cover that phase
uncertainty plus the packet length.

## Where this RTL departs from or adds to the original design

- **One allocation per request.** The original design does not say how a
  request that is sampled in two scheduler cycles avoids being allocated
  twice. Here an edge detector after the synchronizer does this.
- **Spacing between requests.** The 10-cycle minimum spacing is enforced
  inside each interface, so consecutive requests from one server can be told
  apart.
- **Throughput.** Because of that spacing, one interface carries at most one
  packet per 10 Ttx. In the random mode, loads above about 10 % of interface
  cycles therefore queue in the interface FIFO instead of reaching the
  switch. Latency-versus-load curves up to full port capacity cannot be
  reproduced with these default timing parameters.
- **Two-stage latency.** Both allocators give the same four-cycle scheduling
  delay. The two-stage design is faster only through its shorter clock
  period. It uses a 3-cycle (16.5 ns) pulse.
- **Choices of this implementation:**
  - buffer precedence is decided per input, using an "occupied" flag;
  - the write window has the same shape as a gate pulse;
  - the head request is withdrawn during a read;
  - the interface FIFO depth is 64;
  - the LFSR polynomials;
  - the 64-bit packet payload (one 64-bit word per packet, as in the 10 Gb/s
    experiment).
- **Spare slot.** A single spare slot covers one packet in flight. With longer
  links, more packets can be in flight; raise `FULL_FREE` to cover them.
- **Crossbar model.** `soa_crossbar` is a zero-delay behavioural model. It
  does not model SOA switch-on time or optical power. It passes a packet word
  wherever the input gate and the crossbar gate are both open.
- **Not included.** Serializers, optical transceivers, wavelength striping,
  receivers and the FPGA debug probes are outside the RTL. Their signals are
  ports of `ops_top`.
