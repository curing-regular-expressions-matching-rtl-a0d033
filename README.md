# Bifurcated regular-expression matcher for network intrusion detection

An intrusion detection system checks every packet of every flow against a
set of attack signatures written as regular expressions. A single DFA for
hundreds of such expressions blows up. Three things cause this:

- Closures such as `.*` and `[^x]*` have to be remembered, so the DFA needs
  every combination of partial matches.
- Length restrictions such as `[^x]{100}` have to be counted, which again
  multiplies states.
- The whole automaton has to be awake for every byte, even though nearly
  all traffic never gets past the first few characters of any signature.

This RTL implements an architecture that attacks all three problems at once.

- **Split the signatures.** Each signature is cut into a short *prefix*,
  which normal traffic rarely completes, and the rest. All prefixes go into
  one small automaton, the *fast path*, that sees every byte. The whole
  signatures live in a *slow path* that is only woken for packets that
  complete a prefix.
- **Remember closures in flags instead of states.** The fast path is a
  history-based automaton (H-FA). A closure sets a history flag instead of
  creating new states. Transitions may depend on flags and may set or clear
  them.
- **Count with counters instead of states.** Some flags have a down-counter
  (H-cFA), so `[^x]{n}` is one flag, one counter and a few transitions.
- **Packetized slow path with protection.** The slow path works per packet,
  from the point where the prefix matched. Each flow has an *anomaly
  counter*, so flows that keep waking the slow path are queued behind
  well-behaved ones and are the first to lose packets under overload.

## Block map

```
              in_* bytes                                   v_* verdicts
                 |                                              ^
          +--------------+   descriptors   +------------+       |
          | packet_buffer|---> fifo ------>| dispatcher |-------+
          +--------------+         +------>|  (top)     |<---------------+
                 ^   ^             |       +------------+                |
                 |   |        hol_buffer      |  context load/store      |
                 |   |                        v                          |
                 |   |   flow_state_mem <-> hfa_engine (fast path)       |
                 |   |                        | trans_mem, select,       |
                 |   |                        | history, trigger table   |
                 |   |   anomaly_counter <----+ prefix matched?          |
                 |   |        | class                                    |
                 |   |        v                                          |
                 |   +-- slow_path_queues --> slow_path_dfa -------------+
                 |                               |   ^
                 +-------------------------------+   sleep_status
```

| File | Block |
|---|---|
| `rtl/hfa_pkg.sv` | Default sizes, transition-entry layout, dispatcher and slow-path state types |
| `rtl/hfa_trans_mem.sv` | Transition memory. One access returns all transitions of a (state, byte) pair. |
| `rtl/hfa_select.sv` | Picks the transition whose conditions hold and that has the most condition flags |
| `rtl/hfa_history.sv` | History flags and counters |
| `rtl/hfa_engine.sv` | Fast-path H-cFA: state register, the three blocks above and the trigger table |
| `rtl/flow_state_mem.sv` | Per-flow fast-path context: state, flags and counters |
| `rtl/anomaly_counter.sv` | Per-flow saturating anomaly counter and queue class |
| `rtl/slow_path_queues.sv` | One FIFO per anomaly class. Strict priority; a full queue drops. |
| `rtl/sleep_status.sv` | Per flow and signature: is the slow automaton awake, and in which state |
| `rtl/slow_path_dfa.sv` | One small DFA per whole signature. Run from a trigger point. |
| `rtl/hol_buffer.sv` | Parks packets of flows that have a packet in the slow path |
| `rtl/packet_buffer.sv` | Payload store shared by the fast path and the slow path |
| `rtl/sync_fifo.sv` | Small helper FIFO |
| `rtl/nids_top.sv` | Top level: ingress, dispatcher, trigger bookkeeping and verdicts |

## The history-based fast path

### Transition format

A transition word holds up to `SLOTS` = 8 entries for one (state, input byte)
pair. Each entry is packed LSB first:

```
next[STATE_W] | cond[FLAGS] | clr[FLAGS] | set[FLAGS] | gt | valid
```

With the defaults (STATE_W = 14, FLAGS = 16) an entry is 64 bits and a word
is 512 bits. The memory has 2^22 words: 16K states × 256 bytes.

### Choosing a transition

An entry is *eligible* when all three of these hold:

- it is valid;
- every flag in `cond` is set;
- the counter test passes for every flag in `cond` that has a counter:
  - with `gt = 0` the counter must be 0, i.e. the length restriction is met
    exactly;
  - with `gt = 1` the counter must be above 0, i.e. still within the
    restriction.

An entry with an empty `cond` is unconditional and always eligible. Among
the eligible entries, the one with the most bits in `cond` wins. A correctly
compiled automaton never produces a tie; if one occurs anyway, the lowest
slot wins. If no entry is eligible, the engine goes to state 0, keeps its
history and pulses `miss`. The testbenches treat a miss as an error in the
compiled tables.

### Updating the history

The winning entry's `set` and `clr` masks update the flags. When one entry
both sets and clears a flag, set wins. Flag *i* < `NUM_CTR` owns counter
*i*:

- setting the flag loads the counter with its programmed length (`len_*`
  ports);
- clearing the flag clears the counter;
- otherwise a positive counter counts down by one per byte.

The byte that loads a counter does not also decrement it. This is the timing
that makes `[^x]{n}` work with one counter test on the byte that follows
the run.

### Triggers

After each byte the engine reads a trigger table indexed by the new state.
The table gives:

- a bit per signature whose prefix this state completes;
- for each such signature, the slow-path start state. This is the slow DFA
  state that covers all partial matches of that signature at this point.

The compiler computes the start state. The hardware only stores it.

### Per-flow context and throughput

The context of a flow is {state, flags, counters}: 126 bits with the
defaults. It is loaded when a packet starts and stored when it ends. The
transition memory is read combinationally, so the fast path takes one byte
per clock. A packet occupies the fast path for `len + 4` cycles:

- one cycle to pick it;
- one cycle to load the context;
- `len` cycles for the bytes;
- one cycle for the last trigger check;
- one cycle to finish.

## The packetized slow path

Each signature has its own DFA for the *whole* signature. Its tables are
loaded through the `tw_*` and `ta_*` ports:

- a next-state table;
- per state, an *accept* bit;
- per state, a *live* bit. A state is live when it still contains some part
  of the signature beyond the prefix.

A slow-path request names the flow, the packet and a signature mask. For
each signature in the mask it gives either:

- the trigger offset and start state, when the prefix matched in this
  packet; or
- offset 0 and the state saved for the flow, when the signature was left
  awake by the flow's previous packet.

The slow path then works as follows:

1. It handles the signatures of the request one after another, one byte per
   clock.
2. It sets the signature's match bit when it enters an accepting state.
3. At the end of the packet it stores the state and the live bit in
   `sleep_status`. A live state keeps the signature *awake*: the flow's next
   packet goes to the slow path even if it never touches a prefix, and
   parsing resumes from the saved state. A dead state puts the signature
   *to sleep*.

### Trigger masking

Each signature can trigger the slow path at most once per packet. The first
trigger of a signature records its offset and start state. Later triggers of
that signature in the same packet are ignored, because the slow DFA, started
at the first trigger, already covers them. Triggers of a signature that is
awake for the flow are also ignored, because that signature already runs
from byte 0.

### Head-of-line handling

While a packet of a flow waits for or is in the slow path, the flow's fast
path context is out of date. Later packets of the flow must not overtake it.
Such packets are parked in the HoL buffer; packets of other flows keep
flowing past them.

When the slow path finishes with a flow, that flow's parked packets become
runnable. The dispatcher always takes the oldest runnable parked packet
before a new one. A new packet also goes to the HoL buffer when its flow
already has a parked packet, so each flow stays in order.

## Overload protection

When a packet finishes in the fast path, its flow's 8-bit anomaly counter
is updated:

- plus 1/ε = 100 if a prefix matched anywhere in the packet;
- minus 1 otherwise;
- the counter saturates at 0 and 255.

A flow that hits the ceiling is reported as anomalous (`ev_anomalous`). The
top two bits of the counter select one of four slow-path queues. The slow
path always serves the lowest non-empty class first.

If a request's queue is full, the packet is reported with `v_dropped`, and
the flow's slow-path state is not updated. A flow that triggers much more
often than 1 packet in 100 climbs into the high classes, so when the slow
path cannot keep up, that flow loses packets first. A flow that triggers
rarely stays in the low classes and is served first.

## Top-level interface (`nids_top`)

**Reset.** After `rst_n` rises, the design clears every per-flow record.
This takes `FLOWS` cycles, during which `in_ready` and `init_done` are low.

**Programming.** A host writes:

- `tm_*`: fast-path transition words;
- `si_*`: trigger table entries;
- `len_*`: counter lengths;
- `tw_*`, `ta_*`: slow-path DFA tables.

All tables are plain synchronous write ports. Load them before sending
traffic.

**Ingress.** Packets arrive one byte per beat on
`in_valid`/`in_ready`/`in_byte`, with `in_flow`, `in_sop` and `in_eop`. The
bytes of one packet are contiguous, and a packet may be at most `MAX_LEN`
bytes long.

**Verdict.** There is one verdict per packet on `v_valid`, with:

- `v_flow`;
- `v_diverted`: the packet went to the slow path;
- `v_dropped`: the packet's queue was full;
- `v_match`: one bit per signature that matched.

Verdicts of one flow come out in packet order. Verdicts of different flows
can come out in a different order.

**Events.** `ev_fast_done`, `ev_anom_index`, `ev_anomalous`, `ev_miss` and
`slow_busy` are for monitoring.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `STATE_W` | 14 (16K states) | published design point |
| `FLAGS` | 16 | published design point |
| `NUM_CTR` | 6 | largest counter use in the published results |
| `SLOTS` | 8 | published: at most 8 transitions per state and byte |
| `CTR_W` | 16 | own choice |
| `NUM_SIG` | 3 | the three-signature example of the architecture |
| `SSTATE_W` | 3 (8 states per slow DFA) | own choice |
| `FLOWS` | 2^20 | published: about a million flows |
| `K`, `INV_EPS` | 8, 100 (ε = 0.01) | published |
| `NUM_Q`, `Q_DEPTH`, `HOL_DEPTH` | 4, 8, 8 | own choice |
| `PKT_SLOTS`, `MAX_LEN` | 16, 256 | own choice; covers 200-byte packets |

### Capacity

At the defaults, the fast path holds each published prefix automaton that
uses 16 flags or fewer:

- 3597 or 1861 states for the Cisco set;
- 583, 71 and 116 states for the Snort groups, with up to 6 counters;
- 1304 states for the Linux L7 set.

The 68-signature Cisco variant that needs 17 flags does not fit.

The slow path at the defaults holds only three signature DFAs of eight
states each. A real rule set needs `NUM_SIG` equal to the number of
signatures and a wider `SSTATE_W`. Slow-path time per request grows with the
number of signatures it names, because the signatures are processed one
after another.

## Where this design departs from, or goes beyond, the published architecture

- **Entry size.** A transition entry is 64 bits rather than 48. Separate set
  and clear masks do not fit in a 32-bit condition/action field.
- **Start state ignores flags.** The slow-path start state is looked up
  from the fast-path state alone. If a signature's partial match at the
  trigger point is held only in a history flag, the compiler must choose
  prefixes for which the state alone determines the start.
- **Slow-path order.** The slow path runs the signatures of a request one
  after another rather than in parallel.
- **Drops leave state stale.** When a request is dropped, the flow's sleep
  record is not updated. Later packets of that flow can be checked against a
  stale slow-path state until it goes back to sleep.
- **On-chip memories.** Per-flow memories are on-chip arrays with
  combinational reads. A production design would use external memory and
  pipeline the context load.
- **Own design.** The byte-stream ingress, descriptor format, verdict
  format, reset sweep, queue depths and strict (not weighted) priority are
  this design's own.
- **Not built:** the rule compiler (splitting, H-FA construction, slow DFAs
  and start states). The testbenches contain small compilers for their own
  signatures.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nids_top \
  -y rtl -y tb +libext+.sv rtl/hfa_pkg.sv tb/tb_nids_top.sv
./obj_dir/Vtb_nids_top
```

- **Unit testbenches.** Each compares its block against an independent
  model: reference NFAs, a popcount-and-max model of the selection, and
  queue and buffer scoreboards.
- **`tb_hfa_engine`.** Compiles H-FA and H-cFA examples, including a
  closure and a length restriction. It checks every byte's state and trigger
  against an NFA run on the same input.
- **`tb_nids_top`.** The end-to-end test, at reduced size: 16 flows and an
  8-state fast path.
  - Signatures: the three of the architecture's running example.
    `.*[gh]d[^ij]*[ij]e` has prefix `[gh]d[^ij]*[ij]`, which needs a history
    flag. `.*fag[^i]*i[^j]*j` has prefix `f`. `.*a[gh]i[^l]*[ae]c` has
    prefix `a[gh]`.
  - The fast path for the three prefixes is six states and one flag.
  - Traffic: normal and attack flows, interleaved.
  - Checks: every verdict and every anomaly index against per-flow NFAs run
    over each flow's whole byte stream.
  - Mechanisms it requires to happen: diversion, a masked second trigger,
    resume of an awake signature, sleep, HoL parking, queue-overflow drop,
    an anomalous flow, a low-class request served ahead of a waiting
    high-class one, and a flag-conditioned transition. It also requires
    normal flows to lose far fewer packets than attack flows.
- **`tb_nids_full`.** Runs the same kind of traffic on the top at its
  default parameters, on 64 flows. The second signature is shortened to
  `.*fag[^i]*i`, so that its DFA fits the default 8 states. This includes
  the 2^20-flow reset sweep and the full 2^22-word transition memory.
- **`tb_nids_dos` and `tb_nids_dos_noprot`.** A denial-of-service
  experiment on 50 flows, run twice: once with the four anomaly queues, and
  once with a single queue (`NUM_Q=1`).
  - Phases: 3000 packets in three phases. First all flows are normal, then
    10 flows turn anomalous, then 25. Anomalous flows hit a prefix in every
    packet and send 60% of the traffic.
  - Normal packets: a packet counts as normal if its flow is normal and its
    anomaly index is below the top class. A normal flow that hits two
    prefixes close together is briefly treated as anomalous, and rightly so.
  - Result with the anomaly queues: no normal packet is lost, while about
    18% of anomalous diverted packets are dropped. The test fails if the
    normal loss rate reaches a quarter of the anomalous rate.
  - Result with a single queue: normal flows lose about 10% of their
    diverted packets. The test requires some loss here.
  - Both also run all the checks of `tb_nids_top`.
