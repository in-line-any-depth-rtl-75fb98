# Line-rate DNN packet classification with cascaded look-up tables

A switch pipeline can match keys in tables at line rate. It cannot multiply and
accumulate. This design runs a deep neural network on every packet anyway, using
one observation: a network whose inputs are small integers has a finite set of
possible inputs. Evaluate the network offline for every input combination and
store the results in a table. Inference then becomes a single exact-match lookup,
and no precision is lost, because every case the network can see has been
enumerated.

A single table over all the features would be far too large: four 8-bit features
already need 2^32 entries. So the network is built as a tree of small 2-input
networks instead. Each one is trained together with the others and then replaced
by its own table of 2^(2n) entries. The depth of the tree, and the size of each
small network, cost nothing at inference time. The hardware is always the same:
a parser that extracts features, and a few levels of 2-input tables.

This repository holds the SystemVerilog for that pipeline, in its six-feature,
five-table arrangement:

```
 packet beats ──► pkt_parser ──► feature_quant ──► lut_cascade ──► decision
                  Eth/IPv4/       6 raw fields       LUT_1 (f1,f2) ─┐
                  TCP/UDP         → 8-bit ints       LUT_2 (f3,f4) ─┴► LUT_Inter ─┐
                                                     LUT_3 (f5,f6) ──(register)──┴► LUT_Final ─► set_egress(port) / drop
```

## The table cascade (`lut_cascade`, `lut_table`, `lut_final`)

This is the core of the design, and the part most worth understanding before
changing anything.

**One table = one small network.** A `lut_table` has two inputs, `in_a` (A_W
bits) and `in_b` (B_W bits). It forms the key `{in_a, in_b}` and uses that key
directly as a memory address. The memory has one entry per key. Each entry holds
a valid bit and the network's output for that input pair. There is no search and
no comparator: because the tables are filled exhaustively, exact match and direct
addressing are the same thing.
- On a hit, the stored output goes to the next level (the metadata-setting
  action).
- On a miss (an entry without a valid rule), the output is 0. This is the value a
  metadata field holds when no rule has set it.

**Pairing.** `lut_cascade` arranges N_FEAT features into a tree:
- Level 0 pairs feature 1 with 2, 3 with 4, and so on.
- Every intermediate output is FEAT_BITS wide, so every table has the same
  2·FEAT_BITS-bit key.
- When a level has an odd number of values, its last value is carried to the
  next level through a register. This keeps all values of a packet aligned in
  time.
- Pairing stops when two values remain. Those two address `lut_final`.

| N_FEAT | tables | levels (= cycles) | arrangement |
|---|---|---|---|
| 2 | 1 | 1 | LUT_Final(f1,f2) |
| 6 | 5 | 3 | LUT_1..3 → LUT_Inter(LUT_1,LUT_2) → LUT_Final(LUT_Inter, LUT_3) |
| 8 | 7 | 3 | 4 → 2 → 1 |

In general there are N_FEAT−1 tables on ⌈log2 N_FEAT⌉ levels.

**Final action.** An entry of `lut_final` is `{drop, egress_port}`:
- a hit on a forwarding entry applies *set_egress* with the stored port;
- a hit on a drop entry applies *drop*;
- a miss also applies *drop*, the table's default action.

Which network outputs mean "forward" and which mean "drop" is up to whoever
writes the rules. For example, one class can be benign traffic forwarded to its
port, and the attack classes can be dropped.

**Memory.** Each table has 2^(2·FEAT_BITS) entries. At the default of 8 bits
that is 65,536 entries per table, of 9 bits (intermediate) or 10 bits (final).
The five tables hold 3,080,192 bits in total. At 4 or 6 bits per feature the
tables shrink to 256 or 4,096 entries.

**Timing.** Every table reads synchronously. A level therefore takes one cycle,
and the cascade is fully pipelined: one packet per cycle, with a latency equal to
the number of levels. `in_meta`, which carries the packet number, ingress port
and header flags, travels alongside and leaves with the decision.

## Filling the tables (control plane)

The tables are written one entry per cycle through the `cfg_*` port:
- `cfg_table` selects the table: 0–2 are LUT_1–LUT_3, 3 is LUT_Inter and 4 is
  LUT_Final. In general, tables are numbered level by level, left to right.
- `cfg_addr` is the key `{input_1, input_2}`.
- `cfg_entry_valid` = 0 deletes a rule.

To distil a trained 2-input network `g_k` into table *k*, write
`entry[(a << FEAT_BITS) | b] = g_k(a, b)` for every `a, b < 2^FEAT_BITS`. Skip a
key to leave it as a miss. For the final table, write the action that follows
from the network output instead. A retrained network is installed by rewriting
entries; the data path keeps running while this happens.

After reset, every table clears itself, one entry per cycle (65,536 cycles at 8
bits), and then raises `ready`. Writes made before `ready` are ignored, and
lookups made before `ready` miss. If a lookup and a write hit the same key in the
same cycle, the lookup returns the old entry.

## Feature extraction (`pkt_parser`)

**Stream.** Packets arrive as `BEAT_BYTES`-byte beats (8 by default). Byte lane 0
is the first byte on the wire. There is no back-pressure. Three sideband signals
are sampled on a packet's first beat: the ingress port, and the reverse-direction
TCP window and byte count of the packet's flow.

**Parse graph.** The parser walks Ingress port → Ethernet → IPv4 (EtherType
0x0800) → TCP (protocol 6) or UDP (protocol 17) → Accept. Every byte lane
compares its offset with the offsets of the wanted fields, so one beat can cover
several headers. The IPv4 IHL field moves the TCP/UDP offsets, so IPv4 options
are handled. The node reached is visible on `state`.

**Features.** Six raw features come out, in this order:

| # | feature | source |
|---|---|---|
| 1 | IP protocol | IPv4 header |
| 2 | TTL | IPv4 header |
| 3 | source window | TCP window field of this packet |
| 4 | destination window | sideband |
| 5 | source bytes | IPv4 total length |
| 6 | destination bytes | sideband |

A packet carries only its own direction, which is why the reverse-direction
values come in on the sideband. A feature whose header is absent is 0. This
covers a non-IP frame, a UDP packet's window, and a packet truncated before the
field.

**Timing.** The record appears one cycle after the beat that carries the last
byte needed:
- TCP: the window field;
- UDP: the end of the UDP header;
- other IPv4 traffic: the end of the IPv4 header;
- non-IP frames: the EtherType;
- a packet that ends earlier: its last beat.

## Quantisation (`feature_quant`)

The tables take integers of FEAT_BITS bits. Each raw feature *i* becomes
`min(raw_i >> q_shift[i], 2^FEAT_BITS − 1)`. Set the shifts to match the
quantiser the networks were trained with. The stage is registered and takes one
cycle.

## Timing of the whole pipeline (`lutdnn_switch`)

A decision (`d_valid`, `d_drop`, `d_port`, `d_hit`, `d_meta`) appears **5
cycles** after the beat that completed the packet's headers:
- 1 cycle in the parser;
- 1 cycle in the quantiser;
- 3 cycles in the table levels.

The pipeline accepts one beat per cycle, with any number of packets in flight.
Decisions leave in packet order.

## What is modelled and what is not

- **Outside this RTL:** packet buffering, queueing and transmission, and the
  Ethernet ports. The pipeline brings out a per-packet decision that a traffic
  manager would act on.
- **Outside this RTL:** training and quantisation of the networks. Their
  results enter only as table contents.
- **Not given by the method, chosen here:**
  - how header fields are reduced to FEAT_BITS bits (shift and saturate);
  - that a missed intermediate table yields 0;
  - the entry encoding, the clear-after-reset sweep, and the one-cycle table
    levels;
  - the stream format and the sideband for reverse-direction flow values;
  - which feature goes to which cascade input (the order in the feature table
    above).
- **Arrangements:** the top is fixed at six features because the parser
  produces six. `lut_cascade` by itself accepts any `N_FEAT ≥ 2`; 2 and 8 are
  tested. The top can still run a 1-table model through its rules alone: put the
  model in LUT_1, make LUT_Inter copy LUT_1's value, and map that value in
  LUT_Final.
- **Table size:** table sizes above 2^16 entries per table need FEAT_BITS > 8.
  The parameter allows this, but at 2^22 entries a table holds about 42 Mbit.
- **Latency:** nanoseconds depend on the clock, which is not fixed here. The
  latency is given in cycles.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `lutdnn_switch` | `BEAT_BYTES` | 8 | stream width in bytes |
| `lutdnn_switch`, `lut_cascade`, `feature_quant` | `FEAT_BITS` | 8 | bits per table input; key = 2·FEAT_BITS |
| `lut_cascade` | `N_FEAT` | 6 | number of features / leaves of the tree |
| `lut_table` | `A_W`, `B_W`, `DATA_W` | 8, 8, 8 | input and entry widths |
| `lutdnn_pkg` | `PORT_W` | 9 | egress / ingress port width |

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

- **`tb_lutdnn_switch`** runs the full-size pipeline at its defaults.
  - It distils five small integer networks into the five 65,536-entry tables.
  - It then streams 300 frames, back to back and with gaps: TCP with and without
    options, UDP, ICMP, ARP and truncated frames.
  - Each decision is compared with a direct evaluation of the network tree,
    together with the 5-cycle latency.
  - It rewrites a LUT_Final rule while traffic is running and checks that the
    new rule takes effect.
  - It counts forwards, drop rules, default drops, intermediate misses,
    saturations and every header path. Each must occur at least once.
- **`tb_lut_cascade`** tests the 1-, 5- and 7-table arrangements at 4 bits.
  **`tb_workloads`** tests them at 6 and 8 bits.
- **`tb_switch_widths`** repeats the end-to-end test of the whole pipeline at 4
  and 6 bits per feature. It uses `tb_switch_run`, the same test with the width
  as a parameter.
- **`tb_lut_table`, `tb_lut_final`, `tb_pkt_parser` and `tb_feature_quant`**
  test the blocks one by one. They cover the clear duration, miss behaviour,
  write/read collisions, the actions, the parse paths, the record timing and
  the saturation.

`tb_lutdnn_ref_pkg` holds the reference models: the integer 2-input network
(four ReLU hidden units), the tree evaluation and the frame builder.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/lutdnn_pkg.sv tb/tb_lutdnn_ref_pkg.sv tb/tb_lutdnn_switch.sv \
  --top-module tb_lutdnn_switch
./obj_dir/Vtb_lutdnn_switch
```

Substitute another `tb_*.sv` file and top to run a different testbench. The
full-size run loads about 330,000 table entries and finishes in seconds.
