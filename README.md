# Pipelined memory-based regular expression matcher

Deep packet inspection has to run a regular-expression automaton over every byte of every
packet at line rate. At 100 Gbit/s and 200 MHz that is 64 bytes per clock cycle, but an
automaton is inherently sequential within one packet: the state after byte *k* is needed
before byte *k+1* can be looked up. This design gets the width from many packets at once.
The 512-bit input bus is cut into 64 one-byte lanes, each served by a **matching engine (ME)**,
and instead of handing whole packets to independent engines, the engines form a ring that
passes the automaton state along: engine *i* consumes one byte of a packet and hands the
reached state to engine *i+1*, which consumes the next byte one cycle later. A new packet needs
no state, so it starts in whatever lane it begins, while the state of older packets is still
travelling round the ring.

The automaton is a **delayed-input DFA (D2FA)**: many labelled transitions of the DFA are
replaced by one *default* transition per state that consumes no input, which shrinks the
table several-fold but means a byte sometimes needs more than one table lookup. Each engine
therefore holds two automaton units on the two ports of one block RAM: one for the first lookup
of every byte, one that follows default transitions, with small FIFOs between them. The table
is memory, so the rule set can be rewritten while the matcher runs.

The RTL is SystemVerilog-2017, synthesizable, with `regex_matcher` as its top module.

## Data flow through the lanes

An input word carries `NUM_ME` symbols (8 bits each), each with a valid, start-of-packet (sop)
and end-of-packet (eop) flag. Packets are packed back to back in lane order: a packet that does
not end in the last lane continues in the next lane, and from the last lane it continues in
lane 0 of the next word. The packet buffer writes every valid symbol into a FIFO of its lane.

Engine *i* reads only lane *i*, in order. For a symbol with sop it starts from state 0
(`START_STATE`); otherwise it waits for the state handed over by engine *i-1* (engine 0 gets it
from the last engine). It hands its own result on unless the symbol has eop. Because both sides
keep lane order, the *k*-th state engine *i* sends is exactly the state the *k*-th non-sop
symbol of lane *i+1* needs. No tags are carried.

An example with four engines and words `[P1 P1 P2 P2] [P2 P3 P3 P3] [P4 P4 P4 P4]`, where
every lookup hits (cycle numbers down the side, engines across):

```
cycle   ME0   ME1   ME2   ME3
  1     P1    -     P2    -      P1 and P2 both start at once
  2     -     P1    -     P2
  3     P2    P3    -     -      P2 wraps from ME3 to ME0; P3 starts
  4     P4    -     P3    -
  5     -     P4    -     P3
  6     -     -     P4    -
  7     -     -     -     P4
```

ME0 is idle in cycle 2 although P4 is already buffered: lane 0 must serve P2 first, and P2's
state only arrives from ME3 in cycle 3.

**What this means for throughput.** One packet advances one symbol per cycle, whatever the bus
width. The full bus rate needs about `NUM_ME` packets in flight, and because each lane is served
in order, a long packet holds back the packets behind it in every lane. Measured:

| engines | traffic | default-transition use | symbols per cycle | at 200 MHz |
|---|---|---|---|---|
| 64 | 64-byte packets, back to back | 0.3 % | 63.6 | 101.8 Gbit/s |
| 64 | 64-byte packets, back to back | 2.2 % | 63.6 | 101.7 Gbit/s |
| 64 | packets of 64 to 1500 bytes | 1.2 % / 4.9 % | 1.0 to 1.1 | 1.7 to 1.8 Gbit/s |
| 256 | 64-byte packets, back to back | 0.3 % | 254.0 | 406 Gbit/s |
| 256 | 64-byte packets, back to back | 3.3 % | 252.5 | 404 Gbit/s |

The rates are steady-state rates, taken over the middle half of the reports. Default
transitions cost almost nothing here because D2FA_1 resolves them alongside D2FA_0.

So the 100 Gbit/s figure holds when every word starts a new packet. For traffic of long packets
the ring serializes them. Reaching line rate there would need the packets to be interleaved
before this block, which this design does not do.

## Inside a matching engine

```
 lane head ─┐          ┌──────── transition table (dual-port) ────────┐
 state in ──┴─► D2FA_0 ─► port A                          port B ◄─ D2FA_1 ◄─ FIFO_default
                 │  hit: next state                                   │
                 │  miss: default target + symbol ───────────────────►┘ (via FIFO_default)
                 └─► FIFO_standard ─┐                                 │
                                    ├─► multiplexer (selected by order queue) ─► state out
                     D2FA_1 result ─┘                                           + match report
```

* **D2FA_0** (`d2fa0`) starts at most one symbol per cycle. It reads port A of the table. One
  cycle later it has the result. On a hit, the labelled target and its match bitmap go to
  FIFO_standard. On a miss, the default target of the state goes to FIFO_default, together with
  the symbol.
* **D2FA_1** (`d2fa1`) takes FIFO_default entries one at a time. For each it reads port B,
  following one further default per cycle until the symbol is labelled. It shows the result
  straight from the table output. It reads the next entry in the cycle that result is taken,
  so symbols that need a single default pass at one per cycle.
* **FIFO_standard / FIFO_default** (`sync_fifo`, three entries each) fall through when empty.
  This is how a hit reaches the next engine in the cycle after its table read. A symbol that
  needs one default arrives one cycle later. A chain of *d* defaults costs *d* more cycles.
* **Order queue.** A hit can finish before an older miss of another packet, but the next engine
  needs the states in lane order. For every started symbol a 1-bit queue records where its
  result will come from (0: FIFO_standard, 1: D2FA_1). The output multiplexer takes results
  strictly in that order. Each result leaves as a match report. It also goes to the next engine
  unless it ends a packet, and in that case it waits for `out_ready`.
* **Flow control.** D2FA_0 starts a symbol only if both FIFOs and the order queue have room for
  the result already in flight, counted from registers only. As a result, no ready signal
  depends on the next engine's ready, and the ring of 64 engines has no combinational loop. The
  combinational path that remains goes from an engine's table output, through hit detection and
  the multiplexer, to the next engine's table address. That is one block-RAM read plus a few
  gate levels per cycle.

Events brought out per engine: `ev_default` (a symbol needed a default), `ev_chain` (one more
default followed), `ev_stall` (a symbol waited for FIFO room).

## Transition table format

Every engine has its own copy of the table: 8192 words on two ports. The engines do not share a
table because each one does two lookups per cycle. A word has two parts, read together:

| part | address | contents | bits |
|---|---|---|---|
| labelled transition | (state + symbol) mod 8192 | valid, symbol tag [8], next state [13], match bitmap [`MATCH_W`] | 23 |
| default transition | state | default target [13] | 13 |

The labelled part uses **row displacement**: a state number *is* the base address of its row.
The transition on symbol *c* of state *s* sits at *s + c*, tagged with *c*. A lookup (*s*, *c*)
hits when the word at *s + c* is valid and its tag is *c*. The owner of that word is then
(address − tag), which is *s*, so no state tag is needed. Whoever builds the table chooses the
state numbers (13 bits, so at most 8192 states) so that the rows of all states interleave
without collision. The testbenches do this first fit. The table must also obey the D2FA rules:

* the start state labels all 256 symbols (it has no default);
* every default chain ends in a state that labels the symbol, for example because defaults
  always lead towards the start state. Otherwise D2FA_1 never finishes.

The match bitmap is stored with each labelled transition and describes its *target* state. A
default transition consumes no symbol, so it reports nothing. With `MATCH_W = 1` a table word is
36 bits. 8192 × 36 bits makes nine 8K × 4 block RAMs per engine, 576 for 64 engines.

**Writing the table.** Drive `cfg_we` with `cfg_sel` (0 labelled, 1 default), `cfg_addr` and
`cfg_item` / `cfg_default`, one word per cycle. The write is broadcast to every engine, and in
that cycle it takes port A, which holds every D2FA_0. Traffic may keep flowing, but a write
takes effect for symbols looked up after it. To replace a rule set, invalidate the old labelled
words before or while writing the new ones. Both arrays start cleared.

## Interface of `regex_matcher`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | word handshake. `in_ready` is high when every lane FIFO has room, and depends only on registers |
| `in_sym` | in | `NUM_ME` × 8 | symbol *i* goes to lane *i* |
| `in_lane_valid`, `in_sop`, `in_eop` | in | `NUM_ME` | per-lane flags |
| `match_valid`, `match_state`, `match_bitmap`, `match_eop` | out | per lane | one report per symbol, in lane order. No back-pressure |
| `cfg_we`, `cfg_sel`, `cfg_addr`, `cfg_item`, `cfg_default` | in | 1, 1, 13, 23, 13 | table write |
| `ev_default`, `ev_chain`, `ev_stall` | out | `NUM_ME` | event pulses |

A hit report appears one cycle after the engine reads its symbol, and the next engine reads the
following symbol in that same cycle.

Parameters: `NUM_ME` (64; 256 gives the 2048-bit, 400 Gbit/s variant), `FIFO_DEPTH` (3),
`PB_DEPTH` (2048 words per lane), `START_STATE` (0). Widths that the engines share are constants
in `regex_pkg` (`SYM_W` 8, `STATE_W` 13, `TT_DEPTH` 8192, `MATCH_W` 1).

## What follows the original architecture and what is this design's own

These come from the published architecture:
* the ring of engines that pass the state and the packet buffer with one row per engine;
* one symbol per engine per cycle;
* two D2FA units on the two ports of one table;
* FIFO_standard and FIFO_default with three entries;
* a 13-bit state, 8-bit symbols and 8192 table items;
* 64 and 256 engines.

The following are choices of this design, because the architecture leaves them open:
* the table layout (row displacement and a separate default array), and the match-bitmap
  width;
* the sop/eop flags, which ride in the FIFO entries;
* the order queue;
* the FIFO fall-through;
* all handshakes and the table-write port;
* the packet-buffer depth;
* the reset.

The construction of the D2FA from regular expressions is done offline and is not part of the
RTL.

## Files

`rtl/`: `regex_pkg` (types and constants), `sync_fifo`, `transition_table`, `d2fa0`, `d2fa1`,
`matching_engine`, `packet_buffer`, `regex_matcher` (top).

`tb/`: each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
* `tb_d2fa_pkg` builds random D2FAs. In these, every state except the root has a random
  default to a lower-numbered state, so the default chains are several transitions long. The
  package lays the D2FAs out in the table format and provides the reference step function.
* Unit tests: `tb_sync_fifo`, `tb_transition_table`, `tb_d2fa0`, `tb_d2fa1`,
  `tb_matching_engine` (which includes reordering behind a miss, a full FIFO_standard and the
  one-cycle hop), and `tb_packet_buffer`.
* `tb_regex_matcher` runs 4 engines with an 8-word buffer. It checks the rate (one word per
  cycle), the hop (one engine per cycle) and random traffic with stalls, back-pressure,
  wrap-around and table writes during traffic, and it requires each of these to occur.
* `tb_regex_matcher_full` is the same test at the default size (64 engines).
* `tb_workload_throughput` (64 engines) and `tb_workload_400g` (256 engines) give the
  throughput figures above. They check every report and require the bus rate for 64-byte
  packets.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/regex_pkg.sv tb/tb_d2fa_pkg.sv \
          tb/tb_regex_matcher.sv --top-module tb_regex_matcher -o sim
./obj_dir/sim
```

Use the same command for any other testbench. `tb_sync_fifo`, `tb_transition_table` and
`tb_packet_buffer` do not need `tb_d2fa_pkg.sv`. Every test takes a few seconds, except
`tb_workload_400g`, which takes about a minute. The
table's initial clearing is an `initial` loop, which FPGA tools map to block-RAM initial
contents.
