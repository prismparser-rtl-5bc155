# PrismParser RTL: a P4-programmable packet parser without a state machine

A P4 parser is a state machine that walks a parse graph: read a key (an
EtherType, an IP protocol number) at a known offset, look it up, and move to
the next header. Walking that graph one state per cycle is slow. This design
does not walk it. Before the packet arrives, software has already worked out,
for every 64-bit word of a header and every way the packet can have been
parsed so far, which keys sit in that word and at which 16-bit position. The
hardware then only has to:

1. keep a **protocol bitmap**, one bit per protocol of the graph, of what has
   been recognised so far;
2. at each 64-bit word (its **clock number**), compare that bitmap with the few
   bitmaps that are possible at that clock number, and so pick a precomputed
   **select/enable set**;
3. let one **protocol investigator** per transitioning protocol, enabled by that
   set, grab its 16-bit key from the word, mask it, compare it with all its
   next-protocol keys at once, and set the bit of the protocol that follows.

All protocols that can occur in a word are checked in the same cycle, and
changing the parse graph means rewriting registers, not the logic. The final
bitmap is the parse result handed to the next stage.

The same datapath comes in three architectures, all in this repository and
all programmed from the same register contents:

| architecture | bus | how it scales | result latency |
|---|---|---|---|
| base (`base_parser`) | 64 bits | one word per cycle | 9 cycles after the first word |
| overlay (`overlay_parser`, `X` slices) | X x 64 bits | slices 1..X-1 compute every possibility speculatively, the previous slice's bitmap picks one | ceil(9/X) words |
| pipeline (`pipeline_parser`) | 512 or 1024 bits | one stage per clock number, a new packet can enter every cycle | 9 cycles after the frame is complete |

`prism_parser_top` places all three side by side, each with its own stream,
fed by one SPI-loaded register file.

## The parse, worked through

Sizes are those of the enterprise graph the design is dimensioned for
(`prism_pkg`): 10 protocols (bitmap width), 7 of them with outgoing edges (7
investigators), at most 4 edges per protocol (4 keys each), 4-bit protocol IDs,
a longest path whose last key lies in 64-bit word 9, and at most 4 distinct
bitmaps possible at any clock number ("directions").

Protocol ID *p* owns bitmap bit *p*-1 and, if it has edges, investigator
*p*-1. ID 1 is the root (Ethernet); every packet starts with bitmap
`0000000001`. ID 0 means "no next protocol".

The test graph in `tb/prism_tb_pkg.sv` uses Ethernet (1), outer VLAN 0x9100
(2), inner VLAN 0x8100 (3), IPv4 (4), IPv6 (5), IPv6 hop-by-hop header (6), and
TCP/UDP/ICMP (8/9/10). Working out where each key lies gives the control
contents, for example:

| clock number (64-bit word) | bitmap so far | enabled investigator : chunk |
|---|---|---|
| 1 | {Eth} | Eth : chunk 2 (bytes 12-13) |
| 2 | {Eth, outer VLAN} | outer VLAN : chunk 0, inner VLAN : chunk 2 |
| 2 | {Eth, inner VLAN} | inner VLAN : chunk 0 (bytes 16-17) |
| 2 | {Eth, IPv4} | IPv4 : chunk 3 (bytes 22-23, mask 00FF) |
| 2 | {Eth, IPv6} | IPv6 : chunk 2 (bytes 20-21, mask FF00) |
| 3 | {Eth, inner VLAN, IPv4} | IPv4 : chunk 1 |
| 7 | {Eth, inner VLAN, IPv6, HBH} | HBH : chunk 1 |

Two points make this work and are easy to miss:

- **Several investigators can be enabled in one word.** With an outer VLAN, the
  inner tag's type also lies in word 2. The set for {Eth, outer VLAN} enables
  both, because in this graph an outer tag is always followed by an inner one.
  All findings of a word are ORed into the bitmap. Enabling an investigator
  only when its protocol is certain is the job of whoever writes the control
  contents.
- **The bitmap is the parser state.** It records the path taken, so the same
  protocol reached along different paths (its key at different offsets) gets
  different select/enable sets. A bitmap that equals none of the candidates of
  a clock number enables nothing, and the bitmap stays as it is. This is how
  unknown protocols and the ends of paths are handled.

## Configuration and control words

Loaded as one 1788-bit stream, most significant bit first (`prism_pkg` gives
the packed types):

- configuration, 672 bits: the 7 masks (16 bits each), then the 7 x 4 keys (16
  bits), then the 7 x 4 next protocol IDs (4 bits);
- control, 1116 bits: for clock numbers 1..9 the 4 select/enable sets (7 x 2
  select bits, then 7 enable bits: 21 bits), then for clock numbers 1..9 the 4
  candidate bitmaps (10 bits).

In each list the first element is the most significant. Keys must be stored
already masked. An all-zero candidate bitmap marks an unused direction. If two
candidates are equal the lower index wins, and so does the lower key if two
keys match.

## Base block

`base_parser`: a clock-number counter, `prism_controller`, `protocol_navigator`
and the bitmap register.

- `prism_controller` holds multiplexer #0, which picks the 4 select/enable sets
  of the current clock number, and multiplexer #1, which picks the 4 candidate
  bitmaps. `bitmap_match` compares them with the bitmap, and multiplexer #2
  picks the one set to use.
- `protocol_navigator` holds 7 `protocol_investigator`s. Each one selects a
  16-bit chunk (`sel` 0 is the first two bytes on the wire), ANDs it with its
  mask, and feeds it to its `match_detector` (XOR and NOR against 4 keys in
  parallel). Its `bitmap_generator` then one-hot-decodes the next protocol ID.
- The parse ends after clock number 9 or at `in_last`. One cycle later
  `out_valid` pulses with the bitmap. Later words are ignored until `in_last`,
  and the next packet starts again from the root.

The whole word is handled in one cycle, from the counter through the
multiplexers, the comparisons and the OR, back into the register. That long
path is what limits the clock of this architecture.

## Overlay: speculative slices

For an X x 64-bit bus, slice *i* of bus word *w* stands for clock number
*w*·X+*i*, so the register contents are the same as for the base block. Slice 0
is the base datapath. Slice *i* > 0 (`overlay_block`) cannot wait for slice
*i*-1's bitmap. It runs 4 protocol navigators, one per select/enable set of its
clock number, before that bitmap is known. When the bitmap arrives, only a
bitmap match and a 4-way multiplexer remain, and they pick which navigator's
findings to OR in. The chain from slice to slice is therefore compare + mux +
OR, and it still grows with X. Speed against slices is the trade-off measured
for X = 1 to 16.

## Pipeline

`bus_selector` assembles the first 9 64-bit words of a packet into a frame. A
1024-bit beat holds the whole frame. With 512 bits the first beat fills words
0-7 and is held for one cycle, and the second beat supplies word 8. The frame
goes out on the beat that completes it, or at `in_last` for a one-beat packet.

`pipeline_stage` *s* is fixed to clock number *s*, so it needs no
clock-addressed multiplexers. It keeps only the bitmap match, the set
multiplexer and a navigator on word *s*, and registers the bitmap and the frame
for stage *s*+1. Nine stages give a 9-cycle latency after the frame is complete
(31.9 ns at 282 MHz). A 1024-bit bus takes a packet every cycle, a 512-bit bus
one every two cycles. Words past the 9th carry no keys of the graph, so there
are no stages for them.

## Loading the registers

`config_regfile` is an SPI slave in mode 0, MSB first, with its pins
synchronised into `clk` (keep SCLK below clk/4). While `spi_cs_n` is low, each
SCLK rising edge shifts MOSI into a 1788-bit shadow register. When `spi_cs_n`
rises after exactly 1788 bits, the shadow is copied into the live registers and
`cfg_loaded` goes high. A transfer of any other length is discarded. MISO shifts
out the previous shadow contents, so a second transfer reads back the first.
Load only while the streams are idle: the parsers read the registers live.
After reset all registers are zero, and every packet then parses to the root
protocol only.

## Interfaces and timing

Every stream input is `in_valid` / `in_data` / `in_last`, with the first byte
on the wire in the most significant bits. There is no ready signal and no
back-pressure: a word is taken every cycle that `in_valid` is high, and idle
cycles may fall anywhere. The result is a one-cycle `out_valid` with a 10-bit
`out_bitmap` (bit *i* set when protocol ID *i*+1 was found), one per packet and
in packet order. Reset is asynchronous and active low. Parameters of the top:
`OVL_X` (default 2) and `PIPE_BUS_W` (512; 1024 also supported). The graph
sizes are constants in `prism_pkg`.

## How far to trust it, and where it departs

- Every block has a self-checking testbench. The parser testbenches compare
  against a behavioural model (`ref_parse` in `tb/prism_tb_pkg.sv`), written
  from the parsing rules and not from the RTL. The model runs on random
  configurations, and on the enterprise graph against the bitmaps that the
  frames were built to produce. Result cycles are checked too.
- `tb_workloads` runs the overlay parser at X = 1, 2, 3, 4, 5, 8 and 16 and the
  pipeline at 512 and 1024 bits. The worst-case latencies are 9, 5, 3, 3, 2, 2
  and 1 cycles for the overlay, and 9 cycles after frame completion for the
  pipeline. The published figures for the overlay are 9, 5, 4, 3, 2, 2 and 1
  cycles. At X = 3 this design is one cycle shorter, because its window is
  ceil(9/X) words.
- Clock frequency and FPGA resource figures (about 238 MHz for the base block,
  282 MHz for the pipeline) come from an FPGA implementation and have not been
  reproduced here.
- The tool flow that turns a P4 program (compiled JSON) into the register
  contents is software and is not included. The test graph's contents were
  worked out by hand, as shown above.
- The result is the protocol bitmap only. Header field extraction into a
  larger packet header vector, and header offsets, are not produced.
- Interface conventions are this implementation's own: stream handshake,
  result pulse, byte and chunk order, SPI framing, and the priority and
  "unused" encodings.

## Simulating

Everything is plain SystemVerilog for Verilator 5. Run from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb \
  rtl/prism_pkg.sv tb/prism_tb_pkg.sv tb/tb_prism_parser_top.sv \
  --top-module tb_prism_parser_top -Mdir obj
obj/Vtb_prism_parser_top
```

`-y` lets Verilator find every other module by its file name. Replace the last
testbench file and `--top-module` with any other `tb/tb_*.sv`.
Each prints `TB_RESULT checks=N failures=M`. `tb_prism_parser_top` runs the
whole design at its default sizes: an SPI load (including a rejected short
transfer and a read-back), then the same packets through all three parsers.
After that it reloads the registers three times with random graphs, without a
reset, and checks all three parsers against the reference model again. It
also counts that every mechanism occurred, including bitmap-match hits and
misses, windows ended by clock number and by `in_last`, and two-beat and
one-beat pipeline frames.

To try another parse graph, write the configuration and control words the way
`enterprise_cfg` in `tb/prism_tb_pkg.sv` does, then shift them in over SPI or
drive `cfg`/`ctrl` directly into a parser. To change the graph bounds (more
protocols, keys, clock numbers or directions), edit the constants in
`rtl/prism_pkg.sv`. The word layouts follow from them.

## Files

`rtl/`: `prism_pkg` (sizes, types), `match_detector`, `bitmap_generator`,
`protocol_investigator`, `protocol_navigator`, `bitmap_match`,
`prism_controller`, `base_parser`, `overlay_block`, `overlay_parser`,
`pipeline_stage`, `bus_selector`, `pipeline_parser`, `config_regfile`,
`prism_parser_top`.

`tb/`: `prism_tb_pkg` (reference model, test graph, packet builder), one
`tb_<block>.sv` per block, `parser_harness` and `tb_workloads` (bus-size
sweep).
