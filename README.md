# Streaming XML projection with a run-time loadable query workload

This is synthesizable SystemVerilog for an XML *projection* engine. A byte stream of XML goes in.
What comes out is the smallest well-formed document that still holds every node a set of
*projection paths* asks for, together with the ancestors of those nodes. A query processor
downstream then parses a fraction of the data and gets the same answer.

The main idea is that the query workload is not compiled into the circuit. The circuit is a fixed
chain of identical *segment matchers*. Each one holds one step of a path in a few registers and a
small RAM. Together they form a non-deterministic finite automaton (NFA) whose transitions are
configuration data. The paths arrive inside the data stream as `<?query ...?>` processing
instructions. They take effect for the very next byte, and `<?query reset?>` removes them. Loading
a new workload takes as many clock cycles as the instructions have bytes.

The architecture follows the article "FPGAs for Dynamic (XML) Query Workloads". It has a parser,
a pipelined chain of segment matchers, tag predicates in block RAMs shared three ways, and a
serializer that re-creates ancestor tags. The article gives no detail for several parts: the
parser's internals, the encodings, the flow control and a number of corner cases. This code fills
them in with its own choices, which are listed in [Departures and own choices](#departures-and-own-choices).

```
 raw XML ──► xml_parser ──► seg 1 ─► seg 2 ─► ... ─► seg N_SEG ──► serializer ──► projected XML
            (tokens)        └── path p1 ──┘└── p2 ──┘ ...          (tag RAM)
                            └──────── path_engine (NFA) ────────┘
```

## From a projection path to a chain section

A projection path uses only downward axes:

```
projpath ::= path ['#']        path ::= fn:root() | path '/' axis '::' test
axis     ::= child | descendant | self | descendant-or-self
test     ::= NCName | '*' | node() | text()
```

A trailing `#` means "keep the whole subtree below the matched node". Each path takes a run of
consecutive segment matchers, one per node test. A segment holds the node test and the axis that
*follows* it:

| path `fn:root()/descendant::regions/descendant::item/child::name #` | | |
|---|---|---|
| segment 1 | test `fn:root()` | axis descendant |
| segment 2 | test `regions` | axis descendant |
| segment 3 | test `item` | axis child |
| segment 4 | test `name` | `#` (descendant loop), end of chain section |

Paths are given segments from left to right in the order they arrive. Several paths share one
chain, and a short path uses few segments. The default chain of 600 segments therefore holds,
for example, 150 paths of four steps or 20 paths of thirty steps. A path that does not fit in the
segments that remain is dropped, with no error flag.

## What one segment computes

Each segment keeps a **history**: a shift register with one bit per open element level. Bit 0 is
the segment's current state, which means "this segment's step is matched at the current level".

* When an opening tag is complete (`>` of `<x ...>`, or `/` of `<x/>`), the segment shifts in

  `match = (tag_hit AND match_in) OR (loop AND state)`.

  Here `tag_hit` says the tag name passes this segment's node test. `match_in` is the state
  of the segment to the left. `loop` is set for the descendant and descendant-or-self axes. It
  keeps the state true in every deeper level.
* When an element closes, the register shifts back, and the parent level's state reappears. This
  is the backtracking stack of a software NFA, kept in flip-flops.
* `fn:root()` loads a single 1 as the document-level state. The 1 reappears whenever parsing
  returns to the top level, so this segment is true exactly at the root.

Every segment has a pipeline register. A byte and its flags therefore move one segment to the
right per clock, and no wire runs further than to the neighbour. The state a segment hands right
depends on its axis:

| axis after the step | `match_out` sent to the next segment |
|---|---|
| child, descendant | the state **before** the current byte (registered with the byte) |
| self, descendant-or-self | the **live** state, i.e. after the byte. The next segment sees the same `>` one cycle later and can test the same element ("fast-forward"). |

With the descendant loop, the state before a `>` already means "some ancestor matched". This is
why the same two options also serve descendant and descendant-or-self.

The last segment of a path is flagged *end of chain section*. It sends `match_out = 0` to the
right, so the next path starts clean behind its `fn:root()`. It ORs its own state into a second
chain-wide signal, the **global match flag**. For a `text()` step, the local result is `match_in`
on text bytes. The global flag at the chain's end tells the serializer, byte by byte, whether some
path wants the current level.

**Flag alignment.** The flag that travels with a byte is the state *before* that byte was
processed. For a matched element `<item>...</item>`, the bytes of the opening tag still carry the
parent's (false) flag. The content and the whole closing tag carry true. The serializer is built
around this.

## Tag predicates and shared RAM

A node test is checked by string comparison inside each segment. No central tag decoder is
needed. The predicate is stored one character per address, followed by a zero byte. The code
`0x01` at position 0 stands for `*` or `node()`, and `0x02` for `text()`. While the characters of
a tag name stream past, `tag_matcher` compares each one with the predicate character at the same
position and keeps a running "all equal" flag. At the closing `>` the name matches if the flag is
still set and the predicate ends exactly there. The RAM is read one position ahead, so every
character is compared in the cycle it arrives.

Block RAMs are scarcer than logic, so `matcher_group` puts SHARE = 3 segments on one RAM.
Word *i* holds character *i* of all three predicates, one byte lane each, which makes a word
24 bits wide with 512 words. All three segments need the same character position, but the second
sees each byte one cycle later and the third two cycles later. So the first segment drives the
read address, and lanes 1 and 2 are relayed to the others through one and two registers.
Any other SHARE works the same way: SHARE = 1 gives every segment its own RAM, and larger values
add one lane and one relay stage per segment. Configuration writes go to the lane of the segment
being configured, through a separate write port (see below).

## Loading a workload

The parser recognises `<?query reset?>` and `<?query PATH?>` (full axis syntax only, e.g.
`fn:root()/descendant::regions/descendant::item/child::name #`). It marks the pieces of a path
with configuration tokens. Every segment's `config_logic` snoops these tokens as they pass, and a
*configured* bit works like a baton. A segment listens only while its left neighbour is
configured (`conf_in`) and it is not configured itself:

| token (byte it sits on) | action in the listening segment |
|---|---|
| axis name (first `:` of `::`) | axis flip-flops |
| name character | write predicate RAM, next position |
| first non-name byte after a name | write the zero terminator |
| `*`, `node(` / `text(` | write code 0x01 / 0x02 at position 0 (`text()` also sets a flag) |
| `fn:root(` | history := document-level 1 |
| `#` | descendant loop on this (last) step |
| second `:` of `::` | configured, so the baton moves right |
| `?` of `?>` | configured and end of chain section |
| `?` of `<?query reset?>` | every segment: unconfigured, flags and history cleared |

The `conf_out` baton travels with the byte stream, one register per segment. The segment that
sets its configured bit on `::` therefore does not also hand that `::` to its neighbour. Send
workload instructions only between documents, at the top level.

## The serializer

Copying only the flagged bytes would drop the ancestors of matched nodes and leave the result
malformed. The serializer records the name of every open element in a tag RAM (2048 bytes), and
the end position of each level's name in a small stack. It tracks two depths:

* `cur`, the depth of the input;
* `prt`, how many of those open elements have been written to the output.

The rules:

1. **Copy.** A text byte is copied when its flag is set. The bytes of a tag (`<` to `>`,
   attributes included) are all copied if the flag at its `<` is set ("raw" tag). Inside a tag,
   the flag cannot change.
2. **Re-create ancestors.** Before the first copied byte, the missing opening tags of levels
   `prt+1 .. cur` are printed from the tag RAM as `<name>`. Attributes are not reproduced.
3. **Close.** When an element closes that was written but whose closing tag is not copied,
   `</name>` is printed from the tag RAM.
4. **Empty elements.** A `<x/>` copied raw stays as it is. One that matches on its own while its
   parent does not is written as `<x></x>`.

Example: the paths `fn:root()/descendant::regions/descendant::item`, the same path followed by
`/child::name #`, and the same path followed by `/child::incategory`. Applied to

```
<site><regions><africa><item id="item42"><name>vapour <b>x</b></name>
<incategory category="c3"/><junk>zz</junk></item></africa></regions>
<!-- a > comment --><open_auctions><open_auction id="o0">abc</open_auction></open_auctions></site>
```

they give (line breaks added here only)

```
<site><regions><africa><item><name>vapour <b>x</b></name>
<incategory category="c3"/><junk></junk></item></africa></regions></site>
```

`<site>`, `<regions>` and `<africa>` are re-created, and the `id` attribute of `item` is lost
because `item` is re-created too. `<junk>` survives as an empty element. Its tag is copied raw
because its `<` carries the flag of the matched `item` level, but its text carries the flag of the
unmatched `junk` level. This follows from the per-byte flag. A node test that decided only after
seeing a whole tag would need buffering.

Printing a tag takes one output cycle per byte. The output can therefore be briefly longer than
the input, and the serializer then holds the pipeline (next section).

## Timing and flow control

* **Rate.** One input byte per clock whenever the serializer is not printing and `out_ready` is
  high. Unmatched data and plain copies never stall.
* **Latency.** A copied byte leaves `N_SEG + 1` clock cycles after it was accepted: one parser
  register plus one register per segment. That is 601 cycles at the default size.
* **Stall.** `in_ready` of the engine is the serializer's `in_ready`. It goes low while tags are
  printed or `out_ready` is low, and then every stage of the chain holds (`adv` = 0). This single
  global enable reaches every segment. It is the one signal in the design that is not
  neighbour-to-neighbour.
* **Reset.** `rst` is synchronous and active high. After reset no path is configured and nothing
  is output.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_SEG` | 600 | segment matchers in the chain (multiple of `SHARE`); bounds the total number of steps of all paths |
| `SHARE` | 3 | segments per shared tag RAM |
| `TAG_DEPTH` | 512 | predicate RAM words: longest name test is `TAG_DEPTH-1` characters |
| `HIST_DEPTH` | 32 | deepest element nesting that is tracked exactly (history and serializer stack) |
| `TAGMEM_DEPTH` | 2048 | bytes of open-element names the serializer can hold |

N_SEG = 600 with three-way sharing is the largest engine the article fits on a Virtex-5 LX110T.
The other sizes correspond to one 18 kbit block RAM each (512 × 36 and 2048 × 9) or are this
design's own choice (HIST_DEPTH).

## Modules

| file | role |
|---|---|
| `rtl/xp_pkg.sv` | token enum, cooked-byte struct, axis enum, predicate codes |
| `rtl/xml_parser.sv` | byte lexer: XML tokens and `<?query?>` configuration tokens |
| `rtl/tag_matcher.sv` | character-serial comparison of the tag name with the predicate |
| `rtl/cnfa_block.sv` | NFA update rule and history shift register |
| `rtl/config_logic.sv` | workload registers, predicate writes, configuration baton |
| `rtl/segment_matcher.sv` | one segment: the three above plus pipeline registers, fast-forward and match merging |
| `rtl/tag_ram.sv` | predicate RAM with one byte lane per shared segment |
| `rtl/matcher_group.sv` | `SHARE` segments on one RAM, lane relays |
| `rtl/path_engine.sv` | the chain of groups |
| `rtl/serializer.sv` | output with re-created ancestor and closing tags |
| `rtl/xml_projection.sv` | top level |

## Simulating

Each testbench in `tb/` checks itself and ends with a `TB_RESULT checks=.. failures=..` line. To
build and run one with Verilator 5:

```
verilator --binary -Irtl rtl/xp_pkg.sv tb/tb_xml_projection.sv --top-module tb_xml_projection -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` by their file names. Replace the testbench name to run
another one:

| testbench | what it shows |
|---|---|
| `tb_xml_projection` | whole engine with 12 segments. Four scenarios compared with hand-derived output: auction-item paths (ancestor re-creation, `#` subtrees, empty elements, closing tags, three paths merged); reset with self / descendant-or-self / `*` / `text()`; the same workload with a randomly stalling sink; 1 byte/cycle and `N_SEG+1` latency. It also counts that each mechanism occurred. |
| `tb_xml_projection_full` | the top with all defaults (600 segments): the auction-item workload, then rate and the 601-cycle latency. It takes about 15 s to build and under a second to run. |
| `tb_bram_sharing` | three 12-segment engines side by side with SHARE = 1, 2 and 3 on the same workloads: identical projections, 1 byte/cycle and `N_SEG+1` latency whatever the sharing |
| `tb_path_engine` | two groups, a path across a group boundary, a path that does not fit, re-allocation after reset |
| `tb_matcher_group` | all three RAM lanes and their relays; two chain sections inside one group |
| `tb_segment_matcher` | merging at a section end, self / child / descendant hand-over, pass-through |
| `tb_cnfa_block` | random push/pop sequences against a stack model |
| `tb_tag_matcher`, `tb_tag_ram`, `tb_config_logic`, `tb_xml_parser`, `tb_serializer` | the unit behaviour listed in each file's header |

## Departures and own choices

* **Parser.** A small hand-written lexer, not a full XML parser. It handles elements, quoted
  attributes, empty-element tags, processing instructions, comments and `<!...>` declarations.
  It has no CDATA sections, DTD internals or namespaces. Only the unabbreviated path syntax is
  understood in `<?query?>`.
* **Tag RAM ports.** The article describes each RAM block with a single interface. Here the RAM has one read port
  for matching and one write port for configuration. This keeps the terminator write at the end
  of a query from colliding with the read-ahead of the next tag.
* **Flow control.** The article gives no flow control. The global stall is this design's.
* **End of path.** The `?>` that ends a path also completes its last segment. Without this, the
  next path would overwrite that step.
* **`#`.** It is realised as a descendant loop on the last step.
* **`text()`.** A `text()` step flags text bytes whose parent level is matched.
* **Closing tags.** The serializer prints a closing tag only for elements it has written.
* **Attributes.** Re-created tags carry no attributes. Tags copied raw keep theirs.
* **Limits.** Nesting deeper than `HIST_DEPTH` (32) levels loses the oldest history bits, and the
  serializer stops tracking new levels. Names longer than 511 characters never match. An overflow
  of the 2048-byte name RAM corrupts re-created tags.
* **Not included.** The network interface (Gigabit Ethernet MAC/PHY) that fed the original
  system, and the clock generator: connect any byte stream to `in_valid/in_data/in_ready`.
  The maximum clock rate of this RTL has not been measured; the original implementation reached
  150–175 MHz on a Virtex-5.
