# Bit-pattern associative router (BPAR)

A network router has to pick an output port for every message, and it must do
so fast: a message cannot move on until its port is known. Usually the
routing algorithm is fixed logic, so one router serves one topology and one
algorithm. The bit-pattern associative router makes the algorithm a table.
The table is a ternary content-addressable memory (CAM). Each word holds a
pattern of 0, 1 and don't-care digits, one per destination-address bit, and
each word is paired with a port-assignment word. The destination address is
compared against all patterns at once. The first word that matches supplies
the port. To change the routing algorithm or the network, you load a new
table; the hardware stays the same.

The original circuit is dynamic CMOS and uses *hybrid wave pipelining*. There
is a register at the input (search argument register) and one at the output
(port assignment register). Between them the three stages run without
latches: condition match, selection function and port assignment. Each stage's
delays are tuned so that a new address can enter before the previous one has
left. This RTL keeps the same registers, stages and modes, and models them at
the level of clock cycles (see "What the RTL does not model").

## Datapath of one search

```
 dest_addr ─► search_argument_register ─► dcam_array ─► selection_function ─► port_assignment_dram ─► port_assignment_register ─► out_port
  (edge k)     BIT/NBIT_COMPARE lines     match lines   DRAM pointers          word of the winner       (edge k+1)
                                            ▲                                    ▲
                          row_select + refresh_controller     row_select + refresh_controller
                          (programming / refresh access)      (programming / refresh access)
```

Only the two end registers are clocked. The CAM, the selection function and
the DRAM read are combinational. The timing at the ports is:

| clock edge | what happens |
|---|---|
| k   | `search_valid && search_ready`: the address is latched; during the cycle that follows, the CAM compares it and the winner's port word is read |
| k+1 | the port word, `no_match` and the winning row are latched; `out_valid` is high during the cycle after this edge |

A new address is accepted on every edge, so results leave at one per clock
with a latency of two edges from the offered address to `out_valid`.

## Ternary cells and match lines

Each DCAM cell stores one ternary digit in two nodes, Sb1 and Sb0:

| Sb1 Sb0 | stored digit |
|---|---|
| 0 0 | don't care |
| 0 1 | one |
| 1 0 | zero |
| 1 1 | not allowed (an assertion flags a write of it) |

The lines are shared in two directions. Each word has its own write line,
read line, evaluate line and match line. Each bit column has its own lines
shared by all words:
- BIT_STORE and NBIT_STORE carry write data into Sb1 and Sb0 and read data out of them.
- BIT_COMPARE and NBIT_COMPARE carry the search bit and its inverse.

A cell *mismatches* when it holds "zero" and the search bit is 1
(`Sb1 & BIT_COMPARE`), or holds "one" and the search bit is 0
(`Sb0 & NBIT_COMPARE`). A don't-care cell never mismatches. A word's match
line is precharged high. It is pulled low only while `evaluate` is high and at
least one of its cells mismatches, so `match_line[r] = !(evaluate & |mismatch[r])`.
While the search argument register is empty, it drives both compare lines of
every bit low, and no cell can mismatch.

Because the store lines and the compare lines are separate, a row can be
refreshed (read and written back through the store lines) in the same cycle
in which the CAM compares an address.

Pattern encoding at the top level: `prog_care[b] = 0` makes bit b don't
care; otherwise the cell stores `prog_value[b]` (`bpar_pkg::tern_encode`).

## Selection function: one winner, found quickly

Several words may match one address, for example a specific route and a
default route. To keep routing deterministic, word 0 has the highest
priority:
- Entry i gets a priority status `P_i`, which is 1 when no entry above it matched.
- Its encoded priority is `EP_i = match_i & P_i`, so at most one `EP_i` is high.

The worst case is the first and the last entry matching together. The first
entry's "I matched" must then reach the last entry before the last entry
opens its DRAM row. A plain ripple would pass through all 16 entries. Instead,
`selection_function` uses a two-level lookahead:
- The entries form groups of `GROUP` (4).
- Each group's "some entry here matches" is formed in parallel.
- A group's priority is the NOR of those flags for all groups above it.
- Inside a group the status ripples.

The DRAM pointer of entry i is `dram_select_i = EP_i & enable_i`. The
`enable` signals guard against a pointer forming from match lines that have
not settled. In this model they equal `pass`, which is high while a search is
in the CAM stage. `no_match` is high when `pass` is high and no line matched.
Then no DRAM row is selected and the port word reads as 0.

## Port-assignment memory

`port_assignment_dram` holds one `PORT_W`-bit word per CAM word. A search
reads every row whose pointer is high and returns the bit-wise OR of them, as
a set of precharged bit lines would. The selection function raises at most
one pointer, so normally this is just the winner's word. A second port (row
one-hot from `row_select`, with write enable) serves programming and refresh.
The router does not interpret the port word: it can be a port number or a
one-hot port mask.

## Modes: programming, normal operation, refresh

`mode_i` (`bpar_pkg::bpar_mode_t`) selects the mode:

- **MODE_PROGRAM**: searches are refused (`search_ready` low). Each cycle with
  `prog_we` writes row `prog_row`: the pattern into the CAM and `prog_port`
  into the DRAM, at the clock edge. A search accepted just before the switch
  still completes, against the old table.
- **MODE_NORMAL**: searches are accepted one per cycle. Each memory has its own
  `refresh_controller`. Every `REFRESH_INTERVAL` cycles it refreshes the next
  row in round-robin order: it reads the row through that memory's row select
  and writes it back in the same cycle. Searches carry on meanwhile.
- **MODE_REFRESH**: searches as in normal mode, and a refresh is requested every
  cycle, so the rows are refreshed back to back.

Programming owns the store lines, so it defers a due refresh until the first
free cycle (`refresh_pending` shows a deferred refresh). At most one refresh
is pending per memory. `mode_o` reports what each cycle does: PROGRAM, REFRESH
(a refresh took place) or NORMAL.

Reset clears every pattern to all don't care and every port word to 0. After
reset every word matches and word 0 wins with port 0, so the table must be
programmed before use.

## Example: e-cube routing in a hypercube

For node C of an 8-dimensional hypercube, e-cube routing sends a message
along the lowest dimension in which the destination differs from C. Nine
words express it:

| word | cares about bits | pattern | port |
|---|---|---|---|
| i = 0..7 | 0..i | bits below i equal C, bit i differs from C | i |
| 8 | all | equal to C | 8 (deliver locally) |

`tb_bpar_router` programs this table for a random C and checks every result
against the e-cube rule computed directly from the two addresses. It then
swaps in a random overlapping table, which is a change of routing algorithm
at run time.

## What the RTL does not model

- **Wave pipelining itself.** In the original circuit, several addresses are
  in flight inside the latch-free logic at once. Their separation comes from
  delays tuned per stage: the minimum delay and hold time of each stage, the
  CAM's worst-case 5.1 ns, and the port assignment's 0.4 ns minimum delay and
  3 ns hold. Zero-delay RTL has no such delays. In it, one search passes the
  combinational stages within one clock. The throughput is the same (one
  address per clock); the clock-period formulas of the timing analysis do not
  apply.
- **The evaluate and pass generators.** In the circuit these are self-timed.
  Evaluate is formed from the clock and a match line, so it rises only once
  the compare lines are stable. Pass copies the slowest path of a falling
  match line. Here `bpar_control` raises both for the whole cycle in which a
  search is held.
- **Port-word rate.** The fabricated circuit delivers a port word every one and
  a half clock cycles when the first and last entries take turns.
  `tb_bpar_first_last` shows this model delivering one per clock in the same
  situation.
- **Dynamic storage.** The CAM and DRAM cells are flip-flops, so refresh
  rewrites an unchanged value. The refresh sequencing, with its deferral and
  the sharing of the store lines, is modelled; charge loss is not.
- **The priority-lookahead circuit and the DRAM cell.** Their designs are not
  available. The lookahead above is this design's own two-level scheme, and
  the DRAM is a register array with a wired-OR read.

## Parameters

| parameter | default | origin |
|---|---|---|
| `ROWS` | 16 | the original table size (16 entries, DRAM pointers 0 to 15) |
| `WIDTH` | 8 | destination-address width; this design's choice |
| `PORT_W` | 4 | port-assignment word width; this design's choice |
| `GROUP` | 4 | lookahead group size; this design's choice |
| `REFRESH_INTERVAL` | 32 | cycles between row refreshes; this design's choice |

All parameters can be changed independently. `ROWS` need not be a power of 2.

## Files

| file | content |
|---|---|
| `rtl/bpar_pkg.sv` | ternary code, mode enum, `tern_encode` |
| `rtl/bpar_router.sv` | top level |
| `rtl/bpar_control.sv` | mode rules and the evaluate / pass / load strobes |
| `rtl/search_argument_register.sv` | input register, drives the compare lines |
| `rtl/dcam_cell.sv`, `rtl/dcam_array.sv` | ternary cell and the CAM array |
| `rtl/selection_function.sv` | priority with lookahead, DRAM pointers, no match |
| `rtl/port_assignment_dram.sv` | port-word memory with wired-OR read |
| `rtl/port_assignment_register.sv` | output register |
| `rtl/row_select.sv` | row decoder (one per memory) |
| `rtl/refresh_controller.sv` | refresh sequencer (one per memory) |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_bpar_router.sv` | end to end at default size: e-cube table, random table, refresh mode |
| `tb/tb_bpar_first_last.sv` | first and last entries matching together, back to back |

## Simulating

Every testbench checks against its own reference model. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, run this
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bpar_pkg.sv \
          tb/tb_bpar_router.sv --top-module tb_bpar_router -o sim
./obj_dir/sim
```

Change the testbench name to run another. `verilator --lint-only -Wall -Irtl -y rtl
rtl/bpar_pkg.sv rtl/bpar_router.sv` lints the design. Lint gives three
remaining notes:
- Unused internal signals in the top (`addr_q`, `ep`, `enable`) are kept
  for observation.
- The reset feeds both the flip-flops and the `disable iff` of the cell's
  assertion.

The end-to-end testbench counts each behaviour and fails if one never
happens:
- a match and a search with no match
- several words matching at once, and a winning pattern with don't-care bits
- back-to-back searches, and a search refused in program mode
- a refresh during a search, a refresh deferred by programming, and refresh mode
- a mode switch

It also checks the two-edge latency of every search.
