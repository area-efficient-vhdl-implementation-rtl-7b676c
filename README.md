# Round-robin AHB bus arbiter for 16 masters

On an AMBA 2.0 AHB bus several masters share one set of address and data lines, and only
one of them may drive the bus at a time. This arbiter takes the bus requests of 16 masters
(`hbusreq`), grants the bus to one of them (`hgrant`, one-hot), reports the owner as a
4-bit number (`hmaster`), and moves on to the next master in round-robin order whenever a
transfer ends. It watches the shared bus signals `hburst`, `hready` and `hresp` to find the
end of a transfer, and supports a slave that splits transfers (`hsplit`).

The main idea is to build the arbiter from many small, identical state machines instead of
one large one. Sixteen *priority logic* blocks, one per master, each search the masters in
a ring starting at "their" master. A one-hot *priority shift* register enables exactly one
of them at a time and rotates to the next block after every completed transfer, so the head
of the round-robin order moves on by one. The outputs of all blocks are simply ORed per
master. No table of past grants is stored anywhere.

```
hbusreq ──► split_control ──► masked requests ──┬──► priority_logic #0 ─┐
               ▲                                ├──► priority_logic #1 ─┤  grant_or ──► hgrant ──► master_encoder ──► hmaster
               │ owner                          ├──►        ...         ─┤                                │
               │                                └──► priority_logic #15─┘                                │ grant_valid
               │                       enable[15:0] ▲                                                    ▼
               │                         priority_shift ◄── data_done ◄── burst_counter (16:1 mux + beat counter)
               │                                                               ▲          ▲
               └───────────────────────────────────────────────────────────────┘     op_active ◄── controller ◄── OR(requests)
```

## The ring state machine (`priority_logic`)

Each priority logic block has a reset state and one state per master, 17 states for 16
masters. Block *j* visits the masters in the order *j*, *j*+1, …, 15, 0, …, *j*−1:

* **Reset state.** If any master requests, jump to the state of the first requester in
  the block's order. Otherwise stay.
* **State of master *k*.** While *k* keeps requesting, stay and grant *k*. When *k* drops its
  request, step to the next master's state. From the last state in the order the FSM goes back
  to reset instead.
* **Error.** An ERROR response (HRESP = ERROR with HREADY high) sends the FSM back to reset.

The FSM steps through the ring one state per clock and does not skip masters that are not
requesting. After the bus is released, it can therefore take up to 16 clocks to reach a
waiting master. The grant output is qualified by the request: the block raises `out_grant[k]`
only while it is in *k*'s state **and** `in_req[k]` is high. So a master that is not
requesting is never granted while the FSM walks past it. A disabled block is held in reset
and drives all zeros. When the priority shift enables it, it starts a fresh search from its
own first master.

The 16 blocks are the same module with a parameter `BASE`, the first master of its ring.
Inside, the requests are rotated by `BASE`, the FSM runs on the rotated vector, and the grant
is rotated back.

## Rotating the priority (`priority_shift`, `grant_or`, `master_encoder`)

`priority_shift` is a 16-bit one-hot register. After reset it enables block 0, so master 0
has the highest priority. It rotates by one position on every `data_done` pulse. Only the
enabled block drives a grant, so `grant_or` (16 OR gates, each fed by the matching output of
all 16 blocks) only merges the blocks into one vector. `master_encoder` turns that vector into
`hmaster` and a `grant_valid` flag.

Switching blocks costs one clock. A newly enabled block is in reset during its first clock,
so no master holds a grant then. The grant appears one clock later.

**Fairness.** The head moves on by exactly one block per completed transfer, whoever did the
transfer. A requesting master therefore becomes the head, and is granted first, after at most
16 completed transfers. It can be passed over before that. For example, if only masters 0 and
5 request, master 5 wins while the head is at blocks 1 to 5, so it gets up to five transfers
in a row before master 0's turn comes back. The bound still holds, and the end-to-end test
checks it (no waiting master saw more than 16 transfers end).

## Finding the end of a transfer (`burst_counter`)

The counter decides when the priority moves on. A *beat* is a clock in which the controller
is active, some master is granted and `hready` is high. On the first beat of a transfer the
counter records the owner (`hmaster`) and the burst length from `hburst`: SINGLE is 1 beat,
INCR4 and WRAP4 are 4, INCR8 and WRAP8 are 8, INCR16 and WRAP16 are 16, and INCR has no set
length. It pulses `xfer_start` on that beat. It then counts beats in `beat_count`.
`data_done` is a one-clock pulse, raised in the clock where the transfer ends:

| end condition | when `data_done` is high |
|---|---|
| fixed-length burst complete | on its last beat |
| owner drops its request | the first clock the owner's request is low. This is how an INCR burst ends, and it also ends a fixed burst the master abandons. |
| ERROR, RETRY or SPLIT response | on the clock with `hready` high and that `hresp` |

A 16:1 multiplexer, selected by the recorded owner, picks the owner's request out of the 16
requests. A transfer whose master releases the bus therefore ends even though its grant has
already gone.

The beat model is deliberately simple. The AHB address/data pipeline is not tracked, and a
granted clock with `hready` high counts as one transfer beat. `hburst` must be valid on the
first beat.

## Split and error handling (`split_control`)

A SPLIT response (`hresp == SPLIT` with `hready` high) sets the owner's bit in a 16-bit mask.
The masked master's request is hidden from the whole arbiter, so it is not granted again.
When the slave raises that master's `hsplit` bit, the bit is cleared and the master competes
again. If a clear and a new split of the same master happen in the same clock, the master
stays masked. RETRY only ends the transfer, and the master competes again at once. ERROR ends
the transfer and resets the enabled FSM. The end of the transfer also rotates the priority
shift, which disables that block anyway, so at the top level the error input and the shift
have the same effect.

## Start-up control (`controller`)

A two-state FSM, RST and ARB_OP. An OR of all (masked) requests moves it from RST to ARB_OP.
In ARB_OP, `op_active` is high and the counter may count beats. It returns to RST when nothing
is requested and no grant is out. The move to ARB_OP happens in the same clock in which the
first priority FSM leaves reset, so the first grant already counts as a beat.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `hbusreq` | in | 16 | bus requests |
| `hburst` | in | 3 | burst type of the current transfer (AHB encoding) |
| `hready` | in | 1 | beat complete (low = wait state) |
| `hresp` | in | 2 | OKAY / ERROR / RETRY / SPLIT |
| `hsplit` | in | 16 | slave's split-release lines |
| `hgrant` | out | 16 | grants, one-hot or zero |
| `hmaster` | out | 4 | number of the granted master (0 when none) |
| `op_active` | out | 1 | controller in ARB_OP |
| `xfer_start`, `data_done` | out | 1 | first beat / end of a transfer |
| `beat_count` | out | 5 | beats done in the current transfer |

From an idle bus, a request seen at a clock edge is granted during the next clock. Between
two transfers the grant is low for one clock while the next block starts. `hgrant`, `hmaster`,
`xfer_start` and `data_done` are combinational from registers and the current inputs. All
state changes on the rising edge. Masters are numbered 0 to 15.

The master count is the parameter `N` (default 16, `ahb_arb_pkg::NMASTER`). The package also
holds the HBURST/HRESP enums and the burst-length function.

## How far to trust it, and where it is this design's own

The block structure follows the arbiter this RTL implements: the priority shift moved on by
an end-of-transfer signal, one priority FSM per master with its enable wired straight from
the shift register, OR gates per grant, an encoder for the master number, a two-state start
controller fed by an OR gate, and a counter with a 16:1 request mux. The ring FSM's
transitions (stay while requesting, step on release, last state back to reset, error to
reset) come from the original state diagram.

These are this design's own choices. The original gives no detail for them.

* Each block starts its ring at its own master, and a disabled block is held in reset.
* The grant is qualified by the request, and the shift rotates by exactly one position.
* What counts as a beat, and all the end-of-transfer rules in the table above.
* The whole of the split mask. It follows the AHB split mechanism as generally specified.
* The controller's condition for returning to RST.
* Reset is synchronous and active low.

Not built: the rest of the AHB interconnect (address decoder, the address/write-data mux and
the read-data mux), the masters and the slave. Also missing are a bus lock (HLOCK), a default
master that keeps the bus when nobody requests, and any limit on how long an undefined-length
burst may hold the bus.

The reference implementation targeted a Virtex-4 FPGA (about 1270 slices, 830 flip-flops,
64 I/Os, 320 MHz). This RTL has not been mapped to an FPGA. A generic synthesis gives 132
flip-flop bits and 68 I/O bits.

## Verification

Each module has a self-checking testbench in `tb/` that compares against a reference model
or hand-worked values and prints `TB_RESULT checks=… failures=…`:

* `tb_priority_logic` runs two ring FSMs (starting at masters 0 and 5). It checks three
  simultaneous requests being served in order and the 13-clock walk from master 2 to master
  15, and compares with a reference model over 3000 random clocks.
* `tb_burst_counter` runs every burst type with random wait states. It also covers INCR
  bursts ended by release, and ERROR and SPLIT ends.
* `tb_priority_shift`, `tb_grant_or`, `tb_master_encoder`, `tb_controller` and
  `tb_split_control` are randomized checks against small reference models.
* `tb_ahb_arbiter` runs the full 16-master arbiter for 30000 clocks. It has random masters and
  a slave that inserts wait states and ERROR, RETRY and SPLIT responses. Every clock it checks
  one-hot grants, no grant to a non-requesting or split master, `hmaster`, and `data_done`
  against a transfer model. It also checks the round-robin bound and the opening
  three-request scenario. It counts each mechanism (each burst length, INCR end, wait state,
  each response type, split release, priority shift, controller return to reset) and fails if
  one never happened.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_ahb_arbiter \
    rtl/ahb_arb_pkg.sv tb/tb_ahb_arbiter.sv -o sim && obj_dir/sim
```

The design also carries assertions: one-hot enable, at most one grant, no grant to a
non-requesting or split master, and a single-clock `data_done`. `--assert` checks them.
