# Coin-operated bus ticket machine with a flip-flop clock gate

This is the RTL of a small fare-collection controller for a bus: a passenger
picks a route, a per-ticket fare and a number of tickets, drops 10- and
5-rupee coins, and presses *finish*. The machine checks that the money covers
the fare, issues the ticket and computes the change, and shows route, fare,
quantity, cost, money and change on a six-digit multiplexed seven-segment
display.

The point of the design is power. All of its registers hang off a single
gated clock, produced by a flip-flop based clock gate from the board clock and
an enable pin. While the enable is low the gated clock stays low, so no
register in the machine toggles and the clock tree of the datapath is silent.
The gate costs one flip-flop and an AND gate (on an FPGA, a clock buffer with
enable).

Everything is SystemVerilog (IEEE 1800-2017) and synthesizable; the
testbenches are self-checking and run under Verilator.

## Block structure

```
clk, en ─► flipflop_based_clk (s1) ─► gated_clk ─► clock of every block below

path_1 path_2 pri3 pri4 pri5 qua_1 qua_2
      │
      ▼
ticket_selection (u_selection) ── PATH, PRI, COST ──► return_processing (u_return) ◄── finish
      │  PATH, PIN, PRI, COST                              ▲          │
      │                                                    │ total    │ change
ten_in, five_in ─► rupees_calculation (u_calculation) ─────┤          │
      │                                                    │ total    ├─► ticket_leds  (valid_tic)
      ▼                                                    ▼          ├─► ticket_issued (disp_tic)
display_interface (u_display) ◄────────────────────────────┴──────────┘
  counter_mod6 ─► selector_6to1 ─► decoder_7seg ─► digit_select, segments
```

| Module | What it holds / does |
|---|---|
| `flipflop_based_clk` | enable flip-flop and AND gate: `gated_clk = clk & q_out` |
| `ticket_selection` | route (`PATH`), quantity (`PIN`), fare (`PRI`) and `COST = PRI * PIN`, 13 flip-flops |
| `rupees_calculation` | 4-bit counts of 10- and 5-rupee coins, 6-bit deposited total |
| `return_processing` | payment comparison on *finish*; change, ticket LEDs, ticket-issued flag |
| `display_interface` | `counter_mod6` + `selector_6to1` + `decoder_7seg` |
| `bus_ticketing_system_top` | the wiring above; 13 inputs, 17 outputs |
| `ticket_pkg` | widths, button codes, coin values |

## A transaction, cycle by cycle

All inputs are sampled on rising edges of `gated_clk`; each button or coin
pulse is meant to be one clock cycle long.

1. **reset** (synchronous, active high) clears every register: the previous
   passenger's selection, money, change and ticket outputs, and the display
   scan. A new passenger always starts from a reset.
2. **Selection.** `path_1`/`path_2` load `PATH = 01/10`; `pri3`/`pri4`/`pri5`
   load a fare of 3/4/5 rupees; `qua_1`/`qua_2` load a count of 1/2 tickets.
   Buttons can come in any order, together or apart, and a later press
   overwrites an earlier one (within a group, if two are pressed in the same
   cycle the lower-numbered one wins). `COST` is a register too, loaded with
   the product of the values being loaded, so it is correct in the same cycle
   as the button that changed it.
3. **Coins.** Each cycle with `ten_in` or `five_in` high counts one coin and
   adds 10 or 5 to the 6-bit total. A coin that would push the total past 63
   (or a coin counter past 15) is refused; the refusal shows on
   `rupees_calculation.overflow`, which the top level leaves internal.
4. **finish.** At the next edge `return_processing` compares total and cost.
   If a route and a fare are selected and `total >= cost`, `ticket_issued`
   goes high, `ticket_leds` shows the fare paid and `change = total - cost`.
   Otherwise all three are cleared: nothing is issued. The result holds until
   the next *finish* or reset, so a passenger who was short can insert more
   coins and press *finish* again.

Example (route 1, fare 5, two tickets, two 10-rupee coins): cost 10, total 20,
`ticket_issued = 1`, `ticket_leds = 001010`, change 10.

## The clock gate and what it does to timing

```
en ──► D  Q ──┬──► q_out
      clk▲    └──► AND ──► gated_clk
clk ─────┴─────────┘
```

The enable is registered on the **rising** edge of `clk` and ANDed with
`clk`. Consequences an integrator must know:

* **Latency.** `en` is seen at a rising edge; the gated domain receives
  pulses from that same edge on (the pulse at that edge starts one
  clock-to-q late, because the flip-flop output rises while `clk` is
  already high).
* **Switching off.** At the rising edge where `en` is first seen low,
  `clk` rises while the flip-flop still holds 1, so a narrow pulse leaves
  the gate before the flip-flop output falls. In simulation that pulse
  clocks the datapath once more; in silicon it is a runt pulse. The test
  benches model it as a real edge: the gated domain gets every edge from
  the one where `en` is first seen high through the one where it is first
  seen low. Registering the enable on the falling edge of `clk` (or using a
  latch-based gate) removes both effects; the rising-edge flip-flop is kept
  because it is the structure this design specifies. For deterministic
  behaviour drive `en` away from the rising edge of `clk`.
* **Everything stops.** With the gate closed, the display scan freezes on one
  digit and reset has no effect: reset is synchronous to the gated clock.
  Open the gate before resetting.
* `q_out` is not used inside the top level.

## The display

One BCD-to-segment decoder is shared by six digit positions. `counter_mod6`
steps `digit_select` 0,1,2,3,4,5,0,... once per gated clock edge (there is no
prescaler: divide the clock feeding the machine, or gate it, to reach a
visible refresh rate), and `selector_6to1` presents that position's value:

| `digit_select` | shows |
|---|---|
| 0 | route (1 or 2) |
| 1 | fare of one ticket |
| 2 | quantity |
| 3 | cost, low 4 bits |
| 4 | money deposited, low 4 bits |
| 5 | change, low 4 bits |

`segments[6:0]` is `{a,b,c,d,e,f,g}`, active high (0 shows `1111110`).
Codes 10..15 blank the digit. Since cost, money and change are shown through
their low four bits only, a value of 10 to 15 appears as a blank digit and a
larger one as a wrong digit (20 rupees shows as 4). `segments` always belongs
to the position on `digit_select` in the same cycle.

## Where this RTL follows its source and where it chooses

Taken from the published design: the module split and names, every port
name and width, the flip-flop-plus-AND clock gate on the rising edge, the
single gated clock for all modules, the synchronous reset, the mod-6 scan with
carry at 101, the 6-to-1 selector, the segment patterns and blanking of
non-decimal codes, the coin values 10 and 5, the fares 3/4/5 and quantities
1/2, `COST = fare * quantity` held in a register, and the rule that no ticket
is issued while the money is below the cost.

Chosen here, where the source says nothing definite:

* the one-cycle-pulse convention for buttons and coins, and the priority
  among simultaneous buttons;
* refusing coins past 63 rupees instead of wrapping (`overflow` port);
* taking the payment decision on *finish* and holding it;
* `ticket_leds` showing the fare paid (the source only says the LEDs
  authenticate the ticket);
* refusing a ticket when no route or fare has been selected;
* the order of display positions 4 and 5 and showing the low four bits of
  wider values;
* combinational carry of the mod-6 counter; code 6 and 7 of the selector
  giving a blank.

Known gaps against the source:

* The machine is described as also taking 3-rupee coins, but its coin counter
  has only 10- and 5-rupee inputs and the top level has no pin for a third
  coin; no 3-rupee path is built.
* Power, area and timing figures of the source (an FPGA implementation with
  and without the gate) are device measurements and are not reproduced here.

## Files

* `rtl/ticket_pkg.sv` – shared widths and codes; compile it first.
* `rtl/*.sv` – one module per file, named after the module.
* `tb/tb_<module>.sv` – one self-checking testbench per module. Each prints
  `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`; each has a
  watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/ticket_pkg.sv -y rtl +libext+.sv \
    tb/tb_bus_ticketing_system_top.sv --top-module tb_bus_ticketing_system_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another block. All testbenches drive
inputs on the falling clock edge and compare after the rising one against a
model written in the testbench (expected segment patterns are built from
the list of lit segments of each digit, not copied from the decoder).

What the testbenches cover:

* `tb_bus_ticketing_system_top` runs the whole machine against a cycle model
  of it, clock gate included: the example purchase above, a short payment
  refused and then completed, a clock pause in mid-purchase, a purchase for
  each of the 12 route/fare/quantity combinations, a fill of the coin
  register to its limit, and 300 random sessions with random enable pauses
  and resets. It fails unless each of these happened at least once: ticket
  issued, ticket withheld, coin refused, clock gated off, display wrap,
  blank digit, reset. It also counts the clock edges that pass the gate
  against the raw clock (about two thirds in this mix of activity and
  pauses) and checks them against the gate model. The top level has no
  parameters, so this is also the full-size run; it takes well under a
  second.
* The block testbenches replay the example sequences of each block and then
  random stimulus for a few thousand cycles.

## Changing the design

* More routes or fares: widen the button decode in `ticket_selection` and the
  codes in `ticket_pkg`; `COST_W` must hold the largest `fare * quantity`.
* More coin types: add a counter and a term in the total in
  `rupees_calculation`, and a pin in the top level.
* Bigger deposits: raise `MONEY_W`/`CHANGE_W` in `ticket_pkg`; the overflow
  limit follows.
* Clean gating: change `always_ff @(posedge clk)` to `@(negedge clk)` in
  `flipflop_based_clk` and update the edge model in the top testbench.
