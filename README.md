# Low-switching LFSR address generator for memory BIST

A memory built-in self-test walks every address of a memory, often several
times in both directions, and the address bus is one of the busiest nets in
the test. Using a plain N-bit LFSR as the address counter makes each address
bit toggle 2^(N-1) times per pass, N x 2^(N-1) toggles in total. That is
524 288 toggles for a 16-bit bus, and dynamic power follows the toggle count.

This design cuts the count by splitting the address into two LFSRs:

* a **low part** of L bits that steps with every address, and
* a **high part** of H = N - L bits that steps only once every 2^L
  addresses, on its own slower clock divided from the first.

Per full pass the bus then toggles

    Y = H * 2^(H-1)  +  2^H * L * 2^(L-1)

times. For the 16-bit generator (13 + 3) that is 151 552 toggles (25000h),
71 % fewer than a single 16-bit LFSR. Both LFSRs are *complete*: they also
visit the all-zero state, so all 2^N addresses appear. Both are
*reversible*: one `updn` signal replays the same order exactly backwards, as
the descending March elements need.

The RTL contains the generator and a complete March-test BIST around it for
a 64k x 32 SRAM: controller, data generator, memory multiplexers, memory
model and read-data comparator.

## The address order

After reset the address is FFFF. With `updn = 0` it runs

    FFFF, FFFE, FFFD, FFFA, FFFC, FFF8, FFF9, FFFB,  (high part 1FFF)
    ...                                              (8190 more groups)
    7FFF, 7FFE, 7FFD, 7FFA, 7FFC, 7FF8, 7FF9, 7FFB   (high part 0FFF)

and then wraps to FFFF. The low three bits cycle through 7, 6, 5, 2, 4, 0, 1,
3 inside every group of eight. The 13 high bits change only between groups,
when the low part wraps from 3 back to 7. With `updn = 1` the same 65 536
addresses come in exactly the reverse order: 7FFB, 7FF9, 7FF8, ... ,
FFFE, FFFF.

The order looks random, which does not matter for a March test. What a
March test needs is that every address comes exactly once per pass, and that
a descending pass is the exact reverse of an ascending one. Both are checked
in simulation.

## Complete, reversible LFSR (`rev_lfsr`)

The register shifts towards the MSB and the new bit enters bit 0:

    forward:   q <= { q[W-2:0],  q[W-1] ^ ^(q[W-2:0] & MASK) ^ ~|q[W-2:0] }
    backward:  q <= { q[0] ^ ^(q[W-1:1] & MASK) ^ ~|q[W-1:1],  q[W-1:1] }

* `q[W-1] ^ ^(q[W-2:0] & MASK)` is an ordinary maximal-length Fibonacci
  LFSR. On its own it has 2^W - 1 states and never reaches zero.
* `~|q[W-2:0]` is the completion term, an OR chain with a NOR at the end.
  It flips the feedback when every stage except the one leaving is zero. This
  splices the all-zero state into the cycle between 100...0 and 000...1 (the
  de Bruijn construction), so the period becomes 2^W.
* The backward step is the algebraic inverse of the forward step. In the
  backward step, bits 1..W-1 of the current state are bits 0..W-2 of the
  previous one. The previous MSB is recovered from the feedback equation,
  using the same taps and the same completion term. In hardware this is a
  2:1 multiplexer in front of every flip-flop plus a second feedback
  network; the tap pattern is the same, read in the opposite direction.

`MASK` comes from `mbist_pkg::lfsr_mask(W)`, a table for W = 2..22. The
entries are the reciprocals of the commonly published maximal-length tap
sets; each one was checked to give period 2^W with the completion term. Two
entries fix the visible behaviour:

* W = 3: feedback `q[2] ^ q[0]`. This gives the low-part order
  7, 6, 5, 2, 4, 0, 1, 3.
* W = 13: feedback `q[12] ^ q[11] ^ q[9] ^ q[8]` (x^13 + x^4 + x^3 + x + 1
  in reciprocal form). It takes 0FFF to 1FFF, which is the wrap 7FFB -> FFFF
  of the 16-bit order.

Other tap sets would give other orders with the same toggle count: a
complete LFSR toggles every stage exactly 2^(W-1) times per period,
whatever its taps.

## Two clocks (`hclk_div`, `lfsr_addr_gen`)

The low LFSR runs on `L_LFSR_CLK`, which is the system clock. The high LFSR
runs on `H_LFSR_CLK`, which `hclk_div` makes by dividing by 2^L (by 8 here).
The high part must step exactly when the low part passes its seed (all ones):

* going forward, on the edge where the low part goes 3 -> 7;
* going backward, on the edge where it goes 7 -> 3.

A divider that only counted upwards would put the high step in the wrong
place once the direction is reversed. So `hclk_div` keeps a 3-bit position
counter that moves in lock-step with the low LFSR: it counts up or down with
`updn`, and only when the low LFSR steps. The counter raises `H_LFSR_CLK` (a
flip-flop output) on the edge at which it wraps, 7 -> 0 going up or 0 -> 7
going down. An assertion in `lfsr_addr_gen` checks that position 0 and the
low seed always coincide.

With `adv` held high, `H_LFSR_CLK` has a period of exactly 8 system clocks.
It is high for one system clock, then low for seven. A 50 % duty cycle would
also give a period of 8, but then a direction change in mid-group could
produce an extra edge. With a one-cycle pulse the only rising edges are real
wraps.

Timing inside one system clock edge with `adv = 1` at a wrap: the low LFSR
and the divider update on the edge; `H_LFSR_CLK` rises one clock-to-Q later
and the high LFSR updates on that. The full address is therefore valid
shortly after the edge, with the high bits one flip-flop delay behind the
low ones. In a real implementation `H_LFSR_CLK` is a generated clock and
must be constrained as one.

Two rules at the interface:

* `adv` (advance) moves the address one place. The original scheme clocks
  the low LFSR on every system clock. `adv` was added so that an address can
  be held for the several operations of a March element. Holding `adv` high
  gives the original behaviour.
* `updn` may change only after an edge at which `adv` was low, because the
  high LFSR samples `updn` slightly after the system clock edge. This is
  asserted.

`at_end` is high on the last address of a pass: 7FFB going forward, FFFF
going backward. Both values are computed at elaboration from the seed with
`mbist_pkg::lfsr_prev`.

## Choosing the split

With N fixed, Y depends on L through H/2^L + L, scaled by 2^(N-1). It is
smallest at L = 3 for N = 10..17 and at L = 4 for N = 20..24; the two tie
at N = 18. At N = 19 the formula slightly prefers L = 4 (4.94 against 5.00).
The published partition table keeps L = 3 up to N = 19. `L` is a parameter,
so either can be built. Toggle counts per full sequence, measured in
simulation with the table's L:

| N  | L | toggles (this design) | plain N-bit LFSR |
|----|---|-----------------------|------------------|
| 10 | 3 | 1 984                 | 5 120            |
| 16 | 3 | 151 552               | 524 288          |
| 19 | 3 | 1 310 720             | 4 980 736        |
| 20 | 4 | 2 621 440             | 10 485 760       |
| 24 | 4 | 44 040 192            | 201 326 592      |

## The BIST around the generator (`mbist_top`)

    bist_test --> bist_controller --adv,updn--> lfsr_addr_gen --bist_addr--+
                    |  bist_w_r, op_value          (13 + 3 LFSR)            |
                    v                                                       v
               test_vector_gen --bist_data-------------------------> bist_mux --> sram 64k x 32
                    | ideal_data, cmp_en                 norm_* ports -->  ^          |
                    v                                                      bist_cs    | data_out
               data_comparator <--------------------------------------------------------+
                    test_fail, fault_data --> back to the controller (test_passed)

Everything runs on one clock, `clk`.

**March algorithm.** `bist_controller` runs a table of March elements,
`mbist_pkg::MARCH_ALG`. Each element is an address order plus up to six
operations (R0, R1, W0, W1), which are applied to every address before
moving on. The default is

    {up}(W0); up(R0,W1,W1,R1,R1,W0); down(R0,W1); down(R1,W0); {up}(R0)

That is 12 operations per address, built around the usual example elements
W0, up(R0,W1,W1,R1,R1,W0) and down(R1,W0). Value x is written as the data
background (all zeros by default, `BACKGROUND` in `test_vector_gen`) for
x = 0, and as its complement for x = 1.

**Re-aiming between elements.** This is the least obvious part of the
controller. An ascending pass ends on 7FFB and a descending pass ends on
FFFF. The next element has to start on the right end:

| just finished | next element | what the controller does          |
|---------------|--------------|-----------------------------------|
| up (on 7FFB)  | down         | set `updn = 1`, no step           |
| up (on 7FFB)  | up           | set `updn = 0`, one step -> FFFF  |
| down (on FFFF)| up           | set `updn = 0`, no step           |
| down (on FFFF)| down         | set `updn = 1`, one step -> 7FFB  |

Every boundary costs one cycle (SETDIR) in which `updn` is updated with
`adv` low, plus one cycle (MOVE) when a step is needed. After the last
element the generator is stepped back to FFFF. The next test then starts
from the same place as after a reset, and no load path is needed.

**Timing.** One operation per clock. The SRAM reads synchronously, so read
data and the expected word (`ideal_data`, `cmp_en` from `test_vector_gen`)
meet in the comparator one cycle after the read is issued. The default test
keeps `bist_cs` high for 12 x 65 536 + 9 = 786 441 cycles: 6 SETDIR and 3
MOVE cycles. The last SETDIR/MOVE cycles also cover the comparator latency,
so `test_passed` is final as soon as `test_done` rises.

**Handshake.** Raise `bist_test` and hold it. The controller takes the
memory (`bist_cs = 1`) and clears the comparator. At the end it drops
`bist_cs` and raises `test_done` with `test_passed` or `test_fail`.
`fault_data` and `fault_ideal` hold the first wrong word and its expected
value. Lower `bist_test` to return to idle. Outside a test the memory is
used through `norm_addr`, `norm_data` and `norm_w_r` (1 = write), and
`data_out` is its read port; this is where the functional logic of the chip
would connect.

## How far it follows the published design

Taken from the published scheme:

* splitting the address into an L-bit and an H-bit complete LFSR, with the
  toggle formula and the partition rule;
* the 13 + 3 split of a 16-bit bus for a 64k x 32 SRAM;
* the XOR/NOR structure of the complete LFSR and the per-stage direction
  multiplexers controlled by `updn`;
* H_LFSR_CLK divided by 2^L (1/8) from L_LFSR_CLK;
* the address order starting FFFF, FFFE, FFFD, FFFA and ending 7FFC, 7FF8,
  7FF9, 7FFB;
* the toggle count of 25000h;
* the block structure of the BIST and its signal names (BIST_Test, BIST_CS,
  BIST_W/R, Test passed, Test fail, Fault data).

Choices made here, where the published description gives no detail:

* the tap sets;
* the `adv` enable, the `at_end` flag and the rule for when `updn` may change;
* the divider's up/down position counter and its one-cycle-high output;
* the asynchronous reset to all ones;
* everything inside the controller: the March table, the re-aiming and the
  handshake;
* the data background;
* the SRAM's one-cycle read and its W/R polarity;
* what the comparator captures.

The SRAM is an array model. In silicon it would be a memory macro.

Not reproduced: the reported dynamic power (9.587 uW) and gate count (about
155 gates) in a 65 nm library. These need synthesis and power analysis with
a cell library. The single 16-bit LFSR and the earlier 14 + 2 generator,
which the published scheme is compared with, are not part of this design.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=... failures=...` line.

* `rev_lfsr_tb`: the 3-bit order, forwards and backwards. For the 13-bit
  register: all 8192 states once, 0FFF -> 1FFF, 13 x 2^12 toggles, and the
  backward run replays the forward run.
* `hclk_div_tb`: against a reference counter, with random enables and
  direction changes; no spurious edges.
* `lfsr_addr_gen_tb`: the full 16-bit generator. The first and last four
  addresses, all 65 536 addresses distinct, 151 552 toggles, 8192 high-part
  clocks 8 cycles apart, `at_end`, and an exact reverse pass.
* `addr_gen_sweep_tb`: widths 10 to 24 in parallel. Period 2^N and the
  toggle formula for each.
* `bist_controller_tb`: the controller with a binary address model. Every
  issued operation is compared with a stream built from the March table;
  also checked are the cycle count, the `updn` rule and pass/fail reporting.
* `sram_tb`, `bist_mux_tb`, `test_vector_gen_tb`, `data_comparator_tb`: the
  small blocks.
* `mbist_top_tb`: the whole BIST at full size, with no parameter changed.
  Normal-mode access; one clean test, where every pass must cover all
  addresses in the same order (down passes reversed) with 151 552 toggles and
  the run must take 786 441 cycles; one test with a flipped memory bit, which
  must be reported with the right fault data. It counts each mechanism (up
  and down passes, direction changes, H_LFSR_CLK edges, wrap steps, reads,
  writes, fault detected, test passed, normal access) and fails if any count
  is zero. It runs in a few seconds.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -y rtl -y tb +libext+.sv rtl/mbist_pkg.sv tb/mbist_top_tb.sv \
        --top-module mbist_top_tb -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Replace `mbist_top_tb` with any other testbench name. The asynchronous
resets are driven low at 1 ns, after time zero, so that the reset is also
seen by flip-flops whose clock is generated (the high LFSR).

## Changing it

* `mbist_top #(.AW, .DW, .L)`: memory size and address split. `L` should
  follow the partition rule above, and `AW - L` must be 22 or less (size of
  the tap table). Add entries to `lfsr_mask` for wider parts.
* `mbist_pkg::MARCH_ALG` / `MARCH_N`: the March algorithm. Elements may have
  1 to 6 operations; the controller handles any sequence of directions.
* `test_vector_gen #(.BACKGROUND)`: data background.
* `rev_lfsr #(.SEED)`: start address. `lfsr_addr_gen` derives its end
  addresses from the seed.
