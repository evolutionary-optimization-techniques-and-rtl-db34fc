# A reconfigurable four-input fuzzy logic controller

This is synthesizable SystemVerilog for a fuzzy logic controller (FLC) meant for an FPGA. The
controller takes four 8-bit crisp inputs. It maps each input onto fuzzy sets described by a few
key points (fuzzification). It evaluates the rules that fire (inference). It then collapses the
result into one 8-bit crisp output (defuzzification).

The original FLC design offers two ways to build the rule base and two ways to defuzzify. That
gives four controllers, which trade latency against area and clock rate:

| mode | rule base | defuzzifier | latency (clocks) |
|------|-----------|-------------|------------------|
| FLC1 | combinational logic | centre of gravity (COG) | 16 |
| FLC2 | combinational logic | first of maxima (FOM) | 1 |
| FLC3 | block RAM, one rule per clock | centre of gravity | 32 |
| FLC4 | block RAM, one rule per clock | first of maxima | 16 |

On the FPGA, only one of them would be loaded at a time. The rule-base or defuzzifier module
would be swapped by partial reconfiguration, and small changes would be made by editing the
bitstream: membership-function points, rules, and rule weights.

In this RTL all four data paths are present. A mode register picks the path each inference
takes, and a byte-wide write port stands in for the bitstream edits. Around the controller
there are two more parts:

- A shared dual-port memory through which a processor can use the FLC (hardware-software
  co-design).
- A small bus master that asks the external SystemACE configuration controller to reload the
  FPGA with another of eight bitstreams.

## Numbers and membership functions

All values are 8-bit unsigned integers. A degree of membership is also an integer, 0..255,
not a fraction 0..1, so no fixed- or floating-point arithmetic is needed for the data.

Each input has four membership functions. Each function is a trapezoid described by seven
bytes:

```
 height        tleft______tright
              /            \
             /              \      rising edge : slope_l * (x - left)  >> 4, clipped to height
 0 ____left_/                \_right____       falling edge: slope_r * (right - x) >> 4, clipped
```

- A triangle is the case `tleft == tright`.
- The slopes replace the division `height / edge width` of the textbook formula. They are
  unsigned Q4.4 numbers: 4 integer bits and 4 fraction bits, so 16 means 1.0. The encoding is
  this design's choice.
- To describe a clean edge, set `slope ≈ 16 * height / (edge width)`. A steeper slope
  simply saturates at `height`.

The four functions of an input must be ordered by their `left` points. No three of them may
overlap ("overlap of two"). The fuzzifier relies on this. It uses three comparators to find
k, the largest i ≤ 2 with `x >= left[i+1]`. It then evaluates only functions k and k+1, with two
multiplier/subtractor units (`mf_eval`). A function that is not selected must have degree 0 at
that x. Gaps between functions are allowed: there both degrees may be 0.

## The 16 active rules

With two active functions per input and four inputs, 2^4 = 16 rules fire on every inference.
They are a subset of the 4^4 = 256 rules of the rule base. `rule_strength` numbers them 0..15:

- Bit j of the rule number r picks, for input j, the lower (0) or upper (1) active function.
- The rule-base address is `{m3, m2, m1, m0}`, where m_j is the 2-bit index of the chosen
  function of input j.
- The firing degree is the minimum of the four chosen degrees: the "Min" of Min-Max inference.
- The "Max" happens in the FOM defuzzifier. The COG defuzzifier weights all 16 rules.

The order of rules 0..15 matters only for FOM ties: the lowest rule number wins.

## Two rule bases

Both hold, for each of the 256 rules, the output value the rule concludes. Each output
membership function is represented by its centre.

**Combinational (`rule_eval_comb`).** A 256-entry table holds a 3-bit output-function index
(0..4) per rule. Sixteen parallel look-ups each drive a 5-way multiplexer over the five output
centres. There is no clock in the path. Table codes 5..7 mean the rule is switched off: its
weight becomes 0. This is how a rule is nullified by a weight change.

**Block RAM (`rule_eval_bram`).** A synchronous 256 × 8 memory holds the output centre of each
rule directly. With one read port, each active rule costs one clock:

- At the edge that accepts `start`, rule 0 is read, using the address computed from the live
  inputs. The address list is latched at the same edge.
- Rules 1..15 are read on the next 15 edges.
- In the cycle after the last read (`done`, 16 cycles after `start`), all 16 words are
  available: the last straight from the RAM output, the others from holding registers.

This path has no nullify code, because every 8-bit word is a valid centre.

## Two defuzzifiers

**Centre of gravity (`cog_defuzz`)** computes `sum(w·y) / sum(w)` over the 16 rules:

- 16 multipliers and two adder trees form a 20-bit numerator and a 12-bit denominator,
  combinationally.
- `serial_divider` then forms one quotient bit per clock for 16 clocks. The latency equals the
  divider width, which the original design names as the main bottleneck.
- The divider forms only the low 16 quotient bits. Its remainder starts from the top 4
  numerator bits. This is exact because a weighted average of 8-bit values is at most 255; an
  assertion checks the condition.
- If every weight is 0 (an input lies in a gap), the output is 0.
- The quotient is truncated (floor).

**First of maxima (`fom_defuzz`)** is a comparator chain with no clock. It outputs the centre of
the first rule, in rule order, that has the largest degree. If all degrees are 0, that is rule
0's centre.

## Timing of an inference (`flc_core`)

The handshake is `start` / `ready` / `out_valid`, and it is this design's own. An inference
starts at a rising edge where `start` and `ready` are both high. `crisp_in` only has to be
valid in that cycle, because everything the later cycles need is latched at that edge. The mode
register is sampled at the same edge, so the mode can be changed freely between inferences.

The latency L is counted from the start cycle to the cycle in which `out_valid` is high:

- **FLC1**: the divider is loaded at the start edge straight from the combinational path, so
  L = 16.
- **FLC2**: the FOM result of the combinational path is registered at the start edge, so L = 1.
- **FLC3**: 16 RAM reads. The divider is loaded in the `done` cycle from the RAM words, so
  L = 16 + 16 = 32.
- **FLC4**: 16 RAM reads, with FOM evaluated in the `done` cycle, so L = 16.

`out_valid` lasts one cycle. `crisp_out` shows the result in that cycle and holds it until the
next result. `ready` is also high in the `out_valid` cycle. Inferences can therefore run back to
back, one per L clocks, which is the throughput the original design's inferences-per-second
figure (clock rate / latency) assumes.

There is one exception. Suppose the mode register is changed to FLC1 or FLC2 while an FLC4
inference is running. Then `ready` stays low in that inference's `out_valid` cycle, and the next
start is taken one cycle later. The first-of-maxima unit is still busy with the RAM result in
that cycle, so it cannot also take the combinational result. `start` may simply be held high
until `ready` is seen.

## Configuration write port

The write port takes one byte per clock (`cfg_we`, `cfg_addr[11:0]`, `cfg_wdata`). The address
map is defined in `flc_pkg`:

| address | contents |
|---------|----------|
| 0x000–0x0FF | block-RAM rule base: output centre of rule `a` |
| 0x100–0x1FF | combinational rule table: output-function index of rule `a` (5..7 = rule off) |
| 0x200–0x26F | membership functions: `0x200 + input*28 + function*7 + field`; fields left, tleft, tright, right, height, slope_l, slope_r |
| 0x280–0x284 | centres of the five output membership functions |
| 0x300 | mode: 0 = FLC1, 1 = FLC2, 2 = FLC3, 3 = FLC4 |

Reset (`rst_n`, asynchronous, active low) clears only the control state and sets the mode to
FLC1. The membership functions and both rule tables are configuration data: like a bitstream,
they must be written before the first inference. Writes made during an inference affect only
what is read after them. The latched inputs and degrees are not affected.

## Processor link through shared memory

`dp_ram` is a true dual-port 2048 × 8 RAM. Port A belongs to the processor and is brought out
on the `host_*` ports. Port B belongs to `codesign_bram_if`. The mailbox layout is this design's
choice:

| byte | meaning |
|------|---------|
| 0 | command/status: the processor writes 0x01 to request an inference; the FLC side writes 0x02 when done |
| 1–4 | the four crisp inputs |
| 5 | the crisp output |

When `host_attach` = 1, the controller polls byte 0. On a request it reads bytes 1–4 at one per
clock, starts the FLC in its current mode, waits for the result, and writes byte 5, then byte 0.
While attached, the pin-side `ready` is 0 and `start` is ignored. Change `host_attach` only while
the FLC is idle.

If both ports write the same word in the same cycle, port A wins.

## Switching FPGA configurations (`ace_reconfig_ctrl`)

The SystemACE controller (external) loads the FPGA from one of eight bitstreams on a CompactFlash
card. Three CFGADDR pins select the bitstream, and a control register reachable over its MPU port
can override them.

This block is the MPU master that would be embedded in every bitstream. On `req` it latches
`cfg_sel` and performs two writes to the control register:

1. Force CFGADDR to `cfg_sel`, with the configuration reset set.
2. The same value with the reset released, which starts the reload.

It then pulses `done`. On real hardware the reload erases the FPGA, including this block.

The register address (0x18), the bit positions (FORCECFGADDR = 2, CFGRESET = 7, CFGADDR = 15:13),
the 16-bit bus and the write timing are the vendor's. Here they are parameters whose defaults
must be checked against the SystemACE data sheet before use. Each write takes one setup cycle
(CEN low), `WR_CYCLES` cycles with WEN low, and one hold cycle. OEN is never asserted.

The monitor that decides when to switch is not part of this design. Its request and choice enter
through `reconfig_req` and `reconfig_sel`.

## Files

| file | content |
|------|---------|
| `rtl/flc_pkg.sv` | sizes, types, mode enum, configuration map |
| `rtl/flc_top.sv` | top: `flc_core` + `dp_ram` + `codesign_bram_if` + `ace_reconfig_ctrl` |
| `rtl/flc_core.sv` | the controller, mode selection, configuration registers, sequencing |
| `rtl/fuzzifier.sv`, `rtl/mf_eval.sv` | fuzzification |
| `rtl/rule_strength.sv` | active rules: addresses and Min degrees |
| `rtl/rule_eval_comb.sv`, `rtl/rule_eval_bram.sv` | the two rule bases |
| `rtl/cog_defuzz.sv`, `rtl/serial_divider.sv`, `rtl/fom_defuzz.sv` | the two defuzzifiers |
| `rtl/dp_ram.sv`, `rtl/codesign_bram_if.sv` | processor link |
| `rtl/ace_reconfig_ctrl.sv` | configuration switch |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_flc_workload.sv` | the evaluated 4-input configuration streamed through all four implementations |
| `tb/flc_ref_pkg.sv` | integer reference model of the whole controller, used by the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung
run. For example, for the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/flc_pkg.sv tb/flc_ref_pkg.sv tb/tb_flc_top.sv --top-module tb_flc_top -o sim
./obj_dir/sim
```

For the other testbenches, drop `tb/flc_ref_pkg.sv` where the testbench does not import it; only
`tb_mf_eval`, `tb_fuzzifier`, `tb_flc_core`, `tb_flc_top` and `tb_flc_workload` use it.

`tb_flc_top` runs the design at its default sizes in well under a second:

- It loads random, ordered membership functions (some triangular), output centres, a random
  combinational rule table with about 5 % of rules switched off, and a random block-RAM rule
  base.
- It runs about 150 random inferences in each mode, and more after switching modes back and
  forth. About a third of them are started back to back.
- It compares each output with `flc_ref_pkg` and each latency with 16 / 1 / 32 / 16.
- It changes the mode while an inference is running and starts the next one in the
  `out_valid` cycle, in every pair of modes. It also checks that `ready` takes that start,
  except in the FLC4 case above.
- A separate monitor compares `crisp_out` with the expected result at the clock edge that
  ends each `out_valid` cycle.
- It rewrites a rule and a membership function between inferences, and forces a zero-weight
  COG case.
- It exercises the SystemACE write sequence and the processor mailbox in all four modes.
- It counts each of these events and fails if one never happened.

`tb_flc_workload` runs the configuration the speed figures refer to. Each input has four
evenly spaced, full-height triangles with peaks at 0, 85, 170 and 255, and the five output
centres are 0, 64, 128, 191 and 255. Rule (a,b,c,d) picks output member round((a+b+c+d)/3), and
both rule bases hold the same rules. The testbench streams 96 inferences through each mode with
`start` held high. It checks one result every 16 / 1 / 32 / 16 clocks, every output against the
reference model, and that FLC1 = FLC3 and FLC2 = FLC4. Inputs that sit exactly on peaks must give
the one fired rule's centre. It prints the throughput, and the rate that would follow at the
clock rates reported for the original FPGA builds (30.20 / 92.20 / 49.42 / 145.22 MHz, giving
about 1.9 / 92 / 1.5 / 9.1 million inferences per second).

The unit testbenches check each block against independent arithmetic, including the latencies
of the block-RAM reads and of the divider.

## How far it follows the original design, and where it departs

Taken from the original design:

- 8-bit integer data and degrees.
- Trapezoid/triangle functions defined by key points and slopes.
- An overlap of two.
- 4 inputs, 4 input functions, 5 output functions.
- Min rule degrees.
- The two rule-base organisations: a logic table with multiplexers, and a memory addressed by
  the concatenated input-function indices that stores output centres.
- COG as multipliers, adders and a synchronous divider whose latency is its width.
- FOM as a comparator search.
- The four latencies.
- A dual-port memory between processor and logic.
- Switching bitstreams by overriding CFGADDR through the SystemACE MPU port.

This design's own choices are pointed out above. The main ones:

- The Q4.4 slope encoding and separate rising and falling slopes.
- The rule numbering.
- The handshake, the configuration map and the mailbox.
- Zero output for an all-zero COG.
- The SystemACE register constants.
- A mode register in place of module-based partial reconfiguration.

Not built:

- Gaussian membership functions.
- Rule weights other than on/off, and on/off for the block-RAM rule base.
- A pipelined divider (suggested as an improvement, not part of the design).
- Replicated rule memories to read all 16 rules in one clock (mentioned as an option).
- Other sizes. The sizes are constants in `flc_pkg`. Changing N_IN or N_MF also needs
  MF_IDX_W, the fuzzifier's comparator range and the configuration map changed. The original
  design's feasibility study (up to 6 inputs or 10 functions per input, or rule memories of 2^19
  to 2^21 bits) is therefore not covered. Neither is its 7-function rule-memory example, which
  needs 3-bit function indices.
- The genetic-algorithm hardware/software partitioning and the self-evolving GA engine the
  controller was meant to serve. Both are software experiments or proposals without a hardware
  description.
- Everything that belongs to the vendor: the SystemACE controller, the CompactFlash card, the
  JTAG/SelectMAP/ICAP configuration ports, bus macros, and the MicroBlaze processor with its
  OPB bus and GPIO cores, on which the software version of the FLC runs.
