# Hamming-network classifier with on-chip error-correction learning

This design is a small pattern classifier. It stores up to 20 binary exemplar patterns of 10 pixels each, and it learns those patterns itself, on chip. A neural core compares an input vector with every stored pattern at once. A winner-take-all stage then names the best match. Next to the core, digital logic trains the stored weights with a hardware-friendly form of error-correction learning.

The design is mixed-signal by intent:

- **Analog core.** The neural arithmetic is done with switched capacitors. Each synapse is a set of binary-weighted capacitors that puts charge on a neuron's dendrite.
- **Digital logic.** Sequencing, clock generation, weight storage and learning are plain synthesizable logic.

In this repository the digital part is synthesizable SystemVerilog. The analog core (neurons and winner-take-all) is written as behavioural models with the same ports and phase timing. Those models let the whole chip be simulated end to end.

| Size | Value |
|---|---|
| neurons (patterns that can be stored) | 20 |
| synapses per neuron (input vector width) | 10 |
| weight per synapse | 4 bits (capacitors of 1, 2, 4 and 8 unit capacitances) |
| total weight storage | 800 bits |

## How one classification works

A Hamming network has two layers:

1. **Quantifier** (`ann`, an array of `neuron`). Every neuron sees the same binary input vector `x`. Neuron *k* puts charge on its dendrite through every synapse whose input bit is 1. The amount is in proportion to that synapse's 4-bit weight. The model represents the dendritic voltage as an integer, counted in unit capacitances:

   `act_k = sum over j with x_j = 1 of w_kj`   (0 to 150)

   A hard limiter compares `act_k` with a threshold. On the real chip the threshold is an external analog voltage. Here it is the code `theta`, on the same scale. The neuron fires when `act_k >= theta`.
2. **Discriminator** (`wta`). Among the neurons that fired, those with the largest activation win. Normally there is one winner. Equal activations give several, and all 20 outputs are brought out to pins so that this case can be seen. If no neuron fired, there is no winner.

The analog core is driven by five non-overlapping phase clocks, phi1 to phi5. The table below gives the role this design assigns to each phase:

| phase | block | action |
|---|---|---|
| phi1 | neurons | input vector applied to the synapses (sampled) |
| phi2 | neurons | dendritic voltages settle (`act`) |
| phi3 | neurons | hard limiter evaluated against `theta` (`fire`) |
| phi4 | WTA | competition resolved |
| phi5 | WTA | output buffers take the result; it holds until the next phi5 |

The synapse weights sit in latches inside each neuron. They are not read from the weight memory during a pass. The controller copies all 800 weight bits from the memory into the latches with the `ld_w` pulse.

## Two clocks and the phase generator

The digital logic runs on the **master clock** `clk`. The phase clocks are made by the clock generator `cgu` from a separate **ANN clock** `ann_clk`, which is asynchronous to the master clock.

- One request gives exactly one phi1..phi5 cycle. Each phase is high for one ANN clock, followed by one ANN clock with all phases low. A cycle therefore lasts 10 ANN clocks.
- The controller and the generator use a toggle (two-phase) handshake.
  - To request a cycle, the controller inverts `cgu_req`.
  - The generator sees the change after a two-flop synchronizer. phi1 rises on that same ANN clock edge.
  - After the last gap the generator sets `cgu_ack = cgu_req`.
  - The controller synchronizes `cgu_ack` back into the master domain. When it equals `cgu_req` again, the cycle is over.
- Because the handshake toggles, there is no release phase between passes.
- Two assertions guard this part. `cgu` asserts that no two phases are ever high together. `ccu` asserts that the training unit never reports completion unless a pass is running.

With a 10 MHz master clock and a 1 MHz ANN clock, a forward pass takes 12.2 µs from `start` to `done` in simulation, or about 82 K classifications per second. Of this, 10 µs is the phase cycle. The rest is synchronizer delay and controller states. The published chip estimated about 100 K per second at these clocks. That estimate implies slightly less overhead than this handshake has.

`clk_dvr` sits between the generator and the analog core. When `test_mode` is high, the phases come from the pins `test_phi` instead. This lets the analog core be exercised with no digital control at all. Change `test_mode` only while all phases are low.

## Learning

Training adapts one neuron at a time. The general error-correction rule is `w(n+1) = w(n) + eta (d - y) x`, where:

- `d` is the expected output;
- `y` is the neuron's actual binary output;
- `x` is the input vector.

Here `x`, `d` and `y` are all binary. The product `eta (d - y) x_j` can therefore only be 0 or ±eta. The hardware replaces it with one loadable step `zeta`:

| condition | update of every synapse with `x_j = 1` |
|---|---|
| `d = 1`, `y = 0` (should have fired, did not) | `w_j += zeta` |
| `d = 0`, `y = 1` (fired, should not have) | `w_j -= zeta` |
| `d = y` | no change |

Synapses with `x_j = 0` never change. Weights saturate at 0 and 15. `zeta` (4 bits) can be reloaded at any time with `load_zeta`.

A **training pass** works as follows:

1. **Forward pass.** It is an ordinary phase cycle, except that only the selected neuron `train_sel` is enabled. All others are idle, with activation 0.
2. **Capture.** The WTA output of the selected neuron is copied into the forward-result register `y`.
3. **Error correction.** The training unit `olu` reads the neuron's row of 10 weights from the weight memory. It computes the new row, and writes it back only if `y != d`.
4. **Reload.** `ld_w` copies the updated memory into the synapse latches.
5. **Done.** `done` rises. `corrected` tells whether this pass changed the weights.

Convergence is decided outside the chip. A supervisor repeats training passes until a whole epoch ends with no correction. It may change `theta` or `zeta` between passes, and it then moves on to the next neuron.

## Supervisor protocol (pins of `hamming_chip`)

All inputs are sampled on the rising edge of `clk`.

1. **Load the weights** through the scan port (see below).
2. **Initialize.** Pulse `ld_inits` for one clock. This copies the weights into the synapse latches. Until the first `ld_inits`, `start` is ignored.
3. **Run a pass.** For each pass:
   - Set `data` and `theta`.
   - For training, also set `train_mode = 1`, `train_sel` and `target` (d).
   - Pulse `start` for one clock.
   - Keep `data`, `theta` and `target` stable until `done`. The chip does not register the input vector.
4. **Read the result.**
   - `done` goes low at `start`. It goes high when the pass is complete, and stays high until the next `start` or `ld_inits`.
   - **Forward mode:** `result` holds the winners.
   - **Training mode:** `corrected` reports whether a correction was applied.
   - `busy` is high from `start` to `done` and during initialization.

`ld_inits` may be repeated at any time the chip is not busy, for example after loading a new weight image.

## Weight memory and scan path (`mmu`)

The memory holds all 800 weight bits. It has three kinds of access:

- **Serial scan.** While `scan_en` is high, the whole store shifts by one bit per clock. `scan_out` shows bit 0: neuron 0, synapse 0, least significant bit. `scan_in` enters at the far end.
  - **Loading an image:** shift its bits in LSB first, in the order neuron 0 synapse 0, neuron 0 synapse 1, … neuron 19 synapse 9.
  - **Reading the old image:** it comes out of `scan_out` in the same order while the new one goes in. To read without destroying the contents, feed `scan_out` back into `scan_in`.
- **Row port.** The training unit reads a neuron's row combinationally and writes it on a clock edge. Scan has priority over a row write.
- **Parallel output.** All 800 bits feed the synapse latches.

With this port, the supervisor can load initial weights and observe learned ones. It can also check the training unit's arithmetic by reading a row back after a pass.

## Test access

- `test_mode` together with `test_phi` drives the analog core directly, through `clk_dvr`.
- The forward-result register can be written (`test_y_we`, `test_y_d`) and read (`test_y_q`).
  - In `test_mode`, the capture from the WTA is suppressed. A written value then decides the next error correction, so the training unit can be tested without the analog core.
  - `test_zeta_q` shows the learning step in use.
- A stand-alone neuron (`tn_*` pins) has its own weight load, inputs, threshold, three phase pins and both outputs. It is meant for characterizing a single neuron.

## What is modelled and what is real logic

| module | kind | content |
|---|---|---|
| `hamming_chip` | RTL | top level, wiring only |
| `ccu` | RTL | master controller FSM |
| `cgu` | RTL | phase clock generator on the ANN clock |
| `clk_dvr` | RTL | phase source multiplexer for test mode |
| `olu` | RTL | training unit, learning-step and result registers |
| `mmu` | RTL | 800-bit scan-path weight store |
| `sync2` | RTL | two-flop synchronizer |
| `ann_pkg` | package | sizes and phase indices |
| `neuron` | behavioural model | charge-based neuron with synapse latches |
| `ann` | behavioural model | array of 20 neurons |
| `wta` | behavioural model | winner-take-all with output buffers |

The behavioural models compute exact integer charge sums. They have none of the analog non-idealities:

- **Offsets.** On silicon, a small unit capacitance against the quantifier offset makes winners unreliable when the two best patterns differ by only one bit.
- **Settling time.**
- **Noise.**

They also use phase edges as clocks. They are good for checking the digital control and the learning behaviour, not for predicting the analog circuit's margins.

The models can be read by synthesis tools. The neurons' synapse latches become flip-flops there, but the analog behaviour is not what would be built.

## Choices this design makes

The published architecture gives the following:

- the block structure and the network sizes;
- the phase count and the learning rule;
- the order of events in initialization, forward and training passes;
- the scan-path memory and the test features.

This design chooses the following:

- what each phase does, and the one-clock-high, one-clock-low phase timing;
- the toggle handshake and the synchronizers;
- integer activation and threshold codes, and firing at `act >= theta`;
- the WTA rule that only firing neurons compete, with ties giving several winners;
- saturating weight arithmetic and a 4-bit `zeta`;
- a whole row updated in one clock;
- `done` as a level;
- `start` ignored before the first `ld_inits`;
- the scan bit order, and a shift enable on the master clock instead of a separate scan clock;
- suppressing the result capture in test mode;
- asynchronous active-low reset of the control registers. The weight store has no reset.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and calls `$finish`; each also has a watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/ann_pkg.sv tb/tb_hamming_chip.sv --top tb_hamming_chip --Mdir obj
obj/Vtb_hamming_chip
```

Replace `tb_hamming_chip` with any of these to test one unit: `tb_ccu`, `tb_cgu`, `tb_clk_dvr`, `tb_olu`, `tb_mmu`, `tb_neuron`, `tb_ann`, `tb_wta`.

The unit testbenches compare each block with an independent model in the testbench:

- phase order, overlap and cycle length;
- controller sequences;
- update rule including saturation;
- scan order and row access;
- charge sums, limiter and winner sets including ties.

`tb_hamming_chip` runs the whole chip at full size in under a second. It acts as the supervisor and keeps its own copy of the weights and of the learning rule.

- **Uniform weights.** All 20 neurons must tie. A zero input must give no winner.
- **Training.** It trains nine neurons on nine 3×3 pixel patterns, with three pixels each and any two sharing at most one pixel. It uses `theta = 36`, with `zeta = 3` and then 1 for finer steps. Every pass is checked against the model, covering the forward result, `corrected` and the weight changes. All nine neurons converge.
- **Classification.** Every noiseless pattern must be recognized by its own neuron alone. Every one-pixel noisy version is classified, and the winners must match the model. With these patterns, 41 of the 81 noisy versions are assigned to their original pattern. Many of the others are genuinely ambiguous, because removing a pixel leaves two pixels that other patterns share.
- **Weights.** The learned weights are read out through the scan path and compared with the model.
- **Test features.** External phases, the result register and the test neuron are each exercised.

The testbench counts each mechanism and fails if one never happened. The mechanisms are increase, decrease, no correction, saturation, tie, single winner, no winner, scan load, scan read-back, re-initialization, learning-step load and the test features.

## Changing the design

The sizes come from `ann_pkg`, and every module takes them as parameters: `N_NEURONS`, `N_SYN`, `W_BITS`, `ACT_BITS`, `ZETA_BITS` and `N_PHASES`. `SEL_BITS` follows from `N_NEURONS`. `ACT_BITS` must hold `N_SYN * (2^W_BITS - 1)`.

The phase assignment is in `ann_pkg::phase_e`. The neuron and WTA models pick their phases from it, so the roles of the phases can be reassigned in one place.
