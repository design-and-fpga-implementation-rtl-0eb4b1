# Four-tap FIR filter with a compositional microprogram control unit

This is a third-order (four-tap) FIR filter for an FPGA,

    y[n] = W0·x[n] + W1·x[n-1] + W2·x[n-2] + W3·x[n-3]

split into a **datapath** that computes all four products at once and a
**control unit** that tells it what to do, one clock at a time. The control
unit is not a hand-written state machine. It is a tiny stored program: a
3-bit program counter steps through an 8-word × 8-bit control memory. Each
word holds seven datapath control signals and one bit that makes the counter
branch instead of incrementing. A small combinational circuit supplies the
branch address. To change the filter's sequence of operations, you rewrite
the memory contents, not the wiring.

Data and coefficients are 8-bit unsigned. Products, sums and the output are
16 bits. With the input kept ready, the filter takes one new sample every
three clocks.

## The microprogram

The whole behaviour of the filter is these seven words (address 7 is not
used):

| addr | Y0 | Load_en | Ld_1 | Ld_0 | D_clear | D_load | D_move | YL | what happens |
|------|----|---------|------|------|---------|--------|--------|----|--------------|
| 0 | 0 | 1 | 0 | 0 | 0 | 0 | 0 | 0 | W0 ← coefficient bus |
| 1 | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | W1 ← coefficient bus |
| 2 | 0 | 1 | 1 | 0 | 0 | 0 | 0 | 0 | W2 ← coefficient bus |
| 3 | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | W3 ← coefficient bus; clear Xn-1..Xn-3 |
| 4 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 0 | Xn ← x_in |
| 5 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | shift the delay line |
| 6 | 1 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | y_out ← sum; branch to 4 |

Bit 7 of a word is Y0. Bits 6..0 are the control signals in the column order
above, with YL as bit 0. The package `fir_pkg` defines the word as the packed
structs `uinstr_t` and `ctrl_t`.

Addresses 0–3 run once after reset. After that, addresses 4–6 repeat once per
sample.

## Control unit: who decides the next address

`cmcu_control_unit` contains three parts:

* `cmcu_control_memory` is a constant ROM, read combinationally from the
  program counter. Each word therefore acts in the same clock in which the
  counter points to it.
* `cmcu_program_counter` is a 3-bit register. On each clock it increments,
  loads a branch address, or holds (`pc_op_t`).
* `cmcu_branch_logic` is the combinational circuit that picks the
  operation. It works like a Mealy machine, from `reset`, `start`, Y0 and the
  current address:

  | condition (in priority order) | counter does |
  |---|---|
  | `reset` | load 0 |
  | Y0 = 1 (address 6) | load 4 |
  | `start` low at address 0 or 4 | hold |
  | otherwise | increment |

The control unit waits only at addresses 0 and 4, and the reason matters.
Repeating address 0 only reloads W0, and repeating address 4 only reloads Xn,
and both are reloaded when `start` arrives. Repeating address 5 would shift
the delay line again. Repeating address 6 would latch a sum that the product
registers have already advanced past (see the next section).

## Datapath and the one-clock product register

`fir_datapath` has the parts of a direct-form FIR filter:

* `coeff_decoder_2to4` turns Load_en, Ld_1 and Ld_0 into the load strobe of
  one of W0..W3.
* `coeff_registers` holds W0..W3, loaded from the shared 8-bit coefficient
  bus.
* `data_registers` holds Xn, Xn-1, Xn-2 and Xn-3:
  * D_load writes `x_in` into Xn.
  * D_move shifts Xn → Xn-1 → Xn-2 → Xn-3.
  * D_clear zeroes Xn-1..Xn-3. Xn is not cleared, because it is always
    loaded before use.
* There are four `mult8x8`, one per tap, forming Wk·X(n-k).
* Three `adder16` are chained as ((W1·Xn-1 + W0·Xn) + W2·Xn-2) + W3·Xn-3.
  Every carry in is 0 and every carry out is dropped, so the output wraps
  modulo 2^16.
* `output_register` latches the sum when YL is high.

The subtle point is the order of the microprogram: the delay line is shifted
(address 5) **before** the output is latched (address 6). Suppose the
products were purely combinational. At address 6, Xn and Xn-1 would then
both hold x[n], and the filter would compute the wrong sum. To fix this, each
multiplier registers its product on every clock (`OUT_REG = 1`, the default).
The products captured at the end of address 5 come from the data as it stood
before the shift, and the adder chain sums exactly those at address 6. The
register costs 64 flip-flops. It has the same effect as the output register of
an FPGA's hard multiplier block.

## Pin-level protocol and timing (`cmcu_fir`)

Pins: `clk`, `reset` (synchronous, active high), `start`, `coeff_in[7:0]`,
`x_in[7:0]`, `y_out[15:0]`. That is 35 pins in all.

1. Hold `reset` high for at least one clock edge. The filter then sits at
   address 0.
2. Raise `start` with W0 on `coeff_in`. On the three following clocks, put
   W1, W2 and W3 on `coeff_in`. During these three clocks the value of
   `start` does not matter.
3. From then on, each clock edge on which `start` is high takes `x_in` as the
   next sample. `y_out` stays the same on the next edge and shows the new
   output on the one after: two clocks after the sample is taken. The
   filter is ready for the next sample on the edge after that, so it can
   take one sample every three clocks.
4. While `start` is low, the filter waits and `y_out` holds its value.

`y_out` is a register, so it can be used directly. Asserting `reset` again
restarts the filter from step 2, including a clear of the delay line.

## What is specified and what is chosen here

These follow the design this filter implements:

* the split into control unit and datapath, and the 3-bit counter with the
  8×8 memory;
* the seven microinstructions and their bit values;
* the 2-to-4 coefficient decoder;
* four 8-bit data registers and four 8-bit coefficient registers;
* four 8×8 multipliers, three 16-bit adders, and a 16-bit output register;
* the 35-pin top level.

These are this implementation's own choices:

* **The meaning of `start`.** It is "go" at address 0 and "sample valid" at
  address 4, and the counter holds at those two addresses while `start` is
  low. The original description only says that the combinational circuit
  uses `start` and `reset` to branch so that new data is captured.
* **The product register** (previous section).
* **Carry handling.** The carry links drawn between the adders are not used
  as carry-ins: feeding a carry-out of weight 2^16 into a carry-in of weight
  1 would not add correctly. The result wraps instead, like the last adder,
  whose carry is left open.
* **Reset.** A synchronous reset clears every register.
* **Unsigned arithmetic.**
* **Address 7.** The unused word at address 7 holds no datapath action and
  a branch to 4.

Known differences from the figures reported for the original FPGA build:

* **Clocks per sample.** That build needed 12 clocks for each pair of data.
  This RTL needs 3 clocks per sample, which is what the seven-word
  microprogram implies. The 12-clock figure could not be reconstructed.
* **Flip-flops.** That build reported 44 flip-flops. This RTL has 147:
  * 3 for the program counter;
  * 32 for the coefficient registers;
  * 32 for the data registers;
  * 64 for the product registers;
  * 16 for the output register.

  Even without the product registers, the registers the datapath needs
  exceed 44.
* **Audio interface.** The stereo audio codec used for the real-time audio
  test is outside this RTL. So is the logic that adapts the codec's sample
  stream to `x_in`/`start`, whose format is not known.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* Small blocks are checked against independent models, either exhaustively
  (decoder, branch logic, control memory field by field) or with random
  stimulus (counter, registers, multiplier with its one-clock latency,
  adder).
* `tb_fir_datapath` drives the datapath with the microprogram's control
  words.
* `tb_cmcu_fir` drives the whole filter through its pins, at the default
  sizes.

Both `tb_fir_datapath` and `tb_cmcu_fir` reproduce the three published test
vectors:

| W | x | y |
|---|---|---|
| {5,4,4,1} | {3,9,7,7} | {15,57,83,102} |
| {3,6,6,5} | {2,10,3,3} | {6,42,81,97} |
| {1,2,2,1} | {1,2,3,3} | {1,4,9,14} |

They also run about 2,000 random samples against a direct convolution taken
modulo 2^16.

`tb_cmcu_fir` also does the following:

* It checks that `y_out` does not change early, and that back-to-back
  samples take exactly 3 clocks.
* It counts idle holds, coefficient loads, delay-line clears, waits for a
  sample, back-to-back samples, output wrap-around and restarts by reset.
  The test fails if any of these never happens.

`tb_cmcu_fir_audio` uses the filter the way an audio system would. It runs a
50 MHz clock and presents one sample per 48 kHz stereo frame per channel,
which is one `start` pulse every 520 clocks. The input is a sine with an
alternating component added, and the coefficients are {1,2,2,1}. The
testbench checks every output and checks that each output holds until the
next sample arrives. It also checks that the filter removes the alternating
component: the response of {1,2,2,1} at half the sample rate is
1 − 2 + 2 − 1 = 0.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb rtl/fir_pkg.sv tb/tb_cmcu_fir.sv \
        --top-module tb_cmcu_fir
    ./obj_dir/Vtb_cmcu_fir

Replace `cmcu_fir` with any other module name to run that module's testbench.
The package file must come first on the command line.

## Changing it

* **A different sequence of operations.** Edit the `case` in
  `cmcu_control_memory.sv`. If the loop or its entry point moves, also
  update the wait addresses `ADDR_H0` and `ADDR_LOAD_X` in `fir_pkg.sv`.
* **Other widths.** Set the parameters `W` and `YW` on `cmcu_fir` or
  `fir_datapath`.
* **More taps.** The tap count `TAPS` is a package constant, but the
  datapath wires exactly three adders and the microprogram loads exactly four
  coefficients. More taps need more adders, a wider coefficient decoder, a
  wider program counter and more microinstructions.
* **Purely combinational products.** Setting `OUT_REG = 0` on `mult8x8` gives
  this, but then the microprogram must latch the output before it moves the
  delay line.
