# Pseudorandom absolute position encoder with a serial code converter

An absolute rotary encoder must say which angular sector a shaft is in the moment it powers up.
A classic n-bit encoder does this with n concentric code tracks and n reading heads. A
*pseudorandom* encoder does it with a single track. The track carries a maximum-length
pseudorandom binary sequence (an m-sequence) of 2^n − 1 bits, one bit per sector. Every window of
n consecutive bits on that track occurs exactly once, so the n-bit window under the head
identifies the sector. Consecutive windows overlap in n − 1 bits, so one head reading one new bit
per sector is enough to keep the window current.

The window is a pseudorandom code word, not a sector number. This RTL turns it into the natural
binary sector number p with a **serial converter**. The converter loads the word into a shift
register that runs the m-sequence *backwards*. It counts clock cycles until the register reaches
a fixed reference word. The count is the distance of the current sector from the reference
sector.

The default configuration is n = 6, with generator polynomial X^6 + X^5 + 1, 63 sectors and
reference word `111100`. An 8-bit configuration, X^8 + X^6 + X^5 + X^2 + 1 with three feedback
XORs, is selected by parameters and is tested as well.

## Files

| file | module | role |
|---|---|---|
| `rtl/prbs_pkg.sv` | package | polynomials `POLY6`, `POLY8`, reference words `REF6`, `REF8` |
| `rtl/prbs_direct_gen.sv` | `prbs_direct_gen` | direct m-sequence generator: the sequence the track carries |
| `rtl/prbs_inverse_gen.sv` | `prbs_inverse_gen` | inverse generator with its load gates: the converter's shift register |
| `rtl/gamma_detect.sv` | `gamma_detect` | reference-state and all-zero-state detectors, producing γ |
| `rtl/conv_counter.sv` | `conv_counter` | cycle counter |
| `rtl/output_register.sv` | `output_register` | result register, with a `valid` pulse |
| `rtl/serial_pn_converter.sv` | `serial_pn_converter` | the complete serial converter |
| `rtl/codeword_reader.sv` | `codeword_reader` | builds the n-bit word from the single head |
| `rtl/prbs_abs_encoder.sv` | `prbs_abs_encoder` | **top**: reader, converter and a built-in track source |

## Conventions: polynomials and bit order

A polynomial P(X) = X^n + c_{n−1}X^{n−1} + … + c_1X + 1 is an `(n+1)`-bit parameter `POLY`, in
which bit j is the coefficient of X^j:

- `POLY6 = 7'b110_0001`
- `POLY8 = 9'b1_0110_0101`

Code words are stored in the order they are written down, first bit in the MSB:

- In the converter, Y_1..Y_n has Y_1 in bit n−1.
- In the direct generator, the state X_n..X_1 has X_n in bit n−1.
- The result P_1..P_n is plain binary with P_1 as the MSB.

With this order the word `001000` is the literal `6'b001000`.

## The two generators

**Direct generator** (`prbs_direct_gen`) is a Fibonacci LFSR:

- Each flip-flop FF_i takes FF_{i−1}.
- FF_1 takes X_n ⊕ (⊕ of every X_i with c_i = 1).
- The sequence leaves from FF_n.

From state `111100` with X^6 + X^5 + 1 it produces

    111100000100001100010100111101000111001001011011101100110101011

Its state is always the n-bit window of the sequence starting at the bit now being output. So
state number j (j steps from `111100`) is the code word of sector j.

**Inverse generator** (`prbs_inverse_gen`) is the same shift chain with mirrored taps:

- FF_i contributes to the feedback when c_{n−i} = 1.
- In the bit order above, this makes the feedback simply `^(state & POLY[n-1:0])`.

Loaded with any word of the sequence, it steps through the direct generator's states in
reverse order:

    111100 → 111110 → 111111 → 011111 → … → 100000 → 110000 → 111000 → 111100

Its FF_1 input carries the mirror image of the direct sequence.

## How the converter works

`serial_pn_converter` connects four parts:

```
            y (code word)
               │
     ┌─────────▼─────────┐ state  ┌──────────────┐
 ┌──►│ prbs_inverse_gen  ├───────►│ gamma_detect │── γ
 │   │  load = ~γ        │        └──────────────┘
 │   └───────────────────┘
 │   ┌──────────────┐ count ┌─────────────────┐
 ├──►│ conv_counter ├──────►│ output_register │──► p, p_valid
 │   │  clr = ~γ    │       │  we = ~γ        │
 │   └──────────────┘       └─────────────────┘
 └── ~γ
```

γ is 1 while a conversion runs. It is 0 when the shift register holds either:

- the reference word (NAND1 in gate terms: a bit-wise match against `REF`), or
- all zeros (NAND0).

On the clock edge where γ = 0, three things happen at once:

1. the output register takes the count;
2. the counter clears;
3. the shift register takes the next code word `y`.

Every later edge shifts the register one state back along the sequence and adds one to the count.

**Timing.** A word that lies p sectors from the reference takes p + 1 cycles: one to load and p to
walk back. After those p steps the register holds the reference word and the count equals p.
p appears on `p` one edge later, together with a one-cycle `p_valid` pulse. The longest conversion
is 2^n − 1 cycles (p = 2^n − 2): 63 cycles for n = 6 and 255 for n = 8.

Worked example: `y = 001000` walks through
`001000 → 000100 → 000010 → 000001 → 100000 → 110000 → 111000 → 111100`. That is 7 steps, so the
result is p = 7, delivered 8 cycles after the load.

**All-zero start-up state.** All zeros is not part of the sequence, and a register holding it
would never leave by shifting. The all-zero detector forces γ = 0, so the next edge loads a code
word. Writes caused this way do not raise `p_valid`. Reset deliberately clears the shift register
to zero, so every start goes through this recovery. If the word at the input is still zero
(before the reader has seen n bits), the recovery repeats harmlessly until it is not.

The converter runs continuously. After each result it loads whatever word is then at `y`. So `y`
must be synchronous to `clk` and stable at the load edge, which `codeword_reader` guarantees.

## The encoder top

`prbs_abs_encoder` takes two inputs from the disk:

- `head_bit`: the bit under the head;
- `sector_step`: a one-cycle pulse per sector boundary.

`codeword_reader` shifts each new bit in at Y_n: `word <= {word[n-2:0], bit}`. When the head
delivers bit j+n−1 on entering sector j, the word is the track window of sector j, and the
converter reports p = j. `codeword_valid` rises after n steps.

`track_sel = 1` replaces the head with an on-chip `prbs_direct_gen`, advanced by `sector_step`. It
produces the same m-sequence as the track, which is useful for bench testing without a disk.

**Rotation speed limit.** The word must stay put long enough for a conversion to start on it. The
converter starts a new conversion at least every 2^n − 1 cycles. So a sector that lasts at least
2^n − 1 clock cycles is always converted at least once. For rotation frequency f and clock
f_clk this means

    f ≤ f_clk / (2^n − 1)^2

- n = 6: f ≤ f_clk / 3969.
- n = 8: f ≤ f_clk / 65025.

The sector number is exact, so the angle error is at most half a sector, 360° / (2(2^n − 1)).
That is 2.86° for n = 6 and 0.71° for n = 8.

As a reference point, a build of this converter from discrete 74LVC gates has been characterised
at about 29.85 MHz maximum clock for both n = 6 and n = 8. The critical path there is the γ
detection and load gating, not the feedback XORs. That corresponds to roughly 7.4 kHz rotation at n = 6 and
about 457 Hz at n = 8.

The RTL itself carries no timing. In an FPGA or ASIC the same critical path applies:

    register → state compare → γ → load multiplexer → register

The top does not check the speed limit. If sectors are shorter than the limit, some sectors are
skipped, but each reported position is still the correct number for the word that was converted.

## What follows the published design, and what is added

These follow the published design:

- the direct and inverse generator structure and tap rules;
- the n = 6 and n = 8 polynomials;
- the reference word 111100 of the 6-bit example;
- the load-or-shift gating per flip-flop;
- the reference-state and all-zero detectors combined into γ;
- the counter/output-register scheme;
- the p + 1 cycle conversion time.

These are this design's own choices:

- **Reset.** The published circuits have none. Here `rst_n` is synchronous and active-low, and
  clears the converter's shift register to zero.
- **Counter clear and output write are synchronous** and happen on the same edge. The gate-level
  circuit uses a reset pin on the counter and gates the output register from γ.
- **`p_valid`**, and the `ref_hit`/`zero_hit`/`sr_state` observation outputs.
- **Reference word.** The published general description uses the reference word 111…10 (all ones,
  last bit 0). The 6-bit example uses 111100, and that is the default here. The 8-bit package
  constant `REF8 = 11111110` follows the general rule. Any non-zero word of the sequence works.
- **`codeword_reader`.** The single-head principle is given only in words. The register, its
  shift direction (one rotation direction) and `codeword_valid` are choices made here.
- **The built-in track source** (`track_sel`).
- **The load/enable inputs of `prbs_direct_gen`.**

Gates are written as expressions, not as netlists of AND/OR/NAND cells. Synthesis produces the
equivalent logic.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/prbs_pkg.sv \
          tb/tb_prbs_abs_encoder.sv --top-module tb_prbs_abs_encoder -Mdir obj
./obj/Vtb_prbs_abs_encoder
```

| testbench | what it checks |
|---|---|
| `tb_prbs_direct_gen` | the 63-bit sequence bit for bit, state list, period 63; 8-bit period 255 against a software model |
| `tb_prbs_inverse_gen` | the mirrored 63-bit sequence, reverse state order, the 001000 walk; 8-bit reverse order |
| `tb_gamma_detect` | all 64 and all 256 states |
| `tb_conv_counter`, `tb_output_register` | random stimulus against a reference model |
| `tb_codeword_reader` | windows of the track after each step, `codeword_valid` timing |
| `tb_serial_pn_converter` | all 63 positions, p + 1 cycles per conversion, worked example, start-up recovery |
| `tb_converter_n8` | the 8-bit configuration: all 255 positions, p + 1 cycles, 255-cycle worst case |
| `tb_prbs_abs_encoder` | end to end at default parameters (see below) |
| `tb_prbs_abs_encoder_n8` | end to end in the 8-bit configuration, 255 cycles per sector, both track sources |

`tb_prbs_abs_encoder` drives a model disk that carries the 63-bit sequence. It runs:

- two revolutions at the fastest allowed rate (63 cycles per sector);
- one slower revolution;
- one revolution from the built-in track source.

It checks that:

- every result equals the position of the word that was converted;
- every sector is reported in each full revolution.

It also counts that each mechanism happened at least once: all-zero recovery, p = 0, p = 62
with its 63-cycle conversion, and both track sources.

Expected values in every testbench come from the printed sequence or from a separate software
recurrence, never from the RTL.

To change the resolution, give `N`, `POLY` and `REF` together. `POLY` must be primitive of degree
`N`, and `REF` must be non-zero. For example:

```
serial_pn_converter #(.N(8), .POLY(prbs_pkg::POLY8), .REF(prbs_pkg::REF8))
```
