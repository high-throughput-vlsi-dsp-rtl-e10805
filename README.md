# A modulus-replication FIR filter over the Fermat rings GF(257) and GF(17)

This design computes a 10-bit by 10-bit FIR filter with no wide multipliers and no wide adders in the filter itself. Every multiply-accumulate is done on 9-bit or 5-bit residues.

The idea is *modulus replication* (MRRNS, the modulus replication residue number system):

1. Each sample is written as a short polynomial in X = 8, with 3-bit digits.
2. That polynomial is evaluated at five small points. This is done in two finite fields, modulo 257 and modulo 17.
3. Each evaluation runs through its own independent filter, called a *subpath*. The subpaths never talk to each other, so there are 2 × 5 identical, narrow filters.
4. A small inverse Vandermonde transform collects the results. It gives the polynomial coefficients of the result modulo 257 and modulo 17.
5. A Chinese-remainder step (mixed radix conversion) turns each pair into one number, -2184..2184.
6. A shift-and-add with weights 8^k gives the integer output.

The encoding is replicated: the same modulus serves five times, through five evaluation points. So the design needs only two moduli, 257 and 17, instead of a long list of coprime moduli. Both are Fermat primes, of the form 2^(2^t)+1. In such a ring:

- Multiplication becomes an 8-bit (or 4-bit) binary addition of logarithms.
- Addition becomes an 8-bit (or 4-bit) binary addition with an end-around carry.

The price of this is the two small transforms at the edges. Per ring, the forward map costs 4 × 5 MACs and the inverse map 5 × 5 MACs, so 45 MACs per ring. That is the same as 9 more filter taps, about 6 % of a 150-tap filter.

Default configuration:

- 150 taps.
- 10-bit two's complement data and coefficients.
- X = 8, with 5 evaluation points.
- 26-bit signed output.
- One sample per clock.

## Two codes for one residue

The arithmetic in a ring GF(p), with p = 2^NB + 1 (NB = 8 or 4), uses two codes.

**Index form `{NAN, k}`** (NB+1 bits). The value is 3^k mod p, where 3 generates the multiplicative group of both fields. The value 0 has no logarithm, so it is marked by NAN = 1. The product of two nonzero values is found by adding their indices mod 2^NB. That is a plain NB-bit adder with its carry dropped.

**Diminished-one form** (NB+1 bits). A value v ≠ 0 is stored as v − 1 in NB bits, and zero is stored as `1_0000_0000`. Two nonzero values are added as follows:

- Add the NB-bit codes.
- Invert the carry out of the MSB.
- Add it back in at the LSB.

The trap in this arithmetic is that end-around carry. Resolving it in every MAC would put two adders in series. Instead the MAC passes the carry on, and the next MAC adds it at the LSB of its own addition. So an accumulator moving down a chain is a pair (s, c) that stands for the diminished-one code s + (1 − c). The rules for this pair are:

- s can have its MSB set only when c = 1. The MACs preserve this rule, and an assertion checks it.
- A chain starts from (`1_0000_0000`, 1), which is zero.
- At the end of a chain, `dim1_normalize` resolves the pending carry. It does so with two fast increments.

The blocks pass values in these forms:

- `dim1_to_index` converts diminished-one codes to index form, through a lookup table.
- `fermat_rom` converts back: its entry k holds 3^k − 1, the diminished-one code of the product.

## The MAC (`fermat_mac`)

The MAC computes c_out = A·B + C in three register stages:

1. An NB-bit EMODL adder adds the two indices. If either NAN flag is set, the product is marked zero.
2. The antilog ROM gives A·B − 1.
3. The product is added to the incoming accumulator (s, c). The sum is NB bits plus the inverted carry-in. The carry out of the MSB leaves as the new pending carry.

Two special cases in stage 3:

- A zero product passes the accumulator through unchanged.
- An accumulator holding the zero code gives ({0, product}, 1).

The coefficient (β) and the sample (α) arrive three clocks before the accumulator is due. That lets a systolic chain move the partial sum one cell per clock while the index addition and ROM lookup run ahead of it.

## Adders and ROM as circuits

All binary adders are `emodl_adder` instances. These include the index adder, the diminished-one adder, the increments, the 9-bit converter adder and the final adder.

- The adder is built from 4-bit dual-rail carry trees, `emodl_adder4`, chained.
- Each tree is built from `emodl_bit` cells.
- Every bit produces both the carry and its complement, as an enhanced multiple-output domino circuit would.
- An assertion checks that the two rails stay complementary.
- The clocked connectors between the trees restore the carry rails. Logically they are wires, so here they are direct connections.
- Widths that are not a multiple of 4 are padded.

The antilog ROM is modelled the way the dynamic ROM is organised:

- `rom_row_decoder` holds 2^(NB−3) stages, each decoding A[NB−2:2]. The top address bit picks one of the two outputs of each stage, giving 64 one-hot word lines for GF(257).
- `rom_sense_column` is one output bit. Each word line carries four cells, and A[1:0] selects one of them. Cell contents are set by parameter.
- Precharge, evaluate and charge sharing are electrical behaviour and are not modelled. The ROM read is combinational, and the MAC registers it.

## Samples as polynomials (`mrrns_encoder`, `poly_map_array`)

A 10-bit sample is split as

    x = d0 + 8·d1 + 64·(d2 − 8·s),   d0 = x[2:0], d1 = x[5:3], d2 = x[8:6], s = x[9]

so it is a degree-2 polynomial in X = 8 whose top coefficient lies in −8..7. The sign bit is a fourth input with weight −8·r², so the forward map takes four inputs. The product of a sample polynomial and a coefficient polynomial has degree 4. Five evaluation points, {0, 1, −1, 2, −2}, are enough to recover it.

`poly_map_array` is a rows × cols grid of `fermat_mac` cells, with constant weights in index form:

- Input i enters row i after i register delays.
- Each cell hands its partial sum to the cell in the next row, one clock later.
- Output column j is deskewed by cols − j registers, so all outputs of one sample leave together.
- Latency is rows + cols + 1.

The forward map is a 4 × 5 array; the inverse map (`mrrns_inverse_map`) is a 5 × 5 array. Its weights are the inverse Vandermonde matrix of the five points. `mrrns_pkg` computes them at elaboration, by Lagrange interpolation in each field. Changing the points means changing only `mrrns_pkg::root`.

## Subpaths (`fir_subpath`)

A subpath is an ordinary systolic FIR filter over GF(p):

- The incoming diminished-one sample is converted to index form.
- The sample then runs along N_TAPS `fermat_mac` cells.
- In each cell the sample passes two registers and the partial sum passes one. So the sum started in cell 0 meets x(n), x(n−1), … in turn.
- The end of the chain is carry-resolved.

There are D = 5 subpaths per ring. `mrrns_ring_path` groups one ring: encoder, subpaths, inverse map.

## From residues to an integer (`mrc_converter`, `final_adder`)

Each result coefficient is known modulo 257 (x257) and modulo 17 (x17). The value in 0..4368 is

    C = x257 + 257·((9·x17 + 8·x257) mod 17)

`mrc_converter` computes the mod-17 factor with small tables and one 9-bit fast adder:

- r = 17 − x17 and q = r + x257.
- t = 16 − q[4:1].
- m = q[8:5], or (8 + q[8:5]) mod 17 when q[0] = 1.
- a17 = (t + m + 1) mod 17.

The "+1" in that last step is needed for the tables to match the formula above. The converter takes four clocks.

`final_adder` forms y = Σ 8^k·C_k, with the C_k read as signed: C > 2184 means C − 4369.

- 257·a17 is written as a17 + 256·a17.
- So each coefficient contributes three shifted rows: a257 and a17 at bit 3k, and a17 at bit 3k+8.
- Each negative coefficient adds a fourth row, −4369·8^k.
- A 3:2 carry-save array compresses the rows to two. These are registered and added by a 26-bit EMODL adder, then registered again.
- `coef_neg` reports which coefficients were read as negative.

## Overflow

Each result coefficient is a sum of up to 3·N_TAPS digit products. It must stay within −2184..2184 for the output to be exact, and nothing in the datapath detects when it does not.

- When a coefficient leaves that range, it wraps modulo 4369, and the error appears at weight 8^k of that coefficient.
- Low-amplitude signals and coefficients, typical of a real filter, stay exact.
- Full-scale random data at 150 taps overflows often.

The top-level testbenches check the wrapped behaviour bit-exactly. They also check the plain convolution whenever nothing wrapped.

## Loading coefficients

The subpath MACs hold coefficients in index form, one value per subpath, per tap, per ring. `mrrns_fir` takes them in that form:

- `beta257[j][k]` (9 bits) and `beta17[j][k]` (5 bits) hold the digit polynomial of h_k evaluated at point j.
- `mrrns_pkg::coef_index(h, j, p, nb)` computes them, with p = 257, nb = 8 or p = 17, nb = 4.
- A fixed filter ties these ports to constants. A programmable one drives them from a register file.

## Interface and timing of `mrrns_fir`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset, clears the filter history |
| in_valid | in | 1 | x_in holds a sample |
| x_in | in | 10 | signed sample |
| beta257, beta17 | in | 9 / 5 × D × N_TAPS | coefficients in index form |
| out_valid | out | 1 | y_out holds the result for the sample given LAT clocks earlier |
| y_out | out | 26 | signed Σ h_k x(n−k), exact without overflow |
| coef_neg | out | D | result coefficients read as negative |

The filter runs every clock. A clock with in_valid low still shifts x_in into the history.

The latency comes from `mrrns_pkg::lat_fir(N_TAPS)`:

    1 + [encoder 12] + [subpath N_TAPS + 5] + [inverse map 13] + [converter 4] + [final adder 2]

That is 187 clocks at 150 taps.

Parameters:

- N_TAPS can be any positive value.
- D is fixed at 5 by the digit split (`mrrns_pkg::D_MAX`). Another X or data width needs new digits in `mrrns_encoder`, new constants in `mrrns_pkg`, and new rows in `final_adder`.

## Files

- `rtl/mrrns_pkg.sv`: constants, field arithmetic used at elaboration, transform weights, latencies.
- `rtl/emodl_bit.sv`, `emodl_adder4.sv`, `emodl_adder.sv`: the dual-rail adders.
- `rtl/rom_row_decoder.sv`, `rom_sense_column.sv`, `fermat_rom.sv`: the antilog ROM.
- `rtl/dim1_to_index.sv`, `dim1_normalize.sv`, `fermat_mac.sv`: code conversion and the MAC.
- `rtl/poly_map_array.sv`, `mrrns_encoder.sv`, `mrrns_inverse_map.sv`: the polynomial maps.
- `rtl/fir_subpath.sv`, `mrrns_ring_path.sv`: the subpaths and one ring.
- `rtl/mrc_converter.sv`, `final_adder.sv`, `mrrns_fir.sv`: the output conversion and the top.
- `tb/tb_<module>.sv`: one self-checking testbench per module. `tb_mrrns_fir` runs the top at 24 taps.

The top-level testbench runs four streams, with a reset before each:

- small coefficients (−15..15) with full-scale random data;
- full-scale random values, which overflow;
- zero samples and zero coefficients;
- the largest value, 511, for every sample and coefficient, which overflows.

It checks every output against a model of the digit convolution with modular wrap, and checks the first out_valid clock. It also counts that overflow, negative coefficients, zero operands and exact results all occurred.

## Simulating

Any testbench builds with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/mrrns_pkg.sv tb/tb_mrrns_fir.sv --top-module tb_mrrns_fir
    ./obj_dir/Vtb_mrrns_fir

- Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. A watchdog stops a hung run.
- The 150-tap top is large, about 1600 MACs. Verilator turns it into C++ that takes well over 20 minutes and more than 8 GB to compile. The largest configuration simulated to completion is the 24-tap one in `tb_mrrns_fir`. To run the default size, set `NT` in that testbench to 150.
- The blocks below the top are tested at their default parameters, with two exceptions: `fir_subpath` is tested at 6 taps and `mrrns_ring_path` at 4 taps, both in both rings.
- All state is reset, so two-state simulation matches four-state.

## Where this design goes beyond or departs from its source description

- **Digit split, evaluation points and generator.** These are this design's choices: 3-bit digits with the sign as a fourth input, points {0, ±1, ±2}, generator 3. They are consistent with the stated 4 × 5 forward and 5 × 5 inverse MAC counts.
- **Subpaths.** The algorithm stage is five subpaths per ring (5 × N MACs). A drawing of the datapath that shows four was not followed.
- **End of a subpath chain.** The chain ends in a carry resolution to the diminished-one code, and the next stage converts to index form itself.
- **Carry resolution.** The carry is resolved by two increments on the fast adder: first the inverted carry, then the 1 of the diminished-one code. This keeps the zero code exact. A single adder that adds 1 and the carry at once would need a separate check for zero.
- **Converter correction.** The mixed radix converter adds 1 in its final mod-17 adder, so that its small tables give the stated reconstruction formula.
- **Signed results.** Reading coefficients as signed, and the correction row in the final adder, are additions of this design.
- **ROM bit lines.** Each ROM bit line carries all 64 word lines rather than being split into halves of 32 cells.
- **Dynamic logic.** EMODL domino timing, the clocked carry connectors and the TSPC latches are represented only by their logic function and by ordinary edge-triggered registers.
