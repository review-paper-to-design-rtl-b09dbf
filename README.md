# Digit-reconfigurable FIR filter

An FIR filter normally uses the *tap* as its building block: one
multiplier per coefficient. This design uses the *digit* instead. Every
coefficient is written in canonical signed digit (CSD) form,

    h_i = sum_k d_ik * 2^-pk,     d_ik in {-1, 0, +1},  pk in 0..7

so the filter output becomes a sum of digit terms

    y[n] = sum_i sum_k d_ik * 2^-pk * x[n-1-i].

One *digit processing unit* (DPU) evaluates one term `d * 2^-pk * x`. A
multiply by a digit is only a pass, an invert or a zero. A multiply by
`2^-pk` is only a shift. A chain of identical DPUs can then be split freely
among taps. Eight DPUs can be one tap of eight digits, eight taps of one
digit, or anything in between. Where the boundaries between taps fall is set
by one bit per DPU. The eight terms and an accumulated sum are added in one
carry-save adder tree.

The RTL models a chip with one processing element (PE) of 8 DPUs, a
pseudo-random test-pattern generator and an on-chip test accumulator with a
serial read-out.

## Numbers and formats

| quantity | width | note |
|---|---|---|
| sample `x` | 8 bits, two's complement | |
| digit shift `pk` | 3 bits | weight `2^-pk`, so the term is `x * 2^(7-pk)` in units of 2^-7 |
| DPU term | 15 bits: 14-bit `addend` + `sign` | exact for all x and pk |
| sign-extension word | 10 bits, weight 2^14 | |
| PE sum | 24 bits, modulo 2^24 | |
| test accumulator | 32 bits, carry-save | |

The output is scaled by 2^7: the sum equals `128 * sum_i h_i * x[n-1-i]`.
The largest possible magnitude is 8 * 128 * 128 = 2^17, far inside 24 bits.
The spare width lets a partial sum arrive from a previous chip.

## How a DPU works (`rtl/dpu.sv`)

    ctrl_in -> [6-bit SIPO: cfg zero plus shift] -> ctrl_out
    data_in --+----------------------> MUX --> data_out
              +--> REG (clk) --+-----> MUX      (cfg selects REG)
                               +--> multiplier -> shifter -> addend[13:0]
                                        |
                                        +-> sign

* **Multiplier** (`csd_multiplier`). Each bit is `~(zero | (plus ^ x))`.
  A zero digit gives 0, +1 gives x, and -1 gives `~x = -x - 1`. The `+1`
  needed to negate in two's complement is *not* added here. See
  "Compensation vector".
* **Shifter** (`csd_shifter`). The 8-bit product, with 7 fill bits below
  it, is shifted right arithmetically by pk. The 7 magnitude bits end up
  `7-pk` places up, the sign is copied above them, and the fill goes below
  them. The fill is 1 for a -1 digit and 0 otherwise, so a negative term is
  exactly `-(x * 2^(7-pk)) - 1`.
* **Sample register and bypass mux.** The multiplier always works on the
  registered sample. `cfg = 1` marks the last digit of a tap: the next DPU
  gets the registered sample, one clock older, which belongs to the next
  tap. With `cfg = 0` the next DPU gets the same sample as this one, so it
  computes another digit of the same tap. DPU j therefore works on
  `x[n-1-t_j]`, where `t_j` is the number of `cfg` bits set in DPUs
  0..j-1.

A DPU with `zero = 1` contributes nothing and may be left unused.

## Compensation vector

Each -1 digit leaves its term short by exactly one LSB. The shortfall does
not depend on the data. So the number of -1 digits is loaded once into the
PE's 24-bit acc register as the *compensation vector*. The adder then adds
it to every sum. With `comp = (number of -1 digits)` the PE sum is exact.

## Sign extension generator (`rtl/sign_ext_gen.sv`)

The eight terms are 15 bits wide, and the sum is 24 bits wide. The design
does not extend each term to 24 bits. It adds all their upper bits at once.
A negative term contributes `2^24 - 2^14` (bits 14..23 set). With S negative
terms the total is `-S * 2^14 mod 2^24`, which is the 10-bit word
`(1024 - S) mod 1024` at bit 14. For 8 terms this word has a simple form:

* bits 9..3: all ones if any sign is set, otherwise all zeros;
* bits 2..0: the low three bits of (8 - S), the count of non-negative
  terms.

## The nine-input adder (`rtl/pe_adder.sv`)

1. The 8 addends and the 14 low bits of acc are nine operands. Five 3:2
   carry-save adders in two levels reduce them to four vectors.
2. These four vectors, the 10 high bits of acc (at bit 14) and the
   sign-extension word are reduced to two vectors. This step uses two
   levels of 4:2 compressors (`csa42`, each two `csa`).
3. A carry-propagate adder gives the sum.

The published chip uses a modified ELM adder for step 3, but its circuit is
not described, so plain `+` is used. The step-1 vectors are kept 24 bits
wide, so the carries out of bit 13 are kept. Their bits above 17 are
constant zero, and synthesis removes them.

## Processing element (`rtl/pe.sv`)

The PE has the following parts:

* eight DPUs on two chains, control and samples;
* the sign extension generator;
* the adder;
* the 24-bit SIPO acc register (`acc_sipo`).

`sum` is combinational from the DPU sample registers. It is valid after the
clock edge that registers a sample. The sample leaving the last DPU goes
through one more register to `data_out`, for a following chip.

## Chip (`rtl/fir_chip.sv`)

    data_in --> PRDG --data--> PE --sum--> test module --> scan_out
    ctrl_in ------------------> PE --> ctrl_out
    scan_in ------------------> PE (acc SIPO)
                                PE --> data_out

There are two clocks. `CLK` runs the filter. `DumpCLK` is slower; the
testbench uses CLK/4. It shifts the set-up chains and the result.

| phase | signals | what happens |
|---|---|---|
| set-up | `Setup = 1` | Each DumpCLK edge shifts `ctrl_in` into the 48-bit control chain and `scan_in` into the acc SIPO. CLK edges clear the sample registers and the test accumulator, and seed the PRDG. |
| run | `Setup = 0, Mode = 0` | The filter runs on CLK. The test module adds every sum into its 32-bit carry-save accumulator. |
| dump | `Mode = 1` | The accumulator holds. The first DumpCLK edge loads `s + c` into a shift register. The next 32 edges shift it out on `scan_out`, MSB first. The acc SIPO also shifts `scan_in` on these edges. |

`Setup` and `Mode` must never be high together; an assertion checks this.

After a dump, setting `Mode` back to 0 resumes accumulation. The total keeps
growing from where it stopped. During a dump the acc SIPO is overwritten
from `scan_in`. A single chip must present its compensation vector again on
`scan_in`, MSB first, on the last 24 DumpCLK edges of the dump.

**Control stream.** Send 48 bits: the word of DPU 7 first, and each 6-bit
word `{cfg, zero, plus, shift[2:0]}` LSB first. Bit k of the stream ends up
in DPU `(47-k)/6`, word bit `5 - (47-k) mod 6`. The acc word is sent MSB
first; only the last 24 bits shifted are kept.

**PRDG control signals** (`control[2:0]`, `rtl/prdg.sv`):

* `[0]`: feed the filter from the LFSR (1) or from `data_in` (0);
* `[1]`: the LFSR steps every CLK;
* `[2]`: during set-up, seed the LFSR from `data_in` if it is non-zero;
  otherwise the seed is `8'h01`.

The LFSR is x^8 + x^6 + x^5 + x^4 + 1, with period 255.

**Cascading.** `ctrl_out` → next `ctrl_in` makes one long control chain.
`data_out` → next `data_in` continues the sample line. `scan_out` → next
`scan_in` carries a result into the next chip's acc register. A result read
out MSB first over 32 edges leaves its low 24 bits in the receiving SIPO.
The `data_out` register puts one extra sample of delay between chips. If the
last DPU of a chip has `cfg = 0`, the first tap of the next chip follows the
last tap of this one with no gap. If it has `cfg = 1`, there is a tap of
coefficient zero between them. When chips are cascaded, their
compensation vectors can all be loaded into the first chip; the totals that
the chips scan out then add up to the total of the whole filter.

## Where this RTL departs from, or adds to, the published chip

The following follow the published chip: the DPU structure, the bit
equation of the multiplier, the shifter rule, the compensation vector, the
sign-extension rule, the adder's first level, and the widths 8/14/15/24/32.
The following are this design's own choices:

* the layout and serial order of the control word;
* the meaning of `Setup` and `Mode`, and all DumpCLK timing;
* the PRDG's polynomial, seed and the meaning of its three control signals;
  `DumpCLK` is not used by the PRDG;
* a plain `+` in place of the ELM adder, and 4:2 compressors for the upper
  part of the adder;
* `Setup` acting as the only reset, since the chip has no reset pin;
* the register after the last DPU is read as registering `data_out`;
* the test accumulator sign-extends the 24-bit sum, and resolves `s + c`
  only when it is loaded for read-out.

Not modelled: the output buffers and pads, and anything physical (layout,
86 MHz timing, power).

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths, the `dpu_ctrl_t` control word |
| `rtl/csd_multiplier.sv`, `rtl/csd_shifter.sv` | digit multiply and shift |
| `rtl/dpu.sv` | digit processing unit |
| `rtl/sign_ext_gen.sv` | sign extension generator |
| `rtl/csa.sv`, `rtl/csa42.sv`, `rtl/pe_adder.sv` | carry-save parts and the nine-input adder |
| `rtl/acc_sipo.sv` | 24-bit serial-in acc register |
| `rtl/pe.sv` | processing element |
| `rtl/prdg.sv` | pseudo-random data generator |
| `rtl/test_module.sv` | carry-save test accumulator and serial read-out |
| `rtl/fir_chip.sv` | top level |
| `tb/fir_tb_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/fir_pkg.sv tb/fir_tb_pkg.sv tb/tb_fir_chip.sv \
        --top-module tb_fir_chip -o sim
    ./obj_dir/sim

Verilator finds the other modules by file name in `rtl/` and `tb/`. The two
packages are listed first because they are imported.

The simulator has only two states, so nothing may rely on X. Every register
that is read is cleared by `Setup` or loaded through a scan chain before it
matters.

How far each testbench goes:

* `tb_csd_multiplier`, `tb_csd_shifter` and `tb_sign_ext_gen` are
  exhaustive.
* `tb_pe_adder` checks corner cases and 5000 random operand sets against
  integer addition.
* `tb_pe` draws 60 random digit-to-tap assignments. For each one it checks
  every sum against a behavioural FIR, and also checks `data_out` and the
  control chain.
* `tb_fir_chip` runs the chip at full size with five configurations:
  * 8 taps of 1 digit;
  * 1 tap of 8 digits;
  * 4 taps of 2 digits;
  * taps of 3, 2, 2 and 1 digits;
  * 5 digits over 3 taps, with 3 DPUs unused.

  It feeds samples from `data_in` and from the PRDG, and holds and reseeds
  the PRDG. Each configuration goes through run, dump, resume and a second
  dump. Every scanned-out total is compared with a reference model in tap
  form. The test counts each mechanism and fails if one never happens.
* `tb_fir_cascade` connects two chips into one 16-digit filter. It checks
  each cycle's combined sum, the two scanned-out totals, and the transfer of
  chip A's result into chip B's acc over the scan chain.
