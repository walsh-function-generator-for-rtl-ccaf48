# Walsh Function Generator for a synthetic-aperture radiometer

An interferometric radiometer such as ESTAR correlates the signals of every pair
of antenna elements. Each element's analog front end adds its own slowly drifting
offset noise, and in the correlation these offsets multiply into an error term.
The fix is generalized Dicke switching. Each front end flips the sign of its RF
signal under a two-valued code W_i(t) in {+1, -1}. After digitizing, it flips the
sign back with the same code. The wanted signal comes out unchanged, but the
front-end noise has been modulated by W_i. When the correlator integrates over one
period T, the noise cross term carries the factor

    N_i * N_j * sum_t W_i(t) W_j(t)

This factor is zero whenever the codes of different elements are orthogonal.
Walsh functions are such a set of orthogonal codes.

This RTL generates those codes. One generator chip drives 32 Walsh functions in
parallel. A system of four identical chips, one per arm of the cross-shaped array,
covers 128 elements. All chips run from one shared clock, so the functions stay in
step.

## Walsh values from a Gray code

The functions are in sequency order, which means function i changes sign exactly i
times per period. Each function is sampled at 256 points per period. Both the
index i and the time sample t are 8-bit numbers. The value of function i at time t
is

    W(i,t) = prod_r (-1)^( t[7-r] * (n[r] + n[r+1]) )

Here n is i in binary, and n[8] is 0. The logic encoding is 0 for +1 and 1 for -1.
With that encoding, the product becomes an exclusive-or. Define the Gray code of i:

    g = i ^ (i >> 1)

W is then the parity of g AND (t bit-reversed). In hardware that is eight AND
gates and an 8-input XOR (`walsh_fn`). For example:

- W(0,t) is always 0.
- W(1,t) equals t[7]: one sign change, at mid-period.
- W(2,t) equals t[7] ^ t[6].

## One chip: computing 32 functions serially (`wfg_chip`)

A chip does not hold 32 copies of the W(i,t) circuit. It reuses one copy for all
32 functions:

```
         S2..S0 (range pins)
            |
 count[12:0]|    +----------+  w   +-------------+ 32  +---------------+
 ---------->+--->|  W(i,t)  |----->| shift reg   |---->| data register |--> WALSHOUT[31:0]
 [12:5] = t      +----------+      | (32 bits)   |     +---------------+
 [4:0]  = i low   i = {S, count[4:0]}  |    ^                ^ load = &count[4:0]
                                   |    +-- sout ---> TDATA_OUT (when TEST_EN)
```

- A 13-bit counter (`wfg_counter`) runs freely.
  - Its upper 8 bits are the time sample t.
  - Its lower 5 bits are the low bits of the function index.
  - The three range pins S2..S0 supply the upper index bits. The chip therefore
    produces functions 32*S to 32*S+31.
- Each clock, the chip computes one value and shifts it into a 32-bit shift
  register (`wfg_shift_reg`). New bits enter at bit 31 and move towards bit 0.
- A five-input AND of the low count bits marks the 32nd value of a time sample.
  On that same edge, the data register (`wfg_data_reg`) captures the shift
  register's next contents: the 31 earlier bits plus the bit now arriving. Line k
  of WALSHOUT therefore carries W(32*S + k, t).
- The outputs hold steady for 32 clocks while the next sample is built.
- One full period of all functions takes 256 x 32 = 8192 clocks. With a clock of
  f = 8192 / T, the Walsh period equals the correlation period T. For example, a
  2 ms period needs a 4.096 MHz clock.

### Timing

All registers act on the falling edge of CLOCK. The chip inverts CLOCK once and
runs every register on the rising edge of the inverted clock (`aclk`).

Count falling edges from the release of the active-low reset, `master_reset_n`:

| falling edge n | WALSHOUT[k]                  | TDATA_OUT (TEST_EN = 1)                     |
|----------------|------------------------------|---------------------------------------------|
| 1 .. 31        | 0                            | 0                                           |
| n >= 32        | W(32S+k, (n/32 - 1) mod 256) | W(32S + (n-32) mod 32, ((n-32)/32) mod 256) |

The 32 pulses after reset are the initialisation. After them, WALSHOUT holds
sample 0. From then on it changes only at every 32nd falling edge and repeats
every 8192.

### Test mode

With TEST_EN high, the oldest bit of the shift register appears on TDATA_OUT.
Right after initialisation, that bit is W(32S, 0). Each later falling edge
presents the next value, in this order:

    W(32S,0), W(32S+1,0), ..., W(32S+31,0), W(32S,1), ...

This lets a host read back every value the chip produces over one serial line.
Test mode does not stop normal generation. With TEST_EN low, TDATA_OUT is 0.

The pins are 32 Walsh outputs, 3 range pins, CLOCK, TEST_EN and TDATA_OUT: 38
signal pins, plus the reset.

## The distributed system (`wfg_system`, the top)

`wfg_system` has `N_CHIPS` identical chips (default 4), which share `clock` and
`master_reset_n`. Each chip has its own range input `s[c]`, its own `test_en[c]` and
`tdata_out[c]`. Its outputs are `walshout[c][31:0]`. With the ranges strapped to
0..3, the system provides functions 0..127. These are pairwise orthogonal, because
they are distinct rows of one Walsh set.

How far this reaches:

- A reduced 73-element array fits.
- A full 145-element array needs `N_CHIPS = 5`.
- All 256 functions need `N_CHIPS = 8`.

`N_CHIPS` is the only parameter of the top. The package `wfg_pkg` holds the index
width (8) and the counter split (5 low bits). All other sizes follow from these
two.

## Where this RTL makes its own choices

The generator's structure follows the original design:

- the counter split and the range pins;
- the serial W(i,t) computation into a shift register and a holding register;
- the 8192-clock period and the 32-pulse initialisation;
- the falling active edge;
- the order of the test read-out.

The following are choices of this implementation:

- **Load timing.** The data register is a synchronous register with a load enable
  on the common clock. It loads the shift register's *next* value on the edge
  that brings in the 32nd bit. This makes 32 pulses enough for initialisation. A
  design with a separately clocked load, one edge later, would need 33.
- **Reset.** The reset is asynchronous and clears the counter and both registers.
- **Range pins.** The range pins are used directly, without registering. Change
  them only together with a reset.
- **TEST_EN.** TEST_EN only gates TDATA_OUT.
- **System ports.** In the system, the reset is shared, and each chip's range and
  test pins are separate ports.

Not modelled:

- the FPGA's clock buffer, which is wiring only;
- the front-end sign switching that uses the Walsh outputs;
- the correlator that supplies the clock.

## Verification

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

- **`walsh_ref_pkg`** is an independent reference. It builds the natural-order
  Hadamard matrix and files each row by its number of sign changes, with no Gray
  codes and no bit reversal.
- **`walsh_fn_tb`** checks all 65536 (i, t) pairs against the reference, and also
  checks the sequency and pairwise orthogonality of all 256 functions.
- **`wfg_counter_tb`, `wfg_shift_reg_tb`, `wfg_data_reg_tb`** check the counter
  sequence and its wrap after 8192 clocks, the load gate, shift order and serial
  output, and load versus hold.
- **`wfg_chip_tb`** compares every output and TDATA_OUT at every clock against
  the timing table above. It covers range 5 in test mode for two periods, and
  range 0 in normal mode.
- **`wfg_system_tb`** is the end-to-end test at full default size. It runs the
  ranges {0,1,2,3}, then {4,5,6,7}, each for two periods, and checks:
  - every line against the reference;
  - the orthogonality of all 128 lines (the correlation cross term is zero);
  - repetition after 8192 clocks;
  - the serial test stream against the captured parallel outputs;
  - update timing.

  It also counts resets, initialisations, updates, period wraps, test bits and
  range settings, and fails if any of these never occurred.

To simulate with Verilator, for example the system test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wfg_pkg.sv tb/walsh_ref_pkg.sv tb/wfg_system_tb.sv --top-module wfg_system_tb
./obj_dir/Vwfg_system_tb
```

The other benches build the same way with their own top module.
