# Locating a faulty chip on a board from two signatures

A board with N chips, each with M outputs, is tested by applying T test
patterns and compressing the responses. The usual way to find out *which*
chip failed is to give every chip its own signature register and its own
stored reference: N LFSRs and N references. This design finds the faulty
chip with two signatures and two references for the whole board, provided
only one chip is faulty.

The idea is to treat the N chip outputs of one pattern as a word of N
symbols, each symbol an element of the finite field GF(2^M), and to compress
that word with the check matrix of a single-error-correcting (Hamming) code
over GF(2^M):

    H = [ 1  1      1        ...  1
          1  alpha  alpha^2  ...  alpha^(N-1) ]

Each pattern gives two M-bit syndromes, y = sum z_i and
y* = sum alpha^(i-1) z_i. These two sequences are then compressed in time by
two parallel-input LFSRs that multiply by the same alpha. Everything is linear
over GF(2^M). So if chip i alone produces errors e_i(t), the final signatures
differ from the references by

    ds  = sum_t alpha^(T-1-t) e_i(t)
    ds* = alpha^(i-1) * ds

The decoder only has to find the power of alpha that maps ds onto ds*. It does
this by stepping an LFSR from ds and counting.

The RTL implements the two variants of the scheme:

* **Parallel diagnosis.** All N responses are wired to a combinational space
  compressor, and one pattern is compressed per clock.
* **Serial diagnosis.** The responses arrive one M-bit word per clock over the
  board's system bus. The two syndromes are then built sequentially by a
  toggle-flip-flop register and a third LFSR. This costs N clocks per pattern
  but needs no wiring to the chips.

Both variants share the time compressor, the reference store and the
comparator/decoder. They sit side by side in `board_diag_top`.

## Arithmetic

Symbols are M-bit vectors in the polynomial basis: bit k is the coefficient
of x^k. alpha = x. The field polynomial for the default M = 16 is

    p(x) = x^16 + x^12 + x^3 + x + 1        (POLY = 16'h100B, the x^16 term implied)

Multiplying by alpha is a shift by one place. The bit that falls out of x^15
is XORed back in wherever p(x) has a term:

    gamma_0  = beta_15
    gamma_1  = beta_0  ^ beta_15
    gamma_3  = beta_2  ^ beta_15
    gamma_12 = beta_11 ^ beta_15
    gamma_k  = beta_(k-1) otherwise

That is three XOR gates, one for each term x^i of p(x) with 0 < i < M. This
`gf_alpha_mul` is the only arithmetic primitive. Every LFSR, the space
compressor and the decoder are built from it.

p(x) must be primitive. Then alpha^0 ... alpha^(N-1) are distinct for any
N <= 2^M - 1, and no two chips can be confused. The testbench of
`gf_alpha_mul` checks that alpha has order exactly 65535.

`M`, `N` and `POLY` are parameters everywhere. If you change `M`, give a
primitive polynomial of that degree in `POLY`.

## Parallel path: space compressor and time compressor

`space_compressor` computes (y, y*) from the N responses. It is built, as in
the 16-chip example board, from two cascaded `space_compressor_chip`
instances:

* Chip I takes z_16..z_9 and passes the partial sums A (for y) and B (for y*)
  on to chip II.
* Chip II takes z_8..z_1 and produces C = y and D = y*.

For other N, chip I takes the upper N - N/2 responses and chip II the lower
N/2.

The y* chain uses Horner's rule, so each chip needs only one
alpha-multiplier per response:

    b = b_in;  for k = K-1 downto 0:  b = alpha*b ^ z[k]

The y* path is therefore N stages deep, each stage an alpha-multiplier and
an XOR with the next response: up to two XOR levels per stage, so about 32 at
N = 16. If that is too slow for your clock, register between the two chips. This does not change the signature
relation, only the latency.

LFSR 1 and LFSR 2 (`pi_lfsr`) each do `s <- alpha*s ^ y` on every clock with
`capture` high. After T patterns they hold

    s = sum_{t=0}^{T-1} alpha^(T-1-t) y(t)

## Serial path: building the syndromes from the bus

`serial_space_compressor` expects the words of pattern t in the order
z_N(t), z_(N-1)(t), ..., z_1(t). Each word goes to two registers at once:

* The **T-FF register** (`tff_register`) toggles each bit where the word has a
  one, so it accumulates y(t) = XOR of all N words.
* **LFSR 3** (a `pi_lfsr`) does `r <- alpha*r ^ z`. Because z_N comes first,
  it ends holding y*(t) = alpha^(N-1) z_N ^ ... ^ alpha z_2 ^ z_1.

A word counter modulo N recognises the last word, z_1. On the next clock,
`y_valid` is high:

1. LFSR 1 and LFSR 2 take y(t) and y*(t). This replaces a divide-by-N clock
   for the time compressor with a clock enable.
2. On the same clock edge, the T-FF register and LFSR 3 are cleared.

Both registers apply their clear *before* the input. So if z_N(t+1) arrives
on the handoff clock, it is loaded directly, and the bus can deliver a word on
every clock with no gap between patterns. Idle clocks (`bus_valid` low) are
allowed anywhere.

`busy` is high while a pattern is partly received or not yet handed on.
`serial_diag` asserts that `diagnose` never comes while `busy` is high.

## Comparator and decoder

`comparator_decoder` has two parts.

**Comparator.** It forms ds = s ^ s_ref and ds* = s* ^ s*_ref.
`fault_detected` is the OR of all 2M bits and is combinational.

**Decoder.** A pulse on `diagnose` loads ds into an autonomous LFSR and
clears a counter modulo N. On each following clock:

* The LFSR content alpha^j ds is XORed with ds*. The NOR of the result is the
  "stop count" signal.
* If stop count is low, the LFSR shifts and the counter counts on the same
  clock edge.
* If it is high, the counter stops and holds j = i - 1, the faulty chip's
  number minus one.

Three results are possible. Counting `diagnose` as sampled at edge 0, `done`
rises at:

| Situation                          | done at edge | fault | located | chip_idx |
|------------------------------------|--------------|-------|---------|----------|
| ds = ds* = 0 (board good)          | 1            | 0     | 0       | -        |
| ds* = alpha^(i-1) ds, ds != 0      | i            | 1     | 1       | i - 1    |
| no match in alpha^0..alpha^(N-1)   | N            | 1     | 0       | N - 1    |

The last row covers a fault that is not a single-chip fault, and the case
where only one of the two signatures is distorted. The results are
registered and stay valid until the next `diagnose`. The signatures and
references must not change during a search. That holds when the search runs
after the last pattern and no reference is loaded meanwhile.

## Using it

**Parallel** (`parallel_diag`, or the `p_` ports of the top):

1. Pulse `ref_load` with the fault-free signatures on `ref_s`/`ref_ss`.
   `clear` may be high on the same clock.
2. Pulse `clear` to empty LFSR 1 and LFSR 2.
3. Present each pattern's N responses on `z` (`z[i-1]` is chip i) with
   `capture` high, one pattern per clock. Idle clocks are allowed.
4. One clock after the last capture, the signatures are on `sig_s`/`sig_ss`.
   Pulse `diagnose` and wait for `done`.

**Serial** (`serial_diag`, or the `s_` ports of the top): the same sequence,
except step 3. Send the words z_N(t) .. z_1(t) of every pattern on
`bus_word` with `bus_valid` high. The signatures are complete on the clock
edge after the one that takes the last word. `busy` is then low, and
`diagnose` may be raised.

Both paths use `rst_n`, an asynchronous active-low reset that clears every
register.

The reference signatures are the signatures of a good board under the same
patterns. Get them from a known-good board or from simulation. The
testbenches compute them with an independent model (see `tb/sa_ref_pkg.sv`).

For a board with fewer than N chips, feed zeros for the missing chips: zero
inputs in parallel, zero words in serial. For chips with fewer than M outputs,
tie the missing bits to zero.

## Limits of the method

* **Single faulty chip.** The location is only meaningful under the
  single-faulty-chip model. If two or more chips are faulty, the decoder
  usually reports "fault, not located". With a probability of about
  N / 2^M, the distortions happen to satisfy the single-chip relation and a
  wrong chip is named.
* **Error masking.** A single chip's error sequence can compress to ds = 0
  in LFSR 1. Then ds* is 0 as well, because the two error sequences are
  multiples of each other and the LFSRs are identical. The fault goes unseen,
  with probability about 2^-M for random errors. With faults in more than one
  chip, the masking probability is about 2^-2M.
* **Signature only.** The design tells you *which* chip, not *when* or
  *which bit*.

## Size

At the defaults (N = M = 16), coarse synthesis gives:

* `parallel_diag`: 90 flip-flops (LFSR 1, LFSR 2, two references, the
  autonomous LFSR, counter and control) plus the XOR network.
* `serial_diag`: 127 flip-flops. It adds the T-FF register, LFSR 3 and the
  word counter, and drops the combinational space compressor.

## What follows the published scheme and what is this design's own

These parts follow the published scheme:

* the code and the check matrix
* the space compressor split over two chips with Horner evaluation
* the Galois-form parallel-input LFSRs sharing the field polynomial
* the serial word order, the T-FF register and LFSR 3
* the comparator, the autonomous LFSR, the stop-count match and the counter
  modulo N sharing one clock

These are choices of this design:

* **Field polynomial.** x^16 + x^12 + x^3 + x + 1. It is primitive, and its
  three middle terms give the three-XOR multiplier the example is built on.
* **Time compression order.** Each clock does `s <- alpha*s ^ y(t)` for
  t = 0..T-1, so all T syndromes enter the signature.
* **Strobes.** `clear`, `capture`, `bus_valid`, `ref_load` and `diagnose`,
  the `busy` flag, and the `done`/`located` results with the "not located"
  outcome after N steps.
* **Serial handoff.** The divide-by-N clock of the serial time compressor
  is a clock enable from a word counter, and the clear on handoff doubles as
  a load, so no bus clock is lost.
* **Reference writes.** The references are written through a parallel load
  port.
* **Reset.** An asynchronous active-low reset.

Not built:

* The chips under test and the test pattern generator. The method only says
  the generator could be an LFSR of pseudorandom vectors.
* The system bus protocol.

All three meet the design at its ports.

## Files

| File | Contents |
|------|----------|
| `rtl/sa_pkg.sv` | default M, N, POLY; decoder state type |
| `rtl/gf_alpha_mul.sv` | multiply by alpha in GF(2^M) |
| `rtl/pi_lfsr.sv` | parallel-input LFSR (LFSR 1, 2, 3) |
| `rtl/tff_register.sv` | toggle-flip-flop register |
| `rtl/space_compressor_chip.sv` | one chip of the space compressor |
| `rtl/space_compressor.sv` | two-chip combinational space compressor |
| `rtl/reference_store.sv` | the two reference registers |
| `rtl/comparator_decoder.sv` | comparator and faulty-chip decoder |
| `rtl/parallel_diag.sv` | parallel diagnosis |
| `rtl/serial_space_compressor.sv` | serial syndrome builder |
| `rtl/serial_diag.sv` | serial diagnosis |
| `rtl/board_diag_top.sv` | both schemes side by side |
| `tb/sa_ref_pkg.sv` | reference model: GF arithmetic by long division, board responses |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_board_diag_top.sv` | end to end at the default size |
| `tb/tb_board_sizes.sv`, `tb/board_size_run.sv` | boards of 8, 24, 32 and 64 chips |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog. With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv --top-module tb_board_diag_top \
        rtl/sa_pkg.sv tb/sa_ref_pkg.sv tb/tb_board_diag_top.sv
    ./obj_dir/Vtb_board_diag_top

Replace the top module and file for any other testbench. Packages must be
listed before the files that import them.

`tb_board_diag_top` runs the design at its defaults. It uses 20 tests of
T = 64 patterns each:

* a good board
* each of the 16 chips faulty in turn
* two two-chip faults
* a test aborted by `clear` and rerun

Both schemes run on the same responses. They must give the model's
signatures and the same verdict. Each decoder's latency is checked against
the table above. The testbench also counts that every mechanism occurred:
idle capture clocks, back-to-back bus handoff, bus gaps, reference reloads,
the abort, "not located", and the location of every chip. Each block's own
testbench checks it against the model at random inputs.
