# Gauss-Jordan accelerator for fuzzy-vault key recovery

A fuzzy vault hides a secret key as the coefficients of a polynomial P(x).
The polynomial is stored only as a cloud of points. A few genuine points come
from the user's biometric features, here finger-vein minutiae, and lie on P.
Many chaff points do not. To unlock the vault, the system matches a fresh
biometric sample against the vault and picks N points that should be genuine.
It then has to recover the N coefficients of P from those N points:

    [ 1  x_1  x_1^2 ... x_1^(N-1) ] [c_0    ]   [ y_1 ]
    [ 1  x_2  x_2^2 ... x_2^(N-1) ] [c_1    ] = [ y_2 ]
    [ ...                         ] [...    ]   [ ... ]
    [ 1  x_N  x_N^2 ... x_N^(N-1) ] [c_(N-1)]   [ y_N ]

This step is called polynomial reconstruction. It is a dense linear solve.
It runs for every unlock attempt, often many times per attempt, and it is the
heaviest arithmetic in the flow. This RTL is a co-processor for it. A host
processor writes the augmented matrix `[A | y]` over a memory-mapped bus. The
core reduces it in place to `[I | c]` by Gauss-Jordan elimination, and the
host reads the coefficients back from the last column.

The accelerator is meant to be one core among several on the system bus of an
FPGA system-on-chip. The other cores are:

- a soft processor running Linux and the fuzzy-vault software;
- memory;
- an AES engine that uses the released key;
- finger-vein image preprocessing hardware;
- USB and general I/O.

Only the accelerator is provided here. Its bus-slave port is the place where it
connects to the rest of the system.

## Arithmetic: why a finite field

All arithmetic is in GF(2^M). The default is GF(2^16) with reduction polynomial
x^16 + x^12 + x^3 + x + 1, which is common in fuzzy-vault implementations. A
matrix element is one 16-bit field element. In this field:

- addition and subtraction are both bitwise XOR, so eliminating a row costs one
  multiply and one XOR per element;
- every non-zero element has an exact inverse, so there is no rounding, no
  overflow and no need for magnitude-based pivoting. Any non-zero pivot gives
  the exact answer.

Because of this, the result is bit-exact. Matching accuracy is decided entirely
by which points the software chooses, not by the hardware.

`gf_mul` multiplies by shift-and-add: for each set bit of `b`, the running
multiple of `a` is XORed into the product, and the multiple is doubled and
reduced between bits. It is purely combinational.

`gf_inv` uses Fermat's little theorem: a^-1 = a^(2^M-2) = a^2 · a^4 ··· a^(2^(M-1)).
One register holds the successive squares and another the running product.
The unit therefore needs two multipliers and M-1 cycles. The inverse of 0 comes
out as 0, but the sequencer never asks for it.

## The elimination engine (`gja_core`)

The matrix sits in registers as `mat[N][N+1]`, so a whole row can be read and
written in one cycle. There is one bank of N+1 multipliers. Each multiplier
takes one element of the pivot row `k` and a common factor. The sequencer
processes one column `k` at a time:

| state    | cycles            | action |
|----------|-------------------|--------|
| `SEARCH` | 1 per row scanned | find the first row `i >= k` with `mat[i][k] != 0`; if none is found, set `singular` and stop |
| `SWAP`   | 1                 | exchange rows `i` and `k` (a no-op when `i == k`); start `gf_inv` on the pivot |
| `INV`    | M                 | wait for the pivot inverse |
| `NORM`   | 1                 | row k ← row k × pivot⁻¹ (the multiplier factor is the inverse) |
| `ELIM`   | N                 | for each row i ≠ k: row i ← row i ⊕ mat[i][k] × row k (the factor is `mat[i][k]`); row k is skipped but still takes a cycle |

After the last column, `DONE` raises `done` for one cycle and the core goes
back to `IDLE`.

When every pivot is found on the diagonal, a run takes **N·(N+M+3) cycles**.
This count runs from the clock edge that samples `start` to the first cycle in
which `done` is high. For N = 9 and M = 16 that is 252 cycles, or 2.52 µs at
100 MHz. Each extra row scanned in `SEARCH` adds one cycle. For a plain
Vandermonde system with distinct points, every pivot lies on the diagonal. The
reason is that the leading minors are themselves Vandermonde determinants and
cannot be zero. Swaps happen when the host orders the unknowns differently,
for example highest power first with a point at x = 0.

If two of the chosen points share an abscissa, the system has no unique
solution. The search then fails on some column and the core reports
`singular`. At that point the matrix holds a partial reduction, and the
software should treat the attempt as a failed unlock.

Datapath cost at the default size:
- 1440 bits of matrix registers;
- ten 16×16 field multipliers in the bank;
- two more multipliers in the inverter.

The core has a host port for reading and writing single elements. Reads are
combinational. Writes take effect only while the core is idle.

## Register map and driver sequence (`gja_bus_if`)

The bus slave has 32-bit data and word addresses. There are no wait states.
Read data is registered, so it appears one cycle after `avs_read` (fixed read
latency 1). This is the shape of an Avalon-MM slave in a Nios II system. The
address is `1 + clog2(N) + clog2(N+1)` bits wide, which is 9 bits by default.

| address                 | access | meaning |
|-------------------------|--------|---------|
| `0x000`                 | W      | bit 0 = 1: start a run (ignored while busy) |
| `0x000`                 | R      | `{29'b0, singular, done, busy}`; `done` is set when a run ends and cleared by the next start |
| `0x001`                 | R      | `{M[15:0], N[15:0]}` |
| `{1, row[3:0], col[3:0]}` | R/W  | matrix element, low M bits. Column N holds the right-hand side before a run and the solution after it. Writes while busy, and writes outside the N×(N+1) matrix, are dropped. Reads outside it return 0. |

A driver unlocks a vault attempt as follows:

1. Write the N×(N+1) elements.
2. Write 1 to `0x000`.
3. Read `0x000` until `busy` is 0.
4. If `singular` is set, reject the attempt.
5. Otherwise read column N, rows 0 to N-1, to get the coefficients. Checking
   them, for example against a CRC embedded in the secret, is the software's
   job.

## Files

| file | contents |
|------|----------|
| `rtl/gja_pkg.sv` | default sizes, field polynomial, register addresses, sequencer state enum, status struct |
| `rtl/gf_mul.sv` | combinational GF(2^M) multiplier |
| `rtl/gf_inv.sv` | square-and-multiply GF(2^M) inverter, M-1 cycles |
| `rtl/gja_core.sv` | Gauss-Jordan elimination engine with the matrix registers |
| `rtl/gja_bus_if.sv` | bus slave: register map, start strobe, sticky done flag |
| `rtl/gja_accelerator.sv` | top: bus slave plus core |
| `tb/tb_gf_pkg.sv` | independent reference field arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters (all have defaults):
- `N` is the number of unknowns, which is the secret polynomial's degree + 1. It must be at least 2.
- `M` is the field width, at most 16 for the `{M, N}` information register.
- `POLY` is the M+1-bit field polynomial. It must be irreducible; a primitive polynomial is not required.

When changing `M`, give a matching `POLY`, for example `9'h11B` for GF(2^8).

## Simulation

Every testbench checks itself. Each one prints a single line,
`TB_RESULT checks=<n> failures=<n>`, and then calls `$finish`. Each one also has
a watchdog that counts a failure if the run hangs. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/gja_pkg.sv tb/tb_gf_pkg.sv rtl/gf_mul.sv rtl/gf_inv.sv \
        rtl/gja_core.sv rtl/gja_bus_if.sv rtl/gja_accelerator.sv \
        tb/tb_gja_accelerator.sv --top-module tb_gja_accelerator
    ./obj_dir/Vtb_gja_accelerator

For the other testbenches, change the top module. `tb_gf_mul` and `tb_gf_inv`
need only the package files and the field modules.

What the testbenches cover:

- `tb_gf_mul` checks random products against a reference model. That model
  forms the full carry-less product first and then reduces it. The testbench
  also checks identities, the x^15·x reduction, and a GF(2^8) instance against
  the published AES product {57}·{83} = {c1}.
- `tb_gf_inv` checks a·a⁻¹ = 1 for random elements, checks inv(0) = 0, and
  checks the M-1 cycle latency.
- `tb_gja_core` solves random degree-8 reconstruction systems. It checks the
  identity block, the coefficients and the exact run length. Further cases
  need row swaps: Vandermonde systems ordered highest power first with x = 0
  moved through the rows, and a permuted identity. There is also a singular
  system and a write attempted during a run.
- `tb_gja_bus_if` puts a behavioural array in place of the core and checks the
  address map, the read latency, the dropped writes and starts, and the status
  flags.
- `tb_gja_accelerator` runs the full design at its default size, driving it
  only through the bus, as the unlocking software would. It runs twelve
  unlock attempts. It counts each mechanism and fails if one never occurs.
  The mechanisms are:
  - a plain solve;
  - a pivot swap;
  - singular detection;
  - a write dropped while busy;
  - a start dropped while busy.

- `tb_gja_accelerator_sizes` runs three other configurations side by side
  through the bus: N = 2 over GF(2^8), N = 5 over GF(2^8), and N = 16 over
  GF(2^12). It checks coefficients and run length, to show that the address
  split and the counters follow the parameters.

Several testbenches read internal signals of the design hierarchically, such
as the sequencer state, to count pivot swaps and measure run length.

## What is specified and what is chosen here

The system this core belongs to is an FPGA SoC with a 100 MHz clock and a
Nios II processor running Linux. In that system, the fuzzy-vault software hands
the Gauss-Jordan step of polynomial reconstruction to a bus-attached hardware
core.

Everything inside the core is a design choice of this implementation:
- the finite field and its polynomial;
- the default size of 9 unknowns (a degree-8 polynomial);
- the row-parallel datapath and the state sequence;
- the Fermat inverter;
- the pivot rule;
- the register map and bus timing;
- polling instead of an interrupt;
- the asynchronous active-low reset.

The internals here are an independent design. They are not claimed to match
the state machine or datapath of the original accelerator. The cycle count
above is this implementation's, not a published figure.
Only the system-level result of a roughly tenfold speed-up over the software
prototype is known, and it cannot be compared directly with the cycle count.

Not included:
- the processor;
- the bus fabric;
- memory, USB and I/O;
- the AES engine;
- the finger-vein image preprocessing hardware.

These blocks either come from vendors or were reused from other designs, and
their internals are not described. Building the Vandermonde system from vault
points, choosing candidate points, and verifying the recovered key are also
left out. In the intended system they run as software on the processor.

Known limits:
- The matrix is held in flip-flops rather than block RAM. That suits small N,
  but for much larger systems a RAM-based, column-serial organisation would be
  cheaper.
- `avs_writedata[31:16]` is unused, because elements are at most 16 bits.
- The `{M, N}` register truncates values above 65535.
