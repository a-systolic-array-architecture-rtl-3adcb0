# Linear systolic array for time-varying third-order cumulants

A non-stationary signal has statistics that change with time, so its
third-order cumulants have to be estimated again at every time instant n.
For a record of N samples x(0..N-1) and a time-varying window w_n(·), the
estimate can be written as a product of three N x N matrices:

    C_n = U_n^T · D_n · U_n        (scaling constant left out)

with the windowed samples v(I) = w_n(I)·x(I) and

    D_n = diag(v(0), v(1), ..., v(N-1))
    U_n(r,c) = v(N-1-(c-r))   for c >= r,   0 otherwise   (rows, columns from 0)

U_n is upper triangular and Toeplitz: v(N-1) on the diagonal, v(N-2) on the
first superdiagonal, and so on up to v(0) in the top right corner.

Written this way, the problem needs no special cumulant hardware. It becomes
one "trivial" product by a diagonal matrix and one ordinary matrix product,
and the ordinary product can use a known linear systolic array for matrix
multiplication. This RTL builds that system:

    x, w_n ──► tvc_feeder ──U^T, D──► smul (S-MUL) ──Y = U^T·D──► mmul_array (M-MUL) ──► C_n
                   │                                                  ▲
                   └─────────────── U (row major), control ───────────┘

- **S-MUL** is a single multiplier. Multiplying by a diagonal matrix scales
  each column, so if U^T arrives column by column and each diagonal element
  of D is repeated for the length of its column, one product per clock
  yields Y = U^T·D in column-major order.
- **M-MUL** is a linear array of N² processing elements (PEs), one
  multiply-accumulate each. It computes C = Y·U from two serial streams
  that both enter at its left end.
- **The feeder** forms v(I) and produces the streams and the array's
  control pulses. Then it unloads the result.

A full C_n takes 3N² − N − 1 clocks inside the array: O(N²) time on N² + 1
multipliers. The serial algorithm takes O(N³). The instants n = 0..N−1 are
computed one after another on the same hardware. For each one the host
supplies the same samples with the window w_n.

## The M-MUL array

This is the hard part. Start from the usual 4 x 4 two-dimensional array:
PE (i,j) accumulates C(i,j), A flows to the right and B flows down. Lay its
rows end to end into a single chain. PE number (i−1)·M + j then computes
C(i,j), the chain falls into M *blocks* of M PEs, and block i does the
work of row i. The vertical links are gone, so every operand has to enter
at PE 1:

    a:  a11 a21 a31 a41  a12 a22 ...      A in column-major order
    b:  b11 b12 b13 b14  b21 b22 ...      B in row-major order

one element per clock, with no gaps.

### Two speeds

Each PE (`mmul_pe`) has three data channels:

| channel | stages per PE | carries |
|---|---|---|
| AS (slow A) | 2: AS.LR, AS.RR | all of A |
| BF (fast B) | 1: BF.R | B inside the current block |
| BS (slow B) | 2: BS.LR, BS.RR | B on its way to later blocks |

A moves one PE every two clocks and B one PE per clock, so B overtakes A.
Take a(1,k), which enters at clock (k−1)M, and b(k,j), which enters at
(k−1)M + j − 1. Both are in PE j at clock (k−1)M + 2j − 1: b(k,j) started
j−1 clocks later but travels twice as fast. So row 1 of C is formed in
block 1 as the k-th column of A streams past the k-th row of B.

### Block ends

B also travels in the slow channel, in step with A. The last PE of each
block has its flag **psi** set, and its two multiplexers do two things:

- **M_B** feeds BS.RR, the slow copy of B, into the next block's fast
  channel. The fast-channel data of the finished block are dropped.
- **M_A** passes AS.LR on instead of AS.RR, so the whole A stream moves
  forward by one clock.

After i−1 block ends, a(i,k) sits exactly where a(1,k) sat in block 1,
relative to the restarted fast copy of row k of B. Checking the timing
gives clock (k−1)M + 2(i−1)M + 2j − 1 for both a(i,k) and b(k,j) in PE
(i−1)M + j.

### The activation token

A PE multiplies AS.LR by BF.R and adds the product to its accumulator C
only when its **ACT** flag is 1. ACT is the first of two CT stages, so the
token moves at A's speed. It enters with a(1,k), the first element of each
column. At a block end A jumps one clock ahead but the token does not.
The token therefore falls onto the next element, a(i+1,k), the row that
the next block has to use. Every PE fires exactly M times per product,
M³ steps in all.

### Setting psi: the I and J lines

psi is not hard-wired. The I line has one stage per PE and the J line two,
and psi is set (and stays set) in the PE where a pulse on I and a pulse on
J arrive in the same clock. One J pulse goes in one clock before a(1,1).
An I pulse goes in one clock before the first element of each later column
(the last one with a(M,M)), that is, at clocks iM − 1 relative to a(1,1).
I gains one PE per clock on J, so the i-th I pulse catches J in PE i·M.
The flags are set while the first matrix streams in, each just before data
first need it at that block end.

### Timing

The last product, a(M,M)·b(M,M) in PE M², is added 3M² − M − 1 clocks after
the clock edge that takes in a(1,1). After that, `cap` copies every
accumulator into an unload register and clears it. Each `shift` moves the
unload chain one PE to the left, so C leaves through PE 1 in row-major
order: C(1,1), C(1,2), ...

## The feeder and one operation

`tvc_feeder` runs three phases per time instant n:

1. **LOAD**: N handshakes (`in_valid` && `in_ready`) deliver
   (x(I), w_n(I)) for I = 0..N−1. One multiplier stores v(I).
2. **RUN**: one element per clock. S-MUL receives U^T in column-major order
   (the same sequence as U in row-major order) together with v(k), repeated
   N times for column k. M-MUL receives U in row-major order one clock
   later, in step with S-MUL's output. The feeder also drives `ct` with the
   first element of every column, `j` one clock ahead of the data, and `i`
   with the last element of every column. When the last product is in, it
   pulses `cap`.
3. **UNLOAD**: N² clocks of `shift`. The array's unload chain drives
   `c_o` directly. The feeder frames each result with `c_valid`, and
   `c_last` marks the final one.

Clocks per operation: N (load) + 3N² − N + 4 (from the last sample taken to
the first result) + N² (unload). At N = 4 that is 4 + 48 + 16 = 68 clocks.
Samples offered while `busy` is high are held off by `in_ready` = 0.

## Number formats

All arithmetic is exact two's-complement integer arithmetic. Nothing is
rounded or truncated (see `tvc_pkg`):

| quantity | width |
|---|---|
| x(I), w_n(I) | 8 bits each (`X_W`, `W_W`) |
| v(I), entries of U_n and D_n | 16 bits |
| Y = U^T·D | 32 bits |
| C_n | 32 + 16 + ⌈log2 N⌉ bits, 50 at N = 4 |

To change the input precision, edit `X_W` and `W_W`; everything else
follows.

## Parameters

`tvc_top #(.N(...))` sets the record length and matrix size. It defaults to
4, the size of the worked example the architecture was presented with
(16 PEs in 4 blocks). The array grows as N² PEs and the run time as about
3N². The testbenches also run N = 2, 3, 6 and 8.

## Where this RTL departs from, or adds to, the original description

- **Mux polarity.** The description of M_A and M_B is ambiguous. The
  reading used here is the only one that makes the operands meet: with
  psi = 1, M_A takes AS.LR and M_B takes BS.RR; otherwise M_A takes AS.RR
  and M_B takes BF.R.
- **ACT input.** ACT goes in once per column of A, with its first element.
  The token itself then moves down one row at each block end.
- **I/J logic.** psi is set by the coincidence of I and J and stays set
  until reset. The exact gate and the pulse schedule are this design's own.
- **Latency.** The source quotes 3M² − M − 1 clocks for the array in one
  place. In another it gives a formula that works out to 3M² − M + 1
  (with the extra S-MUL clock, 3N² − N + 2 for the system). The array here
  meets the first figure exactly. The feeder adds pipeline and capture
  clocks around it.
- **Local storage.** S = 1, one result per PE, is the case that is
  described in detail. PEs with larger local storage (N²/S PEs for S > 1)
  are not built.
- **Replicated systems.** Running N copies of the system, one per instant
  n, is an alternative that trades N times the hardware for N times the
  throughput. Only the single sequential system is built. N instances of
  `tvc_top` give the other option.
- **Own additions.** The unload chain with `cap`/`shift`, the load/run/
  unload sequencing with its handshake, the window multiplier in the
  feeder, synchronous active-low reset of every register, and all word
  widths. The source gives no word lengths, reset scheme or result path.
- The scale factor (N/M)² of the estimator is not applied. Multiply
  outside the array if it is needed.

## Files

| file | content |
|---|---|
| `rtl/tvc_pkg.sv` | widths shared by all modules |
| `rtl/mmul_pe.sv` | one M-MUL processing element |
| `rtl/mmul_array.sv` | M-MUL: the linear array of M² PEs |
| `rtl/smul.sv` | S-MUL: the single multiplier |
| `rtl/tvc_feeder.sv` | window multiplier, stream and control generator, unload |
| `rtl/tvc_top.sv` | the complete system |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_tvc_top_sizes` |
| `tb/feeder_check.sv`, `tb/top_check.sv` | size-parameterised checkers used by those |

## Verification

Every testbench computes its expected values independently (plain integer
matrix arithmetic from the definitions above). Each one ends by printing
`TB_RESULT checks=<n> failures=<n>`.

- `tb_mmul_pe`: a clock-by-clock reference model of the PE under random
  inputs, including psi being set and the channel switch.
- `tb_mmul_array`: identity, extreme-value and random 4 x 4 products.
  It also checks that the last MAC falls exactly 3M² − M − 1 clocks after
  a(1,1), that there are exactly M³ MAC steps, and that psi is set in
  exactly PEs M, 2M, ..., M².
- `tb_smul`: products with one clock of latency, including the most
  negative operands.
- `tb_tvc_feeder`: every output, every clock, for N = 4 and N = 3.
- `tb_tvc_top`: the full system at the default N = 4. It computes all C_n
  for n = 0..3 with a sliding triangular window, then extreme-value and
  random records. It checks every matrix element, the run-clock count,
  N³ MAC steps per operation, the psi pattern, and that host hold-off and
  block-end channel switching both occurred.
- `tb_tvc_top_sizes`: the same checks at N = 2, 3, 6 and 8.

`mmul_array` also carries two assertions on the unload protocol:
`cap` only while no PE is about to accumulate, and never together with
`shift`. Build with `--assert` to enable them.

Running one with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/tvc_pkg.sv tb/tb_tvc_top.sv --top-module tb_tvc_top -o sim
    ./obj_dir/sim

All of these run in well under a second.
