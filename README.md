# Matrix multiplication on a linear array with two-dimensional time

This RTL multiplies an M x N matrix `a` by an N x P matrix `b`. It uses a
one-dimensional row of P processors, where the classic systolic solution uses
a two-dimensional M x P grid. The trick is the schedule. In a systolic array
every operation `(i, j, k)` runs at one scalar time step, such as `i+j+k`.
Here each operation gets a *two-dimensional* time stamp instead:

    T(i, j, k) = (t1, t2) = (i + j, k)        processor = j

Times are ordered lexicographically: all of row `t1` comes before row `t1+1`.
Processor `j` owns column `j` of the result. In row `t1` it steps through
`k = t2` one clock at a time and builds the inner product for row
`i = t1 - j` of `c`. There is no grid to carry operands from one row to the
next, so each processor keeps them in two small local memories:

* **B memory.** It holds column `j` of `b`. The column arrives once, in the
  processor's first row, and is read again in every later row.
* **A memory.** It holds the row of `a` the processor used in the current row
  of time. One row later the processor reads that row back and passes it to
  processor `j+1`. This is the *Acom* value, because the row is communicated
  to the neighbour.
* **C.** The inner product lives in a single accumulator register.

The cost is control. A single counter no longer says what to do. Each
processor runs a small automaton that scans its own part of the 2-D time space
and gives every variable its own clock enable.

## Index ranges: the inner product runs over k = 2..N

This design implements the recurrence equations exactly as they are given:

    A[i,j,k] = a[i,k]   (j = 1),   A[i,j-1,k]  (j > 1)         2 <= k <= N
    B[i,j,k] = b[k,j]   (i = 1),   B[i-1,j,k]  (i > 1)         2 <= k <= N
    C[i,j,1] = 0,   C[i,j,k] = A[i,j,k]*B[i,j,k] + C[i,j,k-1]
    c[i,j]   = C[i,j,N]

So `c[i][j] = sum_{k=2..N} a[i][k] * b[k][j]`, which has **N-1 terms**. Column
1 of `a` and row 1 of `b` are never read. That is why each local memory holds
N-1 words. To multiply matrices with an inner dimension of K, set `N = K+1` and
present the data at k = 2..K+1. The test benches use this same k = 2..N
reference.

## Logical time, virtual clock and physical clock

The design runs one scanned point `(t1, t2)` per clock edge with `ce = 1`.
Input `ce` is the *virtual clock*. When it is 0, every counter, memory port and
register in the array holds its value. A host can therefore stall the whole
computation at any clock, for example while its data is not ready, and the
result does not change.

Every processor scans `t2 = 2 .. N`, which is N-1 points per row. Processor
`p` is active for rows `t1 = p+1 .. p+M+1`:

| row `t1` of processor p | automaton state | A write | B source, B write | C (MAC) | Acom to p+1 |
|---|---|---|---|---|---|
| `p+1`           | `S_FIRST` | yes | `b` bus, yes       | yes | no  |
| `p+2 .. p+M`    | `S_MID`   | yes | B memory, yes      | yes | yes |
| `p+M+1`         | `S_LAST`  | no  | -                  | no  | yes |

In its middle rows the processor writes back the B word it has just read. That
rewrite is harmless, and it keeps the B enable equal to the time domain of B.

Processors start one row apart. Processor 1 starts on `start`. Processor p
sends a start token (`go_next`) in the last clock of its first row, and the
next processor starts with it. Processor p+1 therefore begins its row
`t1 = p+2` in the same clock as processor p. In that row, processor p reads
`A[t1-1, t2]` from its A memory, and processor p+1 consumes it in the same
clock as `A[t1, t2]`.

Example with P = 3, N = 4 (three points per row) and M = 2 (rows of 3 clocks):

    clock      0-2   3-5   6-8   9-11  12-14
    t1          2     3     4     5     6
    proc 1    FIRST  MID  LAST   -     -      uses a rows 1,2; c[1][1], c[2][1]
    proc 2      -   FIRST  MID  LAST   -      c[1][2], c[2][2]
    proc 3      -     -   FIRST  MID  LAST    c[1][3], c[2][3]

A product scans `(P+M)*(N-1)` points. `done` goes high `(P+M)*(N-1)+1`
enabled clocks after the clock that samples `start`. In the default
configuration (P = 6, M = 10, N = 8) that is 112 points, or 113 clocks.

## The control automaton (`mdt_ctrl`)

Each processor has one controller instance. The controller is a
multi-dimensional counter, like a clock face where each hour could have its own
number of minutes. It counts `t2` from 2 to N, and at the end of each row it
resets `t2` and increments `t1`. The states `S_FIRST`, `S_MID` and `S_LAST`
record which kind of row the counter is in. `S_IDLE` and `S_DONE` are the
states before and after the scan. A new `go` in `S_DONE` starts another
product. The controller's outputs are Moore outputs:

* `en.a`, `en.b`, `en.c`, `en.acom`: one enable per variable, for the current
  point. They are true when the point is inside the variable's time domain.
* `en.b_load`: take B from the bus (first row).
* `en.first_k` (`t2 = 2`) restarts the accumulator. `en.last_k` (`t2 = N`)
  delivers the result.
* `wr_addr = t2-2`: the local memory word of the current point. The logical
  address `t2-1` is moved to start at 0.
* `rd_addr`, `rd_ce_a`, `rd_ce_b`: the address and read enables of the *next*
  point. See below.

The `mdt_pkg` package defines the `var_en_t` struct that carries these enables.

### Read-ahead memory addressing

The memories read synchronously, like FPGA block RAM. A word requested at one
edge is therefore available only after that edge. The controller computes the
next point `(t1', t2')` anyway, for its own state update. It drives the read
port with `t2'-2` and a read enable for that next point, and it does so at the
same edge that advances the counter. The word then sits in the read register
for the whole of its point, and a stall cannot disturb it: the read enable is
gated by `ce`. In the same clock the write port writes the current point's
address `t2-2`. With N >= 3 this address always differs from the read address.
An assertion in `mdt_mem` checks that the two never collide.

## Processor (`mdt_cell`) and datapath (`mdt_datapath`)

    a_in ──► A operand ─┬──► A memory (N-1 words) ──► a_out (Acom, to p+1)
                        │
    b bus ─┐            ▼
           ├─mux─► B operand ─► x ─► + ─► acc ─► c_out (at t2 = N)
    B mem ─┘        │                ▲      │
                    ▼                └──────┘ (0 when t2 = 2)
              B memory (N-1 words)

Operands are signed 8-bit two's-complement numbers. The accumulator has
`CW = 2W + clog2(N)` bits, which is 19 for the defaults, so N-1 full-scale
products cannot overflow. At the `t2 = N` point the finished sum goes into
`c_out`, the row index `i = t1 - p` goes into `c_row`, and `c_valid` pulses for
one clock. In the next clock the accumulator starts the next row.

The last processor's Acom output and start token have no consumer. Synthesis
may therefore remove that processor's A memory.

## Top level (`mdt_matmul`) and host interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of the control and result registers (memory contents are not reset) |
| `ce` | in | virtual clock enable; 0 freezes the array |
| `start` | in | begins a product (sampled when `ce = 1`) |
| `a_req`, `a_req_i`, `a_req_k` | out | in this clock processor 1 consumes `a[a_req_i][a_req_k]` |
| `a_in`, `a_valid` | in | that element, and its valid flag (an assertion checks that it is valid when consumed) |
| `b_req`, `b_req_k`, `b_req_j` | out | in this clock processor `b_req_j` loads `b[b_req_k][b_req_j]` from the shared b bus |
| `b_in`, `b_valid` | in | that element and its valid flag |
| `c_out[j]`, `c_valid[j]`, `c_row[j]` | out | result `c[c_row[j]][j+1]` of processor j (0-based array index), a one-clock pulse |
| `busy`, `done` | out | some processor is scanning; the product is finished (stays high until the next start) |

The requests are combinational outputs of the current point. The host answers
in the same clock, for example from a memory read asynchronously or from
registers. Only one processor can be in its first row at a time, so a single
b bus is enough. Each element of `a` is requested once. Each element of `b`
(k = 2..N) is requested once. Results leave each processor in row order:
processor j delivers row i at the end of global row `t1 = i + j`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `P` | 6 | processors, equal to the columns of `b` and `c` |
| `M` | 10 | rows of `a` and `c` |
| `N` | 8 | k runs over 2..N; memories hold N-1 words |
| `W` | 8 | operand width (signed) |
| `CW`, `T1W`, `T2W`, `IW`, `JW` | derived | accumulator width and index widths |

The defaults are the configuration evaluated for this architecture: a 10 x 8
by 8 x 6 product with 8-bit coefficients. Elaboration parameters fix the
problem size. The controller is written for any `p`, `M` and `N`, with
`M >= 2` and `N >= 3`. To run a product with fewer columns, pad `b` with zero
columns. At the defaults, synthesis gives about 580 word-level cells, 372
flip-flop bits and 616 memory bits: 11 memories of 7 x 8 bits, because the
last processor's unused A memory is removed.

## Choices made in this implementation

The architecture, the schedule, the memory mapping (A and B of processor p at
word `t2-1`, C in a register) and the row-by-row control states come from the
method. The following are choices made in this implementation:

* The design runs one point per enabled clock and N-1 points per row, with no
  idle slot between rows.
* Memory reads go through a read register, with the read-ahead addressing
  described above.
* Processors start through a chain of start tokens. A broadcast start with a
  per-processor delay would also work.
* The host gets request/index outputs and one shared b bus. Each processor has
  its own result output.
* Arithmetic is signed, and the accumulator is sized so that it cannot
  overflow.
* The reset style is an asynchronous active-low reset. The memories are not
  reset.

## Verification

Each module has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| test bench | what it checks |
|---|---|
| `tb_mdt_mem` | random reads and writes against a reference array; read-enable hold, write-enable respected |
| `tb_mdt_ctrl` | the full scan of processor 3 (M = 4, N = 5) against a generated list of points: counter, every enable, write and read-ahead addresses, start token, busy/done, random stalls, restart |
| `tb_mdt_datapath` | 40 random inner products with random stalls, operand selection, one result pulse each |
| `tb_mdt_cell` | processor 2 with the bench as host and left neighbour: all results, Acom equals the previous row, start-token timing, point count |
| `tb_mdt_matmul` | the whole array at default parameters: four products (no stalls, random stalls, extreme values, zero-padded 4-column b), every `c[i][j]` exactly once and exact, 112 points per product; counts stalls, b loads, hand-overs, B-memory reuse and restart, and fails if any never happened |
| `tb_mdt_matmul_sizes` | four other sizes side by side: (P, M, N) = (3, 3, 3), (4, 10, 8), (8, 5, 12) and (2, 12, 4). Each runs two random products, one of them with stalls. The checking and driving live in `tb/mdt_matmul_check.sv` |

To simulate with Verilator:

    verilator --binary --timing --assert -Irtl rtl/mdt_pkg.sv rtl/mdt_mem.sv \
        rtl/mdt_ctrl.sv rtl/mdt_datapath.sv rtl/mdt_cell.sv rtl/mdt_matmul.sv \
        tb/tb_mdt_matmul.sv --top-module tb_mdt_matmul -o sim
    ./obj_dir/sim

For the other benches, use the same command with fewer files and another
`--top-module`. Always list the package first. Verilator lint (`-Wall`) warns
about `rst_n`, which the flip-flops use asynchronously and the assertions'
`disable iff` uses synchronously. That is expected.

## Limits

* The memories and the request interface assume that the host can supply an
  element in the same clock that it is requested. The design has no prefetch
  for a slower external memory.
* Only the matrix product is mapped. The control scheme is general, but the
  automaton here is written for this one program and its time domains.
* The timing and area of an FPGA implementation have not been measured for
  this RTL.
