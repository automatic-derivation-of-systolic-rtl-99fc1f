# Systolic arrays for LU decomposition

This RTL factors a square matrix A into A = L·U. L is unit lower triangular and U is upper
triangular. It does this on two systolic arrays: grids of small identical processors that talk
only to their neighbours. Both arrays evaluate the same recurrence. They differ in which
processor performs which step. The recurrence and both arrays come from the paper *Automatic
Derivation of Systolic Arrays for LU Decomposition*, which derives systolic arrays formally
from affine recurrence equations. That paper gives the recurrence, the two mappings (called
*allocation functions*), the array drawings and the program each kind of processor runs. The
paper leaves several things open: the clock-level schedule of the hexagonal array, how that
array is loaded and unloaded, the number format and the initialisation. This design makes its
own choices for those, and each choice is stated below.

## The recurrence

Index the work by (i, j, k), with 1 ≤ i, j ≤ n and 1 ≤ k ≤ min(i, j). The points form a
pyramid. Let f(i,j,0) = a_ij. Then

    f(i,j,k) = f(i,j,k-1)                          if i = k
             = f(i,j,k-1) / f(k,j,k-1)             if j = k      (a division)
             = f(i,j,k-1) - f(i,k,k) * f(k,j,k-1)  otherwise     (a multiply-subtract)

The results are l_ij = f(i,j,j) for i > j and u_ij = f(i,j,i-1) for i ≤ j. Only the
points with j = k divide, and everything else is a multiply-subtract. The operand f(i,k,k) is
l_ik and f(k,j,k-1) is u_kj. A systolic array has to bring these two values to every point
that needs them, and it does so through neighbour-to-neighbour pipelines.

There is no pivoting. A zero pivot u_kk gives a wrong result. Assertions in the dividing
processors report it during simulation.

### Number format

All values are 32-bit two's-complement fixed point with 16 fraction bits (`lu_pkg`: `WIDTH`,
`FRAC`, `data_t`). The package also holds the arithmetic:

* `fx_mul` forms the full 64-bit product and shifts it right arithmetically by 16.
* `fx_div` shifts the dividend left by 16 and divides, rounding toward zero. x / 0 returns 0.

1.0 is `lu_pkg::ONE` = 0x0001_0000. The paper does not fix a format. Change `WIDTH` and
`FRAC` in the package to use another one.

## Triangular array (allocation [i,k]): `arch3_array`

Processor (i,k) performs step k for every element of matrix row i. The array therefore has N
columns, one per matrix row. Column i is i processors high, which makes N(N+1)/2 processors in
all. The default N = 4 gives 10 processors.

```
 level 4                         [D44]
 level 3                 [D33]-->[I43]
 level 2         [D22]-->[I32]-->[I42]
 level 1 [D11]-->[I21]-->[I31]-->[I41]
           ^       ^       ^       ^
         row 1   row 2   row 3   row 4 of A   (column i starts i-1 clocks late)
```

* **Vertical.** Row i of A flows up column i, one element per clock: a_i1 first, then a_i2,
  and so on. At level k the element is f(i,j,k-1).
* **Horizontal.** The diagonal processor `arch3_diag_pe` (i,i) sits at the top of column i.
  It copies what arrives from below both upward and to the right. For j ≥ i that value is
  u_ij. Row i of the array is therefore a pipeline that carries u_ij into columns i+1..N.
* **Interior processor** `arch3_int_pe` (i,k), k < i. A control bit c travels with the data
  and marks the slot j = k. In that slot the processor computes l_ik = f(i,k,k-1) / u_kk,
  keeps it in `acc` and sends it up. In each later slot j > k it sends up
  f(i,j,k-1) − u_kj · l_ik.
* **Output.** The top of column i delivers row i of L and U combined: l_i1 … l_i,i-1, then
  u_ii … u_iN.

**Why the finished l values survive.** At level k, slots j < k already hold finished values
l_ij. The processor still runs its multiply-subtract on them. Those slots arrive before the
c = 1 slot, so `acc` is still 0 and the value passes unchanged. This works only if `acc` is
0 at the start of every matrix. This design clears `acc` on reset and on every empty slot
(`col_in_valid` = 0). As a result, consecutive matrices need one empty slot between them in
every column. This clearing rule is this design's own.

**Timing.** Every link has one register: the processor's output register. Element a_ij
enters column i at clock s_i + j − 1, where column i starts s_i = i − 1 clocks after column 1.
Its result leaves the top of column i exactly i clocks later.

At level k, the u_kj stream and row i's data stream meet at the same clock. The control bit
has one extra register per level (the delay drawn on the control line). So it climbs two clocks
per level and reaches level k together with slot j = k.

A new matrix can start every N + 1 clocks. The last result of a 4 × 4 matrix leaves 10 clocks
after its first element enters.

Ports: `col_in[N]`, `col_in_valid[N]` and `c_in[N]` go in at the bottom. `c_in` is 1 with
a_i1 and 0 otherwise. `c_in[0]` is unused because column 1 has no interior processor.
`col_out[N]` and `col_out_valid[N]` come out at the tops.

## Hexagonal array (allocation [i,j]): `arch2_array`

Processor (i,j) owns element a_ij. It computes every step k for that element in its
accumulator `acc`, so the array is N × N with 16 processors at N = 4. Drawn as in the paper,
it is a diamond: (1,1) at the top, (N,1) at the left, (1,N) at the right and (N,N) at the
bottom. The processors come in three kinds:

| kind | where | program, every clock |
|---|---|---|
| `arch2_left_pe` | i > j (builds L) | C2: acc := acc / D3, D2 ← acc. Otherwise: acc := acc − D2·D3, D2 ← D2. Always: D3 ← D3, C2 ← C2 |
| `arch2_central_pe` | i = j | C2: D3 ← acc, D2 ← 1.0. Otherwise: acc := acc − D2·D3, D3 ← D3, D2 ← D2 |
| `arch2_right_pe` | i < j (builds U) | C3: D3 ← acc. Otherwise: acc := acc − D2·D3, D3 ← D3. Always: D2 ← D2, C3 ← C3 |

The signals:

* **D2** runs along matrix row i from left to right and carries l_ik. The central processor
  inserts the unit diagonal 1.0 into it.
* **D3** runs down matrix column j and carries u_kj. The central and right-half processors
  insert their finished u values into it.
* **C2** marks the step j = k. It enters row i at (i,1) and ends at the central processor
  (i,i).
* **C3** marks the step i = k. It enters column j at (1,j) and ends at (j−1,j).

Every processor runs its program on every clock. Most clocks belong to none of its steps. The
array stays correct because D2 and D3 enter at the edges as 0. A slot therefore carries a
non-zero l or u value only where that value was produced. For every clock that is not one of
its steps, a processor sees D2 = 0 or D3 = 0, and `acc − D2·D3` leaves `acc` unchanged.
`tb_arch2_array` checks this end to end.

### Schedule (this design's timing function)

The clock-level schedule is this design's own: step k of processor (i,j) happens at clock
T + i + j + k (1-based indices). Each dependency then spans
one hop per clock:

* l_ik moves one processor right per clock.
* u_kj moves one processor down per clock.
* `acc` advances one step per clock.

C2 and C3 have to move one processor per two clocks. So their links have a second register,
and the processor's own output register is the first. Each row and each column is skewed by
one clock: C2 goes on `c2_in[i]` at clock T + i + 2, and C3 goes on `c3_in[j]` at
clock T + j + 2. `c3_in[0]` is unused.

The last step of processor (N,N) happens at clock T + 3N.

### Loading and unloading

The array's vertical columns are the diagonals d = j − i. There are 2N − 1 of them, and ports
indexed by column use d + N − 1. Each column has three pipelines, implemented in
`arch2_col_cell`:

* **D1** moves up.
* **C1** (initialise) and **O** (output) move down.

**Loading.** A column has m processors, numbered q = 0 at the top to m − 1 at the bottom. The
element for processor q goes on `d1_in` at clock T0 + 2q, so elements are spaced by one empty
slot. One C1 token goes on `c1_in` at clock T0 + m − 1. Because the two streams move in
opposite directions, the token meets each element exactly at that element's processor. There
it loads `acc`. All loads are done by T0 + 2N − 2, which must be before T + 3. The testbenches
use T = T0 + 2N − 2.

**Unloading.** An O token goes on `o_in` at clock T2 > T + 3N. Each processor it passes puts
`acc` on the upward path in place of D1. The result of processor q leaves `d1_out` at clock
T2 + 2q + 1.

The paper's drawing of the array does show these pipelines: elements entering at the bottom
with gaps, C1 and O entering at the top, and results leaving at the top. The clock numbers are
this design's own. One matrix goes through per load–compute–unload run, which takes
7 + 13 + 8 clocks at N = 4. Overlapping matrices is not attempted.

### Reading of the processor programs

* The printed programs end with an assignment of a constant 0 to the O output. This design
  reads it as "pass O on". Otherwise the O token could never reach a second processor.
* The array's legend calls D2 the "i−1" and D3 the "j−1" dependency. The programs say the
  opposite: the left half divides by D3, and only the processor above in column j can supply
  that value (u_jj). This design follows the programs.
* The central processor's "D2-out := 1" is the unit diagonal of L, so D2 is set to 1.0 in
  the fixed-point format.

## Top level: `lu_top`

`lu_top` holds both arrays side by side with parameter N (default 4). They share only `clk`
and `rst_n`, which is asynchronous and active low. The hexagonal array's ports are prefixed
`a2_`, the triangular array's `a3_`. Neither array has a stall or a handshake: the user drives
the streams on the clocks given above.

## How far to trust it

The following pass:

* Each processor has a self-checking testbench that compares every output with a model of its
  program.
* Each array decomposes exact test matrices, built as L·U from small integers with
  power-of-two pivots so that the expected factors are known in advance. It also decomposes
  random diagonally dominant matrices, checked against a loop-nest reference of the recurrence
  in `tb/lu_tb_pkg.sv` with the same rounding.
* Every result is checked at the exact clock the schedule predicts.
* `tb_lu_top` runs both arrays at the default N = 4 on six matrices each. It counts every
  mechanism and fails if one of them never occurs: C1 loads, C2 divisions, C2 pivot
  broadcasts, C3 broadcasts, O unloads, c = 1 divisions, multiply-subtract steps,
  pass-through of finished values, and accumulator clears.
* `tb_arch2_array` and `tb_arch3_array` run at N = 6.

Limitations:

* There is no pivoting.
* Fixed-point overflow is not detected.
* Division is one combinational divider per dividing processor. There are N(N−1)/2 dividers
  in each array, and they set the clock period.
* The paper also mentions other architectures for the same problem that are not built here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/lu_pkg.sv tb/lu_tb_pkg.sv tb/tb_lu_top.sv --top-module tb_lu_top
./obj_dir/Vtb_lu_top
```

Replace `tb_lu_top` with any other testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops. Every testbench has a watchdog.

## Files

| file | contents |
|---|---|
| `rtl/lu_pkg.sv` | number format and fixed-point multiply/divide |
| `rtl/arch3_diag_pe.sv`, `rtl/arch3_int_pe.sv` | processors of the triangular array |
| `rtl/arch3_array.sv` | triangular array |
| `rtl/arch2_left_pe.sv`, `rtl/arch2_central_pe.sv`, `rtl/arch2_right_pe.sv` | processors of the hexagonal array |
| `rtl/arch2_col_cell.sv` | load/unload pipelines shared by the hexagonal processors |
| `rtl/arch2_array.sv` | hexagonal array |
| `rtl/lu_top.sv` | both arrays side by side |
| `tb/lu_tb_pkg.sv` | reference recurrence and test-matrix generators |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lu_top` |
