# Particle-filter instruction extensions for an ASIP

A particle filter tracks a hidden state by keeping N weighted samples
("particles"). Every time step it predicts each particle, weights it by how
well it explains the new measurement, and resamples: particles with large
weights are copied, particles with negligible weights are dropped. On a
small embedded processor three steps dominate the run time:

* **likelihood evaluation** – a Gaussian `exp(-d²/2σ²)` per particle;
* **resampling** – systematic resampling is a sequential loop with a
  data-dependent inner `while`, so it neither unrolls nor parallelises;
* **histogram computation** – colour-histogram video trackers build one
  histogram per particle over a region of interest.

This RTL provides one hardware unit per hot spot, each meant to be attached
to a general-purpose core as a *custom instruction* (operands come from the
core's registers, small state registers live inside the unit):

| unit | instruction(s) | idea |
|---|---|---|
| `uqle_unit` | `likelihood` | uniform-quantization likelihood: the weight is found by comparing the distance with precomputed boundaries, no exponential |
| `rsr_unit` | `cwcalculation`, `paradef`, `baseadder`, `crfcounter`, `nextiterationdef`, `rfcalculation` | *reformulated* systematic resampling: P cumulative weights are compared with U uniform numbers per instruction |
| `psr_unit` | `cwcalculation`, `paradef`, `Integerdivisionforcrf`, `rfcalculation` | *parallel* systematic resampling: a closed form removes the loop dependency entirely |
| `fpaha` (`paha` inside) | histogram update | a register-bin histogram that adds M pixels per clock |

`pf_asip_ext` puts the four units side by side with every instruction port
brought out. The base processor, its register file and its load/store path
are not part of this RTL. The testbenches act as the processor program.

The two resampling units are alternatives that compute the same replication
factors. A real system would normally carry only one of them.

## Data flow of one filter iteration

```
 distances d_i ──► uqle_unit ──► weights w_i ──► rsr_unit or psr_unit ──► replication factors r_i
                   (1 per clock)                 (P particles per instruction)

 pixels of the region of interest ──► fpaha ──► 256-bin colour histogram ──► distance to reference
                                      (M per clock)                          (software)
```

Prediction, distance calculation, estimation and copying the particles are
done in software. So is the one-time precomputation of the UQLE boundaries.

## Likelihood by uniform quantization (`uqle_unit`)

The weight range [0,1] is cut into M equal intervals of size Q = 1/M, plus
a small extra interval [0, δ) so that a far-off particle still gets a
non-zero weight. Software inverts the likelihood once per filter setting to
get the matching distance boundaries

    T_δ = sqrt(-2 ln(δ) σ²),   T_m = sqrt(-2 ln(mQ) σ²),  m = 1..M-1,
    T_δ > T_1 > T_2 > ... > T_(M-1)

and writes them into the unit's M boundary registers (`T[0]` = T_δ).
Each instruction then works in four steps:

1. M comparators: `c_k = (d >= T[k])`. Because the boundaries decrease,
   `c` is a thermometer code `0…01…1`.
2. XOR gates between neighbours turn it into one-hot:
   `e_k = c_k ^ c_(k+1)`, and `e_(M-1) = ~c_(M-1)`.
3. An encoder gives the interval index m, with `T_m > d >= T_(m+1)`.
4. A multiplexer picks the weight W_m. If `c_0` is set (d ≥ T_δ), it picks δ instead.

The weight table is a constant computed at elaboration from `WMODE`. Codes
are `floor(w·(2^WW−1))`:

| WMODE | W_m |
|---|---|
| `UQLE_LOW` | m·Q, except W_0 = 2δ |
| `UQLE_MID` | m·Q + Q/2 |
| `UQLE_HIGH` | (m+1)·Q |

Example with M = 4, high values and 8-bit weights: a distance in [T_2, T_1)
gives comparator outputs `0011` and one-hot `0100` (so m = 1). The weight
is 0.5, output as `8'b0111_1111`.

Output `index` is 0 for the δ interval and m+1 otherwise. The result is
registered. One distance is accepted per clock, and `weight`/`index` are
valid one clock after `issue`. The boundary registers reset to zero. Until
they are written, every distance lands in the δ interval.

## Systematic resampling, reformulated (`rsr_unit`)

Systematic resampling (SR) uses the cumulative weights CW_1..CW_N and M
evenly spaced "uniformly distributed numbers" (UDNs):

    U_size = CW_N / M,   U^1 uniform in [0, U_size),   U^m = U^1 + (m−1)·U_size

The replication factor r_i is the number of UDNs that fall in
(CW_(i−1), CW_i]. Sequential code walks the UDNs with a `while` loop inside
the particle loop. The reformulated algorithm instead handles **P CWs
against a group of U UDNs** at once. Let j be the UDN group that the current
CW group has reached:

```
baseadder            r_k = j·U                          (k = 1..P; all earlier groups lie below)
repeat
  crfcounter         r_k += #{ l = 1..U : CW_k > U^(jU+l) }   P×U comparators
  nextiterationdef   if CW_P > U^(jU+U+1): j++, flag = 1  (last CW passes into the next group)
                     else flag = 0
while flag
rfcalculation        r_k ← r_k − r_(k−1), r_1 ← r_1 − lastRf; lastRf ← old r_P
```

After the loop, each r_k is a *cumulative* count: the number of UDNs below
CW_k. This holds because all CWs of the group are at least the last CW of
the previous group, and that CW already exceeded the UDNs of groups 0..j−1.
`rfcalculation` takes differences, so the results equal sequential SR for
the same U^1 and U_size. The while loop still runs a data-dependent number
of times. A particle with a large weight needs several UDN groups. The loop
body, though, is now P×U comparisons in one instruction.

How the hardware holds this state (`sr_crf_counter`):

* j sits in a state register together with the offset `j·U·U_size`. The U
  UDNs of a group are `U^1 + offset + l·U_size`, which needs only small
  constant multiples of U_size.
* UDNs with index above M are never counted, and j stops at the last
  group. U_size is rounded down in fixed point, so without this cap the
  last particle could collect extra copies. With it the RFs always sum to
  exactly M.

The program for N particles (`tb/tb_rsr_unit.sv` runs it):

```
for each group g of P weights:  vout ← cwcalculation(w_g)        CWs, running sum in a state register
paradef(CW_N, rnd)                                                 U^1, U_size into state registers; j = 0
for each group g:
    cnt ← baseadder()
    do { cnt ← crfcounter(cnt, CW_g); flag ← nextiterationdef(CW_g) } while flag
    rf_g ← rfcalculation(cnt)
```

Operands are two P-word vectors, `vin_a` and `vin_b`:

* `crfcounter`: counts in `vin_a`, CWs in `vin_b`.
* `nextiterationdef`: CWs in `vin_b`.
* `paradef`: CW_N in `vin_a[0]`.

`paradef` also clears the running-CW and lastRf registers. This leaves the
unit ready for the next resampling run.

## Parallel systematic resampling (`psr_unit`)

PSR works with the *cumulative replication factor* cr_i = r_1 + … + r_i.
This is the index of the UDN interval that CW_i falls into:

    U^1 + U_size·(cr_i − 1) < CW_i ≤ U^1 + U_size·cr_i
    ⇒ cr_i = ceil((CW_i − U^1) / U_size)

Each cr_i depends only on its own CW, so all particles can be handled in
parallel. Then r_i = cr_i − cr_(i−1). In fixed point, rounding U_size down
would let the last cr exceed M. For example, CW_N = 10000, M = 1024 and
U^1 = 2 give 1111 copies instead of 1024. The unit therefore merges the
two divisions:

    cr_i = ceil( M·(CW_i − U^1) / CW_N )

For the last particle this is `ceil(M − M·U^1/CW_N)`. That equals M
whenever M·U^1 < CW_N, which `paradef` guarantees (below).

`crf_divider` has P lanes. Each lane is a restoring subtract/shift divider
that produces only the ceil(log2(M+1)) quotient bits a result in 0..M needs
(10 bits for M = 512). A non-zero remainder increments the quotient, which
gives the ceiling. The program is:

```
for each group: cwcalculation(w_g)
paradef(CW_N, rnd)
for each group: cr_g ← Integerdivisionforcrf(CW_g)
for each group: rf_g ← rfcalculation(cr_g)
```

This is exactly 3·N/P + 1 instructions, with no data-dependent loop.

SR and PSR agree exactly when CW_N is a multiple of M. Otherwise the SR
unit uses the rounded-down U_size, PSR uses the exact ratio, and single RFs
can differ by one. Both always give M copies in total.

### `paradef` and the random start

    U_size = floor(CW_N / M)
    U^1    = floor(rnd · U_size / 2^RW)

`rnd` is an RW-bit uniform random word supplied with the instruction (the
core's random generator, in software). This form keeps U^1 < U_size and
M·U^1 < CW_N.

### Timing

Both resampling units accept one instruction per clock. `vout`
(and `flag`) are registered and valid with `res_valid` one clock after
`issue`. The CW sum must stay below 2^W. With the default W = 32 and 512
particles, that allows weights of up to 23 bits.

## Histogram engines (`paha`, `fpaha`)

The Parallel Array Histogram Architecture keeps its 2^N bins in registers.
Each clock it takes M N-bit values:

* **M decoders** (N : 2^N) turn each value into a one-hot vector.
* **2^N accumulators** (`paha_accumulator`): each bin counts the 1s among
  the M decoder outputs that address it. The compressor tree gives an R-bit
  count, with R = ceil(log2(M+1)). A two-operand adder adds the count to
  the PW-bit bin.
* **2^N PW-bit register bins** are updated at the clock edge.

All M inputs may hit the same bin in one clock. There is no
read-modify-write hazard and no extra latency. A bin changes at the edge
where `en` is high and can be read through `rd_addr`/`rd_data` in the next
cycle. `clear` zeroes all bins. PW must cover the largest count: 20 bits
hold a full 640×480 image.

The flexible version (`fpaha`) adds validation logic (`fpaha_validation`).
It turns the number of valid items `num` (0..M) and the `most` select into
per-input enables, which AND-gate the decoder outputs. With `most = 1`, the
`num` highest-index inputs count. With `most = 0`, the `num` lowest-index
inputs count. This handles the short first and last groups of a
region that is not aligned to M. With `num = M` it is the plain PAHA.

## Top level and parameters

`pf_asip_ext` has one clock and one asynchronous active-low reset. Its
ports are grouped by unit prefix:

* `uq_*`: boundary write, issue, distance, weight, index.
* `sr_*` and `psr_*`: issue, opcode (`pf_pkg::sr_op_e` / `psr_op_e`),
  operand vectors, random word, result vector, flag.
* `hist_*`: enable, clear, M inputs, num, most, bin read.

| parameter | default | meaning |
|---|---|---|
| `UQ_M` / `UQ_WW` / `UQ_WMODE` | 4 / 8 / high | UQLE intervals, weight bits, representative value |
| `UQ_DW` | 32 | distance width |
| `RS_M` | 512 | particles resampled (also N; multiple of `RS_P` and `RS_U`) |
| `RS_P` / `RS_U` | 4 / 8 | CWs per instruction / UDNs per group |
| `RS_W` / `RS_RW` / `RS_RFW` | 32 / 16 / 16 | weight, random-word and count widths |
| `H_M` / `H_N` / `H_PW` | 8 / 8 / 20 | histogram inputs per clock, value bits (256 bins), bin bits |

Other configurations that were studied for this design: UQLE with
8/16/32/64 intervals; resampling with 2 or 4 CWs and 1/2/4/8 UDNs; PSR with
1/2/4 lanes and 128–1024 particles; 1-, 4- and 16-way histograms. They are
parameter changes and are all simulated by `tb/tb_pf_workloads.sv`.

## Verification

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares against a model written independently in the testbench and prints
`TB_RESULT checks=… failures=…`. The more substantial ones:

* `tb_pf_asip_ext`: all defaults, three filter iterations. For each:
  * 512 distances stream through UQLE, one per clock (throughput checked);
  * the weights are resampled by both the SR and the PSR programs, checked
    against a sequential SR and the closed form;
  * in the third iteration CW_N is a multiple of 512 and SR must equal PSR.

  After the iterations, a 120×140 region of interest goes through `fpaha`
  from a misaligned start. The test also counts that each mechanism
  happened: δ interval, every UQLE interval, repeated and ending SR loops,
  exact and rounded-up divisions, full/partial-most/partial-least
  histogram groups, and several pixels in one bin.
* `tb_rsr_unit`, `tb_psr_unit`: complete programs on random, sparse
  (degenerate) and constant weight sets. The RFs must sum to M.
* `tb_pf_workloads`: every configuration listed above, including a
  complete 640×480 histogram for each engine width.

Instruction counts per 512-particle run, from `tb_pf_workloads` (unit
instructions only, no loads or stores):

| configuration | count |
|---|---|
| PSR, 4 lanes | 385 |
| PSR, 2 lanes | 769 |
| PSR, 1 lane | 1537 |
| SR with (P,U) = (4,8) | about 770 |
| SR with (P,U) = (2,1) | about 2300 |

For SR the count depends on the data.

Run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pf_pkg.sv tb/tb_pf_asip_ext.sv --top-module tb_pf_asip_ext -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. `tb_pf_workloads` takes about a
minute; the others take seconds.

## Where this RTL makes its own choices

The algorithms, the instruction sets and the unit structures follow the
original design. These comparators, XOR gates, encoders, adder chains,
restoring dividers, decoders, compressor-tree accumulators and validation
logic are what it specifies. It does not specify the following, which are
therefore choices made here:

* **Instruction interface.** Operands and results are P-word vectors on
  ports, with a one-clock registered latency. In the original, wide
  load/store instructions and special storage feed the units; they are not
  modelled.
* **Random start.** U^1 comes from a random word supplied by software.
* **Rounding in SR.** The SR unit works in integers with U_size rounded
  down and the UDN index capped at M. The RFs therefore sum to M, but they
  equal PSR's only when CW_N is a multiple of M (see above).
* **Clearing state.** `paradef` clears the running-CW and lastRf
  registers.
* **UQLE register T[0].** It holds T_δ. The value of δ is the parameter
  `DELTA_CODE`, default 1 LSB.
* **Histogram access.** The bins are read through an address port and
  zeroed by `clear`.
* **Widths the original leaves open.** Distance 32 bits, random word 16
  bits, counts 16 bits.
* **Default histogram size.** It is the 8-input (M, N, P) = (8, 8, 20)
  configuration used in the architecture comparison. The 16-way engine is
  the same RTL with `H_M = 16`.

Reported speed-ups and gate counts of the original refer to a complete
processor with these instructions. They are not reproduced here, and the
instruction counts above are not cycle counts of such a processor.
