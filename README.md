# High-rate QC-LDPC read channel: folded decoder and FPGA-style error-rate simulator

Hard-disk read channels need codes of rate 8/9 and above that still reach sector
error rates around 1e-12. Whether a given low-density parity-check (LDPC) code has
an error floor at such rates can only be seen empirically, and only in hardware:
software simulation stops near 1e-4. This RTL is such a hardware simulator. It records a codeword on a
model of a magnetic channel, adds Gaussian noise, and recovers the data with
iterative detection and decoding. The decoding is done by a Max-Log-MAP channel
detector and a quasi-cyclic LDPC decoder. The simulator counts bit and sector
errors over as many sectors as you let it run.

The main piece is the decoder. Its parity-check matrix is built from large
p x p circulants, and large circulants are what keep the error floor low. A
classic partly parallel QC decoder gives each group of p nodes a single
processing unit, so its speed falls as p grows. This decoder splits each group
of p nodes over h = p/v units, each serving v nodes. One iteration therefore
takes about 2v cycles instead of 2p. The hard part is laying out the messages
so that all inputs of a node reach the same unit in the same cycle. The memory
fabric below solves this with plain binary counters and barrel shifters.

## Default configuration

| item | value |
|---|---|
| code | regular QC-LDPC, m = 2 block rows, n = 18 block columns, p = 256, circulant weight w = 2 |
| length / rate | 4608 bits, 8/9 (512 checks; row weight 36, column weight 4) |
| decoder folding | v = 32 nodes per unit, h = 8 units per group: 16 CNUs, 144 VNUs, 72 DMMBs, 18 CMMBs |
| messages | 6 bits, 3 fractional bits, saturated to +/-3.875 (LSB 0.125) |
| detector | 8-state EPR4 trellis, 9-bit branch and path metrics, window 32 |
| iterations | up to 4 detector+decoder passes per sector, 4 decoder iterations per pass |

LLRs are positive when bit 0 is more likely. The circulant offsets
(`qc_ldpc_pkg::DEF_OFFSETS`) were drawn at random, one circulant at a time.
Any draw that would create a cycle of length 4 was rejected, so the matrix has
girth at least 6. Any other set of offsets can be given through the `OFFSETS`
parameter. Element `(i*n + j)*w + k`, 16 bits wide, is the column of the k-th
one in the first row of circulant H(i,j).

## Structure

```
read_channel_sim
 |- awgn_gen            Box-Muller noise: 2 x lfsr64, f/g look-up tables, sigma scaling
 |- epr4_channel        1 + D - D^2 - D^3 response of NRZ bits, plus noise
 |- max_log_map_det     sliding-window Max-Log-MAP, extrinsic LLR out
 |- qc_ldpc_decoder
 |   |- dmmb_group x m*n   (one per circulant)
 |   |   |- dmmb x w            dual-port message RAM, v words x h messages
 |   |   |- barrel_shifter x 2w read side and write side
 |   |- cmmb x n           single-port channel-message RAM
 |   |- cnu x m*h          min-sum check node, degree n*w
 |   |- vnu x n*h          variable node, degree m*w
 |- sector_err_counter  bit / sector error statistics
```

`qc_ldpc_pkg` holds the message type, the saturation helpers and the default code.

## The memory fabric (qc_ldpc_decoder, dmmb_group)

A weight-w circulant H(i,j) is a sum of w permutation matrices. Permutation k
has its one in row r at column (r + t_k) mod p. Each permutation gets one
decoding message memory block (DMMB). It keeps the p messages of those ones in
column order, folded into v words of h lanes: word a, lane l holds the message
of column a + l*v. Every DMMB is read and written once per cycle.

**Variable-node sweep.** VNU l of group j handles columns l*v + c in cycle c,
for c = 0 .. v-1. Its messages sit in word c, lane l of every DMMB in block
column j, so every counter starts at 0 and no rotation is needed. The channel
messages (CMMB) use the same layout.

**Check-node sweep.** CNU l of group i handles row l*v + c in cycle c. In
permutation k that row's one is in column l*v + c + t_k (mod p). Write
t_k = q*v + s with s < v. The DMMB counter starts at s and counts up modulo v,
so in cycle c it points at word (s + c) mod v. The message for CNU l is then in
lane (l + q) mod h. Once the counter has wrapped past v-1, the column has
crossed into the next block of v and the lane is (l + q + 1) mod h. The
read-side barrel shifter rotates by q, or by q + 1 after the wrap. The
write-side shifter applies the inverse rotation one cycle later. Every
message therefore returns to where it came from.

The source architecture describes the rotation as floor(t_k / v) alone. With
that amount, rows whose column index crosses a multiple of v get another row's
message. The "+1 after the wrap" here is the fix, and
`tb_dmmb_group` checks it against the circulant definition.

**Pipeline.** The DMMB read is synchronous. Results are written back one cycle
after the read, to the read address delayed by one cycle. So each sweep takes
v + 1 cycles, one iteration takes 2v + 2, and no bypass logic is needed.

**Schedule.** A decoding run of I iterations (flooding schedule) is:

```
VN (write v->c) , CN (write c->v) , ... I times ... , VN (read only: outputs)
```

Between runs the DMMBs hold check-to-variable messages. The next
detector+decoder pass of the same sector loads fresh channel messages and
continues from those messages. With `first = 1` the first VN sweep treats all
check messages as zero, which starts a new sector. The final sweep streams
one column per VNU per cycle. `so_addr = c` and lane l of group j carry code bit
j*p + l*v + c, with its hard decision and its extrinsic output (the sum of the
check messages) for the detector. `done` rises (2I + 1)(v + 1) + 1 cycles after
`start` is sampled. At the defaults that is 298 cycles for 4 iterations on 4608
bits.

The CNU is plain min-sum (two smallest magnitudes, index of the smallest, sign
parity), with no scaling or offset. The VNU adds at full width and saturates
only its outputs.

## Channel detector (max_log_map_det)

The EPR4 trellis has state {b(k-1), b(k-2), b(k-3)} and ideal output
x(k) + x(k-1) - x(k-2) - x(k-3), with x = 2b - 1. Branch metric:
-(y - r)^2 * bm_scale +/- La/2, where bm_scale = 1/(2 sigma^2) is an input and
La is the decoder's a-priori LLR. Path metrics are saturated to 9 bits and
renormalised each step, so their maximum is 0. One serial engine does the whole
sector:

1. a forward sweep over the sector that stores all 8 alphas per bit, one bit per cycle;
2. per window of `WIN` bits, last window first: a backward warm-up over the
   following window, started from equal metrics (the sliding-window
   approximation), then the backward sweep over the window itself. This sweep
   outputs one LLR per cycle, highest index first.

The output is the extrinsic LLR: the best b=0 path metric minus the best b=1
path metric, with the a-priori term left out. A sector takes about 3N - WIN
cycles (about 13.8k at the default size). The detector is the throughput
bottleneck of the simulator. A faster detector would run several windows in
parallel, but that is not built here.

## Noise and channel (awgn_gen, lfsr64, epr4_channel)

Noise comes from the product form of Box-Muller, x = sqrt(-ln x1) *
sqrt(2) cos(2 pi x2). Two 64-bit LFSRs (polynomial x^64+x^63+x^61+x^60+1, 16
steps per cycle) give x1 (10 bits) and x2 (8 bits). Both functions are ROMs
with 6 fractional bits:

* `rtl/awgn_f_lut.hex`: entry u = round(64 * sqrt(-ln((u + 0.5)/1024)))
* `rtl/awgn_g_lut.hex`: entry u = round(64 * sqrt(2) * cos(2 pi (u + 0.5)/256)), 8-bit two's complement

The product is scaled by `sigma` (6 fractional bits), rounded to 3 fractional
bits and clipped to +/-3.875. The channel maps bits to +/-1 and applies
1 + D - D^2 - D^3. It adds the noise and outputs an 8-bit sample with 3
fractional bits. The bit history is cleared at the start of each sector.

## Simulator control (read_channel_sim)

Load a codeword with `cw_we/cw_addr/cw_bit`. Set `sigma`, `bm_scale` and
`n_rounds`, then pulse `start`. Each round, the codeword goes through the
channel into the sample buffer with new noise, one bit per cycle. Then up to 4
passes follow. In each pass the detector output loads the decoder's CMMBs as it
is produced. The decoder runs 4 iterations, and its output pass fills the
a-priori buffer and feeds the error counter. If a pass gets every bit right,
the sector stops early, since the simulator knows the transmitted codeword.
Otherwise the sector counts as a sector error after the 4th pass. When `done`
pulses, `sectors`, `sector_errs`, `bit_errs`, `passes` and `early_stops` hold
the totals of the run. A round that stops after one pass takes about
N + (3N - WIN) + 298 cycles, 18.7k at the default size.

## Departures from the source and choices made here

* The parity-check matrix, the value of v, the window length, the LFSR
  polynomial, the table sizes, the check-node rule (plain min-sum) and all
  handshakes are this design's own choices. The source fixes the message
  widths (6 and 9 bits with 3 fractional bits), the iteration counts (4 and 4),
  the EPR4 target, the Box-Muller structure and the decoder architecture.
* The default code is the rate-8/9, column-weight-4, p = 256 code of the
  circulant-size comparison. Its length is 4608 = 18 x 256.
* Barrel-shifter rotation includes the +1 after the counter wraps (see above).
* Sweeps take v + 1 cycles, not v, because of the one-cycle memory read.
* Early stopping compares with the known codeword. It does not check the
  syndrome. The hard decisions of a pass that stops are therefore exactly the
  transmitted word.
* p and v must be powers of two, and every circulant must be non-zero.
* The two-FPGA split and the PC link are not modelled. The host is a simple
  write port plus counters.
* Buffers in `read_channel_sim` and the alpha store in the detector are arrays
  with combinational reads. On an FPGA they would become registered block RAMs
  with one more cycle of latency.

## How far the evaluated configurations fit

* Rate 8/9, length 4608, column weight 4, p = 256 (circulant-size study): this is the default, so it fits.
* The same study with p = 128 and p = 64 needs m = 4, n = 36, w = 1 and m = 8,
  n = 72, w = 1 (derived from rate 8/9 and column weight 4). They run with those
  parameters (`tb_workload_p128`, `tb_workload_p64`), but not at the defaults.
  The original matrices are not known, so those runs show that the datapath
  handles these shapes. They say nothing about the codes' error floors.
* The circulant-weight study uses column weight 6, with w = 2 and w = 3, and
  the w = 3 code has length 9216. The highest-rate code of the final
  comparison has rate 15/16 (m = 2, n = 32). Neither is the default code. The
  other lengths are not stated.
* 4 detector+decoder passes with 4 decoder iterations each: built.
* Reaching 1e-9 sector error rate with at least 10 error events takes about
  1e10 sectors. At 18.7k cycles per sector, one engine at 200 MHz does about
  10.7k sectors/s, which would take months. Several copies of the simulator, or
  a parallel detector, would be needed.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what is compared |
|---|---|
| `tb_qc_ldpc_decoder` | full decoder (m=2, n=4, p=32, v=8, w=2) vs. an edge-by-edge flooding min-sum model built from the matrix. Fresh, continued and biased sectors; exact soft outputs and decisions; done timing |
| `tb_qc_ldpc_decoder_h1` | the same with v = p (h = 1), the unfolded special case of the architecture |
| `tb_dmmb_group` | message order seen by CNU and VNU lanes vs. the circulant definition, with wrapping counters and rotation |
| `tb_cnu`, `tb_vnu`, `tb_barrel_shifter`, `tb_dmmb`, `tb_cmmb` | direct evaluation of each unit's function |
| `tb_max_log_map_det` | exact LLRs vs. a behavioural sliding-window Max-Log-MAP; noiseless decisions; cycle bound |
| `tb_awgn_gen` | sample-exact vs. real-arithmetic Box-Muller from the LFSR bits; mean and variance at two sigmas |
| `tb_lfsr64`, `tb_epr4_channel`, `tb_sector_err_counter` | bit-serial LFSR, EPR4 sums, error counts |
| `tb_read_channel_sim` | whole simulator, 128-bit code. A random codeword is made by GF(2) elimination (`tb_code_pkg`). Quiet, medium and loud runs; early stop, success after feedback, failure after 4 passes, and codeword reuse must all occur |
| `tb_read_channel_sim_full` | whole simulator at the default size with a random 4608-bit codeword. Error-free with one pass per sector at sigma 0.25, timing checked. Between sigma 0.62 and 0.66 some sectors must need a second pass and succeed. At sigma 1.2 every sector must fail after 4 passes |
| `tb_workload_p128`, `tb_workload_p64` | the simulator reconfigured for the p = 128 (m=4, n=36, w=1, v=16) and p = 64 (m=8, n=72, w=1, v=8) codes of the circulant-size study. The offsets are stand-ins from a congruential sequence |

To run one with Verilator 5 from the directory holding `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_read_channel_sim \
  -y rtl -y tb +libext+.sv -Irtl rtl/qc_ldpc_pkg.sv tb/tb_code_pkg.sv \
  tb/tb_read_channel_sim.sv -o sim && obj_dir/sim
```

The noise tables are read with paths relative to that directory
(`rtl/awgn_*.hex`). The full-size testbench builds in about half a minute and
runs in a few seconds.
