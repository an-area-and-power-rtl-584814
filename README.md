# On-the-fly Hadamard LBCS encoder for one neural recording channel

An implanted neural recorder spends most of its power on the radio, so the data
should be compressed before it is sent. This encoder compresses one
ADC channel by **Learning-Based Compressive Subsampling (LBCS)**. Each window of
`N` samples is projected onto a small set of `M = N/CR` rows of the `N x N`
Walsh-Hadamard matrix:

    y_k = sum_{j=0}^{N-1} H[w(k)][j] * x_j        k = 0 .. M-1

Only the `M` coefficients `y_k` are sent. The receiver recovers an
approximation with one linear step, `x_hat = (1/N) * H^T * P^T * y`. There is no
iterative solver as in classic compressive sensing.

The rows `w(0..M-1)` form the **subsampling map**. They are learnt offline: over
a training set, they are the `M` Hadamard coefficients that carry the most
average energy. The hardware idea is that the Hadamard matrix is **never
stored**. Each entry is `+1` or `-1`, and it can be computed from the row and
column numbers with a few gates. The only storage is a look-up table of `M` row
numbers, each `log2(N)` bits wide, in place of an `N x N`-bit coefficient memory.

The main configuration is `N = 64`, `CR = 8`, so `M = 8`.

## Computing a Hadamard entry

In the natural (Sylvester) order, `H_n = [[H_{n-1}, H_{n-1}], [H_{n-1}, -H_{n-1}]]`.
Entry `(r, c)` is `(-1)` raised to the number of bit positions where both `r`
and `c` have a 1. Code `+1` as 0 and `-1` as 1. The entry is then the parity
of `r & c`:

    h = ^(row & col)        // had_bit_gen.sv

This takes `log2(N)` AND gates and an XOR tree. The result is purely
combinational.

## How a window is encoded

The encoder clock runs at `M` times the sample rate. A single adder/subtractor
serves all `M` accumulators by time-multiplexing:

```
          sample j accepted          next sample accepted (back to back)
  cycle:  t      t+1   t+2  ...  t+M      t+M+1 ...
  enable:        1     1         1        1
  k:             0     1    ...  M-1      0
  action:        acc[0] += +-x_j ... acc[M-1] += +-x_j   acc[0] += +-x_{j+1}
```

In each burst cycle:

1. The FSM's `k` addresses the Row-Index LuT, which gives `w(k)`.
2. The bit generator forms `h = ^(w(k) & j)`.
3. The DSP's counter, which moves in step with `k`, selects accumulator `k`
   through a multiplexer.
4. The adder adds `x_j` if `h = 0` and subtracts it if `h = 1`.
5. A demultiplexer writes the result back into accumulator `k`.

`j` counts samples modulo `N`.

**Window restart.** In the bursts of sample `j = 0`, the FSM raises its reset
command (`clear`). The value fed back from the accumulator is then forced to
zero, so each accumulator starts the new window from `+-x_0`. The previous
window's results are not cleared ahead of time. They stay on `y` until the
first sample of the next window overwrites them, one accumulator per cycle.
This way no clock cycle is spent on clearing, and samples can stream back to
back without a pause between windows.

**Result strobe.** `y_valid` goes high for one cycle, `M + 1` cycles after the
window's last sample is accepted. All `M` coefficients are final in that cycle.
They stay unchanged until the next sample is accepted and its burst begins.

**Widths.** Samples are signed `B_I`-bit values, `B_I = 10` by default. The
accumulators are `B_O = B_I + log2(N)` bits, 16 by default. This is the
smallest width that never overflows for Hadamard rows:

- Row 0 adds all `N` samples, so its range is
  `[-N*2^(B_I-1), N*(2^(B_I-1)-1)]`.
- Every other row adds `N/2` samples and subtracts `N/2`, which stays inside
  the same range.

Arbitrary `h` patterns could overflow, but no Hadamard row produces one.

## Calibration (loading the subsampling map)

While `pr_en` is high, the FSM takes one row number from `row_idx` in every
clock cycle and writes it to the LuT at `k = 0, 1, ..., M-1`:

- After `M` writes, `programmed` rises.
- Extra cycles with `pr_en` high are ignored.
- If `pr_en` drops before `M` writes, the encoder stays unprogrammed and
  refuses samples (`x_ready` low).
- Raising `pr_en` aborts any window in progress. The next accepted sample
  starts a new window at `j = 0`.

The learning step itself, picking the `M` highest-energy rows, is done offline.
`tb/lbcs_workload.sv` shows it on synthetic signals.

## Interface of `lbcs_encoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | encoder clock, `M` x sample rate |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `pr_en` | in | 1 | calibration enable |
| `row_idx` | in | `log2(N)` | learnt row number, one per cycle while `pr_en` |
| `programmed` | out | 1 | `M` row numbers stored |
| `x` | in | `B_I` signed | ADC sample |
| `x_valid` / `x_ready` | in / out | 1 | sample accepted on a cycle with both high |
| `y` | out | `M` x `B_O` signed | coefficients `y_0 .. y_{M-1}` |
| `y_valid` | out | 1 | one-cycle strobe: `y` holds a finished window |

The maximum rate is one sample every `M` cycles. `x_ready` is high when the
encoder is idle and in the last cycle of a burst, so the ADC can deliver at
exactly `f_clk / M`.

Parameters of `lbcs_encoder`:

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | window length, a power of two |
| `CR` | 8 | compression rate; `M = N/CR` is derived |
| `B_I` | 10 | sample width |
| `B_O` | `B_I + log2(N)` | accumulator width |

The shared defaults are in `rtl/lbcs_pkg.sv`.

## Modules

| file | role |
|---|---|
| `rtl/lbcs_encoder.sv` | top: FSM, Had-block and DSP wired together |
| `rtl/lbcs_fsm.sv` | calibration and sequencing of `k`, `j`, `enable`, `clear`, `y_valid` |
| `rtl/had_block.sv` | Row-Index LuT plus bit generator: `h = H[w(k)][j]` |
| `rtl/row_index_lut.sv` | `M x log2(N)` register file, one write port, one asynchronous read port |
| `rtl/had_bit_gen.sv` | `h = ^(row & col)` |
| `rtl/lbcs_dsp.sv` | sample register, add/subtract unit, `M` accumulators, mux/demux, `k` counter |
| `rtl/lbcs_pkg.sv` | default sizes |

The default build has 207 flip-flops:

- 128 accumulator bits (8 x 16);
- 48 LuT bits (8 x 6);
- 10 bits of sample register;
- the remainder in the FSM and the counter.

Assertions check three rules:

- The FSM's `k` and the DSP counter agree in every burst cycle.
- A burst never runs on an unprogrammed encoder.
- The LuT is written only during calibration.

## Choices made in this RTL

These points are not fixed by the architecture this encoder follows, and were
chosen here:

- **Sample width and signedness.** 10-bit signed samples, with 16-bit
  accumulators derived from them as described above.
- **ADC handshake.** The sample handshake (`x_valid`/`x_ready`) and the sample
  register in the DSP are additions. The register frees the ADC from holding
  its output during the `M`-cycle burst.
- **Accumulator reset.** The reset is done as a zeroed feedback on the first
  sample of a window, not as a separate clearing cycle.
- **Result strobe.** `y_valid` is added, so that a transmitter knows when to
  read `y`. The framing towards the radio is not specified here.
- **Calibration protocol.** One row number per cycle, ignore extra cycles,
  refuse samples until all `M` are stored, and abort the window on
  recalibration.
- **Two `k` sources.** The FSM drives `k` to the LuT, and the DSP has its own
  counter for the accumulator select, as in the reference block diagram. Both
  restart at every burst, and an assertion checks that they agree.
- **Reset.** The global reset is asynchronous and active low. The LuT resets to
  row 0 in every entry.

Not built:

- **Analog and radio parts.** The ADC, the analog front end and the RF
  transmitter are outside this RTL. Their signals are the top's ports.
- **Multichannel sharing.** Sharing one Hadamard bit generator among several
  channels is mentioned as a possibility, not as part of this encoder. Each
  instance here is one channel with its own generator.
- **Variable compression rate.** A compression rate that changes per window is
  likewise not built. `CR` is a parameter.
- **Area and power figures.** The published area (200 x 190 um in 0.18 um CMOS)
  and power (1.15 uW) are properties of a layout and cannot be checked from
  RTL.

## Configurations

- **`N = 64`, `CR = 8` (default).** The main configuration.
- **`N = 64`, `CR = 16` (`M = 4`).** Needs only a parameter change.
- **`N = 256`, `CR = 16` (`M = 16`, 8-bit indices, 18-bit accumulators).** The
  long-window variant. Also only a parameter change.

The default build cannot run the last two configurations, because the LuT
depth, the number of accumulators and the index widths are fixed when the RTL
is elaborated. All three are simulated in `tb/tb_lbcs_workloads.sv`.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/lbcs_pkg.sv \
          tb/tb_lbcs_encoder.sv --top-module tb_lbcs_encoder
./obj_dir/Vtb_lbcs_encoder
```

Replace the testbench name to run any of the others:

| testbench | what it checks |
|---|---|
| `tb_had_bit_gen` | every entry of the 64 x 64 matrix against the Kronecker recursion; row orthogonality |
| `tb_row_index_lut` | reset value, random writes, write-then-read timing |
| `tb_had_block` | `H[w(k)][j]` for every `k`, `j` under six maps |
| `tb_lbcs_dsp` | random bursts against an accumulator model; back-to-back loads; the two extreme row sums (no overflow) |
| `tb_lbcs_fsm` | cycle-by-cycle against a model of the controller's contract, including over-long, short and aborting calibrations |
| `tb_lbcs_encoder` | end to end at the default size, described below |
| `tb_lbcs_workloads` | end to end at three sizes, described below |

`tb_lbcs_encoder` runs with all parameters at their defaults. It works as
follows:

- It calibrates a random map and streams six windows, back to back, with gaps,
  and with extreme sample values.
- It recalibrates in the middle of a window.
- It compares every coefficient with an integer reference.
- It checks the `y_valid` latency (`M + 1` cycles) and the back-to-back rate
  (`M` cycles per sample).
- It counts each mechanism it exercises and fails if one never happened.

`tb_lbcs_workloads` runs the three configurations above through the full flow:

1. It learns a map from synthetic low-frequency signals.
2. It calibrates the encoder.
3. It encodes windows and checks every coefficient exactly.
4. It decodes linearly and prints the reconstruction SNR and the captured
   energy.

The printed SNRs describe these synthetic signals only. No recorded neural
data is included.
