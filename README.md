# Multicycle signal-dependent S-method processor

This is a real-time time-frequency analyser. For every new sample of a signal it
produces one column of the **S-method (SM)** distribution: N values SM(n,k), one
per frequency bin k. The S-method starts from the short-time Fourier transform
(STFT) F(n,k). It then adds correlation terms between bins placed symmetrically
around k:

    SM(n,k) = |F(n,k)|^2 + 2 * sum_{i=1..L(n,k)} Re{ F(n,k+i) * conj(F(n,k-i)) }

With L = 0 this is the spectrogram. With a very wide window it tends to the
pseudo Wigner distribution. A window that just covers one signal component
gives that component's Wigner concentration without the cross-terms between
components. In the **signal-dependent** form the window half-width L(n,k) is
chosen per point. The sum grows while both F(n,k+i) and F(n,k-i) are
"non-zero", meaning that their squared magnitude is above a reference level
R_n^2 = max_k |F(n,k)|^2 / Q^2. It stops at the first i where that fails.

The hardware is **multicycle**. A single-cycle design would need about 2·LMAX
multipliers and a deep adder tree in every channel. Here each channel has only
two multipliers, two shift-by-one units and three adders. They are reused over
consecutive clock cycles, one correlation term per cycle, under one shared
control state machine. A point whose window closes early stops adding terms.
The machine still runs a fixed number of steps, so the sampling rate stays
constant.

The block structure follows a published multicycle architecture for the
signal-dependent S-method. That covers the two blocks, the shared per-channel
datapath, the four control signals SelSTFT, SPECorSM, SignLoad and SMWriteCond,
and the Moore control unit. Sizes, number formats and a few rules the
architecture leaves open were decided here; they are listed under "Where this
design makes its own choices".

## The computation split into real and imaginary parts

The real part of F(k+i)·conj(F(k-i)) is Re·Re + Im·Im. Each channel therefore
evaluates two independent real sums:

    SM_R(n,k) = F_Re(n,k)^2 + 2 * sum_i F_Re(n,k+i) F_Re(n,k-i)
    SM_I(n,k) = F_Im(n,k)^2 + 2 * sum_i F_Im(n,k+i) F_Im(n,k-i)
    SM(n,k)   = SM_R(n,k) + SM_I(n,k)

Each sum has its own identical **sub-channel** (`sm_subchannel`). A third adder
in the channel adds the two sums into the `SMStore` register. Bin indices k±i
wrap around modulo N.

## One time instant, step by step

All N channels run in lockstep, steered by `sm_control`. One step takes one
clock cycle. One time instant takes **LMAX + 2** cycles:

| step | state | control outputs | what happens |
|------|-------|-----------------|--------------|
| 1 | `ST_STFT` | `SignLoad` | The sample `x_in` is taken. Every STFT bin is updated. `tfd_valid` is high, and `sm_out` still shows the previous instant. |
| 2 | `ST_SPEC` | `SelSTFT=0`, `SPECorSM=0`, `SMWriteCond`, `x_load` | Each channel forms F_Re² and F_Im² with no doubling, and adds them to 0. `SMStore` receives the spectrogram value. The x flags are computed and registered. |
| 3 … LMAX+2 | `ST_SM`, i = 1…LMAX | `SelSTFT=i`, `SPECorSM=1`, `SMWriteCond` | Each channel forms 2·F(k+i)F(k−i) and adds it to its Real/Imag register. The write happens only if the window is still open. |

With the spectrogram distribution code (`tfd_code = TFD_SPEC`), steps 3 … LMAX+2
are idle `ST_HOLD` cycles. The sampling period stays the same.

### What the control signals do inside a channel

- **SelSTFT** (m−1 bits, m = log2 N) steers four N/2-input multiplexors per
  channel:
  - two in each sub-channel pick F(k+i) and F(k−i);
  - two 1-bit ones pick x_{k+i} and x_{k−i}.
- Input 0 of each x multiplexor is tied to 1 instead of x_k. So in step 2
  SignDep is always 1 and the spectrogram value is always stored, even at
  points with no signal.
- **SPECorSM** controls two things:
  - whether the product is doubled;
  - whether the adder's second input is 0 (step 2) or the Real/Imag register
    (later steps).
- **SignDep** = x_{k+i} AND x_{k−i}. From step 3 on, the write enable of
  `SMStore` and of the Real/Imag registers is
  `SMWriteCond AND SignDep AND win_open AND x_k`. In step 2 it is simply
  `SMWriteCond`.
- **x_k** itself gates the SM steps. A point whose own |F|² is not above R²
  carries no signal, so its window width is zero and it keeps the spectrogram
  value. This holds even if both of its neighbours are above the level.
- **win_open** is a one-bit register per channel:
  - it is set in step 2;
  - it is cleared by the first step whose SignDep is 0.

  It gives the "sum until the first zero" rule. Without it, a bin between two
  signal components could see SignDep rise again at a larger i, with x_{k+i} on
  one component and x_{k−i} on the other. It would then pick up exactly the
  cross-term the method is meant to avoid. The testbenches exercise this case.

When the instant ends, `SMStore` holds SM(n,k) with window L(n,k), the number of
steps that wrote. It keeps this value through the next STFT step, where
`tfd_valid` marks it. It is overwritten at the end of the next step 2.

### Where the flags come from

`xgen` reads the registered STFT, which is stable from step 2 on. It computes:

- |F(n,k)|² for every bin;
- the maximum over k;
- R² = max / Q², using integer division by the constant Q²;
- x_k = |F|² > R².

The flags are registered at the end of step 2 and are first used in step 3.
This keeps the squaring, maximum and compare path in a cycle of its own. The SM
datapath path is then F register → multiplier → doubling → adder → adder →
`SMStore`, which matches the intended T_mult + 2·T_add + T_shift cycle.

## STFT block

`stft_recursive` uses the recursive (sliding) DFT with a rectangular window of
the last N samples:

    F(n,k) = exp(j·2πk/N) · ( F(n−1,k) + x(n) − x(n−N) )

- Each bin (`stft_bin`) holds one complex register. It needs one real addition
  and one complex multiplication per sample, all done in step 1.
- x(n−N) is read from a circular buffer of N sample registers at the write
  pointer, which is then overwritten by x(n).
- Twiddles are round(2^14·cos/sin(2πk/N)). They are computed at elaboration
  time with `$cos`/`$sin` in `tfa_pkg`, so no table file is needed.
- Rotation products are rounded to nearest and truncated to 16 bits.

A recursive DFT with rounded twiddles is marginally stable. The magnitudes of
the quantised twiddles are not exactly 1, and rounding errors are never flushed.
Against a directly computed DFT, the error stays within 16 LSB over the few
hundred samples simulated. Very long runs will drift slowly. A design that needs
unlimited run time should re-synchronise the bins periodically, or use an FFT
block. The rest of the processor only needs some N-bin STFT on `f_re`/`f_im`.

## Sizes and number formats

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 64 | transform length and number of channels (power of two) |
| `LMAX` | 31 | largest window half-width, at most N/2−1 (the last input of an N/2-input multiplexor) |
| `DW` | 16 | width of F_Re and F_Im, and of the multiplier inputs |
| `XW` | 9 | input sample width, chosen so that N·2^(XW−1) fits in DW bits |
| `TWF` | 14 | twiddle fraction bits |
| `AW` | 40 | width of the Real, Imag and SMStore registers, enough for 2·LMAX+1 full-scale terms |
| `Q` | 5 | reference level R² = max/25, that is 4 % of the spectrogram peak |

The 16-bit data width matches 16-bit multipliers and adders. Products are kept
at full 32-bit precision, and the sums are 40 bits wide, so nothing overflows
or saturates. All other values above are this design's own choices. They are
defaults in `tfa_pkg` and parameters of every module.

## Module hierarchy

```
sdsm_top
├── sm_control          Moore FSM: step sequence and control signals
├── stft_recursive      STFT block
│   └── stft_bin ×N     one recursive bin
├── xgen                |F|^2, maximum, reference level, x flags
└── sm_channel ×N       channel k
    ├── mux_nhalf ×2    1-bit x_{k+i}, x_{k-i} selection (SignDep)
    └── sm_subchannel ×2  (Re, Im)
        └── mux_nhalf ×2  F(k+i), F(k-i) selection
tfa_pkg                 sizes, tfd_code_e, ctrl_state_e, twiddle functions
```

## Top-level interface (`sdsm_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset clears every register |
| `tfd_code` | in | `TFD_SDSM` (signal-dependent S-method) or `TFD_SPEC` (spectrogram); read when step 2 ends |
| `x_in` | in | signed XW-bit sample; taken at the clock edge that ends a cycle with `sign_load` high |
| `sign_load` | out | sampling strobe for the external converter, once every LMAX+2 cycles |
| `tfd_valid` | out | high for one cycle while `sm_out` holds the finished previous instant |
| `sm_out[k]` | out | `SMStore` of channel k (AW bits, signed) |
| `x_flags`, `state`, `sign_dep`, `win_open`, `spec_max`, `ref_level` | out | observation of the flags, the FSM state, each channel's SignDep and window bit, the spectrogram peak and R² |

The analog front end, which samples f(t) on `sign_load`, is not part of the RTL.

## Where this design makes its own choices

These points are not fixed by the architecture, or are resolved one way here:

- **LMAX + 2 cycles per sample.** The step list has a separate STFT step, then
  i = 0 … LMAX. A rate of LMAX+1 cycles per sample would require overlapping
  the STFT update with the last SM step. That in turn would need a second copy
  of the STFT registers.
- **The window-stop register (`win_open`) and the x_k gate** described above.
- **The Real/Imag registers share the SMStore write enable.** Excluded terms
  are therefore never accumulated.
- **The flags are registered after step 2** rather than in step 1. The result is
  the same, because step 2 ignores them.
- **No demultiplexor.** Each shared unit is fed by multiplexors only. The
  adder's second input is a 2-way choice between 0 and the register, steered
  by SPECorSM.
- **The spectrogram code** idles for LMAX cycles to keep the sampling rate
  fixed.
- **The STFT block** uses the recursive form with a rectangular window, Q1.14
  twiddles and round-to-nearest.
- **The sizes** listed above: N, LMAX, the sample width, the accumulator width
  and Q.
- **No timing analysis was done.** The claim that the SM datapath is the
  critical path has not been checked in gates. The STFT step (complex multiply)
  and the flag step (squares, 64-way maximum, divide by 25) may well be longer
  and may set the clock.

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each one also has a cycle watchdog. To build
and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tfa_pkg.sv tb/tb_sdsm_top.sv \
          --top-module tb_sdsm_top -Mdir obj_top
./obj_top/Vtb_sdsm_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_sdsm_top` | The whole processor at default sizes, over 200 time instants of a tone plus a chirp plus noise. An independent bit-exact model checks every SM(n,k), and the flags in every SM step. It also checks that the sample and result strobes come every LMAX+2 cycles, and compares the model STFT with a directly computed DFT. It counts how often each mechanism occurs: windows stopped early, windows reaching LMAX, SignDep rising again after a stop, bins with x_k = 0 (including ones whose neighbours are both set), and both distribution codes. It fails if any of these never occurs. |
| `tb_stft_recursive` | All 64 bins after every load against a bit-exact recursion, with random gaps between loads. Also checked against a direct DFT. |
| `tb_xgen` | Maximum, R² and flags for random, sparse, extreme and all-zero spectra. Also that the flags update only on `x_load`. |
| `tb_mux_nhalf` | Every select code, at 16-bit and 1-bit width. |
| `tb_sm_subchannel` | The Real/Imag accumulation over the step sequence with random write enables, for bins whose indices wrap. |
| `tb_sm_channel` | SignDep, the stop rule and SMStore for random flags, including spectrogram-code instants. |
| `tb_sm_control` | The output table of every step for both codes, and the LMAX+2 period. |

`sm_control` and `sm_channel` carry concurrent assertions, which are active
with `--assert`:

- a step never both loads a sample and writes results;
- SelSTFT never exceeds LMAX;
- sample loads are exactly LMAX+2 cycles apart;
- the spectrogram step always writes;
- no write happens without SMWriteCond.

`tb_sdsm_top` runs the default configuration, with 64 channels and 33 cycles per
sample, in well under a second.
