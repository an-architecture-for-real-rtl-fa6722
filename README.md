# 2-D S-method processor: one multiplier, many clock cycles

This RTL computes the two-dimensional **S-method (SM)**, a space/spatial-frequency
distribution, from a stream of 2-D short-time Fourier transform (STFT) elements.
For every frequency point (k1,k2) of an N x N STFT frame, the SM adds up products
of STFT elements placed symmetrically around that point, inside a (2L+1) x (2L+1)
frequency window:

    SM(k1,k2) = sum over i1,i2 in [-L, L] of  STFT(k1+i1, k2+i2) * conj(STFT(k1-i1, k2-i2))

With L = 0 this is the 2-D spectrogram |STFT|^2. As L grows, the result approaches
the 2-D Wigner distribution: it is more sharply concentrated, and the window width
limits the cross-terms. The real part and the imaginary part of the STFT each
contribute an independent real sum, SM = SM_R + SM_I. Each sum folds its symmetric
pairs together:

    SM_R = X(k1,k2)^2
         + 2 * sum_{i1=0..L} sum_{i2=1..L} X(k1+i1, k2+i2) * X(k1-i1, k2-i2)
         + 2 * sum_{i1=1..L} sum_{i2=0..L} X(k1+i1, k2-i2) * X(k1-i1, k2+i2)

Here X is the real part; SM_I is the same sum over the imaginary parts. The sum has
**cn(L) = 2L^2 + 2L + 1** terms: 1 for the spectrogram, 5 for L = 1 and 13 for L = 2.

The central idea is a *multiple-clock-cycle* evaluation. A fully parallel
evaluation of the sum needs cn(L) multipliers, about 2L^2+2L adders and a long
adder chain. This design instead has, per line, **one multiplier, one 1-bit left
shifter and one accumulating adder**, and it takes one term per clock. So the clock
period is one multiply, one shift and one add, whatever L is. One set of hardware
serves the spectrogram and every SM up to the built window, and each needs only
cn(Lsel) clocks. `Lsel` is the half-width chosen at run time; `L` is the half-width
built into the hardware.

## Structure

```
 stft_in_clk ─┐
 stft_in_re/im┴─> clock_sync ──shift_en,sample──┬───────────────┬──────────────┐
                                                │               │              │
 cfg_din/addr/en ─> config_regs ─FD,SC,WS,DB,EOF┼─> window_ctrl │              │
                                                │   │ sm_start, sm_clk_en,     │
                                                │   │ left_border, down_border │
                                 re part        v   v           im part        v
                       conv_window_regfile   sm_gateway   conv_window_regfile  sm_gateway
                       (window regs + FIFOs)─>(MUX,MULT,  (window regs+FIFOs)─>(same)
                                              SHL,ACC,OUT)
                                                    │ SM_R                      │ SM_I
                                                    └──────────> + <────────────┘
                                                                 v
                                                  sm_out, sm_re, sm_im, sm_valid, sm_eof
```

| module | role |
|---|---|
| `sm2d_pkg` | `cn()`, the term schedule (`term_code`), register addressing, configuration address enum |
| `config_regs` | the five frame/window registers FD, SC, WS, DB and EOF |
| `clock_sync` | synchronises the STFT strobe to `clk`; gives one shift enable per element |
| `fifo_delay` | programmable delay of FD steps between two window rows |
| `conv_window_regfile` | (2L+1)^2 window registers + 2L FIFO delays (a line buffer) |
| `window_ctrl` | counts window positions; starts the gateways; flags the cells outside the frame |
| `sm_gateway_ctrl` | step counter + ROM: operand addresses, doubling flag and store flag per step |
| `sm_gateway` | the shared multiply / shift / accumulate datapath and its output register |
| `sm2d_top` | everything above, with a real and an imaginary line and the final adder |

Everything runs on one clock, `clk`. Where a slower clock would be needed (the
input shift clock, the gated gateway clock), the design uses a one-cycle enable of
`clk` instead.

## The sliding window (line buffer)

Elements arrive in raster order, with k2 running fastest. Element `din` enters
register 0. Each window row is a chain of 2L+1 registers. The end of each row feeds
a `fifo_delay` of FD = N-(2L+1) steps, and that FIFO feeds the start of the next
row. From the entry of one row to the entry of the next is therefore exactly N
steps, one frame row. So register (r,c), at address r*(2L+1)+c, holds the element
that entered r*N + c steps ago. If the newest element is X(k1+L, k2+L), register
(r,c) holds X(k1+L-r, k2+L-c).

For L = 1:

```
 addr 0: (k1+1,k2+1)  1: (k1+1,k2)  2: (k1+1,k2-1)  -> FIFO ->
 addr 3: (k1,  k2+1)  4: (k1,  k2)  5: (k1,  k2-1)  -> FIFO ->
 addr 6: (k1-1,k2+1)  7: (k1-1,k2)  8: (k1-1,k2-1)
```

The FIFO length comes from the FD register at run time. Any frame width up to N
can therefore be processed without rebuilding; the window size is fixed by the
parameter `L`.

## The gateway schedule

`sm_gateway_ctrl` holds a ROM. It is built at elaboration from `sm2d_pkg::term_code`
and indexed by step. The steps are ordered so that the schedule of any smaller Lsel
is a prefix of the schedule of a larger one:

* step 0 is the centre squared, without doubling. This step alone is the spectrogram.
* After that come rings m = 1, 2, ... L. Ring m holds the 4m symmetric pairs whose
  largest offset is m. The first double sum comes first (i1 = 0..m, i2 = 1..m), then
  the second (i1 = 1..m, i2 = 0..m). Every product is doubled by the shifter.

For L = 1 (the operands are register addresses):

| step | operand 1 | operand 2 | doubled | term |
|---|---|---|---|---|
| 0 | 4 | 4 | no | X(k1,k2)^2 |
| 1 | 3 | 5 | yes | X(k1,k2+1) X(k1,k2-1) |
| 2 | 0 | 8 | yes | X(k1+1,k2+1) X(k1-1,k2-1) |
| 3 | 1 | 7 | yes | X(k1+1,k2) X(k1-1,k2) |
| 4 | 2 | 6 | yes | X(k1+1,k2-1) X(k1-1,k2+1) |

The distribution code `tfd` (0..L; larger values count as L) sets the last step.
It is sampled on `sm_start`. On the last step the accumulator's new value goes to
the output register, and the step counter returns to zero. `ext_reset` abandons an
evaluation in progress. The top drives it from `clear`, so a restart never leaves a
half-finished result behind.

## Frame control and border padding

The five configuration registers are counted in window sliding steps. Their reset
values are the formulas below evaluated for the parameters; with the defaults they
are FD=61, SC=130, WS=3, DB=3968 and EOF=4095.

| addr | register | value for an Nf x Nf frame | use |
|---|---|---|---|
| 0 | FD | Nf-(2L+1) | FIFO length; Nf = FD+WS is the frame width |
| 1 | SC | 2L*Nf + 2L | the window is full once element SC has entered |
| 2 | WS | 2L+1 | window size (must equal the built 2L+1) |
| 3 | DB | (Nf-2L)*Nf | first position whose window reaches below the last row |
| 4 | EOF | Nf*Nf-1 | last window position of a frame |

After a reset or `clear`, `window_ctrl` lets the first SC elements only fill the
window. The element after that starts window position s = 0, and every further
element starts the next position, from 0 to EOF and around again. Frames follow one
another with no gap.

**Which point a result belongs to.** Position s has its top-left cell at frame row
s / Nf and column s mod Nf. Its result is the SM of the window centre, cell
(s/Nf + L, s mod Nf + L). A window cell beyond the right edge of the frame holds an
element from the left edge of the next row; the design flags its column in
`left_border`. A cell below the last row holds an element of the next frame; the
design flags its row in `down_border`. The gateway reads a flagged cell as zero,
which pads the frame with zeros on the right and at the bottom. The first L rows and
columns of a frame are never a window centre. The last L rows and columns are
centres, and their windows are partly padded.

## Timing

* **Input.** `stft_in_re`/`stft_in_im` must be valid when `stft_in_clk` rises, and
  stay valid until the next `clk` edge. The strobe must stay high for at least one
  `clk` period and low for at least one. Its period must be at least cn(Lsel) clocks,
  and at least 2: that is 5 clocks for L = 1 and 13 for L = 2. The strobe may be
  asynchronous to `clk`.
* **Pipeline.** The strobe edge passes two synchroniser stages and an edge detector
  (3 clocks). Then the window shifts and `sm_start` executes step 0. Steps 1..cn-1
  follow on the next clocks. The next element may already shift in during the last
  step.
* **Latency.** `sm_valid` goes high on the (cn(Lsel)+4)-th clock edge after the
  edge that first samples the strobe high. For a strobe that rises just after a
  clock edge, that is cn(Lsel)+5 clocks; the end-to-end test checks this figure.
* **Throughput.** One result per strobe period, so at best one result every cn(Lsel)
  clocks.
* `sm_eof` comes with the result of position EOF.
* `tfd` is sampled when a window position starts, about 5 clocks after its strobe. To
  switch distributions cleanly at a frame boundary, hold the first element of the
  new frame back until the windows already in flight have started (the end-to-end
  test waits 6 clocks).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `W` | 8 | STFT element width (signed) |
| `N` | 64 | largest frame size; sets the FIFO depth N-(2L+1) and the counter widths |
| `L` | 1 | built window half-width; run-time codes 0..L |
| `CW` | $clog2(N*N+1) | configuration register width |
| `AccW` | 2W+$clog2(2cn(L))+1 | accumulator width: no overflow for any input |

At the defaults, per line: 9 x 8 window register bits and 2 x 61 x 8 = 976 FIFO
memory bits. The two lines together use about 400 word-level cells and about 500
flip-flop bits after generic synthesis. A 256 x 256 frame needs `N=256`, which gives
FIFOs of 253 words. L = 2 needs `L=2` (a 5x5 window and 4 FIFOs).

## Verification

Each testbench checks its block against values computed independently, prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_config_regs` | reset values, addressed writes, ignored writes |
| `tb_clock_sync` | one pulse per strobe edge, the word it carries, 3-clock latency |
| `tb_fifo_delay` | delay equals `len` for several lengths, with idle gaps |
| `tb_conv_window_regfile` | every register equals the stream delayed by r*Nf+c (L=2, two frame widths) |
| `tb_window_ctrl` | start pulses, position, end of frame, border flags from the window geometry |
| `tb_sm_gateway_ctrl` | the schedule is exactly the symmetric pair set for each code; pauses |
| `tb_sm_gateway` | results against the unfolded double sum (L=2, random padding), cycle count |
| `tb_sm2d_top` | end to end at the default size: two 64x64 frames (L=1, then spectrogram), then reprogrammed 16x16 frames; every result, latency, frame markers; counts border, mode-switch, reconfiguration and full-rate events |
| `tb_sm2d_workloads` | one 256x256 frame at L=1 (5 clocks/point), one 64x64 frame at L=2 (13 clocks/point), and a 5x5 build run at code 1; every result and the throughput |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sm2d_pkg.sv tb/tb_sm2d_top.sv --top-module tb_sm2d_top -o sim
./obj_dir/sim
```

Every testbench finishes in seconds.

## Where this RTL makes its own choices

The architecture follows the published design: the window register file with its
FIFO line buffer, a gateway built from two multiplexers, a multiplier, a left
shifter, an accumulator, an output register and a counter-plus-table controller,
the five configuration registers and their formulas, and the border control signals.
The following points are this implementation's own choices:

* **One clock with enables.** There are no derived or gated clocks, and the halved
  clocks of the original drawing are not reproduced.
* **Term order.** The design names the centre-first order and the growing indices.
  The exact ring order, and the table built from it, belong to this implementation.
* **Border flags.** They are per-column and per-row vectors applied at the
  multiplexer inputs, not single signals. This RTL's reading of SC, DB and EOF
  (results indexed from the first full window, right and bottom padding) is an
  interpretation of the parameter formulas.
* **Imaginary line.** The top instantiates a second, identical line for the
  imaginary part and adds the two outputs. The published resource figures (FIFO
  memory of 2 x (N-3) x 8 bits plus a constant) match a single line. A one-line
  device is the same RTL with the imaginary `conv_window_regfile`/`sm_gateway` pair
  and the final adder removed.
* **Everything else.** Widths beyond the 8-bit input, signedness, the reset values of
  the configuration registers, the register address map, the synchroniser, the
  handshake timing and the reset behaviour are all chosen here.
* **Not included.** The 2-D STFT module that produces the input, the host that writes
  the configuration, and the mapping onto a particular FPGA are outside this RTL.
  The Wigner-distribution limit (a window as wide as the frame) is possible in
  principle by setting `L`, but it is not practical in size.

## Files

`rtl/` holds the synthesizable modules, one per file, and the package `sm2d_pkg`.
`tb/` holds the testbenches and `sm2d_stream_check`, a parameterised stream checker
that `tb_sm2d_workloads` uses.
