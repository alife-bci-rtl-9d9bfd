# AQFE: an adaptive-quality wavelet feature extractor for brain-computer interfaces

A motor BCI decoder does not look at raw electrode signals. It looks at
time-frequency features: how much energy each channel carries in each
frequency band, updated several times a second. Computing these features with
a continuous wavelet transform (CWT) is accurate but multiplication-heavy. This
is the hard part of the power budget of an implantable decoder.

This RTL computes a *piecewise-linear* CWT (PLCWT). The mother wavelet is
replaced by straight segments between J subdivision points. A convolution with
a piecewise-linear function needs only a few multiplications. Integrate the
signal twice (X1, X2), and the result at every lag τ is the following sum:

    S[τ] = ψ(a_J)·X1[a_J+τ] − ψ(a_1)·X1[a_1+τ]  +  Σ_i b_i·X2[a_i+τ]

- `a_1 … a_J` are the subdivision points, as sample indices inside a 3N-sample window.
- `ψ(a_1)` and `ψ(a_J)` are the wavelet values at the two ends ("border values").
- `b_i` is the change of slope of the approximation at point `a_i`.
- J is the **quality**. It is chosen at run time, and the cycle count falls with it.

The default configuration matches the benchmark system:
- 64 channels.
- 15 wavelets per channel, giving 960 features.
- A new set of features every 100 ms (10 Hz).
- One lane (`L = 1`), clocked at 50 MHz.
- Quality levels J = 32 (high), 18 (medium) and 4 (low).

## Data flow

```
 front end ──► Input RAM ──► IntU ──X1──► SpSMU ──► Output RAM ◄──┐
 (8L bit)     (3+1)N(C/L)    │            (border    2NW x 32L    │
                             X2            products)     │        │
                             ▼                           ▼        │
                          Integ RAM ───────────────►  SpRU ───────┘
                          3N x 24L      SpW1 RAM ──►  (reduction)
              SpW0 RAM ──► SpSMU        (b_i)
              (ψ(a_1), ψ(a_J))
                         CtlU sequences all of it
```

| Unit | File | What it does |
|---|---|---|
| Input RAM | `aqfe_input_buffer.sv` (with `aqfe_sp_ram`) | Four N-sample segments per channel group. Three hold the window being processed; the fourth fills. |
| IntU | `aqfe_intu.sv` | Two trapezoid integrators: X1[n] = X1[n−1] + (x[n−1]+x[n])/2, and X2 likewise from X1. |
| SpSMU | `aqfe_spsmu.sv` | For each sample n, checks every border entry. Where n − a lies in 0..N−1, it multiplies the border value by X1[n] and writes the product to the Output RAM. |
| SpRU | `aqfe_spru.sv` | Loads the two border products of one τ into its accumulator, then adds b_i·(X2[a_i+τ] ± X2[a'_i+τ]) for each stored coefficient. |
| CtlU | `aqfe_ctlu.sv` | Frame, channel-group and wavelet loops; the cycle schedule for every single-port RAM. |
| RAMs | `aqfe_sp_ram.sv` | Single-port, registered read. One model for all five memories. |
| Top | `aqfe_top.sv` | L lanes of IntU/SpSMU/SpRU sharing all RAMs, plus the arbitration on the Output RAM. |
| Package | `aqfe_pkg.sv` | Widths, the SpRU opcode enum, X2 saturation. |

With `L > 1`, one RAM word carries L adjacent channels (lane l in bits
`8l+7..8l`, `24l+23..24l`, `32l+31..32l`). Each lane has its own IntU, SpSMU
and SpRU. Coefficients are read once and shared by all lanes. So L lanes need
1/L of the cycles for the same work, and the Input RAM keeps its total size.

## Memory sizes

At the defaults (L = 1, C = 64, N = 59, W = 15, J_max = 32, B = 17):

| RAM | Words | Width | Bits |
|---|---|---|---|
| Input | (3+1)·N·C/L = 15104 | 8L | 120,832 |
| Integ | 3N = 177 | 24L | 4,248 |
| Output | 2·N·W = 1770 | 32L | 56,640 |
| SpW0 | 2W = 30 | B + ⌈log2 3N⌉ + 1 = 26 | 780 |
| SpW1 | J_max/2 · W = 240 | 26 | 6,240 |

Total: 188,740 bits.

## The two ideas that save memory

**X1 is never stored.** The border terms need X1 only at two lags per wavelet.
The SpSMU forms those products while the integrator walks through the window.
X1 goes from the IntU straight into the multiplier. Only X2 is written to the
Integ RAM, and only for the current channel group (3N words).

**The Output RAM is reused.** A straightforward version stores three N·W
arrays: the end-border products, the start-border products, and the result.
Here the Output RAM has two regions of N·W words:

- Region 0 (`w·N + τ`) receives ψ(a_J)·X1[a_J+τ].
- Region 1 (`(W+w)·N + τ`) receives ψ(a_1)·X1[a_1+τ], already **negated**. The SpRU therefore only ever adds.
- The SpRU reads both regions, adds the reduction, and writes S[τ] back over region 0.

After a channel group, region 0 holds its W·N features at address `w·N + τ`.
The saving is a third of the Output RAM.

Because the Output RAM holds one group, the unit hands each group to the
reader before starting the next:

1. `ch_done` rises, with the group number on `ch_grp`.
2. The reader reads with `out_rd_en`/`out_rd_addr`; data appears one cycle later.
3. The reader pulses `out_release`. This is legal only while `ch_done` is high; an assertion checks it.

A slow reader therefore stalls the extractor. This costs no features.

## Symmetry: one coefficient, two X2 reads

The points of a symmetric (or antisymmetric) wavelet come in mirror pairs
around the window centre. Wavelet w's pair is `a' = a_1 + a_J − a`. Their
b_i are equal, or equal and opposite. Each SpW1 entry therefore stands for two
points. The SpRU reads X2 at `a+τ` and `a'+τ`, adds or subtracts them, and does
one multiplication. The entry's control bit selects the operation (0 add, 1
subtract), so both cases are supported.

For a point on the axis of symmetry (`a = a'`), the stored coefficient is half
the slope change, and the doubled read restores it. A subdivision of J points
thus needs at most J/2 entries. J/2 slots per wavelet are reserved in SpW1
(entry `w·J_max/2 + k`). At run time only the first `K = min(cfg_j/2, J_max/2)`
are used.

Because the unit uses a prefix of the stored entries, the entries must be
ordered. A bank can then serve several qualities, but at a given J it is only
as good as its first K entries. The end-to-end tests reload a bank per quality.

## Coefficient entries

Both coefficient RAMs hold entries `{ctrl, index, coef}`, MSB to LSB:

- `coef`: B bits, two's complement.
- `index`: ⌈log2 3N⌉ bits.
- `ctrl`: 1 bit.

| RAM | entry | index | coef | ctrl |
|---|---|---|---|---|
| SpW0 | 2w | a_1 | ψ(a_1) | 1 = value is used (0 writes a zero product) |
| SpW0 | 2w+1 | a_J | ψ(a_J) | same |
| SpW1 | w·J_max/2 + k | a_k | b_k | 1 = subtract the mirror X2, 0 = add |

Constraints on a bank:
- `a_1 < a_J ≤ 2N`.
- Every a_k lies in `[a_1, a_J]`.

Otherwise a lag `a+τ` would leave the 3N-sample window. An SpW0 border whose
window is never reached is never written, and the reduction then starts from a
stale word.

Entries are written through `cfg_we/cfg_sel/cfg_addr/cfg_wdata`. Writes are
taken only while `busy = 0`.

## Fixed point

| Quantity | Representation |
|---|---|
| x | 8-bit two's complement. |
| 2·X1 | Exact, in ⌈log2 3N⌉ + 9 = 17 bits. |
| 4·X2 | Exact, in 26 bits. |
| Integ RAM word | `sat24(4·X2 >>> 1)` = 2·X2, saturated to 24 bits (`X2_SHIFT`). |
| SpSMU product | `(ψ · 2X1) >>> cfg_smu_shift`, truncated to 32 bits. |
| SpRU product | `(b · (2X2 ± 2X2')) >>> cfg_ru_shift`, truncated to 32 bits. |
| SpRU accumulator | 32 bits, wraps modulo 2^32. |

The two 6-bit shifts are run-time inputs. Quantise the border values with Pψ
fraction bits and the b_i with Pb fraction bits. Then choose
`Pψ + 1 − smu_shift = Pb + 1 − ru_shift`, so both paths land on the same
scale. The full-size test uses Pψ = 15, Pb = 14, smu_shift = 8 and
ru_shift = 7, which gives a result scale of 2^8. The 17-bit coefficient width
is the one the published design settled on.

## Schedule and throughput

Each frame processes the C/L channel groups in turn. The cycles per group are
in the table below; K is the number of SpW1 entries used per wavelet.

| Phase | Cycles | What happens |
|---|---|---|
| Step 1 | 3N·(2W+2) | For each of the 3N samples: read x, integrate, then 2W cycles scanning all SpW0 entries. X2 goes to the Integ RAM in the first of those cycles; SpSMU writes follow one cycle behind the reads. |
| Step 2 | W·(3 + N·(2K+5)) | For each wavelet: read a_1 and a_J. Then, for each τ: load the two border products, issue two Integ reads per entry (one SpW1 read is overlapped), and write the result. |

Every RAM is single-port, and the schedule never needs two accesses to one
RAM in the same cycle. Front-end writes to the Input RAM lose to CtlU reads:
`in_ready` drops for that cycle.

Cycles per frame at the defaults (L = 1, 64 groups):

| Quality | J | Cycles / frame | At 50 MHz, 10 Hz frames (5,000,000 cycles) |
|---|---|---|---|
| high | 32 | 2,461,056 | 49 % |
| medium | 18 | 1,668,096 | 33 % |
| low | 4 | 875,136 | 18 % |

With L = 2 or L = 4 the count divides by L. Four lanes at high quality need
615,264 cycles, which fits a 12.5 MHz clock.

A frame starts when a segment completes and the buffer holds three complete
segments. The window is the three segments before the one now filling. A
segment that completes while a frame is still running would overwrite the
window in use. The unit then sets the sticky `overrun` flag and starts the new
frame as soon as the current one ends. `cfg_j` and the shifts are latched at
frame start. `frame_done` pulses at the end of a frame.

## Where this design departs from, or adds to, its source

These points are design choices, not taken from the algorithm description.

- **Window length N = 59** (590 Hz sampling, 10 Hz features). The source gives no value.
- **Sign of the reduction.** The sum is added. The sign of each term is carried by b_i.
- **Pairing of subdivision points.** Points are paired by the mirror rule above, with a per-entry add/subtract bit. The source describes symmetric wavelets as giving antisymmetric b_i. With b_i defined as slope changes, a symmetric wavelet gives symmetric b_i. The bit covers both readings.
- **Invented here:**
  - the `{ctrl, index, coef}` bit order and the meaning of the SpW0 control bit;
  - `X2_SHIFT`;
  - 32-bit wrap-around accumulation;
  - all handshakes (`in_valid/in_ready`, `ch_done/out_release`);
  - the overrun flag and the whole CtlU schedule;
  - the active-low asynchronous reset (RAM contents are not reset).
- **Not modelled:**
  - clock gates (every register and RAM has an enable for synthesis to use);
  - memory macros (the RAMs are plain arrays);
  - the acquisition front end;
  - the downstream decoder.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
Two assertions in the RTL are active in every run (`--assert`): Output RAM
exclusivity between SpSMU and CtlU, and the `out_release` rule.

| Testbench | Scope |
|---|---|
| `tb_aqfe_sp_ram` | Random reads and writes against an array; read hold while disabled. |
| `tb_aqfe_input_buffer` | Addressing, segment rotation, `filled`, read priority over writes (reduced sizes). |
| `tb_aqfe_intu` | Exact 2X1 and the saturated X2 word against the trapezoid recursion. |
| `tb_aqfe_spsmu` | Window check, addresses, negation, shift and truncation, the ctrl bit. |
| `tb_aqfe_spru` | Accumulation sequences with add and subtract pairs against a model. |
| `tb_aqfe_ctlu` | Every request the CtlU issues, compared with an independently generated schedule. Also covers the stall, overrun and J clamping. |
| `tb_aqfe_top` (with `aqfe_top_env`) | End to end at reduced sizes, run twice side by side: two lanes over 4 channels and four lanes over 8 channels. Each run has several frames, with a quality switch, J above the maximum, coefficient reloads, a slow reader, input stalls and an overrun; counts each of these. Checks the frame cycle count. |
| `tb_aqfe_full` | Default parameters, 64 channels × 15 wavelets. Synthetic input: 20 Hz + 80 Hz + noise. Morlet wavelets 10–150 Hz, at J = 32, 18 and 4 (up to J − 1 symmetric points each, the centre pairing with itself). |

`tb_aqfe_full` compares every feature bit-exactly with a fixed-point model in
`tb/aqfe_tb_pkg.sv`. It checks the frame fits in 5 M cycles. It also reports
two Pearson correlations, averaged over the wavelets:

| J | vs floating-point PLCWT, same points (cost of the fixed point) | vs exact CWT (cost of the approximation) |
|---|---|---|
| 32 | 0.9990 | 0.972 |
| 18 | 0.9996 | 0.974 |
| 4 | 1.0000 | 0.083 |

The first column must exceed 0.95 at every J, and the second at J = 32. At
4 points the approximation itself is coarse: the testbench's simple point
placement (ends, then extrema, then midpoints) is a poor fit to a Morlet
wavelet. That low figure measures the quality knob, not the arithmetic.

Run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aqfe_full \
  -y rtl -y tb +libext+.sv rtl/aqfe_pkg.sv tb/aqfe_tb_pkg.sv tb/tb_aqfe_full.sv
./obj_dir/Vtb_aqfe_full
```

Replace `tb_aqfe_full` with any testbench name. The full-size run takes a few
seconds; the others take less.
