# Width-preserving fixed-point matrix FMA for small FPGAs

This is a matrix fused multiply-add processing element for machine-learning inference on
low-end FPGAs. It computes `D = A·B + C` for square `N×N` matrices of `W`-bit fixed-point
numbers, and it returns the result at the same `W` bits as its inputs. To keep that
from overflowing, it divides the whole result by `2N`:

```
D' = (A·B + C) / (2N)        D = 2N · D'
```

The hardware outputs `D'`. The caller reads the output as `D` by multiplying by `2N`, which is
only a change of scale. The trade-off is deliberate, in the spirit of approximate computing.
The element has no wide accumulator at its output and can never overflow. In exchange it loses
`1 + log2(N)` bits of precision, so its error grows with the matrix size and falls as the data
width grows. Both widths are parameters, so you can pick the cheapest width whose error is
acceptable. The defaults are `W = 8` and `N = 8`: an 8-bit, 8×8 element.

## Number format and why it cannot overflow

Each word is signed, with one sign bit and `W-1` fraction bits, so it covers `[-1, 1)` in steps
of `2^-(W-1)`. A product of two such numbers lies in `[-1, 1]`. A sum of `N` products plus `c`
therefore lies in `[-(N+1), N+1)`. After division by `2N`, every element lies in
`[-(N+1)/(2N), (N+1)/(2N))`, which is inside `[-1, 1)` for every `N ≥ 1`. Even the extreme case
fits: all operands at −1 (each product +1) with `c` at its maximum gives `0.5 + (1-2^-(W-1))/(2N)`.
So the bits that are dropped at the output are always copies of the sign bit. An assertion in
`fma_dot_lane` checks this.

## Arithmetic of one element (`fma_dot_lane`)

One lane computes one element of `D'` from a row of `A`, a column of `B` and one element of `C`:

1. It forms the `N` products at full precision. Each is `2W` bits, with `2(W-1)` fraction bits.
2. It adds them, together with `c` shifted left by `W-1` to line up the binary points. The sum is
   exact, in `2W + log2(N) + 1` bits.
3. It shifts right arithmetically by `(W-1) + log2(2N)`. This divides by `2N` and returns to
   `W-1` fraction bits. The shift truncates, so it rounds toward minus infinity.
4. It keeps the low `W` bits and registers them. `out_valid` follows `in_valid` one clock later.

Because the sum is exact and is rounded only once, each output element is `floor(x · 2^(W-1))`,
where `x` is the exact scaled value. As a result, the error of the rescaled `D = 2N·D'` is always
below `2N` LSBs. Its mean is about `N` LSBs.

`N` must be a power of two, because the division by `2N` is a shift. Any other `N` is an
elaboration error.

## Schedule of the element (`matrix_fma_pe`, `fma_ctrl`)

```
        a,b,c ──► operand registers A,B,C
                       │ row i of A, all of B, row i of C
                       ▼
        ┌──── N lanes (fma_dot_lane), lane j → column j ────┐   N·N multipliers
        └───────────────────────┬───────────────────────────┘
                                ▼ row i of D'
                       result register D' ──► d
        fma_ctrl: IDLE ─accept─► RUN (rows 0..N-1) ─► DRAIN ─► DONE ─out_ready─► IDLE
```

- **Accept (clock t).** In `IDLE`, `in_ready` is high. When `in_valid` is also high, the operand
  registers capture `A`, `B` and `C`.
- **Run (clocks t+1 … t+N).** The controller puts row `i = 0 … N-1` of `A` on all lanes, one row
  per clock. Lane `j` gets column `j` of `B` and `C[i][j]`.
- **Write-back (clocks t+2 … t+N+1).** Each lane row is written into the result register one
  clock after it was issued. `DRAIN` covers this clock for the last row.
- **Done (from clock t+N+2).** `out_valid` is high and `d` is stable until `out_ready` takes it.
  Then the element returns to `IDLE`, and it can accept again on the next clock.

Without stalls, one operation therefore takes `N + 3` clocks: 11 clocks at 8×8. Only one operation
is in flight at a time. While busy, `in_ready` is low. When `out_ready` is low, the result is held.
Reset is synchronous and active-low, and it clears every register.

At 8×8, the element has 64 multipliers. That is about 29% of the 220 DSP slices of a Zynq
XC7Z020, which matches the roughly 30% that was reported for this operator once it moves to DSPs.
Operands and results are held in flip-flops, with no block RAM. The original operator was
generated with high-level synthesis, and its exact schedule is not known. The row-serial
schedule, the handshakes and the single register stage in each lane are this implementation's
own choices.

## Files

| File | Contents |
|------|----------|
| `rtl/fma_pkg.sv` | width helpers (`idx_bits`, `scale_shift`, `acc_bits`) and the controller state type |
| `rtl/fma_dot_lane.sv` | one dot-product lane: exact sum, scale by `1/(2N)`, truncate, register |
| `rtl/fma_ctrl.sv` | four-state row sequencer and valid/ready handshakes |
| `rtl/matrix_fma_pe.sv` | top: operand registers, `N` lanes, result register, controller |
| `tb/fma_dot_lane_tb.sv` | lane: corner and random vectors against real arithmetic, 1-clock latency |
| `tb/fma_ctrl_tb.sv` | controller: clock-by-clock issue, write-back, stall and idle checks |
| `tb/matrix_fma_pe_tb.sv` | end to end at the default 8-bit 8×8 size, with random stalls on both sides |
| `tb/fma_error_sweep_tb.sv`, `tb/fma_err_probe.sv` | error sweep over `W` ∈ {4…16} and `N` ∈ {2,4,8,16} |

Top ports (`matrix_fma_pe`): `clk`, `rst_n`, `in_valid`/`in_ready`, and `a`, `b`, `c`, which are
unpacked `[N][N]` arrays of `logic signed [W-1:0]`. The outputs are `out_valid`/`out_ready` and
`d`, an array of the same shape.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. It also has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/fma_pkg.sv \
          tb/matrix_fma_pe_tb.sv --top-module matrix_fma_pe_tb -o sim
./obj_dir/sim
```

Use the same command with `fma_dot_lane_tb`, `fma_ctrl_tb` or `fma_error_sweep_tb` as the top. The
end-to-end testbench runs the element at its default parameters, with 60 operations. It checks
every element bit for bit, checks the `N+2` clock latency, and checks that output stalls, input
waits and the largest-output and smallest-output cases all happened. The reference values come
from real arithmetic, `floor((A·B + C)/(2N) · 2^(W-1))`, not from a copy of the RTL's integer
datapath.

## Error behaviour

The sweep testbench measures the normalised mean error
`ξ = Σ|y − ŷ| / (α·K)`, with `α = 2` (the width of the range `(-1, 1)`). Here `y` is the exact
`A·B + C`, `ŷ = 2N·D'`, and `K` is the number of elements over 10 random operations. It also
reports the standard deviation. The testbench checks three things: `ξ` stays under
`N·2^-(W-1)`, `ξ` falls with every increase of `W`, and at 8 bits `ξ` grows with `N`. Typical values
with uniform random operands:

| W \ N | 2 | 4 | 8 | 16 |
|------:|------:|------:|------:|------:|
| 4  | 0.099 | 0.23  | 0.48  | 1.0   |
| 8  | 0.0081 | 0.017 | 0.033 | 0.063 |
| 12 | 0.00042 | 0.00097 | 0.0020 | 0.0039 |
| 16 | 0.000031 | 0.000059 | 0.00013 | 0.00025 |

The error roughly doubles when `N` doubles, and it falls by about 4× for every 2 extra bits. So
2 more bits of width make up for a 4× larger matrix. At 4 bits the scaling leaves almost
nothing: for `N ≥ 8`, `2N·D'` has a quantisation step of 2 or more.

## Departures and open points

- **Datatype.** Only signed fixed point is built. A generic element would also accept other
  number types, but only fixed point was characterised, and no other format is specified here.
- **Where rounding happens.** This design keeps the sum exact and truncates once at the end. An HLS
  build that stores every scaled product in a `W`-bit type would round `N+1` times and lose more
  accuracy. The error figures above belong to this RTL.
- **Rounding mode.** Rounding is truncation, the usual default of fixed-point types. Rounding to
  nearest would halve the mean error for the cost of one adder per lane.
- **Power-of-two `N`.** Other sizes would need a constant divider in place of the shift.
- **No overlap.** A new operation cannot start until the result has been taken. If you need more
  throughput, double-buffer the operand and result registers. If you need less area, give each
  lane fewer multipliers and let it iterate over `k`.
- **System around the element.** The host processor, its operating system and driver, and the
  bus that carries operands to the element are not part of this RTL. The element's handshaked
  ports are where such a bus adapter would attach.
