# Constant-time GF(p) co-processor for side-channel-resistant ECC

This is a small co-processor that an 8-bit microcontroller (an 8051) uses for
elliptic-curve cryptography over a 160-bit prime field. The split between
software and hardware is deliberate:

- **Software** on the microcontroller runs point multiplication (binary
  method), point addition and point doubling. Each of these is a fixed list
  of field operations.
- **Hardware** runs each field operation as one instruction. There are two
  kinds: a Montgomery multiply-add (`MALU`) and a modular add/negate (`CP`).
  Each instruction takes a fixed number of clocks whatever its operands.

This split guards against timing analysis and simple power analysis. The
hardware keeps every operation's duration independent of the data. The
software pads point doubling with dummy operations until it issues the same
sequence of operation kinds as point addition. The power and timing trace of
a point multiplication then shows a uniform string of equal-length point
operations. An attacker can no longer read the key bits from the pattern of
doublings and additions.

The RTL implements the design described in *HW/SW Co-design of TA/SPA-resistant
Public-key Cryptosystems*: the carry-save Montgomery array, the
carry-propagate stage, the operand RAM, the instruction decoder and the port
interface. It also gives the point-operation schedules as test software. The
microcontroller itself is not part of the RTL. Where the original description
is silent, this design makes its own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
 8051 ports ──► pport_if ──► coproc_ctrl ──► regfile (32 x 164 bit)
 P0,P2,P3.0     buffer, IR    decoder/FSM  ◄──┘
 P1,P3.1 ◄──                     │  ▲
                                 ▼  │
                         opnd_prep (x2, /2 mod N)
                                 │
                     ┌───────────┴───────────┐
                     ▼                       ▼
                   malu  ── S,C0,C1 ──►   cp_stage ──► result to regfile
        (L columns of malu_cell,     (add 3 vectors, -2N, -N)
         D Montgomery steps/clock)
```

| File | Role |
|---|---|
| `rtl/ecc_pkg.sv` | sizes, instruction format, port command codes |
| `rtl/csa53.sv` | 5-input, 3-output carry-save counter |
| `rtl/malu_cell.sv` | one column of the multiplier array |
| `rtl/malu.sv` | the carry-save (CS) stage: digit-serial Montgomery multiply-add |
| `rtl/cp_stage.sv` | carry propagation and reduction mod N |
| `rtl/opnd_prep.sv` | operand modifiers: 2v, v/2 mod N |
| `rtl/regfile.sv` | operand RAM |
| `rtl/pport_if.sv` | microcontroller port interface |
| `rtl/coproc_ctrl.sv` | instruction decoder and sequencing FSM |
| `rtl/ecc_coproc.sv` | top level |

## The instruction set

Field elements are kept in Montgomery form, ã = a·R mod N, with R = 2^L and
L = 164. Both instructions read three registers and write one:

| Instruction | Result written to `rd` |
|---|---|
| `MALU rd, X, Y, S` | X·Y·2^-L + S mod N |
| `CP rd, A, B, C` | A + B + C mod N |
| `CP.neg rd, A, B, C` | A + ~B + C mod N (~B is the 166-bit complement) |

On Montgomery-form values, `MALU(x̃, ỹ, s̃)` is the Montgomery form of x·y + s.
A multiply and an add therefore cost one instruction. Subtraction uses
negation. With A = 2N+1 and C = 0, `CP.neg` gives 2N + 1 + ~t = 2N − t,
which is −t mod N. The schedules write this as `CP_N(2N+1, t, 0)`. Ordinary
addition is `CP` without the flag.

Two operand modifiers are applied while an operand is read from the RAM:

- The X operand (A for CP) can be doubled or halved mod N.
- The S operand (C for CP) can be halved mod N. The hardware allows doubling
  here too, but no schedule uses it.

Halving mod N computes (v + v₀·N)/2. The schedules need these operands
directly, for example `MALU(2X2, X2, t1)` or `MALU(t4/2, Y2, t1/2)`.

### Encoding

32-bit instruction word, loaded least significant byte first:

| Bits | Field | Meaning |
|---|---|---|
| 31:30 | `op` | 0 NOP, 1 MALU, 2 CP |
| 29 | `neg` | CP: complement operand B |
| 28:27 | `xmod` | X/A modifier: 0 none, 1 ×2, 2 ÷2 mod N |
| 26:25 | `smod` | S/C modifier, same codes |
| 24:20 | `rd` | destination register |
| 19:15 | `rx` | X (CP: A) |
| 14:10 | `ry` | Y (CP: B) |
| 9:5 | `rs` | S (CP: C) |

### Operand ranges

The results are exact and fully reduced (below N) under these conditions:

- N is odd and below 2^(L−3).
- For MALU: X < 4N, Y < 2N and S < 2N. A doubled register value meets this.
- For CP: A + B' + C < 4N, where B' is B or its complement. This holds for
  every use in the schedules.

The range conditions on the operands are not checked in hardware.
Assertions do check that N is odd and that the MALU's Y operand leaves the
top bit of the array free.

## The MALU carry-save array

This is the core of the design and the part that takes the most care to read.

**Recurrence.** Bit-serial Montgomery multiplication repeats, for each bit
xᵢ of X from the least significant end:

    T ← (T + xᵢ·Y + mᵢ·N) / 2,     mᵢ chosen so that the sum is even

After L steps T = (X·Y + M·N)/2^L ≡ X·Y·2^−L (mod N).

**Redundant state.** The array never propagates carries. The running value T
is held as three L-bit vectors S, C0 and C1. All three have the same weight
per column, so T = Σⱼ (sⱼ + c0ⱼ + c1ⱼ)·2^j.

**Five-to-three counters.** In column j, a step adds five bits of weight 2^j:
sⱼ, c0ⱼ, c1ⱼ, xᵢ·yⱼ and mᵢ·nⱼ. The count (0 to 5) fits in three bits: a sum
bit of weight 2^j, carry0 of weight 2^(j+1) and carry1 of weight 2^(j+2).
Dividing by two is only a change of column:

| counter output | goes to (after ÷2) |
|---|---|
| sum bit | S of column j−1 |
| carry0 | C0 of column j |
| carry1 | C1 of column j+1 |

**Quotient bit.** The sum bit of column 0 would fall off the bottom, so it
must be zero. N is odd (n₀ = 1), so mᵢ = s₀ ⊕ c0₀ ⊕ c1₀ ⊕ xᵢy₀. This parity
is computed in column 0 and broadcast to all columns.

**D steps per clock.** `malu_cell` stacks D = 4 counters, one per step. Level
l handles multiplier bit x[4k+l] in clock k. Level l's sum bit feeds column
j−1 at level l+1, and its carry1 feeds column j+1 at level l+1. Its carry0
stays in the same column. After the last level, all three vectors are
registered. A multiplication therefore takes L/D = 41 clocks. The critical
path runs through D levels of counters and the quotient logic of column 0.

**Adding S.** The addend S enters at the top of the array. In each clock the
next D bits of S are fed, least significant first, as the sum inputs of the
top column (column L−1). One bit feeds each level, and the last one goes into
the S register. A bit injected after step t is halved L−1−t more times.
Injecting bit sₜ at weight 2^(L−1) therefore adds exactly sₜ·2^t to the
final result:

    T_final = (X·Y + M·N)/2^L + S

No extra adder or clock is needed for the "+ S".

**Why L = K + 4.** With X < 4N and Y < 2N, X·Y/2^L is below N once
2^L > 8N, which needs L ≥ K + 3. The result is then below N + N + S < 4N.
L is rounded up to a multiple of D, giving 164. Y and N leave the top column
of the array empty, so no carry ever leaves it. An assertion checks this
during simulation, together with the zero sum bits leaving column 0.

**Output.** The array leaves (S, C0, C1) in its registers. The carry-propagate
stage adds the three vectors in one clock. It then reduces the result in two
clocks: first subtract 2N if the value is ≥ 2N, then subtract N if it is
≥ N. Both differences are always computed, so the time never depends on the
data.

## Timing and the constant-time property

The controller's state sequence depends only on the instruction kind:

| Instruction | Clocks from EXEC request to idle |
|---|---|
| MALU | 50 (1 decode + 3 operand reads + start + 41 array clocks + 3 CP-stage clocks + write-back) |
| CP | 8 |
| STORE / LOAD / SETN | 1 / 2 / 1 |

The port traffic adds a fixed amount per instruction: five strobes to load
the instruction register and start it. The duration of a point operation
therefore depends only on how many MALU and CP instructions it issues, and
in which order.

### Balanced point operations

The schedules give point addition as 21 MALU + 5 CP and point doubling as
15 MALU + 3 CP. Both work on Jacobian coordinates in Montgomery form, with
Q ← P + Q and Q ← 2Q. The balanced doubling below interleaves 6 dummy MALU
and 2 dummy CP operations, and moves one real negation earlier. Its kinds of
operations then follow exactly the addition's order, with CP in positions 5,
11, 15, 18 and 23 of 26:

| # | Addition | Balanced doubling |
|---|---|---|
| 1–4 | t1=Z1², t2=X2·t1, t3=Z2², t4=X1·t3+t2 | t1=X2², t1=2X2·X2+t1, t2=Z2², t2=t2² |
| 5 | CP t2=−t2 | CP dummy |
| 6–10 | five MALU | t2=a·t2, t1=1·t1+t2, t2=2Y2·Y2, t3=2t2·t2, t2=2X2·t2 |
| 11 | CP t1=−t1 | CP t3=−t3 (moved up) |
| 12–14 | three MALU | t4=2·t2, dummy, dummy |
| 15 | CP t4=−t1 | CP t4=−t4 |
| 16–17 | two MALU | X2=t1·t1+t4, t4=1·X2 |
| 18 | CP t4=−t4 | CP t4=−t4 |
| 19–22 | four MALU | t2=1·t2+t4, Z2=2Z2·Y2, Y2=t1·t2+t3, dummy |
| 23 | CP t1=−t1 | CP dummy |
| 24–26 | three MALU | three dummy MALU |

Here "1" and "2" denote the Montgomery forms of those constants, held in
registers. The addition leaves (X3, −Y3, −Z3), which is the same point in
Jacobian coordinates. The full sequences are in `tb/tb_ecc_coproc.sv`
(`point_add`, `point_dbl`).

In simulation, every balanced doubling and every addition takes 1220 clocks,
including the port traffic, with identical MALU/CP issue times. An unbalanced
doubling is visibly shorter.

### What the power trace shows

`tb_spa_trace` repeats the original power experiment, using toggle counts as
the power estimate. It runs the same random 160-bit scalar multiplication
twice, once with plain doublings and once with balanced ones. On every clock
it records the toggle count: the number of bits that changed in the MALU and
CP-stage registers.

An attacker model sees only this trace:

- Each burst of activity is one instruction. A long burst is a MALU (about
  41 clocks) and a short one a CP.
- The resulting string of operation kinds is matched against the doubling
  and addition patterns.

Results:

| Software | Clocks for kP | What the trace gives away |
|---|---|---|
| plain doubling (15M+3A) | 231,320 | all 159 key bits below the leading one, recovered exactly |
| balanced doubling (21M+5A) | 287,924 | only a uniform run of 236 identical point operations |

The countermeasure costs 24 % more co-processor clocks here. The 15 % quoted
for the original system includes the microcontroller's own run time, which
is the same in both cases. The trace still reveals the number of point
operations, and with it the Hamming weight of the key. Data-dependent
differences in the toggle counts, which matter for differential attacks,
are outside what this design addresses.

## Port interface

The co-processor hangs on the 8051's I/O ports and shares its clock:

| Pin | Use |
|---|---|
| P2 | command byte |
| P0 | argument byte (data or register number) |
| P3.0 | strobe (one clock), allowed only while busy is low |
| P1 | low byte of the 168-bit operand buffer |
| P3.1 | busy |

| Command (P2) | Effect |
|---|---|
| 0x01 BUF_IN | shift P0 into the top of the operand buffer (send LSB byte first, 21 bytes) |
| 0x02 BUF_OUT | shift the buffer down one byte; P1 shows the next byte |
| 0x03 STORE | RAM[P0] ← buffer |
| 0x04 LOAD | buffer ← RAM[P0] |
| 0x05 SETN | modulus register ← buffer |
| 0x06 IR_IN | shift P0 into the instruction register (LSB byte first, 4 bytes) |
| 0x07 EXEC | execute the instruction register |

Buffer and IR commands never raise busy. STORE, LOAD, SETN and EXEC raise
busy in the clock after the strobe, and busy stays high until the controller
is idle. An assertion flags a strobe while busy.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_malu_cell` | per-level counts, carries and quotient parity on random and corner inputs |
| `tb_malu` | r·2^L ≡ X·Y + S·2^L (mod N) and r < 4N for random and extreme operands; latency L/D + 1 |
| `tb_cp_stage` | sums below 4N, negation form, corner sums; 3-clock latency |
| `tb_regfile` | write/read of all words, read-during-write, read latency |
| `tb_pport_if` | byte assembly, P1 sequence, IR, requests, busy, LOAD return |
| `tb_coproc_ctrl` | operand fetch, modifiers, negation, write-back, NOP; 50/8-clock instruction times |
| `tb_ecc_coproc` | the whole co-processor driven through the ports (see below) |

`tb_ecc_coproc` runs at the default sizes and does the following:

1. Checks every instruction form against a shadow model.
2. Builds a curve y² = x³ − 3x + b over p = 2^160 − 2^31 − 1 through a
   random point P, and converts P to Montgomery form on the co-processor.
3. Runs addition, balanced doubling and one unbalanced doubling.
4. Runs a full 160-bit scalar multiplication with the binary method and
   balanced doublings.
5. Converts the result back on the co-processor and compares it, in affine
   coordinates, with a reference double-and-add. It also checks that the
   result lies on the curve.
6. Requires every point operation to show the same timing pattern.
7. Counts each mechanism (modifiers, negation, dummies, busy waits, NOP,
   LOAD/STORE/SETN) and fails if one never occurred.

It runs in a few seconds of simulation time, plus about a minute of C++
compilation. `tb_spa_trace` (see above) is the side-channel experiment.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/tb_ecc_coproc.sv --top-module tb_ecc_coproc -o sim
./obj_dir/sim
```

The same pattern works for the other testbenches. To lint a module, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/ecc_pkg.sv rtl/<module>.sv`.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `K` | 160 | field size of the ECC-160p case |
| `D` | 4 | multiplier bits per clock (the array's depth); own choice |
| `ALPHA` | 4 | extra array columns; own choice, see above |
| `L` | 164 | K + ALPHA; array width, register width, R = 2^L |
| `NREGS` | 32 | operand RAM words; own choice |
| `BUF_W` | 168 | operand buffer, L rounded up to bytes |

To change the field size, change `K` and keep `L` a multiple of `D`, with
L ≥ K + 3. Increasing `D` divides the number of MALU clocks by the same
factor, but the combinational path through the array grows by one counter
level and one quotient computation per step.

## Departures and own choices

- **Quotient bit.** The original cell equations give a formula for mᵢ that
  cannot be right as printed. This design uses the standard parity of the
  column-0 inputs.
- **Sum bits are registered.** The original array drawing shows flip-flops
  only on the two carries. With several steps per clock, the sum bits must
  also be held between clocks, so they are registered here.
- **Three-operand CP.** The CP operation is defined with two operands but
  used with three, always as (2N+1, t, 0). It is implemented as A + B' + C
  with an optional complement of B. The two-operand form is the special case
  C = 0.
- **Stages run in turn.** The CS-stage and the CP-stage are separate units,
  but the controller never overlaps them: a MALU instruction finishes its
  CP-stage pass before the next instruction starts. Overlapping them would
  save 3 clocks per MALU at the cost of a second hazard check, and the
  instruction times would still be constant.
- **Reduction.** Results are fully reduced below N by two constant-time
  conditional subtractions. The original text only says "mod N".
- **Own choices.** The values of D and α, the register count, the instruction
  encoding, the operand modifiers, the port protocol and the reset behaviour
  (synchronous, active low) are all this design's choices.
- **Reported figures not reproduced.** The evaluated system's figures cover
  the whole system including the microcontroller software: 91.7 ms per point
  multiplication unprotected and 105.6 ms protected at 12 MHz, and the FPGA
  resource counts. The RTL is not calibrated to them.
- **Not included.** The microcontroller, its program ROM and data RAM, and
  the software are not part of the RTL. The testbench plays their role.
  Coordinate conversion to and from affine form needs a modular inverse,
  which is done in software; the testbench computes it itself.
