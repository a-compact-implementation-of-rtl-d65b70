# Edon80 with a single e-transformer

Edon80 is a binary additive stream cipher: from an 80-bit key and a 64-bit
IV it produces a keystream that is XORed with the plaintext. Its internal
state is 80 two-bit symbols a_0 … a_79. The reference architecture gives
every state symbol its own stage ("e-transformer"): 80 quasigroup units
working as a pipeline, each with its own registers and a tag bit.

This RTL implements the cipher at minimal area instead. It has **one**
e-transformer and moves the 80 states past it. The states sit in a
shift register. Each clock the e-transformer combines the symbol leaving the
bottom of the register with the symbol that was updated one clock before,
and writes the result back in at the top. One pass of 80 clocks (a
*round*) updates every state once, in order, just as one input symbol
passing through the 80-stage pipeline would. The cost is throughput: 2
keystream bits every 160 clocks, i.e. 1/80 bit per clock (2.19 Mbit/s at
175 MHz). The gain is that nearly all of the area is three plain shift
registers (400 bits), which map well onto FPGA shift-register LUTs or dense
ASIC flip-flop chains.

The XOR with the data stream is not part of this block. Neither is the
padding of the IV. Both are left to the user of `data_out` and `data_in`.

## The state ring

The core of the design is three modules: `ashr`, `kshr` and `etransformer`.

```
            +-------------------------- aSHR (80 x 2 bit) ---------------------+
  a_out --->| pos 79 | pos 78 | ...                     ... | pos 1 | pos 0  |---> a0 (a_this)
            +------------------------------------------------------------------+
               |
               +--> a79 (a_prev) : the state updated on the previous clock

  kSHR (40 x 2 bit), rotating: k0 = K_(i mod 40) while state i is at a0

  a_out = Q[key](a = a_this, p = use_ext ? external p : a_prev)
```

Suppose a round starts with state a_0 at position 0. On that clock
(`use_ext` = 1) the e-transformer combines a_0 with an external symbol p.
That symbol comes from the init shift register during IVSetup and from a
2-bit counter in Keystream mode. At the clock edge the register shifts:
a_1 reaches position 0, and the new a_0 enters position 79, where it is
`a_prev` for the next update. So a_i is always combined with the new
a_(i-1), which is exactly the pipeline's rule p_i = a_(i-1). After 80 clocks
the new a_0 is back at position 0 and the next round can start.

Key symbol K_(i mod 40) belongs to state i. The 40-entry key register
rotates by one place every clock, so `k0` always holds the right key for the
state being updated. Because 80 is a multiple of 40, the key register is
back at K_0 at the start of every round.

The e-transformer holds no state. It is the quasigroup plus three 2:1
multiplexers: external p or `a_prev`; `p_in` or `p_count`; `k_init` or `k`.

## Loading: one long shift chain

No separate key or IV register exists. While `init` is high, all three shift
registers form one serial chain: `data_in` goes into the init register, the
init register feeds the state register, and state position 40 feeds the key
register. Send one symbol per clock for 160 clocks:

| clocks  | symbols on `data_in`                                     |
|---------|----------------------------------------------------------|
| 0–39    | K_0, K_1, …, K_39                                        |
| 40–79   | v_0, v_1, …, v_39 (v_32…v_39 = 3,2,1,0,0,1,2,3, the pad) |
| 80–119  | v_39, v_38, …, v_0                                       |
| 120–159 | K_39, K_38, …, K_0                                       |

K_0…K_39 are the key's 40 consecutive 2-bit values, K_0 first, and
v_0…v_31 the IV's 32 consecutive 2-bit values; bit 1 of a symbol is its
high bit. The padding 1110010000011011b is 3,2,1,0,0,1,2,3 in
base 4. Afterwards the state register holds K_0…K_39, v_0…v_39 and the key
register holds K_0…K_39. The init register holds v_39…v_0, K_39…K_0: the
80 "leader" symbols that IVSetup needs. While `init` is high the control
counters are held at zero, so `init` also serves as the design's
synchronous reset. Raising `init` at any time abandons the current run.

## IVSetup: 80 rounds with a moving leader

When `init` falls, IVSetup starts and lasts 80 rounds × 80 clocks = 6400
clocks. Round r does three things:

* it feeds the leader at init position 0 into state 0. Over the rounds these
  are v_39, …, v_0, then K_39, …, K_0;
* it updates all 80 states with the single key symbol K_(r mod 40);
* at its end it steps the init register once.

The init register feeds position 40 back to its top, so after the first 40
steps its upper half repeats. That is how the K_39…K_0 leaders come round
without being loaded twice.

This is the reference IVSetup with the two loop orders swapped. The string
that the reference pipeline feeds in (key, then IV) becomes the initial
state. The reference's initial stage values become the leaders fed in one
per round. Stage i's quasigroup becomes round i's key. This form needs no
tag bits and no write-back path.

**Key order during IVSetup.** The cipher needs the key sequence K_0, K_1, …,
K_39, K_0, …, K_39 over the 80 rounds. The published block diagram takes the
IVSetup key from init register position 40. With the load order above, that
tap gives K_39, K_38, …, K_0 twice: the same keys in reverse order. No load
order can fix this, because the same 40 symbols have to serve as the
leaders K_39…K_0 in rounds 40–79. So the default here takes the IVSetup key
from the key register instead. During IVSetup that register steps once per
round, on the last clock, not every clock. Round r then sees K_(r mod 40),
and after 80 steps the register is back at K_0 for Keystream mode. The
parameter `KINIT_FROM_INIT40 = 1` restores the literal diagram wiring
(IVSetup key from init position 40, key register rotating every clock). The
two settings give different keystreams. Both are tested, each against a
reference model in its matching key order.

`t_in` is ignored during loading and IVSetup.

## Keystream mode

After IVSetup the rounds continue. Now the external p for state 0 is the
2-bit counter n mod 4, where n is the keystream round number. It is the low
two bits of the round counter: this works because 80 is a multiple of 4.
At the last clock of every odd round (n = 1, 3, 5, …) the value just
computed for a_79 is a keystream pair. `writeout` captures it into the 2-bit
`data_out` register, and `ready` pulses for one clock when the new value
appears. The even rounds are computed but not output, as the cipher requires.

| event                                   | clocks after `init` falls |
|-----------------------------------------|---------------------------|
| IVSetup ends                            | 6400                      |
| first `ready` pulse (first pair valid)  | 6560                      |
| each further pair                       | +160                      |

`t_in` low freezes everything (shift registers and counters) from the next
clock edge, and generation resumes where it stopped when `t_in` returns
high. Clocks with `t_in` low do not count in the table. Tie `t_in` high if
pausing is not needed.

## Quasigroups without a ROM

Edon80 uses four quasigroups of order 4, chosen by the key symbol. Here they
are logic, not a 16-byte ROM (`quasigroup.sv`). With a = {a1,a0} and
p = {p1,p0}:

```
f0 = a0^p0   f1 = a1^p1   f2 = ~a0      f3 = f1&f2   f4 = a1^p0
f5 = ~a1     f6 = f0^p1   f7 = ~f6      f8 = ~(a0^p1)

K=0: h = f3 | a0&(f1^p0)      l = f0
K=1: h = f4&a0 | ~f1&f2       l = f2&f4 | a0&f1
K=2: h = a1&f7 | f0&f5        l = f5&f7 | a1&~f0
K=3: h = ~f4                  l = a1&f6 | f5&f8          a_out = {h, l}
```

The same functions as tables (row a = 0…3, columns p = 0…3):

| K | a=0  | a=1  | a=2  | a=3  |
|---|------|------|------|------|
| 0 | 0123 | 1230 | 2301 | 3012 |
| 1 | 2301 | 0213 | 1032 | 3120 |
| 2 | 1203 | 2130 | 3012 | 0321 |
| 3 | 3120 | 2031 | 0312 | 1203 |

In the published equations, the terms of hK1 and lK2 written here as
`~f1&f2` and `a1&~f0` put the negation over the whole product. Read that way
the K=1 and K=2 operations are not Latin squares, so they would not be
quasigroups. Negating a single literal is the one reading that makes all
four valid while keeping every other term. The testbench checks the Latin
property directly. The tables above are derived from the logic functions
and have not been compared with the tables of the cipher specification; do
that first if you need interoperable keystreams. The operand roles matter too: `a` is
the state being updated and `p` the previously updated symbol.

## Files

| file                   | contents                                                        |
|------------------------|-----------------------------------------------------------------|
| `rtl/edon80_pkg.sv`    | `sym_t` (2-bit symbol), default sizes 80 / 40                   |
| `rtl/edon80.sv`        | top level: wires the blocks below                               |
| `rtl/control.sv`       | round/position counters, mode flags, shift enables, `ready`     |
| `rtl/etransformer.sv`  | operand multiplexers around the quasigroup                      |
| `rtl/quasigroup.sv`    | the four quasigroups as logic                                   |
| `rtl/ashr.sv`          | 80 × 2-bit state shift register (taps 0, 40, 79)                |
| `rtl/kshr.sv`          | 40 × 2-bit key shift register (load / rotate)                   |
| `rtl/initshr.sv`       | 80 × 2-bit init shift register (load / feed back position 40)   |
| `rtl/outputprocessor.sv` | 2-bit output register with capture enable                     |
| `tb/edon80_ref_pkg.sv` | quasigroup tables and an algorithmic reference model            |
| `tb/tb_*.sv`           | self-checking testbenches, one per module, plus the variant     |

### Top-level interface (`edon80`)

| port       | dir | width | meaning                                               |
|------------|-----|-------|-------------------------------------------------------|
| `clk`      | in  | 1     | clock; everything is on the rising edge              |
| `init`     | in  | 1     | high for the 160 load clocks; falling starts IVSetup |
| `data_in`  | in  | 2     | load symbol, one per clock while `init` is high      |
| `t_in`     | in  | 1     | 0 pauses Keystream mode                               |
| `data_out` | out | 2     | latest keystream pair, as one 2-bit symbol           |
| `ready`    | out | 1     | one-clock pulse: `data_out` has just changed          |

Parameters: `NSTATE` (80) and `NKEY` (40) set the register sizes. The
design assumes `NSTATE = 2·NKEY` and `NSTATE` a multiple of 4. Only 80/40,
the cipher's size, has been simulated. `KINIT_FROM_INIT40` (0) selects the
IVSetup key source described above.

`data_out` is not reset. Read it only on `ready`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
end-to-end test runs the top level at its full size: three key/IV loads,
IVSetup and 40 keystream pairs per run. One run is abandoned mid-keystream
to test a restart, and one pauses at random. It checks every pair against
the reference model and every `ready` against the clock counts above. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/edon80_pkg.sv tb/edon80_ref_pkg.sv tb/tb_edon80.sv --top-module tb_edon80
./obj_dir/Vtb_edon80
```

Replace `tb_edon80` by `tb_edon80_init40` (the literal-wiring variant),
`tb_control`, `tb_quasigroup`, `tb_etransformer`, `tb_ashr`, `tb_kshr`,
`tb_initshr` or `tb_outputprocessor` for the others. Each runs in well under
a second. The reference model (`edon80_keystream` in `tb/edon80_ref_pkg.sv`)
works directly on an 80-entry array and has no shift registers or counters.
Use it to generate expected keystreams for other keys and IVs.

## How far this follows the published design

Taken from the published compact architecture:

* the block split and block names;
* the single e-transformer and its multiplexers;
* the three shift registers with their taps and serial loading chain;
* the loading sequence and the transposed IVSetup;
* the two nested 7-bit counters and the derivation of `use_ext`, `IV_Setup`,
  `p_count`, `writeout` and `ready`;
* pausing with `t_in`;
* the quasigroup logic functions.

Choices made here:

* **IVSetup key source.** The default takes the key from the key register,
  stepped once per IVSetup round (see *Key order during IVSetup*). The
  literal wiring is available as an option.
* **Shift enables.** The control unit has two extra outputs. `init_step`
  steps the init register on the last clock of each round (the published
  text only says it changes once every 80 clocks). `key_step` drives the key
  register.
* **`enable` during loading.** It is forced high while `init` is high, and
  `writeout` is gated with `enable` and `~init`. A restart with `t_in` low
  then loses no load symbol, and a pause never repeats a `ready` pulse.
* **No reset pin.** `init` clears the counters and the mode flag.
* **Quasigroup terms.** hK1 and lK2 are read as described above.

Not included: the 80-stage pipelined reference core (tag bits, write-back,
quasigroup ROM, separate key/IV registers), which this architecture
replaces. Also not included: the variants sketched as further improvements
(several e-transformers working on the same state register; dropping the
init register and letting a microcontroller drive the sequence).

Published figures this matches by construction: 2 bits per 160 clocks
(1.33 / 1.87 / 2.62 / 3.58 Mbit/s at 106 / 149 / 209 / 286 MHz, 2.18 Mbit/s at
175 MHz). Area (about 2900 gate equivalents in 0.35 µm CMOS, about 50
Spartan-class slices) has not been re-measured.
