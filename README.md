# Low-power EDT decompressor: constant-filled scan chains, held outputs and capture control

Compressed scan test fills the don't-care bits of each pattern with
pseudo-random values. As a result about half of all scan cells toggle on every
shift cycle, and scan test can dissipate several times the power of the chip's
mission mode. Yet a typical pattern has specified bits in only a few scan
chains. This RTL adds three mechanisms to an EDT-style (embedded deterministic
test) decompressor that exploit this:

1. **Constant loading.** A small per-pattern controller decides, for every
   scan chain, whether the chain is fed by the decompressor or by a constant 0
   for the whole scan load. Chains that hold specified bits are connected.
   Most of the others receive the constant and do not toggle at all.
2. **Output hold.** A shadow register between the ring generator and the phase
   shifter holds one decompressor state for as many shift cycles as the
   specified bits allow. The connected chains then also see long runs of equal
   values. Meanwhile the ring generator keeps absorbing seed variables.
3. **Capture control.** The signal that selects constant loading also drives
   that chain's scan enable. A constant-loaded chain stays in shift mode during
   the capture cycle, so it captures nothing and shifts out its quiet content.
   Separately, the circuit's own clock gaters can be turned off during capture
   by scan-loaded values. Their force-on during shift is driven by scan enable.

At the default size (164 chains of 169 cells, 4 channels), the end-to-end
testbench uses random control data and 75 % hold cycles on some patterns. Over
12 patterns the chains see 80 % fewer load transitions than a plain
decompressor fed the same channel data.

## Block diagram

```
                       +----------------+   +-----------------+   +---------------+
 edt_ch[3:0] --+-----> | ring_generator |-->| shadow_register |-->| phase_shifter |--dec[163:0]--+
               |       |  32 stages     |   | reload on odd   |   | 3-input XORs  |              |
               |       +----------------+   | channel parity  |   +---------------+              v
               |                            +-----------------+                        +----------------+
               |  ctrl_load                                                            | gating_circuit |--> chain_si[163:0]
               |       +------------------+   +-------------+   +-----------------+   | AND gates and  |--> chain_se[163:0]
               +-----> | control_register |-->| xor_network |-->| biasing_circuit |-->| scan-enable    |
                       | 48 + 9 bits      |   | 48 -> 492   |   | AND of 1..3     |   | gating         |
                       +------------------+   +-------------+   +-----------------+   +----------------+
 clk --> clock_gater x8 (group) --> clock_gater x4 each (leaf) --> cg_gclk[31:0]
```

`lp_edt_top` instantiates all of it. `lp_edt_pkg` holds the shared enums and
the constant functions that define every XOR wiring.

## How one pattern is applied

| phase | pins | what happens |
|---|---|---|
| control load (optional) | `ctrl_load=1`, `scan_enable=1` for `ceil(57/4)=15` cycles | The channels shift 4 bits per cycle into the control register. The ring and shadow register hold. Patterns that share control data skip this phase. |
| scan load | `ctrl_load=0`, `scan_enable=1` for 169 cycles | The channels carry seed variables into the ring generator. The tester sets the channel parity of each cycle: odd parity reloads the shadow register, even parity holds it. Each chain gets `dec & gate` (constant 0 when its gate is 0). The previous responses shift out at the same time. |
| capture | `scan_enable=0` for 1 cycle | `chain_se` stays 1 for every chain whose gate is 0. Only the decompressor-fed chains capture. Clock gaters follow their functional enables (`cg_group_en`, `cg_leaf_en`). |

`test_mode` is held at 1 for the whole test session. With `test_mode=0` the
gating is transparent (`chain_si = dec`, `chain_se = scan_enable`). The ring
and shadow register then stop.

### Control register layout

Bit 0 is the earliest of the last 57 bits shifted in. Within a cycle, channel 0
is the lower bit.

| bits | meaning |
|---|---|
| `[47:0]` | variables of the XOR network |
| `[48]` | biasing mode: 0 = one select for the whole load, 1 = one select per segment |
| `[49 + 2k +: 2]` | bias select of segment k (k = 0..3) |

The 15 load cycles deliver 60 bits, 3 more than the register holds, so the
first 3 bits sent fall off the end. Send `{D, 3'b000}`, low bits first.

## The control block: XOR network, biasing and gating

This is the part that needs the most care when generating patterns.

**XOR network.** Output `j*3+g` is the XOR of three of the 48 control bits.
Which three is given by `lp_edt_pkg::tap_mask(j*3+g, 48, 3, XN_SALT)`. Output
`j*3` is chain j's primary gating signal. Test generation forces the gating
signals of chains with specified bits to 1 by solving a linear system over
GF(2). With random control data, every unconstrained output is 1 with
probability 1/2. The XOR-network testbench solves such systems by Gaussian
elimination. It encodes 199 of 200 random sets of 30 required gating values
into the 48 variables.

**Biasing.** The biasing circuit ANDs the first `s+1` of chain j's three
outputs, where `s` is the current bias select. Unconstrained chains therefore
stay connected with probability 50 % (`s=0`), 25 % (`s=1`) or 12.5 % (`s=2`).
A select of 3 behaves like 2. To connect a chain at `s=2`, the test generator
must force all three of its outputs to 1. That costs three equations instead of
one, which is the price of the lower connected fraction. In per-segment mode,
the scan load is split into four segments of `ceil(169/4)=43` shift cycles
(the last one is open-ended). Each segment uses its own select. The segment
counter restarts whenever `scan_enable` is low or control data are loaded. The
current segment is visible on `bias_segment`.

**Gating and scan enable.** For the default `CONST_MODE = CONST_ZERO`:

```
chain_si[j] = test_mode ? dec[j] & a[j] : dec[j]
chain_se[j] = scan_enable | (test_mode & ~a[j])
```

`a[j]` is the biased gating signal. So a chain is either decompressor-fed and
captures, or constant-filled and kept in shift during capture. There is no
third combination. Keeping a decompressor-fed chain in shift at capture speed
would be unsafe, because scan paths are not timed for it.

Other gate types, selected by parameter:

* `CONST_ONE`: OR gating. Gated chains get 1.
* `SE_GROUP = k > 0`: partly separated scan enable. See the list of
  departures below.
* `CONST_BOTH`: two constants, using one extra XOR output `b` per chain.
  `chain_si = (dec | ~b) & a`. About 50 % of unconstrained chains get 0, 25 %
  get 1 and 25 % are decompressor-fed. Biasing still applies to `a`.

## Decompressor details

* **Ring generator.** 32 stages in a ring. The last stage feeds back into
  stages 22, 2 and 1, which gives the primitive polynomial x^32+x^22+x^2+x+1.
  Channel c is XORed into stage `(2c+1)*32/8`, that is stages 4, 12, 20 and
  28. Lengths 8, 16, 24, 48 and 64 have their own polynomials in
  `ring_taps()`.
* **Shadow register.** On an enabled shift edge with odd channel parity, it
  copies the ring's value from before that edge. The ring advances on the same
  edge. `HOLD_SRC = HOLD_CHANNEL` takes the command from a dedicated `hold_ch`
  pin instead. With parity control the tester loses one degree of freedom per
  cycle: the parity must be encoded together with the seed variables. Reloading
  on every cycle gives plain EDT behaviour, which the constant-loading-only mode
  uses.
* **Phase shifter.** Chain j gets the XOR of three shadow bits, given by
  `tap_mask(j, 32, 3, PS_SALT)`. The salt is chosen so that no two chains get
  the same triple at the default size.

`chain_si` and `chain_se` are combinational from registers and from the
`test_mode` / `scan_enable` pins. Scan cells sample them on the next rising
edge.

## Clock gaters

`clock_gater` is the usual latch-plus-AND cell. The latch is transparent while
`clk` is low and samples `en | test_en`, so a mid-cycle enable change cannot
cut or create a pulse. The 40 latches reported when `lp_edt_top` is
synthesised are these cells. `lp_edt_top` builds a two-level hierarchy: 8 group
gaters on `clk`, each feeding 4 leaf gaters. One group enable turns off 4
leaves. `test_en` is scan enable, so every gater runs during shift. This
follows from how the method uses the gaters: with `test_mode` also forcing them
on, they could never be turned off in capture. In a real circuit the enables
come from functional logic fed by scan cells. Here they are top-level ports.

## Parameters (`lp_edt_top`)

| parameter | default | origin |
|---|---|---|
| `N_CHAINS`, `CHAIN_LEN` | 164, 169 | design D1 of the reference experiments |
| `N_CHANNELS` | 4 | D1 |
| `CTRL_BITS` | 48 | control register size used with D1 |
| `BIAS_INPUTS` | 3 | up to three AND inputs (12.5 %) |
| `RING_LEN` | 32 | own choice |
| `SEGMENTS` | 4 | own choice |
| `CONST_MODE` | `CONST_ZERO` | constant 0, as in the evaluated configuration |
| `HOLD_SRC` | `HOLD_PARITY` | parity of the channel bits |
| `CG_GROUPS`, `CG_PER_GROUP` | 8, 4 | own choice |
| `SE_GROUP` | 0 (tied controls) | group size of the separated variant is own choice |

The other evaluated designs need these values:

| design | `N_CHAINS` | `CHAIN_LEN` | `N_CHANNELS` | `CTRL_BITS` |
|---|---|---|---|---|
| D2 | 203 | 300 | 4 | 64 |
| D3 | 832 | 158 | 8 | 256 |
| D4 | 321 | 258 | 4 | 96 |

For D3, use a longer ring (for example `RING_LEN=64`). Keep
`CTRL_BITS <= 1024` and `RING_LEN <= 1024`, the width limit of `tap_mask`.

## Where this RTL departs from or adds to the method

* **Own choices.** The ring length, polynomial, injector positions and every
  XOR wiring are this design's own. The same goes for the control-data format,
  the separate `ctrl_load` phase and the bias-select encoding. The method fixes
  only the structures.
* **Control register width.** The 48 control bits of D1 are taken as the
  XOR-network variables. The 9 biasing configuration bits are added on top.
* **Tied controls by default.** By default, stimulus and scan enable share
  one signal per chain (`SE_GROUP = 0`). Setting `SE_GROUP = k` builds the
  partly separated variant. One extra XOR-network output per group of k
  chains becomes that group's capture control `cap`. A chain is
  decompressor-fed only when both its own gate and `cap` are 1. Its scan enable
  is held in capture exactly when `cap` is 0. A chain that is kept in shift is
  therefore always constant-loaded. A capturing chain may still load a
  constant, which helps when scan enable can only be routed per group. The
  group size is this design's own choice.
* **Not included.** The response compactor, the scan cells and the
  circuit-under-test logic are not included. Neither is the test-generation
  software that computes control data and seeds.

## Files and simulation

`rtl/` holds one module or package per file. `tb/` holds one self-checking
testbench per block. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ring_generator` | Every cycle against an independent model. Full period 2^16-1 of a 16-stage ring. |
| `tb_shadow_register` | Parity-controlled and channel-controlled reload and hold. |
| `tb_phase_shifter` | Recovered wiring: 3 taps per output, no duplicate outputs. Linearity. |
| `tb_control_register` | Serial load and freeze. |
| `tb_xor_network` | Wiring. 50 % ones. GF(2) encoding of random gating requirements. |
| `tb_biasing_circuit` | AND selection. Segment counting. 50 / 25 / 12.5 % connected fractions. |
| `tb_gating_circuit` | Exhaustive truth tables of all three gate types. 50/25/25 split of the two-constant mode. |
| `tb_clock_gater` | One pulse per enabled cycle. No glitches when enables change mid-cycle. Cascading. |
| `tb_lp_edt_designs` | The top at the sizes of D2, D3 and D4. Also D1 size with `CONST_BOTH`, with `SE_GROUP=8`, and with `CONST_ONE` plus `HOLD_SRC=HOLD_CHANNEL`. Three patterns each, checked every cycle against the model, including the decompressor-fed fraction at capture. |
| `tb_lp_edt_top` | Full default size, 12 patterns, checked every cycle against a model of all stages, with a behavioural scan-cell array. It counts control loads and reuses, shadow reloads and holds, constant and decompressor-fed chains, scan enable held in capture, each bias select, segment changes, group- and leaf-level clock gating, force-on in shift, and mission mode. It fails if any of these never happens. |

Example with plain Verilator, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lp_edt_pkg.sv tb/tb_lp_edt_top.sv --top-module tb_lp_edt_top -o sim
./obj_dir/sim
```

The full-size top-level test runs in well under a second of simulation time.
Use two-state simulation with random initialisation if you like: every
register that is read has a reset.
