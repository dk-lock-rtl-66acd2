# DK Lock: a dual-key logic lock for sequential circuits

Logic locking adds key inputs to a circuit so that a chip coming back from an
untrusted foundry only works once the designer's secret key is applied.
Oracle-guided attacks (the SAT attack and its sequential relatives) break most
such schemes by searching for *the* key: one static value that makes the locked
netlist behave like a working chip bought on the market. DK Lock removes that
premise. The same key inputs must carry two different values at two different
times:

1. an **activation key**, held for a hidden number of clock cycles `m` after
   reset, which walks a key-gated counter up to `m`;
2. a **final key**, applied afterwards and kept, which makes the conventional
   key gates in the circuit transparent.

Before activation the key gates are blocked, so the final key cannot be
observed at the outputs. After activation the activation key is, in general,
a wrong final key. No single constant key reproduces the working chip, so an
attack that looks for one either fails or returns a wrong key.

The lock is structural: it is three small pieces of logic added next to the
host circuit's own state machine, not extra states in it. This RTL applies it
to the ISCAS'89 benchmark **s27** with a 10-bit key, and also builds the
matching **oracle**: the same netlist with the keys built in, which behaves
as an activated chip.

## Operating sequence and timing

With the defaults (`KEY_N = 10`, `ACT_M = 9`, 2-bit functional counter):

| clock edge after reset | key inputs | activation count | functional counter | key gates |
|---|---|---|---|---|
| 1 .. 9 | activation key | 1 .. 9 | 00 (held) | blocked: outputs stuck |
| 10 | either key | (don't care) | 00 -> 01 | released from now on |
| 11, 12, ... | final key | (don't care) | 10, 11, 01, 10, ... | transparent |

The activation decode `count == ACT_M` is true in the cycle after the 9th
edge. The functional counter samples it on edge 10 and leaves its initial
state; it never returns there, which is what makes the activation permanent.
So the activation key has to be present for exactly the first `ACT_M` edges.
The key on edge `ACT_M+1` does not matter. From then on the circuit computes
s27 exactly, as long as the final key is on the key inputs.

A wrong activation key clears, on every edge, those counter bits whose key bit
is wrong. A key with the lowest counter bit wrong therefore keeps the count
even and never reaches 9. Note a property of this structure: only the key bits
that are 1 in the incremented value matter on a given edge, so a key that is
wrong only in bits the count never sets (with `m = 9`, bits 4..9) still
activates the circuit. What stops such a key is the final-key phase, not the
counter. The scheme relies on that, and so does this RTL.

## The three added parts

### Activation logic: `dk_activation_counter`

A `W`-bit up-counter, one flip-flop per key bit. The input of flip-flop `i` is
bit `i` of `count + 1`, passed through a 2:1 multiplexer that selects either
that bit or 0 under control of key bit `i`. The multiplexer is written in its
reduced form: an AND with the key bit when the correct activation key bit is
1, or with its inverse when it is 0. The decode `act = (count == M)` is a
constant comparator. `M` is not held in any register, so it can only be
recovered by analysing the gates. The counter keeps counting past `M`, which
is harmless.

### Functional logic: `dk_functional_counter`

An `N`-bit modified ring counter. It resets to `INIT` and holds there until
it sees `act`. After that it advances on every clock and skips `INIT` when it
wraps. For `N = 2`, `INIT = 00` the sequence is 00 (held), 01, 10, 11, 01,
and so on. Its bits `w` are the **blocker** signals of every key gate. The
output `phase` (`w != INIT`) marks the functional phase. Because the blocker
bits keep changing after activation, the unlocked circuit has no constant
"unlocked" flip-flop that an attacker could look for.

### Integration logic: `dk_key_gate`

One per key bit, placed on a signal `x` of the host circuit. Its output `y`
replaces `x` at all of `x`'s loads:

* key gate: `g = x ^ k ^ KF`. This is XOR when the final key bit `KF` is 0
  and XNOR when it is 1, so `g == x` exactly when `k == KF`.
* blocker, style `BLOCK_LOW`: `y = g & (w0 | w1)`, stuck at 0 before
  activation.
* blocker, style `BLOCK_HIGH`: `y = g | ~(w0 | w1)`, stuck at 1 before
  activation.

For a general `INIT` the release condition is `w != INIT`. Two gate-level
forms are mixed in one design so that the added logic is not a repeated
pattern.

## The locked s27 and its oracle: `s27_dk_locked`

s27 has inputs G0..G3, output G17, three flip-flops (G5, G6, G7) and ten
gates. Key bit `i` locks the output of one gate, in the order G14, G8, G12,
G15, G16, G9, G11, G10, G13, G17. Even bits use the stuck-at-0 blocker and odd
bits the stuck-at-1 blocker. `KEY_N` can be 1..10. With `KEY_N < 10`, only the
first `KEY_N` sites are locked. With the default keys, G17 is stuck at 1
during the activation phase.

`ORACLE = 1` turns the module into the oracle. The key port is ignored. Each
key wire comes from `dk_fixed_key_mux`, which gives the activation-key bit
while `phase` is 0 and the final-key bit afterwards. The oracle therefore
activates itself after `ACT_M` cycles and then computes s27. Driven with the
correct key schedule, the locked netlist and the oracle match on every cycle,
including during activation.

`dk_lock_top` instantiates the locked netlist (`u_locked`, keys on the `key`
port) and the oracle (`u_oracle`) side by side. They share clock and reset
but have separate inputs and outputs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `KEY_N` | 10 | key size; also the activation counter width and the number of key gates |
| `ACT_M` | 9 | cycles of activation key needed (must satisfy 1 <= M < 2^KEY_N) |
| `FC_N`, `FC_INIT` | 2, `2'b00` | functional counter width and initial state |
| `KEY_ACT` | `10'b1011001110` | correct activation key |
| `KEY_FINAL` | `10'b0110100101` | correct final key |
| `ORACLE` | 0 | 1 builds the oracle |

The defaults live in `rtl/dk_pkg.sv`. The 10-bit key and the 2-bit counter
starting at 00 are the scheme's main configuration. `m = 9` is the scheme's
worked example. The two key values are arbitrary random choices: replace them
with your own. The two keys must differ, or the scheme collapses to a
single-key lock.

## Design choices not fixed by the scheme

* Reset: all flip-flops, including s27's own, use an asynchronous active-low
  reset. The counter starts at 0, the functional counter at `INIT` and s27 at
  000.
* Activation counter width = key size (one activation flip-flop per key bit).
  A narrower counter is not offered.
* Key gate: XOR/XNOR. Blocker forms: the AND/OR pair above.
* Generalisation of the 2-bit functional counter to `N` bits: increment,
  skip `INIT`.
* Oracle multiplexer select: the functional-phase flag.
* Key-gate sites in s27: one per gate, fixed order (the scheme chooses sites
  at random).
* Not represented: the re-synthesis that blends the lock into the host
  netlist. That is a gate-level step applied after this RTL. Only the s27 host
  is included. The other ISCAS'89 and ITC'99 circuits the scheme was evaluated
  on are not.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_dk_activation_counter`: the 4-bit example (activation at count 1001)
  and the 10-bit default, compared against a reference model under correct,
  wholly wrong, partly wrong and random keys. It also checks the exact
  activation cycle.
* `tb_dk_functional_counter`: the 2-bit state table, and a 3-bit counter with
  `INIT = 101`: hold, sequence, no return to `INIT`.
* `tb_dk_key_gate`: exhaustive check of all four variants and of a 3-bit
  blocker bus.
* `tb_dk_fixed_key_mux`: both phases, for two widths.
* `tb_s27_dk_locked`: checks the locked netlist, the oracle and a 6-bit-key
  instance against a golden s27 model (`tb/tb_s27_ref_pkg.sv`). The model is
  loaded with each netlist's own state. The testbench covers the activation
  latency, stuck outputs before activation, transparency with the final key,
  no activation with the final key alone, and corruption when the activation
  key is kept or when the final key has one wrong bit.
* `tb_dk_lock_top`: end to end at the default parameters, over several
  sessions separated by resets. It counts each mechanism and fails if one
  never occurs: activation, a blocked cycle that hid a different s27 output,
  the 11 -> 01 wrap, the oracle's key switch, transparent operation,
  corruption under a wrong final key, and an activation that a wrong key
  held off.

* `tb_dk_single_key_sweep`: checks the property the scheme rests on. Each of
  the 1024 possible 10-bit keys is held constant from reset for 120 cycles,
  beside the oracle, with the same inputs. None of them reproduces the
  oracle's output. 64 of the keys activate the circuit: they are correct in
  bits 0..3, the only bits the count to 9 uses. The other 960 never activate
  it. The two-key schedule matches the oracle on every cycle.

Simulate any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dk_pkg.sv tb/tb_s27_ref_pkg.sv tb/tb_dk_lock_top.sv --top-module tb_dk_lock_top
./obj_dir/Vtb_dk_lock_top
```

The s27 and top testbenches read internal signals of the design hierarchy
(`phase`, the s27 flip-flops, the functional counter). Keep those names if you
restructure the modules.
