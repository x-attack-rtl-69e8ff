# X-attack: waking a don't-care Trojan through a shared FPGA's power supply

Two tenants share one FPGA and have no wire in common. The victim runs an
AES-128 encryption service. Its AES core was bought in and carries a
*satisfiability don't-care* (SDC) hardware Trojan. The attacker fills its own
region with ring oscillators. When the oscillators run, the shared supply
voltage sags, every path on the chip slows down, and some flip-flops capture
stale data. The Trojan is built so that exactly this kind of fault puts it in
a state that correct logic can never reach. In that state the cipher key
replaces the ciphertext on the public output. The victim also has a small
detector (the *protection*). Its delay chain fails before the Trojan does,
and it then blanks the output.

This repository holds synthesizable SystemVerilog for both tenants and for the
protection, plus a behavioural model of the oscillator banks. Self-checking
testbenches show the Trojan firing, the key leaking and the protection
stopping it. The analog link between the tenants (the shared power network)
cannot be written as logic. The testbenches replace it with a small model,
described in [Simulating the attack](#simulating-the-attack).

## The don't-care Trojan

### Where the trigger comes from

`sdc_mux` is a 2-to-1 multiplexer written out as gates:
`n1 = s & a`, `n3 = ~s & b`, `o = n1 | n3`. Both AND gates use the same select
`s`, so `n1` and `n3` can never be 1 together. The pair (1, 1) is a
*satisfiability don't-care*: no input sequence produces it.

In this design the pair comes from the AES S-box (`aes_sbox`). The S-box is
stored as two 128-entry half tables indexed by input bits 6..0. Input bit 7
chooses the half through one `sdc_mux` per output bit. For the chosen output
bit `TRIG_BIT`:

```
n1 =  a[7] & S({1, a[6:0]})[TRIG_BIT]
n3 = ~a[7] & S({0, a[6:0]})[TRIG_BIT]
```

The design taps the S-box on state byte 0 in the last round. The table values
are computed at elaboration time: the S-box is the inverse in GF(2^8)
(computed as a^254), followed by the AES affine map (`xattack_pkg::sbox_calc`).

### The Trojan itself (`sdc_trojan`)

Two flip-flops register the pair. They capture on the same clock edge as the
register that holds the core's output `o`. Two cascaded multiplexers then
produce the core's visible output:

```
m1  = q1 ? f  : o
o_t = q2 ? m1 : o        // f appears only when q1 = q2 = 1
```

`f` is the payload, here the cipher key of the block. With correct timing
`(q1, q2)` never equals (1, 1). The circuit with the Trojan is then
functionally identical to the one without it, so simulation, equivalence
checking and normal testing all pass. The flip-flops keep synthesis from
merging the trigger logic into the S-box and optimising it away.

There are three variants, chosen with the `VARIANT` parameter
(`trojan_variant_e`):

| variant    | flip-flops hold | fires on | note |
|------------|-----------------|----------|------|
| `TROJAN_1` | `s1, s2` | (1, 1) | plain form |
| `TROJAN_2` | `~s1, ~s2`, multiplexer inputs swapped | (0, 0) | **default**; inverting the pair made triggering more likely on hardware |
| `TROJAN_3` | `~t1, ~t2` with `t1 = s1&s2 \| x&y`, `t2 = s1&s2 \| ~x&y` | (0, 0) | lengthens the trigger paths; `t1`, `t2` are still never both 1 |

For `TROJAN_3`, `aes128_pipe` uses bit 0 of the tapped S-box input as `y` and
the parity of bits 6..1 as `x`.

### How a timing fault fires it

Suppose two plaintexts alternate at the input, and they are chosen so that the
tapped pair is (1, 0) for the first and (0, 1) for the second. Suppose also
that the path to trigger flip-flop 1 becomes longer than a clock period. That
flip-flop then captures the value its input had one cycle earlier, while
flip-flop 2 still captures the current value. On every second block the
registered pair becomes (1, 1) for `TROJAN_1`, or (0, 0) after inversion for
`TROJAN_2`, and the key goes out instead of the ciphertext. The two trigger
paths have different delays, so a moderate voltage drop can fail one of them
and not the other. That is all the attacker needs.

## Victim region (`xattack_victim`)

```
host --pt_wr--> [PT FIFO] --> aes128_pipe (Trojan inside) --> xattack_protection --> [CT FIFO] --ct_rd--> host
                                                                   `--> alarm
```

* **`aes128_pipe`** is a fully unrolled AES-128. Stage 0 registers
  `pt ^ key`. Stages 1 to 10 are `aes_round` instances. Each computes its round
  key from the previous one, so the key can change with every block. The core
  takes one block per clock. A ciphertext appears 11 cycles after its
  plaintext (`out_valid`). The original key travels down the pipeline beside
  the data and is the Trojan's payload.
* **Flow control.** A plaintext leaves the PT FIFO only if the CT FIFO has
  room for it and for every block already in the pipeline. The pipeline never
  drops a result. If the host stops reading, the core stalls and then the PT
  FIFO fills (`pt_full`).
* **FIFOs** (`sync_fifo`) run on a single clock with show-ahead reads:
  `rd_data` shows the head entry while `empty` is low. Each holds 4096 entries
  by default, which is one full attack run of encryptions.

## Protection (`xattack_protection`)

A toggle flip-flop (cleared by reset) drives a chain of `N_BUF` = 15 buffers.
The chain ends at a check flip-flop (preset by reset). With correct timing the
check flip-flop always holds the toggle's previous value, so the two differ
and `valid = q_tog ^ q_chk` stays 1. The output passes through unchanged.

The chain is meant to be placed so that it is slightly longer than the
victim's critical path. During a voltage drop it then fails first. The check
flip-flop captures stale data and equals the toggle, `valid` drops,
`data_o` becomes zero and `alarm` goes high. This holds for every cycle the
fault lasts. The circuit needs no second clock and knows nothing about the
core it protects.

In RTL the chain has no delay. Its length only matters after place and route.
The buffers carry `keep` attributes so that synthesis does not remove them.
Calibrating the chain against the real critical path is left to the
implementation flow.

The `PROTECTION` parameter of `xattack_victim` and `xattack_top` selects the
build:

* `PROTECTION = 1` (default): the protected victim.
* `PROTECTION = 0`: the bare core, as attacked in the unprotected experiments.

## Attacker region (`xattack_attacker`)

* **`attack_ctrl`**: the host picks a mode and pulses `start`. The hardware
  then drives the two bank enables for exactly `ATTACK_CYCLES` = 4096 cycles
  and pulses `done`. A new `start` is ignored while an attack runs. The attack
  length is bounded in hardware so that software cannot leave the oscillators
  on long enough to make the board reset.
  * `MODE_PERIODIC`: both enables in phase, on for 12 of every 16 cycles
    (75 %).
  * `MODE_HALF`: only bank 1.
  * `MODE_ALL`: both banks.

  The sequence that was used on hardware is periodic, then half, then all.
* **`ro_bank`** ×2 is a **behavioural model**, not synthesizable logic. It
  models 9500 enable-gated ring oscillators per bank, 19k in total, with a
  1 ns loop delay. On an FPGA each oscillator would be a NAND gate in a LUT
  loop. The logic tools report the loop as a combinational loop, and that is
  intended.
* **`vdrop_sensor`** is a 255-bit ripple-carry adder on the carry chain. It
  adds all-zeros to all-ones, with a phase-shifted copy of the clock
  (`clk_ps`) on the carry-in. Its sum is sampled by `clk`. How far the carry
  has travelled by the sampling edge measures the current logic delay. The
  snapshot is reduced to `depth`, the count of zero bits (0 to 255).
* **V FIFO**: while `v_record` is high, one `depth` reading per cycle goes into
  a 4096-entry FIFO, which the host drains.

## Top (`xattack_top`)

This module holds the victim and the attacker side by side. They share only
`clk` and `rst`. Every host-side signal is a port. The host processor itself
is not part of the RTL.

| parameter | default | meaning |
|---|---|---|
| `PT_DEPTH`, `CT_DEPTH` | 4096 | victim FIFO depths |
| `VARIANT` | `TROJAN_2` | Trojan form |
| `PROTECTION` | 1 | instantiate the protection |
| `N_BUF` | 15 | buffers in the protection chain |
| `ATTACK_CYCLES` | 4096 | length of one attack |
| `N_RO` | 9500 | oscillators per bank |
| `SENSOR_W` | 255 | sensor adder width |
| `V_DEPTH` | 4096 | sensor FIFO depth |

The clock is meant to run at 160 MHz, so 4096 cycles last 25.6 µs. One clock
is assumed for both regions. Reset `rst` is asynchronous and active high
everywhere.

## Simulating the attack

Logic simulation has no supply voltage. The testbenches that show the attack
therefore use `tb/pdn_model.sv`, a first-order model of the shared supply. On
each clock edge it counts the enabled oscillators `n` and scales every
modelled path delay by `1 + K·n`. It flags a path as faulting while the scaled
delay exceeds the 6.25 ns period. The testbench then uses `force` on that
path's flip-flop input, giving it the value it had one cycle earlier.

The model's numbers:

* Trojan trigger paths: 4.376 ns and 3.274 ns.
* `K` is chosen so that the slower trigger path fails from 18k oscillators
  upward.
* Protection chain: 6.137 ns, which assumes a 6.0 ns critical path.
* Sensor: the carry travels 200 bits at nominal voltage and proportionally
  fewer under load.

With these numbers, the half mode (9.5k oscillators) only trips the
protection. The all mode and the on-phases of the periodic mode (19k) also
fire the Trojan. The model does not represent the other AES paths that fail
under heavy load, so in these testbenches a faulty ciphertext is always
either the key or zero. Treat the model as an illustration of the mechanism,
not a prediction for any device.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/xattack_pkg.sv tb/aes_ref_pkg.sv tb/tb_xattack_top.sv \
  --top-module tb_xattack_top -j 4
./obj_dir/Vtb_xattack_top
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_xattack_top` | the whole design at default sizes. 8256 random plaintexts all encrypt correctly, with the pipeline stalling and both FIFOs filling. Then one 4096-encryption attack in each mode: the Trojan fires inside the core in the periodic and all runs and stays silent in the half run. Alarm is raised in every run. The key never reaches the CT FIFO, and every output is the right ciphertext or zero. The sensor readings dip under attack. About 1 minute to build and 10 s to run. |
| `tb_xattack_top_unprotected` | `PROTECTION = 0`. Half mode leaks nothing. All mode with two alternating plaintexts gives an output equal to the key for half the blocks. All mode with 4096 random plaintexts: the most frequent output value is the key, found without knowing it. |
| `tb_xattack_top_trojan3` | `VARIANT = TROJAN_3` with protection on, 1024-entry FIFOs and 1024-cycle attacks. Two plaintexts that make the trigger pair alternate: with no attack all 1024 outputs are correct and no alarm is raised. Under an all-mode attack the Trojan fires inside the core about 500 times, the alarm goes up, and the CT FIFO gets only correct ciphertexts or zeros, never the key. |
| `tb_xattack_victim`, `tb_xattack_attacker` | region-level checks with small FIFOs. |
| `tb_aes128_pipe`, `tb_aes_round`, `tb_aes_sbox` | AES against FIPS-197 vectors and an independent reference model (`tb/aes_ref_pkg.sv`); latency 11. |
| `tb_sdc_mux`, `tb_sdc_trojan` | the don't-care pair never reaches (1, 1). All three Trojan variants stay silent with correct timing and fire exactly when a modelled fault predicts. |
| `tb_xattack_protection`, `tb_attack_ctrl`, `tb_ro_bank`, `tb_vdrop_sensor`, `tb_sync_fifo` | unit checks. |

The default test key is `85458a2b_b4a9aafd_ee2b1013_9e9e781a`, with byte 15
most significant. It is the key recovered in the published experiment.

## What is and is not here; where it departs

* **The AES core** is this design's own standard AES-128, one round per
  pipeline stage. The published attack used a third-party pipelined core
  with a different internal structure and latency.
* **The choice of don't-care pair** (the split S-box on byte 0 of the last
  round, bit 0) is this design's own. The original searched a synthesized
  S-box netlist for a suitable pair.
* **Not built:**
  * the masked AES S-box that served as a second victim (a third-party
    design);
  * the host processor and its software;
  * the placement constraints that keep the two tenants apart;
  * the physical calibration of the delay chain.

  The Trojan-3 transformation used on the masked S-box is available through
  `VARIANT = TROJAN_3`.
* **Own choices:**
  * FIFO depths and the show-ahead read;
  * the credit-based flow control in the victim;
  * the 16-cycle period of the periodic mode;
  * the start/busy/done handshake;
  * the sensor readout as a zero count;
  * the non-sticky `alarm`;
  * resetting the Trojan flip-flops to their inactive value;
  * the single shared clock.
* **Oscillator count.** The default of 19k oscillators is the size at which
  the key leaked in the published experiments. Faults were seen from roughly
  10k upward, and more than 20k reset the board. Set `N_RO` for other sizes.
* **Resource figures** (oscillator share of the FPGA, 76 ALMs for the
  protection) depend on place and route and were not checked.
