# Scan-attack protection for an AES-128 core

A scan chain lets a tester set and read every flip-flop of a chip. For a
crypto core this is also a side channel. An attacker can unload the chain
right after an encryption, when the round-key register still holds a value
derived from the secret key. An attacker can also load chosen states, run
one round and read the result. Either way the key can be recovered from a
few dozen to a few hundred scan vectors.

This design protects an AES-128 core without touching the core or its JTAG
TAP controller. All protection logic sits between them:

* **Key switch.** While the TAP shifts a data register, the core's key input
  carries a *test key* instead of the user key. Anything a tester can
  provoke and observe during a scan session involves only the test key.
* **Output gate.** When a scan session starts, the chain still holds values
  from normal operation. A counter keeps the scan output at 0 until enough
  clocks have passed to shift all of them out. Only then is the output
  released.
* **Hardening of the control signals.** The Load Key signal that drives both
  mechanisms is built three times and voted by majority gates. The gating
  counter is duplicated, with each copy enabled by a different signal. A
  mismatch raises `fault`, which resets the core and the TAP controller.

The JTAG state machine, instruction codes and the AES core's scan chain are
all left as they are. The TAP controller and the AES core stay reusable
blocks.

## Block diagram

```
                 +----------------------- secure_aes_soc ---------------------------+
 plaintext ----->|  aes_core (AES-128, 1 round/clock, 262-bit scan chain) --------->|--> ciphertext
 start --------->|    ^ key_in        ^ scan_enable, scan_in        | scan_out      |    busy, done
                 |    |                                             v               |
 user_key ------>| key_input_mux <-- lk_copies[2:0] -+           AND ------------->|--> gated_scan_out
 test_key ------>|   (majority)                      |            ^ gate           |
                 |                  load_key_gen ----+-> maj3 -> concurrent_fault_ |
                 |            (3 x ShiftDR&Enable&~Select)        check (2 JK      |
                 |                    ^                           counters, cmp)-->|--> fault
 tck=clk,tms, -->|  jtag_tap_ctrl ----+ ShiftDR, Enable, Select      ^ ShiftDR      |
 tdi, trst_n     |  (16-state FSM) ------------------------------------+            |--> tdo
                 |        ^ reset <-- fault (registered) --> reset of aes_core      |
                 +------------------------------------------------------------------+
```

## A scan session, clock by clock

The design has one clock, `clk`. It is the system clock and also TCK. A
tester drives both from the same source during scan test.

1. **Normal operation.** The TAP controller is in any state other than
   Shift-DR (for example Run-Test/Idle). Load Key is 0, so the core encrypts
   with `user_key`. Both counters are 0, so `gated_scan_out` is 0 whatever
   `scan_enable` does.
2. **Entering Shift-DR** (TMS 1, 0, 0 from Run-Test/Idle). Load Key becomes
   1 and `key_in` switches to `test_key`. Both counters start counting, one
   per clock.
3. **Flush.** The tester holds `scan_enable` high and shifts. The old chain
   contents (done, busy, round counter, round key, state) come out of the
   core but are blocked. The gate opens after exactly 2^(CNT_W-1) clocks in
   Shift-DR: 512 clocks for the 262-bit chain (`CNT_W` = 10).
4. **Test.** With the gate open, the tester stays in Shift-DR and uses
   `scan_enable` directly. It shifts in a vector, drops `scan_enable` for
   capture clocks (or pulses `start` to run a full encryption), and shifts
   the response out. The responses are visible on `gated_scan_out`. Every
   encryption started here loads the test key.
5. **Leaving Shift-DR.** In Exit1-DR Load Key falls. At the next clock the
   counters stop counting and start shifting, and the gate closes. After
   `CNT_W` clocks both counters are 0 again, so the next session starts a
   fresh flush.

The testbench `secure_aes_soc_tb` walks through exactly this sequence.

## The gating counter

`gating_counter` is built from `CNT_W` JK flip-flops (`jk_ff`, next state
`J&~Q | ~K&Q`). Its J/K inputs select one of two behaviours:

| `en` | behaviour | J/K of bit i |
|---|---|---|
| 1 | binary up-count, one per clock, until the MSB is 1, then hold | J = K = T, with T = all lower bits 1 and MSB = 0 |
| 0 | shift register towards the MSB, `en` (0) shifted in at bit 0 | J = D, K = ~D, with D = bit i-1 |

The MSB is the gate (`1` = scan output may be seen). The width rule is
`CNT_W = log2(N) + 1`, rounded up, for a chain of `N` flip-flops. This gives
2^(CNT_W-1) >= N, so the gate cannot open before every old bit has passed the
scan output. For a 1000-flip-flop chain this is 11 bits, which is the
module's default. The SoC derives 10 from its own 262-bit chain.

Three details matter:

* **Holding at 2^(CNT_W-1).** The counter stops at `100…0` once the gate is
  open. A wrapping counter would close the gate again in the middle of a
  test.
* **Fast close.** Because only the MSB is set while the gate is open, the
  first shift after Load Key falls clears the MSB. The gate therefore closes
  one clock after Load Key drops.
* **Reset by shifting.** After `CNT_W` clocks with Load Key at 0, the
  counter has shifted itself empty. No reset pin is needed between sessions.

## Control-signal hardening

**Load Key.** Each of three identical branches in `load_key_gen` computes
`ShiftDR & Enable & ~Select`. This is 1 only in Shift-DR, the data-register
column of the TAP. The three copies are used in two places:

* the key multiplexer takes its own majority of them (`key_input_mux`);
* the counter enable is a separate `maj3` of them.

Forcing any single copy to 1 (or to 0) changes neither the key nor the gate.

**Concurrent fault check.** `concurrent_fault_check` holds two counters:

* counter A is enabled by Load Key, and its MSB is the gate;
* counter B is enabled by the TAP's ShiftDR directly.

Load Key and ShiftDR must always be equal. While both are 1, the two
counters must be equal bit for bit. The check is:

```
fault = ~( (~LoadKey & ~ShiftDR) | (LoadKey & ShiftDR & (cnt_a == cnt_b)) )
```

A glitch that upsets one counter, or one control signal that is forced
differently from the other, raises `fault`. In the SoC, `fault` is
registered once. The registered value then:

* resets the TAP controller asynchronously (back to Test-Logic-Reset);
* resets the AES core synchronously;
* clears both counters.

The register is needed: a purely combinational path would reset the TAP
and so remove its own cause before the synchronously reset core could act.

## The AES core and its scan chain

`aes_core` is an iterative AES-128 encryptor. It has no pipeline and
computes the key schedule on the fly (`aes_key_expand`, one step per
clock). It works as follows:

* A `start` while idle loads `plaintext ^ key` and the key.
* The next ten clocks run rounds 1 to 10. Round 10 has no MixColumns.
* `done` rises 10 clocks after the `start` edge, and `ciphertext` holds the
  result until the next `start`.

The S-box is computed (GF(2^8) inverse, then the affine map), not stored as
a table.

All 262 flip-flops are on one mux-scan chain. The chain order, from
`scan_out` back to `scan_in`, is:

1. `done`
2. `busy`
3. round counter (4 bits)
4. round key (128 bits)
5. state (128 bits)

A tester can scan in `busy = 1, round = 10` and apply one capture clock to
run only the last round, which is what scan attacks exploit. The core's
testbench checks this directly. It runs the one-bit and two-bit difference
vectors of the attack through the last round. For every single bit, and
every bit pair inside a byte, it confirms the pattern of changed output bits
(S(0) xor S(0 xor difference)), landing in the output byte given by
ShiftRows.

## Interface of `secure_aes_soc`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock and TCK |
| `rst_n` | in | 1 | system reset, active low, synchronous |
| `trst_n`, `tms`, `tdi`, `tdo` | | 1 | JTAG pins; `trst_n` is asynchronous |
| `start` | in | 1 | start an encryption (ignored while busy) |
| `plaintext`, `ciphertext` | in/out | 128 | FIPS-197 byte order, byte 0 in bits [127:120] |
| `busy`, `done` | out | 1 | encryption running / result valid |
| `user_key` | in | 128 | secret key, from a key store outside this design |
| `test_key` | in | 128 | key used while a data register is shifted |
| `scan_enable`, `scan_in` | in | 1 | mux-scan control of the core's chain |
| `gated_scan_out` | out | 1 | core scan output AND gate |
| `fault` | out | 1 | concurrent check result (combinational) |

The top has no parameters. Its two sizes are localparams: `SCAN_LEN` = 262
and `CNT_W` = `$clog2(SCAN_LEN) + 1`. If the core's registers change,
`SCAN_LEN` must change with them.

## What this RTL does not do, and where to be careful

* **The gate counts clocks, not shifts.** The counter advances every clock
  in Shift-DR, whether or not `scan_enable` is high. Suppose a tester enters
  Shift-DR and holds `scan_enable` low for 512 clocks. The old contents are
  still in the chain when the gate opens, and they can then be shifted out.
  This includes round key 10 of the last user-key encryption. The scheme as
  specified relies on shifting during the flush. Tying the core's scan
  enable to `scan_enable | (load_key & ~gate)` would close this hole, but it
  is not done here.
* **The gate stays open for one clock after Shift-DR ends.** In Exit1-DR
  the chain still holds test-key data only, so nothing secret is exposed.
* **Outside Shift-DR the user key is selected.** This includes Capture-DR,
  Update-DR and Pause-DR. An encryption started there uses the user key.
  The resulting state is blocked at the next session, but only if that
  session actually shifts during its flush (see the first point).
* **TAP controller.**
  * Only the state machine and a one-bit bypass register are modelled.
    There is no instruction register, so the IR path only moves through
    its states.
  * `tdo` shows the bypass bit in Shift-DR and Shift-IR.
  * ClockDR and ClockIR are clock enables, not gated clocks.
* **One clock domain.** A design with a separate TCK would need
  synchronisers on ShiftDR, Enable and Select.
* **The JK flip-flop is a behavioural edge model** of the master-slave
  circuit, on the rising edge. The counter's J/K wiring realises the
  count/shift behaviour above. A simple chain of `J = previous Q` with all
  K = 1 neither counts in binary nor shifts.
* **The user key store is not part of the design.** The key is a port.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | block types, S-box, ShiftRows, MixColumns, rcon |
| `rtl/jtag_pkg.sv` | TAP state enum, control-signal struct |
| `rtl/aes_key_expand.sv` | one key-schedule step |
| `rtl/aes_core.sv` | iterative AES-128 with scan chain |
| `rtl/jtag_tap_ctrl.sv` | IEEE 1149.1 TAP state machine, bypass register |
| `rtl/maj3.sv` | majority gate |
| `rtl/load_key_gen.sv` | triplicated Load Key |
| `rtl/key_input_mux.sv` | test/user key select by majority |
| `rtl/jk_ff.sv` | JK flip-flop |
| `rtl/gating_counter.sv` | JK counter with gate output |
| `rtl/concurrent_fault_check.sv` | duplicated counters and Fault |
| `rtl/secure_aes_soc.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/scan_attack_tb.sv` | scan attack on the whole SoC |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module secure_aes_soc_tb \
    -y rtl -y tb +libext+.sv rtl/aes_pkg.sv rtl/jtag_pkg.sv tb/secure_aes_soc_tb.sv
./obj_dir/Vsecure_aes_soc_tb
```

Replace the top module and testbench file to run any other test. What each
testbench checks:

* **`aes_core_tb`** — the FIPS-197 vectors with their intermediate round
  values and the 10-clock latency, a scan unload, the last-round control,
  and all one-bit and two-bit difference patterns.
* **`aes_key_expand_tb`** — all FIPS-197 round keys.
* **`jtag_tap_ctrl_tb`** — a random walk of 4000 TMS values against a
  reference model of the state graph.
* **`gating_counter_tb`** — the counter against a cycle model at widths 5
  and 11.
* **`concurrent_fault_check_tb`** — injects random single-bit glitches into
  either counter.
* **`secure_aes_soc_tb`** — runs the session described above at full size,
  about 1100 clocks. It also checks that a single forced Load Key copy is
  outvoted and that a counter glitch resets the TAP and the core.
* **`scan_attack_tb`** — plays a scan attacker against the SoC. It makes an
  immediate unload, stops an encryption before the last round, and runs a
  one-bit difference step through the gate. It checks that the attack
  mechanics work and that every round key it recovers belongs to the test
  key.

The glitch tests write a flip-flop's `q` variable hierarchically between
clock edges. Verilator reports this as a multiple-driver warning in the
testbench only.
