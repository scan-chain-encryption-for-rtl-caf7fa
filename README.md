# Scan-chain encryption with PRESENT

A scan chain gives a tester full control and observation of every flip-flop in
a chip. In a secure chip that is also an attack path. An attacker can run one
round of an on-chip cipher, switch to test mode and shift out the round
register. Or the attacker can load a chosen state through scan-in. Either way
the secret key can be recovered.

This design keeps the scan chain but encrypts everything that crosses the chip
boundary. The tester cuts each scan pattern into 64-bit segments and encrypts
them with the PRESENT block cipher under the device's key. On chip, an **input
scan cipher** decrypts the stream on the fly before it enters the circuit's
scan chain. An **output scan cipher** encrypts the chain's response before it
leaves. Someone who holds the key keeps full test, diagnosis and debug access,
with the usual scan protocol and a small, fixed overhead in test time. Someone
without the key can neither set nor read the chain.

```
 tester                 chip
 encrypt ──► chip_scan_in ─► [input scan cipher: decrypt] ─► circuit_scan_in
                                                              │ scan chain of the
                                                              │ circuit under test
                                                              ▼ (+ observation FFs)
 decrypt ◄── chip_scan_out ◄─ [output scan cipher: encrypt] ◄─ circuit_scan_out
                    ▲                     ▲
                    └── shared PRESENT key expansion + controller ◄── key
```

## The stream the tester sees

All counts below are in clock cycles with `scan_enable` high. The cipher block
size is N = 64 and one block operation takes D = 32 cycles.

* **Segments.** The stream is a sequence of 64-bit segments. Within a segment,
  the first bit shifted is bit 63 (the MSB) of the PRESENT block. Output
  segments are formed the same way: the first bit out is the MSB.
* **Latency.** A bit on `chip_scan_in` reaches `circuit_scan_in` 2N = 128
  cycles later, in clear. A bit on `circuit_scan_out` leaves on
  `chip_scan_out` 2N cycles later, encrypted. The chain is held for the first
  2N cycles after reset. `so_valid` rises after 4N cycles.
* **Padding.** Let F be the chain length and R = F mod N. Each pattern is sent
  as a whole number of segments, ceil(F/N) of them. When R > 0, the first
  segment of a pattern starts with N − R filler bits. These bits pass through
  the whole chain during the load. Without observation flip-flops they come
  back, encrypted, as the tail of the next unload.
* **Capture.** After pattern k has been shifted in completely, the tester
  drops `scan_enable` for one cycle. The circuit captures in that cycle and
  the ciphers are frozen. Capture therefore always falls on a segment boundary
  (`seg_end` marks the last cycle of each segment). This happens at enabled
  cycle 2N + k·L after reset, where L = N·ceil(F/N).
* **Unload.** One extra pattern, whose content does not matter, unloads the
  last response. Then 2N more cycles drain the output cipher.

### Test time

For K patterns, plain scan takes T = (F + 1)·K + F cycles. The encrypted
session takes

    T_f = T + 4N + (N − R)(K + 1)      (R > 0)
    T_f = T + 4N                       (R = 0)

The 4N term is 2N to fill the input cipher plus 2N to drain the output cipher.
The (N − R) term is the padding of every load.

Take a 7873-cell chain (123 × 64 + 1) with K = 1148. Then T = 9,047,225 and the
overhead is 72,643 cycles, or 0.8 %. The full-size testbench runs this test set
and measures exactly these numbers.

## The ping-pong scan cipher (`scan_cipher`)

If one register had to stop shifting for D cycles after every N bits, the
whole scan would slow down. Each scan cipher therefore has two 64-bit round
registers, R1 and R2, which swap roles every N cycles:

| phase | R1                                   | R2                                   | chain gets |
|-------|--------------------------------------|--------------------------------------|------------|
| 0     | shift in S1                          | –                                    | –          |
| 1     | process S1 (first 32 cycles)         | shift in S2                          | –          |
| 2     | shift out processed S1, shift in S3  | process S2                           | S1         |
| 3     | process S3                           | shift out processed S2, shift in S4  | S2         |

* The shifting register takes the serial input into its LSB and drives its MSB
  out. So the block processed in the previous phase leaves while the next
  segment enters.
* The other register is fed through a multiplexer into a combinational PRESENT
  round unit (`present_round`). The result is loaded back into the same
  register on each of the first 32 cycles of the phase. The register then
  holds the result until the next swap.
* The input cipher (`DECRYPT=1`) and the output cipher (`DECRYPT=0`) are the
  same module. They run in lockstep on the same select, step index and phase.

### Order of the 32 steps

* **Encryption:** steps 0–30 are full rounds: key XOR, S-box layer, bit
  permutation. Step 31 is the final key XOR.
* **Decryption:** step 0 XORs the last round key. Steps 1–31 are inverse
  rounds: inverse permutation, inverse S-box layer, key XOR.

## One key expansion for both ciphers (`present_key_sched`)

In every phase the output cipher needs round keys K1…K32. In the same cycles
the input cipher needs K32…K1. A single unit serves both:

* **Forward register.** At step 0 the key state is the master key itself, as a
  combinational bypass. From then on the register takes one PRESENT-80 key
  update per cycle. After step 31 it holds the state of K32.
* **Backward register.** That K32 state is copied into the backward register.
  During the next block, the backward register steps through the inverse key
  update, one step per cycle, giving K32, K31, … K1.

So there is no separate store for the decryption key, and it is never
computed in one long combinational chain. The cost is that the decryption keys are correct
only from the second block after reset or after a key change. The first block
after reset only ever holds the input cipher's reset value. The chain is held
during that phase, so no scan data is affected. Keep `key` stable during a
session, and reset the controller after changing it.

## Controller (`scan_ctrl`)

* **Phase counter and select.** A 6-bit phase counter counts scan-enabled
  cycles. Its low 5 bits are the cipher step, and steps run while the count is
  below D. At the end of each phase it flips the R1/R2 select.
* **Fill state machine.** The states are FILL_IN0, FILL_IN1, FILL_OUT0,
  FILL_OUT1 and STREAM, and each fill state lasts one phase. During FILL_IN
  the circuit's scan cells are clock-gated (`dut_clk_en`) while scanning, so
  they do not shift while no plaintext exists yet. `so_valid` is high in
  STREAM.
* **Hold.** Every register of the controller, the ciphers and the key
  expansion has `scan_enable` as its enable. If scan enable drops in the
  middle of a block operation, everything freezes and then resumes where it
  left off, so no clear data can slip through. `scan_hold` reports this state.
* **Reset.** An asynchronous active-low `rst_n` clears the controller, R1 and
  R2 of both ciphers, and the key registers. A reset in the middle of a
  session therefore never shifts out unprocessed register contents.

## Observation flip-flops (`obs_points`)

When R > 0, each load spends N − R cycles on filler bits. With `OBS_POINTS=1`,
the top appends N − R extra scan cells after the circuit's last scan cell.
They capture the `obs` inputs, which are internal signals chosen by the
integrator, in the same capture cycle as the circuit. Their values then leave
with the response instead of the filler bits. This adds observability at no
cost in test time. For the 7873-cell chain that is 63 flip-flops. When R = 0
the segment is not built.

## Top level (`secure_scan_top`)

| parameter    | default | meaning |
|--------------|---------|---------|
| `CHAIN_LEN`  | 7873    | cells in the circuit's scan chain; sets the size of the observation segment |
| `OBS_POINTS` | 1       | add the N − (CHAIN_LEN mod N) observation flip-flops |

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `scan_enable` | in | scan shift enable from the test access port; low = capture / pause |
| `key[79:0]` | in | current key from the device's key store |
| `chip_scan_in` | in | encrypted scan data from the tester |
| `chip_scan_out` | out | encrypted scan data to the tester |
| `so_valid` | out | `chip_scan_out` carries data derived from scan-in (after 4N cycles) |
| `seg_end` | out | last cycle of a 64-cycle segment phase |
| `scan_hold` | out | frozen because `scan_enable` is low |
| `dut_scan_en` | out | scan enable of the circuit's scan cells (equal to `scan_enable`) |
| `dut_clk_en` | out | clock enable of the circuit's scan cells |
| `circuit_scan_in` | out | decrypted data into the first cell of the chain |
| `circuit_scan_out` | in | last cell of the chain |
| `obs[OBS_W-1:0]` | in | observation inputs, OBS_W = N − (CHAIN_LEN mod N), or 1 if that is 0 |

The circuit under test and the key store are outside the design.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `present_pkg.sv` | N, D, key width; S-box, permutation and key-update functions and their inverses |
| `present_round.sv` | combinational round step (encrypt or decrypt) |
| `present_key_sched.sv` | shared forward/backward key expansion |
| `scan_cipher.sv` | R1/R2 ping-pong scan cipher |
| `scan_ctrl.sv` | phase counter, fill state machine, hold |
| `obs_points.sv` | observation scan flip-flops |
| `secure_scan_top.sv` | top level |

`tb/`:

| file | contents |
|------|----------|
| `present_ref_pkg.sv` | independent PRESENT-80 reference model and the published test vectors |
| `tb_<block>.sv` | one self-checking testbench per block |
| `scan_session.sv` | tester plus behavioural scan chain for the end-to-end tests |
| `tb_secure_scan_top.sv` | end-to-end run of four configurations: 150 cells with and without observation flip-flops, 128 cells, and 1728 cells × 55 patterns |
| `tb_secure_scan_full.sv` | the default 7873-cell design with the 1148-pattern test set, about 9.1 M cycles and 15 s of simulation |

In the end-to-end sessions the behavioural chain captures x[i] ^ x[(i+1) mod F]
^ (i mod 5 == 0). Each session checks the following:

* the chain holds each pattern in clear at capture;
* every decrypted response segment is correct;
* no segment leaves in clear;
* `so_valid` rises at cycle 4N;
* the cycle count matches T_f.

Each session also pauses scan enable during a decryption, during an
encryption and in the middle of a pattern, and counts every mechanism it
exercises.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. Running one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/present_pkg.sv tb/present_ref_pkg.sv rtl/*.sv tb/scan_session.sv \
  tb/tb_secure_scan_top.sv --top-module tb_secure_scan_top -Mdir obj
./obj/Vtb_secure_scan_top
```

The same pattern works for the other testbenches. List the packages first.
`scan_session.sv` is needed only by the two end-to-end testbenches.

## Choices made in this design, and limits

* **What follows the published scheme.** The following are taken from the
  published scan-chain encryption scheme this RTL implements:
  * the two scan ciphers with R1/R2 ping-pong;
  * PRESENT with N = 64 and D = 32;
  * the shared key expansion and control;
  * the freeze on scan-enable low;
  * the reset of R1/R2;
  * the observation cells;
  * the test-time formula.
* **PRESENT-80.** The key is 80 bits. The 128-bit variant would change only
  `KEY_W` and the key-update functions.
* **Where the design's own choices lie.** The following are choices of this
  design; any consistent convention would work:
  * the bit order (MSB first);
  * the port names;
  * the fill state machine and status outputs;
  * clock-gating the circuit during the input fill;
  * placing the observation cells at the end of the chain;
  * the forward/backward key expansion.
* **Register count.** The design has about 426 flip-flops without the
  observation cells: 4 × 64 cipher, 2 × 80 key and 10 controller bits. A
  leaner key path that recomputes the decryption key would save up to 80 of
  them.
* **Pauses in the middle of a shift.** Such a pause freezes the ciphers, but
  `dut_clk_en` stays high while `scan_enable` is low. If the circuit's clock
  is not stopped, the circuit will capture, and the observation cells always
  will. Such a pause therefore only leaves the chain intact if the tester also
  stops the circuit's clock.
* **Output before `so_valid`.** `chip_scan_out` is not forced to a constant.
  During the first 4N cycles it carries encrypted reset or mission-mode
  content.
* **Testing the ciphers.** The ciphers are not on any scan chain. They are
  meant to be tested functionally, with the encrypted patterns themselves.
* **What lies outside this design.** Selecting different keys for mission,
  debug and test is left to the key store. Off-chip encryption is tester
  software, modelled here only in `tb/present_ref_pkg.sv`.
