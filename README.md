# Byte-serial AES-128 in a few FPGA slices

This core encrypts one 128-bit block under a 128-bit key with AES-128. It expands
the key on the fly. The goal is minimum area, not speed. The whole cipher runs
through a single 8-bit lane: one S-box, one 8-bit accumulator and two tiny 32 x 8-bit
distributed (LUT) RAMs. The RAMs hold the cipher state and the round key, so no
128-bit register exists anywhere. The key schedule shares the S-box and the XOR
unit with the round function. An encryption takes 1450 clock cycles.

The architecture follows the published design "Pushing the Limits: Ultra-Lightweight
AES on Reconfigurable Hardware". That design reports 21 Spartan-6 slices, no block
RAM, 105 MHz and 1471 cycles per block. The sequencing, memory layout and host
interface here are this implementation's own, because the publication describes
the datapath but not the cycle-by-cycle schedule. See "Departures" below.

## Datapath

```
  r --> [state RAM 32x8] --state_q--+
                                    +--> sbox_in_mux --> [S-box] --------+
  r --> [key RAM 32x8] ----key_q----+                                    |
                             |                                           v
                             +------------------------------------> alu_in_mux --> [MC&KA] --> r
                                              key_i, pt_i --------->                     (= ct_o)
```

* `aes_state_ram`: the round state, stored as two 16-byte halves.
* `aes_key_ram`: the round key in words 0..15, and the round constants RC[1..10]
  as power-up contents in words 16..25.
* `aes_sbox_in_mux`: selects the S-box input, state for SubBytes or key for the
  key schedule.
* `aes_sbox`: a 256-entry look-up table. Its contents are computed at elaboration
  from the S-box definition, the inverse in GF(2^8) followed by the affine map
  with 0x63.
* `aes_alu_in_mux`: selects the accumulator operand. The choices are the external
  key byte, the external plaintext byte, the S-box output, or the key RAM output
  (used for key additions).
* `aes_mc_ka`: the "MixColumns and KeyAdd" unit, an 8-bit register `r` behind a
  four-operation ALU. `r` is the only data register in the design. It feeds the
  write ports of both RAMs and the ciphertext output.

Both RAMs behave like an 8-bit-wide LUT RAM. A 32 x 8 RAM uses all four LUTs of a
slice, so its read and write share **one address**. Reads are asynchronous and
writes happen at the clock edge. Because of this, a byte's result is always
written in a cycle of its own. In that cycle the RAM's address is the write
address.

## The MC&KA accumulator and byte-serial MixColumns

The ALU has four operations, encoded as in the published design:

| op | effect               |
|----|----------------------|
| 00 | `r = x` (set)        |
| 01 | `r = r ^ x` (add)    |
| 10 | `r = r ^ 02·x`       |
| 11 | `r = r ^ 03·x`       |

MixColumns needs all four bytes of a column for every output byte. The core
computes each output byte separately over five cycles. Four cycles bring in the
column bytes through the S-box, and a fifth adds the round-key byte (AddRoundKey
costs no extra hardware). Output row `r` reads the input rows in the order
`r+2, r+3, r, r+1` (mod 4). Their MixColumns coefficients are then always
1, 1, 2, 3. So the 2-bit MixColumns counter is the ALU opcode itself, and the
first step is always a plain "set". A sixth cycle writes the byte. A column's
inputs are each read four times (once per output byte). This is cheaper than
buffering them.

## ShiftRows by addressing, and the two state halves

ShiftRows has no hardware. It is only a choice of read address. Byte `k` of the
state is row `k % 4`, column `k / 4` (FIPS-197 order). Output byte (row `r`,
column `c`) reads row `r` of column `(c + r) mod 4`. The output bytes of a round
are written while inputs of the same round are still needed. For that reason, a
round reads one 16-byte half of the state RAM and writes the other.

* Round `i` reads half `~i[0]` and writes half `i[0]`.
* The load phase (round 0) writes half 0.

`aes_addr_gen` builds all addresses from the state and three counters: round
(4 bit), byte (4 bit) and MixColumns input (2 bit).

## Key schedule in place

Each round first updates the round key byte by byte in the key RAM, in
increasing order. Then it processes the state with the new key. The update is:

```
k0  ^= S(k13) ^ RC[i]        k1 ^= S(k14)     k2 ^= S(k15)     k3 ^= S(k12)
kj  ^= k(j-4)   (new value)  for j = 4..15
```

`k12..k15` are still the old values when bytes 0..3 read them, because they are
rewritten last. `k(j-4)` is already new when byte `j` reads it. That is why the
order is fixed. The round constant comes out of the key RAM (word 15+i) and
reaches the accumulator through the same "add" as any key byte.

## Schedule and latency

`aes_ctrl` sequences the phases below and `aes_microcode` turns each state into a
control word.

| phase                        | cycles per byte                                    | total |
|------------------------------|----------------------------------------------------|-------|
| load + key whitening         | set key_i / write key, add pt_i / write state      | 48    |
| key schedule, byte 0         | set k0 / add S(k13) / add RC / write               | 4     |
| key schedule, bytes 1..15    | set / add S() or add k(j-4) / write                | 45    |
| rounds 1..9 (MixColumns)     | 4 x S-box in / add key / write                     | 96    |
| round 10 (no MixColumns)     | set S() / add key / write (ciphertext byte out)    | 48    |

In total: 48 + 9 x (49 + 96) + (49 + 48) = **1450 cycles**, counted from the cycle
after `start` to the cycle in which `done` is high with the last ciphertext byte.
`start` is ignored while `busy`. A new block can start in the cycle after `done`.

## Interface (`aes_lw_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `start` | in | 1 | begin an encryption (taken while `busy=0`) |
| `in_idx` | out | 4 | index of the key/plaintext byte the core wants |
| `key_rd` / `pt_rd` | out | 1 | the core consumes `key_i` / `pt_i` as byte `in_idx` in this cycle |
| `key_i`, `pt_i` | in | 8 | key and plaintext byte, driven by the host from `in_idx` (combinationally, e.g. from a 16-byte buffer) |
| `ct_o` | out | 8 | ciphertext byte, valid when `ct_valid=1`, index `ct_idx` |
| `busy`, `done` | out | 1 | encryption running; `done` pulses with ciphertext byte 15 |

The core reads key byte `k` in load cycle `3k+1` and plaintext byte `k` in cycle
`3k+2`. Ciphertext bytes 0..15 come out in order in the last 48 cycles, one every
3 cycles.

## Departures from the published design

* **Cycle count.** This implementation takes 1450 cycles per block. The publication
  reports 1471. Its per-step schedule is not given, so the schedule here is this
  implementation's own. At the published 105 MHz, 1450 cycles would give about
  9.27 Mbit/s, against a published 9.12 Mbit/s.
* **Area and frequency** are not measured here. The RTL is generic: the RAMs are
  arrays and the S-box is a constant table. The published 21-slice result relies
  on mapping them onto Spartan-6 RAM32M and LUT primitives. That needs a vendor
  flow, and possibly explicit primitive instantiation.
* **Own choices:**
  * the host interface;
  * the double-half layout of the state RAM;
  * the placement of the round constants at words 16..25 of the key RAM;
  * the MixColumns input order;
  * the enable on the MC&KA register;
  * the synchronous reset;
  * all state encodings.
* **Not built:** the publication also proposes future work: shuffling and masking
  against side channels, use as a PRNG, and modes of operation such as counter
  mode. None of it is included. Only encryption is provided; there is no
  decryption datapath.

## Files

* `rtl/aes_pkg.sv`: enums, the control-word struct, GF(2^8) helpers, S-box and
  round-constant functions.
* `rtl/aes_lw_top.sv`: the core.
* `rtl/aes_ctrl.sv`, `rtl/aes_microcode.sv`, `rtl/aes_addr_gen.sv`: the control logic.
* `rtl/aes_state_ram.sv`, `rtl/aes_key_ram.sv`, `rtl/aes_sbox.sv`,
  `rtl/aes_sbox_in_mux.sv`, `rtl/aes_alu_in_mux.sv`, `rtl/aes_mc_ka.sv`: the datapath.
* `tb/aes_ref_pkg.sv`: an independent reference AES-128. Its S-box is built by
  searching for the inverse, and it expands the key word by word.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## How far it is verified

The end-to-end test `tb_aes_lw_top` encrypts the FIPS-197 examples. These are
appendix B (key `2b7e1516...`, result `3925841d...`) and appendix C.1 (key
`00010203...`, result `69c4e0d8...`). It then encrypts 100 random blocks and
compares each with the reference model. It also resets the core in the middle of
an encryption and checks that the next block is still correct, and it holds
`start` high so that two blocks run back to back. It checks the 1450-cycle
latency of every block and counts each mechanism (loading, shared S-box in the
key schedule, round constants, all four ALU operations, key addition, final round,
RAM writes, output, reset, back-to-back start).

The unit testbenches check the following:

* `tb_aes_sbox`: the S-box on all 256 inputs.
* `tb_aes_mc_ka`: the accumulator against a model, including the FIPS-197
  MixColumns column example.
* `tb_aes_addr_gen`: every address the generator can produce, checked against
  the ShiftRows and MixColumns definitions.
* `tb_aes_microcode`: every control word.
* `tb_aes_ctrl`: the state-visit counts of the controller.
* `tb_aes_state_ram`, `tb_aes_key_ram`: the RAMs against a shadow array.

Assertions in `aes_ctrl` and `aes_lw_top` check two rules: the round counter stays
in range, and at most one RAM is written per cycle.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_aes_lw_top rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_lw_top.sv
./obj_dir/Vtb_aes_lw_top
```

Replace `tb_aes_lw_top` with any other `tb_*` name to run a unit test. Only
`tb_aes_lw_top` needs `tb/aes_ref_pkg.sv` along with the package. Lint the RTL
with `verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/aes_lw_top.sv`.

To change the design, start in two places. The per-state control words are in
`aes_microcode`, so a different schedule is mostly a change there and in the
state transitions of `aes_ctrl`. All address arithmetic, including ShiftRows, is
in `aes_addr_gen`.
