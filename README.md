# AES-128 tag-data encryption with per-tag keys and PRBS randomization

This is RTL for a small encryption/decryption engine meant to protect the user data
of passive UHF RFID tags. Plain AES-128 is wrapped in two extra steps:

1. **Per-tag key.** The AES key (`key2`) is not stored as such. It is formed as
   `key2 = TID[127:0] ^ key1`: the first 128 bits of the tag's unique TID XORed with a
   randomly drawn `key1`. Every tag therefore gets a different AES key from the same
   `key1`.
2. **AES-128** encryption of each 128-bit block with `key2`.
3. **Randomization.** The ciphertext is XORed with 16 bytes from a 12-stage
   pseudo-random sequence generator seeded with a 12-byte vector `key3`.

Decryption runs the same steps backwards: de-randomize with `key3`, then AES-128
decryption with `key2`. The holder must keep `key1` and `key3`; `key2` can be rebuilt
from the TID.

The design follows a published proposal for this scheme, which was built on a
Spartan-3A DSP FPGA and reported 151 Mb/s. Data reaches the circuit from a PC over
an RS-232 serial link, eight bits at a time. The circuit collects the bytes into
128-bit blocks, processes each block, and sends the 16 result bytes back.

## Data path

```
 rxd ─► uart_rx ─► buffer8_128 ─┬─(encrypt)─► data_encryption ─► data_randomizer ─┐
                                │                                                 ├─► buffer128_8 ─► uart_tx ─► txd
                                └─(decrypt)─► data_randomizer ─► data_decryption ─┘
 tid, key1 ─► random_key_gen ─► key2 ─► key_gen inside data_encryption and data_decryption
 key3 ───────────────────────────────► both data_randomizer instances
```

`aes_rfid_top` wires this together. A pulse on `key_load` samples `tid` and `key1`,
forms `key2` and starts both key schedules. `keys_ready` rises once both are done.
Each complete 16-byte block is processed in the mode that `mode_decrypt` has in the
cycle the block completes. A block is dropped, and `dropped` pulses, in two cases: the
keys are not ready, or the previous block has not yet been handed to the transmitter.
With equal receive and transmit rates, a PC that sends back-to-back blocks never hits
the second case. `busy` is high from the moment a block is accepted until its last
byte has gone to the transmitter.

Top-level ports (all logic level; `rst` is synchronous and active high everywhere):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `mode_decrypt` | in | 1 | 0 = encrypt, 1 = decrypt |
| `key_load` | in | 1 | pulse: build `key2 = tid ^ key1` and expand it |
| `tid` | in | 128 | first 128 bits of the tag's TID |
| `key1` | in | 128 | random key 1 |
| `key3` | in | 96 | 12-byte start vector of the PRBS |
| `rxd` / `txd` | in / out | 1 | serial lines, idle high |
| `keys_ready`, `busy`, `dropped` | out | 1 | status, see above |

Parameter: `CLKS_PER_BIT` (default 434, i.e. 115200 baud from a 50 MHz clock).

## The AES engines

`data_encryption` and `data_decryption` are iterative. Each contains its own key
schedule (`key_gen`) and **one** instance of every round step. Each step is a separate
module with a registered output and an `in_valid`/`out_valid` pulse:
`add_round_key`, `sub_bytes`, `shift_rows`, `mix_columns` and their inverses
`inv_sub_bytes`, `inv_shift_rows`, `inv_mix_columns`. A small controller passes the
state from one step to the next, so only one step is active in any cycle. A
4-bit counter `kidx` records which round key the last AddRoundKey used. It decides
where the AddRoundKey output goes next, and whether MixColumns is bypassed.

Encryption schedule (cycle count after the block is accepted):

| cycles | steps |
|---|---|
| 1 | AddRoundKey(rk0) |
| 4 × 9 | rounds 1–9: SubBytes → ShiftRows → MixColumns → AddRoundKey(rk*r*) |
| 3 | round 10: SubBytes → ShiftRows → AddRoundKey(rk10), MixColumns bypassed |
| 1 | output register |

`outvalid` therefore pulses **41 cycles** after `datainvalid` is accepted.
Decryption uses the same step count in the inverse-cipher order:
AddRoundKey(rk10), then InvShiftRows → InvSubBytes → AddRoundKey(rk9), then eight
times InvMixColumns → InvShiftRows → InvSubBytes → AddRoundKey(rk8 … rk1), and finally
InvMixColumns → InvShiftRows → InvSubBytes → AddRoundKey(rk0). It also takes 41 cycles.

The engines accept a block only when `ready` is high, meaning the keys are valid and
no block is in progress. A request at any other time is ignored, and an assertion
checks this. `dataout` holds the last result until the next block finishes. The engine
is ready again in the cycle after `outvalid`. With `datainvalid` held high, a new
result therefore appears every 41 cycles.

At 41 cycles per 128-bit block the engine moves 3.12 bits per clock. The reported
151 Mb/s therefore corresponds to a clock of about 48.4 MHz. No clock frequency was
published for the original design, so this is only a consistency check.

**State byte order.** Everything uses the FIPS-197 convention. Byte *i* of a block is
bits `[127-8i -: 8]`. The 4×4 state is filled column by column, so row *r*, column *c*
is byte `r + 4c`. The example vectors in the testbenches are the FIPS-197 ones and
they match this order.

**S-boxes.** `aes_pkg` computes the S-box and inverse S-box tables during
elaboration, from their definition: the multiplicative inverse in
GF(2^8) mod x^8+x^4+x^3+x+1, computed as b^254, followed by the affine map
b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63. The inverse table is
found by inverting the S-box. `sub_bytes` is organised as four 32-bit units, one per
column, each made of four byte look-ups. All 16 bytes are substituted in one cycle.
`key_gen` uses four more look-ups for SubWord.

**Key schedule.** On a rising edge of `invalid` (`keyinvalid` on the engines),
`key_gen` stores the key as rk0. It then derives one round key per cycle with the
standard recurrence (RotWord, SubWord, Rcon doubling from 0x01). All eleven keys stay
in registers, because decryption reads them in reverse. `keysvalid` is low during the
10 cycles of expansion and high afterwards. The encrypt and decrypt engines each
expand their own copy; sharing one schedule would save about 1400 flip-flops.

## The randomizer

`data_randomizer` is the least standard part, and the part where this RTL makes the
most choices of its own. The proposal fixes three things: 12 stages, a 12-byte seed
`key3` and XOR whitening of the ciphertext. It does not publish the generator's
feedback. This implementation uses the following:

* Each of the 12 stages holds a **byte**. Stage *i* is loaded from `key3` byte *i*
  (stage 0 from bits 95:88).
* Each clock, the stages shift by one (stage *i* ← stage *i−1*). Stage 11 is the
  output byte. The new stage 0 is `stage11 ^ stage10 ^ stage7 ^ stage5`. Every bit
  lane is thus a maximal-length 12-bit LFSR (x^12 + x^6 + x^4 + x + 1, period 4095).
* Output byte *t* is XORed into block byte *t*, for t = 0 … 15.

As a sequence: let a[0..11] be the key3 bytes from last to first (bits 7:0 first). Then
a[t+12] = a[t] ^ a[t+1] ^ a[t+4] ^ a[t+6], and the keystream is a[0..15]. Example:
key3 = 0x0102…0c gives the keystream 0c 0b 0a 09 08 07 06 05 04 03 02 01 09 03 01 07.

The generator restarts from `key3` for every block. Randomizer and de-randomizer are
therefore the same module and share no state. A block takes 16 cycles plus one load
cycle: `out_valid` pulses 17 cycles after acceptance. An all-zero `key3` byte lane
gives a zero keystream lane, so `key3` should be drawn with that in mind.

A block sees 41 + 17 = 58 cycles of processing in either mode.

## Serial link and buffers

`uart_rx` and `uart_tx` use 8N1 frames, LSB first, at `clk / CLKS_PER_BIT` baud. The
receiver synchronises `rxd` through two flops and re-checks the start bit at its
middle. It samples every bit at its middle and drops frames whose stop bit is low.
`buffer8_128` shifts bytes in so that the first byte received becomes block byte 0.
`buffer128_8` sends the result back in the same order, byte 0 first. It offers a byte
with `tx_start` and advances when the transmitter's `ready` is high.

## Where this RTL departs from, or adds to, the published design

* The published design is in VHDL. This is an independent SystemVerilog
  implementation of the same structure: RS-232 in, 8→128 buffer, Key_Gen,
  AddRoundKey, SubBytes/InvSubBytes, ShiftRows/InvShiftRows, MixColumns/InvMixColumns,
  encryption and decryption modules, randomizer, RS-232 out.
* The cycle schedule and the 41-cycle latency are this design's. So are the
  valid/ready handshakes, the byte order on the link and the drop policy.
* The PRBS feedback taps, the byte-wide stages and the per-block restart are this
  design's choices (see above). A randomizer built from another reading will produce
  a different keystream.
* Where `key1`, `key3` and the TID come from is outside this design. A random-number
  source, tag memory and key storage are not included; the values arrive on ports.
* The output buffer (128→8) and the mode-select pin are additions. They are needed to
  return results over the 8-bit link and to choose between the two paths.
* The baud rate (115200) and the clock it assumes (50 MHz) are assumptions.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/aes_ref_pkg.sv` is a
reference model written independently of the RTL. Its S-box comes from exp/log tables
with generator 0x03, its cipher works on a byte array, and it writes the PRBS as the
plain recurrence above.

* Single steps (`tb_sub_bytes` … `tb_add_round_key`): the FIPS-197 Appendix B round-1
  values, then 200 random states. The checks also cover the one-cycle latency, hold
  and reset.
* `tb_key_gen`: all round keys of the FIPS-197 key, including
  rk10 = d014f9a8c9ee2589e13f0cc8b6630ca6, plus 30 random keys. It also checks that
  `keysvalid` comes 10 cycles after the load.
* `tb_data_encryption`, `tb_data_decryption`: the FIPS-197 B and C.1 vectors
  (3243f6a8… → 3925841d…, 00112233… → 69c4e0d8…) and 60 random blocks. They also check
  the 41-cycle latency, that requests while busy or before keys are ready are
  ignored, and that the output holds. With `datainvalid` held high they also check
  one result every 41 cycles.
* `tb_data_randomizer`: the hand-worked keystream above, random blocks and keys, and
  the round trip.
* `tb_uart_rx`, `tb_uart_tx`, `tb_buffer8_128`, `tb_buffer128_8`: framing, byte
  order, framing errors, glitches and back-pressure.
* `tb_aes_rfid_top`: end to end at the default 434 clocks per bit, with the testbench
  acting as the PC. It drops a block sent before any key is loaded. It then encrypts
  and decrypts with three key sets, switching mode each block. It checks every reply,
  and checks the 58-cycle processing time in both modes.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_data_encryption.sv --top-module tb_data_encryption
./obj_dir/Vtb_data_encryption
```

Replace the testbench name to run any other. The end-to-end test runs about a million
clock cycles and finishes in about a second.

## Changing it

* Baud rate: `CLKS_PER_BIT` on `aes_rfid_top` (or on `uart_rx`/`uart_tx`).
* Another PRBS: edit the feedback line in `data_randomizer` and the recurrence in
  `ref_keystream` in `tb/aes_ref_pkg.sv`. Change both together.
* Throughput: the step modules can be chained combinationally inside one round, which
  gives 11 cycles per block. That changes the 41-cycle latency checks in the
  testbenches.
