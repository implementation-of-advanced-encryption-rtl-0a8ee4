# Byte-serial AES-128 core

This core encrypts and decrypts 128-bit blocks with a 128-bit key (AES-128,
FIPS-197). It does so through a pin-frugal 8-bit interface of 31 pins. The
datapath is one byte wide throughout:

- one S-box substitutes the data;
- a second S-box computes the round keys;
- one MixColumns unit serves both directions.

ShiftRows needs no logic of its own: it is a one-cycle permuted reload of the
state register. The round keys are never stored. The key register always holds
one round key and computes the next one, or the previous one, a byte at a time,
in step with the data. So one key-expansion unit serves both encryption and
decryption.

An operation takes 222 clock cycles per block in either direction. Sometimes the
key register first has to be walked to its other end, and then it takes 382.

## Pins and protocol

| pin | dir | width | use |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `data_in` | in | 8 | text byte, taken while `load_in` is high |
| `key_in` | in | 8 | key byte, taken together with `data_in` |
| `load_in` | in | 1 | one data byte and one key byte per cycle |
| `start_in` | in | 1 | start an operation; samples `inverse_in` |
| `inverse_in` | in | 1 | 0 = encrypt, 1 = decrypt |
| `unload_in` | in | 1 | rotate the state by one byte per cycle |
| `data_out` | out | 8 | head byte (byte 0) of the state |
| `busy_out` | out | 1 | operation in progress |

Bytes are numbered as in FIPS-197: byte *i* is row *i* mod 4, column *i* div 4.
Byte 0 is the first one transferred.

1. **Load.** Hold `load_in` for 16 cycles and present bytes 0..15 of the block
   and of the key. Every load also loads a key, so key and block always travel
   together.
2. **Start.** Pulse `start_in` for one cycle with `inverse_in` valid. `busy_out`
   rises on the next edge and falls when the result is in the state register.
   While `busy_out` is high, `load_in`, `start_in` and `unload_in` are ignored.
   While idle, `start_in` wins over `load_in`, which wins over `unload_in`.
3. **Unload.** Hold `unload_in` for 16 cycles and sample `data_out` in each of
   them. You get bytes 0..15. The state is rotated, not consumed, so the block
   is unchanged afterwards. It can be unloaded again, or processed again by
   another `start_in`.

## Datapath

```
             +--------------------- state chain (16 x 8, aes_byteperm) ----------------------+
 data_in --->| tail                                                                 head |---+--> data_out
             +---------------------------^-----------------------------------------------+   |
                                         |           one-cycle ShiftRows / InvShiftRows       |
                                         |                                                   v
                                     st_in mux <--- MixColumns result <--- aes_mixcolumns <--+-- aes_subbytes (S1)
                                         ^                                    ^                       |
                                         +---------- XOR <--- key_out --------+-- XOR (decrypt) ------+
                                                         ^
             +-------- key chain (16 x 8, aes_keyexp, S-box S2, Rcon) -------+
 key_in ---->| tail                                                    head |
             +---------------------------------------------------------------+
```

Both registers are byte-wide shift chains. Byte 0 is at the head, and a shift
moves every byte one place towards the head. Sixteen shifts therefore stream a
whole block past the logic between head and tail, and leave it in its original
byte order.

## The round schedule

SubBytes works on single bytes, so it commutes with ShiftRows. Each round
therefore starts with the permutation and then streams the block once:

| pass | cycles | what enters the tail of the state chain |
|---|---|---|
| ARK | 16 | `head ^ key` (key register only replays k0, or k10 for decryption) |
| PERM | 1 | the whole state reloaded as ShiftRows(state) or InvShiftRows(state) |
| ROUND | 20 | the MixColumns unit's result, 4 cycles behind the bytes fed to it |
| FINAL | 16 | `S(head) ^ key` (encrypt) or `InvS(head) ^ key` (decrypt) |

An encryption runs ARK, then 9 × (PERM, ROUND), then PERM, FINAL.
That is 16 + 9·21 + 17 = 222 cycles.

**Why ROUND takes 20 cycles.** During cycles 0..15 the bytes of the
substituted stream are fed into the MixColumns unit, which takes one byte per
cycle. When the fourth byte of a column arrives, the unit registers the four
result bytes. They stay there for the next four cycles, while the next column is
being gathered. In cycle *j* (4..19) the tail of the state chain takes result
byte *j* mod 4 of the previous column.

Cycles 0..3 put junk into the tail. After 20 shifts that junk has dropped off
the head, and byte *p* of the chain holds the value written in cycle *p*+4.
That is exactly result byte *p*.

**Where the round key goes.** Encryption adds the key after MixColumns. The
key register is therefore stepped in cycles 4..19, in step with the bytes
written back. Decryption follows the straightforward inverse cipher:
InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns. The key is added to
the stream going *into* the MixColumns unit, so the key register steps in
cycles 0..15. Both directions use the same MixColumns unit, switched to its
inverse matrix.

## Round keys computed forwards and backwards

The key register holds one round key. Suppose it is stepped with byte position
*j* on `seq_in` and round *r* on `round_in`. The byte entering its tail is then
byte *j* of the neighbouring round key, and `key_out` shows that new byte.

Forward, producing k(r) from k' = k(r−1):

- *j* < 4: k'[*j*] ⊕ S(k'[12 + (*j*+1) mod 4]) ⊕ (*j* = 0 ? Rcon(r) : 0)
- *j* ≥ 4: k'[*j*] ⊕ k(r)[*j*−4]. That is the byte written four shifts earlier,
  now at chain position 12.

Backward, producing k(r−1) from k' = k(r):

- *j* < 4: k'[*j*] ⊕ S(k'[m] ⊕ k'[m−4]) ⊕ (*j* = 0 ? Rcon(r) : 0), with
  m = 12 + (*j*+1) mod 4. This works because k(r−1)[m] = k'[m] ⊕ k'[m−4].
- *j* ≥ 4: k'[*j*] ⊕ k'[*j*−4]. A four-byte delay line of past head bytes
  supplies k'[*j*−4].

A byte k'[m] that has not yet left the chain sits at position m − *j* at
shift *j*. So the S-box input is a fixed position (13, or 9 and 5) selected by
*j* = 3. Rcon(r) = x^(r−1) in GF(2^8) is computed from its formula.

After loading, the key register holds k0. After an encryption it holds k10. A
decryption walks it back to k0. A flag records which end it is at. When an
operation starts at the wrong end, the controller first runs 10 key-only passes
of 16 cycles:

- forward, before a decryption that follows a load;
- backward, before an encryption of a result that was not reloaded.

Those passes cost the extra 160 cycles. A decryption issued right after an
encryption of the same key needs none. The result is 222 cycles if the
register is already at the right end and 382 otherwise.

## Substitution with one S-box

`aes_sbox` is a constant 256-entry table. Each entry is computed at elaboration
as the GF(2^8) inverse (a^254) followed by the affine map, so no numbers are
typed in.

`aes_subbytes` also produces the inverse S-box with the same table. With
S(x) = A(x⁻¹), the inverse is InvS(y) = A⁻¹(S(A⁻¹(y))). The cost is two
inverse affine maps, which are a few XORs each, instead of a second table.

## Modules

| file | role |
|---|---|
| `rtl/aes_pkg.sv` | byte/column types, GF(2^8) arithmetic, S-box formula, Rcon, (Inv)MixColumns |
| `rtl/aes.sv` | top: pin protocol and the pass sequencer (FSM IDLE, KPREP, ARK, PERM, ROUND, FINAL) |
| `rtl/aes_byteperm.sv` | 16-byte state chain with serial shift and ShiftRows/InvShiftRows reload |
| `rtl/aes_subbytes.sv` | SubBytes/InvSubBytes on one byte, around one S-box |
| `rtl/aes_sbox.sv` | forward S-box, used twice (data path and key expansion) |
| `rtl/aes_mixcolumns.sv` | serial-in, parallel-out (Inv)MixColumns of one column |
| `rtl/aes_keyexp.sv` | 16-byte key chain with forward and backward byte-serial expansion |

## Verification

Each module has a self-checking testbench in `tb/`. They compare against
`tb/aes_ref_pkg.sv`, a behavioural AES-128 written independently of the RTL:

- an exp/log-table S-box;
- a word-oriented key schedule;
- whole-state rounds.

| testbench | what it shows |
|---|---|
| `tb_aes_sbox` | all 256 entries; fixed pairs such as 00→63, 20→b7, 87→17 |
| `tb_aes_subbytes` | both directions for all 256 inputs, and the round trip |
| `tb_aes_mixcolumns` | 400 random columns back to back in both modes, with gaps in the input; the column db 13 53 45 ↔ 8e 4d a1 bc |
| `tb_aes_byteperm` | serial load and unload, ShiftRows, InvShiftRows, and their composition |
| `tb_aes_keyexp` | ten steps forward and ten back for the FIPS-197 key and 20 random keys; the published round-10 key d014f9a8… |
| `tb_aes` | the whole core through its pins at its only configuration |
| `tb_aes_ecb` | ECB encryption of two generated messages, 355 KB and 7.14 MB (490,647 blocks), every block checked, every 64th decrypted back; runs about two minutes |

`tb_aes` covers:

- the FIPS-197 appendix C.1 vector, whose ciphertext is 69c4e0d8…c55a;
- decryption with and without key preparation;
- double encryption without reload, which triggers the backward key walk;
- a start pulse while busy, which must be ignored;
- the text block "MIT-COE" under the key "ELECTRONICS", both padded to 16 bytes
  with '-';
- random blocks in both directions.

It checks every busy time against 222 or 382 cycles, and counts each mechanism
to make sure it happened.

To run one of them with Verilator, for example the full core:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/aes.sv tb/tb_aes.sv --top-module tb_aes
./obj_dir/Vtb_aes
```

The packages are named explicitly because they must be read first. The other
modules are found through `-Irtl` by their file names. For a unit testbench,
replace `rtl/aes.sv` and `tb/tb_aes.sv` by the unit and its testbench. The top
carries concurrent assertions on its schedule, which `--assert` enables.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## How this relates to the original design description

This RTL follows a short published description of an AES-128 core for a
Spartan-3 FPGA, written there in VHDL. That description provides:

- the pin names and the 8-bit width of data, key and output;
- the unit breakdown: key expansion, mix columns, byte permutation, two S-boxes
  and sub-byte;
- the statement that one key expansion serves both directions;
- unit-level waveforms, which supplied some port names and a few S-box values.

It does not describe how the units are wired or scheduled. The following are
therefore this design's own:

- the shift-chain organisation;
- the 222-cycle schedule;
- the load/start/unload protocol and their priorities;
- synchronous reset;
- byte 0 first;
- the on-the-fly backward key expansion and the key-position flag;
- sharing one S-box for InvSubBytes.

What to keep in mind when comparing:

- **Throughput.** The description states throughput as clock frequency × 128
  bits, which would mean one block per cycle. This core delivers 128 bits per
  222 cycles: about 59 Mbit/s at 103 MHz, the maximum clock reported for the
  original FPGA build. With the 16-cycle byte-wide load and unload of each
  block it is 261.8 cycles per block, about 50 Mbit/s.
- **Size.** The original build reported 192 flip-flops plus 48 shift-register
  LUTs. This RTL has about 360 flip-flops and makes no attempt to match that
  mapping.
- **Unmodelled pin.** The byte-permutation test waveform shows a
  `load_ser_in` pin whose role is not explained. It is not modelled; serial
  loading uses `shift_in`.
- **Timing claims.** No timing closure has been attempted here. The critical
  path runs from the state head through SubBytes, the XOR with the key byte and
  InvMixColumns into the column register.
