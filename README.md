# Compact AES-CCM encryption core with a byte-serial AES engine

This is an AES-CCM authenticated-encryption core for very small, very low-power
devices, such as IEEE 802.15.6 body-area-network nodes. It encrypts a payload and
computes its message authentication code (MAC). The whole job runs on **one
AES-128 engine that handles one byte per clock cycle**. CCM needs two passes over
the data: CBC-MAC for authentication and counter mode for encryption. Both passes
run one after the other on that single engine. The engine needs 160 cycles per
128-bit block. This makes throughput the price of small area. At the 149 MHz
reported for this architecture in 65 nm, the block rate is 119.2 Mbit/s. That is
well above the roughly 10 Mbit/s a body-area network needs.

The RTL is synthesizable SystemVerilog-2017. It reproduces the published test
vector of the architecture bit for bit, and it reaches the published cycle count:
960 cycles for a 256-bit payload.

## One operation, block by block

With `x = PLEN/128` payload blocks, an operation is a chain of `2x + 2` AES
blocks. Each block starts in the cycle in which the previous one finishes:

| # | AES input | what happens to the output |
|---|-----------|----------------------------|
| 1 | B0 (flags, nonce, length) | chaining value |
| 2 .. x+1 | payload block `i` XOR chaining value | chaining value (CBC-MAC) |
| x+2 | CTR0 | the MAC `T` is taken from the last chaining value first; this output S0 is XORed into it |
| x+3 .. 2x+2 | CTR1 .. CTRx | XORed into payload block `i-1`, in place |

For the default 256-bit payload this is 6 blocks × 160 = **960 cycles**.
`busy_out` is high for exactly that long.

The controller (`ccm_fsm`) has three states: idle, CBC pass, CTR pass. It also
has a block counter. Its outputs are Mealy outputs of the engine's `done`
pulse:
- `aes_start` with `src`, which selects B0, CBC or CTR;
- `pl_idx`, the payload block being read or written;
- `ctr_i`, the counter value;
- the one-cycle strobes `mac_cap`, `tag_enc` and `pl_wr`.

The AES input multiplexer in `aes_ccm_top` chooses one of three sources: `B0`,
`payload_block ^ aes_out`, or `CTRi`.

## The byte-serial AES engine (`aes8_core`)

This is the part that takes the most care to follow.

**State and round timing.** The 128-bit input is loaded in parallel. The initial
AddRoundKey is applied at the same time: `st <= din ^ key`. After that, each
round takes 16 cycles. The cycle index is `cnt = 4*c + r`, where `c` is the
column and `r` is the row.

- **SubBytes and ShiftRows.** In cycle `4c + r` a 16:1 byte multiplexer reads
  the byte at row `r`, column `(c + r) mod 4`. That read address *is*
  ShiftRows. The byte goes through the data S-box. Rows 0 to 2 are kept in a
  3-byte column buffer.
- **MixColumns and AddRoundKey.** In the fourth cycle of a column (`r = 3`),
  the buffered bytes and the current S-box output form one column. That column
  goes through a single MixColumns unit and is XORed with round-key word `c`.
  The last round bypasses MixColumns.
- **Double buffering.** New columns 0 to 2 are held in a 12-byte buffer. The
  whole state is replaced only after column 3. ShiftRows needs the old bytes of
  every column until the end of the round, so the state cannot be overwritten
  column by column.

**Key schedule, on the fly.** A second S-box works on the working key register
`rk`:

- In cycles 0 to 3 of each round, it substitutes `RotWord(w3)` one byte per
  cycle.
- In cycle 3, `w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon` is formed and written
  back in place.
- In cycle `4c + 3`, `wc' = wc ^ w(c-1)'` is formed and written back. Here
  `w(c-1)'` has already been updated.

So each round key word is ready exactly in the cycle its column needs it. `rk`
is reloaded from the key input at every `start`, so the stored cipher key is
never changed.

**Handshake.** A `start` pulse is accepted when the engine is idle, or in its
`done` cycle. An assertion checks this. `done` is combinational in the 160th
cycle, and `dout` already carries the result in that cycle. This lets the
controller chain blocks with no gap. After that cycle, `dout` holds the result.

**S-box.** The S-box is a 256×8 ROM. Its contents are computed during
elaboration from the FIPS-197 definition: the inverse in GF(2^8) followed by
the affine map. See `aes_ccm_pkg::sbox_calc`. Synthesis turns the ROM into
logic. An area-optimised composite-field S-box could replace the ROM without
changing the interface.

## Block formats and the length field

`frame_gen` builds the two kinds of CCM block:

- `B0 = flags | nonce | Q`, with flags `{0, Adata=0, (Tlen/8-2)/2, q-1}`;
- `CTRi = {00000, q-1} | nonce | i`.

Here `q = 15 - Nlen/8`. There is no associated-data input, so `Adata` is
always 0.

The published worked example has Nlen = 104, Tlen = 32 and Plen = 256. Its
output is:

```
MAC        d5 2a 25 43
ciphertext b9 0d 01 f7 6e 0f d8 b1 3c 97 13 3f 9c 46 15 9a
           9a aa 73 2e ea 26 04 58 24 30 48 d0 8f 1d 92 4e
```

- The ciphertext is standard CCM.
- The MAC comes out this way only if the length field `Q` holds the payload
  byte count **minus one**: `0x001f` instead of `0x0020`.

The parameter `Q_BIAS` captures this. `Q = PLEN/8 - Q_BIAS`.

| `Q_BIAS` | behaviour | MAC for this example |
|----------|-----------|----------------------|
| 1 (default) | reproduces the published example | `d52a2543` |
| 0 | standard NIST SP 800-38C CCM | `8d46d5f5` |

The ciphertext is the same either way. Use `Q_BIAS = 0` to interoperate with
other CCM implementations.

## Interface (`aes_ccm_top`)

All data ports are one byte wide. `reset` is synchronous and active high.

| port | dir | use |
|------|-----|-----|
| `load_in_k`, `key_in[7:0]` | in | key, 16 cycles, byte 0 first |
| `load_in_n`, `nonce[7:0]` | in | nonce, `NLEN/8` cycles, byte 0 first |
| `load_in_p`, `payload[7:0]` | in | payload, `PLEN/8` cycles, byte 0 first |
| `start_in_ccm` | in | one-cycle pulse, starts the operation |
| `busy_out` | out | high while computing; when it falls, the output is ready |
| `cipher[7:0]`, `load_out` | out/in | `cipher` shows the current output byte; each cycle with `load_out` high moves to the next byte |

The output comes out in this order: `TLEN/8` MAC bytes, then `PLEN/8`
ciphertext bytes.

While `busy_out` is high, the core ignores loads, `load_out` and a second
`start_in_ccm`. A new `start_in_ccm` rewinds the output to the first MAC byte.

The key and the nonce stay loaded until they are overwritten. The payload
register holds the ciphertext after a run, so load a new payload before every
operation. Bytes are loaded into shift registers, so only the last `N/8` bytes
loaded count.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NLEN` | 104 | nonce bits, 56 to 104 in whole bytes |
| `TLEN` | 32 | MAC bits, 32 to 128 in steps of 16 |
| `PLEN` | 256 | payload bits, a multiple of 128 |
| `Q_BIAS` | 1 | see the length field above |

The payload length is fixed when the core is built. There is no length input.
Pad a shorter message with zero bytes, as the worked example does: 24 data
bytes plus 8 zero bytes. Zero padding changes the MAC relative to CCM over the
unpadded message, because `Q` and the CBC input both include the padding.

## Files

- `rtl/aes_ccm_pkg.sv`: shared types, the `aes_src_e` selector, GF(2^8) and MixColumns functions, and the S-box generator.
- `rtl/aes_sbox.sv`, `rtl/aes8_core.sv`: the AES engine.
- `rtl/key_store.sv`, `rtl/frame_gen.sv`, `rtl/payload_frame.sv`, `rtl/tag_store.sv`: the key, nonce, payload and MAC storage.
- `rtl/ccm_fsm.sv`: the controller.
- `rtl/aes_ccm_top.sv`: the top level.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.
- `tb/tb_aes_ccm_std.sv` with `tb/ccm_vec_runner.sv`: standard-CCM vectors in three configurations.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb_aes_ccm_top` | The default configuration end to end, on the published example. It runs two full operations. During the second one it tries loads, reads and a start while the core is busy. It checks all 36 output bytes and the 960-cycle busy time. It also counts every datapath event: B0, CBC blocks, CTR blocks, MAC capture, tag encryption, write-backs, ignored inputs, and both output sources. |
| `tb_aes_ccm_std` | `Q_BIAS = 0` against an independent CCM implementation, for (Nlen, Tlen, Plen) = (104, 32, 256), (96, 64, 128) and (56, 128, 384). |
| `tb_aes8_core` | FIPS-197 and SP 800-38A known answers, run back to back. It checks exactly 160 cycles per block. |
| `tb_aes_sbox` | All 256 entries, against a brute-force inverse, plus the permutation property. |
| `tb_ccm_fsm`, `tb_key_store`, `tb_payload_frame`, `tb_frame_gen`, `tb_tag_store` | Each unit on its own. This includes a 3-block controller and non-default widths. |

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_ccm_top \
  -y rtl -y tb +libext+.sv rtl/aes_ccm_pkg.sv tb/tb_aes_ccm_top.sv
./obj_dir/Vtb_aes_ccm_top
```

Every testbench finishes in well under a second.

## Where this departs from the published architecture

- **Engine insides.** Only the engine's rate is taken from the source: a byte
  datapath at 160 cycles per block. The following are this design's own
  choices:
  - two S-boxes (one for data, one for the key schedule);
  - the column buffer;
  - the in-place key schedule;
  - the ROM S-box.

  For comparison, the published FPGA figures quote 3320 bits of ROM/BRAM. These
  two S-box ROMs hold 4096 bits.
- **Controller encoding.** The published controller is given as a table of
  per-round enables for the frame generator, payload frame, key store and MAC
  store, plus two multiplexer selects. This controller runs the same order of
  operations, but with its own signals.
- **Bus widths and handshakes.** Byte-wide buses, the `load_out`/`cipher`
  handshake and synchronous reset are assumptions. The published port list
  gives no widths or timing.
- **Encryption only.** Decryption and verification are not implemented.
  Neither is associated data. CCM defines both, but the core's interface has no
  input for them.
- **Length-field default.** `Q_BIAS = 1` is the default, to match the published
  example (see above).
- **Area, power and frequency.** The published results are 8.1 kgates,
  3.98 µW/MHz and 149 MHz in 65 nm. They depend on the cell library and were
  not reproduced here.
