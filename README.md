# AES encryption/decryption core with shared round hardware and Razor input protection

This core encrypts and decrypts 128-bit blocks with the Advanced Encryption Standard
(FIPS-197), using 128-, 192- or 256-bit keys chosen per request. It keeps area low in two ways:

- **One datapath for both directions.** Encryption and decryption run through the same round
  hardware. Each block in it switches to its inverse function. The 16 S-boxes share one
  GF(2^8) inverter between the forward and inverse S-box.
- **Round keys made on the fly.** The core never stores the expanded key. It holds a window
  of at most eight key words and steps it forward for encryption or backward for decryption,
  one round key per clock.

Requests enter through a register made of Razor flip-flops. A Razor flip-flop detects data
that arrived after its clock edge, using a shadow latch on a delayed clock. When that happens,
the core waits one cycle while the flip-flops reload the correct value, then runs the request
normally. A late request therefore costs one extra cycle instead of a wrong result.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | state and word types, key-length enum, `nk_of`/`nr_of`, GF(2^8) `xtime`, `gmul`, `ginv`, `rcon` |
| `rtl/aes_sbox.sv` | one byte: S-box or inverse S-box around one shared inverter |
| `rtl/aes_shift_rows.sv` | ShiftRows / InvShiftRows |
| `rtl/aes_mix_columns.sv` | MixColumns / InvMixColumns as XOR networks |
| `rtl/aes_round.sv` | one round for either direction, including AddRoundKey |
| `rtl/aes_key_schedule.sv` | on-the-fly forward/reverse round key generator |
| `rtl/razor_ff.sv` | one Razor flip-flop |
| `rtl/razor_reg.sv` | a bank of Razor flip-flops with an ORed error |
| `rtl/aes.sv` | the top: control FSM, Razor request register, round datapath and key schedule |
| `tb/aes_ref_pkg.sv` | software AES reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Data format

- **Blocks and keys.** Blocks and keys are bit vectors in FIPS-197 byte order. The first byte
  is in the most significant bits. Byte `4*c + r` is row `r` of column `c` of the 4x4 state.
- **Key lengths.** `in_key` is 256 bits wide. A 128-bit key uses `in_key[255:128]`, and a
  192-bit key uses `in_key[255:64]`. The bits below the key are ignored.
- **Key-length select.** `in_key_len` is `KEY128`, `KEY192` or `KEY256` (`aes_pkg::key_len_e`).
  It sets the number of key words to Nk = 4, 6 or 8 and the number of rounds to Nr = 10, 12
  or 14.

## The round datapath (`aes_round`)

ShiftRows only moves bytes and SubBytes works byte by byte, so the two commute. Both
directions can therefore run one chain:

```
state -> (Inv)ShiftRows -> 16 x (Inv)S-box -> [+key if decrypting] -> (Inv)MixColumns -> [+key if encrypting]
```

- **Encryption.** This is the standard SubBytes, ShiftRows, MixColumns, AddRoundKey round.
- **Decryption.** This is the standard inverse-cipher round: InvShiftRows, InvSubBytes,
  AddRoundKey, InvMixColumns.
- **Last round.** `last` bypasses the mix-columns block.

Inside the chain:

- **S-box (`aes_sbox`).** The inverter computes a^254 by square-and-multiply, using only
  shifts and XORs; it uses no lookup table. The forward S-box is `Affine(Inverse(x))` and
  the inverse S-box is `Inverse(InvAffine(x))`. Two byte multiplexers place the affine map
  before or after the shared inverter.
- **Mix columns (`aes_mix_columns`).** The block uses no multipliers. Every constant product
  is built from `xtime` steps and XORs. The inverse uses the identity
  `(0e 0b 0d 09) = (02 03 01 01) x (05 00 04 00)`: a cheap pre-step adds `{04}(a0^a2)` to
  rows 0 and 2 and `{04}(a1^a3)` to rows 1 and 3. The forward network then finishes the
  inverse, so both directions share it.

## The round key generator (`aes_key_schedule`)

The AES key expansion is a recurrence on 32-bit words:

```
w[j] = w[j-Nk] ^ g(w[j-1], j)
g(x, j) = SubWord(RotWord(x)) ^ Rcon(j/Nk)   if j mod Nk == 0
        = SubWord(x)                          if Nk == 8 and j mod Nk == 4
        = x                                   otherwise
```

The generator holds a window of Nk words, w[i] .. w[i+Nk-1], and outputs w[i..i+3] as the
current round key.

- **Forward step.** Computes the next four words through four chained `g` units and slides the
  window up by four (i += 4).
- **Reverse step.** The recurrence can be inverted: `w[j] = w[j+Nk] ^ g(w[j+Nk-1], j+Nk)`.
  The reverse step computes the four words below the window and slides it down by four.
  - For Nk = 4, the fourth reverse word needs the first one just computed, so the chain runs
    through it.
  - For 192-bit keys (Nk = 6), round keys do not line up with the Nk-word groups of the
    expansion. The window simply runs 4 words at a time and takes `j mod 6` and `j / 6` from
    its 7-bit word index.
- **Shared hardware.** Both directions share the same four `g` units, 16 forward S-boxes in
  all. These S-boxes are separate from the datapath S-boxes.
- **Key storage.** At most 8 words (256 bits) are stored, instead of up to 60 words for a
  full expanded key.

## Razor flip-flops (`razor_ff`, `razor_reg`)

Each bit of a Razor flip-flop has four parts:

- **Main flip-flop.** Samples `d` on the rising edge of `clk`.
- **Shadow latch.** Transparent while `clk_del` is high. It closes when `clk_del` falls, so it
  holds the value `d` had settled to some time after the main edge.
- **Comparator.** An XOR sets `err` when the main flip-flop and the shadow latch disagree.
- **Restore multiplexer.** While `err` is set, the next rising edge of `clk` loads the main
  flip-flop from the shadow latch instead of `d`.

`razor_reg` ORs the per-bit errors into one `err`. It loads on every clock and has no enable:
a held main flip-flop would be compared against a shadow latch that keeps following `d`, which
would raise false errors.

Timing contract, with clock period T and `clk_del` delayed by t_d (0 < t_d < T/2):

- **Hold window.** `d` must not change between the rising edge of `clk` and the falling edge
  of `clk_del`, unless it is a late arrival of the value meant for that edge.
- **When `err` is valid.** From the falling edge of `clk_del` until the next rising edge of
  `clk`.
- **Latch warning.** The shadow element is a real level-sensitive latch, so synthesis reports
  one latch per Razor bit. This is intended.

### Where the core uses Razor

The core's Razor register captures the whole request every cycle: `in_valid`, `in_decrypt`,
`in_key_len`, `in_key` and `in_data`, 388 bits in all. If it reports an error:

1. The FSM ignores the request register for that cycle.
2. The register restores the late-arriving values on the next edge.
3. The request is accepted one cycle late.
4. The producer must hold its inputs for that one extra cycle. `razor_error` tells it to do so.

Razor is not placed inside the round loop. There, the next value of the state appears right
after each clock edge. In a zero-delay model the shadow latch would always see that next value,
so the comparison would be meaningless.

## Top-level interface and timing (`aes`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk_del` | in | 1 | clock and delayed clock for the Razor shadow latches |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `in_valid` | in | 1 | one-cycle request strobe |
| `in_decrypt` | in | 1 | 0 = encrypt, 1 = decrypt |
| `in_key_len` | in | 2 | `KEY128`, `KEY192`, `KEY256` |
| `in_key` | in | 256 | key, left-aligned |
| `in_data` | in | 128 | plaintext or ciphertext |
| `busy` | out | 1 | a request is running; requests that arrive now are dropped |
| `razor_error` | out | 1 | late request detected, replay in progress |
| `out_valid` | out | 1 | one-cycle result strobe |
| `out_data` | out | 128 | result, held until the next result |

Latency counts clock edges, from the edge that captures `in_valid` to `out_valid` going high:

| operation | sequence | latency | 128 / 192 / 256-bit key |
|---|---|---|---|
| encryption | accept, initial AddRoundKey, Nr rounds | Nr + 2 | 12 / 14 / 16 |
| decryption | accept, Nr forward key steps to reach round key Nr, initial AddRoundKey, Nr inverse rounds with reverse key steps | 2*Nr + 2 | 22 / 26 / 30 |
| Razor replay | on top of either of the above | +1 | +1 |

The core handles one block at a time, one round per clock. An assertion in `aes.sv` checks
that the key schedule is at round key 0 (encrypt) or round key Nr (decrypt) when the initial
AddRoundKey runs.

## Simulating

The testbenches use `--timing` for their clock generators. Every testbench prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -y rtl -y tb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
          tb/tb_aes.sv --top-module tb_aes -Mdir obj && ./obj/Vtb_aes
```

The unit tests are:

- `tb_aes_sbox`: exhaustive in both modes.
- `tb_aes_shift_rows` and `tb_aes_mix_columns`: fixed vectors, random states and round trips.
- `tb_aes_round`: the FIPS-197 round-1 example plus random rounds.
- `tb_aes_key_schedule`: all round keys, forward then reverse, for FIPS keys and random keys of
  all three lengths.
- `tb_razor_ff` and `tb_razor_reg`: on-time and late data, the error flag and the restore.

`tb_aes` runs the top at its default configuration. For each key length it:

- encrypts the FIPS-197 Appendix C example and random blocks;
- decrypts every ciphertext again;
- compares every result with the reference model;
- checks the latency of every request;
- makes two kinds of request late: the whole request, or only the data block with `in_valid`
  on time. Both must give exactly one replay cycle and a correct result.

The reference model in `tb/aes_ref_pkg.sv` is written independently of the RTL. It builds the
S-box by searching for inverses by brute force, and it stores the full expanded key.

## How far to trust it, and where it departs from a plain description

- **Verified.** All three key lengths give the FIPS-197 results in both directions. The tests
  pass on random data. The cycle counts above are checked.
- **Iterative, not pipelined.** The architecture is described as pipelined for throughput, but
  no stage structure is given. This core is iterative: one block in flight and one round per
  clock. An unrolled or multi-block pipeline would need its own key schedule per stage, and
  that is not built.
- **Standard S-box only.** A dynamic S-box scheme, 16 related S-box groups derived from a
  logic-gate S-box, is mentioned as an option. Its base S-box and selection rule are not
  defined, so the core uses the standard AES S-box. Results are therefore compatible with
  FIPS-197.
- **No host-bus adapter.** Integration with a general-purpose processor is mentioned but not
  specified. The core offers the plain request/response ports above and no bus adapter.
- **Design choices of this RTL.** The following are choices made here, not taken from a
  specification:
  - the Razor register's position at the request input;
  - the latch polarity;
  - the OR-combination of error bits;
  - the handshake, reset style and latencies;
  - the mix-columns factorisation;
  - the four-words-per-clock key window.
- **Silicon cost.** Synthesis of the full core gives roughly 15k word-level cells, 920
  flip-flop bits (388 of them the Razor main flip-flops) and 388 Razor latch bits. The
  request register is the largest single item
  and could be narrowed if the key were loaded separately.
