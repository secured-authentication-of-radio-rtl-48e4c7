# Mutual authentication of an RFID tag and reader with PRESENT

An RFID tag and a reader that share a secret key prove to each other that
they hold it. They exchange random numbers that have been encrypted or
decrypted with the lightweight block cipher PRESENT, and the key itself never
crosses the link. This RTL holds both ends of that exchange. It also holds
the cipher they use: a PRESENT core that does one round per clock, with a
64-bit block and an 80-, 128- or 256-bit key, run in electronic codebook
(ECB) mode two blocks at a time.

The default build is PRESENT-128 with 32 rounds. At that setting, one
authentication session takes 301 clock cycles, from the reader's start pulse
to its verdict.

## The exchange

A session has two stages. The reader drives both of them (`rfid_reader`), and
the tag answers (`rfid_tag`). Below, ENC and DEC mean PRESENT encryption and
decryption under the shared key. Applied to a pair, they work on both blocks
in parallel.

**Stage 1, tag recognition.**

1. The reader sends an identification request.
2. The tag draws a random 64-bit identification word, ID.
3. The tag answers with ID and ENC(ID).
4. The reader decrypts ENC(ID) and recognises the tag (`tag_ok`) when the
   result equals ID.

Only a recognised tag goes on to stage 2.

**Stage 2, mutual authentication.**

| step | side   | action |
|------|--------|--------|
| 1 | reader | sends an authentication request |
| 2 | tag    | draws R_1 and sends it |
| 3 | reader | draws R_2 and computes the challenge (Ch_1, Ch_2) = DEC(R_1, R_2), then sends it |
| 4 | tag    | computes (Tag_Ch_1, Tag_Ch_2) = ENC(Ch_1, Ch_2). The reader is authenticated (`r_a`) when Tag_Ch_1 = R_1 |
| 5 | tag    | if it accepts the reader, draws R_3 and sends (RS_1, RS_2) = ENC(R_3, Tag_Ch_1). Otherwise sends a reject |
| 6 | reader | computes (RR_1, RR_2) = DEC(RS_1, RS_2). The tag is authenticated (`t_a`) when RR_1 = R_2 |

### What the two checks really test

ENC undoes DEC, so when both sides hold the same key:

- Tag_Ch_1 = R_1 and Tag_Ch_2 = R_2.
- RR_1 = R_3 and RR_2 = Tag_Ch_1 = R_1.

The reader check (Tag_Ch_1 = R_1) therefore passes for any random numbers
whenever the keys match.

The tag check is different. The protocol specifies it as RR_1 = R_2. Since
RR_1 is R_3, that check passes only when R_3 happens to equal R_2. This
design implements the check exactly as specified:

- With the built-in random generators, R_3 and R_2 are independent, so
  `t_a` stays low even when the keys match.
- With the external random inputs (`rn_ext = 1`) and R_2 = R_3, the whole
  protocol passes. This is how the reference session, described next, is run.

A check that holds for any random numbers would be RR_2 = R_1. It is not
built here, because the protocol does not specify it. Whoever uses this
protocol should settle this point first.

There is a second, smaller disagreement in the specification. One statement
of the reader check compares Tag_Ch_2 with R_1; the other compares Tag_Ch_1
with R_1. Tag_Ch_2 equals R_2, so only the Tag_Ch_1 form works for
independent random numbers, and that is the one built.

### Reference session

The reference session uses PRESENT-128 with:

- key `abcdabcdabcdabcdabcdabcdabcdabcd`;
- R_1 = R_2 = R_3 = `1111222233334444`.

It must produce the following values, which the top-level testbench checks:

| signal | value |
|--------|-------|
| Ch_1, Ch_2 (`reader_cha1/2`) | `0e5a1210ee54725e` |
| Tag_Ch_1, Tag_Ch_2 (`tag_cha1/2`) | `1111222233334444` |
| RS_1, RS_2 (`tag_resp1/2`) | `2a1ff2cd185e70f6` |
| RR_1, RR_2 (`reader_resp1/2`) | `1111222233334444` |
| `r_a`, `t_a` | 1, 1 |

## The PRESENT core

`present_enc` holds a 64-bit state register and a KEY_W-bit key register. On
every clock it does both of these at once:

- **State update.** XOR in the round key, which is the top 64 bits of the key
  register. Then apply the 16 4-bit S-boxes, then the bit permutation (bit i
  moves to 16·i mod 63; bit 63 stays).
- **Key update.** The key updation unit (`present_kuu`) moves the key
  register to the next round key.

A round counter runs from 1 to ROUNDS−1. After the last round, the final
round key is XORed on combinationally: `ct = state ^ key[KEY_W-1 -: 64]`.
`uk` is the final key register (the "updated key"). A decryption starts from
it.

Timing:

- `ld` loads the text and `kld` loads the key. Assert both together for a
  new block. `ld` without `kld` keeps the key register as it is.
- `ct`, `uk` and `done` are valid ROUNDS clocks after the `ld` edge (32 by
  default): one load clock and 31 round clocks. They stay valid until the
  next `ld`.

`present_dec` runs the same datapath backwards:

- It is loaded with the cipher text and with the updated key.
- Each clock XORs the round key, applies the inverse permutation and the
  inverse S-boxes, and steps the key back with `present_ikuu`. The counter
  runs from ROUNDS−1 down to 1.
- At the end, `iuk` is the original key again. The latency is the same as
  encryption.

### Key schedule for the three key sizes

Each step rotates the key register left by 61 bits. The top one or two
nibbles then go through the S-box, and the 5-bit round counter is XORed into
a fixed field:

| key | S-boxed nibbles | counter field | origin |
|-----|-----------------|---------------|--------|
| 80  | [79:76]            | [19:15]   | standard PRESENT-80 |
| 128 | [127:124], [123:120] | [66:62] | standard PRESENT-128 |
| 256 | [255:252], [251:248] | [128:124] | this design's PRESENT-256 variant |

PRESENT-80 and PRESENT-128 match the published cipher and its test vectors.
PRESENT-256 is not a standard cipher, so no external test vectors exist for
it. It is checked only against this repository's own reference model, which
follows the table above.

The inverse step applies the inverse S-box and the counter XOR first, then
rotates right by 61.

`ROUNDS` can be set to 16 or 64 as well as 32. The counter field then becomes
log2(ROUNDS) bits wide, starting at the same lowest bit. That widening is
this design's own choice; it is tested for 16 rounds (PRESENT-80) and 64
rounds (PRESENT-128).

## ECB unit and the decryption key

`present_ecb` processes two 64-bit blocks at once with one key. It has two
encryption cores and two decryption cores. A `start` pulse samples `decrypt`,
`key`, `din1` and `din2`; `done` is a one-clock pulse when `dout1`/`dout2`
are ready.

- **Encryption** loads both encryption cores and takes 33 clocks.
- **Decryption** starts from the updated key, but the caller supplies only
  the original key. So the unit first runs encryption core 1 for 32 clocks,
  using only its key path, to derive the updated key. It then loads both
  decryption cores. Decryption takes 65 clocks.

In the authentication system, the tag uses its ECB unit only to encrypt and
the reader only to decrypt. Synthesis removes the cores each side never
uses.

## Hierarchy and interface

```
rfid_sa_top
├── rfid_tag      ── rng64, present_ecb (encrypt)
└── rfid_reader   ── rng64, present_ecb (decrypt)
present_ecb  ── 2 × present_enc (present_kuu), 2 × present_dec (present_ikuu)
present_pkg  S-box, inverse S-box, P-layer and its inverse, key-schedule geometry
rfid_pkg     message kinds and the message struct of the tag–reader link
```

The tag and the reader talk over a direct, registered link. Each message is
a one-clock `valid` with a kind (`rfid_msg_t`: identification request, ID,
authentication request, R_1, challenge, response, reject) and two 64-bit
words. This link stands in for the radio interface, which is outside the
design.

Top-level ports of `rfid_sa_top` (parameters `KEY_W` = 128 and
`ROUNDS` = 32):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-clock pulse that starts a session |
| `key[KEY_W]` | in | the shared key |
| `seed_ld`, `seed_tag`, `seed_reader` | in | load seeds into the two random generators |
| `rn_ext`, `rn1`, `rn2`, `rn3` | in | when `rn_ext` is high, R_1, R_2 and R_3 come from these inputs |
| `done` | out | session over; results held until the next start |
| `tag_ok`, `r_a`, `r_a_fail`, `t_a` | out | tag recognised; reader authenticated; reader rejected; tag authenticated |
| `reader_cha1/2`, `tag_cha1/2`, `tag_resp1/2`, `reader_resp1/2` | out | Ch, Tag_Ch, RS and RR of the last session |
| `tag_r1`, `reader_r2`, `tag_r3` | out | the random numbers the session used |

`rng64` is a 64-bit Galois LFSR with the polynomial
x^64 + x^63 + x^61 + x^60 + 1. It stands in for a random number generator,
and it is not cryptographically strong. For real use, replace it with a true
random source.

### Session timing

One session takes 301 clocks:

- three ECB encryptions of 33 clocks (ID, Tag_Ch, RS);
- three ECB decryptions of 65 clocks (ID check, challenge, response);
- 7 clocks for the six link messages and the verdict.

For comparison, a full session was reported to take 1.285 µs on the original
implementation, whose clock was not stated, so the two cannot be compared.
At the clock frequency reported for the synthesised system (about 403 MHz),
301 cycles would take about 0.75 µs. The cipher core's own rate, 64 bits
every 32 clocks, is 821 Mbit/s at 410.7 MHz.

## Choices of this design

Only the protocol flow, the round structure and the key-schedule geometry
are taken from the specification. The following were decided here:

- The output XOR with the last round key. The standard cipher needs it, and
  the reference values above are reproduced only with it.
- `ld`/`kld` are active high.
- The reset is asynchronous.
- The `busy`/`done` handshakes.
- Deriving the decryption key inside the ECB unit.
- Stage 1 sends ID in clear next to ENC(ID), so that the reader has something
  to compare against.
- The reject message. Without it, a reader facing a tag that refused it
  would wait forever.
- The message format.
- The LFSR as random generator.

Because the key is shared, the top level can never fail tag recognition or
reader authentication. Those failure paths are exercised in the tag and
reader unit tests, which replace the other side with a behavioural model.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/present_pkg.sv rtl/rfid_pkg.sv tb/present_ref_pkg.sv \
    tb/tb_rfid_sa_top.sv --top-module tb_rfid_sa_top
./obj_dir/Vtb_rfid_sa_top
```

For another testbench, replace `tb_rfid_sa_top` with its name. If the
testbench does not use the `rfid_pkg` message types, `rfid_pkg.sv` may be
dropped from the command.

| testbench | what it checks |
|-----------|----------------|
| `tb_present_kuu`, `tb_present_ikuu` | the key steps for all three key sizes against the reference model, plus a case worked out by hand |
| `tb_present_enc`, `tb_present_dec` | published PRESENT-80/128 vectors; the reference-session values; random data for 80/128/256 bits and 16/64 rounds; the updated key; latency equal to ROUNDS; for encryption, eight blocks streamed back to back, one every ROUNDS clocks |
| `tb_present_ecb` | both blocks in both directions for all key sizes; decryption of encryption; latencies of 33/65; one-clock `done`; `start` ignored while busy |
| `tb_rng64` | reset, seeding, hold, 2000 steps against a bit-level model, no repeats |
| `tb_rfid_tag`, `tb_rfid_reader` | each side against a behavioural partner, including a wrong challenge, a reject, a bad identification, R_3 = R_2 and R_3 ≠ R_2, and reply times |
| `tb_rfid_sa_top` | the reference session and six sessions with random keys and random numbers, internal and external, at the default parameters; the 301-cycle session length; counts of each mechanism (recognition, both authentications, tag check passing and failing, ECB encryption and decryption, both random sources) |
| `tb_rfid_sa_top_k80`, `tb_rfid_sa_top_k256` | the same end-to-end checks built for PRESENT-80 and PRESENT-256 |

`tb/present_ref_pkg.sv` is the reference model the tests compare against. It
is written separately from the RTL: it uses run-time key widths, a different
form of the permutation formula, bit-by-bit rotations, and decryption by
replaying stored round keys.

## Changing it

- `KEY_W` (80, 128 or 256) and `ROUNDS` (16, 32 or 64) propagate from
  `rfid_sa_top` down to the cores. Any other key width stops elaboration with
  an error.
- To change the tag check (see *What the two checks really test*), edit the
  `t_a` assignment in `rfid_reader.sv`. Its testbenches expect the rule as
  specified.
- The assertions in `present_ecb`, `rfid_tag` and `rfid_reader` check that the
  two cores of a pair run in lockstep and that no ECB unit is started while
  busy. Run with `--assert` to keep them active.
