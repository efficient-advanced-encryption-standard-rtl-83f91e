# Normal-basis AES-128 with a rotate-and-lookup S-box

This is a small 32-bit AES-128 encryption/decryption core in which every
byte is held in a **normal basis** of GF(2^8) instead of the usual polynomial
basis. In a normal basis, squaring an element is just a rotation of its bits.
That makes the expensive part of the S-box, the multiplicative inverse, cheap.
Rotating an element rotates its inverse in the same way. So a table needs to
hold the inverse of only one rotation of each byte, its *conjugate-set
leader*. Two shift registers do the rest:

1. rotate the input left until it matches a leader,
2. look up that leader's inverse,
3. rotate the result right by the same number of places.

The GF(2^8) table shrinks to 34 entries. Because every stored leader starts
with bits `01`, only six input bits are decoded.

The rest of the datapath follows from working in the normal basis:

- The affine transform and the multiply-by-{02} of MixColumns are small XOR
  networks written for this basis.
- The state lives in four row-wide register files.
- ShiftRows is never carried out as a step. It is done by choosing the read
  addresses.

## The normal basis used

The basis is generated by α = {33}, where {33} is the polynomial-basis value
in the AES field x^8+x^4+x^3+x+1. Bit *i* of a byte is the coefficient of
α^(2^i). In this bit order:

- squaring is a one-bit rotate left (`{x[6:0], x[7]}`);
- the field's one is `{FF}`, and zero is `{00}`.

**The core does not convert between bases.** All of its inputs and outputs
are normal-basis bytes. Converting is linear, so it is an XOR of constants,
one constant per set bit:

| direction | constant for bit 0..7 |
|---|---|
| normal → polynomial | 33 72 D8 6A 83 9F D4 3A (that is, α^(2^i)) |
| polynomial → normal | FF 1D 3A 7E 74 97 FC F2 |

For example, the polynomial-basis value {02} has only bit 1 set, so it is
{1D} in the normal basis. Every round constant is {02}^(k-1) converted this
way; `nb_rcon` lists them. `tb/aes_ref_pkg.sv` contains the conversion as
SystemVerilog functions (`p2n`, `n2p`, `blk_p2n`, `blk_n2p`).

## The inverter (`nb_inv_unit`, `nb_lookup`)

This is the part of the design that takes the most explaining.

**Conjugate sets and leaders.** The eight rotations of a byte form its
conjugate set. If x is in set A, then its inverse lies in a set B whose
members are the inverses of A's members in the same rotational order. B may
be A itself. GF(2^8) has 36 such sets:

- 30 sets of size 8,
- 3 sets of size 4,
- 1 set of size 2,
- {00} and {FF}.

Of each of the 34 non-trivial sets, one rotation whose top two bits are `01`
is stored with its inverse. Any byte other than 00/FF contains a 0-to-1
transition somewhere in its cyclic bit string, so every such set has a
rotation of that form. The table is indexed by bits 5:0 and returns `00` for
a miss. This is safe because no true inverse is 00. Of the 64 bytes
`01xxxxxx`, 34 are leaders.

**Search (top register).** The input is loaded into a rotate-left register,
with a count k = 0. Each cycle the unit looks at two neighbouring rotations:
the value itself and the value rotated once. If either has bits 7:6 = `01`,
that one is looked up:

- On a hit (table output non-zero), the leader's inverse and k (or k+1) go
  to the bottom register.
- Otherwise the register rotates two places and k advances by 2. This covers
  both cases: no `01` pair was present, or the candidate was not a leader.
  Either way the next possible leader is at least two rotations away.

On load the same test is applied to the incoming byte. If neither position
qualifies, the byte is loaded already rotated by two: this is the
*preliminary shift*. 00 and FF have no 0-to-1 transition. An OR over
x ^ RL(x) detects them, and they pass through unchanged because each is its
own inverse.

**Rotate back (bottom register).** The bottom register rotates right two
places per cycle, and one place on the last step if k is odd, until k
rotations are undone. It then holds inv(x).

**Output register.** The result then waits in an output register until the
datapath takes it.

The top, bottom and output registers form a three-stage pipeline. While one
byte is being rotated back, the next one is already being searched.

**Timing.** Timing depends on the value:

| step | cycles |
|---|---|
| search | 1–4 |
| rotate back | 0–4 |
| out_valid rises, counted from the edge that accepted the byte | 2–9 (mean 4.9 over all 256 bytes) |

Both ports use valid/ready handshakes.

**Worked example.** x = {02}. Rotate left twice (preliminary shift): {08}.
The pair (08, 10) has no `01` top bits, so rotate two more: {20} (k = 4).
The pair (20, 40) gives `01` in the second value, {40}, with k = 5. The table
gives {40} → {CB}. Rotate {CB} right five places: {5E}. {5E} is inv({02}) in
this basis.

## Datapath and pass schedule (`aes_nb_core`)

```
 nb_rf x4 (row r of state + row r of round key)
   | one byte per file, address chosen per row
 [nb_inv_affine]   decryption data passes only
 nb_inv_unit x4    valid/ready, each takes its byte when ready
 [nb_affine]       encryption and key passes
 affine registers (4 x 8 bit, filled independently)
 nb_mix x4 / bypass (last round, key pass)
 XOR round-key word  ->  write back to nb_rf
 nb_keygen         (key passes: next / preceding round key)
```

**Register files and implicit ShiftRows.** File r holds row r of the state
(`nb_rf`). Pass c of a round needs the diagonal S[0][c], S[1][c+1],
S[2][c+2], S[3][c+3], which is one byte from each file. The files are never
shifted. Instead:

- Each result byte is written back to the address it was read from.
- So after round k, row r sits rotated by r·k places.
- Pass c of round k therefore reads file r at address (c + r·k) mod 4.
- Decryption uses (c − r·k) mod 4.

After ten rounds both directions leave row r rotated by 2r, and the result is
unloaded with that offset. Writing back in place cannot overwrite a byte that
is still needed: the slot written is one this round has already read.

**Passes.** A block takes 50 passes of one 32-bit word through the four
inverters. They are numbered s = 0..49:

- s mod 5 = 0 is the key pass for round s/5+1;
- every other s is data column (s mod 5) − 1 of round s/5+1.

The inverters keep their order, so the write-back side numbers results in the
same way and needs no tags. Two hazard rules control issue:

- A data pass of round k waits until every data pass of round k−1 has been
  written back. A column needs all four columns of the previous round.
- A key pass waits until the previous key pass has been written back.

So the key pass overlaps the drain of the previous round's data.

**Key schedule on the shared S-boxes (`nb_keygen`).** The round key is stored
as four more bytes in each register file. A key pass sends one word through
the four S-boxes:

- encryption: w3;
- decryption: w3 ^ w2, which is the preceding w3.

`nb_keygen` then forms the next key (encryption) or the preceding key
(decryption) in one cycle:

- RotWord is wiring;
- the round constant comes from a 10-entry table;
- an XOR chain produces the four words.

The mix units are bypassed for the key pass and in the last round.

**Decryption.** Data passes put the inverse affine before the inverter and
skip the affine after it. In the write-back stage the round-key XOR is moved
in front of the mix units, which then compute InvMixColumns. The result is
the standard inverse cipher:

- state ^ K10;
- then for each round: InvShiftRows, InvSubBytes, ^ K_k, InvMixColumns;
- no InvMixColumns in the last round.

The round keys are computed backwards on the fly. **Decryption therefore
takes the last round key (K10) as its key input.** An encryption leaves K10
on `key_out`. After a decryption, `key_out` holds the cipher key again.

**Mix units (`nb_mix`).** Unit r computes row r from the column rotated by r:
{02}a ^ {03}b ^ c ^ d. For the inverse it first adds {04}(a^c) and
{04}(b^d), which turns the same equation into {0E,0B,0D,09}.

## Interface of `aes_nb_core`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | single clock, asynchronous active-low reset |
| start | in | 1 | one-cycle pulse while `busy` is low |
| decrypt | in | 1 | 0 = encrypt, 1 = decrypt (sampled at start) |
| din | in | 128 | plaintext / ciphertext, normal basis |
| key | in | 128 | cipher key (encrypt) or last round key (decrypt), normal basis |
| busy | out | 1 | a block is in progress |
| done | out | 1 | one-cycle pulse; `dout` valid from then until the next block ends |
| dout | out | 128 | result, normal basis |
| key_out | out | 128 | round key held by the core (K10 after encrypt, K0 after decrypt) |

Bytes are in AES order: byte n is bits 127−8n … 120−8n, and state element
(row r, column c) is byte 4c+r. `din` and `key` must be stable during the 4
load cycles that follow `start`.

## Performance

One cycle here is one step of the shift registers. The published design
clocks the shift registers at twice the rate of its main clock, and reports
an average of 108 main-clock cycles per block. That is about 216 cycles at
the shift-register rate.

This implementation measures:

- 208 to 226 cycles per block;
- a mean of about 216, for both encryption and decryption.

That matches the published average. The match depends on one choice: the four
inverters are not run in lockstep. Each unit takes its byte of a pass as
soon as its top register is free. It then parks its result in its own
affine register, and the write-back waits only until all four registers are
full. An earlier version issued and drained all four in lockstep, so every
pass waited for the slowest of its four bytes. That version averaged 229
cycles. The testbenches require the mean to be within 5 % of 216.

`tb_aes_nb_throughput` runs 100 random blocks each way. Encryption averages
about 215 cycles. At the published rate of 2 × 132 MHz this gives about
157 Mbit/s; the published figure is 156 Mbit/s.

The core, synthesised with yosys to generic gates, has about 600 flip-flop
bits. That is mostly the state, key and dout registers.

## How far it can be trusted

What has been checked:

- Every leaf block is checked exhaustively or with random stimulus against
  reference models. The models are written from the AES definition in the
  polynomial basis and share no code with the RTL.
- The core passes the FIPS-197 example:
  - key 000102…0f, plaintext 00112233…ff gives ciphertext 69c4e0d8…c55a;
  - key_out = 13111d7f…30c5.
- The core also passes 11 random key/plaintext pairs in both directions.
- The same end-to-end test passes on a gate-level netlist produced by yosys
  from this RTL.
- The numbers this design takes from the published architecture reproduce
  exactly. These are the 34 leader/inverse pairs, the affine equations and
  the {02} equations for α = {33}, each checked against all 256 inputs.

What was not done: no timing or area closure, and no silicon or FPGA
measurement.

## Differences from the published architecture

- **One clock.** The published design uses two clocks:
  - the main clock Tc, which clocks the lookup and the rest of the datapath;
  - a clock at twice that rate, which clocks the shift registers, with the
    top register gated by the "found" test.

  Here everything runs on one clock, each cycle is one shift-register step,
  and the lookup completes in the same cycle.
- **Handshakes and unit coupling.** The valid/ready handshakes and the loose
  coupling of the four inverters (each issued when ready, joined at the
  affine registers) are this design's own, as are the pass
  order and its hazard rules.
- **Register-file details.** The in-place write-back addressing, the
  parallel key load and the 128-bit load/unload ports are this design's own.
- **Inverse functions.** The inverse-affine equations and the InvMixColumns
  factorisation are derived here. The published text asks for these
  functions without giving them.
- **00/FF detected on load.** The published unit recognises 00 and FF only
  after the search finds no leader, then tells them apart by the most
  significant bit. Here an OR over x ^ RL(x) spots them as they are loaded,
  so they take the shortest path. The result is the same.
- **Lookup as a case table.** The lookup is a case table left to synthesis.
  It is not the published hand-minimised 134-gate network.
- **No shared multipliers.** Each mix unit has its own {02} networks. The
  published text notes that units can share multipliers but does not say how.
- **AES-128 only.** No 192/256-bit keys, and no polynomial-basis converters
  (the published design likewise assumes normal-basis data).

## Files and simulation

| file | content |
|---|---|
| `rtl/aes_nb_pkg.sv` | byte/word types, {02} multiplier, round constants, rotations |
| `rtl/nb_lookup.sv` | 34-entry leader → inverse table |
| `rtl/nb_inv_unit.sv` | rotate / lookup / rotate-back inverter |
| `rtl/nb_affine.sv`, `rtl/nb_inv_affine.sv` | S-box affine map and its inverse |
| `rtl/nb_mix.sv` | one MixColumns / InvMixColumns row unit |
| `rtl/nb_rf.sv` | one row register file with key extension |
| `rtl/nb_keygen.sv` | round-key step, forward and backward |
| `rtl/aes_nb_core.sv` | the core: datapath, write-back and sequencer |
| `tb/aes_ref_pkg.sv` | polynomial-basis AES reference and basis conversion |
| `tb/tb_*.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_aes_nb_core \
  rtl/aes_nb_pkg.sv tb/aes_ref_pkg.sv rtl/nb_*.sv rtl/aes_nb_core.sv tb/tb_aes_nb_core.sv
./obj_dir/Vtb_aes_nb_core
```

The leaf testbenches need only the package, the reference package, the
module and the modules it instantiates. `nb_inv_unit` uses `nb_lookup`. The
end-to-end test also reports how often each mechanism fired: preliminary
shifts, table misses, lookups of the second value of a pair, the 00/FF
bypass, stalls on a round hazard, stalls on a busy inverter, write-backs
that wait for a late inverter, key passes, the last-round mix bypass and
decryption passes.
