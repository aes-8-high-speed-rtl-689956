# 8-bit AES-128 encryptor with two S-boxes

This is a compact AES-128 encryption core whose datapath is one byte wide. Most 8-bit AES
cores share a single S-box between the round function (SubBytes) and the key schedule
(SubWord). The two then take turns, and the cycle count grows. This core gives the key
schedule an S-box of its own. The next round key is then computed, in place, while the round
datapath is still working on the state. The extra cost is one 256-entry table; the benefit is
that key generation is almost entirely hidden behind the round operations.

The state and the key each live in a 16 x 8-bit RAM. Everything else works on single bytes:
one XOR for AddRoundKey, one S-box, an 8-bit ShiftRows buffer, a byte-serial MixColumns unit
and, in the key schedule, a second S-box, an Rcon register, one XOR and two byte registers.

Only encryption with a 128-bit key is implemented. There is no decryption path and no support
for 192- or 256-bit keys.

## Block diagram

```
 pt_in ──►[2:1]──► Data RAM 16x8 ──rdata──┬──────────────────► MixColumns ──┐
            ▲                             │                    (4 regs,     │
            │                             ▼                     x02,x03)    │
            │          round key ──────► XOR ──► S-box ──► D ────►[2:1]◄────┘
            │                             │                         │
            └─────────────────────────────┼─────────────────────────┘
                                          └──► ct_out (final AddRoundKey)

 key_in ─►[2:1]──► Key RAM 16x8 ──rdata──┬──► round key (to the XOR above)
            ▲                            ├──► S-box ─► XOR Rcon ─┐
            │                            └───────────────────────┴►[2:1]─► XOR ─┬─► Reg_0 ─┐
            │                                                             ▲     │          │
            │                                                             └─────┼──────────┘
            └──────────────────────────────────────────────── Reg_1 ◄──────────┘
```

| module | role |
|---|---|
| `aes8_top` | round controller; instantiates the two halves below |
| `aes_enc_block` | Data RAM, AddRoundKey XOR, round S-box, ShiftRows buffer `D`, MixColumns, write-back muxes, and their sequencer |
| `aes_key_expansion` | Key RAM, key S-box, Rcon, `Reg_0`/`Reg_1`, and the schedule sequencer with the port arbiter |
| `aes_mixcolumns` | four byte registers, a rotating selector, x02/x03 multipliers, three XORs |
| `aes_sbox` | 256-entry S-box table, computed at elaboration from the GF(2^8) inverse and the affine map |
| `aes_ram8x16` | single-port 16 x 8 RAM with a registered, held read output |
| `aes_rcon` | round-constant register (01, 02, 04, ... 1b, 36) with an enable gate |
| `aes8_pkg` | byte/address types, command enum, GF(2^8) helpers, S-box generator |

Byte `k` of the plaintext, key and ciphertext (k = 0..15, the usual AES byte order) is row
`k mod 4` of column `k / 4`. It is stored at RAM address `k`, so the address is `{col, row}`.

## Schedule of one block

| phase | cycles | what happens |
|---|---|---|
| load | 16 | plaintext byte and key byte `k` written to both RAMs together |
| round 1..9 | 36 + 33 | fused AddRoundKey/SubBytes/ShiftRows pass, then MixColumns |
| round 10 | 36 | fused pass only |
| final | 17 | AddRoundKey with round key 10; ciphertext streamed out |

The key schedule for round key *i* starts together with the fused pass of round *i*. Round
*i+1* does not start until the schedule has finished. A block takes **743 cycles** from the
first accepted input byte to `done`. Of these, 691 cycles are the work in the table. The rest
is time spent waiting for the key schedule: about 2 cycles in each of rounds 1-9 and about 40
in round 10, which has no MixColumns pass to hide the schedule behind. At 77 MHz this gives
128 × 77 MHz / 743 ≈ 13.3 Mbit/s.

The architecture this core follows quotes 648 cycles per block. It also quotes 28 cycles for
MixColumns and 48 for one round key. The 648 and the 28 are not reached here (see
*Departures* below).

## The fused AddRoundKey / SubBytes / ShiftRows pass

This is the least obvious part of the design. A row of the state is processed in place with
only two bytes of temporary storage. One is the RAM's registered read output. The other is
the 8-bit buffer `D` after the S-box.

Each row takes one control cycle and then 8 RAM cycles in the fixed pattern
`R R W R W R W W`. A read fetches a state byte and, in the same cycle and at the same
address, the round-key byte. In the next cycle their XOR goes through the S-box into `D`. A
write stores `D` at the column the byte moves to under ShiftRows, `(col - row) mod 4`. For
that to be safe, a column must already have been read before it is written. This holds if
each row is read in the following order:

| row | rotation | read order (columns) | write order (columns) |
|---|---|---|---|
| 0 | 0 | 0 1 2 3 | 0 1 2 3 |
| 1 | 1 | 0 3 2 1 | 3 2 1 0 |
| 2 | 2 | 0 2 1 3 | 2 0 3 1 |
| 3 | 3 | 0 1 2 3 | 1 2 3 0 |

Each read goes to the column that the previous byte will be written into, or to the lowest
unread column when that one has already been read. Four rows × (1 + 8) = 36 cycles.

The RAM output register must hold its value when there is no read, and across writes. This
is why `aes_ram8x16` has a held read port.

## MixColumns

`aes_mixcolumns` shifts four bytes into registers `S0..S3` (`en`; after four shifts `S0` is
row 0). Output row `sel` is

    dout = 02·S[sel] ⊕ 03·S[sel+1] ⊕ S[sel+2] ⊕ S[sel+3]     (indices mod 4)

This is one row of the AES MixColumns matrix. A rotating selector feeds a fixed network of
one x02 multiplier, one x03 multiplier and three XORs.

In the encryption block, each column is read in 4 cycles and written back in 4 cycles with
`sel` = row. The first byte of the next column is read in the cycle that loads the last
register. It then waits in the RAM output register during the four writes. The whole pass
takes 1 + 4 × 8 = 33 cycles.

## In-place key schedule

`aes_key_expansion` overwrites round key *i-1* in the Key RAM with round key *i*. It works
column by column:

    new(r,0) = old(r,0) ⊕ S(old(r+1 mod 4, 3)) ⊕ Rcon·[r = 0]
    new(r,c) = old(r,c) ⊕ new(r,c-1)                    c = 1..3

Every byte takes two reads and one write. The first read ("A") fetches the S-box source or
`new(r,c-1)`. Through the mux it is loaded into `Reg_0`, with the feedback XOR masked. The
second read ("B") fetches `old(r,c)`. It is XORed with `Reg_0`, and the result goes into
`Reg_0` and `Reg_1`. `Reg_1` is then written back through the RAM input mux. The accesses are
interleaved as

    A0 B0 | A1 W0 B1 | A2 W1 B2 | ... | A14 W13 B14 | A15 B15 W14 W15

This is exactly 48 RAM accesses per round key. Column 3 is only overwritten after every
SubWord read of it.

The Key RAM has a single port, shared in this priority order:

1. key loading;
2. AddRoundKey reads from the encryption block (`dp_re`; the byte appears on `round_key` one
   cycle later);
3. the key schedule, in any cycle left over.

The schedule is updating the same key that the current round is still reading. A write to row
`r` is therefore held back until the encryption block reports, through `rows_read`, that it
has read row `r`. `wait_stall` and `port_stall` flag the cycles lost to this interlock and to
arbitration. With a free port, one round key takes 48 cycles. Inside a round it takes about 70
cycles, because the writes of column 0 can only follow the fused pass row by row.

## Interface of `aes8_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge); asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | one plaintext/key byte pair is taken when both are high |
| `pt_in`, `key_in` | in | 8 | plaintext and key byte, byte 0 first |
| `ct_valid`, `ct_out` | out | 1, 8 | ciphertext byte 0..15, one per cycle, 16 consecutive cycles |
| `busy` | out | 1 | high from the 16th input byte until `done` |
| `done` | out | 1 | one-cycle pulse after the last ciphertext byte |

`in_valid` may drop between bytes. The cipher key must be loaded again with every block,
because the schedule leaves round key 10 in the Key RAM. There is no back-pressure on the
ciphertext.

## Departures from the reference architecture

- **MixColumns: 33 cycles instead of 28.** A column needs 4 reads and 4 writes. With one
  single-port Data RAM, 28 cycles for four columns is not possible.
- **Key schedule timing.** The reference gives 48 cycles per round key in one place and 64
  (the round length) in another. It also gives 36 for the last round key. Here one round key
  is 48 RAM accesses. Because the Key RAM port is shared and the row interlock applies, the
  last round key completes about 40 cycles after the final fused pass.
- **Total: 743 instead of 648 cycles per block.** This follows from the two points above.
- **Choices the reference leaves open:**
  - the RAM read timing (synchronous with a held output);
  - the row read orders of the fused pass;
  - the key schedule byte order, its access interleaving, port priority and row interlock;
  - the load shift direction of MixColumns;
  - the handshake and reset.
- **S-box as a table.** The S-box is a look-up table, as in the reference. Its contents come
  from the algebraic definition at elaboration, so no table of numbers appears in the source.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. `aes_ref_pkg` is an independent software AES-128: its S-box
is found by searching for the inverse, and its key schedule is the word-wise one.

| testbench | what it checks |
|---|---|
| `tb_aes8_top` | FIPS-197 Appendix B and C.1 blocks plus 20 random blocks, with random input gaps. Checks the 743-cycle latency, and that each mechanism occurs: load pauses, lost key port, row-interlock waits, rounds waiting for the key, 9 MixColumns passes and 10 Rcon steps per block |
| `tb_aes_enc_block` | fused pass, MixColumns pass and full scripted encryptions against the reference; busy lengths 36/33/17; chained start in `last_cycle` |
| `tb_aes_key_expansion` | all ten round keys, with a free port (48 cycles each) and with random port contention and a moving `rows_read` |
| `tb_aes_mixcolumns` | FIPS-197 column `db 13 53 45 → 8e 4d a1 bc` and 200 random columns, all four `sel` |
| `tb_aes_sbox` | all 256 inputs plus FIPS-197 constants |
| `tb_aes_ram8x16` | random reads and writes; read latency and held output |
| `tb_aes_rcon` | the ten constants and the gate |

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/aes8_pkg.sv tb/aes_ref_pkg.sv rtl/aes_ram8x16.sv rtl/aes_sbox.sv rtl/aes_rcon.sv \
  rtl/aes_mixcolumns.sv rtl/aes_enc_block.sv rtl/aes_key_expansion.sv rtl/aes8_top.sv \
  tb/tb_aes8_top.sv --top-module tb_aes8_top -o sim
./obj_dir/sim
```

The testbenches read some internal signals of the design by hierarchical name: the mechanism
counters of `tb_aes8_top`, and `cmd_q`/`cnt_q` in `tb_aes_enc_block`. Renaming those signals
needs a matching change there.

Not verified: gate-level timing, and the area or clock frequency the reference reports
(3,997 gates, 77 MHz in a 0.35 µm library; 102.8 MHz on a Spartan-6).
