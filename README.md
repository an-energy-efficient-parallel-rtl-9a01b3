# Parallel AES-128 encryption cores for power side-channel resistance

A plain iterative AES core runs one block through one round per clock. Its
supply current then follows a single intermediate value at a time, which is
what a correlation power analysis (CPA) attack fits its Hamming-weight and
Hamming-distance models to. The cores here change the structure instead of
adding masking or noise:

* **Pipelined cores** keep several plaintext blocks in flight. In every clock
  several independent blocks switch the same kind of logic at once. The
  measured current is the sum of their activity, which dilutes the
  correlation with any single block.
* **The unrolled core** computes all ten rounds in one combinational path
  between two registers. No clock edge separates the rounds, so the
  round-to-round transitions that attacks like to target are not lined up
  with the clock.

Both ideas follow the published design by S. Unal and F. Baskaya ("An
Energy-efficient Parallel ASIC Implementation of Advanced Encryption Standard
(AES) Algorithm Robust against Side-channel Attacks"). It was evaluated in a
65 nm low-power process, at 125 MHz for the pipelined versions and 25 MHz for
the unrolled one. This RTL is a new implementation of that architecture. The
published text leaves some parts open: the key schedule, the handshakes and
the timing of the interfaces. For those, this RTL makes its own choices, which
are marked below.

All cores encrypt only (AES-128, FIPS-197). There is no decryption.

## The three cores

| core | module | bus | main-round stages | clocks per block | blocks in flight | last plaintext word → first ciphertext word |
|---|---|---|---|---|---|---|
| 32-bit pipelined | `aes_pipelined #(.BUS_W(32))` | 32 bit | 3 (4 + 4 + 1 rounds) | 4 | 3 | 13 clocks in a stream (up to 16) |
| 64-bit pipelined | `aes_pipelined #(.BUS_W(64))` | 64 bit | 5 (2 + 2 + 2 + 2 + 1 rounds) | 2 | 5 | 11 clocks in a stream (up to 12) |
| unrolled | `aes_unrolled` | 32 bit | none, 10 combinational rounds | 4 (bus limited) | 1 | 1 clock |

`aes_sca_top` puts the three cores side by side. They share clock and reset
and nothing else. Each core has its own key, plaintext and ciphertext ports,
with the prefixes `p32_`, `p64_` and `unr_`. In a real system you would
normally pick one core. The unrolled core needs a clock period about five
times that of the pipelined ones (40 ns against 8 ns in the published
implementation).

## How the pipelined core works

### The main round

Each pipeline stage is one `aes_main_round`:

```
            in0 (feedback)   in1 (previous stage)
                 |                |
                 +----[ 2:1 mux ]-+   <- sel = S_count load bit
                          |
                 [ 128-bit register ]  (enable en)
                          |
                          +----------------> M_out
                 AddRoundKey(round_key)
                 SubBytes / ShiftRows
                 MixColumns
                          |
                          +----------------> R_out
```

The order differs from a textbook round: **AddRoundKey comes first**,
MixColumns last. Start a chain of main rounds on the raw plaintext, and the
first pass adds round key 0 and computes round 1, except for round 1's key
addition. The next pass adds round key 1 and computes round 2, and so on.
After nine passes the state is round 9 without its key. A small combinational
tail, `aes_last_round`, finishes the cipher: it adds round key 9, applies
SubBytes/ShiftRows and adds round key 10.

### Sharing nine rounds over the stages

A 128-bit block arrives in CPS = 128 / BUS_W bus words, so a new block can
enter only every CPS clocks. Each stage therefore keeps a block for CPS
clocks. In each of those clocks it feeds `R_out` back through `in0` and
computes one more round. At the end, every stage hands its block to the next
stage at the same edge. Nine rounds over stages of CPS rounds each gives:

* 32 bit: CPS = 4, stages doing 4, 4 and 1 rounds (three stages);
* 64 bit: CPS = 2, stages doing 2, 2, 2, 2 and 1 rounds (five stages).

In general N_STAGES = 8 / CPS + 1.

Stage *i* applies round key `i*CPS + phase` in phase 0 … CPS-1 of its block.
In the 32-bit core, stage 0 uses keys 0–3, stage 1 uses keys 4–7 and stage 2
uses key 8. The tail uses keys 9 and 10. This key assignment follows from the
AddRoundKey-first order. The published description does not spell it out.

### S_count

`aes_s_count` is the shift register that sets the rhythm. It is a CPS-bit
one-hot ring that rotates once per clock (4 bits for the 32-bit core, 2 for
the 64-bit core). Its top bit marks the **load cycle**: at the edge that ends
that cycle, every stage's multiplexer takes `in1`, so blocks move one stage
down. The position of the set bit is the phase, which selects the round key.
The ring runs freely from reset, so all stages stay in lock-step. The
published design specifies a shift register of these lengths. The one-hot
pattern is this implementation's reading of it.

### The last stage: holding through M_out

The last stage computes a single round but must still keep its block for CPS
clocks, or the rhythm would break. It therefore feeds its own register output
`M_out`, not `R_out`, back to `in0`. Between load edges it reloads its
unchanged state: the round logic is bypassed for those clocks. Its `R_out`
(round 9 without its key) and the tail output stay stable. At the next load
edge the ciphertext goes into the ciphertext register, while the stage takes
the next block. This is why every stage can be the same module.

### Valid bits and enables

A valid bit travels with each block (`v_q` in `aes_pipelined`). A stage's
register is enabled only while it holds a block or is receiving one. An
empty stage does not switch, which saves dynamic power, in line with the
low-activity coding the original design calls for. The ciphertext register
loads only when the last stage held a valid block. Bubbles (load cycles with
no new plaintext) move through the pipeline like blocks, with their valid bit
cleared.

### Timing of one block (32-bit core)

```
clock edge   L        L+4      L+8      L+12            L+13..L+16
stage 0      load pt  -> hands on
stage 1               load     -> hands on
stage 2                        load     (holds)
ciphertext                              load register   words 0..3 on out_data
```

`L` is a load edge. In a continuous stream, the last word of a block is
accepted on the edge `L-1`, and the first word of the next block on `L`
itself. The plaintext register accepts a word in the same clock as the core
takes the full block, so a sender that always has data keeps `in_ready` high
and gets exactly one block every CPS clocks. If a block becomes complete out
of step with the ring, `in_ready` drops until the next load edge (at most
CPS-1 clocks).

## The unrolled core

`aes_unrolled` chains an initial `aes_add_round_key`, nine `aes_round`
blocks (SubBytes, ShiftRows, MixColumns, AddRoundKey) and one `aes_round`
with `HAS_MIX = 0`. There is no register between rounds. As soon as four
words have filled the plaintext register, the next edge loads the finished
ciphertext into the output register. So the encryption takes one clock, and
the clock period must cover all ten rounds.

**Departure:** the published figures give this version 1 clock per block and
128 bits per clock (3.2 Gbps at 25 MHz). The same source also states that it
uses a 32-bit interface like the 32-bit pipelined core, and that is what is
built here. A block then takes 4 clocks to enter and 4 to leave, so the
sustained rate is one block per 4 clocks (0.8 Gbps at 25 MHz). A 128-bit
port (`BUS_W` cannot be 128 as the modules stand) would be needed for the
quoted rate.

## Interfaces (all cores)

All signals are synchronous to `clk`. Reset is synchronous and active low
(`rst_n`).

* **Key:** pulse `key_load` for one clock with `key` valid. `key_ready` drops
  and rises again ten clocks later. `aes_key_expansion` computes one round
  key per clock and keeps all eleven in registers, because the cores encrypt
  long streams under one key. While `key_ready` is low, the core accepts no
  plaintext. Change the key only when no block is in flight: blocks already
  inside a pipelined core would otherwise finish with a mix of old and new
  round keys. An assertion in each core flags a key load with blocks
  inside. After reset no key is loaded and `in_ready` stays low.
* **Plaintext** (`aes_pt_collector`): `in_valid`/`in_data`/`in_ready`. A word
  is taken on a clock edge where `in_valid` and `in_ready` are both high. The
  first word of a block holds the most significant bits, that is, FIPS-197
  bytes 0, 1, … first.
* **Ciphertext** (`aes_ct_serializer`): `out_valid`/`out_data`, most
  significant word first, one word per clock, with the words of a block in
  consecutive clocks. There is **no back-pressure**. The cores produce at a
  fixed rate and the receiver must take every word.

Byte order everywhere: FIPS-197 byte *n* is bits `127-8n : 120-8n`, so
`128'h3243f6a8…` is written exactly as the standard prints it.

## Building blocks

| module | what it is |
|---|---|
| `aes_pkg` | types (`block_t`, `round_keys_t`), `xtime`, GF(2^8) multiply and inverse, the S-box built at elaboration |
| `aes_add_round_key` | 128-bit XOR |
| `aes_sub_shift` | SubBytes followed by ShiftRows (one block, as in the main round) |
| `aes_mix_columns` | MixColumns from `xtime` and XOR |
| `aes_round` | SubBytes, ShiftRows, MixColumns, AddRoundKey; `HAS_MIX=0` gives the final round |
| `aes_main_round` | pipeline stage: mux, 128-bit register, AddRoundKey-first round, `M_out`/`R_out` |
| `aes_last_round` | key 9, SubBytes/ShiftRows, key 10 |
| `aes_s_count` | one-hot S_count ring with binary phase |
| `aes_key_expansion` | iterative key schedule with an 11 × 128-bit key register file |
| `aes_pt_collector` / `aes_ct_serializer` | bus-word ↔ 128-bit block registers |
| `aes_pipelined`, `aes_unrolled` | the cores |
| `aes_sca_top` | the three cores side by side |

The S-box is not a pasted table. `aes_pkg::sbox_table()` computes it at
elaboration from its definition: the multiplicative inverse in GF(2^8) modulo
x^8 + x^4 + x^3 + x + 1 (with 0 mapping to 0), followed by the affine map
b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 0x63. Synthesis sees a
constant 256 × 8 lookup for each byte. Swapping in a composite-field S-box,
for area or for masking, means changing only `aes_pkg::sbox`.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. The expected values come from two
independent sources:

* published test vectors: FIPS-197 appendix B (including its intermediate
  round states) and C.1, the four ECB-AES128 blocks of NIST SP 800-38A, and
  two GFSbox vectors of the AES validation suite;
* `tb/aes_ref_pkg.sv`, a behavioural AES written separately from the RTL. It
  works on a 4×4 byte matrix, finds the S-box by searching for inverses, and
  runs a 44-word key schedule.

`tb/aes_stream_agent.sv` drives one core: it loads keys, sends blocks with
or without random gaps and checks every ciphertext in order. It also checks
the latency and, for back-to-back streams, that blocks come out exactly CPS
clocks apart. `tb_aes_pipelined` runs both bus widths and `tb_aes_unrolled`
runs the unrolled core. `tb_aes_sca_top` runs all three cores at their
default sizes: the vectors, then 500,000 random blocks each under the key
`2b7e151628aed2a6abf7158809cf4f3c`, which is the size of the power-trace
workload the original design was evaluated with. A key change and more
blocks follow. `+blocks=N` on the simulator command line sets another
count. It counts
each pipeline mechanism and fails if one never happened: stage hand-over per
stage, iteration on `R_out`, the last stage holding through `M_out`, all
stages full, bubbles, input stalls (from a full register and from key
expansion), and single-clock unrolled encryptions.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_sca_top.sv \
    --top-module tb_aes_sca_top -o sim
./obj_dir/sim
```

Replace `tb_aes_sca_top` with any other `tb_*` name. Building the top-level
testbench takes a few minutes. Its simulation of 3 × 500,000 blocks takes
about half a minute.

What the tests do **not** show: nothing here measures power or side-channel
leakage. The resistance of these structures was assessed on gate-level power
simulations of the published implementation, not on this RTL. Timing closure
at the quoted clock rates is likewise untested.

## Choices made here, and what is left out

* The key schedule, its register file and the ten-clock key load are this
  implementation's choices. The published design shows a key-expansion block
  but not its insides.
* The valid/ready input, the output without back-pressure, the word order,
  the valid bits and the reset behaviour are this implementation's choices.
* Stage *i* uses round keys `i*CPS … i*CPS+CPS-1`. This follows from the
  AddRoundKey-first main round; it is not stated in the source.
* The unrolled core keeps the 32-bit bus, so its sustained rate is a quarter
  of the quoted one (see above).
* The plain iterative ("rolled") core, which the published work uses only as
  a baseline, is not included. Its round is `aes_round`, so a rolled core is
  one `aes_round`, a state register and a round counter.
* Clock gating, threshold-voltage cell choice and the process itself belong
  to the physical implementation, not to the RTL.

## Changing it

* `aes_pipelined #(.BUS_W(64))` gives the 64-bit core. Only 32 and 64 are
  allowed, and an elaboration-time assertion enforces this. The stage count
  and S_count length follow from `BUS_W`.
* To give a core a different key source (for example fixed keys or a
  key-RAM), replace `aes_key_expansion`. The cores only need the packed array
  `round_keys_t` and a ready flag.
* To add output back-pressure, stall `aes_s_count` and all register enables
  together. The pipeline has no elastic buffering, so everything must stop at
  once.
