# HSSec — AES-128, SHA-1 and SHA-512 on one shared input stream

HSSec is a cryptographic co-processor that encrypts with AES-128 (ECB or
CBC) and hashes with SHA-1 and SHA-512, all three at the same time and on
the same data. It is built around one observation: if every engine
consumes 128 bits of input every 10 clock cycles, all three can share
one input buffer, one register file and one operand generator, and they
never need to be synchronised with each other explicitly.

| engine  | block size | cycles per block | bits per cycle |
|---------|-----------:|-----------------:|---------------:|
| AES-128 | 128        | 10 (latency 10+1)| 12.8           |
| SHA-1   | 512        | 40 (2 rounds/cycle) | 12.8        |
| SHA-512 | 1024       | 80 (1 round/cycle)  | 12.8        |

Input arrives 32 bits per cycle, so a 128-bit bank is fetched in 4 cycles,
well inside the 10 cycles each bank is worked on. At the 80 MHz reported for
a Virtex-II implementation of the original design, 12.8 bits per cycle is
about 1 Gbit/s for each engine.

This repository is a SystemVerilog (IEEE 1800-2017) implementation of that
architecture. The block structure, the bank organisation, the cycle budgets
and the host signals follow the published HSSec description; the internal
control scheme, the host protocol details and several sizes are choices of
this implementation and are listed in [Departures and own choices](#departures-and-own-choices).

## Block diagram

```
              data_in (32)                         data_out (32)  sha_out (32)
                  |                                     ^            ^
   +--------------v-------------------------------------+------------+-----+
   |                           io_interface                                 |
   |  key/IV words -> register file     results: 3 holding regs + arbiter   |
   +------+----------------------------------------^--------^--------^-----+
          | data words                             | ct     | H1     | H512
   +------v-------+   starts   +-----------+    +--+----+ +-+-----+ +-+-------+
   | control_unit |----------->|           |    | aes128| | sha1  | | sha512  |
   | pending flags|            |           |--->| _core | | _core | | _core   |
   +------+-------+            |  memory_  |    +--^----+ +--^----+ +--^------+
          | bank/word          |  block    |       |rk       |W,K      |W,K
          +------------------->| padding   |    +--+---------+---------+------+
                               | unit 8x128|--->|        key_scheduler         |
          mode_interface <---->| reg file  |    | AES key exp | SHA-1 W | SHA-512 W, K |
          (ECB/CBC xor)        | init const|    +------------------------------+
                               +-----------+
```

`hssec_top` wires these blocks together; every block is one module in `rtl/`.

## How the three engines share one buffer

This is the part of the design that takes the most thought, and the part
where this implementation had to supply the most detail itself.

**Banks.** The padding unit (`padding_unit`) is eight banks of 128 bits.
A bank is exactly one AES block; banks 0–3 or 4–7 form one SHA-1 block;
all eight form one SHA-512 block. Words fill the banks in order 0, 1, …, 7
and wrap around.

**Pending flags.** When the fourth word of a bank is written the control
unit (`control_unit`) *commits* the bank: it sets one pending flag per
enabled engine and records whether the bank ends the message (`in_last`).
A bank may be written again only when none of its flags is set, so data is
never overwritten while an engine still needs it. `ready` is simply "the
bank the next word goes to is free".

**Starting an engine.**

* AES-128 starts as soon as the next bank in order is pending for it.
* SHA-1 starts when all four banks of its current half are pending.
* SHA-512 starts when all eight banks are pending.

Each engine *captures* its input in the cycle it starts: AES loads the bank
into its state register, the SHA engines load their 16-word message-schedule
windows in the key scheduler. The engine's pending flags clear in that same
cycle, so the banks start refilling immediately while the engine computes.
That is why one 1024-bit buffer is enough: in steady state with all three
engines on, SHA-512 takes the full buffer every 80 cycles, the refill takes
32 cycles, and AES works through the eight banks in 8 × 10 = 80 cycles.

**Back-to-back blocks.** Every engine has a load cycle followed by its round
cycles, and a new load is allowed in the last round cycle of the previous
block:

```
AES-128:   load | r1 | r2 | ... | r9 | r10+load | r1 | ...      (period 10, latency 11)
SHA-1:     load | c0 | c1 | ... | c38 | c39+load | c0 | ...     (period 40)
SHA-512:   load | t0 | t1 | ... | t78 | t79+load | t0 | ...     (period 80)
```

For AES the last round writes a separate ciphertext register, freeing the
state register for the next block. For the hashes the last round cycle also
computes H + state; the new chaining value is written to the register file
and, if the next block starts in that cycle, forwarded straight into the
working variables. After a message's last block the register file gets the
initial hash value instead, and the result goes to the output.

**CBC in the same cycle.** In CBC mode the next plaintext must be xored
with the ciphertext that is being produced in that very cycle.
`mode_interface` forwards that ciphertext around the register file, so CBC
keeps the 10-cycle period.

**Halting.** Results wait in one holding register per engine
(`io_interface`). An engine whose holding register is still full waits in
its last round cycle. While a result is on the output ports and the host
holds `send` low, the whole co-processor halts: no word is accepted and no
engine starts.

## Host interface (`hssec_top`)

| port | dir | width | meaning |
|------|-----|------:|---------|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `aes_en`, `sha1_en`, `sha2_en` | in | 1 | enable engines; all low = no data accepted. Change only between messages |
| `mode` | in | 1 | AES mode: 0 = ECB, 1 = CBC |
| `key` | in | 1 | the word on `data_in` is key material |
| `data_in` | in | 32 | key, IV or message word, most significant word first |
| `in_valid` | in | 1 | `data_in` is valid; the word is taken when `in_valid && ready` |
| `in_last` | in | 1 | with the last word of a message |
| `ready` | out | 1 | a word can be accepted |
| `send` | in | 1 | host takes the current output beat; low while `out_hot` halts the core |
| `out_hot` | out | 1 | a result beat is on the outputs |
| `out_aes` | out | 1 | the beat belongs to a ciphertext |
| `out_sha12` | out | 1 | when not AES: 0 = SHA-1 digest, 1 = SHA-512 digest |
| `data_out`, `sha_out` | out | 32 | result beat |

**Key loading.** With `key = 1`, send four words of the AES key; in CBC mode
follow them with four words of the IV. Loading a new key/IV restarts the CBC
chain.

**Messages.** The hash engines compress whole blocks. The host pads SHA
messages itself (append `1`, zeros and the length, per FIPS 180-2) and
sends whole 512-bit (SHA-1) or 1024-bit (SHA-512) blocks. AES data is sent
as whole 128-bit blocks. Raise `in_last` with the final word.

**Output beats.** One result owns the outputs at a time, in the priority
AES-128, SHA-1, SHA-512, with one idle cycle between results.

| result | beats | `data_out` / `sha_out` per beat |
|--------|------:|---------------------------------|
| ciphertext | 4 | C[127:96], C[95:64], … / 0 |
| SHA-1 digest | 3 | H0/H1, H2/H3, H4/0 |
| SHA-512 digest | 8 | high/low 32 bits of H0, H1, …, H7 |

## The engines

**`aes128_core`** — one AES round per cycle with sixteen S-boxes, ShiftRows
and MixColumns in logic. Round key 0 is the cipher key from the register
file; round keys 1–10 come one per cycle from `aes_key_expansion`. Only
encryption is implemented.

**`sha1_core`** — two SHA-1 rounds chained in each cycle (ROTL5, f_t, +e,
+K_t, +W_t, then ROTL30 on b, twice). The terms that do not depend on the
first round are summed beside the chained path: K + W_t + e for the first
round and K + W_t+1 + d for the second (d becomes the second round's e).
The chained path then adds only ROTL5(a), f and that sum. Rounds 2c and
2c+1 always use the same constant K, since a 20-round group never splits an
even/odd pair.

**`sha512_core`** — one FIPS 180-2 round per cycle, with h + K_t + W_t
pre-computed. That sum does not depend on the previous round, because h of
round t is g of round t-1. So during round t the core forms
g + K_t+1 + W_t+1 and registers it for the next round. At load it takes
H7 + K_0 + W_0, where W_0 is read straight from the buffer. T1 is then
pre + Σ1(e) + Ch(e,f,g), three terms instead of five. For this reason the
message schedule and constant table deliver the operands one round ahead.

**`key_scheduler`** — supplies every operand that changes from round to
round:
* `aes_key_expansion`: next round key from the previous one (RotWord of the
  last word, SubWord through four S-boxes, Rcon, xor chain);
* `sha1_msg_schedule`: 16-word window shifted by two per cycle,
  W[t+16] = ROTL1(W[t+13] ^ W[t+8] ^ W[t+2] ^ W[t]);
* `sha512_msg_schedule`: 16 × 64-bit window shifted by one per cycle,
  W[t+16] = σ1(W[t+14]) + W[t+9] + σ0(W[t+1]) + W[t]; it outputs W[t+1]
  during round t;
* `sha512_k_rom`, read at t+1, and the SHA-1 constants.

**`sbox`** — AES S-box computed as the GF(2^8) inverse (x^254 modulo
x^8+x^4+x^3+x+1) followed by the affine transform, instead of a stored table.

## Memory block

`memory_block` holds the padding unit, the register file
(`register_file`, 2 × 16 × 32 bits) and the initial hash values. The
register-file allocation is:

| words | content |
|-------|---------|
| 0–15  | SHA-512 chaining value H0–H7, high word first |
| 16–20 | SHA-1 chaining value H0–H4 |
| 21–24 | AES cipher key |
| 25–28 | CBC chaining value (IV, then last ciphertext) |
| 29–31 | spare |

Every word has its own write enable and all words are read in parallel, so
an engine updates its whole chaining value in one cycle.

The SHA-512 round constants K_t are the first 64 bits of the fractional
parts of the cube roots of the first 80 primes; the initial values are the
fractional parts of the square roots of the first eight primes (SHA-512) and
the FIPS 180-2 words for SHA-1. They live in `rtl/hssec_pkg.sv`.

## Departures and own choices

Taken from the original description: the three engines and their cycle
budgets (10+1, 40, 80), two SHA-1 rounds per cycle, the 8 × 128-bit padding
unit with 4- and 8-bank hash blocks, the 2 × 16 × 32-bit register file and
initialization constants, a key scheduler that produces round keys,
message schedules and constants, the ECB/CBC mode input, a 32-bit input,
two 32-bit outputs, and the signals READY, SEND, Key, MODE, the three enables
and OUT_hot / OUT_AES / OUT_SHA1/2.

Chosen here, where the description gives no detail:

* **Handshake.** `ready` is an output, `send` an input that accepts output
  beats and halts the core when low. `in_valid` and `in_last` are added: the
  description names no input strobe and no end-of-message signal.
* **No hardware message padding.** The input buffer stores data as it
  arrives; the host pads. With SHA-1 and SHA-512 both enabled they hash the
  same stream, cut into 512- and 1024-bit blocks.
* **IV loading** as key words 5–8 in CBC mode.
* **Parallel buffer access.** The description mentions a 64-bit internal
  bus (and a 128-bit bus in its memory diagram). Here each engine reads its
  bank(s) directly from the buffer in the cycle it starts.
* **Control scheme.** The pending-flag bookkeeping, the output priority and
  the holding registers are this implementation's own.
* **Second output port for digests.** Ciphertexts use `data_out` only, as
  described; digests use both ports, 64 bits per beat.
* **Modes.** Only ECB and CBC. CFB and OFB are mentioned once in the
  original description but the mode input selects only between ECB and CBC,
  and neither is built here.
* **SHA-512 round.** The original shortens the SHA-512 critical path by
  pre-computing values that have no dependencies, without giving the exact
  circuit. The standard form of the idea is used: h + K + W one round
  early. Its effect on clock frequency has not been measured.
* **SHA-1 adder grouping** follows the two-operation block as far as it
  goes: K + W + e (or d) is summed off the chained path.
* **S-boxes in logic.** The original mapped memories to FPGA block RAMs;
  here the S-boxes are combinational logic and sit beside the datapaths
  that use them rather than inside the memory block.
* **SHA-512 message-schedule registers** are 64 bits wide, as the algorithm
  requires.
* **Reset** is active-low and asynchronous.

Not built: AES decryption, CFB/OFB, hardware SHA padding, and anything
FPGA-specific (block RAMs, I/O pads).

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`).
The testbenches print `TB_RESULT checks=N failures=M` and stop themselves
after a fixed time if something hangs. Two assertions in the RTL run in
every simulation with `--assert`. The control unit checks that no pending
bank is ever written. The I/O interface checks that outputs hold steady
while `send` is low. The reference models in
`tb/tb_ref_pkg.sv` are written separately from the RTL. Their S-box table
is built by a different method. They are themselves checked against
published vectors: FIPS-197 Appendices B and C.1, SP 800-38A CBC-AES128,
and FIPS 180-2 "abc" for SHA-1 and SHA-512.

`tb_hssec_top` drives the complete co-processor through its ports only:

1. SHA-1 and SHA-512 of "abc";
2. AES-128 CBC with the SP 800-38A vectors, then more CBC blocks after a key
   and IV reload;
3. all three engines on one 24-bank message in ECB, with `send` dropped at
   random;
4. AES alone, streaming, checking that a block enters every 10 cycles;
5. SHA-1 alone and SHA-512 alone, checking one block every 40 / 80 cycles.

It counts, and requires at least once, each of these events: key loading,
ECB and CBC blocks, SHA-1 and SHA-512 blocks and digests, input
back-pressure, a halt, a result waiting for the ports, and an engine
waiting for its holding register. The design has no size parameters at the
top, so this test runs the full-size design. It takes about 10 s.

`tb_hssec_throughput` streams 64 banks (8192 bits) with all three engines
enabled, once in ECB and once in CBC, with `send` held high. It checks
every result. It also checks that AES starts every 10 cycles, SHA-1 every
40 and SHA-512 every 80, i.e. 128 bits per 10 cycles for each engine at
the same time. The last SHA-512 block starts 593 cycles after the first
word.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hssec_pkg.sv tb/tb_ref_pkg.sv tb/tb_hssec_top.sv --top-module tb_hssec_top
./obj_dir/Vtb_hssec_top
```

Replace `tb_hssec_top` with any other `tb_<module>` to test one block.
Packages must come first on the command line. The top lints with
`verilator --lint-only -Wall` with three notes:
* one `SYNCASYNCNET`, because the control unit's overwrite assertion uses
  `rst_n` in `disable iff`;
* two `PINCONNECTEMPTY`, for the AES core's registered ciphertext outputs.
  The top leaves these open because the I/O holding register captures the
  ciphertext in the cycle it is produced. The block testbench uses them.

## Files

```
rtl/hssec_pkg.sv            constants (IVs, K tables), AES/SHA helper functions, output-source enum
rtl/hssec_top.sv            top level
rtl/control_unit.sv         bank bookkeeping, engine starts, ready/halt
rtl/io_interface.sv         key/data input, result holding registers and output beats
rtl/memory_block.sv         padding unit + register file + initialization constants
rtl/padding_unit.sv         8 x 128-bit input buffer
rtl/register_file.sv        32 x 32-bit register file
rtl/mode_interface.sv       ECB/CBC input chaining
rtl/key_scheduler.sv        wraps the four operand generators below
rtl/aes_key_expansion.sv    AES-128 round keys
rtl/sha1_msg_schedule.sv    SHA-1 W_t, two per cycle
rtl/sha512_msg_schedule.sv  SHA-512 W_t
rtl/sha512_k_rom.sv         SHA-512 K_t
rtl/aes128_core.sv          AES-128 round datapath
rtl/sha1_core.sv            SHA-1, two rounds per cycle
rtl/sha512_core.sv          SHA-512, one round per cycle
rtl/sbox.sv                 AES S-box
tb/tb_ref_pkg.sv            reference models and test vectors
tb/tb_*.sv                  one testbench per module, tb_hssec_top end to end
tb/tb_hssec_throughput.sv   all engines streaming, rate check
```
