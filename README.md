# A tiny sequential XTEA cipher core

XTEA is a 64-bit block cipher with a 128-bit key. It is built from one very
small Feistel step (shifts, XORs and 32-bit additions) repeated 64 times. This
core puts exactly one of those steps in hardware and runs it once per clock,
feeding each result back as the next step's input. Area comes first here, not
speed. Nothing is unrolled or pipelined. The whole engine is one half-round of
logic plus about 300 flip-flops, and a 64-bit block is encrypted or decrypted
in 66 clocks.

The same core does both directions. It uses an adder for encryption and a
subtractor for decryption. The key is loaded over the 64-bit data input in
two clocks.

## Pins and how to drive them

| pin        | dir | width | use |
|------------|-----|-------|-----|
| `Clk`      | in  | 1  | clock, all registers on the rising edge |
| `Reset_n`  | in  | 1  | asynchronous, active low; clears every register, including the key |
| `Din`      | in  | 64 | key halves, or the block to encrypt or decrypt |
| `Loadkey`  | in  | 1  | start a key load |
| `Encrypt`  | in  | 1  | start an encryption |
| `Decrypt`  | in  | 1  | start a decryption |
| `Dout`     | out | 64 | result of the last finished operation, held until the next one finishes |

That is 133 pins. There is no busy or done pin: the latency is fixed, so the
user counts clocks.

**Key load (2 clocks).** Raise `Loadkey`, with `Din = {K[0], K[1]}` for one
clock and then `Din = {K[2], K[3]}` for the next. `K[0]` is `Din[63:32]` of
the first word. For example, `Din` = `1111222233334444` and then
`5555666677778888` gives K[0..3] = 11112222, 33334444, 55556666, 77778888.

**Encrypt or decrypt (66 clocks).** Put the block on `Din` and raise `Encrypt`
or `Decrypt` for one clock. The first 32-bit word (`v0`, "Left") is
`Din[63:32]`. The edge that samples the command loads the block. The next 64
edges each take one half-round. The edge after those writes `{Left, Right}`
into `Dout` and returns the controller to IDLE. So `Dout` changes exactly 65
edges after the command edge, and the operation occupies 66 clocks. A new
command can be sampled on the very next edge. One key load plus one block is 2 + 66 = 68 clocks. At a 142.4 MHz clock
this is 64 bits / 68 clocks = 134 Mbit/s, the rate reported for this
architecture on a Virtex-II Pro.

```
edge:      0          1 .. 64             65            66
state:  IDLE->ENC   BUSY_ENC (step h)   ENC->IDLE      IDLE (may accept next command)
action: Din->L,R    L,R,sum <- half     Dout<={L,R}
        sum preset  round h-1
```

The controller only looks at commands in IDLE, and busy states ignore them.
A command that is still high when IDLE comes back starts a new operation.
If several commands are high together in IDLE, `Loadkey` beats `Encrypt`, and
`Encrypt` beats `Decrypt`.

## The half-round, and why Left and Right swap every clock

This is the part that takes the most care. Textbook XTEA updates two words
`v0`, `v1` in place, with a running sum `s` and `F(x) = ((x << 4) ^ (x >> 5)) + x`:

```
encrypt, one cycle:                      decrypt, one cycle (s starts at 32*DELTA):
  v0 += F(v1) ^ (s + K[s[1:0]])            v1 -= F(v0) ^ (s + K[s[12:11]])
  s  += DELTA                              s  -= DELTA
  v1 += F(v0) ^ (s + K[s[12:11]])          v0 -= F(v1) ^ (s + K[s[1:0]])
```

`DELTA` is `0x9E3779B9`. Each line that updates a word is one half-round. To
use a single piece of hardware for both lines, `xtea_round` always writes the
updated word into the same register position and crosses the two words on
every step. This is the crossing of the two halves in the usual XTEA round
drawing:

```
encrypt:  Left' = Right                        Right' = Left + (F(Right) ^ x)
decrypt:  Left' = Right - (F(Left) ^ x)        Right' = Left
          x = sum + K[sel]
```

After an even number of steps, Left and Right are `v0` and `v1` again. So
after 64 steps `{Left, Right}` is the result, and no final swap is needed.
While an operation runs, both registers change on every clock.

The subkey index and the sum step depend on which half of the cycle is
running. That half is bit 0 of the step counter, `second_half`:

| direction | first half: subkey index | sum after first half | second half: subkey index |
|-----------|--------------------------|----------------------|---------------------------|
| encrypt   | `sum[1:0]`               | `sum + DELTA`        | `sum[12:11]`              |
| decrypt   | `sum[12:11]`             | `sum - DELTA`        | `sum[1:0]`                |

Both directions share one F unit and one `sum + K[sel]` adder. The F input is
`Right` when encrypting and `Left` when decrypting. The last operator is an
adder or a subtractor. The sum register starts at 0 for encryption and at
`ROUNDS * DELTA mod 2^32` for decryption (`0xC6EF3720` for 32 cycles).

## Structure

```
            +---------------------------- xtea ---------------------------+
 Din ------>|  eb2: xtea_regs                      eb1: xtea_round        |
 Loadkey -->|   key K[0..3] (128)  -- key -------->  F, XOR, add/sub      |
 Encrypt -->|   Left, Right (64)   -- L, R, sum -->  subkey select        |
 Decrypt -->|   sum (32)           <- L', R', sum' - sum +/- DELTA        |
 Reset_n -->|   Dout (64)                                                 |--> Dout
 Clk ------>|   xtea_fsm: state (2), half-round counter (7)               |
            +-------------------------------------------------------------+
```

- `xtea_pkg`: `DELTA`, the word and key types, the state enum
  (IDLE=0, BUSY_KEY=1, BUSY_ENC=2, BUSY_DEC=3) and the decryption start sum.
- `xtea_round` (eb1): the combinational half-round above. It has no registers.
- `xtea_fsm`: the four-state controller and the 0..64 half-round counter. Its
  actions are outputs on the transitions: write the key halves, load the data
  and preset the sum, step, write `Dout`.
- `xtea_regs` (eb2): every register, plus the controller.
- `xtea`: connects eb2 and eb1 in a loop.

Flip-flops: 128 (key) + 64 (Left, Right) + 32 (sum) + 64 (Dout) + 2 (state)
+ 7 (counter) = 297. A synthesis tool that re-encodes the state one-hot
reports 299. The critical path runs through eb1: shift/XOR, the F adder, the
XOR with `sum + K[sel]`, and the final adder or subtractor.

The one parameter is `ROUNDS` (XTEA cycles, default 32). Every module that
has it takes it. An operation then takes `2*ROUNDS + 2` clocks. Fewer cycles
trade security for speed; 16 cycles are often quoted as the least that is
still secure.

## Where this implementation makes its own choices

The block split, pin set, state set and codes, key word placement and clock
counts follow the published design. The following were not specified there
and are choices made here:

- The cipher is standard XTEA: Needham and Wheeler's delta, subkey selection
  and round order. For the all-zero key and block it gives
  `DEE9D4D8F7131ED9`, the standard XTEA value. The published simulation of
  this design shows `CB929ADACD7E9C4C` for the same inputs. None of the
  common XTEA variants tried gives that value (other shift or word order,
  other delta sign or sum update, or plain TEA), so this core does not
  reproduce it. It does keep
  that simulation's word order: `Dout = {Left, Right}`.
- Which of the 68 clocks are "wait states": here they are the load edge and
  the `Dout` write edge.
- Command priority, and ignoring commands while busy.
- A registered `Dout` that holds its value between operations, and the
  stored running sum. Both are inferred from the reported register count of
  297.
- No busy or done output. The 133-pin interface has none.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_xtea_round`: chains two half-rounds and compares them with one
  textbook XTEA cycle (`xtea_ref_pkg`), for 400 random words, sums and keys,
  in both directions.
- `tb_xtea_fsm`: checks the key load, the 64 steps with alternating halves,
  the single `Dout` write, the 66-clock operation, priority, commands ignored
  while busy, and asynchronous reset.
- `tb_xtea_regs`: drives the register block with a simple stand-in for the
  half-round. It checks key capture, preset values, feedback, when `Dout` is
  written and held, and reset.
- `tb_xtea`: runs the whole core at its default size against the reference
  model. It covers the all-zero test vector, 60 random encrypt/decrypt round
  trips under 20 random keys, independent decryptions, the exact 66-clock
  latency, commands during busy, priority, and a reset in mid-operation. It
  counts each of these and fails if any never happened.
- `tb_xtea_test_cases`: replays the three published test sequences: the key
  load with `1111222233334444` and `5555666677778888`, the zero-key
  encryption, and the decryption state transition. It checks the state codes
  (0, 1, 2, 3) and that a key load plus one encryption takes 68 clocks.

To run one, for example the whole core:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/xtea_pkg.sv tb/xtea_ref_pkg.sv rtl/xtea_fsm.sv rtl/xtea_regs.sv \
  rtl/xtea_round.sv rtl/xtea.sv tb/tb_xtea.sv --top-module tb_xtea
./obj_dir/Vtb_xtea
```

The other testbenches build the same way, with `--top-module` set to their
name. Each runs in well under a second. Verilator is a two-state simulator,
so the testbenches reset through a real falling edge of `Reset_n` rather than
relying on X.

The RTL also carries assertions: the counter never passes `2*ROUNDS`, a step
happens only in a busy state, and `Dout` is written only after the last
step.
