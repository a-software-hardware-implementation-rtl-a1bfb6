# Diffie-Hellman key agreement and TEA encryption between two nodes

Two devices that share only an insecure serial line agree on a secret key, then use it
to encrypt a message. Each node raises a public base `g` to its own secret exponent
modulo a public constant `P` and sends the result across the line. Each then raises
the value it received to its own secret again. Because `(g^a)^b = (g^b)^a (mod P)`,
both nodes end up with the same key, and a listener who saw only `g^a` and `g^b` does
not learn it. Node 1 then encrypts a 64-bit block under that key with the Tiny
Encryption Algorithm (TEA) and sends the ciphertext. Node 2 decrypts it with its own
copy of the key.

This RTL follows the hardware of a 2014 two-FPGA implementation of that protocol.
The original put the arithmetic in hardware and left the protocol to a soft processor
in each FPGA, which ran it in C. The processor is not part of this RTL: its side of
every unit is a plain port on the top level, and the testbench plays its part.

## Worked example

With `P = 35653` and `g = 911`, node 1's secret is 7 and node 2's is 6:

| step | node 1 | node 2 |
|---|---|---|
| public value | 911^7 mod P = 16187 | 911^6 mod P = 13598 |
| sent over the line | 16187 → | ← 13598 |
| shared key | 13598^7 mod P = 25697 | 16187^6 mod P = 25697 |

The end-to-end testbench runs exactly this at full size (128-bit numbers, 50 MHz,
9600 baud). It then encrypts the message `0x1234ABCD` under the key and decrypts it
again on the other node.

## Structure

```
dh_tea_link_top
├── node 1: a_over_b_mod_p ── karatsuba_mult: karatsuba_level ×4 (128, 64, 32, 16) + 8-bit leaf, each level with an rca_adder
│           │               └─ mod_reduce ── rca_adder
│           ├── tea_encrypt       (combinational)
│           └── uart_tx, uart_rx  tx1 ───────────► node 2 rxd
└── node 2: a_over_b_mod_p (same tree)
            ├── tea_decrypt       (combinational)
            └── uart_tx, uart_rx  tx2 ───────────► node 1 rxd
```

`dh_tea_pkg` holds the shared constants: operand width 128, default modulus 35653,
the TEA constants, 50 MHz and 9600 baud.

All clocked units use the same conventions. There is one clock and a synchronous,
active-high `reset`. `start` is a level, sampled while the unit is idle. `done` or
`finish` rises when the result is valid and **stays high until reset**. To run a unit
again, its user pulses its reset and raises `start` again. This is how the
exponentiation unit drives its multiplier and its reducer, and how each multiplier
level drives the level below it. It is also why the top level has a separate
`n1_dh_reset` / `n2_dh_reset`: each exponentiation unit is used twice per key exchange.

## The exponentiation unit (`a_over_b_mod_p`)

This computes `c = a^b mod P` by left-to-right square and multiply. `C` starts at 1.
For each exponent bit, from bit 127 down to bit 0, `C` is squared and reduced. When the
bit is 1, `C` is also multiplied by `a` and reduced. The state machine:

| state | action | leaves when |
|---|---|---|
| S0 | `C = 1`, counter = 127 | `start` |
| S1 | multiplier ← `C × C` | multiplier done → S2 (multiplier reset pulsed) |
| S2 | reducer ← product | reducer done: `C` = remainder → S3 (reducer reset pulsed) |
| S3 | test bit `b[counter]` | 1 → S4; 0 → S6 if counter = 0, else counter−1 → S1 |
| S4 | multiplier ← `C × a` | multiplier done → S5 |
| S5 | reducer ← product | done: `C` = remainder → S6 if counter = 0, else counter−1 → S1 |
| S6 | `finish = 1` | reset |

The counter is tested *before* it is decremented, so bit 0 is used. The original C
listing (`for (i = len-1; i > 0; i--)`) and the drawn state chart both drop bit 0.
The original's own printed results (16187, 13598, 25697 above) only come out when
bit 0 is used.

`P` is a parameter, not a port, because the original unit has no modulus input.
No value is given for it. 35653 is the value that reproduces the results above: it
is the only value above 25697 for which all four of them hold. It is 101 × 353 and
not prime, so choose your own prime for real use.

Cost per exponent bit: one multiplication (1616 cycles), one reduction, and the same
again for a 1 bit. With `P = 35653` a whole run takes 0.21–0.24 million cycles.

## The multiplier (`karatsuba_mult`)

This is a 128 × 128 → 256-bit multiplier built by halving. It splits `a` and `b` into
halves AH, AL, BH and BL. **One** half-width multiplier (the next level of the
chain) is used four times in turn:

```
P1 = AH·BH   P2 = AH·BL   P3 = AL·BH   P4 = AL·BL
sum1 = P2 + P3
sum2 = (sum1 << W/2) + P4
c    = sum2 + (P1 << W)          (one 2W-bit ripple-carry adder, three clocks)
```

Each half product has a *send* state and a *get* state. Send waits until the child's
`done` is low, then starts it. Get waits for `done`, stores the product and raises the
child's reset. One level is the helper module `karatsuba_level`; `karatsuba_mult`
chains one of them per width (128, 64, 32, 16) with a generate loop. The chain ends at
`LEAF = 8` bits, where the product is formed directly in one clock.

Latency from start to done: `T(8) = 1` and `T(W) = 4·T(W/2) + 16`, which gives 1616
cycles at 128 bits. The testbench checks this.

The original calls this module "Karatsuba", and its text and pseudocode describe the
three-product Karatsuba trick. Its state chart, however, forms the four products above,
and this RTL follows the state chart. A real Karatsuba step would need a
`(W/2+1)`-bit middle product. Replacing the four-product sequence with one would save
about a quarter of the cycles at each level.

## Modular reduction (`mod_reduce`)

The reducer takes `y = x mod p` by subtracting `p` once per clock while the remainder is
≥ `p`. The subtraction is the ripple-carry adder computing `r + ~p + 1`, and its carry
out is the `r ≥ p` test. A reduction takes `2 + floor(x/p)` cycles. Within the
exponentiation unit both factors are below `P`, so the quotient is below `P`. That is
cheap for the small example modulus (at most about 36k cycles).

**Limit you must know about:** with a genuinely 128-bit modulus the quotient can be
close to 2^128, and a reduction never finishes in practice. The original text claims
a 128-cycle bound for this step, but the mechanism it describes (one subtraction per
clock until the remainder is smaller) does not give that bound. This RTL follows the
mechanism. For real 128-bit moduli, replace `mod_reduce` with a shift-and-subtract
(restoring) reducer, which needs about 129 cycles. Keep its `start`/`reset`/`finish`
interface and nothing else has to change.

## TEA (`tea_encrypt`, `tea_decrypt`)

These are the published Tiny Encryption Algorithm. The 64-bit block is held as
`{v0, v1}` = `{block[63:32], block[31:0]}`. The 128-bit key is `{k0, k1, k2, k3}`,
with `k0 = key[127:96]`. There are 32 cycles, each of two Feistel rounds, with
`delta = 0x9E3779B9`. Decryption starts its sum at `0xC6EF3720` and undoes the rounds
in reverse. Both units are fully unrolled and have no clock: the output follows the
inputs after 64 rounds of 32-bit adders, as in the original, which treats TEA as an
asynchronous block. At 50 MHz this long combinational path would need to be
pipelined or iterated in a real FPGA. This RTL keeps it combinational.

Checked against the standard all-zero-key chain:
`0 → 41ea3a0a 94baa940 → b9354a86 1ea75492 → 1dbae8aa ae2bba9a → 0eb60bc9 0296522d`.

Differences from the original: its block diagram labels the TEA ports 32 bits wide,
and it reports `0x1234ABCD → 0xCCD70F6F` under key 25697. Neither matches the
published 64-bit algorithm, and that ciphertext could not be reproduced with any
natural placement of the 32-bit values. This RTL implements the published algorithm
with a 64-bit block.

## Serial link (`uart_tx`, `uart_rx`)

The link uses 9600 baud, no parity, one start bit, 8 data bits LSB first and one stop
bit, with `CLK_HZ/BAUD` = 5208 clocks per bit at 50 MHz. The receiver:

- synchronises `rxd` through two flops;
- ignores a start bit that is no longer low at mid-bit;
- samples each bit in the middle of its period;
- pulses `rx_valid` per byte, with `frame_err` when the stop bit was low.

The 8-bit character, the single stop bit and the 50 MHz clock are this design's
choices; 9600 baud and no parity come from the original. The original used a vendor
UART core driven by software. In the testbench, numbers cross the link least
significant byte first: 16 bytes for a 128-bit value, 8 for a TEA block.

## Top level (`dh_tea_link_top`)

The top level has no protocol logic of its own. It instantiates the two nodes, each
with its own units, and wires the serial lines across: `tx1` → node 2 and `tx2` →
node 1. Ports are prefixed `n1_` / `n2_`. To run the protocol, the user of the ports
(processor, state machine or testbench) does the following:

1. For each node, pulse `nX_dh_reset`, set `nX_dh_a = g` and `nX_dh_b = secret`, raise
   `nX_dh_start` and wait for `nX_dh_finish`.
2. Send `nX_dh_c` a byte at a time through `nX_tx_start`/`nX_tx_data`, waiting while
   `nX_tx_busy` is high. Collect the other node's bytes from `nX_rx_data` on
   `nX_rx_valid`.
3. Repeat step 1 with `a` set to the received value. `nX_dh_c` is now the shared key.
4. On node 1, put the key on `n1_tea_key` and the message on `n1_plaintext`, then send
   `n1_ciphertext`. On node 2, put the key on `n2_tea_key` and the received block on
   `n2_ciphertext`, then read `n2_plaintext`.

Parameters: `W` (128), `P` (35653), `CLK_HZ` (50 000 000) and `BAUD` (9600).

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=N failures=M` line:

| testbench | what it checks |
|---|---|
| `tb_rca_adder` | 256-bit sums and differences, carry/borrow, full carry ripple |
| `tb_mod_reduce` | remainders against `%`, cycle count `2 + x/p`, result held |
| `tb_karatsuba_mult` | 128-bit products against `*`, latency 1616 cycles |
| `tb_a_over_b_mod_p` | the worked example at P = 35653; random 128-bit exponents at P = 1009 against a reference |
| `tb_tea_encrypt`, `tb_tea_decrypt` | standard test vectors and 200 random keys/blocks against a reference model |
| `tb_uart_tx`, `tb_uart_rx` | frame format, 10-bit-period frame length, busy/done, framing error, glitch rejection (10 clocks per bit) |
| `tb_dh_tea_link_top` | the whole protocol at default parameters, about 1.8 million cycles, about 20 s |

The top-level test also counts each mechanism and fails if one never happens: squaring
steps, multiply-by-base steps, subtraction steps, multiplier runs, bytes in each
direction, and cycles with both lines busy at once.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dh_tea_link_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/dh_tea_pkg.sv tb/tb_dh_tea_link_top.sv -o sim
./obj_dir/sim
```

To lint a module: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/dh_tea_pkg.sv rtl/<module>.sv`.

## How far to trust it

- **Checked:** the arithmetic units against independent reference models, TEA against
  the standard vectors, the multiplier latency, and the full exchange at full size.
- **Not done:** timing closure or resource use on any device. Expect the unrolled TEA
  paths and the 256-bit ripple-carry chains to limit the clock frequency.
- **Choices and departures** made where the original is silent or inconsistent:
  - modulus value 35653;
  - bit 0 of the exponent is used;
  - four half products in the multiplier instead of three;
  - repeated-subtraction reduction, which is unbounded for large moduli;
  - 64-bit TEA block and key word order;
  - UART character format;
  - synchronous active-high resets.
- **Original behaviour not reproduced:** the processor software, the memory-mapped
  register interface the processor used to reach each unit, and the byte framing with
  zero separator bytes that its software used on the line.
