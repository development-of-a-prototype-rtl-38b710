# AES-128 security module for a serial data link

A man-in-the-middle on a plant data network can read and alter traffic between
a gateway and its workstations. This design puts the encryption in hardware
instead of software: an FPGA sits on the link, takes 128-bit plaintext blocks
from a PC over a serial port, encrypts them with AES-128 under a key that is
fixed when the FPGA is built, and sends the ciphertext back. The key never
travels over any wire and needs no pins.

The RTL follows a published prototype for a nuclear-plant data-communication
system. The prototype gives the AES round structure, the key-expansion step,
the constant-key idea, the port list of the encryption core and its test
vector. It does not give a clock rate, a cycle schedule or the serial protocol.
Those parts are this design's own choices; they are listed under
[Where this RTL goes beyond its source](#where-this-rtl-goes-beyond-its-source).

## Block diagram

```
          uart_rxd                                              uart_txd
PC  ───────────────► uart_rx ─► serial_ctrl ─► aes_128_encrypt ─┐
                                    ▲  (16 bytes in,             │
                                    │   start, wait done)        │
                                    └──── ciphertext ◄───────────┘
                                    serial_ctrl ─► uart_tx ─────────────► PC
```

| Module | Role |
|---|---|
| `security_module` | Top: serial link + core, constant key `KEY` |
| `uart_rx`, `uart_tx` | 8N1 serial receiver and transmitter, `CLKS_PER_BIT` clocks per bit |
| `serial_ctrl` | Collects 16 bytes into a block, starts the core, sends 16 bytes back |
| `aes_128_encrypt` | Iterative AES-128 core, one round per clock |
| `aes_round` | SubBytes → ShiftRows → MixColumns (skipped in round 10) → AddRoundKey |
| `aes_key_expand_round` | One key-schedule step: round key r-1 → round key r |
| `aes_sub_bytes`, `aes_sbox` | 16 parallel S-box lookups; the 256-entry S-box ROM |
| `aes_shift_rows`, `aes_mix_columns` | The other two round transforms |
| `aes_pkg` | Block type, GF(2^8) helpers, the S-box table generator |

## The encryption core

`aes_128_encrypt` keeps two 128-bit registers: the state and the current
round key. Its key idea is that the key schedule is not computed ahead of time.
It runs in step with the rounds: in every clock, `aes_key_expand_round`
derives round key r from round key r-1 while `aes_round` uses it on the same
clock. Software does these two jobs one after the other. In hardware they are
independent and run side by side, and this is what makes the hardware version
faster.

Sequence for one block:

| Clock edge | State register | Round-key register |
|---|---|---|
| 0 (start sampled) | plaintext ⊕ K0 | K0 |
| 1 … 9 | full round r with K_r | K_r |
| 10 | final round (no MixColumns) with K10; copied to `ciphertext_out`, `done` = 1 | K10 |

So the latency is 10 clocks from the start edge to `done`. A new block can
start one clock after `done`, which gives one block every 11 clocks. The round
constant (01, 02, 04, … 1B, 36) lives in its own 8-bit register and is
multiplied by x each clock.

Core ports use the names of the original design's signal list: `sys_clk`,
`rst`, `start`, `key_load`, `key_in`, `plaintext_in`, `ciphertext_out`. On top
of these, `busy` and `done` were added.
- `key_load` writes `key_in` into a key register. If `start` is high in the same
  clock, that block uses `key_in` directly.
- `start` is ignored while `busy`. If `start` is held high, the core encrypts the
  same inputs again and again, and `ciphertext_out` does not change.
- Reset is synchronous and active high.

### State layout

A block is 16 bytes, and byte 0 is bits [127:120], which is the first two hex
digits of the block written as a hex string. Bytes fill the 4×4 state column by
column: byte i sits at row i mod 4, column i / 4. The key words W0…W3 are the
four columns of that matrix. All modules and `aes_pkg::get_byte` use this
convention.

### S-box

The S-box is the standard AES 16×16 table. It is not typed in. `aes_pkg`
computes it at elaboration:

    sbox(a) = A(a^-1) ,  a^-1 = a^254 in GF(2^8) mod x^8+x^4+x^3+x+1 (0 ↦ 0)
    A(b)    = b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 63h

`aes_sbox` reads the resulting constant. Synthesis therefore sees a 256×8 ROM,
and each block is a 2048-bit ROM. The core has 20 of them: 16 for SubBytes and
4 for the key schedule.

### Key schedule step

`aes_key_expand_round` computes g(W3) = SubWord(RotWord(W3)) ⊕ (rcon, 0, 0, 0).
From that it forms W4 = W0 ⊕ g, W5 = W1 ⊕ W4, W6 = W2 ⊕ W5 and W7 = W3 ⊕ W6.

## The serial front end

The PC sends 16 bytes, most significant byte first, which is the order of the
hex string. `serial_ctrl` shifts them into the plaintext register. After the
16th byte it pulses `start`. When `done` arrives it latches the ciphertext and
hands it to `uart_tx`, one byte per valid/ready handshake, in the same byte
order.

Only one block is handled at a time. A byte that arrives while a block is being
encrypted or sent back is dropped, and `rx_dropped` pulses once for it. The
PC must read all 16 reply bytes before it sends the next block.

The serial format is 8 data bits, no parity, one stop bit, least significant
bit first. `uart_rx` passes the line through a two-flop synchroniser and checks
the start bit half a bit after the falling edge. It then samples each bit in the
middle of its bit time. A frame whose stop bit is low is thrown away and pulses
`frame_err`.

At the defaults (100 MHz, 115200 baud, `CLKS_PER_BIT` = 868), one block takes
about 2 × 16 × 10 bit times, which is 2.8 ms. The serial link sets that time.
The 11 clocks of encryption add almost nothing.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `security_module.CLK_FREQ_HZ` | 100 000 000 | Board clock |
| `security_module.BAUD_RATE` | 115 200 | Serial rate |
| `security_module.KEY` | `2B7E1516 28AED2A6 ABF71588 09CF4F3C` | The constant cipher key, which is the NIST SP 800-38A test key |
| `uart_rx/uart_tx.CLKS_PER_BIT` | 868 | Set by the top from the two rates |

To use a key of your own, set `KEY` when you instantiate `security_module`. Each
build carries exactly one key.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/aes_ref_pkg.sv`, a separate AES model. That model builds its S-box from
log/antilog tables of the generator 03 and multiplies with a polynomial
product, so it shares no code with the RTL. It also holds the known-answer
vectors from FIPS-197 (Appendices A, B and C.1) and from NIST SP 800-38A F.1.1.

| Testbench | What it checks |
|---|---|
| `aes_sbox_tb` | All 256 entries, plus six values from the standard |
| `aes_sub_bytes_tb`, `aes_shift_rows_tb`, `aes_mix_columns_tb`, `aes_round_tb` | FIPS-197 round-1 intermediate values and 200 random states each |
| `aes_key_expand_round_tb` | All ten schedule steps of the test key (round keys 1 and 10 against printed values), plus random keys |
| `aes_128_encrypt_tb` | The four F.1.1 blocks and FIPS-197 C.1; latency of exactly 10 clocks; `start` ignored while busy; `start`/`key_load` held high gives one block per 11 clocks; 50 random key/plaintext pairs |
| `uart_rx_tb` | 44 frames, including ±3 % baud error, a low stop bit and a 3-clock glitch |
| `uart_tx_tb` | Framing, the bit timing of each bit, and a frame length of 10 bit times |
| `serial_ctrl_tb` | Block assembly order, one start per 16 bytes, reply order under random `tx_ready`, and a dropped byte |
| `security_module_tb` | End to end at default parameters. The testbench plays the PC on the serial pins: it sends the four F.1.1 blocks and two random blocks, decodes the reply itself and compares it. It also forces a dropped byte and a malformed frame, and counts each mechanism. |

Run one with Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/security_module_tb.sv --top-module security_module_tb
./obj_dir/Vsecurity_module_tb
```

The end-to-end test simulates about 1.8 million clocks (18 ms at 100 MHz) and
takes about one second. `-y rtl` lets Verilator find each module in its own file. The block testbenches override only `CLKS_PER_BIT` in the UART tests,
where they use 16 or 32.

## Where this RTL goes beyond its source

- **Cycle schedule.** The source says only that key expansion and the data
  transforms run in parallel. One round per clock, the 10-clock latency and the
  `busy`/`done` outputs are this design's choices.
- **Serial protocol.** The source says only that the module talks to a PC over a
  serial link. The framing (8N1), the baud rate, the 16-byte block order, the
  single-block flow control and the dropped-byte and frame-error flags are this
  design's own.
- **Clock.** 100 MHz is assumed, which is the oscillator of the Nexys Video board
  the prototype used.
- **Key handling.** The key is a synthesis parameter and is loaded into the core
  with every block. The core itself still has the `key_in`/`key_load` ports of
  the original, so it can also be used with a key that changes at run time.
- **AES internals.** The source names g(), the S-box table and the MixColumns
  matrix but does not print them. They are taken from the AES standard and
  checked against its published vectors.
- **Size.** The prototype reports 1113 LUTs and 939 flip-flops on its FPGA. This
  RTL has 729 flip-flop bits in the top. The difference comes from this
  design's own serial front end and schedule, which are not the original's.
- **Decryption.** Neither the prototype nor this RTL implements decryption, and
  neither supports 192- or 256-bit keys.
