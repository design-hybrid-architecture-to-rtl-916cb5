# Hybrid-parallel AES-128 image link

This design encrypts an image on one FPGA board, sends it over a serial link, and decrypts it on a
second board that drives a display. The two boards carry the same logic. Speed comes from two kinds of
parallelism used together, which is why the architecture is called *hybrid*:

* **spatial**: four identical processing engines work on four different AES blocks in the same
  clock;
* **temporal**: each engine is a fully unrolled pipeline of 11 register stages, one per AES round plus
  the initial key addition, so every engine accepts a new 128-bit block on every clock.

With four engines the core takes 512 bits per clock. At the clock rates quoted for the original
FPGA implementation, that is 76.8 Gbit/s for one engine at 600 MHz (128 bit × 600 MHz) and
210.9 Gbit/s for four engines at 412 MHz (4 × 128 bit × 412 MHz). In this RTL the UART, not the
cipher, limits the link rate.

The image is handled in **segments of 128 bytes**. A segment is eight AES blocks, and the image is
padded beforehand to a multiple of 128 bytes. Each 16-byte block is encrypted on its own (ECB).

## One board

```
 img_* ──► seg_packer ──┐                     ┌──► seg_unpacker ──► uart_tx ──► uart_txd
 (image bytes)  (128 B) │   4 × processing_   │      (ciphertext)
                        ├──► engine (enc/dec) ─┤
 uart_rxd ──► uart_rx ──► seg_packer ──┘      └──► seg_unpacker ──► lcd_*
                          (received 128 B)          (plain image)
              aes_key_expand ──► round keys to all engines
              seg_scheduler  ──► picks a segment, drives the engines
```

`board_tld` is the top. A board acts as sender or receiver only through the streams it is given.
The sending board gets the image on `img_*` and sends ciphertext on `uart_txd`. The receiving board
takes that ciphertext on `uart_rxd` and puts the decrypted image out on `lcd_*`. Both directions can
run at once on one board. The radio link between the boards, the SD card holding the image and the
display are not part of the RTL; their places are these ports.

## The cipher pipeline (`aes_cipher_pipe`, `aes_round`)

The 128-bit state is kept in the AES byte order: byte 0, the first byte of the stream, is in bits
[127:120]. Byte *i* is row *i* mod 4 and column *i* / 4 of the 4×4 state.

Encryption (`INVERSE = 0`):

| stage | work | round key |
|---|---|---|
| 0 | AddRoundKey | k0 |
| 1 … 9 | SubBytes → ShiftRows → MixColumns → AddRoundKey | k1 … k9 |
| 10 | SubBytes → ShiftRows → AddRoundKey (no MixColumns) | k10 |

Each stage ends in a register. A block presented with `in_valid` leaves **11 clocks later** with
`out_valid`, and a block can enter on every clock. There is no back-pressure, so the caller must
have room for each result. A tag of `TAG_W` bits travels with each block.

Decryption (`INVERSE = 1`) uses **the same round structure with every step inverted, in the same
order**: InvSubBytes → InvShiftRows → InvMixColumns → AddRoundKey, with the last round again
dropping the MixColumns step. This order is not the textbook inverse cipher, which adds the key
before InvMixColumns. It decrypts correctly only when the round keys of stages 1 … 9 are first
passed through InvMixColumns, because InvMixColumns is linear. This is the *equivalent inverse
cipher* of FIPS-197. The decryption key set is therefore

```
dec_keys = { k10, InvMixColumns(k9), …, InvMixColumns(k1), k0 }
```

`aes_key_expand` computes it once per key. The benefit is that encryption and decryption rounds have
the same shape, so `aes_round` serves both with one parameter.

The S-box is not written out as a table. `aes_pkg` computes it during elaboration from the
multiplicative inverse in GF(2^8) and the AES affine map. It walks the field with powers of 3 and of
3⁻¹ together, so each step yields a value and its inverse. The same walk
also fills the inverse S-box. MixColumns builds its fixed coefficients ({02,03,01,01}, and {0e,0b,0d,09} for the
inverse) from `xtime` chains (×2, ×4, ×8).

## Processing engine (`processing_engine`)

An engine holds one encryption pipeline and one decryption pipeline. `in_mode` (`aes_mode_e`) sends
each block to one of them. The two pipelines have the same latency. So results leave in the order
blocks came in, even when the mode changes from block to block, and the two pipelines never finish
in the same clock; an assertion checks this. Engines have no memory of their own. All engines share
one key schedule and the segment buffers described next.

## Segments and the scheduler (`seg_packer`, `seg_unpacker`, `seg_scheduler`)

This is the part that needs the closest reading. Each direction has:

* an **input buffer** (`seg_packer`): it takes bytes on a valid/ready stream. After 128 bytes it
  raises `full` and refuses more. The engines then read it, `LANES` blocks per *beat*, with beat *b*
  holding blocks *b*·LANES … *b*·LANES+LANES−1. With four engines a segment is two beats. A `release_seg`
  pulse empties it.
* an **output buffer** (`seg_unpacker`): EMPTY → (reserve) → FILLING → (last beat written) → DRAIN
  → (last byte taken) → EMPTY. It accepts writes only while FILLING and puts bytes out only while
  draining.

`seg_scheduler` starts a segment only when all three of these hold:

1. the keys are ready;
2. the direction's input buffer is full;
3. the direction's output buffer is free.

In the start clock it **reserves** the output buffer. This matters because the results arrive 11
clocks later, and without the reservation a second segment could be aimed at a buffer that is about
to fill. It then issues the beats on consecutive clocks to all engines at once. The beat number
rides in the engine tag and tells the output buffer where the results go. It releases the input
buffer on the last beat. A segment of the other direction may start in that same clock. When both
directions are ready the scheduler alternates, so neither starves.

Status outputs of `board_tld`:

* `sched_stall`: high while a full segment waits for its output buffer.
* `sched_mode_switch`: pulses when the engines change direction.
* `rx_overrun`: pulses when a received byte is dropped because the receive buffer was still full.
* `rx_frame_err`: pulses on a bad stop bit.

The engines' 11-clock latency is hidden behind the serial link. Sending one segment over the UART
takes 128 × 10 × `CLKS_PER_BIT` = 555,520 clocks at the default, while the engines need 2 clocks to
issue it. In practice `sched_stall` is high while the ciphertext buffer drains to the UART.

## Key schedule (`aes_key_expand`)

A pulse on `key_load` captures the key as k0. Each following clock derives one round key (RotWord,
SubWord, Rcon, chained XOR). `key_ready` rises **10 clocks after** the `key_load` edge. All eleven
keys stay in registers, so no engine recomputes them per block. Both boards must load the same
key. How the key gets there is outside this design.

## Serial link (`uart_tx`, `uart_rx`)

The framing is 8N1: eight data bits, least significant first, no parity, one stop bit. The default
is `CLKS_PER_BIT = 434`, which is 115,200 baud from a 50 MHz clock. The receiver synchronises `rxd`
with two flip-flops. It checks the start bit at half a bit time and samples each bit in its middle.
A frame with a bad stop bit raises `frame_err` and is dropped.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_PE` | 4 | `board_tld` | engines (4 = quad configuration, 1 = single engine) |
| `SEG_BYTES` | 128 | `board_tld`, buffers | segment size; must be a multiple of 16 × `NUM_PE` |
| `CLKS_PER_BIT` | 434 | `board_tld`, UART | clocks per serial bit |
| `INVERSE` | 0 | transform modules, round, pipeline | 1 selects the decryption form |
| `TAG_W` | 4 | pipeline, engine | width of the tag carried with each block |

The engine count, the segment size and the 128-bit key and block follow the published
architecture. The UART framing and speed, the buffer organisation, the scheduling policy, the
handshakes, the reset scheme and the register placement are this design's choices. The design
uses one clock and an asynchronous active-low reset. Only control state is reset; datapath
registers are qualified by valid bits.

## How far it follows the original, and where it departs

* **Last round.** The source describes the final round in two conflicting ways: once as lacking
  AddRoundKey, once as SubBytes, ShiftRows and AddRoundKey. Its encryption diagram shows the second,
  and that is standard AES, so that is what is built.
* **Decryption round order.** The decryption diagram orders the steps Inv-Sub, Inv-Shift, Inv-Mix,
  AddRoundKey, and the RTL follows it using the transformed keys described above. One sentence in
  the source lists the opposite order. Both orders give the same plaintext.
* **Engine contents.** The original engine also lists on-chip memory, a "sync" unit and
  time/multi-clock (PLL) units. Here memory is the shared segment buffers. No sync unit is built,
  because its function is not specified; the UART receiver's input synchroniser is the only one.
  There are no PLLs: the design uses one clock.
* **Not included:** the Wi-Fi controller (the serial lines are its ports), SD-card image
  preparation, which is done beforehand, and the LCD touch screen, which is reached through the
  `lcd_*` stream.
* **Clock rate.** The 600 MHz and 412 MHz figures come from a vendor FPGA flow. Simulation checks
  one block per clock per engine, not the clock rate.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Expected values come from
`tb/aes_ref_pkg.sv`, a separate AES model. It builds its S-box by brute-force inverse search and a
bit-wise affine map, and it decrypts with the textbook inverse cipher. That keeps it independent of
the RTL's S-box generator and of the RTL's decryption order. The tests check:

* **Transform modules** (`tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`,
  `tb_aes_add_round_key`): known values (S-box entries, MixColumns test columns, FIPS-197 Appendix B
  round 0), random states, and that each forward step is undone by its inverse.
* **`tb_aes_round`**: all four round forms, FIPS-197 Appendix B round 1, and the one-clock latency.
* **`tb_aes_key_expand`**: FIPS-197 A.1 and random keys, all 22 keys, and the 10-clock latency.
* **`tb_aes_cipher_pipe`**: FIPS-197 C.1 and B vectors plus random back-to-back streams, with an
  exact 11-clock latency and tag integrity.
* **`tb_processing_engine`**: random encrypt/decrypt mixes that change mode from block to block.
* **Buffers and scheduler**: byte order, full/free flags, out-of-order beat writes, a stalling
  consumer, and a randomised environment around the scheduler. The scheduler test checks start
  conditions, beat sequence, release, alternation, stalls and mode switches.
* **UART**: independent line encoding and decoding, frame length, glitch rejection and broken stop
  bits.
* **`tb_board_tld`** runs at the top's default parameters. Two boards are cross-connected and load
  the same key. Board A sends a padded 8×8 RGB image (256 bytes) and board B sends a 16×8 gray image
  (128 bytes). The test decodes A's serial line and compares it with the reference ECB ciphertext.
  It checks that each display receives the other board's image exactly. It requires at least one
  scheduler stall, a mode switch on each board, display back-pressure, and no lost or broken byte.
  It takes about 1.1 million clocks.
* **`tb_board_single`** repeats the same two-board run with `NUM_PE = 1`, the single-engine
  configuration, where a segment is eight one-block beats. It uses 16 clocks per serial bit to
  keep the run short.

To run one test with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_board_tld.sv --top-module tb_board_tld -Mdir obj
./obj/Vtb_board_tld
```

Replace `tb_board_tld` with any other testbench name. Verilator finds the other modules in `rtl/` by
file name.
