# Encrypted UART link: byte cipher + UART in one core

A plain UART sends every byte in clear on its wire. This core puts a small
symmetric byte cipher on each side of a UART link. The byte to be sent is first
mixed with a key and then substituted through the AES S-box. Only that
ciphertext travels on the serial line. The receiving side applies the inverse
AES S-box and removes the key, which returns the original byte. The cipher is
combinational in front of the transmitter and one register behind the
receiver, so the transfer time is set by the baud rate alone.

```
            KEY                                         KEY
             |                                           |
 data_in -> aes_encrypt --enc_data--> uart_tx --tx_data--> uart_rx --rx_parallel_data--> aes_decrypt -> data_out
             |  (ec_data)               ^   \              ^      \                          ^
             |                          |    tx_done       |       rx_done ------------------'
 tx_start ------------------------------'                  |
                            baud_gen --baud_tick-----------+  (one tick feeds both ends)
```

`uart_aes_top` holds one link: transmitter and receiver sit in the same
module and share one clock and one baud tick. It is a loop-back link. It
shows the cipher working end to end, and it can be split into separate TX
and RX halves.

## The cipher

One byte, one round step of AES:

| step | encrypt (`aes_encrypt`) | decrypt (`aes_decrypt`) |
|------|-------------------------|-------------------------|
| 1 | `ec_data = data_in ^ KEY` (AddRoundKey) | `t = InvSbox(rx_parallel_data)` |
| 2 | `enc_data = Sbox(ec_data)` (SubBytes) | `data_out = t ^ KEY` |

Decryption undoes the steps in reverse order. The S-box is not typed in as a
table. `uart_aes_pkg` computes it from the AES definition:

* `gf_inv(a)` is `a^254` in GF(2^8) modulo x^8+x^4+x^3+x+1 (0x11b). This is the
  multiplicative inverse, with 0 mapped to 0. It is built from seven
  squarings and seven multiplications.
* `aes_sbox(a) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`, with `b = gf_inv(a)`.
* `aes_inv_sbox(s) = gf_inv(rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 0x05)`.

Each function depends only on its 8 input bits, so synthesis reduces it to an
8-input look-up function. That is about 400 word-level cells per direction
before technology mapping.

**Security.** This is an 8-bit substitution with an 8-bit key. It hides the
plaintext from a casual observer of the wire. It is not AES-128: it has no
rounds, no ShiftRows or MixColumns, and only 256 possible keys. Treat it as a
demonstration of where a cipher sits in a UART datapath, not as protection.

Example values (KEY = 05 unless noted):

| data_in | KEY | ec_data | on the wire (`Sbox(ec_data)`) | data_out |
|---------|-----|---------|-------------------------------|----------|
| 6c | 05 | 69 | f9 | 6c |
| 74 | 05 | 71 | a3 | 74 |
| 3e | 45 | 7b | 21 | 3e |

## Baud generator and frame timing

`baud_gen` is a free-running modulo-`DIV` counter. It emits a one-clock
`baud_tick` every `DIV` clocks. The default `DIV = 4` is meant for a 100 MHz
clock and gives 25 MBd. `DIV = 8` and `DIV = 12` give 12.5 MBd and 8.33 MBd.
The 100 MHz clock is an assumption of this design. Any clock works, because
the baud rate is clock / DIV.

A frame consists of:

```
 idle(1) | start(0) | d0 d1 d2 d3 d4 d5 d6 d7 | stop(1) | idle ...
            ^ tick t0                            ^ tick t0+9: tx_done pulse, rx_done rises
```

* Data bits go out LSB first. There is no parity bit and one stop bit.
* `tx_start` is taken only while the transmitter is idle; a request while busy
  is ignored. The byte is latched when `tx_start` is taken, so `data_in`
  may change afterwards.
* The start bit begins at the first tick after `tx_start`, which is 1 to `DIV`
  clocks later.
* `tx_done` pulses for one clock exactly 9 symbols (`9*DIV` clocks) after the
  start bit began. On the same tick `rx_done` rises. With DIV = 4, 8 and 12
  that is 360, 720 and 1080 ns.
* `data_out` shows the decrypted byte one clock later. It holds that byte until
  the next frame is complete.
* The stop symbol follows `tx_done`. A new `tx_start` is accepted once it has
  ended, which is 10 symbols after the start bit.

### Why the receiver needs no oversampling

A standalone UART receiver oversamples (typically 16x) to find the middle of
each bit. Here the receiver uses the transmitter's own `baud_tick`. The
transmitter changes the line on a tick, so the receiver samples on the next
tick and always sees a bit that has been stable for a whole symbol. A low
sample while idle is the start bit, and the next eight samples are the data.
Because of this the receiver is only correct when it shares the clock and the
tick with the transmitter, as it does in `uart_aes_top`. Connecting it to a
foreign UART would need an oversampling receiver instead.

`rx_done` is a level: it stays high from the end of a frame until the receiver
sees the next start bit. The receiver does not check the stop bit.

## Files

| file | contents |
|------|----------|
| `rtl/uart_aes_pkg.sv` | `byte_t`, defaults (`DEFAULT_DIV = 4`, `DEFAULT_KEY = 05`, `DATA_BITS = 8`), GF(2^8) and S-box functions |
| `rtl/baud_gen.sv` | modulo-`DIV` tick generator |
| `rtl/aes_encrypt.sv` | XOR with key, then S-box (combinational) |
| `rtl/uart_tx.sv` | transmitter FSM: IDLE, ARM (wait for tick), START, DATA, STOP |
| `rtl/uart_rx.sv` | receiver FSM: IDLE, DATA |
| `rtl/aes_decrypt.sv` | inverse S-box, then XOR with key, registered |
| `rtl/uart_aes_top.sv` | the link; parameters `DIV`, `KEY` |
| `tb/aes_ref_sbox.svh` | reference S-box for the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `uart_aes_full_tb` |

### Top-level interface (`uart_aes_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `data_in` | in | 8 | plaintext byte, sampled when `tx_start` is taken |
| `tx_start` | in | 1 | start a transfer (ignored while `tx_busy`) |
| `tx_done` | out | 1 | one-clock pulse at the end of the data bits |
| `rx_done` | out | 1 | receiver holds a byte (level) |
| `tx_data` | out | 1 | the serial line (ciphertext), idle high |
| `tx_busy` | out | 1 | transmitter busy |
| `ec_data` | out | 8 | `data_in ^ KEY`, for observation |
| `data_out` | out | 8 | decrypted byte; 00 after reset |

Because `ec_data` is `data_in ^ KEY`, its bits where `KEY` is 0 are plain
wires from `data_in`.

## Verification

Each testbench computes its expected values independently of the RTL. The
reference S-box in `tb/aes_ref_sbox.svh` is built by walking the field along
the powers of the generator 3 and of its inverse, not by the RTL's
exponentiation. It is checked against published FIPS-197 entries.

| testbench | what it checks |
|-----------|----------------|
| `baud_gen_tb` | tick position and period for DIV = 4 and 12, restart on reset |
| `aes_encrypt_tb` | all 256 bytes under 5 keys, plus the example vectors |
| `aes_decrypt_tb` | all 256 bytes under 3 keys, reset value, hold while `rx_done` is low |
| `uart_tx_tb` | bit values and order, symbol length, `tx_done` at 9 symbols, busy requests ignored |
| `uart_rx_tb` | 45 frames with random idle gaps, `rx_done` timing, clearing, and hold |
| `uart_aes_top_tb` | three links side by side (25, 12.5 and 8.33 MBd; keys 05, 05, 45); ciphertext on the wire, 360/720/1080 ns timing, `data_out == data_in`; counts busy requests, `rx_done` clears and `data_in` changes mid-frame |
| `uart_aes_full_tb` | default parameters, all 256 byte values end to end |

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module uart_aes_top_tb rtl/uart_aes_pkg.sv tb/uart_aes_top_tb.sv
./obj_dir/Vuart_aes_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`. All of them finish in
well under a second.

## Where this design makes its own choices

The structure of this design is fixed by its source: five blocks with a shared
baud tick, XOR plus S-box encryption, inverse-S-box decryption, and state-machine
TX and RX. The following points are choices made here:

* **Clock and divide ratio.** A 100 MHz clock is assumed, so DIV = 4, 8 and 12
  give the three baud rates above. The source's measured transfer times are
  each 25 ns plus 9 symbol periods, and that is what this design reproduces
  from the start bit onward.
* **Order of cipher steps.** The key is XORed in first, then the S-box is
  applied. `ec_data` is the key-mixed byte before the S-box.
* **Frame format.** LSB first, no parity bit, and one stop bit after `tx_done`.
* **`data_out` is registered.** It is 00 after reset and is loaded while `rx_done` is
  high.
* **Reset.** All resets are synchronous and active high.
* **Key.** The key is a parameter (`KEY`), fixed at build time. Changing it at
  run time would mean turning `KEY` into a port.
* **Extra outputs.** `tx_busy`, `tx_data` and `ec_data` are brought out for
  observation.
