# Adaptive lightweight-encryption secure UART

A UART link that encrypts every byte it sends and decrypts every byte it
receives, and that picks its cipher at run time. Three small block ciphers in
the style of GIFT, PRESENT and LBlock-S sit side by side in front of the
transmitter. A controller reads three signals describing the device's
situation: available power, required security and whether speed matters. It
chooses the cipher that suits them: GIFT when power is low, PRESENT when the
data is sensitive, LBlock-S when throughput counts. All three ciphers work on
every byte all the time. Changing cipher therefore only moves a multiplexer.
There is no reconfiguration, no extra cycle and no interruption of the serial
line. The UART framing itself is ordinary 8N1, so any UART can carry the
traffic.

The architecture (controller, parallel ciphers, multiplexer, UART transmitter
and receiver with selected-cipher decryption) follows a published adaptive
secure-UART design. That description names the ciphers and the selection
policy, but gives neither the cipher internals nor the UART timing. Those parts
are this design's own and are marked as such below.

```
                 data_in[7:0]            key[79:0]
                      |                      |
        +-------------+-------------+        |
        v             v             v        |
   +---------+   +---------+   +---------+   |
   |  GIFT   |   | PRESENT |   | LBlock-S|<--+    power_level  security_level  speed_req
   |   G1    |   |   P1    |   |   L1    |             |             |            |
   +----+----+   +----+----+   +----+----+             v             v            v
        |             |             |             +-----------------------------------+
        v             v             v             |  cipher_selector CS (rule table)  |
   +-------------------------------------+  sel   +-----------------------------------+
   |      cipher_mux  Mmux_enc_data1     |<-------------------+
   +------------------+------------------+                    |
                      | enc_data                               | latched at the
                      v                                        v received start bit
               +-------------+                            rx_sel
   tx_start -->|  uart_tx TX |--> tx_out  ~~ serial ~~> rx_in  |
               +-------------+                         |       |
                                               +-------v----+  |
                                               | uart_rx RX |  |
                                               +-------+----+  |
                                                       v       v
                                             +---------------------+
                                             | cipher_decrypt DEC  |--> rx_data, rx_valid
                                             +---------------------+
```

## Choosing the cipher

`cipher_selector` is purely combinational. Its rules, in priority order:

| condition (first match wins)                 | mode            | cipher   | `cipher_sel` |
|----------------------------------------------|-----------------|----------|--------------|
| `power_level == 2'b00` (low power)           | ultra-low power | GIFT     | `2'b00`      |
| `security_level >= 2'b10` (high security)    | high security   | PRESENT  | `2'b01`      |
| `speed_req == 1`                             | high speed      | LBlock-S | `2'b10`      |
| otherwise                                    | default         | PRESENT  | `2'b01`      |

Low power overrides everything. The GIFT core is chosen even when the data is
sensitive or speed is requested. This follows the textual description of the
original design. Its flowchart is less clear on that point and can be read as
letting high security win over low power. PRESENT as the fallback comes from
that same flowchart. The level encodings (power `00` is "low", security `10`
and `11` are "high") and the codes of `cipher_sel` are this design's choice.
They are parameters of `cipher_selector` (`POWER_LOW_MAX`, `SEC_HIGH_MIN`,
`DEFAULT_SEL`). Code `2'b11` never occurs; the multiplexer treats it as PRESENT.

## The three byte ciphers

The link carries bytes, and each cipher keeps the byte width. A ciphertext byte
goes out in the same single UART frame as a plaintext byte would. The full
ciphers have 64-bit blocks, so each core here is a reduced version with an
8-bit state. It keeps its cipher's S-box, round structure, key schedule and
round count, and scales the linear layer down to 8 bits. Every core is fully
unrolled combinational logic: ciphertext is valid in the same clock cycle as
the plaintext. All take the same 80-bit key. With parameter `DECRYPT = 1` the
same module computes the inverse, which is how the receiver is built.

**Security caveat.** An 8-bit block cipher used byte by byte is a substitution
table of 256 entries per key. It hides the plaintext from a casual observer of
the line, but it does not resist an attacker who can collect or choose
plaintext/ciphertext pairs. The cores keep the ciphers' structure and cost
profile, not the strength of the full 64-bit ciphers. Swapping in full
implementations would mean buffering eight bytes per block. That would change
the interface.

### PRESENT (`cipher_present`, 31 rounds)
Substitution-permutation network. Each round XORs the round key into the
state, applies the PRESENT S-box to both nibbles and permutes the bits. Bit
*i* goes to bit `2*i mod 7`, and bit 7 stays in place. This is PRESENT's pLayer
rule `i*n/4 mod (n-1)` evaluated for *n* = 8. A 32nd round key whitens the
output. The key register is PRESENT-80's. After each round it is rotated left
by 61, the S-box is applied to its top nibble, and the round counter is XORed
into bits 19:15. The round key is the top byte of the register. PRESENT
proper uses the top 64 bits.

### GIFT (`cipher_gift`, 28 rounds)
GIFT's round order: SubCells (GIFT S-box on both nibbles), then PermBits, then
AddRoundKey. PermBits sends bit *j* of nibble *s* to bit *j* of nibble
`(s + j) mod 2`. In other words it swaps bits 1↔5 and 3↔7, so each S-box
output feeds both S-boxes of the next round, as GIFT's permutation does across
its 16 nibbles. This permutation is its own inverse. AddRoundKey works as
follows:
- Bits 0 and 1 of key word V go into state bits 0 and 4. GIFT-64 puts V bits at
  positions 4i.
- Bits 0 and 1 of key word U go into state bits 1 and 5. GIFT-64 puts U bits at
  positions 4i+1.
- Round-constant bit c0 goes into state bit 3.
- Round-constant bit c1 goes into state bit 7, together with GIFT's fixed '1'
  on the top bit.

The constants come from GIFT's 6-bit LFSR (`c <- {c[4:0], c5^c4^1}`, starting
at 0). The key is held as five 16-bit words k4..k0, with U = k1 and V = k0.
After each round they become `{k1>>>2, k0>>>12, k4, k3, k2}`. This is GIFT's
word rotation, applied to an 80-bit key instead of GIFT's 128-bit one.

### LBlock-S (`cipher_lblock`, 32 rounds)
A Feistel network on two 4-bit halves:
`L' = S(L xor k) xor (R <<< 1)`, `R' = L`. The S-box is LBlock's s0, which
LBlock-s uses in every position. The 1-bit rotation of the 4-bit half stands
in for LBlock's 8-bit rotation of a 32-bit half; both are a quarter of the
width. The output is `{R, L}` after the last round, matching LBlock's
`X32 || X33` ordering. Decryption runs the rounds backwards. The key register
is LBlock's. After each round it is rotated left by 29, the S-box is applied
to its top two nibbles, and the counter is XORed into bits 50:46. The round
key is the top nibble.

## Keeping both ends in step

The receiver must decrypt with the cipher the byte was encrypted with. No
cipher identifier travels on the line. Instead, both ends evaluate the same
selection rules on the same operating conditions, which is the "shared
configuration" the architecture relies on. The selection is pinned to each
frame at both ends:
- On the transmit side, `tx_start` (while idle) loads the selected ciphertext
  into the shift register. Later changes of `data_in` or of the conditions do
  not touch the frame in flight.
- On the receive side, the selection is latched into `rx_sel` when `uart_rx`
  detects the frame's start bit, three clocks after the falling edge on
  `rx_in`. The byte is decrypted with `rx_sel`, so a change of conditions
  during the frame does not affect it either.

The one requirement is that the conditions stay stable between the sender's
`tx_start` and the receiver's start-bit detection. That window is three clocks
plus the line delay. Two devices that see different conditions, or that change
them inside that window, will decrypt garbage. Nothing on the line reports it.
The design provides no key exchange either: the 80-bit `key` input must be
provisioned identically at both ends.

## UART framing and timing

- Frame: 1 start bit (low), 8 data bits LSB first, 1 stop bit (high), no
  parity. Each bit lasts `CLKS_PER_BIT` clocks. The default of 868 gives
  115200 baud from 100 MHz. Neither value comes from the original description.
- `uart_tx` samples `tx_start` at a rising edge. The start bit is on `tx_out`
  from that edge. `tx_busy` stays high for exactly `10*CLKS_PER_BIT` clocks, and
  `tx_done` pulses as the stop bit ends. `tx_start` while busy is ignored. The
  line idles high.
- `uart_rx` passes the line through a two-flop synchroniser and re-checks the
  start bit at its centre, which rejects glitches shorter than half a bit. It
  then samples each bit at its centre. A low stop bit gives an `rx_frame_err`
  pulse instead of data.
- The top registers the decrypted byte. `rx_valid` comes about 9.5 bit times
  plus 5 clocks after the start edge on `rx_in`, half a bit before the sender's
  stop bit ends. Transmitter and receiver are independent, so the link is full
  duplex.
- The ciphers and the multiplexer are combinational. `enc_data` and
  `cipher_sel` follow the inputs in the same cycle; there is no pipeline latency.

## Top-level ports (`secure_uart_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `data_in` | in | 8 | plaintext byte |
| `key` | in | 80 | shared cipher key |
| `power_level` | in | 2 | `00` = low power |
| `security_level` | in | 2 | `10`/`11` = high security |
| `speed_req` | in | 1 | high-speed request |
| `tx_start` | in | 1 | send `data_in` (ignored while `tx_busy`) |
| `tx_out` | out | 1 | serial output, idle high |
| `tx_busy`, `tx_done` | out | 1 | frame in progress; end-of-frame pulse |
| `cipher_sel` | out | 2 | current selection |
| `enc_data` | out | 8 | ciphertext of `data_in` under the current selection |
| `rx_in` | in | 1 | serial input |
| `rx_data`, `rx_valid` | out | 8, 1 | decrypted byte and its one-cycle strobe |
| `rx_frame_err` | out | 1 | stop bit was low |
| `rx_sel` | out | 2 | cipher used for the frame being received (latched at its start bit) |

The only parameter is `CLKS_PER_BIT`. Instance names (G1, P1, L1, CS, TX,
Mmux_enc_data1) follow the original design's schematic. The serial channel is
outside the top, so that the link can be looped back or taken off chip.

## Files

| file | contents |
|------|----------|
| `rtl/secure_uart_pkg.sv` | widths, `cipher_sel_t`, S-box tables and their inverses |
| `rtl/cipher_selector.sv` | selection rules |
| `rtl/cipher_gift.sv`, `rtl/cipher_present.sv`, `rtl/cipher_lblock.sv` | the byte ciphers (`DECRYPT` selects the direction) |
| `rtl/cipher_mux.sv` | ciphertext multiplexer |
| `rtl/cipher_decrypt.sv` | three inverse cores and a multiplexer |
| `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | 8N1 UART |
| `rtl/secure_uart_top.sv` | the whole link |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_secure_uart_link` (two devices) |
| `tb/cipher_ref.hex` | expected ciphertexts: GIFT, PRESENT and LBlock-S of every byte 0..255 under key `80'h0123456789abcdef0123`, 768 entries |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself on a
watchdog. The expected ciphertexts in `tb/cipher_ref.hex` and the known-answer
vectors inside the cipher testbenches were computed by an independent software
model of the three reduced ciphers. They are not taken from the RTL.

- `tb_cipher_{gift,present,lblock}` check all 256 bytes against the table,
  known answers under four further keys, and that the `DECRYPT=1` instance
  inverts the encrypting one for all bytes under random keys. They also check
  that encryption is a permutation of the 256 bytes.
- `tb_cipher_selector` walks all 32 input combinations.
- `tb_cipher_mux` and `tb_cipher_decrypt` check the multiplexer and the
  decryption unit.
- `tb_uart_tx` and `tb_uart_rx` check the framing bit by bit, the frame length,
  a `tx_start` while busy, framing errors and glitch rejection.
- `tb_secure_uart_top` runs the whole link in loopback at the default
  parameters. It replays the original design's simulation sequence: byte `A5`
  under power `00/01/10`, security `00/01/00`, with a speed request. It then
  exercises every mode and sends random traffic. It changes the operating
  conditions and the data in mid-frame and pulses `tx_start` while busy. Every
  frame is checked bit by bit on the line against the expected ciphertext, and
  each mechanism is counted and must occur at least once. It runs about 300 000
  clock cycles and takes seconds.
- `tb_secure_uart_link` connects two tops that share their conditions and key.
  The link is full duplex, with a 7-clock delay on one line. Both devices send
  at once in every mode, with conditions switched in mid-frame, and each must
  receive the other's plaintext.

The RTL also carries a few concurrent assertions, active in simulation with
`--assert`:
- `uart_tx`: the line is high while idle, and `tx_done` only closes a frame.
- `uart_rx`: `rx_valid` and `rx_frame_err` never come together.
- `secure_uart_top`: the selection is always one of the three ciphers.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/secure_uart_pkg.sv tb/tb_secure_uart_top.sv --top-module tb_secure_uart_top
./obj_dir/Vtb_secure_uart_top
```

The testbenches read `tb/cipher_ref.hex` by that relative path. If you change
a cipher, the table and the known answers must be regenerated from a model of
the new cipher.

## Where this departs from, or adds to, the original design

- **Cipher internals**: entirely this design's (see above). The original
  describes the ciphers only by name and purpose and names full-size
  implementations as future work.
- **Priority of low power over high security**: follows the text, not one
  reading of the flowchart.
- **Unselected cores keep running.** The original says both that the plaintext
  is broadcast to all cores and that unselected cores "remain inactive". Here
  the unselected cores are not gated, so switching stays instantaneous.
  Gating their inputs would save power at the cost of one cycle per switch.
- **Added**: `rx_sel` (per-frame selection for the receiver), `tx_busy`,
  `tx_done`, `rx_frame_err`, the reset, and the 80-bit key port. The original's
  schematic shows only the transmit side; the receive side follows its block
  diagram.
- **Not modelled**: key provisioning and exchange, any side-channel or fault
  countermeasures, and power, area or throughput measurements. The original
  reports none of these either.
