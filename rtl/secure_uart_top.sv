// secure_uart_top: adaptive lightweight-encryption secure UART.
//
// A plain UART link with a cipher in front of the transmitter and behind the
// receiver, where the cipher is chosen at run time from the device's state.
// Transmit side: the plaintext byte goes to GIFT (G1), PRESENT (P1) and
// LBlock-S (L1) at once; the Cipher Selection Controller (CS) looks at
// power_level, security_level and speed_req and the multiplexer (Mmux_enc_data1)
// forwards the chosen ciphertext (enc_data) to the UART transmitter (TX). Since
// every core has a result in the same cycle, a change of selection takes effect
// immediately, with no reconfiguration.
// A tx_start pulse while TX is idle sends the selected ciphertext of data_in as
// one 8N1 frame of 10*CLKS_PER_BIT clocks; the frame in flight is not affected
// by later changes of data_in or of the selection.
// Receive side: RX deserialises rx_in and the decryption unit (DEC) decrypts
// the byte with rx_sel, the output of the same selection controller latched
// when RX detects the frame's start bit (three clocks after the falling edge on
// rx_in). Both ends of a link thus decrypt with the cipher their shared
// operating conditions select, and a change of conditions during a frame does
// not affect it. The conditions must not change between the sender's tx_start
// and the receiver's start-bit detection (three clocks plus the line delay).
// rx_data is registered and qualified by a one-cycle rx_valid, about 9.5 bit
// times plus 5 clocks after the start edge. With tx_out wired to rx_in the link
// is a loopback: rx_data returns data_in.
// The block structure and instance names follow the architecture; the serial
// channel being outside the top (tx_out and rx_in are separate ports), the
// per-frame latch rx_sel, the 80-bit key input and the reset are this
// design's choices.
// Assertions check the handshake rules in simulation; because their
// "disable iff (!rst_n)" reads the reset at the clock, Verilator's lint reports
// rst_n as used both synchronously and asynchronously. All flops use it
// asynchronously only.
module secure_uart_top
  import secure_uart_pkg::*;
#(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  // transmit side
  input  logic [7:0]  data_in,
  input  logic [79:0] key,
  input  logic [1:0]  power_level,
  input  logic [1:0]  security_level,
  input  logic        speed_req,
  input  logic        tx_start,
  output logic        tx_out,
  output logic        tx_busy,
  output logic        tx_done,
  output logic [1:0]  cipher_sel,
  output logic [7:0]  enc_data,
  // receive side
  input  logic        rx_in,
  output logic [7:0]  rx_data,
  output logic        rx_valid,
  output logic        rx_frame_err,
  output logic [1:0]  rx_sel
);

  cipher_sel_t sel, frame_sel;
  byte_t       gift_ct, present_ct, lblock_ct, enc_byte;
  byte_t       rx_byte, dec_byte;
  logic        rx_byte_valid, rx_err, rx_frame_start;

  cipher_selector CS (
    .power_level,
    .security_level,
    .speed_req,
    .cipher_sel(sel)
  );

  cipher_gift    G1 (.data_in, .key, .data_out(gift_ct));
  cipher_present P1 (.data_in, .key, .data_out(present_ct));
  cipher_lblock  L1 (.data_in, .key, .data_out(lblock_ct));

  cipher_mux Mmux_enc_data1 (
    .gift_ct,
    .present_ct,
    .lblock_ct,
    .cipher_sel(sel),
    .enc_data  (enc_byte)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) TX (
    .clk,
    .rst_n,
    .tx_start,
    .tx_data(enc_byte),
    .tx_out,
    .tx_busy,
    .tx_done
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) RX (
    .clk,
    .rst_n,
    .rx_in,
    .rx_data     (rx_byte),
    .rx_valid    (rx_byte_valid),
    .rx_frame_err(rx_err),
    .rx_start    (rx_frame_start)
  );

  // Cipher of the frame being received, fixed at its start bit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              frame_sel <= SEL_PRESENT;
    else if (rx_frame_start) frame_sel <= sel;
  end

  cipher_decrypt DEC (
    .data_in   (rx_byte),
    .key,
    .cipher_sel(frame_sel),
    .data_out  (dec_byte)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_data      <= '0;
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      rx_valid     <= rx_byte_valid;
      rx_frame_err <= rx_err;
      if (rx_byte_valid) rx_data <= dec_byte;
    end
  end

  assign cipher_sel = sel;
  assign enc_data   = enc_byte;
  assign rx_sel     = frame_sel;

  // The controller only ever selects one of the three ciphers.
  a_sel_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                sel inside {SEL_GIFT, SEL_PRESENT, SEL_LBLOCK})
    else $error("secure_uart_top: invalid cipher selection");

endmodule
