// cipher_mux: the encryption output multiplexer.
//
// All three ciphers encrypt the same plaintext in parallel; this multiplexer
// forwards only the ciphertext named by cipher_sel to the UART transmitter, so
// switching cipher costs no reconfiguration and no extra cycle. The unused code
// 2'b11 forwards the PRESENT output, the default cipher (this design's choice).
// Interface: gift_ct, present_ct, lblock_ct, cipher_sel -> enc_data.
// Purely combinational.
module cipher_mux
  import secure_uart_pkg::*;
(
  input  byte_t       gift_ct,
  input  byte_t       present_ct,
  input  byte_t       lblock_ct,
  input  cipher_sel_t cipher_sel,
  output byte_t       enc_data
);

  always_comb begin
    unique case (cipher_sel)
      SEL_GIFT:   enc_data = gift_ct;
      SEL_LBLOCK: enc_data = lblock_ct;
      default:    enc_data = present_ct;
    endcase
  end

endmodule
