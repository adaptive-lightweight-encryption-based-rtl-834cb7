// cipher_decrypt: receiver-side decryption with the selected cipher.
//
// Mirror image of the transmit side: the inverse GIFT, PRESENT and LBlock-S
// cores (the cipher modules built with DECRYPT = 1) all decrypt the received
// byte in parallel and cipher_mux forwards the plaintext of the cipher the frame
// was encrypted with. Building it from parallel cores and a multiplexer is this
// design's choice; the architecture asks only that the receiver decrypt with the
// same cipher the transmitter selected.
// Interface: data_in (ciphertext), key, cipher_sel -> data_out (plaintext).
// Purely combinational.
module cipher_decrypt
  import secure_uart_pkg::*;
(
  input  byte_t       data_in,
  input  key_t        key,
  input  cipher_sel_t cipher_sel,
  output byte_t       data_out
);

  byte_t gift_pt, present_pt, lblock_pt;

  cipher_gift    #(.DECRYPT(1'b1)) G1_INV (.data_in, .key, .data_out(gift_pt));
  cipher_present #(.DECRYPT(1'b1)) P1_INV (.data_in, .key, .data_out(present_pt));
  cipher_lblock  #(.DECRYPT(1'b1)) L1_INV (.data_in, .key, .data_out(lblock_pt));

  cipher_mux Mmux_dec_data (
    .gift_ct   (gift_pt),
    .present_ct(present_pt),
    .lblock_ct (lblock_pt),
    .cipher_sel,
    .enc_data  (data_out)
  );

endmodule
