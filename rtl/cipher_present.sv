// cipher_present: 8-bit PRESENT-style block cipher, all rounds unrolled.
//
// The secure UART encrypts one byte at a time and keeps the byte width, so the
// cipher is PRESENT's substitution-permutation network cut down to an 8-bit
// state. Each of the ROUNDS rounds XORs a round key, passes both nibbles through
// the PRESENT S-box and moves bit i to bit 2*i mod 7 (bit 7 stays), which is
// PRESENT's pLayer rule i*n/4 mod (n-1) for n = 8. A last round key whitens the
// output. Round keys are the top byte of the PRESENT-80 key register, updated as
// in PRESENT-80 (rotate left 61, S-box on the top nibble, round counter XORed
// into bits 19:15). The 8-bit state and the choice of round-key bits are this
// design's own; the S-box, the permutation rule, the key schedule and the 31
// rounds follow the PRESENT specification.
//
// With DECRYPT = 1 the same module computes the inverse, for the receiver.
// Interface: data_in, key -> data_out. Purely combinational: the result is
// valid in the same clock cycle as its inputs.
module cipher_present
  import secure_uart_pkg::*;
#(
  parameter int ROUNDS  = 31,
  parameter bit DECRYPT = 1'b0
) (
  input  byte_t data_in,
  input  key_t  key,
  output byte_t data_out
);

  function automatic byte_t s_layer(input byte_t x);
    return {present_sbox(x[7:4]), present_sbox(x[3:0])};
  endfunction

  function automatic byte_t s_layer_inv(input byte_t x);
    return {present_sbox_inv(x[7:4]), present_sbox_inv(x[3:0])};
  endfunction

  function automatic byte_t p_layer(input byte_t x);
    byte_t y;
    for (int i = 0; i < 7; i++) y[(2 * i) % 7] = x[i];
    y[7] = x[7];
    return y;
  endfunction

  function automatic byte_t p_layer_inv(input byte_t x);
    byte_t y;
    for (int i = 0; i < 7; i++) y[i] = x[(2 * i) % 7];
    y[7] = x[7];
    return y;
  endfunction

  logic [ROUNDS:0][DATA_W-1:0] rk;          // round keys 1..ROUNDS+1 at 0..ROUNDS

  always_comb begin : key_schedule
    key_t k;
    k = key;
    for (int r = 1; r <= ROUNDS; r++) begin
      rk[r-1]  = k[KEY_W-1 -: DATA_W];
      k        = {k[18:0], k[79:19]};          // rotate left by 61
      k[79:76] = present_sbox(k[79:76]);
      k[19:15] = k[19:15] ^ 5'(r);
    end
    rk[ROUNDS] = k[KEY_W-1 -: DATA_W];
  end

  always_comb begin : datapath
    byte_t s;
    if (!DECRYPT) begin
      s = data_in;
      for (int r = 0; r < ROUNDS; r++) s = p_layer(s_layer(s ^ rk[r]));
      s = s ^ rk[ROUNDS];
    end else begin
      s = data_in ^ rk[ROUNDS];
      for (int r = ROUNDS - 1; r >= 0; r--) s = s_layer_inv(p_layer_inv(s)) ^ rk[r];
    end
    data_out = s;
  end

endmodule
