// cipher_gift: 8-bit GIFT-style block cipher, all rounds unrolled.
//
// GIFT's round (SubCells, PermBits, AddRoundKey) on an 8-bit state, so that the
// ciphertext keeps the width of the UART byte. SubCells applies the GIFT S-box
// to both nibbles. PermBits sends bit j of nibble s to bit j of nibble
// (s + j) mod 2, i.e. it swaps bits 1<->5 and 3<->7, spreading every S-box
// output over both nibbles as GIFT's permutation does over its 16 nibbles.
// AddRoundKey XORs two bits of key word U into bits 1 and 5 and two bits of key
// word V into bits 0 and 4 (GIFT-64 puts U/V bits at 4i+1 / 4i), bit 0 of the
// round constant into bit 3 and bit 1 into bit 7 together with GIFT's fixed 1
// on the top bit. The 80-bit key is held as five 16-bit words and updated like
// GIFT's key state ({k4..k0} <- {k1>>>2, k0>>>12, k4, k3, k2}); the 6-bit round
// constant comes from GIFT's LFSR. The 8-bit reduction and the 80-bit key are
// this design's own; S-box, round order, constants and the 28 rounds are GIFT-64's.
//
// With DECRYPT = 1 the module computes the inverse. Interface: data_in, key ->
// data_out, purely combinational (valid in the same cycle).
module cipher_gift
  import secure_uart_pkg::*;
#(
  parameter int ROUNDS  = 28,
  parameter bit DECRYPT = 1'b0
) (
  input  byte_t data_in,
  input  key_t  key,
  output byte_t data_out
);

  function automatic byte_t sub_cells(input byte_t x);
    return {gift_sbox(x[7:4]), gift_sbox(x[3:0])};
  endfunction

  function automatic byte_t sub_cells_inv(input byte_t x);
    return {gift_sbox_inv(x[7:4]), gift_sbox_inv(x[3:0])};
  endfunction

  // Swapping bits 1<->5 and 3<->7 is its own inverse.
  function automatic byte_t perm_bits(input byte_t x);
    return {x[3], x[6], x[1], x[4], x[7], x[2], x[5], x[0]};
  endfunction

  // Round masks: key bits and round constant, one byte per round.
  logic [ROUNDS-1:0][DATA_W-1:0] rk;

  always_comb begin : key_schedule
    logic [4:0][15:0] w;
    logic [15:0] w0, w1;
    logic [5:0]  c;
    for (int i = 0; i < 5; i++) w[i] = key[16*i +: 16];
    c = '0;
    for (int r = 0; r < ROUNDS; r++) begin
      c     = {c[4:0], c[5] ^ c[4] ^ 1'b1};
      rk[r] = {~c[1], 1'b0, w[1][1], w[0][1], c[0], 1'b0, w[1][0], w[0][0]};
      w0    = w[0];
      w1    = w[1];
      w[0]  = w[2];
      w[1]  = w[3];
      w[2]  = w[4];
      w[3]  = {w0[11:0], w0[15:12]};            // rotate right by 12
      w[4]  = {w1[1:0], w1[15:2]};              // rotate right by 2
    end
  end

  always_comb begin : datapath
    byte_t s;
    s = data_in;
    if (!DECRYPT) begin
      for (int r = 0; r < ROUNDS; r++) s = perm_bits(sub_cells(s)) ^ rk[r];
    end else begin
      for (int r = ROUNDS - 1; r >= 0; r--) s = sub_cells_inv(perm_bits(s ^ rk[r]));
    end
    data_out = s;
  end

endmodule
