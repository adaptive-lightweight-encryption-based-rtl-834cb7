// cipher_lblock: 8-bit LBlock-S-style Feistel cipher, all rounds unrolled.
//
// LBlock is a Feistel network: X(i+1) = F(X(i), K(i)) xor (X(i-1) <<< 8), with
// F = S-box layer after a round-key XOR. Here the state is one UART byte, two
// 4-bit halves: the round function is F(x, k) = S(x xor k) with the single
// LBlock-s S-box, and the 8-bit rotation of LBlock's 32-bit half becomes a 1-bit
// rotation of the 4-bit half (a quarter of its width in both cases). After
// ROUNDS rounds the halves are output as X(ROUNDS) || X(ROUNDS+1), as LBlock
// does. Round keys are the top nibble of LBlock's 80-bit key register, updated
// as in LBlock (rotate left 29, S-box on the top two nibbles, round counter
// XORed into bits 50:46). The half width and round-key bits are this design's
// own; the structure, S-box, key schedule and the 32 rounds are LBlock's.
//
// With DECRYPT = 1 the module runs the Feistel network backwards. Interface:
// data_in, key -> data_out, purely combinational (valid in the same cycle).
module cipher_lblock
  import secure_uart_pkg::*;
#(
  parameter int ROUNDS  = 32,
  parameter bit DECRYPT = 1'b0
) (
  input  byte_t data_in,
  input  key_t  key,
  output byte_t data_out
);

  logic [ROUNDS-1:0][3:0] rk;

  always_comb begin : key_schedule
    key_t k;
    k = key;
    for (int r = 1; r <= ROUNDS; r++) begin
      rk[r-1]  = k[79:76];
      k        = {k[50:0], k[79:51]};          // rotate left by 29
      k[79:76] = lblock_sbox(k[79:76]);
      k[75:72] = lblock_sbox(k[75:72]);
      k[50:46] = k[50:46] ^ 5'(r);
    end
  end

  always_comb begin : datapath
    logic [3:0] l, r, t;
    if (!DECRYPT) begin
      l = data_in[7:4];
      r = data_in[3:0];
      for (int i = 0; i < ROUNDS; i++) begin
        t = lblock_sbox(l ^ rk[i]) ^ {r[2:0], r[3]};
        r = l;
        l = t;
      end
      data_out = {r, l};
    end else begin
      r = data_in[7:4];
      l = data_in[3:0];
      for (int i = ROUNDS - 1; i >= 0; i--) begin
        t = l ^ lblock_sbox(r ^ rk[i]);
        l = r;
        r = {t[0], t[3:1]};                     // rotate right by 1
      end
      data_out = {l, r};
    end
  end

endmodule
