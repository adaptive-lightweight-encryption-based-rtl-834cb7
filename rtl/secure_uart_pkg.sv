// secure_uart_pkg: types, widths and S-boxes shared by the adaptive secure UART.
//
// The UART carries 8-bit bytes and every cipher keeps that width, so DATA_W is 8.
// All three ciphers take the same 80-bit key (the PRESENT-80 / LBlock key size).
// cipher_sel_t is the selection code the controller drives into the ciphertext
// multiplexer and the decryption unit; its values are this design's choice.
// The S-boxes are the published 4-bit S-boxes of PRESENT, GIFT and LBlock-s,
// each with its inverse for the decryption side.
package secure_uart_pkg;

  localparam int DATA_W = 8;
  localparam int KEY_W  = 80;

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [KEY_W-1:0]  key_t;

  typedef enum logic [1:0] {
    SEL_GIFT    = 2'b00,  // ultra-low-power mode
    SEL_PRESENT = 2'b01,  // high-security mode (also the default)
    SEL_LBLOCK  = 2'b10   // high-speed mode
  } cipher_sel_t;

  // S-box tables: entry x is bits [4*x +: 4], so entry 0 is the last hex digit.
  localparam logic [63:0] PRESENT_SBOX     = 64'h21748FE3DA09B65C;  // PRESENT
  localparam logic [63:0] PRESENT_SBOX_INV = 64'hA970364BD21C8FE5;  // inverse PRESENT
  localparam logic [63:0] GIFT_SBOX        = 64'hE8057BD293F6C4A1;  // GIFT
  localparam logic [63:0] GIFT_SBOX_INV    = 64'h5F93A17EB4C2680D;  // inverse GIFT
  localparam logic [63:0] LBLOCK_SBOX      = 64'h5C673821BA4D0F9E;  // LBlock-s (LBlock's s0, used in every position)
  localparam logic [63:0] LBLOCK_SBOX_INV  = 64'h204E761ACDF5B983;  // inverse LBlock-s

  function automatic logic [3:0] present_sbox(input logic [3:0] x);
    return PRESENT_SBOX[4*x +: 4];
  endfunction

  function automatic logic [3:0] present_sbox_inv(input logic [3:0] x);
    return PRESENT_SBOX_INV[4*x +: 4];
  endfunction

  function automatic logic [3:0] gift_sbox(input logic [3:0] x);
    return GIFT_SBOX[4*x +: 4];
  endfunction

  function automatic logic [3:0] gift_sbox_inv(input logic [3:0] x);
    return GIFT_SBOX_INV[4*x +: 4];
  endfunction

  function automatic logic [3:0] lblock_sbox(input logic [3:0] x);
    return LBLOCK_SBOX[4*x +: 4];
  endfunction

  function automatic logic [3:0] lblock_sbox_inv(input logic [3:0] x);
    return LBLOCK_SBOX_INV[4*x +: 4];
  endfunction

endpackage
