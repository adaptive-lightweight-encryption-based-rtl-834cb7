// cipher_selector: the Cipher Selection Controller.
//
// A combinational rule table that turns the device's operating conditions into
// the cipher selection code driving the ciphertext multiplexer. Rules, highest
// priority first:
//   1. power_level <= POWER_LOW_MAX          -> GIFT    (ultra-low-power mode,
//      whatever the security and speed requests)
//   2. security_level >= SEC_HIGH_MIN        -> PRESENT (high-security mode)
//   3. speed_req                             -> LBlock-S (high-speed mode, power
//      not low)
//   4. otherwise                             -> DEFAULT_SEL (PRESENT)
// The four modes and their ciphers, the precedence of low power, and PRESENT as
// the fallback when speed is not required follow the architecture description.
// The 2-bit encodings of power and security level and the two thresholds are this
// design's choice: power 00 is "low", security 10 and 11 are "high".
// Interface: power_level[1:0], security_level[1:0], speed_req -> cipher_sel.
// No clock: the selection follows its inputs in the same cycle.
module cipher_selector
  import secure_uart_pkg::*;
#(
  parameter logic [1:0]  POWER_LOW_MAX = 2'b00,
  parameter logic [1:0]  SEC_HIGH_MIN  = 2'b10,
  parameter cipher_sel_t DEFAULT_SEL   = SEL_PRESENT
) (
  input  logic [1:0]  power_level,
  input  logic [1:0]  security_level,
  input  logic        speed_req,
  output cipher_sel_t cipher_sel
);

  always_comb begin
    if (power_level <= POWER_LOW_MAX)        cipher_sel = SEL_GIFT;
    else if (security_level >= SEC_HIGH_MIN) cipher_sel = SEL_PRESENT;
    else if (speed_req)                      cipher_sel = SEL_LBLOCK;
    else                                     cipher_sel = DEFAULT_SEL;
  end

endmodule
