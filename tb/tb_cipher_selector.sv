// tb_cipher_selector: exhaustive check of the Cipher Selection Controller.
//
// Walks all 32 combinations of power_level, security_level and speed_req and
// compares cipher_sel with the mode table written out below: low power (00)
// always gives GIFT; otherwise security 10/11 gives PRESENT; otherwise a speed
// request gives LBlock-S; otherwise the default, PRESENT. Also counts that each
// of the four modes was reached. Combinational: checked 1 ns after each change.
module tb_cipher_selector;
  import secure_uart_pkg::*;

  logic [1:0]  power_level, security_level;
  logic        speed_req;
  cipher_sel_t cipher_sel;
  int checks = 0, failures = 0;
  int n_gift = 0, n_sec = 0, n_speed = 0, n_default = 0;

  cipher_selector dut (.power_level, .security_level, .speed_req, .cipher_sel);

  // expected[power][security][speed]
  cipher_sel_t expected [4][4][2];

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < 4; s++)
        for (int v = 0; v < 2; v++)
          expected[p][s][v] = (p == 0) ? SEL_GIFT :
                              (s >= 2) ? SEL_PRESENT :
                              (v == 1) ? SEL_LBLOCK : SEL_PRESENT;
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < 4; s++)
        for (int v = 0; v < 2; v++) begin
          power_level = 2'(p); security_level = 2'(s); speed_req = 1'(v);
          #1;
          checks++;
          if (cipher_sel !== expected[p][s][v]) begin
            failures++;
            $display("FAIL power %0d security %0d speed %0d: sel %0d expected %0d",
                     p, s, v, cipher_sel, expected[p][s][v]);
          end
          if (p == 0) n_gift++;
          else if (s >= 2) n_sec++;
          else if (v == 1) n_speed++;
          else n_default++;
        end
    checks++;
    if (n_gift == 0 || n_sec == 0 || n_speed == 0 || n_default == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("modes: low-power %0d high-security %0d high-speed %0d default %0d",
             n_gift, n_sec, n_speed, n_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
