// tb_secure_uart_pkg: checks the shared package. Each S-box function must
// return the published table written out below, entry by entry, and each
// inverse function must undo its S-box for all 16 inputs. Also checks the
// selection codes and widths the rest of the design relies on.
module tb_secure_uart_pkg;
  import secure_uart_pkg::*;

  int checks = 0, failures = 0;

  localparam logic [3:0] PRESENT_REF [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                              4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};
  localparam logic [3:0] GIFT_REF    [16] = '{4'h1, 4'hA, 4'h4, 4'hC, 4'h6, 4'hF, 4'h3, 4'h9,
                                              4'h2, 4'hD, 4'hB, 4'h7, 4'h5, 4'h0, 4'h8, 4'hE};
  localparam logic [3:0] LBLOCK_REF  [16] = '{4'hE, 4'h9, 4'hF, 4'h0, 4'hD, 4'h4, 4'hA, 4'hB,
                                              4'h1, 4'h2, 4'h8, 4'h3, 4'h7, 4'h6, 4'hC, 4'h5};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      check(present_sbox(4'(x)) == PRESENT_REF[x], $sformatf("PRESENT S(%h)", x));
      check(gift_sbox(4'(x))    == GIFT_REF[x],    $sformatf("GIFT S(%h)", x));
      check(lblock_sbox(4'(x))  == LBLOCK_REF[x],  $sformatf("LBlock-s S(%h)", x));
      check(present_sbox_inv(PRESENT_REF[x]) == 4'(x), $sformatf("PRESENT S^-1(%h)", PRESENT_REF[x]));
      check(gift_sbox_inv(GIFT_REF[x])       == 4'(x), $sformatf("GIFT S^-1(%h)", GIFT_REF[x]));
      check(lblock_sbox_inv(LBLOCK_REF[x])   == 4'(x), $sformatf("LBlock-s S^-1(%h)", LBLOCK_REF[x]));
    end
    check(DATA_W == 8 && KEY_W == 80, "widths");
    check(SEL_GIFT == 2'b00 && SEL_PRESENT == 2'b01 && SEL_LBLOCK == 2'b10, "selection codes");
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
