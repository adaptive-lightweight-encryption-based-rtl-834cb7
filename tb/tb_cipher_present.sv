// tb_cipher_present: self-checking testbench for cipher_present (PRESENT).
//
// Checks the encrypting instance against expected ciphertexts: all 256 bytes
// under one key (table in tb/cipher_ref.hex, entries 256..511) and a few
// known answers under other keys. Checks that the DECRYPT=1 instance inverts the
// encrypting one for all 256 bytes under random keys, and that encryption under
// a fixed key is a permutation of the bytes. The cipher is combinational, so the
// result is checked 1 ns after the inputs change.
module tb_cipher_present;
  import secure_uart_pkg::*;

  byte_t data_in, ct, pt;
  key_t  key;
  int    checks = 0, failures = 0;
  logic [7:0] ref_tab [768];
  bit    seen [256];

  cipher_present #(.DECRYPT(1'b0)) dut_enc (.data_in(data_in), .key(key), .data_out(ct));
  cipher_present #(.DECRYPT(1'b1)) dut_dec (.data_in(ct),      .key(key), .data_out(pt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic check_kat(input key_t k, input byte_t p, input byte_t c);
    key = k; data_in = p; #1;
    check(ct == c, $sformatf("key %h pt %h: ct %h expected %h", k, p, ct, c));
    check(pt == p, $sformatf("key %h pt %h: decrypt gave %h", k, p, pt));
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/cipher_ref.hex", ref_tab);
    // full table under the reference key
    key = 80'h0123456789abcdef0123;
    for (int p = 0; p < 256; p++) begin
      data_in = 8'(p); #1;
      check(ct == ref_tab[256 + p], $sformatf("table pt %h: ct %h expected %h", p, ct, ref_tab[256 + p]));
    end
    // known answers under other keys
    check_kat(80'h00000000000000000000, 8'h00, 8'hed);
    check_kat(80'h00000000000000000000, 8'h5a, 8'h76);
    check_kat(80'h00000000000000000000, 8'ha5, 8'h78);
    check_kat(80'h00000000000000000000, 8'hff, 8'h11);
    check_kat(80'hffffffffffffffffffff, 8'h00, 8'h88);
    check_kat(80'hffffffffffffffffffff, 8'h5a, 8'hed);
    check_kat(80'hffffffffffffffffffff, 8'ha5, 8'ha4);
    check_kat(80'hffffffffffffffffffff, 8'hff, 8'hd1);
    check_kat(80'h80000000000000000001, 8'h00, 8'h82);
    check_kat(80'h80000000000000000001, 8'h5a, 8'ha6);
    check_kat(80'h80000000000000000001, 8'ha5, 8'h06);
    check_kat(80'h80000000000000000001, 8'hff, 8'h8d);
    check_kat(80'hdeadbeef0badf00d1234, 8'h00, 8'h11);
    check_kat(80'hdeadbeef0badf00d1234, 8'h5a, 8'hd5);
    check_kat(80'hdeadbeef0badf00d1234, 8'ha5, 8'he7);
    check_kat(80'hdeadbeef0badf00d1234, 8'hff, 8'hd6);
    // the decrypting instance inverts the encrypting one; encryption permutes
    for (int n = 0; n < 8; n++) begin
      key = {$urandom(), $urandom(), 16'($urandom())};
      foreach (seen[i]) seen[i] = 1'b0;
      for (int p = 0; p < 256; p++) begin
        data_in = 8'(p); #1;
        check(pt == 8'(p), $sformatf("round trip key %h pt %h gave %h", key, p, pt));
        check(!seen[ct], $sformatf("ciphertext %h repeated under key %h", ct, key));
        seen[ct] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
