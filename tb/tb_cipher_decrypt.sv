// tb_cipher_decrypt: checks the receiver's decryption unit. For every plaintext
// byte and each cipher selection, feeds the expected ciphertext from the
// reference table tb/cipher_ref.hex (key 80'h0123456789abcdef0123) and expects
// the plaintext back. Combinational: checked 1 ns after each change.
module tb_cipher_decrypt;
  import secure_uart_pkg::*;

  byte_t data_in, data_out;
  key_t  key;
  logic [1:0] sel_bits;
  logic [7:0] ref_tab [768];
  int checks = 0, failures = 0;

  cipher_decrypt dut (.data_in, .key, .cipher_sel(cipher_sel_t'(sel_bits)), .data_out);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    $readmemh("tb/cipher_ref.hex", ref_tab);
    key = 80'h0123456789abcdef0123;
    for (int s = 0; s < 3; s++) begin
      sel_bits = 2'(s);
      for (int p = 0; p < 256; p++) begin
        data_in = ref_tab[256 * s + p];
        #1;
        checks++;
        if (data_out !== 8'(p)) begin
          failures++;
          if (failures < 10) $display("FAIL sel %0d ct %h: %h expected %h", s, data_in, data_out, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
