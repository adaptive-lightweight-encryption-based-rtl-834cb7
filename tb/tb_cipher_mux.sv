// tb_cipher_mux: checks that the ciphertext multiplexer forwards the input the
// selection names (2'b11 forwards PRESENT) for random input bytes, and that the
// output follows a change of selection with the inputs held. Combinational:
// checked 1 ns after each change.
module tb_cipher_mux;
  import secure_uart_pkg::*;

  byte_t gift_ct, present_ct, lblock_ct, enc_data, exp;
  logic [1:0] sel_bits;
  int checks = 0, failures = 0;

  cipher_mux dut (.gift_ct, .present_ct, .lblock_ct,
                  .cipher_sel(cipher_sel_t'(sel_bits)), .enc_data);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      gift_ct = 8'($urandom()); present_ct = 8'($urandom()); lblock_ct = 8'($urandom());
      for (int s = 0; s < 4; s++) begin
        sel_bits = 2'(s);
        #1;
        exp = (s == 0) ? gift_ct : (s == 2) ? lblock_ct : present_ct;
        checks++;
        if (enc_data !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL sel %0d: %h expected %h", s, enc_data, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
