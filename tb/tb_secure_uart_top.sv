// tb_secure_uart_top: end-to-end test of the adaptive secure UART at its
// default parameters (CLKS_PER_BIT = 868, 8680 clocks per frame).
//
// tx_out is looped back to rx_in, as over a serial channel. For every frame the
// testbench works out the expected mode from the operating conditions, takes the
// expected ciphertext from tb/cipher_ref.hex (key 80'h0123456789abcdef0123),
// samples tx_out at each bit centre and compares it with an 8N1 frame of that
// ciphertext, checks that the frame lasts 10*CLKS_PER_BIT clocks, and checks
// that rx_data returns the plaintext with one rx_valid pulse and that tx_done
// pulses once per frame.
// Mechanisms that must each happen at least once: the low-power, high-security,
// high-speed and default modes; a change of operating conditions (and of
// data_in) in the middle of a frame, which must not disturb it; a tx_start while
// busy, which must be ignored; and an idle period with the line held high.
// The first frames replay the input sequence of the simulation waveform of the
// design (data 8'hA5 with power 00/01/10, security 00/01/00, speed request).
module tb_secure_uart_top;
  import secure_uart_pkg::*;

  localparam int   CPB = 868;
  localparam key_t KEY = 80'h0123456789abcdef0123;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  data_in = '0;
  logic [79:0] key = KEY;
  logic [1:0]  power_level = '0, security_level = '0;
  logic        speed_req = 1'b0, tx_start = 1'b0;
  logic        tx_out, tx_busy, tx_done, rx_valid, rx_frame_err;
  logic [1:0]  cipher_sel, rx_sel;
  logic [7:0]  enc_data, rx_data;

  secure_uart_top dut (
    .clk, .rst_n, .data_in, .key, .power_level, .security_level, .speed_req,
    .tx_start, .tx_out, .tx_busy, .tx_done, .cipher_sel, .enc_data,
    .rx_in(tx_out), .rx_data, .rx_valid, .rx_frame_err, .rx_sel
  );

  always #5 clk = ~clk;

  logic [7:0] ref_tab [768];
  int checks = 0, failures = 0;
  int n_lowpower = 0, n_security = 0, n_speed = 0, n_default = 0;
  int n_midswitch = 0, n_ignored = 0, n_idle = 0;
  int busy_len = 0, n_rx = 0, n_err = 0, n_done = 0, n_frames = 0;
  logic [7:0] last_rx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_busy) busy_len <= busy_len + 1;
      else if (busy_len != 0) begin
        check(busy_len == 10 * CPB, $sformatf("frame lasted %0d cycles, expected %0d", busy_len, 10 * CPB));
        busy_len <= 0;
      end
      if (rx_valid) begin
        n_rx    <= n_rx + 1;
        last_rx <= rx_data;
      end
      if (rx_frame_err) n_err <= n_err + 1;
      if (tx_done) n_done <= n_done + 1;
    end
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mode table: 0 low power (GIFT), 1 high security (PRESENT), 2 high speed
  // (LBlock-S), 3 default (PRESENT).
  function automatic int mode_of(input logic [1:0] p, input logic [1:0] s, input logic v);
    if (p == 2'b00) return 0;
    if (s[1])       return 1;
    if (v)          return 2;
    return 3;
  endfunction

  function automatic int sel_of_mode(input int m);
    return (m == 0) ? 0 : (m == 2) ? 2 : 1;
  endfunction

  // Send one byte under the given conditions and check the line and the receiver.
  task automatic send(input logic [7:0] pt, input logic [1:0] p, input logic [1:0] s,
                      input logic v, input bit switch_mid, input bit poke_mid);
    int m, sel, r0;
    logic [7:0] ct;
    logic [9:0] frame;
    m   = mode_of(p, s, v);
    sel = sel_of_mode(m);
    ct  = ref_tab[256 * sel + int'(pt)];
    frame = {1'b1, ct, 1'b0};
    r0  = n_rx;
    @(negedge clk) begin
      data_in = pt; power_level = p; security_level = s; speed_req = v;
    end
    @(negedge clk);
    check(cipher_sel == 2'(sel), $sformatf("cipher_sel %0d expected %0d", cipher_sel, sel));
    check(enc_data == ct, $sformatf("enc_data %h expected %h", enc_data, ct));
    tx_start = 1'b1;
    @(negedge clk) tx_start = 1'b0;
    n_frames++;
    case (m)
      0: n_lowpower++;
      1: n_security++;
      2: n_speed++;
      default: n_default++;
    endcase
    repeat (CPB / 2) @(negedge clk);
    check(rx_sel == 2'(sel), $sformatf("rx_sel %0d not latched as %0d at the start bit", rx_sel, sel));
    for (int k = 0; k < 10; k++) begin
      check(tx_out == frame[k], $sformatf("pt %h mode %0d bit %0d: line %b expected %b",
                                          pt, m, k, tx_out, frame[k]));
      if (k == 3 && switch_mid) begin
        data_in = ~pt; power_level = ~p; security_level = ~s; speed_req = ~v;
        if (mode_of(~p, ~s, ~v) != m) n_midswitch++;
      end
      if (k == 5 && poke_mid) begin
        tx_start = 1'b1;
        @(negedge clk) tx_start = 1'b0;
        n_ignored++;
        repeat (CPB - 1) @(negedge clk);
      end else if (k < 9) repeat (CPB) @(negedge clk);
    end
    repeat (CPB) @(negedge clk);
    check(!tx_busy && tx_out, "transmitter not idle after the frame");
    check(n_rx == r0 + 1, $sformatf("pt %h: %0d bytes received", pt, n_rx - r0));
    check(last_rx == pt, $sformatf("pt %h mode %0d: received %h", pt, m, last_rx));
  endtask

  initial begin
    $readmemh("tb/cipher_ref.hex", ref_tab);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // idle: nothing is sent without tx_start
    repeat (3 * CPB) @(negedge clk) check(tx_out && !tx_busy, "line not idle");
    n_idle++;
    // the waveform sequence: A5 under (00,00,1), (01,01,1), (10,00,1)
    send(8'hA5, 2'b00, 2'b00, 1'b1, 1'b0, 1'b0);
    send(8'hA5, 2'b01, 2'b01, 1'b1, 1'b0, 1'b0);
    send(8'hA5, 2'b10, 2'b00, 1'b1, 1'b0, 1'b0);
    // every mode, explicitly
    send(8'h3C, 2'b00, 2'b11, 1'b1, 1'b0, 1'b0);   // low power beats security
    send(8'h3C, 2'b11, 2'b10, 1'b1, 1'b0, 1'b0);   // high security beats speed
    send(8'h3C, 2'b11, 2'b01, 1'b1, 1'b0, 1'b0);   // high speed
    send(8'h3C, 2'b01, 2'b00, 1'b0, 1'b0, 1'b0);   // default
    // conditions and data change in mid-frame; tx_start while busy
    send(8'h96, 2'b10, 2'b00, 1'b1, 1'b1, 1'b0);
    send(8'h69, 2'b00, 2'b00, 1'b0, 1'b1, 1'b1);
    // random traffic
    for (int n = 0; n < 24; n++)
      send(8'($urandom()), 2'($urandom()), 2'($urandom()), 1'($urandom()),
           n % 4 == 1, n % 6 == 2);
    check(n_err == 0, $sformatf("%0d framing errors", n_err));
    check(n_done == n_frames, $sformatf("%0d tx_done pulses for %0d frames", n_done, n_frames));
    $display("mechanisms: low-power %0d high-security %0d high-speed %0d default %0d mid-frame-switch %0d start-while-busy %0d idle %0d",
             n_lowpower, n_security, n_speed, n_default, n_midswitch, n_ignored, n_idle);
    check(n_lowpower > 0, "low-power mode never used");
    check(n_security > 0, "high-security mode never used");
    check(n_speed > 0, "high-speed mode never used");
    check(n_default > 0, "default mode never used");
    check(n_midswitch > 0, "no mode switch during a frame");
    check(n_ignored > 0, "no tx_start while busy");
    check(n_idle > 0, "no idle period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
