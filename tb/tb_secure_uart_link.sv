// tb_secure_uart_link: two secure UARTs talking to each other, full duplex.
//
// Devices A and B share their operating conditions (power_level,
// security_level, speed_req), as two ends configured alike would, and the same
// key. A's tx_out reaches B's rx_in through a 7-clock line delay and B's tx_out
// reaches A's rx_in directly. In every round both devices send a byte at once
// under one of the four modes; each must receive the other's byte decrypted
// with the cipher the shared conditions selected, while the line carries the
// expected ciphertext (checked at every bit centre of A's output against
// tb/cipher_ref.hex, key 80'h0123456789abcdef0123). In some rounds the
// conditions change in mid-frame, which must not affect the frames in flight.
// Default parameters (CLKS_PER_BIT = 868).
module tb_secure_uart_link;
  import secure_uart_pkg::*;

  localparam int   CPB   = 868;
  localparam int   DELAY = 7;
  localparam key_t KEY   = 80'h0123456789abcdef0123;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] power_level = 2'b11, security_level = 2'b00;
  logic       speed_req = 1'b0;
  logic [7:0] a_data = '0, b_data = '0;
  logic       a_start = 1'b0, b_start = 1'b0;
  logic       a_tx, b_tx, a_busy, b_busy, a_done, b_done;
  logic       a_valid, b_valid, a_ferr, b_ferr;
  logic [1:0] a_sel, b_sel, a_rxsel, b_rxsel;
  logic [7:0] a_enc, b_enc, a_rx, b_rx;
  logic [DELAY-1:0] line_ab = '1;

  secure_uart_top dev_a (
    .clk, .rst_n, .data_in(a_data), .key(KEY), .power_level, .security_level, .speed_req,
    .tx_start(a_start), .tx_out(a_tx), .tx_busy(a_busy), .tx_done(a_done),
    .cipher_sel(a_sel), .enc_data(a_enc),
    .rx_in(b_tx), .rx_data(a_rx), .rx_valid(a_valid), .rx_frame_err(a_ferr), .rx_sel(a_rxsel)
  );

  secure_uart_top dev_b (
    .clk, .rst_n, .data_in(b_data), .key(KEY), .power_level, .security_level, .speed_req,
    .tx_start(b_start), .tx_out(b_tx), .tx_busy(b_busy), .tx_done(b_done),
    .cipher_sel(b_sel), .enc_data(b_enc),
    .rx_in(line_ab[DELAY-1]), .rx_data(b_rx), .rx_valid(b_valid), .rx_frame_err(b_ferr), .rx_sel(b_rxsel)
  );

  always #5 clk = ~clk;
  always @(posedge clk) line_ab <= {line_ab[DELAY-2:0], a_tx};

  logic [7:0] ref_tab [768];
  int checks = 0, failures = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int n_midswitch = 0, n_a_rx = 0, n_b_rx = 0, n_ferr = 0;
  logic [7:0] a_last, b_last;

  always @(posedge clk) begin
    if (rst_n) begin
      if (a_valid) begin n_a_rx <= n_a_rx + 1; a_last <= a_rx; end
      if (b_valid) begin n_b_rx <= n_b_rx + 1; b_last <= b_rx; end
      if (a_ferr || b_ferr) n_ferr <= n_ferr + 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mode_of(input logic [1:0] p, input logic [1:0] s, input logic v);
    if (p == 2'b00) return 0;
    if (s[1])       return 1;
    if (v)          return 2;
    return 3;
  endfunction

  function automatic int sel_of_mode(input int m);
    return (m == 0) ? 0 : (m == 2) ? 2 : 1;
  endfunction

  task automatic exchange(input logic [7:0] pa, input logic [7:0] pb, input logic [1:0] p,
                          input logic [1:0] s, input logic v, input bit switch_mid);
    int m, sel, ra, rb;
    logic [9:0] frame;
    m     = mode_of(p, s, v);
    sel   = sel_of_mode(m);
    frame = {1'b1, ref_tab[256 * sel + int'(pa)], 1'b0};
    ra = n_a_rx; rb = n_b_rx;
    @(negedge clk) begin
      a_data = pa; b_data = pb; power_level = p; security_level = s; speed_req = v;
    end
    @(negedge clk) begin a_start = 1'b1; b_start = 1'b1; end
    @(negedge clk) begin a_start = 1'b0; b_start = 1'b0; end
    n_mode[m]++;
    repeat (CPB / 2) @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      check(a_tx == frame[k], $sformatf("A line, pt %h mode %0d bit %0d", pa, m, k));
      if (k == 2 && switch_mid) begin
        power_level = ~p; security_level = ~s; speed_req = ~v;
        if (sel_of_mode(mode_of(~p, ~s, ~v)) != sel) n_midswitch++;
      end
      if (k < 9) repeat (CPB) @(negedge clk);
    end
    repeat (CPB) @(negedge clk);
    check(n_b_rx == rb + 1 && b_last == pa, $sformatf("B received %h (%0d bytes), A sent %h in mode %0d",
                                                      b_last, n_b_rx - rb, pa, m));
    check(n_a_rx == ra + 1 && a_last == pb, $sformatf("A received %h (%0d bytes), B sent %h in mode %0d",
                                                      a_last, n_a_rx - ra, pb, m));
  endtask

  initial begin
    $readmemh("tb/cipher_ref.hex", ref_tab);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2 * CPB) @(negedge clk);
    exchange(8'hA5, 8'h5A, 2'b00, 2'b10, 1'b1, 1'b0);   // low power
    exchange(8'hA5, 8'h5A, 2'b10, 2'b11, 1'b1, 1'b0);   // high security
    exchange(8'hA5, 8'h5A, 2'b10, 2'b01, 1'b1, 1'b0);   // high speed
    exchange(8'hA5, 8'h5A, 2'b01, 2'b00, 1'b0, 1'b0);   // default
    for (int n = 0; n < 16; n++)
      exchange(8'($urandom()), 8'($urandom()), 2'($urandom()), 2'($urandom()), 1'($urandom()),
               n % 3 == 0);
    check(n_ferr == 0, $sformatf("%0d framing errors", n_ferr));
    $display("modes: low-power %0d high-security %0d high-speed %0d default %0d mid-frame-switch %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_midswitch);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("mode %0d never used", m));
    check(n_midswitch > 0, "no mode switch during a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
