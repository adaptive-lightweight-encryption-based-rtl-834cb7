// tb_uart_rx: checks the 8N1 receiver with CLKS_PER_BIT = 16.
//
// The testbench serialises frames itself: random bytes, back to back and with
// idle gaps, must come out on rx_data with one rx_valid pulse each. A frame
// with a low stop bit must give rx_frame_err and no rx_valid, and a low glitch
// shorter than half a bit must give nothing. The byte must appear within two
// bit times after its stop bit starts. rx_start must pulse once per frame,
// once for the glitch and once for the tail of the low stop bit.
module tb_uart_rx;
  import secure_uart_pkg::*;

  localparam int CPB = 16;

  logic  clk = 1'b0, rst_n = 1'b0, rx_in = 1'b1;
  byte_t rx_data;
  logic  rx_valid, rx_frame_err, rx_start;
  int    checks = 0, failures = 0;
  int    n_valid = 0, n_err = 0, n_start = 0, n_frames = 0;
  byte_t last_byte;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx_in, .rx_data, .rx_valid, .rx_frame_err, .rx_start);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      if (rx_valid) begin
        n_valid   <= n_valid + 1;
        last_byte <= rx_data;
      end
      if (rx_frame_err) n_err <= n_err + 1;
      if (rx_start) n_start <= n_start + 1;
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
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input byte_t b, input bit stop);
    logic [9:0] bits;
    bits = {stop, b, 1'b0};
    n_frames++;
    for (int k = 0; k < 10; k++) begin
      rx_in = bits[k];
      repeat (CPB) @(negedge clk);
    end
    rx_in = 1'b1;
  endtask

  task automatic expect_byte(input byte_t b, input int gap);
    int v0;
    v0 = n_valid;
    frame(b, 1'b1);
    repeat (gap) @(negedge clk);
    check(n_valid == v0 + 1, $sformatf("byte %h: %0d valid pulses", b, n_valid - v0));
    check(last_byte == b, $sformatf("byte %h received as %h", b, last_byte));
  endtask

  initial begin
    int e0, v0;
    @(negedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3 * CPB) @(negedge clk);
    expect_byte(8'hA5, CPB);
    expect_byte(8'h00, CPB);
    expect_byte(8'hFF, CPB);
    for (int n = 0; n < 30; n++) expect_byte(8'($urandom()), (n % 2) ? 0 : 3 * CPB);
    repeat (2 * CPB) @(negedge clk);
    // low stop bit
    e0 = n_err; v0 = n_valid;
    frame(8'h3C, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    check(n_err == e0 + 1 && n_valid == v0, "framing error not reported");
    repeat (2 * CPB) @(negedge clk);
    // short glitch
    v0 = n_valid; e0 = n_err;
    rx_in = 1'b0;
    repeat (CPB / 4) @(negedge clk);
    rx_in = 1'b1;
    repeat (12 * CPB) @(negedge clk);
    check(n_valid == v0 && n_err == e0, "glitch taken as a frame");
    expect_byte(8'h5A, CPB);
    // one start detection per frame, one for the glitch and one for the rest of
    // the low stop bit of the bad frame (seen after the stop-bit sample and
    // rejected at its centre)
    check(n_start == n_frames + 2, $sformatf("%0d start detections for %0d frames", n_start, n_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
