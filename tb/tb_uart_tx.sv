// tb_uart_tx: checks the 8N1 transmitter with CLKS_PER_BIT = 16.
//
// For random bytes: the line is high while idle; after a tx_start pulse it
// carries a low start bit, the data LSB first and a high stop bit, sampled at
// the centre of each bit time; tx_busy lasts exactly 10*CLKS_PER_BIT cycles and
// tx_done pulses once. Some frames get a second tx_start (with a different byte)
// in mid-frame, which must be ignored: the frame is unchanged and no second frame
// follows.
module tb_uart_tx;
  import secure_uart_pkg::*;

  localparam int CPB = 16;

  logic  clk = 1'b0, rst_n = 1'b0, tx_start = 1'b0;
  byte_t tx_data = '0;
  logic  tx_out, tx_busy, tx_done;
  int    checks = 0, failures = 0;
  int    busy_len = 0, done_count = 0, ignored = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .tx_start, .tx_data, .tx_out, .tx_busy, .tx_done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // busy length measured at every falling edge of tx_busy
  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_busy) busy_len <= busy_len + 1;
      else if (busy_len != 0) begin
        check(busy_len == 10 * CPB, $sformatf("busy for %0d cycles, expected %0d", busy_len, 10 * CPB));
        busy_len <= 0;
      end
      if (tx_done) done_count <= done_count + 1;
    end
  end

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input byte_t b, input bit poke_mid);
    logic [9:0] frame;
    int d0;
    frame = {1'b1, b, 1'b0};
    d0 = done_count;
    @(negedge clk) begin tx_data = b; tx_start = 1'b1; end
    @(negedge clk) begin tx_start = 1'b0; tx_data = ~b; end
    repeat (CPB / 2) @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      check(tx_out == frame[k], $sformatf("byte %h bit %0d: line %b expected %b", b, k, tx_out, frame[k]));
      if (poke_mid && k == 4) begin
        tx_start = 1'b1;
        @(negedge clk) tx_start = 1'b0;
        ignored++;
        repeat (CPB - 1) @(negedge clk);
      end else if (k < 9) repeat (CPB) @(negedge clk);
    end
    repeat (CPB) @(negedge clk);
    check(!tx_busy && tx_out, "transmitter not idle after the frame");
    check(done_count == d0 + 1, $sformatf("tx_done pulsed %0d times", done_count - d0));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // idle line
    repeat (5 * CPB) begin
      @(negedge clk);
      check(tx_out && !tx_busy, "line not idle before any tx_start");
    end
    send(8'hA5, 1'b0);
    send(8'h00, 1'b0);
    send(8'hFF, 1'b1);
    for (int n = 0; n < 40; n++) send(8'($urandom()), n % 5 == 0);
    check(ignored > 0, "no tx_start during a frame was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
