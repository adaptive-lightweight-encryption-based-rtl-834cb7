// uart_tx: 8N1 UART transmitter.
//
// Idle, the line is high and nothing moves. A tx_start pulse while idle loads
// tx_data and sends a frame: one low start bit, the eight data bits LSB first
// and one high stop bit, each held for CLKS_PER_BIT clocks, so a frame lasts
// 10*CLKS_PER_BIT clocks from the cycle after tx_start. tx_busy is high for
// exactly that time; tx_start while busy is ignored, so a frame is never cut
// short, whatever happens to tx_data meanwhile. tx_done pulses for one cycle as
// the stop bit ends. Frame format, baud divider and the busy/done handshake are
// this design's choices ("standard UART signalling" in the architecture).
// Reset: asynchronous, active low, to idle with the line high.
// Assertions check the handshake rules in simulation; because their
// "disable iff (!rst_n)" reads the reset at the clock, Verilator's lint reports
// rst_n as used both synchronously and asynchronously. All flops use it
// asynchronously only.
module uart_tx
  import secure_uart_pkg::*;
#(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tx_start,
  input  byte_t tx_data,
  output logic  tx_out,
  output logic  tx_busy,
  output logic  tx_done
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    shreg;      // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    bits_left;
  logic [CW-1:0] clk_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      clk_cnt   <= '0;
      tx_busy   <= 1'b0;
      tx_done   <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      if (!tx_busy) begin
        if (tx_start) begin
          shreg     <= {1'b1, tx_data, 1'b0};
          bits_left <= 4'd10;
          clk_cnt   <= CW'(CLKS_PER_BIT - 1);
          tx_busy   <= 1'b1;
        end
      end else if (clk_cnt != '0) begin
        clk_cnt <= clk_cnt - 1'b1;
      end else if (bits_left == 4'd1) begin
        shreg     <= '1;
        bits_left <= '0;
        tx_busy   <= 1'b0;
        tx_done   <= 1'b1;
      end else begin
        shreg     <= {1'b1, shreg[9:1]};
        bits_left <= bits_left - 1'b1;
        clk_cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end
  end

  assign tx_out = shreg[0];

  // Handshake rules: the line is high whenever no frame is in progress, and
  // tx_done marks the cycle right after the last busy cycle.
  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) !tx_busy |-> tx_out)
    else $error("uart_tx: line low while idle");
  a_done_ends_frame: assert property (@(posedge clk) disable iff (!rst_n)
                                      tx_done |-> !tx_busy && $past(tx_busy))
    else $error("uart_tx: tx_done outside the end of a frame");

endmodule
