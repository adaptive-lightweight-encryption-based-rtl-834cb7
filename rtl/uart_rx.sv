// uart_rx: 8N1 UART receiver.
//
// The line passes a two-flop synchroniser. A falling edge starts a frame; the
// start bit is checked again at its centre (CLKS_PER_BIT/2 clocks later) so a
// glitch is dropped. Each data bit is then sampled one bit time later, at its
// centre, LSB first, and the stop bit likewise. A high stop bit delivers the
// byte on rx_data with a one-cycle rx_valid pulse; a low one gives a one-cycle
// rx_frame_err pulse instead and rx_data keeps its old value. The receiver is
// ready for the next start bit right after the stop-bit sample. rx_start pulses
// for one cycle when a falling edge is taken as a possible start bit (three
// clocks after the edge on rx_in), so that the owner can attach per-frame state.
// Frame format and sampling scheme are this design's choices.
// Reset: asynchronous, active low.
// Assertions check the handshake rules in simulation; because their
// "disable iff (!rst_n)" reads the reset at the clock, Verilator's lint reports
// rst_n as used both synchronously and asynchronously. All flops use it
// asynchronously only.
module uart_rx
  import secure_uart_pkg::*;
#(
  parameter int CLKS_PER_BIT = 868
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx_in,
  output byte_t rx_data,
  output logic  rx_valid,
  output logic  rx_frame_err,
  output logic  rx_start
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} rx_state_t;

  rx_state_t     state;
  logic [1:0]    sync;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  byte_t         shreg;

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync         <= 2'b11;
      state        <= IDLE;
      clk_cnt      <= '0;
      bit_idx      <= '0;
      shreg        <= '0;
      rx_data      <= '0;
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      rx_start     <= 1'b0;
    end else begin
      sync         <= {sync[0], rx_in};
      rx_valid     <= 1'b0;
      rx_frame_err <= 1'b0;
      rx_start     <= 1'b0;
      unique case (state)
        IDLE: if (!line) begin
          state    <= START;
          rx_start <= 1'b1;
          clk_cnt  <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: if (clk_cnt != '0) clk_cnt <= clk_cnt - 1'b1;
        else if (line) state <= IDLE;                // glitch, not a start bit
        else begin
          state   <= DATA;
          bit_idx <= '0;
          clk_cnt <= CW'(CLKS_PER_BIT - 1);
        end
        DATA: if (clk_cnt != '0) clk_cnt <= clk_cnt - 1'b1;
        else begin
          shreg   <= {line, shreg[7:1]};
          clk_cnt <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= STOP;
          bit_idx <= bit_idx + 1'b1;
        end
        STOP: if (clk_cnt != '0) clk_cnt <= clk_cnt - 1'b1;
        else begin
          state <= IDLE;
          if (line) begin
            rx_data  <= shreg;
            rx_valid <= 1'b1;
          end else begin
            rx_frame_err <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A frame ends either with data or with a framing error, never both.
  a_one_outcome: assert property (@(posedge clk) disable iff (!rst_n) !(rx_valid && rx_frame_err))
    else $error("uart_rx: rx_valid and rx_frame_err together");

endmodule
