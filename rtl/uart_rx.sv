// uart_rx: RS232 receiver, 8 data bits, no parity, one stop bit (8N1).
//
// The host sends the input vectors of the cipher sub-module over a serial
// line; this block turns the line back into bytes. The line is brought into
// the clock domain by a two-flop synchronizer. A falling edge starts a frame;
// the start bit is checked again half a bit later, then each data bit (LSB
// first) and the stop bit are sampled in the middle of their bit period,
// CLKS_PER_BIT clock cycles apart. A byte whose stop bit is low is dropped
// and flagged; after it the receiver waits for the line to return high
// before it looks for the next start bit. Frame format, bit rate and clock are choices of this design:
// the default of 434 cycles per bit is 115200 bit/s from a 50 MHz clock.
//
// Interface: clk_i, rst_ni (asynchronous, active low), rx_i (idle high);
// data_o with valid_o high for one cycle per received byte, about 9.5 bit
// periods after the start edge; frame_err_o high for one cycle on a bad stop
// bit.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       rx_i,
  output logic [7:0] data_o,
  output logic       valid_o,
  output logic       frame_err_o
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [1:0]    sync_q;
  logic          rx_s;
  rx_state_e     state_q;
  logic [CW-1:0] cnt_q;
  logic [2:0]    bit_q;
  logic [7:0]    shift_q;
  logic          armed_q;  // line seen high since the last frame

  assign rx_s = sync_q[1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      sync_q      <= 2'b11;
      state_q     <= RX_IDLE;
      cnt_q       <= '0;
      bit_q       <= '0;
      shift_q     <= '0;
      armed_q     <= 1'b0;
      data_o      <= '0;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      sync_q      <= {sync_q[0], rx_i};
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      case (state_q)
        RX_IDLE: begin
          cnt_q <= '0;
          if (rx_s) armed_q <= 1'b1;
          else if (armed_q) state_q <= RX_START;
        end
        RX_START: begin
          if (cnt_q == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q   <= '0;
            bit_q   <= '0;
            state_q <= rx_s ? RX_IDLE : RX_DATA;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            shift_q <= {rx_s, shift_q[7:1]};
            bit_q   <= bit_q + 1'b1;
            if (bit_q == 3'd7) state_q <= RX_STOP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            state_q <= RX_IDLE;
            armed_q <= rx_s;
            if (rx_s) begin
              data_o  <= shift_q;
              valid_o <= 1'b1;
            end else begin
              frame_err_o <= 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= RX_IDLE;
      endcase
    end
  end

endmodule
