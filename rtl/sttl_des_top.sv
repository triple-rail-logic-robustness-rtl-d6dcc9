// sttl_des_top: FPGA prototype of the DES sub-module in secure triple rail
// logic, as used for power analysis.
//
// A host computer sends input vectors over an RS232 line. uart_rx recovers
// the bytes; a byte with bit 7 set loads bits 5:0 as the secret 6-bit subkey,
// a byte with bit 7 clear is a 6-bit plaintext block and launches one
// computation. sttl_sequencer then drives plaintext and subkey into the
// self-timed triple rail sub-module (key addition and DES S-box 1), waits
// for its completion, captures the 4-bit output and returns every rail to
// zero. The sub-module, the part under attack, is the only logic that
// switches with the secret; the clocked logic around it only sees the
// plaintext, the stored key register and the completion signals.
//
// The serial framing, the command byte format and the reset value of the
// subkey are choices of this design. STYLE picks the triple rail And2
// mapping for every gate of the sub-module (compact mapping by default).
//
// Interface: clk_i, rst_ni (asynchronous, active low), rs232_rx_i; ct_o and
// eval_cycles_o are valid when ct_valid_o pulses; key_o shows the stored
// subkey; dropped_o pulses when a plaintext arrives while a computation is
// still running; frame_err_o and proto_err_o report a bad serial frame and a
// malformed triple rail output.
module sttl_des_top
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE        = STTL_COMPACT,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter logic [5:0]  KEY_RESET    = 6'd0
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       rs232_rx_i,
  output logic [3:0] ct_o,
  output logic       ct_valid_o,
  output logic [7:0] eval_cycles_o,
  output logic [5:0] key_o,
  output logic       dropped_o,
  output logic       frame_err_o,
  output logic       proto_err_o
);

  logic [7:0]    rx_data;
  logic          rx_valid;
  logic [5:0]    key_q, pt_q;
  logic          start_q, ready;
  tr_bit_t [5:0] pt_tr, key_tr;
  tr_bit_t [3:0] ct_tr;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk_i, .rst_ni, .rx_i(rs232_rx_i),
    .data_o(rx_data), .valid_o(rx_valid), .frame_err_o
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      key_q     <= KEY_RESET;
      pt_q      <= '0;
      start_q   <= 1'b0;
      dropped_o <= 1'b0;
    end else begin
      start_q   <= 1'b0;
      dropped_o <= 1'b0;
      if (rx_valid) begin
        if (rx_data[7]) begin
          key_q <= rx_data[5:0];
        end else if (ready && !start_q) begin
          pt_q    <= rx_data[5:0];
          start_q <= 1'b1;
        end else begin
          dropped_o <= 1'b1;
        end
      end
    end
  end

  assign key_o = key_q;

  sttl_sequencer u_seq (
    .clk_i, .rst_ni,
    .start_i(start_q), .pt_i(pt_q), .key_i(key_q), .ready_o(ready),
    .pt_tr_o(pt_tr), .key_tr_o(key_tr), .ct_tr_i(ct_tr),
    .ct_o, .ct_valid_o, .eval_cycles_o, .proto_err_o
  );

  tr_des_submodule #(.STYLE(STYLE)) u_des (
    .pt_i(pt_tr), .key_i(key_tr), .ct_o(ct_tr)
  );

endmodule
