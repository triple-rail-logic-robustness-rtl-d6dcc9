// sttl_sequencer: clocked four-phase driver for the self-timed triple rail
// DES sub-module.
//
// The sub-module has no clock: it computes when its input rails go valid and
// it is cleared when they return to zero. This block is the synchronous side
// of that handshake. On start_i it encodes the single rail plaintext and
// subkey as valid triple rail bits and drives them, all rails from one clock
// edge (the evaluation phase). It then waits until the sub-module signals
// completion: all four output validity rails high and one data rail high per
// output bit. It captures the ciphertext, drives the all-low spacer (the
// return-to-zero phase) and waits until every output rail is low before it
// accepts the next vector. The two completion conditions are asynchronous to
// the clock and pass through two-flop synchronizers; the ciphertext rails
// are stable while they are sampled because the sub-module holds its
// outputs until the spacer arrives.
//
// The published design says only that the host feeds the sub-module through the
// on-chip serial link; this handshake is the design's own. eval_cycles_o
// counts clock cycles from the launch edge to the cycle the synchronized
// completion is seen, which shows that the evaluation time is the same for
// every input.
//
// Interface: start_i is accepted when ready_o is high. ct_valid_o is high for
// one cycle with ct_o and eval_cycles_o. proto_err_o pulses if the outputs
// report completion with a bit carrying no or both data rails.
module sttl_sequencer
  import sttl_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          start_i,
  input  logic [5:0]    pt_i,
  input  logic [5:0]    key_i,
  output logic          ready_o,
  output tr_bit_t [5:0] pt_tr_o,
  output tr_bit_t [5:0] key_tr_o,
  input  tr_bit_t [3:0] ct_tr_i,
  output logic [3:0]    ct_o,
  output logic          ct_valid_o,
  output logic [7:0]    eval_cycles_o,
  output logic          proto_err_o
);

  typedef enum logic [1:0] {SQ_IDLE, SQ_EVAL, SQ_RTZ} sq_state_e;

  sq_state_e  state_q;
  logic [7:0] cnt_q;
  logic       done_raw, zero_raw, err_raw;
  logic [1:0] done_sync_q, zero_sync_q;

  // Completion detection on the asynchronous outputs.
  always_comb begin
    done_raw = 1'b1;
    zero_raw = 1'b1;
    err_raw  = 1'b0;
    for (int i = 0; i < 4; i++) begin
      done_raw &= ct_tr_i[i].rv & (ct_tr_i[i].r0 ^ ct_tr_i[i].r1);
      zero_raw &= ~(ct_tr_i[i].r0 | ct_tr_i[i].r1 | ct_tr_i[i].rv);
      err_raw  |= ct_tr_i[i].rv & ~(ct_tr_i[i].r0 ^ ct_tr_i[i].r1);
    end
  end

  assign ready_o = (state_q == SQ_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q       <= SQ_IDLE;
      cnt_q         <= '0;
      done_sync_q   <= '0;
      zero_sync_q   <= '0;
      pt_tr_o       <= {6{TR_SPACER}};
      key_tr_o      <= {6{TR_SPACER}};
      ct_o          <= '0;
      ct_valid_o    <= 1'b0;
      eval_cycles_o <= '0;
      proto_err_o   <= 1'b0;
    end else begin
      done_sync_q <= {done_sync_q[0], done_raw};
      zero_sync_q <= {zero_sync_q[0], zero_raw};
      ct_valid_o  <= 1'b0;
      proto_err_o <= 1'b0;
      case (state_q)
        SQ_IDLE: begin
          if (start_i) begin
            for (int i = 0; i < 6; i++) begin
              pt_tr_o[i]  <= tr_encode(pt_i[i]);
              key_tr_o[i] <= tr_encode(key_i[i]);
            end
            cnt_q   <= '0;
            state_q <= SQ_EVAL;
          end
        end
        SQ_EVAL: begin
          if (cnt_q != 8'hFF) cnt_q <= cnt_q + 1'b1;
          if (done_sync_q[1]) begin
            for (int i = 0; i < 4; i++) ct_o[i] <= ct_tr_i[i].r1;
            ct_valid_o    <= 1'b1;
            eval_cycles_o <= cnt_q + 1'b1;
            pt_tr_o       <= {6{TR_SPACER}};
            key_tr_o      <= {6{TR_SPACER}};
            state_q       <= SQ_RTZ;
          end else if (err_raw) begin
            proto_err_o <= 1'b1;
          end
        end
        SQ_RTZ: begin
          if (zero_sync_q[1]) state_q <= SQ_IDLE;
        end
        default: state_q <= SQ_IDLE;
      endcase
    end
  end

  // A triple rail output bit never carries both data rails.
  for (genvar i = 0; i < 4; i++) begin : g_chk
    a_one_hot: assert property (@(posedge clk_i) disable iff (!rst_ni)
      !(ct_tr_i[i].r0 && ct_tr_i[i].r1));
  end

endmodule
