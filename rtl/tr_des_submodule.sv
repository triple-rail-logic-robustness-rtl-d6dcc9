// tr_des_submodule: the attacked part of the DES cipher function, in secure
// triple rail logic.
//
// The first 6-bit block of the expansion output (the plaintext block) is
// added bit by bit modulo 2 to the first 6-bit block of the first round key
// (the subkey), and the 6-bit result goes through DES S-box 1, which gives
// the 4-bit output. This is the smallest piece of DES whose output depends
// on both data and key, which is what a differential power analysis needs.
// The key addition is six tr_xor2 gates; the S-box is tr_sbox1. All gates
// share one STYLE (basic or compact triple rail And2 mapping).
//
// Interface: pt_i[5:0], key_i[5:0], ct_o[3:0], all triple rail, bit 5 (3)
// first in DES order. Protocol: four-phase return to zero. The evaluation
// starts when the input validity rails rise and ends when all four output
// validity rails are high; every path crosses 2 + 8 = 10 gates, so the
// evaluation time does not depend on the data. The key may be held valid
// throughout, but since every gate waits for both validity inputs, the
// sequencer in this design applies and withdraws key and plaintext together.
module tr_des_submodule
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE = STTL_COMPACT
) (
  input  tr_bit_t [5:0] pt_i,
  input  tr_bit_t [5:0] key_i,
  output tr_bit_t [3:0] ct_o
);

  tr_bit_t [5:0] x;

  for (genvar i = 0; i < 6; i++) begin : g_keyadd
    tr_xor2 #(.STYLE(STYLE)) u_xor (.a_i(pt_i[i]), .b_i(key_i[i]), .z_o(x[i]));
  end

  tr_sbox1 #(.STYLE(STYLE)) u_sbox (.x_i(x), .y_o(ct_o));

endmodule
