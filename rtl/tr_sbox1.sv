// tr_sbox1: DES S-box 1 (6 bits in, 4 bits out) in secure triple rail logic.
//
// The S-box is built only from triple rail And2/Or2 gates, as a balanced
// decoder followed by balanced OR trees, so that every input-to-output path
// crosses the same number of gates (3 + 5 = 8) and the output validity rails
// fire after a constant number of gate delays whatever the input value:
//   level 1   the six inputs are cut into three pairs {x5,x4} {x3,x2} {x1,x0};
//             each pair is decoded into its four products (12 And2);
//   level 2   the products of the first two pairs are combined into the 16
//             products of x5..x2 (16 And2);
//   level 3   these are combined with the third pair into the 64 minterms
//             m[i] = (x == i) (64 And2);
//   level 4-8 output bit j is the OR of the 32 minterms whose S-box value has
//             bit j set (each DES S-box output bit is 1 for exactly 32 of the
//             64 inputs), a five-level binary tree of 31 Or2 per bit.
// The S-box values come from sttl_pkg::des_sbox1 at elaboration. The
// decoder/OR-tree structure is a choice of this design; the published design gives
// the S-box function but not its gate-level mapping.
//
// Interface: x_i[5:0] (x_i[5] is the first, most significant, DES bit),
// y_o[3:0] (y_o[3] first output bit). Protocol: four-phase return to zero;
// latency eight gate levels.
// Lint sees the C-element feedback of the 216 gates as latches or
// combinational loops; that is the intended state of the self-timed logic.
module tr_sbox1
  import sttl_pkg::*;
#(
  parameter sttl_style_e STYLE = STTL_COMPACT
) (
  input  tr_bit_t [5:0] x_i,
  output tr_bit_t [3:0] y_o
);

  // Index of the k-th input value (counting from 0) whose S-box output has
  // bit j set.
  function automatic int unsigned nth_one(logic [1:0] j, int unsigned k);
    int unsigned cnt;
    logic [3:0] s;
    cnt = 0;
    for (int unsigned i = 0; i < 64; i++) begin
      s = des_sbox1(6'(i));
      if (s[j]) begin
        if (cnt == k) return i;
        cnt++;
      end
    end
    return 0;
  endfunction

  // Level 1: pair decoders. d1[g][k] = (pair g == k); pair g holds bits
  // x[5-2g] (high) and x[4-2g] (low).
  tr_bit_t d1 [3][4];
  for (genvar g = 0; g < 3; g++) begin : g_pair
    for (genvar k = 0; k < 4; k++) begin : g_prod
      localparam bit HI = k[1];
      localparam bit LO = k[0];
      tr_and2 #(.STYLE(STYLE)) u_and (
        .a_i(HI ? x_i[5-2*g] : tr_not(x_i[5-2*g])),
        .b_i(LO ? x_i[4-2*g] : tr_not(x_i[4-2*g])),
        .z_o(d1[g][k])
      );
    end
  end

  // Level 2: 16 products of x[5:2].
  tr_bit_t d2 [16];
  for (genvar n = 0; n < 16; n++) begin : g_d2
    tr_and2 #(.STYLE(STYLE)) u_and (.a_i(d1[0][n/4]), .b_i(d1[1][n%4]), .z_o(d2[n]));
  end

  // Level 3: 64 minterms.
  tr_bit_t m [64];
  for (genvar i = 0; i < 64; i++) begin : g_min
    tr_and2 #(.STYLE(STYLE)) u_and (.a_i(d2[i/4]), .b_i(d1[2][i%4]), .z_o(m[i]));
  end

  // Levels 4-8: one OR tree per output bit, heap-ordered: node n has the
  // children 2n+1 and 2n+2; the 32 leaves are nodes 31..62.
  for (genvar j = 0; j < 4; j++) begin : g_out
    tr_bit_t t [63];
    for (genvar l = 0; l < 32; l++) begin : g_leaf
      assign t[31+l] = m[nth_one(2'(j), l)];
    end
    for (genvar n = 0; n < 31; n++) begin : g_node
      tr_or2 #(.STYLE(STYLE)) u_or (.a_i(t[2*n+1]), .b_i(t[2*n+2]), .z_o(t[n]));
    end
    assign y_o[j] = t[0];
  end

endmodule
