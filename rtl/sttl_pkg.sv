// sttl_pkg: types and constants shared by the Secure Triple Track Logic (STTL)
// blocks.
//
// A triple rail bit carries one logic value on three wires: a false rail r0,
// a true rail r1 and a validity rail rv. Between two computations every rail
// is low (the spacer, or "return to zero" state). A valid 0 raises r0, a valid
// 1 raises r1, and rv rises once the data rails have settled. Exactly one data
// rail switches per bit and per computation, whatever the value, so the
// switching activity does not depend on the data. Inverting a triple rail bit
// costs no gate: the two data rails are swapped and rv is left as it is.
//
// The DES S-box 1 table is held here as a function. It is the standard table
// of the Data Encryption Standard (FIPS 46-3), indexed the DES way: the outer
// bits b[5] and b[0] select the row, the middle bits b[4:1] the column.
package sttl_pkg;

  typedef struct packed {
    logic r0;  // false rail
    logic r1;  // true rail
    logic rv;  // validity rail
  } tr_bit_t;

  // Gate mapping, after the two triple rail And2 versions that were built:
  // STTL_BASIC uses plain C-elements only (11 LUTs, five validity buffers),
  // STTL_COMPACT uses a generalized C-element (6 LUTs, three buffers).
  typedef enum logic {
    STTL_BASIC   = 1'b0,
    STTL_COMPACT = 1'b1
  } sttl_style_e;

  localparam tr_bit_t TR_SPACER = '{r0: 1'b0, r1: 1'b0, rv: 1'b0};

  // Number of buffers on the validity path of one And2 gate for each style.
  function automatic int unsigned validity_buffers(sttl_style_e style);
    return (style == STTL_COMPACT) ? 3 : 5;
  endfunction

  // Triple rail inversion: swap the data rails, keep the validity rail.
  function automatic tr_bit_t tr_not(tr_bit_t a);
    return '{r0: a.r1, r1: a.r0, rv: a.rv};
  endfunction

  // Encode a single rail value as a valid triple rail bit.
  function automatic tr_bit_t tr_encode(logic v);
    return '{r0: ~v, r1: v, rv: 1'b1};
  endfunction

  // DES S-box 1.
  function automatic logic [3:0] des_sbox1(logic [5:0] b);
    logic [1:0] row;
    logic [3:0] col;
    row = {b[5], b[0]};
    col = b[4:1];
    case (row)
      2'd0: case (col)
        4'd0: return 4'd14; 4'd1: return 4'd4;  4'd2: return 4'd13; 4'd3: return 4'd1;
        4'd4: return 4'd2;  4'd5: return 4'd15; 4'd6: return 4'd11; 4'd7: return 4'd8;
        4'd8: return 4'd3;  4'd9: return 4'd10; 4'd10: return 4'd6; 4'd11: return 4'd12;
        4'd12: return 4'd5; 4'd13: return 4'd9; 4'd14: return 4'd0; default: return 4'd7;
      endcase
      2'd1: case (col)
        4'd0: return 4'd0;  4'd1: return 4'd15; 4'd2: return 4'd7;  4'd3: return 4'd4;
        4'd4: return 4'd14; 4'd5: return 4'd2;  4'd6: return 4'd13; 4'd7: return 4'd1;
        4'd8: return 4'd10; 4'd9: return 4'd6;  4'd10: return 4'd12; 4'd11: return 4'd11;
        4'd12: return 4'd9; 4'd13: return 4'd5; 4'd14: return 4'd3; default: return 4'd8;
      endcase
      2'd2: case (col)
        4'd0: return 4'd4;  4'd1: return 4'd1;  4'd2: return 4'd14; 4'd3: return 4'd8;
        4'd4: return 4'd13; 4'd5: return 4'd6;  4'd6: return 4'd2;  4'd7: return 4'd11;
        4'd8: return 4'd15; 4'd9: return 4'd12; 4'd10: return 4'd9; 4'd11: return 4'd7;
        4'd12: return 4'd3; 4'd13: return 4'd10; 4'd14: return 4'd5; default: return 4'd0;
      endcase
      default: case (col)
        4'd0: return 4'd15; 4'd1: return 4'd12; 4'd2: return 4'd8;  4'd3: return 4'd2;
        4'd4: return 4'd4;  4'd5: return 4'd9;  4'd6: return 4'd1;  4'd7: return 4'd7;
        4'd8: return 4'd5;  4'd9: return 4'd11; 4'd10: return 4'd3; 4'd11: return 4'd14;
        4'd12: return 4'd10; 4'd13: return 4'd0; 4'd14: return 4'd6; default: return 4'd13;
      endcase
    endcase
  endfunction

endpackage
