// tb_tr_sbox1: self-checking test of the triple rail DES S-box 1 in both
// mappings. All 64 inputs are applied in four-phase cycles and the outputs
// are compared with the S-box table written out below (DES S1, rows of 16,
// row selected by the outer input bits). The test also checks that nothing
// fires before the validity rails and that every rail returns to zero.
module tb_tr_sbox1;
  import sttl_pkg::*;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;
  tr_bit_t [5:0] x;
  tr_bit_t [3:0] yc, yb;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  tr_sbox1 #(.STYLE(STTL_COMPACT)) dut_c (.x_i(x), .y_o(yc));
  tr_sbox1 #(.STYLE(STTL_BASIC))   dut_b (.x_i(x), .y_o(yb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tr_bit_t [3:0] expected(logic [5:0] v);
    logic [3:0] s;
    tr_bit_t [3:0] e;
    s = 4'(S1[{v[5], v[0]}][v[4:1]]);
    for (int i = 0; i < 4; i++) e[i] = '{r0: ~s[i], r1: s[i], rv: 1'b1};
    return e;
  endfunction

  task automatic expect_both(tr_bit_t [3:0] exp, string what, int v);
    checks += 2;
    if (yc !== exp) begin failures++; $display("FAIL compact %s x=%0d: got %b exp %b", what, v, yc, exp); end
    if (yb !== exp) begin failures++; $display("FAIL basic %s x=%0d: got %b exp %b", what, v, yb, exp); end
  endtask

  initial begin
    x = '0;
    @(posedge clk);
    expect_both('0, "initial spacer", 0);
    for (int k = 0; k < 192; k++) begin
      logic [5:0] v;
      v = 6'(k);
      if (k >= 64) v = 6'($urandom);
      for (int i = 0; i < 6; i++) begin x[i] = tr_encode(v[i]); x[i].rv = 1'b0; end
      @(posedge clk); expect_both('0, "data without validity", int'(v));
      for (int i = 0; i < 6; i++) x[i].rv = 1'b1;
      @(posedge clk); expect_both(expected(v), "evaluate", int'(v));
      x = '0;
      @(posedge clk); expect_both('0, "return to zero", int'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
