// tb_tr_and2: self-checking test of the triple rail And2 gate in both
// mappings (compact and basic). For each operand pair the full four-phase
// cycle is stepped through, and after every step the outputs are compared
// with what the triple rail protocol demands:
//   - data rails valid but validity rails low: the gate must not fire;
//   - both validity rails high: exactly the right data rail and ZV high;
//   - data rails back to zero while validity is still high: outputs hold;
//   - all inputs back to zero: every output rail low (return to zero).
module tb_tr_and2;
  import sttl_pkg::*;
  logic    clk = 1'b0;
  int      checks = 0, failures = 0;
  int      n_blocked = 0, n_fired = 0, n_held = 0, n_rtz = 0;
  tr_bit_t a, b, zc, zb;

  tr_and2 #(.STYLE(STTL_COMPACT)) dut_c (.a_i(a), .b_i(b), .z_o(zc));
  tr_and2 #(.STYLE(STTL_BASIC))   dut_b (.a_i(a), .b_i(b), .z_o(zb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_both(tr_bit_t exp, string what);
    checks += 2;
    if (zc !== exp) begin failures++; $display("FAIL compact %s: got %b exp %b", what, zc, exp); end
    if (zb !== exp) begin failures++; $display("FAIL basic %s: got %b exp %b", what, zb, exp); end
  endtask

  task automatic step;
    @(posedge clk);
  endtask

  initial begin
    tr_bit_t res;
    a = TR_SPACER; b = TR_SPACER;
    step();
    expect_both(TR_SPACER, "initial spacer");
    for (int k = 0; k < 400; k++) begin
      logic va, vb;
      va = k[0]; vb = k[1];
      if (k >= 4) {va, vb} = 2'($urandom);
      res = '{r0: ~(va & vb), r1: va & vb, rv: 1'b1};
      // data rails first
      a.r0 = ~va; a.r1 = va; b.r0 = ~vb; b.r1 = vb;
      step(); expect_both(TR_SPACER, "data without validity"); n_blocked++;
      if (k[2]) a.rv = 1'b1; else b.rv = 1'b1;
      step(); expect_both(TR_SPACER, "one validity rail"); n_blocked++;
      a.rv = 1'b1; b.rv = 1'b1;
      step(); expect_both(res, "evaluate"); n_fired++;
      // return to zero: data rails first, then validity one by one
      a.r0 = 0; a.r1 = 0; b.r0 = 0; b.r1 = 0;
      step(); expect_both(res, "data rails withdrawn"); n_held++;
      if (k[3]) a.rv = 1'b0; else b.rv = 1'b0;
      step(); expect_both(res, "one validity rail withdrawn"); n_held++;
      a.rv = 1'b0; b.rv = 1'b0;
      step(); expect_both(TR_SPACER, "return to zero"); n_rtz++;
    end
    $display("blocked=%0d fired=%0d held=%0d rtz=%0d", n_blocked, n_fired, n_held, n_rtz);
    if (n_blocked == 0 || n_fired == 0 || n_held == 0 || n_rtz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
