// tb_tr_xor2: self-checking test of the triple rail XOR in both mappings.
// Each operand pair goes through a four-phase cycle: data rails first (no
// output may fire), then validity (the output must be a ^ b, one data rail
// and validity high), then the spacer (every output rail low).
module tb_tr_xor2;
  import sttl_pkg::*;
  logic    clk = 1'b0;
  int      checks = 0, failures = 0;
  tr_bit_t a, b, zc, zb;

  tr_xor2 #(.STYLE(STTL_COMPACT)) dut_c (.a_i(a), .b_i(b), .z_o(zc));
  tr_xor2 #(.STYLE(STTL_BASIC))   dut_b (.a_i(a), .b_i(b), .z_o(zb));

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

  initial begin
    a = TR_SPACER; b = TR_SPACER;
    @(posedge clk);
    expect_both(TR_SPACER, "initial spacer");
    for (int k = 0; k < 200; k++) begin
      logic va, vb;
      va = k[0]; vb = k[1];
      if (k >= 4) {va, vb} = 2'($urandom);
      a = tr_encode(va); b = tr_encode(vb); a.rv = 0; b.rv = 0;
      @(posedge clk); expect_both(TR_SPACER, "data without validity");
      a.rv = 1; b.rv = 1;
      @(posedge clk); expect_both('{r0: ~(va ^ vb), r1: va ^ vb, rv: 1'b1}, "evaluate");
      a = TR_SPACER; b = TR_SPACER;
      @(posedge clk); expect_both(TR_SPACER, "return to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
