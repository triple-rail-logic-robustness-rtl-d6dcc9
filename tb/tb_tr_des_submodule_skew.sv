// tb_tr_des_submodule_skew: shows, at the logic level, the property triple
// rail logic is built for: the time at which the sub-module fires is set by
// the validity rails, not by when the data rails settle.
//
// For each random plaintext/subkey pair (both gate mappings) every data rail
// is raised after its own random delay of 0..49 ns, as it would after uneven
// routing, and all validity rails are raised together at a fixed 60 ns. The
// test checks that no output rail moves before 60 ns and that the outputs
// hold the right value from 60 ns on. It then withdraws the data rails at
// random times while validity is still high (the outputs must not move) and
// drops the validity rails at a fixed time (the outputs must all clear at
// exactly that time). Output change times are recorded by a monitor.
module tb_tr_des_submodule_skew;
  import sttl_pkg::*;
  localparam time T_VALID = 60ns;
  localparam time T_CLEAR = 60ns;

  tr_bit_t [5:0] pt = '0, key = '0;
  tr_bit_t [3:0] ctc, ctb;
  int            checks = 0, failures = 0;
  time           t0, first_change, last_change;
  int            n_changes;
  int            n_skewed = 0;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  tr_des_submodule #(.STYLE(STTL_COMPACT)) dut_c (.pt_i(pt), .key_i(key), .ct_o(ctc));
  tr_des_submodule #(.STYLE(STTL_BASIC))   dut_b (.pt_i(pt), .key_i(key), .ct_o(ctb));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(ctc or ctb) begin
    if (n_changes == 0) first_change = $time - t0;
    last_change = $time - t0;
    n_changes++;
  end

  function automatic tr_bit_t [3:0] expected(logic [5:0] v);
    logic [3:0] s;
    tr_bit_t [3:0] e;
    s = 4'(S1[{v[5], v[0]}][v[4:1]]);
    for (int i = 0; i < 4; i++) e[i] = '{r0: ~s[i], r1: s[i], rv: 1'b1};
    return e;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5ns;
    for (int n = 0; n < 300; n++) begin
      logic [5:0] p, k;
      int unsigned dp [6], dk [6];
      {p, k} = 12'($urandom);
      for (int i = 0; i < 6; i++) begin
        dp[i] = $urandom_range(0, 49);
        dk[i] = $urandom_range(0, 49);
      end
      // evaluation phase: skewed data rails, then validity at T_VALID
      t0 = $time; n_changes = 0;
      for (int t = 0; t < 60; t++) begin
        for (int i = 0; i < 6; i++) begin
          if (dp[i] == t) begin pt[i].r0 = ~p[i]; pt[i].r1 = p[i]; end
          if (dk[i] == t) begin key[i].r0 = ~k[i]; key[i].r1 = k[i]; end
        end
        #1ns;
      end
      check(n_changes == 0, "output moved before the validity rails");
      for (int i = 0; i < 6; i++) begin pt[i].rv = 1'b1; key[i].rv = 1'b1; end
      #1ns;
      check(n_changes > 0 && first_change == T_VALID, "firing time differs from validity arrival");
      check(ctc == expected(p ^ k) && ctb == expected(p ^ k), "wrong result");
      n_skewed++;
      // return to zero: data rails withdrawn with skew, validity at T_CLEAR
      #9ns;
      t0 = $time; n_changes = 0;
      for (int t = 0; t < 60; t++) begin
        for (int i = 0; i < 6; i++) begin
          if (dp[i] == t) begin pt[i].r0 = 1'b0; pt[i].r1 = 1'b0; end
          if (dk[i] == t) begin key[i].r0 = 1'b0; key[i].r1 = 1'b0; end
        end
        #1ns;
      end
      check(n_changes == 0, "output moved while validity still high");
      for (int i = 0; i < 6; i++) begin pt[i].rv = 1'b0; key[i].rv = 1'b0; end
      #1ns;
      check(n_changes > 0 && first_change == T_CLEAR && last_change == T_CLEAR,
            "return to zero not at validity withdrawal");
      check(ctc == '0 && ctb == '0, "outputs not cleared");
      #9ns;
    end
    check(n_skewed == 300, "skewed evaluations run");
    $display("skewed evaluations=%0d", n_skewed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
