// tb_tr_des_submodule: self-checking test of the triple rail DES sub-module
// (key addition and S-box 1). The compact mapping is run for all 64 x 64
// plaintext/subkey pairs, the basic mapping for 512 random pairs. Each pair
// goes through a four-phase cycle; the output is compared with S1(pt ^ key)
// from the table below, and the spacer must clear every output rail.
module tb_tr_des_submodule;
  import sttl_pkg::*;
  logic          clk = 1'b0;
  int            checks = 0, failures = 0;
  tr_bit_t [5:0] pt, key;
  tr_bit_t [3:0] ctc, ctb;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  tr_des_submodule #(.STYLE(STTL_COMPACT)) dut_c (.pt_i(pt), .key_i(key), .ct_o(ctc));
  tr_des_submodule #(.STYLE(STTL_BASIC))   dut_b (.pt_i(pt), .key_i(key), .ct_o(ctb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tr_bit_t [3:0] expected(logic [5:0] p, logic [5:0] k);
    logic [5:0] v;
    logic [3:0] s;
    tr_bit_t [3:0] e;
    v = p ^ k;
    s = 4'(S1[{v[5], v[0]}][v[4:1]]);
    for (int i = 0; i < 4; i++) e[i] = '{r0: ~s[i], r1: s[i], rv: 1'b1};
    return e;
  endfunction

  initial begin
    pt = '0; key = '0;
    @(posedge clk);
    checks++; if (ctc !== '0 || ctb !== '0) failures++;
    for (int n = 0; n < 4096 + 512; n++) begin
      logic [5:0] p, k;
      {k, p} = 12'(n);
      if (n >= 4096) {k, p} = 12'($urandom);
      for (int i = 0; i < 6; i++) begin pt[i] = tr_encode(p[i]); key[i] = tr_encode(k[i]); end
      @(posedge clk);
      checks++;
      if (ctc !== expected(p, k)) begin
        failures++; $display("FAIL compact pt=%0d key=%0d got %b", p, k, ctc);
      end
      if (n >= 4096 || n % 8 == 0) begin
        checks++;
        if (ctb !== expected(p, k)) begin
          failures++; $display("FAIL basic pt=%0d key=%0d got %b", p, k, ctb);
        end
      end
      pt = '0; key = '0;
      @(posedge clk);
      checks++;
      if (ctc !== '0 || ctb !== '0) begin failures++; $display("FAIL return to zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
