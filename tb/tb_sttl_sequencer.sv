// tb_sttl_sequencer: self-checking test of the four-phase sequencer. The
// self-timed sub-module is replaced by a responder in this testbench that,
// DELAY clock cycles after all input validity rails are high, raises the
// output rails of S1(pt ^ key), and DELAY cycles after all input rails are
// low, clears them. Checks: the inputs are driven as valid triple rail codes
// of pt and key; the captured ciphertext is right; the spacer is applied
// after capture; the next vector waits for the outputs to return to zero;
// eval_cycles_o is the same for every vector at one DELAY and grows by
// exactly the added delay.
module tb_sttl_sequencer;
  import sttl_pkg::*;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start, ready, ct_valid, perr;
  logic [5:0]    pt, key;
  tr_bit_t [5:0] pt_tr, key_tr;
  tr_bit_t [3:0] ct_tr;
  logic [3:0]    ct;
  logic [7:0]    ecyc;
  int            checks = 0, failures = 0;
  int            delay = 1;
  int            cnt_on = 0, cnt_off = 0;
  int            n_rtz = 0;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  function automatic logic [3:0] sref(logic [5:0] v);
    return 4'(S1[{v[5], v[0]}][v[4:1]]);
  endfunction

  sttl_sequencer dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .pt_i(pt), .key_i(key), .ready_o(ready),
    .pt_tr_o(pt_tr), .key_tr_o(key_tr), .ct_tr_i(ct_tr), .ct_o(ct), .ct_valid_o(ct_valid),
    .eval_cycles_o(ecyc), .proto_err_o(perr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Responder standing in for the self-timed sub-module.
  always @(posedge clk) begin
    logic all_valid, all_zero;
    logic [5:0] p, k;
    all_valid = 1'b1; all_zero = 1'b1;
    for (int i = 0; i < 6; i++) begin
      all_valid &= pt_tr[i].rv & key_tr[i].rv;
      all_zero &= ~(|pt_tr[i]) & ~(|key_tr[i]);
      p[i] = pt_tr[i].r1; k[i] = key_tr[i].r1;
    end
    cnt_on  <= all_valid ? cnt_on + 1 : 0;
    cnt_off <= all_zero ? cnt_off + 1 : 0;
    if (all_valid && cnt_on + 1 == delay) begin
      logic [3:0] s;
      s = sref(p ^ k);
      for (int i = 0; i < 4; i++) ct_tr[i] <= '{r0: ~s[i], r1: s[i], rv: 1'b1};
    end
    if (all_zero && cnt_off + 1 == delay) begin
      if (ct_tr != '0) n_rtz++;
      ct_tr <= '0;
    end
  end

  task automatic run_vector(logic [5:0] p, logic [5:0] k, output int cycles);
    while (!ready) @(posedge clk);
    @(negedge clk); pt = p; key = k; start = 1'b1;
    @(negedge clk); start = 1'b0;
    // the encoded rails are now driven
    checks++;
    for (int i = 0; i < 6; i++)
      if (pt_tr[i] !== tr_encode(p[i]) || key_tr[i] !== tr_encode(k[i])) begin
        failures++; $display("FAIL encoding bit %0d", i); break;
      end
    while (!ct_valid) @(posedge clk);
    #1;
    checks++;
    if (ct !== sref(p ^ k)) begin failures++; $display("FAIL ct %h exp %h", ct, sref(p ^ k)); end
    checks++;
    if (pt_tr !== '0 || key_tr !== '0) begin failures++; $display("FAIL spacer not applied"); end
    checks++;
    if (ready) begin failures++; $display("FAIL ready before return to zero"); end
    cycles = int'(ecyc);
  endtask

  initial begin
    int c0, c, base;
    ct_tr = '0; start = 1'b0; pt = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    base = 0;
    for (int d = 1; d <= 9; d += 4) begin
      delay = d;
      run_vector(6'd0, 6'd0, c0);
      if (d == 1) base = c0;
      checks++;
      if (c0 != base + (d - 1)) begin failures++; $display("FAIL delay %0d eval %0d base %0d", d, c0, base); end
      for (int n = 0; n < 100; n++) begin
        run_vector(6'($urandom), 6'($urandom), c);
        checks++;
        if (c != c0) begin failures++; $display("FAIL eval cycles %0d vs %0d", c, c0); end
      end
    end
    checks++;
    if (n_rtz < 300) begin failures++; $display("FAIL only %0d returns to zero", n_rtz); end
    checks++;
    if (perr) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
