// tb_sttl_des_top: end-to-end test of the triple rail DES prototype at its
// default parameters (115200 bit/s at 50 MHz, compact gate mapping).
//
// The testbench plays the host: over the serial line it loads a subkey, then
// sends every 6-bit plaintext, for NKEYS subkeys (4 here: the self-timed
// gate network is slow to simulate, about 14k clock cycles per second, and
// one subkey takes 65 serial frames; tb_tr_des_submodule covers all 64 x 64
// plaintext/subkey pairs directly at the sub-module).
// Each result is compared with S1(pt ^ key) from the DES table written out
// below. It also checks that the evaluation time, in clock cycles, is the
// same for every vector and key, that the sub-module's outputs return to
// zero after each result, that the stored key follows the key commands, and
// that a frame with a bad stop bit is flagged and ignored. Each mechanism is
// counted and must have happened at least once.
module tb_sttl_des_top;
  import sttl_pkg::*;
  localparam int unsigned CPB   = 434;  // must match the top's default
  localparam int          NKEYS = 4;

  logic       clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic [3:0] ct;
  logic       ct_valid, dropped, ferr, perr;
  logic [7:0] ecyc;
  logic [5:0] key;
  int         checks = 0, failures = 0;
  int         n_eval = 0, n_keyload = 0, n_rtz = 0, n_ferr = 0, n_const = 0;
  int         eval_ref = -1;
  logic [3:0] exp_q [$];
  logic       was_valid = 1'b0;

  localparam int S1 [4][16] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7},
    '{0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8},
    '{4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0},
    '{15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13}
  };

  function automatic logic [3:0] sref(logic [5:0] v);
    return 4'(S1[{v[5], v[0]}][v[4:1]]);
  endfunction

  sttl_des_top dut (
    .clk_i(clk), .rst_ni(rst_n), .rs232_rx_i(rx),
    .ct_o(ct), .ct_valid_o(ct_valid), .eval_cycles_o(ecyc), .key_o(key),
    .dropped_o(dropped), .frame_err_o(ferr), .proto_err_o(perr)
  );

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    repeat ((NKEYS * 66 + 8) * 11 * CPB + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    logic all_valid, all_zero;
    if (ct_valid) begin
      n_eval++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        logic [3:0] e;
        e = exp_q.pop_front();
        if (ct !== e) begin failures++; $display("FAIL ct %h exp %h (key %0d)", ct, e, key); end
      end
      checks++;
      if (eval_ref < 0) eval_ref = int'(ecyc);
      if (int'(ecyc) != eval_ref) begin
        failures++; $display("FAIL evaluation took %0d cycles, first took %0d", ecyc, eval_ref);
      end else n_const++;
    end
    if (dropped) begin failures++; $display("FAIL plaintext dropped"); end
    if (perr) begin failures++; $display("FAIL malformed triple rail output"); end
    if (ferr) n_ferr++;
    // return to zero of the sub-module outputs
    all_valid = 1'b1; all_zero = 1'b1;
    for (int i = 0; i < 4; i++) begin
      all_valid &= dut.ct_tr[i].rv;
      all_zero &= (dut.ct_tr[i] == TR_SPACER);
    end
    if (all_valid) was_valid <= 1'b1;
    if (all_zero && was_valid) begin n_rtz++; was_valid <= 1'b0; end
  end

  task automatic send(logic [7:0] b, logic stop);
    rx = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = stop; repeat (CPB) @(negedge clk);
    rx = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    checks++;
    if (key !== 6'd0) begin failures++; $display("FAIL key after reset %0d", key); end
    for (int kk = 0; kk < NKEYS; kk++) begin
      logic [5:0] k;
      k = 6'((kk * 37 + 10) % 64);  // visits every key, starting with 10
      send({2'b10, k}, 1'b1);
      repeat (4) @(negedge clk);
      checks++;
      if (key !== k) begin failures++; $display("FAIL key %0d exp %0d", key, k); end
      else n_keyload++;
      for (int p = 0; p < 64; p++) begin
        exp_q.push_back(sref(6'(p) ^ k));
        send({2'b00, 6'(p)}, 1'b1);
      end
    end
    // a frame with a low stop bit must be ignored
    send(8'h05, 1'b0);
    repeat (4 * CPB) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("evaluations=%0d key_loads=%0d returns_to_zero=%0d constant_time=%0d (%0d cycles) frame_errors=%0d",
             n_eval, n_keyload, n_rtz, n_const, eval_ref, n_ferr);
    checks += 5;
    if (n_eval != NKEYS * 64) failures++;
    if (n_keyload != NKEYS) failures++;
    if (n_rtz == 0 || n_rtz != n_eval) failures++;
    if (n_const == 0) failures++;
    if (n_ferr != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
