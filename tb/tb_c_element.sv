// tb_c_element: self-checking test of the Muller C-element, for 2 and 3
// inputs. Random input vectors are applied one at a time; after each the
// outputs are compared with a reference that sets on all-ones, clears on
// all-zeros and otherwise keeps the previous value.
module tb_c_element;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;
  logic [1:0] in2;
  logic [2:0] in3;
  logic       z2, z3, ref2, ref3;
  int         sets = 0, holds = 0;

  c_element #(.N(2)) dut2 (.in_i(in2), .z_o(z2));
  c_element #(.N(3)) dut3 (.in_i(in3), .z_o(z3));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (in2=%b in3=%b)", what, got, exp, in2, in3);
    end
  endtask

  initial begin
    in2 = '0; in3 = '0; ref2 = 1'b0; ref3 = 1'b0;
    @(posedge clk);
    check(z2, 1'b0, "N=2 init"); check(z3, 1'b0, "N=3 init");
    for (int k = 0; k < 2000; k++) begin
      in2 = 2'($urandom);
      in3 = 3'($urandom);
      if (k % 7 == 0) in3 = 3'b111;
      if (k % 11 == 0) in3 = 3'b000;
      if (&in2) ref2 = 1'b1; else if (~|in2) ref2 = 1'b0;
      if (&in3) ref3 = 1'b1; else if (~|in3) ref3 = 1'b0;
      if (!(&in3) && (|in3)) holds++;
      if (&in3) sets++;
      @(posedge clk);
      check(z2, ref2, "N=2");
      check(z3, ref3, "N=3");
    end
    if (sets == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
