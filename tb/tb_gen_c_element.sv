// tb_gen_c_element: self-checking test of the asymmetric C-element
// Z = (a+b).c + Z.(a+b+c). Every input sequence step is compared with the
// formula evaluated on the previous output, computed here independently.
module tb_gen_c_element;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic a, b, c, z, zref;
  int   sets = 0, clears = 0, holds = 0;

  gen_c_element dut (.a_i(a), .b_i(b), .c_i(c), .z_o(z));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0; c = 0; zref = 0;
    @(posedge clk);
    checks++; if (z !== 1'b0) failures++;
    for (int k = 0; k < 3000; k++) begin
      {a, b, c} = 3'($urandom);
      zref = ((a | b) & c) | (zref & (a | b | c));
      if ((a | b) & c) sets++;
      else if (!(a | b | c)) clears++;
      else holds++;
      @(posedge clk);
      checks++;
      if (z !== zref) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b z=%b expected %b", a, b, c, z, zref);
      end
    end
    if (sets == 0 || clears == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
