// tb_uart_rx: self-checking test of the 8N1 serial receiver at 16 clock
// cycles per bit. Random bytes are sent LSB first with random idle gaps; each
// must come out once, unchanged, with valid_o rising 9.5 bit periods (+/- a
// few cycles of synchronizer delay) after the start edge. A frame with a low
// stop bit must give frame_err_o and no byte, and a short glitch on the idle
// line must give nothing.
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic       clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic [7:0] data;
  logic       valid, ferr;
  int         checks = 0, failures = 0;
  int         n_valid = 0, n_ferr = 0;
  longint     cyc = 0, t_start = 0;
  logic [7:0] exp_q [$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rx_i(rx), .data_o(data), .valid_o(valid), .frame_err_o(ferr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && valid) begin
      longint lat;
      n_valid++;
      checks += 2;
      lat = cyc - t_start;
      if (lat < longint'(CPB * 19 / 2) || lat > longint'(CPB * 19 / 2 + 4)) begin
        failures++; $display("FAIL latency %0d", lat);
      end
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected byte %h", data);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (data !== e) begin failures++; $display("FAIL got %h exp %h", data, e); end
      end
    end
    if (rst_n && ferr) n_ferr++;
  end

  task automatic send(logic [7:0] b, logic stop);
    @(negedge clk); rx = 1'b0; t_start = cyc;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = stop; repeat (CPB) @(negedge clk);
    rx = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp_q.push_back(b);
      send(b, 1'b1);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    // bad stop bit
    send(8'hA5, 1'b0);
    repeat (2 * CPB) @(negedge clk);
    // glitch shorter than half a bit
    rx = 1'b0; repeat (3) @(negedge clk); rx = 1'b1;
    repeat (4 * CPB) @(negedge clk);
    checks += 3;
    if (n_valid != 300) begin failures++; $display("FAIL %0d bytes", n_valid); end
    if (n_ferr != 1) begin failures++; $display("FAIL %0d frame errors", n_ferr); end
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
