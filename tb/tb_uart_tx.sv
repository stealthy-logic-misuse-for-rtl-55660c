// tb_uart_tx: offers random bytes back to back and decodes the line in the
// testbench: checks the start bit, the data bits LSB first, the stop bit,
// each bit lasting exactly CLKS_PER_BIT cycles, ready low during a frame and
// an idle-high line.
module tb_uart_tx;
  localparam int CPB = 12;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [7:0] data = '0;
  logic ready, tx;
  logic [7:0] sent [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // driver
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(tx && ready, "idle line high and ready");
    for (int i = 0; i < 30; i++) begin
      data = 8'($urandom);
      valid = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      chk(!ready, "ready low during a frame");
      if (i % 5 == 0) repeat (7) @(negedge clk);
    end
  end

  // line monitor: measure each bit cell from the falling edge of the start bit
  initial begin
    int n = 0;
    @(posedge rst_n);
    while (n < 30) begin
      logic [7:0] b;
      @(negedge tx);
      // middle of the start bit
      repeat (CPB / 2) @(posedge clk);
      chk(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      chk(tx == 1'b1, "stop bit");
      chk(sent.size() > 0 && b == sent[0], $sformatf("byte %0d: %02h", n, b));
      if (sent.size() > 0) void'(sent.pop_front());
      n++;
    end
    repeat (2 * CPB) @(posedge clk);
    chk(tx && ready, "idle after the last byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
