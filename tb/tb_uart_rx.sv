// tb_uart_rx: sends random 8N1 frames at the configured bit time (with a few
// idle gaps and a frame with a bad stop bit) and checks every received byte,
// the valid pulse and the frame error flag.
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  logic [7:0] got [$];
  int ferr = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .data, .valid, .frame_err);

  always @(posedge clk) begin
    if (rst_n && valid) got.push_back(data);
    if (rst_n && frame_err) ferr++;
  end

  task automatic send(input logic [7:0] b, input bit stop = 1'b1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(negedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    logic [7:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b);
      if (i % 7 == 0) repeat (CPB * 3) @(negedge clk);
    end
    send(8'h55, 1'b0);           // stop bit 0: frame error, no byte
    repeat (CPB * 2) @(negedge clk);
    send(8'hc3);
    sent.push_back(8'hc3);
    repeat (CPB * 2) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++;
      $display("FAIL received %0d bytes, sent %0d", got.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin
        failures++;
        $display("FAIL byte %0d: %02h expected %02h", i, got[i], sent[i]);
      end
    end
    checks++;
    if (ferr != 1) begin failures++; $display("FAIL %0d frame errors, expected 1", ferr); end
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
