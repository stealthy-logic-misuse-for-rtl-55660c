// tb_tdc_sensor: drives the delay line with a random launch value each cycle
// (changed away from the sampling edge) and checks that every tap register
// holds that value 1 + BUF_STAGES cycles later: in a zero-delay simulation the
// whole line settles before the edge.
module tb_tdc_sensor;
  localparam int TAPS = 32, BUF = 2;
  logic clk = 0, rst_n = 0, launch = 0;
  logic [TAPS-1:0] taps;
  logic hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tdc_sensor #(.TAPS(TAPS), .BUF_STAGES(BUF)) dut (.clk, .rst_n, .launch, .taps);

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (taps != '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      launch = 1'($urandom);
      hist.push_back(launch);
      @(negedge clk);
      if (hist.size() > BUF + 1) void'(hist.pop_front());
      if (hist.size() == BUF + 1) begin
        checks++;
        if (taps != {TAPS{hist[0]}}) begin
          failures++;
          $display("FAIL cycle %0d taps %h expected all %b", k, taps, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
