// tb_trace_recorder: feeds counting patterns as TDC and ALU samples and checks
// that a start pulse gives exactly DEPTH writes to consecutive addresses
// 0..DEPTH-1, one per cycle, each holding the sample of its own cycle from the
// selected source (zero-extended for the TDC), then a done pulse; and that a
// start while busy is ignored.
module tb_trace_recorder;
  import sensor_pkg::*;
  localparam int TW = 16, AW_ = 24, D = 32;
  logic clk = 0, rst_n = 0, start = 0;
  trace_src_e src = SRC_TDC;
  logic [TW-1:0] tdc = '0;
  logic [AW_-1:0] alu_s = '0;
  logic we, busy, done;
  logic [4:0] waddr;
  logic [AW_-1:0] wdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tdc   <= tdc + 16'd3;
    alu_s <= alu_s + 24'h010101;
  end

  trace_recorder #(.TDC_W(TW), .ALU_W(AW_), .DEPTH(D)) dut (.clk, .rst_n, .start, .src,
    .tdc_taps(tdc), .alu_sample(alu_s), .we, .waddr, .wdata, .busy, .done);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic capture(input trace_src_e s);
    int n = 0;
    src = s;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin
      if (n == 5) start = 1;        // ignored while busy
      chk(we && int'(waddr) == n, $sformatf("write %0d at address %0d", n, waddr));
      chk(wdata == ((s == SRC_ALU) ? alu_s : AW_'(tdc)), $sformatf("sample %0d data", n));
      n++;
      @(negedge clk);
      start = 0;
    end
    chk(n == D, $sformatf("%0d samples written, expected %0d", n, D));
    chk(done && !we, "done pulse after the last write");
    @(negedge clk);
    chk(!done && !busy, "done is one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!we && !busy, "idle after reset");
    capture(SRC_TDC);
    capture(SRC_ALU);
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
