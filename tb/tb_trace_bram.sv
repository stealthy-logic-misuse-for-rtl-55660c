// tb_trace_bram: writes random words on the write clock, reads them back on an
// unrelated read clock and checks the one-cycle registered read.
module tb_trace_bram;
  localparam int W = 192, D = 128;
  logic wclk = 0, rclk = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  always #3 wclk = ~wclk;
  always #5 rclk = ~rclk;

  trace_bram #(.WIDTH(W), .DEPTH(D)) dut (.wclk, .we, .waddr, .wdata, .rclk, .raddr, .rdata);

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge wclk);
      we = 1; waddr = 7'(i);
      for (int j = 0; j < W / 32; j++) wdata[32*j +: 32] = $urandom;
      ref_mem[i] = wdata;
    end
    @(negedge wclk); we = 0;
    // a write with we low must not change memory
    waddr = 7'd5; wdata = ~ref_mem[5];
    @(negedge wclk);
    for (int k = 0; k < 2 * D; k++) begin
      int a;
      a = (k < D) ? k : int'($urandom_range(0, D - 1));
      @(negedge rclk); raddr = 7'(a);
      @(negedge rclk);
      checks++;
      if (rdata != ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
