// tb_mt_fpga_top_full: one complete trace acquisition on the design at its
// default size (115200-baud link at 100 MHz, 128-sample traces of 192 bits,
// 8000 ROs): set the ALU measure operands, encrypt the FIPS-197 C.1
// plaintext (the AES start triggers the capture), check the ciphertext, read
// the whole ALU trace and check every sample against a_meas + b_meas.
module tb_mt_fpga_top_full;
  import sensor_pkg::*;
  import aes_ref_pkg::*;

  localparam int CPB = 868, DEPTH = 128, W = 192, TBYTES = 24;

  logic clk_sys = 0, clk_smp = 0, clk_alu = 0, rst_n = 0;
  logic uart_rx_i, uart_tx_o;
  int checks = 0, failures = 0;
  int n_trig = 0;

  initial begin
    int tick = 0;
    forever begin
      #1667ps;
      tick++;
      clk_alu = ~clk_alu;
      if (tick % 2 == 0) clk_smp = ~clk_smp;
      if (tick % 3 == 0) clk_sys = ~clk_sys;
    end
  end

  mt_fpga_top dut (.clk_sys, .clk_smp, .clk_alu, .rst_n, .uart_rx_i, .uart_tx_o);

  host_link_bfm #(.CLKS_PER_BIT(CPB)) host (.clk(clk_sys), .to_dut(uart_rx_i), .from_dut(uart_tx_o));

  always @(posedge clk_sys) if (rst_n && dut.aes_trig_start) n_trig++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_bytes(input int n);
    int t = 0;
    while (host.rxq.size() < n && t < 2 * n * 10 * CPB + 10000) begin @(posedge clk_sys); t++; end
    chk(host.rxq.size() == n, $sformatf("%0d bytes received, expected %0d", host.rxq.size(), n));
  endtask

  initial begin
    logic [W-1:0] am, bm, s;
    logic [127:0] ct;
    int bad;
    for (int i = 0; i < W / 32; i++) begin am[32*i +: 32] = $urandom; bm[32*i +: 32] = $urandom; end
    repeat (10) @(posedge clk_sys);
    rst_n = 1;
    repeat (10) @(posedge clk_sys);
    host.cmd_set_operand(OPND_A_MEAS, am);
    host.cmd_set_operand(OPND_B_MEAS, bm);
    host.cmd_encrypt(128'h00112233445566778899aabbccddeeff);
    wait_bytes(16);
    for (int i = 0; i < 16; i++) ct[127 - 8*i -: 8] = host.rxq[i];
    host.rxq.delete();
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("ciphertext %h", ct));
    chk(ct == ref_aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff), "reference model agrees");
    chk(n_trig == 1, "the encryption started one capture");
    host.send_byte(CMD_READ_TRACE);
    wait_bytes(DEPTH * TBYTES);
    bad = 0;
    for (int k = 0; k < DEPTH; k++) begin
      for (int j = 0; j < TBYTES; j++) s[W - 1 - 8*j -: 8] = host.rxq[k * TBYTES + j];
      if (s != am + bm) bad++;
    end
    chk(bad == 0, $sformatf("%0d of %0d samples differ from a_meas + b_meas", bad, DEPTH));
    chk(host.frame_errors == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk_sys);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
