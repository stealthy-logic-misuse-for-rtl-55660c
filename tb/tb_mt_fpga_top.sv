// tb_mt_fpga_top: end-to-end test of the whole design through its serial
// link, at a fast link rate (8 clocks per bit) and 64-sample traces, with the
// three clocks generated phase aligned (300, 150 and 100 MHz).
//
// Steps and what is checked:
//  1. set random ALU measure operands; encrypt the FIPS-197 C.1 plaintext:
//     the ciphertext must match, and the AES start must have started a capture
//  2. read the ALU trace: every sample must equal a_meas + b_meas
//  3. switch to the TDC and RO mode and capture on command: the RO groups must
//     be enabled gradually, disabled suddenly and oscillate during the capture
//     only; every TDC sample read back must be a uniform 128-bit word
//  4. switch the measure operation to subtraction, capture and read: every
//     sample must equal a_meas - b_meas
//  5. encrypt a random plaintext and compare with the reference model
// Each mechanism (AES-triggered and commanded capture, reset/measure
// alternation, gradual RO enable, sudden RO disable, RO oscillation, TDC and
// ALU traces, trace readout, operation switch) is counted; one that never
// happens is a failure.
module tb_mt_fpga_top;
  import sensor_pkg::*;
  import aes_ref_pkg::*;

  localparam int CPB = 8, DEPTH = 64, W = 192, TBYTES = 24;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;

  logic clk_sys = 0, clk_smp = 0, clk_alu = 0, rst_n = 0;
  logic uart_rx_i, uart_tx_o;
  int checks = 0, failures = 0;

  // one process makes all three clocks so that coincident edges are one event
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

  mt_fpga_top #(.CLKS_PER_BIT(CPB), .DEPTH(DEPTH)) dut (
    .clk_sys, .clk_smp, .clk_alu, .rst_n, .uart_rx_i, .uart_tx_o);

  host_link_bfm #(.CLKS_PER_BIT(CPB)) host (.clk(clk_sys), .to_dut(uart_rx_i), .from_dut(uart_tx_o));

  // mechanism counters
  int n_aes_trig = 0, n_cmd_cap = 0, n_alt = 0, n_ramp = 0, n_drop = 0, n_osc = 0;
  int n_osc_idle = 0, n_tdc_tr = 0, n_alu_tr = 0, n_readout = 0, n_sub = 0;
  logic [3:0] prev_active = '0;
  always @(posedge clk_sys) if (rst_n) begin
    if (dut.aes_trig_start && !dut.u_rec.busy) n_aes_trig++;
    if (dut.cap_req) n_cmd_cap++;
    if (int'(dut.ro_active) == dut.RO_GROUPS && int'(prev_active) == dut.RO_GROUPS - 1) n_ramp++;
    if (dut.ro_active == 0 && int'(prev_active) == dut.RO_GROUPS) n_drop++;
    prev_active <= 4'(dut.ro_active);
  end
  always @(posedge clk_alu) if (rst_n && dut.u_alu_sensor.meas_q) n_alt++;
  always @(posedge dut.ro_osc[0]) begin
    n_osc++;
    if (!dut.u_rec.busy) n_osc_idle++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_bytes(input int n);
    int t = 0;
    while (host.rxq.size() < n && t < 100 * n * 10 * CPB + 1000) begin @(posedge clk_sys); t++; end
    chk(host.rxq.size() == n, $sformatf("%0d bytes received, expected %0d", host.rxq.size(), n));
  endtask

  task automatic encrypt_check(input logic [127:0] pt);
    logic [127:0] ct, exp;
    exp = ref_aes128(KEY, pt);
    host.cmd_encrypt(pt);
    wait_bytes(16);
    for (int i = 0; i < 16; i++) ct[127 - 8*i -: 8] = host.rxq[i];
    host.rxq.delete();
    chk(ct == exp, $sformatf("ciphertext %h expected %h", ct, exp));
  endtask

  // reads a trace; returns it in tr
  task automatic read_trace(output logic [W-1:0] tr [DEPTH]);
    host.send_byte(CMD_READ_TRACE);
    wait_bytes(DEPTH * TBYTES);
    for (int s = 0; s < DEPTH; s++)
      for (int j = 0; j < TBYTES; j++)
        tr[s][W - 1 - 8*j -: 8] = host.rxq[s * TBYTES + j];
    host.rxq.delete();
    n_readout++;
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    logic [W-1:0] am, bm, tr [DEPTH];
    int bad;
    repeat (10) @(posedge clk_sys);
    rst_n = 1;
    repeat (10) @(posedge clk_sys);

    // 1. operands, AES-triggered capture
    am = rnd(); bm = rnd();
    host.cmd_set_operand(OPND_A_MEAS, am);
    host.cmd_set_operand(OPND_B_MEAS, bm);
    encrypt_check(128'h00112233445566778899aabbccddeeff);
    chk(n_aes_trig == 1, "AES start triggered a capture");

    // 2. ALU trace
    read_trace(tr);
    bad = 0;
    foreach (tr[s]) if (tr[s] != am + bm) bad++;
    chk(bad == 0, $sformatf("%0d ALU samples differ from a_meas + b_meas", bad));
    if (bad == 0) n_alu_tr++;

    // 3. TDC trace with the RO pattern
    host.cmd_config('{unused: 4'h0, op_meas: ALU_ADD, op_rst: ALU_ADD, ro_mode: 1'b1, src: SRC_TDC});
    host.send_byte(CMD_CAPTURE);
    read_trace(tr);
    bad = 0;
    foreach (tr[s]) if (tr[s][W-1:128] != '0 || (tr[s][127:0] != '0 && tr[s][127:0] != '1)) bad++;
    chk(bad == 0, $sformatf("%0d TDC samples are not uniform 128-bit words", bad));
    if (bad == 0) n_tdc_tr++;
    chk(dut.ro_osc == '0, "ROs idle after the capture");

    // 4. measure cycle subtracts
    host.cmd_config('{unused: 4'h0, op_meas: ALU_SUB, op_rst: ALU_ADD, ro_mode: 1'b0, src: SRC_ALU});
    repeat (20) @(posedge clk_sys);
    host.send_byte(CMD_CAPTURE);
    read_trace(tr);
    bad = 0;
    foreach (tr[s]) if (tr[s] != am - bm) bad++;
    chk(bad == 0, $sformatf("%0d ALU samples differ from a_meas - b_meas", bad));
    if (bad == 0) n_sub++;

    // 5. another encryption
    encrypt_check({$urandom, $urandom, $urandom, $urandom});
    chk(host.frame_errors == 0, "no framing errors on the link");

    chk(n_aes_trig >= 2, $sformatf("AES-triggered captures: %0d", n_aes_trig));
    chk(n_cmd_cap >= 2, $sformatf("commanded captures: %0d", n_cmd_cap));
    chk(n_alt > 100, $sformatf("reset/measure alternations: %0d", n_alt));
    chk(n_ramp >= 1, $sformatf("gradual RO enables: %0d", n_ramp));
    chk(n_drop >= 1, $sformatf("sudden RO disables: %0d", n_drop));
    chk(n_osc > 20, $sformatf("RO oscillations: %0d", n_osc));
    // the RO stop crosses two synchronizers and a register: a few periods of overrun
    chk(n_osc_idle < 30, $sformatf("RO oscillations outside captures: %0d", n_osc_idle));
    chk(n_tdc_tr == 1 && n_alu_tr == 1 && n_sub == 1 && n_readout == 3, "TDC, ALU and subtraction traces read back");
    $display("mechanisms: aes_trig=%0d cmd_cap=%0d alternations=%0d ro_ramp=%0d ro_drop=%0d ro_osc=%0d readouts=%0d",
             n_aes_trig, n_cmd_cap, n_alt, n_ramp, n_drop, n_osc, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_sys);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
