// tb_host_controller: drives the command decoder at byte level with simple
// models of the AES core (ciphertext = plaintext xor a constant after 20
// cycles), the trace BRAM (registered read) and the capture flag, and checks
// every command: ENCRYPT starts the core with the right plaintext and sends
// back its 16 ciphertext bytes; SET_OPERAND writes each of the four operand
// registers; SET_CONFIG writes the configuration; CAPTURE pulses cap_req;
// READ_TRACE waits for the capture to end and sends every sample, most
// significant byte first. Also checks the operand and configuration values
// after reset.
module tb_host_controller;
  import sensor_pkg::*;
  localparam int OPW = 64, TW = 40, D = 8, TB_ = (TW + 7) / 8;
  localparam logic [127:0] XK = 128'hdeadbeef_0123_4567_89ab_cdef_f00d_cafe;

  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 0, tx_valid, tx_ready = 0;
  logic aes_start, aes_busy = 0, aes_done = 0;
  logic [127:0] aes_pt, aes_ct = '0;
  logic [OPW-1:0] a_rst, b_rst, a_meas, b_meas;
  cfg_t cfg;
  logic cap_req, cap_busy = 0;
  logic [2:0] mem_raddr;
  logic [TW-1:0] mem_rdata, mem [D];
  logic [7:0] txq [$];
  int aes_starts = 0, cap_reqs = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_controller #(.OP_W(OPW), .TRACE_W(TW), .DEPTH(D)) dut (.*);

  // AES model
  always @(posedge clk) begin
    aes_done <= 1'b0;
    if (rst_n && aes_start) begin
      aes_starts++;
      aes_busy <= 1'b1;
      fork begin
        repeat (20) @(posedge clk);
        aes_ct   <= aes_pt ^ XK;
        aes_done <= 1'b1;
        aes_busy <= 1'b0;
      end join_none
    end
    if (rst_n && cap_req) cap_reqs++;
  end

  // BRAM model and a transmitter that takes a byte every third cycle
  always @(posedge clk) mem_rdata <= mem[mem_raddr];
  int tx_div = 0;
  always @(posedge clk) begin
    tx_div <= (tx_div == 2) ? 0 : tx_div + 1;
    tx_ready <= (tx_div == 1);
    if (tx_valid && tx_ready) txq.push_back(tx_data);
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic wait_tx(input int n);
    int t = 0;
    while (txq.size() < n && t < 5000) begin @(negedge clk); t++; end
    chk(txq.size() == n, $sformatf("%0d bytes sent, expected %0d", txq.size(), n));
  endtask

  initial begin
    logic [127:0] pt, ct_exp;
    logic [OPW-1:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(a_rst == '1 && b_rst == '0 && a_meas == '1 && b_meas == OPW'(1), "operands after reset");
    chk(cfg.src == SRC_ALU && !cfg.ro_mode && cfg.op_rst == ALU_ADD && cfg.op_meas == ALU_ADD, "config after reset");

    // ENCRYPT
    pt = {$urandom, $urandom, $urandom, $urandom};
    send_byte(CMD_ENCRYPT);
    for (int i = 0; i < 16; i++) send_byte(pt[127 - 8*i -: 8]);
    wait_tx(16);
    chk(aes_starts == 1 && aes_pt == pt, "AES started once with the plaintext");
    ct_exp = pt ^ XK;
    for (int i = 0; i < 16; i++) chk(txq[i] == ct_exp[127 - 8*i -: 8], $sformatf("ciphertext byte %0d", i));
    txq.delete();

    // SET_OPERAND for all four slots
    for (int s = 0; s < 4; s++) begin
      v = {$urandom, $urandom};
      send_byte(CMD_SET_OPERAND);
      send_byte(8'(s));
      for (int i = 0; i < OPW / 8; i++) send_byte(v[OPW - 1 - 8*i -: 8]);
      repeat (2) @(negedge clk);
      case (s)
        0: chk(a_rst == v, "a_rst written");
        1: chk(b_rst == v, "b_rst written");
        2: chk(a_meas == v, "a_meas written");
        default: chk(b_meas == v, "b_meas written");
      endcase
    end

    // SET_CONFIG
    send_byte(CMD_SET_CONFIG);
    send_byte(8'b0000_1110);
    repeat (2) @(negedge clk);
    chk(cfg.src == SRC_TDC && cfg.ro_mode && cfg.op_rst == ALU_SUB && cfg.op_meas == ALU_SUB, "config written");

    // CAPTURE, then READ_TRACE while the capture still runs
    for (int i = 0; i < D; i++) mem[i] = {8'($urandom), $urandom};
    send_byte(CMD_CAPTURE);
    chk(cap_reqs == 1, "capture requested once");
    cap_busy = 1;
    send_byte(CMD_READ_TRACE);
    repeat (50) @(negedge clk);
    chk(txq.size() == 0, "no trace bytes while the capture runs");
    cap_busy = 0;
    wait_tx(D * TB_);
    for (int i = 0; i < D; i++)
      for (int j = 0; j < TB_; j++)
        chk(txq[i * TB_ + j] == mem[i][TW - 1 - 8*j -: 8], $sformatf("trace sample %0d byte %0d", i, j));
    txq.delete();

    // an unknown command is ignored
    send_byte(8'h7f);
    repeat (20) @(negedge clk);
    chk(txq.size() == 0 && aes_starts == 1 && cap_reqs == 1, "unknown command ignored");
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
