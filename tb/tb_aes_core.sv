// tb_aes_core: encrypts the FIPS-197 appendix C.1 vector and random plaintexts
// and compares with the reference model; a second instance uses the
// appendix B key. Checks the start/end trigger pulses, the busy flag and the
// 50-cycle latency from busy rising to done.
module tb_aes_core;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY_A = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] KEY_B = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0;
  logic [127:0] pt = '0;
  logic busy_a, done_a, ts_a, te_a, busy_b, done_b, ts_b, te_b;
  logic [127:0] ct_a, ct_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_core #(.SECRET_KEY(KEY_A)) dut_a (.clk, .rst_n, .start(start_a), .plaintext(pt),
    .busy(busy_a), .done(done_a), .ciphertext(ct_a), .trig_start(ts_a), .trig_end(te_a));
  aes_core #(.SECRET_KEY(KEY_B)) dut_b (.clk, .rst_n, .start(start_b), .plaintext(pt),
    .busy(busy_b), .done(done_b), .ciphertext(ct_b), .trig_start(ts_b), .trig_end(te_b));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic encrypt_a(input logic [127:0] p, input logic [127:0] exp);
    int cyc = 0;
    @(negedge clk); pt = p; start_a = 1;
    @(negedge clk); start_a = 0;
    chk(busy_a && ts_a, "busy and trig_start after start");
    while (!done_a) begin @(negedge clk); cyc++; end
    chk(te_a, "trig_end with done");
    chk(cyc == 50, $sformatf("latency %0d, expected 50", cyc));
    chk(ct_a == exp, $sformatf("ct %032h expected %032h", ct_a, exp));
    @(negedge clk);
    chk(!done_a && !busy_a && ct_a == exp, "done is one pulse and ct holds");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    encrypt_a(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 6; i++) begin
      logic [127:0] p;
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt_a(p, ref_aes128(KEY_A, p));
    end
    // Appendix B vector on the second key; start is ignored while busy.
    @(negedge clk); pt = 128'h3243f6a8885a308d313198a2e0370734; start_b = 1;
    @(negedge clk); pt = '1;
    repeat (10) @(negedge clk);
    start_b = 0;
    while (!done_b) @(negedge clk);
    chk(ct_b == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 appendix B ciphertext");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
