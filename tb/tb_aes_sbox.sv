// tb_aes_sbox: checks all 256 S-box outputs against the reference model and
// six published FIPS-197 table entries.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(input logic [7:0] x, input logic [7:0] exp);
    in_byte = x;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", x, out_byte, exp);
    end
  endtask

  initial begin
    check(8'h00, 8'h63); check(8'h01, 8'h7c); check(8'h53, 8'hed);
    check(8'hff, 8'h16); check(8'h10, 8'hca); check(8'h9a, 8'hb8);
    for (int x = 0; x < 256; x++) check(8'(x), ref_sbox(8'(x)));
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
