// host_link_bfm: testbench model of the host workstation's serial link.
//
// send_byte() drives one 8N1 frame onto to_dut (idle high), each bit lasting
// CLKS_PER_BIT cycles of clk. A receiver decodes from_dut, sampling each bit
// at its middle, and appends every byte with a good stop bit to rxq; a bad
// stop bit increments frame_errors. Command helpers build the byte sequences
// of the design's host protocol.
module host_link_bfm
  import sensor_pkg::*;
#(
  parameter int CLKS_PER_BIT = 868,
  parameter int OP_BYTES     = 24
) (
  input  logic clk,
  output logic to_dut,
  input  logic from_dut
);
  logic [7:0] rxq [$];
  int frame_errors = 0;

  initial to_dut = 1'b1;

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      to_dut = f[i];
      repeat (CLKS_PER_BIT) @(posedge clk);
    end
  endtask

  task automatic cmd_encrypt(input logic [127:0] pt);
    send_byte(CMD_ENCRYPT);
    for (int i = 0; i < 16; i++) send_byte(pt[127 - 8*i -: 8]);
  endtask

  task automatic cmd_set_operand(input int idx, input logic [8*OP_BYTES-1:0] v);
    send_byte(CMD_SET_OPERAND);
    send_byte(8'(idx));
    for (int i = 0; i < OP_BYTES; i++) send_byte(v[8*OP_BYTES - 1 - 8*i -: 8]);
  endtask

  task automatic cmd_config(input cfg_t c);
    send_byte(CMD_SET_CONFIG);
    send_byte(8'(c));
  endtask

  // receiver
  initial begin
    @(posedge clk);
    forever begin
      logic [7:0] b;
      @(negedge from_dut);
      repeat (CLKS_PER_BIT / 2) @(posedge clk);
      if (from_dut == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (CLKS_PER_BIT) @(posedge clk);
          b[i] = from_dut;
        end
        repeat (CLKS_PER_BIT) @(posedge clk);
        if (from_dut) rxq.push_back(b);
        else          frame_errors++;
      end
    end
  end
endmodule
