// sensor_pkg: constants and types shared by the multi-tenant sensing design.
//
// The design places a victim tenant (AES core, ring-oscillator bank) and an
// attacker tenant (delay-line TDC, over-clocked ALU used as a sensor) on one
// FPGA, records sensor traces into a block RAM and talks to a host over UART.
// The sizes that the design is built around (192 ALU result bits, 8000 ROs,
// 4 MHz RO pattern) follow the published experiment; the command set, the
// trace depth and the TDC length are this design's own choices.
package sensor_pkg;

  // Host command opcodes (first byte of every command on the UART link).
  typedef enum logic [7:0] {
    CMD_ENCRYPT     = 8'h01,  // + 16 plaintext bytes; answers 16 ciphertext bytes
    CMD_SET_OPERAND = 8'h02,  // + operand index byte + OP_BYTES bytes, MSB first
    CMD_SET_CONFIG  = 8'h03,  // + one configuration byte (see cfg_t)
    CMD_CAPTURE     = 8'h04,  // start a trace capture now
    CMD_READ_TRACE  = 8'h05   // answers DEPTH samples of TRACE_BYTES bytes
  } cmd_e;

  // ALU operations used by the sensor stimulus.
  typedef enum logic {
    ALU_ADD = 1'b0,
    ALU_SUB = 1'b1
  } alu_op_e;

  // Trace source selected for the BRAM.
  typedef enum logic {
    SRC_TDC = 1'b0,
    SRC_ALU = 1'b1
  } trace_src_e;

  // Configuration byte, bit 0 first: trace source, RO mode, reset-cycle op,
  // measure-cycle op.
  typedef struct packed {
    logic [3:0] unused;
    alu_op_e    op_meas;
    alu_op_e    op_rst;
    logic       ro_mode;
    trace_src_e src;
  } cfg_t;

  // Operand slots written by CMD_SET_OPERAND.
  localparam int unsigned OPND_A_RST  = 0;
  localparam int unsigned OPND_B_RST  = 1;
  localparam int unsigned OPND_A_MEAS = 2;
  localparam int unsigned OPND_B_MEAS = 3;

endpackage
