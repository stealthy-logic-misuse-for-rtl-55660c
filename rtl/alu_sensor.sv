// alu_sensor: the attacker's stimulus and sampling logic that turns the benign
// ALU into a voltage sensor.
//
// A sensor bit only shows a timing failure if it is forced to switch, so the
// ALU alternates between two modes on consecutive clock cycles: in "reset"
// cycles it is given operands (a_rst, b_rst, op_rst) that put its result in a
// known state, in "measure" cycles operands (a_meas, b_meas, op_meas) that
// drive the carry along the critical path, e.g. all ones + 1. Only the results
// of measure cycles are kept: sample is updated every second clock cycle, so a
// 300 MHz ALU clock gives 150 MS/s. The alternation and the every-second-cycle
// sampling follow the published method; the pipeline bookkeeping is this
// design's own.
//
// Timing: operands are presented combinationally to the ALU (which registers
// them). A measure operand set presented in cycle n gives an ALU result in
// cycle n+2 and sample in cycle n+3; sample_stb pulses in the cycle sample
// changes. With enable low the reset operands are presented continuously and
// sample holds.
module alu_sensor
  import sensor_pkg::*;
#(
  parameter int unsigned WIDTH = 192
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [WIDTH-1:0] a_rst,
  input  logic [WIDTH-1:0] b_rst,
  input  alu_op_e          op_rst,
  input  logic [WIDTH-1:0] a_meas,
  input  logic [WIDTH-1:0] b_meas,
  input  alu_op_e          op_meas,
  // to / from the ALU
  output logic [WIDTH-1:0] alu_a,
  output logic [WIDTH-1:0] alu_b,
  output alu_op_e          alu_op,
  input  logic [WIDTH-1:0] alu_y,
  // sensor output
  output logic [WIDTH-1:0] sample,
  output logic             sample_stb
);

  logic meas_q;      // the operands presented this cycle are measure operands
  logic meas_in_q;   // the ALU input registers hold measure operands
  logic meas_res_q;  // the ALU result register holds a measure result

  assign alu_a  = meas_q ? a_meas  : a_rst;
  assign alu_b  = meas_q ? b_meas  : b_rst;
  assign alu_op = meas_q ? op_meas : op_rst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas_q     <= 1'b0;
      meas_in_q  <= 1'b0;
      meas_res_q <= 1'b0;
      sample     <= '0;
      sample_stb <= 1'b0;
    end else begin
      meas_q     <= enable ? ~meas_q : 1'b0;
      meas_in_q  <= meas_q;
      meas_res_q <= meas_in_q;
      sample_stb <= meas_res_q;
      if (meas_res_q) sample <= alu_y;
    end
  end

endmodule
