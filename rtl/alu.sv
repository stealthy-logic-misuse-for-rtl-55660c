// alu: the benign circuit that the attacker misuses as a sensor, a registered
// WIDTH-bit ALU whose adder is a ripple-carry adder.
//
// Operands and operation are registered on one rising edge, the result of
// a + b (ALU_ADD) or a - b (ALU_SUB, computed as a + ~b + 1 on the same
// adder) is registered on the next, so the adder lies on a register-to-register
// path. Designed for a slow clock (50 MHz in the published setup), it produces
// wrong result bits when run much faster (300 MHz) and the carry does not reach
// every bit in time; those result registers are the sensor endpoints.
// The published work describes the ALU only by its ripple-carry adder, 192
// result bits and its clock; the operation set (add, subtract) and the
// register placement are this design's choices.
//
// Interface: a, b, op sampled every clk; y and cout valid two edges later.
module alu
  import sensor_pkg::*;
#(
  parameter int unsigned WIDTH = 192
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH-1:0] a_q, b_q;
  alu_op_e          op_q;
  logic [WIDTH-1:0] sum;
  logic             carry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      op_q <= ALU_ADD;
    end else begin
      a_q  <= a;
      b_q  <= b;
      op_q <= op;
    end
  end

  ripple_carry_adder #(.WIDTH(WIDTH)) u_add (
    .a   (a_q),
    .b   ((op_q == ALU_SUB) ? ~b_q : b_q),
    .cin (op_q == ALU_SUB),
    .y   (sum),
    .cout(carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      cout <= 1'b0;
    end else begin
      y    <= sum;
      cout <= carry;
    end
  end

endmodule
