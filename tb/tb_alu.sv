// tb_alu: applies random and corner-case operands each cycle to the 192-bit
// ALU and checks y and cout against wide arithmetic two cycles later,
// including the full-length carry (all ones + 1) and borrow (0 - 1).
module tb_alu;
  import sensor_pkg::*;
  localparam int W = 192;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a = '0, b = '0, y;
  alu_op_e op = ALU_ADD;
  logic cout;
  logic [W:0] exp_q [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu #(.WIDTH(W)) dut (.clk, .rst_n, .a, .b, .op, .y, .cout);

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      case (k % 6)
        0: begin a = '1; b = W'(1); op = ALU_ADD; end
        1: begin a = '0; b = W'(1); op = ALU_SUB; end
        default: begin a = rnd(); b = rnd(); op = alu_op_e'($urandom_range(0, 1)); end
      endcase
      // expected {cout, y}: a + b, or a + ~b + 1 for subtraction
      exp_q.push_back((op == ALU_ADD) ? ({1'b0, a} + {1'b0, b}) : ({1'b0, a} + {1'b0, ~b} + 1'b1));
      @(negedge clk);
      if (exp_q.size() == 2) begin
        logic [W:0] e;
        e = exp_q.pop_front();
        checks++;
        if ({cout, y} != e) begin
          failures++;
          $display("FAIL cycle %0d: got %h expected %h", k, {cout, y}, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
