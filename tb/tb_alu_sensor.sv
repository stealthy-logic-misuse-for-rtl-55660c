// tb_alu_sensor: connects the sensor stimulus to a 192-bit ALU and checks
// that (1) operands alternate between the reset and the measure set every
// cycle while enabled, (2) sample_stb pulses every second cycle and
// (3) sample always carries the measure-cycle result, never the reset-cycle
// one, computed here with wide arithmetic; and that with enable low only the
// reset operands are applied and sample holds.
module tb_alu_sensor;
  import sensor_pkg::*;
  localparam int W = 192;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [W-1:0] a_rst, b_rst, a_meas, b_meas;
  alu_op_e op_rst, op_meas;
  logic [W-1:0] alu_a, alu_b, alu_y, sample;
  alu_op_e alu_op;
  logic alu_cout, sample_stb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alu_sensor #(.WIDTH(W)) dut (.clk, .rst_n, .enable, .a_rst, .b_rst, .op_rst,
    .a_meas, .b_meas, .op_meas, .alu_a, .alu_b, .alu_op, .alu_y, .sample, .sample_stb);
  alu #(.WIDTH(W)) u_alu (.clk, .rst_n, .a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y), .cout(alu_cout));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [W-1:0] exp_meas, exp_rst;
    logic prev_meas;
    int stb_gap;
    a_rst = '1; b_rst = '0; a_meas = '1; b_meas = W'(1); op_rst = ALU_ADD; op_meas = ALU_ADD;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(alu_a == a_rst && alu_b == b_rst, "reset operands while disabled");
    for (int set = 0; set < 4; set++) begin
      if (set > 0) begin
        a_rst = rnd(); b_rst = rnd(); a_meas = rnd(); b_meas = rnd();
        op_rst = alu_op_e'(set[0]); op_meas = alu_op_e'(set[1]);
      end
      exp_meas = (op_meas == ALU_ADD) ? a_meas + b_meas : a_meas - b_meas;
      exp_rst  = (op_rst  == ALU_ADD) ? a_rst  + b_rst  : a_rst  - b_rst;
      enable = 1;
      repeat (6) @(negedge clk);   // let the pipeline fill with this set
      prev_meas = (alu_b == b_meas);
      stb_gap = 0;
      for (int k = 0; k < 40; k++) begin
        @(negedge clk);
        chk((alu_b == b_meas) != prev_meas, "operand sets alternate every cycle");
        prev_meas = (alu_b == b_meas);
        stb_gap++;
        if (sample_stb) begin
          chk(stb_gap == 2 || k < 2, $sformatf("sample every second cycle (gap %0d)", stb_gap));
          stb_gap = 0;
        end
        chk(sample == exp_meas, $sformatf("set %0d: sample %h expected %h", set, sample, exp_meas));
        if (exp_meas != exp_rst) chk(sample != exp_rst, "reset result never sampled");
      end
      enable = 0;
      repeat (4) @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        chk(alu_a == a_rst && alu_b == b_rst && !sample_stb && sample == exp_meas, "disabled: reset operands, sample holds");
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
