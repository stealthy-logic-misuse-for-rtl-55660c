// tb_ro_controller: runs the RO controller at its default timing (100 MHz
// clock, 25-cycle period = 4 MHz) and compares grp_en and active_cnt every
// cycle with a reference computed from the cycle count: nothing for the
// start delay, then one more group per cycle up to all eight, all off from
// cycle 13 of each period. Also checks the period and that dropping run
// switches everything off.
module tb_ro_controller;
  localparam int G = 8, PERIOD = 25, ON = 13, SD = 13;
  logic clk = 0, rst_n = 0, run = 0;
  logic [G-1:0] grp_en;
  logic [$clog2(G+1)-1:0] active_cnt;
  int checks = 0, failures = 0;
  int last_rise = -1, rises = 0;

  always #5ns clk = ~clk;   // 100 MHz

  ro_controller dut (.clk, .rst_n, .run, .grp_en, .active_cnt);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(grp_en == '0, "off while run is low");
    run = 1;
    for (int k = 1; k <= 200; k++) begin
      int exp_n;
      logic [G-1:0] exp;
      @(negedge clk);
      // k edges have seen run high; the pattern starts after SD of them.
      if (k <= SD) exp_n = 0;
      else begin
        int p;
        p = (k - SD - 1) % PERIOD;
        exp_n = (p < ON) ? ((p + 1 < G) ? p + 1 : G) : 0;
      end
      exp = G'((1 << exp_n) - 1);
      chk(grp_en == exp && int'(active_cnt) == exp_n,
          $sformatf("cycle %0d: grp_en %b expected %b", k, grp_en, exp));
      if (grp_en[0] && exp_n == 1) begin
        if (last_rise >= 0) chk(k - last_rise == PERIOD, "4 MHz period of 25 cycles");
        last_rise = k;
        rises++;
      end
    end
    chk(rises >= 7, "pattern repeats");
    run = 0;
    @(negedge clk);
    chk(grp_en == '0 && active_cnt == 0, "run low switches all groups off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
