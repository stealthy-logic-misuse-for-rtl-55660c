// tb_ro_bank: enables ring-oscillator groups one at a time and checks that
// exactly the oscillators of enabled groups toggle, with the period set by
// the loop delay, and that all of them stop at 0 when disabled.
module tb_ro_bank;
  localparam int N = 64, G = 4, D = 100, PER = N / G;
  logic [G-1:0] grp_en = '0;
  logic [N-1:0] osc;
  int unsigned edges [N];
  int checks = 0, failures = 0;

  ro_bank #(.N_RO(N), .GROUPS(G), .DELAY(D)) dut (.grp_en(grp_en), .osc(osc));

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge osc[i]) edges[i]++;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1ns;
    chk(osc == '0, "all oscillators idle at 0");
    for (int g = 0; g < G; g++) begin
      grp_en = '0;
      grp_en[g] = 1'b1;
      #(D / 2 * 1ps);
      foreach (edges[i]) edges[i] = 0;
      #(20 * D * 1ps);    // ten periods of 2*D
      for (int i = 0; i < N; i++) begin
        if (i / PER == g) chk(edges[i] >= 9 && edges[i] <= 11, $sformatf("osc %0d toggles (%0d edges)", i, edges[i]));
        else              chk(edges[i] == 0, $sformatf("osc %0d of a disabled group stays still", i));
      end
    end
    grp_en = '1;
    #(10 * D * 1ps);
    grp_en = '0;
    #(3 * D * 1ps);
    chk(osc == '0, "sudden disable stops all oscillators at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
