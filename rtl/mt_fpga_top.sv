// mt_fpga_top: one FPGA shared by a victim tenant and an attacker tenant,
// with the attacker misusing a benign ALU as a supply-voltage sensor.
//
// Victim tenant: an AES-128 core with a built-in secret key (aes_core) and a
//   bank of ring oscillators (ro_bank) switched by ro_controller in a 4 MHz
//   on/off pattern, the controlled voltage-drop generator of the experiment.
// Attacker tenant: a 192-bit ALU (alu) whose ripple-carry adder is clocked
//   far beyond its timing budget by alu_sensor, which alternates reset and
//   measure operands and keeps every second result; and a delay-line sensor
//   (tdc_sensor) as the established reference.
// Shared infrastructure: trace_recorder writes DEPTH samples of either sensor
//   into trace_bram when the AES core starts or the host asks for it;
//   host_controller, uart_rx and uart_tx connect to the host, which sends
//   plaintexts, ALU operands and configuration and reads ciphertexts and
//   traces. Selecting sensitive bits and the correlation analysis run on the
//   host.
//
// Clocks (from an external clock manager, phase aligned):
//   clk_sys 100 MHz  AES, UART, host controller, RO controller
//   clk_smp 150 MHz  TDC sampling (it is also the TDC launch signal), trace
//                    recorder, BRAM write port
//   clk_alu 300 MHz  ALU and its stimulus; one measure result per two cycles
// The ALU operands and the configuration cross from clk_sys as quasi-static
// values: change them only while no capture runs. The ALU sample crosses
// into clk_smp directly, relying on clk_smp being clk_alu/2 and phase aligned;
// the trigger and busy flag cross through synchronizers.
// rst_n is asynchronous; each domain releases it through a synchronizer.
// The frequencies, the 8000 ROs, the 4 MHz pattern and the 192 ALU result bits
// follow the published experiment; the rest of the sizes, the host protocol
// and the clocking scheme are this design's choices.
module mt_fpga_top
  import sensor_pkg::*;
#(
  parameter int unsigned    CLKS_PER_BIT   = 868,
  parameter logic [127:0]   SECRET_KEY     = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int unsigned    N_RO           = 8000,
  parameter int unsigned    RO_GROUPS      = 8,
  parameter int unsigned    RO_DELAY       = 1000,
  parameter int unsigned    RO_PERIOD      = 25,
  parameter int unsigned    RO_ON_CYCLES   = 13,
  parameter int unsigned    RO_START_DELAY = 13,
  parameter int unsigned    TDC_TAPS       = 128,
  parameter int unsigned    TDC_BUF_STAGES = 1,
  parameter int unsigned    ALU_W          = 192,
  parameter int unsigned    DEPTH          = 128
) (
  input  logic clk_sys,
  input  logic clk_smp,
  input  logic clk_alu,
  input  logic rst_n,
  input  logic uart_rx_i,
  output logic uart_tx_o
);

  localparam int unsigned TRACE_W = (TDC_TAPS > ALU_W) ? TDC_TAPS : ALU_W;
  localparam int unsigned AW      = $clog2(DEPTH);

  // ---------------------------------------------------------------- resets
  logic rst_sys_n, rst_smp_n, rst_alu_n;
  sync_2ff u_rst_sys (.clk(clk_sys), .rst_n(rst_n), .d(1'b1), .q(rst_sys_n));
  sync_2ff u_rst_smp (.clk(clk_smp), .rst_n(rst_n), .d(1'b1), .q(rst_smp_n));
  sync_2ff u_rst_alu (.clk(clk_alu), .rst_n(rst_n), .d(1'b1), .q(rst_alu_n));

  // ---------------------------------------------------------------- host link
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ferr, tx_valid, tx_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk(clk_sys), .rst_n(rst_sys_n), .rx(uart_rx_i),
    .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk(clk_sys), .rst_n(rst_sys_n), .data(tx_data), .valid(tx_valid),
    .ready(tx_ready), .tx(uart_tx_o)
  );

  logic               aes_start, aes_busy, aes_done, aes_trig_start, aes_trig_end;
  logic [127:0]       aes_pt, aes_ct;
  logic [ALU_W-1:0]   a_rst, b_rst, a_meas, b_meas;
  cfg_t               cfg;
  logic               cap_req, cap_busy_sys;
  logic [AW-1:0]      mem_raddr;
  logic [TRACE_W-1:0] mem_rdata;

  host_controller #(.OP_W(ALU_W), .TRACE_W(TRACE_W), .DEPTH(DEPTH)) u_host (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .aes_start(aes_start), .aes_pt(aes_pt), .aes_busy(aes_busy),
    .aes_done(aes_done), .aes_ct(aes_ct),
    .a_rst(a_rst), .b_rst(b_rst), .a_meas(a_meas), .b_meas(b_meas), .cfg(cfg),
    .cap_req(cap_req), .cap_busy(cap_busy_sys),
    .mem_raddr(mem_raddr), .mem_rdata(mem_rdata)
  );

  // ---------------------------------------------------------------- victim
  aes_core #(.SECRET_KEY(SECRET_KEY)) u_aes (
    .clk(clk_sys), .rst_n(rst_sys_n), .start(aes_start), .plaintext(aes_pt),
    .busy(aes_busy), .done(aes_done), .ciphertext(aes_ct),
    .trig_start(aes_trig_start), .trig_end(aes_trig_end)
  );

  logic [RO_GROUPS-1:0]           ro_grp_en;
  logic [$clog2(RO_GROUPS+1)-1:0] ro_active;
  logic [N_RO-1:0]                ro_osc;

  ro_controller #(
    .GROUPS(RO_GROUPS), .PERIOD(RO_PERIOD), .ON_CYCLES(RO_ON_CYCLES),
    .START_DELAY(RO_START_DELAY)
  ) u_ro_ctrl (
    .clk(clk_sys), .rst_n(rst_sys_n), .run(cfg.ro_mode && cap_busy_sys),
    .grp_en(ro_grp_en), .active_cnt(ro_active)
  );

  ro_bank #(.N_RO(N_RO), .GROUPS(RO_GROUPS), .DELAY(RO_DELAY)) u_ro_bank (
    .grp_en(ro_grp_en), .osc(ro_osc)
  );

  // ---------------------------------------------------------------- attacker
  logic             alu_en;
  logic [ALU_W-1:0] alu_a, alu_b, alu_y, alu_sample;
  alu_op_e          alu_op;
  logic             alu_cout, alu_stb;

  sync_2ff u_alu_en_sync (.clk(clk_alu), .rst_n(rst_alu_n), .d(cfg.src == SRC_ALU), .q(alu_en));

  alu_sensor #(.WIDTH(ALU_W)) u_alu_sensor (
    .clk(clk_alu), .rst_n(rst_alu_n), .enable(alu_en),
    .a_rst(a_rst), .b_rst(b_rst), .op_rst(cfg.op_rst),
    .a_meas(a_meas), .b_meas(b_meas), .op_meas(cfg.op_meas),
    .alu_a(alu_a), .alu_b(alu_b), .alu_op(alu_op), .alu_y(alu_y),
    .sample(alu_sample), .sample_stb(alu_stb)
  );

  alu #(.WIDTH(ALU_W)) u_alu (
    .clk(clk_alu), .rst_n(rst_alu_n), .a(alu_a), .b(alu_b), .op(alu_op),
    .y(alu_y), .cout(alu_cout)
  );

  logic [TDC_TAPS-1:0] tdc_taps;

  tdc_sensor #(.TAPS(TDC_TAPS), .BUF_STAGES(TDC_BUF_STAGES)) u_tdc (
    .clk(clk_smp), .rst_n(rst_smp_n), .launch(clk_smp), .taps(tdc_taps)
  );

  // ---------------------------------------------------------------- traces
  logic               cap_start_smp, rec_we, rec_busy, rec_done;
  logic [AW-1:0]      rec_waddr;
  logic [TRACE_W-1:0] rec_wdata;

  pulse_sync u_trig_sync (
    .src_clk(clk_sys), .src_rst_n(rst_sys_n), .pulse_in(cap_req || aes_trig_start),
    .dst_clk(clk_smp), .dst_rst_n(rst_smp_n), .pulse_out(cap_start_smp)
  );

  trace_recorder #(.TDC_W(TDC_TAPS), .ALU_W(ALU_W), .DEPTH(DEPTH)) u_rec (
    .clk(clk_smp), .rst_n(rst_smp_n), .start(cap_start_smp), .src(cfg.src),
    .tdc_taps(tdc_taps), .alu_sample(alu_sample),
    .we(rec_we), .waddr(rec_waddr), .wdata(rec_wdata), .busy(rec_busy), .done(rec_done)
  );

  sync_2ff u_busy_sync (.clk(clk_sys), .rst_n(rst_sys_n), .d(rec_busy), .q(cap_busy_sys));

  trace_bram #(.WIDTH(TRACE_W), .DEPTH(DEPTH)) u_bram (
    .wclk(clk_smp), .we(rec_we), .waddr(rec_waddr), .wdata(rec_wdata),
    .rclk(clk_sys), .raddr(mem_raddr), .rdata(mem_rdata)
  );

endmodule
