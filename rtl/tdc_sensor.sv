// tdc_sensor: delay-line voltage sensor (time-to-digital converter), the
// established reference sensor the ALU sensor is compared against.
//
// The launch signal (on the FPGA the sampling clock itself) passes through
// PRE_STAGES LUT buffer stages and then a carry chain of TAPS multiplexer
// stages whose select inputs are tied to "propagate". Every chain output is
// captured by a register on the rising edge of clk. How far the edge of the
// launch signal has travelled when clk rises depends on the supply voltage, so
// the number of ones in the captured word tracks the voltage. BUF_STAGES
// further register stages follow the capture registers; they decouple the
// capture flops from downstream logic and shift the TDC trace by that many
// samples against the ALU trace.
// In a zero-delay simulation every tap carries the launch value at the clock
// edge; the delay-dependent behaviour exists only on silicon.
// The structure follows the usual FPGA delay-line sensor (LUT stages feeding a
// carry chain tapped into registers). The chain length and the number of
// buffer stages are this design's choices.
//
// Interface: taps[i] is chain output i, registered; latency 1 + BUF_STAGES
// clk cycles from capture to output.
module tdc_sensor #(
  parameter int unsigned TAPS       = 128,
  parameter int unsigned PRE_STAGES = 2,
  parameter int unsigned BUF_STAGES = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            launch,
  output logic [TAPS-1:0] taps
);

  logic [PRE_STAGES:0] pre;
  logic [TAPS:0]       chain;
  logic [TAPS-1:0]     cap_q;

  // LUT / latch stages in front of the carry chain.
  assign pre[0] = launch;
  for (genvar s = 0; s < PRE_STAGES; s++) begin : g_pre
    (* dont_touch = "true" *) logic lut_out;
    assign lut_out  = pre[s];
    assign pre[s+1] = lut_out;
  end

  // Carry chain: each stage is a carry multiplexer with select = propagate,
  // so the carry input passes through to the next stage.
  logic [TAPS-1:0] prop;
  logic [TAPS-1:0] gen;
  assign prop    = '1;
  assign gen     = '0;
  assign chain[0] = pre[PRE_STAGES];
  for (genvar i = 0; i < TAPS; i++) begin : g_chain
    assign chain[i+1] = prop[i] ? chain[i] : gen[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cap_q <= '0;
    else        cap_q <= chain[TAPS:1];
  end

  if (BUF_STAGES == 0) begin : g_nobuf
    assign taps = cap_q;
  end else begin : g_buf
    logic [TAPS-1:0] buf_q [BUF_STAGES];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < BUF_STAGES; k++) buf_q[k] <= '0;
      end else begin
        buf_q[0] <= cap_q;
        for (int k = 1; k < BUF_STAGES; k++) buf_q[k] <= buf_q[k-1];
      end
    end
    assign taps = buf_q[BUF_STAGES-1];
  end

endmodule
