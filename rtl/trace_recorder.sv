// trace_recorder: writes one trace of DEPTH consecutive sensor samples into
// the trace BRAM.
//
// A start pulse (from the victim's start signal or a host command) begins a
// capture if none is running. From the next clock edge on, one sample is
// written per clock, at addresses 0 .. DEPTH-1, taken from the TDC taps or the
// ALU sensor sample as src selects (the narrower source is zero-extended). busy
// is high while the capture runs, done pulses for one cycle after the last
// write. Runs in the sampling clock domain (150 MHz). The trigger scheme and
// the fixed trace length are this design's choices.
module trace_recorder
  import sensor_pkg::*;
#(
  parameter int unsigned TDC_W = 128,
  parameter int unsigned ALU_W = 192,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned WIDTH = (TDC_W > ALU_W) ? TDC_W : ALU_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  trace_src_e       src,
  input  logic [TDC_W-1:0] tdc_taps,
  input  logic [ALU_W-1:0] alu_sample,
  output logic             we,
  output logic [AW-1:0]    waddr,
  output logic [WIDTH-1:0] wdata,
  output logic             busy,
  output logic             done
);

  always_comb begin
    wdata = '0;
    if (src == SRC_ALU) wdata[ALU_W-1:0] = alu_sample;
    else                wdata[TDC_W-1:0] = tdc_taps;
  end

  assign we = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      waddr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          waddr <= '0;
        end
      end else begin
        if (waddr == AW'(DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
    end
  end

endmodule
