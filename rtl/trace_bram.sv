// trace_bram: simple dual-port block RAM with independent write and read
// clocks that holds one recorded trace.
//
// The write port (wclk) is driven by the trace recorder in the sampling clock
// domain; the read port (rclk) by the host controller in the system clock
// domain. The read is registered: rdata shows mem[raddr] one rclk edge after
// raddr is presented. Written as an array so that FPGA tools map it to block
// RAM. Depth and width are set by the instantiating design.
module trace_bram #(
  parameter int unsigned WIDTH = 192,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
