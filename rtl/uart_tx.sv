// uart_tx: 8N1 serial transmitter for the host link.
//
// A byte is accepted when valid and ready are both high; the line then carries
// a start bit (0), the eight data bits LSB first and a stop bit (1), each
// CLKS_PER_BIT clocks long, and ready returns high after the stop bit. The
// line idles high. The default rate (868 clocks per bit, 115200 baud at
// 100 MHz) is this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame_q;   // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    bits_q;    // bits still to send, including the current one
  logic [CW-1:0] cnt_q;

  assign ready = (bits_q == 4'd0);
  assign tx    = frame_q[0];  // frame_q is all ones when idle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '1;
      bits_q  <= '0;
      cnt_q   <= '0;
    end else if (ready) begin
      if (valid) begin
        frame_q <= {1'b1, data, 1'b0};
        bits_q  <= 4'd10;
        cnt_q   <= '0;
      end
    end else if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
      cnt_q   <= '0;
      frame_q <= {1'b1, frame_q[9:1]};
      bits_q  <= bits_q - 4'd1;
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
