// uart_rx: 8N1 serial receiver for the host link.
//
// The rx line is synchronized with two flops. A falling edge starts a frame;
// the start bit is checked at its middle, then the eight data bits (LSB first)
// are sampled at their middles, CLKS_PER_BIT clocks apart, and the stop bit is
// checked. On a good stop bit data is presented with a one-cycle valid pulse;
// on a bad one frame_err pulses instead. The published setup uses UART without
// giving a rate; the default of 868 clocks per bit is 115200 baud at 100 MHz,
// this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic [2:0]    bit_q;
  logic [7:0]    shreg_q;
  logic          rx_meta_q, rx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta_q <= 1'b1;
      rx_q      <= 1'b1;
    end else begin
      rx_meta_q <= rx;
      rx_q      <= rx_meta_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cnt_q     <= '0;
      bit_q     <= '0;
      shreg_q   <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          cnt_q <= '0;
          if (!rx_q) state_q <= S_START;
        end
        S_START: begin
          if (cnt_q == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q   <= '0;
            bit_q   <= '0;
            state_q <= rx_q ? S_IDLE : S_DATA;   // glitch: back to idle
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            shreg_q <= {rx_q, shreg_q[7:1]};
            bit_q   <= bit_q + 1'b1;
            if (bit_q == 3'd7) state_q <= S_STOP;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            state_q <= S_IDLE;
            if (rx_q) begin
              data  <= shreg_q;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
