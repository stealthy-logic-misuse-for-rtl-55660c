// pulse_sync: carries single-cycle pulses from the src_clk domain to the
// dst_clk domain. Each source pulse flips a toggle flop; the toggle is
// synchronized with two flops and every change seen in the destination gives
// one dst_clk-cycle pulse, three to four dst_clk edges later. Source pulses
// must be further apart than that to be seen separately.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic pulse_in,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic pulse_out
);
  logic tog_q, tog_sync, tog_seen_q;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)    tog_q <= 1'b0;
    else if (pulse_in) tog_q <= ~tog_q;
  end

  sync_2ff u_sync (.clk(dst_clk), .rst_n(dst_rst_n), .d(tog_q), .q(tog_sync));

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      tog_seen_q <= 1'b0;
      pulse_out  <= 1'b0;
    end else begin
      tog_seen_q <= tog_sync;
      pulse_out  <= tog_sync ^ tog_seen_q;
    end
  end
endmodule
