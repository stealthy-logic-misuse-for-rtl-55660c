// aes_core: the victim tenant's AES-128 encryption core with a built-in
// secret key and four S-boxes.
//
// The published setup runs an AES core at 100 MHz that "uses four parallel
// SBoxes per clock cycle" and signals the start and end of each encryption to
// the attacker's sensors. This implementation is column-serial so that four
// S-boxes suffice:
//   load cycle      state <= plaintext ^ key (initial AddRoundKey)
//   per round, 5 cycles:
//     step 0        the S-boxes substitute RotWord(w3) of the round key and the
//                   next round key is formed on the fly
//     steps 1..4    the S-boxes substitute state column 0..3; at step 4 the
//                   substituted state goes through ShiftRows, MixColumns
//                   (skipped in round 10) and AddRoundKey in the same cycle.
// Latency: the edge that accepts start loads the state, the next 50 edges run
// the ten rounds, and done is high in the cycle after the last of them, i.e.
// 50 cycles after busy rises. The key is the parameter SECRET_KEY; its size
// (128 bits) and the serial schedule are this design's choices.
//
// Interface: start is honoured when busy is low. trig_start pulses for one
// cycle when an encryption begins, done (also trig_end) pulses for one cycle
// when ciphertext is valid; ciphertext holds until the next encryption ends.
// Bytes are in FIPS-197 order: byte 0 is bits [127:120].
module aes_core #(
  parameter logic [127:0] SECRET_KEY = 128'h000102030405060708090a0b0c0d0e0f
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  output logic         busy,
  output logic         done,
  output logic [127:0] ciphertext,
  output logic         trig_start,
  output logic         trig_end
);

  localparam int unsigned ROUNDS = 10;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] get_byte(input logic [127:0] s, input int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic logic [31:0] mix_column(input logic [31:0] col);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  logic [127:0] state_q;
  logic [127:0] rk_q;
  logic [95:0]  sub_q;      // substituted columns 0..2 of the current round
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;
  logic [2:0]   step_q;

  logic [31:0]  sbox_in, sbox_out;
  logic [127:0] rk_next;
  logic [127:0] round_out;

  for (genvar g = 0; g < 4; g++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(sbox_in[31 - 8*g -: 8]), .out_byte(sbox_out[31 - 8*g -: 8]));
  end

  // The four S-boxes serve the key schedule in step 0 and a state column after.
  always_comb begin
    if (step_q == 3'd0) sbox_in = {rk_q[23:0], rk_q[31:24]};   // RotWord(w3)
    else                sbox_in = state_q[127 - 32*(int'(step_q) - 1) -: 32];
  end

  always_comb begin
    logic [31:0] w0, w1, w2, w3, t;
    logic [127:0] sr;
    {w0, w1, w2, w3} = rk_q;
    t       = sbox_out ^ {rcon_q, 24'h0};
    rk_next = {w0 ^ t, w0 ^ t ^ w1, w0 ^ t ^ w1 ^ w2, w0 ^ t ^ w1 ^ w2 ^ w3};
    sr        = shift_rows({sub_q, sbox_out});
    round_out = ((round_q == 4'(ROUNDS)) ? sr : mix_columns(sr)) ^ rk_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= '0;
      rk_q       <= '0;
      sub_q      <= '0;
      rcon_q     <= 8'h01;
      round_q    <= '0;
      step_q     <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      trig_start <= 1'b0;
      ciphertext <= '0;
    end else begin
      done       <= 1'b0;
      trig_start <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q    <= plaintext ^ SECRET_KEY;
          rk_q       <= SECRET_KEY;
          rcon_q     <= 8'h01;
          round_q    <= 4'd1;
          step_q     <= 3'd0;
          busy       <= 1'b1;
          trig_start <= 1'b1;
        end
      end else begin
        unique case (step_q)
          3'd0: begin
            rk_q   <= rk_next;
            rcon_q <= xtime(rcon_q);
            step_q <= 3'd1;
          end
          3'd1, 3'd2, 3'd3: begin
            sub_q[95 - 32*(int'(step_q) - 1) -: 32] <= sbox_out;
            step_q <= step_q + 3'd1;
          end
          default: begin
            state_q <= round_out;
            step_q  <= 3'd0;
            if (round_q == 4'(ROUNDS)) begin
              busy       <= 1'b0;
              done       <= 1'b1;
              ciphertext <= round_out;
            end else begin
              round_q <= round_q + 4'd1;
            end
          end
        endcase
      end
    end
  end

  assign trig_end = done;

endmodule
