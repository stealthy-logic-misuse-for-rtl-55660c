// host_controller: command decoder and response sequencer between the host
// workstation's UART link and the on-chip blocks.
//
// The host sends one command byte followed by its arguments (see cmd_e in
// sensor_pkg):
//   CMD_ENCRYPT     16 plaintext bytes (byte 0 first). The AES core is started
//                   (its start signal also triggers a trace capture); when it
//                   finishes the 16 ciphertext bytes are sent back.
//   CMD_SET_OPERAND an index byte (OPND_A_RST, OPND_B_RST, OPND_A_MEAS,
//                   OPND_B_MEAS) and OP_W/8 bytes, most significant first:
//                   the ALU sensor's reset and measure operands.
//   CMD_SET_CONFIG  one byte laid out as cfg_t: trace source, RO mode,
//                   reset-cycle and measure-cycle ALU operation.
//   CMD_CAPTURE     start a capture at once (for the RO experiment).
//   CMD_READ_TRACE  once no capture is running, the DEPTH trace samples are
//                   sent, sample 0 first, each as ceil(TRACE_W/8) bytes, most
//                   significant first.
// Unknown command bytes are ignored. The published setup only says that the
// inputs for the ALU and the AES and the RO enable arrive over RX and that
// ciphertexts and traces leave over TX; the byte protocol is this design's.
// After reset the operands are a_rst = all ones, b_rst = 0, a_meas = all
// ones, b_meas = 1, both operations add: the measure cycle overflows and
// drives the carry through the whole adder. The trace source is the ALU.
//
// Interface: rx_data/rx_valid from the receiver; tx_data/tx_valid/tx_ready to
// the transmitter (a byte moves when valid and ready are high at a clock
// edge); aes_start is a one-cycle pulse; cap_req a one-cycle pulse; cap_busy
// must already be synchronized to clk; mem_rdata is registered one clock
// after mem_raddr.
module host_controller
  import sensor_pkg::*;
#(
  parameter int unsigned OP_W    = 192,
  parameter int unsigned TRACE_W = 192,
  parameter int unsigned DEPTH   = 128,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // UART
  input  logic [7:0]         rx_data,
  input  logic               rx_valid,
  output logic [7:0]         tx_data,
  output logic               tx_valid,
  input  logic               tx_ready,
  // victim AES
  output logic               aes_start,
  output logic [127:0]       aes_pt,
  input  logic               aes_busy,
  input  logic               aes_done,
  input  logic [127:0]       aes_ct,
  // ALU sensor and RO configuration
  output logic [OP_W-1:0]    a_rst,
  output logic [OP_W-1:0]    b_rst,
  output logic [OP_W-1:0]    a_meas,
  output logic [OP_W-1:0]    b_meas,
  output cfg_t               cfg,
  // trace capture and readout
  output logic               cap_req,
  input  logic               cap_busy,
  output logic [AW-1:0]      mem_raddr,
  input  logic [TRACE_W-1:0] mem_rdata
);

  localparam int unsigned OP_BYTES    = OP_W / 8;
  localparam int unsigned TRACE_BYTES = (TRACE_W + 7) / 8;
  localparam int unsigned ARG_W       = (8 * (OP_BYTES + 1) > 128) ? 8 * (OP_BYTES + 1) : 128;
  localparam int unsigned TX_BYTES    = (TRACE_BYTES > 16) ? TRACE_BYTES : 16;
  localparam int unsigned TX_W        = 8 * TX_BYTES;
  localparam int unsigned NW          = $clog2(TX_BYTES + OP_BYTES + 2);

  typedef enum logic [3:0] {
    S_IDLE, S_ARGS, S_EXEC, S_AES_WAIT, S_SEND, S_RD_WAIT, S_RD_ADDR, S_RD_LOAD
  } state_e;

  state_e          state_q;
  cmd_e            cmd_q;
  logic [ARG_W-1:0] arg_q;
  logic [NW-1:0]   need_q;      // argument bytes still expected
  logic [TX_W-1:0] txsh_q;      // bytes to send, next one in the top byte
  logic [NW-1:0]   left_q;      // bytes still to send
  logic            reading_q;   // S_SEND is sending trace samples

  assign tx_valid = (state_q == S_SEND);
  assign tx_data  = txsh_q[TX_W-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cmd_q     <= CMD_CAPTURE;
      arg_q     <= '0;
      need_q    <= '0;
      txsh_q    <= '0;
      left_q    <= '0;
      reading_q <= 1'b0;
      aes_start <= 1'b0;
      aes_pt    <= '0;
      cap_req   <= 1'b0;
      mem_raddr <= '0;
      a_rst     <= '1;
      b_rst     <= '0;
      a_meas    <= '1;
      b_meas    <= OP_W'(1);
      cfg       <= '{unused: 4'h0, op_meas: ALU_ADD, op_rst: ALU_ADD, ro_mode: 1'b0, src: SRC_ALU};
    end else begin
      aes_start <= 1'b0;
      cap_req   <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (rx_valid) begin
            cmd_q <= cmd_e'(rx_data);
            unique case (rx_data)
              CMD_ENCRYPT:     begin need_q <= NW'(16);           state_q <= S_ARGS; end
              CMD_SET_OPERAND: begin need_q <= NW'(OP_BYTES + 1); state_q <= S_ARGS; end
              CMD_SET_CONFIG:  begin need_q <= NW'(1);            state_q <= S_ARGS; end
              CMD_CAPTURE:     cap_req <= 1'b1;
              CMD_READ_TRACE:  state_q <= S_RD_WAIT;
              default:         ;
            endcase
          end
        end
        S_ARGS: begin
          if (rx_valid) begin
            arg_q  <= {arg_q[ARG_W-9:0], rx_data};
            need_q <= need_q - 1'b1;
            if (need_q == NW'(1)) state_q <= S_EXEC;
          end
        end
        S_EXEC: begin
          state_q <= S_IDLE;
          unique case (cmd_q)
            CMD_ENCRYPT: begin
              if (!aes_busy) begin
                aes_pt    <= arg_q[127:0];
                aes_start <= 1'b1;
                state_q   <= S_AES_WAIT;
              end else begin
                state_q   <= S_EXEC;     // wait for a running encryption
              end
            end
            CMD_SET_OPERAND: begin
              unique case (int'(arg_q[OP_W +: 8]))
                OPND_A_RST:  a_rst  <= arg_q[OP_W-1:0];
                OPND_B_RST:  b_rst  <= arg_q[OP_W-1:0];
                OPND_A_MEAS: a_meas <= arg_q[OP_W-1:0];
                OPND_B_MEAS: b_meas <= arg_q[OP_W-1:0];
                default:     ;
              endcase
            end
            CMD_SET_CONFIG: cfg <= cfg_t'(arg_q[7:0]);
            default: ;
          endcase
        end
        S_AES_WAIT: begin
          if (aes_done) begin
            txsh_q    <= TX_W'(aes_ct) << (TX_W - 128);
            left_q    <= NW'(16);
            reading_q <= 1'b0;
            state_q   <= S_SEND;
          end
        end
        S_SEND: begin
          if (tx_ready) begin
            txsh_q <= txsh_q << 8;
            left_q <= left_q - 1'b1;
            if (left_q == NW'(1)) begin
              if (reading_q && mem_raddr != AW'(DEPTH - 1)) begin
                mem_raddr <= mem_raddr + 1'b1;
                state_q   <= S_RD_ADDR;
              end else begin
                reading_q <= 1'b0;
                state_q   <= S_IDLE;
              end
            end
          end
        end
        S_RD_WAIT: begin
          if (!cap_busy) begin
            mem_raddr <= '0;
            reading_q <= 1'b1;
            state_q   <= S_RD_ADDR;
          end
        end
        S_RD_ADDR: state_q <= S_RD_LOAD;   // the BRAM registers mem_raddr
        S_RD_LOAD: begin
          txsh_q  <= TX_W'(mem_rdata) << (TX_W - 8 * TRACE_BYTES);
          left_q  <= NW'(TRACE_BYTES);
          state_q <= S_SEND;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A byte offered to the transmitter stays unchanged until it is taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_valid && !tx_ready |=> tx_valid && $stable(tx_data))
    else $error("tx byte changed before it was accepted");

endmodule
