// rip_core: a reconfigurable arithmetic IP with its packet interface.
//
// The core sits behind a router's local port (through the reconfiguration
// interface) and is used in three steps: (1) a write packet brings the
// operands, (2) a read packet asks for the result, (3) the core answers with
// a result packet to the sender of the read.
//   write packet : MY_ADDR, 6, src, CMD_WRITE, op[31:24], op[23:16], op[15:8], op[7:0]
//   read packet  : MY_ADDR, 2, src, CMD_READ
//   result packet: src, 6, MY_ADDR, CMD_RESULT, r[31:24], r[23:16], r[15:8], r[7:0]
// A write starts the datapath chosen by KIND (arith_mult, arith_div or
// arith_sqrt). A read that arrives before the result is ready is answered as
// soon as it is. Flits are accepted in every cycle (ack_rx = rx); the result
// packet is sent one flit per acknowledged cycle. Packets with another
// command are consumed and ignored. The three-step protocol and the three
// kinds of core follow the Artemis case study; the payload layout is this
// design's own.
module rip_core
  import artemis_pkg::*;
#(
  parameter ip_kind_e   KIND    = IP_MULT,
  parameter logic [7:0] MY_ADDR = 8'h01
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              rx,
  input  logic [FLIT_W-1:0] data_in,
  output logic              ack_rx,
  output logic              tx,
  output logic [FLIT_W-1:0] data_out,
  input  logic              ack_tx
);
  // receive side
  logic [3:0]  rx_idx;       // flit number within the packet
  logic [7:0]  rx_len;
  logic [7:0]  pl [6];       // first six payload flits
  logic        rx_last;

  // datapath
  logic        start, dp_busy, dp_done;
  logic [31:0] dp_result, result;
  logic        result_valid;

  // send side
  logic        read_pending;
  logic [7:0]  reply_to;
  logic        sending;
  logic [3:0]  tx_idx;

  assign ack_rx  = rx;
  assign rx_last = rx && ((rx_idx == 4'd1 && data_in == '0) ||
                          (rx_idx >= 4'd2 && 8'(rx_idx - 4'd1) == rx_len));

  always_ff @(posedge clk) begin
    if (reset) begin
      rx_idx <= '0;
      rx_len <= '0;
      for (int i = 0; i < 6; i++) pl[i] <= '0;
    end else if (rx) begin
      if (rx_idx == 4'd1) rx_len <= data_in;
      if (rx_idx >= 4'd2 && rx_idx < 4'd8) pl[3'(rx_idx - 4'd2)] <= data_in;
      if (rx_last)             rx_idx <= '0;
      else if (rx_idx != 4'hF) rx_idx <= rx_idx + 1'b1;
    end
  end

  // the command is complete when its last flit is received
  logic [7:0] cmd_now, src_now;
  always_comb begin
    cmd_now = (rx_idx == 4'd3) ? data_in : pl[1];
    src_now = (rx_idx == 4'd2) ? data_in : pl[0];
  end
  assign start = rx_last && rx_idx >= 4'd3 && cmd_now == CMD_WRITE && rx_len == 8'd6;

  if (KIND == IP_DIV) begin : g_div
    arith_div u_dp (.clk, .rst(reset), .start, .opnd({pl[2], pl[3], pl[4], data_in}),
                    .busy(dp_busy), .done(dp_done), .result(dp_result));
  end else if (KIND == IP_SQRT) begin : g_sqrt
    arith_sqrt u_dp (.clk, .rst(reset), .start, .opnd({pl[2], pl[3], pl[4], data_in}),
                     .busy(dp_busy), .done(dp_done), .result(dp_result));
  end else begin : g_mult
    arith_mult u_dp (.clk, .rst(reset), .start, .opnd({pl[2], pl[3], pl[4], data_in}),
                     .busy(dp_busy), .done(dp_done), .result(dp_result));
  end

  function automatic logic [7:0] tx_flit(input logic [3:0] i, input logic [7:0] dst,
                                         input logic [31:0] r);
    case (i)
      4'd0:    return dst;
      4'd1:    return 8'd6;
      4'd2:    return MY_ADDR;
      4'd3:    return CMD_RESULT;
      4'd4:    return r[31:24];
      4'd5:    return r[23:16];
      4'd6:    return r[15:8];
      default: return r[7:0];
    endcase
  endfunction

  assign tx       = sending;
  assign data_out = tx_flit(tx_idx, reply_to, result);

  always_ff @(posedge clk) begin
    if (reset) begin
      result       <= '0;
      result_valid <= 1'b0;
      read_pending <= 1'b0;
      reply_to     <= '0;
      sending      <= 1'b0;
      tx_idx       <= '0;
    end else begin
      if (start)   result_valid <= 1'b0;
      if (dp_done) begin
        result       <= dp_result;
        result_valid <= 1'b1;
      end
      if (rx_last && rx_idx >= 4'd3 && cmd_now == CMD_READ) begin
        read_pending <= 1'b1;
        reply_to     <= src_now;
      end
      if (!sending && read_pending && result_valid && !dp_busy) begin
        sending      <= 1'b1;
        tx_idx       <= '0;
        read_pending <= 1'b0;
      end
      if (sending && ack_tx) begin
        if (tx_idx == 4'd7) sending <= 1'b0;
        tx_idx <= tx_idx + 1'b1;
      end
    end
  end

endmodule
