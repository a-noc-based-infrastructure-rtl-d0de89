// cc_h: hardware configuration controller (CC-H) of the Artemis-based system.
//
// Connected to a router's local port (with the ctrl sideband), to the
// external SRAM that holds the partial bitstreams and to the FPGA's internal
// configuration access port (ICAP). On a request packet
//   MY_ADDR, 3, src, CMD_RECONF_REQ, slot
// it (1) sends the control packet {REGION_ADDR, 1, CTL_INSULATE} (ctrl = 1)
// that makes the area's router disconnect and hold the area in reset,
// (2) reads the three length bytes at the start of bitstream slot `slot`
// (slot k begins at byte k * floor(2^SRAM_AW / MAX_BITSTREAMS)) and copies
// that many following bytes from SRAM to ICAP, (3) sends the control packet
// {REGION_ADDR, 1, CTL_RECONNECT}, and (4) answers the requester with
// {src, 3, MY_ADDR, CMD_RECONF_ACK, REGION_ADDR}, the address where the core
// now is. Requests for a slot beyond MAX_BITSTREAMS, and flits marked as
// control packets, are dropped.
//
// Timing: each byte takes BYTE_CYCLES clock cycles: the SRAM address is held
// for the whole byte time, data is sampled in the next-to-last cycle and
// written to ICAP (CE and WRITE low) in the last one, which is stretched
// while icap_busy is high. Packets go out one flit per acknowledged cycle.
// The four-step protocol, the SRAM and ICAP as source and sink and the
// five-cycle byte time (the measured reconfiguration times correspond to
// about five cycles per bitstream byte at 50 MHz) follow the Artemis case
// study; slot layout, length header and packet layout are this design's own.
module cc_h
  import artemis_pkg::*;
#(
  parameter logic [7:0] MY_ADDR        = 8'h11,
  parameter logic [7:0] REGION_ADDR    = 8'h01,
  parameter int         BYTE_CYCLES    = 5,
  parameter int         SRAM_AW        = 20,
  parameter int         MAX_BITSTREAMS = 10
) (
  input  logic               clk,
  input  logic               rst,
  // router local port
  input  logic               rx,
  input  flit_t              data_in,
  output logic               ack_rx,
  output logic               tx,
  output flit_t              data_out,
  input  logic               ack_tx,
  // external configuration memory (asynchronous SRAM, read only)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe_n,
  input  logic [7:0]         sram_data,
  // ICAP
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [7:0]         icap_din,
  input  logic               icap_busy,
  // status
  output logic               busy
);
  localparam int SLOT_BYTES = (2 ** SRAM_AW) / MAX_BITSTREAMS;
  localparam int CW         = $clog2(BYTE_CYCLES + 1);

  typedef enum logic [2:0] {
    S_RECV, S_SEND_INS, S_LEN, S_STREAM, S_SEND_REC, S_SEND_ACK
  } state_e;

  state_e             state;
  logic [3:0]         rx_idx;
  logic [7:0]         req_src, req_cmd, rx_len;
  logic               rx_last;
  logic [2:0]         tx_idx;
  logic [2:0]         tx_len;
  logic [SRAM_AW-1:0] addr;
  logic [23:0]        remaining;
  logic [1:0]         len_idx;
  logic [CW-1:0]      cyc;
  logic [7:0]         byte_q;
  logic               byte_end;

  // ---------------------------------------------------------------- receive
  assign ack_rx  = rx && (state == S_RECV);
  assign rx_last = ack_rx && ((rx_idx == 4'd1 && data_in.data == '0) ||
                             (rx_idx >= 4'd2 && 8'(rx_idx - 4'd1) == rx_len));

  // ------------------------------------------------------------------- send
  function automatic flit_t out_flit(input state_e st, input logic [2:0] i,
                                     input logic [7:0] dst);
    flit_t f;
    f.ctrl = (st != S_SEND_ACK);
    if (st == S_SEND_ACK) begin
      case (i)
        3'd0:    f.data = dst;
        3'd1:    f.data = 8'd3;
        3'd2:    f.data = MY_ADDR;
        3'd3:    f.data = CMD_RECONF_ACK;
        default: f.data = REGION_ADDR;
      endcase
    end else begin
      case (i)
        3'd0:    f.data = REGION_ADDR;
        3'd1:    f.data = 8'd1;
        default: f.data = (st == S_SEND_INS) ? CTL_INSULATE : CTL_RECONNECT;
      endcase
    end
    return f;
  endfunction

  assign tx       = (state == S_SEND_INS) || (state == S_SEND_REC) || (state == S_SEND_ACK);
  assign data_out = out_flit(state, tx_idx, req_src);
  assign tx_len   = (state == S_SEND_ACK) ? 3'd5 : 3'd3;

  // ------------------------------------------------------- SRAM -> ICAP copy
  assign sram_addr    = addr;
  assign sram_oe_n    = !((state == S_LEN) || (state == S_STREAM));
  assign byte_end     = (cyc == CW'(BYTE_CYCLES - 1));
  assign icap_din     = byte_q;
  assign icap_ce_n    = !((state == S_STREAM) && byte_end);
  assign icap_write_n = icap_ce_n;
  assign busy         = (state != S_RECV);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_RECV;
      rx_idx    <= '0;
      req_src   <= '0;
      req_cmd   <= '0;
      rx_len    <= '0;
      tx_idx    <= '0;
      addr      <= '0;
      remaining <= '0;
      len_idx   <= '0;
      cyc       <= '0;
      byte_q    <= '0;
    end else begin
      unique case (state)
        S_RECV: if (ack_rx) begin
          if (rx_idx == 4'd2) req_src <= data_in.data;
          if (rx_idx == 4'd3) req_cmd <= data_in.data;
          if (rx_idx == 4'd1) rx_len <= data_in.data;
          if (rx_last)             rx_idx <= '0;
          else if (rx_idx != 4'hF) rx_idx <= rx_idx + 1'b1;
          // a request is exactly: src, CMD_RECONF_REQ, slot
          if (rx_last && rx_idx == 4'd4 && req_cmd == CMD_RECONF_REQ && !data_in.ctrl &&
              data_in.data < 8'(MAX_BITSTREAMS)) begin
            state  <= S_SEND_INS;
            tx_idx <= '0;
            addr   <= SRAM_AW'(int'(data_in.data) * SLOT_BYTES);
          end
        end

        S_SEND_INS, S_SEND_REC, S_SEND_ACK: if (ack_tx) begin
          tx_idx <= tx_idx + 1'b1;
          if (tx_idx == tx_len - 1'b1) begin
            tx_idx <= '0;
            if (state == S_SEND_INS) begin
              state   <= S_LEN;
              len_idx <= '0;
              cyc     <= '0;
            end else if (state == S_SEND_REC) begin
              state <= S_SEND_ACK;
            end else begin
              state <= S_RECV;
            end
          end
        end

        S_LEN: begin
          cyc <= cyc + 1'b1;
          if (cyc == CW'(BYTE_CYCLES - 2)) byte_q <= sram_data;
          if (byte_end) begin
            cyc       <= '0;
            addr      <= addr + 1'b1;
            remaining <= {remaining[15:0], byte_q};
            len_idx   <= len_idx + 1'b1;
            if (len_idx == 2'd2) begin
              state <= ({remaining[15:0], byte_q} == '0) ? S_SEND_REC : S_STREAM;
            end
          end
        end

        S_STREAM: begin
          if (!byte_end) begin
            cyc <= cyc + 1'b1;
            if (cyc == CW'(BYTE_CYCLES - 2)) byte_q <= sram_data;
          end else if (!icap_busy) begin
            cyc       <= '0;
            addr      <= addr + 1'b1;
            remaining <= remaining - 1'b1;
            if (remaining == 24'd1) state <= S_SEND_REC;
          end
        end

        default: state <= S_RECV;
      endcase
    end
  end

  a_byte_cycles: assert property (@(posedge clk) disable iff (rst) BYTE_CYCLES >= 2);

endmodule
