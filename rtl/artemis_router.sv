// artemis_router: five-port Artemis router (East, West, North, South, Local).
//
// A Hermes-style wormhole router extended with the services a dynamically
// reconfigured area needs. Each input port has a FIFO whose entries hold a
// flit plus its ctrl bit. A central switch allocator looks, round robin, at
// one input per cycle whose head flit is a header not yet routed; it routes
// it XY (X first, then Y) and, if the chosen output is free, connects input
// to output. The connection carries the header, the length flit and that
// many payload flits, then is released.
//
// Control packets (ctrl = 1 on every flit) travel like data packets. The
// router they address absorbs them at its local output instead of passing
// them to the local IP, and executes the command in the first payload flit:
// CTL_INSULATE sets the insulated state, CTL_RECONNECT clears it.
// While insulated: reconf is high (the core is held in reset and its outputs
// gated off by the interface macros), the local input ignores rx, and data
// packets routed to the local port are discarded flit by flit.
//
// Links: a flit moves in a cycle where tx and ack are both high; ack is
// driven by the receiver as rx AND (buffer not full). One flit per cycle per
// port. A header written into an input buffer in cycle t is at its head in
// t+1, can be routed in t+1 and leaves the output in t+2.
// The ctrl sideband, the three services and the local-port behaviour follow
// the Artemis design; routing, arbitration, buffer depth, packet layout and
// handshake timing are this design's choices in the manner of Hermes.
module artemis_router
  import artemis_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rx       [NPORTS],
  output logic  ack_rx   [NPORTS],
  input  flit_t data_in  [NPORTS],
  output logic  tx       [NPORTS],
  input  logic  ack_tx   [NPORTS],
  output flit_t data_out [NPORTS],
  output logic  reconf
);
  localparam logic [3:0] MY_X = 4'(X);
  localparam logic [3:0] MY_Y = 4'(Y);

  typedef enum logic [1:0] {PH_HEADER, PH_SIZE, PH_PAYLOAD} phase_e;
  typedef enum logic [1:0] {LM_FORWARD, LM_CONTROL, LM_DISCARD} lmode_e;

  // input buffers
  flit_t head  [NPORTS];
  logic  empty [NPORTS];
  logic  pop   [NPORTS];
  logic  rx_eff[NPORTS];

  // per input connection state
  logic              in_busy  [NPORTS];
  port_e             in_out   [NPORTS];
  phase_e            in_phase [NPORTS];
  logic [FLIT_W-1:0] in_rem   [NPORTS];

  // per output state
  logic        out_busy [NPORTS];
  logic [2:0]  out_src  [NPORTS];

  // local output mode and control packet decoding
  lmode_e            lmode;
  logic              insulated;
  logic [FLIT_W-1:0] ctl_cmd;
  logic              ctl_cmd_valid;

  // switch allocator
  logic [2:0] rr_ptr;
  port_e      route_out;
  logic       grant;

  assign reconf = insulated;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    // the local input is closed while the area is insulated
    if (p == int'(P_LOCAL)) begin : g_loc
      assign rx_eff[p] = rx[p] && !insulated;
    end else begin : g_net
      assign rx_eff[p] = rx[p];
    end
    artemis_buffer #(.W($bits(flit_t)), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst,
      .rx(rx_eff[p]), .ack_rx(ack_rx[p]), .din(data_in[p]),
      .head(head[p]), .empty(empty[p]), .pop(pop[p])
    );
  end

  // XY routing of the header at the head of the input under the pointer
  function automatic port_e xy_route(input logic [7:0] hdr);
    logic [3:0] tx_, ty_;
    tx_ = hdr[7:4];
    ty_ = hdr[3:0];
    if (tx_ != MY_X) return (tx_ > MY_X) ? P_EAST : P_WEST;
    if (ty_ != MY_Y) return (ty_ > MY_Y) ? P_NORTH : P_SOUTH;
    return P_LOCAL;
  endfunction

  always_comb begin
    route_out = xy_route(head[rr_ptr].data);
    grant     = !empty[rr_ptr] && !in_busy[rr_ptr] && !out_busy[route_out];
  end

  // output side: flits leave from the connected input's head
  logic absorb;  // local output swallows the packet (control or discard)
  assign absorb = (lmode != LM_FORWARD);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      data_out[o] = head[out_src[o]];
      tx[o]       = out_busy[o] && !empty[out_src[o]];
      if (o == int'(P_LOCAL) && absorb) tx[o] = 1'b0;
    end
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      if (in_busy[i] && !empty[i]) begin
        if (in_out[i] == P_LOCAL && absorb) pop[i] = 1'b1;
        else                                pop[i] = ack_tx[in_out[i]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr_ptr        <= '0;
      insulated     <= 1'b0;
      lmode         <= LM_FORWARD;
      ctl_cmd       <= '0;
      ctl_cmd_valid <= 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        in_busy[p]  <= 1'b0;
        in_out[p]   <= P_LOCAL;
        in_phase[p] <= PH_HEADER;
        in_rem[p]   <= '0;
        out_busy[p] <= 1'b0;
        out_src[p]  <= '0;
      end
    end else begin
      // allocation: one header considered per cycle, round robin
      rr_ptr <= (rr_ptr == 3'(NPORTS-1)) ? '0 : rr_ptr + 1'b1;
      if (grant) begin
        in_busy[rr_ptr]    <= 1'b1;
        in_out[rr_ptr]     <= route_out;
        in_phase[rr_ptr]   <= PH_HEADER;
        out_busy[route_out] <= 1'b1;
        out_src[route_out]  <= rr_ptr;
        if (route_out == P_LOCAL) begin
          if (head[rr_ptr].ctrl) lmode <= LM_CONTROL;
          else if (insulated)    lmode <= LM_DISCARD;
          else                   lmode <= LM_FORWARD;
          ctl_cmd_valid <= 1'b0;
        end
      end
      // flit transfer bookkeeping
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i]) begin
          logic last;
          last = 1'b0;
          unique case (in_phase[i])
            PH_HEADER: in_phase[i] <= PH_SIZE;
            PH_SIZE: begin
              in_rem[i]   <= head[i].data;
              in_phase[i] <= PH_PAYLOAD;
              last = (head[i].data == '0);
            end
            default: begin
              in_rem[i] <= in_rem[i] - 1'b1;
              last = (in_rem[i] == 8'd1);
              if (in_out[i] == P_LOCAL && lmode == LM_CONTROL && !ctl_cmd_valid) begin
                ctl_cmd       <= head[i].data;
                ctl_cmd_valid <= 1'b1;
              end
            end
          endcase
          if (last) begin
            in_busy[i]          <= 1'b0;
            in_phase[i]         <= PH_HEADER;
            out_busy[in_out[i]] <= 1'b0;
            if (in_out[i] == P_LOCAL) begin
              lmode <= LM_FORWARD;
              if (lmode == LM_CONTROL) begin
                // the command is the first payload flit; it may be this one
                logic [FLIT_W-1:0] cmd;
                cmd = ctl_cmd_valid ? ctl_cmd : head[i].data;
                if (in_phase[i] == PH_SIZE) cmd = '0;  // empty control packet
                if (cmd == CTL_INSULATE)  insulated <= 1'b1;
                if (cmd == CTL_RECONNECT) insulated <= 1'b0;
              end
            end
          end
        end
      end
    end
  end

  // a flit on a link must not change while it waits for ack
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (rst)
      (tx[o] && !ack_tx[o]) |=> (tx[o] && data_out[o] == $past(data_out[o])));
  end

endmodule
