// artemis_noc: X_SIZE x Y_SIZE mesh of Artemis routers.
//
// Router (x, y) has address {x, y} (one hex digit each); x grows to the east,
// y to the north. East/west and north/south ports of neighbours are wired
// together, ports at the mesh edge are tied off. The local port of every
// router, with its ctrl sideband, and each router's reconf output are brought
// out as arrays indexed by x*Y_SIZE + y. Purely structural; timing is that of
// the routers. The 2x2 size follows the Artemis case study.
module artemis_noc
  import artemis_pkg::*;
#(
  parameter int X_SIZE    = 2,
  parameter int Y_SIZE    = 2,
  parameter int BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  l_rx       [X_SIZE*Y_SIZE],
  output logic  l_ack_rx   [X_SIZE*Y_SIZE],
  input  flit_t l_data_in  [X_SIZE*Y_SIZE],
  output logic  l_tx       [X_SIZE*Y_SIZE],
  input  logic  l_ack_tx   [X_SIZE*Y_SIZE],
  output flit_t l_data_out [X_SIZE*Y_SIZE],
  output logic  reconf     [X_SIZE*Y_SIZE]
);
  localparam int N = X_SIZE * Y_SIZE;

  logic  rx     [N][NPORTS];
  logic  ack_rx [N][NPORTS];
  flit_t din    [N][NPORTS];
  logic  tx     [N][NPORTS];
  logic  ack_tx [N][NPORTS];
  flit_t dout   [N][NPORTS];

  for (genvar x = 0; x < X_SIZE; x++) begin : g_x
    for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
      localparam int R = x * Y_SIZE + y;

      artemis_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst,
        .rx(rx[R]), .ack_rx(ack_rx[R]), .data_in(din[R]),
        .tx(tx[R]), .ack_tx(ack_tx[R]), .data_out(dout[R]),
        .reconf(reconf[R])
      );

      // local port
      assign rx[R][P_LOCAL]     = l_rx[R];
      assign din[R][P_LOCAL]    = l_data_in[R];
      assign l_ack_rx[R]        = ack_rx[R][P_LOCAL];
      assign l_tx[R]            = tx[R][P_LOCAL];
      assign l_data_out[R]      = dout[R][P_LOCAL];
      assign ack_tx[R][P_LOCAL] = l_ack_tx[R];

      // east neighbour (x+1, y)
      if (x < X_SIZE-1) begin : g_e
        localparam int E = (x+1) * Y_SIZE + y;
        assign rx[R][P_EAST]     = tx[E][P_WEST];
        assign din[R][P_EAST]    = dout[E][P_WEST];
        assign ack_tx[R][P_EAST] = ack_rx[E][P_WEST];
      end else begin : g_e_edge
        assign rx[R][P_EAST]     = 1'b0;
        assign din[R][P_EAST]    = '0;
        assign ack_tx[R][P_EAST] = 1'b0;
      end
      // west neighbour (x-1, y)
      if (x > 0) begin : g_w
        localparam int W = (x-1) * Y_SIZE + y;
        assign rx[R][P_WEST]     = tx[W][P_EAST];
        assign din[R][P_WEST]    = dout[W][P_EAST];
        assign ack_tx[R][P_WEST] = ack_rx[W][P_EAST];
      end else begin : g_w_edge
        assign rx[R][P_WEST]     = 1'b0;
        assign din[R][P_WEST]    = '0;
        assign ack_tx[R][P_WEST] = 1'b0;
      end
      // north neighbour (x, y+1)
      if (y < Y_SIZE-1) begin : g_n
        localparam int NB = x * Y_SIZE + y + 1;
        assign rx[R][P_NORTH]     = tx[NB][P_SOUTH];
        assign din[R][P_NORTH]    = dout[NB][P_SOUTH];
        assign ack_tx[R][P_NORTH] = ack_rx[NB][P_SOUTH];
      end else begin : g_n_edge
        assign rx[R][P_NORTH]     = 1'b0;
        assign din[R][P_NORTH]    = '0;
        assign ack_tx[R][P_NORTH] = 1'b0;
      end
      // south neighbour (x, y-1)
      if (y > 0) begin : g_s
        localparam int S = x * Y_SIZE + y - 1;
        assign rx[R][P_SOUTH]     = tx[S][P_NORTH];
        assign din[R][P_SOUTH]    = dout[S][P_NORTH];
        assign ack_tx[R][P_SOUTH] = ack_rx[S][P_NORTH];
      end else begin : g_s_edge
        assign rx[R][P_SOUTH]     = 1'b0;
        assign din[R][P_SOUTH]    = '0;
        assign ack_tx[R][P_SOUTH] = 1'b0;
      end
    end
  end

endmodule
