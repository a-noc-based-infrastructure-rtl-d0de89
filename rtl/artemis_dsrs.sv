// artemis_dsrs: the Artemis-based dynamically self-reconfigurable system.
//
// A 2x2 Artemis NoC links four parts (router address = {x, y}):
//   router 00 - processor (system master), local port brought out (p_*)
//   router 01 - reconfigurable area: reconf_interface (LUT macros) + reconf_region
//   router 10 - host communication link, local port brought out (h_*)
//   router 11 - hardware configuration controller cc_h, with the external
//               bitstream SRAM (sram_*) and the ICAP (icap_*) brought out
// The processor asks cc_h for a core by sending a request packet; cc_h
// insulates the area through a control packet to router 01, streams the
// partial bitstream from SRAM to ICAP, reconnects the area with a second
// control packet and tells the processor where the core is. The processor
// then uses the core through write/read/result packets.
//
// The ICAP and the FPGA fabric behind it are outside this RTL: region_cfg
// says which core the area holds (IP_NONE while blank or being written),
// and glitch_* are the transients the area shows on its pins meanwhile.
// Local ports use the router link protocol: a flit moves when tx and ack are
// both high. Floorplan and addresses follow the Artemis case study.
module artemis_dsrs
  import artemis_pkg::*;
#(
  parameter int BUF_DEPTH      = 16,
  parameter int BYTE_CYCLES    = 5,
  parameter int SRAM_AW        = 20,
  parameter int MAX_BITSTREAMS = 10
) (
  input  logic               clk,
  input  logic               rst,
  // processor at router 00 (directions seen from the NoC)
  input  logic               p_rx,
  input  flit_t              p_data_in,
  output logic               p_ack_rx,
  output logic               p_tx,
  output flit_t              p_data_out,
  input  logic               p_ack_tx,
  // host communication at router 10
  input  logic               h_rx,
  input  flit_t              h_data_in,
  output logic               h_ack_rx,
  output logic               h_tx,
  output flit_t              h_data_out,
  input  logic               h_ack_tx,
  // bitstream SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_oe_n,
  input  logic [7:0]         sram_data,
  // ICAP
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [7:0]         icap_din,
  input  logic               icap_busy,
  // state of the reconfigurable area, as set by the configuration port
  input  ip_kind_e           region_cfg,
  input  logic               glitch_tx,
  input  logic               glitch_ack,
  input  logic [7:0]         glitch_data,
  // status
  output logic               area_reconf,
  output logic               cc_busy
);
  localparam int N = 4;
  localparam int R_PROC = 0;  // router 00
  localparam int R_AREA = 1;  // router 01
  localparam int R_HOST = 2;  // router 10
  localparam int R_CC   = 3;  // router 11

  logic  l_rx     [N];
  logic  l_ack_rx [N];
  flit_t l_din    [N];
  logic  l_tx     [N];
  logic  l_ack_tx [N];
  flit_t l_dout   [N];
  logic  reconf   [N];

  artemis_noc #(.X_SIZE(2), .Y_SIZE(2), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk, .rst,
    .l_rx, .l_ack_rx, .l_data_in(l_din),
    .l_tx, .l_ack_tx, .l_data_out(l_dout),
    .reconf
  );

  // processor and host ports
  assign l_rx[R_PROC]     = p_rx;
  assign l_din[R_PROC]    = p_data_in;
  assign p_ack_rx         = l_ack_rx[R_PROC];
  assign p_tx             = l_tx[R_PROC];
  assign p_data_out       = l_dout[R_PROC];
  assign l_ack_tx[R_PROC] = p_ack_tx;

  assign l_rx[R_HOST]     = h_rx;
  assign l_din[R_HOST]    = h_data_in;
  assign h_ack_rx         = l_ack_rx[R_HOST];
  assign h_tx             = l_tx[R_HOST];
  assign h_data_out       = l_dout[R_HOST];
  assign l_ack_tx[R_HOST] = h_ack_tx;

  // configuration controller
  cc_h #(
    .MY_ADDR(8'h11), .REGION_ADDR(8'h01), .BYTE_CYCLES(BYTE_CYCLES),
    .SRAM_AW(SRAM_AW), .MAX_BITSTREAMS(MAX_BITSTREAMS)
  ) u_cc (
    .clk, .rst,
    .rx(l_tx[R_CC]), .data_in(l_dout[R_CC]), .ack_rx(l_ack_tx[R_CC]),
    .tx(l_rx[R_CC]), .data_out(l_din[R_CC]), .ack_tx(l_ack_rx[R_CC]),
    .sram_addr, .sram_oe_n, .sram_data,
    .icap_ce_n, .icap_write_n, .icap_din, .icap_busy,
    .busy(cc_busy)
  );

  // reconfigurable area behind the interface macros
  logic       c_reset, c_rx, c_ack_rx, c_tx, c_ack_tx;
  logic [7:0] c_data_in, c_data_out;

  reconf_interface u_if (
    .reset(rst), .reconf(reconf[R_AREA]),
    .r_tx(l_tx[R_AREA]), .r_data_out(l_dout[R_AREA]), .r_ack_tx(l_ack_tx[R_AREA]),
    .r_rx(l_rx[R_AREA]), .r_data_in(l_din[R_AREA]),   .r_ack_rx(l_ack_rx[R_AREA]),
    .c_reset, .c_rx, .c_data_in, .c_ack_rx, .c_tx, .c_data_out, .c_ack_tx
  );

  reconf_region #(.MY_ADDR(8'h01)) u_region (
    .clk, .reset(c_reset), .region_cfg,
    .glitch_tx, .glitch_ack, .glitch_data,
    .rx(c_rx), .data_in(c_data_in), .ack_rx(c_ack_rx),
    .tx(c_tx), .data_out(c_data_out), .ack_tx(c_ack_tx)
  );

  assign area_reconf = reconf[R_AREA];

endmodule
