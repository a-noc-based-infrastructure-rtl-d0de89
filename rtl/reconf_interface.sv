// reconf_interface: connection between a router's local port and a
// reconfigurable core.
//
// Fixed-to-reconfigurable direction (11 bits, two F2R macros): router tx,
// the 8 data bits, the router's ack for the core's flits and the core reset
// are passed unchanged (F2R macros are identity LUTs, so they are plain wires
// here). The core reset is the global reset OR reconf, so the router holds the
// new core in reset while its area is insulated.
// Reconfigurable-to-fixed direction (10 bits, two R2F macros): core tx, the
// 8 data bits and the core's ack are ANDed with reconf_n = NOT reconf, so an
// insulated area drives only zeros into the router.
// Combinational. The ctrl sideband is not carried: reconfigurable cores never
// send or receive control packets; the router side ctrl_in is tied to 0.
// Structure and bit counts follow the Artemis interface.
module reconf_interface
  import artemis_pkg::*;
(
  input  logic              reset,
  input  logic              reconf,
  // router local port side
  input  logic              r_tx,        // router -> core flit valid
  input  flit_t             r_data_out,
  output logic              r_ack_tx,    // core accepted router flit
  output logic              r_rx,        // core -> router flit valid
  output flit_t             r_data_in,
  input  logic              r_ack_rx,    // router accepted core flit
  // reconfigurable core side
  output logic              c_reset,
  output logic              c_rx,
  output logic [FLIT_W-1:0] c_data_in,
  input  logic              c_ack_rx,
  input  logic              c_tx,
  input  logic [FLIT_W-1:0] c_data_out,
  output logic              c_ack_tx
);
  logic       reconf_n;
  logic [7:0] ctl_in, ctl_out;

  assign reconf_n = ~reconf;

  // F2R: identity
  assign c_reset   = reset | reconf;
  assign c_rx      = r_tx;
  assign c_data_in = r_data_out.data;
  assign c_ack_tx  = r_ack_rx;

  // R2F: data byte
  r2f_macro #(.W(FLIT_W)) u_r2f_data (
    .in(c_data_out), .control(reconf_n), .out(r_data_in.data)
  );

  // R2F: handshake bits (2 of 8 LUTs used)
  assign ctl_in = {6'b0, c_ack_rx, c_tx};
  r2f_macro #(.W(8)) u_r2f_ctl (
    .in(ctl_in), .control(reconf_n), .out(ctl_out)
  );
  assign r_rx           = ctl_out[0];
  assign r_ack_tx       = ctl_out[1];
  assign r_data_in.ctrl = 1'b0;

endmodule
