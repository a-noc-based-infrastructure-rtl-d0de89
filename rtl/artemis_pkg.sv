// artemis_pkg: types and constants shared by the Artemis NoC, the
// configuration controller and the reconfigurable arithmetic cores.
//
// A flit is 8 data bits plus one sideband bit, ctrl, that marks flits of
// control packets (packets addressed to a router rather than to an IP).
// Every link carries {ctrl, data} together with tx/ack handshake wires.
// Flit width, the ctrl bit and the five router ports follow the Artemis
// design; packet layout and the command codes below are this design's own.
//
// Packet layout: flit 0 = target address {X[3:0], Y[3:0]}, flit 1 = number
// of payload flits, then the payload.
package artemis_pkg;

  localparam int FLIT_W = 8;
  localparam int NPORTS = 5;

  typedef struct packed {
    logic              ctrl;  // flit belongs to a control packet
    logic [FLIT_W-1:0] data;
  } flit_t;

  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // Control packet commands (first payload flit of a control packet)
  localparam logic [7:0] CTL_INSULATE  = 8'h01;
  localparam logic [7:0] CTL_RECONNECT = 8'h02;

  // Data packet commands (second payload flit; the first is the sender)
  localparam logic [7:0] CMD_WRITE      = 8'h01;  // 4 operand bytes follow
  localparam logic [7:0] CMD_READ       = 8'h02;  // ask for the result
  localparam logic [7:0] CMD_RESULT     = 8'h03;  // 4 result bytes follow
  localparam logic [7:0] CMD_RECONF_REQ = 8'h10;  // bitstream slot follows
  localparam logic [7:0] CMD_RECONF_ACK = 8'h11;  // area address follows

  // Contents of the reconfigurable area
  typedef enum logic [1:0] {
    IP_NONE = 2'd0,  // blank or being configured
    IP_MULT = 2'd1,
    IP_DIV  = 2'd2,
    IP_SQRT = 2'd3
  } ip_kind_e;

  function automatic logic [7:0] xy_addr(input logic [3:0] x, input logic [3:0] y);
    return {x, y};
  endfunction

endpackage
