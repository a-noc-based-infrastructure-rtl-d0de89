// reconf_region: the reconfigurable area of the chip, seen from its pins.
//
// On the FPGA this area holds whichever core the last partial bitstream put
// there: 'mult', 'div' or 'sqrt'. In RTL the three cores (rip_core) are all
// present; region_cfg, set by the configuration port, says which one the
// area currently holds, and only that one drives the area's outputs. The
// others are held in reset, so a newly selected core starts from reset.
// While region_cfg is IP_NONE (blank, or a bitstream is being written) the
// outputs follow the glitch_* inputs: partial reconfiguration produces
// transients on the area's pins, and these inputs let a testbench reproduce
// them to show that the interface macros and router keep them out of the
// network. Core interface timing is that of rip_core. The three cores and
// the transients follow the Artemis case study; modelling the bitstream by a
// selector is this design's own.
module reconf_region
  import artemis_pkg::*;
#(
  parameter logic [7:0] MY_ADDR = 8'h01
) (
  input  logic              clk,
  input  logic              reset,
  input  ip_kind_e          region_cfg,
  input  logic              glitch_tx,
  input  logic              glitch_ack,
  input  logic [FLIT_W-1:0] glitch_data,
  input  logic              rx,
  input  logic [FLIT_W-1:0] data_in,
  output logic              ack_rx,
  output logic              tx,
  output logic [FLIT_W-1:0] data_out,
  input  logic              ack_tx
);
  localparam int NK = 3;
  localparam ip_kind_e KINDS [NK] = '{IP_MULT, IP_DIV, IP_SQRT};

  logic              k_ack_rx [NK];
  logic              k_tx     [NK];
  logic [FLIT_W-1:0] k_data   [NK];

  for (genvar k = 0; k < NK; k++) begin : g_core
    logic sel;
    assign sel = (region_cfg == KINDS[k]);
    rip_core #(.KIND(KINDS[k]), .MY_ADDR(MY_ADDR)) u_core (
      .clk, .reset(reset || !sel),
      .rx(rx && sel), .data_in, .ack_rx(k_ack_rx[k]),
      .tx(k_tx[k]), .data_out(k_data[k]), .ack_tx(ack_tx && sel)
    );
  end

  always_comb begin
    ack_rx   = glitch_ack;
    tx       = glitch_tx;
    data_out = glitch_data;
    for (int k = 0; k < NK; k++) begin
      if (region_cfg == KINDS[k]) begin
        ack_rx   = k_ack_rx[k];
        tx       = k_tx[k];
        data_out = k_data[k];
      end
    end
  end

endmodule
