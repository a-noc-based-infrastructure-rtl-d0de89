// artemis_buffer: input buffer of one router port.
//
// A circular FIFO of DEPTH entries, each W bits wide. In the Artemis router
// every entry holds an 8-bit flit plus the ctrl bit of its packet, so W is 9.
// Link side: a flit is written in a cycle where rx is high and ack_rx is
// high; ack_rx = rx AND not full. Switch side: head/empty show the oldest
// flit, pop removes it. A flit written in cycle t is visible at the head in
// cycle t+1. Depth is this design's choice; the extra ctrl bit per entry
// follows the Artemis router.
module artemis_buffer #(
  parameter int W     = 9,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         rx,
  output logic         ack_rx,
  input  logic [W-1:0] din,
  output logic [W-1:0] head,
  output logic         empty,
  input  logic         pop
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          push, do_pop;

  assign empty  = (count == '0);
  assign ack_rx = rx && (count != (AW+1)'(DEPTH));
  assign push   = ack_rx;
  assign do_pop = pop && !empty;
  assign head   = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push)   wr_ptr <= next_ptr(wr_ptr);
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(do_pop);
    end
  end

  // pop is only meaningful when a flit is present
  a_no_pop_empty: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
