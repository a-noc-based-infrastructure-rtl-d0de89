// arith_mult: datapath of the 'mult' reconfigurable IP.
//
// Multiplies two unsigned 16-bit operands, a = opnd[31:16] and b = opnd[15:0],
// into a 32-bit product. The product is registered: start in cycle t gives
// done (one-cycle pulse) and result in cycle t+1; result holds until the next
// start. The operand widths follow the Artemis case study; unsigned
// arithmetic and the one-cycle latency are this design's choices.
module arith_mult (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] opnd,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  assign busy = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= opnd[31:16] * opnd[15:0];
    end
  end
endmodule
