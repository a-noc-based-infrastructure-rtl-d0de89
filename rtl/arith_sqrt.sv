// arith_sqrt: datapath of the 'sqrt' reconfigurable IP.
//
// Integer square root (floor) of the unsigned 32-bit operand, by the
// digit-by-digit method: two operand bits enter the partial remainder and
// one root bit is decided per cycle. start in cycle t gives done (one-cycle
// pulse) in cycle t+17 with the 16-bit root in result[15:0] (result[31:16] is
// zero); busy is high in between. The 32-bit operand follows the Artemis case
// study; the algorithm and latency are this design's choices.
module arith_sqrt (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] opnd,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  logic [31:0] x;      // operand bits not yet consumed
  logic [16:0] rem;    // partial remainder (< 2*root+1)
  logic [15:0] root;
  logic [4:0]  cnt;
  logic [18:0] rem_in, trial;

  always_comb begin
    rem_in = {rem, x[31:30]};
    trial  = {1'b0, root, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; rem <= '0; root <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x    <= opnd;
        rem  <= '0;
        root <= '0;
        cnt  <= 5'd16;
        busy <= 1'b1;
      end else if (busy) begin
        x <= {x[29:0], 2'b00};
        if (rem_in >= trial) begin
          rem  <= 17'(rem_in - trial);
          root <= {root[14:0], 1'b1};
        end else begin
          rem  <= rem_in[16:0];
          root <= {root[14:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 5'd1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= {16'b0, root[14:0], rem_in >= trial};
        end
      end
    end
  end
endmodule
