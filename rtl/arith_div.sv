// arith_div: datapath of the 'div' reconfigurable IP.
//
// Divides the unsigned 16-bit dividend opnd[31:16] by the 16-bit divisor
// opnd[15:0] with a restoring shift-subtract loop, one quotient bit per
// cycle. start in cycle t gives done (one-cycle pulse) in cycle t+17 with
// result = {quotient, remainder}; busy is high in between. Division by zero
// yields quotient 16'hFFFF and remainder = dividend, which the loop produces
// naturally. Operand widths follow the Artemis case study; the algorithm and
// latency are this design's choices.
module arith_div (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] opnd,
  output logic        busy,
  output logic        done,
  output logic [31:0] result
);
  logic [15:0] q, d;
  logic [15:0] r;
  logic [4:0]  cnt;
  logic [16:0] r_shift, r_sub;

  always_comb begin
    r_shift = {r, q[15]};
    r_sub   = r_shift - {1'b0, d};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0; d <= '0; r <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= opnd[31:16];
        d    <= opnd[15:0];
        r    <= '0;
        cnt  <= 5'd16;
        busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[16]) begin
          r <= r_sub[15:0];
          q <= {q[14:0], 1'b1};
        end else begin
          r <= r_shift[15:0];
          q <= {q[14:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 5'd1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= {q[14:0], !r_sub[16], (!r_sub[16]) ? r_sub[15:0] : r_shift[15:0]};
        end
      end
    end
  end
endmodule
