// tb_rip_core: drives the three arithmetic cores (mult, div, sqrt) through
// their packet interface: write packet with random operands, read packet,
// then collects the result packet and checks its header, length, sender
// field, command and value against a reference. The read is sent right
// after the write, so div and sqrt must hold it until their result is
// ready. Unknown commands must be ignored. Gaps between flits and ack
// stalls on the result packet are random.
module tb_rip_core;
  import artemis_pkg::*;
  logic clk = 0, reset = 1;
  logic       rx     [3];
  logic [7:0] din    [3];
  logic       ack_rx [3];
  logic       tx     [3];
  logic [7:0] dout   [3];
  logic       ack_tx [3];
  int checks = 0, failures = 0, waited_reads = 0;
  localparam ip_kind_e KINDS [3] = '{IP_MULT, IP_DIV, IP_SQRT};

  for (genvar k = 0; k < 3; k++) begin : g_dut
    rip_core #(.KIND(KINDS[k]), .MY_ADDR(8'(8'h20 + k))) dut (
      .clk, .reset, .rx(rx[k]), .data_in(din[k]), .ack_rx(ack_rx[k]),
      .tx(tx[k]), .data_out(dout[k]), .ack_tx(ack_tx[k]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] isqrt(input logic [31:0] v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= longint'(v)) r++;
    return 32'(r);
  endfunction

  function automatic logic [31:0] ref_result(input int k, input logic [31:0] op);
    logic [15:0] a, b;
    a = op[31:16]; b = op[15:0];
    case (k)
      0:       return {16'b0, a} * {16'b0, b};
      1:       return (b == 0) ? {16'hFFFF, a} : {a / b, a % b};
      default: return isqrt(op);
    endcase
  endfunction

  task automatic send(input int k, input logic [7:0] f[$]);
    foreach (f[i]) begin
      while (($urandom % 4) == 0) @(negedge clk);
      rx[k] = 1; din[k] = f[i];
      @(posedge clk);
      check(ack_rx[k], "core accepts every flit");
      @(negedge clk);
      rx[k] = 0;
    end
  endtask

  task automatic receive(input int k, output logic [7:0] f[$]);
    int guard = 0;
    f = {};
    while (f.size() < 8 && guard < 2000) begin
      ack_tx[k] = ($urandom % 3) != 0;
      @(posedge clk);
      if (tx[k] && ack_tx[k]) f.push_back(dout[k]);
      @(negedge clk);
      guard++;
    end
    ack_tx[k] = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pkt[$];
    logic [31:0] op, res;
    for (int k = 0; k < 3; k++) begin rx[k] = 0; din[k] = 0; ack_tx[k] = 0; end
    repeat (3) @(negedge clk);
    reset = 0;
    for (int it = 0; it < 60; it++) begin
      int k;
      logic [7:0] me;
      k = it % 3;
      me = 8'(8'h20 + k);
      op = $urandom;
      if (k == 1 && it % 4 == 1) op[15:0] = 16'(op[15:0] % 7);
      // an unknown command must change nothing
      send(k, '{me, 8'd3, 8'h00, 8'h7E, 8'h55});
      send(k, '{me, 8'd6, 8'h00, CMD_WRITE, op[31:24], op[23:16], op[15:8], op[7:0]});
      if (k == 1 && g_dut[1].dut.dp_busy) waited_reads++;
      if (k == 2 && g_dut[2].dut.dp_busy) waited_reads++;
      send(k, '{me, 8'd2, 8'h00, CMD_READ});
      receive(k, pkt);
      check(pkt.size() == 8, "result packet has 8 flits");
      if (pkt.size() == 8) begin
        res = {pkt[4], pkt[5], pkt[6], pkt[7]};
        check(pkt[0] == 8'h00 && pkt[1] == 8'd6 && pkt[2] == me && pkt[3] == CMD_RESULT,
              "result packet header");
        check(res == ref_result(k, op), $sformatf("core %0d op=%h result=%h expected=%h",
              k, op, res, ref_result(k, op)));
      end
      // nothing more may come out
      repeat (20) begin
        ack_tx[k] = 1;
        @(posedge clk);
        check(!tx[k], "single result per read");
        @(negedge clk);
      end
      ack_tx[k] = 0;
    end
    check(waited_reads > 0, "a read arrived while the datapath was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
