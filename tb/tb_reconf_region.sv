// tb_reconf_region: loads each core kind into the area in turn (region_cfg)
// and checks that the area then computes that kind's function; with the
// area blank (IP_NONE) its pins must show the transient inputs; a core that
// has just been loaded must start from reset (a read without a write gets
// no answer).
module tb_reconf_region;
  import artemis_pkg::*;
  logic clk = 0, reset = 1;
  ip_kind_e region_cfg;
  logic glitch_tx, glitch_ack, rx, ack_rx, tx, ack_tx;
  logic [7:0] glitch_data, data_in, data_out;
  int checks = 0, failures = 0;

  reconf_region #(.MY_ADDR(8'h01)) dut (.*);

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

  task automatic send(input logic [7:0] f[$]);
    foreach (f[i]) begin
      rx = 1; data_in = f[i];
      @(negedge clk);
    end
    rx = 0;
  endtask

  task automatic receive(output logic [7:0] f[$]);
    int guard = 0;
    f = {};
    ack_tx = 1;
    while (f.size() < 8 && guard < 200) begin
      @(posedge clk);
      if (tx) f.push_back(data_out);
      @(negedge clk);
      guard++;
    end
    ack_tx = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pkt[$];
    logic [31:0] op, res, expv;
    ip_kind_e kinds[3];
    kinds = '{IP_MULT, IP_DIV, IP_SQRT};
    region_cfg = IP_NONE; rx = 0; data_in = 0; ack_tx = 0;
    glitch_tx = 0; glitch_ack = 0; glitch_data = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int it = 0; it < 30; it++) begin
      ip_kind_e k;
      k = kinds[it % 3];
      // blank area: pins show transients
      region_cfg = IP_NONE;
      for (int g = 0; g < 10; g++) begin
        glitch_tx = 1'($urandom); glitch_ack = 1'($urandom); glitch_data = 8'($urandom);
        #1;
        check(tx == glitch_tx && ack_rx == glitch_ack && data_out == glitch_data,
              "blank area shows transients");
        @(negedge clk);
      end
      glitch_tx = 0; glitch_ack = 0;
      region_cfg = k;
      @(negedge clk);
      // fresh core: a read without a write is not answered
      send('{8'h01, 8'd2, 8'h00, CMD_READ});
      ack_tx = 1;
      repeat (30) begin @(posedge clk); check(!tx, "fresh core has no result"); @(negedge clk); end
      ack_tx = 0;
      // reload the same kind (reset) before the real test
      region_cfg = IP_NONE; @(negedge clk); region_cfg = k; @(negedge clk);
      op = $urandom;
      case (k)
        IP_MULT: expv = {16'b0, op[31:16]} * {16'b0, op[15:0]};
        IP_DIV:  expv = (op[15:0] == 0) ? {16'hFFFF, op[31:16]} :
                        {op[31:16] / op[15:0], op[31:16] % op[15:0]};
        default: expv = isqrt(op);
      endcase
      send('{8'h01, 8'd6, 8'h00, CMD_WRITE, op[31:24], op[23:16], op[15:8], op[7:0]});
      send('{8'h01, 8'd2, 8'h00, CMD_READ});
      receive(pkt);
      check(pkt.size() == 8, "result packet received");
      if (pkt.size() == 8) begin
        res = {pkt[4], pkt[5], pkt[6], pkt[7]};
        check(res == expv, $sformatf("kind %s op=%h result=%h expected=%h", k.name(), op, res, expv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
