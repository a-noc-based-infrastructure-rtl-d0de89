// tb_cc_h: the configuration controller against a behavioural SRAM (slots
// filled with a length header and random bytes) and a behavioural ICAP
// that records every byte written and raises BUSY at random.
// For each request it checks the packet sequence - insulate control packet,
// then the whole bitstream into ICAP byte for byte, then the reconnect
// control packet, then the answer to the requester - and, with BUSY low,
// that each byte takes exactly BYTE_CYCLES cycles. A second request sent
// during a reconfiguration waits (no ack) and is served afterwards;
// requests for a slot out of range are dropped.
module tb_cc_h;
  import artemis_pkg::*;
  localparam int AW = 12, NB = 4, BC = 5, SLOT = (2 ** AW) / NB;
  logic clk = 0, rst = 1;
  logic rx, ack_rx, tx, ack_tx, sram_oe_n, icap_ce_n, icap_write_n, icap_busy, busy;
  flit_t data_in, data_out;
  logic [AW-1:0] sram_addr;
  logic [7:0] sram_data, icap_din;
  int checks = 0, failures = 0, busy_stalls = 0, held_requests = 0;

  cc_h #(.MY_ADDR(8'h11), .REGION_ADDR(8'h01), .BYTE_CYCLES(BC), .SRAM_AW(AW),
         .MAX_BITSTREAMS(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // behavioural asynchronous SRAM
  logic [7:0] sram [2 ** AW];
  assign sram_data = sram_oe_n ? 8'h00 : sram[sram_addr];

  // behavioural ICAP
  logic [7:0] icap_bytes[$];
  int         icap_times[$];
  bit         busy_en = 0;
  int         cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!icap_ce_n && !icap_write_n && !icap_busy) begin
      icap_bytes.push_back(icap_din);
      icap_times.push_back(cyc);
    end
    if (!icap_ce_n && icap_busy) busy_stalls++;
    icap_busy <= busy_en && (($urandom % 4) == 0);
  end

  // router side: outgoing packets from the controller
  flit_t out_flits[$];
  int    out_times[$];
  always @(posedge clk) begin
    if (tx && ack_tx) begin out_flits.push_back(data_out); out_times.push_back(cyc); end
    ack_tx <= ($urandom % 5) != 0;
  end

  // request sender
  flit_t rq[$];
  always @(posedge clk) begin
    if (rx && !ack_rx && busy) held_requests++;
    if (rx && ack_rx) void'(rq.pop_front());
    if (rq.size() > 0) begin rx <= 1'b1; data_in <= rq[0]; end
    else rx <= 1'b0;
  end

  task automatic request(input logic [7:0] src, input logic [7:0] slot);
    rq.push_back('{1'b0, 8'h11}); rq.push_back('{1'b0, 8'd3});
    rq.push_back('{1'b0, src});   rq.push_back('{1'b0, CMD_RECONF_REQ});
    rq.push_back('{1'b0, slot});
  endtask

  task automatic expect_pkt(input flit_t exp[$], input string what, output int t_last);
    int guard = 0;
    while (out_flits.size() < exp.size() && guard < 100000) begin @(posedge clk); guard++; end
    check(out_flits.size() >= exp.size(), {what, " arrived"});
    t_last = 0;
    foreach (exp[i]) begin
      if (out_flits.size() > 0) begin
        check(out_flits[0] == exp[i], $sformatf("%s flit %0d = %h, expected %h", what, i, out_flits[0], exp[i]));
        void'(out_flits.pop_front());
        t_last = out_times.pop_front();
      end
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens[NB];
  task automatic run_one(input logic [7:0] src, input int slot, input bit timed);
    int t_ins, t_rec, t_ack, n;
    n = lens[slot];
    icap_bytes = {}; icap_times = {};
    expect_pkt('{'{1'b1, 8'h01}, '{1'b1, 8'd1}, '{1'b1, CTL_INSULATE}}, "insulate packet", t_ins);
    expect_pkt('{'{1'b1, 8'h01}, '{1'b1, 8'd1}, '{1'b1, CTL_RECONNECT}}, "reconnect packet", t_rec);
    check(icap_bytes.size() == n, $sformatf("bitstream length %0d, expected %0d", icap_bytes.size(), n));
    for (int i = 0; i < n && i < icap_bytes.size(); i++)
      check(icap_bytes[i] == sram[slot * SLOT + 3 + i], "bitstream byte");
    if (icap_times.size() == n) begin
      check(icap_times[0] > t_ins, "insulation sent before the bitstream");
      check(icap_times[n-1] < t_rec, "reconnection sent after the bitstream");
      if (timed) begin
        check(icap_times[n-1] - icap_times[0] == (n - 1) * BC,
              $sformatf("%0d cycles per byte", BC));
        check(icap_times[0] - t_ins <= 4 * BC + 2, "length header read in 3 byte times");
      end
    end
    expect_pkt('{'{1'b0, src}, '{1'b0, 8'd3}, '{1'b0, 8'h11}, '{1'b0, CMD_RECONF_ACK}, '{1'b0, 8'h01}},
               "answer to requester", t_ack);
  endtask

  initial begin
    rx = 0; data_in = '0; ack_tx = 0; icap_busy = 0;
    foreach (sram[i]) sram[i] = 8'($urandom);
    for (int s = 0; s < NB; s++) begin
      lens[s] = 50 + $urandom % 300;
      sram[s * SLOT]     = 8'(lens[s] >> 16);
      sram[s * SLOT + 1] = 8'(lens[s] >> 8);
      sram[s * SLOT + 2] = 8'(lens[s]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    // timed run, ICAP never busy
    request(8'h00, 8'd2);
    run_one(8'h00, 2, 1);
    // random BUSY, and a second request queued while the first runs
    busy_en = 1;
    request(8'h10, 8'd1);
    request(8'h00, 8'd3);
    run_one(8'h10, 1, 0);
    run_one(8'h00, 3, 0);
    check(held_requests > 0, "request held while reconfiguring");
    check(busy_stalls > 0, "ICAP BUSY stalled the stream");
    // out of range slot: no reaction
    request(8'h00, 8'd7);
    repeat (200) @(posedge clk);
    check(out_flits.size() == 0 && !busy, "out-of-range request dropped");
    // slot 0 still works afterwards
    request(8'h00, 8'd0);
    run_one(8'h00, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
