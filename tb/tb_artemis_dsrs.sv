// tb_artemis_dsrs: end-to-end test of the whole system at its default
// (full) size: 1 Mbyte bitstream SRAM, five cycles per bitstream byte.
//
// Behavioural models around the top: the SRAM holds three partial
// bitstreams of the sizes measured for the case study (mult 99,644 bytes,
// div 96,428, sqrt 101,988) in slots 0..2, each beginning with a byte that
// names the core it configures; the ICAP model watches the bytes written,
// blanks the area (region_cfg = IP_NONE) at the first byte, drives random
// transients on the area's pins while the bitstream is written, and loads
// the named core after the last byte. The processor port model runs the
// protocol for each core: request to the controller, wait for the answer
// with the area address, then 200 operations (write operands, read,
// check the result). The host
// port sends background packets to the processor throughout.
//
// Checks: packet contents and results; the reconfiguration phase lasts
// five cycles per byte; the area is insulated exactly while the bitstream
// is written; nothing from the transients enters the network; a data
// packet sent to the area during reconfiguration is discarded; ICAP BUSY
// stalls are absorbed. Every mechanism must occur at least once.
module tb_artemis_dsrs;
  import artemis_pkg::*;
  logic clk = 0, rst = 1;
  logic p_rx, p_ack_rx, p_tx, p_ack_tx, h_rx, h_ack_rx, h_tx, h_ack_tx;
  flit_t p_data_in, p_data_out, h_data_in, h_data_out;
  logic [19:0] sram_addr;
  logic sram_oe_n, icap_ce_n, icap_write_n, icap_busy, glitch_tx, glitch_ack;
  logic [7:0] sram_data, icap_din, glitch_data;
  ip_kind_e region_cfg;
  logic area_reconf, cc_busy;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_insulate = 0, n_reconnect = 0, n_discard = 0, n_glitch_blocked = 0;
  int n_icap_stall = 0, n_host_pkts = 0, n_results = 0, n_proc_stalls = 0;

  artemis_dsrs dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @cycle %0d: %s", cyc, what); end
  endtask

  function automatic logic [31:0] isqrt(input logic [31:0] v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= longint'(v)) r++;
    return 32'(r);
  endfunction

  // ------------------------------------------------------------ SRAM model
  localparam int SLOT = (2 ** 20) / 10;
  localparam int NOPS = 200;  // operations per loaded core
  logic [7:0] sram [2 ** 20];
  assign sram_data = sram_oe_n ? 8'h00 : sram[sram_addr];
  int lens [3] = '{99644, 96428, 101988};
  ip_kind_e kinds [3] = '{IP_MULT, IP_DIV, IP_SQRT};

  // ------------------------------------------------------------ ICAP model
  int       icap_count = 0, icap_expect = 0;
  ip_kind_e icap_kind;
  bit       busy_en = 0;
  always @(posedge clk) begin
    if (!icap_ce_n && icap_busy) n_icap_stall++;
    if (!icap_ce_n && !icap_write_n && !icap_busy) begin
      if (icap_count == 0) begin
        region_cfg <= IP_NONE;
        icap_kind  = ip_kind_e'(icap_din[1:0]);
      end
      icap_count++;
      if (icap_count == icap_expect) begin
        region_cfg <= icap_kind;
        icap_count = 0;
      end
    end
    icap_busy <= busy_en && (($urandom % 8) == 0);
    // transients on the blank area's pins while configuration data is written
    if (icap_count != 0) begin
      glitch_tx   <= 1'($urandom);
      glitch_ack  <= 1'($urandom);
      glitch_data <= 8'($urandom);
    end else begin
      glitch_tx <= 1'b0; glitch_ack <= 1'b0; glitch_data <= 8'h00;
    end
  end

  // insulation monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (area_reconf && glitch_tx) begin
        n_glitch_blocked++;
        check(!dut.l_rx[1], "transient reached router 01");
      end
      if (region_cfg == IP_NONE && icap_count != 0)
        check(area_reconf, "area insulated while its bitstream is written");
      if (dut.u_noc.g_x[0].g_y[1].u_router.lmode == 2'd2 &&
          dut.u_noc.g_x[0].g_y[1].u_router.tx[4] == 1'b0 &&
          dut.u_noc.g_x[0].g_y[1].u_router.pop[dut.u_noc.g_x[0].g_y[1].u_router.out_src[4]])
        n_discard++;
    end
  end
  // controller phases of the protocol: (b) request received -> insulate
  // packet sent, (d) reconnect packet sent; 4 cycles each in the case study
  int t_cc_req = 0, t_b = 0, t_d = 0, t_d0 = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_cc.rx_last) t_cc_req = cyc;
      if (dut.u_cc.state == 3'd1 && dut.u_cc.ack_tx && dut.u_cc.tx_idx == 3'd2) t_b = cyc - t_cc_req + 1;
      if (dut.u_cc.state == 3'd4 && dut.u_cc.tx_idx == 3'd0 && t_d0 == 0) t_d0 = cyc;
      if (dut.u_cc.state == 3'd4 && dut.u_cc.ack_tx && dut.u_cc.tx_idx == 3'd2) begin
        t_d = cyc - t_d0 + 1;
        t_d0 = 0;
      end
    end
  end
  logic area_reconf_q;
  always @(posedge clk) begin
    area_reconf_q <= area_reconf;
    if (!rst && area_reconf && !area_reconf_q) n_insulate++;
    if (!rst && !area_reconf && area_reconf_q) n_reconnect++;
  end

  // ---------------------------------------------------- processor port model
  flit_t pq[$];
  always @(posedge clk) begin
    if (p_rx && p_ack_rx) void'(pq.pop_front());
    if (pq.size() > 0) begin p_rx <= 1'b1; p_data_in <= pq[0]; end
    else p_rx <= 1'b0;
  end
  task automatic p_send(input logic [7:0] f[$]);
    foreach (f[i]) pq.push_back('{1'b0, f[i]});
  endtask

  // packets arriving at the processor, sorted by sender
  logic [7:0] p_cur[$];
  logic [7:0] p_from_cc[$][$];
  logic [7:0] p_from_ip[$][$];
  int         p_arrival[$];
  always @(posedge clk) begin
    if (!rst) begin
      if (p_tx && !p_ack_tx) n_proc_stalls++;
      if (p_tx && p_ack_tx) begin
        p_cur.push_back(p_data_out.data);
        if (p_cur.size() >= 2 && p_cur.size() == int'(p_cur[1]) + 2) begin
          if (p_cur[2] == 8'h11)      begin p_from_cc.push_back(p_cur); p_arrival.push_back(cyc); end
          else if (p_cur[2] == 8'h01) p_from_ip.push_back(p_cur);
          else if (p_cur[2] == 8'h10) begin
            n_host_pkts++;
            check(p_cur[1] == 8'd4 && p_cur[3] == 8'hA5 && p_cur[4] == 8'(p_cur[5] + 1),
                  "host packet intact");
          end else check(0, "unknown packet at the processor");
          p_cur = {};
        end
      end
      p_ack_tx <= ($urandom % 4) != 0;
    end
  end

  // ------------------------------------------------------ host port model
  bit   host_on = 1;
  flit_t hq[$];
  int   host_seq = 0;
  always @(posedge clk) begin
    if (h_rx && h_ack_rx) void'(hq.pop_front());
    if (host_on && hq.size() == 0 && ($urandom % 3000) == 0) begin
      hq.push_back('{1'b0, 8'h00}); hq.push_back('{1'b0, 8'd4});
      hq.push_back('{1'b0, 8'h10}); hq.push_back('{1'b0, 8'hA5});
      hq.push_back('{1'b0, 8'(host_seq + 1)}); hq.push_back('{1'b0, 8'(host_seq)});
      host_seq++;
    end
    if (hq.size() > 0) begin h_rx <= 1'b1; h_data_in <= hq[0]; end
    else h_rx <= 1'b0;
    h_ack_tx <= 1'b1;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_for(ref logic [7:0] q[$][$], input int max_cycles);
    int c = 0;
    while (q.size() == 0 && c < max_cycles) begin @(posedge clk); c++; end
    check(q.size() > 0, "expected packet arrived");
  endtask

  initial begin
    p_rx = 0; p_data_in = '0; p_ack_tx = 0; h_rx = 0; h_data_in = '0; h_ack_tx = 0;
    icap_busy = 0; glitch_tx = 0; glitch_ack = 0; glitch_data = 0; region_cfg = IP_NONE;
    foreach (sram[i]) sram[i] = 8'($urandom);
    for (int s = 0; s < 3; s++) begin
      sram[s * SLOT]     = 8'(lens[s] >> 16);
      sram[s * SLOT + 1] = 8'(lens[s] >> 8);
      sram[s * SLOT + 2] = 8'(lens[s]);
      sram[s * SLOT + 3] = {6'b0, 2'(kinds[s])};
    end
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);

    for (int s = 0; s < 3; s++) begin
      int t_req, t_ins, t_rec, t_ans, t_w, t_r, t_res, t_sum;
      logic [31:0] op, expv, res;
      logic [7:0] ans[$];
      logic [7:0] rp[$];
      icap_expect = lens[s];
      busy_en = (s == 2);
      // (a)-(b): request to the controller
      t_req = cyc;
      p_send('{8'h11, 8'd3, 8'h00, CMD_RECONF_REQ, 8'(s)});
      while (!area_reconf && cyc - t_req < 1000) @(posedge clk);
      t_ins = cyc;
      check(area_reconf, "area insulated after the request");
      // a data packet for the area while it is being reconfigured
      repeat (100) @(posedge clk);
      p_send('{8'h01, 8'd6, 8'h00, CMD_WRITE, 8'h12, 8'h34, 8'h56, 8'h78});
      // (c): reconfiguration
      while (area_reconf && cyc - t_ins < 2 * 5 * lens[s]) @(posedge clk);
      t_rec = cyc;
      check(!area_reconf, "area reconnected");
      if (s < 2)
        check(t_rec - t_ins >= 5 * lens[s] && t_rec - t_ins <= 5 * lens[s] + 60,
              $sformatf("reconfiguration took %0d cycles for %0d bytes (5 per byte)", t_rec - t_ins, lens[s]));
      else
        check(t_rec - t_ins > 5 * lens[s], "ICAP stalls lengthen the reconfiguration");
      check(region_cfg == kinds[s], "requested core loaded");
      // (d)-(e): answer with the area address
      wait_for(p_from_cc, 1000);
      t_ans = p_arrival.size() > 0 ? p_arrival.pop_front() : cyc;
      if (p_from_cc.size() > 0) begin
        ans = p_from_cc.pop_front();
        check(ans.size() == 5 && ans[3] == CMD_RECONF_ACK && ans[4] == 8'h01, "answer names area 01");
      end
      check(p_from_ip.size() == 0, "discarded packet produced no answer");
      check(t_b <= 4, $sformatf("controller: request to insulate packet sent in %0d cycles (4 in Figure 8(b))", t_b));
      check(t_d <= 4, $sformatf("controller: reconnect packet sent in %0d cycles (4 in Figure 8(d))", t_d));
      // use the core repeatedly: write operands, read, result
      t_sum = 0;
      for (int n = 0; n < NOPS; n++) begin
        op = $urandom;
        if (n == 0) op = 32'hFFFF_FFFF;
        if (n == 1) op = 32'h0000_0000;
        case (kinds[s])
          IP_MULT: expv = {16'b0, op[31:16]} * {16'b0, op[15:0]};
          IP_DIV:  expv = (op[15:0] == 0) ? {16'hFFFF, op[31:16]} :
                          {op[31:16] / op[15:0], op[31:16] % op[15:0]};
          default: expv = isqrt(op);
        endcase
        t_w = cyc;
        p_send('{8'h01, 8'd6, 8'h00, CMD_WRITE, op[31:24], op[23:16], op[15:8], op[7:0]});
        while (pq.size() > 0) @(posedge clk);
        t_r = cyc;
        p_send('{8'h01, 8'd2, 8'h00, CMD_READ});
        wait_for(p_from_ip, 1000);
        t_res = cyc;
        t_sum += t_res - t_w;
        if (p_from_ip.size() > 0) begin
          rp = p_from_ip.pop_front();
          res = {rp[4], rp[5], rp[6], rp[7]};
          check(rp[3] == CMD_RESULT && res == expv,
                $sformatf("%s(%h) = %h, expected %h", kinds[s].name(), op, res, expv));
          n_results++;
        end
      end
      $display("%s: (b) %0d cycles, (d) %0d cycles", kinds[s].name(), t_b, t_d);
      $display("%s: insulate after %0d, reconfiguration %0d cycles, answer after %0d, average write+read+result %0d cycles over %0d operations",
               kinds[s].name(), t_ins - t_req, t_rec - t_ins, t_ans - t_rec, t_sum / NOPS, NOPS);
    end
    host_on = 0;
    repeat (3000) @(posedge clk);
    check(n_insulate == 3 && n_reconnect == 3, "three insulations and reconnections");
    check(n_discard > 0, "mechanism: discarding");
    check(n_glitch_blocked > 0, "mechanism: transients blocked");
    check(n_icap_stall > 0, "mechanism: ICAP busy stall");
    check(n_host_pkts > 0, "mechanism: background traffic");
    check(n_proc_stalls > 0, "mechanism: link backpressure");
    check(n_results == 3 * NOPS, "all operations on the three cores computed");
    $display("insulate=%0d reconnect=%0d discard_flits=%0d glitches_blocked=%0d icap_stalls=%0d host_pkts=%0d proc_stalls=%0d",
             n_insulate, n_reconnect, n_discard, n_glitch_blocked, n_icap_stall, n_host_pkts, n_proc_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
