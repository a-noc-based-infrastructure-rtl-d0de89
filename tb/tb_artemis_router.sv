// tb_artemis_router: router at (1,1) with all five ports driven.
// Phase 1: random packets from every input to every other direction, with
// random gaps and random ack stalls, some with the ctrl bit set (control
// packets passing through). Each output checks header address, length,
// contents, ctrl bit and per-source order; all packets must arrive once.
// Phase 2: the header latency on an idle router (2 cycles input to output).
// Phase 3: the Artemis services: a control packet insulates the local area
// (reconf high, local input closed), data packets for the local port are
// discarded, a second control packet reconnects it and local delivery works.
module tb_artemis_router;
  import artemis_pkg::*;
  localparam int MX = 1, MY = 1;
  logic  clk = 0, rst = 1;
  logic  rx [NPORTS], ack_rx [NPORTS], tx [NPORTS], ack_tx [NPORTS];
  flit_t data_in [NPORTS], data_out [NPORTS];
  logic  reconf;
  int checks = 0, failures = 0;
  int sent_pkts = 0, recv_pkts = 0, blocked = 0, stalls = 0, ctrl_fwd = 0;
  int discarded_flits = 0;

  artemis_router #(.X(MX), .Y(MY), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] addr_of(input int o);
    case (o)
      0:       return {4'(MX + 1), 4'(MY)};
      1:       return {4'(MX - 1), 4'(MY)};
      2:       return {4'(MX), 4'(MY + 1)};
      3:       return {4'(MX), 4'(MY - 1)};
      default: return {4'(MX), 4'(MY)};
    endcase
  endfunction

  function automatic int len_of(input int src, input int seq);
    return 2 + (src * 7 + seq * 3) % 11;
  endfunction

  function automatic logic [7:0] byte_of(input int src, input int seq, input int i);
    return 8'(src * 37 + seq * 11 + i * 5);
  endfunction

  // ------------------------------------------------------------ senders
  flit_t sq [NPORTS][$];
  bit    gaps = 1;
  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (rx[p] && ack_rx[p]) void'(sq[p].pop_front());
      if (sq[p].size() > 0 && (!gaps || ($urandom % 4) != 0)) begin
        rx[p]      <= 1'b1;
        data_in[p] <= sq[p][0];
      end else begin
        rx[p]      <= 1'b0;
      end
    end
  end

  task automatic queue_pkt(input int src, input int seq, input int o, input bit ctrl);
    int n;
    n = len_of(src, seq);
    sq[src].push_back('{ctrl, addr_of(o)});
    sq[src].push_back('{ctrl, 8'(n)});
    sq[src].push_back('{ctrl, 8'(src)});
    sq[src].push_back('{ctrl, 8'(seq)});
    for (int i = 2; i < n; i++) sq[src].push_back('{ctrl, byte_of(src, seq, i)});
    sent_pkts++;
  endtask

  // ---------------------------------------------------------- receivers
  bit   stall_en = 1;
  int   r_idx [NPORTS], r_len [NPORTS], r_src [NPORTS], r_seq [NPORTS];
  logic r_ctrl [NPORTS];
  int   last_seq [NPORTS][NPORTS];
  int   local_flits = 0;

  always @(posedge clk) begin
    if (!rst) begin
      for (int o = 0; o < NPORTS; o++) begin
        if (tx[o] && !ack_tx[o]) stalls++;
        if (tx[o] && ack_tx[o]) begin
          flit_t f;
          f = data_out[o];
          if (o == int'(P_LOCAL)) local_flits++;
          case (r_idx[o])
            0: begin
              check(f.data == addr_of(o), $sformatf("header at output %0d", o));
              r_ctrl[o] = f.ctrl;
            end
            1: r_len[o] = int'(f.data);
            2: r_src[o] = int'(f.data);
            3: begin
              r_seq[o] = int'(f.data);
              check(r_seq[o] > last_seq[r_src[o]][o], "per-source order");
              last_seq[r_src[o]][o] = r_seq[o];
              check(r_len[o] == len_of(r_src[o], r_seq[o]), "packet length");
            end
            default:
              check(f.data == byte_of(r_src[o], r_seq[o], r_idx[o] - 2), "payload byte");
          endcase
          if (r_idx[o] > 0) check(f.ctrl == r_ctrl[o], "ctrl bit kept on every flit");
          r_idx[o]++;
          if (r_idx[o] >= 2 && r_idx[o] == r_len[o] + 2) begin
            recv_pkts++;
            if (r_ctrl[o]) ctrl_fwd++;
            r_idx[o] = 0;
          end
        end
        ack_tx[o] <= stall_en ? (($urandom % 3) != 0) : 1'b1;
      end
      if (!dut.grant && !dut.empty[dut.rr_ptr] && !dut.in_busy[dut.rr_ptr]) blocked++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_drained(input int max_cycles);
    int c = 0;
    while (c < max_cycles) begin
      bit idle;
      idle = 1;
      for (int p = 0; p < NPORTS; p++) if (sq[p].size() != 0 || !dut.empty[p] || dut.in_busy[p]) idle = 0;
      if (idle) break;
      @(posedge clk); c++;
    end
    check(c < max_cycles, "traffic drained");
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      rx[p] = 0; data_in[p] = '0; ack_tx[p] = 0; r_idx[p] = 0;
      for (int o = 0; o < NPORTS; o++) last_seq[p][o] = -1;
    end
    repeat (3) @(posedge clk);
    rst = 0;

    // ---- phase 1: random traffic
    for (int seq = 0; seq < 100; seq++) begin
      for (int src = 0; src < NPORTS; src++) begin
        int o;
        bit c;
        o = $urandom % NPORTS;
        if (o == src) o = (o + 1 + $urandom % (NPORTS - 1)) % NPORTS;
        c = (o != int'(P_LOCAL)) && (($urandom % 4) == 0);
        queue_pkt(src, seq, o, c);
      end
    end
    wait_drained(100000);
    repeat (20) @(posedge clk);
    check(recv_pkts == sent_pkts, $sformatf("all packets delivered (%0d of %0d)", recv_pkts, sent_pkts));
    check(blocked > 0, "output contention happened");
    check(stalls > 0, "ack stalls happened");
    check(ctrl_fwd > 0, "control packets forwarded");

    // ---- phase 2: header latency on an idle router
    begin
      int t0, t1;
      stall_en = 0; gaps = 0;
      @(posedge clk);
      queue_pkt(int'(P_WEST), 100, int'(P_EAST), 0);
      while (!(rx[P_WEST] && ack_rx[P_WEST])) @(posedge clk);
      t0 = int'($time / 10);
      @(posedge clk);
      while (!tx[P_EAST]) @(posedge clk);
      t1 = int'($time / 10);
      check(t1 - t0 == 2, $sformatf("header latency %0d cycles, expected 2", t1 - t0));
      wait_drained(1000);
    end

    // ---- phase 3: insulation, discarding, reconnection
    begin
      int lf0;
      check(!reconf, "area connected after reset");
      sq[P_WEST].push_back('{1'b1, addr_of(P_LOCAL)});
      sq[P_WEST].push_back('{1'b1, 8'd1});
      sq[P_WEST].push_back('{1'b1, CTL_INSULATE});
      lf0 = local_flits;
      wait_drained(1000);
      repeat (3) @(posedge clk);
      check(reconf, "control packet insulated the area");
      check(local_flits == lf0, "control packet not passed to the local IP");
      // data packets for the insulated area are discarded
      queue_pkt(int'(P_NORTH), 101, int'(P_LOCAL), 0);
      queue_pkt(int'(P_SOUTH), 101, int'(P_LOCAL), 0);
      for (int c = 0; c < 60; c++) begin
        @(posedge clk);
        if (dut.lmode == 2'd2 && dut.pop[dut.out_src[P_LOCAL]]) discarded_flits++;
      end
      wait_drained(1000);
      check(local_flits == lf0, "packets for an insulated area are discarded");
      check(discarded_flits > 0, "discarding happened");
      // the insulated local input accepts nothing
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        force rx[P_LOCAL] = 1'b1;
        force data_in[P_LOCAL] = '{1'b0, 8'($urandom)};
        #1 check(!ack_rx[P_LOCAL], "insulated local input closed");
      end
      release rx[P_LOCAL];
      release data_in[P_LOCAL];
      @(posedge clk);
      check(dut.empty[P_LOCAL], "no spurious flit entered from the area");
      // reconnect
      sq[P_EAST].push_back('{1'b1, addr_of(P_LOCAL)});
      sq[P_EAST].push_back('{1'b1, 8'd1});
      sq[P_EAST].push_back('{1'b1, CTL_RECONNECT});
      wait_drained(1000);
      repeat (3) @(posedge clk);
      check(!reconf, "control packet reconnected the area");
      queue_pkt(int'(P_NORTH), 102, int'(P_LOCAL), 0);
      wait_drained(1000);
      repeat (5) @(posedge clk);
      check(local_flits == lf0 + len_of(int'(P_NORTH), 102) + 2, "delivery after reconnection");
    end
    $display("packets=%0d blocked=%0d stalls=%0d ctrl_forwarded=%0d discarded_flits=%0d",
             recv_pkts, blocked, stalls, ctrl_fwd, discarded_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
