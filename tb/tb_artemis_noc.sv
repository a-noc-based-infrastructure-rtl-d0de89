// tb_artemis_noc: 2x2 mesh, every local port sending random packets to
// every router (its own included) with random gaps and ack stalls. Each
// local receiver checks the header, length, contents and per-source order,
// and every packet must arrive exactly once. Then a control packet sent
// across the mesh from router 00 insulates router 01's area, a data packet
// for 01 is discarded, and a second control packet reconnects it.
module tb_artemis_noc;
  import artemis_pkg::*;
  localparam int XS = 2, YS = 2, N = XS * YS;
  logic  clk = 0, rst = 1;
  logic  l_rx [N], l_ack_rx [N], l_tx [N], l_ack_tx [N], reconf [N];
  flit_t l_data_in [N], l_data_out [N];
  int checks = 0, failures = 0, sent_pkts = 0, recv_pkts = 0, stalls = 0;

  artemis_noc #(.X_SIZE(XS), .Y_SIZE(YS), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] addr_of(input int r);
    return {4'(r / YS), 4'(r % YS)};
  endfunction
  function automatic int len_of(input int src, input int seq);
    return 2 + (src * 5 + seq * 7) % 13;
  endfunction
  function automatic logic [7:0] byte_of(input int src, input int seq, input int i);
    return 8'(src * 29 + seq * 13 + i * 3);
  endfunction

  flit_t sq [N][$];
  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      if (l_rx[p] && l_ack_rx[p]) void'(sq[p].pop_front());
      if (sq[p].size() > 0 && ($urandom % 4) != 0) begin
        l_rx[p] <= 1'b1; l_data_in[p] <= sq[p][0];
      end else l_rx[p] <= 1'b0;
    end
  end

  task automatic queue_pkt(input int src, input int seq, input int dst);
    int n;
    n = len_of(src, seq);
    sq[src].push_back('{1'b0, addr_of(dst)});
    sq[src].push_back('{1'b0, 8'(n)});
    sq[src].push_back('{1'b0, 8'(src)});
    sq[src].push_back('{1'b0, 8'(seq)});
    for (int i = 2; i < n; i++) sq[src].push_back('{1'b0, byte_of(src, seq, i)});
    sent_pkts++;
  endtask

  int r_idx [N], r_len [N], r_src [N], r_seq [N], last_seq [N][N], got [N];
  always @(posedge clk) begin
    if (!rst) begin
      for (int o = 0; o < N; o++) begin
        if (l_tx[o] && !l_ack_tx[o]) stalls++;
        if (l_tx[o] && l_ack_tx[o]) begin
          logic [7:0] d;
          d = l_data_out[o].data;
          got[o]++;
          case (r_idx[o])
            0: check(d == addr_of(o), "header names the receiving router");
            1: r_len[o] = int'(d);
            2: r_src[o] = int'(d);
            3: begin
              r_seq[o] = int'(d);
              check(r_seq[o] > last_seq[r_src[o]][o], "per-source order");
              last_seq[r_src[o]][o] = r_seq[o];
              check(r_len[o] == len_of(r_src[o], r_seq[o]), "packet length");
            end
            default: check(d == byte_of(r_src[o], r_seq[o], r_idx[o] - 2), "payload byte");
          endcase
          r_idx[o]++;
          if (r_idx[o] >= 2 && r_idx[o] == r_len[o] + 2) begin recv_pkts++; r_idx[o] = 0; end
        end
        l_ack_tx[o] <= ($urandom % 4) != 0;
      end
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_sent(input int max_cycles);
    int c = 0;
    while (c < max_cycles) begin
      bit idle = 1;
      for (int p = 0; p < N; p++) if (sq[p].size() != 0) idle = 0;
      if (idle) break;
      @(posedge clk); c++;
    end
    repeat (200) @(posedge clk);
    check(c < max_cycles, "all flits injected");
  endtask

  initial begin
    int g1;
    for (int p = 0; p < N; p++) begin
      l_rx[p] = 0; l_data_in[p] = '0; l_ack_tx[p] = 0; r_idx[p] = 0; got[p] = 0;
      for (int q = 0; q < N; q++) last_seq[p][q] = -1;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int seq = 0; seq < 150; seq++)
      for (int src = 0; src < N; src++) queue_pkt(src, seq, $urandom % N);
    wait_sent(200000);
    check(recv_pkts == sent_pkts, $sformatf("all packets delivered (%0d of %0d)", recv_pkts, sent_pkts));
    check(stalls > 0, "ack stalls happened");

    // control packet from router 00 to router 01 across the mesh
    check(!reconf[1], "area 01 connected");
    sq[0].push_back('{1'b1, addr_of(1)});
    sq[0].push_back('{1'b1, 8'd1});
    sq[0].push_back('{1'b1, CTL_INSULATE});
    wait_sent(1000);
    check(reconf[1] && !reconf[0] && !reconf[2] && !reconf[3], "only area 01 insulated");
    g1 = got[1];
    queue_pkt(3, 200, 1);
    wait_sent(1000);
    check(got[1] == g1, "data packet for the insulated area discarded");
    sq[2].push_back('{1'b1, addr_of(1)});
    sq[2].push_back('{1'b1, 8'd1});
    sq[2].push_back('{1'b1, CTL_RECONNECT});
    wait_sent(1000);
    check(!reconf[1], "area 01 reconnected");
    queue_pkt(3, 201, 1);
    wait_sent(1000);
    check(got[1] == g1 + len_of(3, 201) + 2, "delivery after reconnection");
    $display("packets=%0d stalls=%0d", recv_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
