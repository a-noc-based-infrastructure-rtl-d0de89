// tb_reconf_interface: random values on every input of the router/core
// interface; checks the forward (identity) bits, the gated return bits and
// the core reset for both values of reconf.
module tb_reconf_interface;
  import artemis_pkg::*;
  logic reset, reconf, r_tx, r_ack_tx, r_rx, r_ack_rx;
  flit_t r_data_out, r_data_in;
  logic c_reset, c_rx, c_ack_rx, c_tx, c_ack_tx;
  logic [7:0] c_data_in, c_data_out;
  int checks = 0, failures = 0;

  reconf_interface dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      reset = 1'($urandom); reconf = 1'($urandom);
      r_tx = 1'($urandom); r_data_out = flit_t'($urandom); r_ack_rx = 1'($urandom);
      c_tx = 1'($urandom); c_data_out = 8'($urandom); c_ack_rx = 1'($urandom);
      #1;
      check(c_reset == (reset | reconf), "core reset = reset OR reconf");
      check(c_rx == r_tx && c_data_in == r_data_out.data && c_ack_tx == r_ack_rx, "F2R identity");
      check(r_rx == (c_tx & ~reconf), "R2F tx gated");
      check(r_ack_tx == (c_ack_rx & ~reconf), "R2F ack gated");
      check(r_data_in.data == (reconf ? 8'h00 : c_data_out), "R2F data gated");
      check(r_data_in.ctrl == 1'b0, "no control packets from the core");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
