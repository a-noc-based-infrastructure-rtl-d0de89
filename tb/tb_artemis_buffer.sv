// tb_artemis_buffer: self-checking test of the router input buffer.
// Random writes and reads against a queue model: every flit must come out
// once, in order, ack_rx must drop exactly when the buffer is full, and a
// written flit must be readable one cycle later.
module tb_artemis_buffer;
  localparam int W = 9, DEPTH = 4;
  logic clk = 0, rst = 1;
  logic rx, ack_rx, empty, pop;
  logic [W-1:0] din, head;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] model[$];

  artemis_buffer #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = 0; din = '0; pop = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      rx  = ($urandom % 3) != 0;
      din = W'($urandom);
      pop = !empty && (($urandom % 3) == 0 || cyc > 3500);
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(ack_rx == (rx && model.size() < DEPTH), "ack_rx");
      if (model.size() == DEPTH) fulls++;
      if (!empty) check(head == model[0], "head flit");
      @(posedge clk);
      if (pop && model.size() > 0) void'(model.pop_front());
      if (rx && ack_rx) model.push_back(din);
    end
    check(fulls > 0, "buffer reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
