// tb_arith_sqrt: random operands through arith_sqrt, results compared with a
// reference computed in the testbench, and the start-to-done latency
// checked to be 17 cycle(s).
module tb_arith_sqrt;
  logic clk = 0, rst = 1, start, busy, done;
  logic [31:0] opnd, result, exp;
  logic [15:0] a, b;
  int checks = 0, failures = 0;

  arith_sqrt dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] isqrt(input logic [31:0] v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= longint'(v)) r++;
    return 32'(r);
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    start = 0; opnd = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      opnd = (i % 3 == 0) ? 32'($urandom % 70000) : $urandom; if (i == 0) opnd = 32'hFFFF_FFFF; if (i == 1) opnd = 0; a = 0; b = 0;
      exp = isqrt(opnd);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (result !== exp) begin
        failures++;
        $display("FAIL: opnd=%h result=%h expected=%h", opnd, result, exp);
      end
      checks++;
      if (lat != 17) begin
        failures++;
        $display("FAIL: latency %0d, expected 17", lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
