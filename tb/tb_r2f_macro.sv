// tb_r2f_macro: checks out = in AND control over random inputs, with
// control both low (all outputs 0) and high (outputs follow in).
module tb_r2f_macro;
  logic [7:0] in, out;
  logic control;
  int checks = 0, failures = 0;

  r2f_macro #(.W(8)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      in = 8'(i);
      control = i[8];
      #1;
      checks++;
      if (out != (control ? in : 8'h00)) begin
        failures++;
        $display("FAIL: in=%h control=%b out=%h", in, control, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
