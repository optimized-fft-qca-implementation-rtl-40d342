// tb_maj5: exhaustive check of the five-input majority gate against a
// population count of its inputs (output 1 when three or more are 1).
module tb_maj5;
  logic [4:0] in;
  logic       y;
  int checks = 0, failures = 0;

  maj5 dut (.in(in), .y(y));

  initial begin
    for (int v = 0; v < 32; v++) begin
      in = 5'(v);
      #1;
      checks++;
      if (y !== ($countones(in) >= 3)) begin
        failures++;
        $display("FAIL maj5 in=%b y=%b", in, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
