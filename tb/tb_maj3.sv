// tb_maj3: exhaustive check of the three-input majority gate against a
// population count of its inputs (output 1 when two or more inputs are 1),
// plus its use as an AND gate with one input held at 0.
module tb_maj3;
  logic [2:0] in;
  logic       y;
  int checks = 0, failures = 0;

  maj3 dut (.in(in), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      in = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(in) >= 2)) begin
        failures++;
        $display("FAIL maj3 in=%b y=%b", in, y);
      end
    end
    for (int v = 0; v < 4; v++) begin
      in = {v[1], v[0], 1'b0};
      #1;
      checks++;
      if (y !== (v[1] & v[0])) begin
        failures++;
        $display("FAIL maj3 as AND in=%b y=%b", in, y);
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
