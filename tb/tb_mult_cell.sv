// tb_mult_cell: drives the multiplier cell (default LAT = 2) with a random
// {a, b, sum_in, carry_in} every clock, all sixteen combinations occurring
// many times, and checks that LAT cycles later sum_out/carry_out equal
// (a & b) + sum_in + carry_in and a_out/b_out equal the a and b presented.
module tb_mult_cell;
  localparam int unsigned LAT = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic a_in, b_in, sum_in, carry_in, a_out, b_out, sum_out, carry_out;
  int checks = 0, failures = 0;

  mult_cell dut (.clk, .a_in, .b_in, .sum_in, .carry_in, .a_out, .b_out, .sum_out, .carry_out);

  // expected {a_out, b_out, carry_out, sum_out}, index k = k cycles old
  logic [3:0] hist [LAT];
  int         filled = 0;

  initial begin
    {a_in, b_in, sum_in, carry_in} = '0;
    for (int n = 0; n < 400; n++) begin
      {a_in, b_in, sum_in, carry_in} = 4'($urandom_range(0, 15));
      @(posedge clk);
      for (int k = LAT - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = {a_in, b_in, 2'(2'(a_in & b_in) + 2'(sum_in) + 2'(carry_in))};
      filled++;
      #1;
      if (filled >= LAT) begin
        checks++;
        if ({a_out, b_out, carry_out, sum_out} !== hist[LAT-1]) begin
          failures++;
          $display("FAIL cycle %0d: got %b expected %b", n,
                   {a_out, b_out, carry_out, sum_out}, hist[LAT-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
