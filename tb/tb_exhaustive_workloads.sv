// tb_exhaustive_workloads: runs the three evaluated configurations through
// qca_arith_top at its default parameters with every possible input, one
// operation per clock with no idle cycles:
//   - all 512 additions a + b + cin of the 4-bit ripple carry adder,
//   - all 256 subtractions a - b of the 4-bit subtractor,
//   - all 16 products a * b of the 2 x 2 array multiplier.
// Each result is compared with the value computed here and must leave the
// pipeline a fixed number of cycles (8, 8 and 4) after its operands.
module tb_exhaustive_workloads;
  localparam int unsigned W = 4;
  localparam int unsigned MN = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic            add_in_valid, add_cin, add_out_valid, add_cout;
  logic [W-1:0]    add_a, add_b, add_sum;
  logic            sub_in_valid, sub_out_valid, sub_cout;
  logic [W-1:0]    sub_a, sub_b, sub_diff;
  logic            mul_in_valid, mul_out_valid;
  logic [MN-1:0]   mul_a, mul_b;
  logic [2*MN-1:0] mul_m;

  qca_arith_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_add = 0, n_sub = 0, n_mul = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Inputs are driven from a counter started at issue_start, so the
  // expected result at each output cycle follows from the cycle number.
  int issue_start = -1;

  always @(posedge clk) if (rst_n && issue_start >= 0) begin
    if (add_out_valid) begin
      automatic int v = cycle - issue_start - 8;
      automatic logic [W:0] e = (W+1)'(v[3:0]) + (W+1)'(v[7:4]) + (W+1)'(v[8]);
      checks++; n_add++;
      if ({add_cout, add_sum} !== e) begin
        failures++;
        $display("FAIL add #%0d got %b expected %b", v, {add_cout, add_sum}, e);
      end
    end
    if (sub_out_valid) begin
      automatic int v = cycle - issue_start - 8;
      automatic logic [W:0] e = {v[3:0] >= v[7:4], W'(v[3:0] - v[7:4])};
      checks++; n_sub++;
      if ({sub_cout, sub_diff} !== e) begin
        failures++;
        $display("FAIL sub #%0d got %b expected %b", v, {sub_cout, sub_diff}, e);
      end
    end
    if (mul_out_valid) begin
      automatic int v = cycle - issue_start - 4;
      automatic logic [2*MN-1:0] e = (2*MN)'(v[1:0] * v[3:2]);
      checks++; n_mul++;
      if (mul_m !== e) begin
        failures++;
        $display("FAIL mul #%0d got %b expected %b", v, mul_m, e);
      end
    end
  end

  initial begin
    rst_n = 0;
    {add_in_valid, sub_in_valid, mul_in_valid} = '0;
    {add_a, add_b, add_cin, sub_a, sub_b, mul_a, mul_b} = '0;
    repeat (10) @(posedge clk);
    #1 rst_n = 1;
    issue_start = cycle;
    for (int v = 0; v < 512; v++) begin
      add_in_valid = 1'b1;
      {add_cin, add_b, add_a} = 9'(v);
      sub_in_valid = (v < 256);
      {sub_b, sub_a} = 8'(v);
      mul_in_valid = (v < 16);
      {mul_b, mul_a} = 4'(v);
      @(posedge clk); #1;
    end
    {add_in_valid, sub_in_valid, mul_in_valid} = '0;
    repeat (12) @(posedge clk);
    checks++;
    if (n_add != 512 || n_sub != 256 || n_mul != 16) begin
      failures++;
      $display("FAIL result counts add %0d sub %0d mul %0d", n_add, n_sub, n_mul);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
