// tb_qca_arith_top: end-to-end test of qca_arith_top at its default
// parameters (4-bit adder and subtractor, 2 x 2 multiplier, two-cycle full
// adders). The three units run concurrently on independent random streams
// with random idle cycles. Every result is compared with a + b + cin,
// a - b (with a >= b as the carry out) and a * b worked out by the testbench,
// and must arrive exactly 8 (adder, subtractor) or 4 (multiplier) cycles
// after its operands.
//
// It also counts how often each behaviour of the design occurred and fails
// if one never did: a carry rippling through all four adder bits, an adder
// carry out, a subtraction with and without a borrow, a product with its
// MSB (the last cell's carry) set, and results leaving each pipeline in
// back-to-back cycles and after an idle gap.
module tb_qca_arith_top;
  localparam int unsigned W       = 4;
  localparam int unsigned MN      = 2;
  localparam int unsigned ADD_LAT = 8;
  localparam int unsigned MUL_LAT = 4;
  localparam int unsigned OPS     = 400;

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
  always @(posedge clk) cycle <= cycle + 1;

  // behaviour counters
  int n_full_ripple = 0, n_add_cout = 0, n_borrow = 0, n_no_borrow = 0, n_mul_msb = 0;
  int n_b2b [3] = '{0, 0, 0};
  int n_after_gap [3] = '{0, 0, 0};

  typedef struct { logic [2*W:0] res; int t; } exp_t;
  exp_t q [3][$];
  int   last_out [3] = '{-100, -100, -100};

  task automatic check_out(input int u, input logic [2*W:0] got, input int lat);
    checks++;
    if (q[u].size() == 0) begin
      failures++;
      $display("FAIL unit %0d: unexpected result at cycle %0d", u, cycle);
    end else begin
      automatic exp_t e = q[u].pop_front();
      if (got !== e.res || cycle - e.t != lat) begin
        failures++;
        $display("FAIL unit %0d cycle %0d: got %0h expected %0h latency %0d", u, cycle, got, e.res, cycle - e.t);
      end
    end
    if (cycle - last_out[u] == 1) n_b2b[u]++;
    else if (last_out[u] >= 0) n_after_gap[u]++;
    last_out[u] = cycle;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (add_in_valid) begin
      q[0].push_back('{res: (2*W+1)'(add_a) + (2*W+1)'(add_b) + (2*W+1)'(add_cin), t: cycle});
      if ((add_a ^ add_b) == '1 && add_cin) n_full_ripple++;
    end
    if (sub_in_valid) q[1].push_back('{res: (2*W+1)'({sub_a >= sub_b, W'(sub_a - sub_b)}), t: cycle});
    if (mul_in_valid) q[2].push_back('{res: (2*W+1)'(mul_a * mul_b), t: cycle});
    if (add_out_valid) begin
      check_out(0, (2*W+1)'({add_cout, add_sum}), ADD_LAT);
      if (add_cout) n_add_cout++;
    end
    if (sub_out_valid) begin
      check_out(1, (2*W+1)'({sub_cout, sub_diff}), ADD_LAT);
      if (sub_cout) n_no_borrow++; else n_borrow++;
    end
    if (mul_out_valid) begin
      check_out(2, (2*W+1)'(mul_m), MUL_LAT);
      if (mul_m[2*MN-1]) n_mul_msb++;
    end
  end

  // Stimulus: each cycle each unit gets new operands with probability 3/4.
  initial begin
    rst_n = 0;
    {add_in_valid, sub_in_valid, mul_in_valid} = '0;
    {add_a, add_b, add_cin, sub_a, sub_b, mul_a, mul_b} = '0;
    repeat (ADD_LAT + 2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < OPS; n++) begin
      add_in_valid = ($urandom_range(0, 3) != 0);
      add_a = W'($urandom); add_b = W'($urandom); add_cin = 1'($urandom);
      if (n % 50 == 0) begin add_a = W'(n / 50); add_b = ~add_a; add_cin = 1'b1; end
      sub_in_valid = ($urandom_range(0, 3) != 0);
      sub_a = W'($urandom); sub_b = W'($urandom);
      mul_in_valid = ($urandom_range(0, 3) != 0);
      mul_a = MN'($urandom); mul_b = MN'($urandom);
      @(posedge clk); #1;
    end
    {add_in_valid, sub_in_valid, mul_in_valid} = '0;
    repeat (ADD_LAT + 2) @(posedge clk);
    for (int u = 0; u < 3; u++) begin
      if (q[u].size() != 0) begin
        failures++;
        $display("FAIL unit %0d: %0d results never came out", u, q[u].size());
      end
      checks++;
      if (n_b2b[u] == 0 || n_after_gap[u] == 0) begin
        failures++;
        $display("FAIL unit %0d: back-to-back %0d, after gap %0d", u, n_b2b[u], n_after_gap[u]);
      end
    end
    $display("behaviour counts: full carry ripple %0d, adder carry out %0d, borrow %0d, no borrow %0d, product MSB %0d",
             n_full_ripple, n_add_cout, n_borrow, n_no_borrow, n_mul_msb);
    $display("back-to-back results add/sub/mul %0d/%0d/%0d, after a gap %0d/%0d/%0d",
             n_b2b[0], n_b2b[1], n_b2b[2], n_after_gap[0], n_after_gap[1], n_after_gap[2]);
    checks += 5;
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full carry ripple"); end
    if (n_add_cout == 0)    begin failures++; $display("FAIL no adder carry out"); end
    if (n_borrow == 0)      begin failures++; $display("FAIL no borrow"); end
    if (n_no_borrow == 0)   begin failures++; $display("FAIL no subtraction without borrow"); end
    if (n_mul_msb == 0)     begin failures++; $display("FAIL no product with MSB set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (OPS + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
