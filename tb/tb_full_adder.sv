// tb_full_adder: drives the MAJ_5 full adder (default two-cycle latency)
// with a new input triple every clock, all eight combinations repeatedly in
// random order, and checks sum and cout against a + b + cin computed from the
// inputs presented exactly LAT cycles earlier. A combinational copy (LAT=0)
// is checked in the same cycle.
module tb_full_adder;
  localparam int unsigned LAT = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic a, b, cin;
  logic sum, cout, sum0, cout0;
  int checks = 0, failures = 0;

  full_adder dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  full_adder #(.LAT(0)) dut_comb (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum0), .cout(cout0));

  logic [1:0] expect_hist [LAT+1];   // expected {cout,sum} of recent inputs
  int         filled = 0;

  initial begin
    a = 0; b = 0; cin = 0;
    for (int n = 0; n < 400; n++) begin
      {a, b, cin} = 3'($urandom_range(0, 7));
      #1;
      checks++;
      if ({cout0, sum0} !== 2'(a + b + cin)) begin
        failures++;
        $display("FAIL comb a=%b b=%b cin=%b -> cout=%b sum=%b", a, b, cin, cout0, sum0);
      end
      @(posedge clk);
      // shift history: entry k holds the expectation for inputs k cycles old
      for (int k = LAT; k > 0; k--) expect_hist[k] = expect_hist[k-1];
      expect_hist[0] = 2'(a + b + cin);
      filled++;
      #1;
      if (filled >= LAT) begin
        checks++;
        if ({cout, sum} !== expect_hist[LAT-1]) begin
          failures++;
          $display("FAIL pipelined cycle %0d: got %b%b expected %b", n, cout, sum, expect_hist[LAT-1]);
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
