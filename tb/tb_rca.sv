// tb_rca: checks the 4-bit pipelined ripple carry adder at its default
// parameters. Directed cases first (full carry ripple 1111+0001, carry-in
// ripple 1111+0000+1, largest sum 1111+1111+1, zero), then 300 random
// additions with random idle cycles, new operands in back-to-back cycles
// wherever in_valid stays high. Every result is compared with a + b + cin
// computed by the testbench, and must appear exactly WIDTH*FA_LAT = 8 cycles
// after its operands.
module tb_rca;
  localparam int unsigned WIDTH   = 4;
  localparam int unsigned LATENCY = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, in_valid, cin, out_valid, cout;
  logic [WIDTH-1:0] a, b, sum;
  int checks = 0, failures = 0;
  int cycle = 0;

  rca dut (.clk, .rst_n, .in_valid, .a, .b, .cin, .out_valid, .sum, .cout);

  typedef struct { logic [WIDTH:0] res; int t; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) q.push_back('{res: (WIDTH+1)'(a + b + cin), t: cycle});
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        automatic exp_t e = q.pop_front();
        if ({cout, sum} !== e.res || cycle - e.t != LATENCY) begin
          failures++;
          $display("FAIL cycle %0d: got %b_%b expected %b, latency %0d", cycle, cout, sum, e.res, cycle - e.t);
        end
      end
    end
  end

  task automatic put(input logic [WIDTH-1:0] x, y, input logic c);
    a = x; b = y; cin = c; in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; a = 0; b = 0; cin = 0;
    repeat (LATENCY + 2) @(posedge clk);
    #1 rst_n = 1;
    put(4'hF, 4'h1, 1'b0);
    put(4'hF, 4'h0, 1'b1);
    put(4'hF, 4'hF, 1'b1);
    put(4'h0, 4'h0, 1'b0);
    put(4'h5, 4'hA, 1'b0);
    for (int n = 0; n < 300; n++) begin
      put(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
      #0;
    end
    repeat (LATENCY + 2) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
