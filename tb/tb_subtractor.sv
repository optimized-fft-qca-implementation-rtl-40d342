// tb_subtractor: checks the 4-bit pipelined two's complement subtractor at
// its default parameters. Directed cases (0-1 with a borrow through every
// bit, 15-15, 8-7, 0-0, 15-0), then 300 random subtractions with random idle
// cycles. Each result must equal {a >= b, (a - b) mod 16} computed by the
// testbench and appear exactly WIDTH*FA_LAT = 8 cycles after its operands.
module tb_subtractor;
  localparam int unsigned WIDTH   = 4;
  localparam int unsigned LATENCY = 8;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             rst_n, in_valid, out_valid, cout;
  logic [WIDTH-1:0] a, b, diff;
  int checks = 0, failures = 0;
  int cycle = 0;

  subtractor dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .diff, .cout);

  typedef struct { logic [WIDTH:0] res; int t; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_valid) q.push_back('{res: {a >= b, WIDTH'(a - b)}, t: cycle});
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cycle);
      end else begin
        automatic exp_t e = q.pop_front();
        if ({cout, diff} !== e.res || cycle - e.t != LATENCY) begin
          failures++;
          $display("FAIL cycle %0d: got %b_%b expected %b, latency %0d", cycle, cout, diff, e.res, cycle - e.t);
        end
      end
    end
  end

  task automatic put(input logic [WIDTH-1:0] x, y);
    a = x; b = y; in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; a = 0; b = 0;
    repeat (LATENCY + 2) @(posedge clk);
    #1 rst_n = 1;
    put(4'h0, 4'h1);
    put(4'hF, 4'hF);
    put(4'h8, 4'h7);
    put(4'h0, 4'h0);
    put(4'hF, 4'h0);
    for (int n = 0; n < 300; n++) begin
      put(WIDTH'($urandom), WIDTH'($urandom));
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
