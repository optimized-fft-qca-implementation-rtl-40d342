// tb_array_mult: checks the pipelined array multiplier. The default 2 x 2
// instance gets all sixteen operand pairs back to back, then random pairs
// with idle cycles; 3 x 3 and 4 x 4 instances of the same lattice get random
// streams. Every product is compared with a * b computed by the testbench
// and must appear exactly (3N-4)*FA_LAT cycles after its operands
// (4, 10 and 16 cycles).
module tb_array_mult;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // One checker per instance size.
  for (genvar g = 0; g < 3; g++) begin : g_inst
    localparam int unsigned N   = g + 2;
    localparam int unsigned LAT = (3 * N - 4) * 2;

    logic           in_valid, out_valid;
    logic [N-1:0]   a, b;
    logic [2*N-1:0] m;

    if (g == 0) begin : g_default
      array_mult dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .m);
    end else begin : g_param
      array_mult #(.N(N)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .m);
    end

    typedef struct { logic [2*N-1:0] res; int t; } exp_t;
    exp_t q[$];

    always @(posedge clk) begin
      if (rst_n && in_valid) q.push_back('{res: (2*N)'(a * b), t: cycle});
      if (rst_n && out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL N=%0d unexpected product at cycle %0d", N, cycle);
        end else begin
          automatic exp_t e = q.pop_front();
          if (m !== e.res || cycle - e.t != LAT) begin
            failures++;
            $display("FAIL N=%0d cycle %0d: got %0d expected %0d, latency %0d",
                     N, cycle, m, e.res, cycle - e.t);
          end
        end
      end
    end

    initial begin
      in_valid = 0; a = 0; b = 0;
      wait (rst_n === 1'b1);
      #1;
      if (N == 2) begin
        for (int v = 0; v < 16; v++) begin
          {a, b} = (2*N)'(v); in_valid = 1;
          @(posedge clk); #1;
        end
      end
      for (int n = 0; n < 200; n++) begin
        a = N'($urandom); b = N'($urandom); in_valid = 1;
        if (n == 0) begin a = '1; b = '1; end
        @(posedge clk); #1;
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(1, 3)) @(posedge clk);
          #1;
        end
      end
      in_valid = 0;
      repeat (LAT + 2) @(posedge clk);
      if (q.size() != 0) begin
        failures++;
        $display("FAIL N=%0d %0d products never came out", N, q.size());
      end
      done[g] = 1'b1;
    end
  end

  logic [2:0] done = '0;

  initial begin
    rst_n = 0;
    repeat (20) @(posedge clk);
    #1 rst_n = 1;
    wait (&done);
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
