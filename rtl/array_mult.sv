// array_mult: pipelined N x N unsigned array multiplier (default 2 x 2)
// built from MAJ_3 AND gates and multiplier cells, following the
// paper-and-pencil method: m = a * b, 2N bits.
//
// Structure. Row 0 has no adders: its partial products a[i]&b[0] come
// straight from MAJ_3 AND gates (third input fixed at 0) and a[0]&b[0] is
// m[0]. Rows j = 1..N-1 each hold N cells; cell (i,j) forms a[i]&b[j] and
// adds it to
//   - from above: the sum of cell (i+1, j-1), or for the last column the
//     carry out of the last cell of the row above (row 0 gives a[i+1]&b[0],
//     and 0 for the last column);
//   - from the right: the carry of cell (i-1, j), 0 for column 0.
// Column 0 of row j gives m[j]; the last row gives m[N-1..2N-2] and its
// last carry is m[2N-1]. At N = 2 this is two cells in series, the first
// adding a1b0 + a0b1 + 0 and the second its carry + a1b1 + 0.
//
// Pipelining. Every cell takes FA_LAT cycles (the full adder's delay), so
// cell (i,j) works in stage i + 2(j-1). Operands enter skewed to that stage:
// b[j] is delayed by 2(j-1) stages and then passed leftwards cell to cell;
// a[i] is delayed by i stages and passed downwards with one extra stage per
// row; the last column's carry gets one extra stage on its way down. Result
// bits are de-skewed so the whole product leaves at once. One product can
// enter every clock; latency is (3N-4)*FA_LAT cycles, 4 at the defaults.
// The lattice and the cell follow the 2 x 2 multiplier design; the stage
// depth per cell, the alignment and the valid bit are choices of this design.
//
// Interface: in_valid/a/b in, out_valid/m out; rst_n (active low,
// synchronous) clears only the valid pipeline.
//
// The a_out of the last row leaves the lattice unused, as a_i does at the
// bottom edge of the array. With FA_LAT = 0 (a purely combinational
// multiplier) Verilator reports UNOPTFLAT on the cell-output arrays: each
// array is one variable to it, so chaining neighbouring cells through it
// looks circular. No bit depends on itself; the warning does not arise at
// the default FA_LAT.
module array_mult
  import qca_arith_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned FA_LAT = FA_LAT_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] m
);

  localparam int unsigned STAGES  = 3 * N - 4;   // cells on the longest path
  localparam int unsigned LATENCY = mult_latency(N, FA_LAT);

  if (N < 2) begin : g_bad_n
    $error("array_mult: N must be at least 2");
  end

  // Row 0: partial products a[i] & b[0].
  logic [N-1:0] pp0;
  for (genvar i = 0; i < N; i++) begin : g_row0
    maj3 u_and (.in({a[i], b[0], 1'b0}), .y(pp0[i]));
  end

  // Cell outputs, indexed [row][column]; row 0 is unused.
  logic a_o [N][N];
  logic b_o [N][N];
  logic s_o [N][N];
  logic c_o [N][N];

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic a_in, b_in, sum_in, carry_in;

      // Operand a[i]: from the input for row 1, from the cell above after
      // one extra stage for later rows.
      if (j == 1) begin : g_a_top
        delay_line #(.W(1), .D(i * FA_LAT)) u_a (
          .clk(clk), .rst_n(1'b1), .din(a[i]), .dout(a_in));
      end else begin : g_a_pass
        delay_line #(.W(1), .D(FA_LAT)) u_a (
          .clk(clk), .rst_n(1'b1), .din(a_o[j-1][i]), .dout(a_in));
      end

      // Operand b[j]: from the input for column 0, from the right otherwise.
      if (i == 0) begin : g_b_edge
        delay_line #(.W(1), .D(2 * (j - 1) * FA_LAT)) u_b (
          .clk(clk), .rst_n(1'b1), .din(b[j]), .dout(b_in));
      end else begin : g_b_pass
        assign b_in = b_o[j][i-1];
      end

      // Sum from above.
      if (j == 1) begin : g_s_top
        if (i < N - 1) begin : g_pp
          delay_line #(.W(1), .D(i * FA_LAT)) u_s (
            .clk(clk), .rst_n(1'b1), .din(pp0[i+1]), .dout(sum_in));
        end else begin : g_zero
          assign sum_in = 1'b0;
        end
      end else begin : g_s_pass
        if (i < N - 1) begin : g_sum
          assign sum_in = s_o[j-1][i+1];
        end else begin : g_carry
          delay_line #(.W(1), .D(FA_LAT)) u_s (
            .clk(clk), .rst_n(1'b1), .din(c_o[j-1][N-1]), .dout(sum_in));
        end
      end

      // Carry from the right.
      if (i == 0) begin : g_c_edge
        assign carry_in = 1'b0;
      end else begin : g_c_pass
        assign carry_in = c_o[j][i-1];
      end

      mult_cell #(.LAT(FA_LAT)) u_cell (
        .clk      (clk),
        .a_in     (a_in),
        .b_in     (b_in),
        .sum_in   (sum_in),
        .carry_in (carry_in),
        .a_out    (a_o[j][i]),
        .b_out    (b_o[j][i]),
        .sum_out  (s_o[j][i]),
        .carry_out(c_o[j][i])
      );
    end
  end

  // Row 0 has no cells; tie its unused entries so nothing is left undriven.
  for (genvar i = 0; i < N; i++) begin : g_row0_tie
    assign a_o[0][i] = 1'b0;
    assign b_o[0][i] = 1'b0;
    assign s_o[0][i] = 1'b0;
    assign c_o[0][i] = 1'b0;
  end

  // Result bits, each delayed to the end of the longest path.
  delay_line #(.W(1), .D(STAGES * FA_LAT)) u_m0 (
    .clk(clk), .rst_n(1'b1), .din(pp0[0]), .dout(m[0]));

  for (genvar j = 1; j < N - 1; j++) begin : g_out_col0
    delay_line #(.W(1), .D((STAGES - (2 * j - 1)) * FA_LAT)) u_m (
      .clk(clk), .rst_n(1'b1), .din(s_o[j][0]), .dout(m[j]));
  end

  for (genvar i = 0; i < N; i++) begin : g_out_last
    delay_line #(.W(1), .D((N - 1 - i) * FA_LAT)) u_m (
      .clk(clk), .rst_n(1'b1), .din(s_o[N-1][i]), .dout(m[N-1+i]));
  end

  assign m[2*N-1] = c_o[N-1][N-1];

  delay_line #(.W(1), .D(LATENCY), .RESET(1'b1)) u_valid (
    .clk(clk), .rst_n(rst_n), .din(in_valid), .dout(out_valid));

endmodule
