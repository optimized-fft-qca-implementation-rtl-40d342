// mult_cell: the building block of the array multiplier. It forms the
// partial-product bit s = a AND b with a MAJ_3 gate whose third input is
// fixed at 0, then adds s, the sum coming from the cell above (sum_in) and
// the carry coming from the cell to the right (carry_in) with the MAJ_5
// full adder. The operand bits a and b are passed on to the next cells
// (a_out downwards, b_out to the left), as in the cell's QCA layout.
//
// Timing: all four outputs belong to the inputs presented LAT cycles
// earlier (the full adder's delay, default 2 cycles); a/b are delayed by the
// same amount so they stay in step with sum_out and carry_out. Counting the
// AND gate inside the full adder's first stage is a choice of this design.
module mult_cell
  import qca_arith_pkg::*;
#(
  parameter int unsigned LAT = FA_LAT_DEFAULT
) (
  input  logic clk,
  input  logic a_in,
  input  logic b_in,
  input  logic sum_in,
  input  logic carry_in,
  output logic a_out,
  output logic b_out,
  output logic sum_out,
  output logic carry_out
);

  logic pp;

  maj3 u_and (.in({a_in, b_in, 1'b0}), .y(pp));

  full_adder #(.LAT(LAT)) u_fa (
    .clk(clk), .a(pp), .b(sum_in), .cin(carry_in), .sum(sum_out), .cout(carry_out)
  );

  delay_line #(.W(2), .D(LAT)) u_pass (
    .clk(clk), .rst_n(1'b1), .din({a_in, b_in}), .dout({a_out, b_out})
  );

endmodule
