// full_adder: one-bit full adder built from one MAJ_3, one inverter and one
// MAJ_5 gate.
//
//   cout = MAJ3(a, b, cin)
//   sum  = MAJ5(a, b, cin, ~cout, ~cout)
//
// The second form works because the two copies of ~cout outvote the three
// inputs exactly when two of them are 1 (sum 0) and let them through
// otherwise. Both gate equations follow the MAJ_5 full adder design.
//
// Timing: the QCA layout has a delay of two QCA clock cycles; here the gate
// outputs pass through LAT register stages (default 2), so sum and cout
// belong to the inputs presented LAT cycles earlier. A new input can be
// presented every cycle. LAT = 0 gives a combinational adder. The data
// registers have no reset.
module full_adder
  import qca_arith_pkg::*;
#(
  parameter int unsigned LAT = FA_LAT_DEFAULT
) (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic carry_c, sum_c;

  maj3 u_carry (.in({a, b, cin}), .y(carry_c));
  maj5 u_sum   (.in({a, b, cin, ~carry_c, ~carry_c}), .y(sum_c));

  delay_line #(.W(2), .D(LAT)) u_zone (
    .clk  (clk),
    .rst_n(1'b1),
    .din  ({carry_c, sum_c}),
    .dout ({cout, sum})
  );

endmodule
