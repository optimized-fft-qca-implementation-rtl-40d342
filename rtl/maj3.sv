// maj3: three-input majority gate, the basic logic primitive of QCA.
// y is 1 when at least two of the three inputs are 1. With one input held
// at 0 it acts as a two-input AND, with one held at 1 as an OR.
// Purely combinational.
module maj3 (
  input  logic [2:0] in,
  output logic       y
);
  assign y = (in[0] & in[1]) | (in[0] & in[2]) | (in[1] & in[2]);
endmodule
