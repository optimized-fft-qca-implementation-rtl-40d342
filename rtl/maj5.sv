// maj5: five-input majority gate, the QCA primitive on which the adder,
// subtractor and multiplier of this design are built.
// y is 1 when at least three of the five inputs are 1. Written as the OR of
// all ten three-input AND terms; purely combinational.
module maj5 (
  input  logic [4:0] in,
  output logic       y
);
  always_comb begin
    y = 1'b0;
    for (int i = 0; i < 5; i++)
      for (int j = i + 1; j < 5; j++)
        for (int k = j + 1; k < 5; k++)
          y |= in[i] & in[j] & in[k];
  end
endmodule
