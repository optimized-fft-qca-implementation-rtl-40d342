// delay_line: a chain of D registers, W bits wide, used to model QCA clock
// zones (wires that hold a value for a clock cycle) and to skew and de-skew
// operands in the pipelined adders and multiplier.
//
// Interface: din enters at a clock edge and appears on dout D cycles later.
// D = 0 is a plain wire. With RESET = 1 every stage clears to zero on a
// synchronous active-low rst_n (used for valid bits); with RESET = 0 the
// stages have no reset (data paths) and rst_n is not used.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned D     = 1,
  parameter bit          RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage [D];

    always_ff @(posedge clk) begin
      if (RESET && !rst_n) begin
        for (int unsigned k = 0; k < D; k++) stage[k] <= '0;
      end else begin
        stage[0] <= din;
        for (int unsigned k = 1; k < D; k++) stage[k] <= stage[k-1];
      end
    end

    assign dout = stage[D-1];
  end

endmodule
