// rca: WIDTH-bit ripple carry adder (default 4 bits) made of cascaded MAJ_5
// full adders. Bit 0 adds a[0], b[0] and cin; every further full adder adds
// the next pair of operand bits and the carry of the one before it.
//
// Pipelining: each full adder takes FA_LAT cycles, so the carry reaches bit k
// k*FA_LAT cycles after the operands arrive. Bits a[k], b[k] are held back
// by k*FA_LAT cycles to meet that carry (in the QCA layout this is done by
// longer input wires), and sum bit k is held by (WIDTH-1-k)*FA_LAT cycles so
// that all result bits of one addition leave together. A new addition can
// therefore enter every clock and its result appears WIDTH*FA_LAT cycles
// later (8 cycles at the defaults). The output alignment and the valid bit
// are choices of this design; the adder structure follows the MAJ_5 RCA.
//
// Interface: in_valid/a/b/cin in, out_valid/sum/cout out; rst_n (active low,
// synchronous) clears only the valid pipeline.
module rca
  import qca_arith_pkg::*;
#(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned FA_LAT = FA_LAT_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LATENCY = rca_latency(WIDTH, FA_LAT);

  // carry[k] enters bit k; carry[WIDTH] is the adder's carry out.
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    logic a_k, b_k, s_k;

    delay_line #(.W(2), .D(k * FA_LAT)) u_skew (
      .clk(clk), .rst_n(1'b1), .din({a[k], b[k]}), .dout({a_k, b_k})
    );

    full_adder #(.LAT(FA_LAT)) u_fa (
      .clk(clk), .a(a_k), .b(b_k), .cin(carry[k]), .sum(s_k), .cout(carry[k+1])
    );

    delay_line #(.W(1), .D((WIDTH - 1 - k) * FA_LAT)) u_deskew (
      .clk(clk), .rst_n(1'b1), .din(s_k), .dout(sum[k])
    );
  end

  assign cout = carry[WIDTH];

  delay_line #(.W(1), .D(LATENCY), .RESET(1'b1)) u_valid (
    .clk(clk), .rst_n(rst_n), .din(in_valid), .dout(out_valid)
  );

endmodule
