// subtractor: WIDTH-bit subtractor (default 4 bits) computing a - b in two's
// complement: every bit of b goes through an inverter (one's complement) and
// the ripple carry adder's carry input is tied to 1, which adds the missing
// one. This is the structure of the MAJ_5 subtractor, derived from the RCA.
//
// diff is a - b modulo 2^WIDTH. cout is the adder's carry out: 1 when
// a >= b as unsigned numbers (no borrow), 0 when a borrow occurred; bringing
// it out is a choice of this design.
//
// Timing and interface are those of rca: one subtraction per clock, result
// WIDTH*FA_LAT cycles after the operands (8 at the defaults), valid bit
// cleared by the synchronous active-low rst_n.
module subtractor
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
  output logic             out_valid,
  output logic [WIDTH-1:0] diff,
  output logic             cout
);

  logic [WIDTH-1:0] b_inv;
  assign b_inv = ~b;

  rca #(.WIDTH(WIDTH), .FA_LAT(FA_LAT)) u_rca (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .b        (b_inv),
    .cin      (1'b1),
    .out_valid(out_valid),
    .sum      (diff),
    .cout     (cout)
  );

endmodule
