// qca_arith_top: the three MAJ_5-based arithmetic units proposed as the
// building blocks of a QCA FFT datapath, side by side on one clock:
//   - a WIDTH-bit ripple carry adder       (add_*),  default 4 bits
//   - a WIDTH-bit two's complement subtractor (sub_*), default 4 bits
//   - a MULT_N x MULT_N pipelined array multiplier (mul_*), default 2 x 2
// How the units are wired inside an FFT butterfly is not part of this
// design, so each keeps its own ports.
//
// Timing: every unit accepts a new operand set each clock. The adder and
// subtractor answer WIDTH*FA_LAT cycles later (8 at the defaults), the
// multiplier (3*MULT_N-4)*FA_LAT cycles later (4 at the defaults); each
// *_out_valid marks its results. rst_n is active low and synchronous and
// clears only the valid pipelines.
module qca_arith_top
  import qca_arith_pkg::*;
#(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned MULT_N = 2,
  parameter int unsigned FA_LAT = FA_LAT_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  // ripple carry adder
  input  logic                add_in_valid,
  input  logic [WIDTH-1:0]    add_a,
  input  logic [WIDTH-1:0]    add_b,
  input  logic                add_cin,
  output logic                add_out_valid,
  output logic [WIDTH-1:0]    add_sum,
  output logic                add_cout,
  // subtractor
  input  logic                sub_in_valid,
  input  logic [WIDTH-1:0]    sub_a,
  input  logic [WIDTH-1:0]    sub_b,
  output logic                sub_out_valid,
  output logic [WIDTH-1:0]    sub_diff,
  output logic                sub_cout,
  // array multiplier
  input  logic                mul_in_valid,
  input  logic [MULT_N-1:0]   mul_a,
  input  logic [MULT_N-1:0]   mul_b,
  output logic                mul_out_valid,
  output logic [2*MULT_N-1:0] mul_m
);

  rca #(.WIDTH(WIDTH), .FA_LAT(FA_LAT)) u_add (
    .clk(clk), .rst_n(rst_n),
    .in_valid(add_in_valid), .a(add_a), .b(add_b), .cin(add_cin),
    .out_valid(add_out_valid), .sum(add_sum), .cout(add_cout));

  subtractor #(.WIDTH(WIDTH), .FA_LAT(FA_LAT)) u_sub (
    .clk(clk), .rst_n(rst_n),
    .in_valid(sub_in_valid), .a(sub_a), .b(sub_b),
    .out_valid(sub_out_valid), .diff(sub_diff), .cout(sub_cout));

  array_mult #(.N(MULT_N), .FA_LAT(FA_LAT)) u_mul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mul_in_valid), .a(mul_a), .b(mul_b),
    .out_valid(mul_out_valid), .m(mul_m));

endmodule
