// rns_prefix_top: the three prefix-adder-based RNS reverse converters side
// by side, all built from the same hybrid adder components.
//
//   Converter-1  {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1}   c1_x1..c1_x4 -> c1_x (5n+1 bits)
//   Converter-2  {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}  c2_x1..c2_x4 -> c2_x (6n+1 bits)
//   Converter-3  {2^n-1, 2^n+1, 2^2n, 2^2n+1}      c3_x1..c3_x4 -> c3_x (6n bits)
//
// Each converter turns the four residues of a number (inputs in the order of
// its moduli set) into the number in binary. Inside, every modulo 2^k-1 sum
// is formed by a tree of end-around-carry carry-save adders followed by an
// HMPE adder (prefix adder plus conditional excess-one correction), and the
// final subtraction of Converter-1 and Converter-2, whose second operand
// carries a run of constant ones, uses the HRPX adder. All prefix networks
// are Brent-Kung unless NET says otherwise; n = 5 by default.
//
// The converters share nothing and are independent; everything is
// combinational, with no clocks or registers. The low output bits of each
// converter are its power-of-two residue passed straight through.
module rns_prefix_top
  import prefix_pkg::*;
#(
  parameter int unsigned N   = 5,        // moduli-set parameter n
  parameter prefix_net_e NET = PFX_BK    // prefix network of every adder
) (
  // Converter-1: {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1}
  input  logic [N-1:0]   c1_x1,
  input  logic [N-1:0]   c1_x2,
  input  logic [N:0]     c1_x3,
  input  logic [2*N:0]   c1_x4,
  output logic [5*N:0]   c1_x,
  // Converter-2: {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}
  input  logic [N-1:0]   c2_x1,
  input  logic [N:0]     c2_x2,
  input  logic [2*N-1:0] c2_x3,
  input  logic [2*N:0]   c2_x4,
  output logic [6*N:0]   c2_x,
  // Converter-3: {2^n-1, 2^n+1, 2^2n, 2^2n+1}
  input  logic [N-1:0]   c3_x1,
  input  logic [N:0]     c3_x2,
  input  logic [2*N-1:0] c3_x3,
  input  logic [2*N:0]   c3_x4,
  output logic [6*N-1:0] c3_x
);

  reverse_converter1 #(.N(N), .NET(NET)) u_conv1 (
    .x1(c1_x1), .x2(c1_x2), .x3(c1_x3), .x4(c1_x4), .x(c1_x)
  );

  reverse_converter2 #(.N(N), .NET(NET)) u_conv2 (
    .x1(c2_x1), .x2(c2_x2), .x3(c2_x3), .x4(c2_x4), .x(c2_x)
  );

  reverse_converter3 #(.N(N), .NET(NET)) u_conv3 (
    .x1(c3_x1), .x2(c3_x2), .x3(c3_x3), .x4(c3_x4), .x(c3_x)
  );

endmodule
