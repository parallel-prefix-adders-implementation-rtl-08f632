// hmpe_adder: hybrid modular parallel-prefix excess-one adder, y = (a + b) mod (2^W - 1).
//
// A regular W-bit prefix adder adds the two operands with no carry-in. Its
// prefix section supplies two control signals: cout (the sum reached 2^W) and
// p_all (every bit propagates, i.e. the sum is exactly 2^W - 1). When either is
// set the raw sum is one short of the modular result, so a modified excess-one
// unit increments it. This replaces the end-around carry of a classic modulo
// 2^W-1 adder (which leaves 2^W-1 as a second code for zero) and the extra
// carry-recirculation prefix level of the parallel modulo adders: the result is
// always in 0 .. 2^W-2, zero has a single code.
//
// Operands are expected in 0 .. 2^W-1 and not both equal to 2^W-1; in the one
// excluded case (both all ones) the output is 2^W-1 instead of 0.
//
// Purely combinational. Structure (prefix adder followed by a conditional
// incrementer driven by the prefix carry and group propagate) follows the
// design; NET selects the prefix network, Brent-Kung by default.
module hmpe_adder
  import prefix_pkg::*;
#(
  parameter int unsigned W   = 20,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] s;
  logic         cout, p_all, inc;

  prefix_adder #(.W(W), .NET(NET)) u_add (
    .a(a), .b(b), .cin(1'b0), .sum(s), .cout(cout), .p_all(p_all)
  );

  assign inc = cout | p_all;

  excess_one_unit #(.W(W)) u_inc (
    .s(s), .inc(inc), .y(y)
  );

endmodule
