// reverse_converter2: residue-to-binary converter for the four-moduli set
// {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}
// (dynamic range 2^2n (2^2n - 1)(2^(2n+1) - 1), 6n+1 bits).
//
// How it works, in three steps, each a modular or regular addition:
//  1. Y = |Z - x3|_(2^2n-1), where Z = |X|_(2^2n-1) comes from the Chinese
//     remainder theorem over 2^n-1 and 2^n+1 (both inverses are 2^(n-1)).
//     Operands, 2n bits, rot = rotate left, ~ = negation modulo 2^2n-1:
//       rot({x1,x1}, n-1), rot(x2, 2n-1), rot(~x2, n-1), ~x3
//     Two end-around-carry CSAs and a 2n-bit HMPE adder give Y; then
//     X' = {Y, x3} is X modulo 2^2n (2^2n - 1).
//  2. Mixed-radix step with m4 = 2^(2n+1)-1: the inverse of 2^2n(2^2n-1)
//     modulo m4 is -4, so k = |4 (X' - x4)|_m4. X' is folded into two
//     (2n+1)-bit chunks; operands rot(X'[2n:0], 2), rot(X'[4n-1:2n+1], 2),
//     rot(~x4, 2) go through one CSA with end-around carry and a (2n+1)-bit
//     HMPE adder.
//  3. X = x3 + 2^2n R with R = Y + k (2^2n - 1) = {k, Y} - k. Written as an
//     addition, {k, Y} + {2n ones, ~k} + 1, the second operand has 2n
//     constant ones at the top: this is the HRPX adder (4n+1 bits, 2n+1
//     variable bits). The output is {R, x3}.
//
// Interface: x1 in 0..2^n-2 (n bits), x2 in 0..2^n (n+1 bits), x3 in
// 0..2^2n-1 (2n bits), x4 in 0..2^(2n+1)-2 (2n+1 bits); x has 6n+1 bits.
// Purely combinational.
//
// The moduli set, the use of HMPE adders for every modulo 2^k-1 addition,
// the HRPX adder for the final subtraction with a constant-ones operand, the
// Brent-Kung networks and n = 5 follow the design; the conversion formulas
// are this RTL's own derivation.
module reverse_converter2
  import prefix_pkg::*;
#(
  parameter int unsigned N   = 5,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [N-1:0]   x1,   // residue modulo 2^n - 1
  input  logic [N:0]     x2,   // residue modulo 2^n + 1
  input  logic [2*N-1:0] x3,   // residue modulo 2^2n
  input  logic [2*N:0]   x4,   // residue modulo 2^(2n+1) - 1
  output logic [6*N:0]   x
);

  localparam int unsigned WA = 2 * N;      // modulo 2^2n-1 datapath
  localparam int unsigned WB = 2 * N + 1;  // modulo 2^(2n+1)-1 datapath

  function automatic logic [WA-1:0] rota(input logic [WA-1:0] v, input int unsigned k);
    int unsigned r;
    r = k % WA;
    return (r == 0) ? v : ((v << r) | (v >> (WA - r)));
  endfunction

  function automatic logic [WB-1:0] rotb(input logic [WB-1:0] v, input int unsigned k);
    int unsigned r;
    r = k % WB;
    return (r == 0) ? v : ((v << r) | (v >> (WB - r)));
  endfunction

  // step 1: Y = |X - x3|_(2^2n-1) / 2^2n  (2^2n = 1 modulo 2^2n-1)
  logic [WA-1:0] xb, a1, a2, a3, a4, sa1, ca1, sa2, ca2, y;

  always_comb begin
    xb = WA'(x2);
    a1 = rota({x1, x1}, N - 1);
    a2 = rota(xb, 2 * N - 1);
    a3 = rota(~xb, N - 1);
    a4 = ~x3;
  end

  csa_eac #(.W(WA)) u_csa_a1 (.x(a1),  .y(a2),  .z(a3), .sum(sa1), .carry(ca1));
  csa_eac #(.W(WA)) u_csa_a2 (.x(sa1), .y(ca1), .z(a4), .sum(sa2), .carry(ca2));
  hmpe_adder #(.W(WA), .NET(NET)) u_cpa_a (.a(sa2), .b(ca2), .y(y));

  // step 2: k = |4 (X' - x4)|_(2^(2n+1)-1),  X' = {Y, x3}
  logic [4*N-1:0] xp;
  logic [WB-1:0]  b1, b2, b3, sb, cb, k;

  always_comb begin
    xp = {y, x3};
    b1 = rotb(xp[WB-1:0], 2);
    b2 = rotb(WB'(xp[4*N-1:WB]), 2);
    b3 = rotb(~x4, 2);
  end

  csa_eac #(.W(WB)) u_csa_b (.x(b1), .y(b2), .z(b3), .sum(sb), .carry(cb));
  hmpe_adder #(.W(WB), .NET(NET)) u_cpa_b (.a(sb), .b(cb), .y(k));

  // step 3: R = {k, Y} - k through the HRPX adder
  logic [4*N:0] r;
  logic         r_cout_unused;  // always 1: the difference is never negative

  hrpx_adder #(.W(4 * N + 1), .K(WB), .NET(NET)) u_final (
    .a({k, y}), .b(~k), .cin(1'b1), .s(r), .cout(r_cout_unused)
  );

  assign x = {r, x3};

endmodule
