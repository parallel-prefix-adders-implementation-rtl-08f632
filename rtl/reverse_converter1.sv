// reverse_converter1: residue-to-binary converter for the four-moduli set
// {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1}
// (dynamic range 2^n (2^2n - 1)(2^(2n+1) - 1), 5n+1 bits).
//
// How it works, in three steps, each a modular or regular addition:
//  1. The classic three-moduli step: Y = |2^n (Z - x2)|_(2^2n-1), where
//     Z = |X|_(2^2n-1) comes from the Chinese remainder theorem over 2^n-1
//     and 2^n+1 (both inverses 2^(n-1)) and 2^n is the inverse of 2^n modulo
//     2^2n-1. Operands, 2n bits, rot = rotate left, ~ = negation modulo
//     2^2n-1:  rot({x1,x1}, 2n-1), rot(x3, n-1), rot(~x3, 2n-1), rot(~x2, n)
//     Two end-around-carry CSAs and a 2n-bit HMPE adder give Y; then
//     X' = {Y, x2} is X modulo 2^n (2^2n - 1).
//  2. Mixed-radix step with m4 = 2^(2n+1)-1: the inverse of 2^n(2^2n-1)
//     modulo m4 is -2^(n+2), so k = |2^(n+2) (X' - x4)|_m4. X' (3n bits) is
//     folded into two (2n+1)-bit chunks; the chunks and ~x4, each rotated by
//     n+2, go through one CSA with end-around carry and a (2n+1)-bit HMPE.
//  3. X = x2 + 2^n R with R = Y + k (2^2n - 1) = {k, Y} - k, computed by the
//     HRPX adder as {k, Y} + {2n ones, ~k} + 1 (4n+1 bits, 2n+1 variable
//     bits). The output is {R, x2}.
//
// Interface: x1 in 0..2^n-2 (n bits), x2 in 0..2^n-1 (n bits), x3 in 0..2^n
// (n+1 bits), x4 in 0..2^(2n+1)-2 (2n+1 bits); x has 5n+1 bits. n >= 2.
// Purely combinational.
//
// The moduli set, the HMPE adders for the modulo 2^k-1 additions, the HRPX
// adder for the final subtraction, the Brent-Kung networks and n = 5 follow
// the design; the conversion formulas are this RTL's own derivation.
module reverse_converter1
  import prefix_pkg::*;
#(
  parameter int unsigned N   = 5,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [N-1:0]   x1,   // residue modulo 2^n - 1
  input  logic [N-1:0]   x2,   // residue modulo 2^n
  input  logic [N:0]     x3,   // residue modulo 2^n + 1
  input  logic [2*N:0]   x4,   // residue modulo 2^(2n+1) - 1
  output logic [5*N:0]   x
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

  // step 1: Y = |2^n (Z - x2)|_(2^2n-1)
  logic [WA-1:0] xb, a1, a2, a3, a4, sa1, ca1, sa2, ca2, y;

  always_comb begin
    xb = WA'(x3);
    a1 = rota({x1, x1}, 2 * N - 1);
    a2 = rota(xb, N - 1);
    a3 = rota(~xb, 2 * N - 1);
    a4 = rota(~WA'(x2), N);
  end

  csa_eac #(.W(WA)) u_csa_a1 (.x(a1),  .y(a2),  .z(a3), .sum(sa1), .carry(ca1));
  csa_eac #(.W(WA)) u_csa_a2 (.x(sa1), .y(ca1), .z(a4), .sum(sa2), .carry(ca2));
  hmpe_adder #(.W(WA), .NET(NET)) u_cpa_a (.a(sa2), .b(ca2), .y(y));

  // step 2: k = |2^(n+2) (X' - x4)|_(2^(2n+1)-1),  X' = {Y, x2}
  logic [3*N-1:0] xp;
  logic [WB-1:0]  b1, b2, b3, sb, cb, k;

  always_comb begin
    xp = {y, x2};
    b1 = rotb(xp[WB-1:0], N + 2);
    b2 = rotb(WB'(xp[3*N-1:WB]), N + 2);
    b3 = rotb(~x4, N + 2);
  end

  csa_eac #(.W(WB)) u_csa_b (.x(b1), .y(b2), .z(b3), .sum(sb), .carry(cb));
  hmpe_adder #(.W(WB), .NET(NET)) u_cpa_b (.a(sb), .b(cb), .y(k));

  // step 3: R = {k, Y} - k through the HRPX adder
  logic [4*N:0] r;
  logic         r_cout_unused;  // always 1: the difference is never negative

  hrpx_adder #(.W(4 * N + 1), .K(WB), .NET(NET)) u_final (
    .a({k, y}), .b(~k), .cin(1'b1), .s(r), .cout(r_cout_unused)
  );

  assign x = {r, x2};

endmodule
