// reverse_converter3: residue-to-binary converter for the four-moduli set
// {2^n-1, 2^n+1, 2^2n, 2^2n+1} (dynamic range 2^2n * (2^4n - 1), 6n bits).
//
// How it works. With M' = 2^4n - 1 = (2^n-1)(2^n+1)(2^2n+1), the number is
// X = x3 + 2^2n * Y, where x3 (the residue modulo 2^2n) gives the low 2n bits
// directly and
//     Y = | 2^2n * (X' - x3) |_M' ,   X' = |X|_M'
// (2^2n is its own inverse modulo M'). X' follows from the Chinese remainder
// theorem over the three odd moduli; the multiplicative inverses are powers of
// two (2^(n-2), 2^(n-2), 2^(2n-1)), and multiplying by a power of two modulo
// 2^4n-1 is a rotation, so every term becomes a rotated, possibly
// bit-complemented (negated) copy of a residue:
//     op1  = rot({x1,x1,x1,x1}, 3n-2)         x1 * 2^(3n-2) * (2^n+1)(2^2n+1)
//     op2a = rot(w2, 4n-2), op2b = rot(~w2, 3n-2)
//                         w2 = x2 + x2*2^2n;   x2 * 2^(3n-2) * (2^n-1)(2^2n+1)
//     op4a = rot(x4, 2n-1), op4b = rot(~x4, 4n-1)   x4 * 2^(4n-1) * (2^2n-1)
//     op3  = rot(~x3, 2n)                       -x3 * 2^2n
// (rot = rotate left on 4n bits, ~ = 4n-bit one's complement = negation
// modulo 2^4n-1). The six operands are reduced to two by a tree of four
// carry-save adders with end-around carry, and one modulo 2^4n-1 adder with
// single zero (HMPE, Brent-Kung prefix network by default) produces Y. The
// output is the concatenation {Y, x3}: no further adder is needed, so the low
// 2n output bits are the x3 input bits themselves.
//
// Interface: x1 in 0..2^n-2 (n bits), x2 in 0..2^n (n+1 bits), x3 in
// 0..2^2n-1 (2n bits), x4 in 0..2^2n (2n+1 bits); x is the 6n-bit binary
// number. Purely combinational.
//
// The moduli set, the use of an end-around-carry CSA tree followed by an HMPE
// modular adder, the Brent-Kung network and n = 5 follow the design; the
// conversion formulas themselves (CRT over the odd moduli, then the 2^2n
// step merged into the same CSA tree) are this RTL's own derivation.
module reverse_converter3
  import prefix_pkg::*;
#(
  parameter int unsigned N   = 5,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [N-1:0]   x1,   // residue modulo 2^n - 1
  input  logic [N:0]     x2,   // residue modulo 2^n + 1
  input  logic [2*N-1:0] x3,   // residue modulo 2^2n
  input  logic [2*N:0]   x4,   // residue modulo 2^2n + 1
  output logic [6*N-1:0] x
);

  localparam int unsigned W = 4 * N;  // width of the modulo 2^4n-1 datapath

  function automatic logic [W-1:0] rotl(input logic [W-1:0] v, input int unsigned k);
    int unsigned r;
    r = k % W;
    return (r == 0) ? v : ((v << r) | (v >> (W - r)));
  endfunction

  logic [W-1:0] w1, w2, w3, w4;
  logic [W-1:0] op1, op2a, op2b, op3, op4a, op4b;
  logic [W-1:0] s1, c1, s2, c2, s3, c3, s4, c4;
  logic [W-1:0] y;

  always_comb begin
    w1 = {4{x1}};
    w2 = W'(x2) | (W'(x2) << (2 * N));
    w3 = W'(x3);
    w4 = W'(x4);
    op1  = rotl(w1, 3 * N - 2);
    op2a = rotl(w2, 4 * N - 2);
    op2b = rotl(~w2, 3 * N - 2);
    op3  = rotl(~w3, 2 * N);
    op4a = rotl(w4, 2 * N - 1);
    op4b = rotl(~w4, 4 * N - 1);
  end

  csa_eac #(.W(W)) u_csa1 (.x(op1),  .y(op2a), .z(op2b), .sum(s1), .carry(c1));
  csa_eac #(.W(W)) u_csa2 (.x(op4a), .y(op4b), .z(op3),  .sum(s2), .carry(c2));
  csa_eac #(.W(W)) u_csa3 (.x(s1),   .y(c1),   .z(s2),   .sum(s3), .carry(c3));
  csa_eac #(.W(W)) u_csa4 (.x(s3),   .y(c3),   .z(c2),   .sum(s4), .carry(c4));

  hmpe_adder #(.W(W), .NET(NET)) u_cpa (.a(s4), .b(c4), .y(y));

  assign x = {y, x3};

endmodule
