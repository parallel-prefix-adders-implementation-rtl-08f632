// csa_eac: W-bit carry-save adder with end-around carry (modulo 2^W-1).
//
// Reduces three operands to a sum vector and a carry vector with
// x + y + z = sum + carry (mod 2^W-1). Each bit is a full adder; the carry
// out of bit W-1 has weight 2^W = 1 (mod 2^W-1), so the carry vector is the
// majority vector rotated left by one place instead of shifted. There is no
// carry propagation. Trees of these cells feed the final modulo 2^W-1
// carry-propagate adder of a reverse converter.
//
// Purely combinational; a standard structure named by the design.
module csa_eac #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  assign sum   = x ^ y ^ z;
  assign maj   = (x & y) | (x & z) | (y & z);
  assign carry = {maj[W-2:0], maj[W-1]};

endmodule
