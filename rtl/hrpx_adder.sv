// hrpx_adder: hybrid regular parallel-prefix XOR/OR adder.
//
// Adds a W-bit operand a to an operand whose upper W-K bits are constant ones
// and whose lower K bits are b:  {s_cout, s} = a + {{(W-K){1'b1}}, b} + cin.
// Such an operand appears when a reverse converter ends in a subtraction of a
// short value from a long one: a - b = a + {ones, ~b} + 1.
//
// Only the K low bits need a real carry network; they use a K-bit prefix
// adder (Brent-Kung by default). In the upper part the second operand bit is
// 1, so a bit's generate is a[i] and its propagate is ~a[i]: the carry
// recurrence collapses to c[i+1] = a[i] | c[i] and the sum to
// s[i] = a[i] XNOR c[i]. The carries of the upper part are therefore the OR
// of the low part's carry-out with the a bits below, formed here as an OR
// prefix tree: no large prefix adder over the full width, and no ripple
// chain of full adders.
//
// Purely combinational. The split into a prefix adder for the variable bits
// and XNOR/OR logic for the constant-one bits follows the design; the widths
// (W = 20, K = 10, i.e. 4n and 2n for n = 5) and the OR-tree form of the
// upper carries are this RTL's choices.
module hrpx_adder
  import prefix_pkg::*;
#(
  parameter int unsigned W   = 20,
  parameter int unsigned K   = 10,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [W-1:0] a,
  input  logic [K-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned H = W - K;  // number of constant-one bit positions

  logic [K-1:0] s_lo;
  logic         c_lo, p_lo_unused;
  logic [H:0]   c_hi;                 // c_hi[j]: carry into bit K+j

  prefix_adder #(.W(K), .NET(NET)) u_lo (
    .a(a[K-1:0]), .b(b), .cin(cin), .sum(s_lo), .cout(c_lo), .p_all(p_lo_unused)
  );

  // OR prefix: c_hi[j] = c_lo | a[K] | ... | a[K+j-1]
  always_comb begin
    logic [H:0] q, qn;
    q = {a[W-1:K], c_lo};
    for (int l = 0; (1 << l) < int'(H) + 1; l++) begin
      qn = q;
      for (int i = 0; i <= int'(H); i++) begin
        if ((i & (1 << l)) != 0) qn[i] = q[i] | q[((i >> l) << l) - 1];
      end
      q = qn;
    end
    c_hi = q;
  end

  assign s    = {~(a[W-1:K] ^ c_hi[H-1:0]), s_lo};
  assign cout = c_hi[H];

endmodule
