// prefix_adder: W-bit parallel-prefix binary adder (sum = a + b + cin).
//
// Every bit first forms a generate g = a&b and a propagate p = a^b; the carry
// into bit 0 is folded into g[0]. A prefix network then combines (g,p) pairs
// with the usual operator (g,p)o(g',p') = (g | p&g', p&p') so that position i
// ends up holding the group generate of bits [i:0], which is the carry into
// bit i+1. The sum is p ^ carry. The network is chosen by NET:
//   PFX_BK  Brent-Kung (default): an up-sweep tree of log2 W levels and a
//           down-sweep of log2 W - 1 levels; fan-out 2, fewest cells.
//   PFX_SK  Sklansky: log2 W levels, fan-out doubling per level.
//   PFX_KS  Kogge-Stone: log2 W levels, fan-out 2, most cells.
// A W that is not a power of two is padded with zero (g,p) positions that no
// real bit depends on.
//
// Besides sum and cout the adder brings out p_all, the AND of all W propagate
// bits (a + b = 2^W - 1 with cin = 0). The modulo 2^W-1 adder uses cout and
// p_all as the control of its excess-one correction.
//
// Purely combinational. The Brent-Kung choice follows the design's selection
// of that network for its minimum fan-out; the width default (20 = 4n for
// n = 5) is the width of the modular adder in the reverse converter.
module prefix_adder
  import prefix_pkg::*;
#(
  parameter int unsigned W   = 20,
  parameter prefix_net_e NET = PFX_BK
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         p_all
);

  localparam int unsigned L  = prefix_levels(W);
  localparam int unsigned WP = 1 << L;

  logic [WP-1:0] g0, p0;   // bit-level generate/propagate, padded
  logic [WP-1:0] gpre;     // group generate of [i:0] (carry into i+1)

  always_comb begin
    g0 = '0;
    p0 = '0;
    g0[W-1:0] = a & b;
    p0[W-1:0] = a ^ b;
    g0[0]     = g0[0] | (p0[0] & cin);
  end

  always_comb begin
    logic [WP-1:0] g, p, gn, pn;
    g = g0;
    p = p0;
    unique case (NET)
      PFX_SK: begin
        for (int l = 0; l < int'(L); l++) begin
          gn = g;
          pn = p;
          for (int i = 0; i < int'(WP); i++) begin
            if ((i & (1 << l)) != 0) begin
              gn[i] = g[i] | (p[i] & g[((i >> l) << l) - 1]);
              pn[i] = p[i] & p[((i >> l) << l) - 1];
            end
          end
          g = gn;
          p = pn;
        end
      end
      PFX_KS: begin
        for (int l = 0; l < int'(L); l++) begin
          gn = g;
          pn = p;
          for (int i = 0; i < int'(WP); i++) begin
            if (i >= (1 << l)) begin
              gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
              pn[i] = p[i] & p[i - (1 << l)];
            end
          end
          g = gn;
          p = pn;
        end
      end
      default: begin  // PFX_BK
        // up-sweep: build the power-of-two block prefixes
        for (int l = 0; l < int'(L); l++) begin
          gn = g;
          pn = p;
          for (int i = 0; i < int'(WP); i++) begin
            if (((i + 1) % (2 << l)) == 0) begin
              gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
              pn[i] = p[i] & p[i - (1 << l)];
            end
          end
          g = gn;
          p = pn;
        end
        // down-sweep: fill in the remaining positions
        for (int l = int'(L) - 2; l >= 0; l--) begin
          gn = g;
          pn = p;
          for (int i = 0; i < int'(WP); i++) begin
            if ((((i + 1) % (2 << l)) == (1 << l)) && (i >= (2 << l))) begin
              gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
              pn[i] = p[i] & p[i - (1 << l)];
            end
          end
          g = gn;
          p = pn;
        end
      end
    endcase
    gpre = g;
  end

  always_comb begin
    logic [W:0] c;
    c[0] = cin;
    for (int i = 0; i < int'(W); i++) c[i+1] = gpre[i];
    sum   = p0[W-1:0] ^ c[W-1:0];
    cout  = c[W];
    p_all = &p0[W-1:0];
  end

endmodule
