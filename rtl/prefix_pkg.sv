// prefix_pkg: shared types for the parallel-prefix adder family.
//
// The carry network of every prefix adder here is chosen with a parameter of
// type prefix_net_e. Brent-Kung is the default used throughout the design
// because it has the lowest fan-out and the fewest prefix cells; Sklansky and
// Kogge-Stone are the two other networks the modular adder was characterised
// with, and they give the same sums with a different gate/fan-out/depth mix.
package prefix_pkg;

  typedef enum logic [1:0] {
    PFX_BK = 2'd0,  // Brent-Kung: 2*log2(W)-1 levels, fan-out 2
    PFX_SK = 2'd1,  // Sklansky: log2(W) levels, fan-out up to W/2
    PFX_KS = 2'd2   // Kogge-Stone: log2(W) levels, fan-out 2, most cells
  } prefix_net_e;

  // Number of doubling levels needed to cover W bit positions.
  function automatic int unsigned prefix_levels(input int unsigned w);
    int unsigned l;
    l = 0;
    while ((1 << l) < w) l++;
    return l;
  endfunction

endpackage
