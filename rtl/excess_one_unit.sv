// excess_one_unit: the modified excess-one unit, a conditional incrementer.
//
// y = s + inc (mod 2^W). A plain binary-to-excess-one converter always adds
// one; this unit adds one only when its control input inc is set, which lets
// it sit behind a regular prefix adder and turn it into a modulo 2^W-1 adder.
// Bit i toggles when inc is set and all lower bits of s are one; those
// "all ones below" terms are formed by a Sklansky-style AND prefix tree, so
// the unit adds about log2 W AND levels and one XOR level of delay.
//
// Purely combinational. The conditional-increment function follows the
// design; the AND-prefix realisation of the toggle terms is this RTL's choice.
module excess_one_unit #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] s,
  input  logic         inc,
  output logic [W-1:0] y
);

  logic [W-1:0] t;  // t[i] = inc & s[i-1] & ... & s[0]

  always_comb begin
    logic [W-1:0] q, qn;
    q = {s[W-2:0], inc};     // q[i] starts as the single term below bit i
    for (int l = 0; (1 << l) < int'(W); l++) begin
      qn = q;
      for (int i = 0; i < int'(W); i++) begin
        if ((i & (1 << l)) != 0) qn[i] = q[i] & q[((i >> l) << l) - 1];
      end
      q = qn;
    end
    t = q;
    y = s ^ t;
  end

endmodule
