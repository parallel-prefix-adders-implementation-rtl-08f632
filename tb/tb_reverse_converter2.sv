// tb_reverse_converter2: self-checking test of the reverse converter for the
// moduli set {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}.
//
// n = 3 and n = 4 are checked exhaustively over their whole dynamic range
// (512064 and 33358080 numbers). The default n = 5 is checked
// with all three prefix networks, and n = 8, 12, 16 with Brent-Kung, on
// corner values plus random numbers. Every residue tuple is built from a
// known X and the converter output must equal X. The test also requires that
// the top code 2^k of a 2^k+1 modulus occurred.
module tb_reverse_converter2;
  import prefix_pkg::*;

  localparam int NH = 8;
  logic [NH-1:0] done;
  int ch[NH], fl[NH], sp[NH];
  int checks, failures;

  conv_harness #(.CONV(2), .N(3),  .NET(PFX_BK), .EXHAUSTIVE(1'b1)       ) h0 (done[0], ch[0], fl[0], sp[0]);
  conv_harness #(.CONV(2), .N(4),  .NET(PFX_BK), .EXHAUSTIVE(1'b1)       ) h1 (done[1], ch[1], fl[1], sp[1]);
  conv_harness #(.CONV(2), .N(5),  .NET(PFX_BK), .NUM(20000))            h2 (done[2], ch[2], fl[2], sp[2]);
  conv_harness #(.CONV(2), .N(5),  .NET(PFX_SK), .NUM(5000))             h3 (done[3], ch[3], fl[3], sp[3]);
  conv_harness #(.CONV(2), .N(5),  .NET(PFX_KS), .NUM(5000))             h4 (done[4], ch[4], fl[4], sp[4]);
  conv_harness #(.CONV(2), .N(8),  .NET(PFX_BK), .NUM(5000))             h5 (done[5], ch[5], fl[5], sp[5]);
  conv_harness #(.CONV(2), .N(12), .NET(PFX_BK), .NUM(5000))             h6 (done[6], ch[6], fl[6], sp[6]);
  conv_harness #(.CONV(2), .N(16), .NET(PFX_BK), .NUM(5000))             h7 (done[7], ch[7], fl[7], sp[7]);

  initial begin
    checks = 0;
    failures = 0;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks   += ch[i];
      failures += fl[i];
    end
    checks++;
    if (sp[0] == 0) begin
      failures++;
      $display("the top code of a 2^k+1 modulus was never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
