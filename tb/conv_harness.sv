// conv_harness: checking harness for one reverse converter instance.
//
// CONV selects the converter: 1 = {2^n-1, 2^n, 2^n+1, 2^(2n+1)-1},
// 2 = {2^n-1, 2^n+1, 2^2n, 2^(2n+1)-1}, 3 = {2^n-1, 2^n+1, 2^2n, 2^2n+1}.
// The harness picks binary numbers X in [0, M) (M = product of the moduli),
// forms their residues with the % operator on wide integers, independently of
// the converter, applies them and compares the converter's output with X.
// With EXHAUSTIVE set it walks every X in [0, M); otherwise it applies the
// corner values 0, 1, M-1, M-2, small multiples of the power-of-two modulus
// and NUM random values. It starts by itself at time 0, advances one time
// unit per vector and raises done when finished. n_special counts vectors in
// which a residue of a 2^k+1 modulus takes its top code 2^k.
module conv_harness
  import prefix_pkg::*;
#(
  parameter int unsigned CONV       = 3,
  parameter int unsigned N          = 5,
  parameter prefix_net_e NET        = PFX_BK,
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int unsigned NUM        = 2000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_special
);

  typedef logic [127:0] wide_t;

  localparam wide_t P1  = (wide_t'(1) << N);
  localparam wide_t P2  = (wide_t'(1) << (2 * N));
  localparam wide_t P2B = (wide_t'(1) << (2 * N + 1));

  // moduli m[0..3] in the order of the converter's inputs x1..x4
  localparam wide_t MA = P1 - 1;
  localparam wide_t MB = (CONV == 1) ? P1 : P1 + 1;
  localparam wide_t MC = (CONV == 1) ? P1 + 1 : P2;
  localparam wide_t MD = (CONV == 3) ? P2 + 1 : P2B - 1;
  localparam wide_t M  = MA * MB * MC * MD;
  localparam wide_t MPOW = (CONV == 1) ? MB : MC;  // the power-of-two modulus

  wide_t r1, r2, r3, r4, xo;

  generate
    if (CONV == 1) begin : g_c1
      logic [5*N:0] o;
      reverse_converter1 #(.N(N), .NET(NET)) dut (
        .x1(N'(r1)), .x2(N'(r2)), .x3((N + 1)'(r3)), .x4((2 * N + 1)'(r4)), .x(o));
      assign xo = wide_t'(o);
    end else if (CONV == 2) begin : g_c2
      logic [6*N:0] o;
      reverse_converter2 #(.N(N), .NET(NET)) dut (
        .x1(N'(r1)), .x2((N + 1)'(r2)), .x3((2 * N)'(r3)), .x4((2 * N + 1)'(r4)), .x(o));
      assign xo = wide_t'(o);
    end else begin : g_c3
      logic [6*N-1:0] o;
      reverse_converter3 #(.N(N), .NET(NET)) dut (
        .x1(N'(r1)), .x2((N + 1)'(r2)), .x3((2 * N)'(r3)), .x4((2 * N + 1)'(r4)), .x(o));
      assign xo = wide_t'(o);
    end
  endgenerate

  task automatic apply(input wide_t xv);
    r1 = xv % MA;
    r2 = xv % MB;
    r3 = xv % MC;
    r4 = xv % MD;
    #1;
    checks++;
    if ((CONV == 1 && r3 == P1) || (CONV != 1 && r2 == P1) || (CONV == 3 && r4 == P2))
      n_special++;
    if (xo != xv) begin
      failures++;
      if (failures <= 5)
        $display("converter %0d N=%0d NET=%0d: X=%0d residues (%0d,%0d,%0d,%0d) gave %0d",
                 CONV, N, NET, xv, r1, r2, r3, r4, xo);
    end
  endtask

  initial begin
    wide_t r;
    done = 1'b0; checks = 0; failures = 0; n_special = 0;
    r1 = '0; r2 = '0; r3 = '0; r4 = '0;
    if (EXHAUSTIVE) begin
      for (wide_t v = 0; v < M; v++) apply(v);
    end else begin
      apply(0); apply(1); apply(M - 1); apply(M - 2);
      for (int k = 1; k < 16; k++) apply((wide_t'(k) * MPOW) % M);
      for (int k = 0; k < int'(NUM); k++) begin
        r = {$urandom, $urandom, $urandom, $urandom};
        apply(r % M);
      end
    end
    done = 1'b1;
  end

endmodule
