// tb_rns_prefix_top: end-to-end test of the whole design at its default size
// (n = 5, Brent-Kung prefix networks everywhere, no parameter overrides).
//
// For each of the three converters, binary numbers X in [0, M) are turned
// into residues with the % operator (independently of the design) and the
// converter output must equal X: every X below 4096 (small numbers, where the
// modular adders' sums land exactly on 2^k-1), the top values M-1 and M-2,
// and 30000 random numbers per converter.
//
// Each mechanism of the design must occur at least once in every converter,
// otherwise a failure is counted: an HMPE adder corrected by its carry-out,
// corrected by its all-propagate signal (the single-zero fix), not
// corrected; for Converter-1 and -2 the HRPX final subtractor with and
// without a carry from its prefix part into its constant-one part; and a
// residue of a 2^k+1 modulus at its top code 2^k.
module tb_rns_prefix_top;

  localparam int N = 5;
  typedef logic [63:0] wide_t;
  localparam wide_t P1 = 64'd1 << N, P2 = 64'd1 << (2 * N), P2B = 64'd1 << (2 * N + 1);
  localparam wide_t MOD [3][4] = '{
    '{P1 - 1, P1,     P1 + 1, P2B - 1},   // Converter-1
    '{P1 - 1, P1 + 1, P2,     P2B - 1},   // Converter-2
    '{P1 - 1, P1 + 1, P2,     P2 + 1}     // Converter-3
  };

  int checks, failures;
  int n_cout[3], n_pall[3], n_none[3], n_cin_hi[3], n_no_cin_hi[3], n_top[3];

  logic [N-1:0]   c1_x1, c2_x1, c3_x1;
  logic [N-1:0]   c1_x2;
  logic [N:0]     c2_x2, c3_x2, c1_x3;
  logic [2*N-1:0] c2_x3, c3_x3;
  logic [2*N:0]   c1_x4, c2_x4, c3_x4;
  logic [5*N:0]   c1_x;
  logic [6*N:0]   c2_x;
  logic [6*N-1:0] c3_x;

  rns_prefix_top dut (.*);

  function automatic wide_t mod_product(input int c);
    return MOD[c][0] * MOD[c][1] * MOD[c][2] * MOD[c][3];
  endfunction

  // count which correction an HMPE adder applied
  task automatic count_hmpe(input int c, input logic co, input logic pa);
    if (co)      n_cout[c]++;
    else if (pa) n_pall[c]++;
    else         n_none[c]++;
  endtask

  task automatic conv(input int c, input wide_t v);
    wide_t r[4], got;
    for (int i = 0; i < 4; i++) r[i] = v % MOD[c][i];
    case (c)
      0: begin c1_x1 = 5'(r[0]); c1_x2 = 5'(r[1]); c1_x3 = 6'(r[2]);  c1_x4 = 11'(r[3]); end
      1: begin c2_x1 = 5'(r[0]); c2_x2 = 6'(r[1]); c2_x3 = 10'(r[2]); c2_x4 = 11'(r[3]); end
      default: begin c3_x1 = 5'(r[0]); c3_x2 = 6'(r[1]); c3_x3 = 10'(r[2]); c3_x4 = 11'(r[3]); end
    endcase
    #1;
    case (c)
      0: begin
        got = wide_t'(c1_x);
        count_hmpe(0, dut.u_conv1.u_cpa_a.cout, dut.u_conv1.u_cpa_a.p_all);
        count_hmpe(0, dut.u_conv1.u_cpa_b.cout, dut.u_conv1.u_cpa_b.p_all);
        if (dut.u_conv1.u_final.c_lo) n_cin_hi[0]++; else n_no_cin_hi[0]++;
        if (r[2] == P1) n_top[0]++;
      end
      1: begin
        got = wide_t'(c2_x);
        count_hmpe(1, dut.u_conv2.u_cpa_a.cout, dut.u_conv2.u_cpa_a.p_all);
        count_hmpe(1, dut.u_conv2.u_cpa_b.cout, dut.u_conv2.u_cpa_b.p_all);
        if (dut.u_conv2.u_final.c_lo) n_cin_hi[1]++; else n_no_cin_hi[1]++;
        if (r[1] == P1) n_top[1]++;
      end
      default: begin
        got = wide_t'(c3_x);
        count_hmpe(2, dut.u_conv3.u_cpa.cout, dut.u_conv3.u_cpa.p_all);
        if (r[1] == P1 || r[3] == P2) n_top[2]++;
      end
    endcase
    checks++;
    if (got != v) begin
      failures++;
      if (failures <= 10)
        $display("Converter-%0d: X=%0d residues (%0d,%0d,%0d,%0d) gave %0d",
                 c + 1, v, r[0], r[1], r[2], r[3], got);
    end
  endtask

  initial begin
    wide_t m;
    checks = 0; failures = 0;
    for (int c = 0; c < 3; c++) begin
      n_cout[c] = 0; n_pall[c] = 0; n_none[c] = 0; n_cin_hi[c] = 0; n_no_cin_hi[c] = 0; n_top[c] = 0;
    end
    {c1_x1, c1_x2, c1_x3, c1_x4} = '0;
    {c2_x1, c2_x2, c2_x3, c2_x4} = '0;
    {c3_x1, c3_x2, c3_x3, c3_x4} = '0;

    for (int c = 0; c < 3; c++) begin
      m = mod_product(c);
      for (wide_t k = 0; k < 4096; k++) conv(c, k);
      conv(c, m - 1);
      conv(c, m - 2);
      for (int i = 0; i < 30000; i++) conv(c, {$urandom, $urandom} % m);
    end

    for (int c = 0; c < 3; c++) begin
      $display("Converter-%0d mechanisms: hmpe cout=%0d p_all=%0d none=%0d, hrpx carry into constant part=%0d / none=%0d, top code=%0d",
               c + 1, n_cout[c], n_pall[c], n_none[c], n_cin_hi[c], n_no_cin_hi[c], n_top[c]);
      checks++;
      if (n_cout[c] == 0 || n_pall[c] == 0 || n_none[c] == 0 || n_top[c] == 0 ||
          (c < 2 && (n_cin_hi[c] == 0 || n_no_cin_hi[c] == 0))) begin
        failures++;
        $display("Converter-%0d: a mechanism was never exercised", c + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
