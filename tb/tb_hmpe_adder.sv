// tb_hmpe_adder: self-checking test of the modulo 2^W-1 HMPE adder.
//
// The default 20-bit Brent-Kung adder and its Sklansky and Kogge-Stone
// variants get random operands in 0..2^W-2 plus the corner cases where the
// raw sum is exactly 2^W-1 (must give the single zero), where it carries out,
// and where one operand is the all-ones second code of zero. An 8-bit
// Brent-Kung adder is checked exhaustively over 0..254 x 0..254. The expected
// value is (a + b) mod (2^W - 1), which is always below 2^W - 1.
// The test also counts how often each correction path (carry-out,
// all-propagate, none) was taken and fails if one never was.
module tb_hmpe_adder;
  import prefix_pkg::*;

  localparam logic [20:0] MOD20 = 21'h0FFFFF;

  int checks, failures;
  int n_cout, n_pall, n_none;

  logic [19:0] a20, b20, y_bk, y_sk, y_ks;
  logic [7:0]  a8, b8, y8;

  hmpe_adder dut_bk (.a(a20), .b(b20), .y(y_bk));
  hmpe_adder #(.W(20), .NET(PFX_SK)) dut_sk (.a(a20), .b(b20), .y(y_sk));
  hmpe_adder #(.W(20), .NET(PFX_KS)) dut_ks (.a(a20), .b(b20), .y(y_ks));
  hmpe_adder #(.W(8)) dut_8 (.a(a8), .b(b8), .y(y8));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("%s: a=%h b=%h got %h expected %h", what, a20, b20, got, exp);
    end
  endtask

  task automatic run20(input logic [19:0] a, input logic [19:0] b);
    logic [20:0] e, raw;
    a20 = a; b20 = b;
    #1;
    raw = 21'(a) + 21'(b);
    e = raw % MOD20;
    if (raw[20]) n_cout++;
    else if (raw == MOD20) n_pall++;
    else n_none++;
    check("bk", 32'(y_bk), 32'(e));
    check("sk", 32'(y_sk), 32'(e));
    check("ks", 32'(y_ks), 32'(e));
  endtask

  initial begin
    logic [19:0] r;
    checks = 0; failures = 0; n_cout = 0; n_pall = 0; n_none = 0;
    a20 = '0; b20 = '0; a8 = '0; b8 = '0;
    run20('0, '0);
    run20(20'hFFFFE, 20'h00001);      // sum 2^W-1: must read as zero
    run20(20'hAAAAA, 20'h55555);
    run20(20'hFFFFE, 20'hFFFFE);      // largest carry-out case
    run20('1, 20'h12345);             // all-ones code of zero as an operand
    run20(20'h00000, '1);
    for (int i = 0; i < 20000; i++) begin
      r = 20'($urandom % 32'h000FFFFF);
      run20(r, 20'($urandom % 32'h000FFFFF));
      run20(r, 20'h0FFFFE - r);       // sum exactly 2^W-2 or 2^W-1 region
      run20(r, 20'h0FFFFF - r);
    end
    for (int i = 0; i < 255; i++) begin
      for (int j = 0; j < 255; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (y8 !== 8'((i + j) % 255)) begin
          failures++;
          if (failures <= 10) $display("w8: %0d + %0d gave %0d", i, j, y8);
        end
      end
    end
    checks++;
    if (n_cout == 0 || n_pall == 0 || n_none == 0) begin
      failures++;
      $display("correction paths: cout=%0d p_all=%0d none=%0d", n_cout, n_pall, n_none);
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
