// tb_prefix_adder: self-checking test of the parallel-prefix adder.
//
// Instantiates the default 20-bit Brent-Kung adder, the Sklansky and
// Kogge-Stone variants, a 13-bit Brent-Kung adder (width not a power of two)
// and an 8-bit Brent-Kung adder that is checked exhaustively. Sum, carry-out
// and the all-propagate flag are compared with integer arithmetic.
module tb_prefix_adder;
  import prefix_pkg::*;

  int checks, failures;

  logic [19:0] a20, b20, s_bk, s_sk, s_ks;
  logic        cin20, co_bk, co_sk, co_ks, pa_bk, pa_sk, pa_ks;
  logic [12:0] a13, b13, s13;
  logic        cin13, co13, pa13;
  logic [7:0]  a8, b8, s8;
  logic        cin8, co8, pa8;

  prefix_adder dut_bk (.a(a20), .b(b20), .cin(cin20), .sum(s_bk), .cout(co_bk), .p_all(pa_bk));
  prefix_adder #(.W(20), .NET(PFX_SK)) dut_sk (.a(a20), .b(b20), .cin(cin20), .sum(s_sk), .cout(co_sk), .p_all(pa_sk));
  prefix_adder #(.W(20), .NET(PFX_KS)) dut_ks (.a(a20), .b(b20), .cin(cin20), .sum(s_ks), .cout(co_ks), .p_all(pa_ks));
  prefix_adder #(.W(13)) dut_13 (.a(a13), .b(b13), .cin(cin13), .sum(s13), .cout(co13), .p_all(pa13));
  prefix_adder #(.W(8))  dut_8  (.a(a8),  .b(b8),  .cin(cin8),  .sum(s8),  .cout(co8),  .p_all(pa8));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run20(input logic [19:0] a, input logic [19:0] b, input logic c);
    logic [20:0] e;
    a20 = a; b20 = b; cin20 = c;
    #1;
    e = 21'(a) + 21'(b) + 21'(c);
    check("bk", 64'({co_bk, s_bk}), 64'(e));
    check("sk", 64'({co_sk, s_sk}), 64'(e));
    check("ks", 64'({co_ks, s_ks}), 64'(e));
    check("bk p_all", 64'(pa_bk), 64'((a ^ b) == '1));
    check("sk p_all", 64'(pa_sk), 64'((a ^ b) == '1));
    check("ks p_all", 64'(pa_ks), 64'((a ^ b) == '1));
  endtask

  initial begin
    logic [13:0] e13;
    checks = 0; failures = 0;
    a20 = '0; b20 = '0; cin20 = 0; a13 = '0; b13 = '0; cin13 = 0; a8 = '0; b8 = '0; cin8 = 0;
    run20('1, 20'h0, 1'b1);
    run20('1, 20'h1, 1'b0);
    run20(20'hAAAAA, 20'h55555, 1'b0);
    run20(20'hAAAAA, 20'h55555, 1'b1);
    for (int i = 0; i < 20000; i++) run20(20'($urandom), 20'($urandom), 1'($urandom));
    for (int i = 0; i < 5000; i++) begin
      a13 = 13'($urandom); b13 = 13'($urandom); cin13 = 1'($urandom);
      #1;
      e13 = 14'(a13) + 14'(b13) + 14'(cin13);
      check("w13", 64'({co13, s13}), 64'(e13));
      check("w13 p_all", 64'(pa13), 64'((a13 ^ b13) == '1));
    end
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 256; j++) begin
        {cin8, a8} = 9'(i); b8 = 8'(j);
        #1;
        check("w8", 64'({co8, s8}), 64'(9'(a8) + 9'(b8) + 9'(cin8)));
        check("w8 p_all", 64'(pa8), 64'((a8 ^ b8) == '1));
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
