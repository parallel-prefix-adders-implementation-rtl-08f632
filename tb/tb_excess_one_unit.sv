// tb_excess_one_unit: self-checking test of the conditional incrementer.
//
// The default 20-bit unit is driven with random values and with runs of
// trailing ones (the long-toggle cases), with inc both 0 and 1; an 8-bit unit
// is checked exhaustively. The expected value is s + inc modulo 2^W.
module tb_excess_one_unit;

  int checks, failures;

  logic [19:0] s20, y20;
  logic        inc20;
  logic [7:0]  s8, y8;
  logic        inc8;

  excess_one_unit dut20 (.s(s20), .inc(inc20), .y(y20));
  excess_one_unit #(.W(8)) dut8 (.s(s8), .inc(inc8), .y(y8));

  task automatic run20(input logic [19:0] s, input logic inc);
    s20 = s; inc20 = inc;
    #1;
    checks++;
    if (y20 !== s + 20'(inc)) begin
      failures++;
      if (failures <= 10) $display("w20: s=%h inc=%b y=%h", s, inc, y20);
    end
  endtask

  initial begin
    checks = 0; failures = 0;
    s20 = '0; inc20 = 0; s8 = '0; inc8 = 0;
    for (int k = 0; k <= 20; k++) begin
      run20((20'(1) << k) - 20'(1), 1'b1);                     // k trailing ones
      run20((20'(1) << k) - 20'(1), 1'b0);
      run20(((20'(1) << k) - 20'(1)) | 20'($urandom) << k + 1, 1'b1);
    end
    for (int i = 0; i < 20000; i++) run20(20'($urandom), 1'($urandom));
    for (int i = 0; i < 512; i++) begin
      {inc8, s8} = 9'(i);
      #1;
      checks++;
      if (y8 !== s8 + 8'(inc8)) begin
        failures++;
        if (failures <= 10) $display("w8: s=%h inc=%b y=%h", s8, inc8, y8);
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
