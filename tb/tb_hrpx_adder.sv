// tb_hrpx_adder: self-checking test of the HRPX adder.
//
// The default adder (W = 20, K = 10) is checked against
// a + {ones, b} + cin computed with integers, on random operands and on
// operands chosen so that the low part's carry runs through long strings of
// ones in the upper part. It is also used as a subtractor of different-size
// operands, a - v = a + {ones, ~v} + 1. A small adder (W = 9, K = 4) is
// checked exhaustively.
module tb_hrpx_adder;

  int checks, failures;

  logic [19:0] a20, s20;
  logic [9:0]  b20;
  logic        cin20, co20;
  logic [8:0]  a9, s9;
  logic [3:0]  b9;
  logic        cin9, co9;

  hrpx_adder dut20 (.a(a20), .b(b20), .cin(cin20), .s(s20), .cout(co20));
  hrpx_adder #(.W(9), .K(4)) dut9 (.a(a9), .b(b9), .cin(cin9), .s(s9), .cout(co9));

  task automatic run20(input logic [19:0] a, input logic [9:0] b, input logic c);
    logic [20:0] e;
    a20 = a; b20 = b; cin20 = c;
    #1;
    e = 21'(a) + 21'({10'h3FF, b}) + 21'(c);
    checks++;
    if ({co20, s20} !== e) begin
      failures++;
      if (failures <= 10) $display("w20: a=%h b=%h cin=%b got %h expected %h", a, b, c, {co20, s20}, e);
    end
  endtask

  initial begin
    logic [19:0] a;
    logic [9:0]  v;
    checks = 0; failures = 0;
    a20 = '0; b20 = '0; cin20 = 0; a9 = '0; b9 = '0; cin9 = 0;
    for (int i = 0; i < 20000; i++) run20(20'($urandom), 10'($urandom), 1'($urandom));
    // upper a bits zero below a random point: carry travels far, or not at all
    for (int k = 10; k <= 20; k++) begin
      run20(20'hFFFFF << k, 10'h3FF, 1'b1);
      run20(20'hFFFFF << k, 10'h000, 1'b0);
      run20((20'hFFFFF << k) | 20'h3FF, 10'h001, 1'b0);
    end
    // subtraction of a 10-bit value from a 20-bit value
    for (int i = 0; i < 5000; i++) begin
      a = 20'($urandom);
      v = 10'($urandom);
      a20 = a; b20 = ~v; cin20 = 1'b1;
      #1;
      checks++;
      if (s20 !== a - 20'(v) || co20 !== (a >= 20'(v))) begin
        failures++;
        if (failures <= 10) $display("sub: %h - %h gave %h (cout %b)", a, v, s20, co20);
      end
    end
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 32; j++) begin
        a9 = 9'(i); {cin9, b9} = 5'(j);
        #1;
        checks++;
        if ({co9, s9} !== 10'(a9) + 10'({5'h1F, b9}) + 10'(cin9)) begin
          failures++;
          if (failures <= 10) $display("w9: a=%h b=%h cin=%b got %h", a9, b9, cin9, {co9, s9});
        end
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
