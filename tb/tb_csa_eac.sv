// tb_csa_eac: self-checking test of the end-around-carry carry-save adder.
//
// Checks, for the default 20-bit cell and an exhaustively driven 3-bit cell,
// that sum + carry equals x + y + z modulo 2^W-1, and that the sum vector is
// the bitwise XOR of the inputs (so the cell does not propagate carries).
module tb_csa_eac;

  localparam logic [22:0] MOD20 = 23'h0FFFFF;

  int checks, failures;

  logic [19:0] x, y, z, s, c;
  logic [2:0]  x3, y3, z3, s3, c3;

  csa_eac dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));
  csa_eac #(.W(3)) dut3 (.x(x3), .y(y3), .z(z3), .sum(s3), .carry(c3));

  initial begin
    checks = 0; failures = 0;
    x = '0; y = '0; z = '0; x3 = '0; y3 = '0; z3 = '0;
    for (int i = 0; i < 20000; i++) begin
      x = 20'($urandom); y = 20'($urandom); z = 20'($urandom);
      if (i < 4) begin x = '1; y = '1; z = 20'(i); end
      #1;
      checks += 2;
      if ((23'(s) + 23'(c)) % MOD20 != (23'(x) + 23'(y) + 23'(z)) % MOD20) begin
        failures++;
        if (failures <= 10) $display("w20: %h+%h+%h -> %h,%h", x, y, z, s, c);
      end
      if (s !== (x ^ y ^ z)) failures++;
    end
    for (int i = 0; i < 512; i++) begin
      {x3, y3, z3} = 9'(i);
      #1;
      checks++;
      if ((5'(s3) + 5'(c3)) % 7 != (5'(x3) + 5'(y3) + 5'(z3)) % 7) begin
        failures++;
        if (failures <= 10) $display("w3: %0d+%0d+%0d -> %0d,%0d", x3, y3, z3, s3, c3);
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
