// tb_des_ip: self-checking test of the initial permutation IP.
//
// Checks the permutation of the standard worked example
// (0123456789ABCDEF -> L0 = CC00CCFF, R0 = F0AAF0AA), a few single-bit
// positions taken from the standard, and that every one-hot input gives a
// distinct one-hot output (a permutation loses and duplicates no bit).
module tb_des_ip;
  logic [63:0] x, y;
  int checks = 0, failures = 0;
  logic [63:0] seen;

  des_ip dut (.x(x), .y(y));

  task automatic check(input logic [63:0] in, input logic [63:0] exp, input string what);
    x = in; #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: IP(%h) = %h, expected %h", what, in, y, exp);
    end
  endtask

  initial begin
    check(64'h0123456789ABCDEF, 64'hCC00CCFF_F0AAF0AA, "worked example");
    check(64'h0, 64'h0, "zero");
    check('1, '1, "ones");
    // Input bit 58 becomes output bit 1, bit 50 output bit 2, bit 7 output bit 64.
    check(64'd1 << (64-58), 64'd1 << 63, "bit 58 -> 1");
    check(64'd1 << (64-50), 64'd1 << 62, "bit 50 -> 2");
    check(64'd1 << (64-7),  64'd1 << 0,  "bit 7 -> 64");
    check(64'd1 << (64-1),  64'd1 << (64-40), "bit 1 -> 40");
    seen = '0;
    for (int i = 0; i < 64; i++) begin
      x = 64'd1 << i; #1;
      checks++;
      if (!$onehot(y) || (seen & y) != 0) begin
        failures++;
        $display("FAIL one-hot input bit %0d gives %h", i, y);
      end
      seen |= y;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
