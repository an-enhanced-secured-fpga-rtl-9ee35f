// tb_des_pbox: self-checking test of the permutation P.
//
// Checks the standard worked example (P(5C82B597) = 234AA9BB), two
// single-bit positions of the standard's table, and that one-hot inputs
// map to distinct one-hot outputs.
module tb_des_pbox;
  logic [31:0] s, p, seen;
  int checks = 0, failures = 0;

  des_pbox dut (.s(s), .p(p));

  task automatic check(input logic [31:0] in, input logic [31:0] exp, input string what);
    s = in; #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %s: P(%h) = %h, expected %h", what, in, p, exp);
    end
  endtask

  initial begin
    check(32'h5C82B597, 32'h234AA9BB, "worked example");
    check(32'd1 << (32-16), 32'd1 << 31, "bit 16 -> 1");
    check(32'd1 << (32-25), 32'd1 << 0,  "bit 25 -> 32");
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      s = 32'd1 << i; #1;
      checks++;
      if (!$onehot(p) || (seen & p) != 0) begin
        failures++;
        $display("FAIL one-hot input bit %0d gives %h", i, p);
      end
      seen |= p;
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
