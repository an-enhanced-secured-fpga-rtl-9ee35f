// tb_des_f: self-checking test of the cipher function f(R,K).
//
// Uses rounds 1 and 2 of the standard worked example (key
// 133457799BBCDFF1, block 0123456789ABCDEF):
//   f(F0AAF0AA, 1B02EFFC7072) = 234AA9BB
//   f(EF4A6544, 79AED9DBC9E5) = 3CAB87A3  (R2 = CC017709 = L1 xor f)
// and the identity f(R, K xor E(R) xor E(R')) = f(R', K), which holds
// because f sees R only through E(R) xor K.
module tb_des_f;
  logic [31:0] r, f, r2, f2;
  logic [47:0] k, k2, e1, e2;
  int checks = 0, failures = 0;

  des_f dut  (.r(r),  .k(k),  .f(f));
  des_f dut2 (.r(r2), .k(k2), .f(f2));
  des_expand u_e1 (.r(r),  .e(e1));
  des_expand u_e2 (.r(r2), .e(e2));

  task automatic check(input logic [31:0] rr, input logic [47:0] kk, input logic [31:0] exp);
    r = rr; k = kk; #1;
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL f(%h, %h) = %h, expected %h", rr, kk, f, exp);
    end
  endtask

  initial begin
    check(32'hF0AAF0AA, 48'h1B02EFFC7072, 32'h234AA9BB);
    check(32'hEF4A6544, 48'h79AED9DBC9E5, 32'h3CAB87A3);
    for (int i = 0; i < 200; i++) begin
      r = $urandom; r2 = $urandom; k2 = {$urandom, $urandom};
      #1;
      k = k2 ^ e1 ^ e2; #1;
      checks++;
      if (f !== f2) begin
        failures++;
        $display("FAIL identity r=%h r2=%h", r, r2);
      end
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
