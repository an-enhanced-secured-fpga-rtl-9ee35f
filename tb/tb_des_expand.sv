// tb_des_expand: self-checking test of the expansion E.
//
// Checks the standard worked example (E(F0AAF0AA) = 7A15557A1555) and,
// for random inputs, the rule behind the table: output group g (g = 0..7,
// six bits) holds input bits 4g .. 4g+5 in the standard's 1-based
// numbering, with bit 0 read as bit 32 and bit 33 as bit 1.
module tb_des_expand;
  logic [31:0] r;
  logic [47:0] e, exp;
  int checks = 0, failures = 0;

  des_expand dut (.r(r), .e(e));

  function automatic logic [47:0] model(logic [31:0] v);
    logic [47:0] m;
    for (int g = 0; g < 8; g++)
      for (int j = 0; j < 6; j++) begin
        int b = 4*g + j;                 // 1-based input bit, 0..33
        if (b == 0)  b = 32;
        if (b == 33) b = 1;
        m[47 - (6*g + j)] = v[32 - b];
      end
    return m;
  endfunction

  initial begin
    r = 32'hF0AAF0AA; #1;
    checks++;
    if (e !== 48'h7A15557A1555) begin
      failures++;
      $display("FAIL worked example: %h", e);
    end
    for (int i = 0; i < 300; i++) begin
      r = $urandom; #1;
      exp = model(r);
      checks++;
      if (e !== exp) begin
        failures++;
        $display("FAIL E(%h) = %h, expected %h", r, e, exp);
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
