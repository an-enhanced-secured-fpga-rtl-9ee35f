// tb_des_fp: self-checking test of the final permutation IP-1.
//
// Checks the last step of the standard worked example
// (R16L16 = 0A4CD99543423234 -> 85E813540F0AB405), and that IP-1 undoes
// IP for random blocks (IP is instantiated beside it for that).
module tb_des_fp;
  logic [63:0] x, y, ipx, back;
  int checks = 0, failures = 0;

  des_fp dut (.x(x), .y(y));
  des_ip u_ip (.x(back), .y(ipx));

  initial begin
    x = 64'h0A4CD995_43423234; #1;
    checks++;
    if (y !== 64'h85E813540F0AB405) begin
      failures++;
      $display("FAIL worked example: %h", y);
    end
    x = 64'd1 << (64-40); #1;   // output bit 1 comes from input bit 40
    checks++;
    if (y !== 64'd1 << 63) begin
      failures++;
      $display("FAIL bit 40 -> 1: %h", y);
    end
    for (int i = 0; i < 200; i++) begin
      back = {$urandom, $urandom}; #1;
      x = ipx; #1;
      checks++;
      if (y !== back) begin
        failures++;
        $display("FAIL IP-1(IP(%h)) = %h", back, y);
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
