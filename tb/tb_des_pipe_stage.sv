// tb_des_pipe_stage: self-checking test of one pipelined round stage.
//
// Round 1 of the standard worked example: L0 = CC00CCFF, R0 = F0AAF0AA,
// K1 = 1B02EFFC7072 gives L1 = F0AAF0AA, R1 = EF4A6544 one clock later.
// Checked with the block marked as encryption (K1 on k_enc) and as
// decryption (K1 on k_dec), with the other subkey input set to garbage.
// Also checks that valid and mode travel with the block and that en low
// freezes the stage.
module tb_des_pipe_stage;
  logic        clk = 0, rst_n = 0;
  logic        en, in_valid, in_dec, out_valid, out_dec;
  logic [31:0] in_l, in_r, out_l, out_r;
  logic [47:0] k_enc, k_dec;
  int checks = 0, failures = 0;

  des_pipe_stage #(.ROUND(0)) dut (.clk, .rst_n, .en, .in_valid, .in_dec, .in_l, .in_r,
                                   .k_enc, .k_dec, .out_valid, .out_dec, .out_l, .out_r);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  initial begin
    en = 1; in_valid = 0; in_dec = 0; in_l = 0; in_r = 0; k_enc = 0; k_dec = 0;
    @(negedge clk);
    chk(!out_valid, "valid reset");
    rst_n = 1;
    in_valid = 1; in_dec = 0; in_l = 32'hCC00CCFF; in_r = 32'hF0AAF0AA;
    k_enc = 48'h1B02EFFC7072; k_dec = 48'h123456789ABC;
    @(negedge clk);
    chk(out_valid && !out_dec, "valid and mode, encryption");
    chk(out_l == 32'hF0AAF0AA && out_r == 32'hEF4A6544, $sformatf("enc round 1: %h %h", out_l, out_r));
    in_dec = 1; k_dec = 48'h1B02EFFC7072; k_enc = 48'hFFFF0000FFFF; in_valid = 0;
    @(negedge clk);
    chk(!out_valid && out_dec, "valid and mode, decryption");
    chk(out_l == 32'hF0AAF0AA && out_r == 32'hEF4A6544, $sformatf("dec round 1: %h %h", out_l, out_r));
    en = 0; in_l = '1; in_r = '1; in_valid = 1;
    repeat (3) @(negedge clk);
    chk(!out_valid && out_l == 32'hF0AAF0AA && out_r == 32'hEF4A6544, "frozen with en low");
    en = 1;
    @(negedge clk);
    chk(out_valid && out_l == '1, "moves again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
