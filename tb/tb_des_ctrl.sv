// tb_des_ctrl: self-checking test of the round controller.
//
// Checks cycle by cycle: a load every 16 active cycles, last on the 16th
// active cycle of a block, dout_valid on the cycle after last, subkey
// addresses 0..15 for an encryption and 15..0 for a decryption, the mode
// held for the whole block even if the decrypt input changes, and that
// ce_n high or hold high freezes the controller (no load, no last, the
// address sequence resumes where it stopped).
module tb_des_ctrl;
  logic       clk = 0, rst_n = 0;
  logic       ce_n, hold, decrypt;
  logic       load, advance, last, dout_valid;
  logic [3:0] key_addr;
  int checks = 0, failures = 0;
  int stalls = 0;

  des_ctrl dut (.clk, .rst_n, .ce_n, .hold, .decrypt, .load, .advance, .last, .key_addr, .dout_valid);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // Runs one block; stall_at >= 0 inserts stall cycles before that round.
  task automatic block(input bit dec, input int stall_at, input bit use_hold);
    for (int r = 0; r < 16; r++) begin
      if (r == stall_at) begin
        for (int s = 0; s < 3; s++) begin
          if (use_hold) hold = 1'b1; else ce_n = 1'b1;
          #1;
          chk(!advance && !load && !last, "frozen while disabled");
          chk(dout_valid == (s == 0 && prev_last), "dout_valid after last, stalled");
          @(negedge clk);
          stalls++;
        end
        ce_n = 1'b0; hold = 1'b0;
        prev_last = 0;
      end
      decrypt = (r == 0) ? dec : ~dec;   // later changes must not matter
      #1;
      chk(advance, $sformatf("advance in round %0d", r + 1));
      chk(load == (r == 0), $sformatf("load in round %0d", r + 1));
      chk(last == (r == 15), $sformatf("last in round %0d", r + 1));
      chk(key_addr == (dec ? 4'(15 - r) : 4'(r)),
          $sformatf("round %0d %s key_addr %0d", r + 1, dec ? "dec" : "enc", key_addr));
      chk(dout_valid == (r == 0 && prev_last), "dout_valid after last");
      @(negedge clk);
      prev_last = (r == 15);
    end
  endtask

  bit prev_last = 0;

  initial begin
    ce_n = 1; hold = 0; decrypt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!dout_valid && !advance, "idle with ce_n high");
    ce_n = 0;
    block(1'b0, -1, 1'b0);
    block(1'b1, -1, 1'b0);
    block(1'b0, 7, 1'b0);
    block(1'b1, 0, 1'b1);
    block(1'b1, 15, 1'b0);
    #1 chk(dout_valid, "final dout_valid");
    chk(stalls == 9, "stall cycles happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
