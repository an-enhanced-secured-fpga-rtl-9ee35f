// tb_des_datapath: self-checking test of the round datapath.
//
// The testbench plays the controller: it raises load for the first round,
// advance for all sixteen, last for the sixteenth, and supplies the
// subkeys itself. Known answers used:
//  - all subkeys zero (the weak key 0101010101010101): block 0 encrypts to
//    8CA64DE9C1B123A7, and that block encrypts back to 0;
//  - all subkeys ones (weak key FEFEFEFEFEFEFEFE): FFFFFFFFFFFFFFFF
//    encrypts to 7359B2163E4EDC58;
//  - the standard worked example, 0123456789ABCDEF with the key
//    133457799BBCDFF1: after round 1 the half registers hold
//    R1 = EF4A6544 and L1 = F0AAF0AA, after round 2 R2 = CC017709, and
//    the result is 85E813540F0AB405. Its subkeys K3..K15 come from a
//    key-schedule instance; K1, K2 and K16 are given directly.
// Also checks that dout changes only at the edge of round 16 and that
// advance low freezes the half registers.
module tb_des_datapath;
  logic        clk = 0, rst_n = 0;
  logic [63:0] din, dout;
  logic        load, advance, last;
  logic [47:0] subkey;
  int checks = 0, failures = 0;

  // Subkeys of the worked example from a key schedule.
  logic        ks_start, ks_busy, ks_ready, ks_we;
  logic [3:0]  ks_waddr;
  logic [47:0] ks_wdata;
  logic [47:0] ks_keys [16];

  des_datapath dut (.clk, .din, .load, .advance, .last, .subkey, .dout);
  des_key_schedule u_ks (.clk, .rst_n, .key(64'h133457799BBCDFF1), .start(ks_start),
                         .busy(ks_busy), .ready(ks_ready), .we(ks_we), .waddr(ks_waddr), .wdata(ks_wdata));

  always @(posedge clk) if (ks_we) ks_keys[ks_waddr] <= ks_wdata;

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // One block of 16 rounds; keysel 0: zeros, 1: ones, 2: worked example.
  task automatic run(input logic [63:0] blk, input int keysel, input logic [63:0] exp);
    logic [63:0] held;
    held = dout;
    for (int r = 0; r < 16; r++) begin
      din = (r == 0) ? blk : ~blk;   // din matters only in the load cycle
      load = (r == 0); advance = 1'b1; last = (r == 15);
      case (keysel)
        0: subkey = '0;
        1: subkey = '1;
        default: subkey = (r == 0) ? 48'h1B02EFFC7072 : (r == 1) ? 48'h79AED9DBC9E5 :
                          (r == 15) ? 48'hCB3D8B0E17F5 : ks_keys[r];
      endcase
      @(negedge clk);
      if (r < 15) chk(dout == held, "dout held during a block");
      if (keysel == 2 && r == 0)
        chk(dut.rega_q == 32'hEF4A6544 && dut.regb_q == 32'hF0AAF0AA, "R1/L1 of worked example");
      if (keysel == 2 && r == 1) chk(dut.rega_q == 32'hCC017709, "R2 of worked example");
      if (r == 7) begin   // a frozen cycle in the middle of the block
        load = 0; advance = 0; last = 0; subkey = '1;
        held = {dut.rega_q, dut.regb_q};
        @(negedge clk);
        chk({dut.rega_q, dut.regb_q} == held, "registers frozen with advance low");
        held = dout;
      end
    end
    load = 0; advance = 0; last = 0;
    chk(dout == exp, $sformatf("E(%h) = %h, expected %h", blk, dout, exp));
  endtask

  initial begin
    din = '0; load = 0; advance = 0; last = 0; subkey = '0; ks_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ks_start = 1; @(negedge clk); ks_start = 0;
    wait (ks_ready);
    @(negedge clk);
    run(64'h0, 0, 64'h8CA64DE9C1B123A7);
    run(64'h8CA64DE9C1B123A7, 0, 64'h0);
    run('1, 1, 64'h7359B2163E4EDC58);
    run(64'h0123456789ABCDEF, 2, 64'h85E813540F0AB405);
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
