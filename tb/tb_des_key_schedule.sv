// tb_des_key_schedule: self-checking test of the sequential key schedule.
//
// Captures the words written to the memory port and compares them with
// subkeys known from the standard worked example (key 133457799BBCDFF1:
// K1 = 1B02EFFC7072, K2 = 79AED9DBC9E5, K16 = CB3D8B0E17F5) and with the
// weak keys 0101010101010101 (all subkeys zero) and FEFEFEFEFEFEFEFE (all
// subkeys ones). Also checks the timing: 16 writes on 16 consecutive
// cycles at addresses 0..15, ready 17 cycles after start, a start during
// busy ignored.
module tb_des_key_schedule;
  logic        clk = 0, rst_n = 0;
  logic [63:0] key;
  logic        start, busy, ready, we;
  logic [3:0]  waddr;
  logic [47:0] wdata;
  logic [47:0] got [16];
  int checks = 0, failures = 0;

  des_key_schedule dut (.clk, .rst_n, .key, .start, .busy, .ready, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [63:0] k, input bit extra_start);
    int cyc, writes;
    @(negedge clk);
    key = k; start = 1'b1;
    @(negedge clk);
    start = extra_start;          // a start while busy must be ignored
    cyc = 1; writes = 0;
    while (!ready && cyc < 40) begin
      if (we) begin
        chk(waddr == 4'(writes), $sformatf("write %0d at address %0d", writes, waddr));
        got[waddr] = wdata;
        writes++;
      end
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    chk(writes == 16, $sformatf("%0d writes", writes));
    chk(cyc == 17, $sformatf("ready after %0d cycles, expected 17", cyc));
    chk(!busy && !we, "idle after schedule");
  endtask

  initial begin
    key = '0; start = 0;
    repeat (2) @(negedge clk);
    chk(!ready && !busy, "reset state");
    rst_n = 1;
    run(64'h133457799BBCDFF1, 1'b0);
    chk(got[0]  == 48'h1B02EFFC7072, $sformatf("K1 = %h", got[0]));
    chk(got[1]  == 48'h79AED9DBC9E5, $sformatf("K2 = %h", got[1]));
    chk(got[15] == 48'hCB3D8B0E17F5, $sformatf("K16 = %h", got[15]));
    run(64'h0101010101010101, 1'b1);
    for (int i = 0; i < 16; i++) chk(got[i] == 48'h0, $sformatf("weak key 01.. K%0d = %h", i+1, got[i]));
    run(64'hFEFEFEFEFEFEFEFE, 1'b0);
    for (int i = 0; i < 16; i++) chk(got[i] == '1, $sformatf("weak key FE.. K%0d = %h", i+1, got[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
