// tb_des_pipe_core: self-checking test of the pipelined DES engine.
//
// A key-schedule instance fills the engine's subkey bank. Then:
//  - known answers for key 0123456789ABCDEF (4E6F772069732074 ->
//    3FA40E8A984D4815, 1111111111111111 -> 17668DFC7292532D) and key
//    133457799BBCDFF1 (0123456789ABCDEF -> 85E813540F0AB405), entered on
//    consecutive clocks with encryption and decryption interleaved;
//  - 200 random blocks on consecutive clocks, then their results
//    decrypted, which must give the blocks back;
//  - random en-low cycles during a stream.
// Checks the first result 17 clock edges after its block entered and one
// result per clock while blocks enter on every clock.
module tb_des_pipe_core;
  logic        clk = 0, rst_n = 0;
  logic        en, in_valid, decrypt, out_valid;
  logic [63:0] din, dout, key;
  logic        ks_start, ks_busy, ks_ready, ks_we;
  logic [3:0]  ks_waddr;
  logic [47:0] ks_wdata;
  int checks = 0, failures = 0;
  int cycle = 0, first_in = -1, first_out = -1, out_run = 0, max_run = 0;

  typedef struct { logic [63:0] exp; bit known; } exp_t;
  exp_t exp_q[$];
  logic [63:0] results[$];

  des_key_schedule u_ks (.clk, .rst_n, .key, .start(ks_start), .busy(ks_busy), .ready(ks_ready),
                         .we(ks_we), .waddr(ks_waddr), .wdata(ks_wdata));
  des_pipe_core dut (.clk, .rst_n, .en, .in_valid, .din, .decrypt, .key_we(ks_we),
                     .key_waddr(ks_waddr), .key_wdata(ks_wdata), .out_valid, .dout);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (en && in_valid && first_in < 0) first_in = cycle;
    if (out_valid && en) begin
      exp_t e;
      if (first_out < 0) first_out = cycle;
      out_run++;
      if (out_run > max_run) max_run = out_run;
      chk(exp_q.size() > 0, "result without a block");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front();
        if (e.known) chk(dout == e.exp, $sformatf("result %h, expected %h", dout, e.exp));
        results.push_back(dout);
      end
    end else if (en) out_run = 0;
  end

  task automatic load_key(input logic [63:0] k);
    @(negedge clk);
    key = k; ks_start = 1;
    @(negedge clk);
    ks_start = 0;
    wait (ks_ready);
    @(negedge clk);
  endtask

  task automatic send(input logic [63:0] d, input bit dec, input logic [63:0] e, input bit known);
    exp_t x;
    x.exp = e; x.known = known;
    din = d; decrypt = dec; in_valid = 1;
    exp_q.push_back(x);
    do @(posedge clk); while (!en);   // taken at an enabled edge
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    while (exp_q.size() > 0 && guard < 200) begin
      @(negedge clk);
      guard++;
    end
    chk(exp_q.size() == 0, "pipeline drained");
  endtask

  initial begin
    logic [63:0] pt [200];
    en = 1; in_valid = 0; din = 0; decrypt = 0; key = 0; ks_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_key(64'h0123456789ABCDEF);
    send(64'h4E6F772069732074, 0, 64'h3FA40E8A984D4815, 1);
    send(64'h3FA40E8A984D4815, 1, 64'h4E6F772069732074, 1);
    send(64'h1111111111111111, 0, 64'h17668DFC7292532D, 1);
    send(64'h17668DFC7292532D, 1, 64'h1111111111111111, 1);
    drain();
    chk(first_out - first_in == 17, $sformatf("first result after %0d edges, expected 17", first_out - first_in));
    chk(max_run == 4, $sformatf("four results on consecutive clocks (%0d)", max_run));
    load_key(64'h133457799BBCDFF1);
    send(64'h0123456789ABCDEF, 0, 64'h85E813540F0AB405, 1);
    send(64'h85E813540F0AB405, 1, 64'h0123456789ABCDEF, 1);
    drain();
    // Random stream, then its results decrypted, with en stalls.
    results.delete();
    for (int i = 0; i < 200; i++) begin
      pt[i] = {$urandom, $urandom};
      send(pt[i], 0, '0, 0);
    end
    drain();
    chk(max_run >= 200, $sformatf("200 results on consecutive clocks (%0d)", max_run));
    chk(results.size() == 200, "200 ciphertexts");
    fork
      for (int i = 0; i < 200; i++) send(results[i], 1, pt[i], 1);
      begin
        repeat (60) begin
          @(posedge clk);
          #2 en = ($urandom % 5) != 0;
        end
        en = 1;
      end
    join
    en = 1;
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
