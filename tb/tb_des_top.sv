// tb_des_top: end-to-end test of the iterative DES core.
//
// Runs the core at its default configuration through:
//  - published DES known-answer vectors, encrypted as a back-to-back
//    stream (a new block every 16 cycles) and decrypted the same way;
//  - a stream mixing encryption and decryption, with the mode changing
//    from block to block;
//  - random keys and blocks: each block is encrypted and the ciphertext
//    decrypted again, with the chip enable dropped at random cycles.
// A feeder process presents blocks on din; a monitor records every
// sampled block and compares each dout_valid result, in order, with the
// expected value. The monitor also checks the timing of the design: 16
// enabled clock edges from the sampling edge to the result, and, without
// stalls, one block every 16 cycles. Each mechanism of the design (key
// load, hold while the schedule runs, CE stall mid-block, encryption,
// decryption, mode switch, back-to-back blocks) is counted, and one that
// never happens counts as a failure. The pipelined engine gets the same
// known answers on consecutive clocks and the same random blocks; its
// results are compared with the iterative core's, its latency must be 17
// enabled edges, and it must deliver results on consecutive clocks and be
// frozen by CE at least once.
module tb_des_top;
  logic        clk = 0, rst_n = 0;
  logic        ce_n, decrypt, din_taken, key_load, key_ready, dout_valid;
  logic [63:0] din, dout, key;
  int checks = 0, failures = 0;

  typedef struct {
    logic [63:0] din;
    logic        dec;
    logic [63:0] exp;
    bit          exp_known;
  } job_t;

  job_t todo[$];       // blocks waiting to be fed
  job_t inflight[$];   // blocks sampled, result pending
  logic [63:0] results[$];

  int n_key_load = 0, n_hold = 0, n_stall = 0, n_enc = 0, n_dec = 0;
  int n_switch = 0, n_back2back = 0;
  bit stall_en = 0;
  int active_edges = 0, cycles_since_take = 0, last_take = -1, cycle = 0;
  bit prev_dec = 0, any_taken = 0;

  // Pipelined engine.
  logic        pipe_decrypt, pipe_din_valid, pipe_din_taken, pipe_dout_valid;
  logic [63:0] pipe_din, pipe_dout;
  job_t        ptodo[$];
  job_t        pinflight[$];
  int          pin_edge[$];
  logic [63:0] presults[$];
  int en_edges = 0, n_pipe_run = 0, n_pipe_full = 0, n_pipe_stall = 0;

  des_top dut (.clk, .rst_n, .ce_n, .din, .decrypt, .din_taken, .key, .key_load,
               .key_ready, .dout, .dout_valid,
               .pipe_din, .pipe_decrypt, .pipe_din_valid, .pipe_din_taken,
               .pipe_dout, .pipe_dout_valid);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t %s", $time, what);
    end
  endtask

  // Feeder: present the head of the queue; drop CE at random when enabled.
  always @(negedge clk) begin
    if (rst_n && key_ready) begin
      if (ptodo.size() > 0) begin
        pipe_din       <= ptodo[0].din;
        pipe_decrypt   <= ptodo[0].dec;
        pipe_din_valid <= 1'b1;
      end else begin
        pipe_din       <= {$urandom, $urandom};
        pipe_decrypt   <= 1'($urandom);
        pipe_din_valid <= 1'b0;
      end
      if (todo.size() > 0 || inflight.size() > 0) begin
        if (todo.size() == 0 && active_edges == 16) begin
          ce_n <= 1'b1;            // nothing to feed: stop before the next load
        end else if (stall_en && ($urandom % 8) == 0) begin
          ce_n <= 1'b1;
        end else begin
          ce_n <= 1'b0;
        end
      end
      if (todo.size() > 0) begin
        din     <= todo[0].din;
        decrypt <= todo[0].dec;
      end else begin
        din     <= {$urandom, $urandom};
        decrypt <= 1'($urandom);
      end
    end
  end

  // Monitor.
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (!ce_n && !key_ready) n_hold++;
      if (ce_n && inflight.size() > 0 && active_edges > 0) n_stall++;
      if (ce_n && pinflight.size() > 0) n_pipe_stall++;
      if (pipe_dout_valid) begin
        chk(pinflight.size() > 0, "pipelined result without a block");
        if (pinflight.size() > 0) begin
          job_t j;
          int   t;
          j = pinflight.pop_front();
          t = pin_edge.pop_front();
          chk(en_edges - t == 17, $sformatf("pipelined latency %0d enabled edges, expected 17", en_edges - t));
          if (j.exp_known)
            chk(pipe_dout == j.exp, $sformatf("pipelined %s(%h) = %h, expected %h",
                j.dec ? "D" : "E", j.din, pipe_dout, j.exp));
          presults.push_back(pipe_dout);
          n_pipe_run++;
          if (n_pipe_run >= 5) n_pipe_full++;
        end
      end else if (!ce_n) n_pipe_run = 0;
      if (pipe_din_taken) begin
        chk(ptodo.size() > 0, "pipelined block taken with nothing to feed");
        if (ptodo.size() > 0) begin
          job_t j;
          j = ptodo.pop_front();
          chk(pipe_din == j.din && pipe_decrypt == j.dec, "pipelined sampled block matches feeder");
          pinflight.push_back(j);
          pin_edge.push_back(en_edges);
        end
      end
      if (!ce_n) en_edges++;
      if (dout_valid) begin
        chk(inflight.size() > 0, "result without a block");
        if (inflight.size() > 0) begin
          job_t j;
          j = inflight.pop_front();
          chk(active_edges == 16, $sformatf("latency %0d enabled edges, expected 16", active_edges));
          if (j.exp_known)
            chk(dout == j.exp, $sformatf("%s(%h) = %h, expected %h",
                j.dec ? "D" : "E", j.din, dout, j.exp));
          results.push_back(dout);
        end
      end
      if (!ce_n && key_ready) active_edges++;
      if (din_taken) begin
        chk(todo.size() > 0, "block taken with nothing to feed");
        if (todo.size() > 0) begin
          job_t j;
          j = todo.pop_front();
          chk(din == j.din && decrypt == j.dec, $sformatf("sampled block %h/%0d matches feeder %h/%0d", din, decrypt, j.din, j.dec));
          if (j.dec) n_dec++; else n_enc++;
          if (any_taken && j.dec != prev_dec) n_switch++;
          if (any_taken && cycle - last_take == 16) n_back2back++;
          if (any_taken && !stall_en && inflight.size() == 0 && last_take >= 0)
            chk(cycle - last_take == 16 || cycle - last_take > 17,
                $sformatf("block interval %0d", cycle - last_take));
          prev_dec = j.dec; any_taken = 1; last_take = cycle;
          inflight.push_back(j);
          active_edges = 1;
        end
      end
    end
  end

  task automatic load_key(input logic [63:0] k);
    @(negedge clk);
    key = k; key_load = 1'b1; ce_n = 1'b0;     // enabled while the schedule runs: held
    n_key_load++;
    @(negedge clk);
    key_load = 1'b0;
    chk(!key_ready, "key_ready low during schedule");
    while (!key_ready) begin
      chk(!din_taken, "no block taken while the schedule runs");
      @(negedge clk);
    end
    ce_n = 1'b1;
  endtask

  task automatic add(input logic [63:0] d, input bit dec, input logic [63:0] e, input bit known);
    job_t j;
    j.din = d; j.dec = dec; j.exp = e; j.exp_known = known;
    todo.push_back(j);
  endtask

  task automatic padd(input logic [63:0] d, input bit dec, input logic [63:0] e, input bit known);
    job_t j;
    j.din = d; j.dec = dec; j.exp = e; j.exp_known = known;
    ptodo.push_back(j);
  endtask

  // The iterative stream of every phase outlasts the pipelined one, so the
  // chip enable stays low until both engines are done.
  task automatic drain();
    int guard = 0;
    while ((todo.size() > 0 || inflight.size() > 0 || ptodo.size() > 0 || pinflight.size() > 0)
           && guard < 5000) begin
      @(negedge clk);
      guard++;
    end
    chk(guard < 5000, "stream finished");
    @(negedge clk);
    ce_n = 1'b1;
  endtask

  // Known answers: key, plaintext, ciphertext.
  localparam logic [63:0] KAT [10][3] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0101010101010101, 64'h0000000000000000, 64'h8CA64DE9C1B123A7},
    '{64'hFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h7359B2163E4EDC58},
    '{64'h3000000000000000, 64'h1000000000000001, 64'h958E6E627A05557B},
    '{64'h1111111111111111, 64'h1111111111111111, 64'hF40379AB9E0EC533},
    '{64'h0123456789ABCDEF, 64'h1111111111111111, 64'h17668DFC7292532D},
    '{64'h1111111111111111, 64'h0123456789ABCDEF, 64'h8A5AE1F81AB8F2DD},
    '{64'hFEDCBA9876543210, 64'h0123456789ABCDEF, 64'hED39D950FA74BCC4}};

  initial begin
    ce_n = 1; din = '0; decrypt = 0; key = '0; key_load = 0;
    pipe_din = '0; pipe_decrypt = 0; pipe_din_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ce_n = 1'b0;
    repeat (3) @(negedge clk);
    chk(!din_taken && !dout_valid, "nothing runs before a key is loaded");
    ce_n = 1'b1;

    // Known answers: each key once, its blocks streamed, then decrypted.
    for (int i = 0; i < 10; i++) begin
      load_key(KAT[i][0]);
      add(KAT[i][1], 1'b0, KAT[i][2], 1);
      add(KAT[i][2], 1'b1, KAT[i][1], 1);
      add(KAT[i][1], 1'b0, KAT[i][2], 1);
      add(KAT[i][1], 1'b0, KAT[i][2], 1);
      add(KAT[i][2], 1'b1, KAT[i][1], 1);
      padd(KAT[i][1], 1'b0, KAT[i][2], 1);
      padd(KAT[i][2], 1'b1, KAT[i][1], 1);
      padd(KAT[i][2], 1'b1, KAT[i][1], 1);
      padd(KAT[i][1], 1'b0, KAT[i][2], 1);
      padd(KAT[i][1], 1'b0, KAT[i][2], 1);
      drain();
    end

    // Random keys and blocks with CE stalls: encrypt, then decrypt the result.
    stall_en = 1;
    for (int k = 0; k < 6; k++) begin
      logic [63:0] rk, pt [4];
      rk = {$urandom, $urandom};
      load_key(rk);
      results.delete();
      presults.delete();
      for (int i = 0; i < 4; i++) begin
        pt[i] = {$urandom, $urandom};
        add(pt[i], 1'b0, '0, 0);
        padd(pt[i], 1'b0, '0, 0);
      end
      drain();
      chk(results.size() == 4 && presults.size() == 4, "four ciphertexts from each engine");
      // The two engines must agree; each ciphertext must decrypt back.
      for (int i = 0; i < 4 && i < results.size() && i < presults.size(); i++) begin
        chk(results[i] == presults[i], $sformatf("engines agree on E(%h): %h / %h",
            pt[i], results[i], presults[i]));
        add(results[i], 1'b1, pt[i], 1);
        padd(presults[i], 1'b1, pt[i], 1);
      end
      drain();
    end

    $display("mechanisms: key_load=%0d hold=%0d ce_stall=%0d enc=%0d dec=%0d mode_switch=%0d back_to_back=%0d pipe_full_rate=%0d pipe_stall=%0d",
             n_key_load, n_hold, n_stall, n_enc, n_dec, n_switch, n_back2back, n_pipe_full, n_pipe_stall);
    chk(n_pipe_full > 0, "pipelined engine delivered five results on consecutive clocks");
    chk(n_pipe_stall > 0, "pipelined engine frozen by CE happened");
    chk(n_key_load > 0, "key load happened");
    chk(n_hold > 0, "hold while the schedule runs happened");
    chk(n_stall > 0, "CE stall mid-block happened");
    chk(n_enc > 0, "encryption happened");
    chk(n_dec > 0, "decryption happened");
    chk(n_switch > 0, "mode switch happened");
    chk(n_back2back > 0, "back-to-back blocks happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
