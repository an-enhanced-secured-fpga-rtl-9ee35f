// tb_des_sbox: self-checking test of the eight S-boxes.
//
// Instantiates des_sbox with SBOX = 0..7 and checks: the eight lookups of
// the first round of the standard worked example (E(R0) xor K1 =
// 6117BA866527 gives 5C82B597), the standard's own S1 example (input
// 011011 -> 5), the first entry of every box, and that each of the 32
// rows is a permutation of 0..15.
module tb_des_sbox;
  logic [5:0] a [8];
  logic [3:0] y [8];
  int checks = 0, failures = 0;
  logic [47:0] in_vec;
  logic [31:0] out_vec;
  logic [15:0] seen;
  // First entry (row 0, column 0) of S1..S8.
  localparam logic [3:0] FIRST [8] = '{14, 15, 10, 7, 2, 12, 4, 13};

  for (genvar n = 0; n < 8; n++) begin : g_dut
    des_sbox #(.SBOX(n)) dut (.a(a[n]), .y(y[n]));
  end

  initial begin
    in_vec = 48'h6117BA866527;
    for (int n = 0; n < 8; n++) a[n] = in_vec[47-6*n -: 6];
    #1;
    for (int n = 0; n < 8; n++) out_vec[31-4*n -: 4] = y[n];
    checks++;
    if (out_vec !== 32'h5C82B597) begin
      failures++;
      $display("FAIL worked example: %h", out_vec);
    end
    a[0] = 6'b011011; #1;
    checks++;
    if (y[0] !== 4'd5) begin
      failures++;
      $display("FAIL S1(011011) = %0d", y[0]);
    end
    for (int n = 0; n < 8; n++) a[n] = 6'b0;
    #1;
    for (int n = 0; n < 8; n++) begin
      checks++;
      if (y[n] !== FIRST[n]) begin
        failures++;
        $display("FAIL S%0d(0) = %0d, expected %0d", n+1, y[n], FIRST[n]);
      end
    end
    for (int row = 0; row < 4; row++) begin
      logic [15:0] rows_seen [8];
      for (int n = 0; n < 8; n++) rows_seen[n] = '0;
      for (int col = 0; col < 16; col++) begin
        for (int n = 0; n < 8; n++) a[n] = {row[1], col[3:0], row[0]};
        #1;
        for (int n = 0; n < 8; n++) rows_seen[n][y[n]] = 1'b1;
      end
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (rows_seen[n] !== 16'hFFFF) begin
          failures++;
          $display("FAIL S%0d row %0d is not a permutation (%h)", n+1, row, rows_seen[n]);
        end
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
