// tb_des_subkey_mem: self-checking test of the 16 x 48-bit subkey memory.
//
// Writes random words to all addresses in random order, then reads every
// address back through the asynchronous port (data valid in the same
// cycle, no clock needed), overwrites a few words and reads again, and
// checks that a write with we low changes nothing.
module tb_des_subkey_mem;
  logic        clk = 0;
  logic        we;
  logic [3:0]  waddr, raddr;
  logic [47:0] wdata, rdata;
  logic [47:0] model [16];
  int checks = 0, failures = 0;

  des_subkey_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic write(input logic [3:0] a, input logic [47:0] d, input logic en);
    @(negedge clk);
    we = en; waddr = a; wdata = d;
    @(negedge clk);
    we = 1'b0;
    if (en) model[a] = d;
  endtask

  task automatic read_all();
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i); #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr %0d: %h, expected %h", i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 16; i++) write(4'(15 - i), {$urandom, $urandom}, 1'b1);
    read_all();
    for (int i = 0; i < 6; i++) write(4'($urandom), {$urandom, $urandom}, 1'b1);
    read_all();
    write(4'd3, 48'h123456789ABC, 1'b0);   // disabled write
    read_all();
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
