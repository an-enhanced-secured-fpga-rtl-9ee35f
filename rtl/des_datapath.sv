// des_datapath: round datapath of the iterative DES core.
//
// The input block goes through IP and splits into the left half LIN and
// right half RIN. Two multiplexers choose the round input: the permuted
// input in a load cycle, otherwise the half registers REGA (right half)
// and REGB (left half). One round is fully combinational between two clock
// edges: f(R,K) with all eight S-boxes in parallel, then the XOR with the
// left half. On an advance edge REGA takes the new right half
// L ^ f(R,K) and REGB takes the old right half. In the cycle of round 16
// (last = 1) the halves are swapped, passed through IP-1 and captured in
// the output register, which holds the result while the next block runs.
// Latency: a block loaded at edge 1 is in dout after edge 16.
// REGA/REGB, the parallel S-boxes and wiring-only permutations follow the
// published architecture; the output register is a choice made here.
module des_datapath
  import des_pkg::*;
(
  input  logic    clk,
  input  block_t  din,
  input  logic    load,
  input  logic    advance,
  input  logic    last,
  input  subkey_t subkey,
  output block_t  dout
);
  block_t  ip_out, pre_out, fp_out;
  half_t   rega_q, regb_q;     // REGA: right half, REGB: left half
  half_t   r_in, l_in, f_out, r_new;

  des_ip u_ip (.x(din), .y(ip_out));

  assign r_in  = load ? ip_out[31:0]  : rega_q;
  assign l_in  = load ? ip_out[63:32] : regb_q;

  des_f u_f (.r(r_in), .k(subkey), .f(f_out));
  assign r_new = l_in ^ f_out;

  // After round 16 the output is R16 || L16 (the halves are not swapped back).
  assign pre_out = {r_new, r_in};
  des_fp u_fp (.x(pre_out), .y(fp_out));

  always_ff @(posedge clk) begin
    if (advance) begin
      rega_q <= r_new;
      regb_q <= r_in;
    end
    if (last) dout <= fp_out;
  end
endmodule
