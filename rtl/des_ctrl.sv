// des_ctrl: timing and control unit of the iterative DES core.
//
// A 4-bit round counter runs while the chip enable ce_n is low and the
// core is not held (hold is high while no complete key schedule is in the
// subkey memory). With ce_n high the counter and the round registers keep
// their values, so a block in flight resumes where it stopped.
//
// Timing: the cycle with counter 0 is a load cycle (load = 1): the
// datapath takes its round input from the permuted input block and the
// mode input decrypt is sampled. Each active cycle computes one round;
// the cycle with counter 15 computes round 16 (last = 1), and dout_valid
// is high during the following cycle. A block thus takes 16 clock edges
// from the edge that samples it to the edge that registers its result,
// and a new block is taken on the very next edge, one block every 16
// cycles. The subkey address is the round number in encryption and its
// mirror (15 - round) in decryption.
// The active-low enable, the 16 clocks per block and the reversed subkey
// order for decryption follow the published architecture; computing round
// 1 in the load cycle, the hold input and the strobes are choices made here.
// The assertion at the end uses rst_n synchronously in its disable
// condition; the resulting lint note about rst_n being used both
// asynchronously and synchronously does not concern the circuit.
module des_ctrl
  import des_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ce_n,
  input  logic   hold,
  input  logic   decrypt,
  output logic   load,
  output logic   advance,
  output logic   last,
  output round_t key_addr,
  output logic   dout_valid
);
  round_t rnd_q;
  logic   dec_q, dec;

  assign advance  = !ce_n && !hold;
  assign load     = advance && (rnd_q == 4'd0);
  assign last     = advance && (rnd_q == 4'd15);
  assign dec      = (rnd_q == 4'd0) ? decrypt : dec_q;
  assign key_addr = dec ? (4'd15 - rnd_q) : rnd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd_q      <= '0;
      dec_q      <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= last;
      if (advance) rnd_q <= rnd_q + 1'b1;
      if (load)    dec_q <= decrypt;
    end
  end

  // The round counter only moves while the core is enabled.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !advance |=> $stable(rnd_q));
endmodule
