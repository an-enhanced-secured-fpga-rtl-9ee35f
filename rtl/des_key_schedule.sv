// des_key_schedule: sequential DES key schedule that fills the subkey memory.
//
// A start pulse loads PC-1 of the 64-bit key (the eight parity bits are
// dropped) into the 28-bit halves C and D. On each of the next 16 clock
// edges both halves are rotated left by the round's amount (1 or 2), and
// PC-2 of the rotated pair is written to the subkey memory at address
// round-1. The schedule therefore takes 17 cycles per key: one to load,
// sixteen to write. busy is high while words are being written; ready
// rises after the sixteenth write and stays high until the next start.
// Decryption needs no second schedule: the round controller reads the
// same memory in reverse order. A start while busy is ignored.
// The steps are those of the DES standard; computing the subkeys on chip,
// one per clock, is a choice made here.
module des_key_schedule
  import des_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  block_t  key,
  input  logic    start,
  output logic    busy,
  output logic    ready,
  output logic    we,
  output round_t  waddr,
  output subkey_t wdata
);
  logic [27:0] c_q, d_q, c_n, d_n;
  round_t      cnt_q;

  // Rotate both halves by this round's amount.
  always_comb begin
    if (SHIFT_TBL[cnt_q] == 8'd1) begin
      c_n = {c_q[26:0], c_q[27]};
      d_n = {d_q[26:0], d_q[27]};
    end else begin
      c_n = {c_q[25:0], c_q[27:26]};
      d_n = {d_q[25:0], d_q[27:26]};
    end
  end

  assign we    = busy;
  assign waddr = cnt_q;
  assign wdata = pc2_perm({c_n, d_n});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      cnt_q <= '0;
      c_q   <= '0;
      d_q   <= '0;
    end else if (busy) begin
      c_q   <= c_n;
      d_q   <= d_n;
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == 4'd15) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end else if (start) begin
      {c_q, d_q} <= pc1_perm(key);
      cnt_q      <= '0;
      busy       <= 1'b1;
      ready      <= 1'b0;
    end
  end
endmodule
