// des_pipe_stage: one round of the pipelined DES engine, with its registers.
//
// Holds one block between two clock edges: its left and right halves, its
// mode bit and a valid flag. On each enabled edge it takes the previous
// stage's block and applies DES round ROUND+1 to it: R' = L ^ f(R, K),
// L' = R. The subkey is K(ROUND+1) for an encryption and K(16-ROUND) for a
// decryption, chosen per block by its mode bit, so encryptions and
// decryptions can follow each other in the pipeline. Latency one cycle.
// The valid flag is reset; the data registers are not.
module des_pipe_stage
  import des_pkg::*;
#(
  parameter int unsigned ROUND = 0   // 0 = round 1 ... 15 = round 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    in_valid,
  input  logic    in_dec,
  input  half_t   in_l,
  input  half_t   in_r,
  input  subkey_t k_enc,    // K(ROUND+1)
  input  subkey_t k_dec,    // K(16-ROUND)
  output logic    out_valid,
  output logic    out_dec,
  output half_t   out_l,
  output half_t   out_r
);
  half_t f_out;

  des_f u_f (.r(in_r), .k(in_dec ? k_dec : k_enc), .f(f_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out_valid <= 1'b0;
    else if (en) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      out_dec <= in_dec;
      out_l   <= in_r;
      out_r   <= in_l ^ f_out;
    end
  end

  initial assert (ROUND < 16) else $fatal(1, "des_pipe_stage: ROUND must be 0..15");
endmodule
