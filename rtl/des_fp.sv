// des_fp: DES final permutation IP-1.
//
// Reorders the 64-bit block R16||L16 (halves already swapped after the
// last round) by the inverse of IP to give the output block. Combinational,
// wiring only.
module des_fp
  import des_pkg::*;
(
  input  block_t x,   // R16 in x[63:32], L16 in x[31:0]
  output block_t y    // IP-1(x)
);
  assign y = fp_perm(x);
endmodule
