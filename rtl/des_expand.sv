// des_expand: DES expansion permutation E.
//
// Spreads the 32-bit right half over 48 bits: each group of four bits is
// flanked by the neighbouring bits, so sixteen input bits appear twice.
// The result lines up with the 48-bit subkey for the XOR that addresses
// the S-boxes. Combinational, wiring only.
module des_expand
  import des_pkg::*;
(
  input  half_t   r,  // right half R
  output subkey_t e   // E(R), 8 groups of 6 bits, group 1 in e[47:42]
);
  assign e = e_perm(r);
endmodule
