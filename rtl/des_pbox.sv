// des_pbox: DES permutation P.
//
// Reorders the 32 bits collected from the eight S-boxes (S-box 1 in the
// top nibble) by the standard's P table, giving f(R,K). Combinational,
// wiring only.
module des_pbox
  import des_pkg::*;
(
  input  half_t s,    // S-box outputs, S1 in s[31:28] ... S8 in s[3:0]
  output half_t p     // P(s)
);
  assign p = p_perm(s);
endmodule
