// des_f: the DES cipher function f(R,K).
//
// E expands the right half to 48 bits, which are XORed with the round's
// subkey. The result is cut into eight 6-bit groups that address the eight
// S-boxes at the same time, a parallel arrangement that keeps the critical
// path to one S-box lookup. The 32 S-box output bits pass through
// permutation P. Fully combinational: one evaluation fits between two
// clock edges of the iterative round.
module des_f
  import des_pkg::*;
(
  input  half_t   r,  // right half R(i-1)
  input  subkey_t k,  // subkey K(i)
  output half_t   f   // f(R,K)
);
  subkey_t e, x;
  half_t   s;

  des_expand u_e (.r(r), .e(e));
  assign x = e ^ k;

  for (genvar n = 0; n < 8; n++) begin : g_sbox
    des_sbox #(.SBOX(n)) u_sbox (.a(x[47-6*n -: 6]), .y(s[31-4*n -: 4]));
  end

  des_pbox u_p (.s(s), .p(f));
endmodule
