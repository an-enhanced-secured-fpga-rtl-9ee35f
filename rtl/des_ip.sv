// des_ip: DES initial permutation IP.
//
// Reorders the 64 bits of the input block by the standard's IP table. The
// upper half of the result is the left half L0 and the lower half the
// right half R0 that enter the first round. Combinational, wiring only:
// no gates, no delay beyond routing.
module des_ip
  import des_pkg::*;
(
  input  block_t x,   // input block, bit 63 = DES bit 1
  output block_t y    // IP(x): y[63:32] = L0, y[31:0] = R0
);
  assign y = ip_perm(x);
endmodule
