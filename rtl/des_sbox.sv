// des_sbox: one DES substitution box, a 64-word by 4-bit read-only memory.
//
// The 6-bit address is one group of E(R) xor K. Its outer bits a[5] and
// a[0] select one of four rows and its inner bits a[4:1] the column; each
// row is a permutation of 0..15. The parameter SBOX (0..7) chooses which of
// the eight standard tables this instance holds. The read is
// combinational, so a synthesis tool maps the table onto LUTs used as
// distributed ROM, and all eight boxes of a round work at the same time.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned SBOX = 0   // 0 = S1 ... 7 = S8
) (
  input  logic [5:0] a,
  output logic [3:0] y
);
  localparam logic [2:0] N = 3'(SBOX);
  assign y = sbox_lookup(N, a);

  initial assert (SBOX < 8) else $fatal(1, "des_sbox: SBOX must be 0..7");
endmodule
