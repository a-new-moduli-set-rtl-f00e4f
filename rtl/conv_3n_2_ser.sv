// conv_3n_2_ser: serial TVL-to-RNS converter for the 3^n-2 channel.
//
// Takes a 2N-digit ternary number as halves a_lo (digits 0..N-1) and a_hi
// (digits N..2N-1) and returns its residue modulo 3^n-2. Since 3^n = 2
// (mod 3^n-2), the residue is that of 2 * a_hi + a_lo: the high half counts
// twice. Two reduction stages run in series, each three parallel N-digit
// adders (+4, +2, +0) and a three-way multiplexer (red_3n_2):
//   stage 1: d = (a_hi + a_hi) mod (3^n-2)
//   stage 2: r = (a_lo + d)    mod (3^n-2)
// Combinational; delay about 2 * (N * t_FA3 + t_MUX). The two-stage structure
// with +4/+2/+0 adders follows the published design; the multiplexer select
// taken from the carries of both corrected adders is this design's choice.
module conv_3n_2_ser
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a_lo,
  input  trit_t [N-1:0] a_hi,
  output trit_t [N-1:0] r
);
  trit_t [N-1:0] dbl_hi;

  red_3n_2 #(.N(N)) u_double (.a(a_hi), .b(a_hi), .cin(2'd0), .r(dbl_hi));
  red_3n_2 #(.N(N)) u_add    (.a(a_lo), .b(dbl_hi), .cin(2'd0), .r(r));
endmodule
