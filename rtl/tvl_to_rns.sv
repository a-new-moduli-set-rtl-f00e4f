// tvl_to_rns: forward converter from a 3N-digit ternary number to its three
// residues in the moduli set {3^n-2, 3^n-1, 3^n}.
//
// The input is split into N-digit parts A1 (digits 0..N-1), A2 (N..2N-1) and
// A3 (2N..3N-1), so X = A3*3^2n + A2*3^n + A1.
//   x3 = X mod 3^n   : A1 itself (higher parts are multiples of 3^n).
//   x2 = X mod 3^n-1 : A1 + A2 + A3, reduced by two conv_3n_1 stages
//                      (inner: A3*3^n + A2, outer: that result*3^n + A1).
//   x1 = X mod 3^n-2 : A1 + 2*A2 + 4*A3 by Horner's rule, 2*(2*A3 + A2) + A1:
//                      inner stage conv_3n_2_ser on (A3, A2), outer stage
//                      conv_3n_2_par on (inner result, A1).
// All residues come out fully reduced. Combinational. The per-channel
// algorithms are the published ones; extending the 2N-digit converters to 3N
// digits by chaining them, and using the serial converter for the inner and the
// parallel one for the outer step, are this design's choices.
module tvl_to_rns
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [3*N-1:0] x,
  output trit_t [N-1:0]   r_m2,  // X mod (3^n - 2)
  output trit_t [N-1:0]   r_m1,  // X mod (3^n - 1)
  output trit_t [N-1:0]   r_m0   // X mod 3^n
);
  trit_t [N-1:0] part1, part2, part3;
  trit_t [N-1:0] inner_m1, inner_m2;

  assign part1 = x[N-1:0];
  assign part2 = x[2*N-1:N];
  assign part3 = x[3*N-1:2*N];

  // Modulus 3^n: the low N digits.
  assign r_m0 = part1;

  // Modulus 3^n-1.
  conv_3n_1 #(.N(N)) u_m1_inner (.a_lo(part2), .a_hi(part3),    .r(inner_m1));
  conv_3n_1 #(.N(N)) u_m1_outer (.a_lo(part1), .a_hi(inner_m1), .r(r_m1));

  // Modulus 3^n-2.
  conv_3n_2_ser #(.N(N)) u_m2_inner (.a_lo(part2), .a_hi(part3),    .r(inner_m2));
  conv_3n_2_par #(.N(N)) u_m2_outer (.a_lo(part1), .a_hi(inner_m2), .r(r_m2));
endmodule
