// rns_tvl_top: ternary residue-number-system adder over the moduli set
// {3^n-2, 3^n-1, 3^n}, from ternary operands to a ternary result.
//
// Two 3N-digit ternary operands X and Y are each converted to residues
// (tvl_to_rns), added channel by channel in three independent modular adders
// with no carry between channels (rns_add_3n_2, rns_add_3n_1, rns_add_3n), and
// the residues of the sum are converted back with the Chinese Remainder
// Theorem (rns_to_tvl). The result is z = (X + Y) mod M, M = (3^n-2)(3^n-1)3^n,
// as 3N trits; the residues of X, Y and Z are brought out as well.
// Every trit is two wires (00 = 0, 01 = 1, 10 = 2). The whole path is
// combinational: there is no clock, and an output is valid once the inputs have
// settled through the forward converters, one modular adder and the reverse
// converter. The chain forward-convert, add, reverse-convert is the published
// worked example; exposing it as a single combinational block is this design's
// choice. The default N = 3 is the modulus size of that example ({25, 26, 27}).
module rns_tvl_top
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [3*N-1:0] x,
  input  trit_t [3*N-1:0] y,
  output trit_t [N-1:0]   x_m2, x_m1, x_m0,  // residues of X
  output trit_t [N-1:0]   y_m2, y_m1, y_m0,  // residues of Y
  output trit_t [N-1:0]   z_m2, z_m1, z_m0,  // residues of X + Y
  output trit_t [3*N-1:0] z                  // (X + Y) mod M
);
  tvl_to_rns #(.N(N)) u_fwd_x (.x(x), .r_m2(x_m2), .r_m1(x_m1), .r_m0(x_m0));
  tvl_to_rns #(.N(N)) u_fwd_y (.x(y), .r_m2(y_m2), .r_m1(y_m1), .r_m0(y_m0));

  rns_add_3n_2 #(.N(N)) u_add_m2 (.a(x_m2), .b(y_m2), .s(z_m2));
  rns_add_3n_1 #(.N(N)) u_add_m1 (.a(x_m1), .b(y_m1), .s(z_m1));
  rns_add_3n   #(.N(N)) u_add_m0 (.a(x_m0), .b(y_m0), .s(z_m0));

  rns_to_tvl #(.N(N)) u_rev (.x_m2(z_m2), .x_m1(z_m1), .x_m0(z_m0), .x(z));
endmodule
