// rns_add_3n_1: modular adder of the 3^n-1 channel, (a + b) mod (3^n - 1).
//
// Operands are residues 0 .. 3^n-2. Two N-digit ternary adders run in
// parallel: one forms a + b, the other a + b + 1 (1 being the complement of the
// modulus, 3^n - (3^n-1)), with 1 entering as the carry into digit 0. The carry
// out of the second adder is 1 exactly when a + b >= 3^n - 1; it steers a 2:1
// digit-wide multiplexer to the low N digits of a + b + 1 (which then equal
// a + b - (3^n-1)), otherwise to a + b. The carry out of that adder never
// exceeds 1 for legal operands, so its single digit is used as the select.
// Combinational, delay N * t_FA3 + t_MUX.
module rns_add_3n_1
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  output trit_t [N-1:0] s
);
  trit_t [N-1:0] sum_plain, sum_corr;
  logic  [2:0]   c_plain, c_corr;

  tadd_n #(.N(N)) u_add_plain (
    .a(a), .b(b), .cin(3'd0), .s(sum_plain), .cout(c_plain)
  );
  tadd_n #(.N(N)) u_add_corr (
    .a(a), .b(b), .cin(3'd1), .s(sum_corr), .cout(c_corr)
  );

  // c_plain is not needed: the corrected adder's carry alone decides.
  always_comb s = (c_corr != 3'd0) ? sum_corr : sum_plain;
endmodule
