// conv_3n_2_par: parallel TVL-to-RNS converter for the 3^n-2 channel.
//
// Same function as conv_3n_2_ser: the residue modulo 3^n-2 of the 2N-digit
// number (a_hi, a_lo), i.e. of a_lo + 2 * a_hi, but with one carry-propagate
// stage instead of two. A ternary carry-save adder (one fa3 per digit, adding
// a_lo + a_hi + a_hi) reduces the three operands to a sum vector S and a carry
// vector c (each carry 0..2). The carry vector is shifted up one digit; its top
// carry c[N-1] has weight 3^n = 2 (mod 3^n-2), so it is fed back twice: once
// into the empty digit 0 of the shifted carry vector and once as the carry-in
// of the final reducer. The final reducer (red_3n_2) is three parallel N-digit
// adders (+4, +2, +0 on top of that carry-in) and a three-way multiplexer.
// Combinational; delay t_FA3 + N * t_FA3 + t_MUX.
// The carry-save front end feeding +4/+2/+0 adders follows the published
// design; the exact wrap-around of the top carry and the multiplexer select
// are this design's own, chosen so the result is exact for every input.
module conv_3n_2_par
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a_lo,
  input  trit_t [N-1:0] a_hi,
  output trit_t [N-1:0] r
);
  trit_t [N-1:0] csa_s;
  logic  [2:0]   csa_c [N];
  trit_t [N-1:0] csa_c_shifted;

  for (genvar i = 0; i < N; i++) begin : g_csa
    fa3 u_cell (
      .a   (a_lo[i]),
      .b   (a_hi[i]),
      .cin (3'(a_hi[i])),
      .s   (csa_s[i]),
      .cout(csa_c[i])
    );
  end

  // Each cell sums at most 6, so every carry fits in a trit.
  always_comb begin
    csa_c_shifted[0] = trit_t'(csa_c[N-1]);
    for (int i = 1; i < N; i++) csa_c_shifted[i] = trit_t'(csa_c[i-1]);
  end

  red_3n_2 #(.N(N)) u_reduce (
    .a  (csa_s),
    .b  (csa_c_shifted),
    .cin(trit_t'(csa_c[N-1])),
    .r  (r)
  );
endmodule
