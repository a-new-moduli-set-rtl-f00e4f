// rns_add_3n: modular adder of the 3^n channel, (a + b) mod 3^n.
//
// A single N-digit ternary adder; the carry out of the top digit has weight
// 3^n, a multiple of the modulus, so it is simply dropped. Operands and result
// are N-trit residues (0 .. 3^n-1). Combinational, delay N * t_FA3.
// Structure as drawn for this channel; the trit encoding is this design's own.
module rns_add_3n
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  output trit_t [N-1:0] s
);
  logic [2:0] carry_unused;

  tadd_n #(.N(N)) u_add (
    .a   (a),
    .b   (b),
    .cin (3'd0),
    .s   (s),
    .cout(carry_unused)
  );
endmodule
