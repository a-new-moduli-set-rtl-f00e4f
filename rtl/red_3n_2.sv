// red_3n_2: three-adder modular reducer for the 3^n-2 channel.
//
// r = (a + b + cin) mod (3^n - 2) for any N-digit a, b and cin in 0..2, as long
// as the sum V = a + b + cin does not exceed 2 * 3^n (always true here). Since
// 3^n = 2 (mod 3^n-2), subtracting one modulus equals adding 2 and dropping
// the 3^n carry; subtracting two moduli equals adding 4 and dropping 2 * 3^n.
// Three N-digit adders form V + 4, V + 2 and V in parallel (the constant enters
// as the carry into digit 0) and a three-way digit multiplexer picks:
//   V + 4 (low N digits) when that adder carries 2, i.e. V >= 2(3^n-2);
//   V + 2 (low N digits) when that adder carries 1 or more, i.e. V >= 3^n-2;
//   V otherwise.
// Used by both mod 3^n-2 converters. Combinational; N * t_FA3 plus a mux.
module red_3n_2
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  input  trit_t         cin,
  output trit_t [N-1:0] r
);
  trit_t [N-1:0] s0, s2, s4;
  logic  [2:0]   c0, c2, c4;

  tadd_n #(.N(N)) u_add0 (.a(a), .b(b), .cin(3'(cin)),        .s(s0), .cout(c0));
  tadd_n #(.N(N)) u_add2 (.a(a), .b(b), .cin(3'(cin) + 3'd2), .s(s2), .cout(c2));
  tadd_n #(.N(N)) u_add4 (.a(a), .b(b), .cin(3'(cin) + 3'd4), .s(s4), .cout(c4));

  // c0 is not used: the corrected adders' carries decide.
  always_comb begin
    if (c4 >= 3'd2)      r = s4;
    else if (c2 != 3'd0) r = s2;
    else                 r = s0;
  end
endmodule
