// conv_3n_1: TVL-to-RNS converter for the 3^n-1 channel.
//
// Takes a 2N-digit ternary number split into its low half a_lo (digits 0..N-1)
// and high half a_hi (digits N..2N-1) and returns its residue modulo 3^n-1.
// Because 3^n = 1 (mod 3^n-1) the residue is that of the plain sum
// S = a_lo + a_hi, which lies in 0 .. 2(3^n-1). Three N-digit adders form
// S + 2, S + 1 and S in parallel, and a three-way digit multiplexer picks:
//   S + 2 (low N digits) when that adder carries 2, i.e. S = 2(3^n-1);
//   S + 1 (low N digits) when that adder carries 1, i.e. S >= 3^n-1;
//   S otherwise.
// The result is always fully reduced (0 .. 3^n-2). Combinational; delay
// N * t_FA3 plus the multiplexer. The three-adder structure follows the
// published design; deriving the select from the carries of both corrected
// adders is this design's choice (a lone carry does not separate all cases).
// Chaining two of these (Horner's rule) converts numbers of more digits.
module conv_3n_1
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a_lo,
  input  trit_t [N-1:0] a_hi,
  output trit_t [N-1:0] r
);
  trit_t [N-1:0] s0, s1, s2;
  logic  [2:0]   c0, c1, c2;

  tadd_n #(.N(N)) u_add0 (.a(a_lo), .b(a_hi), .cin(3'd0), .s(s0), .cout(c0));
  tadd_n #(.N(N)) u_add1 (.a(a_lo), .b(a_hi), .cin(3'd1), .s(s1), .cout(c1));
  tadd_n #(.N(N)) u_add2 (.a(a_lo), .b(a_hi), .cin(3'd2), .s(s2), .cout(c2));

  // c0 is not used: the corrected adders' carries decide.
  always_comb begin
    if (c2 == 3'd2)      r = s2;
    else if (c1 != 3'd0) r = s1;
    else                 r = s0;
  end
endmodule
