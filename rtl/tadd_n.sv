// tadd_n: the "n-digit adder" of the datapath figures, an N-digit ternary
// ripple-carry adder.
//
// s + 3^N * cout = a + b + cin. The digit cells (fa3) are chained from digit 0
// upwards; the carry into digit 0 is the adder's constant input `cin`, which may
// be 0..6 (a ternary adder naturally accepts a carry-in of 2, and the modular
// reducers of this design add constants 1, 2 or 4 there). cout is the carry out
// of the top digit: 0..2 whenever cin <= 4, up to 3 for larger cin. The adder is
// combinational with a worst-case delay of N cell delays (N * t_FA3); no
// carry-acceleration is used, matching the plain adders the delay comparison
// assumes.
module tadd_n
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  input  logic  [2:0]   cin,
  output trit_t [N-1:0] s,
  output logic  [2:0]   cout
);
  logic [2:0] c [N+1];

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_digit
    fa3 u_fa3 (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
