// fa3: ternary full-adder cell, the unit whose delay t_FA3 the delay figures of
// this design are counted in.
//
// Adds two ternary digits and an incoming carry: a + b + cin = 3*cout + s. The
// operands are trits (0..2). A carry between digit cells of a ripple adder never
// exceeds 2, a trit; the carry port is three bits wide because the cell in digit
// position 0 of an adder also receives the adder's constant input, which in this
// design can be up to 6 (for example the "+4" adders of the mod 3^n-2 converters).
// With cin <= 6 the sum is at most 10 and cout at most 3. Purely combinational.
module fa3
  import tvl_pkg::*;
(
  input  trit_t       a,
  input  trit_t       b,
  input  logic  [2:0] cin,   // 0..6
  output trit_t       s,
  output logic  [2:0] cout   // 0..3
);
  logic [3:0] total;

  always_comb begin
    total = 4'(a) + 4'(b) + 4'(cin);
    s     = trit_t'(total % 4'd3);
    cout  = 3'(total / 4'd3);
  end
endmodule
