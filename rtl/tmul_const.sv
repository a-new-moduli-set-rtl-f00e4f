// tmul_const: multiplies an NI-trit ternary number by a constant K, by shift
// and add.
//
// p = x * K, truncated to NO trits (the caller sizes NO so nothing is lost).
// For every ternary digit d_j of K, the shifted operand x * 3^j is added d_j
// times (0, 1 or 2), so the multiplier is a chain of NO-digit ternary adders
// (tadd_n), one per unit of K's digit sum, with no adder where a digit is 0.
// A shift by j digits is only wiring. Combinational.
module tmul_const
  import tvl_pkg::*;
#(
  parameter int unsigned     NI = 3,
  parameter int unsigned     NO = 6,
  parameter longint unsigned K  = 13
) (
  input  trit_t [NI-1:0] x,
  output trit_t [NO-1:0] p
);
  // Number of ternary digits of K that can matter for an NO-digit product.
  localparam int unsigned KD = NO;

  function automatic int unsigned k_digit(input int unsigned j);
    return int'((K / pow3(j)) % 3);
  endfunction

  // acc[2*j + u] is the running sum before the u-th addition of x * 3^j.
  trit_t [NO-1:0] acc [2*KD+1];

  assign acc[0] = '0;

  for (genvar j = 0; j < KD; j++) begin : g_digit
    trit_t [NO-1:0] shifted;

    always_comb begin
      shifted = '0;
      for (int i = 0; i < int'(NI); i++)
        if (i + j < int'(NO)) shifted[i+j] = x[i];
    end

    for (genvar u = 0; u < 2; u++) begin : g_unit
      if (u < k_digit(j)) begin : g_add
        logic [2:0] carry_unused;
        tadd_n #(.N(NO)) u_add (
          .a(acc[2*j+u]), .b(shifted), .cin(3'd0), .s(acc[2*j+u+1]), .cout(carry_unused)
        );
      end else begin : g_skip
        assign acc[2*j+u+1] = acc[2*j+u];
      end
    end
  end

  assign p = acc[2*KD];
endmodule
