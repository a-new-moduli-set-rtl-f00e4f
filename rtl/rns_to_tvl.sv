// rns_to_tvl: reverse converter (three-channel Chinese Remainder Theorem) from
// residues in {3^n-2, 3^n-1, 3^n} to a 3N-digit ternary number.
//
//   X = < sum_i <x_i * N_i>_{m_i} * M_i >_M,  M = m1*m2*m3, M_i = M/m_i,
//   N_i = multiplicative inverse of M_i modulo m_i.
// For this moduli set M_1 = 3^2n - 3^n, M_2 = 3^2n - 2*3^n,
// M_3 = 3^2n - 3^(n+1) + 2, and the inverses have closed forms
// N_1 = (3^n-1)/2, N_2 = 3^n-2, N_3 = (3^n+1)/2 (because M_1 = 2, M_2 = -1 and
// M_3 = 2 modulo their own channel). For n = 3: M_i = 702, 675, 650 and
// N_i = 13, 25, 14.
//
// Everything is ternary arithmetic built from the N-digit adder:
//   1. each residue is multiplied by its constant N_i (shift and add,
//      tmul_const), giving at most 2N digits;
//   2. the product is reduced in its channel by the forward conversion
//      circuits (conv_3n_2_ser for 3^n-2, conv_3n_1 for 3^n-1, the low N
//      digits for 3^n, which is why that product is only N digits wide);
//   3. each reduced term is multiplied by its constant M_i (shift and add,
//      3N+1 digits; each product is below M);
//   4. the three products are summed by a ternary carry-save row (one fa3 per
//      digit) and a (3N+1)-digit adder: the sum is below 3M;
//   5. the sum modulo M: two adders add the complements 3^(3N+1) - M and
//      3^(3N+1) - 2M in parallel; their carries tell whether the sum reached M
//      or 2M, and a multiplexer picks the sum, sum - M or sum - 2M.
// Inputs must be legal residues (x_m2 < 3^n-2, x_m1 < 3^n-1); the output is
// X in 0 .. M-1. Combinational.
// The CRT formula, multiplication by a conventional multiplier followed by the
// conversion algorithm, shift-and-add scaling and reduction modulo M with the
// complement of M follow the published scheme, which gives no circuit detail;
// the structure of each step is this design's own.
module rns_to_tvl
  import tvl_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0]   x_m2,  // residue mod 3^n - 2
  input  trit_t [N-1:0]   x_m1,  // residue mod 3^n - 1
  input  trit_t [N-1:0]   x_m0,  // residue mod 3^n
  output trit_t [3*N-1:0] x
);
  localparam longint unsigned P    = pow3(N);
  localparam longint unsigned MOD2 = P - 2;
  localparam longint unsigned MOD1 = P - 1;
  localparam longint unsigned MOD0 = P;
  localparam longint unsigned M    = MOD2 * MOD1 * MOD0;
  localparam longint unsigned BIG_M2 = MOD1 * MOD0;   // M_1 in the CRT
  localparam longint unsigned BIG_M1 = MOD2 * MOD0;   // M_2
  localparam longint unsigned BIG_M0 = MOD2 * MOD1;   // M_3
  localparam longint unsigned INV_M2 = (P - 1) / 2;   // N_1
  localparam longint unsigned INV_M1 = P - 2;         // N_2
  localparam longint unsigned INV_M0 = (P + 1) / 2;   // N_3
  localparam int unsigned     NW   = 3 * N + 1;       // digits of the weighted sum

  // NW-digit ternary form of a constant.
  function automatic trit_t [NW-1:0] const_trits(input longint unsigned v);
    trit_t [NW-1:0] t;
    longint unsigned rem = v;
    for (int i = 0; i < int'(NW); i++) begin
      t[i] = trit_t'(rem % 3);
      rem  = rem / 3;
    end
    return t;
  endfunction

  localparam trit_t [NW-1:0] COMP_M  = const_trits(pow3(NW) - M);
  localparam trit_t [NW-1:0] COMP_2M = const_trits(pow3(NW) - 2 * M);

  // Steps 1 and 2: <x_i * N_i>_{m_i}.
  trit_t [2*N-1:0] prod2, prod1;
  trit_t [N-1:0]   prod0;   // only its low N digits matter modulo 3^n
  trit_t [N-1:0]   term2, term1, term0;

  tmul_const #(.NI(N), .NO(2*N), .K(INV_M2)) u_mul_n2 (.x(x_m2), .p(prod2));
  tmul_const #(.NI(N), .NO(2*N), .K(INV_M1)) u_mul_n1 (.x(x_m1), .p(prod1));
  tmul_const #(.NI(N), .NO(N),   .K(INV_M0)) u_mul_n0 (.x(x_m0), .p(prod0));

  conv_3n_2_ser #(.N(N)) u_red2 (.a_lo(prod2[N-1:0]), .a_hi(prod2[2*N-1:N]), .r(term2));
  conv_3n_1     #(.N(N)) u_red1 (.a_lo(prod1[N-1:0]), .a_hi(prod1[2*N-1:N]), .r(term1));
  assign term0 = prod0;

  // Step 3: scale by M_i.
  trit_t [NW-1:0] w2, w1, w0;

  tmul_const #(.NI(N), .NO(NW), .K(BIG_M2)) u_mul_m2 (.x(term2), .p(w2));
  tmul_const #(.NI(N), .NO(NW), .K(BIG_M1)) u_mul_m1 (.x(term1), .p(w1));
  tmul_const #(.NI(N), .NO(NW), .K(BIG_M0)) u_mul_m0 (.x(term0), .p(w0));

  // Step 4: three-operand sum, carry-save row then carry-propagate adder.
  trit_t [NW-1:0] csa_s, csa_c_shifted, total;
  logic  [2:0]    csa_c [NW];
  logic  [2:0]    total_carry_unused;

  for (genvar i = 0; i < NW; i++) begin : g_csa
    fa3 u_cell (.a(w2[i]), .b(w1[i]), .cin(3'(w0[i])), .s(csa_s[i]), .cout(csa_c[i]));
  end

  // The top carry would have weight 3^NW; the sum is below 3M < 3^NW, so it
  // is always 0 and is dropped.
  always_comb begin
    csa_c_shifted[0] = '0;
    for (int i = 1; i < int'(NW); i++) csa_c_shifted[i] = trit_t'(csa_c[i-1]);
  end

  tadd_n #(.N(NW)) u_sum (
    .a(csa_s), .b(csa_c_shifted), .cin(3'd0), .s(total), .cout(total_carry_unused)
  );

  // Step 5: modulo M by adding complements.
  trit_t [NW-1:0] minus_m, minus_2m;
  logic  [2:0]    c_m, c_2m;

  tadd_n #(.N(NW)) u_sub_m  (.a(total), .b(COMP_M),  .cin(3'd0), .s(minus_m),  .cout(c_m));
  tadd_n #(.N(NW)) u_sub_2m (.a(total), .b(COMP_2M), .cin(3'd0), .s(minus_2m), .cout(c_2m));

  trit_t [NW-1:0] reduced;

  always_comb begin
    if (c_2m != 3'd0)     reduced = minus_2m;
    else if (c_m != 3'd0) reduced = minus_m;
    else                  reduced = total;
  end

  // The result is below M < 3^(3N): its top digit is always 0.
  assign x = reduced[3*N-1:0];
endmodule
