// tvl_pkg: shared types and helpers for the ternary-valued-logic (TVL) residue
// number system datapath.
//
// Every ternary digit ("trit") is carried on two wires in binary-coded ternary:
// 2'b00 = 0, 2'b01 = 1, 2'b10 = 2; 2'b11 never occurs on a legal net. An n-digit
// ternary number is a packed array of trits, index 0 being the least significant
// digit (weight 3^0). The encoding is a choice of this implementation: the
// arithmetic is described for genuinely three-level circuits, which a two-valued
// HDL can only emulate.
//
// pow3 sizes the constants of the reverse converter. The other functions convert
// between trit vectors and integers; only the testbenches use them, to build
// reference values independently of the datapath.
package tvl_pkg;

  typedef logic [1:0] trit_t;

  // Largest digit count the helper functions handle (3^20 fits in 32 bits).
  localparam int unsigned MAX_DIGITS = 20;

  // 3^k as an integer.
  function automatic longint unsigned pow3(input int unsigned k);
    longint unsigned r = 1;
    for (int unsigned i = 0; i < k; i++) r = r * 3;
    return r;
  endfunction

  // Value of the low `nd` trits of a vector (at most MAX_DIGITS trits).
  function automatic longint unsigned trits_to_int(input logic [2*MAX_DIGITS-1:0] v,
                                                   input int unsigned nd);
    longint unsigned r = 0;
    for (int i = int'(nd) - 1; i >= 0; i--) r = r * 3 + longint'(v[2*i +: 2]);
    return r;
  endfunction

  // Low `nd` ternary digits of an integer, packed as trits.
  function automatic logic [2*MAX_DIGITS-1:0] int_to_trits(input longint unsigned x,
                                                          input int unsigned nd);
    logic [2*MAX_DIGITS-1:0] r = '0;
    longint unsigned t = x;
    for (int unsigned i = 0; i < nd; i++) begin
      r[2*i +: 2] = trit_t'(t % 3);
      t = t / 3;
    end
    return r;
  endfunction

  // True when every one of the low `nd` trits is a legal code (not 2'b11).
  function automatic bit trits_valid(input logic [2*MAX_DIGITS-1:0] v, input int unsigned nd);
    for (int unsigned i = 0; i < nd; i++) if (v[2*i +: 2] == 2'b11) return 1'b0;
    return 1'b1;
  endfunction

endpackage
