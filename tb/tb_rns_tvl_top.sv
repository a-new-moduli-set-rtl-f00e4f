// tb_rns_tvl_top: end-to-end testbench for rns_tvl_top at its default size
// (N = 3, moduli {25, 26, 27}, M = 17550, 9-digit ternary operands).
//
// It first runs the published worked example, X = (1012121)_3 = 880 and
// Y = (0111021)_3 = 358, checking the residues of X, Y and Z digit by digit
// and Z = 1238. Then 20000 operand pairs (corners, then random 9-digit values,
// many of them above M) are applied. For each, all nine residues and
// Z = (X + Y) mod M are compared with integer arithmetic.
// It also counts how often each mechanism of the datapath is exercised:
// in each modular adder the corrected sum being selected (a + b >= m) and
// not; in the forward converters the three cases of a reduction stage (the last
// stage for 3^n-2, both stages for 3^n-1: no correction,
// one modulus subtracted, two moduli subtracted); in the reverse converter the
// weighted CRT sum needing no, one or two subtractions of M; and operands of
// M or more, which wrap. A mechanism that never occurs counts as a failure.
// The datapath is combinational; a clock paces the stimulus and the watchdog.
module tb_rns_tvl_top;
  import tvl_pkg::*;

  localparam int unsigned N = 3;
  localparam longint unsigned P  = pow3(N);
  localparam longint unsigned MD2 = P - 2, MD1 = P - 1, MD0 = P;
  localparam longint unsigned M  = MD2 * MD1 * MD0;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [3*N-1:0] x, y, z;
  trit_t [N-1:0] x_m2, x_m1, x_m0, y_m2, y_m1, y_m0, z_m2, z_m1, z_m0;

  // Mechanism counters.
  int add_corr [3], add_plain [3];     // per channel: 0 = 3^n-2, 1 = 3^n-1, 2 = 3^n
  int fwd_case_m2 [3], fwd_case_m1 [3];
  int crt_sub [3];
  int wrap_in;

  rns_tvl_top dut (
    .x(x), .y(y),
    .x_m2(x_m2), .x_m1(x_m1), .x_m0(x_m0),
    .y_m2(y_m2), .y_m1(y_m1), .y_m0(y_m0),
    .z_m2(z_m2), .z_m1(z_m1), .z_m0(z_m0),
    .z(z)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned modinv(input longint unsigned a, input longint unsigned m);
    for (longint unsigned k = 1; k < m; k++) if ((a * k) % m == 1) return k;
    return 0;
  endfunction

  // Record which cases the forward converters hit for operand v.
  task automatic note_forward(input longint unsigned v);
    longint unsigned a1 = v % P, a2 = (v / P) % P, a3 = v / (P * P);
    longint unsigned inner2 = (2 * a3 + a2) % MD2;
    longint unsigned inner1 = (a3 + a2) % MD1;
    longint unsigned s2 = a1 + 2 * inner2;   // value the outer mod 3^n-2 stage reduces
    longint unsigned s1 = a1 + inner1;       // value the outer mod 3^n-1 stage reduces
    fwd_case_m2[int'(s2 / MD2)]++;
    fwd_case_m1[int'(s1 / MD1)]++;
    fwd_case_m1[int'((a3 + a2) / MD1)]++;   // inner mod 3^n-1 stage
    if (v >= M) wrap_in++;
  endtask

  task automatic run(input longint unsigned xv, input longint unsigned yv);
    longint unsigned xr [3], yr [3], zr [3], mods [3], zv, crt;
    mods[0] = MD2; mods[1] = MD1; mods[2] = MD0;
    x = int_to_trits(xv, 3 * N)[6*N-1:0];
    y = int_to_trits(yv, 3 * N)[6*N-1:0];
    @(posedge clk);
    zv = (xv + yv) % M;
    crt = 0;
    for (int i = 0; i < 3; i++) begin
      xr[i] = xv % mods[i];
      yr[i] = yv % mods[i];
      zr[i] = (xr[i] + yr[i]) % mods[i];
      if (xr[i] + yr[i] >= mods[i]) add_corr[i]++; else add_plain[i]++;
      crt += ((zr[i] * modinv(M / mods[i], mods[i])) % mods[i]) * (M / mods[i]);
    end
    crt_sub[int'(crt / M)]++;
    note_forward(xv);
    note_forward(yv);
    checks++;
    if (trits_to_int(40'(x_m2), N) != xr[0] || trits_to_int(40'(x_m1), N) != xr[1] ||
        trits_to_int(40'(x_m0), N) != xr[2] || trits_to_int(40'(y_m2), N) != yr[0] ||
        trits_to_int(40'(y_m1), N) != yr[1] || trits_to_int(40'(y_m0), N) != yr[2] ||
        trits_to_int(40'(z_m2), N) != zr[0] || trits_to_int(40'(z_m1), N) != zr[1] ||
        trits_to_int(40'(z_m0), N) != zr[2] || trits_to_int(40'(z), 3 * N) != zv ||
        !trits_valid(40'(z), 3 * N)) begin
      failures++;
      if (failures < 10)
        $display("X=%0d Y=%0d: Z=%0d (expected %0d), z residues (%0d,%0d,%0d)", xv, yv,
                 trits_to_int(40'(z), 3 * N), zv, trits_to_int(40'(z_m2), N),
                 trits_to_int(40'(z_m1), N), trits_to_int(40'(z_m0), N));
    end
  endtask

  task automatic expect_mechanism(input string name, input int count);
    $display("  %-40s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    foreach (add_corr[i]) begin
      add_corr[i] = 0; add_plain[i] = 0; fwd_case_m2[i] = 0; fwd_case_m1[i] = 0; crt_sub[i] = 0;
    end
    wrap_in = 0;

    // Worked example: 880 + 358 = 1238.
    run(880, 358);
    checks++;
    if (x_m2 != {2'd0, 2'd1, 2'd2} || x_m1 != {2'd2, 2'd1, 2'd1} || x_m0 != {2'd1, 2'd2, 2'd1} ||
        y_m2 != {2'd0, 2'd2, 2'd2} || y_m1 != {2'd2, 2'd0, 2'd2} || y_m0 != {2'd0, 2'd2, 2'd1} ||
        z_m2 != {2'd1, 2'd1, 2'd1} || z_m1 != {2'd1, 2'd2, 2'd1} || z_m0 != {2'd2, 2'd1, 2'd2} ||
        trits_to_int(40'(z), 3 * N) != 1238) begin
      failures++;
      $display("worked example 880 + 358 does not reproduce the published digits");
    end

    // Corners.
    run(0, 0);
    run(M - 1, M - 1);
    run(M - 1, 1);
    run(pow3(3 * N) - 1, pow3(3 * N) - 1);
    run(MD2 - 1, MD2 - 1);
    // Random operands over the whole 3N-digit range.
    repeat (20000) run(longint'($urandom) % pow3(3 * N), longint'($urandom) % pow3(3 * N));

    $display("mechanism counts:");
    expect_mechanism("adder 3^n-2: corrected sum selected", add_corr[0]);
    expect_mechanism("adder 3^n-2: plain sum selected", add_plain[0]);
    expect_mechanism("adder 3^n-1: corrected sum selected", add_corr[1]);
    expect_mechanism("adder 3^n-1: plain sum selected", add_plain[1]);
    expect_mechanism("adder 3^n: carry dropped", add_corr[2]);
    expect_mechanism("adder 3^n: no carry", add_plain[2]);
    expect_mechanism("converter 3^n-2: no correction", fwd_case_m2[0]);
    expect_mechanism("converter 3^n-2: one modulus removed", fwd_case_m2[1]);
    expect_mechanism("converter 3^n-2: two moduli removed", fwd_case_m2[2]);
    expect_mechanism("converter 3^n-1: no correction", fwd_case_m1[0]);
    expect_mechanism("converter 3^n-1: one modulus removed", fwd_case_m1[1]);
    expect_mechanism("converter 3^n-1: two moduli removed", fwd_case_m1[2]);
    expect_mechanism("CRT: sum below M", crt_sub[0]);
    expect_mechanism("CRT: M subtracted", crt_sub[1]);
    expect_mechanism("CRT: 2M subtracted", crt_sub[2]);
    expect_mechanism("operand of M or more (wraps)", wrap_in);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
