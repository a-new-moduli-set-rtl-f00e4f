// tb_tvl_to_rns: self-checking testbench for tvl_to_rns, the 3N-digit ternary
// to residue converter. Every 3N-digit input is applied at N = 3 (19683 values)
// and at N = 2 (729); 2000 random inputs at N = 4. The three residues are
// compared with X mod (3^n-2), X mod (3^n-1) and X mod 3^n computed on integers.
// The published worked example, (1012121)_3 -> (012, 211, 121), is checked
// first. Combinational block; a clock paces the stimulus and the watchdog.
module tb_tvl_to_rns;
  import tvl_pkg::*;

  localparam int unsigned NA = 3;
  localparam int unsigned NB = 4;
  localparam int unsigned NC = 2;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [3*NA-1:0] x_a;
  trit_t [3*NB-1:0] x_b;
  trit_t [3*NC-1:0] x_c;
  trit_t [NA-1:0] a2, a1, a0;
  trit_t [NB-1:0] b2, b1, b0;
  trit_t [NC-1:0] c2, c1, c0;

  tvl_to_rns #(.N(NA)) dut_a (.x(x_a), .r_m2(a2), .r_m1(a1), .r_m0(a0));
  tvl_to_rns #(.N(NB)) dut_b (.x(x_b), .r_m2(b2), .r_m1(b1), .r_m0(b0));
  tvl_to_rns #(.N(NC)) dut_c (.x(x_c), .r_m2(c2), .r_m1(c1), .r_m0(c0));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(input int unsigned n, input longint unsigned v,
                       input logic [2*MAX_DIGITS-1:0] r2, input logic [2*MAX_DIGITS-1:0] r1,
                       input logic [2*MAX_DIGITS-1:0] r0);
    longint unsigned p = pow3(n);
    checks++;
    if (trits_to_int(r2, n) != v % (p - 2) || trits_to_int(r1, n) != v % (p - 1) ||
        trits_to_int(r0, n) != v % p ||
        !trits_valid(r2, n) || !trits_valid(r1, n) || !trits_valid(r0, n)) begin
      failures++;
      if (failures < 10)
        $display("N=%0d X=%0d: got (%0d,%0d,%0d), expected (%0d,%0d,%0d)", n, v,
                 trits_to_int(r2, n), trits_to_int(r1, n), trits_to_int(r0, n),
                 v % (p - 2), v % (p - 1), v % p);
    end
  endtask

  initial begin
    x_b = '0; x_c = '0;
    // Worked example: X = (1012121)_3 = 880.
    x_a = int_to_trits(880, 3 * NA)[6*NA-1:0];
    @(posedge clk);
    checks++;
    if (a2 != {2'd0, 2'd1, 2'd2} || a1 != {2'd2, 2'd1, 2'd1} || a0 != {2'd1, 2'd2, 2'd1}) begin
      failures++;
      $display("worked example: residues do not match (012, 211, 121)");
    end
    for (longint unsigned v = 0; v < pow3(3 * NA); v++) begin
      x_a = int_to_trits(v, 3 * NA)[6*NA-1:0];
      if (v < pow3(3 * NC)) x_c = int_to_trits(v, 3 * NC)[6*NC-1:0];
      @(posedge clk);
      judge(NA, v, 40'(a2), 40'(a1), 40'(a0));
      if (v < pow3(3 * NC)) judge(NC, v, 40'(c2), 40'(c1), 40'(c0));
    end
    for (int i = 0; i < 2000; i++) begin
      longint unsigned v;
      v = (i == 0) ? pow3(3 * NB) - 1 : longint'($urandom) % pow3(3 * NB);
      x_b = int_to_trits(v, 3 * NB)[6*NB-1:0];
      @(posedge clk);
      judge(NB, v, 40'(b2), 40'(b1), 40'(b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
