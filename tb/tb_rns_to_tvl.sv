// tb_rns_to_tvl: self-checking testbench for rns_to_tvl, the three-channel
// Chinese Remainder Theorem converter. For every X in 0 .. M-1 at N = 3
// (M = 25*26*27 = 17550) and at N = 2 (M = 504), the residues of X are applied
// and the 3N-digit ternary output must equal X; 2000 random X at N = 4.
// The published worked example, residues (111, 121, 212) -> 1238, is checked
// first. Combinational block; a clock paces the stimulus and the watchdog.
module tb_rns_to_tvl;
  import tvl_pkg::*;

  localparam int unsigned NA = 3;
  localparam int unsigned NB = 4;
  localparam int unsigned NC = 2;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [NA-1:0] a2, a1, a0;
  trit_t [NB-1:0] b2, b1, b0;
  trit_t [NC-1:0] c2, c1, c0;
  trit_t [3*NA-1:0] x_a;
  trit_t [3*NB-1:0] x_b;
  trit_t [3*NC-1:0] x_c;

  rns_to_tvl #(.N(NA)) dut_a (.x_m2(a2), .x_m1(a1), .x_m0(a0), .x(x_a));
  rns_to_tvl #(.N(NB)) dut_b (.x_m2(b2), .x_m1(b1), .x_m0(b0), .x(x_b));
  rns_to_tvl #(.N(NC)) dut_c (.x_m2(c2), .x_m1(c1), .x_m0(c0), .x(x_c));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned modulus_product(input int unsigned n);
    return (pow3(n) - 2) * (pow3(n) - 1) * pow3(n);
  endfunction

  task automatic judge(input int unsigned n, input longint unsigned v,
                       input logic [2*MAX_DIGITS-1:0] x);
    checks++;
    if (trits_to_int(x, 3 * n) != v || !trits_valid(x, 3 * n)) begin
      failures++;
      if (failures < 10) $display("N=%0d: X=%0d came back as %0d", n, v, trits_to_int(x, 3 * n));
    end
  endtask

  initial begin
    b2 = '0; b1 = '0; b0 = '0; c2 = '0; c1 = '0; c0 = '0;
    // Worked example: (111, 121, 212) = (13, 16, 23) -> 1238.
    a2 = {2'd1, 2'd1, 2'd1};
    a1 = {2'd1, 2'd2, 2'd1};
    a0 = {2'd2, 2'd1, 2'd2};
    @(posedge clk);
    judge(NA, 1238, 40'(x_a));
    for (longint unsigned v = 0; v < modulus_product(NA); v++) begin
      a2 = int_to_trits(v % (pow3(NA) - 2), NA)[2*NA-1:0];
      a1 = int_to_trits(v % (pow3(NA) - 1), NA)[2*NA-1:0];
      a0 = int_to_trits(v % pow3(NA), NA)[2*NA-1:0];
      if (v < modulus_product(NC)) begin
        c2 = int_to_trits(v % (pow3(NC) - 2), NC)[2*NC-1:0];
        c1 = int_to_trits(v % (pow3(NC) - 1), NC)[2*NC-1:0];
        c0 = int_to_trits(v % pow3(NC), NC)[2*NC-1:0];
      end
      @(posedge clk);
      judge(NA, v, 40'(x_a));
      if (v < modulus_product(NC)) judge(NC, v, 40'(x_c));
    end
    for (int i = 0; i < 2000; i++) begin
      longint unsigned v;
      v = (i == 0) ? modulus_product(NB) - 1 : longint'($urandom) % modulus_product(NB);
      b2 = int_to_trits(v % (pow3(NB) - 2), NB)[2*NB-1:0];
      b1 = int_to_trits(v % (pow3(NB) - 1), NB)[2*NB-1:0];
      b0 = int_to_trits(v % pow3(NB), NB)[2*NB-1:0];
      @(posedge clk);
      judge(NB, v, 40'(x_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
