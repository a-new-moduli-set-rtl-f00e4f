// tb_tadd_n: self-checking testbench for tadd_n, the N-digit ternary
// ripple-carry adder. At N = 3 every operand pair is applied with every
// carry-in 0..6; at N = 6, 3000 random cases. s + 3^N * cout must equal
// a + b + cin computed on integers, and every sum digit must be a legal trit.
// Combinational block; a clock paces the stimulus and drives the watchdog.
module tb_tadd_n;
  import tvl_pkg::*;

  localparam int unsigned NA = 3;
  localparam int unsigned NB = 6;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [NA-1:0] a_a, b_a, s_a;
  trit_t [NB-1:0] a_b, b_b, s_b;
  logic [2:0] cin_a, cin_b, cout_a, cout_b;

  tadd_n #(.N(NA)) dut_a (.a(a_a), .b(b_a), .cin(cin_a), .s(s_a), .cout(cout_a));
  tadd_n #(.N(NB)) dut_b (.a(a_b), .b(b_b), .cin(cin_b), .s(s_b), .cout(cout_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(input int unsigned n, input longint unsigned exp,
                       input logic [2*MAX_DIGITS-1:0] s, input logic [2:0] cout);
    longint unsigned got = trits_to_int(s, n) + longint'(cout) * pow3(n);
    checks++;
    if (got != exp || !trits_valid(s, n)) begin
      failures++;
      if (failures < 10) $display("N=%0d: got %0d, expected %0d", n, got, exp);
    end
  endtask

  initial begin
    a_b = '0; b_b = '0; cin_b = '0;
    for (longint unsigned x = 0; x < pow3(NA); x++)
      for (longint unsigned y = 0; y < pow3(NA); y++)
        for (int c = 0; c <= 6; c++) begin
          a_a = int_to_trits(x, NA)[2*NA-1:0];
          b_a = int_to_trits(y, NA)[2*NA-1:0];
          cin_a = 3'(c);
          @(posedge clk);
          judge(NA, x + y + longint'(c), 40'(s_a), cout_a);
        end
    repeat (3000) begin
      longint unsigned x, y;
      int c;
      x = longint'($urandom) % pow3(NB);
      y = longint'($urandom) % pow3(NB);
      c = int'($urandom % 7);
      a_b = int_to_trits(x, NB)[2*NB-1:0];
      b_b = int_to_trits(y, NB)[2*NB-1:0];
      cin_b = 3'(c);
      @(posedge clk);
      judge(NB, x + y + longint'(c), 40'(s_b), cout_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
