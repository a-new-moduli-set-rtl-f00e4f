// tb_tmul_const: self-checking testbench for tmul_const, the ternary
// multiplier by a constant. Uses the constants of the default-size reverse
// converter (N_i = 13, 25, 14 into 6 digits; M_i = 702, 675, 650 into 10
// digits) and a larger case (N = 4, K = 3^8 - 3^4 = 6480 into 13 digits).
// Every 3-digit operand is applied (all 4-digit ones for the larger case) and
// the product is compared with integer multiplication. Combinational block; a
// clock paces the stimulus and drives the watchdog.
module tb_tmul_const;
  import tvl_pkg::*;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [2:0] x3;
  trit_t [3:0] x4;
  trit_t [5:0] p13, p25, p14;
  trit_t [9:0] p702, p675, p650;
  trit_t [12:0] p6480;

  tmul_const #(.NI(3), .NO(6),  .K(13))   dut_13   (.x(x3), .p(p13));
  tmul_const #(.NI(3), .NO(6),  .K(25))   dut_25   (.x(x3), .p(p25));
  tmul_const #(.NI(3), .NO(6),  .K(14))   dut_14   (.x(x3), .p(p14));
  tmul_const #(.NI(3), .NO(10), .K(702))  dut_702  (.x(x3), .p(p702));
  tmul_const #(.NI(3), .NO(10), .K(675))  dut_675  (.x(x3), .p(p675));
  tmul_const #(.NI(3), .NO(10), .K(650))  dut_650  (.x(x3), .p(p650));
  tmul_const #(.NI(4), .NO(13), .K(6480)) dut_6480 (.x(x4), .p(p6480));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(input longint unsigned got, input longint unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (longint unsigned v = 0; v < 81; v++) begin
      x3 = int_to_trits(v % 27, 3)[5:0];
      x4 = int_to_trits(v, 4)[7:0];
      @(posedge clk);
      if (v < 27) begin
        judge(trits_to_int(40'(p13), 6), v * 13, "x*13");
        judge(trits_to_int(40'(p25), 6), v * 25, "x*25");
        judge(trits_to_int(40'(p14), 6), v * 14, "x*14");
        judge(trits_to_int(40'(p702), 10), v * 702, "x*702");
        judge(trits_to_int(40'(p675), 10), v * 675, "x*675");
        judge(trits_to_int(40'(p650), 10), v * 650, "x*650");
      end
      judge(trits_to_int(40'(p6480), 13), v * 6480, "x*6480");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
