// tb_fa3: self-checking testbench for fa3, the ternary full-adder cell.
// Applies every combination of two trits and a carry-in 0..6 and checks
// a + b + cin = 3 * cout + s with s a legal trit. Combinational cell; a clock
// paces the stimulus and drives the watchdog.
module tb_fa3;
  import tvl_pkg::*;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t a, b, s;
  logic [2:0] cin, cout;

  fa3 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 3; x++)
      for (int y = 0; y < 3; y++)
        for (int c = 0; c <= 6; c++) begin
          a = trit_t'(x);
          b = trit_t'(y);
          cin = 3'(c);
          @(posedge clk);
          checks++;
          if (s == 2'b11 || int'(s) + 3 * int'(cout) != x + y + c) begin
            failures++;
            $display("%0d + %0d + %0d gave sum %0d carry %0d", x, y, c, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
