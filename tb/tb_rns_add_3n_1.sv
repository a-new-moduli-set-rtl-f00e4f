// tb_rns_add_3n_1: self-checking testbench for rns_add_3n_1, the modular adder of the
// 3^n-1 channel. All residue pairs are applied at N = 3 (modulus 26), and
// 2000 random pairs at N = 5; each sum is compared with (a + b) mod (3^n - 1)
// computed on integers. The adder is combinational: a clock only paces the
// stimulus and drives the watchdog.
module tb_rns_add_3n_1;
  import tvl_pkg::*;

  localparam int unsigned NA = 3;
  localparam int unsigned NB = 5;
  localparam longint unsigned MA = pow3(NA) - 1;
  localparam longint unsigned MB = pow3(NB) - 1;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [NA-1:0] a_a, b_a, s_a;
  trit_t [NB-1:0] a_b, b_b, s_b;

  rns_add_3n_1 #(.N(NA)) dut_a (.a(a_a), .b(b_a), .s(s_a));
  rns_add_3n_1 #(.N(NB)) dut_b (.a(a_b), .b(b_b), .s(s_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_a(input longint unsigned x, input longint unsigned y);
    longint unsigned got, exp;
    a_a = int_to_trits(x, NA)[2*NA-1:0];
    b_a = int_to_trits(y, NA)[2*NA-1:0];
    @(posedge clk);
    got = trits_to_int(40'(s_a), NA);
    exp = (x + y) % MA;
    checks++;
    if (got != exp || !trits_valid(40'(s_a), NA)) begin
      failures++;
      if (failures < 10) $display("N=%0d: %0d + %0d gave %0d, expected %0d", NA, x, y, got, exp);
    end
  endtask

  task automatic check_b(input longint unsigned x, input longint unsigned y);
    longint unsigned got, exp;
    a_b = int_to_trits(x, NB)[2*NB-1:0];
    b_b = int_to_trits(y, NB)[2*NB-1:0];
    @(posedge clk);
    got = trits_to_int(40'(s_b), NB);
    exp = (x + y) % MB;
    checks++;
    if (got != exp || !trits_valid(40'(s_b), NB)) begin
      failures++;
      if (failures < 10) $display("N=%0d: %0d + %0d gave %0d, expected %0d", NB, x, y, got, exp);
    end
  endtask

  initial begin
    a_b = '0; b_b = '0;
    for (longint unsigned x = 0; x < MA; x++)
      for (longint unsigned y = 0; y < MA; y++) check_a(x, y);
    // Corner values of the larger instance, then random ones.
    check_b(MB - 1, MB - 1);
    check_b(MB - 1, 1);
    check_b(0, 0);
    repeat (2000) check_b(longint'($urandom) % MB, longint'($urandom) % MB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
