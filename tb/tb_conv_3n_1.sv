// tb_conv_3n_1: self-checking testbench for conv_3n_1, the TVL-to-RNS converter of the
// 3^n-1 channel for 2N-digit numbers. Every 2N-digit number is applied at
// N = 3 (729 values) and at N = 2; 2000 random ones at N = 5. The residue is
// compared with (a_hi * 3^n + a_lo) mod (3^n - 1) computed on integers, and
// must be a legal, fully reduced residue. The converter is combinational; a
// clock paces the stimulus and drives the watchdog.
module tb_conv_3n_1;
  import tvl_pkg::*;

  localparam int unsigned NA = 3;
  localparam int unsigned NB = 5;
  localparam int unsigned NC = 2;

  logic clk = 1'b0;
  int unsigned cycles = 0;
  int checks = 0, failures = 0;

  trit_t [NA-1:0] lo_a, hi_a, r_a;
  trit_t [NB-1:0] lo_b, hi_b, r_b;
  trit_t [NC-1:0] lo_c, hi_c, r_c;

  conv_3n_1 #(.N(NA)) dut_a (.a_lo(lo_a), .a_hi(hi_a), .r(r_a));
  conv_3n_1 #(.N(NB)) dut_b (.a_lo(lo_b), .a_hi(hi_b), .r(r_b));
  conv_3n_1 #(.N(NC)) dut_c (.a_lo(lo_c), .a_hi(hi_c), .r(r_c));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare one result against the integer reference.
  task automatic judge(input int unsigned n, input longint unsigned value,
                       input logic [2*MAX_DIGITS-1:0] r);
    longint unsigned m = pow3(n) - 1;
    longint unsigned got = trits_to_int(r, n);
    longint unsigned exp = value % m;
    checks++;
    if (got != exp || !trits_valid(r, n)) begin
      failures++;
      if (failures < 10) $display("N=%0d: value %0d gave %0d, expected %0d", n, value, got, exp);
    end
  endtask

  initial begin
    lo_a = '0; hi_a = '0; lo_b = '0; hi_b = '0; lo_c = '0; hi_c = '0;
    for (longint unsigned v = 0; v < pow3(2 * NA); v++) begin
      lo_a = int_to_trits(v % pow3(NA), NA)[2*NA-1:0];
      hi_a = int_to_trits(v / pow3(NA), NA)[2*NA-1:0];
      if (v < pow3(2 * NC)) begin
        lo_c = int_to_trits(v % pow3(NC), NC)[2*NC-1:0];
        hi_c = int_to_trits(v / pow3(NC), NC)[2*NC-1:0];
      end
      @(posedge clk);
      judge(NA, v, 40'(r_a));
      if (v < pow3(2 * NC)) judge(NC, v, 40'(r_c));
    end
    for (int i = 0; i < 2002; i++) begin
      longint unsigned v;
      if (i == 0)      v = pow3(2 * NB) - 1;   // all digits 2
      else if (i == 1) v = pow3(NB) - 1;       // low half all 2
      else             v = ((longint'($urandom) << 20) ^ longint'($urandom)) % pow3(2 * NB);
      lo_b = int_to_trits(v % pow3(NB), NB)[2*NB-1:0];
      hi_b = int_to_trits(v / pow3(NB), NB)[2*NB-1:0];
      @(posedge clk);
      judge(NB, v, 40'(r_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
