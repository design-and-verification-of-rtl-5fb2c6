// Self-checking testbench for wallace_stage2.
//
// Runs all 2^11 values of the eleven input bits. For each of the four adders
// it checks that sum + 2*carry equals the number of ones among that column's
// inputs (S02,C01 / S03,C02,P30 / S04,C03,P31 / P23,C04,P32), and that the
// stage keeps the weighted value of its inputs. Ends with one TB_RESULT line.
module tb_wallace_stage2;
  import wallace_pkg::*;

  logic [4:2] s1;
  logic [4:1] c1;
  logic       p23;
  logic [2:0] r3;
  csa_row_t   st2;
  int         checks = 0, failures = 0;

  wallace_stage2 dut (.s1(s1), .c1(c1), .p23(p23), .r3(r3), .st2(st2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(int k, int ones);
    checks++;
    if (int'(st2.s[k]) + 2 * int'(st2.c[k]) != ones) begin
      failures++;
      $display("FAIL s1=%b c1=%b p23=%b r3=%b adder %0d: s=%b c=%b, %0d ones",
               s1, c1, p23, r3, k, st2.s[k], st2.c[k], ones);
    end
  endtask

  initial begin
    for (int v = 0; v < 2048; v++) begin
      int in_val, out_val;
      {r3, p23, c1, s1} = 11'(v);
      #1;
      check_col(1, int'(s1[2]) + int'(c1[1]));
      check_col(2, int'(s1[3]) + int'(c1[2]) + int'(r3[0]));
      check_col(3, int'(s1[4]) + int'(c1[3]) + int'(r3[1]));
      check_col(4, int'(p23)   + int'(c1[4]) + int'(r3[2]));
      // s1[k] has weight 2^k, c1[k] 2^(k+1), p23 2^5, r3[j] 2^(j+3).
      in_val = (int'(s1) << 2) + (int'(c1) << 2) + (int'(p23) << 5) + (int'(r3) << 3);
      out_val = 0;
      for (int k = 1; k <= 4; k++)
        out_val += (int'(st2.s[k]) << (k + 1)) + (int'(st2.c[k]) << (k + 2));
      checks++;
      if (in_val != out_val) begin
        failures++;
        $display("FAIL s1=%b c1=%b p23=%b r3=%b: value %0d became %0d",
                 s1, c1, p23, r3, in_val, out_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
