// Self-checking testbench for wallace_stage1.
//
// Runs all 2^10 values of the ten input bits. For each of the four adders it
// checks that sum + 2*carry equals the number of ones among that column's
// inputs (P10,P01 / P20,P11,P02 / P21,P12,P03 / P22,P13), and that the stage
// as a whole keeps the weighted value of its inputs. Ends with one TB_RESULT
// line.
module tb_wallace_stage1;
  import wallace_pkg::*;

  logic [3:1] r0;
  logic [3:0] r1;
  logic [2:0] r2;
  csa_row_t   st1;
  int         checks = 0, failures = 0;

  wallace_stage1 dut (.r0(r0), .r1(r1), .r2(r2), .st1(st1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_col(int k, int ones);
    checks++;
    if (int'(st1.s[k]) + 2 * int'(st1.c[k]) != ones) begin
      failures++;
      $display("FAIL r0=%b r1=%b r2=%b column %0d: s=%b c=%b, %0d ones",
               r0, r1, r2, k, st1.s[k], st1.c[k], ones);
    end
  endtask

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int in_val, out_val;
      {r2, r1, r0} = 10'(v);
      #1;
      check_col(1, int'(r1[0]) + int'(r0[1]));
      check_col(2, int'(r2[0]) + int'(r1[1]) + int'(r0[2]));
      check_col(3, int'(r2[1]) + int'(r1[2]) + int'(r0[3]));
      check_col(4, int'(r2[2]) + int'(r1[3]));
      in_val  = (int'(r0) << 1) + (int'(r1) << 1) + (int'(r2) << 2);
      out_val = 0;
      for (int k = 1; k <= 4; k++)
        out_val += (int'(st1.s[k]) << k) + (int'(st1.c[k]) << (k + 1));
      checks++;
      if (in_val != out_val) begin
        failures++;
        $display("FAIL r0=%b r1=%b r2=%b: value %0d became %0d", r0, r1, r2, in_val, out_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
