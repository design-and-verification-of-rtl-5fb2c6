// Self-checking testbench for wallace_pp_gen.
//
// Runs all 256 operand pairs. For each it checks every one of the 16
// partial product bits against b[i] && a[j], and checks that the partial
// products, each weighted by 2^(i+j), add up to a * b. Ends with one
// TB_RESULT line.
module tb_wallace_pp_gen;
  import wallace_pkg::*;

  operand_t a, b;
  pp_t      pp;
  int       checks = 0, failures = 0;

  wallace_pp_gen dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 16; av++) begin
      for (int bv = 0; bv < 16; bv++) begin
        int weighted;
        a = operand_t'(av);
        b = operand_t'(bv);
        #1;
        weighted = 0;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (pp[i][j] !== (b[i] && a[j])) begin
              failures++;
              $display("FAIL a=%0d b=%0d: P%0d%0d=%b", av, bv, i, j, pp[i][j]);
            end
            weighted += int'(pp[i][j]) << (i + j);
          end
        end
        checks++;
        if (weighted != av * bv) begin
          failures++;
          $display("FAIL a=%0d b=%0d: weighted sum %0d", av, bv, weighted);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
