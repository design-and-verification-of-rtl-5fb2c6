// End-to-end testbench for wallace_tree_4x4, at its (only) size.
//
// 1. Replays eight directed vectors with their expected products written
//    out as constants: 14*13=182, 10*5=50, 3*15=45, 2*9=18, 6*5=30,
//    7*13=91, 3*12=36, 10*14=140, holding each for 50 ns.
// 2. Runs all 256 operand pairs and compares out with a*b.
// 3. Counts how often each mechanism of the tree occurred and fails for one
//    that never did: a carry out of each of the 12 adders (C01..C04,
//    C11..C14, C21..C23, Cout), and a carry that ripples through the whole
//    final stage (generated in its first cell, propagated by the other three).
// The multiplier is combinational; each vector is sampled 1 ns after it is
// applied. Ends with one TB_RESULT line.
module tb_wallace_tree_4x4;
  import wallace_pkg::*;

  operand_t a, b;
  product_t out;
  int       checks = 0, failures = 0;

  wallace_tree_4x4 dut (.a(a), .b(b), .out(out));

  typedef struct packed {
    logic [3:0] a;
    logic [3:0] b;
    logic [7:0] p;
  } vec_t;

  localparam vec_t DIRECTED [8] = '{
    '{4'd14, 4'd13, 8'd182}, '{4'd10, 4'd5,  8'd50},
    '{4'd3,  4'd15, 8'd45},  '{4'd2,  4'd9,  8'd18},
    '{4'd6,  4'd5,  8'd30},  '{4'd7,  4'd13, 8'd91},
    '{4'd3,  4'd12, 8'd36},  '{4'd10, 4'd14, 8'd140}
  };

  int carry_seen [12];     // C01..C04, C11..C14, C21..C23, Cout
  int full_ripple = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [3:0] av, logic [3:0] bv, int expected);
    a = av;
    b = bv;
    #1;
    checks++;
    if (int'(out) != expected) begin
      failures++;
      $display("FAIL %0d * %0d: out=%0d, expected %0d", av, bv, out, expected);
    end
    for (int k = 1; k <= 4; k++) begin
      if (dut.st1.c[k]) carry_seen[k - 1]++;
      if (dut.st2.c[k]) carry_seen[k + 3]++;
    end
    for (int k = 1; k <= 3; k++)
      if (dut.u_st3.c[k]) carry_seen[k + 7]++;
    if (out[7]) carry_seen[11]++;
    if (dut.u_st3.c[1] && dut.u_st3.c[2] && dut.u_st3.c[3] && out[7]) full_ripple++;
  endtask

  initial begin
    foreach (DIRECTED[i]) begin
      apply(DIRECTED[i].a, DIRECTED[i].b, int'(DIRECTED[i].p));
      #49;
    end
    for (int av = 0; av < 16; av++)
      for (int bv = 0; bv < 16; bv++)
        apply(4'(av), 4'(bv), av * bv);

    foreach (carry_seen[k]) begin
      checks++;
      if (carry_seen[k] == 0) begin
        failures++;
        $display("FAIL carry %0d of the tree never occurred", k);
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no carry rippled through the whole final stage");
    end
    $display("carries seen (C01..C04 C11..C14 C21..C23 Cout): %p", carry_seen);
    $display("full ripples through the final stage: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
