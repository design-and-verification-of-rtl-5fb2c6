// Self-checking testbench for half_adder.
//
// Applies all four input pairs and compares sum and cout with the half
// adder truth table, written out below as constants (not computed with the
// + operator the block might share). Ends with one TB_RESULT line.
module tb_half_adder;

  logic a, b, sum, cout;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  // Truth table rows {a, b, sum, cout}.
  localparam logic [3:0] TABLE [4] = '{4'b00_00, 4'b11_01, 4'b10_10, 4'b01_10};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[r]) begin
      {a, b} = TABLE[r][3:2];
      #1;
      checks++;
      if ({sum, cout} !== TABLE[r][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b: sum=%b cout=%b, expected %b", a, b, sum, cout, TABLE[r][1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
