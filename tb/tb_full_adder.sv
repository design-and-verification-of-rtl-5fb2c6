// Self-checking testbench for full_adder.
//
// Applies all eight input combinations and compares sum and cout with the
// full adder truth table, written out below as constants. Ends with one
// TB_RESULT line.
module tb_full_adder;

  logic a, b, cin, sum, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Truth table rows {a, b, cin, sum, cout}.
  localparam logic [4:0] TABLE [8] = '{
    5'b000_00, 5'b010_10, 5'b100_10, 5'b110_01,
    5'b001_10, 5'b011_01, 5'b101_01, 5'b111_11
  };

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (TABLE[r]) begin
      {a, b, cin} = TABLE[r][4:2];
      #1;
      checks++;
      if ({sum, cout} !== TABLE[r][1:0]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: sum=%b cout=%b, expected %b",
                 a, b, cin, sum, cout, TABLE[r][1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
