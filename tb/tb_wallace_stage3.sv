// Self-checking testbench for wallace_stage3.
//
// Runs all 256 pairs of 4-bit rows x and y and checks hi == x + y (5 bits).
// It also counts the pairs whose carry ripples through every cell of the
// chain (x + y generating into bit 4 while bits 0..3 of the sum are 0 is one
// such case) and fails if none occurred. Ends with one TB_RESULT line.
module tb_wallace_stage3;

  logic [3:0] x, y;
  logic [4:0] hi;
  int         checks = 0, failures = 0;
  int         full_ripples = 0;

  wallace_stage3 dut (.x(x), .y(y), .hi(hi));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      checks++;
      if (int'(hi) != int'(x) + int'(y)) begin
        failures++;
        $display("FAIL x=%0d y=%0d: hi=%0d", x, y, hi);
      end
      // Carry generated in cell 0 and propagated by cells 1..3.
      if ((x[0] & y[0]) && ((x[3:1] ^ y[3:1]) == 3'b111)) full_ripples++;
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no input made the carry ripple through the whole chain");
    end
    $display("full ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
