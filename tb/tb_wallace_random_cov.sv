// Class-based random testbench with functional coverage for wallace_tree_4x4.
//
// A transaction class draws random operands with $urandom, a driver puts
// them on a virtual interface, and a checker compares the product with a*b
// worked out in the testbench. Coverage is collected in three groups of
// bins kept as counters: the 16 values of a, the 16 values of b, and the 256
// (a, b) pairs. Random transactions run until all three groups reach 100%,
// or a limit of 20000 transactions, which counts as a failure. Each
// transaction is held for 10 ns. Ends with one TB_RESULT line.
module tb_wallace_random_cov;

  wallace_if vif_inst ();

  wallace_tree_4x4 dut (.a(vif_inst.a), .b(vif_inst.b), .out(vif_inst.out));

  int checks = 0, failures = 0;

  class wall_packet;
    logic [3:0] a;
    logic [3:0] b;
    function void draw();
      a = 4'($urandom_range(15));
      b = 4'($urandom_range(15));
    endfunction
  endclass

  class wall_env;
    virtual wallace_if vif;
    int a_bins [16];
    int b_bins [16];
    int ab_bins [256];
    int n_checks = 0;
    int n_failures = 0;

    function new(virtual wallace_if v);
      vif = v;
    endfunction

    function int hit(int cnt []);
      int n = 0;
      foreach (cnt[i]) if (cnt[i] != 0) n++;
      return n;
    endfunction

    function bit covered();
      return hit(a_bins) == 16 && hit(b_bins) == 16 && hit(ab_bins) == 256;
    endfunction

    task run(int limit);
      wall_packet pkt = new();
      int n = 0;
      while (!covered() && n < limit) begin
        pkt.draw();
        vif.a = pkt.a;
        vif.b = pkt.b;
        #1;
        n_checks++;
        if (int'(vif.out) != int'(pkt.a) * int'(pkt.b)) begin
          n_failures++;
          $display("FAIL %0d * %0d: out=%0d", pkt.a, pkt.b, vif.out);
        end
        a_bins[pkt.a]++;
        b_bins[pkt.b]++;
        ab_bins[{pkt.a, pkt.b}]++;
        n++;
        #9;
      end
      $display("%0d random transactions; coverage a %0d/16, b %0d/16, a x b %0d/256",
               n, hit(a_bins), hit(b_bins), hit(ab_bins));
      n_checks++;
      if (!covered()) begin
        n_failures++;
        $display("FAIL coverage not complete after %0d transactions", n);
      end
    endtask
  endclass

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wall_env env;
    env = new(vif_inst);
    env.run(20000);
    checks   += env.n_checks;
    failures += env.n_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
