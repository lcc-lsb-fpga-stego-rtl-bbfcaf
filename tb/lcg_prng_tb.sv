// lcg_prng_tb: checks the LCG against X(n+1) = (A*X(n) + C) mod M computed
// in the testbench, for random constants, M = 256 and M = 0 (both mean all
// 8-bit values), the load-over-step priority, holding without `step`, the
// one-clock latency and the full period of a Hull-Dobell choice (M = 64,
// A = 13, C = 7) and of the block setting (M = 256, A = 5, C = 101).
module lcg_prng_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [7:0] seed = '0, a = '0, c = '0, q;
  logic [8:0] m = '0;

  lcg_prng dut (.clk, .rst_n, .load, .step, .seed, .a, .c, .m, .q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int nxt(int x, int aa, int cc, int mm);
    int mod;
    mod = (mm == 0) ? 256 : mm;
    return (aa * x + cc) % mod;
  endfunction

  task automatic run_seq(input int s, input int aa, input int cc, input int mm, input int n);
    int x;
    @(negedge clk);
    seed = 8'(s); a = 8'(aa); c = 8'(cc); m = 9'(mm); load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(q == 8'(s), "seed loaded");
    x = s;
    for (int i = 0; i < n; i++) begin
      step = 1'b1;
      @(negedge clk);
      x = nxt(x, aa, cc, mm);
      check(q == 8'(x), $sformatf("term %0d: got %0d exp %0d (a=%0d c=%0d m=%0d)", i, q, x, aa, cc, mm));
      step = 1'b0;
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        check(q == 8'(x), "hold without step");
      end
    end
  endtask

  task automatic period(input int s, input int aa, input int cc, input int mm);
    bit seen [256];
    int distinct = 0;
    @(negedge clk);
    seed = 8'(s); a = 8'(aa); c = 8'(cc); m = 9'(mm); load = 1'b1;
    @(negedge clk);
    load = 1'b0; step = 1'b1;
    for (int i = 0; i < mm; i++) begin
      if (!seen[q]) distinct++;
      seen[q] = 1'b1;
      check(int'(q) < mm, "term below modulus");
      @(negedge clk);
    end
    step = 1'b0;
    check(distinct == mm, $sformatf("full period %0d of %0d", distinct, mm));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q == 8'd0, "reset value");
    for (int t = 0; t < 40; t++) begin
      int mm;
      mm = $urandom_range(1, 256);
      run_seq($urandom_range(0, mm - 1), $urandom_range(0, 255), $urandom_range(0, 255), mm, 20);
    end
    run_seq(17, 141, 3, 0, 30);
    run_seq(200, 77, 9, 256, 30);
    // load wins over step
    @(negedge clk);
    seed = 8'd42; load = 1'b1; step = 1'b1;
    @(negedge clk);
    load = 1'b0; step = 1'b0;
    check(q == 8'd42, "load has priority");
    period(3, 13, 7, 64);
    period(77, 5, 101, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
