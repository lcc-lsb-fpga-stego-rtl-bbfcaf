// dp_ram_tb: checks the simple dual-port RAM at its default size (32 x 8):
// writes and reads at random, with a write and a read in the same clock,
// one-clock read latency, old data on a read of the address being written,
// and `q` holding while `rden` is low.  A shadow array is the reference.
module dp_ram_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] data = '0, q;
  logic [4:0] wraddress = '0, rdaddress = '0;
  logic wren = 1'b0, rden = 1'b0;

  dp_ram dut (.clock(clk), .data, .wraddress, .wren, .rdaddress, .rden, .q);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [7:0] shadow [32];

  initial begin
    // fill every word
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      wren = 1'b1; wraddress = 5'(i); data = 8'($urandom); shadow[i] = data;
    end
    @(negedge clk);
    wren = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] exp_q, held;
      bit do_rd;
      do_rd = ($urandom_range(0, 3) != 0);
      held = q;
      @(negedge clk);
      rden = do_rd;
      rdaddress = 5'($urandom);
      wren = $urandom_range(0, 1);
      wraddress = ($urandom_range(0, 3) == 0) ? rdaddress : 5'($urandom);
      data = 8'($urandom);
      exp_q = shadow[rdaddress];           // old data on a collision
      @(posedge clk);
      #1;
      if (wren) shadow[wraddress] = data;
      if (do_rd) check(q == exp_q, $sformatf("read %0d: got %h exp %h", rdaddress, q, exp_q));
      else       check(q == held, "q holds while rden low");
    end
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
