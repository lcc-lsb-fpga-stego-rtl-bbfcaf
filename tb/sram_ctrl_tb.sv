// sram_ctrl_tb: checks the SRAM controller against the behavioural SRAM
// model and a shadow copy of its contents: random word writes, byte-mode
// writes on either lane and reads, with the latencies the controller
// documents (read_ack 2 clocks after read_cmd, write_ack 3 clocks after
// write_cmd), `ready` low while busy, commands ignored while busy, and OE and
// WE never low together.
module sram_ctrl_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  logic read_cmd = 1'b0, write_cmd = 1'b0, byte_mode = 1'b0, byte_hi = 1'b0;
  logic [17:0] addr = '0;
  logic [15:0] store_data = '0, read_data;
  logic read_ack, write_ack, ready;
  logic [17:0] sram_addr;
  logic [15:0] dq_o, dq_i;
  logic dq_oe, ce_n, oe_n, we_n, lb_n, ub_n;

  sram_ctrl dut (.clk, .rst_n, .read_cmd, .write_cmd, .byte_mode, .byte_hi,
                 .addr, .store_data, .read_data, .read_ack, .write_ack, .ready,
                 .sram_addr, .dq_o, .dq_oe, .dq_i, .ce_n, .oe_n, .we_n, .lb_n, .ub_n);

  sram_model u_mem (.addr(sram_addr), .dq_w(dq_oe ? dq_o : 16'h0000), .dq_r(dq_i),
                    .ce_n, .oe_n, .we_n, .lb_n, .ub_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int contention = 0;
  always @(posedge clk) if (rst_n && !we_n && !oe_n) contention++;

  logic [15:0] shadow [64];
  localparam logic [17:0] BASE = 18'h2A5C0;

  // issue one command, return clocks until its ack
  task automatic op(input bit wr, input bit bm, input bit hi, input int a, input logic [15:0] d,
                    output int lat);
    @(negedge clk);
    check(ready, "ready before command");
    read_cmd = !wr; write_cmd = wr; byte_mode = bm; byte_hi = hi;
    addr = BASE + 18'(a); store_data = d;
    @(negedge clk);
    read_cmd = 1'b0; write_cmd = 1'b0;
    // a command while busy must be ignored
    read_cmd = 1'b1; addr = '0;
    check(!ready, "busy after command");
    lat = 1;
    while (!(read_ack || write_ack)) begin
      @(negedge clk);
      read_cmd = 1'b0;
      lat++;
    end
    read_cmd = 1'b0;
  endtask

  initial begin
    int lat;
    for (int i = 0; i < 64; i++) begin
      u_mem.mem[BASE + 18'(i)] = 16'($urandom);
      shadow[i] = u_mem.mem[BASE + 18'(i)];
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(ce_n && oe_n && we_n && !dq_oe, "idle pins after reset");
    for (int t = 0; t < 600; t++) begin
      int kind, a;
      logic [15:0] d;
      kind = $urandom_range(0, 3);
      a = $urandom_range(0, 63);
      d = 16'($urandom);
      if (kind == 0) begin
        op(1'b0, 1'b0, 1'b0, a, d, lat);
        check(read_data == shadow[a], $sformatf("read %0d: got %h exp %h", a, read_data, shadow[a]));
        check(lat == 2, $sformatf("read latency %0d", lat));
      end else if (kind == 1) begin
        op(1'b1, 1'b0, 1'b0, a, d, lat);
        shadow[a] = d;
        check(lat == 3, $sformatf("write latency %0d", lat));
      end else begin
        bit hi;
        hi = (kind == 3);
        op(1'b1, 1'b1, hi, a, d, lat);
        if (hi) shadow[a][15:8] = d[15:8];
        else    shadow[a][7:0]  = d[7:0];
        check(lat == 3, "byte write latency");
      end
      @(negedge clk);
      check(u_mem.mem[BASE + 18'(a)] == shadow[a], $sformatf("memory word %0d", a));
    end
    check(contention == 0, "OE and WE never low together");
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
