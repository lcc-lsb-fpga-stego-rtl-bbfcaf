// stego_quality_tb: image-quality workload.  Runs the core at its default
// parameters on a 128x128 24-bit BMP cover (random pixels) with a message that
// fills the whole capacity, for k = 3,3,2, 2,2,2 and 1,1,1, and computes the
// per-channel mean square error and PSNR = 10 log10(255^2 / MSE) between
// cover and stego image.  For uniformly random cover LSBs and message bits,
// the expected MSE of a channel carrying k bits is 2 * Var(uniform 0..2^k-1)
// = (4^k - 1) / 6: 0.5, 2.5 and 10.5 for k = 1, 2, 3.  Each channel must be
// within 5 % of that, every PSNR must exceed 30 dB, and the run must end
// without overflow having used all 256 blocks.
module stego_quality_tb;
  import stego_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  logic [7:0]  seed1, a1, c1, seed2, a2, c2;
  kcfg_t       k;
  logic        busy, done, overflow;
  logic [8:0]  blocks_done;
  logic [31:0] fetch_count, copy_count;
  logic [15:0] pad_count, msg_len, rows, cols;
  logic [19:0] bit_count;
  logic [15:0] file_size;
  logic        bad_file;
  logic [SRAM_AW-1:0] sram_addr;
  logic [SRAM_DW-1:0] dq_o, dq_i;
  logic        dq_oe, ce_n, oe_n, we_n, lb_n, ub_n;

  stego_top dut (
    .clk, .rst_n, .start, .seed1, .a1, .c1, .seed2, .a2, .c2, .k,
    .busy, .done, .overflow, .blocks_done, .fetch_count, .pad_count,
    .copy_count, .bit_count, .msg_len, .rows, .cols, .file_size, .bad_file,
    .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n),
    .sram_lb_n(lb_n), .sram_ub_n(ub_n)
  );

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .addr(sram_addr), .dq_w(dq_oe ? dq_o : 16'h0000), .dq_r(dq_i),
    .ce_n, .oe_n, .we_n, .lb_n, .ub_n
  );

  localparam int R = 128, C = 128;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int STRIDE = (3 * C + 3) & ~3, SIZE = 54 + STRIDE * R;
  logic [23:0] cov_img [R*C];
  logic [7:0]  bmp [];

  function automatic void put32(input int at, input int v);
    for (int b = 0; b < 4; b++) bmp[at + b] = 8'(v >> (8 * b));
  endfunction

  function automatic logic [7:0] rd_byte(input int o);
    logic [15:0] w;
    w = u_mem.mem[o / 2];
    return o[0] ? w[15:8] : w[7:0];
  endfunction

  task automatic run_k(input kcfg_t kk);
    int need, L;
    real se [3], mse, expv, psnr;
    int kc [3];
    need = int'(kk.r) + int'(kk.g) + int'(kk.b);
    L = R * C * need / 8;
    bmp = new[SIZE];
    foreach (bmp[i]) bmp[i] = 8'h00;
    bmp[0] = 8'h42; bmp[1] = 8'h4D;
    put32(2, SIZE); put32(10, 54); put32(14, 40); put32(18, C); put32(22, R);
    bmp[26] = 8'd1; bmp[28] = 8'd24; put32(34, STRIDE * R);
    for (int i = 0; i < R * C; i++) begin
      int o;
      cov_img[i] = 24'($urandom);
      o = 54 + (i / C) * STRIDE + 3 * (i % C);
      bmp[o] = cov_img[i][23:16]; bmp[o+1] = cov_img[i][15:8]; bmp[o+2] = cov_img[i][7:0];
    end
    for (int w = 0; w < SIZE / 2; w++) u_mem.mem[w] = {bmp[2*w+1], bmp[2*w]};
    u_mem.mem[MSG_LEN_ADDR] = 16'(L);
    for (int i = 0; i < (L + 1) / 2; i++) u_mem.mem[MSG_BASE + i] = 16'($urandom);
    seed1 = 8'd123; a1 = 8'd141; c1 = 8'd59;     // full period mod 256
    seed2 = 8'd40;  a2 = 8'd29;  c2 = 8'd11;     // full period mod 64
    k = kk;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(posedge clk);
    #1;
    check(!overflow && blocks_done == 9'd256, "whole capacity used without overflow");
    check(!bad_file && file_size == 16'(SIZE), "header accepted");
    check(copy_count == 0 && pad_count == 0, "no padded or copied pixels at exact capacity");
    se[0] = 0.0; se[1] = 0.0; se[2] = 0.0;
    for (int i = 0; i < R * C; i++) begin
      logic [23:0] s;
      int o;
      o = 54 + (i / C) * STRIDE + 3 * (i % C);
      s = {rd_byte(o), rd_byte(o + 1), rd_byte(o + 2)};
      for (int ch = 0; ch < 3; ch++) begin
        real d;
        d = real'(int'(s[8*ch +: 8])) - real'(int'(cov_img[i][8*ch +: 8]));
        se[ch] += d * d;
      end
    end
    kc[0] = kk.r; kc[1] = kk.g; kc[2] = kk.b;
    for (int ch = 0; ch < 3; ch++) begin
      mse  = se[ch] / real'(R * C);
      expv = (real'(4 ** kc[ch]) - 1.0) / 6.0;
      psnr = 10.0 * $log10(255.0 * 255.0 / mse);
      $display("k=%0d%0d%0d channel %s: MSE %7.4f (expected %7.4f)  PSNR %7.3f dB",
               kk.r, kk.g, kk.b, (ch == 0) ? "R" : (ch == 1) ? "G" : "B", mse, expv, psnr);
      check(mse > 0.95 * expv && mse < 1.05 * expv, "MSE within 5 % of expectation");
      check(psnr > 30.0, "PSNR above 30 dB");
    end
  endtask

  initial begin
    for (int i = 0; i < 2**SRAM_AW; i++) u_mem.mem[i] = '0;
    seed1 = 0; a1 = 0; c1 = 0; seed2 = 0; a2 = 0; c2 = 0; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_k(kcfg_t'({2'd3, 2'd3, 2'd2}));
    run_k(kcfg_t'({2'd2, 2'd2, 2'd2}));
    run_k(kcfg_t'({2'd1, 2'd1, 2'd1}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
