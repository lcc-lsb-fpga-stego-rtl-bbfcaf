// lsb_embed_tb: checks the embedding unit against a bit-by-bit model of LSB
// substitution (LSB-first message bits, red then green then blue, k bits per
// channel), for random pixels, messages and every k in 0..3 per channel.  It
// checks the printed mask case (k = 3,3,2 on an all-ones pixel with zero
// message gives 0xFCF8F8 = 16578808), the bit count, and that the output
// holds between loads.
module lsb_embed_tb;
  import stego_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0, load = 1'b0;
  pixel_t rgb = '0, stego;
  logic [MAXBITS-1:0] bits = '0;
  kcfg_t k = '0;
  logic [3:0] nbits;

  lsb_embed dut (.clk, .rst_n, .load, .rgb_data(rgb), .msg_bits(bits), .k,
                 .stego_data(stego), .nbits);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic pixel_t model(pixel_t p, logic [8:0] b, kcfg_t kk);
    int pos = 0;
    int kc [3];
    kc[0] = kk.r; kc[1] = kk.g; kc[2] = kk.b;
    for (int c = 0; c < 3; c++)
      for (int i = 0; i < kc[c]; i++) begin
        p[8*c + i] = b[pos];
        pos++;
      end
    return p;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // printed mask constant
    rgb = 24'hFFFFFF; bits = '0; k = kcfg_t'({2'd3, 2'd3, 2'd2}); load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(stego == 24'd16578808, $sformatf("mask constant: %h", stego));
    check(nbits == 4'd8, "nbits for 3,3,2");
    for (int t = 0; t < 2000; t++) begin
      pixel_t exp_v;
      rgb  = 24'($urandom);
      bits = 9'($urandom);
      k    = kcfg_t'($urandom);
      load = 1'b1;
      exp_v = model(rgb, bits, k);
      @(negedge clk);
      load = 1'b0;
      check(stego == exp_v, $sformatf("k=%0d%0d%0d rgb=%h bits=%b: got %h exp %h",
                                      k.r, k.g, k.b, rgb, bits, stego, exp_v));
      check(nbits == 4'(k.r + k.g + k.b), "nbits");
      rgb = ~rgb; bits = ~bits;
      @(negedge clk);
      check(stego == exp_v, "holds without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
