// stego_fsm_tb: tests the FSM processing unit wired to the SRAM controller,
// the two LCC generators, the three block RAMs and the embedding unit, with
// a behavioural SRAM.  The same reference embedding as the end-to-end test
// (BMP cover, LCG block and pixel order, LSB-first bits) gives the expected
// stego file; the test also extracts the message, checks the embedded-bit
// count, the capture of the configuration at start, 8-bit greyscale covers,
// the rejection of files that are neither 24-bit nor 8-bit BMPs and the
// cycle count (90 + 1218 per colour block, 770 per greyscale block, + 4 per
// message word), and counts the SRAM commands the FSM issues (7 header
// reads, 128 reads and 128 writes per colour block, one read per message
// word).
// Smaller images than the end-to-end test.
module stego_fsm_tb;
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

  // FSM under test, with the datapath blocks around it
  sram_req_t          sreq;
  logic [15:0]        read_data;
  logic               read_ack, write_ack, sram_ready;
  logic               l1_load, l1_step, l2_load, l2_step;
  logic [7:0]         l1_seed, l1_a, l1_c, l1_q, l2_q;
  logic [8:0]         l1_m;
  logic [5:0]         l2_seed, l2_a, l2_c;
  logic [6:0]         l2_m;
  logic [5:0]         key_wdata, key_waddr, key_raddr, key_q;
  logic               key_wren, key_rden;
  pixel_t             cov_wdata, cov_q, stg_wdata, stg_q, emb_rgb, emb_stego;
  logic [5:0]         cov_waddr, cov_raddr, stg_waddr, stg_raddr;
  logic               cov_wren, cov_rden, stg_wren, stg_rden, emb_load;
  logic [8:0]         emb_bits;
  kcfg_t              emb_k;
  logic [3:0]         emb_nbits;
  int                 n_reads = 0, n_writes = 0;

  stego_fsm dut (
    .clk, .rst_n, .start, .seed1, .a1, .c1,
    .seed2(seed2[5:0]), .a2(a2[5:0]), .c2(c2[5:0]), .k, .busy, .done, .overflow,
    .sreq, .read_data, .read_ack, .write_ack, .sram_ready,
    .lcg1_load(l1_load), .lcg1_step(l1_step), .lcg1_seed(l1_seed),
    .lcg1_a(l1_a), .lcg1_c(l1_c), .lcg1_m(l1_m), .lcg1_q(l1_q),
    .lcg2_load(l2_load), .lcg2_step(l2_step), .lcg2_seed(l2_seed),
    .lcg2_a(l2_a), .lcg2_c(l2_c), .lcg2_m(l2_m), .lcg2_q(l2_q[5:0]),
    .key_wdata, .key_waddr, .key_raddr, .key_wren, .key_rden, .key_q,
    .cov_wdata, .cov_waddr, .cov_raddr, .cov_wren, .cov_rden, .cov_q,
    .stg_wdata, .stg_waddr, .stg_raddr, .stg_wren, .stg_rden, .stg_q,
    .emb_load, .emb_rgb, .emb_bits, .emb_k, .emb_stego,
    .msg_len, .rows, .cols, .file_size, .bad_file,
    .blocks_done, .fetch_count, .pad_count, .copy_count, .bit_count
  );
  sram_ctrl u_sram (
    .clk, .rst_n, .read_cmd(sreq.read_cmd), .write_cmd(sreq.write_cmd),
    .byte_mode(sreq.byte_mode), .byte_hi(sreq.byte_hi), .addr(sreq.addr),
    .store_data(sreq.store_data), .read_data, .read_ack, .write_ack, .ready(sram_ready),
    .sram_addr, .dq_o, .dq_oe, .dq_i, .ce_n, .oe_n, .we_n, .lb_n, .ub_n
  );
  lcg_prng u_l1 (.clk, .rst_n, .load(l1_load), .step(l1_step), .seed(l1_seed),
                 .a(l1_a), .c(l1_c), .m(l1_m), .q(l1_q));
  lcg_prng u_l2 (.clk, .rst_n, .load(l2_load), .step(l2_step), .seed(8'(l2_seed)),
                 .a(8'(l2_a)), .c(8'(l2_c)), .m(9'(l2_m)), .q(l2_q));
  dp_ram #(.WIDTH(6), .DEPTH(64)) u_key (.clock(clk), .data(key_wdata), .wraddress(key_waddr),
    .wren(key_wren), .rdaddress(key_raddr), .rden(key_rden), .q(key_q));
  dp_ram #(.WIDTH(24), .DEPTH(64)) u_cov (.clock(clk), .data(cov_wdata), .wraddress(cov_waddr),
    .wren(cov_wren), .rdaddress(cov_raddr), .rden(cov_rden), .q(cov_q));
  dp_ram #(.WIDTH(24), .DEPTH(64)) u_stg (.clock(clk), .data(stg_wdata), .wraddress(stg_waddr),
    .wren(stg_wren), .rdaddress(stg_raddr), .rden(stg_rden), .q(stg_q));
  lsb_embed u_emb (.clk, .rst_n, .load(emb_load), .rgb_data(emb_rgb), .msg_bits(emb_bits),
                   .k(emb_k), .stego_data(emb_stego), .nbits(emb_nbits));

  // request protocol: count accepted commands
  always @(posedge clk) if (sram_ready && sreq.read_cmd)  n_reads++;
  always @(posedge clk) if (sram_ready && sreq.write_cmd) n_writes++;

  sram_model #(.AW(SRAM_AW), .DW(SRAM_DW)) u_mem (
    .addr(sram_addr), .dq_w(dq_oe ? dq_o : 16'h0000), .dq_r(dq_i),
    .ce_n, .oe_n, .we_n, .lb_n, .ub_n
  );

  int checks = 0, failures = 0;
  int n_fetch = 0, n_pad = 0, n_copy = 0, n_ovf = 0, n_bytewr = 0;
  int n_k332 = 0, n_k222 = 0, n_k111 = 0, n_npow2 = 0;

  // byte-mode writes seen on the pins
  always @(negedge we_n) if (!ce_n && (lb_n != ub_n)) n_bytewr++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // cover file and message
  logic [7:0]  bmp [];       // BMP file as loaded
  logic [7:0]  expf [];      // expected file after embedding
  logic [7:0]  msg [];
  int          n_badfile = 0, n_rowpad = 0, n_gray = 0;

  function automatic bit msg_bit(int unsigned pos);
    return msg[pos / 8][pos % 8];
  endfunction

  function automatic void put32(ref logic [7:0] f [], input int at, input int v);
    for (int i = 0; i < 4; i++) f[at + i] = 8'(v >> (8 * i));
  endfunction

  // bottom-up BMP with random pixel, palette and padding bytes; 8-bit files
  // carry a 256-entry palette between the header and the pixels
  int bmp_off;
  task automatic build_bmp(input int R, input int C, input int bpp);
    int stride, size;
    stride = (((bpp == 8) ? C : 3 * C) + 3) & ~3;
    bmp_off = (bpp == 8) ? 54 + 1024 : 54;
    size = bmp_off + stride * R;
    bmp = new[size];
    foreach (bmp[i]) bmp[i] = 8'($urandom);
    bmp[0] = 8'h42; bmp[1] = 8'h4D;
    put32(bmp, 2, size);
    put32(bmp, 6, 0);
    put32(bmp, 10, bmp_off);
    put32(bmp, 14, 40);
    put32(bmp, 18, C);
    put32(bmp, 22, R);
    bmp[26] = 8'd1; bmp[27] = 8'd0;
    bmp[28] = 8'(bpp); bmp[29] = 8'd0;
    put32(bmp, 30, 0);
    put32(bmp, 34, stride * R);
    for (int i = 38; i < 54; i++) bmp[i] = 8'h00;
    if (bpp == 8) put32(bmp, 46, 256);
    for (int w = 0; w < size / 2; w++) u_mem.mem[w] = {bmp[2*w+1], bmp[2*w]};
  endtask

  task automatic start_and_wait(output int cycles);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    // configuration is captured at start: scramble the inputs during the run
    seed1 = ~seed1; a1 = a1 + 8'd2; c1 = c1 + 8'd1; seed2 = ~seed2; a2 = ~a2; c2 = c2 + 8'd3;
    k = kcfg_t'(~k);
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cycles++;
    end
  endtask

  // a cover that is not a 24-bit BMP must be rejected and left untouched
  task automatic run_bad(input bit bad_sig);
    int cycles, bad;
    build_bmp(16, 16, bad_sig ? 24 : 32);
    if (bad_sig) begin bmp[1] = 8'h4E; u_mem.mem[0] = {bmp[1], bmp[0]}; end
    u_mem.mem[MSG_LEN_ADDR] = 16'd20;
    k = kcfg_t'({2'd1, 2'd1, 2'd1});
    start_and_wait(cycles);
    check(bad_file, "bad file flagged");
    check(blocks_done == 0 && bit_count == 0, "nothing embedded in a bad file");
    check(cycles == (bad_sig ? 5 : 20), $sformatf("bad-file cycles %0d", cycles));
    bad = 0;
    for (int w = 0; w < bmp.size() / 2; w++) if (u_mem.mem[w] != {bmp[2*w+1], bmp[2*w]}) bad++;
    check(bad == 0, "bad file untouched");
    if (bad_file) n_badfile++;
  endtask

  task automatic run_scenario(input int R, input int C, input int L,
                              input kcfg_t kk,
                              input int s1, input int aa1, input int cc1,
                              input int s2, input int aa2, input int cc2,
                              input bit gray = 1'b0);
    int nbx, nb, x1, x2, blocks, fetches, cycles, need, stride, bpb, per_blk;
    int unsigned pos, total, cap;
    bit ovf_exp, pad_seen, copy_seen;
    logic [7:0] rec [];
    int unsigned rpos;
    int x1r, x2r;

    build_bmp(R, C, gray ? 8 : 24);
    bpb = gray ? 1 : 3;
    stride = (bpb * C + 3) & ~3;
    per_blk = gray ? 770 : 1218;
    msg = new[L];
    foreach (msg[i]) msg[i] = 8'($urandom);
    u_mem.mem[MSG_LEN_ADDR] = 16'(L);
    for (int i = 0; i < (L + 1) / 2; i++)
      u_mem.mem[MSG_BASE + i] = {(2*i+1 < L) ? msg[2*i+1] : 8'h5A, msg[2*i]};

    // reference embedding on the file bytes (pixel bytes B, G, R; a
    // greyscale pixel is one byte and takes k_R bits)
    need  = gray ? int'(kk.r) : int'(kk.r) + int'(kk.g) + int'(kk.b);
    nbx   = C / 8;
    nb    = (R / 8) * (C / 8);
    if (nb > 256) nb = 256;
    total = L * 8;
    expf  = new[bmp.size()];
    foreach (bmp[i]) expf[i] = bmp[i];
    x1 = s1; x2 = s2 % 64;
    pos = 0; blocks = 0; pad_seen = 0; copy_seen = 0;
    while (pos < total && blocks < nb) begin
      int blk, br, bc;
      blk = x1; x1 = (aa1 * x1 + cc1) % nb;
      br = blk / nbx; bc = blk % nbx;
      for (int i = 0; i < 64; i++) begin
        int p, at;
        int kc [3];
        int off [3];
        p = x2; x2 = ((aa2 % 64) * x2 + (cc2 % 64)) % 64;
        at = bmp_off + (br * 8 + p / 8) * stride + bpb * (bc * 8 + p % 8);
        if (pos >= total) begin
          copy_seen = 1;
          continue;
        end
        if (total - pos < need) pad_seen = 1;
        kc[0] = kk.r; kc[1] = gray ? 0 : kk.g; kc[2] = gray ? 0 : kk.b;
        off[0] = gray ? 0 : 2; off[1] = 1; off[2] = 0;  // R, G, B byte in the pixel
        for (int c = 0; c < 3; c++)
          for (int b = 0; b < kc[c]; b++) begin
            expf[at + off[c]][b] = (pos < total) ? msg_bit(pos) : 1'b0;
            pos++;
          end
      end
      blocks++;
    end
    ovf_exp = (pos < total);
    cap = nb * 64 * need;
    fetches = ovf_exp ? (cap + 15) / 16 : (L + 1) / 2;

    // run
    seed1 = 8'(s1); a1 = 8'(aa1); c1 = 8'(cc1);
    seed2 = 8'(s2); a2 = 8'(aa2); c2 = 8'(cc2);
    k = kk;
    start_and_wait(cycles);

    // compare
    check(!bad_file, "good file accepted");
    check(msg_len == 16'(L) && rows == 16'(R) && cols == 16'(C) &&
          file_size == 16'(bmp.size()), "header registers");
    check(overflow == ovf_exp, $sformatf("overflow flag %0d exp %0d", overflow, ovf_exp));
    check(blocks_done == 9'(blocks), $sformatf("blocks %0d exp %0d", blocks_done, blocks));
    check(fetch_count == 32'(fetches), $sformatf("fetches %0d exp %0d", fetch_count, fetches));
    check((pad_count != 0) == pad_seen, "pad event");
    check(bit_count == 20'(ovf_exp ? cap : total),
          $sformatf("embedded bits %0d exp %0d", bit_count, ovf_exp ? cap : total));
    check((copy_count != 0) == copy_seen, "copy event");
    check(cycles == 90 + per_blk * blocks + 4 * fetches,
          $sformatf("cycles %0d exp %0d", cycles, 90 + per_blk * blocks + 4 * fetches));
    for (int i = 0; i < (L + 1) / 2; i++)
      check(u_mem.mem[MSG_BASE + i] == {(2*i+1 < L) ? msg[2*i+1] : 8'h5A, msg[2*i]},
            "message area untouched");
    begin
      int bad = 0;
      for (int w = 0; w < expf.size() / 2; w++) begin
        if (u_mem.mem[w] != {expf[2*w+1], expf[2*w]}) begin
          bad++;
          if (bad < 5) $display("word %0d: got %h exp %h", w, u_mem.mem[w], {expf[2*w+1], expf[2*w]});
        end
        checks++;
      end
      failures += bad;
    end

    // extract the message back out of the stego file
    rec = new[L];
    foreach (rec[i]) rec[i] = '0;
    x1r = s1; x2r = s2 % 64; rpos = 0;
    for (int b = 0; b < blocks; b++) begin
      int blk, br, bc;
      blk = x1r; x1r = (aa1 * x1r + cc1) % nb;
      br = blk / nbx; bc = blk % nbx;
      for (int i = 0; i < 64; i++) begin
        int p, at;
        logic [7:0] chb [3];
        int kc [3];
        p = x2r; x2r = ((aa2 % 64) * x2r + (cc2 % 64)) % 64;
        at = bmp_off + (br * 8 + p / 8) * stride + bpb * (bc * 8 + p % 8);
        for (int c = 0; c < 3; c++) begin
          int ba, w;
          ba = gray ? at : at + 2 - c;         // R, G, B
          w = ba / 2;
          chb[c] = (ba % 2) ? u_mem.mem[w][15:8] : u_mem.mem[w][7:0];
        end
        kc[0] = kk.r; kc[1] = gray ? 0 : kk.g; kc[2] = gray ? 0 : kk.b;
        for (int c = 0; c < 3; c++)
          for (int q = 0; q < kc[c]; q++) begin
            if (rpos < total) rec[rpos / 8][rpos % 8] = chb[c][q];
            rpos++;
          end
      end
    end
    begin
      int upto;
      upto = ovf_exp ? int'(cap / 8) : L;
      for (int i = 0; i < upto; i++) check(rec[i] == msg[i], $sformatf("recovered byte %0d", i));
    end

    if (fetch_count != 0) n_fetch++;
    if (pad_count != 0)   n_pad++;
    if (copy_count != 0)  n_copy++;
    if (overflow)         n_ovf++;
    if (stride != bpb * C) n_rowpad++;
    if (gray)             n_gray++;
    if (kk == kcfg_t'({2'd3, 2'd3, 2'd2})) n_k332++;
    if (kk == kcfg_t'({2'd2, 2'd2, 2'd2})) n_k222++;
    if (kk == kcfg_t'({2'd1, 2'd1, 2'd1})) n_k111++;
    if ((nb & (nb - 1)) != 0) n_npow2++;
    $display("scenario %0dx%0d%s L=%0d k=%0d%0d%0d: blocks=%0d fetches=%0d cycles=%0d pads=%0d copies=%0d ovf=%0d",
             R, C, gray ? " grey" : "", L, kk.r, kk.g, kk.b, blocks_done, fetch_count, cycles, pad_count,
             copy_count, overflow);
  endtask

  initial begin
    for (int i = 0; i < 2**SRAM_AW; i++) u_mem.mem[i] = '0;
    seed1 = 0; a1 = 0; c1 = 0; seed2 = 0; a2 = 0; c2 = 0; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_scenario(16, 24, 40,  kcfg_t'({2'd3, 2'd3, 2'd2}), 2, 7, 1, 5, 9, 3);
    check(n_reads == 7 + 128 * 1 + 20 && n_writes == 128 * 1,
          $sformatf("SRAM commands: reads %0d writes %0d", n_reads, n_writes));
    run_scenario(24, 42, 31,  kcfg_t'({2'd2, 2'd2, 2'd2}), 4, 16, 7, 0, 5, 1);
    run_scenario(16, 16, 100, kcfg_t'({2'd1, 2'd1, 2'd1}), 1, 1, 1, 63, 21, 33);
    run_scenario(16, 32, 100, kcfg_t'({2'd3, 2'd3, 2'd2}), 3, 5, 3, 9, 13, 7);
    run_scenario(24, 42, 40,  kcfg_t'({2'd3, 2'd1, 2'd2}), 2, 16, 4, 5, 13, 11, 1'b1);
    run_scenario(16, 16, 100, kcfg_t'({2'd2, 2'd0, 2'd0}), 3, 1, 1, 8, 5, 3, 1'b1);
    check(n_fetch > 0,  "mechanism: message fetch stall");
    check(n_pad > 0,    "mechanism: last-pixel padding");
    check(n_copy > 0,   "mechanism: unchanged pixels after message end");
    check(n_ovf > 0,    "mechanism: capacity overflow");
    check(n_bytewr > 0, "mechanism: byte-mode SRAM write");
    check(n_k332 > 0 && n_k222 > 0 && n_k111 > 0, "mechanism: k = 332, 222, 111");
    check(n_npow2 > 0,  "mechanism: block count not a power of two");
    check(n_rowpad > 0, "mechanism: padded BMP rows");
    check(n_gray > 0,   "mechanism: greyscale cover");
    run_bad(1'b1);
    run_bad(1'b0);
    check(n_badfile == 2, "mechanism: rejected cover file");
    $display("mechanisms: fetch=%0d pad=%0d copy=%0d overflow=%0d bytewrites=%0d rowpad=%0d grey=%0d badfile=%0d",
             n_fetch, n_pad, n_copy, n_ovf, n_bytewr, n_rowpad, n_gray, n_badfile);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
