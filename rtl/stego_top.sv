// stego_top: image LSB steganography core with LCC-driven random block and
// pixel selection.
//
// An encrypted message is hidden in a 24-bit colour or 8-bit greyscale BMP
// cover image stored in external 256K x 16 SRAM.  The image is cut into 8x8
// blocks; a linear congruential generator (LCC 1) picks the order in which
// blocks are used and a second one (LCC 2) the order of the 64 pixels inside
// each block.  Each chosen colour pixel takes k_R, k_G, k_B message bits in
// the LSBs of its red, green and blue channel (a greyscale pixel k_R bits).
// The stego image replaces the cover image in the SRAM.
//
// Blocks: stego_fsm (FSM processing unit) drives sram_ctrl (SRAM
// controller), two lcg_prng instances, three dp_ram instances (random key
// sequence, 64 x 6; cover block and stego block, 64 x 24 each) and lsb_embed
// (data embedding unit).  This
// is the four-part architecture of the source: FSM unit in the middle, SRAM
// controller and LCC on one side, on-chip memory and embedding unit on the
// other.  The clock comes from outside (the source derives it from an FPGA
// PLL).
//
// Use: load the SRAM (BMP file from word 0, message length and message at
// MSG_LEN_ADDR, see stego_pkg), set seeds, multipliers,
// increments and k, pulse `start`, wait for `done`.  Seeds, constants and k
// are captured at `start`.  The SRAM data bus is brought out as
// `sram_dq_o`/`sram_dq_oe`/`sram_dq_i`; the pad's tri-state buffer belongs
// to the FPGA I/O.  For a full-period block order choose a1, c1 by the
// Hull-Dobell rule for the block count (for 256 blocks: c1 odd, a1 = 1 mod 4);
// for the pixel order (modulus 64): c2 odd, a2 = 1 mod 4.
module stego_top
  import stego_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [7:0]         seed1, a1, c1,    // block generator
  input  logic [7:0]         seed2, a2, c2,    // pixel generator (used mod 64)
  input  kcfg_t              k,
  output logic               busy,
  output logic               done,
  output logic               overflow,
  output logic [8:0]         blocks_done,
  output logic [31:0]        fetch_count,
  output logic [15:0]        pad_count,
  output logic [31:0]        copy_count,
  output logic [19:0]        bit_count,        // message bits embedded
  output logic [15:0]        msg_len,          // header as read
  output logic [15:0]        rows,
  output logic [15:0]        cols,
  output logic [15:0]        file_size,        // BMP file size, low 16 bits
  output logic               bad_file,         // cover not a 24- or 8-bit BMP
  // external SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_dq_o,
  output logic               sram_dq_oe,
  input  logic [SRAM_DW-1:0] sram_dq_i,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  output logic               sram_lb_n,
  output logic               sram_ub_n
);

  sram_req_t          sreq;
  logic [SRAM_DW-1:0] read_data;
  logic               read_ack, write_ack, sram_ready;

  logic               l1_load, l1_step, l2_load, l2_step;
  logic [7:0]         l1_seed, l1_a, l1_c, l1_q, l2_q;
  logic [8:0]         l1_m;
  logic [BLK_AW-1:0]  l2_seed, l2_a, l2_c;
  logic [BLK_AW:0]    l2_m;

  logic [BLK_AW-1:0]  key_wdata, key_waddr, key_raddr, key_q;
  logic               key_wren, key_rden;
  pixel_t             cov_wdata, cov_q, stg_wdata, stg_q;
  logic [BLK_AW-1:0]  cov_waddr, cov_raddr, stg_waddr, stg_raddr;
  logic               cov_wren, cov_rden, stg_wren, stg_rden;

  logic               emb_load;
  pixel_t             emb_rgb, emb_stego;
  logic [MAXBITS-1:0] emb_bits;
  kcfg_t              emb_k;
  logic [3:0]         emb_nbits;                // FSM computes its own count

  stego_fsm #(.BLK_W(8)) u_fsm (
    .clk, .rst_n, .start,
    .seed1, .a1, .c1,
    .seed2(seed2[BLK_AW-1:0]), .a2(a2[BLK_AW-1:0]), .c2(c2[BLK_AW-1:0]),
    .k, .busy, .done, .overflow,
    .sreq, .read_data, .read_ack, .write_ack, .sram_ready,
    .lcg1_load(l1_load), .lcg1_step(l1_step), .lcg1_seed(l1_seed),
    .lcg1_a(l1_a), .lcg1_c(l1_c), .lcg1_m(l1_m), .lcg1_q(l1_q),
    .lcg2_load(l2_load), .lcg2_step(l2_step), .lcg2_seed(l2_seed),
    .lcg2_a(l2_a), .lcg2_c(l2_c), .lcg2_m(l2_m), .lcg2_q(l2_q[BLK_AW-1:0]),
    .key_wdata, .key_waddr, .key_raddr, .key_wren, .key_rden, .key_q,
    .cov_wdata, .cov_waddr, .cov_raddr, .cov_wren, .cov_rden, .cov_q,
    .stg_wdata, .stg_waddr, .stg_raddr, .stg_wren, .stg_rden, .stg_q,
    .emb_load, .emb_rgb, .emb_bits, .emb_k, .emb_stego,
    .msg_len, .rows, .cols, .file_size, .bad_file,
    .blocks_done, .fetch_count, .pad_count, .copy_count, .bit_count
  );

  sram_ctrl #(.AW(SRAM_AW), .DW(SRAM_DW)) u_sram (
    .clk, .rst_n,
    .read_cmd(sreq.read_cmd), .write_cmd(sreq.write_cmd),
    .byte_mode(sreq.byte_mode), .byte_hi(sreq.byte_hi),
    .addr(sreq.addr), .store_data(sreq.store_data),
    .read_data, .read_ack, .write_ack, .ready(sram_ready),
    .sram_addr, .dq_o(sram_dq_o), .dq_oe(sram_dq_oe), .dq_i(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n),
    .lb_n(sram_lb_n), .ub_n(sram_ub_n)
  );

  lcg_prng #(.WIDTH(8)) u_lcc1 (
    .clk, .rst_n, .load(l1_load), .step(l1_step),
    .seed(l1_seed), .a(l1_a), .c(l1_c), .m(l1_m), .q(l1_q)
  );

  lcg_prng #(.WIDTH(8)) u_lcc2 (
    .clk, .rst_n, .load(l2_load), .step(l2_step),
    .seed(8'(l2_seed)), .a(8'(l2_a)), .c(8'(l2_c)), .m(9'(l2_m)), .q(l2_q)
  );

  dp_ram #(.WIDTH(BLK_AW), .DEPTH(BLK_PIX)) u_key_ram (
    .clock(clk), .data(key_wdata), .wraddress(key_waddr), .wren(key_wren),
    .rdaddress(key_raddr), .rden(key_rden), .q(key_q)
  );

  dp_ram #(.WIDTH(PIX_W), .DEPTH(BLK_PIX)) u_cover_ram (
    .clock(clk), .data(cov_wdata), .wraddress(cov_waddr), .wren(cov_wren),
    .rdaddress(cov_raddr), .rden(cov_rden), .q(cov_q)
  );

  dp_ram #(.WIDTH(PIX_W), .DEPTH(BLK_PIX)) u_stego_ram (
    .clock(clk), .data(stg_wdata), .wraddress(stg_waddr), .wren(stg_wren),
    .rdaddress(stg_raddr), .rden(stg_rden), .q(stg_q)
  );

  lsb_embed u_embed (
    .clk, .rst_n, .load(emb_load), .rgb_data(emb_rgb), .msg_bits(emb_bits),
    .k(emb_k), .stego_data(emb_stego), .nbits(emb_nbits)
  );

endmodule
