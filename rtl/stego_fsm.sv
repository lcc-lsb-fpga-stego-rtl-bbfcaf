// stego_fsm: FSM processing unit of the LSB steganography core.
//
// Runs the whole embedding of one encrypted message into one colour cover
// image held in external SRAM, block by block:
//   1. SIGNATURE, FILE_SIZE, DATA_OFFSET, COLUMN_SIZE, ROW_SIZE, PIXEL_BITS
//      read the fields of the cover's BMP header ("BM", file size, offset of
//      the pixel data, width, height, bits per pixel) into functional
//      registers; MSG_SIZE reads the message length.  A file that is not
//      "BM" with 24 (colour) or 8 (greyscale) bits per pixel ends the run at
//      once with `bad_file`.  PAD_TEST works out the row stride: 3 bytes
//      (greyscale: 1 byte) per pixel, rounded up to a multiple of 4 bytes,
//      as BMP rows are padded.  A greyscale pixel is handled as a colour
//      pixel with only its R byte used, and takes k_R bits (k_G, k_B
//      ignored); its palette is left alone.
//   2. HIDE_PROCESS loads the seeds into the two LCC generators: generator 1
//      picks 8x8 blocks (modulus = number of blocks), generator 2 the pixels
//      inside a block (modulus 64).  KEY_GEN runs generator 2 for 64 terms
//      and stores this random key sequence in the key RAM; every block then
//      uses its pixels in that stored order (for a full-period generator the
//      same order a free-running generator would give).
//   3. NEXT_ROUND takes the block number from generator 1; SECOND_ROW turns it
//      into the block's first pixel offset; READ_W0/READ_W1 copy the block's
//      64 pixels from SRAM into the cover-block RAM.
//   4. For 64 pixels in key-sequence order: PIXEL_START fetches message words
//      when the bit buffer runs short (SECRET_DATA, a stall), PIXEL_BG hands
//      the pixel and the next k_R+k_G+k_B message bits to the embedding unit,
//      PROCESS writes the stego pixel into the stego-block RAM.
//   5. WRITE_0/WRITE_1 copy the stego block back over the cover block in
//      SRAM.  A pixel's 3 bytes span two words: one is written whole, the
//      other with a byte-mode write, so neighbouring bytes are not touched.
//      A greyscale pixel is one read and one byte-mode write.
//   6. STEG_END when the message is used up, or when every block has been
//      used (then `overflow` is set and the rest of the message is dropped).
// At `start` the seeds, LCG constants and k are copied into general-purpose
// registers, so the inputs may change while the run goes on; the run also
// counts the message bits it has embedded (`bit_count`).
// The state names come from the synthesized state diagram of the source; the
// order of the states, the conditions between them and all timing are this
// design's own.  When the last message bits do not fill a pixel the missing
// bits are zeros (PIXEL_BG counts these pixels in pad_count); pixels after the end of the
// message are copied unchanged.
//
// SRAM layout (stego_pkg): the BMP file from word 0 (byte 2w = low half of
// word w), message length at MSG_LEN_ADDR and the message after it, two bytes
// per word, low byte first, bits taken LSB first.  Pixel (row, col), rows
// counted in file order (the first stored row, the bottom one, is row 0),
// starts at byte offbits + row*stride + 3*col.  Only whole 8x8 blocks are
// used; leftover rows and columns and the row padding are left as they are.
// With more than 2^BLK_W blocks only the first 2^BLK_W (in raster order) are
// used.  Only the low 16 bits of the 32-bit header fields are read.

// Timing, with the sram_ctrl latencies (read 3 FSM cycles, write 4): per
// block 2 + 64*6 (load) + 64*3 (embed) + 64*10 (store) = 1218 cycles, plus 4
// per message word fetched; a greyscale block takes 2 + 64*3 + 64*3 + 64*6 =
// 770; per run 90 cycles more (seven header reads, key
// sequence, end).  A rejected file ends after 5 (signature) or 20 (pixel
// depth) cycles.
module stego_fsm
  import stego_pkg::*;
#(
  parameter int unsigned BLK_W = 8     // width of the block generator
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control and configuration
  input  logic                 start,
  input  logic [BLK_W-1:0]     seed1, a1, c1,
  input  logic [BLK_AW-1:0]    seed2, a2, c2,
  input  kcfg_t                k,
  output logic                 busy,
  output logic                 done,
  output logic                 overflow,
  // SRAM controller, user side
  output sram_req_t            sreq,
  input  logic [SRAM_DW-1:0]   read_data,
  input  logic                 read_ack,
  input  logic                 write_ack,
  input  logic                 sram_ready,
  // LCC generator 1 (blocks)
  output logic                 lcg1_load, lcg1_step,
  output logic [BLK_W-1:0]     lcg1_seed, lcg1_a, lcg1_c,
  output logic [BLK_W:0]       lcg1_m,
  input  logic [BLK_W-1:0]     lcg1_q,
  // LCC generator 2 (pixels)
  output logic                 lcg2_load, lcg2_step,
  output logic [BLK_AW-1:0]    lcg2_seed, lcg2_a, lcg2_c,
  output logic [BLK_AW:0]      lcg2_m,
  input  logic [BLK_AW-1:0]    lcg2_q,
  // key-sequence RAM (pixel order)
  output logic [BLK_AW-1:0]    key_wdata,
  output logic [BLK_AW-1:0]    key_waddr, key_raddr,
  output logic                 key_wren, key_rden,
  input  logic [BLK_AW-1:0]    key_q,
  // cover-block RAM
  output pixel_t               cov_wdata,
  output logic [BLK_AW-1:0]    cov_waddr, cov_raddr,
  output logic                 cov_wren, cov_rden,
  input  pixel_t               cov_q,
  // stego-block RAM
  output pixel_t               stg_wdata,
  output logic [BLK_AW-1:0]    stg_waddr, stg_raddr,
  output logic                 stg_wren, stg_rden,
  input  pixel_t               stg_q,
  // data embedding unit
  output logic                 emb_load,
  output pixel_t               emb_rgb,
  output logic [MAXBITS-1:0]   emb_bits,
  output kcfg_t                emb_k,
  input  pixel_t               emb_stego,
  // status
  output logic [15:0]          msg_len,
  output logic [15:0]          rows,
  output logic [15:0]          cols,
  output logic [15:0]          file_size,
  output logic                 bad_file,
  output logic [BLK_W:0]       blocks_done,
  output logic [31:0]          fetch_count,
  output logic [15:0]          pad_count,
  output logic [31:0]          copy_count,
  output logic [19:0]          bit_count      // message bits embedded
);

  typedef enum logic [4:0] {
    IDLE, SIGNATURE, FILE_SIZE, DATA_OFFSET, COLUMN_SIZE, ROW_SIZE,
    PIXEL_BITS, MSG_SIZE, PAD_TEST, HIDE_PROCESS, KEY_GEN, NEXT_ROUND,
    SECOND_ROW, READ_W0, READ_W1, PIXEL_START, SECRET_DATA, PIXEL_BG,
    PROCESS, WRITE, WRITE_RD, WRITE_0, WRITE_1, STEG_END
  } state_t;

  state_t               st;
  logic                 pend;          // SRAM command accepted, waiting for ack
  logic [BLK_AW-1:0]    idx;           // pixel counter inside a block
  logic [BLK_AW-1:0]    pix;           // pixel chosen by the key sequence
  logic [15:0]          w0;            // first word of a pixel being loaded
  logic [31:0]          blk_base;      // byte offset of block's first pixel
  logic [15:0]          offbits;       // byte offset of the pixel data
  logic [17:0]          stride;        // bytes per stored row
  logic [BLK_W-1:0]     blk_idx;
  logic [BLK_W:0]       nblk;          // blocks used
  logic [SRAM_AW-1:0]   msg_addr;
  logic [19:0]          fetch_left;    // message bits not yet fetched
  logic [31:0]          bbuf;          // message bit buffer, LSB next
  logic [5:0]           bcnt;          // valid bits in bbuf
  kcfg_t                k_cur;         // k of the pixel in the embedding unit
  // general-purpose registers: LCC seeds and constants, k, captured at start
  logic [BLK_W-1:0]     gp_seed1, gp_a1, gp_c1;
  logic [BLK_AW-1:0]    gp_seed2, gp_a2, gp_c2;
  kcfg_t                k_reg;
  logic                 gray;          // 8-bit greyscale cover (else 24-bit)
  logic                 nb_run;        // a block is being processed

  // ---------------------------------------------------------------- helpers
  logic [3:0]  need;
  kcfg_t       k_eff;                // k as used: greyscale takes only k_R
  logic [1:0]  bpb;                  // bytes per pixel
  logic [12:0] nbx, nby;
  logic [25:0] nblocks;
  logic [31:0] pix_off;
  logic [SRAM_AW-1:0] pix_addr;      // word holding the pixel's first byte
  logic               pix_odd;       // pixel starts in the upper byte
  logic [15:0] fetch_bits;
  logic [15:0] fetch_mask;
  logic [12:0] br, bc;

  always_comb begin
    k_eff    = gray ? kcfg_t'({k_reg.r, 2'd0, 2'd0}) : k_reg;
    bpb      = gray ? 2'd1 : 2'd3;
    need     = 4'(k_eff.r) + 4'(k_eff.g) + 4'(k_eff.b);
    nbx      = cols[15:3];
    nby      = rows[15:3];
    nblocks  = 26'(nbx) * 26'(nby);
    br       = (nbx == '0) ? '0 : 13'(13'(blk_idx) / nbx);
    bc       = (nbx == '0) ? '0 : 13'(13'(blk_idx) % nbx);
    pix_off  = blk_base + 32'(idx[5:3]) * 32'(stride) + 32'(idx[2:0]) * 32'(bpb);
    pix_addr = SRAM_AW'(pix_off >> 1);
    pix_odd  = pix_off[0];
    fetch_bits = (fetch_left >= 20'd16) ? 16'd16 : 16'(fetch_left);
    fetch_mask = (fetch_left >= 20'd16) ? 16'hFFFF : 16'((17'd1 << fetch_bits) - 17'd1);
  end

  // ------------------------------------------------------- SRAM requests
  always_comb begin
    sreq = '0;
    unique case (st)
      SIGNATURE:   begin sreq.read_cmd = !pend; sreq.addr = BMP_SIG;      end
      FILE_SIZE:   begin sreq.read_cmd = !pend; sreq.addr = BMP_FSIZE;    end
      DATA_OFFSET: begin sreq.read_cmd = !pend; sreq.addr = BMP_OFFBITS;  end
      COLUMN_SIZE: begin sreq.read_cmd = !pend; sreq.addr = BMP_WIDTH;    end
      ROW_SIZE:    begin sreq.read_cmd = !pend; sreq.addr = BMP_HEIGHT;   end
      PIXEL_BITS:  begin sreq.read_cmd = !pend; sreq.addr = BMP_BPP;      end
      MSG_SIZE:    begin sreq.read_cmd = !pend; sreq.addr = MSG_LEN_ADDR; end
      READ_W0:     begin sreq.read_cmd = !pend; sreq.addr = pix_addr;   end
      READ_W1:     begin sreq.read_cmd = !pend; sreq.addr = pix_addr + 1'b1; end
      SECRET_DATA: begin sreq.read_cmd = !pend; sreq.addr = msg_addr;   end
      // stg_q = {B, G, R}; file byte order B, G, R; greyscale value in R
      WRITE_0: begin                       // even: {G,B} whole; odd: B high byte
        sreq.write_cmd  = !pend;
        sreq.addr       = pix_addr;
        sreq.byte_mode  = pix_odd || gray;
        sreq.byte_hi    = pix_odd || !gray;
        if (gray)
          sreq.store_data = {stg_q[7:0], stg_q[7:0]};
        else
          sreq.store_data = pix_odd ? {stg_q[23:16], 8'h00} : {stg_q[15:8], stg_q[23:16]};
      end
      WRITE_1: begin                       // even: R low byte; odd: {R,G} whole
        sreq.write_cmd  = !pend;
        sreq.addr       = pix_addr + 1'b1;
        sreq.byte_mode  = !pix_odd;
        sreq.byte_hi    = 1'b0;
        sreq.store_data = pix_odd ? {stg_q[7:0], stg_q[15:8]} : {8'h00, stg_q[7:0]};
      end
      default: ;
    endcase
  end

  // ------------------------------------------------ datapath connections
  assign lcg1_seed = gp_seed1;
  assign lcg1_a    = gp_a1;
  assign lcg1_c    = gp_c1;
  assign lcg1_m    = nblk;
  assign lcg2_seed = gp_seed2;
  assign lcg2_a    = gp_a2;
  assign lcg2_c    = gp_c2;
  assign lcg2_m    = (BLK_AW+1)'(BLK_PIX);
  assign lcg1_load = (st == HIDE_PROCESS);
  assign lcg2_load = (st == HIDE_PROCESS);
  assign lcg1_step = (st == NEXT_ROUND) && nb_run;
  assign lcg2_step = (st == KEY_GEN);

  assign key_wdata = lcg2_q;
  assign key_waddr = idx;
  assign key_wren  = (st == KEY_GEN);
  // next pixel's key is read while the current one is processed; the first
  // one while the last cover pixel arrives
  assign key_raddr = (st == PROCESS) ? idx + 1'b1 : '0;
  assign key_rden  = (st == PROCESS) ||
                     (cov_wren && (idx == BLK_AW'(BLK_PIX - 1)));

  // w0 = first word, read_data = second word of the pixel (greyscale: the
  // one word holding the pixel's byte, kept in the R position)
  always_comb begin
    if (gray)
      cov_wdata = {16'h0000, pix_odd ? read_data[15:8] : read_data[7:0]};
    else
      cov_wdata = pix_odd ? {w0[15:8], read_data[7:0], read_data[15:8]}
                          : {w0[7:0],  w0[15:8],       read_data[7:0]};
  end
  assign cov_waddr = idx;
  assign cov_wren  = read_ack && ((st == READ_W1) || (st == READ_W0 && gray));
  assign cov_raddr = key_q;
  assign cov_rden  = (st == PIXEL_START) && !(bcnt < 6'(need) && fetch_left != '0);

  assign emb_load  = (st == PIXEL_BG);
  assign emb_rgb   = cov_q;
  assign emb_bits  = bbuf[MAXBITS-1:0];
  assign emb_k     = (st == PIXEL_BG) ? ((bcnt == '0) ? kcfg_t'('0) : k_eff) : k_cur;

  assign stg_wdata = emb_stego;
  assign stg_waddr = pix;
  assign stg_wren  = (st == PROCESS);
  assign stg_raddr = idx;
  assign stg_rden  = (st == WRITE);

  assign busy = (st != IDLE);

  always_comb begin
    nb_run = 1'b0;
    if (st == NEXT_ROUND)
      nb_run = !((bcnt == '0) && (fetch_left == '0)) && (blocks_done != nblk);
  end

  // ------------------------------------------------------------ the FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= IDLE;
      pend        <= 1'b0;
      idx         <= '0;
      pix         <= '0;
      w0          <= '0;
      offbits     <= '0;
      stride      <= '0;
      file_size   <= '0;
      bad_file    <= 1'b0;
      blk_base    <= '0;
      blk_idx     <= '0;
      nblk        <= '0;
      msg_addr    <= '0;
      fetch_left  <= '0;
      bbuf        <= '0;
      bcnt        <= '0;
      k_cur       <= '0;
      gp_seed1    <= '0;
      gp_a1       <= '0;
      gp_c1       <= '0;
      gp_seed2    <= '0;
      gp_a2       <= '0;
      gp_c2       <= '0;
      k_reg       <= '0;
      gray        <= 1'b0;
      bit_count   <= '0;
      msg_len     <= '0;
      rows        <= '0;
      cols        <= '0;
      blocks_done <= '0;
      fetch_count <= '0;
      pad_count   <= '0;
      copy_count  <= '0;
      done        <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      if ((sreq.read_cmd || sreq.write_cmd) && sram_ready) pend <= 1'b1;
      if (read_ack || write_ack)                            pend <= 1'b0;

      unique case (st)
        IDLE: if (start) begin
          st          <= SIGNATURE;
          bad_file    <= 1'b0;
          gp_seed1    <= seed1;
          gp_a1       <= a1;
          gp_c1       <= c1;
          gp_seed2    <= seed2;
          gp_a2       <= a2;
          gp_c2       <= c2;
          k_reg       <= k;
          bit_count   <= '0;
          done        <= 1'b0;
          overflow    <= 1'b0;
          blocks_done <= '0;
          fetch_count <= '0;
          pad_count   <= '0;
          copy_count  <= '0;
        end
        SIGNATURE: if (read_ack) begin
          if (read_data == BMP_MAGIC) st <= FILE_SIZE;
          else begin bad_file <= 1'b1; st <= STEG_END; end
        end
        FILE_SIZE:   if (read_ack) begin file_size <= read_data; st <= DATA_OFFSET; end
        DATA_OFFSET: if (read_ack) begin offbits   <= read_data; st <= COLUMN_SIZE; end
        COLUMN_SIZE: if (read_ack) begin cols      <= read_data; st <= ROW_SIZE;    end
        ROW_SIZE:    if (read_ack) begin rows      <= read_data; st <= PIXEL_BITS;  end
        PIXEL_BITS:  if (read_ack) begin
          gray <= (read_data == 16'd8);
          if (read_data == 16'd24 || read_data == 16'd8) st <= MSG_SIZE;
          else begin bad_file <= 1'b1; st <= STEG_END; end
        end
        MSG_SIZE:    if (read_ack) begin msg_len   <= read_data; st <= PAD_TEST;    end
        PAD_TEST: begin
          stride <= (18'(cols) * 18'(bpb) + 18'd3) & ~18'd3;
          st     <= HIDE_PROCESS;
        end
        HIDE_PROCESS: begin
          nblk       <= (nblocks > 26'(1 << BLK_W)) ? (BLK_W+1)'(1 << BLK_W)
                                                    : (BLK_W+1)'(nblocks);
          msg_addr   <= MSG_BASE;
          fetch_left <= 20'({msg_len, 3'b000});
          bbuf       <= '0;
          bcnt       <= '0;
          idx        <= '0;
          st         <= KEY_GEN;
        end
        KEY_GEN: begin
          idx <= idx + 1'b1;
          if (idx == BLK_AW'(BLK_PIX - 1)) st <= NEXT_ROUND;
        end
        NEXT_ROUND: begin
          if (nb_run) begin
            blk_idx <= lcg1_q;
            st      <= SECOND_ROW;
          end else begin
            overflow <= (blocks_done == nblk) &&
                        !((bcnt == '0) && (fetch_left == '0));
            st       <= STEG_END;
          end
        end
        SECOND_ROW: begin
          blk_base <= 32'(offbits) + ((32'(br) * 32'(stride) + 32'(bc) * 32'(bpb)) << 3);
          idx      <= '0;
          st       <= READ_W0;
        end
        READ_W0: if (read_ack) begin
          w0 <= read_data;
          if (gray) begin
            idx <= idx + 1'b1;
            st  <= (idx == BLK_AW'(BLK_PIX - 1)) ? PIXEL_START : READ_W0;
          end else begin
            st  <= READ_W1;
          end
        end
        READ_W1: if (read_ack) begin
          idx <= idx + 1'b1;
          st  <= (idx == BLK_AW'(BLK_PIX - 1)) ? PIXEL_START : READ_W0;
        end
        PIXEL_START: begin
          if (bcnt < 6'(need) && fetch_left != '0) begin
            st <= SECRET_DATA;
          end else begin
            pix <= key_q;
            st  <= PIXEL_BG;
          end
        end
        SECRET_DATA: if (read_ack) begin
          bbuf        <= bbuf | (32'(read_data & fetch_mask) << bcnt);
          bcnt        <= bcnt + 6'(fetch_bits);
          fetch_left  <= fetch_left - 20'(fetch_bits);
          msg_addr    <= msg_addr + 1'b1;
          fetch_count <= fetch_count + 1'b1;
          st          <= PIXEL_START;
        end
        PIXEL_BG: begin
          // PAD_TEST: fewer bits left than the pixel takes
          if (bcnt == '0) begin
            k_cur      <= '0;
            copy_count <= copy_count + 1'b1;
          end else begin
            k_cur <= k_eff;
            bit_count <= bit_count + ((bcnt < 6'(need)) ? 20'(bcnt) : 20'(need));
            if (bcnt < 6'(need)) begin
              pad_count <= pad_count + 1'b1;
              bcnt      <= '0;
              bbuf      <= '0;
            end else begin
              bcnt <= bcnt - 6'(need);
              bbuf <= bbuf >> need;
            end
          end
          st <= PROCESS;
        end
        PROCESS: begin
          idx <= idx + 1'b1;
          st  <= (idx == BLK_AW'(BLK_PIX - 1)) ? WRITE : PIXEL_START;
        end
        WRITE:    st <= WRITE_RD;
        WRITE_RD: st <= WRITE_0;
        WRITE_0:  if (write_ack && !gray) begin
          st <= WRITE_1;
        end else if (write_ack) begin      // greyscale: one byte per pixel
          idx <= idx + 1'b1;
          if (idx == BLK_AW'(BLK_PIX - 1)) begin
            blocks_done <= blocks_done + 1'b1;
            st          <= NEXT_ROUND;
          end else begin
            st <= WRITE;
          end
        end
        WRITE_1:  if (write_ack) begin
          idx <= idx + 1'b1;
          if (idx == BLK_AW'(BLK_PIX - 1)) begin
            blocks_done <= blocks_done + 1'b1;
            st          <= NEXT_ROUND;
          end else begin
            st <= WRITE;
          end
        end
        STEG_END: begin
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // One SRAM command at a time: no command while the previous one is pending.
  a_one_at_a_time: assert property (@(posedge clk) disable iff (!rst_n)
                                    pend |-> !(sreq.read_cmd || sreq.write_cmd));
  // The message bit buffer never holds more than 24 valid bits.
  a_bits_fit: assert property (@(posedge clk) disable iff (!rst_n)
                               bcnt <= 6'd24);

endmodule
