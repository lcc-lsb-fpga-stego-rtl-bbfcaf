// stego_pkg: types and constants shared by the LSB image-steganography core.
//
// A cover pixel is 24 bits wide.  The channel order inside that word follows
// the mask constant of the embedding unit (0xFCF8F8 for k = R3/G3/B2): the
// channel that keeps 2 embedded bits sits in [23:16], so blue is [23:16],
// green [15:8] and red [7:0].  (A BMP file stores the bytes of a pixel in the
// order B, G, R; the FSM reassembles them.)  Images are cut into 8x8 blocks,
// the block size of the embedding algorithm.  The external SRAM is 256K x 16.
// The layout of image and message inside that SRAM is this design's own
// choice: a 24-bit or 8-bit BMP file at the bottom, the message higher up (see the
// layout constants below).
package stego_pkg;

  localparam int unsigned PIX_W      = 24;  // RGB pixel
  localparam int unsigned CH_W       = 8;   // one colour channel
  localparam int unsigned K_W        = 2;   // bits per channel: 0..3
  localparam int unsigned BLK_DIM    = 8;   // 8x8 blocks
  localparam int unsigned BLK_PIX    = BLK_DIM * BLK_DIM;
  localparam int unsigned BLK_AW     = 6;   // log2(BLK_PIX)
  localparam int unsigned MAXBITS    = 9;   // 3 channels x 3 bits
  localparam int unsigned SRAM_AW    = 18;
  localparam int unsigned SRAM_DW    = 16;

  // SRAM layout (16-bit word addresses, little-endian bytes: byte 2w is the
  // low half of word w).  A 24- or 8-bit BMP file from word 0, the message
  // length and message from MSG_LEN_ADDR.
  localparam logic [SRAM_AW-1:0] BMP_SIG      = 18'd0;   // "BM"
  localparam logic [SRAM_AW-1:0] BMP_FSIZE    = 18'd1;   // file size, low 16 bits (byte 2)
  localparam logic [SRAM_AW-1:0] BMP_OFFBITS  = 18'd5;   // pixel data offset, low 16 bits (byte 10)
  localparam logic [SRAM_AW-1:0] BMP_WIDTH    = 18'd9;   // width, low 16 bits (byte 18)
  localparam logic [SRAM_AW-1:0] BMP_HEIGHT   = 18'd11;  // height, low 16 bits (byte 22)
  localparam logic [SRAM_AW-1:0] BMP_BPP      = 18'd14;  // bits per pixel (byte 28)
  localparam logic [15:0]        BMP_MAGIC    = 16'h4D42;
  localparam logic [SRAM_AW-1:0] MSG_LEN_ADDR = 18'h30000; // message length, bytes
  localparam logic [SRAM_AW-1:0] MSG_BASE     = 18'h30001; // two message bytes per word, low byte first

  typedef logic [PIX_W-1:0] pixel_t;

  // Number of secret bits per channel (k_R, k_G, k_B).
  typedef struct packed {
    logic [K_W-1:0] r;
    logic [K_W-1:0] g;
    logic [K_W-1:0] b;
  } kcfg_t;

  // User interface of the SRAM controller: one request at a time.
  typedef struct packed {
    logic                 read_cmd;
    logic                 write_cmd;
    logic                 byte_mode;   // 1: write one byte only
    logic                 byte_hi;     // in byte mode: 1 = upper byte, 0 = lower
    logic [SRAM_AW-1:0]   addr;
    logic [SRAM_DW-1:0]   store_data;
  } sram_req_t;

  // Mask that clears the k LSBs of each channel.
  function automatic pixel_t keep_mask(kcfg_t k);
    logic [CH_W-1:0] mr, mg, mb;
    mr = 8'hFF << k.r;
    mg = 8'hFF << k.g;
    mb = 8'hFF << k.b;
    return {mb, mg, mr};
  endfunction

endpackage
