// lsb_embed: LSB substitution of secret bits into one 24-bit RGB pixel.
//
// Function register A holds the cover pixel and function register B the
// secret bits, already moved to their bit positions.  The stego pixel is
// (A AND mask) OR B: the AND clears the k least significant bits of every
// channel and the OR fills them with secret bits.  This is the cascaded
// AND-OR structure of the embedding unit, whose printed mask constant
// 16578808 = 0xFCF8F8 is what keep_mask() returns for k = R3/G3/B2.
//
// Variable-bit embedding: k_R, k_G, k_B (0..3 each) are inputs.  The secret
// bits arrive LSB first on `msg_bits`; bit 0 goes to the red LSB, the next
// k_R-1 bits fill red upward, then green, then blue.  `nbits` is the number
// of message bits one pixel takes (k_R + k_G + k_B).
//
// Timing: `load` captures the pixel and the secret bits; `stego_data` is
// valid from the next clock until the next `load`.
//
// Following the source: the A/B registers, the 24-bit AND-OR and the mask.
// This design's choices: channel order {B,G,R} (the order that matches the
// printed mask), LSB-first bit distribution and k limited to 3.
module lsb_embed
  import stego_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  pixel_t               rgb_data,
  input  logic [MAXBITS-1:0]   msg_bits,
  input  kcfg_t                k,
  output pixel_t               stego_data,
  output logic [3:0]           nbits
);

  pixel_t reg_a, reg_b;
  pixel_t secret_pos;

  // Spread msg_bits over the three channels according to k.
  always_comb begin
    logic [MAXBITS-1:0] rest;
    logic [CH_W-1:0]    sr, sg, sb;
    rest = msg_bits;
    sr   = CH_W'(rest) & ~(8'hFF << k.r);
    rest = rest >> k.r;
    sg   = CH_W'(rest) & ~(8'hFF << k.g);
    rest = rest >> k.g;
    sb   = CH_W'(rest) & ~(8'hFF << k.b);
    secret_pos = {sb, sg, sr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
    end else if (load) begin
      reg_a <= rgb_data;
      reg_b <= secret_pos;
    end
  end

  assign stego_data = (reg_a & keep_mask(k)) | reg_b;
  assign nbits      = 4'(k.r) + 4'(k.g) + 4'(k.b);

endmodule
