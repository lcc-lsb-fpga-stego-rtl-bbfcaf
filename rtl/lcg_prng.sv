// lcg_prng: linear congruential pseudo-random number generator.
//
// Produces the sequence X(n+1) = (A * X(n) + C) mod M.  The datapath is the
// one of the generator's RTL view: a multiplier, an adder and a modulo unit
// feed one input of a 2:1 multiplexer whose other input is the seed; the
// multiplexer drives an enabled, clearable state register.  A, C and M are
// run-time inputs, so the same hardware serves both the block-selection and
// the pixel-selection sequence.
//
// Interface: `load` copies `seed` into the state; `step` advances it by one
// term.  `load` wins when both are high.  `q` is the current term X(n).
// Timing: the new term appears on `q` one clock after `step`.
//
// This design's choices: the register width (8 bits) is the width the RTL
// view prints; M is one bit wider so that M = 256 (every 8-bit value) can be
// used, and M = 0 is read as modulus 2^WIDTH.  A full-period sequence needs
// the Hull-Dobell conditions (C coprime to M, A-1 divisible by every prime
// factor of M and by 4 if 4 divides M); the generator does not check them.
// The seed should be below M.  Reset is asynchronous,
// active low, to zero.
module lcg_prng #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             step,
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH:0]   m,
  output logic [WIDTH-1:0] q
);

  logic [2*WIDTH-1:0] prod;    // A*X, full width
  logic [2*WIDTH:0]   lin;     // A*X + C, full width
  logic [WIDTH:0]     modded;  // below M, so it fits WIDTH+1 bits
  logic [WIDTH-1:0]   nxt;

  always_comb begin
    prod = {{WIDTH{1'b0}}, a} * {{WIDTH{1'b0}}, q};
    lin  = {1'b0, prod} + {{(WIDTH+1){1'b0}}, c};
    if (m == '0) modded = {1'b0, lin[WIDTH-1:0]};
    else         modded = (WIDTH+1)'(lin % {{WIDTH{1'b0}}, m});
    nxt = modded[WIDTH-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= seed;
    else if (step) q <= nxt;
  end

endmodule
