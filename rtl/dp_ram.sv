// dp_ram: simple dual-port on-chip RAM (one write port, one read port).
//
// Models an FPGA block RAM configured as a simple dual-port memory: a write
// and a read can happen in the same clock because each port has its own
// address and enable.  The port names and the default size (32 words of
// 8 bits, 5-bit addresses) are those of the on-chip memory instance the
// design shows; the core instantiates larger copies of it for the cover
// block (RGB pixels) and the stego block.
//
// Timing: the write happens on the clock edge where `wren` is high.  The read
// is synchronous: `q` shows word `rdaddress` one clock after `rden` and holds
// its value while `rden` is low.  A read of the address being written in the
// same clock returns the old word (this design's choice).  Contents are not
// reset, as in a block RAM.
module dp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clock,
  input  logic [WIDTH-1:0] data,
  input  logic [AW-1:0]    wraddress,
  input  logic             wren,
  input  logic [AW-1:0]    rdaddress,
  input  logic             rden,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clock) begin
    if (wren) mem[wraddress] <= data;
    if (rden) q <= mem[rdaddress];
  end

endmodule
