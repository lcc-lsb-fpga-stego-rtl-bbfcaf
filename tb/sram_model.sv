// sram_model: behavioural model of a 256K x 16 asynchronous SRAM chip with
// byte lanes, for simulation only.  Reads are combinational (zero access
// time) while CE and OE are low; a write to the enabled lanes happens at the
// rising edge of WE while CE is low.  The bidirectional data bus is modelled
// as separate in/out buses.  Testbenches load and inspect it through `mem`.
module sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_w,     // bus as driven by the controller
  output logic [DW-1:0] dq_r,     // bus as driven by the SRAM
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          lb_n,
  input  logic          ub_n
);
  logic [DW-1:0] mem [2**AW];

  always_comb dq_r = (!ce_n && !oe_n) ? mem[addr] : '0;

  always @(posedge we_n) begin
    if (!ce_n) begin
      if (!lb_n) mem[addr][7:0]  <= dq_w[7:0];
      if (!ub_n) mem[addr][15:8] <= dq_w[15:8];
    end
  end
endmodule
