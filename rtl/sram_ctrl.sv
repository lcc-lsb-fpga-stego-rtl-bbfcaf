// sram_ctrl: controller for a 256K x 16 asynchronous SRAM chip.
//
// Turns single-cycle read and write commands from the FSM into the pin
// sequence of an asynchronous CMOS SRAM: 18-bit address, 16-bit data bus and
// the control pins chip enable, output enable, write enable and the two byte
// lanes (lower/upper byte), which give word or byte writes.  All pins are
// driven from registers, so they change only on clock edges.
//
// User side: while `ready` is high, a one-cycle `read_cmd` or `write_cmd`
// starts an access at `addr`.  A read returns the word on `read_data` with a
// one-cycle `read_ack`; a write ends with a one-cycle `write_ack`.  With
// `byte_mode` set, a write touches only the lane chosen by `byte_hi`
// (`store_data[7:0]` or `store_data[15:8]` carries the byte, on its lane).
//
// Pin side: the bidirectional data bus is split into `dq_o` (driven when
// `dq_oe` is high) and `dq_i`; the pad's tri-state buffer is outside this
// module.  All control pins are active low.
//
// Timing (this design's choice, suited to the 50-200 MHz range the source
// gives for the controller and a 10 ns SRAM): read = 2 clocks from command to
// `read_ack` (1 clock with CE/OE low, data sampled at its end); write = 3
// clocks from command to `write_ack` (1 clock with WE low, 1 clock of data
// hold with WE high).  Commands that arrive while `ready` is low are ignored.
// The signal names read/write command, acknowledge, store and read data
// follow the controller's simulation waveforms.
module sram_ctrl #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // user side
  input  logic          read_cmd,
  input  logic          write_cmd,
  input  logic          byte_mode,
  input  logic          byte_hi,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] store_data,
  output logic [DW-1:0] read_data,
  output logic          read_ack,
  output logic          write_ack,
  output logic          ready,
  // SRAM pins
  output logic [AW-1:0] sram_addr,
  output logic [DW-1:0] dq_o,
  output logic          dq_oe,
  input  logic [DW-1:0] dq_i,
  output logic          ce_n,
  output logic          oe_n,
  output logic          we_n,
  output logic          lb_n,
  output logic          ub_n
);

  typedef enum logic [1:0] {IDLE, RD, WR, WR_HOLD} st_t;
  st_t st;

  assign ready = (st == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      sram_addr <= '0;
      dq_o      <= '0;
      dq_oe     <= 1'b0;
      ce_n      <= 1'b1;
      oe_n      <= 1'b1;
      we_n      <= 1'b1;
      lb_n      <= 1'b1;
      ub_n      <= 1'b1;
      read_data <= '0;
      read_ack  <= 1'b0;
      write_ack <= 1'b0;
    end else begin
      read_ack  <= 1'b0;
      write_ack <= 1'b0;
      unique case (st)
        IDLE: begin
          if (read_cmd) begin
            st        <= RD;
            sram_addr <= addr;
            ce_n      <= 1'b0;
            oe_n      <= 1'b0;
            lb_n      <= 1'b0;
            ub_n      <= 1'b0;
          end else if (write_cmd) begin
            st        <= WR;
            sram_addr <= addr;
            dq_o      <= store_data;
            dq_oe     <= 1'b1;
            ce_n      <= 1'b0;
            we_n      <= 1'b0;
            lb_n      <= byte_mode &  byte_hi;
            ub_n      <= byte_mode & ~byte_hi;
          end
        end
        RD: begin
          read_data <= dq_i;
          read_ack  <= 1'b1;
          ce_n      <= 1'b1;
          oe_n      <= 1'b1;
          lb_n      <= 1'b1;
          ub_n      <= 1'b1;
          st        <= IDLE;
        end
        WR: begin
          we_n      <= 1'b1;       // rising WE ends the write; data held
          st        <= WR_HOLD;
        end
        WR_HOLD: begin
          dq_oe     <= 1'b0;
          ce_n      <= 1'b1;
          lb_n      <= 1'b1;
          ub_n      <= 1'b1;
          write_ack <= 1'b1;
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // A command is either a read or a write, never both.
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              !(read_cmd && write_cmd));
  // Write enable and output enable are never low together.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(!we_n && !oe_n));

endmodule
