// rw_regs: working-mode and status registers of the Road Warrior.
//
// A simple synchronous register port (address, write data, write strobe, combinational
// read data) stands for the board's VME slave, which is outside this design.
// Address map (32-bit registers):
//   0 MODE    bit 0 enable (reset 1), bit 1 xft_req (reset 1), bits 4:2 min_si (reset 4)
//   1 PARERR  number of input events whose parity was wrong (16 bits); any write clears it
//   2 STATUS  bit 0 associative memory full now, bit 1 input FIFO overflowed (sticky)
// The published description says that the working mode can be changed over VME and that
// parity is checked; which settings exist, the address map and the counter are this
// design's choices.
module rw_regs
  import rw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  output logic [31:0] bus_rdata,
  input  logic        parity_err,
  input  logic        am_full,
  input  logic        fifo_overflow,
  output rw_mode_t    mode
);
  logic [15:0] par_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= '{enable: 1'b1, xft_req: 1'b1, min_si: 3'd4};
      par_cnt <= '0;
    end else begin
      if (bus_we && bus_addr == 2'd0) mode <= '{enable: bus_wdata[0], xft_req: bus_wdata[1], min_si: bus_wdata[4:2]};
      if (bus_we && bus_addr == 2'd1) par_cnt <= '0;
      else if (parity_err && par_cnt != '1) par_cnt <= par_cnt + 1'b1;
    end
  end

  always_comb begin
    case (bus_addr)
      2'd0:    bus_rdata = {27'd0, mode.min_si, mode.xft_req, mode.enable};
      2'd1:    bus_rdata = {16'd0, par_cnt};
      2'd2:    bus_rdata = {30'd0, fifo_overflow, am_full};
      default: bus_rdata = '0;
    endcase
  end
endmodule
