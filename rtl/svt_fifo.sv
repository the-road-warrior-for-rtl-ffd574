// svt_fifo: input FIFO of the Road Warrior (the "SVT FIFO" in front of the pipeline).
//
// Words arrive from the Hit Buffer with a data strobe (in_ds) and are written on every
// strobe. The FIFO is first-word-fall-through: out_word shows the oldest word whenever
// out_valid is high, and rd_en pops it on the same clock edge. hold_out is raised when
// HOLD_MARGIN or fewer free places remain, so that an upstream board that needs a few
// cycles to react to hold does not overflow the FIFO; a write into a full FIFO is
// dropped and sets the sticky overflow flag (cleared by reset).
// The published description only says that incoming words are written into a FIFO;
// depth, hold margin and the hold protocol are this design's choices.
// The reset also disables the assertion at the end of the module; lint reports that use
// of rst_n as synchronous, while every flip-flop here is reset asynchronously.
module svt_fifo
  import rw_pkg::*;
#(
  parameter int DEPTH       = 64,
  parameter int HOLD_MARGIN = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_ds,
  input  svt_word_t in_word,
  output logic      hold_out,
  input  logic      rd_en,
  output logic      out_valid,
  output svt_word_t out_word,
  output logic      overflow
);
  localparam int AW = $clog2(DEPTH);

  svt_word_t     mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign out_valid = (count != 0);
  assign out_word  = mem[rptr];
  assign do_rd     = rd_en && out_valid;
  assign do_wr     = in_ds && (count != (AW+1)'(DEPTH) || do_rd);
  assign hold_out  = (count >= (AW+1)'(DEPTH - HOLD_MARGIN));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (in_ds && !do_wr) overflow <= 1'b1;
    end
  end

  // A full FIFO must not be written past its capacity.
  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
