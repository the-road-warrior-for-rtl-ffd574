// rw_parity: event parity of an SVT word stream, checked and regenerated.
//
// The unit accumulates the XOR of all data bits of every word of an event. On the
// end-event word it compares the parity bit carried there (bit PARITY_BIT) with the
// accumulated value and pulses err for one cycle if they differ; word_out is the input
// word with that parity bit replaced by the accumulated value. Placed at the input it
// checks the parity sent by the Hit Buffer; placed at the output it rewrites the parity
// so that it stays valid after road words have been tagged. The accumulator restarts
// after each end-event word. All of this is combinational on the word, with a single
// register for the accumulator. The published description only says the firmware
// includes parity checking; the even-parity-per-event scheme and the bit position are
// this design's choices.
module rw_parity
  import rw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  svt_word_t in_word,
  output svt_word_t word_out,
  output logic      err
);
  logic acc;

  always_comb begin
    word_out = in_word;
    err      = 1'b0;
    if (in_word.ee) begin
      word_out.data[PARITY_BIT] = acc;
      err = in_valid && (in_word.data[PARITY_BIT] != acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             acc <= 1'b0;
    else if (in_valid) begin
      if (in_word.ee)       acc <= 1'b0;
      else                  acc <= acc ^ (^in_word.data);
    end
  end
endmodule
