// rw_out_stage: delay, flag and output path of the Road Warrior (pipeline step 6).
//
// Every word leaving the first pipeline register is delayed by one register (d_word) so
// that it lines up with the global match, which is registered alongside as dup_q (dup_in
// is the global match qualified by "this is a road word" and "filter enabled"). The FLAG
// logic builds the flagged version of the word, with the tag field of the road word set
// to TAG_DUP (0xF), and a multiplexer picks the flagged or the unflagged word according
// to dup_q. Before the output register the end-event word gets its parity bit rewritten
// over the words actually sent, so that tagging does not break the event parity.
// Output: out_ds is the data strobe and out_word the word, two cycles after the word was
// in the first register (three after it left the input FIFO). Every input word leaves,
// in order; only duplicate road words are changed. The two registers and the flag
// multiplexer follow the published block diagram; the tag position and the parity
// rewrite are this design's choices.
// The reset also disables the assertion at the end of the module; lint reports that use
// of rst_n as synchronous, while every flip-flop here is reset asynchronously.
module rw_out_stage
  import rw_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  svt_word_t in_word,
  input  logic      dup_in,
  output logic      out_ds,
  output svt_word_t out_word
);
  logic      d_valid, dup_q;
  svt_word_t d_word, flagged, muxed, with_par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      dup_q   <= 1'b0;
      d_word  <= '0;
    end else begin
      d_valid <= in_valid;
      dup_q   <= in_valid && dup_in;
      d_word  <= in_word;
    end
  end

  // FLAG: mark the road as a duplicate for the Track Fitter.
  always_comb begin
    flagged = d_word;
    flagged.data[TAG_LSB +: TAG_W] = TAG_DUP;
  end

  assign muxed = dup_q ? flagged : d_word;

  rw_parity u_par (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (d_valid),
    .in_word  (muxed),
    .word_out (with_par),
    .err      ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ds   <= 1'b0;
      out_word <= '0;
    end else begin
      out_ds   <= d_valid;
      out_word <= with_par;
    end
  end

  // Only road words may be flagged.
  assert property (@(posedge clk) disable iff (!rst_n) dup_q |-> (d_valid && is_road(d_word)));
endmodule
