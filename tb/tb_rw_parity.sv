// tb_rw_parity: self-checking test of the event parity unit.
// Random events of random words end with an end-event word whose parity bit is right or
// deliberately wrong. err must pulse exactly on the wrong ones, and word_out must equal
// the input except for the parity bit of the end-event word, which must be the even
// parity of all data bits of the event's earlier words.
`timescale 1ns / 1ps
module tb_rw_parity;
  import rw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, err;
  svt_word_t in_word = '0, word_out;
  int checks = 0, failures = 0, n_err = 0;
  logic par = 0;

  rw_parity dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 300; ev++) begin
      int n;
      n = $urandom_range(0, 20);
      for (int i = 0; i <= n; i++) begin
        svt_word_t e;
        bit bad;
        @(negedge clk);
        in_valid = $urandom_range(0, 4) != 0;
        in_word = '{ee: (i == n), ep: 1'($urandom), data: 21'($urandom)};
        bad = $urandom_range(0, 3) == 0;
        if (i == n) in_word.data[PARITY_BIT] = par ^ bad;
        #1;
        e = in_word;
        if (in_word.ee) e.data[PARITY_BIT] = par;
        checks++;
        if (word_out != e || err != (in_valid && in_word.ee && bad)) begin
          failures++; $display("FAIL: out %h exp %h err %b", word_out, e, err);
        end
        if (err) n_err++;
        if (in_valid) par = in_word.ee ? 1'b0 : par ^ (^in_word.data);
        if (i == n && !in_valid) i--;   // the end-event word must be delivered
      end
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
