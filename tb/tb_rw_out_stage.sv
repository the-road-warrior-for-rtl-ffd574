// tb_rw_out_stage: self-checking test of the delay, flag and output stage.
// A random word stream with idle cycles is fed in together with a random duplicate
// indication on road words. Every word must come out exactly two cycles later with its
// data strobe; road words marked duplicate must carry tag 0xF and nothing else changed;
// end-event words must carry the even parity of the data sent in their event.
`timescale 1ns / 1ps
module tb_rw_out_stage;
  import rw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, dup_in = 0, out_ds;
  svt_word_t in_word = '0, out_word;
  int checks = 0, failures = 0, n_flag = 0, n_ee = 0;
  svt_word_t exp_w [$];
  int exp_t [$];
  int cyc = 0;
  logic par = 0;

  rw_out_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (exp_t.size() != 0 && exp_t[0] == cyc) begin
      svt_word_t e;
      void'(exp_t.pop_front());
      e = exp_w.pop_front();
      if (!out_ds || out_word != e) begin
        failures++; $display("FAIL @%0d: ds=%b out %h expected %h", cyc, out_ds, out_word, e);
      end
    end else if (out_ds) begin
      failures++; $display("FAIL @%0d: unexpected strobe", cyc);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int kind;
      svt_word_t o;
      @(negedge clk);
      kind = $urandom_range(0, 9);
      in_valid = kind != 0;
      in_word = '{ee: (kind == 9), ep: (kind >= 7), data: 21'($urandom)};
      dup_in = (kind == 7 || kind == 8) && $urandom_range(0, 1);
      if (in_valid) begin
        o = in_word;
        if (dup_in) begin o.data[TAG_LSB +: TAG_W] = TAG_DUP; n_flag++; end
        if (o.ee) begin
          o.data[PARITY_BIT] = par;
          par = 0;
          n_ee++;
        end else par ^= ^o.data;
        exp_w.push_back(o);
        exp_t.push_back(cyc + 2);   // seen by the monitor two edges later
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_w.size() != 0 || n_flag == 0 || n_ee == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
