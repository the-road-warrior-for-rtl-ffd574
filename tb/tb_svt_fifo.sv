// tb_svt_fifo: self-checking test of the input FIFO.
// A random writer and a random reader run against a queue model: every word read must be
// the oldest one written, out_valid must track the occupancy, hold_out must rise exactly
// when HOLD_MARGIN or fewer places are free, and a write into a full FIFO must be dropped
// and set the overflow flag. Small depth keeps the run short.
`timescale 1ns / 1ps
module tb_svt_fifo;
  import rw_pkg::*;
  localparam int DEPTH = 8, MARGIN = 3;

  logic clk = 0, rst_n = 0, in_ds = 0, rd_en = 0;
  logic hold_out, out_valid, overflow;
  svt_word_t in_word = '0, out_word;
  int checks = 0, failures = 0;
  svt_word_t model [$];
  bit ovf_model = 0;
  int n_full = 0, n_hold = 0;

  svt_fifo #(.DEPTH(DEPTH), .HOLD_MARGIN(MARGIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      bit phase_fill;
      phase_fill = (i / 300) % 2 == 0;
      @(negedge clk);
      // combinational outputs against the model
      check(out_valid == (model.size() != 0), "out_valid");
      check(hold_out == (model.size() >= DEPTH - MARGIN), "hold_out");
      check(overflow == ovf_model, "overflow");
      if (model.size() != 0) check(out_word == model[0], "out_word");
      if (model.size() == DEPTH) n_full++;
      if (hold_out) n_hold++;
      in_ds   = $urandom_range(0, 99) < (phase_fill ? 70 : 30);
      in_word = '{ee: 1'($urandom), ep: 1'($urandom), data: 21'($urandom)};
      rd_en   = $urandom_range(0, 99) < (phase_fill ? 30 : 70);
      @(posedge clk);
      #1;
      begin
        bit rd, wr;
        rd = rd_en && model.size() != 0;
        wr = in_ds && (model.size() != DEPTH || rd);
        if (in_ds && !wr) ovf_model = 1;
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(in_word);
      end
    end
    check(n_full > 0, "FIFO never full");
    check(n_hold > 0, "hold never raised");
    check(ovf_model, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
