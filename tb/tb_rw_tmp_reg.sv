// tb_rw_tmp_reg: self-checking test of the layer demultiplexer and temporary register.
// Random packets of hit words (with repeated layers, out-of-range layer values and idle
// cycles) are fed in; after each word the register row and its present bits must equal
// a model in which each layer keeps its last hit. A road word or end-event word with
// clear must empty the row, and road/end-event words must never be stored as hits.
`timescale 1ns / 1ps
module tb_rw_tmp_reg;
  import rw_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  svt_word_t in_word = '0;
  data_t tmp_hit [N_LAYERS];
  logic [N_LAYERS-1:0] tmp_present;
  int checks = 0, failures = 0;
  data_t m_hit [N_LAYERS];
  logic [N_LAYERS-1:0] m_pres = '0;
  int n_overwrite = 0, n_clear = 0;

  rw_tmp_reg dut (.*);

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
    for (int i = 0; i < 5000; i++) begin
      int kind;
      @(negedge clk);
      kind = $urandom_range(0, 9);
      in_valid = (kind != 0);
      in_word.data = 21'($urandom);
      in_word.ee = (kind == 9);
      in_word.ep = (kind == 8) || (kind == 9);
      clear = in_valid && (in_word.ep || in_word.ee);
      @(posedge clk);
      #1;
      if (clear) begin
        m_pres = '0;
        n_clear++;
      end else if (in_valid && !in_word.ep && !in_word.ee) begin
        int l;
        l = int'(in_word.data[LAYER_LSB +: LAYER_W]);
        if (l < N_LAYERS) begin
          if (m_pres[l]) n_overwrite++;
          m_hit[l] = in_word.data;
          m_pres[l] = 1;
        end
      end
      checks++;
      if (tmp_present != m_pres) begin
        failures++; $display("FAIL: present %b expected %b", tmp_present, m_pres);
      end
      for (int l = 0; l < N_LAYERS; l++)
        if (m_pres[l]) begin
          checks++;
          if (tmp_hit[l] != m_hit[l]) begin
            failures++; $display("FAIL: layer %0d hit %h expected %h", l, tmp_hit[l], m_hit[l]);
          end
        end
    end
    checks++;
    if (n_overwrite == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
