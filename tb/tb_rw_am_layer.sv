// tb_rw_am_layer: self-checking test of one associative-memory layer.
// Hits are drawn from a small value set so that matches are frequent. Each cycle a random
// clock enable may load the temporary hit into one pattern register, and a random
// pat_used mask selects which patterns may compare. The 64 match outputs are checked
// against a model of the stored patterns: a match needs the pattern in use, both hits
// present and the two words equal.
`timescale 1ns / 1ps
module tb_rw_am_layer;
  import rw_pkg::*;
  localparam int NP = N_PATTERNS;

  logic clk = 0, rst_n = 0;
  data_t tmp_hit = '0;
  logic tmp_present = 0;
  logic [NP-1:0] ce = '0, pat_used = '0, match;
  int checks = 0, failures = 0;
  data_t m_hit [NP];
  logic [NP-1:0] m_pres = '0;
  int n_match = 0;

  rw_am_layer dut (.*);

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
      logic [NP-1:0] exp_m;
      @(negedge clk);
      tmp_hit     = 21'($urandom_range(0, 7));
      tmp_present = $urandom_range(0, 7) != 0;
      pat_used    = {$urandom, $urandom} | {$urandom, $urandom};
      ce          = '0;
      if ($urandom_range(0, 1)) ce[$urandom_range(0, NP-1)] = 1'b1;
      #1;
      for (int p = 0; p < NP; p++)
        exp_m[p] = pat_used[p] && m_pres[p] && tmp_present && (m_hit[p] == tmp_hit);
      checks++;
      if (match != exp_m) begin
        failures++; $display("FAIL: match %h expected %h", match, exp_m);
      end
      n_match += $countones(exp_m);
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        if (ce[p]) begin m_hit[p] = tmp_hit; m_pres[p] = tmp_present; end
    end
    checks++;
    if (n_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
