// tb_rw_match_gen: self-checking test of the match generator.
// Part 1 drives random per-layer match bits with random modes and checks each pattern's
// majority decision and the global OR against a model (silicon count >= min_si, XFT match
// when required). Part 2 runs road strobes with and without a global match and checks
// that the clock enables fill the patterns in order, one per unmatched road, that
// pat_used grows accordingly, that the memory reports full after all patterns are used
// and stops writing, and that clear_am empties it.
`timescale 1ns / 1ps
module tb_rw_match_gen;
  import rw_pkg::*;
  localparam int NP = N_PATTERNS, NL = N_LAYERS;

  logic clk = 0, rst_n = 0, road_strobe = 0, clear_am = 0;
  logic [NP-1:0] match_lay [NL];
  rw_mode_t mode;
  logic match, am_full;
  logic [NP-1:0] match_pat, ce, pat_used;
  int checks = 0, failures = 0;

  rw_match_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n_hit = 0, n_miss = 0, used;
    mode = '{enable: 1, xft_req: 1, min_si: 3'd4};
    for (int l = 0; l < NL; l++) match_lay[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Part 1: majority and OR
    for (int i = 0; i < 3000; i++) begin
      logic [NP-1:0] exp_p;
      @(negedge clk);
      mode.xft_req = 1'($urandom);
      mode.min_si  = 3'($urandom_range(3, 5));
      for (int l = 0; l < NL; l++)
        match_lay[l] = (i % 2) ? ({$urandom, $urandom} & {$urandom, $urandom})
                               : ({$urandom, $urandom} | {$urandom, $urandom});
      #1;
      for (int p = 0; p < NP; p++) begin
        int n;
        n = 0;
        for (int l = 0; l < NL - 1; l++) n += match_lay[l][p];
        exp_p[p] = (n >= mode.min_si) && (match_lay[NL-1][p] || !mode.xft_req);
      end
      check(match_pat == exp_p, "match_pat");
      check(match == (exp_p != 0), "global match");
      if (exp_p != 0) n_hit++; else n_miss++;
    end
    check(n_hit > 0 && n_miss > 0, "both match outcomes seen");
    // Part 2: pattern counter and clock enables
    mode = '{enable: 1, xft_req: 1, min_si: 3'd4};
    for (int l = 0; l < NL; l++) match_lay[l] = '0;
    for (int ev = 0; ev < 2; ev++) begin
      used = 0;
      for (int r = 0; r < 2 * NP + 20; r++) begin
        bit dup;
        @(negedge clk);
        dup = $urandom_range(0, 3) == 0;
        for (int l = 0; l < NL; l++) match_lay[l] = '0;
        if (dup && used > 0)
          for (int l = 0; l < NL; l++) match_lay[l][$urandom_range(0, used-1)] = 1'b1;
        road_strobe = $urandom_range(0, 4) != 0;
        #1;
        check(am_full == (used == NP), "am_full");
        check(pat_used == ((used == NP) ? '1 : ((NP)'(1) << used) - 1), "pat_used");
        if (road_strobe && !match && used < NP) begin
          check(ce == (NP)'(1) << used, "ce of next pattern");
          used++;
        end else
          check(ce == '0, "no ce");
      end
      @(negedge clk);
      road_strobe = 0;
      clear_am = 1;
      @(negedge clk);
      clear_am = 0;
      #1 check(pat_used == '0 && !am_full, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
