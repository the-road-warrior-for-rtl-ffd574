// rw_match_gen: match generator and pattern write control (pipeline step 5).
//
// For every pattern p the six per-layer compare bits match_lay[l][p] go to a majority
// cell: the pattern matches when at least mode.min_si of the five silicon layers match
// and, when mode.xft_req is set, the XFT layer matches as well (default: 4 of 5 plus
// XFT). The N_PAT pattern results are ORed into the global match. Everything up to
// here is combinational and is evaluated while the road word sits in the first pipeline
// register (road_strobe high), when the temporary register is complete.
// If road_strobe is high and there is no global match, the clock enable of the next
// free pattern register is raised: a counter points at that register and advances,
// and pat_used, one bit per pattern, records which patterns have been written and may
// take part in comparisons. When all N_PAT patterns are used further roads are neither
// stored nor matched against anything new (am_full). clear_am (end of event) empties the
// memory. Majority, OR, counter and clock-enable follow the published description; the
// run-time thresholds and the full behaviour are this design's choices.
// The reset also disables the assertion at the end of the module; lint reports that use
// of rst_n as synchronous, while every flip-flop here is reset asynchronously.
module rw_match_gen
  import rw_pkg::*;
#(
  parameter int N_PAT = N_PATTERNS,
  parameter int N_LAY = N_LAYERS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_PAT-1:0] match_lay [N_LAY],
  input  rw_mode_t         mode,
  input  logic             road_strobe,
  input  logic             clear_am,
  output logic             match,
  output logic [N_PAT-1:0] match_pat,
  output logic [N_PAT-1:0] ce,
  output logic [N_PAT-1:0] pat_used,
  output logic             am_full
);
  localparam int CW = $clog2(N_PAT);
  localparam int XL = N_LAY - 1;    // the XFT layer is the last one

  logic [CW-1:0] next_pat;

  // a: majority logic, one cell per pattern
  always_comb begin
    for (int p = 0; p < N_PAT; p++) begin
      logic [3:0] n_si;
      n_si = '0;
      for (int l = 0; l < XL; l++) n_si += 4'(match_lay[l][p]);
      match_pat[p] = (n_si >= 4'(mode.min_si)) && (match_lay[XL][p] || !mode.xft_req);
    end
  end

  // b: global OR
  assign match = |match_pat;

  // c: clock enable of the next free pattern register
  always_comb begin
    ce = '0;
    if (road_strobe && !match && !am_full) ce[next_pat] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_pat <= '0;
      am_full  <= 1'b0;
      pat_used <= '0;
    end else if (clear_am) begin
      next_pat <= '0;
      am_full  <= 1'b0;
      pat_used <= '0;
    end else if (ce != '0) begin
      pat_used <= pat_used | ce;
      if (next_pat == CW'(N_PAT-1)) am_full <= 1'b1;
      else next_pat <= next_pat + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ce));
endmodule
