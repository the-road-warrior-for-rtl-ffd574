// rw_am_layer: one layer of the Road Warrior associative memory (pipeline step 4).
//
// Holds N_PAT pattern registers for one detector layer. Each register stores the hit of
// this layer from a past road, with a present bit telling whether that road had a hit in
// this layer. ce[p] loads the temporary register of this layer into pattern p. All N_PAT
// comparators run in parallel and combinationally: match[p] is high when pattern p is in
// use (pat_used[p], i.e. written since the event began), both locations hold a hit, and
// the two hit words are equal. The register/comparator structure, the clock enables and
// the "only written patterns compare" rule follow the published description; the present
// bits are this design's addition for roads with a missing layer.
module rw_am_layer
  import rw_pkg::*;
#(
  parameter int N_PAT = N_PATTERNS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            tmp_hit,
  input  logic             tmp_present,
  input  logic [N_PAT-1:0] ce,
  input  logic [N_PAT-1:0] pat_used,
  output logic [N_PAT-1:0] match
);
  data_t            pat_hit [N_PAT];
  logic [N_PAT-1:0] pat_present;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pat_present <= '0;
      for (int p = 0; p < N_PAT; p++) pat_hit[p] <= '0;
    end else begin
      for (int p = 0; p < N_PAT; p++)
        if (ce[p]) begin
          pat_hit[p]     <= tmp_hit;
          pat_present[p] <= tmp_present;
        end
    end
  end

  always_comb
    for (int p = 0; p < N_PAT; p++)
      match[p] = pat_used[p] && pat_present[p] && tmp_present && (pat_hit[p] == tmp_hit);
endmodule
