// rw_tmp_reg: layer demultiplexer and temporary road register (pipeline steps 2 and 3).
//
// Every hit word leaving the first pipeline register is steered by its layer field to
// the register of that layer, so that the register row holds the most recent hit of each
// of the six layers (five silicon layers and the XFT track); a later hit of the same layer
// overwrites the earlier one. Next to each location a present bit records whether the
// current packet has delivered a hit for that layer yet. clear (driven by the road word
// or the end-event word, one cycle after the row was complete) empties the row for the
// next packet. Words with a layer value above 5 are ignored here. Demultiplexing and
// last-hit-wins follow the published description; the present bits and the clearing
// of the row between packets are this design's choice, so that a layer without a hit
// in a road never matches a stored pattern by accident.
module rw_tmp_reg
  import rw_pkg::*;
#(
  parameter int N_LAY = N_LAYERS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  svt_word_t        in_word,
  input  logic             clear,
  output data_t            tmp_hit     [N_LAY],
  output logic [N_LAY-1:0] tmp_present
);
  logic [N_LAY-1:0] sel;

  // 1-to-N_LAY demultiplexer driven by the layer bits of the hit word.
  always_comb begin
    sel = '0;
    if (in_valid && is_hit(in_word))
      for (int l = 0; l < N_LAY; l++)
        sel[l] = (layer_of(in_word.data) == LAYER_W'(l));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmp_present <= '0;
      for (int l = 0; l < N_LAY; l++) tmp_hit[l] <= '0;
    end else if (clear) begin
      tmp_present <= '0;
    end else begin
      for (int l = 0; l < N_LAY; l++)
        if (sel[l]) begin
          tmp_hit[l]     <= in_word.data;
          tmp_present[l] <= 1'b1;
        end
    end
  end
endmodule
