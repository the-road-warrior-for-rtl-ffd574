// rw_pkg: types and constants shared by the Road Warrior duplicate-road filter.
//
// The Road Warrior sits between the SVT Hit Buffer and the Track Fitter and sees the
// SVT word stream: per road a packet of hit words (one or more per detector layer,
// in layer order) closed by a road word, and per event an end-event word.
// An SVT word is modelled as 21 data bits plus two framing bits: EP (end of packet,
// set on the road word) and EE (end of event). The 21-bit width, the EP/EE framing
// and the field positions below are this design's choices; the layer field and the
// duplicate tag value 0xF on the road word follow the published description.
package rw_pkg;

  // Width of the data part of an SVT word.
  localparam int DATA_W = 21;

  // Layers of a road: five silicon layers (0..4) plus the XFT track (layer 5, the last).
  localparam int N_LAYERS  = 6;

  // Number of stored patterns in the associative memory.
  localparam int N_PATTERNS = 64;

  // Layer field of a hit word.
  localparam int LAYER_LSB = 18;
  localparam int LAYER_W   = 3;

  // Tag field of a road word; TAG_DUP marks a duplicate ("ghost") road.
  localparam int         TAG_LSB = 17;
  localparam int         TAG_W   = 4;
  localparam logic [3:0] TAG_DUP = 4'hF;

  // Bit of the end-event word that carries the event's even parity.
  localparam int PARITY_BIT = 8;

  typedef logic [DATA_W-1:0] data_t;

  typedef struct packed {
    logic  ee;    // end of event
    logic  ep;    // end of packet (road word)
    data_t data;
  } svt_word_t;

  // Working-mode settings, written through the register interface.
  typedef struct packed {
    logic       enable;    // 1: flag duplicate roads, 0: pass the stream unchanged
    logic       xft_req;   // 1: the XFT layer must match
    logic [2:0] min_si;    // silicon layers (of 5) that must match
  } rw_mode_t;

  function automatic logic [LAYER_W-1:0] layer_of(data_t d);
    return d[LAYER_LSB +: LAYER_W];
  endfunction

  function automatic logic is_hit(svt_word_t w);
    return !w.ep && !w.ee;
  endfunction

  function automatic logic is_road(svt_word_t w);
    return w.ep && !w.ee;
  endfunction

endpackage
