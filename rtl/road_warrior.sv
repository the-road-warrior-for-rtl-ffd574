// road_warrior: duplicate-road ("ghost") filter for one SVT sector.
//
// The board sits between the Hit Buffer and the Track Fitter. Each road arrives as a
// packet of hit words in layer order closed by a road word (EP set); an event ends with
// an end-event word (EE set). The hits of the packet collect in a temporary register row,
// one location per layer. When the road word reaches the first pipeline register the row
// is complete and is compared, in one cycle, with up to N_PAT patterns stored from earlier
// roads of the same event. A pattern matches when at least 4 of the 5 silicon hits and
// the XFT track are equal (thresholds settable in the mode register). On a match the road
// word is sent on with its tag field set to 0xF, telling the Track Fitter to skip the
// road; otherwise the row is stored into the next free pattern and the road word goes out
// unchanged. The end-event word empties the memory. Every word that enters also leaves,
// in order, three clock cycles after it is read from the input FIFO.
//
// Pipeline (clock cycles after the FIFO read):
//   1  first register s1; the hit is also steered into the temporary register row
//   -  while a road word is in s1: compare, majority, global match, pattern write
//   2  delay register + registered match in the output stage
//   3  flagged/unflagged word in the output register (svt_out_ds, svt_out_word)
// Flow control: svt_in_hold asks the Hit Buffer to stop when the input FIFO is nearly
// full; svt_out_hold from the Track Fitter stops FIFO reads, and up to three words
// already in the pipeline still come out after it rises.
// Structure and latency follow the published block diagram; word format, flow control,
// register map and parity scheme are this design's choices (see rw_pkg and the blocks).
module road_warrior
  import rw_pkg::*;
#(
  parameter int N_PAT       = N_PATTERNS,
  parameter int FIFO_DEPTH  = 64,
  parameter int HOLD_MARGIN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the Hit Buffer
  input  logic        svt_in_ds,
  input  svt_word_t   svt_in_word,
  output logic        svt_in_hold,
  // to the Track Fitter
  output logic        svt_out_ds,
  output svt_word_t   svt_out_word,
  input  logic        svt_out_hold,
  // register port of the VME slave
  input  logic [1:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  output logic [31:0] bus_rdata
);
  // ---- step 1: input FIFO and first register
  logic      fifo_valid, fifo_rd, fifo_ovf;
  svt_word_t fifo_word;

  svt_fifo #(.DEPTH(FIFO_DEPTH), .HOLD_MARGIN(HOLD_MARGIN)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_ds     (svt_in_ds),
    .in_word   (svt_in_word),
    .hold_out  (svt_in_hold),
    .rd_en     (fifo_rd),
    .out_valid (fifo_valid),
    .out_word  (fifo_word),
    .overflow  (fifo_ovf)
  );

  assign fifo_rd = !svt_out_hold;

  logic      s1_valid;
  svt_word_t s1_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_word  <= '0;
    end else begin
      s1_valid <= fifo_rd && fifo_valid;
      s1_word  <= fifo_word;
    end
  end

  // ---- mode registers and input parity check
  rw_mode_t mode;
  logic     par_err, am_full;

  rw_regs u_regs (
    .clk           (clk),
    .rst_n         (rst_n),
    .bus_addr      (bus_addr),
    .bus_wdata     (bus_wdata),
    .bus_we        (bus_we),
    .bus_rdata     (bus_rdata),
    .parity_err    (par_err),
    .am_full       (am_full),
    .fifo_overflow (fifo_ovf),
    .mode          (mode)
  );

  rw_parity u_in_par (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .in_word  (s1_word),
    .word_out (),
    .err      (par_err)
  );

  // ---- steps 2-3: layer demultiplexer and temporary register row
  logic                road_strobe, clear_am, clear_tmp;
  data_t               tmp_hit [N_LAYERS];
  logic [N_LAYERS-1:0] tmp_present;

  assign road_strobe = s1_valid && is_road(s1_word) && mode.enable;
  assign clear_am    = s1_valid && s1_word.ee;
  assign clear_tmp   = s1_valid && (s1_word.ep || s1_word.ee);

  rw_tmp_reg u_tmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (s1_valid),
    .in_word     (s1_word),
    .clear       (clear_tmp),
    .tmp_hit     (tmp_hit),
    .tmp_present (tmp_present)
  );

  // ---- step 4: associative memory, one bank per layer
  logic [N_PAT-1:0] match_lay [N_LAYERS];
  logic [N_PAT-1:0] ce, pat_used, match_pat;
  logic             match;

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_am
    rw_am_layer #(.N_PAT(N_PAT)) u_am (
      .clk         (clk),
      .rst_n       (rst_n),
      .tmp_hit     (tmp_hit[l]),
      .tmp_present (tmp_present[l]),
      .ce          (ce),
      .pat_used    (pat_used),
      .match       (match_lay[l])
    );
  end

  // ---- step 5: match generator
  rw_match_gen #(.N_PAT(N_PAT), .N_LAY(N_LAYERS)) u_match (
    .clk         (clk),
    .rst_n       (rst_n),
    .match_lay   (match_lay),
    .mode        (mode),
    .road_strobe (road_strobe),
    .clear_am    (clear_am),
    .match       (match),
    .match_pat   (match_pat),
    .ce          (ce),
    .pat_used    (pat_used),
    .am_full     (am_full)
  );

  // ---- step 6: delay, flag and output
  rw_out_stage u_out (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .in_word  (s1_word),
    .dup_in   (road_strobe && match),
    .out_ds   (svt_out_ds),
    .out_word (svt_out_word)
  );
endmodule
