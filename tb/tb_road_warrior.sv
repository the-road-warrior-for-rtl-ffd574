// tb_road_warrior: end-to-end test of the Road Warrior at its default sizes.
//
// Random events are built from "tracks": each track gives a 5-of-5 road and/or several
// 4-of-5 roads (one silicon layer missing) that share the same hits, mixed with unrelated
// roads, roads whose XFT track differs, packets with two hits in one layer (the later one
// must count) and one event with more distinct roads than the memory holds. A reference
// model written here, independent of the RTL, predicts every output word: duplicates get
// the tag 0xF, the memory is emptied at end of event, the end-event parity bit is
// recomputed over the words sent. The Track Fitter side applies random hold bursts so
// that the input FIFO fills and raises hold towards the source; the source obeys hold
// three cycles late. The mode register is exercised (filter off, 5-of-5 required, XFT not
// required) and wrong input parity is injected and read back from the error counter.
// The latency from input strobe to output strobe of a lone word is checked (4 cycles:
// one to write the FIFO, three through the pipeline). Every mechanism is counted and
// one that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_road_warrior;
  import rw_pkg::*;

  localparam int NP = N_PATTERNS;

  logic        clk = 0, rst_n = 0;
  logic        in_ds = 0, in_hold, out_ds, out_hold = 0;
  svt_word_t   in_word = '0, out_word;
  logic [1:0]  bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic        bus_we = 0;

  road_warrior dut (
    .clk (clk), .rst_n (rst_n),
    .svt_in_ds (in_ds), .svt_in_word (in_word), .svt_in_hold (in_hold),
    .svt_out_ds (out_ds), .svt_out_word (out_word), .svt_out_hold (out_hold),
    .bus_addr (bus_addr), .bus_wdata (bus_wdata), .bus_we (bus_we), .bus_rdata (bus_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- mechanism counters
  int n_dup = 0, n_stored = 0, n_full_skip = 0, n_ee_clear = 0, n_last_hit = 0;
  int n_in_hold = 0, n_out_hold = 0, n_disabled = 0, n_par_err = 0, n_minsi5 = 0;
  int n_noxft = 0;

  // ---------------- reference model state
  typedef struct {
    data_t hit [N_LAYERS];
    logic [N_LAYERS-1:0] pres;
  } row_t;

  row_t     tmp_row;
  row_t     pats [$];
  svt_word_t exp_q [$];
  logic     out_par, in_par;
  int       exp_par_err = 0;
  logic     m_enable = 1, m_xft = 1;
  int       m_min_si = 4;

  function automatic bit row_match(row_t a, row_t b);
    int n = 0;
    for (int l = 0; l < N_LAYERS - 1; l++)
      if (a.pres[l] && b.pres[l] && a.hit[l] == b.hit[l]) n++;
    return (n >= m_min_si) &&
           (!m_xft || (a.pres[N_LAYERS-1] && b.pres[N_LAYERS-1] &&
                       a.hit[N_LAYERS-1] == b.hit[N_LAYERS-1]));
  endfunction

  // Model one input word; push the word the board must send.
  task automatic model_word(svt_word_t w);
    svt_word_t o = w;
    if (w.ee) begin
      if (w.data[PARITY_BIT] != in_par) exp_par_err++;
      o.data[PARITY_BIT] = out_par;
      pats.delete();
      tmp_row.pres = '0;
      in_par = 0; out_par = 0;
    end else begin
      in_par ^= ^w.data;
      if (w.ep) begin
        if (m_enable) begin
          bit m = 0;
          foreach (pats[i]) if (row_match(pats[i], tmp_row)) m = 1;
          if (m) begin
            o.data[TAG_LSB +: TAG_W] = TAG_DUP;
            n_dup++;
          end else if (pats.size() < NP) begin
            pats.push_back(tmp_row);
            n_stored++;
          end else n_full_skip++;
        end else n_disabled++;
        tmp_row.pres = '0;
      end else begin
        int l = int'(w.data[LAYER_LSB +: LAYER_W]);
        if (l < N_LAYERS) begin
          if (tmp_row.pres[l]) n_last_hit++;
          tmp_row.hit[l] = w.data;
          tmp_row.pres[l] = 1;
        end
      end
      out_par ^= ^o.data;
    end
    exp_q.push_back(o);
  endtask

  // ---------------- stimulus construction
  svt_word_t stream [$];

  function automatic data_t mk_hit(int l, logic [17:0] v);
    data_t d = '0;
    d[LAYER_LSB +: LAYER_W] = LAYER_W'(l);
    d[17:0] = v;
    return d;
  endfunction

  task automatic add_road(data_t h [N_LAYERS], int skip, bit dbl);
    for (int l = 0; l < N_LAYERS; l++) begin
      if (l == skip) continue;
      if (dbl && l == 2) stream.push_back('{ee: 0, ep: 0, data: mk_hit(l, 18'($urandom))});
      stream.push_back('{ee: 0, ep: 0, data: h[l]});
    end
    stream.push_back('{ee: 0, ep: 1, data: {4'h0, 17'($urandom)}});
  endtask

  task automatic new_track(output data_t h [N_LAYERS]);
    for (int l = 0; l < N_LAYERS; l++) h[l] = mk_hit(l, 18'($urandom));
  endtask

  // Build one event into stream. kind 0: normal mix, 1: overflow of the memory.
  task automatic build_event(int kind, bit bad_parity);
    data_t h [N_LAYERS], h2 [N_LAYERS];
    logic par = 0;
    int ntr;
    if (kind == 1) begin
      for (int r = 0; r < NP + 6; r++) begin
        new_track(h);
        add_road(h, -1, 0);
      end
      add_road(h, 2, 0);      // repeat of the last road: caught only if it was stored
    end else begin
      ntr = 1 + $urandom_range(0, 5);
      for (int t = 0; t < ntr; t++) begin
        new_track(h);
        case ($urandom_range(0, 6))
          0: add_road(h, -1, 0);                                   // lone 5/5
          1: begin add_road(h, -1, 0); add_road(h, $urandom_range(0, 4), 0); end
          2: begin add_road(h, $urandom_range(0, 4), 0); add_road(h, -1, 0); end
          3: begin add_road(h, 0, 0); add_road(h, 3, $urandom_range(0, 1)); add_road(h, -1, 1); end
          6: begin add_road(h, -1, 0); add_road(h, -1, 1); end     // same 5/5 road twice
          4: begin                                                // XFT differs
            h2 = h;
            h2[N_LAYERS-1] = mk_hit(N_LAYERS-1, 18'($urandom));
            add_road(h, -1, 0); add_road(h2, -1, 0);
          end
          default: begin                                          // two layers differ
            h2 = h;
            h2[1] = mk_hit(1, 18'($urandom));
            add_road(h, -1, 0); add_road(h2, 4, 0); add_road(h2, -1, 0);
          end
        endcase
      end
    end
    // end-event word with correct (or deliberately wrong) parity
    begin
      svt_word_t ee = '{ee: 1, ep: 1, data: 21'($urandom)};
      for (int i = 0; i < stream.size(); i++) par ^= ^stream[i].data;
      ee.data[PARITY_BIT] = par ^ bad_parity;
      stream.push_back(ee);
    end
  endtask

  // ---------------- drivers and monitor
  logic [2:0] hold_d;   // the source sees hold three cycles late
  always @(posedge clk) hold_d <= {hold_d[1:0], in_hold};
  always @(posedge clk) if (in_hold && !hold_d[0]) n_in_hold++;

  logic drain_mode = 0;
  // Track Fitter hold: random bursts
  int hold_left = 0;
  always @(negedge clk) begin
    if (drain_mode) out_hold <= 0;
    else if (hold_left > 0) begin
      hold_left--;
      out_hold <= 1;
    end else begin
      out_hold <= 0;
      if ($urandom_range(0, 99) < 3) begin
        hold_left = $urandom_range(5, 80);
        n_out_hold++;
      end
    end
  end

  task automatic send_stream();
    while (stream.size() > 0) begin
      @(negedge clk);
      if (hold_d[2] || $urandom_range(0, 9) == 0) begin
        in_ds <= 0;
      end else begin
        svt_word_t w = stream.pop_front();
        model_word(w);
        in_ds   <= 1;
        in_word <= w;
      end
    end
    @(negedge clk) in_ds <= 0;
  endtask

  always @(posedge clk) if (rst_n && out_ds) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output word %h", out_word);
    end else begin
      svt_word_t e;
      e = exp_q.pop_front();
      if (out_word !== e) begin
        failures++;
        $display("FAIL @%0d: out %h expected %h", cycle, out_word, e);
      end
    end
  end

  task automatic drain();
    drain_mode = 1;
    repeat (20) @(posedge clk);
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    drain_mode = 0;
  endtask

  task automatic bus_write(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    bus_addr <= a; bus_wdata <= d; bus_we <= 1;
    @(negedge clk);
    bus_we <= 0;
  endtask

  task automatic set_mode(bit en, bit xft, int min_si);
    bus_write(2'd0, {27'd0, 3'(min_si), xft, en});
    m_enable = en; m_xft = xft; m_min_si = min_si;
    @(negedge clk);
    bus_addr <= 2'd0;
    #1 checks++;
    if (bus_rdata[4:0] !== {3'(min_si), xft, en}) begin
      failures++; $display("FAIL: mode readback %h", bus_rdata);
    end
  endtask

  // ---------------- watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main sequence
  initial begin
    tmp_row.pres = '0;
    out_par = 0;
    in_par = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    drain_mode = 1;
    repeat (2) @(posedge clk);

    // Latency of a lone word: strobe in -> strobe out
    begin
      longint t0;
      svt_word_t w;
      w = '{ee: 0, ep: 0, data: mk_hit(0, 18'h155)};
      @(negedge clk);
      model_word(w);
      in_ds <= 1; in_word <= w;
      @(posedge clk) t0 = cycle;
      @(negedge clk) in_ds <= 0;
      while (!out_ds) @(posedge clk);
      checks++;
      if (cycle - t0 != 4) begin
        failures++; $display("FAIL: latency %0d cycles, expected 4", cycle - t0);
      end
      // close that event so the parity state is clean
      stream.push_back('{ee: 1, ep: 1, data: '0});
      stream[0].data[PARITY_BIT] = ^w.data;
      send_stream();
      drain();
    end
    drain_mode = 0;

    // Default mode: many random events, some with wrong parity, one overflow event
    for (int e = 0; e < 300; e++) begin
      build_event((e == 40 || e == 200) ? 1 : 0, (e % 37) == 5);
      send_stream();
      n_ee_clear++;
    end
    drain();
    // Same tracks again in a new event must not be flagged: covered by fresh random
    // hits per event; here an explicit check that a repeated event is not flagged at all.
    begin
      data_t h [N_LAYERS];
      int d0;
      new_track(h);
      for (int k = 0; k < 2; k++) begin
        logic par;
        svt_word_t ee;
        par = 0;
        ee = '{ee: 1, ep: 1, data: '0};
        add_road(h, -1, 0);
        foreach (stream[i]) par ^= ^stream[i].data;
        ee.data[PARITY_BIT] = par;
        stream.push_back(ee);
        d0 = n_dup;
        send_stream();
        checks++;
        if (n_dup != d0) begin failures++; $display("FAIL: model flagged across events"); end
      end
      drain();
    end

    // Filter switched off: nothing is flagged
    set_mode(0, 1, 4);
    for (int e = 0; e < 20; e++) begin build_event(0, 0); send_stream(); end
    drain();
    // Only 5-of-5 silicon matches count
    set_mode(1, 1, 5);
    begin
      int d0;
      d0 = n_dup;
      for (int e = 0; e < 30; e++) begin build_event(0, 0); send_stream(); end
      drain();
      n_minsi5 = n_dup - d0;
    end
    // XFT not required
    set_mode(1, 0, 4);
    begin
      int d0;
      d0 = n_dup;
      for (int e = 0; e < 30; e++) begin build_event(0, 0); send_stream(); end
      drain();
      n_noxft = n_dup - d0;
    end
    set_mode(1, 1, 4);

    // Parity error counter
    @(negedge clk) bus_addr <= 2'd1;
    #1 checks++;
    n_par_err = int'(bus_rdata[15:0]);
    if (n_par_err != exp_par_err) begin
      failures++; $display("FAIL: parity errors %0d expected %0d", n_par_err, exp_par_err);
    end
    bus_write(2'd1, 0);
    @(negedge clk) bus_addr <= 2'd1;
    #1 checks++;
    if (bus_rdata[15:0] != 0) begin failures++; $display("FAIL: parity counter not cleared"); end
    @(negedge clk) bus_addr <= 2'd2;
    #1 checks++;
    if (bus_rdata[1] != 0) begin failures++; $display("FAIL: FIFO overflowed"); end

    // every expected word came out
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d words missing", exp_q.size()); end

    $display("mechanisms: dup=%0d stored=%0d full_skip=%0d events=%0d last_hit=%0d in_hold=%0d out_hold=%0d disabled=%0d par_err=%0d dup_min5=%0d dup_noxft=%0d",
             n_dup, n_stored, n_full_skip, n_ee_clear, n_last_hit, n_in_hold, n_out_hold,
             n_disabled, n_par_err, n_minsi5, n_noxft);
    begin
      int m [11];
      m = '{n_dup, n_stored, n_full_skip, n_ee_clear, n_last_hit, n_in_hold,
                     n_out_hold, n_disabled, n_par_err, n_minsi5, n_noxft};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
