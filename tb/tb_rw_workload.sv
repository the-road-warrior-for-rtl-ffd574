// tb_rw_workload: the Road Warrior under a typical SVT event load, at default sizes.
//
// Each event holds 30 hit combinations, half of them ghosts. There are 15 real tracks,
// and each gives one 5-of-5 road plus one 4-of-5 road that shares four of its hits;
// the order within a pair and the missing layer are random. Words are sent back to back
// at one per clock with no hold on either side. The test checks:
//  * exactly the 15 ghosts of each event are tagged (0xF) and no real road is;
//  * the stream is not slowed: the last word of the run leaves 4 cycles after the last
//    word went in, so the pipeline accepted one word on every clock;
//  * every word comes out unchanged apart from the tags and the end-event parity bit.
// It also prints the Track Fitter time saved, at 300 ns per fit.
`timescale 1ns / 1ps
module tb_rw_workload;
  import rw_pkg::*;

  localparam int N_EVENTS = 200, N_TRACKS = 15;

  logic        clk = 0, rst_n = 0;
  logic        in_ds = 0, in_hold, out_ds;
  svt_word_t   in_word = '0, out_word;
  logic [31:0] bus_rdata;

  road_warrior dut (
    .clk (clk), .rst_n (rst_n),
    .svt_in_ds (in_ds), .svt_in_word (in_word), .svt_in_hold (in_hold),
    .svt_out_ds (out_ds), .svt_out_word (out_word), .svt_out_hold (1'b0),
    .bus_addr (2'd0), .bus_wdata (32'd0), .bus_we (1'b0), .bus_rdata (bus_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // words sent, with a flag telling whether a road word must come out tagged
  svt_word_t sent_q [$];
  bit        ghost_q [$];
  int        n_out = 0, n_tagged = 0, n_ghosts = 0, n_roads = 0;
  longint    t_last_in = 0, t_last_out = 0;
  logic      out_par = 0;

  function automatic data_t mk_hit(int l);
    data_t d;
    d = 21'($urandom);
    d[LAYER_LSB +: LAYER_W] = LAYER_W'(l);
    return d;
  endfunction

  task automatic put(svt_word_t w, bit ghost);
    sent_q.push_back(w);
    ghost_q.push_back(ghost);
  endtask

  task automatic put_road(data_t h [N_LAYERS], int skip, bit ghost);
    svt_word_t w;
    for (int l = 0; l < N_LAYERS; l++)
      if (l != skip) begin
        w = '{ee: 0, ep: 0, data: h[l]};
        put(w, 0);
      end
    w = '{ee: 0, ep: 1, data: {4'h0, 17'($urandom)}};
    put(w, ghost);
    n_roads++;
    if (ghost) n_ghosts++;
  endtask

  // monitor: compare against the sent stream
  always @(posedge clk) if (rst_n && out_ds) begin
    svt_word_t e;
    bit g;
    n_out++;
    t_last_out = cycle;
    checks++;
    if (sent_q.size() == 0) begin
      failures++; $display("FAIL: unexpected word");
    end else begin
      e = sent_q.pop_front();
      g = ghost_q.pop_front();
      if (g) e.data[TAG_LSB +: TAG_W] = TAG_DUP;
      if (e.ee) begin
        e.data[PARITY_BIT] = out_par;
        out_par = 0;
      end else out_par ^= ^e.data;
      if (out_word != e) begin
        failures++; $display("FAIL @%0d: out %h expected %h", cycle, out_word, e);
      end
      if (is_road(out_word) && out_word.data[TAG_LSB +: TAG_W] == TAG_DUP) n_tagged++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    svt_word_t stream [$];
    int n_in;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // build the whole run first, then send it back to back
    for (int ev = 0; ev < N_EVENTS; ev++) begin
      data_t h [N_LAYERS];
      svt_word_t ee;
      logic par;
      int first;
      first = sent_q.size();
      for (int t = 0; t < N_TRACKS; t++) begin
        int skip;
        for (int l = 0; l < N_LAYERS; l++) h[l] = mk_hit(l);
        skip = $urandom_range(0, 4);
        if ($urandom_range(0, 1)) begin put_road(h, -1, 0); put_road(h, skip, 1); end
        else                      begin put_road(h, skip, 0); put_road(h, -1, 1); end
      end
      par = 0;
      for (int i = first; i < sent_q.size(); i++) par ^= ^sent_q[i].data;
      ee = '{ee: 1, ep: 1, data: 21'($urandom)};
      ee.data[PARITY_BIT] = par;
      put(ee, 0);
    end
    stream = sent_q;
    n_in = stream.size();
    foreach (stream[i]) begin
      @(negedge clk);
      if (in_hold) begin failures++; $display("FAIL: hold raised at full rate"); end
      in_ds = 1;
      in_word = stream[i];
      @(posedge clk) t_last_in = cycle;
    end
    @(negedge clk) in_ds = 0;
    repeat (20) @(posedge clk);

    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL: %0d words out of %0d", n_out, n_in); end
    checks++;
    if (n_tagged != n_ghosts) begin
      failures++; $display("FAIL: %0d roads tagged, %0d ghosts", n_tagged, n_ghosts);
    end
    checks++;
    if (t_last_out - t_last_in != 4) begin
      failures++; $display("FAIL: last word out %0d cycles after last in", t_last_out - t_last_in);
    end
    $display("workload: %0d events, %0d roads, %0d ghosts tagged (%0d%%), %0d words in %0d cycles",
             N_EVENTS, n_roads, n_tagged, 100 * n_tagged / n_roads, n_in, t_last_out);
    $display("workload: fits saved per event at 300 ns each: %0d ns",
             300 * n_tagged / N_EVENTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
