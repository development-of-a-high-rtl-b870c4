// tb_retina_top: end-to-end test of the track processor at its default size
// (10 x 20 = 200 engines, 6 input lines).
//
// The testbench builds the switching-network table from the cell geometry, generates
// events of 1..6 straight tracks (one hit per layer, with +-2 strips of smearing) plus
// random noise hits, and packs them into input words with each layer on its own line.
// A reference model recomputes, for every event actually accepted by the processor, the
// weight of every cell, the thresholded local maxima and therefore the expected track
// list with the interpolated sub-cell offsets, which the output stream must reproduce
// exactly.
// Phases: (1) spaced events from the external input, each checked for the exact latency
// of max(k,1)+9 cycles from the accepted end-of-event to the event's last output record
// and for less than 100 cycles;
// (2) back-to-back external events, checking one accepted word per cycle while not
// stalled; (3) the same kind of events replayed three times from the event memory with a
// low threshold, so that the output falls behind and the input is stalled; (4) back to
// the external input. Mechanisms counted: multi-line input words, stalls, memory replay
// and wrap-around, source switching, maxima rejected by the threshold, ties resolved,
// tracks with non-zero sub-cell offsets.
module tb_retina_top;
  import ar_pkg::*;

  localparam int LINES = 6, NU = 10, NV = 20, NE = NU * NV;
  localparam int MAXH = 64, MAXW = 16;

  logic clk = 0, rst_n = 0;
  logic src_sel;
  logic ext_valid;
  logic [LINES-1:0] ext_hvalid;
  hit_t ext_hit [LINES];
  logic ext_eoe;
  logic in_ready;
  logic mem_wr_en;
  logic [9:0] mem_wr_addr;
  logic [LINES-1:0] mem_wr_valid;
  hit_t mem_wr_hit [LINES];
  logic mem_wr_eoe;
  logic mem_run;
  logic [10:0] mem_length;
  logic [31:0] mem_loops;
  logic lut_we;
  logic [7:0] lut_addr;
  logic [NE-1:0] lut_data;
  logic [ACC_W-1:0] threshold;
  logic trk_valid, trk_track, trk_eoe;
  logic [3:0] trk_iu;
  logic [4:0] trk_iv;
  logic [ACC_W-1:0] trk_w;
  logic [15:0] trk_event;
  logic [7:0] trk_ntracks;
  logic signed [7:0] trk_du, trk_dv;
  logic overflow;

  retina_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cycle, msg);
  endtask

  // ---------------- geometry, as the reference understands it ----------------
  function automatic int xexp(int iu, int iv, int l);
    int u, v;
    u = 32 + 96 * iu;
    v = 24 + 48 * iv;
    return u + ((v - u) * l) / 5;
  endfunction

  // ---------------- event generation ----------------
  int g_nw;                          // words of the generated event
  logic [LINES-1:0] g_v [MAXW];
  int g_l [MAXW][LINES];
  int g_x [MAXW][LINES];
  logic g_e [MAXW];

  task automatic gen_event(int ntrk, int nnoise);
    int cnt [LINES];
    for (int l = 0; l < LINES; l++) cnt[l] = 0;
    for (int w = 0; w < MAXW; w++) begin
      g_v[w] = '0;
      g_e[w] = 0;
      for (int l = 0; l < LINES; l++) begin g_l[w][l] = l; g_x[w][l] = 0; end
    end
    for (int t = 0; t < ntrk; t++) begin
      int u, v;
      u = $urandom_range(40, 900);
      v = $urandom_range(30, 930);
      for (int l = 0; l < LINES; l++) begin
        int x;
        x = u + ((v - u) * l) / 5 + $urandom_range(0, 4) - 2;
        if (x < 0) x = 0;
        if (x > 1023) x = 1023;
        g_x[cnt[l]][l] = x;
        g_v[cnt[l]][l] = 1'b1;
        cnt[l]++;
      end
    end
    for (int n = 0; n < nnoise; n++) begin
      int l;
      l = $urandom_range(0, LINES - 1);
      if (cnt[l] < MAXW) begin
        g_x[cnt[l]][l] = $urandom_range(0, 1023);
        g_v[cnt[l]][l] = 1'b1;
        cnt[l]++;
      end
    end
    g_nw = 1;
    for (int l = 0; l < LINES; l++) if (cnt[l] > g_nw) g_nw = cnt[l];
    g_e[g_nw - 1] = 1;
  endtask

  // ---------------- reference model on the accepted input ----------------
  int cur_n = 0;
  int cur_l [MAXH*2];
  int cur_x [MAXH*2];
  int exp_idx [$];
  int exp_w [$];
  int exp_du [$];
  int exp_dv [$];
  int exp_cnt [$];
  int exp_t [$];
  bit exp_idle [$];
  int events_in = 0;

  // mechanism counters
  int n_multiline = 0, n_stall = 0, n_mem_events = 0, n_ext_events = 0, n_switch = 0;
  int n_interp = 0, n_below_thr = 0, n_ties = 0, n_tracks = 0, n_exact_lat = 0, max_lat = 0;

  function automatic void reference(int t_acc);
    int w [NE];
    int k;
    for (int e = 0; e < NE; e++) begin
      int iu, iv;
      iu = e / NV;
      iv = e % NV;
      w[e] = 0;
      for (int h = 0; h < cur_n; h++) begin
        int d;
        d = cur_x[h] - xexp(iu, iv, cur_l[h]);
        if (d < 0) d = -d;
        if (d < 32) w[e] += (1024 - d * d) / 4;
      end
      if (w[e] > 65535) w[e] = 65535;
    end
    k = 0;
    for (int e = 0; e < NE; e++) begin
      int iu, iv;
      bit m, tie;
      iu = e / NV;
      iv = e % NV;
      m = 1;
      tie = 0;
      for (int a = iu - 1; a <= iu + 1; a++)
        for (int b = iv - 1; b <= iv + 1; b++) begin
          int n;
          if (a < 0 || a >= NU || b < 0 || b >= NV || (a == iu && b == iv)) continue;
          n = a * NV + b;
          if (n < e && !(w[e] > w[n])) m = 0;
          if (n > e && w[e] < w[n]) m = 0;
          if (n > e && w[e] == w[n]) tie = 1;
        end
      if (m && w[e] > 0 && w[e] <= int'(threshold)) n_below_thr++;
      if (m && w[e] > int'(threshold)) begin
        exp_idx.push_back(e);
        exp_w.push_back(w[e]);
        begin
          longint up, um, vp, vm, tot;
          up = 0; um = 0; vp = 0; vm = 0; tot = 0;
          for (int a = -1; a <= 1; a++)
            for (int b = -1; b <= 1; b++) begin
              int nw;
              nw = (iu + a >= 0 && iu + a < NU && iv + b >= 0 && iv + b < NV) ? w[(iu + a) * NV + iv + b] : 0;
              tot += nw;
              if (a == 1) up += nw;
              if (a == -1) um += nw;
              if (b == 1) vp += nw;
              if (b == -1) vm += nw;
            end
          exp_du.push_back(int'(((up - um) * 128) / tot));
          exp_dv.push_back(int'(((vp - vm) * 128) / tot));
        end
        k++;
        if (tie) n_ties++;
      end
    end
    exp_cnt.push_back(k);
    exp_t.push_back(t_acc);
    exp_idle.push_back(exp_cnt.size() == 1);
  endfunction

  always @(posedge clk) begin
    if (rst_n && dut.accept) begin
      int nv;
      nv = 0;
      for (int l = 0; l < LINES; l++)
        if (dut.sel_hvalid[l]) begin
          cur_l[cur_n] = int'(dut.sel_hit[l].layer);
          cur_x[cur_n] = int'(dut.sel_hit[l].x);
          cur_n++;
          nv++;
        end
      if (nv > 1) n_multiline++;
      if (dut.sel_eoe) begin
        reference(cycle);
        cur_n = 0;
        events_in++;
        if (src_sel) n_mem_events++; else n_ext_events++;
      end
    end
    if (rst_n && !in_ready && (src_sel ? dut.src_valid : ext_valid)) n_stall++;
  end

  // ---------------- output checker ----------------
  int trk_in_event = 0, events_out = 0;
  always @(posedge clk) begin
    if (rst_n && trk_valid) begin
      checks++;
      if (!trk_track && !trk_eoe) fail("record with neither track nor end of event");
      if (exp_cnt.size() == 0) fail("output with no event pending");
      else if (trk_track) begin
        int ei, ew;
        if (trk_in_event >= exp_cnt[0] || exp_idx.size() == 0) fail("extra track");
        else begin
          int edu, edv;
          ei = exp_idx.pop_front();
          ew = exp_w.pop_front();
          edu = exp_du.pop_front();
          edv = exp_dv.pop_front();
          if (int'(trk_iu) * NV + int'(trk_iv) != ei || int'(trk_w) != ew)
            fail($sformatf("track (%0d,%0d) w=%0d, expected cell %0d w=%0d", trk_iu, trk_iv, trk_w, ei, ew));
          if (int'(trk_du) != edu || int'(trk_dv) != edv)
            fail($sformatf("track offsets %0d,%0d, expected %0d,%0d", trk_du, trk_dv, edu, edv));
          if (trk_du != 0 || trk_dv != 0) n_interp++;
        end
        trk_in_event++;
        n_tracks++;
      end
      if (exp_cnt.size() != 0 && trk_eoe) begin
        int k, t, lat;
        bit idle;
        k = exp_cnt.pop_front();
        t = exp_t.pop_front();
        idle = exp_idle.pop_front();
        lat = cycle - t;
        if (int'(trk_ntracks) != k || trk_in_event != k)
          fail($sformatf("event %0d: %0d tracks reported, %0d sent, %0d expected", trk_event, trk_ntracks, trk_in_event, k));
        if (int'(trk_event) != (events_out & 16'hffff)) fail("event number out of sequence");
        if (idle) begin
          checks++;
          n_exact_lat++;
          if (lat != (k > 1 ? k : 1) + 9) fail($sformatf("latency %0d, expected %0d", lat, (k > 1 ? k : 1) + 9));
          if (lat > max_lat) max_lat = lat;
        end
        trk_in_event = 0;
        events_out++;
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic send_ext_event(output int stalls);
    stalls = 0;
    for (int w = 0; w < g_nw; w++) begin
      ext_valid = 1;
      ext_hvalid = g_v[w];
      ext_eoe = g_e[w];
      for (int l = 0; l < LINES; l++) begin
        ext_hit[l].layer = 3'(g_l[w][l]);
        ext_hit[l].x = 10'(g_x[w][l]);
      end
      @(posedge clk);
      while (!in_ready) begin
        stalls++;
        @(posedge clk);
      end
      #1;
    end
    ext_valid = 0;
    ext_hvalid = '0;
    ext_eoe = 0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while ((exp_cnt.size() != 0 || cur_n != 0) && guard < 20000) begin
      @(posedge clk);
      guard++;
    end
    #1;
  endtask

  // memory-replay expectations
  int mem_nev = 0;
  int mem_words = 0;

  initial begin
    int st, words, cyc0, stall_total;
    src_sel = 0; ext_valid = 0; ext_hvalid = '0; ext_eoe = 0;
    for (int l = 0; l < LINES; l++) begin ext_hit[l] = '0; mem_wr_hit[l] = '0; end
    mem_wr_en = 0; mem_wr_addr = '0; mem_wr_valid = '0; mem_wr_eoe = 0; mem_run = 0;
    mem_length = '0; lut_we = 0; lut_addr = '0; lut_data = '0; threshold = 16'd700;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // switching-network table: engine e listens to bin b of layer l when its
    // acceptance window [xexp-31, xexp+31] overlaps the bin
    for (int l = 0; l < LAYERS; l++)
      for (int b = 0; b < 32; b++) begin
        logic [NE-1:0] m;
        m = '0;
        for (int e = 0; e < NE; e++) begin
          int xe;
          xe = xexp(e / NV, e % NV, l);
          if (xe + 31 >= 32 * b && xe - 31 <= 32 * b + 31) m[e] = 1'b1;
        end
        lut_we = 1; lut_addr = 8'(l * 32 + b); lut_data = m;
        @(posedge clk); #1;
      end
    lut_we = 0;

    // (1) spaced external events: exact latency
    for (int n = 0; n < 30; n++) begin
      gen_event($urandom_range(1, 6), $urandom_range(0, 8));
      send_ext_event(st);
      repeat (20) @(posedge clk);
      #1;
    end
    drain();

    // (2) back-to-back external events: one word per cycle while not stalled
    words = 0; stall_total = 0;
    cyc0 = cycle;
    for (int n = 0; n < 30; n++) begin
      gen_event($urandom_range(1, 6), $urandom_range(0, 6));
      send_ext_event(st);
      words += g_nw;
      stall_total += st;
    end
    checks++;
    if (cycle - cyc0 != words + stall_total)
      fail($sformatf("%0d words took %0d cycles with %0d stalls", words, cycle - cyc0, stall_total));
    drain();

    // (3) replay from the event memory, low threshold: the output falls behind
    mem_words = 0;
    for (int n = 0; n < 10; n++) begin
      gen_event($urandom_range(1, 6), $urandom_range(0, 4));
      for (int w = 0; w < g_nw; w++) begin
        mem_wr_en = 1;
        mem_wr_addr = 10'(mem_words);
        mem_wr_valid = g_v[w];
        mem_wr_eoe = g_e[w];
        for (int l = 0; l < LINES; l++) begin
          mem_wr_hit[l].layer = 3'(g_l[w][l]);
          mem_wr_hit[l].x = 10'(g_x[w][l]);
        end
        @(posedge clk); #1;
        mem_words++;
      end
      mem_nev++;
    end
    mem_wr_en = 0;
    mem_length = 11'(mem_words);
    threshold = 16'd40;
    src_sel = 1;
    n_switch++;
    mem_run = 1;
    while (mem_loops < 3) begin
      @(posedge clk); #1;
    end
    mem_run = 0;
    while (dut.src_valid) begin
      @(posedge clk); #1;
    end
    drain();
    checks++;
    if (n_mem_events != 3 * mem_nev)
      fail($sformatf("%0d events replayed, expected %0d", n_mem_events, 3 * mem_nev));

    // (4) back to the external input
    src_sel = 0;
    n_switch++;
    threshold = 16'd700;
    for (int n = 0; n < 5; n++) begin
      gen_event($urandom_range(1, 6), 2);
      send_ext_event(st);
    end
    drain();

    checks++;
    if (overflow) fail("overflow");
    checks++;
    if (events_out != events_in || exp_idx.size() != 0) fail("events lost");
    checks++;
    if (max_lat >= 100) fail("latency of 100 cycles or more");
    $display("events %0d, tracks %0d, multi-line words %0d, stall cycles %0d, replayed %0d, external %0d",
             events_out, n_tracks, n_multiline, n_stall, n_mem_events, n_ext_events);
    $display("interpolated tracks %0d", n_interp);
    $display("source switches %0d, loops %0d, below threshold %0d, ties %0d, exact latency checks %0d, max idle latency %0d",
             n_switch, mem_loops, n_below_thr, n_ties, n_exact_lat, max_lat);
    checks++; if (n_multiline == 0)  fail("no multi-line input word");
    checks++; if (n_stall == 0)      fail("input never stalled");
    checks++; if (n_mem_events == 0) fail("no event replayed from memory");
    checks++; if (mem_loops < 2)     fail("memory replay never wrapped");
    checks++; if (n_switch < 2)      fail("source never switched");
    checks++; if (n_below_thr == 0)  fail("threshold never rejected a maximum");
    checks++; if (n_ties == 0)       fail("no tie between neighbours");
    checks++; if (n_interp == 0)     fail("no track with a sub-cell offset");
    checks++; if (n_exact_lat < 10)  fail("too few latency checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
