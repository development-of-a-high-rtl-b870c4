// tb_event_rate: event rate against occupancy, with six input lines and with one.
//
// Two processors are built: the default one (six input lines, one per layer) and the
// same one with a single input line, which receives the hits of an event one after the
// other. For 1 to 6 tracks per event (0.5 % to 3 % of the 200 cells), 40 events without
// noise are sent back to back to each, and the input cycles per event are measured.
// Expected: exactly k words per k-track event on six lines and 6k words on one line;
// each run takes its words plus the cycles the input was stalled. The six-line
// processor must be faster by at least a factor of 3. The event rate at a 160 MHz clock
// is printed for each occupancy. Every event's track count is checked against a
// ghost-free lower bound: at least one track is found per event.
module tb_event_rate;
  import ar_pkg::*;

  localparam int NE = 200, NV = 20, NEV = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- six-line processor ----------------
  logic        a_valid, a_eoe, a_ready;
  logic [5:0]  a_hvalid;
  hit_t        a_hit [6];
  logic        a_trk_valid, a_trk_track, a_trk_eoe, a_overflow;
  logic [3:0]  a_iu;
  logic [4:0]  a_iv;
  logic [15:0] a_w, a_event;
  logic [7:0]  a_nt;
  logic signed [7:0] a_du, a_dv;
  logic [31:0] a_loops;
  hit_t        a_mhit [6];

  // ---------------- single-line processor ----------------
  logic        b_valid, b_eoe, b_ready;
  logic [0:0]  b_hvalid;
  hit_t        b_hit [1];
  logic        b_trk_valid, b_trk_track, b_trk_eoe, b_overflow;
  logic [3:0]  b_iu;
  logic [4:0]  b_iv;
  logic [15:0] b_w, b_event;
  logic [7:0]  b_nt;
  logic signed [7:0] b_du, b_dv;
  logic [31:0] b_loops;
  hit_t        b_mhit [1];

  logic        lut_we;
  logic [7:0]  lut_addr;
  logic [NE-1:0] lut_data;
  logic [15:0] threshold;

  retina_top dut6 (
    .clk, .rst_n, .src_sel(1'b0),
    .ext_valid(a_valid), .ext_hvalid(a_hvalid), .ext_hit(a_hit), .ext_eoe(a_eoe), .in_ready(a_ready),
    .mem_wr_en(1'b0), .mem_wr_addr('0), .mem_wr_valid('0), .mem_wr_hit(a_mhit), .mem_wr_eoe(1'b0),
    .mem_run(1'b0), .mem_length('0), .mem_loops(a_loops),
    .lut_we, .lut_addr, .lut_data, .threshold,
    .trk_valid(a_trk_valid), .trk_track(a_trk_track), .trk_eoe(a_trk_eoe), .trk_iu(a_iu), .trk_iv(a_iv),
    .trk_w(a_w), .trk_event(a_event), .trk_ntracks(a_nt), .trk_du(a_du), .trk_dv(a_dv),
    .overflow(a_overflow)
  );

  retina_top #(.LINES(1)) dut1 (
    .clk, .rst_n, .src_sel(1'b0),
    .ext_valid(b_valid), .ext_hvalid(b_hvalid), .ext_hit(b_hit), .ext_eoe(b_eoe), .in_ready(b_ready),
    .mem_wr_en(1'b0), .mem_wr_addr('0), .mem_wr_valid('0), .mem_wr_hit(b_mhit), .mem_wr_eoe(1'b0),
    .mem_run(1'b0), .mem_length('0), .mem_loops(b_loops),
    .lut_we, .lut_addr, .lut_data, .threshold,
    .trk_valid(b_trk_valid), .trk_track(b_trk_track), .trk_eoe(b_trk_eoe), .trk_iu(b_iu), .trk_iv(b_iv),
    .trk_w(b_w), .trk_event(b_event), .trk_ntracks(b_nt), .trk_du(b_du), .trk_dv(b_dv),
    .overflow(b_overflow)
  );

  int checks = 0, failures = 0;
  int a_events = 0, b_events = 0, a_empty = 0, b_empty = 0;

  always @(posedge clk) begin
    if (rst_n && a_trk_valid && a_trk_eoe) begin a_events++; if (a_nt == 0) a_empty++; end
    if (rst_n && b_trk_valid && b_trk_eoe) begin b_events++; if (b_nt == 0) b_empty++; end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xexp(int e, int l);
    int u, v;
    u = 32 + 96 * (e / NV);
    v = 24 + 48 * (e % NV);
    return u + ((v - u) * l) / 5;
  endfunction

  // tracks of the current event
  int tu [6], tv [6];

  function automatic int hit_x(int t, int l);
    return tu[t] + ((tv[t] - tu[t]) * l) / 5;
  endfunction

  // Sends NEV events of k tracks to one processor, returns cycles and stall cycles.
  task automatic run(bit six, int k, output int cycles, output int words, output int stalls);
    int c0;
    words = 0;
    stalls = 0;
    c0 = cycle;
    for (int n = 0; n < NEV; n++) begin
      for (int t = 0; t < k; t++) begin
        tu[t] = $urandom_range(40, 900);
        tv[t] = $urandom_range(30, 930);
      end
      if (six) begin
        for (int t = 0; t < k; t++) begin
          a_valid = 1;
          a_eoe = (t == k - 1);
          a_hvalid = '1;
          for (int l = 0; l < 6; l++) begin
            a_hit[l].layer = 3'(l);
            a_hit[l].x = 10'(hit_x(t, l));
          end
          @(posedge clk);
          while (!a_ready) begin stalls++; @(posedge clk); end
          #1;
          words++;
        end
        a_valid = 0; a_eoe = 0; a_hvalid = '0;
      end else begin
        for (int t = 0; t < k; t++)
          for (int l = 0; l < 6; l++) begin
            b_valid = 1;
            b_eoe = (t == k - 1) && (l == 5);
            b_hvalid = 1'b1;
            b_hit[0].layer = 3'(l);
            b_hit[0].x = 10'(hit_x(t, l));
            @(posedge clk);
            while (!b_ready) begin stalls++; @(posedge clk); end
            #1;
            words++;
          end
        b_valid = 0; b_eoe = 0; b_hvalid = '0;
      end
    end
    cycles = cycle - c0;
  endtask

  initial begin
    int ca, wa, sa, cb, wb, sb;
    a_valid = 0; a_eoe = 0; a_hvalid = '0;
    b_valid = 0; b_eoe = 0; b_hvalid = '0;
    for (int l = 0; l < 6; l++) begin a_hit[l] = '0; a_mhit[l] = '0; end
    b_hit[0] = '0; b_mhit[0] = '0;
    lut_we = 0; lut_addr = '0; lut_data = '0; threshold = 16'd700;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < 6; l++)
      for (int b = 0; b < 32; b++) begin
        logic [NE-1:0] m;
        m = '0;
        for (int e = 0; e < NE; e++)
          if (xexp(e, l) + 31 >= 32 * b && xexp(e, l) - 31 <= 32 * b + 31) m[e] = 1'b1;
        lut_we = 1; lut_addr = 8'(l * 32 + b); lut_data = m;
        @(posedge clk); #1;
      end
    lut_we = 0;
    $display("tracks/event  track/cell   6 lines: cycles/event  MHz@160   1 line: cycles/event  MHz@160");
    for (int k = 1; k <= 6; k++) begin
      real ra, rb;
      run(1, k, ca, wa, sa);
      run(0, k, cb, wb, sb);
      ra = 160.0 * NEV / ca;
      rb = 160.0 * NEV / cb;
      $display("%12d  %9.1f %%  %21.2f  %7.1f  %20.2f  %7.1f", k, 100.0 * k / NE,
               real'(ca) / NEV, ra, real'(cb) / NEV, rb);
      checks++;
      if (wa != k * NEV || ca != wa + sa) begin
        failures++;
        $display("six lines: %0d words, %0d cycles, %0d stalls for k=%0d", wa, ca, sa, k);
      end
      checks++;
      if (wb != 6 * k * NEV || cb != wb + sb || sb != 0) begin
        failures++;
        $display("one line: %0d words, %0d cycles, %0d stalls for k=%0d", wb, cb, sb, k);
      end
      checks++;
      if (ra < 3.0 * rb) begin
        failures++;
        $display("six lines not faster by 3x at k=%0d", k);
      end
    end
    repeat (60) @(posedge clk);
    checks++;
    if (a_events != 6 * NEV || b_events != 6 * NEV || a_overflow || b_overflow) begin
      failures++;
      $display("events out: %0d and %0d of %0d", a_events, b_events, 6 * NEV);
    end
    checks++;
    if (a_empty != 0 || b_empty != 0) begin
      failures++;
      $display("events without tracks: %0d and %0d", a_empty, b_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
