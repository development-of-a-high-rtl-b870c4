// tb_track_output: self-checking test of the track output stage.
//
// Random sparse maxima maps with random weights on a 4 x 5 grid are written at random
// times, never more than DEPTH events ahead of the output (the testbench keeps its own
// credit count, as the processor top does). The output must list each event's tracks in
// increasing cell index with their weights, the last record flagged end-of-event with the
// event number and track count (a single trackless record for an empty event), so that
// an event takes max(k,1) cycles. When the stage is idle, the first record of an event
// must appear three cycles after it is written, and each track record must carry the
// weights of the 3 x 3 cells around it. Finally the FIFO is overfilled on purpose and
// the overflow flag must rise.
module tb_track_output;
  import ar_pkg::*;

  localparam int NU = 4, NV = 5, NE = NU * NV, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [NE-1:0] in_max;
  logic [ACC_W-1:0] in_w [NE];
  logic out_valid, out_track, out_eoe;
  logic [1:0] out_iu;
  logic [2:0] out_iv;
  logic [ACC_W-1:0] out_w;
  logic [15:0] out_event;
  logic [4:0] out_ntracks;
  logic [ACC_W-1:0] out_nb [9];
  logic event_done;
  logic [2:0] level;
  logic overflow;

  int checks = 0, failures = 0, cycle = 0;
  int credits = 0, events_out = 0, timed = 0;
  bit stress = 0;

  track_output #(.NU(NU), .NV(NV), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output records: {eoe, index, weight, ntracks, event}
  typedef struct { bit track; bit eoe; int idx; int w; int nt; int ev; int due; int nb[9]; } rec_t;
  rec_t q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid && !stress) begin
      rec_t r;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output record");
      end else begin
        r = q.pop_front();
        if (out_eoe != r.eoe || out_track != r.track) begin
          failures++;
          $display("record flags track=%0d eoe=%0d, expected %0d/%0d", out_track, out_eoe, r.track, r.eoe);
        end else if (r.eoe && (int'(out_ntracks) != r.nt || int'(out_event) != r.ev)) begin
          failures++;
          $display("eoe record: %0d tracks event %0d, expected %0d / %0d", out_ntracks, out_event, r.nt, r.ev);
        end else if (r.track && (int'(out_iu) * NV + int'(out_iv) != r.idx || int'(out_w) != r.w)) begin
          failures++;
          $display("track %0d,%0d w=%0d expected idx %0d w=%0d", out_iu, out_iv, out_w, r.idx, r.w);
        end else if (r.track) begin
          for (int k = 0; k < 9; k++)
            if (int'(out_nb[k]) != r.nb[k]) begin
              failures++;
              $display("neighbour %0d of cell %0d: %0d, expected %0d", k, r.idx, out_nb[k], r.nb[k]);
              break;
            end
        end
        if (r.due >= 0) begin
          checks++;
          timed++;
          if (cycle != r.due) begin
            failures++;
            $display("first record at cycle %0d, expected %0d", cycle, r.due);
          end
        end
      end
      if (out_eoe) events_out++;
    end
  end

  always @(posedge clk) if (rst_n && event_done) credits--;

  initial begin
    int nev;
    in_valid = 0; in_max = '0;
    for (int e = 0; e < NE; e++) in_w[e] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    nev = 0;
    for (int n = 0; n < 300; n++) begin
      logic [NE-1:0] m;
      int k;
      bit idle;
      while (credits >= DEPTH) begin
        @(posedge clk); #1;
      end
      idle = (q.size() == 0);
      m = '0;
      for (int e = 0; e < NE; e++) begin
        m[e] = $urandom_range(0, 7) == 0;
        in_w[e] = ACC_W'($urandom);
      end
      in_max = m;
      k = $countones(m);
      if (k == 0) begin
        rec_t r;
        r.track = 0; r.eoe = 1; r.idx = 0; r.w = 0; r.nt = 0; r.ev = nev;
        for (int q9 = 0; q9 < 9; q9++) r.nb[q9] = 0;
        r.due = idle ? cycle + 3 : -1;
        q.push_back(r);
      end else begin
        int j;
        j = 0;
        for (int e = 0; e < NE; e++) begin
          rec_t r;
          if (m[e]) begin
            r.track = 1; r.eoe = (j == k - 1); r.idx = e; r.w = int'(in_w[e]); r.nt = k; r.ev = nev;
            for (int q9 = 0; q9 < 9; q9++) begin
              int a, b;
              a = e / NV + q9 / 3 - 1;
              b = e % NV + q9 % 3 - 1;
              r.nb[q9] = (a >= 0 && a < NU && b >= 0 && b < NV) ? int'(in_w[a * NV + b]) : 0;
            end
            r.due = (idle && j == 0) ? cycle + 3 : -1;
            q.push_back(r);
            j++;
          end
        end
      end
      nev++;
      credits++;
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      repeat ((n % 10 == 0) ? 30 : $urandom_range(0, 6)) @(posedge clk);
      #1;
    end
    while (q.size() != 0) begin
      @(posedge clk); #1;
    end
    checks++;
    if (overflow || events_out != nev || timed < 10) begin
      failures++;
      $display("overflow=%0d events out %0d of %0d, timed %0d", overflow, events_out, nev, timed);
    end
    // overfill: DEPTH+2 events in consecutive cycles with many tracks each
    stress = 1;
    in_max = '1;
    in_valid = 1;
    repeat (DEPTH + 2) @(posedge clk);
    #1 in_valid = 0;
    checks++;
    if (!overflow) begin
      failures++;
      $display("overflow flag not raised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
