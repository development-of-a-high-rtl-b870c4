// track_output: turns per-event maxima into a stream of reconstructed tracks.
//
// The engine array produces, once per event, a map of local maxima and the weights of
// all cells. Only the reconstructed tracks leave the processor: this block buffers the
// per-event maps in a FIFO of DEPTH events and sends out one record per cycle. A record
// with out_track=1 carries a track (cell indices and weight, lowest cell index first); the
// last record of an event has out_eoe=1 and also carries the event number and the number
// of tracks found. An event without tracks gives a single record with out_track=0 and
// out_eoe=1. An event of k tracks thus takes max(k,1) cycles, as many as its hits need at
// the input when each layer has its own line. Each track record also carries the weights
// of the 3 x 3 cells around the track's cell (out_nb, 0 outside the grid) for interpolation.
//
// Interface: in_valid/in_max/in_w are written into the FIFO (an event arriving while the
// FIFO is full is dropped and sets the sticky overflow flag; the processor top avoids this
// with credit-based flow control, using event_done to return a credit).
// There is no back-pressure on the output.
// Timing: for an event with in_valid in cycle t and an idle output, its records are on the
// outputs in cycles t+3 .. t+max(k,1)+2, the last one with out_eoe. Consecutive events
// follow back to back.
// Keeping only the track information follows the prototype; the FIFO, the record format
// and the order of the tracks are this design's choices.
module track_output
  import ar_pkg::*;
#(
  parameter int unsigned NU    = N_U,
  parameter int unsigned NV    = N_V,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned N_ENG = NU * NV,
  localparam int unsigned UW    = $clog2(NU),
  localparam int unsigned VW    = $clog2(NV),
  localparam int unsigned CW    = $clog2(N_ENG + 1),
  localparam int unsigned PW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N_ENG-1:0]  in_max,
  input  logic [ACC_W-1:0]  in_w [N_ENG],
  output logic              out_valid,
  output logic              out_track,
  output logic              out_eoe,
  output logic [UW-1:0]     out_iu,
  output logic [VW-1:0]     out_iv,
  output logic [ACC_W-1:0]  out_w,
  output logic [15:0]       out_event,
  output logic [CW-1:0]     out_ntracks,
  output logic [ACC_W-1:0]  out_nb [9],
  output logic              event_done,
  output logic [PW:0]       level,
  output logic              overflow
);

  // Event FIFO.
  logic [N_ENG-1:0] f_max [DEPTH];
  logic [ACC_W-1:0] f_w   [DEPTH][N_ENG];
  logic [PW-1:0]    wptr, rptr;
  logic [PW:0]      count;
  logic             pop;

  // Event being serialised.
  logic             cur_valid;
  logic [N_ENG-1:0] cur_map;
  logic [ACC_W-1:0] cur_w [N_ENG];
  logic [CW-1:0]    cur_cnt;
  logic [15:0]      ev_cnt;

  logic push;
  assign push  = in_valid && (int'(count) < int'(DEPTH));
  assign level = count;

  // Lowest set bit of the current map.
  logic [$clog2(N_ENG)-1:0] first;
  logic                     any;
  always_comb begin
    first = '0;
    any   = |cur_map;
    for (int e = int'(N_ENG) - 1; e >= 0; e--)
      if (cur_map[e]) first = ($clog2(N_ENG))'(e);
  end

  // Weights around the current track's cell, k = (du+1)*3 + (dv+1).
  logic [ACC_W-1:0] nb_c [9];
  always_comb begin
    for (int k = 0; k < 9; k++) nb_c[k] = '0;
    for (int iu = 0; iu < int'(NU); iu++)
      for (int iv = 0; iv < int'(NV); iv++)
        for (int k = 0; k < 9; k++) begin
          int nu, nv;
          nu = iu + k / 3 - 1;
          nv = iv + k % 3 - 1;
          if (int'(first) == iu * int'(NV) + iv &&
              nu >= 0 && nu < int'(NU) && nv >= 0 && nv < int'(NV))
            nb_c[k] = cur_w[nu * int'(NV) + nv];
        end
  end

  // The current record is the event's last: no track left, or only the one sent now.
  logic [N_ENG-1:0] rest;
  logic             finishing;
  always_comb begin
    rest = cur_map;
    rest[first] = 1'b0;
  end
  assign finishing = cur_valid && (rest == '0);
  assign pop       = (count != 0) && (!cur_valid || finishing);

  always_ff @(posedge clk) begin
    if (push) begin
      f_max[wptr] <= in_max;
      for (int e = 0; e < int'(N_ENG); e++) f_w[wptr][e] <= in_w[e];
    end
    if (pop) begin
      cur_map <= f_max[rptr];
      for (int e = 0; e < int'(N_ENG); e++) cur_w[e] <= f_w[rptr][e];
    end else if (cur_valid && any) begin
      cur_map[first] <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      count       <= '0;
      overflow    <= 1'b0;
      cur_valid   <= 1'b0;
      cur_cnt     <= '0;
      ev_cnt      <= '0;
      out_valid   <= 1'b0;
      out_track   <= 1'b0;
      out_eoe     <= 1'b0;
      out_iu      <= '0;
      out_iv      <= '0;
      out_w       <= '0;
      out_event   <= '0;
      out_ntracks <= '0;
      event_done  <= 1'b0;
      for (int k = 0; k < 9; k++) out_nb[k] <= '0;
    end else begin
      if (in_valid && !push) overflow <= 1'b1;
      if (push) wptr <= (int'(wptr) == int'(DEPTH) - 1) ? '0 : wptr + 1'b1;
      if (pop)  rptr <= (int'(rptr) == int'(DEPTH) - 1) ? '0 : rptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);

      out_valid  <= cur_valid;
      out_track  <= cur_valid && any;
      out_eoe    <= finishing;
      event_done <= finishing;
      if (cur_valid && any) begin
        out_iu    <= UW'(int'(first) / int'(NV));
        out_iv    <= VW'(int'(first) % int'(NV));
        out_w     <= cur_w[first];
        out_nb    <= nb_c;
        cur_cnt   <= cur_cnt + 1'b1;
      end
      if (finishing) begin
        out_event   <= ev_cnt;
        out_ntracks <= cur_cnt + CW'(any);
        ev_cnt      <= ev_cnt + 1'b1;
        cur_cnt     <= '0;
      end
      if (pop)            cur_valid <= 1'b1;
      else if (finishing) cur_valid <= 1'b0;
    end
  end

endmodule
