// retina_top: artificial-retina track processor for one FPGA.
//
// Hits of an event enter on LINES parallel input lines, either from the outside
// (src_sel = 0) or from the on-chip event memory that replays test events in a loop
// (src_sel = 1). The switching network (dispatcher) copies every hit to the engines whose
// pattern tracks lie near it, as told by a preloaded table. The NU x NV engines, one per
// cell of the (u,v) track-parameter plane, accumulate distance-dependent weights over the
// event. When the event closes, all cell weights go at once to the local-maximum finder;
// cells above threshold that are local maxima are the reconstructed tracks, which leave
// through track_output as one (iu, iv, weight) record per track and cycle, the last one of
// the event flagged trk_eoe (an event without tracks gives one record with trk_track=0).
// The centroid stage adds to each track the sub-cell offsets trk_du/trk_dv (signed, in
// 1/128 of a cell pitch) interpolated from the 3 x 3 weights around the maximum.
//
// Flow control: track_output buffers FIFO_DEPTH events. Each end-of-event accepted at the
// input takes a credit, each last record of an event sent returns one; with no credit left
// the input stalls (in_ready = 0) and, in loop mode, the event memory holds its word.
// A credit comes back about 8 cycles after its end-of-event entered, so FIFO_DEPTH = 16
// lets events of a single input word enter every cycle.
// Timing: for an end-of-event accepted in cycle t, the engines present their weights in
// cycle t+4 and the local maxima in cycle t+5; with an idle output the event's records
// are on trk_* in cycles t+10 .. t+max(k,1)+9 for k tracks. One input word per cycle, so
// an event of n hits per line takes n cycles; the output needs max(k,1) cycles, so with
// one line per layer the input is stalled only while many events with fake maxima
// (more maxima than hits per line) pile up.
// The chain source - switching network - engines - local maxima and the multiple input
// lines follow the prototype, as does interpolating between cells; the credit scheme,
// the input-source mux, the centroid method and all widths are this design's choices.
module retina_top
  import ar_pkg::*;
#(
  parameter int unsigned LINES      = 6,
  parameter int unsigned NU         = N_U,
  parameter int unsigned NV         = N_V,
  parameter int unsigned BIN_SHIFT  = 5,
  parameter int unsigned SRC_WORDS  = 1024,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned N_ENG  = NU * NV,
  localparam int unsigned LUT_AW = $clog2(LAYERS * (1 << (X_W - BIN_SHIFT))),
  localparam int unsigned SRC_AW = $clog2(SRC_WORDS),
  localparam int unsigned UW     = $clog2(NU),
  localparam int unsigned VW     = $clog2(NV),
  localparam int unsigned CW     = $clog2(N_ENG + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              src_sel,
  // external hit input
  input  logic              ext_valid,
  input  logic [LINES-1:0]  ext_hvalid,
  input  hit_t              ext_hit [LINES],
  input  logic              ext_eoe,
  output logic              in_ready,
  // event memory
  input  logic              mem_wr_en,
  input  logic [SRC_AW-1:0] mem_wr_addr,
  input  logic [LINES-1:0]  mem_wr_valid,
  input  hit_t              mem_wr_hit [LINES],
  input  logic              mem_wr_eoe,
  input  logic              mem_run,
  input  logic [SRC_AW:0]   mem_length,
  output logic [31:0]       mem_loops,
  // switching-network table
  input  logic              lut_we,
  input  logic [LUT_AW-1:0] lut_addr,
  input  logic [N_ENG-1:0]  lut_data,
  // track finding
  input  logic [ACC_W-1:0]  threshold,
  output logic              trk_valid,
  output logic              trk_track,
  output logic              trk_eoe,
  output logic [UW-1:0]     trk_iu,
  output logic [VW-1:0]     trk_iv,
  output logic [ACC_W-1:0]  trk_w,
  output logic [15:0]       trk_event,
  output logic [CW-1:0]     trk_ntracks,
  output logic signed [7:0] trk_du,
  output logic signed [7:0] trk_dv,
  output logic              overflow
);

  // ---------------- input selection and credit flow control ----------------
  logic             src_valid, src_eoe;
  logic [LINES-1:0] src_hvalid;
  hit_t             src_hit [LINES];

  logic             sel_valid, sel_eoe;
  logic [LINES-1:0] sel_hvalid;
  hit_t             sel_hit [LINES];

  always_comb begin
    sel_valid  = src_sel ? src_valid  : ext_valid;
    sel_eoe    = src_sel ? src_eoe    : ext_eoe;
    sel_hvalid = src_sel ? src_hvalid : ext_hvalid;
    for (int l = 0; l < int'(LINES); l++) sel_hit[l] = src_sel ? src_hit[l] : ext_hit[l];
  end

  localparam int unsigned KW = $clog2(FIFO_DEPTH + 1);
  logic [KW-1:0] credits_used;
  logic          accept, event_done;

  assign in_ready = int'(credits_used) < int'(FIFO_DEPTH);
  assign accept   = sel_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits_used <= '0;
    else        credits_used <= credits_used + KW'(accept && sel_eoe) - KW'(event_done);
  end

  hit_source #(.LINES(LINES), .WORDS(SRC_WORDS)) u_src (
    .clk, .rst_n,
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_valid(mem_wr_valid),
    .wr_hit(mem_wr_hit), .wr_eoe(mem_wr_eoe),
    .run(mem_run && src_sel), .length(mem_length),
    .out_valid(src_valid), .out_ready(in_ready), .out_hvalid(src_hvalid),
    .out_hit(src_hit), .out_eoe(src_eoe), .loops(mem_loops)
  );

  // ---------------- switching network ----------------
  logic [LINES-1:0] d_valid [N_ENG];
  hit_t             d_hit [LINES];
  logic             d_eoe;

  dispatcher #(.LINES(LINES), .N_ENG(N_ENG), .BIN_SHIFT(BIN_SHIFT)) u_disp (
    .clk, .rst_n,
    .cfg_we(lut_we), .cfg_addr(lut_addr), .cfg_data(lut_data),
    .in_valid(accept ? sel_hvalid : '0), .in_hit(sel_hit), .in_eoe(accept && sel_eoe),
    .eng_valid(d_valid), .out_hit(d_hit), .out_eoe(d_eoe)
  );

  // ---------------- engine array ----------------
  logic [N_ENG-1:0] e_valid;
  logic [ACC_W-1:0] e_w [N_ENG];

  for (genvar iu = 0; iu < int'(NU); iu++) begin : g_u
    for (genvar iv = 0; iv < int'(NV); iv++) begin : g_v
      engine #(
        .LINES(LINES),
        .U_C(U_BASE + iu * U_PITCH),
        .V_C(V_BASE + iv * V_PITCH)
      ) u_eng (
        .clk, .rst_n,
        .hit_valid(d_valid[iu*NV+iv]), .hit(d_hit), .eoe(d_eoe),
        .res_valid(e_valid[iu*NV+iv]), .res_weight(e_w[iu*NV+iv])
      );
    end
  end

  // ---------------- local maxima ----------------
  logic             m_valid;
  logic [N_ENG-1:0] m_max;
  logic [ACC_W-1:0] m_w [N_ENG];

  local_max #(.NU(NU), .NV(NV)) u_max (
    .clk, .rst_n, .threshold,
    .in_valid(e_valid[0]), .in_w(e_w),
    .out_valid(m_valid), .is_max(m_max), .out_w(m_w)
  );

  // ---------------- track output ----------------
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  logic             o_valid, o_track, o_eoe;
  logic [UW-1:0]    o_iu;
  logic [VW-1:0]    o_iv;
  logic [ACC_W-1:0] o_w;
  logic [15:0]      o_event;
  logic [CW-1:0]    o_ntracks;
  logic [ACC_W-1:0] o_nb [9];

  track_output #(.NU(NU), .NV(NV), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n,
    .in_valid(m_valid), .in_max(m_max), .in_w(m_w),
    .out_valid(o_valid), .out_track(o_track), .out_eoe(o_eoe), .out_iu(o_iu), .out_iv(o_iv),
    .out_w(o_w), .out_event(o_event), .out_ntracks(o_ntracks), .out_nb(o_nb),
    .event_done, .level(fifo_level), .overflow
  );

  // ---------------- sub-cell interpolation ----------------
  centroid #(.FRAC(7), .UW(UW), .VW(VW), .CW(CW)) u_cent (
    .clk, .rst_n,
    .in_valid(o_valid), .in_track(o_track), .in_eoe(o_eoe), .in_iu(o_iu), .in_iv(o_iv),
    .in_w(o_w), .in_event(o_event), .in_ntracks(o_ntracks), .in_nb(o_nb),
    .out_valid(trk_valid), .out_track(trk_track), .out_eoe(trk_eoe), .out_iu(trk_iu),
    .out_iv(trk_iv), .out_w(trk_w), .out_event(trk_event), .out_ntracks(trk_ntracks),
    .out_du(trk_du), .out_dv(trk_dv)
  );

  // All engines close the event together, and credits keep the FIFO from overflowing.
  a_engines_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    e_valid == '0 || e_valid == '1);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid |-> int'(fifo_level) < int'(FIFO_DEPTH));

endmodule
