// centroid: sub-cell interpolation of a reconstructed track's parameters.
//
// Because every engine responds with a weight that falls off smoothly with distance, a
// track lying between cell centres lights up its neighbours too, and its position can be
// interpolated from them. For each track record this block takes the 3 x 3 weights around
// the maximum cell and computes the weighted centroid offsets
//   du = (row(+1) - row(-1)) / total,  dv = (column(+1) - column(-1)) / total
// in units of one cell pitch, as signed fractions with FRAC bits (|du|, |dv| < 1 since
// the centre cell is part of the total). Track parameter estimates are then
// u = U_BASE + (iu + du) * U_PITCH and v = V_BASE + (iv + dv) * V_PITCH.
//
// Interface: in_* is a track_output record plus in_nb[k], k = (du+1)*3 + (dv+1), the
// weights around the cell (0 outside the grid). out_* is the same record, delayed, with
// out_du/out_dv added (0 for a record without a track).
// Timing: two register stages (sums, then division); one record per cycle.
// That the graded response allows interpolation follows the processor's principle; the
// 3 x 3 centroid, the fraction width and the pipeline are this design's choices.
module centroid
  import ar_pkg::*;
#(
  parameter int unsigned FRAC = 7,
  parameter int unsigned UW   = $clog2(N_U),
  parameter int unsigned VW   = $clog2(N_V),
  parameter int unsigned CW   = $clog2(N_U * N_V + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_track,
  input  logic                    in_eoe,
  input  logic [UW-1:0]           in_iu,
  input  logic [VW-1:0]           in_iv,
  input  logic [ACC_W-1:0]        in_w,
  input  logic [15:0]             in_event,
  input  logic [CW-1:0]           in_ntracks,
  input  logic [ACC_W-1:0]        in_nb [9],
  output logic                    out_valid,
  output logic                    out_track,
  output logic                    out_eoe,
  output logic [UW-1:0]           out_iu,
  output logic [VW-1:0]           out_iv,
  output logic [ACC_W-1:0]        out_w,
  output logic [15:0]             out_event,
  output logic [CW-1:0]           out_ntracks,
  output logic signed [FRAC:0]    out_du,
  output logic signed [FRAC:0]    out_dv
);

  localparam int unsigned SW = ACC_W + 4;          // sum of up to 9 weights
  localparam int unsigned NW = SW + FRAC + 1;      // signed scaled numerator

  typedef struct packed {
    logic              valid;
    logic              track;
    logic              eoe;
    logic [UW-1:0]     iu;
    logic [VW-1:0]     iv;
    logic [ACC_W-1:0]  w;
    logic [15:0]       event_no;
    logic [CW-1:0]     ntracks;
  } rec_t;

  // Stage 1: row and column differences and the total.
  logic signed [SW:0] du_c, dv_c;
  logic        [SW-1:0] tot_c;
  always_comb begin
    logic [SW-1:0] up, um, vp, vm;
    up = '0; um = '0; vp = '0; vm = '0; tot_c = '0;
    for (int k = 0; k < 9; k++) begin
      tot_c = tot_c + SW'(in_nb[k]);
      if (k / 3 == 2) up = up + SW'(in_nb[k]);
      if (k / 3 == 0) um = um + SW'(in_nb[k]);
      if (k % 3 == 2) vp = vp + SW'(in_nb[k]);
      if (k % 3 == 0) vm = vm + SW'(in_nb[k]);
    end
    du_c = $signed({1'b0, up}) - $signed({1'b0, um});
    dv_c = $signed({1'b0, vp}) - $signed({1'b0, vm});
  end

  rec_t               r1;
  logic signed [SW:0] du1, dv1;
  logic [SW-1:0]      tot1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1   <= '0;
      du1  <= '0;
      dv1  <= '0;
      tot1 <= '0;
    end else begin
      r1   <= '{valid: in_valid, track: in_track, eoe: in_eoe, iu: in_iu, iv: in_iv,
                w: in_w, event_no: in_event, ntracks: in_ntracks};
      du1  <= du_c;
      dv1  <= dv_c;
      tot1 <= tot_c;
    end
  end

  // Stage 2: divide (truncating toward zero).
  logic signed [NW-1:0] num_u, num_v, den, q_u, q_v;
  always_comb begin
    num_u = NW'(du1) <<< FRAC;
    num_v = NW'(dv1) <<< FRAC;
    den   = $signed({{(NW-SW){1'b0}}, tot1});
    if (tot1 != 0 && r1.track) begin
      q_u = num_u / den;
      q_v = num_v / den;
    end else begin
      q_u = '0;
      q_v = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_track   <= 1'b0;
      out_eoe     <= 1'b0;
      out_iu      <= '0;
      out_iv      <= '0;
      out_w       <= '0;
      out_event   <= '0;
      out_ntracks <= '0;
      out_du      <= '0;
      out_dv      <= '0;
    end else begin
      out_valid   <= r1.valid;
      out_track   <= r1.track;
      out_eoe     <= r1.eoe;
      out_iu      <= r1.iu;
      out_iv      <= r1.iv;
      out_w       <= r1.w;
      out_event   <= r1.event_no;
      out_ntracks <= r1.ntracks;
      out_du      <= (FRAC+1)'(q_u);
      out_dv      <= (FRAC+1)'(q_v);
    end
  end

endmodule
