// engine: one cell of the track-parameter space of the artificial retina.
//
// The engine owns the pattern track through the centre (u_c, v_c) of its cell. For every
// hit it receives it computes the distance between the hit and the point where its
// pattern track crosses the hit's layer, converts that distance into a weight that is
// largest at zero distance and vanishes beyond R strips, and adds the weight to a
// per-event accumulator. Several input lines are handled in parallel: each line has its
// own distance and weight unit and the line weights are summed before accumulation, as
// in the optimised high-speed prototype. At the end of the event the accumulated value
// is presented on res_weight for one cycle and the accumulator restarts from zero.
//
// Interface: hit_valid[l] marks a hit on line l routed to this engine; hit[l] carries
// its layer and coordinate (shared by all engines). eoe marks the last input cycle of
// an event; hits valid in that same cycle belong to the closing event.
// Timing: three register stages. Hits or eoe at input cycle t reach res_weight with
// res_valid at cycle t+3. A new hit cycle can be taken every clock.
// The cell-per-engine idea, the distance-based weight and the per-line parallel weight
// units come from the prototype; the kernel shape (ar_pkg::hit_weight), saturating
// accumulation and the pipeline depth are this design's choices.
module engine
  import ar_pkg::*;
#(
  parameter int unsigned LINES = 6,
  parameter int unsigned U_C   = U_BASE,   // cell centre on layer 0
  parameter int unsigned V_C   = V_BASE    // cell centre on the last layer
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINES-1:0]  hit_valid,
  input  hit_t              hit [LINES],
  input  logic              eoe,
  output logic              res_valid,
  output logic [ACC_W-1:0]  res_weight
);

  // Pattern-track coordinate on each layer, fixed at elaboration.
  function automatic logic [X_W:0] xexp_of(int l);
    return (X_W+1)'(expected_x(int'(U_C), int'(V_C), l));
  endfunction

  localparam int unsigned SUM_W = W_W + $clog2(LINES + 1);

  // Stage 1: distance per line.
  logic [X_W:0]       d_s1 [LINES];
  logic [LINES-1:0]   v_s1;
  logic               eoe_s1;
  // Stage 2: sum of line weights.
  logic [SUM_W-1:0]   sum_s2;
  logic               eoe_s2;
  // Stage 3: accumulator.
  logic [ACC_W-1:0]   acc;

  logic [X_W:0]     d_c [LINES];
  logic [LINES-1:0] v_c;
  always_comb begin
    for (int l = 0; l < int'(LINES); l++) begin
      logic [X_W:0] xe;
      logic [X_W:0] xh;
      xe = '0;
      for (int k = 0; k < int'(LAYERS); k++)
        if (int'(hit[l].layer) == k) xe = xexp_of(k);
      xh = {1'b0, hit[l].x};
      d_c[l] = (xh >= xe) ? xh - xe : xe - xh;
      // A hit on a layer number that does not exist contributes nothing.
      v_c[l] = hit_valid[l] && (int'(hit[l].layer) < int'(LAYERS));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1   <= '0;
      eoe_s1 <= 1'b0;
      for (int l = 0; l < int'(LINES); l++) d_s1[l] <= '0;
    end else begin
      eoe_s1 <= eoe;
      v_s1   <= v_c;
      for (int l = 0; l < int'(LINES); l++) d_s1[l] <= d_c[l];
    end
  end

  logic [SUM_W-1:0] sum_c;
  always_comb begin
    sum_c = '0;
    for (int l = 0; l < int'(LINES); l++)
      if (v_s1[l]) sum_c = sum_c + SUM_W'(hit_weight(d_s1[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_s2 <= '0;
      eoe_s2 <= 1'b0;
    end else begin
      sum_s2 <= sum_c;
      eoe_s2 <= eoe_s1;
    end
  end

  logic [ACC_W:0] acc_next;
  always_comb begin
    acc_next = {1'b0, acc} + (ACC_W+1)'(sum_s2);
    if (acc_next[ACC_W]) acc_next = {1'b0, {ACC_W{1'b1}}};   // saturate
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      res_valid  <= 1'b0;
      res_weight <= '0;
    end else begin
      res_valid <= eoe_s2;
      if (eoe_s2) begin
        res_weight <= acc_next[ACC_W-1:0];
        acc        <= '0;
      end else begin
        acc        <= acc_next[ACC_W-1:0];
      end
    end
  end

endmodule
