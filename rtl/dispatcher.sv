// dispatcher: switching network that distributes hits to the engines.
//
// Each hit is sent to every engine whose pattern tracks may be close to it. The choice is
// made by a lookup table addressed by the hit's layer and the upper bits of its
// coordinate (a "bin" of 2**BIN_SHIFT strips); each table word holds one enable bit per
// engine. The table is written through the cfg_* port before running, as the prototype's
// dispatcher uses a preloaded table. With several input lines every line reads the table
// in parallel (one read port per line), so one hit per line is routed each cycle.
//
// Interface: in_valid[l]/in_hit[l] is a hit on line l, in_eoe marks the last cycle of an
// event. eng_valid[e][l] says that the hit now on out_hit[l] goes to engine e; out_hit
// and out_eoe are the delayed inputs, broadcast to all engines.
// Timing: one register stage, input at cycle t appears on the outputs at t+1.
// Table address = layer * 2**(X_W-BIN_SHIFT) + (x >> BIN_SHIFT). The bin width, the
// table organisation as one enable bit per engine and the write port are this design's
// choices; the table being indexed by layer and coordinate follows the prototype.
module dispatcher
  import ar_pkg::*;
#(
  parameter int unsigned LINES     = 6,
  parameter int unsigned N_ENG     = N_U * N_V,
  parameter int unsigned BIN_SHIFT = 5,
  localparam int unsigned NBINS    = 1 << (X_W - BIN_SHIFT),
  localparam int unsigned DEPTH    = LAYERS * NBINS,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load
  input  logic              cfg_we,
  input  logic [AW-1:0]     cfg_addr,
  input  logic [N_ENG-1:0]  cfg_data,
  // hits in
  input  logic [LINES-1:0]  in_valid,
  input  hit_t              in_hit [LINES],
  input  logic              in_eoe,
  // hits out
  output logic [LINES-1:0]  eng_valid [N_ENG],
  output hit_t              out_hit [LINES],
  output logic              out_eoe
);

  logic [N_ENG-1:0] lut [DEPTH];

  always_ff @(posedge clk) begin
    if (cfg_we && int'(cfg_addr) < int'(DEPTH)) lut[cfg_addr] <= cfg_data;
  end

  // Table read per line; a hit on a layer that does not exist is dropped.
  logic [N_ENG-1:0] sel [LINES];
  always_comb begin
    for (int l = 0; l < int'(LINES); l++) begin
      logic [AW-1:0] a;
      a = AW'(int'(in_hit[l].layer) * int'(NBINS) + (int'(in_hit[l].x) >> BIN_SHIFT));
      if (in_valid[l] && int'(in_hit[l].layer) < int'(LAYERS)) sel[l] = lut[a];
      else                                                   sel[l] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_eoe <= 1'b0;
      for (int e = 0; e < int'(N_ENG); e++) eng_valid[e] <= '0;
      for (int l = 0; l < int'(LINES); l++) out_hit[l] <= '0;
    end else begin
      out_eoe <= in_eoe;
      for (int l = 0; l < int'(LINES); l++) out_hit[l] <= in_hit[l];
      for (int e = 0; e < int'(N_ENG); e++)
        for (int l = 0; l < int'(LINES); l++)
          eng_valid[e][l] <= sel[l][e];
    end
  end

endmodule
