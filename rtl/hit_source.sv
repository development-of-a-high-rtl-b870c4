// hit_source: on-chip event memory that replays test events in a continuous loop.
//
// For stand-alone tests of the processor, events are loaded into an on-chip RAM and fed
// to the tracking processor over and over. Each RAM word is one input cycle: a valid bit
// and a hit (layer, coordinate) per input line, and an end-of-event flag that closes the
// event in that cycle. Words 0 .. length-1 are played in order and the player then wraps
// to word 0.
//
// Interface: wr_en/wr_addr/wr_* load the RAM. While run is high the block offers words
// on out_* with out_valid; a word is taken in a cycle where out_ready is high, otherwise
// it is held (the processor stalls the source this way). loops counts completed passes.
// Timing: one word per cycle when not stalled; the first word appears one cycle after
// run rises. Replaying RAM-resident events in a loop follows the prototype's test set-up;
// the word format, the stall input and the loop counter are this design's choices.
module hit_source
  import ar_pkg::*;
#(
  parameter int unsigned LINES = 6,
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // RAM load
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [LINES-1:0]  wr_valid,
  input  hit_t              wr_hit [LINES],
  input  logic              wr_eoe,
  // play control
  input  logic              run,
  input  logic [AW:0]       length,
  // stream out
  output logic              out_valid,
  input  logic              out_ready,
  output logic [LINES-1:0]  out_hvalid,
  output hit_t              out_hit [LINES],
  output logic              out_eoe,
  output logic [31:0]       loops
);

  typedef struct packed {
    logic                       eoe;
    logic [LINES-1:0]           valid;
    logic [LINES*$bits(hit_t)-1:0] hits;
  } word_t;

  word_t         ram [WORDS];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      word_t w;
      w.eoe   = wr_eoe;
      w.valid = wr_valid;
      for (int l = 0; l < int'(LINES); l++)
        w.hits[l*$bits(hit_t) +: $bits(hit_t)] = wr_hit[l];
      ram[wr_addr] <= w;
    end
  end

  logic take;
  assign take = run && (length != 0) && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr        <= '0;
      loops      <= '0;
      out_valid  <= 1'b0;
      out_hvalid <= '0;
      out_eoe    <= 1'b0;
      for (int l = 0; l < int'(LINES); l++) out_hit[l] <= '0;
    end else if (take) begin
      out_valid  <= 1'b1;
      out_hvalid <= ram[ptr].valid;
      out_eoe    <= ram[ptr].eoe;
      for (int l = 0; l < int'(LINES); l++)
        out_hit[l] <= ram[ptr].hits[l*$bits(hit_t) +: $bits(hit_t)];
      if ((AW+1)'(ptr) + 1'b1 >= length) begin
        ptr   <= '0;
        loops <= loops + 1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
