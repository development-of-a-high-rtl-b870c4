// ar_pkg: types and constants shared by the artificial-retina tracking processor.
//
// The processor reconstructs straight 2D tracks in a tracker of six single-coordinate
// layers with no magnetic field. A track is described by its coordinate u on the first
// layer and v on the last layer; the (u,v) plane is cut into cells, one processing
// engine per cell. The six layers, the (u,v) parametrisation, the cell-per-engine
// organisation and the roughly 200 engines per device follow the prototype this RTL
// describes. The coordinate width, the equally spaced layers, the cell grid placement
// and the shape of the weight function are this design's own choices.
package ar_pkg;

  // Detector: six single-coordinate layers.
  localparam int unsigned LAYERS  = 6;
  localparam int unsigned LAYER_W = 3;
  // Hit coordinate, in strip units, 0 .. 2**X_W-1 on every layer.
  localparam int unsigned X_W     = 10;

  // Weight kernel: w(d) = (R*R - d*d) >> W_SHIFT for |d| < R, else 0.
  localparam int unsigned R_LOG2  = 5;
  localparam int unsigned R       = 1 << R_LOG2;
  localparam int unsigned W_SHIFT = 2;
  localparam int unsigned W_W     = 2 * R_LOG2 - W_SHIFT + 1;   // holds R*R >> W_SHIFT
  // Per-event accumulated weight of one cell (saturating).
  localparam int unsigned ACC_W   = 16;

  // Default cell grid: N_U x N_V = 200 engines, cell centres at BASE + i*PITCH.
  localparam int unsigned N_U     = 10;
  localparam int unsigned N_V     = 20;
  localparam int unsigned U_BASE  = 32;
  localparam int unsigned U_PITCH = 96;
  localparam int unsigned V_BASE  = 24;
  localparam int unsigned V_PITCH = 48;

  // One hit on an input line: layer number and coordinate.
  typedef struct packed {
    logic [LAYER_W-1:0] layer;
    logic [X_W-1:0]     x;
  } hit_t;

  // Expected coordinate on layer l of the pattern track through (u,v).
  // Layers are equally spaced, layer 0 carries u and layer LAYERS-1 carries v.
  function automatic int expected_x(int u, int v, int l);
    return u + ((v - u) * l) / int'(LAYERS - 1);
  endfunction

  // Weight of a hit at distance d (d >= 0) from the pattern track.
  function automatic logic [W_W-1:0] hit_weight(logic [X_W:0] d);
    logic [2*X_W+1:0] dd;
    if (d >= (X_W+1)'(R)) return '0;
    dd = (2*X_W+2)'(d) * (2*X_W+2)'(d);
    return W_W'(((2*X_W+2)'(R * R) - dd) >> W_SHIFT);
  endfunction

endpackage
