// flowacc_pkg: constants and types shared by the optical-flow accelerator.
//
// A binary descriptor is 64 bits wide, the width the hamming unit is drawn
// with. Matching costs are Hamming distances (0..64, 7 bits). A flow vector is
// a pair of signed integers in units of the pixel grid of the level it belongs
// to; the width of 8 bits is this design's choice and holds every flow the
// three-level hierarchy can produce with a 5x5 search window.
package flowacc_pkg;

  localparam int unsigned FEAT_W = 64;               // descriptor width
  localparam int unsigned SEG_W  = 3;                // bits per hamming segment
  localparam int unsigned N_SEG  = (FEAT_W + SEG_W - 1) / SEG_W;  // 22 segments
  localparam int unsigned COST_W = $clog2(FEAT_W + 1);            // 7 bits
  localparam int unsigned FLOW_W = 8;                // flow component width
  localparam int unsigned PIX_W  = 8;                // grey-level pixel width
  localparam int unsigned N_SR   = 9;                // 3x3 support region
  localparam int unsigned PEN_W  = 12;               // penalty (sum of 8 L1 distances)

  typedef logic [FEAT_W-1:0] feat_t;
  typedef logic [COST_W-1:0] cost_t;
  typedef logic [PIX_W-1:0]  pix_t;

  // Components are two's complement; read them through flow_x()/flow_y().
  typedef struct packed {
    logic [FLOW_W-1:0] y;
    logic [FLOW_W-1:0] x;
  } flow_t;

  // signed value of a flow component
  function automatic int flow_x(input flow_t f);
    logic signed [FLOW_W-1:0] t;
    t = f.x;
    return int'(t);
  endfunction

  function automatic int flow_y(input flow_t f);
    logic signed [FLOW_W-1:0] t;
    t = f.y;
    return int'(t);
  endfunction

endpackage
