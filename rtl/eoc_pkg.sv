// eoc_pkg: shared constants and types of the event-oriented computing (EOC)
// accelerator. The accelerator evaluates many simple condition expressions
// in parallel (one per "associated variable") and forwards only the ones
// that came out true to the core processor.
//
// The numbers follow the artificial-life evaluation system: 32 organisms,
// each comparator module has 4 distance units and therefore needs 32/4 = 8
// steps, and the result queue has 4 entries. The coordinate width is not
// given for that system; 8 bits per axis is this design's choice.
package eoc_pkg;

  // Number of associated variables / condition expressions (organisms).
  localparam int unsigned N_VARS  = 32;
  // Distance units per comparator module.
  localparam int unsigned N_LANES = 4;
  // Result queue registers in the RTT control block.
  localparam int unsigned Q_DEPTH = 4;
  // Bits per coordinate (x and y).
  localparam int unsigned COORD_W = 8;
  // Index width of a variable.
  localparam int unsigned IDX_W   = $clog2(N_VARS);
  // A Manhattan distance needs one bit more than a coordinate.
  localparam int unsigned DIST_W  = COORD_W + 1;

  // One associated variable: the organism's sex and position. Its index is
  // the VRF address it is stored at.
  typedef struct packed {
    logic               male;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } organism_t;

  localparam int unsigned ORG_W = $bits(organism_t);

endpackage
