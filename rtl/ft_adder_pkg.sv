// Shared constants of the fault-tolerant fast adders.
//
// The fault-injection vectors of the self-testing full adder (st_fa) carry one
// bit per internal node; a 1 flips that node. The node list is this design's
// own choice of sites, picked so that every gate group of the self-testing
// full adder can be disturbed: the sum-path A XNOR B gate, the sum output, the
// carry-path A XNOR B gate (shared with the checker) and the carry mux output.
package ft_adder_pkg;

  // Bit positions inside one st_fa injection vector.
  typedef enum int unsigned {
    INJ_XS   = 0,  // A XNOR B gate of the sum path
    INJ_S    = 1,  // sum output (second XNOR)
    INJ_XC   = 2,  // A XNOR B gate of the carry path and checker
    INJ_COUT = 3   // carry mux output
  } st_inj_site_e;

  localparam int unsigned ST_INJ_BITS = 4;

  // Number of self-testing full adders inside one self-correcting full adder:
  // the main one and two redundant copies.
  localparam int unsigned SC_COPIES = 3;

  // Number of carry generation circuits voted in one self-correcting block.
  localparam int unsigned TMR_COPIES = 3;

  typedef logic [ST_INJ_BITS-1:0] st_inj_t;

endpackage
