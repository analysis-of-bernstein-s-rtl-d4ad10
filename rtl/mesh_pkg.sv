// mesh_pkg: constants and enumerations shared by the routing-mesh modules.
//
// The routing mesh multiplies a sparse D x D bit matrix A by K bit vectors at
// once (K block-Wiedemann chains).  Every node of a ROWS x COLS mesh owns RHO
// consecutive columns of A and the nonzero entries of those columns; one
// multiplication routes every nonzero entry, as a message, to the node that
// owns its row index.  The PAPER_* values below are the sizes of the
// single-wafer configuration the design is dimensioned for (D = 4e7 columns
// of weight h = 100, about 42 columns per node, K = 208 chains); they are kept
// here for reference and for the sizing arithmetic in the README.
//
// Encoding choices of this implementation (not fixed by the source design):
//   * a message addresses its destination by (node row, node column, local
//     column) rather than by the flat row index r; r = ((row*COLS)+col)*RHO+c.
//   * the four disabled-neighbour bits of a node are indexed DIR_N..DIR_W.
package mesh_pkg;

  // Reference sizes of the main configuration (single wafer, "small" matrix).
  localparam int unsigned PAPER_D    = 40_000_000; // matrix columns
  localparam int unsigned PAPER_H    = 100;        // nonzeros per column
  localparam int unsigned PAPER_RHO  = 42;         // columns per node (42.10 on average)
  localparam int unsigned PAPER_K    = 208;        // chains carried per message
  localparam int unsigned PAPER_SIDE = 975;        // sqrt(D/rho) nodes per mesh side

  // Step of the clockwise transposition schedule.  Rows and columns are
  // counted from 1 in the schedule: odd rows talk to the node above in
  // PH_UP, odd columns to the node on the right in PH_RIGHT, odd rows to the
  // node below in PH_DOWN and odd columns to the node on the left in PH_LEFT.
  typedef enum logic [1:0] {
    PH_UP    = 2'd0,
    PH_RIGHT = 2'd1,
    PH_DOWN  = 2'd2,
    PH_LEFT  = 2'd3
  } phase_e;

  // Command broadcast by the sequencer to every node.
  typedef enum logic [2:0] {
    NC_IDLE   = 3'd0,  // hold state
    NC_CLEAR  = 3'd1,  // P' <- 0, entry index <- 0, drop any message
    NC_LOAD   = 3'd2,  // fetch next matrix entry, form message in R
    NC_ROUTE  = 3'd3,  // one compare-exchange step of the current phase
    NC_COMMIT = 3'd4   // P <- P'
  } node_cmd_e;

  // Target of a host write on the initialisation port.
  typedef enum logic [1:0] {
    LD_Q   = 2'd0,  // matrix entry: addr = entry index in the node list
    LD_P   = 2'd1,  // K vector bits of one local column: addr = column
    LD_DIS = 2'd2,  // disabled-neighbour bits of the node
    LD_U   = 2'd3   // inner-product selector: addr = 2*j + slot
  } ld_sel_e;

  // Bit positions of the disabled-neighbour flags.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_E = 1;
  localparam int unsigned DIR_S = 2;
  localparam int unsigned DIR_W = 3;

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
