// dcr_pkg: types and constants shared by the dynamic cluster resizing logic.
//
// The machine has four homogeneous clusters, each holding four kinds of issue
// queue (integer, floating point, memory, copy). For every kind, the number of
// active issue queues (AIQs) runs from 1 (cluster 0 only, which never turns its
// queues off) to 4. Interval lengths follow the double-interval scheme: a large
// interval of 256K cycles and short trial intervals of 16K cycles. The length of
// a single-interval-scheme interval, the commit width used to size counters and
// the per-access energy constants (EAR) are this design's own choices.
package dcr_pkg;

  localparam int unsigned NUM_CLUSTERS  = 4;  // homogeneous clusters
  localparam int unsigned NUM_IQ_TYPES  = 4;  // int, fp, mem, copy
  localparam int unsigned COMMIT_WIDTH  = 4;  // decode/commit width
  localparam int unsigned ACC_W         = 3;  // accesses per cycle to one IQ: 0..7
  localparam int unsigned EAR_W         = 8;  // energy-per-access constant width
  localparam int unsigned N_W           = 3;  // active-IQ count 0..4

  localparam int unsigned LARGE_INTERVAL_CYCLES  = 262144; // 256K cycles
  localparam int unsigned SHORT_INTERVAL_CYCLES  = 16384;  // 16K cycles
  localparam int unsigned SINGLE_INTERVAL_CYCLES = 16384;  // own choice

  typedef enum logic [1:0] {
    IQ_INT  = 2'd0,
    IQ_FP   = 2'd1,
    IQ_MEM  = 2'd2,
    IQ_COPY = 2'd3
  } iq_type_e;

  // Which resizing scheme drives the active-IQ counts.
  typedef enum logic {
    SCHEME_SINGLE = 1'b0,
    SCHEME_DOUBLE = 1'b1
  } scheme_e;

  // Tag of a measurement window.
  //   PH_WARM   first part of the large interval, not measured
  //   PH_SINGLE one interval of the single-interval scheme
  //   PH_REF    last short window of the large interval, N active IQs
  //   PH_DOWN   short trial window with N-1 active IQs
  //   PH_UP     short trial window with N+1 active IQs
  typedef enum logic [2:0] {
    PH_WARM   = 3'd0,
    PH_SINGLE = 3'd1,
    PH_REF    = 3'd2,
    PH_DOWN   = 3'd3,
    PH_UP     = 3'd4
  } phase_e;

  // Default energy per access of each IQ type, arbitrary units, own choice:
  // the memory queue is six times larger than the others and costs more.
  localparam logic [NUM_IQ_TYPES-1:0][EAR_W-1:0] EAR_DEFAULT =
    {8'd6, 8'd40, 8'd14, 8'd12};  // copy, mem, fp, int

endpackage
