// rle_pkg: constants and types shared by the run-length decompressor.
//
// The decompressor turns a stream of run lengths (codes) back into the
// bit sequence they describe, e.g. the codes 3,4,2,2 give 11100001100.
// It is a cyclo-dynamic dataflow graph mapped one node per module: two
// pointer counters, a circular code buffer, a run-length down counter,
// an output flag generator and a three-state control machine.
//
// The widths below are this design's choice; the state set (Free, Init,
// Run) follows the control diagram of the method.
package rle_pkg;

  // Width of one run-length code and of the run counter.
  localparam int unsigned CODE_W = 8;
  // Address width n_b of the circular buffer; it holds M = 2**NB codes.
  localparam int unsigned NB = 9;
  // Lead, in codes, that the write pointer must gain over the read
  // pointer before output starts.
  localparam int unsigned LEAD_N = 8;

  // Control states: idle, buffer fill, and run (output) state.
  typedef enum logic [1:0] {
    ST_FREE = 2'd0,
    ST_INIT = 2'd1,
    ST_RUN  = 2'd2
  } rle_state_t;

endpackage
