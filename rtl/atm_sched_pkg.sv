// atm_sched_pkg: types and helper functions shared by the VOQ switch and its
// scheduler.
//
// A time slot of the scheduler is split into phases (see slot_controller):
// the requests of every input are latched, each output grants one requester
// (the single matching iteration), then N grant-passing sub-intervals run,
// and finally each input accepts one grant. The phase encoding and the slot
// length formula are this design's own; the order of the phases follows the
// scheme (one iteration, then N equal sub-intervals for grant passing).
package atm_sched_pkg;

  typedef enum logic [1:0] {
    PH_REQUEST = 2'd0,  // latch Request(i,j) from the VOQ occupancy
    PH_GRANT   = 2'd1,  // single request-grant iteration, latch Grant(i,j)
    PH_PASS    = 2'd2,  // N sub-intervals T1..TN of grant passing
    PH_ACCEPT  = 2'd3   // each input accepts one grant, cells are switched
  } phase_e;

  // Clock cycles in one time slot for an N x N switch.
  function automatic int slot_cycles(int n);
    return n + 3;
  endfunction

  // Index of the ring-counter pulse (0-based, T1 -> 0) during which the
  // And(i,j) gate (0-based input i, output j) may pass its grant on.
  // Table 1: pulse k enables input i of output j when i + j = k (mod N).
  function automatic int pass_slot(int i, int j, int n);
    return (i + j) % n;
  endfunction

endpackage
