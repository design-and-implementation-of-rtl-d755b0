// sms_pkg: widths and controller states shared by the stable matching
// scheduler blocks.
//
// Ranks run from 1 to N and the value 0 marks a node that has been removed
// (or, on a bus, that nobody drives a value), so a rank needs clog2(N+1) bits.
// Node and row indices are 0-based and need clog2(N) bits (at least 1).
package sms_pkg;

  // Bits of a rank register / value bus line for an N x N scheduler.
  function automatic int unsigned rank_w(int unsigned n);
    return $clog2(n + 1);
  endfunction

  // Bits of a row or column index for an N x N scheduler.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Scheduler sequencing: waiting for start, or running iterations.
  typedef enum logic {
    S_IDLE = 1'b0,
    S_RUN  = 1'b1
  } sched_state_e;

endpackage
