// Shared definitions of the distributed-arithmetic (DA) LMS adaptive FIR filter.
//
// One filter iteration runs through four phases, sequenced by adf_ctrl:
//   PH_IDLE   wait for `enable`, then load the new sample x(n) and d(n);
//   PH_FILTER B bit-serial cycles of OBC distributed arithmetic, LSB first;
//   PH_ERROR  one cycle that forms y(n) and e(n) = d(n) - y(n);
//   PH_ADAPT  2^(N-1) cycles, one primary-LUT word adapted per cycle; the
//             secondary LUT advances to time n+1 in the last of them.
// The phase order follows from the data dependencies of the LMS recursion;
// the cycle budget per phase is this design's own choice.
package da_adf_pkg;

  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_FILTER = 2'd1,
    PH_ERROR  = 2'd2,
    PH_ADAPT  = 2'd3
  } adf_phase_e;

  // Width of a sum of `terms` two's complement words of `w` bits each.
  function automatic int unsigned sum_width(input int unsigned w, input int unsigned terms);
    return w + $clog2(terms);
  endfunction

endpackage
