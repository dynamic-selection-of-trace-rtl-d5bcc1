// dst_pkg: sizes shared by the dynamic signal tracing (DST) unit.
//
// The unit picks N trace signals out of M x N preselected candidates: every
// region R_i of the circuit offers its N best signals, cand[i][0] best. The
// multiplexers use the reduced wiring in which multiplexer k is "homed" on
// region k / (N/M): it sees that region's signal k mod (N/M) and the N - N/M
// lower-priority signals of every other region. The functions below give the
// resulting multiplexer width and select-code width; both modules that share
// the select encoding (trace_controller and trace_datapath) size their ports
// with them. The multiplexer size follows the source design; the select
// encoding built on it is this design's own.
package dst_pkg;

  // Signals each region places on its home multiplexers (first stage).
  function automatic int unsigned home_slots(int unsigned m, int unsigned n);
    return n / m;
  endfunction

  // Lower-priority signals per region that are shared with the other regions.
  function automatic int unsigned remain_slots(int unsigned m, int unsigned n);
    return n - n / m;
  endfunction

  // Inputs of one multiplexer: its home signal plus the remaining signals of
  // the M-1 other regions. 73 for N=32, M=4; 5 for N=M=3.
  function automatic int unsigned mux_inputs(int unsigned m, int unsigned n);
    return 1 + (m - 1) * remain_slots(m, n);
  endfunction

  // Width of a select code; at least 1 bit.
  function automatic int unsigned sel_width(int unsigned m, int unsigned n);
    return (mux_inputs(m, n) > 1) ? $clog2(mux_inputs(m, n)) : 1;
  endfunction

endpackage
