// lookahead_pkg: constants and helper functions shared by the lookahead-scheduled
// input-buffered switch.
//
// The switch has N inputs and N outputs and a single queue of B one-packet buffers
// per input. Each time slot is divided into N+1 minislots; one minislot is one clock.
// The defaults below are the 10 x 10 switch with B = 10 buffers per input, the main
// configuration evaluated for this scheduler. The packet width (one 53-byte ATM cell)
// is this design's own choice; the scheduling never looks at the payload.
package lookahead_pkg;

  localparam int unsigned N_DEFAULT      = 10;
  localparam int unsigned B_DEFAULT      = 10;
  localparam int unsigned DATA_W_DEFAULT = 424;  // 53-byte cell

  // Number of packets one input port processor may have in flight at once.
  // A packet that arrives in a slot where its input is served at position p
  // (0-based) makes N+1-p checks in that slot and N+1 in every later slot, and
  // gives up after B checks. The packet of age a (slots since arrival) is still
  // searching at the start of its slot only if a*(N+1) <= B+N-2, so ages
  // 0..ctx_depth-1 cover every packet that can still be searching.
  function automatic int unsigned ctx_depth(int unsigned n, int unsigned b);
    return (b + n - 2) / (n + 1) + 1;
  endfunction

  // Width of an index into a set of `n` things, at least one bit.
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
