// st_pkg: shared types for the self-timed SRT divider.
//
// Data between self-timed blocks travels in 4-phase dual-rail code: one
// wire pair per bit, (t,f) = (0,0) is the empty spacer between tokens,
// (1,0) a logic one, (0,1) a logic zero, (1,1) is never produced. A radix-2
// SRT quotient digit travels on three rails (p, z, n) for +1, 0 and -1, one
// of which rises when the digit is valid; all low is the spacer. These
// encodings follow the thesis (dual-rail table and the three outputs
// q1/q0/q-1 of the quotient selection tree); the helper functions are this
// design's own.
package st_pkg;

  // One dual-rail bit.
  typedef struct packed {
    logic t;  // true rail: high for a valid 1
    logic f;  // false rail: high for a valid 0
  } dr_t;

  // One 1-of-3 quotient digit.
  typedef struct packed {
    logic p;  // digit +1
    logic z;  // digit  0
    logic n;  // digit -1
  } qd_t;

  localparam dr_t DR_EMPTY = '{t: 1'b0, f: 1'b0};

  function automatic dr_t dr_enc(input logic b);
    return '{t: b, f: ~b};
  endfunction

  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

  function automatic logic qd_valid(input qd_t q);
    return q.p | q.z | q.n;
  endfunction

endpackage
