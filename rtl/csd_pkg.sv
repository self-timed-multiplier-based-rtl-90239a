// csd_pkg: types shared by the self-timed CSD multiplier.
//
// Every data signal in the array is dual-rail: a pair of wires (t, f).
// (0,0) is the spacer (precharged, "no data yet"), (1,0) is a valid 1 and
// (0,1) a valid 0; (1,1) never occurs in a fault-free circuit. Each gate
// output rail is a sum of products of input rails, so outputs only rise
// during evaluation and fall together during precharge, which is what
// makes completion detection possible.
//
// A CSD digit D_J in {0,+1,+2,-1,-2} travels as a 5-out-of-1 code
// {N, X, 2X, Y, 2Y}: exactly one wire high once the digit is known, all low
// while precharged.
package csd_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // false rail
  } dr_t;

  typedef struct packed {
    logic n;   // D = 0  (null partial product)
    logic x;   // D = +1
    logic x2;  // D = +2
    logic y;   // D = -1
    logic y2;  // D = -2
  } csd_code_t;

  // Encode a single-rail bit as dual rail, held at the spacer while en is low.
  function automatic dr_t dr_enc(input logic en, input logic b);
    return '{t: en & b, f: en & ~b};
  endfunction

  // A dual-rail signal is complete when one of its rails is high.
  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

  // Signed value of a valid digit code.
  function automatic int code_value(input csd_code_t c);
    return c.x ? 1 : c.x2 ? 2 : c.y ? -1 : c.y2 ? -2 : 0;
  endfunction

endpackage
