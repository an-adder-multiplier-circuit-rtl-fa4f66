// ohr_pkg: shared definitions for one-hot residue (OHR) arithmetic.
//
// A residue x in [0, m) is carried on m wires, wire x high and all others
// low (one-hot). The functions below give, for a grid switch that sits on
// line i of operand a and line j of operand b, the output line it must be
// wired to for each modular operation. They are used at elaboration time
// only, to route each switch of the grid; no arithmetic is built from them.
// Addition and multiplication follow the line labels printed for the
// modulus-5 circuits; subtraction (a - b) is this design's own choice of
// operand order, since only the operation is named.
package ohr_pkg;

  // Output line of (i + j) mod m.
  function automatic int unsigned add_line(int unsigned i, int unsigned j, int unsigned m);
    return (i + j) % m;
  endfunction

  // Output line of (i * j) mod m.
  function automatic int unsigned mul_line(int unsigned i, int unsigned j, int unsigned m);
    return (i * j) % m;
  endfunction

  // Output line of (i - j) mod m, for i, j < m.
  function automatic int unsigned sub_line(int unsigned i, int unsigned j, int unsigned m);
    return (i + m - j) % m;
  endfunction

endpackage
