// ksa_pkg: types shared by the stages of the Kogge-Stone adder.
//
// Every position of the adder, and every span i:j inside the prefix tree, is
// described by a generate/propagate pair. The pair is kept together in one
// packed struct so that the cells and stages pass a single value per bit.
// g is "this span produces a carry on its own", p is "this span passes an
// incoming carry through". The bundling is a choice of this implementation;
// the equations the cells apply to it are the classic prefix-adder ones.
package ksa_pkg;

  typedef struct packed {
    logic g;  // generate of the span
    logic p;  // propagate of the span
  } pg_t;

  // Number of Kogge-Stone levels for an n-bit operand: ceil(log2 n).
  function automatic int unsigned ks_levels(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
