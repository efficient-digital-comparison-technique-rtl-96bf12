// Shared definitions for the tolerance comparators.
//
// A tolerance comparator reports whether two binary words agree to within
// one unit of their lowest compared bit position. Both comparator
// organisations (parallel and bit-serial) drive a single result bit with
// the same encoding: 0 means "compare" (the words agree within tolerance)
// and 1 means "non-compare". That encoding is the one printed beside the
// output gate of both circuit diagrams; the enum name is this design's own.
package tolcmp_pkg;

  typedef enum logic {
    COMPARE     = 1'b0,
    NON_COMPARE = 1'b1
  } cmp_result_e;

endpackage
