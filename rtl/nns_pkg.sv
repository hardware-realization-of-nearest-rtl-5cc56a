// nns_pkg: types and helper functions shared by the nearest neighbour search
// engine. The engine walks a balanced k-d tree held in a tree ROM (node n has
// its children at 2n+1 and 2n+2) and scans the points of each visited leaf
// from a separate points ROM. The node stack is driven by one of the
// operations below each cycle; the widths of the datapath follow from the
// coordinate width W and the dimensionality K.
package nns_pkg;

  // Node stack command issued by the controller every cycle.
  typedef enum logic [2:0] {
    STK_NONE    = 3'd0,  // keep the stack as it is
    STK_DESCEND = 3'd1,  // mark top as "second child next", push first child
    STK_POP     = 3'd2,  // drop the top entry
    STK_REPLACE = 3'd3,  // overwrite the top entry with the second child
    STK_INIT    = 3'd4   // stack := { root, child 0, depth 0 }
  } stack_op_e;

  // Width of a squared difference of two W-bit signed numbers.
  function automatic int unsigned sq_width(int unsigned w);
    return 2 * w + 2;
  endfunction

  // Width of a sum of K squared differences (squared Euclidean distance).
  function automatic int unsigned dist_width(int unsigned w, int unsigned k);
    return 2 * w + 2 + ((k > 1) ? $clog2(k) : 0);
  endfunction

  // Width of the depth (dimension index) field, at least one bit.
  function automatic int unsigned dim_width(int unsigned k);
    return (k > 1) ? $clog2(k) : 1;
  endfunction

endpackage
