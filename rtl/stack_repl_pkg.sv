// Shared types of the stack-based replacement circuits.
//
// policy_e selects which control circuit a cache instantiates for every set:
// the LRU stack (a hit moves the referenced row to the top) or the FIFO stack
// (only a miss changes the order). Both keep the replaced block's way number
// in the bottom row, so the rest of the cache does not depend on the choice.
package stack_repl_pkg;

  typedef enum logic {
    POLICY_LRU  = 1'b0,
    POLICY_FIFO = 1'b1
  } policy_e;

  // Way number preset into stack row k by the precharge signal. Row 0 is the
  // top of the stack, row ways-1 the bottom, so way 0 is the first victim and
  // an empty set is filled in the order 0, 1, 2, ...
  function automatic int unsigned init_way(int unsigned ways, int unsigned row);
    return ways - 1 - row;
  endfunction

endpackage
