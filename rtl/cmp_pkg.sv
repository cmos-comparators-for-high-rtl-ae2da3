// Shared types for the comparator family.
//
// cmp_kind_e selects which of the two comparator circuits a stage of the
// hierarchical comparator uses: the fast look-behind comparator or the small
// ripple (low-power) comparator. cmp_result_t is the three-way outcome of an
// unsigned comparison of A against B; exactly one of its fields is set.
package cmp_pkg;

  typedef enum logic {
    CMP_HIGH_SPEED = 1'b0,  // look-behind comparator (LT_i, Equal_i, EQ_i)
    CMP_LOW_POWER  = 1'b1   // ripple comparator (pass-transistor chain)
  } cmp_kind_e;

  typedef struct packed {
    logic lt;  // A < B
    logic eq;  // A = B
    logic gt;  // A > B
  } cmp_result_t;

  // True when exactly one of lt / eq / gt is set.
  function automatic logic cmp_valid_result(cmp_result_t r);
    return (r.lt ^ r.eq ^ r.gt) & ~(r.lt & r.eq & r.gt);
  endfunction

endpackage
