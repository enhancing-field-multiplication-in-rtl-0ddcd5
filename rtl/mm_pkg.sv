// mm_pkg: types and helpers shared by the bit-serial systolic Montgomery
// multiplier over GF(2^k).
//
// The two systolic arrays are steered by two control bits that travel down
// the PE chain together: t (capture the top/bottom coefficient bit of the
// running partial product) and z (active low: force the shifted-in partial
// product bit to zero on the last bit of a pass). mm_ctrl_t bundles them so
// that the per-PE delay line is one register of this type.
package mm_pkg;

  typedef struct packed {
    logic t;  // 1 in the cycle a PE processes bit position j = 0
    logic z;  // 0 in the cycle a PE processes bit position j = k-1
  } mm_ctrl_t;

  // Control word seen when the arrays are idle: t inactive, z passive.
  localparam mm_ctrl_t MM_CTRL_IDLE = '{t: 1'b0, z: 1'b1};

  // Number of processing elements in each of the two arrays, (k+1)/2.
  function automatic int unsigned mm_num_pe(int unsigned k);
    return (k + 1) / 2;
  endfunction

endpackage
