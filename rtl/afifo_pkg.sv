// afifo_pkg: types and helpers shared by the augmented-FIFO replacement
// units and the cache that uses them.
//
// policy_e names the three replacement schemes the cache can be built with:
//   POL_MH  Move-on-Hit FIFO  - the victim pointer also advances on a hit in
//                               the way it points at.
//   POL_SH  Set-on-Hit FIFO   - one use bit per block; the victim is the first
//                               block, from the pointer on, not used since the
//                               last miss in the set.
//   POL_CB  Counter-Based FIFO - a small saturating hit counter per block; the
//                               victim is the block with the smallest count.
// mem_op_e is the operation on the cache's block-transfer memory port.
package afifo_pkg;

  typedef enum logic [1:0] {
    POL_MH = 2'd0,
    POL_SH = 2'd1,
    POL_CB = 2'd2
  } policy_e;

  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_op_e;

endpackage
