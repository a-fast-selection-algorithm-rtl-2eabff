// Shared types of the capacitor-voltage selection (CVDSA) logic.
//
// One division pass of the selector looks at one bit of every remaining
// candidate voltage and splits the candidates into a "larger" group (bit set,
// or bit clear when the lowest voltages are wanted) and a "smaller" group.
// Comparing the number still to be selected, m, with the size of the larger
// group gives one of three branches; their numbering follows the algorithm's
// description:
//   branch 1: m >  Num(Larger)  take the whole larger group, go on in the
//                               smaller group with m - Num(Larger)
//   branch 2: m == Num(Larger)  take the whole larger group, stop
//   branch 3: m <  Num(Larger)  drop the smaller group, go on in the larger
//                               group with the same m
// BR_NONE marks a level that has not been decided.
package cvdsa_pkg;

  typedef enum logic [1:0] {
    BR_NONE   = 2'd0,
    BR_TAKE   = 2'd1,  // branch 1
    BR_END    = 2'd2,  // branch 2
    BR_KEEP   = 2'd3   // branch 3
  } branch_e;

endpackage
