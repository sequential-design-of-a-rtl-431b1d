// Shared definitions of the bi-function shift register.
//
// The register has one select input that chooses between its two functions.
// The encoding follows the truth table of the per-stage combinational
// circuit: select = 1 loads the parallel inputs into every stage (parallel in,
// parallel out), select = 0 moves each stage's content one place to the right
// (parallel in, serial out). The enum only names these two values; the
// encoding itself is the one the truth table uses.
package bf_pkg;

  typedef enum logic {
    MODE_SHIFT    = 1'b0,  // parallel-in serial-out: shift right one stage per clock
    MODE_PARALLEL = 1'b1   // parallel-in parallel-out: load all stages at once
  } mode_e;

endpackage
