// Next-state logic of one stage of the bi-function shift register.
//
// This is the combinational circuit that sits in front of each D flip-flop.
// It has three inputs and one output:
//   sel      - the register's mode (bf_pkg::mode_e: 1 = parallel load, 0 = shift)
//   par_in   - this stage's parallel data input ("In")
//   prev_q   - the Q output of the previous stage ("Q")
//   d        - the value this stage's flip-flop takes on the next clock edge
// Its function is the sum of products D = S'.Q + S.In, reduced from the
// eight-row truth table with a Karnaugh map: the stage copies its neighbour
// while shifting and its parallel input while loading. The equation and the
// signal roles follow the design description; it is written here as two AND
// terms and an OR, the same gates the reference schematic uses. Purely
// combinational, no timing of its own.
module bf_next_state
  import bf_pkg::*;
(
  input  mode_e sel,
  input  logic  par_in,
  input  logic  prev_q,
  output logic  d
);

  logic load_term;   // S . In
  logic shift_term;  // S' . Q

  always_comb begin
    load_term  = (sel == MODE_PARALLEL) & par_in;
    shift_term = (sel == MODE_SHIFT) & prev_q;
    d          = load_term | shift_term;
  end

endmodule
