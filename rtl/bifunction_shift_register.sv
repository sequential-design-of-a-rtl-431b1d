// Bi-function shift register: a parallel-in register whose contents leave
// either in parallel or in serial, chosen by one select input.
//
// WIDTH stages sit in a row, stage 0 on the left and stage WIDTH-1 on the
// right. Each stage is a D flip-flop fed by its own next-state circuit
// (bf_next_state), D = S'.Q + S.In, where Q is the output of the stage to the
// left. With sel = MODE_PARALLEL (1) every stage loads its bit of par_in on
// the next rising clock edge, and par_out shows the loaded word one clock
// later: a parallel-in parallel-out register. With sel = MODE_SHIFT (0)
// every stage takes the value of its left neighbour, so the word moves one
// place to the right per clock and leaves bit by bit at ser_out, the output
// of the rightmost stage: a parallel-in serial-out register. A word loaded
// in parallel is therefore fully shifted out after WIDTH clocks.
//
// The leftmost stage has no neighbour. With RECIRCULATE = 1 (default) it
// takes the rightmost stage's output, so the word rotates while shifting;
// this follows the wire the reference schematic draws back from the last
// flip-flop to the first stage. With RECIRCULATE = 0 it takes ser_in
// instead, for chaining registers; ser_in is not used when RECIRCULATE = 1.
//
// The default of three stages is the size of the reference schematic; the
// description itself is for any n. The asynchronous active-low clear rst_n
// is this implementation's addition (see bf_dff).
module bifunction_shift_register
  import bf_pkg::*;
#(
  parameter int unsigned WIDTH       = 3,
  parameter bit          RECIRCULATE = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            sel,      // 1 = parallel load, 0 = shift right
  input  logic [WIDTH-1:0] par_in,   // bit i goes to stage i
  input  logic             ser_in,   // left-hand serial input, used when RECIRCULATE = 0
  output logic [WIDTH-1:0] par_out,  // bit i is the output of stage i
  output logic             ser_out   // output of the rightmost stage
);

  logic [WIDTH-1:0] d;
  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] prev_q;  // Q of the stage to the left of each stage

  always_comb begin
    prev_q[0] = RECIRCULATE ? q[WIDTH-1] : ser_in;
    for (int i = 1; i < WIDTH; i++) prev_q[i] = q[i-1];
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    bf_next_state u_next (
      .sel    (sel),
      .par_in (par_in[i]),
      .prev_q (prev_q[i]),
      .d      (d[i])
    );

    bf_dff u_ff (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (d[i]),
      .q     (q[i])
    );
  end

  assign par_out = q;
  assign ser_out = q[WIDTH-1];

  initial begin
    assert (WIDTH >= 1) else $error("WIDTH must be at least 1");
  end

endmodule
