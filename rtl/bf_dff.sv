// One D flip-flop: the storage element of one data bit of the register.
//
// On every rising edge of clk the output q takes the value of d. An
// active-low asynchronous clear (rst_n) forces q to 0, like the CLEAR line
// of the basic registers the design is built from; the bi-function
// schematic itself draws its flip-flops without a clear, so the clear is a
// choice of this implementation that lets simulation and hardware start
// from a known state. The inverted output of the schematic's flip-flops is
// not used by the design and is not provided.
module bf_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
