// Self-checking testbench of bifunction_shift_register at 32 bits with the
// leftmost stage fed from ser_in instead of from the rightmost stage.
//
// Thirty-two flip-flops is the register size the design discussion uses as
// its example of an n-bit register. The test loads random 32-bit words in
// parallel and shifts each one out completely: the bits must leave at
// ser_out rightmost first, one per clock, for exactly 32 clocks, while the
// bits driven on ser_in enter at stage 0 and, after 32 shifts, fill the
// whole register in the order they were sent. Random mixes of load and
// shift are also compared every clock with a reference model. A watchdog
// ends the run after a fixed number of cycles.
module tb_bsr_wide_serial;
  import bf_pkg::*;

  localparam int W = 32;

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_shift = 0, n_ser_in_one = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  mode_e        sel = MODE_PARALLEL;
  logic [W-1:0] par_in = '0;
  logic         ser_in = 1'b0;
  logic [W-1:0] par_out;
  logic         ser_out;
  logic [W-1:0] model = '0;

  always #5 clk = ~clk;

  bifunction_shift_register #(.WIDTH(W), .RECIRCULATE(1'b0)) dut (
    .clk, .rst_n, .sel, .par_in, .ser_in, .par_out, .ser_out
  );

  task automatic step(input mode_e m, input logic [W-1:0] data, input logic sin);
    sel = m;
    par_in = data;
    ser_in = sin;
    @(posedge clk);
    if (m == MODE_PARALLEL) begin
      model = data;
      n_load++;
    end else begin
      model = {model[W-2:0], sin};
      n_shift++;
      if (sin) n_ser_in_one++;
    end
    #1;
    checks++;
    if (par_out !== model || ser_out !== model[W-1]) begin
      failures++;
      $display("FAIL step: par_out=%h ser_out=%b expected %h at %0t",
               par_out, ser_out, model, $time);
    end
  endtask

  initial begin
    logic [W-1:0] word, fill;
    #2;
    rst_n = 1'b1;

    // Full serial unload of whole words, with a new word shifted in behind.
    for (int n = 0; n < 20; n++) begin
      word = W'($urandom);
      fill = W'($urandom);
      step(MODE_PARALLEL, word, 1'b0);
      for (int k = 0; k < W; k++) begin
        checks++;
        if (ser_out !== word[W-1-k]) begin
          failures++;
          $display("FAIL word %h serial bit %0d: got %b", word, k, ser_out);
        end
        step(MODE_SHIFT, W'($urandom), fill[W-1-k]);
      end
      checks++;
      if (par_out !== fill) begin
        failures++;
        $display("FAIL serial fill: par_out=%h expected %h", par_out, fill);
      end
    end

    // Random traffic.
    for (int i = 0; i < 2000; i++)
      step(mode_e'($urandom_range(1)), W'($urandom), 1'($urandom));

    $display("mechanisms: load=%0d shift=%0d ser_in_one=%0d", n_load, n_shift, n_ser_in_one);
    if (n_load == 0 || n_shift == 0 || n_ser_in_one == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
