// End-to-end, self-checking testbench of bifunction_shift_register at its
// default size (three stages, recirculating).
//
// The register is instantiated with no parameter override. Its outputs are
// compared every clock with a bit-level reference model kept in this file:
// load copies par_in, shift moves each bit one stage right and brings the
// rightmost bit back into stage 0. The run has four parts:
//   1. clear: par_out must be 0 right after rst_n falls;
//   2. the schematic's demonstration: parallel inputs 1,0,1 (stages 0..2)
//      are loaded and shown on par_out, then one right shift is checked;
//   3. latency: a loaded word must appear on par_out one clock after the
//      load edge, leave at ser_out one bit per clock starting with the
//      rightmost bit, and, because the word rotates, be back in place after
//      exactly WIDTH shifts;
//   4. random traffic: random select and data every clock.
// Each mechanism (clear, parallel load, right shift, recirculation of a bit
// from the last stage to the first, switch between the two modes) is
// counted, and one that never happened counts as a failure. A watchdog ends
// the run after a fixed number of cycles.
module tb_bifunction_shift_register;
  import bf_pkg::*;

  localparam int W = 3;  // the register's default width

  int checks = 0;
  int failures = 0;
  int n_clear = 0, n_load = 0, n_shift = 0, n_recirc_one = 0, n_switch = 0;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  mode_e        sel = MODE_PARALLEL;
  mode_e        last_sel = MODE_PARALLEL;
  logic [W-1:0] par_in = '0;
  logic         ser_in = 1'b0;
  logic [W-1:0] par_out;
  logic         ser_out;
  logic [W-1:0] model = '0;

  always #5 clk = ~clk;

  bifunction_shift_register dut (
    .clk, .rst_n, .sel, .par_in, .ser_in, .par_out, .ser_out
  );

  task automatic compare(input string what);
    checks++;
    if (par_out !== model || ser_out !== model[W-1]) begin
      failures++;
      $display("FAIL %s: par_out=%b ser_out=%b expected %b/%b at %0t",
               what, par_out, ser_out, model, model[W-1], $time);
    end
  endtask

  // One clock with the given mode and data; the model is advanced in step.
  task automatic step(input mode_e m, input logic [W-1:0] data);
    sel = m;
    par_in = data;
    ser_in = 1'($urandom);  // must be ignored while recirculating
    if (m != last_sel) n_switch++;
    last_sel = m;
    @(posedge clk);
    if (m == MODE_PARALLEL) begin
      model = data;
      n_load++;
    end else begin
      if (model[W-1]) n_recirc_one++;
      model = {model[W-2:0], model[W-1]};
      n_shift++;
    end
    #1;
    compare(m == MODE_PARALLEL ? "load" : "shift");
  endtask

  initial begin
    logic [W-1:0] word;
    if ($bits(par_out) != W) begin
      failures++;
      $display("FAIL default width is %0d, expected %0d", $bits(par_out), W);
    end

    // 1. clear
    #2;
    model = '0;
    compare("clear");
    n_clear++;
    @(posedge clk); #1;
    compare("held in clear");
    rst_n = 1'b1;

    // 2. demonstration: inputs 1,0,1 on stages 0,1,2, then one right shift
    step(MODE_PARALLEL, 3'b101);
    checks++;
    if (par_out !== 3'b101) begin
      failures++;
      $display("FAIL demo load: par_out=%b", par_out);
    end
    step(MODE_SHIFT, 3'b000);
    checks++;
    if (par_out !== 3'b011) begin  // stages 0,1,2 now hold 1,1,0
      failures++;
      $display("FAIL demo shift: par_out=%b", par_out);
    end

    // 3. latency and serial order, for every word
    for (int v = 0; v < (1 << W); v++) begin
      word = W'(v);
      sel = MODE_PARALLEL;
      par_in = word;
      @(negedge clk);
      checks++;
      if (par_out === word && word !== model) begin
        failures++;
        $display("FAIL word %b visible before the clock edge", word);
      end
      step(MODE_PARALLEL, word);  // visible one edge after the load
      for (int k = 0; k < W; k++) begin
        checks++;
        if (ser_out !== word[W-1-k]) begin
          failures++;
          $display("FAIL serial bit %0d of %b: got %b", k, word, ser_out);
        end
        step(MODE_SHIFT, W'($urandom));  // par_in must not matter
      end
      checks++;
      if (par_out !== word) begin
        failures++;
        $display("FAIL word %b not back after %0d shifts: %b", word, W, par_out);
      end
    end

    // 4. random traffic, with one more clear in the middle
    for (int i = 0; i < 3000; i++) begin
      step(mode_e'($urandom_range(1)), W'($urandom));
      if (i == 1500) begin
        @(negedge clk);
        rst_n = 1'b0;
        #1;
        model = '0;
        compare("clear mid-run");
        n_clear++;
        rst_n = 1'b1;
      end
    end

    $display("mechanisms: clear=%0d load=%0d shift=%0d recirculated_one=%0d mode_switch=%0d",
             n_clear, n_load, n_shift, n_recirc_one, n_switch);
    if (n_clear == 0)      begin failures++; $display("FAIL clear never happened"); end
    if (n_load == 0)       begin failures++; $display("FAIL load never happened"); end
    if (n_shift == 0)      begin failures++; $display("FAIL shift never happened"); end
    if (n_recirc_one == 0) begin failures++; $display("FAIL recirculation never happened"); end
    if (n_switch == 0)     begin failures++; $display("FAIL mode switch never happened"); end
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
