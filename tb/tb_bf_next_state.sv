// Self-checking testbench of bf_next_state, the per-stage next-state logic.
//
// It applies all eight combinations of (select, parallel input, previous Q)
// and compares d with the eight-row truth table, held here as a constant
// written out row by row, independently of the equation in the module. The
// table is run through twice, in order and in reverse, so a glitch-free
// combinational response is checked after every input change. A watchdog
// ends the run if it ever hangs.
module tb_bf_next_state;
  import bf_pkg::*;

  int checks = 0;
  int failures = 0;

  logic  sel_bit, par_in, prev_q, d;
  mode_e sel;
  assign sel = mode_e'(sel_bit);

  bf_next_state dut (.sel(sel), .par_in(par_in), .prev_q(prev_q), .d(d));

  // Truth table, row index = {S, In, Q}; D column from row 0 to row 7.
  localparam logic [7:0] TABLE_D = {1'b1, 1'b1, 1'b0, 1'b0,   // rows 7..4 (S = 1)
                                    1'b1, 1'b0, 1'b1, 1'b0};  // rows 3..0 (S = 0)

  task automatic check_row(input int row);
    {sel_bit, par_in, prev_q} = 3'(row);
    #1;
    checks++;
    if (d !== TABLE_D[row]) begin
      failures++;
      $display("FAIL row %0d: S=%b In=%b Q=%b d=%b expected %b",
               row, sel_bit, par_in, prev_q, d, TABLE_D[row]);
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) check_row(r);
    for (int r = 7; r >= 0; r--) check_row(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
