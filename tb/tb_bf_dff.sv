// Self-checking testbench of bf_dff, the one-bit D flip-flop.
//
// A clock of period 10 drives the flip-flop. The test first checks that the
// asynchronous clear forces q to 0 without a clock edge, then feeds random
// data and checks after each rising edge that q equals the d sampled at that
// edge and that q does not move between edges. A second clear in the middle
// of the run is checked the same way. A watchdog ends the run after a fixed
// number of cycles.
module tb_bf_dff;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b1;
  logic q;

  always #5 clk = ~clk;

  bf_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic expect_q(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    logic sampled;
    // Clear between clock edges: q must drop at once.
    @(posedge clk); #2;
    @(posedge clk); #2;
    expect_q(1'b1, "load 1 before clear");
    rst_n = 1'b0; #1;
    expect_q(1'b0, "asynchronous clear");
    @(posedge clk); #2;
    expect_q(1'b0, "held in clear");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = 1'($urandom);
      sampled = d;
      @(posedge clk); #1;
      expect_q(sampled, "capture");
      d = ~d;       // change d away from the edge: q must hold
      #3;
      expect_q(sampled, "hold between edges");
      if (i == 100) begin
        d = 1'b1; @(posedge clk); #1;
        rst_n = 1'b0; #1;
        expect_q(1'b0, "clear mid-run");
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
