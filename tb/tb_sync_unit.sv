// tb_sync_unit -- self-checking test of the sample timer.
//
// Checks that start pulses are exactly one cycle long, that the first comes
// one cycle after enable, that consecutive pulses are period_i cycles apart
// (including the default 320-cycle period for 450 kS/s at 144 MHz and a
// period change), and that no pulse comes while disabled.
module tb_sync_unit;
  import daq_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [15:0] period = 16'(DEFAULT_SAMPLE_PERIOD);
  logic start;
  int checks = 0, failures = 0;
  int cyc = 0, last_pulse = -1, pulses = 0;

  sync_unit dut (.clk(clk), .rst_n(rst_n), .enable_i(enable), .period_i(period), .start_o(start));

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // watch a run of n pulses with the expected spacing
  task automatic expect_pulses(input int n, input int spacing);
    int prev = -1;
    for (int p = 0; p < n; p++) begin
      int t0 = cyc;
      while (!start) begin
        @(posedge clk); #1;
        if (cyc - t0 > spacing + 5) break;
      end
      check(start, "pulse arrives");
      if (prev >= 0) check(cyc - prev == spacing, $sformatf("spacing %0d expected %0d", cyc - prev, spacing));
      prev = cyc;
      @(posedge clk); #1;
      check(!start, "pulse is one cycle");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) begin @(posedge clk); #1; check(!start, "no pulse while disabled"); end
    enable <= 1'b1;
    @(posedge clk); #1;   // enable seen at this edge, pulse registered here
    check(start, "first pulse one cycle after enable");
    @(posedge clk); #1;
    check(!start, "first pulse one cycle wide");
    // it is DEFAULT_SAMPLE_PERIOD - 1 cycles to the next one
    expect_pulses(4, DEFAULT_SAMPLE_PERIOD);
    period <= 16'd37;
    @(posedge clk);
    expect_pulses(2, 37);   // first gap may be partial, take two and then check exact
    expect_pulses(5, 37);
    enable <= 1'b0;
    @(posedge clk); #1;
    repeat (100) begin @(posedge clk); #1; check(!start, "no pulse after disable"); end
    period <= 16'd0;
    enable <= 1'b1;
    @(posedge clk); #1;
    expect_pulses(5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
