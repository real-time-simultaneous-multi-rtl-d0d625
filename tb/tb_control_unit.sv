// tb_control_unit -- self-checking test of the conversion/readout sequencer.
//
// Drives start, BUSY-falling and frame-done events by hand and checks the
// CONVST, FS_n and sel pins and the overrun flag cycle by cycle: CONVST rises
// one cycle after a start, CONVST and FS_n fall together one cycle after the
// BUSY falling edge, FS_n rises one cycle after frame done, the mode is held
// for a whole conversion, and events outside their state are ignored. A
// random phase compares the unit against a small reference sequence model.
module tb_control_unit;
  import daq_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, busy_fall = 1'b0, frame_done = 1'b0;
  out_mode_e mode_req = MODE_THREE_LINE;
  logic convst, fs_n, idle, overrun;
  logic [2:0] sel;
  out_mode_e mode;
  int checks = 0, failures = 0;

  control_unit dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .mode_req_i(mode_req),
    .busy_fall_i(busy_fall), .frame_done_i(frame_done),
    .convst_o(convst), .fs_n_o(fs_n), .sel_o(sel), .mode_o(mode),
    .idle_o(idle), .overrun_o(overrun)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (convst=%0b fs_n=%0b sel=%b ovr=%0b)", $time, what, convst, fs_n, sel, overrun);
    end
  endtask

  // one clock with the given event pulses, then look at the outputs
  task automatic step(input logic s, input logic bf, input logic fd);
    start <= s; busy_fall <= bf; frame_done <= fd;
    @(posedge clk);
    start <= 1'b0; busy_fall <= 1'b0; frame_done <= 1'b0;
    #1;
  endtask

  // reference model state
  int    ref_state = 0;        // 0 idle, 1 convert, 2 read
  logic  ref_convst = 0, ref_fs_n = 1, ref_ovr = 0;
  out_mode_e ref_mode = MODE_THREE_LINE;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(!convst && fs_n && idle && !overrun, "reset state");

    // one-line conversion
    mode_req = MODE_ONE_LINE;
    step(1, 0, 0);
    check(convst && fs_n && sel == 3'b001 && mode == MODE_ONE_LINE, "CONVST rises one cycle after start, sel_A only");
    step(0, 0, 1);
    check(convst && fs_n, "frame done ignored while converting");
    mode_req = MODE_THREE_LINE;
    step(1, 0, 0);
    check(overrun && convst, "start while converting flags overrun");
    step(0, 0, 0);
    check(!overrun && convst && fs_n, "CONVST held high until BUSY falls");
    step(0, 1, 0);
    check(!convst && !fs_n, "CONVST and FS_n fall together after BUSY falls");
    check(sel == 3'b001, "mode held during readout");
    step(0, 1, 0);
    check(!convst && !fs_n, "second BUSY edge ignored in readout");
    repeat (5) step(0, 0, 0);
    check(!fs_n, "FS_n stays low during readout");
    step(0, 0, 1);
    check(fs_n && !convst && idle, "FS_n rises after frame done");
    step(0, 1, 0);
    check(fs_n && !convst && idle, "BUSY edge ignored when idle");
    // three-line conversion picks up the new mode
    step(1, 0, 0);
    check(convst && sel == 3'b111 && mode == MODE_THREE_LINE, "three-line mode: all sel pins high");
    step(0, 1, 0);
    step(0, 0, 1);
    check(idle && fs_n && !convst, "back to idle");

    // random phase against the reference model
    ref_state = 0; ref_convst = 0; ref_fs_n = 1; ref_ovr = 0;
    for (int i = 0; i < 3000; i++) begin
      logic s, bf, fd;
      s  = ($urandom_range(9) == 0);
      bf = ($urandom_range(5) == 0);
      fd = ($urandom_range(5) == 0);
      mode_req = out_mode_e'($urandom_range(1));
      ref_ovr = 0;
      case (ref_state)
        0: if (s) begin ref_state = 1; ref_convst = 1; ref_mode = mode_req; end
        1: begin ref_ovr = s; if (bf) begin ref_state = 2; ref_convst = 0; ref_fs_n = 0; end end
        default: begin ref_ovr = s; if (fd) begin ref_state = 0; ref_fs_n = 1; end end
      endcase
      step(s, bf, fd);
      check(convst == ref_convst && fs_n == ref_fs_n && overrun == ref_ovr &&
            sel == sel_pins(ref_mode) && idle == (ref_state == 0), "random sequence matches reference");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
