// tb_daq_top -- end-to-end test of the data acquisition system at its
// default size (three daisy-chained six-channel ADCs, 18 channels, a
// four-entry buffer).
//
// A behavioural chain of three ADCs with a jittery free-running serial clock
// is wired to the board pins of daq_top. The analog inputs change every
// cycle; the values present at each CONVST rising edge are recorded as the
// expected sample set of that conversion, and every set read from the buffer
// is compared channel by channel, in order. Phases:
//   1. three-line output, long sample period, consumer always ready: checks
//      that CONVST edges come exactly one sample period apart (real-time
//      sampling) and that no overrun is flagged;
//   2. switch to one-line output (sel_A only) during a run;
//   3. the nominal 320-cycle period (450 kS/s) with three chained ADCs in
//      three-line mode, faster than the chain can be read: overruns;
//   4. the consumer stops reading: the buffer fills and sets are dropped
//      with an overflow pulse, then it drains.
// Each mechanism (three-line frame, one-line frame, mode switch, BUSY wait,
// daisy-chained data from every ADC, overrun, buffer full, overflow) is
// counted, and one that never happened counts as a failure.
module tb_daq_top;
  import daq_pkg::*;

  localparam int unsigned NUM_ADC = 3;
  localparam int unsigned NCH     = NUM_ADC * ADC_CHANNELS;
  localparam int unsigned DEPTH   = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic enable = 1'b0, jitter = 1'b0, frame_ready = 1'b1;
  logic [15:0] period = 16'd2500;
  out_mode_e mode = MODE_THREE_LINE;
  logic convst, fs_n, busy, sclk, frame_valid, overflow, overrun, idle;
  logic [2:0] sel, sdo;
  logic [$clog2(DEPTH+1)-1:0] level;
  logic [15:0] vin [NCH];
  sample_t frame [NCH];
  int checks = 0, failures = 0, cyc = 0;

  adc_chain #(.NUM_ADC(NUM_ADC), .CONV_CYCLES(100), .SCLK_HALF(2)) u_chain (
    .clk(clk), .jitter(jitter), .convst(convst), .fs_n(fs_n), .sel(sel),
    .vin(vin), .busy(busy), .sclk(sclk), .sdo(sdo)
  );

  daq_top dut (
    .clk(clk), .rst_n(rst_n), .enable_i(enable), .period_i(period), .mode_i(mode),
    .adc_convst_o(convst), .adc_fs_n_o(fs_n), .adc_sel_o(sel),
    .adc_busy_i(busy), .adc_sclk_i(sclk), .adc_sdo_i(sdo),
    .frame_valid_o(frame_valid), .frame_ready_i(frame_ready), .frame_o(frame),
    .overflow_o(overflow), .overrun_o(overrun), .idle_o(idle), .buffer_level_o(level)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- reference: sample sets in flight -----------------------------------
  typedef struct {
    sample_t   v [NCH];
    out_mode_e m;
  } set_t;
  set_t in_conv [$];     // sampled, not yet read out of the ADCs
  set_t in_buf  [$];     // expected in the buffer, oldest first

  int n_three = 0, n_one = 0, n_switch = 0, n_busy_wait = 0, n_overrun = 0;
  int n_full = 0, n_overflow = 0, n_sets = 0, n_dropped = 0, n_chain_ok = 0;
  int last_rise = -1, spacing_checks = 0;
  logic convst_q = 1'b0, fs_n_q = 1'b1, busy_seen = 1'b0;
  out_mode_e last_mode = MODE_THREE_LINE;
  logic spacing_on = 1'b0;

  always @(posedge clk) begin
    #1;
    cyc++;
    // analog inputs change every cycle
    for (int i = 0; i < NCH; i++) vin[i] = 16'($urandom);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // CONVST rising edge: all channels of all ADCs sampled now
      if (convst && !convst_q) begin
        set_t s;
        s.v = vin;
        s.m = (sel == 3'b001) ? MODE_ONE_LINE : MODE_THREE_LINE;
        in_conv.push_back(s);
        if (spacing_on && last_rise >= 0) begin
          check(cyc - last_rise == int'(period), $sformatf("CONVST period %0d, expected %0d", cyc - last_rise, period));
          spacing_checks++;
        end
        last_rise = cyc;
        busy_seen = 1'b0;
      end
      if (convst && busy) busy_seen = 1'b1;
      // CONVST falls with FS_n only after BUSY was high and fell
      if (convst_q && !convst) begin
        check(busy_seen && !busy && !fs_n, "CONVST falls with FS_n after BUSY");
        if (busy_seen) n_busy_wait++;
      end
      // readout finished: the set went to the buffer, or was dropped
      if (!fs_n_q && fs_n) begin
        set_t s;
        s = in_conv.pop_front();
        if (s.m != last_mode) n_switch++;
        last_mode = s.m;
        if (s.m == MODE_ONE_LINE) n_one++; else n_three++;
        if (overflow) n_dropped++;
        else in_buf.push_back(s);
      end
      if (overflow) n_overflow++;
      if (overrun) n_overrun++;
      if (level == DEPTH) n_full++;
      check(int'(level) == in_buf.size() || (!fs_n_q && fs_n), "buffer level matches");
      // a set leaves the buffer
      if (frame_valid && frame_ready) begin
        set_t s;
        logic ok;
        check(in_buf.size() > 0, "set read while none expected");
        if (in_buf.size() > 0) begin
          s = in_buf.pop_front();
          ok = 1'b1;
          for (int i = 0; i < NCH; i++) begin
            check(frame[i] == s.v[i], $sformatf("set %0d channel %0d: got %h expected %h", n_sets, i, frame[i], s.v[i]));
            if (frame[i] != s.v[i]) ok = 1'b0;
          end
          if (ok) n_chain_ok++;
        end
        n_sets++;
      end
      convst_q = convst;
      fs_n_q   = fs_n;
    end
  end

  task automatic wait_sets(input int n);
    int target = n_sets + n;
    while (n_sets < target) @(posedge clk);
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) vin[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    check(idle && !convst && fs_n && !frame_valid, "idle after reset");

    // 1. three-line, slow enough for real-time operation (a one-line frame of
    //    three ADCs takes about 1500 cycles, so 2500 also fits phase 2)
    spacing_on = 1'b1;
    enable <= 1'b1;
    wait_sets(6);
    check(n_overrun == 0, "no overrun at a period the chain can sustain");
    // 2. one-line output with jitter on the ADC clock
    jitter = 1'b1;
    mode <= MODE_ONE_LINE;
    wait_sets(5);
    check(sel == 3'b001 || sel == 3'b111, "sel pins legal");
    mode <= MODE_THREE_LINE;
    wait_sets(3);
    spacing_on = 1'b0;
    // 3. nominal 450 kS/s period with three chained ADCs
    period <= 16'(DEFAULT_SAMPLE_PERIOD);
    wait_sets(6);
    // 4. consumer stalls: buffer fills and overflows, then drains
    period <= 16'd1500;
    frame_ready <= 1'b0;
    wait_cycles(1500 * (DEPTH + 3));
    frame_ready <= 1'b1;
    wait_sets(DEPTH + 2);
    enable <= 1'b0;
    wait_cycles(3000);
    check(idle && in_buf.size() == 0 && in_conv.size() == 0, "all sets delivered or accounted for at the end");

    $display("sets=%0d three_line=%0d one_line=%0d mode_switches=%0d busy_waits=%0d overruns=%0d buffer_full=%0d overflows=%0d dropped=%0d chain_sets_ok=%0d period_checks=%0d",
             n_sets, n_three, n_one, n_switch, n_busy_wait, n_overrun, n_full, n_overflow, n_dropped, n_chain_ok, spacing_checks);
    check(n_three > 0,      "three-line readout happened");
    check(n_one > 0,        "one-line readout happened");
    check(n_switch >= 2,    "mode switch happened");
    check(n_busy_wait > 0,  "BUSY wait happened");
    check(n_overrun > 0,    "overrun happened");
    check(n_full > 0,       "buffer full happened");
    check(n_overflow > 0,   "overflow happened");
    check(n_dropped == n_overflow, "each overflow dropped one set");
    check(n_chain_ok > 0,   "daisy-chained sets from all ADCs received");
    check(spacing_checks > 0, "sample period checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
