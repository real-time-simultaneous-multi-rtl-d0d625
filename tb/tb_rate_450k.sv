// tb_rate_450k -- sustained-rate test at the nominal 450 kS/s.
//
// One six-channel ADC (the chain reduced to a single converter) is sampled
// with the nominal 320-cycle period (450 kS/s at the 144 MHz system clock)
// in three-line mode, with the ADC clock at its nominal 36 MHz (a quarter of
// the system clock). The model's conversion time
// is CONV_CYCLES = 150 cycles (about 1.04 us), a model value. The test checks
// that the design keeps up in real time: every CONVST edge is exactly one
// period after the previous one, no start request is lost (no overrun), no
// set is dropped, and every set read out matches the inputs at its CONVST
// edge.
module tb_rate_450k;
  import daq_pkg::*;

  localparam int unsigned NUM_ADC = 1;
  localparam int unsigned NCH     = NUM_ADC * ADC_CHANNELS;
  localparam int unsigned N_SETS  = 200;

  logic clk = 1'b0, rst_n = 1'b1;
  logic enable = 1'b0;
  logic [15:0] period = 16'(DEFAULT_SAMPLE_PERIOD);
  logic convst, fs_n, busy, sclk, frame_valid, overflow, overrun, idle;
  logic [2:0] sel, sdo;
  logic [2:0] level;
  logic [15:0] vin [NCH];
  sample_t frame [NCH];
  typedef struct { sample_t v [NCH]; } set_t;
  set_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0, sets = 0, last_rise = -1;
  logic convst_q = 1'b0;

  adc_chain #(.NUM_ADC(NUM_ADC), .CONV_CYCLES(150), .SCLK_HALF(2)) u_chain (
    .clk(clk), .jitter(1'b0), .convst(convst), .fs_n(fs_n), .sel(sel),
    .vin(vin), .busy(busy), .sclk(sclk), .sdo(sdo)
  );

  daq_top #(.NUM_ADC(NUM_ADC)) dut (
    .clk(clk), .rst_n(rst_n), .enable_i(enable), .period_i(period), .mode_i(MODE_THREE_LINE),
    .adc_convst_o(convst), .adc_fs_n_o(fs_n), .adc_sel_o(sel),
    .adc_busy_i(busy), .adc_sclk_i(sclk), .adc_sdo_i(sdo),
    .frame_valid_o(frame_valid), .frame_ready_i(1'b1), .frame_o(frame),
    .overflow_o(overflow), .overrun_o(overrun), .idle_o(idle), .buffer_level_o(level)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  initial begin
    repeat (N_SETS * 320 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    for (int i = 0; i < NCH; i++) vin[i] = 16'($urandom);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (convst && !convst_q) begin
        set_t s;
        s.v = vin;
        exp_q.push_back(s);
        if (last_rise >= 0) check(cyc - last_rise == int'(DEFAULT_SAMPLE_PERIOD), $sformatf("CONVST period %0d", cyc - last_rise));
        last_rise = cyc;
      end
      check(!overrun, "no start request lost");
      check(!overflow, "no sample set dropped");
      if (frame_valid) begin
        check(exp_q.size() > 0, "set expected");
        if (exp_q.size() > 0) begin
          set_t e;
          e = exp_q.pop_front();
          for (int i = 0; i < NCH; i++)
            check(frame[i] == e.v[i], $sformatf("set %0d channel %0d: got %h expected %h", sets, i, frame[i], e.v[i]));
        end
        sets++;
      end
      convst_q = convst;
    end
  end

  initial begin
    for (int i = 0; i < NCH; i++) vin[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    enable <= 1'b1;
    while (sets < N_SETS) @(posedge clk);
    $display("sets=%0d at %0d cycles per set", sets, DEFAULT_SAMPLE_PERIOD);
    check(sets == N_SETS, "all sets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
