// tb_adc_interface -- self-checking test of the serial ADC interface.
//
// A chain of NUM_ADC behavioural ADCs with a free-running, jittery serial
// clock feeds the interface. The testbench plays the sequencer itself:
// it raises CONVST, waits for the interface's BUSY-falling report, drops
// CONVST and FS_n, waits for the sample set and raises FS_n again. The
// analog inputs change every cycle; the values present at the CONVST edge
// are recorded and every channel of the received set is compared with them.
// Both output modes are used. Also checked: busy_fall_o comes
// SYNC_STAGES cycles after BUSY falls, exactly one set per readout, and
// the readout time is within the bounds set by the frame length and the
// SCLK period.
module tb_adc_interface;
  import daq_pkg::*;

  localparam int unsigned NUM_ADC   = 3;
  localparam int unsigned NCH       = NUM_ADC * ADC_CHANNELS;
  localparam int unsigned SCLK_HALF = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic convst = 1'b0, fs_n = 1'b1, jitter = 1'b1;
  out_mode_e mode = MODE_THREE_LINE;
  logic [15:0] vin [NCH];
  logic busy, sclk, busy_fall, frame_valid;
  logic [2:0] sdo;
  sample_t frame [NCH];
  sample_t expected [NCH];
  int checks = 0, failures = 0, cyc = 0;
  int busy_fell_at = -1, n_frames = 0, n_one = 0, n_three = 0;

  adc_chain #(.NUM_ADC(NUM_ADC), .CONV_CYCLES(25), .SCLK_HALF(SCLK_HALF)) u_chain (
    .clk(clk), .jitter(jitter), .convst(convst), .fs_n(fs_n), .sel(sel_pins(mode)),
    .vin(vin), .busy(busy), .sclk(sclk), .sdo(sdo)
  );

  adc_interface #(.NUM_ADC(NUM_ADC)) dut (
    .clk(clk), .rst_n(rst_n), .busy_i(busy), .sclk_i(sclk), .sdo_i(sdo),
    .fs_n_i(fs_n), .mode_i(mode), .busy_fall_o(busy_fall),
    .frame_valid_o(frame_valid), .frame_o(frame)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // analog inputs: new random values every cycle; remember them at the CONVST edge
  logic convst_q = 1'b0, busy_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    convst_q <= convst;
    busy_q <= busy;
    if (convst && !convst_q) expected <= vin;
    if (busy_q && !busy) busy_fell_at <= cyc;
    for (int i = 0; i < NCH; i++) vin[i] <= 16'($urandom);
    if (frame_valid) n_frames <= n_frames + 1;
  end

  task automatic one_conversion(input out_mode_e m);
    int t_fs, t_done, bits, frames_before;
    mode = m;
    @(posedge clk); #1;
    convst <= 1'b1;
    // wait for the interface to report the end of conversion
    do begin @(posedge clk); #1; end while (!busy_fall);
    check(cyc - busy_fell_at == 2, $sformatf("busy_fall latency %0d", cyc - busy_fell_at));
    convst <= 1'b0;
    fs_n   <= 1'b0;
    frames_before = n_frames;
    t_fs = cyc;
    do begin @(posedge clk); #1; end while (!frame_valid);
    t_done = cyc;
    for (int i = 0; i < NCH; i++)
      check(frame[i] == expected[i], $sformatf("mode %s channel %0d: got %h expected %h", m.name(), i, frame[i], expected[i]));
    bits = bits_per_adc(m) * NUM_ADC;
    check(t_done - t_fs >= bits * 2 * SCLK_HALF && t_done - t_fs <= bits * 2 * (SCLK_HALF + 1) + 8,
          $sformatf("readout time %0d cycles for %0d bits", t_done - t_fs, bits));
    @(posedge clk); #1;
    fs_n <= 1'b1;
    repeat (40) @(posedge clk);
    check(n_frames == frames_before + 1, "exactly one sample set per readout");
    if (m == MODE_ONE_LINE) n_one++; else n_three++;
  endtask

  initial begin
    for (int i = 0; i < NCH; i++) vin[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    check(!frame_valid && !busy_fall, "quiet after reset");
    jitter = 1'b0;
    one_conversion(MODE_THREE_LINE);
    one_conversion(MODE_ONE_LINE);
    jitter = 1'b1;
    for (int k = 0; k < 60; k++) one_conversion(out_mode_e'(k % 2));
    check(n_one > 0 && n_three > 0, "both output modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
