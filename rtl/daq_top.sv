// daq_top -- FPGA side of a simultaneous multi-channel data acquisition system.
//
// NUM_ADC six-channel ADCs are chained in daisy-chain mode (the first with
// DCEN low, the others with DCEN high, each passing the previous one's data
// on through its DCIN pins), so 6 * NUM_ADC analog channels reach the FPGA
// over just three serial lines, and all of them are sampled by one shared
// CONVST edge: there is no time skew between channels. Inside the FPGA:
//
//   sync_unit     -> start request at the programmed sample period
//   control_unit  -> drives CONVST, FS_n, sel_A/B/C; waits for BUSY to fall
//   adc_interface -> synchronizes BUSY/SCLK/SDO, deserializes the chain's frame
//   frame_buffer  -> FIFO of complete sample sets for the processing side
//
// The processing of the data, the external PROM and the SD card / host PC
// link lie outside this module: the buffer's read port is brought out instead.
// Configuration of Vref and input range is not part of this RTL.
//
// Interface: adc_* are the board pins towards the ADC chain (CONVST is one
// pin wired to every ADC's CONVST_A/B/C; SCLK is the ADCs' own clock, an
// input). enable_i/period_i set the sampling (period_i = 320 for 450 kS/s at
// the 144 MHz system clock), mode_i chooses three-line or one-line output.
// Sample sets leave on frame_* with a valid/ready handshake; frame_o[6*a + c]
// is channel c (A0, A1, B0, B1, C0, C1) of ADC a, a = 0 being the first of
// the chain. overflow_o pulses when a set is lost because the buffer is full,
// overrun_o when a start came before the previous readout had finished;
// idle_o and buffer_level_o report the sequencer and buffer state.
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned NUM_ADC      = 3,
  parameter int unsigned BUFFER_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // sampling control
  input  logic      enable_i,
  input  logic [15:0] period_i,
  input  out_mode_e mode_i,
  // ADC chain pins
  output logic      adc_convst_o,
  output logic      adc_fs_n_o,
  output logic [2:0] adc_sel_o,
  input  logic      adc_busy_i,
  input  logic      adc_sclk_i,
  input  logic [2:0] adc_sdo_i,
  // sample sets towards the processing side
  output logic      frame_valid_o,
  input  logic      frame_ready_i,
  output sample_t   frame_o [NUM_ADC*ADC_CHANNELS],
  // status
  output logic      overflow_o,
  output logic      overrun_o,
  output logic      idle_o,         // no conversion or readout in progress
  output logic [$clog2(BUFFER_DEPTH+1)-1:0] buffer_level_o
);

  localparam int unsigned NCH = NUM_ADC * ADC_CHANNELS;

  logic      start, busy_fall, set_valid;
  out_mode_e mode_cur;
  sample_t   set_data [NCH];
  logic [NCH*SAMPLE_W-1:0] set_flat, rd_flat;

  sync_unit #(.PERIOD_W(16)) u_sync (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable_i (enable_i),
    .period_i (period_i),
    .start_o  (start)
  );

  control_unit u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start),
    .mode_req_i   (mode_i),
    .busy_fall_i  (busy_fall),
    .frame_done_i (set_valid),
    .convst_o     (adc_convst_o),
    .fs_n_o       (adc_fs_n_o),
    .sel_o        (adc_sel_o),
    .mode_o       (mode_cur),
    .idle_o       (idle_o),
    .overrun_o    (overrun_o)
  );

  adc_interface #(.NUM_ADC(NUM_ADC)) u_if (
    .clk           (clk),
    .rst_n         (rst_n),
    .busy_i        (adc_busy_i),
    .sclk_i        (adc_sclk_i),
    .sdo_i         (adc_sdo_i),
    .fs_n_i        (adc_fs_n_o),
    .mode_i        (mode_cur),
    .busy_fall_o   (busy_fall),
    .frame_valid_o (set_valid),
    .frame_o       (set_data)
  );

  always_comb begin
    for (int i = 0; i < int'(NCH); i++) begin
      set_flat[i*SAMPLE_W +: SAMPLE_W] = set_data[i];
      frame_o[i] = rd_flat[i*SAMPLE_W +: SAMPLE_W];
    end
  end

  frame_buffer #(.WIDTH(NCH*SAMPLE_W), .DEPTH(BUFFER_DEPTH)) u_buf (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_valid_i (set_valid),
    .wr_data_i  (set_flat),
    .rd_valid_o (frame_valid_o),
    .rd_ready_i (frame_ready_i),
    .rd_data_o  (rd_flat),
    .overflow_o (overflow_o),
    .count_o    (buffer_level_o)
  );

endmodule
