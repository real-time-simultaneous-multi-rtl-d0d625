// daq_pkg -- constants and types shared by the data acquisition blocks.
//
// The acquisition front end is a chain of six-channel, 16-bit simultaneous
// sampling ADCs (ADS8556 class) read serially over three data lines (or one
// line). The numbers below are the ones the design is built around: six
// channels and 16 bits per converter, three serial lines SDO_A/B/C, an ADC
// serial clock of 36 MHz and a 450 kS/s sampling rate. The FPGA system clock
// is taken as four times the ADC clock (144 MHz); the design only requires it
// to be a multiple of 36 MHz, the factor of four is this design's choice so
// that the free-running ADC clock can be oversampled safely.
package daq_pkg;

  // Converter geometry.
  localparam int unsigned ADC_CHANNELS   = 6;   // CH_A0, CH_A1, CH_B0, CH_B1, CH_C0, CH_C1
  localparam int unsigned SAMPLE_W       = 16;  // bits per conversion result
  localparam int unsigned SERIAL_LINES   = 3;   // SDO_A, SDO_B, SDO_C

  // Clocking.
  localparam int unsigned SCLK_HZ        = 36_000_000;
  localparam int unsigned CLK_MULT       = 4;
  localparam int unsigned CLK_HZ         = SCLK_HZ * CLK_MULT;
  localparam int unsigned SAMPLE_RATE    = 450_000;
  // System clock cycles between conversion starts at the nominal sample rate.
  localparam int unsigned DEFAULT_SAMPLE_PERIOD = CLK_HZ / SAMPLE_RATE;  // 320

  typedef logic [SAMPLE_W-1:0] sample_t;

  // How the converted data leaves each ADC.
  //   MODE_THREE_LINE : sel_A = sel_B = sel_C = 1, two channels per line.
  //   MODE_ONE_LINE   : only sel_A = 1, all six channels on SDO_A.
  typedef enum logic {
    MODE_THREE_LINE = 1'b0,
    MODE_ONE_LINE   = 1'b1
  } out_mode_e;

  // Levels of the sel_A/sel_B/sel_C pins (bit 0 = sel_A) for each mode.
  function automatic logic [2:0] sel_pins(out_mode_e mode);
    return (mode == MODE_ONE_LINE) ? 3'b001 : 3'b111;
  endfunction

  // Serial bits carried by one data line per ADC in the given mode.
  function automatic int unsigned bits_per_adc(out_mode_e mode);
    return (mode == MODE_ONE_LINE) ? ADC_CHANNELS * SAMPLE_W
                                   : (ADC_CHANNELS / SERIAL_LINES) * SAMPLE_W;
  endfunction

endpackage
