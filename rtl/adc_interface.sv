// adc_interface -- receives the daisy-chained serial frame from the ADCs.
//
// The ADCs run from their own internal 36 MHz clock, which they also send
// out as SCLK. Because that clock is not clean enough to clock the FPGA, the
// FPGA runs from its own crystal clock (a multiple of 36 MHz) and SCLK is
// treated as data: BUSY, SCLK and SDO_A/B/C pass through one synchronizer of
// equal depth, and the interface acts on the edges it sees there.
//
//  * BUSY: a falling edge of the synchronized BUSY (conversion finished,
//    results latched in the ADC output registers) is reported on busy_fall_o
//    for one cycle; the control unit answers it by dropping CONVST and FS_n.
//  * Readout: FS_n, which this design drives itself, is delayed by the same
//    number of stages as the synchronizer so it lines up with the SCLK it
//    framed at the ADC pins (plus one cycle of setup). While the delayed
//    FS_n is low, every rising edge of SCLK shifts one bit of each SDO line
//    into a shift register per line.
//  * Daisy chain: with NUM_ADC converters chained, the ADC nearest the FPGA
//    sends its own words first, then the words it received on DCIN from the
//    converter before it, and so on back to the first ADC of the chain. A line
//    therefore carries NUM_ADC * 32 bits in three-line mode (two channels per
//    line: SDO_A carries CH_A0 then CH_A1, SDO_B CH_Bx, SDO_C CH_Cx) and
//    NUM_ADC * 96 bits on SDO_A in one-line mode (A0, A1, B0, B1, C0, C1).
//    Words are sent MSB first.
//  * When the last bit arrives, the words are sorted into one sample set,
//    frame_o[ADC_CHANNELS*a + c] = channel c (A0..C1) of ADC a, where a = 0 is
//    the first ADC of the chain (the one with DCEN low), and frame_valid_o
//    pulses for one cycle. All samples of one set were taken at the same
//    CONVST edge.
//
// The edge-based oversampling, the synchronizer depth and the channel order
// inside the frame are this design's choices; the framing (FS_n low, data
// taken on SCLK rising edges, chain order) follows the design description.
//
// Timing: busy_fall_o is high in the SYNC_STAGES'th cycle after the clock
// edge that first sees BUSY low at the pin.
// frame_valid_o follows the SYNC_STAGES+1'th cycle after the last SCLK rising
// edge of the frame. The system clock must be at least about three times the
// SCLK rate for every SCLK edge to be seen (four times by default).
module adc_interface
  import daq_pkg::*;
#(
  parameter int unsigned NUM_ADC     = 3,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  // ADC pins
  input  logic      busy_i,
  input  logic      sclk_i,
  input  logic [2:0] sdo_i,        // SDO_A (bit 0), SDO_B, SDO_C
  // from the control unit
  input  logic      fs_n_i,
  input  out_mode_e mode_i,
  // to the control unit
  output logic      busy_fall_o,
  // received sample set
  output logic      frame_valid_o,
  output sample_t   frame_o [NUM_ADC*ADC_CHANNELS]
);

  localparam int unsigned NCH      = NUM_ADC * ADC_CHANNELS;
  localparam int unsigned LEN_ONE  = NUM_ADC * ADC_CHANNELS * SAMPLE_W;              // one-line frame
  localparam int unsigned LEN_3    = NUM_ADC * (ADC_CHANNELS / SERIAL_LINES) * SAMPLE_W; // per line, three-line
  localparam int unsigned CNT_W    = $clog2(LEN_ONE + 1);

  // ---- synchronizers -----------------------------------------------------
  logic [4:0] pins_s;
  logic       busy_s, sclk_s;
  logic [2:0] sdo_s;

  bit_sync #(.WIDTH(5), .STAGES(SYNC_STAGES), .RESET_VAL(5'b0)) u_sync (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   ({sdo_i, sclk_i, busy_i}),
    .q_o   (pins_s)
  );
  assign busy_s = pins_s[0];
  assign sclk_s = pins_s[1];
  assign sdo_s  = pins_s[4:2];

  // FS_n as the ADC saw it, aligned to the synchronized pins. One stage more
  // than the pins: an SCLK edge that lands in the same system-clock cycle as
  // the FS_n edge is not counted, as it violates the converter's FS-to-SCLK
  // setup time.
  logic fs_n_al;
  bit_sync #(.WIDTH(1), .STAGES(SYNC_STAGES + 1), .RESET_VAL(1'b1)) u_fs_align (
    .clk   (clk),
    .rst_n (rst_n),
    .d_i   (fs_n_i),
    .q_o   (fs_n_al)
  );

  logic busy_q, sclk_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sclk_q <= 1'b0;
    end else begin
      busy_q <= busy_s;
      sclk_q <= sclk_s;
    end
  end

  wire sclk_rise = sclk_s & ~sclk_q;
  assign busy_fall_o = busy_q & ~busy_s;

  // ---- deserializer ------------------------------------------------------
  logic [LEN_ONE-1:0] sr_a;
  logic [LEN_3-1:0]   sr_b, sr_c;
  logic [CNT_W-1:0]   bit_cnt;
  logic               done_q;      // frame already delivered for this FS_n low
  logic               last_bit;
  logic [CNT_W-1:0]   frame_len;

  assign frame_len = (mode_i == MODE_ONE_LINE) ? CNT_W'(LEN_ONE) : CNT_W'(LEN_3);
  assign last_bit  = (bit_cnt == frame_len - 1'b1);

  logic capture;   // last bit shifted this cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_a    <= '0;
      sr_b    <= '0;
      sr_c    <= '0;
      bit_cnt <= '0;
      done_q  <= 1'b0;
      capture <= 1'b0;
    end else begin
      capture <= 1'b0;
      if (fs_n_al) begin
        bit_cnt <= '0;
        done_q  <= 1'b0;
      end else if (sclk_rise && !done_q) begin
        sr_a    <= {sr_a[LEN_ONE-2:0], sdo_s[0]};
        sr_b    <= {sr_b[LEN_3-2:0],   sdo_s[1]};
        sr_c    <= {sr_c[LEN_3-2:0],   sdo_s[2]};
        bit_cnt <= bit_cnt + 1'b1;
        if (last_bit) begin
          done_q  <= 1'b1;
          capture <= 1'b1;
        end
      end
    end
  end

  // Sort the received words into channel order. Word m of a line (m = 0 is
  // the first received) sits at bits [len-1-16m -: 16] of its shift register.
  sample_t sorted [NCH];
  always_comb begin
    for (int j = 0; j < int'(NUM_ADC); j++) begin
      // j counts chain positions from the FPGA end; ADC index a = NUM_ADC-1-j.
      for (int c = 0; c < int'(ADC_CHANNELS); c++) begin
        int a, m1, w3, l3;
        a  = int'(NUM_ADC) - 1 - j;
        m1 = j * int'(ADC_CHANNELS) + c;                  // one-line word index
        l3 = c / 2;                                       // line in three-line mode
        w3 = j * 2 + (c % 2);                             // word index on that line
        if (mode_i == MODE_ONE_LINE) begin
          sorted[a*int'(ADC_CHANNELS) + c] = sr_a[int'(LEN_ONE) - 1 - int'(SAMPLE_W)*m1 -: SAMPLE_W];
        end else begin
          unique case (l3)
            0:       sorted[a*int'(ADC_CHANNELS) + c] = sr_a[int'(LEN_3) - 1 - int'(SAMPLE_W)*w3 -: SAMPLE_W];
            1:       sorted[a*int'(ADC_CHANNELS) + c] = sr_b[int'(LEN_3) - 1 - int'(SAMPLE_W)*w3 -: SAMPLE_W];
            default: sorted[a*int'(ADC_CHANNELS) + c] = sr_c[int'(LEN_3) - 1 - int'(SAMPLE_W)*w3 -: SAMPLE_W];
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_valid_o <= 1'b0;
      for (int i = 0; i < int'(NCH); i++) frame_o[i] <= '0;
    end else begin
      frame_valid_o <= capture;
      if (capture) frame_o <= sorted;
    end
  end

endmodule
