// adc_model -- behavioural model of one six-channel simultaneous-sampling
// ADC (ADS8556 class) in serial, daisy-chainable mode. Simulation only.
//
// It models just the digital side seen by the FPGA, sampled on the
// simulation clock clk:
//  * A rising edge of CONVST samples all six inputs vin[] at once and raises
//    BUSY for CONV_CYCLES clk cycles; when BUSY falls the samples are in the
//    output registers.
//  * The falling edge of FS_n loads the serial shift registers. With
//    sel = 3'b111 each line carries two channels (SDO_A: A0 then A1, SDO_B:
//    B0, B1, SDO_C: C0, C1); with sel = 3'b001 SDO_A carries all six
//    (A0, A1, B0, B1, C0, C1) and SDO_B/C stay low. MSB first.
//  * The MSB is on the line when FS_n falls; the FPGA reads on SCLK rising
//    edges and the model shifts on every SCLK falling edge after the first
//    rising edge. With dcen high the bit shifted in at the bottom is dcin,
//    so after its own words the model passes on the upstream ADC's words.
// Channel order inside vin[]: 0..5 = A0, A1, B0, B1, C0, C1.
module adc_model #(
  parameter int unsigned CONV_CYCLES = 20
) (
  input  logic        clk,
  input  logic        convst,
  input  logic        fs_n,
  input  logic        sclk,
  input  logic [2:0]  sel,
  input  logic        dcen,
  input  logic [2:0]  dcin,
  input  logic [15:0] vin [6],
  output logic        busy,
  output logic [2:0]  sdo
);

  logic [15:0] held [6];
  logic [15:0] outreg [6];
  logic [95:0] sr_a;
  logic [31:0] sr_b, sr_c;
  logic        convst_q = 1'b0, fs_q = 1'b1, sclk_q = 1'b0, armed = 1'b0;
  int          cnt = 0;
  logic        one_line;

  initial begin
    busy = 1'b0;
    sr_a = '0; sr_b = '0; sr_c = '0;
    for (int i = 0; i < 6; i++) begin held[i] = '0; outreg[i] = '0; end
  end

  assign one_line = (sel == 3'b001);

  always @(posedge clk) begin
    convst_q <= convst;
    fs_q     <= fs_n;
    sclk_q   <= sclk;
    // conversion
    if (convst && !convst_q && !busy) begin
      held <= vin;
      busy <= 1'b1;
      cnt  <= CONV_CYCLES;
    end else if (busy) begin
      if (cnt <= 1) begin
        busy   <= 1'b0;
        outreg <= held;
      end
      cnt <= cnt - 1;
    end
    // serial readout
    if (fs_q && !fs_n) begin
      armed <= 1'b0;
      if (one_line) begin
        sr_a <= {outreg[0], outreg[1], outreg[2], outreg[3], outreg[4], outreg[5]};
        sr_b <= '0;
        sr_c <= '0;
      end else begin
        sr_a <= {64'b0, outreg[0], outreg[1]};
        sr_b <= {outreg[2], outreg[3]};
        sr_c <= {outreg[4], outreg[5]};
      end
    end else if (!fs_n) begin
      if (sclk && !sclk_q) armed <= 1'b1;
      if (!sclk && sclk_q && armed) begin
        sr_a <= {sr_a[94:0], dcen & dcin[0]};
        sr_b <= {sr_b[30:0], dcen & dcin[1]};
        sr_c <= {sr_c[30:0], dcen & dcin[2]};
      end
    end
  end

  always_comb begin
    if (one_line) sdo = {2'b00, sr_a[95]};
    else if (sel == 3'b111) sdo = {sr_c[31], sr_b[31], sr_a[31]};
    else sdo = 3'b000;
  end

endmodule
