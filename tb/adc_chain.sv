// adc_chain -- behavioural model of NUM_ADC daisy-chained ADCs and their
// free-running serial clock. Simulation only.
//
// ADC 0 is the first of the chain (DCEN low); ADC k (k > 0) has DCEN high and
// takes ADC k-1's SDO_A/B/C on its DCIN_A/B/C. ADC NUM_ADC-1 drives the three
// lines to the FPGA and its BUSY is the BUSY the FPGA sees. CONVST, FS_n and
// sel are common to all. The ADC clock, SCLK, is generated here from the
// simulation clock with a half period of SCLK_HALF or, with jitter enabled,
// randomly SCLK_HALF or SCLK_HALF+1 cycles, to mimic an imperfect clock.
// vin[6*k + c] is analog input c (A0, A1, B0, B1, C0, C1) of ADC k.
module adc_chain #(
  parameter int unsigned NUM_ADC     = 3,
  parameter int unsigned CONV_CYCLES = 20,
  parameter int unsigned SCLK_HALF   = 2
) (
  input  logic        clk,
  input  logic        jitter,
  input  logic        convst,
  input  logic        fs_n,
  input  logic [2:0]  sel,
  input  logic [15:0] vin [NUM_ADC*6],
  output logic        busy,
  output logic        sclk,
  output logic [2:0]  sdo
);

  logic [2:0] sdo_k  [NUM_ADC];
  logic       busy_k [NUM_ADC];
  int         half_cnt = 0;

  initial sclk = 1'b1;

  always @(posedge clk) begin
    if (half_cnt <= 1) begin
      sclk     <= ~sclk;
      half_cnt <= int'(SCLK_HALF) + ((jitter && ($urandom_range(1) == 1)) ? 1 : 0);
    end else begin
      half_cnt <= half_cnt - 1;
    end
  end

  for (genvar k = 0; k < NUM_ADC; k++) begin : g_adc
    logic [15:0] v [6];
    for (genvar c = 0; c < 6; c++) begin : g_v
      assign v[c] = vin[6*k + c];
    end
    adc_model #(.CONV_CYCLES(CONV_CYCLES)) u_adc (
      .clk    (clk),
      .convst (convst),
      .fs_n   (fs_n),
      .sclk   (sclk),
      .sel    (sel),
      .dcen   (k != 0),
      .dcin   ((k == 0) ? 3'b000 : sdo_k[(k == 0) ? 0 : k-1]),
      .vin    (v),
      .busy   (busy_k[k]),
      .sdo    (sdo_k[k])
    );
  end

  assign busy = busy_k[NUM_ADC-1];
  assign sdo  = sdo_k[NUM_ADC-1];

endmodule
