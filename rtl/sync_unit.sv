// sync_unit -- decides when all converters sample.
//
// Every ADC's CONVST pins are tied together, so one edge starts all channels
// of the whole chain at the same instant; this unit is the single source of
// that decision. It holds a sample timer that counts period_i system-clock
// cycles and, while enable_i is high, issues a one-cycle start_o pulse at the
// beginning of every period. The control unit turns the pulse into the rising
// edge of the shared CONVST line. A period of DEFAULT_SAMPLE_PERIOD (320
// cycles of the 144 MHz clock) gives the nominal 450 kS/s.
//
// The design description names this unit and its purpose but not its insides;
// the programmable period timer is this design's choice.
//
// Timing: the first start_o comes one cycle after enable_i rises; the next
// ones follow every period_i cycles. Periods below 2 are treated as 2.
// Clearing enable_i stops the pulses and restarts the timer.
module sync_unit #(
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable_i,
  input  logic [PERIOD_W-1:0] period_i,
  output logic                start_o
);

  logic [PERIOD_W-1:0] cnt_q;
  logic [PERIOD_W-1:0] last;

  assign last = (period_i < PERIOD_W'(2)) ? PERIOD_W'(1) : period_i - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      start_o <= 1'b0;
    end else if (!enable_i) begin
      cnt_q   <= '0;
      start_o <= 1'b0;
    end else begin
      start_o <= (cnt_q == '0);
      cnt_q   <= (cnt_q >= last) ? '0 : cnt_q + 1'b1;
    end
  end

endmodule
