// control_unit -- sequences one simultaneous conversion and its serial readout.
//
// The ADCs are controlled by three things: the CONVST line (shared by every
// ADC and all three CONVST_A/B/C pins, so one FPGA pin starts all channels
// at the same instant), the active-low frame-sync FS_n, and the sel_A/B/C
// pins that choose whether data leaves each ADC on three lines or on SDO_A
// alone. The sequence follows the flow of the design:
//
//   IDLE     CONVST low, FS_n high. A start request raises CONVST (its rising
//            edge starts sampling) and moves to CONVERT.
//   CONVERT  CONVST held high while the ADCs convert. When the ADC interface
//            reports the falling edge of BUSY, CONVST and FS_n are both driven
//            low in the same cycle and the unit moves to READ.
//   READ     FS_n held low while the ADC interface shifts the frame in. When
//            the interface reports the frame complete, FS_n returns high and
//            the unit is IDLE again.
//
// The output mode is captured when a conversion starts, so a mode change
// requested mid-frame takes effect from the next conversion; mode_o tells the
// ADC interface which framing the current readout uses. A start request that
// arrives while a conversion or readout is still running cannot be served; it
// is dropped and flagged on overrun_o for one cycle (the sampling rate asked
// for is faster than the chain can deliver). The start-while-busy flag, the
// mode capture and the reset values are this design's choices.
//
// Timing: all outputs are registered. CONVST rises one cycle after start_i;
// CONVST falls and FS_n falls one cycle after busy_fall_i; FS_n rises one
// cycle after frame_done_i.
module control_unit
  import daq_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start_i,       // conversion start request (one-cycle pulse)
  input  out_mode_e mode_req_i,    // requested output mode
  input  logic      busy_fall_i,   // BUSY falling edge seen by the ADC interface
  input  logic      frame_done_i,  // serial frame fully received
  output logic      convst_o,      // common CONVST line of all ADCs
  output logic      fs_n_o,        // frame sync, active low
  output logic [2:0] sel_o,        // sel_A (bit 0), sel_B, sel_C
  output out_mode_e mode_o,        // mode of the conversion in progress
  output logic      idle_o,
  output logic      overrun_o      // start request dropped (still busy)
);

  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,
    ST_CONVERT = 2'd1,
    ST_READ    = 2'd2
  } state_e;

  state_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ST_IDLE;
      convst_o  <= 1'b0;
      fs_n_o    <= 1'b1;
      mode_o    <= MODE_THREE_LINE;
      overrun_o <= 1'b0;
    end else begin
      overrun_o <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (start_i) begin
            convst_o <= 1'b1;
            mode_o   <= mode_req_i;
            state_q  <= ST_CONVERT;
          end
        end
        ST_CONVERT: begin
          overrun_o <= start_i;
          if (busy_fall_i) begin
            convst_o <= 1'b0;
            fs_n_o   <= 1'b0;
            state_q  <= ST_READ;
          end
        end
        ST_READ: begin
          overrun_o <= start_i;
          if (frame_done_i) begin
            fs_n_o  <= 1'b1;
            state_q <= ST_IDLE;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign sel_o  = sel_pins(mode_o);
  assign idle_o = (state_q == ST_IDLE);

  // CONVST and FS_n are never both active: FS_n only falls as CONVST falls.
  a_convst_fs_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(convst_o && !fs_n_o));

endmodule
