// frame_buffer -- first-in first-out store of complete sample sets.
//
// Sits between the ADC interface and the processing side. Each entry is one
// simultaneous sample set (all channels of one conversion), WIDTH bits wide,
// so channels taken at the same instant are always kept together. DEPTH
// entries are held in a memory array with read and write pointers.
//
// Write side: wr_valid_i for one cycle stores wr_data_i. The ADC side cannot
// be stalled (the converters keep sampling in real time), so a write that
// finds the buffer full is dropped and reported on overflow_o for one cycle.
// Read side: valid/ready handshake; rd_data_o is the oldest entry while
// rd_valid_o is high and is consumed in a cycle where rd_ready_i is high.
// A simultaneous read and write on a full buffer is accepted.
//
// The buffer is only named in the design description; depth, entry format,
// handshake and drop-on-full policy are this design's choices.
module frame_buffer #(
  parameter int unsigned WIDTH = 288,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid_i,
  input  logic [WIDTH-1:0]         wr_data_i,
  output logic                     rd_valid_o,
  input  logic                     rd_ready_i,
  output logic [WIDTH-1:0]         rd_data_o,
  output logic                     overflow_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             full, empty, do_wr, do_rd;

  assign empty = (count_o == '0);
  assign full  = (count_o == ($clog2(DEPTH+1))'(DEPTH));
  assign do_rd = rd_ready_i && !empty;
  assign do_wr = wr_valid_i && (!full || do_rd);

  function automatic logic [PTR_W-1:0] inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count_o    <= '0;
      overflow_o <= 1'b0;
    end else begin
      overflow_o <= wr_valid_i && !do_wr;
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      unique case ({do_wr, do_rd})
        2'b10:   count_o <= count_o + 1'b1;
        2'b01:   count_o <= count_o - 1'b1;
        default: ;
      endcase
    end
  end

  assign rd_valid_o = !empty;
  assign rd_data_o  = mem[rd_ptr];

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    count_o <= ($clog2(DEPTH+1))'(DEPTH));

endmodule
