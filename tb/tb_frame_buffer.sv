// tb_frame_buffer -- self-checking test of the sample-set FIFO.
//
// Random writes and reads against a queue reference: read data and order,
// valid flag, fill level, the drop-on-full overflow pulse and a read and a
// write in the same cycle on a full buffer. Fills the buffer completely
// and drains it completely at least once.
module tb_frame_buffer;
  localparam int unsigned WIDTH = 288;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_valid = 1'b0, rd_ready = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic rd_valid, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_overflow = 0, n_rw_full = 0, n_empty = 0;
  logic [WIDTH-1:0] q [$];

  frame_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .wr_valid_i(wr_valid), .wr_data_i(wr_data),
    .rd_valid_o(rd_valid), .rd_ready_i(rd_ready), .rd_data_o(rd_data),
    .overflow_o(overflow), .count_o(count)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(!rd_valid && count == 0 && !overflow, "empty after reset");
    for (int i = 0; i < 20000; i++) begin
      logic w, r, exp_ovf;
      int phase;
      phase = (i / 500) % 3;   // write-heavy, read-heavy, balanced
      w = (phase == 0) ? ($urandom_range(3) != 0) : (phase == 1) ? ($urandom_range(3) == 0) : $urandom_range(1);
      r = (phase == 0) ? ($urandom_range(3) == 0) : (phase == 1) ? ($urandom_range(3) != 0) : $urandom_range(1);
      // outputs before the edge
      check(rd_valid == (q.size() != 0), "valid matches occupancy");
      check(int'(count) == q.size(), "count matches occupancy");
      if (q.size() != 0) check(rd_data == q[0], "oldest entry on the read port");
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      wr_valid <= w; rd_ready <= r; wr_data <= rand_word();
      @(posedge clk);
      // reference update, with the values that were presented
      exp_ovf = 1'b0;
      begin
        logic did_rd;
        did_rd = r && (q.size() != 0);
        if (w && q.size() == DEPTH && did_rd) n_rw_full++;
        if (did_rd) void'(q.pop_front());
        if (w) begin
          if (q.size() < DEPTH) q.push_back(wr_data);
          else exp_ovf = 1'b1;
        end
      end
      #1;
      check(overflow == exp_ovf, "overflow pulse");
      if (exp_ovf) n_overflow++;
    end
    check(n_full > 0 && n_empty > 0 && n_overflow > 0 && n_rw_full > 0, "full, empty, overflow and full read+write all exercised");
    $display("full=%0d empty=%0d overflow=%0d rw_on_full=%0d", n_full, n_empty, n_overflow, n_rw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
