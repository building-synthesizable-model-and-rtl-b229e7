// tb_rx_fifo: checks the receive data, length and destination FIFOs in
// cut-through mode.
//
// A writer sends packets beat by beat as the stream interface does (data,
// running length with bit 31 set until the TLAST beat, TDEST), only while
// the data FIFO has room; a reader pops data, length and destination entries
// at random. A model predicts every output each cycle: the data head,
// occupancy, full/empty, the programmable levels (full when at most 2
// locations are free, empty when at most 1 is used), the length head - the
// oldest complete length, or else the open packet's length so far with bit
// 31 set - and that a length read removes only complete entries, the
// destination head and that a destination read removes it only after a
// complete length was read, and the packet_done pulse with the location
// count of the packet. Depth 16 makes the FIFO fill often. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module tb_rx_fifo;

  import axis_fifo_pkg::*;

  localparam int DEPTH = 16;

  logic              clk = 1'b0;
  always #5 clk = ~clk;
  logic              rst_n, pass, packet_end, data_rd_enable, length_rd_enable, dest_rd_enable;
  logic [31:0]       data_in, length_in, data_out, length_out;
  logic [DEST_W-1:0] dest_in, dest_out;
  logic              data_fifo_full, data_fifo_empty, length_fifo_empty, prog_full, prog_empty, packet_done;
  logic [4:0]        occupancy;
  logic [15:0]       prev_location;

  rx_fifo #(.DATA_W(32), .C_RX_FIFO_DEPTH(DEPTH), .full_threshold_data(2), .empty_threshold_data(1),
            .enable_cut_through(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0]       dq [$];
  int                lq [$];
  logic [DEST_W-1:0] tq [$];
  int                cur_len, beat, plen, last_words, partial_seen, done_seen;
  bit                cur_v, head_complete, exp_done;
  logic [DEST_W-1:0] cur_dest, pdest;
  logic [31:0]       want_len;
  bit                w_data, r_data, r_len, r_dest, l_room, t_room;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst_n = 1'b0; pass = 1'b0; packet_end = 1'b0; data_in = '0; length_in = '0; dest_in = '0;
    data_rd_enable = 1'b0; length_rd_enable = 1'b0; dest_rd_enable = 1'b0;
    cur_len = 0; cur_v = 0; head_complete = 0; beat = 0; plen = 0; exp_done = 0;
    partial_seen = 0; done_seen = 0; last_words = 0; cur_dest = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 6000; k++) begin
      // writer: a beat of the current packet when there is room
      if (plen == 0) begin plen = 1 + $urandom_range(9); beat = 0; pdest = 4'($urandom); end
      pass       = ($urandom_range(2) == 0) && (dq.size() < DEPTH);
      packet_end = pass && (beat == plen - 1);
      data_in    = $urandom;
      dest_in    = pdest;
      length_in  = {!packet_end, 8'h00, 23'(4 * (beat + 1))};
      // reader
      data_rd_enable   = ($urandom_range(2) == 0);
      length_rd_enable = ($urandom_range(9) == 0);
      dest_rd_enable   = ($urandom_range(9) == 0);
      #1;
      // expected outputs from the state before the edge
      chk(data_fifo_empty == (dq.size() == 0) && data_fifo_full == (dq.size() == DEPTH), "data FIFO flags");
      chk(32'(occupancy) == dq.size(), "occupancy");
      chk(prog_full == (DEPTH - dq.size() <= 2), "programmable full level");
      chk(prog_empty == (dq.size() <= 1), "programmable empty level");
      if (dq.size() != 0) chk(data_out == dq[0], "data head");
      if (lq.size() != 0) want_len = 32'(lq[0]);
      else if (cur_v)     want_len = {1'b1, 8'h00, 23'(cur_len)};
      else                want_len = 32'h0;
      chk(length_fifo_empty == (lq.size() == 0 && !cur_v), "length FIFO empty flag");
      if (lq.size() != 0 || cur_v) chk(length_out == want_len, $sformatf("length head %h want %h", length_out, want_len));
      if (lq.size() == 0 && cur_v) partial_seen++;
      if (tq.size() != 0) chk(dest_out == tq[0], "destination head");
      else if (cur_v)     chk(dest_out == cur_dest, "destination of the open packet");
      chk(packet_done == exp_done, "packet_done pulse");
      if (packet_done) begin
        done_seen++;
        chk(32'(prev_location) == last_words, "locations of the last packet");
      end
      w_data = pass && dq.size() < DEPTH;
      r_data = data_rd_enable && dq.size() != 0;
      r_len  = length_rd_enable && lq.size() != 0;
      r_dest = dest_rd_enable && head_complete && tq.size() != 0;
      l_room = lq.size() < DEPTH;
      t_room = tq.size() < DEPTH;
      @(negedge clk);
      // model update
      if (length_rd_enable) head_complete = (lq.size() != 0);
      if (r_data) void'(dq.pop_front());
      if (w_data) dq.push_back(data_in);
      if (r_len)  void'(lq.pop_front());
      if (r_dest) void'(tq.pop_front());
      exp_done = pass && packet_end;
      if (pass) begin
        if (packet_end) begin
          if (l_room) lq.push_back(4 * (beat + 1));
          if (t_room) tq.push_back(dest_in);
          last_words = beat + 1;
          cur_v = 1'b0;
          plen = 0;
        end else begin
          cur_v = 1'b1;
          cur_len = 4 * (beat + 1);
          cur_dest = dest_in;
          beat++;
        end
      end
    end
    chk(partial_seen > 0, "an open packet was shown as the length head");
    chk(done_seen > 0, "packets completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
