// tb_rx_stream_if: checks the receive stream handshake and length counting.
//
// A source sends packets of 1..20 beats with random gaps while the data FIFO
// full input is raised at random. Checked on every cycle: a beat is passed to
// the FIFO exactly when TVALID and TREADY are both high, with its data and
// TDEST; TREADY is never high while the FIFO is full when a beat starts, and
// never on two cycles in a row (one beat every second cycle at most); the
// length passed with the k-th beat is 4*k bytes, with bit 31 set on all but
// the TLAST beat, which raises packet_end. Every beat sent arrives in order.
// Finally a receive reset requested in the middle of a packet must wait for
// its TLAST beat and then pulse rx_rst_n and reset_complete for one cycle.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_rx_stream_if;

  import axis_fifo_pkg::*;

  logic              clk = 1'b0;
  always #5 clk = ~clk;
  logic              reset_all_n, rx_reset_req, rx_rst_n, reset_complete;
  logic              s_axis_tvalid, s_axis_tready, s_axis_tlast;
  logic [31:0]       s_axis_tdata, tdata;
  logic [3:0]        s_axis_tkeep;
  logic [DEST_W-1:0] s_axis_tdest, tdest;
  logic              data_fifo_full, pass_length, packet_end, length_reset;
  logic [31:0]       packet_length;

  rx_stream_if #(.DATA_W(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] sent [$];
  int   beat_in_pkt, received, ends;
  bit   ready_prev, ready_prev_at_edge, full_prev;
  bit   rst_seen = 1'b0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // monitor, just after each falling edge
  always @(negedge clk) begin
    #1;
    if (reset_all_n && rx_rst_n) begin
      chk(pass_length == (s_axis_tvalid && s_axis_tready), "pass exactly on a handshake");
      chk(!(s_axis_tready && ready_prev), "TREADY never high two cycles in a row");
      if (pass_length) begin
        beat_in_pkt++;
        chk(tdata == s_axis_tdata && tdest == s_axis_tdest, "data and TDEST passed on");
        chk(packet_length == {!s_axis_tlast, 8'h00, 23'(4 * beat_in_pkt)},
            $sformatf("length %h at beat %0d", packet_length, beat_in_pkt));
        chk(packet_end == s_axis_tlast, "packet_end on the TLAST beat");
        if (sent.size() != 0) chk(tdata == sent.pop_front(), "beats arrive in order");
        received++;
        if (s_axis_tlast) begin beat_in_pkt = 0; ends++; end
      end
    end
    ready_prev = s_axis_tready;
  end

  // FIFO full flag; TREADY may only rise from a state where the FIFO had room
  always @(negedge clk) begin
    full_prev = data_fifo_full;
    data_fifo_full = ($urandom_range(9) == 0);
  end
  always @(negedge clk) begin
    #1;
    if (s_axis_tready && !ready_prev_at_edge) chk(!full_prev, "handshake only entered with room in the FIFO");
  end
  always @(posedge clk) ready_prev_at_edge <= s_axis_tready;

  task automatic send(input int first, input int upto, input int n, input logic [3:0] d);
    for (int i = first; i < upto; i++) begin
      @(negedge clk);
      while ($urandom_range(2) == 0) begin s_axis_tvalid = 1'b0; @(negedge clk); end
      s_axis_tvalid = 1'b1; s_axis_tdata = $urandom; s_axis_tlast = (i == n - 1);
      s_axis_tdest = d; s_axis_tkeep = 4'hF;
      sent.push_back(s_axis_tdata);
      while (!s_axis_tready) @(negedge clk);
    end
    @(negedge clk);
    s_axis_tvalid = 1'b0; s_axis_tlast = 1'b0;
  endtask

  int n, total;

  initial begin
    reset_all_n = 1'b0; rx_reset_req = 1'b0;
    s_axis_tvalid = 1'b0; s_axis_tdata = '0; s_axis_tkeep = '0; s_axis_tlast = 1'b0; s_axis_tdest = '0;
    beat_in_pkt = 0; received = 0; ends = 0; total = 0;
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    for (int p = 0; p < 30; p++) begin
      n = 1 + $urandom_range(19);
      total += n;
      send(0, n, n, 4'($urandom));
    end
    repeat (4) @(negedge clk);
    chk(received == total, $sformatf("%0d beats received of %0d", received, total));
    chk(ends == 30, "one packet_end per packet");

    // deferred receive reset
    send(0, 3, 6, 4'h5);
    @(negedge clk); rx_reset_req = 1'b1;
    @(negedge clk); rx_reset_req = 1'b0;
    repeat (10) begin
      @(negedge clk);
      chk(rx_rst_n && !reset_complete, "reset waits while a packet is arriving");
    end
    send(3, 6, 6, 4'h5);
    repeat (3) @(negedge clk);
    chk(ends == 31, "the interrupted packet completed");
    data_fifo_full = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + (rst_seen ? 0 : 1));
    $finish;
  end

  always @(posedge clk) begin
    if (reset_all_n && !rx_rst_n) begin
      rst_seen <= 1'b1;
      if (!reset_complete) begin
        $display("FAIL reset_complete must pulse with the receive reset");
        failures++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
