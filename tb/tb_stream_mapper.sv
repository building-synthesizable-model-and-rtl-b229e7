// tb_stream_mapper: checks the transmit stream in store-and-forward mode.
//
// A model of the transmit FIFOs feeds the mapper: for each packet it writes
// the destination, then the bytes a few at a time, then the length, as the
// transmit control does. The model's outputs change only on the falling
// edge and take the mapper's read requests of the previous rising edge into
// account, like the real FIFOs. A sink with a random TREADY compares every
// beat (TDATA with unused lanes zero, TKEEP, TLAST, TDEST) with the beats
// worked out from the packet bytes, checks that no packet starts before its
// length is written and that an offered beat holds still while TREADY is
// low, and counts the tx_complete pulses. Finally a transmit reset requested
// in the middle of a packet must wait for that packet's last beat and then
// pulse tx_rst_n and reset_complete for one cycle. Ends with the TB_RESULT
// line; a watchdog stops a hung run.
module tb_stream_mapper;

  import axis_fifo_pkg::*;

  localparam int NPKT = 25;

  logic              clk = 1'b0;
  always #5 clk = ~clk;
  logic              reset_all_n, tx_reset_req, tx_rst_n, reset_complete, tx_complete;
  logic              empty_l, re_l, empty_d, re_d, r_en;
  logic [LEN_W-1:0]  data_out_l;
  logic [DEST_W-1:0] data_out_d;
  logic [11:0]       occupancy;
  logic [31:0]       data_out;
  logic [2:0]        rd_bytes;
  logic              m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [31:0]       m_axis_tdata;
  logic [3:0]        m_axis_tkeep, m_axis_tdest;

  stream_mapper #(.DATA_W(32), .OCC_W(12), .enable_cut_through(1'b0)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // FIFO model
  logic [7:0]        bq [$];
  int                lq [$];
  logic [DEST_W-1:0] dq [$];
  bit                p_r, p_l, p_d;
  int                p_n;

  // packets to produce and beats to expect
  typedef struct packed { logic [31:0] data; logic [3:0] keep; logic last; logic [3:0] dest; } beat_t;
  beat_t exp_q [$];
  logic [7:0] pbytes [$];
  int  plen, ppos, pcount, produced, completes, lengths_written, started;
  logic [3:0] pdest;
  bit  producing, in_pkt, stalled, hold, stop_producing;
  beat_t cur, stall_beat;

  task automatic new_packet();
    logic [31:0] w;
    logic [3:0]  k;
    plen  = 1 + $urandom_range(79);
    pdest = 4'($urandom);
    pbytes = {};
    for (int i = 0; i < plen; i++) pbytes.push_back(8'($urandom));
    for (int b = 0; b < plen; b += 4) begin
      w = '0; k = '0;
      for (int i = 0; i < 4; i++)
        if (b + i < plen) begin w[8*i +: 8] = pbytes[b + i]; k[i] = 1'b1; end
      exp_q.push_back('{w, k, b + 4 >= plen, pdest});
    end
    dq.push_back(pdest);
    ppos = 0;
    producing = 1'b1;
  endtask

  always @(negedge clk) begin
    if (!tx_rst_n) begin
      bq = {}; lq = {}; dq = {};
      p_r = 0; p_l = 0; p_d = 0;
    end else begin
      // reads the mapper made at the last rising edge
      if (p_r) repeat (p_n) void'(bq.pop_front());
      if (p_l) void'(lq.pop_front());
      if (p_d) void'(dq.pop_front());
      // producer
      if (producing) begin
        pcount = $urandom_range(4);
        for (int i = 0; i < pcount && ppos < plen; i++) begin
          bq.push_back(pbytes[ppos]);
          ppos++;
        end
        if (ppos == plen && $urandom_range(1) == 0) begin
          lq.push_back(plen);
          lengths_written++;
          producing = 1'b0;
          produced++;
        end
      end else if (!stop_producing && produced < NPKT && $urandom_range(3) == 0) begin
        new_packet();
      end
    end
    // model outputs
    occupancy  = 12'(bq.size());
    for (int i = 0; i < 4; i++) data_out[8*i +: 8] = (i < bq.size()) ? bq[i] : 8'h00;
    empty_l    = (lq.size() == 0);
    data_out_l = (lq.size() != 0) ? LEN_W'(lq[0]) : '0;
    empty_d    = (dq.size() == 0);
    data_out_d = (dq.size() != 0) ? dq[0] : '0;
    // sink
    m_axis_tready = !hold && ($urandom_range(99) < 65);
    #1;
    cur = '{m_axis_tdata, m_axis_tkeep, m_axis_tlast, m_axis_tdest};
    if (stalled) chk(m_axis_tvalid && cur == stall_beat, "beat held during a stall");
    stalled = 1'b0;
    if (m_axis_tvalid && !m_axis_tready) begin stalled = 1'b1; stall_beat = cur; end
    if (m_axis_tvalid && m_axis_tready) begin
      if (!in_pkt) begin
        chk(lengths_written > started, "packet starts only after its length is written");
        started++;
        in_pkt = 1'b1;
      end
      if (exp_q.size() == 0) chk(1'b0, "unexpected beat");
      else chk(cur == exp_q.pop_front(), "beat matches the packet bytes");
      if (m_axis_tlast) in_pkt = 1'b0;
    end
    if (tx_complete) completes++;
    p_r = r_en; p_n = int'(rd_bytes); p_l = re_l; p_d = re_d;
  end

  int guard;

  initial begin
    reset_all_n = 1'b0; tx_reset_req = 1'b0; hold = 1'b0; stop_producing = 1'b0;
    produced = 0; completes = 0; lengths_written = 0; started = 0; producing = 1'b0;
    in_pkt = 1'b0; stalled = 1'b0;
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    guard = 0;
    while ((produced < NPKT || exp_q.size() != 0) && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    repeat (3) @(negedge clk);
    chk(exp_q.size() == 0, "every packet was sent");
    chk(completes == NPKT, $sformatf("tx_complete pulses %0d want %0d", completes, NPKT));

    // deferred transmit reset
    stop_producing = 1'b1;
    hold = 1'b1;
    new_packet();
    while (producing) @(negedge clk);
    while (!m_axis_tvalid) @(negedge clk);
    tx_reset_req = 1'b1;
    @(negedge clk);
    tx_reset_req = 1'b0;
    repeat (10) begin
      @(negedge clk);
      chk(tx_rst_n && !reset_complete, "reset waits while a packet is in flight");
    end
    hold = 1'b0;
    guard = 0;
    while (tx_rst_n && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    chk(!tx_rst_n && reset_complete, "reset carried out after the packet");
    chk(exp_q.size() == 0, "the packet was finished before the reset");
    @(negedge clk);
    chk(tx_rst_n && !reset_complete, "reset lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
