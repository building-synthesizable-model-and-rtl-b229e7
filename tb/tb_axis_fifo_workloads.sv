// tb_axis_fifo_workloads: the packet workloads of the core's random
// verification sequences, run on the core at its default parameters
// (512-word FIFOs, 32-bit data, store-and-forward, AXI4-Lite data port).
//
// Transmit workload: with TREADY held low, software writes 1..20 packets of
// 1..20 words (the first round uses the largest case, 20 packets of 20 words,
// 400 of the 512 words). TDFV must then show the space left (within the one
// location its hysteresis allows). TREADY is then raised and every beat
// (data, TKEEP, TLAST, TDEST) is compared with what was written.
// Receive workload: 1..20 packets of 1..20 words are sent into the receive
// stream before software reads anything (again 20 x 20 in the first round);
// RDFO must show the locations of the last packet, and software then reads
// every packet through ISR (RC), RLR, RDR and RDFD and compares it.
// Each round ends by checking that no error interrupt was raised.
// Full receive FIFO: 32 packets of 16 words fill all 512 locations without
// software reading; RFPF must be raised, a further beat must wait with
// TREADY low until a packet has been read, and everything is read back.
// Transmit resets at random instants: 30 packets are written with TREADY
// random, and now and then a transmit reset (TDFR = 0xA5) is requested;
// every packet that leaves must be whole and match a written packet in
// order, and each reset must end with TRC. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_axis_fifo_workloads;

  import axis_fifo_pkg::*;

  localparam int ROUNDS = 4;
  localparam int WATCHDOG_CYCLES = 400_000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        interrupt, mm2s_prmry_reset_out_n, s2mm_prmry_reset_out_n, mm2s_cntrl_reset_out_n;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic [2:0]  s_axi_awprot, s_axi_arprot;
  logic [3:0]  s_axi_wstrb;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic        s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi4_awaddr, s_axi4_araddr, s_axi4_wdata, s_axi4_rdata;
  logic [7:0]  s_axi4_awlen, s_axi4_arlen;
  logic [2:0]  s_axi4_awsize, s_axi4_arsize;
  logic [1:0]  s_axi4_awburst, s_axi4_arburst, s_axi4_bresp, s_axi4_rresp;
  logic [3:0]  s_axi4_wstrb;
  logic        s_axi4_awvalid, s_axi4_awready, s_axi4_wlast, s_axi4_wvalid, s_axi4_wready;
  logic        s_axi4_bvalid, s_axi4_bready, s_axi4_arvalid, s_axi4_arready;
  logic        s_axi4_rlast, s_axi4_rvalid, s_axi4_rready;
  logic        m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic [31:0] m_axis_tdata;
  logic [3:0]  m_axis_tkeep, m_axis_tdest;
  logic        s_axis_tvalid, s_axis_tready, s_axis_tlast;
  logic [31:0] s_axis_tdata;
  logic [3:0]  s_axis_tkeep, s_axis_tdest;

  axis_fifo_top dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .*);


  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic lite_wr(input logic [7:0] off, input logic [31:0] d);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    s_axi_awaddr = 32'(off); s_axi_awvalid = 1'b1;
    s_axi_wdata = d; s_axi_wstrb = 4'hF; s_axi_wvalid = 1'b1; s_axi_bready = 1'b1;
    forever begin
      aw_hs = s_axi_awvalid && s_axi_awready;
      w_hs  = s_axi_wvalid  && s_axi_wready;
      b_hs  = s_axi_bvalid  && s_axi_bready;
      @(negedge clk);
      if (aw_hs) s_axi_awvalid = 1'b0;
      if (w_hs)  s_axi_wvalid  = 1'b0;
      if (b_hs)  break;
    end
    s_axi_bready = 1'b0;
  endtask

  task automatic lite_rd(input logic [7:0] off, output logic [31:0] d);
    bit ar_hs, r_hs;
    d = '0;
    @(negedge clk);
    s_axi_araddr = 32'(off); s_axi_arvalid = 1'b1; s_axi_rready = 1'b1;
    forever begin
      ar_hs = s_axi_arvalid && s_axi_arready;
      r_hs  = s_axi_rvalid  && s_axi_rready;
      if (r_hs) d = s_axi_rdata;
      @(negedge clk);
      if (ar_hs) s_axi_arvalid = 1'b0;
      if (r_hs)  break;
    end
    s_axi_rready = 1'b0;
  endtask


  // transmit stream sink: samples the beat taken at each rising edge
  logic [40:0] got [$];   // {tlast, tdest, tkeep, tdata}
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid && m_axis_tready)
      got.push_back({m_axis_tlast, m_axis_tdest, m_axis_tkeep, m_axis_tdata});
  end

  task automatic stream_send(input logic [31:0] d, input logic [3:0] dest, input bit last);
    @(negedge clk);
    s_axis_tdata = d; s_axis_tdest = dest; s_axis_tlast = last; s_axis_tkeep = 4'hF;
    s_axis_tvalid = 1'b1;
    #1;
    while (!s_axis_tready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    s_axis_tvalid = 1'b0;
  endtask

  // random TREADY while random_ready is set
  bit          random_ready = 1'b0;
  always @(negedge clk) if (random_ready) m_axis_tready = ($urandom_range(1) == 0);
  typedef logic [40:0] beat_q_t [$];
  beat_q_t     sent_q [$];
  logic [40:0] pkt [$];
  logic [3:0]  d_rs;
  logic [31:0] w_rs;
  int          n_rs, j_rs, n_match, n_resets;

  logic [31:0] words [20][20];
  int          len   [20];
  logic [3:0]  dest  [20];
  logic [31:0] v;
  int          npkt, total, idx;
  bit          seen, late_sent;

  task automatic make_packets(input bit largest);
    npkt  = largest ? 20 : $urandom_range(1, 20);
    total = 0;
    for (int p = 0; p < npkt; p++) begin
      len[p]  = largest ? 20 : $urandom_range(1, 20);
      dest[p] = 4'($urandom);
      total  += len[p];
      for (int i = 0; i < len[p]; i++) words[p][i] = $urandom;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    s_axi_awaddr = '0; s_axi_awprot = '0; s_axi_awvalid = 1'b0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_axi_wvalid = 1'b0; s_axi_bready = 1'b0; s_axi_araddr = '0; s_axi_arprot = '0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi4_awaddr = '0; s_axi4_awlen = '0; s_axi4_awsize = '0; s_axi4_awburst = '0;
    s_axi4_awvalid = 1'b0; s_axi4_wdata = '0; s_axi4_wstrb = '0; s_axi4_wlast = 1'b0;
    s_axi4_wvalid = 1'b0; s_axi4_bready = 1'b0; s_axi4_araddr = '0; s_axi4_arlen = '0;
    s_axi4_arsize = '0; s_axi4_arburst = '0; s_axi4_arvalid = 1'b0; s_axi4_rready = 1'b0;
    m_axis_tready = 1'b0;
    s_axis_tvalid = 1'b0; s_axis_tdata = '0; s_axis_tkeep = '0; s_axis_tlast = 1'b0; s_axis_tdest = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    for (int r = 0; r < ROUNDS; r++) begin
      // ---------------- transmit workload ----------------
      lite_wr(ISR_OFF, 32'hFFFF_FFFF);
      make_packets(r == 0);
      got.delete();
      m_axis_tready = 1'b0;
      for (int p = 0; p < npkt; p++) begin
        lite_wr(TDR_OFF, 32'(dest[p]));
        for (int i = 0; i < len[p]; i++) lite_wr(TDFD_OFF, words[p][i]);
        lite_wr(TLR_OFF, 32'(4 * len[p]));
      end
      repeat (4) @(negedge clk);
      lite_rd(TDFV_OFF, v);
      chk(v == 32'(512 - total) || v == 32'(513 - total),
          $sformatf("round %0d: TDFV %0d with %0d words stored", r, v, total));
      chk(got.size() == 0, "nothing sent while TREADY is low");
      m_axis_tready = 1'b1;
      for (int k = 0; k < 4000 && got.size() < total; k++) @(negedge clk);
      chk(got.size() == total, $sformatf("round %0d: %0d beats sent, want %0d", r, got.size(), total));
      idx = 0;
      for (int p = 0; p < npkt; p++)
        for (int i = 0; i < len[p] && idx < got.size(); i++) begin
          chk(got[idx] == {i == len[p] - 1, dest[p], 4'hF, words[p][i]},
              $sformatf("round %0d packet %0d beat %0d", r, p, i));
          idx++;
        end
      lite_rd(TDFV_OFF, v);
      chk(v == 32'd512, $sformatf("TDFV %0d after the FIFO drained", v));
      lite_rd(ISR_OFF, v);
      chk(v[ISR_TC] && (v & 32'hF200_0000) == 32'h0, $sformatf("transmit ISR %h", v));

      // ---------------- receive workload ----------------
      lite_wr(ISR_OFF, 32'hFFFF_FFFF);
      make_packets(r == 0);
      for (int p = 0; p < npkt; p++)
        for (int i = 0; i < len[p]; i++) stream_send(words[p][i], dest[p], i == len[p] - 1);
      repeat (4) @(negedge clk);
      lite_rd(RDFO_OFF, v);
      chk(v == 32'(len[npkt-1]), $sformatf("round %0d: RDFO %0d want %0d", r, v, len[npkt-1]));
      for (int p = 0; p < npkt; p++) begin
        seen = 1'b0;
        for (int k = 0; k < 50 && !seen; k++) begin
          lite_rd(ISR_OFF, v);
          seen = v[ISR_RC];
        end
        chk(seen, $sformatf("round %0d: RC for packet %0d", r, p));
        lite_wr(ISR_OFF, 32'(1) << ISR_RC);
        lite_rd(RLR_OFF, v);
        chk(v == 32'(4 * len[p]), $sformatf("round %0d: RLR of packet %0d: %0d", r, p, v));
        lite_rd(RDR_OFF, v);
        chk(v == 32'(dest[p]), $sformatf("round %0d: RDR of packet %0d", r, p));
        for (int i = 0; i < len[p]; i++) begin
          lite_rd(RDFD_OFF, v);
          chk(v == words[p][i], $sformatf("round %0d: packet %0d word %0d", r, p, i));
        end
      end
      lite_rd(ISR_OFF, v);
      chk((v & 32'hF200_0000) == 32'h0, $sformatf("receive ISR %h", v));
      $display("round %0d: %0d transmit words, %0d receive packets", r, total, npkt);
    end
    // ---------------- full receive FIFO ----------------
    // 32 packets of 16 words fill all 512 locations; a further beat must
    // wait (TREADY low) until software has read a packet.
    lite_wr(ISR_OFF, 32'hFFFF_FFFF);
    for (int p = 0; p < 32; p++)
      for (int i = 0; i < 16; i++) stream_send({8'(p), 8'(i), 16'($urandom)} & 32'hFFFF_0000, 4'(p), i == 15);
    repeat (4) @(negedge clk);
    lite_rd(ISR_OFF, v);
    chk(v[ISR_RFPF], $sformatf("RFPF when the receive FIFO is full, ISR %h", v));
    late_sent = 1'b0;
    fork
      begin
        stream_send(32'hEEEE_0000, 4'hE, 1'b1);
        late_sent = 1'b1;
      end
    join_none
    repeat (50) @(negedge clk);
    chk(!late_sent, "TREADY stays low while the receive FIFO is full");
    for (int p = 0; p < 32; p++) begin
      lite_rd(ISR_OFF, v);
      lite_wr(ISR_OFF, 32'(1) << ISR_RC);
      lite_rd(RLR_OFF, v);
      chk(v == 32'd64, $sformatf("full FIFO: RLR of packet %0d: %0d", p, v));
      lite_rd(RDR_OFF, v);
      chk(v == 32'(p % 16), "full FIFO: RDR");
      for (int i = 0; i < 16; i++) begin
        lite_rd(RDFD_OFF, v);
        chk(v == {8'(p), 8'(i), 16'h0}, $sformatf("full FIFO: packet %0d word %0d: %h", p, i, v));
      end
      if (p == 0) begin
        // room again: the waiting beat goes in
        for (int k = 0; k < 10 && !late_sent; k++) @(negedge clk);
        chk(late_sent, "the waiting beat is taken once there is room");
      end
    end
    lite_rd(ISR_OFF, v);
    lite_wr(ISR_OFF, 32'(1) << ISR_RC);
    lite_rd(RLR_OFF, v);
    chk(v == 32'd4, $sformatf("the beat that waited: RLR %0d", v));
    lite_rd(RDR_OFF, v);
    chk(v == 32'hE, "the beat that waited: RDR");
    lite_rd(RDFD_OFF, v);
    chk(v == 32'hEEEE_0000, "the beat that waited: data");
    lite_rd(ISR_OFF, v);
    chk((v & 32'hF200_0000) == 32'h0, $sformatf("no error after the full FIFO, ISR %h", v));

    // ---------------- transmit resets at random instants ----------------
    // 30 packets of 1..20 words with TREADY random; after some packets
    // software writes 0xA5 to TDFR and waits for TRC. Every packet that
    // leaves must be whole and equal to a written packet, in order; packets
    // still queued at a reset may be lost.
    lite_wr(ISR_OFF, 32'hFFFF_FFFF);
    got.delete();
    sent_q.delete();
    n_resets = 0;
    random_ready = 1'b1;
    for (int p = 0; p < 30; p++) begin
      pkt.delete();
      d_rs = 4'($urandom);
      n_rs = $urandom_range(1, 20);
      lite_wr(TDR_OFF, 32'(d_rs));
      for (int i = 0; i < n_rs; i++) begin
        w_rs = $urandom;
        pkt.push_back({i == n_rs - 1, d_rs, 4'hF, w_rs});
        lite_wr(TDFD_OFF, w_rs);
      end
      lite_wr(TLR_OFF, 32'(4 * n_rs));
      sent_q.push_back(pkt);
      if ($urandom_range(3) == 0 || p == 29) begin
        lite_wr(TDFR_OFF, 32'h0000_00A5);
        seen = 1'b0;
        for (int k = 0; k < 300 && !seen; k++) begin
          lite_rd(ISR_OFF, v);
          seen = v[ISR_TRC];
        end
        chk(seen, "TRC after a transmit reset at a random instant");
        lite_wr(ISR_OFF, 32'(1) << ISR_TRC);
        n_resets++;
      end
    end
    random_ready = 1'b0;
    m_axis_tready = 1'b1;
    repeat (100) @(negedge clk);
    // split what left into packets and match them in order
    idx = 0; j_rs = 0; n_match = 0;
    while (idx < got.size()) begin
      pkt.delete();
      do begin pkt.push_back(got[idx]); idx++; end while (!pkt[$][40] && idx < got.size());
      while (j_rs < sent_q.size() && sent_q[j_rs] != pkt) j_rs++;
      chk(j_rs < sent_q.size(), $sformatf("a packet of %0d beats left that was not written as such", pkt.size()));
      if (j_rs < sent_q.size()) begin n_match++; j_rs++; end
    end
    chk(n_resets > 1 && n_match > 0, $sformatf("%0d resets, %0d of 30 packets sent whole", n_resets, n_match));
    lite_rd(ISR_OFF, v);
    chk((v & 32'hF200_0000) == 32'h0, $sformatf("no error interrupt with transmit resets, ISR %h", v));
    $display("transmit resets: %0d resets, %0d of 30 packets sent", n_resets, n_match);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    $display("FAIL watchdog: the run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
