// tb_axis_fifo_ct_workloads: the cut-through workloads of the core's random
// verification sequences: 1..20 packets of 20 words each, on the core with
// enable_cut_through = 1 and every other parameter at its default.
//
// Transmit: TREADY is held high while software writes each packet (TDR, 20
// TDFD writes, TLR). In cut-through mode a packet must start on the stream
// before its TLR write; the testbench counts the packets that did, requires
// all of them to, and compares every beat (data, TKEEP, TLAST, TDEST).
// Receive: the first half of each packet is sent into the receive stream;
// software reads ISR and RLR (length so far, bit 31 set for a partial packet)
// and starts reading the first half from RDFD while the second half is being
// sent. It then waits for RC, reads RLR (complete length, bit 31 clear) and
// RDR, and reads the rest of the words. Every word is compared and no error
// interrupt may be raised.
// Long packet: one packet of 512 words (the receive FIFO depth) is streamed
// in while software reads it in partial steps (ISR, RLR, RDR, new words)
// until RLR shows it complete. A watchdog ends the run with a failure if it does
// not finish in time.
module tb_axis_fifo_ct_workloads;

  import axis_fifo_pkg::*;

  localparam int ROUNDS = 3;
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

  axis_fifo_top #(.enable_cut_through(1'b1)) dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .*);


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


  localparam int LEN = 20, HALF = LEN / 2;
  logic [31:0] words [20][LEN];
  logic [3:0]  dest  [20];
  logic [31:0] v;
  int          npkt, idx, early, n_before;
  bit          seen, long_done, partial_steps_done = 1'b0;
  localparam int LONG = 512;
  int          n_read, steps, n_sent;
  logic [31:0] rdr, rdfd;

  initial begin
    rst_n = 1'b0;
    s_axi_awaddr = '0; s_axi_awprot = '0; s_axi_awvalid = 1'b0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_axi_wvalid = 1'b0; s_axi_bready = 1'b0; s_axi_araddr = '0; s_axi_arprot = '0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi4_awaddr = '0; s_axi4_awlen = '0; s_axi4_awsize = '0; s_axi4_awburst = '0;
    s_axi4_awvalid = 1'b0; s_axi4_wdata = '0; s_axi4_wstrb = '0; s_axi4_wlast = 1'b0;
    s_axi4_wvalid = 1'b0; s_axi4_bready = 1'b0; s_axi4_araddr = '0; s_axi4_arlen = '0;
    s_axi4_arsize = '0; s_axi4_arburst = '0; s_axi4_arvalid = 1'b0; s_axi4_rready = 1'b0;
    m_axis_tready = 1'b1;
    s_axis_tvalid = 1'b0; s_axis_tdata = '0; s_axis_tkeep = '0; s_axis_tlast = 1'b0; s_axis_tdest = '0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    for (int r = 0; r < ROUNDS; r++) begin
      npkt = (r == 0) ? 20 : $urandom_range(1, 20);
      for (int p = 0; p < npkt; p++) begin
        dest[p] = 4'($urandom);
        for (int i = 0; i < LEN; i++) words[p][i] = $urandom;
      end

      // ---------------- transmit ----------------
      lite_wr(ISR_OFF, 32'hFFFF_FFFF);
      got.delete();
      early = 0;
      for (int p = 0; p < npkt; p++) begin
        n_before = got.size();
        lite_wr(TDR_OFF, 32'(dest[p]));
        for (int i = 0; i < LEN; i++) lite_wr(TDFD_OFF, words[p][i]);
        if (got.size() > n_before) early++;
        lite_wr(TLR_OFF, 32'(4 * LEN));
        for (int k = 0; k < 50 && got.size() < (p + 1) * LEN; k++) @(negedge clk);
      end
      chk(early == npkt, $sformatf("round %0d: %0d of %0d packets started before TLR", r, early, npkt));
      chk(got.size() == npkt * LEN, $sformatf("round %0d: %0d beats sent", r, got.size()));
      idx = 0;
      for (int p = 0; p < npkt; p++)
        for (int i = 0; i < LEN && idx < got.size(); i++) begin
          chk(got[idx] == {i == LEN - 1, dest[p], 4'hF, words[p][i]},
              $sformatf("round %0d packet %0d beat %0d", r, p, i));
          idx++;
        end
      lite_rd(ISR_OFF, v);
      chk(v[ISR_TC] && (v & 32'hF200_0000) == 32'h0, $sformatf("transmit ISR %h", v));

      // ---------------- receive ----------------
      lite_wr(ISR_OFF, 32'hFFFF_FFFF);
      for (int p = 0; p < npkt; p++) begin
        for (int i = 0; i < HALF; i++) stream_send(words[p][i], dest[p], 1'b0);
        repeat (2) @(negedge clk);
        lite_rd(ISR_OFF, v);
        chk(!v[ISR_RC], "no RC before TLAST");
        lite_rd(RLR_OFF, v);
        chk(v == (32'h8000_0000 | 32'(4 * HALF)), $sformatf("round %0d packet %0d: partial RLR %h", r, p, v));
        fork
          for (int i = HALF; i < LEN; i++) stream_send(words[p][i], dest[p], i == LEN - 1);
          begin
            lite_rd(RDR_OFF, v);
            chk(v == 32'(dest[p]), "RDR of the partial packet");
            for (int i = 0; i < HALF; i++) begin
              lite_rd(RDFD_OFF, v);
              chk(v == words[p][i], $sformatf("round %0d packet %0d first-half word %0d", r, p, i));
            end
          end
        join
        seen = 1'b0;
        for (int k = 0; k < 50 && !seen; k++) begin
          lite_rd(ISR_OFF, v);
          seen = v[ISR_RC];
        end
        chk(seen, "RC once the packet is complete");
        lite_wr(ISR_OFF, 32'(1) << ISR_RC);
        lite_rd(RLR_OFF, v);
        chk(v == 32'(4 * LEN), $sformatf("round %0d packet %0d: complete RLR %h", r, p, v));
        lite_rd(RDR_OFF, v);
        chk(v == 32'(dest[p]), "RDR of the complete packet");
        for (int i = HALF; i < LEN; i++) begin
          lite_rd(RDFD_OFF, v);
          chk(v == words[p][i], $sformatf("round %0d packet %0d second-half word %0d", r, p, i));
        end
      end
      lite_rd(ISR_OFF, v);
      chk((v & 32'hF200_0000) == 32'h0, $sformatf("receive ISR %h", v));
      $display("round %0d: %0d packets of %0d words each way", r, npkt, LEN);
    end
    // ---------------- one packet as long as the receive FIFO ----------------
    // 512 words are streamed in while software reads them in partial steps:
    // ISR, RLR (length so far), RDR, then the words not read yet.
    lite_wr(ISR_OFF, 32'hFFFF_FFFF);
    long_done = 1'b0; n_read = 0; steps = 0; n_sent = 0;
    fork
      for (int i = 0; i < LONG; i++) begin
        stream_send(32'(i) ^ 32'h5A5A_0000, 4'h9, i == LONG - 1);
        n_sent = i + 1;
      end
      while (n_read < LONG && steps < 2000) begin
        // start a step only when words have arrived that were not read yet
        while (n_sent < LONG && n_sent < n_read + 2) @(negedge clk);
        repeat (2) @(negedge clk);
        steps++;
        lite_rd(ISR_OFF, v);
        if (v[ISR_RC]) lite_wr(ISR_OFF, 32'(1) << ISR_RC);
        lite_rd(RLR_OFF, v);
        if (v[22:0] != 23'h0) begin
          chk(v[22:0] <= 23'(4 * LONG) && (v[31] || v[22:0] == 23'(4 * LONG)),
              $sformatf("long packet: RLR %h", v));
          lite_rd(RDR_OFF, rdr);
          chk(rdr == 32'h9, "long packet: RDR");
          for (int i = n_read; i < int'(v[22:2]); i++) begin
            lite_rd(RDFD_OFF, rdfd);
            chk(rdfd == (32'(i) ^ 32'h5A5A_0000), $sformatf("long packet word %0d: %h", i, rdfd));
          end
          if (int'(v[22:2]) > n_read) n_read = int'(v[22:2]);
          if (!v[31]) partial_steps_done = 1'b1;
        end
      end
    join
    chk(n_read == LONG && partial_steps_done, $sformatf("long packet: %0d of %0d words read in %0d steps", n_read, LONG, steps));
    chk(steps > 2, "long packet read in several partial steps");
    lite_rd(ISR_OFF, v);
    chk((v & 32'hF200_0000) == 32'h0, $sformatf("long packet: no error interrupt, ISR %h", v));

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
