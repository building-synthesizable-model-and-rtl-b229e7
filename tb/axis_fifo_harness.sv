// axis_fifo_harness: one AXI4-Stream FIFO core with everything needed to run
// it end to end, used by tb_axis_fifo_top in several configurations.
//
// It holds the core (cut-through and AXI4 data port chosen by CT and A4), an
// AXI4-Lite master and an AXI4 burst master driving the register interface,
// a stream source feeding the receive channel and a stream sink with a
// scoreboard on the transmit channel. All stimulus changes on the falling
// clock edge; a handshake is judged on the falling edge before the rising edge
// that completes it.
// The program in the initial block sends random packets both ways (1..20
// words, random TDEST, random byte count in the last transmit word) and then
// runs directed scenarios for the mechanisms of the core: transmit size
// error, transmit overrun and the SRR reset, receive overrun/underrun reads,
// transmit and receive resets that wait for the packet in flight, TDFV/RDFO
// values, the interrupt output, partial (cut-through) receive reads and AXI4
// bursts. Each mechanism that happens is counted in mech[]; checks and
// failures count the comparisons. done goes high at the end.
// The stream sink holds TREADY low at random (a stall) and checks that an
// offered beat does not change until it is taken; in store-and-forward mode
// it checks that no packet starts before its TLR write, in cut-through mode
// it counts the packets that do.
module axis_fifo_harness
  import axis_fifo_pkg::*;
#(
  parameter bit CT    = 1'b0,
  parameter bit A4    = 1'b0,
  parameter int DEPTH = 512,
  parameter int N_TX  = 12,
  parameter int N_RX  = 12,
  parameter int NM    = 16
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   mech [NM]
);

  // mechanism indices (names are printed by tb_axis_fifo_top)
  localparam int M_SF = 0, M_CT = 1, M_STALL = 2, M_TSE = 3, M_TPOE = 4, M_RPORE = 5,
                 M_TXRST = 6, M_RXRST = 7, M_PARTIAL = 8, M_RC = 9, M_TC = 10,
                 M_SRR = 11, M_A4 = 12, M_IRQ = 13, M_RPURE = 14, M_LEVELS = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  // ---------------- DUT signals ----------------
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

  axis_fifo_top #(
    .C_RX_FIFO_DEPTH(DEPTH), .C_TX_FIFO_DEPTH(DEPTH),
    .enable_cut_through(CT), .C_DATA_INTERFACE_TYPE(A4)
  ) dut (
    .s_axi_aclk(clk), .s_axi_aresetn(rst_n), .*
  );

  // ---------------- checking helpers ----------------
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [CT=%0d A4=%0d] %s at %0t", CT, A4, what, $time);
    end
  endtask

  function automatic logic [3:0] keep_of(input int nbytes);
    return 4'((1 << nbytes) - 1);
  endfunction

  function automatic logic [31:0] mask_of(input int nbytes);
    logic [31:0] m;
    for (int i = 0; i < 4; i++) m[8*i +: 8] = (i < nbytes) ? 8'hFF : 8'h00;
    return m;
  endfunction

  // ---------------- AXI4-Lite master ----------------
  task automatic lite_wr(input logic [7:0] off, input logic [31:0] d, input logic [3:0] s = 4'hF);
    bit aw_hs, w_hs, b_hs;
    @(negedge clk);
    s_axi_awaddr = 32'(off); s_axi_awvalid = 1'b1;
    s_axi_wdata  = d;        s_axi_wstrb   = s; s_axi_wvalid = 1'b1;
    s_axi_bready = 1'b1;
    forever begin
      aw_hs = s_axi_awvalid && s_axi_awready;
      w_hs  = s_axi_wvalid  && s_axi_wready;
      b_hs  = s_axi_bvalid  && s_axi_bready;
      if (b_hs) chk(s_axi_bresp == 2'b00, "AXI4-Lite write response OKAY");
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

  // ---------------- AXI4 burst master (data registers) ----------------
  logic [31:0] tx_words [20];
  logic [31:0] rx_words [20];
  logic [31:0] rx_got   [20];

  task automatic a4_wr_burst(input int n, input int last_bytes);
    @(negedge clk);
    s_axi4_awaddr = 32'(TDFD_OFF); s_axi4_awlen = 8'(n - 1); s_axi4_awsize = 3'd2;
    s_axi4_awburst = 2'b01; s_axi4_awvalid = 1'b1;
    while (!s_axi4_awready) @(negedge clk);
    @(negedge clk);
    s_axi4_awvalid = 1'b0;
    for (int i = 0; i < n; i++) begin
      s_axi4_wvalid = 1'b1;
      s_axi4_wdata  = tx_words[i];
      s_axi4_wstrb  = (i == n - 1) ? keep_of(last_bytes) : 4'hF;
      s_axi4_wlast  = (i == n - 1);
      while (!s_axi4_wready) @(negedge clk);
      @(negedge clk);
    end
    s_axi4_wvalid = 1'b0; s_axi4_wlast = 1'b0; s_axi4_bready = 1'b1;
    while (!s_axi4_bvalid) @(negedge clk);
    chk(s_axi4_bresp == 2'b00, "AXI4 write response OKAY");
    @(negedge clk);
    s_axi4_bready = 1'b0;
    mech[M_A4]++;
  endtask

  task automatic a4_rd_burst(input int n);
    @(negedge clk);
    s_axi4_araddr = 32'(RDFD_OFF); s_axi4_arlen = 8'(n - 1); s_axi4_arsize = 3'd2;
    s_axi4_arburst = 2'b01; s_axi4_arvalid = 1'b1;
    while (!s_axi4_arready) @(negedge clk);
    @(negedge clk);
    s_axi4_arvalid = 1'b0; s_axi4_rready = 1'b1;
    for (int i = 0; i < n; i++) begin
      while (!s_axi4_rvalid) @(negedge clk);
      rx_got[i] = s_axi4_rdata;
      chk(s_axi4_rlast == (i == n - 1), "AXI4 RLAST on the last beat only");
      chk(s_axi4_rresp == 2'b00, "AXI4 read response OKAY");
      @(negedge clk);
    end
    s_axi4_rready = 1'b0;
    mech[M_A4]++;
  endtask

  // ---------------- transmit stream sink and scoreboard ----------------
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  keep;
    logic        last;
    logic [3:0]  dest;
  } beat_t;

  beat_t exp_q [$];
  int    tlr_count, tx_started;
  bit    in_pkt, stalled, sink_hold;
  beat_t stall_beat, cur, want;
  int    ready_pct = 70;

  always @(negedge clk) begin
    if (!rst_n || !mm2s_prmry_reset_out_n) begin
      m_axis_tready = 1'b0;
      stalled = 1'b0;
      in_pkt  = 1'b0;
    end else begin
      cur = '{m_axis_tdata, m_axis_tkeep, m_axis_tlast, m_axis_tdest};
      if (stalled)
        chk(m_axis_tvalid && (cur == stall_beat), "offered beat held unchanged during a stall");
      m_axis_tready = !sink_hold && ($urandom_range(99) < 32'(ready_pct));
      stalled = 1'b0;
      if (m_axis_tvalid) begin
        if (m_axis_tready) begin
          if (!in_pkt) begin
            if (tlr_count > tx_started) begin
              if (!CT) mech[M_SF]++;
            end else begin
              if (CT) mech[M_CT]++;
              else    chk(1'b0, "store-and-forward packet started before its TLR write");
            end
            tx_started++;
            in_pkt = 1'b1;
          end
          if (exp_q.size() == 0) chk(1'b0, "unexpected transmit beat");
          else begin
            want = exp_q.pop_front();
            chk(cur == want, $sformatf("transmit beat got %h/%h/%0d/%0d want %h/%h/%0d/%0d",
                  cur.data, cur.keep, cur.last, cur.dest, want.data, want.keep, want.last, want.dest));
          end
          if (m_axis_tlast) in_pkt = 1'b0;
        end else begin
          stalled = 1'b1;
          stall_beat = cur;
          mech[M_STALL]++;
        end
      end
    end
  end

  // ---------------- receive stream source ----------------
  task automatic rx_send(input int first, input int upto, input int n, input logic [3:0] dest);
    for (int i = first; i < upto; i++) begin
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        s_axis_tvalid = 1'b0;
        @(negedge clk);
      end
      s_axis_tvalid = 1'b1; s_axis_tdata = rx_words[i]; s_axis_tkeep = 4'hF;
      s_axis_tlast  = (i == n - 1); s_axis_tdest = dest;
      while (!s_axis_tready) @(negedge clk);
    end
    @(negedge clk);
    s_axis_tvalid = 1'b0; s_axis_tlast = 1'b0;
  endtask

  // ---------------- host-side sequences ----------------
  logic [31:0] v;

  task automatic wait_isr(input int bitn, input string what, output bit seen);
    seen = 1'b0;
    for (int k = 0; k < 400 && !seen; k++) begin
      lite_rd(ISR_OFF, v);
      seen = v[bitn];
    end
    chk(seen, what);
  endtask

  task automatic clear_isr();
    lite_wr(ISR_OFF, 32'hFFFF_FFFF);
  endtask

  // Queues the expected beats, then writes TDR, the words and TLR.
  task automatic tx_packet(input int n, input int last_bytes, input logic [3:0] dest,
                           input bit wrong_tlr = 1'b0);
    int nbytes;
    for (int i = 0; i < n; i++) begin
      tx_words[i] = $urandom;
      if (i == n - 1)
        exp_q.push_back('{tx_words[i] & mask_of(last_bytes), keep_of(last_bytes), 1'b1, dest});
      else
        exp_q.push_back('{tx_words[i], 4'hF, 1'b0, dest});
    end
    nbytes = 4 * (n - 1) + last_bytes;
    lite_wr(TDR_OFF, 32'(dest));
    if (A4) a4_wr_burst(n, last_bytes);
    else
      for (int i = 0; i < n; i++)
        lite_wr(TDFD_OFF, tx_words[i], (i == n - 1) ? keep_of(last_bytes) : 4'hF);
    lite_wr(TLR_OFF, wrong_tlr ? 32'd4 : 32'(nbytes));
    tlr_count++;
  endtask

  task automatic wait_tx_done();
    int guard = 0;
    while (exp_q.size() != 0 && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    chk(exp_q.size() == 0, "all queued transmit beats were sent");
    repeat (4) @(negedge clk);
  endtask

  // Reads one received packet the way software does: ISR, RLR, RDR, RDFD.
  task automatic rx_read_packet(input int n, input logic [3:0] dest, input bit check_rdfo);
    bit seen;
    wait_isr(ISR_RC, "RC raised for a received packet", seen);
    if (seen) mech[M_RC]++;
    lite_wr(ISR_OFF, 32'(1) << ISR_RC);
    if (check_rdfo) begin
      lite_rd(RDFO_OFF, v);
      chk(v == 32'(n), $sformatf("RDFO %0d want %0d", v, n));
    end
    lite_rd(RLR_OFF, v);
    chk(v == 32'(4 * n), $sformatf("RLR %h want %h", v, 4 * n));
    lite_rd(RDR_OFF, v);
    chk(v == 32'(dest), "RDR holds the packet's TDEST");
    if (A4) a4_rd_burst(n);
    else for (int i = 0; i < n; i++) lite_rd(RDFD_OFF, rx_got[i]);
    for (int i = 0; i < n; i++)
      chk(rx_got[i] == rx_words[i], $sformatf("RDFD word %0d got %h want %h", i, rx_got[i], rx_words[i]));
  endtask

  task automatic rx_roundtrip(input int n, input logic [3:0] dest);
    for (int i = 0; i < n; i++) rx_words[i] = $urandom;
    rx_send(0, n, n, dest);
    rx_read_packet(n, dest, 1'b1);
  endtask

  // ---------------- program ----------------
  int n, lb;
  logic [3:0] d;
  bit seen, early;

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < NM; i++) mech[i] = 0;
    rst_n = 1'b0; sink_hold = 1'b0; tlr_count = 0; tx_started = 0;
    s_axi_awaddr = '0; s_axi_awprot = '0; s_axi_awvalid = 1'b0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_axi_wvalid = 1'b0; s_axi_bready = 1'b0; s_axi_araddr = '0; s_axi_arprot = '0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi4_awaddr = '0; s_axi4_awlen = '0; s_axi4_awsize = '0; s_axi4_awburst = '0;
    s_axi4_awvalid = 1'b0; s_axi4_wdata = '0; s_axi4_wstrb = '0; s_axi4_wlast = 1'b0;
    s_axi4_wvalid = 1'b0; s_axi4_bready = 1'b0; s_axi4_araddr = '0; s_axi4_arlen = '0;
    s_axi4_arsize = '0; s_axi4_arburst = '0; s_axi4_arvalid = 1'b0; s_axi4_rready = 1'b0;
    s_axis_tvalid = 1'b0; s_axis_tdata = '0; s_axis_tkeep = '0; s_axis_tlast = 1'b0; s_axis_tdest = '0;
    m_axis_tready = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // reset values
    lite_rd(ISR_OFF, v);  chk(v == ISR_RESET_VALUE, $sformatf("ISR reset value %h", v));
    clear_isr();
    lite_rd(ISR_OFF, v);  chk(v == 32'h0, "ISR cleared by writing ones");
    lite_rd(IER_OFF, v);  chk(v == 32'h0, "IER reset value");
    lite_rd(TDFV_OFF, v); chk(v == 32'(DEPTH), $sformatf("TDFV after reset %0d", v));
    lite_rd(RDFO_OFF, v); chk(v == 32'h0, "RDFO after reset");
    lite_rd(TDFD_OFF, v); chk(v == 32'h0, "write-only TDFD reads as zero");

    // random transmit packets
    for (int k = 0; k < N_TX; k++) begin
      n  = 1 + $urandom_range(19);
      lb = 1 + $urandom_range(3);
      d  = 4'($urandom);
      tx_packet(n, lb, d);
      if ($urandom_range(1) == 0) wait_tx_done();
    end
    wait_tx_done();
    lite_rd(ISR_OFF, v);
    chk(v[ISR_TC], "TC raised after transmitted packets");
    if (v[ISR_TC]) mech[M_TC]++;
    chk(v[ISR_TFPE], "TFPE raised when the transmit FIFO drained");
    if (v[ISR_TFPE]) mech[M_LEVELS]++;
    chk(!v[ISR_TSE], "no TSE for correct TLR values");
    clear_isr();

    // random receive packets
    for (int k = 0; k < N_RX; k++) begin
      n = 1 + $urandom_range(19);
      d = 4'($urandom);
      rx_roundtrip(n, d);
    end
    lite_rd(ISR_OFF, v);
    chk(v[ISR_RFPE], "RFPE raised when the receive FIFO drained");
    if (v[ISR_RFPE]) mech[M_LEVELS]++;
    clear_isr();

    // interrupt output follows ISR & IER
    lite_wr(IER_OFF, 32'(1) << ISR_TC);
    tx_packet(2, 4, 4'h9);
    wait_tx_done();
    chk(interrupt, "interrupt high for an enabled TC");
    if (interrupt) mech[M_IRQ]++;
    clear_isr();
    repeat (2) @(negedge clk);
    chk(!interrupt, "interrupt low after ISR is cleared");
    lite_wr(IER_OFF, 32'h0);

    // transmit size error: three words announced as four bytes
    clear_isr();
    tx_packet(3, 4, 4'h5, 1'b1);
    wait_tx_done();
    lite_rd(ISR_OFF, v);
    chk(v[ISR_TSE], "TSE raised for a TLR that does not match the words written");
    if (v[ISR_TSE]) mech[M_TSE]++;
    clear_isr();

    // receive length underrun: RLR read with no packet
    lite_rd(RLR_OFF, v);
    lite_rd(ISR_OFF, v);
    chk(v[ISR_RPURE], "RPURE raised for an RLR read with no packet");
    if (v[ISR_RPURE]) mech[M_RPURE]++;
    clear_isr();

    if (!CT && !A4) begin
      // TDFV counts free locations; then a transmit reset waits for the
      // packet held on the stall
      sink_hold = 1'b1;
      for (int i = 0; i < 6; i++) begin
        tx_words[i] = $urandom;
        exp_q.push_back('{tx_words[i], 4'hF, i == 5, 4'h3});
      end
      lite_wr(TDR_OFF, 32'h3);
      for (int i = 0; i < 6; i++) lite_wr(TDFD_OFF, tx_words[i]);
      lite_rd(TDFV_OFF, v);
      chk(v == 32'(DEPTH - 6), $sformatf("TDFV after 6 words %0d", v));
      if (v == 32'(DEPTH - 6)) mech[M_LEVELS]++;
      lite_wr(TLR_OFF, 32'd24);
      tlr_count++;
      while (!m_axis_tvalid) @(negedge clk);
      clear_isr();
      lite_wr(TDFR_OFF, 32'(RESET_KEY));
      repeat (20) @(negedge clk);
      lite_rd(ISR_OFF, v);
      early = v[ISR_TRC];
      chk(!early, "transmit reset waits while a packet is in flight");
      chk(m_axis_tvalid, "packet in flight still offered after TDFR write");
      sink_hold = 1'b0;
      wait_tx_done();
      wait_isr(ISR_TRC, "TRC after the deferred transmit reset", seen);
      if (seen && !early) mech[M_TXRST]++;
      lite_rd(TDFV_OFF, v);
      chk(v == 32'(DEPTH), "TDFV back to full depth after the transmit reset");
      clear_isr();
      tx_packet(3, 2, 4'h7);
      wait_tx_done();

      // receive reset requested in the middle of an incoming packet
      for (int i = 0; i < 4; i++) rx_words[i] = $urandom;
      rx_send(0, 2, 4, 4'h2);
      lite_wr(RDFR_OFF, 32'(RESET_KEY));
      repeat (20) @(negedge clk);
      lite_rd(ISR_OFF, v);
      early = v[ISR_RRC];
      chk(!early, "receive reset waits while a packet is arriving");
      rx_send(2, 4, 4, 4'h2);
      wait_isr(ISR_RRC, "RRC after the deferred receive reset", seen);
      if (seen && !early) mech[M_RXRST]++;
      lite_rd(RDFO_OFF, v);
      chk(v == 32'h0, "RDFO zero after the receive reset");
      clear_isr();
      rx_roundtrip(5, 4'hA);

      // receive overrun read: one RDFD read too many
      rx_roundtrip(3, 4'h1);
      clear_isr();
      lite_rd(RDFD_OFF, v);
      lite_rd(ISR_OFF, v);
      chk(v[ISR_RPORE], "RPORE raised for an RDFD read past the packet");
      chk(v[ISR_RPUE], "RPUE raised for an RDFD read of an empty FIFO");
      if (v[ISR_RPORE]) mech[M_RPORE]++;
      lite_wr(RDFR_OFF, 32'(RESET_KEY));
      wait_isr(ISR_RRC, "RRC after the receive reset", seen);
      clear_isr();
      rx_roundtrip(4, 4'hB);

      // transmit overrun: one word more than the FIFO holds, then SRR
      sink_hold = 1'b1;
      lite_wr(TDR_OFF, 32'h1);
      for (int i = 0; i <= DEPTH; i++) lite_wr(TDFD_OFF, $urandom);
      lite_rd(ISR_OFF, v);
      chk(v[ISR_TPOE], "TPOE raised for a word written to a full FIFO");
      chk(v[ISR_TFPF], "TFPF raised when the transmit FIFO filled");
      if (v[ISR_TPOE]) mech[M_TPOE]++;
      lite_rd(TDFV_OFF, v);
      chk(v == 32'h0, "TDFV zero with the transmit FIFO full");
      lite_wr(SRR_OFF, 32'(RESET_KEY));
      repeat (3) @(negedge clk);
      lite_rd(ISR_OFF, v);
      chk(v == ISR_RESET_VALUE, "ISR back to its reset value after SRR");
      lite_rd(TDFV_OFF, v);
      chk(v == 32'(DEPTH), "TDFV back to full depth after SRR");
      if (v == 32'(DEPTH)) mech[M_SRR]++;
      chk(!m_axis_tvalid, "nothing sent from the discarded FIFO");
      sink_hold = 1'b0;
      clear_isr();
      tx_packet(4, 3, 4'hC);
      wait_tx_done();
      rx_roundtrip(2, 4'hD);
    end

    if (CT) begin
      // partial packet: read what has arrived, then the rest
      for (int i = 0; i < 6; i++) rx_words[i] = $urandom;
      clear_isr();
      rx_send(0, 3, 6, 4'h6);
      repeat (4) @(negedge clk);
      lite_rd(ISR_OFF, v);
      chk(!v[ISR_RC], "no RC for a packet without TLAST");
      lite_rd(RLR_OFF, v);
      chk(v == 32'h8000_000C, $sformatf("partial RLR %h", v));
      lite_rd(RDR_OFF, v);
      chk(v == 32'h6, "RDR of the partial packet");
      for (int i = 0; i < 3; i++) begin
        lite_rd(RDFD_OFF, v);
        chk(v == rx_words[i], $sformatf("partial word %0d", i));
      end
      rx_send(3, 6, 6, 4'h6);
      wait_isr(ISR_RC, "RC when the partial packet completes", seen);
      lite_wr(ISR_OFF, 32'(1) << ISR_RC);
      lite_rd(RLR_OFF, v);
      chk(v == 32'd24, $sformatf("completed RLR %h", v));
      lite_rd(RDR_OFF, v);
      chk(v == 32'h6, "RDR of the completed packet");
      for (int i = 3; i < 6; i++) begin
        lite_rd(RDFD_OFF, v);
        chk(v == rx_words[i], $sformatf("remaining word %0d", i));
      end
      if (seen) mech[M_PARTIAL]++;
      lite_rd(ISR_OFF, v);
      chk(!v[ISR_RPORE], "no overrun in the partial sequence");
      rx_roundtrip(3, 4'h4);
    end

    repeat (10) @(negedge clk);
    done = 1'b1;
  end

endmodule
