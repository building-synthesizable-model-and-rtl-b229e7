// tb_axis_fifo_full: the core at its default parameters (512-word FIFOs,
// 32-bit data, store-and-forward, AXI4-Lite data port) with its transmit
// stream looped back into its receive stream.
//
// Software writes twenty packets of 1..20 words with random TDEST through
// TDR/TDFD/TLR; each packet leaves on the transmit stream, re-enters on the
// receive stream and waits in the receive FIFO. With all twenty stored (at
// most 400 words of the 512) software reads them back through ISR (RC), RLR,
// RDR and RDFD and compares every word, length and destination. RDFO is
// checked against the last packet to arrive. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_axis_fifo_full;

  import axis_fifo_pkg::*;

  localparam int NPKT = 20;
  localparam int WATCHDOG_CYCLES = 200_000;

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

  // loopback
  assign s_axis_tvalid = m_axis_tvalid;
  assign s_axis_tdata  = m_axis_tdata;
  assign s_axis_tkeep  = m_axis_tkeep;
  assign s_axis_tlast  = m_axis_tlast;
  assign s_axis_tdest  = m_axis_tdest;
  assign m_axis_tready = s_axis_tready;

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

  logic [31:0] words [NPKT][20];
  int          len   [NPKT];
  logic [3:0]  dest  [NPKT];
  logic [31:0] v;
  int          total;
  bit          seen;

  initial begin
    rst_n = 1'b0;
    s_axi_awaddr = '0; s_axi_awprot = '0; s_axi_awvalid = 1'b0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_axi_wvalid = 1'b0; s_axi_bready = 1'b0; s_axi_araddr = '0; s_axi_arprot = '0;
    s_axi_arvalid = 1'b0; s_axi_rready = 1'b0;
    s_axi4_awaddr = '0; s_axi4_awlen = '0; s_axi4_awsize = '0; s_axi4_awburst = '0;
    s_axi4_awvalid = 1'b0; s_axi4_wdata = '0; s_axi4_wstrb = '0; s_axi4_wlast = 1'b0;
    s_axi4_wvalid = 1'b0; s_axi4_bready = 1'b0; s_axi4_araddr = '0; s_axi4_arlen = '0;
    s_axi4_arsize = '0; s_axi4_arburst = '0; s_axi4_arvalid = 1'b0; s_axi4_rready = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    lite_wr(ISR_OFF, 32'hFFFF_FFFF);
    lite_rd(TDFV_OFF, v);
    chk(v == 32'd512, $sformatf("TDFV %0d at the default depth", v));

    total = 0;
    for (int p = 0; p < NPKT; p++) begin
      len[p]  = 1 + $urandom_range(19);
      dest[p] = 4'($urandom);
      total  += len[p];
      lite_wr(TDR_OFF, 32'(dest[p]));
      for (int i = 0; i < len[p]; i++) begin
        words[p][i] = $urandom;
        lite_wr(TDFD_OFF, words[p][i]);
      end
      lite_wr(TLR_OFF, 32'(4 * len[p]));
    end
    repeat (100) @(negedge clk);
    lite_rd(ISR_OFF, v);
    chk(v[ISR_TC], "TC after the transmitted packets");
    lite_rd(RDFO_OFF, v);
    chk(v == 32'(len[NPKT-1]), $sformatf("RDFO %0d want %0d", v, len[NPKT-1]));

    for (int p = 0; p < NPKT; p++) begin
      seen = 1'b0;
      for (int k = 0; k < 100 && !seen; k++) begin
        lite_rd(ISR_OFF, v);
        seen = v[ISR_RC];
      end
      chk(seen, $sformatf("RC for packet %0d", p));
      lite_wr(ISR_OFF, 32'(1) << ISR_RC);
      lite_rd(RLR_OFF, v);
      chk(v == 32'(4 * len[p]), $sformatf("RLR of packet %0d: %0d want %0d", p, v, 4 * len[p]));
      lite_rd(RDR_OFF, v);
      chk(v == 32'(dest[p]), $sformatf("RDR of packet %0d", p));
      for (int i = 0; i < len[p]; i++) begin
        lite_rd(RDFD_OFF, v);
        chk(v == words[p][i], $sformatf("packet %0d word %0d: %h want %h", p, i, v, words[p][i]));
      end
    end
    lite_rd(ISR_OFF, v);
    chk((v & 32'hF300_0000) == 32'h0, $sformatf("no error interrupts, ISR %h", v));
    $display("%0d packets, %0d words looped back", NPKT, total);
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
