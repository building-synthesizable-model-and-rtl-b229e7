// axis_fifo_top: AXI4-Stream FIFO core. A memory-mapped master (processor)
// sends packets out of an AXI4-Stream transmit channel and takes packets in
// from an AXI4-Stream receive channel by reading and writing registers, with
// no DMA engine.
//
// Transmit path: the master writes TDR (destination), TDFD (data words) and
// TLR (length in bytes). transmit_control checks that order and copies the
// words, the counted length and the destination into tx_fifo;
// stream_mapper sends each packet on m_axis_* with TKEEP/TLAST/TDEST, in
// store-and-forward or cut-through mode (enable_cut_through).
// Receive path: rx_stream_if accepts s_axis_* beats into rx_fifo and measures
// each packet; receive_control follows the master's reads of ISR, RLR, RDR and
// RDFD and loads those registers from rx_fifo one step ahead.
// Shared: axi4_lite_if (register access; also data access when
// C_DATA_INTERFACE_TYPE = 0), axi4_if (burst access to TDFD/RDFD when
// C_DATA_INTERFACE_TYPE = 1), register_space, calc_unit (TDFV, RDFO) and
// interrupt_controller (ISR events, interrupt output).
// Resets: s_axi_aresetn (active low) or writing 0xA5 to SRR resets the whole
// core at once and drives the three *_reset_out_n outputs low for that
// cycle; 0xA5 written to TDFR or RDFR resets only that path, after the
// packet in flight on its stream side has finished. Everything runs on one
// clock, s_axi_aclk. The datapath width (TDFD, RDFD, both streams and the
// AXI4 data port) is C_AXIS_DATA_WIDTH; the AXI4-Lite port is
// C_S_AXI_DATA_WIDTH wide and must match it when it carries the data.
// The block structure, register map, parameters and their defaults follow the
// core description; C_DATA_INTERFACE_TYPE (default 0, AXI4-Lite) and the
// single datapath width are this design's choices.
module axis_fifo_top
  import axis_fifo_pkg::*;
#(
  parameter int          C_S_AXI_DATA_WIDTH    = 32,
  parameter int          C_RX_FIFO_DEPTH       = 512,
  parameter int          C_TX_FIFO_DEPTH       = 512,
  parameter int          C_S_AXI4_DATA_WIDTH   = 32,
  parameter int          C_AXIS_DATA_WIDTH     = 32,
  parameter logic [31:0] C_BASEADDR            = 32'h0,
  parameter logic [31:0] C_AXI4_BASEADDR       = 32'h0,
  parameter int          full_threshold_data   = 0,
  parameter int          empty_threshold_data  = 0,
  parameter bit          enable_cut_through    = 1'b0,
  parameter bit          C_DATA_INTERFACE_TYPE = 1'b0
) (
  input  logic                                s_axi_aclk,
  input  logic                                s_axi_aresetn,
  output logic                                interrupt,
  output logic                                mm2s_prmry_reset_out_n,
  output logic                                s2mm_prmry_reset_out_n,
  output logic                                mm2s_cntrl_reset_out_n,
  // AXI4-Lite slave
  input  logic [31:0]                         s_axi_awaddr,
  input  logic [2:0]                          s_axi_awprot,
  input  logic                                s_axi_awvalid,
  output logic                                s_axi_awready,
  input  logic [C_S_AXI_DATA_WIDTH-1:0]       s_axi_wdata,
  input  logic [C_S_AXI_DATA_WIDTH/8-1:0]     s_axi_wstrb,
  input  logic                                s_axi_wvalid,
  output logic                                s_axi_wready,
  output logic [1:0]                          s_axi_bresp,
  output logic                                s_axi_bvalid,
  input  logic                                s_axi_bready,
  input  logic [31:0]                         s_axi_araddr,
  input  logic [2:0]                          s_axi_arprot,
  input  logic                                s_axi_arvalid,
  output logic                                s_axi_arready,
  output logic [C_S_AXI_DATA_WIDTH-1:0]       s_axi_rdata,
  output logic [1:0]                          s_axi_rresp,
  output logic                                s_axi_rvalid,
  input  logic                                s_axi_rready,
  // AXI4 slave (data registers)
  input  logic [31:0]                         s_axi4_awaddr,
  input  logic [7:0]                          s_axi4_awlen,
  input  logic [2:0]                          s_axi4_awsize,
  input  logic [1:0]                          s_axi4_awburst,
  input  logic                                s_axi4_awvalid,
  output logic                                s_axi4_awready,
  input  logic [C_S_AXI4_DATA_WIDTH-1:0]      s_axi4_wdata,
  input  logic [C_S_AXI4_DATA_WIDTH/8-1:0]    s_axi4_wstrb,
  input  logic                                s_axi4_wlast,
  input  logic                                s_axi4_wvalid,
  output logic                                s_axi4_wready,
  output logic [1:0]                          s_axi4_bresp,
  output logic                                s_axi4_bvalid,
  input  logic                                s_axi4_bready,
  input  logic [31:0]                         s_axi4_araddr,
  input  logic [7:0]                          s_axi4_arlen,
  input  logic [2:0]                          s_axi4_arsize,
  input  logic [1:0]                          s_axi4_arburst,
  input  logic                                s_axi4_arvalid,
  output logic                                s_axi4_arready,
  output logic [C_S_AXI4_DATA_WIDTH-1:0]      s_axi4_rdata,
  output logic [1:0]                          s_axi4_rresp,
  output logic                                s_axi4_rlast,
  output logic                                s_axi4_rvalid,
  input  logic                                s_axi4_rready,
  // AXI4-Stream transmit (master)
  output logic                                m_axis_tvalid,
  input  logic                                m_axis_tready,
  output logic [C_AXIS_DATA_WIDTH-1:0]        m_axis_tdata,
  output logic [C_AXIS_DATA_WIDTH/8-1:0]      m_axis_tkeep,
  output logic                                m_axis_tlast,
  output logic [DEST_W-1:0]                   m_axis_tdest,
  // AXI4-Stream receive (slave)
  input  logic                                s_axis_tvalid,
  output logic                                s_axis_tready,
  input  logic [C_AXIS_DATA_WIDTH-1:0]        s_axis_tdata,
  input  logic [C_AXIS_DATA_WIDTH/8-1:0]      s_axis_tkeep,
  input  logic                                s_axis_tlast,
  input  logic [DEST_W-1:0]                   s_axis_tdest
);

  localparam int DATA_W = C_AXIS_DATA_WIDTH;
  localparam int BYTES  = DATA_W / 8;
  localparam int SH     = $clog2(BYTES);
  localparam int TXB_W  = $clog2(C_TX_FIFO_DEPTH * BYTES) + 1;
  localparam int BC_W   = $clog2(BYTES) + 1;

  logic clk;
  assign clk = s_axi_aclk;

  // ---------------- resets ----------------
  logic core_rst_n, tx_rst_n, rx_rst_n;
  logic tx_reset_req, rx_reset_req, tx_reset_done, rx_reset_done;

  assign mm2s_prmry_reset_out_n = core_rst_n;
  assign s2mm_prmry_reset_out_n = core_rst_n;
  assign mm2s_cntrl_reset_out_n = core_rst_n;

  // ---------------- AXI4-Lite interface ----------------
  logic                          l_we, l_re;
  logic [7:0]                    l_waddr, l_raddr;
  logic [C_S_AXI_DATA_WIDTH-1:0] l_wdata, l_rdata;
  logic [C_S_AXI_DATA_WIDTH/8-1:0] l_strb;

  axi4_lite_if #(.C_S_AXI_DATA_WIDTH(C_S_AXI_DATA_WIDTH), .C_BASEADDR(C_BASEADDR)) u_axi4_lite_if (
    .clk(clk), .rst_n(core_rst_n),
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .write_enable(l_we), .write_address(l_waddr), .data_in(l_wdata), .strobe_out(l_strb),
    .read_enable(l_re), .memory_address(l_raddr), .data_out(l_rdata)
  );

  // ---------------- AXI4 interface ----------------
  logic              a_we, a_re;
  logic [7:0]        a_waddr, a_raddr;
  logic [DATA_W-1:0] a_wdata, a_rdata;
  logic [BYTES-1:0]  a_strb;

  axi4_if #(.C_S_AXI4_DATA_WIDTH(C_S_AXI4_DATA_WIDTH), .C_AXI4_BASEADDR(C_AXI4_BASEADDR)) u_axi4_if (
    .clk(clk), .rst_n(core_rst_n),
    .s_axi4_awaddr, .s_axi4_awlen, .s_axi4_awsize, .s_axi4_awburst, .s_axi4_awvalid, .s_axi4_awready,
    .s_axi4_wdata, .s_axi4_wstrb, .s_axi4_wlast, .s_axi4_wvalid, .s_axi4_wready,
    .s_axi4_bresp, .s_axi4_bvalid, .s_axi4_bready,
    .s_axi4_araddr, .s_axi4_arlen, .s_axi4_arsize, .s_axi4_arburst, .s_axi4_arvalid, .s_axi4_arready,
    .s_axi4_rdata, .s_axi4_rresp, .s_axi4_rlast, .s_axi4_rvalid, .s_axi4_rready,
    .write_enable(a_we), .write_address(a_waddr), .data_in(a_wdata), .strobe_out(a_strb),
    .read_enable(a_re), .memory_address(a_raddr), .data_out(a_rdata)
  );

  logic unused_axi4_addr;
  assign unused_axi4_addr = ^{a_waddr, a_raddr};

  // ---------------- register space ----------------
  reg_events_t       ev;
  logic [31:0]       isr, ier, isr_set;
  logic [LEN_W-1:0]  tlr;
  logic [DEST_W-1:0] tdr;
  logic [DATA_W-1:0] tdfd;
  logic [15:0]       tdfv_val, rdfo_val;
  logic              tdfv_en, rdfo_en;
  logic [DATA_W-1:0] rx_data_head;
  logic [31:0]       rx_len_head;
  logic [DEST_W-1:0] rx_dest_head;
  logic              rg_rdfd_en, rg_rlr_en, rg_rdr_en;

  register_space #(
    .C_S_AXI_DATA_WIDTH(C_S_AXI_DATA_WIDTH), .DATA_W(DATA_W),
    .C_TX_FIFO_DEPTH(C_TX_FIFO_DEPTH), .C_DATA_INTERFACE_TYPE(C_DATA_INTERFACE_TYPE)
  ) u_register_space (
    .clk(clk), .rst_n(s_axi_aresetn),
    .user_write_enable(l_we), .rg_write_address(l_waddr), .user_write_data(l_wdata),
    .user_read_enable(l_re), .rg_read_address(l_raddr), .user_read_data(l_rdata),
    .user_write_enable_axi4(a_we), .user_write_data_axi4(a_wdata),
    .user_read_enable_axi4(a_re), .user_read_data_axi4(a_rdata),
    .calc_tdfv(tdfv_val), .tdfv_en(tdfv_en), .calc_rdfo(rdfo_val), .rdfo_en(rdfo_en),
    .receive_fifo_rdfd(rx_data_head), .receive_fifo_rlr(rx_len_head), .receive_fifo_rdr(rx_dest_head),
    .rdfd_en(rg_rdfd_en), .rlr_en(rg_rlr_en), .rdr_en(rg_rdr_en),
    .interrupt_service(isr_set),
    .core_rst_n(core_rst_n), .transmit_reset_req(tx_reset_req), .receive_reset_req(rx_reset_req),
    .events(ev), .isr(isr), .ier(ier), .tlr(tlr), .tdr(tdr), .tdfd(tdfd)
  );

  // ---------------- transmit path ----------------
  logic              tc_wdata_en, tc_wlen_en, tc_wdest_en, tc_tse, tc_active;
  logic [BC_W-1:0]   tc_wbyte;
  logic [LEN_W-1:0]  tc_pkt_len;
  logic [BYTES-1:0]  tx_strobe;

  assign tx_strobe = C_DATA_INTERFACE_TYPE ? a_strb : BYTES'(l_strb);

  transmit_control #(.DATA_W(DATA_W)) u_transmit_control (
    .clk(clk), .reset_all_n(core_rst_n), .reset_tx_n(tx_rst_n),
    .events(ev), .error(isr[ISR_TPOE]), .rs_rdata_tlr(tlr), .strobe(tx_strobe),
    .tse_error(tc_tse), .fifo_wdata_enable(tc_wdata_en), .fifo_wlength_enable(tc_wlen_en),
    .fifo_wdestination_enable(tc_wdest_en), .fifo_len_data_tx_fifo(tc_wbyte),
    .active(tc_active), .packet_length_seq(tc_pkt_len)
  );

  logic              tf_r_en, tf_re_l, tf_re_d, tf_empty_l, tf_empty_d, tf_empty, tf_full;
  logic [BC_W-1:0]   tf_rd_bytes;
  logic [DATA_W-1:0] tf_data;
  logic [LEN_W-1:0]  tf_len;
  logic [DEST_W-1:0] tf_dest;
  logic [TXB_W-1:0]  tf_occ, tf_vac;

  tx_fifo #(.DATA_W(DATA_W), .C_TX_FIFO_DEPTH(C_TX_FIFO_DEPTH)) u_tx_fifo (
    .clk(clk), .rst_n(tx_rst_n),
    .we_data(tc_wdata_en), .w_byte(tc_wbyte), .data_in_f(tdfd),
    .we_l(tc_wlen_en), .data_in_l(tc_pkt_len), .we_d(tc_wdest_en), .data_in_d(tdr),
    .r_en(tf_r_en), .rd_bytes(tf_rd_bytes), .data_out(tf_data),
    .re_l(tf_re_l), .data_out_l(tf_len), .empty_l(tf_empty_l),
    .re_d(tf_re_d), .data_out_d(tf_dest), .empty_d(tf_empty_d),
    .fifo_empty(tf_empty), .fifo_full(tf_full), .occupancy(tf_occ), .vacancy(tf_vac)
  );

  logic tx_complete;

  stream_mapper #(.DATA_W(DATA_W), .OCC_W(TXB_W), .enable_cut_through(enable_cut_through)) u_stream_mapper (
    .clk(clk), .reset_all_n(core_rst_n), .tx_reset_req(tx_reset_req),
    .tx_rst_n(tx_rst_n), .reset_complete(tx_reset_done), .tx_complete(tx_complete),
    .empty_l(tf_empty_l), .data_out_l(tf_len), .re_l(tf_re_l),
    .empty_d(tf_empty_d), .data_out_d(tf_dest), .re_d(tf_re_d),
    .occupancy(tf_occ), .data_out(tf_data), .r_en(tf_r_en), .rd_bytes(tf_rd_bytes),
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata, .m_axis_tkeep, .m_axis_tlast, .m_axis_tdest
  );

  // ---------------- receive path ----------------
  logic              rs_pass, rs_end, rs_len_reset;
  logic [31:0]       rs_len;
  logic [DATA_W-1:0] rs_data;
  logic [DEST_W-1:0] rs_dest;
  logic              rf_full, rf_empty, rf_len_empty, rf_prog_full, rf_prog_empty, rf_done;
  logic [$clog2(C_RX_FIFO_DEPTH):0] rf_occ;
  logic [15:0]       rf_prev;

  rx_stream_if #(.DATA_W(DATA_W)) u_rx_stream_if (
    .clk(clk), .reset_all_n(core_rst_n), .rx_reset_req(rx_reset_req),
    .rx_rst_n(rx_rst_n), .reset_complete(rx_reset_done),
    .s_axis_tvalid, .s_axis_tready, .s_axis_tdata, .s_axis_tkeep, .s_axis_tlast, .s_axis_tdest,
    .data_fifo_full(rf_full), .pass_length(rs_pass), .packet_end(rs_end),
    .length_reset(rs_len_reset), .packet_length(rs_len), .tdata(rs_data), .tdest(rs_dest)
  );

  logic unused_len_reset;
  assign unused_len_reset = rs_len_reset ^ tc_active ^ tf_empty ^ tf_full;

  logic rc_len_en, rc_dest_en, rc_data_en, rc_on, rc_rc, rc_rpore, rc_proc;

  rx_fifo #(
    .DATA_W(DATA_W), .C_RX_FIFO_DEPTH(C_RX_FIFO_DEPTH),
    .full_threshold_data(full_threshold_data), .empty_threshold_data(empty_threshold_data),
    .enable_cut_through(enable_cut_through)
  ) u_rx_fifo (
    .clk(clk), .rst_n(rx_rst_n),
    .pass(rs_pass), .packet_end(rs_end), .data_in(rs_data), .length_in(rs_len), .dest_in(rs_dest),
    .data_rd_enable(rc_data_en), .length_rd_enable(rc_len_en), .dest_rd_enable(rc_dest_en),
    .data_out(rx_data_head), .length_out(rx_len_head), .dest_out(rx_dest_head),
    .data_fifo_full(rf_full), .data_fifo_empty(rf_empty), .length_fifo_empty(rf_len_empty),
    .prog_full(rf_prog_full), .prog_empty(rf_prog_empty), .occupancy(rf_occ),
    .prev_location(rf_prev), .packet_done(rf_done)
  );

  logic unused_rf_occ;
  assign unused_rf_occ = ^{rf_occ, rc_proc};

  receive_control #(.DATA_W(DATA_W)) u_receive_control (
    .clk(clk), .reset_all_n(core_rst_n), .receive_reset_n(rx_rst_n),
    .events(ev), .rf_length_empty(rf_len_empty), .receive_fifo_rlr(rx_len_head),
    .rg_rdfd_enable(rg_rdfd_en), .rg_rlr_enable(rg_rlr_en), .rg_rdr_enable(rg_rdr_en),
    .rf_length_enable(rc_len_en), .rf_dest_enable(rc_dest_en), .rf_data_enable(rc_data_en),
    .on_off(rc_on), .ic_rc_26(rc_rc), .ic_rpore_30(rc_rpore), .ic_process_indication(rc_proc)
  );

  // ---------------- calculation unit ----------------
  calc_unit #(.DATA_W(DATA_W), .C_TX_FIFO_DEPTH(C_TX_FIFO_DEPTH), .VAC_W(TXB_W)) u_calc_unit (
    .clk(clk), .reset_all_n(core_rst_n), .reset_tx_n(tx_rst_n), .reset_rx_n(rx_rst_n),
    .tx_fifo_vacancy(tf_vac), .rg_fifo_vacancy(tdfv_val), .rg_tdfv_enable(tdfv_en),
    .rx_fifo_occupancy(rf_prev), .rx_packet_done(rf_done), .rx_fifo_empty(rf_empty),
    .rg_fifo_occupancy(rdfo_val), .rg_rdfo_enable(rdfo_en)
  );

  // ---------------- interrupt controller ----------------
  logic tx_prog_empty, tx_prog_full, tx_no_room;
  assign tx_prog_empty = 32'(tf_occ >> SH) <= 32'(empty_threshold_data);
  assign tx_prog_full  = 32'(tf_vac >> SH) <= 32'(full_threshold_data);
  assign tx_no_room    = 32'(tf_vac) < 32'(tc_wbyte) + 1;

  interrupt_controller u_interrupt_controller (
    .clk(clk), .reset_all_n(core_rst_n), .transmit_reset_n(tx_rst_n), .receive_reset_n(rx_rst_n),
    .isr(isr), .ier(ier),
    .receive_empty(rf_prog_empty), .receive_full(rf_prog_full),
    .transmit_empty(tx_prog_empty), .transmit_full(tx_prog_full),
    .receive_reset_complete(rx_reset_done), .transmit_reset_complete(tx_reset_done),
    .receive_complete_signal(rc_rc), .transmit_complete_signal(tx_complete),
    .transmit_size_error(tc_tse), .receive_overrun(rc_rpore),
    .transmit_wr_en(tc_wdata_en), .transmit_no_room(tx_no_room),
    .read_op(ev.rdfd_rd), .rlr_read_trial(ev.rlr_rd),
    .receive_data_empty(rf_empty), .receive_length_empty(rf_len_empty), .receive_active(rc_on),
    .interrupt_service(isr_set), .interrupt_bit(interrupt)
  );

  initial begin
    assert (C_S_AXI4_DATA_WIDTH == C_AXIS_DATA_WIDTH)
      else $error("the AXI4 data port and the streams must have the same width");
    assert (C_DATA_INTERFACE_TYPE || (C_S_AXI_DATA_WIDTH == C_AXIS_DATA_WIDTH))
      else $error("the AXI4-Lite port carries data and must match the stream width");
  end

endmodule
