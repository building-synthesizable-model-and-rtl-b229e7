// tb_register_space: checks the register file against a register model.
//
// Every cycle the testbench drives a random AXI4-Lite-side write (any of the
// thirteen offsets or an unused one, data with the 0xA5 key now and then), a
// random read address, random ISR set requests from the interrupt controller
// and random loads from the calculation unit and the receive FIFO. A model
// of the registers predicts the read data of the addressed register (zero for
// write-only and unused offsets), ISR with write-one-to-clear and set
// winning over clear, the one-cycle reset requests for 0xA5 in TDFR/RDFR,
// the one-cycle core reset for 0xA5 in SRR (after which every register is
// back at its reset value: ISR 0x01D00000, TDFV depth-4), the TLR/TDR/TDFD
// outputs, bits 30..23 of RLR reading zero, and the decoded access events.
// Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_register_space;

  import axis_fifo_pkg::*;

  localparam int DEPTH = 512;

  logic              clk = 1'b0;
  always #5 clk = ~clk;
  logic              rst_n;
  logic              user_write_enable, user_read_enable, user_write_enable_axi4, user_read_enable_axi4;
  logic [7:0]        rg_write_address, rg_read_address;
  logic [31:0]       user_write_data, user_read_data, user_write_data_axi4, user_read_data_axi4;
  logic [15:0]       calc_tdfv, calc_rdfo;
  logic              tdfv_en, rdfo_en, rdfd_en, rlr_en, rdr_en;
  logic [31:0]       receive_fifo_rdfd, receive_fifo_rlr, interrupt_service;
  logic [DEST_W-1:0] receive_fifo_rdr;
  logic              core_rst_n, transmit_reset_req, receive_reset_req;
  reg_events_t       events;
  logic [31:0]       isr, ier, tdfd;
  logic [LEN_W-1:0]  tlr;
  logic [DEST_W-1:0] tdr;

  register_space #(.C_S_AXI_DATA_WIDTH(32), .DATA_W(32), .C_TX_FIFO_DEPTH(DEPTH),
                   .C_DATA_INTERFACE_TYPE(1'b0)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // model
  logic [31:0] m_isr, m_ier, m_tdfd, m_rlr, m_rdfd;
  logic [15:0] m_tdfv, m_rdfo;
  logic [22:0] m_tlr;
  logic [3:0]  m_tdr, m_rdr;
  bit          m_srr, m_treq, m_rreq;
  int          srr_count, treq_count, rreq_count;

  task automatic model_reset();
    m_isr = ISR_RESET_VALUE; m_ier = '0; m_tdfd = '0; m_rlr = '0; m_rdfd = '0;
    m_tdfv = 16'(DEPTH - 4); m_rdfo = '0; m_tlr = '0; m_tdr = '0; m_rdr = '0;
    m_treq = 0; m_rreq = 0;
  endtask

  function automatic logic [31:0] model_read(input logic [7:0] a);
    case (a)
      ISR_OFF:  return m_isr;
      IER_OFF:  return m_ier;
      TDFV_OFF: return 32'(m_tdfv);
      RDFO_OFF: return 32'(m_rdfo);
      RDFD_OFF: return m_rdfd;
      RLR_OFF:  return m_rlr;
      RDR_OFF:  return 32'(m_rdr);
      default:  return 32'h0;
    endcase
  endfunction

  logic [7:0] offs [14] = '{ISR_OFF, IER_OFF, TDFR_OFF, TDFV_OFF, TDFD_OFF, TLR_OFF, RDFR_OFF,
                            RDFO_OFF, RDFD_OFF, SRR_OFF, TDR_OFF, RDR_OFF, 8'h24, 8'h34};
  bit we;
  logic [7:0] wa;
  logic [31:0] wd;
  bit core_rst;

  initial begin
    rst_n = 1'b0;
    user_write_enable = 0; user_read_enable = 0; user_write_enable_axi4 = 0; user_read_enable_axi4 = 0;
    rg_write_address = '0; rg_read_address = '0; user_write_data = '0; user_write_data_axi4 = '0;
    calc_tdfv = '0; calc_rdfo = '0; tdfv_en = 0; rdfo_en = 0; rdfd_en = 0; rlr_en = 0; rdr_en = 0;
    receive_fifo_rdfd = '0; receive_fifo_rlr = '0; receive_fifo_rdr = '0; interrupt_service = '0;
    m_srr = 0; srr_count = 0; treq_count = 0; rreq_count = 0;
    model_reset();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      // drive this cycle
      user_write_enable = ($urandom_range(1) == 0);
      rg_write_address  = offs[$urandom_range(13)];
      user_write_data   = ($urandom_range(3) == 0) ? {$urandom & 32'hFFFF_FF00} | 32'(RESET_KEY) : $urandom;
      if (rg_write_address == SRR_OFF && $urandom_range(3) != 0) user_write_data[7:0] = 8'h00;
      user_read_enable  = ($urandom_range(1) == 0);
      rg_read_address   = offs[$urandom_range(13)];
      interrupt_service = ($urandom_range(2) == 0) ? ($urandom & $urandom & ISR_USED_MASK) : 32'h0;
      tdfv_en = ($urandom_range(3) == 0); calc_tdfv = 16'($urandom);
      rdfo_en = ($urandom_range(3) == 0); calc_rdfo = 16'($urandom);
      rdfd_en = ($urandom_range(3) == 0); receive_fifo_rdfd = $urandom;
      rlr_en  = ($urandom_range(3) == 0); receive_fifo_rlr = $urandom;
      rdr_en  = ($urandom_range(3) == 0); receive_fifo_rdr = 4'($urandom);
      #1;
      core_rst = m_srr;
      chk(core_rst_n == !core_rst, "core reset from SRR");
      chk(user_read_data == model_read(rg_read_address),
          $sformatf("read %h got %h want %h", rg_read_address, user_read_data, model_read(rg_read_address)));
      chk(isr == m_isr && ier == m_ier && 32'(tlr) == 32'(m_tlr) && tdr == m_tdr && tdfd == m_tdfd,
          "register outputs");
      chk(transmit_reset_req == m_treq && receive_reset_req == m_rreq, "reset request pulses");
      chk(events.tdr_wr  == (user_write_enable && rg_write_address == TDR_OFF) &&
          events.tlr_wr  == (user_write_enable && rg_write_address == TLR_OFF) &&
          events.tdfd_wr == (user_write_enable && rg_write_address == TDFD_OFF) &&
          events.isr_rd  == (user_read_enable && rg_read_address == ISR_OFF) &&
          events.rlr_rd  == (user_read_enable && rg_read_address == RLR_OFF) &&
          events.rdfd_rd == (user_read_enable && rg_read_address == RDFD_OFF), "access events");
      if (m_treq) treq_count++;
      if (m_rreq) rreq_count++;
      if (core_rst) srr_count++;
      we = user_write_enable; wa = rg_write_address; wd = user_write_data;
      @(negedge clk);
      // model update for the edge just passed
      m_srr = we && wa == SRR_OFF && wd[7:0] == RESET_KEY && !m_srr;
      if (core_rst) model_reset();
      else begin
        m_isr = ((m_isr & ~((we && wa == ISR_OFF) ? wd : 32'h0)) | interrupt_service) & ISR_USED_MASK;
        if (we && wa == IER_OFF)  m_ier  = wd;
        if (we && wa == TLR_OFF)  m_tlr  = wd[22:0];
        if (we && wa == TDR_OFF)  m_tdr  = wd[3:0];
        if (we && wa == TDFD_OFF) m_tdfd = wd;
        m_treq = we && wa == TDFR_OFF && wd[7:0] == RESET_KEY;
        m_rreq = we && wa == RDFR_OFF && wd[7:0] == RESET_KEY;
        if (tdfv_en) m_tdfv = calc_tdfv;
        if (rdfo_en) m_rdfo = calc_rdfo;
        if (rdfd_en) m_rdfd = receive_fifo_rdfd;
        if (rlr_en)  m_rlr  = {receive_fifo_rlr[31], 8'h00, receive_fifo_rlr[22:0]};
        if (rdr_en)  m_rdr  = receive_fifo_rdr;
      end
    end
    chk(srr_count > 0 && treq_count > 0 && rreq_count > 0, "SRR, TDFR and RDFR resets all happened");
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
