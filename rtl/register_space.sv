// register_space: the thirteen user-visible registers of the core and the
// reset generator.
//
// Register map (byte offsets from the base address, see axis_fifo_pkg):
//   0x00 ISR  read / write-1-to-clear   interrupt status, bits 31..19
//   0x04 IER  read/write                interrupt enable mask
//   0x08 TDFR write                     0xA5 requests a transmit-path reset
//   0x0C TDFV read                      transmit data FIFO vacancy (locations)
//   0x10 TDFD write                     transmit data word
//   0x14 TLR  write                     transmit packet length in bytes [22:0]
//   0x18 RDFR write                     0xA5 requests a receive-path reset
//   0x1C RDFO read                      receive data FIFO occupancy (locations)
//   0x20 RDFD read                      receive data word
//   0x14 RLR  read                      receive length [22:0], bit 31 = partial
//   0x28 SRR  write                     0xA5 resets the whole core at once
//   0x2C TDR  write                     transmit destination [3:0]
//   0x30 RDR  read                      receive destination [3:0]
// Registers the user writes and registers the core writes are disjoint
// (except ISR): TDFV/RDFO come from the calculation unit, RDFD/RLR/RDR are
// loaded from the receive FIFO when the receive control raises their enables.
// A write to a read-only register is ignored; reading a write-only register
// returns zero. With C_DATA_INTERFACE_TYPE = 1 (AXI4 data interface) the
// AXI4-Lite port loses access to TDFD and RDFD, which the AXI4 port reaches.
// Reads are combinational from the address; writes take effect at the clock
// edge of the write_enable cycle. ISR: a set request from the interrupt
// controller wins over a clear in the same cycle.
// The SRR reset is a one-cycle pulse that resets every other register of the
// core (core_rst_n); TDFR and RDFR writes produce one-cycle request pulses that
// the transmit and receive paths carry out once no packet is in flight.
// Register set, offsets, access types and reset values follow the core
// description; the priority of set over clear in ISR is this design's choice.
// Bits 30..23 of receive_fifo_rlr are not stored: RLR reads them as zero.
module register_space
  import axis_fifo_pkg::*;
#(
  parameter int C_S_AXI_DATA_WIDTH    = 32,
  parameter int DATA_W                = 32,
  parameter int C_TX_FIFO_DEPTH       = 512,
  parameter bit C_DATA_INTERFACE_TYPE = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,          // external reset, active low
  // AXI4-Lite side
  input  logic                          user_write_enable,
  input  logic [7:0]                    rg_write_address,
  input  logic [C_S_AXI_DATA_WIDTH-1:0] user_write_data,
  input  logic                          user_read_enable,
  input  logic [7:0]                    rg_read_address,
  output logic [C_S_AXI_DATA_WIDTH-1:0] user_read_data,
  // AXI4 side (TDFD / RDFD only)
  input  logic                          user_write_enable_axi4,
  input  logic [DATA_W-1:0]             user_write_data_axi4,
  input  logic                          user_read_enable_axi4,
  output logic [DATA_W-1:0]             user_read_data_axi4,
  // calculation unit
  input  logic [15:0]                   calc_tdfv,
  input  logic                          tdfv_en,
  input  logic [15:0]                   calc_rdfo,
  input  logic                          rdfo_en,
  // receive FIFO, enabled by the receive control
  input  logic [DATA_W-1:0]             receive_fifo_rdfd,
  input  logic [31:0]                   receive_fifo_rlr,
  input  logic [DEST_W-1:0]             receive_fifo_rdr,
  input  logic                          rdfd_en,
  input  logic                          rlr_en,
  input  logic                          rdr_en,
  // interrupt controller
  input  logic [31:0]                   interrupt_service,   // ISR bits to set
  // outputs
  output logic                          core_rst_n,          // external or SRR reset
  output logic                          transmit_reset_req,  // TDFR = 0xA5 (pulse)
  output logic                          receive_reset_req,   // RDFR = 0xA5 (pulse)
  output reg_events_t                   events,
  output logic [31:0]                   isr,
  output logic [31:0]                   ier,
  output logic [LEN_W-1:0]              tlr,
  output logic [DEST_W-1:0]             tdr,
  output logic [DATA_W-1:0]             tdfd
);

  logic [15:0]        tdfv_q, rdfo_q;
  logic [DATA_W-1:0]  rdfd_q;
  logic [31:0]        rlr_q;
  logic [DEST_W-1:0]  rdr_q;
  logic               srr_q;

  logic lite_data;  // AXI4-Lite owns the data registers
  assign lite_data = !C_DATA_INTERFACE_TYPE;

  function automatic logic wr_to(input logic [7:0] off);
    return user_write_enable && (rg_write_address == off);
  endfunction

  // SRR pulse: only the external reset clears it, so it lasts exactly one cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) srr_q <= 1'b0;
    else        srr_q <= wr_to(SRR_OFF) && (user_write_data[7:0] == RESET_KEY) && !srr_q;
  end
  assign core_rst_n = rst_n && !srr_q;

  logic [31:0] isr_clear;
  assign isr_clear = wr_to(ISR_OFF) ? user_write_data[31:0] : 32'h0;

  always_ff @(posedge clk) begin
    if (!core_rst_n) begin
      isr                <= ISR_RESET_VALUE;
      ier                <= '0;
      tlr                <= '0;
      tdr                <= '0;
      tdfd               <= '0;
      tdfv_q             <= 16'(C_TX_FIFO_DEPTH - 4);
      rdfo_q             <= '0;
      rdfd_q             <= '0;
      rlr_q              <= '0;
      rdr_q              <= '0;
      transmit_reset_req <= 1'b0;
      receive_reset_req  <= 1'b0;
    end else begin
      isr <= ((isr & ~isr_clear) | interrupt_service) & ISR_USED_MASK;
      if (wr_to(IER_OFF)) ier <= user_write_data[31:0];
      if (wr_to(TLR_OFF)) tlr <= user_write_data[LEN_W-1:0];
      if (wr_to(TDR_OFF)) tdr <= user_write_data[DEST_W-1:0];
      if (lite_data && wr_to(TDFD_OFF))
        tdfd <= DATA_W'(user_write_data);
      else if (!lite_data && user_write_enable_axi4)
        tdfd <= user_write_data_axi4;
      transmit_reset_req <= wr_to(TDFR_OFF) && (user_write_data[7:0] == RESET_KEY);
      receive_reset_req  <= wr_to(RDFR_OFF) && (user_write_data[7:0] == RESET_KEY);
      if (tdfv_en) tdfv_q <= calc_tdfv;
      if (rdfo_en) rdfo_q <= calc_rdfo;
      if (rdfd_en) rdfd_q <= receive_fifo_rdfd;
      if (rlr_en)  rlr_q  <= {receive_fifo_rlr[31], 8'h0, receive_fifo_rlr[LEN_W-1:0]};
      if (rdr_en)  rdr_q  <= receive_fifo_rdr;
    end
  end

  // AXI4-Lite read mux; write-only and unmapped offsets read as zero
  always_comb begin
    user_read_data = '0;
    unique case (rg_read_address)
      ISR_OFF:  user_read_data = C_S_AXI_DATA_WIDTH'(isr);
      IER_OFF:  user_read_data = C_S_AXI_DATA_WIDTH'(ier);
      TDFV_OFF: user_read_data = C_S_AXI_DATA_WIDTH'(tdfv_q);
      RDFO_OFF: user_read_data = C_S_AXI_DATA_WIDTH'(rdfo_q);
      RDFD_OFF: user_read_data = lite_data ? C_S_AXI_DATA_WIDTH'(rdfd_q) : '0;
      RLR_OFF:  user_read_data = C_S_AXI_DATA_WIDTH'(rlr_q);
      RDR_OFF:  user_read_data = C_S_AXI_DATA_WIDTH'(rdr_q);
      default:  user_read_data = '0;
    endcase
  end
  assign user_read_data_axi4 = lite_data ? '0 : rdfd_q;

  // Accesses that the control units follow
  always_comb begin
    events.tdr_wr  = wr_to(TDR_OFF);
    events.tlr_wr  = wr_to(TLR_OFF);
    events.tdfd_wr = lite_data ? wr_to(TDFD_OFF) : user_write_enable_axi4;
    events.isr_rd  = user_read_enable && (rg_read_address == ISR_OFF);
    events.rlr_rd  = user_read_enable && (rg_read_address == RLR_OFF);
    events.rdfd_rd = lite_data ? (user_read_enable && (rg_read_address == RDFD_OFF))
                               : user_read_enable_axi4;
  end

endmodule
