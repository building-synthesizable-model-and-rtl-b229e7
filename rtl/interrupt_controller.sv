// interrupt_controller: produces the ISR set requests and the interrupt line.
//
// interrupt_service has a 1 for every ISR bit to be set in this cycle; the
// register space ORs it into ISR, where a bit stays set until the user
// writes 1 to it. The events are:
//   bit 19 RFPE, 20 RFPF, 21 TFPE, 22 TFPF  rising edge of the programmable
//        empty/full levels of the receive and transmit data FIFOs
//   bit 23 RRC, 24 TRC                      receive/transmit reset completed
//   bit 25 TSE                              transmit size error (transmit control)
//   bit 26 RC, 27 TC                        packet received / transmitted
//   bit 28 TPOE   a transmit data word met a FIFO without room for it
//   bit 29 RPUE   RDFD read while the receive data FIFO is empty and no
//                 packet is being read
//   bit 30 RPORE  receive packet overrun read (receive control)
//   bit 31 RPURE  RLR read while no length is available and no packet is
//                 being read
// interrupt_bit is high while any ISR bit that is also set in IER is high.
// The four edge detectors start at 1, so a level that is already true after
// a reset raises its bit only after it has gone away and come back.
// The bit assignment and the split between passed-on and computed events
// follow the core description. The description names RPORE both as an event
// computed here and as an output of the receive control; this design takes
// it from the receive control, which already tracks the read sequence. The
// exact conditions for TPOE, RPUE and RPURE are this design's reading of the
// one-line definitions given there.
module interrupt_controller
  import axis_fifo_pkg::*;
(
  input  logic        clk,
  input  logic        reset_all_n,
  input  logic        transmit_reset_n,
  input  logic        receive_reset_n,
  input  logic [31:0] isr,
  input  logic [31:0] ier,
  input  logic        receive_empty,            // programmable empty level
  input  logic        receive_full,             // programmable full level
  input  logic        transmit_empty,
  input  logic        transmit_full,
  input  logic        receive_reset_complete,
  input  logic        transmit_reset_complete,
  input  logic        receive_complete_signal,
  input  logic        transmit_complete_signal,
  input  logic        transmit_size_error,
  input  logic        receive_overrun,          // RPORE from the receive control
  input  logic        transmit_wr_en,           // data word offered to the transmit FIFO
  input  logic        transmit_no_room,         // ... and it does not fit
  input  logic        read_op,                  // RDFD read
  input  logic        rlr_read_trial,           // RLR read
  input  logic        receive_data_empty,
  input  logic        receive_length_empty,
  input  logic        receive_active,           // receive control is in a sequence
  output logic [31:0] interrupt_service,
  output logic        interrupt_bit
);

  logic re_q, rf_q, te_q, tf_q;

  always_ff @(posedge clk) begin
    if (!reset_all_n || !receive_reset_n) begin
      re_q <= 1'b1;
      rf_q <= 1'b1;
    end else begin
      re_q <= receive_empty;
      rf_q <= receive_full;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_all_n || !transmit_reset_n) begin
      te_q <= 1'b1;
      tf_q <= 1'b1;
    end else begin
      te_q <= transmit_empty;
      tf_q <= transmit_full;
    end
  end

  always_comb begin
    interrupt_service            = '0;
    interrupt_service[ISR_RFPE]  = receive_empty  && !re_q;
    interrupt_service[ISR_RFPF]  = receive_full   && !rf_q;
    interrupt_service[ISR_TFPE]  = transmit_empty && !te_q;
    interrupt_service[ISR_TFPF]  = transmit_full  && !tf_q;
    interrupt_service[ISR_RRC]   = receive_reset_complete;
    interrupt_service[ISR_TRC]   = transmit_reset_complete;
    interrupt_service[ISR_TSE]   = transmit_size_error;
    interrupt_service[ISR_RC]    = receive_complete_signal;
    interrupt_service[ISR_TC]    = transmit_complete_signal;
    interrupt_service[ISR_TPOE]  = transmit_wr_en && transmit_no_room;
    interrupt_service[ISR_RPUE]  = read_op && receive_data_empty && !receive_active;
    interrupt_service[ISR_RPORE] = receive_overrun;
    interrupt_service[ISR_RPURE] = rlr_read_trial && receive_length_empty && !receive_active;
  end

  assign interrupt_bit = |(isr & ier);

endmodule
