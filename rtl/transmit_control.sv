// transmit_control: checks the user's transmit programming sequence and lets
// the written words into the transmit FIFO.
//
// A packet is sent by writing TDR (destination), then TDFD once per data word,
// then TLR (length in bytes). A Moore state machine follows those register
// writes; its states and outputs are the ones of the core description:
//   IDLE   -> (TDR write)          STATE0: FIFO_wdestination_enable
//   STATE0 ->                      STATE1: wait for a TDFD write
//   STATE1 -> (TDFD write)         STATE2: FIFO_wdata_enable, length += bytes
//   STATE2 ->                      STATE3: wait for TDFD or TLR
//   STATE3 -> (TDFD write) STATE2, (TLR write) STATE4: FIFO_wlength_enable
//   STATE4 -> TRANSMIT_ERROR (TSE pulse) if the TLR value and the counted
//             length differ in whole words, else IDLE
//   any    -> STUCK when TPOE is set or the order is wrong; only a reset
//             (core or transmit path) leaves STUCK.
// The enables come one cycle after the register write, when the register
// already holds the new value. The byte count of each word comes from the
// length_calc submodule; the length written to the length FIFO is the counted
// one, not the TLR value. This design also accepts a TDFD write while in
// STATE0 or STATE2 (the AXI4 data port can write one word per cycle) and
// sends a TDR/TDFD/TLR write out of order to STUCK; both are its own choices.
// Only the transmit fields of the register access events are used here.
module transmit_control
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic                      clk,
  input  logic                      reset_all_n,     // whole core, active low
  input  logic                      reset_tx_n,      // transmit path, active low
  input  reg_events_t               events,
  input  logic                      error,           // TPOE bit of ISR
  input  logic [LEN_W-1:0]          rs_rdata_tlr,
  input  logic [DATA_W/8-1:0]       strobe,
  output logic                      tse_error,
  output logic                      fifo_wdata_enable,
  output logic                      fifo_wlength_enable,
  output logic                      fifo_wdestination_enable,
  output logic [$clog2(DATA_W/8):0] fifo_len_data_tx_fifo,
  output logic                      active,
  output logic [LEN_W-1:0]          packet_length_seq
);

  localparam int BYTES = DATA_W / 8;
  localparam int SH    = $clog2(BYTES);

  typedef enum logic [2:0] {
    IDLE, STATE0, STATE1, STATE2, STATE3, STATE4, TRANSMIT_ERROR, STUCK
  } state_e;

  state_e state, next;
  logic   rst_n;
  assign rst_n = reset_all_n && reset_tx_n;

  logic [$clog2(BYTES):0] fifo_len_data;

  length_calc #(.DATA_W(DATA_W)) u_length_calc (
    .clk                   (clk),
    .rst_n                 (rst_n),
    .tdfd_write            (events.tdfd_wr),
    .strobe                (strobe),
    .fifo_len_data         (fifo_len_data),
    .fifo_len_data_tx_fifo (fifo_len_data_tx_fifo)
  );

  // Whole words, counting a partial word as one
  function automatic logic [LEN_W-1:0] words(input logic [LEN_W-1:0] bytes);
    return (bytes >> SH) + LEN_W'(|bytes[SH-1:0]);
  endfunction

  logic size_mismatch;
  assign size_mismatch = words(packet_length_seq) != words(rs_rdata_tlr);

  always_comb begin
    next = state;
    unique case (state)
      IDLE:           if (events.tdfd_wr || events.tlr_wr) next = STUCK;
                      else if (events.tdr_wr)              next = STATE0;
      STATE0:         if (events.tdr_wr || events.tlr_wr)  next = STUCK;
                      else if (events.tdfd_wr)             next = STATE2;
                      else                                 next = STATE1;
      STATE1:         if (events.tdr_wr || events.tlr_wr)  next = STUCK;
                      else if (events.tdfd_wr)             next = STATE2;
      STATE2:         if (events.tdr_wr)                   next = STUCK;
                      else if (events.tdfd_wr)             next = STATE2;
                      else if (events.tlr_wr)              next = STATE4;
                      else                                 next = STATE3;
      STATE3:         if (events.tdr_wr)                   next = STUCK;
                      else if (events.tdfd_wr)             next = STATE2;
                      else if (events.tlr_wr)              next = STATE4;
      STATE4:         next = size_mismatch ? TRANSMIT_ERROR : IDLE;
      TRANSMIT_ERROR: next = IDLE;
      STUCK:          next = STUCK;
      default:        next = IDLE;
    endcase
    if (error) next = STUCK;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state             <= IDLE;
      packet_length_seq <= '0;
    end else begin
      state <= next;
      if (state == STATE0)      packet_length_seq <= '0;
      else if (state == STATE2) packet_length_seq <= packet_length_seq + LEN_W'(fifo_len_data);
    end
  end

  // Moore outputs (one row per state of the output table)
  assign active                   = (state != IDLE) && (state != STUCK);
  assign tse_error                = (state == TRANSMIT_ERROR);
  assign fifo_wdata_enable        = (state == STATE2);
  assign fifo_wlength_enable      = (state == STATE4);
  assign fifo_wdestination_enable = (state == STATE0);

endmodule
