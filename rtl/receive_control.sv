// receive_control: follows the user's receive programming sequence and moves
// packet information from the receive FIFO into RLR, RDR and RDFD one step
// before the user reads it.
//
// Sequence for a complete packet: read ISR (RC set), read RLR, (read RDR),
// then read RDFD once per word. In cut-through mode a packet can also be read
// while it arrives: read ISR, read RLR (bit 31 = 1, length so far), read the
// words received so far from RDFD, and repeat until RLR shows the packet
// complete. The word counter runs on across the parts of one packet and is
// cleared when a complete packet has been read.
// Moore states (names of the core description):
//   IDLE  -> RC when a complete packet heads the length FIFO; -> LENGTH on an
//            ISR read when only a partial packet is there; an RDFD read here
//            reads past the packet -> RPORE.
//   RC    (RC interrupt pulse)               -> LENGTH
//   LENGTH(RLR <- length FIFO head)          -> WAIT for the RLR read
//   WAIT  after LENGTH: RLR read -> DESTINATION; RDFD read -> RPORE
//   DESTINATION (RDR <- destination FIFO)    -> DATA, or IDLE if no word is due
//   DATA  (RDFD <- data FIFO head, one word) -> WAIT for the RDFD read
//   WAIT  after DATA: RDFD read -> DATA while words remain, else IDLE
//   RPORE (RPORE interrupt pulse)            -> STUCK
//   STUCK until a core or receive-path reset.
// Entering RC without waiting for an ISR read, and the RDR read being optional are
// this design's reading of the description; so is flagging every RDFD read
// that the sequence does not expect as RPORE (the description sends a wrong
// sequence to STUCK and an overrun through RPORE to STUCK).
// Only the receive fields of the register access events are used here, and
// only bit 31 and bits 22..0 of receive_fifo_rlr.
module receive_control
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic         clk,
  input  logic         reset_all_n,
  input  logic         receive_reset_n,
  input  reg_events_t  events,
  input  logic         rf_length_empty,
  input  logic [31:0]  receive_fifo_rlr,
  output logic         rg_rdfd_enable,
  output logic         rg_rlr_enable,
  output logic         rg_rdr_enable,
  output logic         rf_length_enable,
  output logic         rf_dest_enable,
  output logic         rf_data_enable,
  output logic         on_off,
  output logic         ic_rc_26,
  output logic         ic_rpore_30,
  output logic         ic_process_indication
);

  localparam int SH = $clog2(DATA_W / 8);

  typedef enum logic [2:0] {IDLE, RC, LENGTH, DESTINATION, DATA, WAIT, RPORE, STUCK} state_e;

  state_e            state;
  logic              wait_rdfd;        // WAIT follows DATA (else it follows LENGTH)
  logic              complete;         // the loaded length is final
  logic [LEN_W-1:0]  counter, limit;   // words read / words available
  logic              rst_n;
  logic              head_complete;

  assign rst_n         = reset_all_n && receive_reset_n;
  assign head_complete = !receive_fifo_rlr[31];

  function automatic logic [LEN_W-1:0] words(input logic [LEN_W-1:0] bytes);
    return (bytes >> SH) + LEN_W'(|bytes[SH-1:0]);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      wait_rdfd <= 1'b0;
      complete  <= 1'b0;
      counter   <= '0;
      limit     <= '0;
      ic_process_indication <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          ic_process_indication <= 1'b0;
          if (events.rdfd_rd)                             state <= RPORE;
          else if (!rf_length_empty && head_complete)     state <= RC;
          else if (!rf_length_empty && events.isr_rd)     state <= LENGTH;
        end
        RC:     state <= LENGTH;
        LENGTH: begin
          ic_process_indication <= 1'b1;
          complete  <= head_complete;
          limit     <= words(receive_fifo_rlr[LEN_W-1:0]);
          wait_rdfd <= 1'b0;
          state     <= WAIT;
        end
        DESTINATION: state <= (counter < limit) ? DATA : IDLE;
        DATA: begin
          ic_process_indication <= 1'b1;
          wait_rdfd <= 1'b1;
          state     <= WAIT;
        end
        WAIT: begin
          if (!wait_rdfd) begin
            if (events.rdfd_rd)     state <= RPORE;
            else if (events.rlr_rd) state <= DESTINATION;
          end else if (events.rdfd_rd) begin
            if (counter + 1'b1 < limit) begin
              counter <= counter + 1'b1;
              state   <= DATA;
            end else begin
              counter <= complete ? '0 : counter + 1'b1;
              state   <= IDLE;
            end
          end
        end
        RPORE:  state <= STUCK;
        STUCK:  state <= STUCK;
        default: state <= IDLE;
      endcase
    end
  end

  // Moore outputs
  assign on_off           = (state != IDLE) && (state != STUCK);
  assign ic_rc_26         = (state == RC);
  assign ic_rpore_30      = (state == RPORE);
  assign rg_rlr_enable    = (state == LENGTH);
  assign rf_length_enable = (state == LENGTH);
  assign rg_rdr_enable    = (state == DESTINATION);
  assign rf_dest_enable   = (state == DESTINATION);
  assign rg_rdfd_enable   = (state == DATA);
  assign rf_data_enable   = (state == DATA);

endmodule
