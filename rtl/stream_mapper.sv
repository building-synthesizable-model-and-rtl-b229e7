// stream_mapper: sends the packets held in the transmit FIFOs over the
// AXI4-Stream transmit channel, and carries out transmit-path resets.
//
// Store-and-forward (enable_cut_through = 0): a packet starts once its length
// is in the length FIFO, which the transmit control writes only after the
// whole packet is in the data FIFO.
// Cut-through (enable_cut_through = 1): a packet starts once its destination
// is in the destination FIFO. While its length is unknown a beat is only sent
// when more than one full word is stored, so the last beat always waits for
// the length (TLR) to arrive.
// In both modes each beat carries min(remaining bytes, DATA_W/8) bytes, TKEEP
// has one bit per valid byte from lane 0 upward (unused lanes of TDATA are
// driven to zero), TLAST marks the beat that completes the length, and TDEST
// is the packet's destination. At the end of a packet the length and
// destination entries are released and tx_complete pulses (TC interrupt).
// TVALID never drops before TREADY, and the beat does not change meanwhile.
//
// Resets: reset_all_n (core reset) acts at once, even mid-packet, which cuts
// the packet. A transmit reset request (TDFR = 0xA5) waits until no packet is
// in flight; then tx_rst_n goes low for one cycle to reset the transmit FIFO,
// the transmit control and this block, and reset_complete pulses (TRC).
// Both modes, the deferred transmit reset and the immediate core reset follow
// the core description; the two-state machine used here replaces the
// nine-state machine of the description and is this design's own structure.
module stream_mapper
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W             = 32,
  parameter int OCC_W              = 12,
  parameter bit enable_cut_through = 1'b0
) (
  input  logic                      clk,
  input  logic                      reset_all_n,
  input  logic                      tx_reset_req,     // pulse: TDFR written with 0xA5
  output logic                      tx_rst_n,         // transmit-path reset, active low
  output logic                      reset_complete,   // pulse: transmit reset done
  output logic                      tx_complete,      // pulse: a packet has been sent
  // transmit FIFO
  input  logic                      empty_l,
  input  logic [LEN_W-1:0]          data_out_l,
  output logic                      re_l,
  input  logic                      empty_d,
  input  logic [DEST_W-1:0]         data_out_d,
  output logic                      re_d,
  input  logic [OCC_W-1:0]          occupancy,        // bytes in the data FIFO
  input  logic [DATA_W-1:0]         data_out,
  output logic                      r_en,
  output logic [$clog2(DATA_W/8):0] rd_bytes,
  // AXI4-Stream transmit channel
  output logic                      m_axis_tvalid,
  input  logic                      m_axis_tready,
  output logic [DATA_W-1:0]         m_axis_tdata,
  output logic [DATA_W/8-1:0]       m_axis_tkeep,
  output logic                      m_axis_tlast,
  output logic [DEST_W-1:0]         m_axis_tdest
);

  localparam int BYTES = DATA_W / 8;
  localparam int BW    = $clog2(BYTES) + 1;

  typedef enum logic {IDLE, SEND} state_e;
  state_e state;

  logic [LEN_W-1:0] sent;
  logic             pending, rst_pulse;

  assign tx_rst_n       = reset_all_n && !rst_pulse;
  assign reset_complete = rst_pulse;

  // ---------------- beat formation ----------------
  logic             len_known, last, avail, hs;
  logic [LEN_W-1:0] rem;
  logic [BW-1:0]    beat_bytes;

  always_comb begin
    len_known = !empty_l;
    rem       = data_out_l - sent;
    if (len_known) begin
      last       = (rem <= LEN_W'(BYTES));
      beat_bytes = last ? BW'(rem) : BW'(BYTES);
      avail      = (32'(occupancy) >= 32'(beat_bytes));
    end else begin
      last       = 1'b0;
      beat_bytes = BW'(BYTES);
      avail      = (32'(occupancy) > BYTES);
    end
  end

  assign m_axis_tvalid = (state == SEND) && avail;
  assign hs            = m_axis_tvalid && m_axis_tready;
  assign m_axis_tlast  = m_axis_tvalid && last;
  assign m_axis_tdest  = (state == SEND) ? data_out_d : '0;

  always_comb begin
    for (int i = 0; i < BYTES; i++) begin
      m_axis_tkeep[i]       = m_axis_tvalid && (BW'(i) < beat_bytes);
      m_axis_tdata[8*i +: 8] = m_axis_tkeep[i] ? data_out[8*i +: 8] : 8'h00;
    end
  end

  assign r_en     = hs;
  assign rd_bytes = beat_bytes;
  assign re_l     = hs && last;
  assign re_d     = hs && last;

  // ---------------- control ----------------
  logic start;
  assign start = enable_cut_through ? !empty_d : !empty_l;

  always_ff @(posedge clk) begin
    if (!reset_all_n) begin
      pending   <= 1'b0;
      rst_pulse <= 1'b0;
    end else begin
      rst_pulse <= pending && (state == IDLE) && !rst_pulse;
      if (rst_pulse)         pending <= 1'b0;
      else if (tx_reset_req) pending <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!tx_rst_n) begin
      state       <= IDLE;
      sent        <= '0;
      tx_complete <= 1'b0;
    end else begin
      tx_complete <= hs && last;
      unique case (state)
        IDLE: if (start && !pending) begin
                state <= SEND;
                sent  <= '0;
              end
        SEND: if (hs) begin
                sent <= sent + LEN_W'(beat_bytes);
                if (last) state <= IDLE;
              end
        default: state <= IDLE;
      endcase
    end
  end

  // AXI4-Stream rule: a beat that is offered stays offered, unchanged, until taken.
  a_tvalid_hold: assert property (@(posedge clk) disable iff (!tx_rst_n)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid);
  a_tdata_stable: assert property (@(posedge clk) disable iff (!tx_rst_n)
                   m_axis_tvalid && !m_axis_tready |=> $stable(m_axis_tdata) && $stable(m_axis_tlast));

endmodule
