// rx_stream_if: AXI4-Stream receive interface of the core.
//
// A Moore state machine with the three states of the core description
// handshakes with the stream source:
//   IDLE         TREADY=0, Length_reset=1   -> DATA_WAIT when TVALID and the
//                                              data FIFO has room
//   DATA_WAIT    TREADY=1                   -> IDLE after a beat with TLAST,
//                                              DATA_WAIT_TV after any other beat
//   DATA_WAIT_TV TREADY=0                   -> DATA_WAIT when TVALID and room
// Because TREADY is a state output, one beat is accepted at most every second
// cycle. Each accepted beat is passed to the receive FIFO (pass) with its
// data, TDEST and the packet length so far, in bytes, counting every beat as
// a full word (DATA_W/8 bytes) as the description does; bit 31 of that length
// is 1 while the packet is still open and 0 on its TLAST beat. TKEEP is not
// used for the length.
// A receive reset request (RDFR = 0xA5) waits until no packet is in progress,
// then rx_rst_n goes low for one cycle (resetting the receive FIFO, the
// receive control and this block) and reset_complete pulses (RRC).
// The deferral of the receive reset follows the core description; the
// one-cycle reset pulse is this design's choice.
module rx_stream_if
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W = 32
) (
  input  logic                clk,
  input  logic                reset_all_n,
  input  logic                rx_reset_req,
  output logic                rx_rst_n,
  output logic                reset_complete,
  // AXI4-Stream receive channel
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic [DATA_W-1:0]   s_axis_tdata,
  input  logic [DATA_W/8-1:0] s_axis_tkeep,
  input  logic                s_axis_tlast,
  input  logic [DEST_W-1:0]   s_axis_tdest,
  // receive FIFO
  input  logic                data_fifo_full,
  output logic                pass_length,      // write this beat
  output logic                packet_end,       // this beat carries TLAST
  output logic                length_reset,
  output logic [31:0]         packet_length,
  output logic [DATA_W-1:0]   tdata,
  output logic [DEST_W-1:0]   tdest
);

  localparam int BYTES = DATA_W / 8;

  typedef enum logic [1:0] {IDLE, DATA_WAIT, DATA_WAIT_TV} state_e;
  state_e state;

  logic [LEN_W-1:0] count;
  logic             pending, rst_pulse, write;

  assign rx_rst_n       = reset_all_n && !rst_pulse;
  assign reset_complete = rst_pulse;

  assign write          = s_axis_tvalid && !data_fifo_full;
  assign s_axis_tready  = (state == DATA_WAIT);
  assign length_reset   = (state == IDLE);
  assign pass_length    = s_axis_tvalid && s_axis_tready;
  assign packet_end     = pass_length && s_axis_tlast;
  assign tdata          = s_axis_tdata;
  assign tdest          = s_axis_tdest;

  logic [LEN_W-1:0] len_now;
  assign len_now       = count + LEN_W'(BYTES);
  assign packet_length = {!s_axis_tlast, 8'h0, len_now};

  always_ff @(posedge clk) begin
    if (!reset_all_n) begin
      pending   <= 1'b0;
      rst_pulse <= 1'b0;
    end else begin
      rst_pulse <= pending && (state == IDLE) && !rst_pulse;
      if (rst_pulse)         pending <= 1'b0;
      else if (rx_reset_req) pending <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rx_rst_n) begin
      state <= IDLE;
      count <= '0;
    end else begin
      unique case (state)
        IDLE:         if (write && !pending) state <= DATA_WAIT;
        DATA_WAIT:    if (pass_length) begin
                        state <= s_axis_tlast ? IDLE : DATA_WAIT_TV;
                        count <= s_axis_tlast ? '0 : len_now;
                      end
        DATA_WAIT_TV: if (write) state <= DATA_WAIT;
        default:      state <= IDLE;
      endcase
    end
  end

  logic unused_keep;
  assign unused_keep = ^s_axis_tkeep;

endmodule
