// rx_fifo: the three FIFOs of the receive path.
//
//  * Data FIFO: C_RX_FIFO_DEPTH words, one per accepted stream beat, read
//    by the receive control one word at a time (first-word fall-through:
//    data_out shows the oldest word).
//  * Length FIFO: one entry per packet. In store-and-forward mode an entry
//    appears when the packet's TLAST beat arrives. In cut-through mode the
//    packet in progress also shows as the head (when no complete entry is
//    ahead of it) with its length so far and bit 31 set; reading such a
//    partial head does not remove it. Reading a complete head (bit 31 = 0)
//    removes it.
//  * Destination FIFO: one entry per packet, written at TLAST. While only a
//    partial packet is present, dest_out shows that packet's TDEST. A
//    destination read removes the head only if the length read before it
//    was of a complete packet.
// prog_full/prog_empty compare the free and used locations of the data FIFO
// with the programmable thresholds; data_fifo_full (no location left) stops
// the stream handshake. prev_location is the number of locations used by the
// last complete packet, and packet_done pulses when a packet completes.
// The partial-length behaviour, the bit-31 rule for reads and the threshold
// tests follow the core description; keeping the partial length in a
// register beside the length memory, and equal depths for the three FIFOs,
// are this design's choices.
module rx_fifo
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W               = 32,
  parameter int C_RX_FIFO_DEPTH      = 512,
  parameter int full_threshold_data  = 0,
  parameter int empty_threshold_data = 0,
  parameter bit enable_cut_through   = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,           // whole core or receive path
  // from the stream receive interface
  input  logic                          pass,
  input  logic                          packet_end,
  input  logic [DATA_W-1:0]             data_in,
  input  logic [31:0]                   length_in,
  input  logic [DEST_W-1:0]             dest_in,
  // from the receive control
  input  logic                          data_rd_enable,
  input  logic                          length_rd_enable,
  input  logic                          dest_rd_enable,
  // outputs
  output logic [DATA_W-1:0]             data_out,
  output logic [31:0]                   length_out,
  output logic [DEST_W-1:0]             dest_out,
  output logic                          data_fifo_full,
  output logic                          data_fifo_empty,
  output logic                          length_fifo_empty,
  output logic                          prog_full,
  output logic                          prog_empty,
  output logic [$clog2(C_RX_FIFO_DEPTH):0] occupancy,     // words stored
  output logic [15:0]                   prev_location,
  output logic                          packet_done
);

  localparam int BYTES = DATA_W / 8;
  localparam int AW    = $clog2(C_RX_FIFO_DEPTH);

  // ---------------- data FIFO ----------------
  logic [DATA_W-1:0] mem [C_RX_FIFO_DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [AW:0]       cnt;
  logic              d_wr, d_rd;

  assign data_fifo_full  = (cnt == (AW+1)'(C_RX_FIFO_DEPTH));
  assign data_fifo_empty = (cnt == '0);
  assign d_wr = pass && !data_fifo_full;
  assign d_rd = data_rd_enable && !data_fifo_empty;

  always_ff @(posedge clk) if (d_wr) mem[wp] <= data_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (d_wr) wp <= wp + 1'b1;
      if (d_rd) rp <= rp + 1'b1;
      cnt <= cnt + (AW+1)'(d_wr) - (AW+1)'(d_rd);
    end
  end

  assign data_out   = mem[rp];
  assign occupancy  = cnt;
  assign prog_full  = (32'(C_RX_FIFO_DEPTH) - 32'(cnt)) <= 32'(full_threshold_data);
  assign prog_empty = 32'(cnt) <= 32'(empty_threshold_data);

  // ---------------- length and destination FIFOs ----------------
  logic [31:0]       lmem [C_RX_FIFO_DEPTH];
  logic [DEST_W-1:0] dmem [C_RX_FIFO_DEPTH];
  logic [AW-1:0]     lwp, lrp, dwp, drp;
  logic [AW:0]       lcnt, dcnt;
  logic [30:0]       cur_len;     // length so far of the packet in progress
  logic [DEST_W-1:0] cur_dest;
  logic              cur_v;       // a packet is in progress
  logic              head_complete;
  logic              l_wr, l_rd, ds_wr, ds_rd;

  assign l_wr  = pass && packet_end && (lcnt != (AW+1)'(C_RX_FIFO_DEPTH));
  assign ds_wr = pass && packet_end && (dcnt != (AW+1)'(C_RX_FIFO_DEPTH));
  assign l_rd  = length_rd_enable && (lcnt != '0);
  assign ds_rd = dest_rd_enable && head_complete && (dcnt != '0);

  always_ff @(posedge clk) begin
    if (l_wr)  lmem[lwp] <= {1'b0, length_in[30:0]};
    if (ds_wr) dmem[dwp] <= dest_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lwp <= '0; lrp <= '0; lcnt <= '0;
      dwp <= '0; drp <= '0; dcnt <= '0;
      cur_len <= '0; cur_dest <= '0; cur_v <= 1'b0;
      head_complete <= 1'b0;
      prev_location <= '0;
      packet_done   <= 1'b0;
    end else begin
      if (l_wr)  lwp <= lwp + 1'b1;
      if (l_rd)  lrp <= lrp + 1'b1;
      if (ds_wr) dwp <= dwp + 1'b1;
      if (ds_rd) drp <= drp + 1'b1;
      lcnt <= lcnt + (AW+1)'(l_wr)  - (AW+1)'(l_rd);
      dcnt <= dcnt + (AW+1)'(ds_wr) - (AW+1)'(ds_rd);
      if (length_rd_enable) head_complete <= (lcnt != '0);
      packet_done <= pass && packet_end;
      if (pass) begin
        if (packet_end) begin
          cur_v         <= 1'b0;
          prev_location <= 16'((length_in[LEN_W-1:0] + LEN_W'(BYTES - 1)) / LEN_W'(BYTES));
        end else begin
          cur_v    <= 1'b1;
          cur_len  <= length_in[30:0];
          cur_dest <= dest_in;
        end
      end
    end
  end

  logic show_partial;
  assign show_partial      = enable_cut_through && cur_v && (lcnt == '0);
  assign length_fifo_empty = (lcnt == '0) && !show_partial;
  assign length_out        = (lcnt != '0) ? lmem[lrp] : (show_partial ? {1'b1, cur_len} : 32'h0);
  assign dest_out          = (dcnt != '0) ? dmem[drp] : cur_dest;

endmodule
