// calc_unit: keeps the vacancy (TDFV) and occupancy (RDFO) registers current.
//
// Transmit FIFO vacancy: the transmit data FIFO reports its free space in
// bytes; the unit turns it into whole free locations (bytes >> log2(word
// bytes); a partly free location does not count). When the location count
// rises, TDFV follows at once; when it falls, TDFV is only updated once it has
// fallen by two or more locations from the value last written. So the
// register counts up by one but down by two, as the core description states.
// Receive FIFO occupancy: when a packet has been received completely, RDFO is
// loaded with the number of locations that packet occupies; it is cleared
// when the receive data FIFO drains empty and on a receive-path reset.
// Outputs are a value and a one-cycle write enable for each register, both
// combinational. The vacancy rule follows the description; clearing RDFO when
// the receive data FIFO drains is this design's reading of "returns 0 if the
// FIFO is empty".
module calc_unit #(
  parameter int DATA_W          = 32,
  parameter int C_TX_FIFO_DEPTH = 512,
  parameter int VAC_W           = 12
) (
  input  logic             clk,
  input  logic             reset_all_n,
  input  logic             reset_tx_n,
  input  logic             reset_rx_n,
  input  logic [VAC_W-1:0] tx_fifo_vacancy,     // bytes free in the transmit data FIFO
  output logic [15:0]      rg_fifo_vacancy,
  output logic             rg_tdfv_enable,
  input  logic [15:0]      rx_fifo_occupancy,   // locations of the last complete packet
  input  logic             rx_packet_done,
  input  logic             rx_fifo_empty,
  output logic [15:0]      rg_fifo_occupancy,
  output logic             rg_rdfo_enable
);

  localparam int SH = $clog2(DATA_W / 8);

  // ---------------- transmit FIFO vacancy ----------------
  logic [15:0] loc, temp;
  assign loc = 16'(tx_fifo_vacancy >> SH);

  assign rg_tdfv_enable  = (loc > temp) || ((temp - loc) >= 16'd2);
  assign rg_fifo_vacancy = loc;

  always_ff @(posedge clk) begin
    if (!reset_all_n || !reset_tx_n) temp <= 16'(C_TX_FIFO_DEPTH - 4);
    else if (rg_tdfv_enable)         temp <= loc;
  end

  // ---------------- receive FIFO occupancy ----------------
  logic empty_q;
  always_ff @(posedge clk) begin
    if (!reset_all_n || !reset_rx_n) empty_q <= 1'b1;
    else                             empty_q <= rx_fifo_empty;
  end

  assign rg_rdfo_enable    = !reset_rx_n || rx_packet_done || (rx_fifo_empty && !empty_q);
  assign rg_fifo_occupancy = (reset_rx_n && rx_packet_done) ? rx_fifo_occupancy : 16'h0;

endmodule
