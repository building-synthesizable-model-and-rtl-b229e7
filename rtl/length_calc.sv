// length_calc: number of valid bytes in one transmit data word.
//
// On every TDFD write it adds up the bits of the write strobe and holds the
// result until the next TDFD write, so that it lines up with the transmit
// control's data-enable cycle that follows the write. Two forms are given:
// fifo_len_data is the byte count itself (used to build the packet length)
// and fifo_len_data_tx_fifo is the byte count minus one (used by the
// transmit data FIFO to advance its write pointer). Both forms and the
// strobe-adding method follow the core description; registering the count
// on the write is this design's choice. The transmit data FIFO stores the
// lowest fifo_len_data bytes of the word, so strobes are expected to be
// contiguous from byte lane 0, as the last word of a packet normally is.
module length_calc #(
  parameter int DATA_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tdfd_write,
  input  logic [DATA_W/8-1:0]       strobe,
  output logic [$clog2(DATA_W/8):0] fifo_len_data,
  output logic [$clog2(DATA_W/8):0] fifo_len_data_tx_fifo
);

  localparam int CW = $clog2(DATA_W/8) + 1;

  logic [CW-1:0] count;
  always_comb begin
    count = '0;
    for (int i = 0; i < DATA_W/8; i++) count = count + CW'(strobe[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          fifo_len_data <= '0;
    else if (tdfd_write) fifo_len_data <= count;
  end

  assign fifo_len_data_tx_fifo = fifo_len_data - 1'b1;

endmodule
