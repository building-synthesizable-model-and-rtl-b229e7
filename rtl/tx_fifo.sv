// tx_fifo: the three circular FIFOs of the transmit path.
//
//  * Data FIFO: a byte-addressed circular buffer of C_TX_FIFO_DEPTH words
//    (DEPTH*DATA_W/8 bytes). A write stores the lowest w_byte+1 bytes of the
//    word at the write pointer and advances it by that many bytes, so partial
//    words are packed without gaps (Next_Position_W). A read takes rd_bytes
//    bytes from the read pointer (Next_Position_R). The read data is the
//    DATA_W/8 bytes starting at the read pointer, available in the same
//    cycle (first-word fall-through), byte 0 in bits 7:0.
//  * Length FIFO (packet length in bytes) and destination FIFO (TDEST), one
//    entry per packet, also read in the same cycle.
// A data write is only carried out when the free space covers the whole
// word; otherwise it is dropped (the interrupt controller flags TPOE).
// Empty and full follow the flow chart of the core description: empty when
// no byte is stored, full when no byte is free. occupancy/vacancy are given in
// bytes for the stream mapper and the calculation unit.
// Byte packing, pointer updates and the fixed-size length/destination FIFOs
// follow the core description; the length and destination FIFOs have
// C_TX_FIFO_DEPTH entries each, and the depth must be a power of two, which
// are this design's choices.
module tx_fifo
  import axis_fifo_pkg::*;
#(
  parameter int DATA_W          = 32,
  parameter int C_TX_FIFO_DEPTH = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,          // whole core or transmit path
  // write side (transmit control / register space)
  input  logic                      we_data,
  input  logic [$clog2(DATA_W/8):0] w_byte,         // bytes in the word minus one
  input  logic [DATA_W-1:0]         data_in_f,
  input  logic                      we_l,
  input  logic [LEN_W-1:0]          data_in_l,
  input  logic                      we_d,
  input  logic [DEST_W-1:0]         data_in_d,
  // read side (stream mapper)
  input  logic                      r_en,
  input  logic [$clog2(DATA_W/8):0] rd_bytes,       // 1 .. DATA_W/8
  output logic [DATA_W-1:0]         data_out,
  input  logic                      re_l,
  output logic [LEN_W-1:0]          data_out_l,
  output logic                      empty_l,
  input  logic                      re_d,
  output logic [DEST_W-1:0]         data_out_d,
  output logic                      empty_d,
  // status
  output logic                      fifo_empty,
  output logic                      fifo_full,
  output logic [$clog2(C_TX_FIFO_DEPTH*DATA_W/8):0] occupancy,  // bytes stored
  output logic [$clog2(C_TX_FIFO_DEPTH*DATA_W/8):0] vacancy     // bytes free
);

  localparam int BYTES = DATA_W / 8;
  localparam int SIZE  = C_TX_FIFO_DEPTH * BYTES;
  localparam int PW    = $clog2(SIZE);
  localparam int CW    = PW + 1;
  localparam int LW    = $clog2(C_TX_FIFO_DEPTH);

  // ---------------- data FIFO ----------------
  logic [7:0]    mem [SIZE];
  logic [PW-1:0] wp, rp;
  logic [CW-1:0] count;
  logic [CW-1:0] wr_n, rd_n;
  logic          do_wr, do_rd;

  assign vacancy   = CW'(SIZE) - count;
  assign occupancy = count;
  assign wr_n      = CW'(w_byte) + 1'b1;
  assign rd_n      = CW'(rd_bytes);
  assign do_wr     = we_data && (wr_n <= vacancy);
  assign do_rd     = r_en && (rd_n <= count);

  always_ff @(posedge clk) begin
    if (do_wr)
      for (int i = 0; i < BYTES; i++)
        if (CW'(i) < wr_n) mem[wp + PW'(i)] <= data_in_f[8*i +: 8];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + PW'(wr_n);
      if (do_rd) rp <= rp + PW'(rd_n);
      count <= count + (do_wr ? wr_n : '0) - (do_rd ? rd_n : '0);
    end
  end

  always_comb
    for (int i = 0; i < BYTES; i++) data_out[8*i +: 8] = mem[rp + PW'(i)];

  assign fifo_empty = (count == '0);
  assign fifo_full  = (vacancy == '0);

  // ---------------- length and destination FIFOs ----------------
  logic [LEN_W-1:0]  lmem [C_TX_FIFO_DEPTH];
  logic [DEST_W-1:0] dmem [C_TX_FIFO_DEPTH];
  logic [LW-1:0]     lwp, lrp, dwp, drp;
  logic [LW:0]       lcnt, dcnt;
  logic              l_wr, l_rd, d_wr, d_rd;

  assign l_wr = we_l && (lcnt != (LW+1)'(C_TX_FIFO_DEPTH));
  assign l_rd = re_l && (lcnt != '0);
  assign d_wr = we_d && (dcnt != (LW+1)'(C_TX_FIFO_DEPTH));
  assign d_rd = re_d && (dcnt != '0);

  always_ff @(posedge clk) begin
    if (l_wr) lmem[lwp] <= data_in_l;
    if (d_wr) dmem[dwp] <= data_in_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lwp <= '0; lrp <= '0; lcnt <= '0;
      dwp <= '0; drp <= '0; dcnt <= '0;
    end else begin
      if (l_wr) lwp <= lwp + 1'b1;
      if (l_rd) lrp <= lrp + 1'b1;
      if (d_wr) dwp <= dwp + 1'b1;
      if (d_rd) drp <= drp + 1'b1;
      lcnt <= lcnt + (LW+1)'(l_wr) - (LW+1)'(l_rd);
      dcnt <= dcnt + (LW+1)'(d_wr) - (LW+1)'(d_rd);
    end
  end

  assign data_out_l = lmem[lrp];
  assign data_out_d = dmem[drp];
  assign empty_l    = (lcnt == '0);
  assign empty_d    = (dcnt == '0);

  initial begin
    assert ((C_TX_FIFO_DEPTH & (C_TX_FIFO_DEPTH - 1)) == 0)
      else $error("C_TX_FIFO_DEPTH must be a power of two");
  end

endmodule
