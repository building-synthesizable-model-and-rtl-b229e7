// tb_tx_fifo: checks the three transmit FIFOs against queue models.
//
// The data FIFO is driven with random writes of 1..4 bytes (w_byte + 1) and
// random reads of 1..4 bytes, so it fills, empties and wraps; a byte queue in
// the testbench predicts which operations are taken (a write only when it
// fits, a read only when enough bytes are stored), the bytes at the head
// (data_out), occupancy, vacancy, empty and full. The length and destination
// FIFOs are driven with random pushes and pops and compared with their own
// queues. A small depth (8 words) is used so that the full and wrap cases
// come often. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_tx_fifo;

  import axis_fifo_pkg::*;

  localparam int DEPTH = 8;
  localparam int SIZE  = DEPTH * 4;

  logic              clk = 1'b0;
  always #5 clk = ~clk;
  logic              rst_n;
  logic              we_data, we_l, we_d, r_en, re_l, re_d;
  logic [2:0]        w_byte, rd_bytes;
  logic [31:0]       data_in_f, data_out;
  logic [LEN_W-1:0]  data_in_l, data_out_l;
  logic [DEST_W-1:0] data_in_d, data_out_d;
  logic              empty_l, empty_d, fifo_empty, fifo_full;
  logic [5:0]        occupancy, vacancy;

  tx_fifo #(.DATA_W(32), .C_TX_FIFO_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0]        bq [$];
  logic [LEN_W-1:0]  lq [$];
  logic [DEST_W-1:0] dq [$];
  int wn, rn;
  bit wr_ok, rd_ok, l_push, d_push;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst_n = 1'b0;
    {we_data, we_l, we_d, r_en, re_l, re_d} = '0;
    w_byte = '0; rd_bytes = 3'd1; data_in_f = '0; data_in_l = '0; data_in_d = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(fifo_empty && !fifo_full && vacancy == 6'(SIZE) && occupancy == 0, "empty after reset");
    chk(empty_l && empty_d, "length and destination FIFOs empty after reset");
    for (int k = 0; k < 3000; k++) begin
      // drive
      we_data   = ($urandom_range(2) != 0);
      w_byte    = 3'($urandom_range(3));
      data_in_f = $urandom;
      r_en      = ($urandom_range(2) == 0);
      rd_bytes  = 3'(1 + $urandom_range(3));
      we_l = ($urandom_range(3) == 0); data_in_l = LEN_W'($urandom);
      re_l = ($urandom_range(3) == 0);
      we_d = ($urandom_range(3) == 0); data_in_d = DEST_W'($urandom);
      re_d = ($urandom_range(3) == 0);
      // predict from the state before the edge
      wn = int'(w_byte) + 1;
      rn = int'(rd_bytes);
      wr_ok = we_data && (wn <= SIZE - bq.size());
      rd_ok = r_en && (rn <= bq.size());
      chk(32'(occupancy) == bq.size(), "occupancy in bytes");
      chk(32'(vacancy) == SIZE - bq.size(), "vacancy in bytes");
      chk(fifo_empty == (bq.size() == 0), "empty flag");
      chk(fifo_full == (bq.size() == SIZE), "full flag");
      for (int i = 0; i < 4 && i < bq.size(); i++)
        chk(data_out[8*i +: 8] == bq[i], $sformatf("head byte %0d", i));
      chk(empty_l == (lq.size() == 0), "length FIFO empty flag");
      if (lq.size() != 0) chk(data_out_l == lq[0], "length FIFO head");
      chk(empty_d == (dq.size() == 0), "destination FIFO empty flag");
      if (dq.size() != 0) chk(data_out_d == dq[0], "destination FIFO head");
      @(negedge clk);
      if (rd_ok) repeat (rn) void'(bq.pop_front());
      if (wr_ok) for (int i = 0; i < wn; i++) bq.push_back(data_in_f[8*i +: 8]);
      // full and empty are judged before the edge, as in the FIFO
      l_push = we_l && lq.size() < DEPTH;
      d_push = we_d && dq.size() < DEPTH;
      if (re_l && lq.size() != 0) void'(lq.pop_front());
      if (l_push) lq.push_back(data_in_l);
      if (re_d && dq.size() != 0) void'(dq.pop_front());
      if (d_push) dq.push_back(data_in_d);
    end
    // a reset empties everything
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    {we_data, we_l, we_d, r_en, re_l, re_d} = '0;
    chk(fifo_empty && empty_l && empty_d, "reset empties all three FIFOs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
