// tb_calc_unit: checks the TDFV and RDFO calculations.
//
// Vacancy: the transmit FIFO vacancy (bytes) walks up and down at random; a
// model keeps the value last written to TDFV (reset value depth - 4) and
// predicts, each cycle, whether TDFV is written (free locations above the
// last value, or at least two below it) and with which value.
// Occupancy: random packet_done pulses carry a location count, and the
// receive data FIFO empty flag toggles; RDFO must be written with the count
// on packet_done, with zero when the FIFO drains empty and on a receive
// reset, and not otherwise. Ends with the TB_RESULT line; a watchdog stops a
// hung run.
module tb_calc_unit;

  localparam int DEPTH = 512;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        reset_all_n, reset_tx_n, reset_rx_n;
  logic [11:0] tx_fifo_vacancy;
  logic [15:0] rg_fifo_vacancy, rx_fifo_occupancy, rg_fifo_occupancy;
  logic        rg_tdfv_enable, rx_packet_done, rx_fifo_empty, rg_rdfo_enable;

  calc_unit #(.DATA_W(32), .C_TX_FIFO_DEPTH(DEPTH), .VAC_W(12)) dut (.*);

  int checks = 0, failures = 0;
  int temp, loc, vac, ups, downs;
  bit en, empty_prev, rdfo_en;
  logic [15:0] rdfo_val;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    reset_all_n = 1'b0; reset_tx_n = 1'b1; reset_rx_n = 1'b1;
    tx_fifo_vacancy = 12'(DEPTH * 4); rx_fifo_occupancy = '0; rx_packet_done = 1'b0; rx_fifo_empty = 1'b1;
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    temp = DEPTH - 4; vac = DEPTH * 4; empty_prev = 1'b1; ups = 0; downs = 0;
    for (int k = 0; k < 3000; k++) begin
      // transmit vacancy: random walk in bytes
      vac = vac + $urandom_range(12) - 6;
      if (vac < 0) vac = 0;
      if (vac > DEPTH * 4) vac = DEPTH * 4;
      tx_fifo_vacancy = 12'(vac);
      // receive side
      rx_packet_done    = ($urandom_range(9) == 0);
      rx_fifo_occupancy = 16'(1 + $urandom_range(19));
      rx_fifo_empty     = ($urandom_range(3) == 0);
      reset_rx_n        = ($urandom_range(99) != 0);
      #1;
      loc = vac / 4;
      en  = (loc > temp) || (temp - loc >= 2);
      chk(rg_tdfv_enable == en, $sformatf("TDFV enable: free %0d last %0d", loc, temp));
      if (en) chk(32'(rg_fifo_vacancy) == loc, "TDFV value in free locations");
      if (en && loc > temp) ups++;
      if (en && loc < temp) downs++;
      rdfo_en  = !reset_rx_n || rx_packet_done || (rx_fifo_empty && !empty_prev);
      rdfo_val = (reset_rx_n && rx_packet_done) ? rx_fifo_occupancy : 16'h0;
      chk(rg_rdfo_enable == rdfo_en, "RDFO enable");
      if (rdfo_en) chk(rg_fifo_occupancy == rdfo_val, "RDFO value");
      @(negedge clk);
      if (en) temp = loc;
      empty_prev = reset_rx_n ? rx_fifo_empty : 1'b1;
    end
    chk(ups > 0 && downs > 0, "TDFV moved both ways");
    // a transmit reset puts the last value back to depth - 4
    reset_tx_n = 1'b0;
    @(negedge clk);
    reset_tx_n = 1'b1;
    tx_fifo_vacancy = 12'((DEPTH - 5) * 4);
    #1;
    chk(!rg_tdfv_enable, "one location below the reset value is not reported");
    tx_fifo_vacancy = 12'((DEPTH - 6) * 4);
    #1;
    chk(rg_tdfv_enable && rg_fifo_vacancy == 16'(DEPTH - 6), "two locations below are reported");
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
