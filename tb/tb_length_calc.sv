// tb_length_calc: checks the byte counter of the transmit path.
//
// Random write strobes (any pattern of lanes) are presented with and without
// a TDFD write. One clock after a write, fifo_len_data must equal the number
// of set strobe bits and fifo_len_data_tx_fifo one less; without a write the
// outputs must hold. The expected count is computed bit by bit in the
// testbench. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_length_calc;

  logic       clk = 1'b0;
  always #5 clk = ~clk;
  logic       rst_n, tdfd_write;
  logic [3:0] strobe;
  logic [2:0] fifo_len_data, fifo_len_data_tx_fifo;

  length_calc #(.DATA_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int expected;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    rst_n = 1'b0; tdfd_write = 1'b0; strobe = '0;
    repeat (3) @(negedge clk);
    chk(fifo_len_data == 3'd0, "count zero in reset");
    rst_n = 1'b1;
    expected = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      strobe     = 4'($urandom);
      tdfd_write = ($urandom_range(2) != 0);
      if (tdfd_write) begin
        expected = 0;
        for (int i = 0; i < 4; i++) if (strobe[i]) expected++;
      end
      @(negedge clk);
      chk(32'(fifo_len_data) == expected, $sformatf("count %0d want %0d", fifo_len_data, expected));
      if (expected != 0)
        chk(32'(fifo_len_data_tx_fifo) == expected - 1, "count minus one");
      tdfd_write = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
