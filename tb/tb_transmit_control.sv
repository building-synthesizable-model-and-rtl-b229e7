// tb_transmit_control: checks the transmit sequence machine.
//
// Register-write events are driven directly, each one cycle long, with random
// gaps (including back-to-back TDFD writes as an AXI4 burst makes them). For
// each packet - TDR, 1..12 TDFD words with random strobes, TLR - the
// testbench counts the enable pulses and checks: one destination write, one
// data write per word carrying (set strobe bits - 1), one length write
// carrying the sum of the set strobe bits, and a TSE pulse exactly when the
// TLR value and that sum differ in whole words. It then checks that a TDFD
// write without a TDR, and the TPOE error input, leave the machine stuck
// (no further enables) until a transmit-path reset. Ends with the TB_RESULT
// line; a watchdog stops a hung run.
module tb_transmit_control;

  import axis_fifo_pkg::*;

  logic             clk = 1'b0;
  always #5 clk = ~clk;
  logic             reset_all_n, reset_tx_n, error;
  reg_events_t      events;
  logic [LEN_W-1:0] rs_rdata_tlr, packet_length_seq;
  logic [3:0]       strobe;
  logic             tse_error, fifo_wdata_enable, fifo_wlength_enable, fifo_wdestination_enable, active;
  logic [2:0]       fifo_len_data_tx_fifo;

  transmit_control #(.DATA_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int n_dest, n_data, n_len, n_tse;
  int data_vals [$];
  int len_val;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) begin
    if (fifo_wdestination_enable) n_dest++;
    if (fifo_wdata_enable) begin n_data++; data_vals.push_back(int'(fifo_len_data_tx_fifo)); end
    if (fifo_wlength_enable) begin n_len++; len_val = int'(packet_length_seq); end
    if (tse_error) n_tse++;
  end

  task automatic clear_counts();
    n_dest = 0; n_data = 0; n_len = 0; n_tse = 0; data_vals = {}; len_val = -1;
  endtask

  // one register-write event, then 0..2 idle cycles (0 for burst-like writes)
  task automatic ev(input int kind, input logic [3:0] s = 4'hF, input int tlr = 0, input bit burst = 0);
    @(negedge clk);
    events = '0;
    case (kind)
      0: events.tdr_wr  = 1'b1;
      1: begin events.tdfd_wr = 1'b1; strobe = s; end
      default: begin events.tlr_wr = 1'b1; rs_rdata_tlr = LEN_W'(tlr); end
    endcase
    @(negedge clk);
    events = '0;
    if (!burst) repeat ($urandom_range(2)) @(negedge clk);
  endtask

  function automatic int words(input int b);
    return (b + 3) / 4;
  endfunction

  int n, sum, cnt, tlr;
  bit burst, wrong;
  logic [3:0] s;

  initial begin
    reset_all_n = 1'b0; reset_tx_n = 1'b1; error = 1'b0; events = '0;
    rs_rdata_tlr = '0; strobe = '0;
    clear_counts();
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    chk(!active, "idle after reset");

    for (int k = 0; k < 60; k++) begin
      clear_counts();
      n = 1 + $urandom_range(11);
      burst = ($urandom_range(1) == 0);
      wrong = ($urandom_range(3) == 0);
      sum = 0;
      ev(0);
      for (int i = 0; i < n; i++) begin
        cnt = 1 + $urandom_range(3);
        s   = 4'((1 << cnt) - 1);
        sum += cnt;
        ev(1, s, 0, burst);
      end
      tlr = wrong ? sum + 4 + 4 * $urandom_range(3) : sum;
      ev(2, 4'hF, tlr);
      repeat (4) @(negedge clk);
      chk(n_dest == 1, $sformatf("one destination write (%0d)", n_dest));
      chk(n_data == n, $sformatf("%0d data writes want %0d", n_data, n));
      chk(n_len == 1, "one length write");
      chk(len_val == sum, $sformatf("counted length %0d want %0d", len_val, sum));
      chk(n_tse == ((words(tlr) != words(sum)) ? 1 : 0), $sformatf("TSE for TLR %0d, %0d bytes written", tlr, sum));
      chk(!active, "back to idle after the packet");
    end

    // strobe counts reach the FIFO
    clear_counts();
    ev(0); ev(1, 4'b0001); ev(1, 4'b0011); ev(1, 4'b0111); ev(1, 4'b1111); ev(2, 4'hF, 10);
    repeat (4) @(negedge clk);
    chk(data_vals.size() == 4 && data_vals[0] == 0 && data_vals[1] == 1 && data_vals[2] == 2 && data_vals[3] == 3,
        "byte count minus one per word");

    // a TDFD write without TDR leaves the machine stuck until a transmit reset
    clear_counts();
    ev(1);
    ev(0); ev(1); ev(2, 4'hF, 4);
    repeat (4) @(negedge clk);
    chk(n_dest == 0 && n_data == 0 && n_len == 0, "no enables while stuck");
    chk(!active, "not active while stuck");
    @(negedge clk); reset_tx_n = 1'b0;
    @(negedge clk); reset_tx_n = 1'b1;
    ev(0); ev(1); ev(2, 4'hF, 4);
    repeat (4) @(negedge clk);
    chk(n_dest == 1 && n_data == 1 && n_len == 1, "working again after the transmit reset");

    // the TPOE error stops the machine
    clear_counts();
    ev(0); ev(1);
    @(negedge clk); error = 1'b1;
    @(negedge clk); error = 1'b0;
    ev(1); ev(2, 4'hF, 8);
    repeat (4) @(negedge clk);
    chk(n_data == 1 && n_len == 0, "no writes after TPOE");
    @(negedge clk); reset_all_n = 1'b0;
    @(negedge clk); reset_all_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
