// tb_receive_control: checks the receive sequence machine.
//
// A small model of the receive length FIFO presents complete lengths (bit 31
// clear) or the open packet's partial length (bit 31 set) and removes an
// entry when the machine reads a complete one. Software register reads (ISR,
// RLR, RDFD) are driven as one-cycle events. The testbench counts the
// machine's pulses and checks: RC once per complete packet without any
// software action; one RLR load per sequence; RDR/destination once after the
// RLR read; one RDFD load for the first word and one after each RDFD read
// while words remain; nothing more after the last word. A partial packet is
// read in two parts (ISR read starts the first, RC the second) and the word
// counts add up to the whole packet. An RDFD read with no word due raises
// RPORE once and the machine stays stuck until a receive reset. Ends with the
// TB_RESULT line; a watchdog stops a hung run.
module tb_receive_control;

  import axis_fifo_pkg::*;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        reset_all_n, receive_reset_n, rf_length_empty;
  reg_events_t events;
  logic [31:0] receive_fifo_rlr;
  logic        rg_rdfd_enable, rg_rlr_enable, rg_rdr_enable, rf_length_enable, rf_dest_enable, rf_data_enable;
  logic        on_off, ic_rc_26, ic_rpore_30, ic_process_indication;

  receive_control #(.DATA_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int n_rc, n_len, n_dest, n_data, n_rpore;
  int lq [$];           // complete lengths in bytes
  int open_len;         // bytes of the open packet (0: none)
  bit pop_pending = 1'b0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // length FIFO model and pulse counters
  always @(negedge clk) begin
    if (ic_rc_26) n_rc++;
    if (rg_rlr_enable) n_len++;
    if (rg_rdr_enable) n_dest++;
    if (rg_rdfd_enable) n_data++;
    if (ic_rpore_30) n_rpore++;
    chk(rg_rlr_enable == rf_length_enable && rg_rdr_enable == rf_dest_enable &&
        rg_rdfd_enable == rf_data_enable, "register loads and FIFO reads go together");
    // the FIFO read requested before the last rising edge takes effect now
    if (pop_pending && lq.size() != 0) void'(lq.pop_front());
    pop_pending = rf_length_enable;
    rf_length_empty  = (lq.size() == 0) && (open_len == 0);
    receive_fifo_rlr = (lq.size() != 0) ? 32'(lq[0]) : {1'b1, 8'h0, 23'(open_len)};
  end

  task automatic clear_counts();
    n_rc = 0; n_len = 0; n_dest = 0; n_data = 0; n_rpore = 0;
  endtask

  task automatic rd(input int kind);
    @(negedge clk);
    events = '0;
    case (kind)
      0: events.isr_rd = 1'b1;
      1: events.rlr_rd = 1'b1;
      default: events.rdfd_rd = 1'b1;
    endcase
    @(negedge clk);
    events = '0;
    repeat (1 + $urandom_range(3)) @(negedge clk);
  endtask

  int n, first;

  initial begin
    reset_all_n = 1'b0; receive_reset_n = 1'b1; events = '0;
    rf_length_empty = 1'b1; receive_fifo_rlr = '0; open_len = 0;
    clear_counts();
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(n_rc == 0 && !on_off, "idle with nothing received");

    // complete packets, read the usual way
    for (int k = 0; k < 20; k++) begin
      clear_counts();
      n = 1 + $urandom_range(19);
      lq.push_back(4 * n);
      repeat (4) @(negedge clk);
      chk(n_rc == 1 && n_len == 1, "RC and the RLR load without software action");
      rd(0);
      rd(1);
      repeat (2) @(negedge clk);
      chk(n_dest == 1 && n_data == 1, "RDR and the first word after the RLR read");
      for (int i = 0; i < n; i++) rd(2);
      repeat (2) @(negedge clk);
      chk(n_data == n, $sformatf("%0d words loaded for %0d", n_data, n));
      chk(n_rpore == 0 && !on_off, "sequence ended cleanly");
    end

    // a partial packet read in two parts
    clear_counts();
    open_len = 12;
    repeat (3) @(negedge clk);
    chk(n_rc == 0, "no RC for an open packet");
    rd(0);
    chk(n_len == 1, "an ISR read starts reading the open packet");
    rd(1);
    for (int i = 0; i < 3; i++) rd(2);
    repeat (2) @(negedge clk);
    chk(n_data == 3 && n_rpore == 0, "three words of the open packet");
    first = n_data;
    open_len = 0;
    lq.push_back(28);
    repeat (4) @(negedge clk);
    chk(n_rc == 1, "RC when the packet completes");
    rd(0); rd(1);
    for (int i = 0; i < 4; i++) rd(2);
    repeat (2) @(negedge clk);
    chk(n_data - first == 4, $sformatf("the remaining four words (%0d)", n_data - first));
    chk(n_rpore == 0 && !on_off, "partial sequence ended cleanly");

    // overrun read
    clear_counts();
    rd(2);
    repeat (2) @(negedge clk);
    chk(n_rpore == 1, "RPORE for an RDFD read with no word due");
    lq.push_back(8);
    repeat (4) @(negedge clk);
    chk(n_rc == 0 && n_len == 0, "stuck: a new packet is not taken");
    @(negedge clk); receive_reset_n = 1'b0;
    @(negedge clk); receive_reset_n = 1'b1;
    repeat (4) @(negedge clk);
    chk(n_rc == 1 && n_len == 1, "working again after the receive reset");
    rd(1); rd(2); rd(2);
    repeat (2) @(negedge clk);
    chk(n_data == 2 && n_rpore == 1, "two words after the reset");

    // RDFD read while the RLR read is awaited is an overrun too
    clear_counts();
    lq.push_back(4);
    repeat (4) @(negedge clk);
    rd(2);
    repeat (2) @(negedge clk);
    chk(n_rpore == 1, "RPORE for an RDFD read before the RLR read");

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
