// tb_axis_fifo_top: end-to-end test of the AXI4-Stream FIFO core.
//
// Three copies of the core run side by side, each inside axis_fifo_harness:
// store-and-forward with the AXI4-Lite data port, cut-through, and
// store-and-forward with the AXI4 burst data port. Each copy sends and
// receives random packets through its registers and streams and runs the
// directed scenarios of its configuration (see axis_fifo_harness). When all
// three are done, the mechanism counts are added up and printed; every
// mechanism must have happened at least once, or it counts as a failure.
// A watchdog ends the run with a failure if the copies do not finish in time.
module tb_axis_fifo_top;

  localparam int NM = 16;
  localparam int WATCHDOG_CYCLES = 400_000;

  logic done_sf, done_ct, done_a4;
  int   chk_sf, chk_ct, chk_a4, fail_sf, fail_ct, fail_a4;
  int   m_sf [NM];
  int   m_ct [NM];
  int   m_a4 [NM];

  axis_fifo_harness #(.CT(1'b0), .A4(1'b0)) h_sf (.done(done_sf), .checks(chk_sf), .failures(fail_sf), .mech(m_sf));
  axis_fifo_harness #(.CT(1'b1), .A4(1'b0)) h_ct (.done(done_ct), .checks(chk_ct), .failures(fail_ct), .mech(m_ct));
  axis_fifo_harness #(.CT(1'b0), .A4(1'b1)) h_a4 (.done(done_a4), .checks(chk_a4), .failures(fail_a4), .mech(m_a4));

  string names [NM] = '{
    "store-and-forward packet", "cut-through early start", "TREADY stall cycle",
    "transmit size error", "transmit overrun (TPOE)", "receive overrun read (RPORE)",
    "deferred transmit reset", "deferred receive reset", "partial packet read",
    "receive complete (RC)", "transmit complete (TC)", "SRR core reset",
    "AXI4 data burst", "interrupt output", "receive underrun (RPURE)",
    "FIFO level report"
  };

  int checks, failures, total;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    checks = 0; failures = 0;
    wait (done_sf && done_ct && done_a4);
    checks   = chk_sf + chk_ct + chk_a4;
    failures = fail_sf + fail_ct + fail_a4;
    for (int i = 0; i < NM; i++) begin
      total = m_sf[i] + m_ct[i] + m_a4[i];
      $display("mechanism %-30s %0d", names[i], total);
      checks++;
      if (total == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    $display("FAIL watchdog: the run did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", chk_sf + chk_ct + chk_a4,
             fail_sf + fail_ct + fail_a4 + 1);
    $finish;
  end

endmodule
