// tb_interrupt_controller: checks every ISR event bit and the interrupt line.
//
// All event inputs are driven at random each cycle. A model in the testbench
// keeps its own copy of the four level registers (reset to 1) and predicts
// the set request of each ISR bit: rising edges of the programmable
// empty/full levels for bits 19..22, the pulses passed on for bits 23..27 and
// 30, and the combined conditions for TPOE, RPUE and RPURE. The interrupt
// line must equal the OR of ISR AND IER. Resets of the transmit and receive
// paths are applied at random too. Ends with the TB_RESULT line; a watchdog
// stops a hung run.
module tb_interrupt_controller;

  import axis_fifo_pkg::*;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        reset_all_n, transmit_reset_n, receive_reset_n;
  logic [31:0] isr, ier, interrupt_service;
  logic        receive_empty, receive_full, transmit_empty, transmit_full;
  logic        receive_reset_complete, transmit_reset_complete, receive_complete_signal;
  logic        transmit_complete_signal, transmit_size_error, receive_overrun;
  logic        transmit_wr_en, transmit_no_room, read_op, rlr_read_trial;
  logic        receive_data_empty, receive_length_empty, receive_active, interrupt_bit;

  interrupt_controller dut (.*);

  int checks = 0, failures = 0;
  bit re_q, rf_q, te_q, tf_q;
  logic [31:0] want;
  int seen [32];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    reset_all_n = 1'b0; transmit_reset_n = 1'b1; receive_reset_n = 1'b1;
    {receive_empty, receive_full, transmit_empty, transmit_full, receive_reset_complete,
     transmit_reset_complete, receive_complete_signal, transmit_complete_signal,
     transmit_size_error, receive_overrun, transmit_wr_en, transmit_no_room, read_op,
     rlr_read_trial, receive_data_empty, receive_length_empty, receive_active} = '0;
    isr = '0; ier = '0;
    for (int i = 0; i < 32; i++) seen[i] = 0;
    repeat (3) @(negedge clk);
    reset_all_n = 1'b1;
    re_q = 1; rf_q = 1; te_q = 1; tf_q = 1;
    for (int k = 0; k < 4000; k++) begin
      {receive_reset_complete, transmit_reset_complete, receive_complete_signal,
       transmit_complete_signal, transmit_size_error, receive_overrun, transmit_wr_en,
       transmit_no_room, read_op, rlr_read_trial, receive_data_empty, receive_length_empty,
       receive_active} = 13'($urandom);
      if ($urandom_range(3) == 0) receive_empty  = !receive_empty;
      if ($urandom_range(3) == 0) receive_full   = !receive_full;
      if ($urandom_range(3) == 0) transmit_empty = !transmit_empty;
      if ($urandom_range(3) == 0) transmit_full  = !transmit_full;
      transmit_reset_n = ($urandom_range(49) != 0);
      receive_reset_n  = ($urandom_range(49) != 0);
      isr = $urandom & ISR_USED_MASK;
      ier = $urandom;
      #1;
      want = '0;
      want[ISR_RFPE]  = receive_empty  && !re_q;
      want[ISR_RFPF]  = receive_full   && !rf_q;
      want[ISR_TFPE]  = transmit_empty && !te_q;
      want[ISR_TFPF]  = transmit_full  && !tf_q;
      want[ISR_RRC]   = receive_reset_complete;
      want[ISR_TRC]   = transmit_reset_complete;
      want[ISR_TSE]   = transmit_size_error;
      want[ISR_RC]    = receive_complete_signal;
      want[ISR_TC]    = transmit_complete_signal;
      want[ISR_TPOE]  = transmit_wr_en && transmit_no_room;
      want[ISR_RPUE]  = read_op && receive_data_empty && !receive_active;
      want[ISR_RPORE] = receive_overrun;
      want[ISR_RPURE] = rlr_read_trial && receive_length_empty && !receive_active;
      chk(interrupt_service == want, $sformatf("set requests %h want %h", interrupt_service, want));
      chk(interrupt_bit == |(isr & ier), "interrupt line");
      for (int i = 0; i < 32; i++) if (want[i]) seen[i]++;
      @(negedge clk);
      if (!receive_reset_n)  begin re_q = 1; rf_q = 1; end
      else begin re_q = receive_empty; rf_q = receive_full; end
      if (!transmit_reset_n) begin te_q = 1; tf_q = 1; end
      else begin te_q = transmit_empty; tf_q = transmit_full; end
    end
    for (int i = ISR_RFPE; i <= ISR_RPURE; i++)
      chk(seen[i] > 0, $sformatf("ISR bit %0d was requested at least once", i));
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
