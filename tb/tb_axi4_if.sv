// tb_axi4_if: checks the AXI4 burst slave of the data registers.
//
// Behind the slave the testbench keeps a write log (every write_enable beat
// with its data and strobe) and a read source (data_out shows the next word;
// each read_enable consumes one). Write bursts of 1 to 16 beats are sent
// with random gaps between beats that stay inside the slave's timeout; every
// beat must reach the register side once, in order, with its data and
// strobe, and the burst must end with an OKAY response. A burst whose AWSIZE
// is wider than the bus must write nothing and end in SLVERR, and so must a
// burst whose master goes silent for longer than the timeout (the beats sent
// before the silence are written). Read bursts of 1 to 16 beats with random
// RREADY must return the source words in order, RLAST on the last beat only,
// one read_enable per beat; an over-wide ARSIZE returns SLVERR beats and
// reads nothing. A second write address given while the first burst's
// response waits must be accepted at once, and its beats must follow the
// response. A response the master never takes must drop after exactly
// RESP_TIMEOUT cycles of BVALID, and the next burst must work normally. Ends with the TB_RESULT line; a watchdog stops a hung run.
module tb_axi4_if;

  import axis_fifo_pkg::*;

  localparam int          TIMEOUT = 16;
  localparam int          RESP_TIMEOUT = 16;
  localparam logic [31:0] BASE    = 32'h8000_0000;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n;
  logic [31:0] s_axi4_awaddr, s_axi4_araddr, s_axi4_wdata, s_axi4_rdata;
  logic [7:0]  s_axi4_awlen, s_axi4_arlen;
  logic [2:0]  s_axi4_awsize, s_axi4_arsize;
  logic [1:0]  s_axi4_awburst, s_axi4_arburst, s_axi4_bresp, s_axi4_rresp;
  logic        s_axi4_awvalid, s_axi4_awready, s_axi4_wlast, s_axi4_wvalid, s_axi4_wready;
  logic        s_axi4_bvalid, s_axi4_bready, s_axi4_arvalid, s_axi4_arready;
  logic        s_axi4_rlast, s_axi4_rvalid, s_axi4_rready;
  logic [3:0]  s_axi4_wstrb, strobe_out;
  logic        write_enable, read_enable;
  logic [7:0]  write_address, memory_address;
  logic [31:0] data_in, data_out;

  axi4_if #(.C_S_AXI4_DATA_WIDTH(32), .C_AXI4_BASEADDR(BASE), .TIMEOUT(TIMEOUT),
            .RESP_TIMEOUT(RESP_TIMEOUT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // register side
  logic [35:0] wlog [$];
  logic [31:0] src [256];
  int          src_idx = 0;
  assign data_out = src[src_idx[7:0]];
  always_ff @(posedge clk) begin
    if (write_enable) begin
      wlog.push_back({strobe_out, data_in});
      chk(write_address == 8'h10, "write offset from the base address");
    end
    if (read_enable) src_idx <= src_idx + 1;
  end

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Sends a write burst of n beats. Beats are sent up to 'stop_after'; after
  // that the master stays silent. Returns the response.
  task automatic wr_burst(input int n, input logic [2:0] size, input int stop_after,
                          ref logic [35:0] sent [$], output logic [1:0] resp);
    s_axi4_awaddr = BASE + 32'h10; s_axi4_awlen = 8'(n - 1); s_axi4_awsize = size;
    s_axi4_awburst = 2'($urandom_range(2)); s_axi4_awvalid = 1'b1;
    #1;
    while (!s_axi4_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi4_awvalid = 1'b0;
    for (int b = 0; b < n && b < stop_after; b++) begin
      if ($urandom_range(2) == 0) idle($urandom_range(1, 4));
      s_axi4_wdata = $urandom; s_axi4_wstrb = 4'($urandom); s_axi4_wlast = (b == n - 1);
      s_axi4_wvalid = 1'b1;
      sent.push_back({s_axi4_wstrb, s_axi4_wdata});
      #1;
      while (!s_axi4_wready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_axi4_wvalid = 1'b0; s_axi4_wlast = 1'b0;
    end
    s_axi4_bready = ($urandom_range(1) == 0);
    #1;
    while (!s_axi4_bvalid) begin @(negedge clk); #1; end
    if (!s_axi4_bready) begin idle($urandom_range(1, 3)); s_axi4_bready = 1'b1; #1; end
    resp = s_axi4_bresp;
    @(negedge clk);
    s_axi4_bready = 1'b0;
  endtask

  // A write burst whose response the master never takes: returns how many
  // cycles BVALID stayed high.
  task automatic wr_ignored(input int n, ref logic [35:0] sent [$], output int bv_cycles);
    s_axi4_awaddr = BASE + 32'h10; s_axi4_awlen = 8'(n - 1); s_axi4_awsize = 3'd2;
    s_axi4_awvalid = 1'b1;
    #1;
    while (!s_axi4_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi4_awvalid = 1'b0;
    for (int b = 0; b < n; b++) begin
      s_axi4_wdata = $urandom; s_axi4_wstrb = 4'($urandom); s_axi4_wlast = (b == n - 1);
      s_axi4_wvalid = 1'b1;
      sent.push_back({s_axi4_wstrb, s_axi4_wdata});
      #1;
      while (!s_axi4_wready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_axi4_wvalid = 1'b0; s_axi4_wlast = 1'b0;
    end
    s_axi4_bready = 1'b0;
    #1;
    while (!s_axi4_bvalid) begin @(negedge clk); #1; end
    bv_cycles = 0;
    while (s_axi4_bvalid && bv_cycles < 100) begin bv_cycles++; @(negedge clk); #1; end
  endtask

  // Two write bursts where the second address is given while the first
  // burst's response is still waiting (BREADY held low).
  task automatic wr_overlapped(input int n1, input int n2, ref logic [35:0] sent [$],
                               output logic [1:0] resp1, output logic [1:0] resp2,
                               output bit aw_early);
    s_axi4_awaddr = BASE + 32'h10; s_axi4_awlen = 8'(n1 - 1); s_axi4_awsize = 3'd2;
    s_axi4_awvalid = 1'b1;
    #1;
    while (!s_axi4_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi4_awvalid = 1'b0;
    for (int b = 0; b < n1; b++) begin
      s_axi4_wdata = $urandom; s_axi4_wstrb = 4'($urandom); s_axi4_wlast = (b == n1 - 1);
      s_axi4_wvalid = 1'b1;
      sent.push_back({s_axi4_wstrb, s_axi4_wdata});
      #1;
      while (!s_axi4_wready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_axi4_wvalid = 1'b0; s_axi4_wlast = 1'b0;
    end
    #1;
    while (!s_axi4_bvalid) begin @(negedge clk); #1; end
    // second address while the first response is pending
    s_axi4_awlen = 8'(n2 - 1); s_axi4_awvalid = 1'b1;
    #1;
    aw_early = s_axi4_awready && s_axi4_bvalid;
    while (!s_axi4_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi4_awvalid = 1'b0;
    idle($urandom_range(2));
    resp1 = s_axi4_bresp;
    s_axi4_bready = 1'b1;
    @(negedge clk);
    s_axi4_bready = 1'b0;
    for (int b = 0; b < n2; b++) begin
      s_axi4_wdata = $urandom; s_axi4_wstrb = 4'($urandom); s_axi4_wlast = (b == n2 - 1);
      s_axi4_wvalid = 1'b1;
      sent.push_back({s_axi4_wstrb, s_axi4_wdata});
      #1;
      while (!s_axi4_wready) begin @(negedge clk); #1; end
      @(negedge clk);
      s_axi4_wvalid = 1'b0; s_axi4_wlast = 1'b0;
    end
    s_axi4_bready = 1'b1;
    #1;
    while (!s_axi4_bvalid) begin @(negedge clk); #1; end
    resp2 = s_axi4_bresp;
    @(negedge clk);
    s_axi4_bready = 1'b0;
  endtask

  task automatic rd_burst(input int n, input logic [2:0] size, output int bad_data,
                          output int bad_last, output logic [1:0] resp);
    int i0 = src_idx;
    bad_data = 0; bad_last = 0; resp = RESP_OKAY;
    s_axi4_araddr = BASE + 32'h20; s_axi4_arlen = 8'(n - 1); s_axi4_arsize = size;
    s_axi4_arburst = 2'($urandom_range(2)); s_axi4_arvalid = 1'b1;
    #1;
    while (!s_axi4_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi4_arvalid = 1'b0;
    for (int b = 0; b < n; b++) begin
      s_axi4_rready = ($urandom_range(2) != 0);
      #1;
      while (!(s_axi4_rvalid && s_axi4_rready)) begin
        @(negedge clk); s_axi4_rready = ($urandom_range(2) != 0); #1;
      end
      if (size <= 3'd2 && s_axi4_rdata != src[8'(i0 + b)]) bad_data++;
      if (s_axi4_rlast != (b == n - 1)) bad_last++;
      if (s_axi4_rresp != RESP_OKAY) resp = s_axi4_rresp;
      @(negedge clk);
      s_axi4_rready = 1'b0;
    end
  endtask

  logic [35:0] sent [$];
  logic [1:0]  resp;
  int          n, k, bd, bl, i0, n_ok = 0, n_size_err = 0, n_to_err = 0, n_ovl = 0, n_ign = 0, bvc;
  logic [1:0]  resp2;
  bit          aw_early;

  initial begin
    rst_n = 1'b0;
    s_axi4_awaddr = '0; s_axi4_araddr = '0; s_axi4_awlen = '0; s_axi4_arlen = '0;
    s_axi4_awsize = '0; s_axi4_arsize = '0; s_axi4_awburst = '0; s_axi4_arburst = '0;
    s_axi4_awvalid = 0; s_axi4_wvalid = 0; s_axi4_wlast = 0; s_axi4_wdata = '0; s_axi4_wstrb = '0;
    s_axi4_bready = 0; s_axi4_arvalid = 0; s_axi4_rready = 0;
    for (int i = 0; i < 256; i++) src[i] = $urandom;
    idle(3);
    rst_n = 1'b1;
    idle(2);
    for (int t = 0; t < 150; t++) begin
      n = $urandom_range(1, 16);
      case ($urandom_range(7))
        0: begin   // over-wide beats
          sent.delete(); wlog.delete();
          wr_burst(n, 3'd3, n, sent, resp);
          idle(2);
          chk(resp == RESP_SLVERR && wlog.size() == 0, "over-wide write burst: SLVERR, nothing written");
          n_size_err++;
        end
        1: begin   // master goes silent
          sent.delete(); wlog.delete();
          k = $urandom_range(0, n - 1);
          if (n == 1) k = 0;
          wr_burst(n, 3'd2, k, sent, resp);
          idle(2);
          chk(resp == RESP_SLVERR && wlog.size() == k && wlog == sent,
              $sformatf("timed-out burst: resp %0d, %0d of %0d beats", resp, wlog.size(), k));
          n_to_err++;
        end
        2, 3: begin
          sent.delete(); wlog.delete();
          wr_burst(n, 3'($urandom_range(2)), n, sent, resp);
          idle(2);
          chk(resp == RESP_OKAY, "write burst OKAY");
          chk(wlog == sent, $sformatf("write burst beats: %0d of %0d", wlog.size(), sent.size()));
          n_ok++;
        end
        6: begin   // next address during a pending response
          sent.delete(); wlog.delete();
          wr_overlapped(n, $urandom_range(1, 16), sent, resp, resp2, aw_early);
          idle(2);
          chk(aw_early, "AWREADY while the write response waits");
          chk(resp == RESP_OKAY && resp2 == RESP_OKAY, "overlapped bursts OKAY");
          chk(wlog == sent, $sformatf("overlapped bursts beats: %0d of %0d", wlog.size(), sent.size()));
          n_ovl++;
        end
        7: begin   // response never taken
          sent.delete(); wlog.delete();
          wr_ignored(n, sent, bvc);
          chk(bvc == RESP_TIMEOUT, $sformatf("untaken response dropped after %0d cycles, expected %0d", bvc, RESP_TIMEOUT));
          idle(2);
          chk(wlog == sent, "beats of a burst whose response was dropped are written");
          sent.delete(); wlog.delete();
          wr_burst(n, 3'd2, n, sent, resp);
          idle(2);
          chk(resp == RESP_OKAY && wlog == sent, "next burst after a dropped response");
          n_ign++;
        end
        4: begin
          i0 = src_idx;
          rd_burst(n, 3'd3, bd, bl, resp);
          chk(resp == RESP_SLVERR && bl == 0 && src_idx == i0, "over-wide read burst: SLVERR, nothing read");
        end
        default: begin
          i0 = src_idx;
          rd_burst(n, 3'($urandom_range(2)), bd, bl, resp);
          chk(resp == RESP_OKAY && bd == 0 && bl == 0, $sformatf("read burst data %0d last %0d", bd, bl));
          chk(src_idx == i0 + n, "one read_enable per beat");
        end
      endcase
      idle($urandom_range(3));
    end
    chk(n_ok > 0 && n_size_err > 0 && n_to_err > 0 && n_ovl > 0 && n_ign > 0, "all write cases ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
