// tb_axi4_lite_if: checks the AXI4-Lite slave against a small register file.
//
// A register file of 64 words sits behind the register-space side of the
// slave: a write_enable pulse stores data_in at write_address, and data_out is
// the word at memory_address. The slave is built with a non-zero base
// address, so every bus address is the base plus a byte offset. Phase one
// writes random words to random offsets and reads them back, with random
// gaps and random BREADY/RREADY back-pressure, and sometimes presents the
// write data before the address. Phase two runs a write stream and a read
// stream at the same time on separate halves of the register file. Checked:
// exactly one write_enable per write, with the right offset, data and strobe;
// OKAY responses; read data equal to the model; RVALID exactly two cycles
// after the read address is accepted; and (in the slave) that a response
// stays valid until taken. Ends with the TB_RESULT line; a watchdog stops a
// hung run.
module tb_axi4_lite_if;

  import axis_fifo_pkg::*;

  localparam logic [31:0] BASE = 32'h4000_0000;

  logic        clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst_n;
  logic [31:0] s_axi_awaddr, s_axi_araddr, s_axi_wdata, s_axi_rdata;
  logic [2:0]  s_axi_awprot, s_axi_arprot;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready, s_axi_bvalid, s_axi_bready;
  logic        s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        write_enable, read_enable;
  logic [7:0]  write_address, memory_address;
  logic [31:0] data_in, data_out;
  logic [3:0]  strobe_out;

  axi4_lite_if #(.C_S_AXI_DATA_WIDTH(32), .C_BASEADDR(BASE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // register file behind the slave
  logic [31:0] regs [64];
  int          we_count = 0;
  logic [7:0]  last_wa;
  logic [3:0]  last_strb;
  assign data_out = regs[memory_address[7:2]];
  always_ff @(posedge clk) begin
    if (write_enable) begin
      regs[write_address[7:2]] <= data_in;
      last_wa   <= write_address;
      last_strb <= strobe_out;
      we_count  <= we_count + 1;
    end
  end

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic lite_write(input logic [7:0] off, input logic [31:0] d, input logic [3:0] s);
    int n0 = we_count;
    bit early = ($urandom_range(2) == 0);
    s_axi_awaddr = BASE + 32'(off); s_axi_awvalid = 1'b1;
    if (early) begin s_axi_wdata = d; s_axi_wstrb = s; s_axi_wvalid = 1'b1; end
    #1;
    while (!s_axi_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 1'b0;
    if (!early) idle($urandom_range(2));
    s_axi_wdata = d; s_axi_wstrb = s; s_axi_wvalid = 1'b1;
    #1;
    while (!s_axi_wready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_wvalid = 1'b0;
    idle($urandom_range(3));
    s_axi_bready = 1'b1;
    #1;
    while (!s_axi_bvalid) begin @(negedge clk); #1; end
    chk(s_axi_bresp == RESP_OKAY, "write response OKAY");
    @(negedge clk);
    s_axi_bready = 1'b0;
    chk(we_count == n0 + 1, $sformatf("one write_enable per write (%0d)", we_count - n0));
    chk(last_wa == off && last_strb == s && regs[off[7:2]] == d, "write offset, strobe and data");
  endtask

  task automatic lite_read(input logic [7:0] off, output logic [31:0] d);
    s_axi_araddr = BASE + 32'(off); s_axi_arvalid = 1'b1;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 1'b0;
    chk(!s_axi_rvalid, "no RVALID one cycle after the address");
    @(negedge clk);
    chk(s_axi_rvalid, "RVALID two cycles after the address");
    idle($urandom_range(3));
    s_axi_rready = 1'b1;
    #1;
    while (!s_axi_rvalid) begin @(negedge clk); #1; end
    chk(s_axi_rresp == RESP_OKAY, "read response OKAY");
    d = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 1'b0;
  endtask

  logic [31:0] rd, wd;
  logic [7:0]  off;
  logic [31:0] shadow [64];

  initial begin
    rst_n = 1'b0;
    s_axi_awaddr = '0; s_axi_araddr = '0; s_axi_wdata = '0; s_axi_wstrb = '0;
    s_axi_awprot = '0; s_axi_arprot = '0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    for (int i = 0; i < 64; i++) begin regs[i] = $urandom; shadow[i] = regs[i]; end
    idle(3);
    rst_n = 1'b1;
    idle(2);
    // phase one: write and read back
    for (int k = 0; k < 300; k++) begin
      off = 8'($urandom_range(63) << 2);
      if ($urandom_range(1) == 0) begin
        wd = $urandom;
        lite_write(off, wd, 4'($urandom));
        shadow[off[7:2]] = wd;
      end
      lite_read(off, rd);
      chk(rd == shadow[off[7:2]], $sformatf("read back %h: %h want %h", off, rd, shadow[off[7:2]]));
      idle($urandom_range(2));
    end
    // phase two: writes to the lower half while reading the upper half
    fork
      for (int k = 0; k < 200; k++) begin
        logic [7:0] o = 8'($urandom_range(31) << 2);
        logic [31:0] v = $urandom;
        lite_write(o, v, 4'hF);
        shadow[o[7:2]] = v;
      end
      for (int k = 0; k < 200; k++) begin
        logic [7:0] o = 8'(($urandom_range(31) + 32) << 2);
        logic [31:0] v;
        lite_read(o, v);
        chk(v == shadow[o[7:2]], "read during a concurrent write");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
