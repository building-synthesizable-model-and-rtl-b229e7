// axi4_if: AXI4 (full) burst slave for the data registers of the core.
//
// When the core is built with the AXI4 data interface, this port is the only
// way to write the transmit data register (TDFD) and to read the receive data
// register (RDFD); every beat of a write burst is one TDFD write and every
// beat of a read burst one RDFD read, whatever the burst type, because each
// direction has a single data register behind it. Other packet information
// (destination, length) still goes through the AXI4-Lite port.
//
// Write machine (states after the core description): IDLE, ADDR_WAIT
// (AWREADY=1, burst length/size/type stored), WAIT_WVALID (WREADY=0),
// DATA (WREADY=1, one write_enable per accepted beat, back-to-back beats run
// at one per cycle), RESP (BVALID=1, OKAY) and SLVERR (BVALID=1, SLVERR).
// A burst whose AWSIZE is wider than the bus, or a master that leaves the
// data channel idle for more than TIMEOUT cycles inside a burst, ends in the
// SLVERR response; beats of a burst with an unsupported size are not written.
// A master that leaves a response (OKAY or SLVERR) untaken for RESP_TIMEOUT
// cycles loses it: BVALID drops and the machine waits for the next address,
// as the description's "response timeout" transition has it. This breaks the
// AXI rule that VALID stays until READY, so RESP_TIMEOUT = 0 turns it off.
// As in the output table of the description, AWREADY is also high while a
// response waits (RESP, SLVERR): one further address can be taken there, and
// its beats are accepted once the response has been taken.
// Read machine: IDLE, ADDR_WAIT (ARREADY=1), READ (read_enable for one cycle,
// RDFD captured), DATA (RVALID=1, RLAST on the last beat); a read burst thus
// returns one beat every two cycles when RREADY is held high.
// The values of TIMEOUT and RESP_TIMEOUT (the description says only that both
// limits are parameters), the two-cycle read beat, and where the machine goes
// after an abandoned response are choices of this design. IDs, QoS, lock, prot, cache and user signals are not used.
module axi4_if
  import axis_fifo_pkg::*;
#(
  parameter int          C_S_AXI4_DATA_WIDTH = 32,
  parameter logic [31:0] C_AXI4_BASEADDR     = 32'h0,
  parameter int          TIMEOUT             = 16,
  parameter int          RESP_TIMEOUT        = 16   // 0: BVALID waits for BREADY forever
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // write address channel
  input  logic [31:0]                        s_axi4_awaddr,
  input  logic [7:0]                         s_axi4_awlen,
  input  logic [2:0]                         s_axi4_awsize,
  input  logic [1:0]                         s_axi4_awburst,
  input  logic                               s_axi4_awvalid,
  output logic                               s_axi4_awready,
  // write data channel
  input  logic [C_S_AXI4_DATA_WIDTH-1:0]     s_axi4_wdata,
  input  logic [C_S_AXI4_DATA_WIDTH/8-1:0]   s_axi4_wstrb,
  input  logic                               s_axi4_wlast,
  input  logic                               s_axi4_wvalid,
  output logic                               s_axi4_wready,
  // write response channel
  output logic [1:0]                         s_axi4_bresp,
  output logic                               s_axi4_bvalid,
  input  logic                               s_axi4_bready,
  // read address channel
  input  logic [31:0]                        s_axi4_araddr,
  input  logic [7:0]                         s_axi4_arlen,
  input  logic [2:0]                         s_axi4_arsize,
  input  logic [1:0]                         s_axi4_arburst,
  input  logic                               s_axi4_arvalid,
  output logic                               s_axi4_arready,
  // read data channel
  output logic [C_S_AXI4_DATA_WIDTH-1:0]     s_axi4_rdata,
  output logic [1:0]                         s_axi4_rresp,
  output logic                               s_axi4_rlast,
  output logic                               s_axi4_rvalid,
  input  logic                               s_axi4_rready,
  // register-space side
  output logic                               write_enable,
  output logic [7:0]                         write_address,
  output logic [C_S_AXI4_DATA_WIDTH-1:0]     data_in,
  output logic [C_S_AXI4_DATA_WIDTH/8-1:0]   strobe_out,
  output logic                               read_enable,
  output logic [7:0]                         memory_address,
  input  logic [C_S_AXI4_DATA_WIDTH-1:0]     data_out
);

  localparam int BYTES     = C_S_AXI4_DATA_WIDTH / 8;
  localparam int MAX_SIZE  = $clog2(BYTES);
  localparam int TO_MAX    = (TIMEOUT > RESP_TIMEOUT) ? TIMEOUT : RESP_TIMEOUT;
  localparam int TO_W      = $clog2(TO_MAX + 1);

  typedef enum logic [2:0] {W_IDLE, W_ADDR_WAIT, W_WAIT_WVALID, W_DATA, W_RESP, W_SLVERR} wstate_e;
  typedef enum logic [2:0] {R_IDLE, R_ADDR_WAIT, R_READ, R_DATA} rstate_e;

  wstate_e          wstate;
  rstate_e          rstate;
  logic [7:0]       wbeats, rbeats;      // beats still to come, minus one
  logic             werr, rerr;
  logic             aw_pend;             // next address taken during a response
  logic [TO_W-1:0]  wtimer;
  logic [7:0]       aw_off, ar_off;

  assign aw_off = 8'(s_axi4_awaddr - C_AXI4_BASEADDR);
  assign ar_off = 8'(s_axi4_araddr - C_AXI4_BASEADDR);

  logic w_hs;
  assign w_hs = (wstate == W_DATA) && s_axi4_wvalid;

  // a response not taken within RESP_TIMEOUT cycles
  logic resp_timed_out;
  assign resp_timed_out = (RESP_TIMEOUT > 0) && (32'(wtimer) >= RESP_TIMEOUT - 1);

  // ---------------- write machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate        <= W_IDLE;
      wbeats        <= '0;
      werr          <= 1'b0;
      aw_pend       <= 1'b0;
      wtimer        <= '0;
      write_address <= '0;
      data_in       <= '0;
      strobe_out    <= '0;
    end else begin
      unique case (wstate)
        W_IDLE:        wstate <= W_ADDR_WAIT;
        W_ADDR_WAIT:   if (s_axi4_awvalid) begin
                         wbeats        <= s_axi4_awlen;
                         werr          <= (32'(s_axi4_awsize) > MAX_SIZE);
                         write_address <= aw_off;
                         wtimer        <= '0;
                         wstate        <= W_WAIT_WVALID;
                       end
        W_WAIT_WVALID: begin
                         wtimer <= wtimer + 1'b1;
                         if (s_axi4_wvalid)                    wstate <= W_DATA;
                         else if (32'(wtimer) >= TIMEOUT - 1) begin
                           wtimer <= '0;
                           wstate <= W_SLVERR;
                         end
                       end
        W_DATA:        begin
                         wtimer <= '0;
                         if (s_axi4_wvalid) begin
                           data_in    <= s_axi4_wdata;
                           strobe_out <= s_axi4_wstrb;
                           wbeats     <= wbeats - 1'b1;
                           if (s_axi4_wlast || wbeats == 8'd0)
                             wstate <= werr ? W_SLVERR : W_RESP;
                         end else begin
                           wstate <= W_WAIT_WVALID;
                         end
                       end
        W_RESP,
        W_SLVERR:      begin
                         // the next burst's address may arrive while the
                         // response waits; its beats follow the response
                         if (s_axi4_awvalid && !aw_pend) begin
                           aw_pend       <= 1'b1;
                           wbeats        <= s_axi4_awlen;
                           werr          <= (32'(s_axi4_awsize) > MAX_SIZE);
                           write_address <= aw_off;
                         end
                         // the response leaves when it is taken, or is
                         // abandoned after RESP_TIMEOUT cycles without BREADY
                         wtimer <= wtimer + 1'b1;
                         if (s_axi4_bready || resp_timed_out) begin
                           aw_pend <= 1'b0;
                           wtimer  <= '0;
                           wstate  <= (aw_pend || s_axi4_awvalid) ? W_WAIT_WVALID : W_ADDR_WAIT;
                         end
                       end
        default:       wstate <= W_IDLE;
      endcase
    end
  end

  // write_enable is registered together with the data it qualifies
  logic we_q;
  always_ff @(posedge clk) begin
    if (!rst_n) we_q <= 1'b0;
    else        we_q <= w_hs && !werr;
  end

  assign write_enable   = we_q;
  assign s_axi4_awready = (wstate == W_ADDR_WAIT) ||
                          (((wstate == W_RESP) || (wstate == W_SLVERR)) && !aw_pend);
  assign s_axi4_wready  = (wstate == W_DATA);
  assign s_axi4_bvalid  = (wstate == W_RESP) || (wstate == W_SLVERR);
  assign s_axi4_bresp   = (wstate == W_SLVERR) ? RESP_SLVERR : RESP_OKAY;

  // ---------------- read machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate         <= R_IDLE;
      rbeats         <= '0;
      rerr           <= 1'b0;
      memory_address <= '0;
      s_axi4_rdata   <= '0;
    end else begin
      unique case (rstate)
        R_IDLE:      rstate <= R_ADDR_WAIT;
        R_ADDR_WAIT: if (s_axi4_arvalid) begin
                       rbeats         <= s_axi4_arlen;
                       rerr           <= (32'(s_axi4_arsize) > MAX_SIZE);
                       memory_address <= ar_off;
                       rstate         <= R_READ;
                     end
        R_READ:      begin
                       s_axi4_rdata <= rerr ? '0 : data_out;
                       rstate       <= R_DATA;
                     end
        R_DATA:      if (s_axi4_rready) begin
                       rbeats <= rbeats - 1'b1;
                       rstate <= (rbeats == 8'd0) ? R_ADDR_WAIT : R_READ;
                     end
        default:     rstate <= R_IDLE;
      endcase
    end
  end

  assign s_axi4_arready = (rstate == R_ADDR_WAIT);
  assign read_enable    = (rstate == R_READ) && !rerr;
  assign s_axi4_rvalid  = (rstate == R_DATA);
  assign s_axi4_rlast   = (rstate == R_DATA) && (rbeats == 8'd0);
  assign s_axi4_rresp   = rerr ? RESP_SLVERR : RESP_OKAY;

  // Only one data register per direction: the burst type does not change
  // which register a beat reaches.
  logic unused_burst;
  assign unused_burst = ^{s_axi4_awburst, s_axi4_arburst};

  property p_hold(logic v, logic r);
    @(posedge clk) disable iff (!rst_n) v && !r |=> v;
  endproperty
  // BVALID holds until BREADY, except when the response timeout drops it
  a_bvalid_hold: assert property (p_hold(s_axi4_bvalid, s_axi4_bready || resp_timed_out));
  a_rvalid_hold: assert property (p_hold(s_axi4_rvalid, s_axi4_rready));

endmodule
