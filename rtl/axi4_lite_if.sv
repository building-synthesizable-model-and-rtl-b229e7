// axi4_lite_if: AXI4-Lite slave that turns single-beat AXI4-Lite transactions
// into one-cycle register-space accesses.
//
// Two independent Mealy-style state machines serve the write and the read
// channels, so a read and a write can be in progress at the same time.
//   Write: IDLE -> ADDR_WAIT (AWREADY=1) -> DATA_WAIT (WREADY=1) -> DATA
//          (write_enable pulses for one cycle) -> RESP (BVALID=1 until BREADY).
//   Read:  IDLE -> ADDR_WAIT (ARREADY=1) -> DATA (read_enable pulses for one
//          cycle, the register value is captured) -> RESP (RVALID=1 until RREADY).
// The state names and the one-word-per-transaction behaviour follow the core
// description. The address is accepted before the write data (a master that
// presents WVALID first simply waits); this ordering, the extra capture cycle
// in the read machine and the OKAY-only responses are choices of this design.
// Addresses are turned into byte offsets from C_BASEADDR; AWPROT/ARPROT are
// not used. Latency: a write occupies at least 4 cycles from AWVALID to
// BVALID, a read returns RVALID 2 cycles after the address handshake.
module axi4_lite_if
  import axis_fifo_pkg::*;
#(
  parameter int          C_S_AXI_DATA_WIDTH = 32,
  parameter logic [31:0] C_BASEADDR         = 32'h0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // AXI4-Lite write address channel
  input  logic [31:0]                       s_axi_awaddr,
  input  logic [2:0]                        s_axi_awprot,
  input  logic                              s_axi_awvalid,
  output logic                              s_axi_awready,
  // write data channel
  input  logic [C_S_AXI_DATA_WIDTH-1:0]     s_axi_wdata,
  input  logic [C_S_AXI_DATA_WIDTH/8-1:0]   s_axi_wstrb,
  input  logic                              s_axi_wvalid,
  output logic                              s_axi_wready,
  // write response channel
  output logic [1:0]                        s_axi_bresp,
  output logic                              s_axi_bvalid,
  input  logic                              s_axi_bready,
  // read address channel
  input  logic [31:0]                       s_axi_araddr,
  input  logic [2:0]                        s_axi_arprot,
  input  logic                              s_axi_arvalid,
  output logic                              s_axi_arready,
  // read data channel
  output logic [C_S_AXI_DATA_WIDTH-1:0]     s_axi_rdata,
  output logic [1:0]                        s_axi_rresp,
  output logic                              s_axi_rvalid,
  input  logic                              s_axi_rready,
  // register-space side
  output logic                              write_enable,
  output logic [7:0]                        write_address,
  output logic [C_S_AXI_DATA_WIDTH-1:0]     data_in,
  output logic [C_S_AXI_DATA_WIDTH/8-1:0]   strobe_out,
  output logic                              read_enable,
  output logic [7:0]                        memory_address,
  input  logic [C_S_AXI_DATA_WIDTH-1:0]     data_out
);

  typedef enum logic [2:0] {W_IDLE, W_ADDR_WAIT, W_DATA_WAIT, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR_WAIT, R_DATA, R_RESP} rstate_e;

  wstate_e wstate;
  rstate_e rstate;

  logic [7:0]  aw_off, ar_off;
  assign aw_off = 8'(s_axi_awaddr - C_BASEADDR);
  assign ar_off = 8'(s_axi_araddr - C_BASEADDR);

  // ---------------- write machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate        <= W_IDLE;
      write_address <= '0;
      data_in       <= '0;
      strobe_out    <= '0;
    end else begin
      unique case (wstate)
        W_IDLE:      wstate <= W_ADDR_WAIT;
        W_ADDR_WAIT: if (s_axi_awvalid) begin
                       write_address <= aw_off;
                       wstate        <= W_DATA_WAIT;
                     end
        W_DATA_WAIT: if (s_axi_wvalid) begin
                       data_in    <= s_axi_wdata;
                       strobe_out <= s_axi_wstrb;
                       wstate     <= W_DATA;
                     end
        W_DATA:      wstate <= W_RESP;
        W_RESP:      if (s_axi_bready) wstate <= W_ADDR_WAIT;
        default:     wstate <= W_IDLE;
      endcase
    end
  end

  assign s_axi_awready = (wstate == W_ADDR_WAIT);
  assign s_axi_wready  = (wstate == W_DATA_WAIT);
  assign write_enable  = (wstate == W_DATA);
  assign s_axi_bvalid  = (wstate == W_RESP);
  assign s_axi_bresp   = RESP_OKAY;

  // ---------------- read machine ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate         <= R_IDLE;
      memory_address <= '0;
      s_axi_rdata    <= '0;
    end else begin
      unique case (rstate)
        R_IDLE:      rstate <= R_ADDR_WAIT;
        R_ADDR_WAIT: if (s_axi_arvalid) begin
                       memory_address <= ar_off;
                       rstate         <= R_DATA;
                     end
        R_DATA:      begin
                       s_axi_rdata <= data_out;
                       rstate      <= R_RESP;
                     end
        R_RESP:      if (s_axi_rready) rstate <= R_ADDR_WAIT;
        default:     rstate <= R_IDLE;
      endcase
    end
  end

  assign s_axi_arready = (rstate == R_ADDR_WAIT);
  assign read_enable   = (rstate == R_DATA);
  assign s_axi_rvalid  = (rstate == R_RESP);
  assign s_axi_rresp   = RESP_OKAY;

  // The protection signals carry no meaning for this core.
  logic unused_prot;
  assign unused_prot = ^{s_axi_awprot, s_axi_arprot};

  // Handshake rule: once raised, a response stays valid until it is taken.
  property p_hold(logic v, logic r);
    @(posedge clk) disable iff (!rst_n) v && !r |=> v;
  endproperty
  a_bvalid_hold: assert property (p_hold(s_axi_bvalid, s_axi_bready));
  a_rvalid_hold: assert property (p_hold(s_axi_rvalid, s_axi_rready));

endmodule
