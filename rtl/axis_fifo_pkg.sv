// axis_fifo_pkg: register map, ISR bit positions and shared types of the
// AXI4-Stream FIFO core.
//
// The core bridges a memory-mapped AXI4-Lite/AXI4 master to two independent
// AXI4-Stream paths. All modules of the core import this package for the
// register offsets (byte offsets from the base address), the ISR bit numbers
// and the AXI response codes. The offsets and ISR bit numbers follow the
// register descriptions of the core; the RLR offset is 0x14, the same offset
// as TLR, which works because TLR is write-only and RLR is read-only.
package axis_fifo_pkg;

  // Register offsets (bytes from the base address)
  localparam logic [7:0] ISR_OFF  = 8'h00;
  localparam logic [7:0] IER_OFF  = 8'h04;
  localparam logic [7:0] TDFR_OFF = 8'h08;
  localparam logic [7:0] TDFV_OFF = 8'h0C;
  localparam logic [7:0] TDFD_OFF = 8'h10;
  localparam logic [7:0] TLR_OFF  = 8'h14;
  localparam logic [7:0] RDFR_OFF = 8'h18;
  localparam logic [7:0] RDFO_OFF = 8'h1C;
  localparam logic [7:0] RDFD_OFF = 8'h20;
  localparam logic [7:0] RLR_OFF  = 8'h14;
  localparam logic [7:0] SRR_OFF  = 8'h28;
  localparam logic [7:0] TDR_OFF  = 8'h2C;
  localparam logic [7:0] RDR_OFF  = 8'h30;

  // Value that triggers a reset when written to TDFR, RDFR or SRR
  localparam logic [7:0] RESET_KEY = 8'hA5;

  // ISR bit positions
  localparam int ISR_RFPE  = 19;
  localparam int ISR_RFPF  = 20;
  localparam int ISR_TFPE  = 21;
  localparam int ISR_TFPF  = 22;
  localparam int ISR_RRC   = 23;
  localparam int ISR_TRC   = 24;
  localparam int ISR_TSE   = 25;
  localparam int ISR_RC    = 26;
  localparam int ISR_TC    = 27;
  localparam int ISR_TPOE  = 28;
  localparam int ISR_RPUE  = 29;
  localparam int ISR_RPORE = 30;
  localparam int ISR_RPURE = 31;

  localparam logic [31:0] ISR_RESET_VALUE = 32'h01D0_0000;
  localparam logic [31:0] ISR_USED_MASK   = 32'hFFF8_0000;

  // Width of the length field of TLR and RLR; bit 31 of RLR marks a partial packet
  localparam int LEN_W  = 23;
  // Width of the destination field of TDR and RDR
  localparam int DEST_W = 4;

  // AXI response codes
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Decoded user accesses, one flag per register that the control logic watches
  typedef struct packed {
    logic tdr_wr;   // TDR written
    logic tdfd_wr;  // TDFD written (through AXI4-Lite or AXI4)
    logic tlr_wr;   // TLR written
    logic isr_rd;   // ISR read
    logic rlr_rd;   // RLR read
    logic rdfd_rd;  // RDFD read (through AXI4-Lite or AXI4)
  } reg_events_t;

endpackage
