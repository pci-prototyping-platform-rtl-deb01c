// pci_pkg: types and constants shared by the PCI prototyping target.
//
// Holds the PCI bus command encodings the target answers (I/O Read/Write,
// Configuration Read/Write), the dword numbers of the Type 0 configuration
// header, the Command and Status register bit positions, and the request
// struct the target controller uses to read and write its local registers
// (the configuration space and the three I/O registers). The encodings and
// header layout are those of the PCI Local Bus Specification; the struct is
// this design's own.
package pci_pkg;

  // PCI bus commands (C/BE#[3:0] during the address phase)
  typedef enum logic [3:0] {
    CMD_INT_ACK    = 4'b0000,
    CMD_SPECIAL    = 4'b0001,
    CMD_IO_READ    = 4'b0010,
    CMD_IO_WRITE   = 4'b0011,
    CMD_MEM_READ   = 4'b0110,
    CMD_MEM_WRITE  = 4'b0111,
    CMD_CFG_READ   = 4'b1010,
    CMD_CFG_WRITE  = 4'b1011,
    CMD_MEM_RD_MUL = 4'b1100,
    CMD_DUAL_ADDR  = 4'b1101,
    CMD_MEM_RD_LN  = 4'b1110,
    CMD_MEM_WR_INV = 4'b1111
  } pci_cmd_e;

  // Type 0 configuration header, dword numbers (AD[7:2])
  localparam logic [5:0] CFG_ID        = 6'h00; // Device ID | Vendor ID
  localparam logic [5:0] CFG_STAT_CMD  = 6'h01; // Status | Command
  localparam logic [5:0] CFG_CLASS_REV = 6'h02; // Class Code | Revision ID
  localparam logic [5:0] CFG_BHLC      = 6'h03; // BIST | Header Type | Latency | Cache Line
  localparam logic [5:0] CFG_BAR0      = 6'h04; // Base Address Register 0
  localparam logic [5:0] CFG_SUBSYS    = 6'h0B; // Subsystem ID | Subsystem Vendor ID
  localparam logic [5:0] CFG_INTR      = 6'h0F; // Max_Lat | Min_Gnt | Int Pin | Int Line

  // Command register bits
  localparam int CMD_BIT_IO_EN  = 0;
  localparam int CMD_BIT_MEM_EN = 1;
  localparam int CMD_BIT_MASTER = 2;
  localparam int CMD_BIT_PER    = 6;   // Parity Error Response
  localparam int CMD_BIT_SERR   = 8;   // SERR# Enable

  // Status register bits
  localparam int STAT_BIT_SIG_SERR = 14; // Signaled System Error
  localparam int STAT_BIT_DET_PERR = 15; // Detected Parity Error
  localparam logic [1:0] DEVSEL_MEDIUM = 2'b01;

  // Local register access issued by the target controller
  typedef struct packed {
    logic        wr;     // one-cycle write strobe
    logic [5:0]  dw;     // dword number (config) or register index (I/O)
    logic [3:0]  be;     // active-high byte enables
    logic [31:0] wdata;
  } reg_req_t;

endpackage
