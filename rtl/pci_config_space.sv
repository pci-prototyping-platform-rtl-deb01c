// pci_config_space: Type 0 configuration space header of the PCI target.
//
// Gives the configuration software what Plug and Play needs: the identity
// registers (Vendor ID, Device ID, Revision ID, Class Code, Subsystem IDs),
// the Command and Status registers, and Base Address Register 0, which
// requests an I/O window of 2**IO_SIZE_LOG2 bytes for the three I/O
// registers. Every other header dword reads as zero.
//
// Implemented Command bits: I/O Space enable (0), Parity Error Response (6)
// and SERR# Enable (8); the rest read zero (no memory space, not a bus
// master). Status reports medium DEVSEL# timing (bits 10:9 = 01) and the two
// error bits a target sets: Detected Parity Error (15) and Signaled System
// Error (14). Both are set by one-cycle pulses from the parity checker and
// cleared by writing 1. Interrupt Line is a read/write byte; Interrupt Pin is
// zero because the card raises no interrupt. BAR0 bit 0 reads 1 (I/O space),
// bits IO_SIZE_LOG2-1:1 read zero, the upper bits are read/write, so writing
// all ones and reading back gives the size.
//
// Interface: a write is a one-cycle strobe in req (dword number, byte
// enables, data); reads are combinational on rd_dw. All registers reset to
// zero. The header layout and bit meanings follow the PCI specification; the
// identity values are placeholders this design chooses, set by parameter.
module pci_config_space
  import pci_pkg::*;
#(
  parameter logic [15:0] VENDOR_ID       = 16'h1234,
  parameter logic [15:0] DEVICE_ID       = 16'h0001,
  parameter logic [7:0]  REVISION_ID     = 8'h01,
  parameter logic [23:0] CLASS_CODE      = 24'hFF0000,
  parameter logic [15:0] SUBSYS_VENDOR_ID = 16'h0000,
  parameter logic [15:0] SUBSYS_ID       = 16'h0000,
  parameter int          IO_SIZE_LOG2    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  reg_req_t    req,            // configuration write
  input  logic [5:0]  rd_dw,          // configuration read dword number
  output logic [31:0] rd_data,
  input  logic        det_perr_set,   // parity error detected (pulse)
  input  logic        sig_serr_set,   // SERR# asserted (pulse)
  output logic        io_en,          // Command bit 0
  output logic        per_en,         // Command bit 6
  output logic        serr_en,        // Command bit 8
  output logic [31:0] io_base         // BAR0 base address, low bits zero
);

  logic                    cmd_io_en, cmd_per, cmd_serr;
  logic                    st_det_perr, st_sig_serr;
  logic [31:IO_SIZE_LOG2]  bar0_base;
  logic [7:0]              int_line;

  logic wr_cmd, wr_bar, wr_intr;
  assign wr_cmd  = req.wr && (req.dw == CFG_STAT_CMD);
  assign wr_bar  = req.wr && (req.dw == CFG_BAR0);
  assign wr_intr = req.wr && (req.dw == CFG_INTR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_io_en   <= 1'b0;
      cmd_per     <= 1'b0;
      cmd_serr    <= 1'b0;
      st_det_perr <= 1'b0;
      st_sig_serr <= 1'b0;
      bar0_base   <= '0;
      int_line    <= '0;
    end else begin
      if (wr_cmd && req.be[0]) begin
        cmd_io_en <= req.wdata[CMD_BIT_IO_EN];
        cmd_per   <= req.wdata[CMD_BIT_PER];
      end
      if (wr_cmd && req.be[1]) cmd_serr <= req.wdata[CMD_BIT_SERR];
      // Status: write 1 to clear; a new event in the same cycle wins
      if (wr_cmd && req.be[3] && req.wdata[STAT_BIT_DET_PERR + 16]) st_det_perr <= 1'b0;
      if (wr_cmd && req.be[3] && req.wdata[STAT_BIT_SIG_SERR + 16])      st_sig_serr <= 1'b0;
      if (det_perr_set) st_det_perr <= 1'b1;
      if (sig_serr_set) st_sig_serr <= 1'b1;
      if (wr_bar)
        for (int b = IO_SIZE_LOG2; b < 32; b++)
          if (req.be[b / 8]) bar0_base[b] <= req.wdata[b];
      if (wr_intr && req.be[0]) int_line <= req.wdata[7:0];
    end
  end

  logic [15:0] command_reg, status_reg;
  always_comb begin
    command_reg = '0;
    command_reg[CMD_BIT_IO_EN] = cmd_io_en;
    command_reg[CMD_BIT_PER]   = cmd_per;
    command_reg[CMD_BIT_SERR]  = cmd_serr;
    status_reg = '0;
    status_reg[10:9] = DEVSEL_MEDIUM;
    status_reg[STAT_BIT_DET_PERR] = st_det_perr;
    status_reg[STAT_BIT_SIG_SERR] = st_sig_serr;
  end

  always_comb begin
    unique case (rd_dw)
      CFG_ID:        rd_data = {DEVICE_ID, VENDOR_ID};
      CFG_STAT_CMD:  rd_data = {status_reg, command_reg};
      CFG_CLASS_REV: rd_data = {CLASS_CODE, REVISION_ID};
      CFG_BAR0:      rd_data = io_base | 32'h1;
      CFG_SUBSYS:    rd_data = {SUBSYS_ID, SUBSYS_VENDOR_ID};
      CFG_INTR:      rd_data = {24'h0, int_line};
      default:       rd_data = '0;   // BHLC (header type 0), unused BARs, ROM
    endcase
  end

  assign io_en   = cmd_io_en;
  assign per_en  = cmd_per;
  assign serr_en = cmd_serr;
  assign io_base = {bar0_base, {IO_SIZE_LOG2{1'b0}}};

endmodule
