// pci_io_regs: the card's prototyping registers (Register 1, 2 and 3).
//
// NUM_REGS registers of 32 bits each, reached through I/O Read and I/O Write
// transactions at consecutive dwords of the card's I/O window (BAR0):
// offset 0x0 is Register 1, 0x4 Register 2, 0x8 Register 3. A write is a
// one-cycle strobe in req; only the bytes whose enable bit is set change.
// Reads are combinational on rd_idx so the target controller can load the
// value onto AD in the clock before it asserts TRDY#. An index with no
// register behind it reads as zero and ignores writes. WIDTH may not exceed
// the 32-bit data path of req.
//
// Three 32-bit registers for I/O read and write follow the original design; the
// byte-enable handling, the zero reset and the zero read of the unused
// fourth dword are this design's choices.
module pci_io_regs
  import pci_pkg::*;
#(
  parameter int NUM_REGS = 3,
  parameter int WIDTH    = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_req_t          req,      // write strobe, index, byte enables, data
  input  logic [5:0]        rd_idx,   // register read index
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (req.wr) begin
      for (int i = 0; i < NUM_REGS; i++)
        if (req.dw == 6'(i))
          for (int b = 0; b < WIDTH / 8; b++)
            if (req.be[b]) regs[i][b*8 +: 8] <= req.wdata[b*8 +: 8];
    end
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < NUM_REGS; i++)
      if (rd_idx == 6'(i)) rd_data = regs[i];
  end

endmodule
