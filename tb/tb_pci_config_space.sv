// tb_pci_config_space: self-checking test of the Type 0 configuration header.
//
// Reads every one of the 64 header dwords after reset against expected
// values, then checks: BAR0 sizing (all ones written reads back with the
// low IO_SIZE_LOG2 bits fixed, bit 0 = 1) and base programming with byte
// enables; the writable Command bits and the read-only rest; the Status
// error bits set by event pulses and cleared by writing 1 (writing 0 keeps
// them); medium DEVSEL# timing in Status; the Interrupt Line byte; and the
// io_en/per_en/serr_en/io_base outputs.
module tb_pci_config_space;
  import pci_pkg::*;

  localparam logic [15:0] VID = 16'hABCD, DID = 16'h4321;
  localparam logic [23:0] CC  = 24'h118000;

  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [5:0] rd_dw;
  logic [31:0] rd_data, io_base;
  logic det_perr_set, sig_serr_set, io_en, per_en, serr_en;
  int checks = 0, failures = 0;

  pci_config_space #(.VENDOR_ID(VID), .DEVICE_ID(DID), .REVISION_ID(8'h07),
                     .CLASS_CODE(CC), .SUBSYS_VENDOR_ID(16'h1111),
                     .SUBSYS_ID(16'h2222), .IO_SIZE_LOG2(4))
    dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_dw(input logic [5:0] dw, input logic [31:0] exp);
    rd_dw = dw;
    #1;
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("dword %h: got %h expected %h", dw, rd_data, exp);
    end
  endtask

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%s", what); end
  endtask

  task automatic cfg_write(input logic [5:0] dw, input logic [3:0] be, input logic [31:0] d);
    @(negedge clk);
    req.wr = 1; req.dw = dw; req.be = be; req.wdata = d;
    @(negedge clk);
    req.wr = 0;
  endtask

  task automatic pulse(input bit perr, input bit serr);
    @(negedge clk);
    det_perr_set = perr; sig_serr_set = serr;
    @(negedge clk);
    det_perr_set = 0; sig_serr_set = 0;
  endtask

  initial begin
    req = '0; rd_dw = '0; det_perr_set = 0; sig_serr_set = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int i = 0; i < 64; i++) begin
      logic [31:0] e;
      case (i)
        0:  e = {DID, VID};
        1:  e = 32'h0200_0000;
        2:  e = {CC, 8'h07};
        4:  e = 32'h0000_0001;
        11: e = 32'h2222_1111;
        default: e = '0;
      endcase
      expect_dw(6'(i), e);
    end
    chk(!io_en && !per_en && !serr_en && io_base == 0, "reset outputs");

    // BAR0 sizing and programming
    cfg_write(CFG_BAR0, 4'hF, 32'hFFFF_FFFF);
    expect_dw(CFG_BAR0, 32'hFFFF_FFF1);
    cfg_write(CFG_BAR0, 4'hF, 32'h0000_0000);
    cfg_write(CFG_BAR0, 4'b0011, 32'hDEAD_E35F);
    expect_dw(CFG_BAR0, 32'h0000_E351);
    chk(io_base == 32'h0000_E350, "io_base output");
    cfg_write(CFG_BAR0, 4'b1100, 32'h1234_0000);
    expect_dw(CFG_BAR0, 32'h1234_E351);

    // Command: only bits 0, 6, 8 writable
    cfg_write(CFG_STAT_CMD, 4'b0011, 32'h0000_FFFF);
    expect_dw(CFG_STAT_CMD, 32'h0200_0141);
    chk(io_en && per_en && serr_en, "command outputs set");
    cfg_write(CFG_STAT_CMD, 4'b0010, 32'h0000_0000);   // clear SERR# enable only
    expect_dw(CFG_STAT_CMD, 32'h0200_0041);
    chk(io_en && per_en && !serr_en, "byte 1 write");

    // Status error bits: set by events, write-1-to-clear
    pulse(1, 0);
    expect_dw(CFG_STAT_CMD, 32'h8200_0041);
    pulse(0, 1);
    expect_dw(CFG_STAT_CMD, 32'hC200_0041);
    cfg_write(CFG_STAT_CMD, 4'b1100, 32'h3FFF_0000);   // writing 0s keeps them
    expect_dw(CFG_STAT_CMD, 32'hC200_0041);
    cfg_write(CFG_STAT_CMD, 4'b1000, 32'h8000_0000);   // clear bit 15
    expect_dw(CFG_STAT_CMD, 32'h4200_0041);
    cfg_write(CFG_STAT_CMD, 4'b1100, 32'h4000_0000);   // clear bit 14
    expect_dw(CFG_STAT_CMD, 32'h0200_0041);

    // Interrupt Line
    cfg_write(CFG_INTR, 4'hF, 32'hFFFF_FF0B);
    expect_dw(CFG_INTR, 32'h0000_000B);
    // read-only dwords ignore writes
    cfg_write(CFG_ID, 4'hF, 32'h0);
    expect_dw(CFG_ID, {DID, VID});
    cfg_write(6'h05, 4'hF, 32'hFFFF_FFFF);
    expect_dw(6'h05, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
