// tb_pci_io_regs: self-checking test of the three prototyping registers.
//
// Random writes with random byte enables to every index 0..7 (only 0..2 are
// registers) are mirrored in a reference array; after each write all
// indices are read back and compared. Checks the zero reset, byte-lane
// masking, that indices past the last register read zero, and that the
// read is combinational (valid in the same clock as the index).
module tb_pci_io_regs;
  import pci_pkg::*;

  logic clk = 0, rst_n = 0;
  reg_req_t req;
  logic [5:0] rd_idx;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  logic [31:0] model [8];

  pci_io_regs dut (.clk, .rst_n, .req, .rd_idx, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 8; i++) begin
      rd_idx = 6'(i);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("idx %0d: got %h expected %h", i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    req = '0;
    rd_idx = '0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      req.wr    = 1'b1;
      req.dw    = 6'($urandom_range(0, 7));
      req.be    = 4'($urandom);
      req.wdata = $urandom;
      if (req.dw < 3)
        for (int b = 0; b < 4; b++)
          if (req.be[b]) model[req.dw][b*8 +: 8] = req.wdata[b*8 +: 8];
      @(negedge clk);
      req.wr = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
