// tb_pci_target_ctrl: self-checking test of the PCI target sequencer.
//
// The controller runs alone against pci_master_bfm. The configuration space
// and the I/O registers are replaced by testbench models: configuration
// reads return a pattern built from the dword number, I/O reads return a
// reference array that I/O writes update. The test checks, per transaction:
// claim or no claim (I/O window hit and I/O enable, IDSEL and Type 0 for
// configuration, unsupported commands ignored), DEVSEL# and TRDY# exactly
// two clocks after the address phase, read data, one write strobe with the
// bus data and byte enables, IRDY# wait states, STOP# on a burst attempt
// with one transfer only, and one chk_addr pulse per address phase and one
// chk_data pulse per write transfer. AD is checked for contention.
module tb_pci_target_ctrl;
  import pci_pkg::*;
  import pci_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic frame_n, irdy_n, idsel, m_ad_oe, m_par, m_par_oe;
  logic [31:0] m_ad, ad, ad_o;
  logic [3:0]  cbe;
  logic ad_oe, devsel_n_o, trdy_n_o, stop_n_o, ctl_oe;
  logic devsel_n, trdy_n, stop_n;
  logic io_en;
  logic [31:0] io_base, cfg_rd_data, io_rd_data;
  reg_req_t cfg_req, io_req;
  logic [5:0] cfg_rd_dw, io_rd_idx;
  logic chk_addr, chk_data;
  int checks = 0, failures = 0;
  int n_cfg_wr = 0, n_io_wr = 0, n_chk_addr = 0, n_chk_data = 0;
  reg_req_t last_wr;
  logic [31:0] io_model [4];

  assign ad       = ad_oe ? ad_o : (m_ad_oe ? m_ad : 32'h0);
  assign devsel_n = ctl_oe ? devsel_n_o : 1'b1;
  assign trdy_n   = ctl_oe ? trdy_n_o   : 1'b1;
  assign stop_n   = ctl_oe ? stop_n_o   : 1'b1;

  pci_target_ctrl #(.IO_SIZE_LOG2(4)) dut (
    .clk, .rst_n, .frame_n, .irdy_n, .idsel, .ad_i(ad), .cbe_i(cbe),
    .ad_o, .ad_oe, .devsel_n_o, .trdy_n_o, .stop_n_o, .ctl_oe,
    .io_en, .io_base, .cfg_req, .cfg_rd_dw, .cfg_rd_data,
    .io_req, .io_rd_idx, .io_rd_data, .chk_addr, .chk_data
  );

  pci_master_bfm bfm (
    .clk, .frame_n, .irdy_n, .idsel, .m_ad, .m_ad_oe, .cbe, .m_par, .m_par_oe,
    .ad, .devsel_n, .trdy_n, .stop_n
  );

  assign cfg_rd_data = {16'hC0F6, 10'h0, cfg_rd_dw};
  assign io_rd_data  = io_model[io_rd_idx[1:0]];

  always #15 clk = ~clk;

  always @(posedge clk) begin
    if (ad_oe && m_ad_oe) begin failures++; $display("%0t: AD contention", $time); end
    if (cfg_req.wr) begin n_cfg_wr++; last_wr = cfg_req; end
    if (io_req.wr) begin
      n_io_wr++; last_wr = io_req;
      for (int b = 0; b < 4; b++)
        if (io_req.be[b]) io_model[io_req.dw[1:0]][b*8 +: 8] <= io_req.wdata[b*8 +: 8];
    end
    if (chk_addr) n_chk_addr++;
    if (chk_data) n_chk_data++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  // one transaction with bookkeeping of strobes
  task automatic run(input logic [3:0] cmd, input logic [31:0] addr, input logic [3:0] be,
                     input logic [31:0] wdata, input int ws, input bit burst,
                     input bit expect_claim, output xres_t r);
    int cw0, iw0, ca0, cd0;
    cw0 = n_cfg_wr; iw0 = n_io_wr; ca0 = n_chk_addr; cd0 = n_chk_data;
    bfm.xact(cmd, addr, be, wdata, ws, burst, 0, 0, r);
    chk(r.claimed == expect_claim, $sformatf("claim %0d for cmd %h addr %h", r.claimed, cmd, addr));
    chk(n_chk_addr == ca0 + 1, "chk_addr count");
    if (expect_claim) begin
      chk(r.devsel_lat == 2 && r.trdy_lat == 2, $sformatf("latency %0d/%0d", r.devsel_lat, r.trdy_lat));
      chk(r.nxfer == 1, "one transfer");
      chk(r.stopped == (burst || ws > 0), "STOP# as expected");
      if (cmd[0]) begin
        chk(n_chk_data == cd0 + 1, "chk_data count");
        chk(last_wr.wdata == wdata && last_wr.be == be, "write data/be");
      end else begin
        chk(n_chk_data == cd0, "no chk_data for read");
      end
      chk((n_cfg_wr - cw0) == int'(cmd == 4'b1011), "config write strobes");
      chk((n_io_wr - iw0) == int'(cmd == 4'b0011), "io write strobes");
    end else begin
      chk(n_cfg_wr == cw0 && n_io_wr == iw0 && n_chk_data == cd0, "no side effect when unclaimed");
    end
  endtask

  initial begin
    xres_t r;
    logic [31:0] base;
    io_en = 0; io_base = 32'h0000_E000; base = io_base;
    for (int i = 0; i < 4; i++) io_model[i] = 32'h1111_1111 * (i + 1);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    bfm.idle(3);

    // configuration accesses
    for (int dw = 0; dw < 16; dw++) begin
      run(4'b1010, 32'(dw << 2), 4'hF, 0, dw % 3, 0, 1, r);
      chk(r.rdata == {16'hC0F6, 10'h0, 6'(dw)}, $sformatf("cfg read dw %0d got %h", dw, r.rdata));
    end
    run(4'b1011, 32'h0000_0004, 4'b1100, 32'h0000_0101, 1, 0, 1, r);
    chk(last_wr.dw == 6'h01, "config write dword");
    run(4'b1010, 32'h0000_0005, 4'hF, 0, 0, 0, 0, r);      // Type 1: not ours
    bfm.no_idsel = 1;                                        // IDSEL low: not ours
    run(4'b1010, 32'h0000_0000, 4'hF, 0, 0, 0, 0, r);
    bfm.no_idsel = 0;
    // I/O disabled: not claimed
    run(4'b0010, base, 4'hF, 0, 0, 0, 0, r);
    io_en = 1;
    // I/O writes and reads, random byte enables and wait states
    for (int n = 0; n < 60; n++) begin
      int idx;
      logic [3:0] be_n;
      logic [31:0] d, exp;
      idx = $urandom_range(0, 3);
      be_n = 4'($urandom);
      d = $urandom;
      run(4'b0011, base + 32'(idx * 4), be_n, d, $urandom_range(0, 3), 0, 1, r);
      chk(last_wr.dw == 6'(idx), "io write index");
      exp = io_model[idx];
      run(4'b0010, base + 32'(idx * 4), 4'hF, 0, $urandom_range(0, 3), 0, 1, r);
      chk(r.rdata == exp, $sformatf("io read %0d got %h exp %h", idx, r.rdata, exp));
    end
    run(4'b0010, base + 32'h10, 4'hF, 0, 0, 0, 0, r);      // outside the window
    run(4'b0010, 32'h0001_E000, 4'hF, 0, 0, 0, 0, r);      // upper bits differ
    run(4'b0110, base, 4'hF, 0, 0, 0, 0, r);               // memory read: not supported
    run(4'b0111, base, 4'h0, 32'h5, 0, 0, 0, r);           // memory write: not supported
    // burst attempts are disconnected after one data phase
    run(4'b0011, base + 4, 4'hF, 32'hCAFE_0001, 0, 1, 1, r);
    run(4'b0010, base + 4, 4'hF, 0, 2, 1, 1, r);
    chk(r.rdata == 32'hCAFE_0001, "read after disconnected write");
    run(4'b1010, 32'h0, 4'hF, 0, 0, 1, 1, r);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
