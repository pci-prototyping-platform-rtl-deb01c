// tb_pci_proto_top: end-to-end test of the PCI prototyping card.
//
// The card, at its default parameters, sits on a modelled PCI bus with
// pci_master_bfm as the host. The test follows what configuration software
// and a user program do: read the identity registers, size BAR0 by writing
// all ones, assign an I/O base, enable I/O space, parity response and SERR#,
// then write and read Registers 1-3 with full and partial byte enables and
// IRDY# wait states. It then provokes each mechanism of the card: a master
// abort (I/O disabled and outside the window), a burst attempt disconnected
// with STOP#, a write data parity error (PERR#), an address parity error
// (SERR#), a data parity error with Parity Error Response off, clearing the
// Status error bits by writing 1, and the TST_AD and TST_PAR tri-state test
// inputs.
//
// Bus monitors check on every clock: no two drivers on AD or PAR; PAR in the
// clock after target read data equals the even parity of that AD and C/BE#;
// PERR# low exactly two clocks after a write transfer and SERR# low exactly
// two clocks after an address phase. Every claimed transaction must show
// DEVSEL# and TRDY# two clocks after its address phase. Each mechanism is
// counted, and one that never happened counts as a failure.
module tb_pci_proto_top;
  import pci_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic frame_n, irdy_n, idsel, m_ad_oe, m_par, m_par_oe;
  logic [31:0] m_ad, ad, ad_o;
  logic [3:0]  cbe;
  logic tst_ad = 0, tst_par = 0;
  logic ad_oe, par_o, par_oe, devsel_n_o, trdy_n_o, stop_n_o, ctl_oe;
  logic perr_n_o, perr_oe, serr_oe;
  logic par, devsel_n, trdy_n, stop_n, perr_n, serr_n;
  int checks = 0, failures = 0;

  assign ad       = ad_oe ? ad_o : (m_ad_oe ? m_ad : 32'h0);
  assign par      = par_oe ? par_o : (m_par_oe ? m_par : 1'b0);
  assign devsel_n = ctl_oe ? devsel_n_o : 1'b1;
  assign trdy_n   = ctl_oe ? trdy_n_o   : 1'b1;
  assign stop_n   = ctl_oe ? stop_n_o   : 1'b1;
  assign perr_n   = perr_oe ? perr_n_o  : 1'b1;
  assign serr_n   = !serr_oe;

  pci_proto_top dut (
    .clk, .rst_n, .frame_n, .irdy_n, .idsel, .ad_i(ad), .cbe_i(cbe), .par_i(par),
    .tst_ad, .tst_par, .ad_o, .ad_oe, .par_o, .par_oe,
    .devsel_n_o, .trdy_n_o, .stop_n_o, .ctl_oe, .perr_n_o, .perr_oe, .serr_oe
  );

  pci_master_bfm bfm (
    .clk, .frame_n, .irdy_n, .idsel, .m_ad, .m_ad_oe, .cbe, .m_par, .m_par_oe,
    .ad, .devsel_n, .trdy_n, .stop_n
  );

  always #15 clk = ~clk;     // 30-unit period: 33 MHz with 1 ns units

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

  // ---------------------------------------------------------------- monitors
  int cyc = 0, last_addr_cyc = -10, last_wx_cyc = -10;
  bit prev_idle = 0, cur_write = 0, prev_t_drv = 0;
  logic [31:0] prev_ad;
  logic [3:0]  prev_cbe;
  int n_par_gen = 0, n_perr = 0, n_serr = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ad_oe && m_ad_oe) begin failures++; $display("%0t: AD contention", $time); end
    if (par_oe && m_par_oe) begin failures++; $display("%0t: PAR contention", $time); end
    if (!frame_n && prev_idle) begin last_addr_cyc = cyc; cur_write = cbe[0]; end
    prev_idle = frame_n && irdy_n;
    if (!irdy_n && !trdy_n && cur_write) last_wx_cyc = cyc;
    if (prev_t_drv && !tst_par) begin
      checks++;
      n_par_gen++;
      if (!(par_oe && par == ^{prev_ad, prev_cbe})) begin
        failures++; $display("%0t: read PAR wrong", $time);
      end
    end
    prev_t_drv = ad_oe; prev_ad = ad; prev_cbe = cbe;
    if (!perr_n) begin
      n_perr++; checks++;
      if (cyc != last_wx_cyc + 2) begin failures++; $display("%0t: PERR# timing", $time); end
    end
    if (!serr_n) begin
      n_serr++; checks++;
      if (cyc != last_addr_cyc + 2) begin failures++; $display("%0t: SERR# timing", $time); end
    end
  end

  // ---------------------------------------------------------------- helpers
  localparam logic [3:0] IO_RD = 4'b0010, IO_WR = 4'b0011, CFG_RD = 4'b1010, CFG_WR = 4'b1011;
  int n_cfg_rd = 0, n_cfg_wr = 0, n_io_rd = 0, n_io_wr = 0, n_abort = 0;
  int n_disc = 0, n_wait = 0, n_tst_ad = 0, n_tst_par = 0, n_w1c = 0, n_partial = 0;

  task automatic go(input logic [3:0] cmd, input logic [31:0] addr, input logic [3:0] be,
                    input logic [31:0] wdata, input int ws, input bit burst,
                    input bit bad_apar, input bit bad_dpar, output xres_t r);
    bfm.xact(cmd, addr, be, wdata, ws, burst, bad_apar, bad_dpar, r);
    if (r.claimed) begin
      chk(r.devsel_lat == 2 && r.trdy_lat == 2,
          $sformatf("DEVSEL#/TRDY# after %0d/%0d clocks", r.devsel_lat, r.trdy_lat));
      chk(r.nxfer == 1, "one data phase");
      case (cmd)
        IO_RD: n_io_rd++;  IO_WR: n_io_wr++;
        CFG_RD: n_cfg_rd++; CFG_WR: n_cfg_wr++;
        default: ;
      endcase
      if (r.stopped) n_disc++;
      if (ws > 0) n_wait++;
    end else begin
      n_abort++;
    end
  endtask

  task automatic cfg_read(input logic [5:0] dw, output logic [31:0] d);
    xres_t r;
    go(CFG_RD, {24'h0, dw, 2'b00}, 4'hF, 0, 0, 0, 0, 0, r);
    chk(r.claimed, "config read claimed");
    d = r.rdata;
  endtask

  task automatic cfg_write(input logic [5:0] dw, input logic [3:0] be, input logic [31:0] d);
    xres_t r;
    go(CFG_WR, {24'h0, dw, 2'b00}, be, d, 0, 0, 0, 0, r);
    chk(r.claimed, "config write claimed");
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    xres_t r;
    logic [31:0] d, base, size;
    logic [31:0] model [4];
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    bfm.idle(4);

    // identity
    cfg_read(6'h00, d); chk(d == 32'h0001_1234, $sformatf("Device/Vendor ID %h", d));
    cfg_read(6'h01, d); chk(d == 32'h0200_0000, $sformatf("Status/Command %h", d));
    cfg_read(6'h02, d); chk(d == 32'hFF00_0001, $sformatf("Class/Revision %h", d));
    cfg_read(6'h03, d); chk(d == 32'h0, "header type 0");
    // BAR0 sizing and assignment
    cfg_write(6'h04, 4'hF, 32'hFFFF_FFFF);
    cfg_read(6'h04, d);
    chk(d[0] == 1'b1, "BAR0 is an I/O BAR");
    size = ~(d & 32'hFFFF_FFFC) + 1;
    chk(size == 16, $sformatf("I/O window %0d bytes", size));
    base = 32'h0000_E000;
    cfg_write(6'h04, 4'hF, base);
    cfg_read(6'h04, d); chk(d == (base | 1), "BAR0 base");
    // I/O not yet enabled: master abort
    go(IO_RD, base, 4'hF, 0, 0, 0, 0, 0, r);
    chk(!r.claimed, "I/O disabled ignored");
    cfg_write(6'h01, 4'b0011, 32'h0000_0141);
    cfg_read(6'h01, d); chk(d == 32'h0200_0141, $sformatf("Command %h", d));

    // Registers 1-3
    for (int i = 0; i < 4; i++) model[i] = 0;
    for (int n = 0; n < 40; n++) begin
      int idx;
      logic [3:0] be;
      logic [31:0] v;
      idx = $urandom_range(0, 3);
      be  = (n < 6) ? 4'hF : 4'($urandom);
      v   = $urandom;
      go(IO_WR, base + 32'(idx * 4), be, v, $urandom_range(0, 2), 0, 0, 0, r);
      chk(r.claimed, "I/O write claimed");
      if (idx < 3)
        for (int b = 0; b < 4; b++) if (be[b]) model[idx][b*8 +: 8] = v[b*8 +: 8];
      if (be != 4'hF) n_partial++;
      for (int k = 0; k < 4; k++) begin
        go(IO_RD, base + 32'(k * 4), 4'hF, 0, $urandom_range(0, 2), 0, 0, 0, r);
        chk(r.claimed && r.rdata == model[k],
            $sformatf("Register %0d read %h expected %h", k + 1, r.rdata, model[k]));
      end
    end
    go(IO_RD, base + 32'h10, 4'hF, 0, 0, 0, 0, 0, r);
    chk(!r.claimed, "outside the I/O window ignored");

    // burst attempt: disconnect after one data phase
    go(IO_WR, base, 4'hF, 32'hA5A5_0000, 0, 1, 0, 0, r);
    chk(r.claimed && r.stopped && r.nxfer == 1, "burst write disconnected");
    model[0] = 32'hA5A5_0000;
    go(IO_RD, base + 4, 4'hF, 0, 0, 0, 0, 0, r);
    chk(r.rdata == model[1], "second burst word not written");
    go(IO_RD, base, 4'hF, 0, 0, 1, 0, 0, r);
    chk(r.claimed && r.stopped && r.rdata == model[0], "burst read disconnected");

    // data parity error on a write: PERR#, status bit 15, data still taken
    begin
      int p0;
      p0 = n_perr;
      go(IO_WR, base + 8, 4'hF, 32'h0BAD_DA7A, 0, 0, 0, 1, r);
      model[2] = 32'h0BAD_DA7A;
      bfm.idle(2);
      chk(n_perr == p0 + 1, "PERR# asserted once");
      cfg_read(6'h01, d); chk(d == 32'h8200_0141, $sformatf("Status after PERR %h", d));
      go(IO_RD, base + 8, 4'hF, 0, 0, 0, 0, 0, r);
      chk(r.rdata == model[2], "write with parity error kept");
      cfg_write(6'h01, 4'b1000, 32'h8000_0000);
      cfg_read(6'h01, d); chk(d == 32'h0200_0141, "Status bit 15 cleared");
      n_w1c++;
    end

    // address parity error: SERR#, status bits 14 and 15
    begin
      int s0;
      s0 = n_serr;
      go(CFG_RD, 32'h0000_0000, 4'hF, 0, 0, 0, 1, 0, r);
      bfm.idle(2);
      chk(n_serr == s0 + 1, "SERR# asserted once");
      cfg_read(6'h01, d); chk(d == 32'hC200_0141, $sformatf("Status after SERR %h", d));
      cfg_write(6'h01, 4'b1100, 32'hC000_0000);
      cfg_read(6'h01, d); chk(d == 32'h0200_0141, "Status bits 14/15 cleared");
      n_w1c++;
    end

    // parity response off: no PERR#/SERR#, but the error is still detected
    cfg_write(6'h01, 4'b0011, 32'h0000_0001);
    begin
      int p0, s0;
      p0 = n_perr; s0 = n_serr;
      go(IO_WR, base, 4'hF, 32'h1357_9BDF, 1, 0, 0, 1, r);
      model[0] = 32'h1357_9BDF;
      go(IO_RD, base, 4'hF, 0, 0, 0, 1, 0, r);
      bfm.idle(2);
      chk(n_perr == p0 && n_serr == s0, $sformatf("no PERR#/SERR# with response off %0d %0d %0d %0d", n_perr, p0, n_serr, s0));
      cfg_read(6'h01, d); chk(d == 32'h8200_0001, $sformatf("Status with response off %h", d));
    end

    // TST_AD: AD released, read returns the floating bus
    tst_ad = 1;
    go(IO_RD, base, 4'hF, 0, 0, 0, 0, 0, r);
    chk(r.claimed && r.rdata == 32'h0, "TST_AD releases AD");
    n_tst_ad++;
    tst_ad = 0;
    // TST_PAR: PAR released, data still read
    tst_par = 1;
    begin
      int g0;
      g0 = n_par_gen;
      go(IO_RD, base, 4'hF, 0, 0, 0, 0, 0, r);
      chk(r.rdata == model[0] && n_par_gen == g0, $sformatf("TST_PAR releases PAR only %h %h %0d %0d", r.rdata, model[0], n_par_gen, g0));
      n_tst_par++;
    end
    tst_par = 0;
    bfm.idle(4);

    // every mechanism must have happened
    chk(n_cfg_rd > 0, "config read");   chk(n_cfg_wr > 0, "config write");
    chk(n_io_rd > 0, "I/O read");       chk(n_io_wr > 0, "I/O write");
    chk(n_abort > 0, "master abort");   chk(n_disc > 0, "disconnect");
    chk(n_wait > 0, "IRDY# wait states"); chk(n_partial > 0, "partial byte write");
    chk(n_perr > 0, "PERR#");           chk(n_serr > 0, "SERR#");
    chk(n_par_gen > 0, "PAR generation"); chk(n_w1c > 0, "status clear");
    chk(n_tst_ad > 0, "TST_AD");        chk(n_tst_par > 0, "TST_PAR");
    $display("mechanisms: cfg_rd=%0d cfg_wr=%0d io_rd=%0d io_wr=%0d abort=%0d disconnect=%0d wait=%0d partial=%0d perr=%0d serr=%0d par_gen=%0d w1c=%0d tst_ad=%0d tst_par=%0d",
             n_cfg_rd, n_cfg_wr, n_io_rd, n_io_wr, n_abort, n_disc, n_wait, n_partial,
             n_perr, n_serr, n_par_gen, n_w1c, n_tst_ad, n_tst_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
