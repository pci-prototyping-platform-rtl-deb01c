// pci_master_bfm: behavioural PCI bus master (initiator) for testbenches.
//
// Stands for the host side of the bus. Its task xact() runs one transaction
// clock by clock: address phase (FRAME# low, address and command on AD and
// C/BE#, IDSEL for configuration cycles), PAR one clock after every phase
// it drives (optionally wrong, to provoke parity errors), a chosen number
// of IRDY# wait states, one data phase or an attempted two-phase burst, and
// the PCI ending rules: FRAME# goes high when IRDY# is asserted for the last
// phase or after STOP#, IRDY# goes high after the last transfer, and a
// transaction no target claims by the fifth clock is master-aborted.
//
// Master outputs change at the falling clock edge and the target outputs
// are read just after it, so each loop iteration is one bus clock as the
// target samples it at the next rising edge.
module pci_master_bfm
  import pci_tb_pkg::*;
(
  input  logic        clk,
  output logic        frame_n,
  output logic        irdy_n,
  output logic        idsel,
  output logic [31:0] m_ad,
  output logic        m_ad_oe,
  output logic [3:0]  cbe,
  output logic        m_par,
  output logic        m_par_oe,
  input  logic [31:0] ad,        // resolved bus
  input  logic        devsel_n,
  input  logic        trdy_n,
  input  logic        stop_n
);

  bit no_idsel = 0;   // set to issue configuration cycles with IDSEL low

  initial begin
    frame_n = 1; irdy_n = 1; idsel = 0; m_ad = '0; m_ad_oe = 0;
    cbe = '1; m_par = 0; m_par_oe = 0;
  end

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic xact(input logic [3:0] cmd, input logic [31:0] addr,
                      input logic [3:0] be, input logic [31:0] wdata,  // be: active-high byte enables
                      input int wait_states, input bit burst,
                      input bit bad_apar, input bit bad_dpar,
                      output xres_t res);
    bit          is_write, is_cfg, prev_xfer, prev_stop, done, frame_q;
    bit          drove_prev, prev_is_addr, flip;
    logic [31:0] prev_ad;
    logic [3:0]  prev_cbe;
    int          want, c;
    is_write = cmd[0];
    is_cfg   = (cmd[3:1] == 3'b101);
    want     = burst ? 2 : 1;
    res = '{claimed: 0, devsel_lat: -1, trdy_lat: -1, stopped: 0,
            nxfer: 0, rdata: '0, cycles: 0};

    // address phase
    @(negedge clk);
    frame_n = 0; irdy_n = 1; idsel = is_cfg && !no_idsel;
    m_ad = addr; m_ad_oe = 1; cbe = cmd;
    drove_prev = 1; prev_is_addr = 1; prev_ad = addr; prev_cbe = cmd;
    prev_xfer = 0; prev_stop = 0; done = 0;
    c = 0;
    while (!done) begin
      @(negedge clk);
      c++;
      // PAR for what the master put on AD and C/BE# last clock
      flip = (prev_is_addr && bad_apar) || (prev_xfer && res.nxfer == 0 && bad_dpar);
      m_par    = ^{prev_ad, prev_cbe} ^ flip;
      m_par_oe = drove_prev;
      idsel    = 0;
      if (prev_xfer) res.nxfer++;
      frame_q = frame_n;
      if (frame_q && (prev_xfer || prev_stop)) begin
        // last phase ended last clock: release the bus
        irdy_n = 1; cbe = '1; m_ad_oe = 0;
        done = 1;
      end else if (!res.claimed && c >= 5) begin
        // master abort
        if (!frame_q) begin
          frame_n = 1; irdy_n = 0;
        end else begin
          irdy_n = 1; cbe = '1; m_ad_oe = 0; done = 1;
        end
      end else begin
        cbe = ~be;
        m_ad = wdata + 32'(res.nxfer);
        m_ad_oe = is_write;
        if (c > wait_states) irdy_n = 0;
        if (!irdy_n && (prev_stop || res.nxfer == want - 1)) frame_n = 1;
      end
      drove_prev = m_ad_oe; prev_is_addr = 0; prev_ad = m_ad; prev_cbe = cbe;
      // sample the target in this clock
      #1;
      if (!devsel_n && !res.claimed) begin res.claimed = 1; res.devsel_lat = c; end
      if (!trdy_n && res.trdy_lat < 0) res.trdy_lat = c;
      if (!stop_n) res.stopped = 1;
      prev_stop = !stop_n && !devsel_n;
      prev_xfer = !irdy_n && !trdy_n && !done;
      if (prev_xfer && res.nxfer == 0 && !is_write) res.rdata = ad;
    end
    res.cycles = c;
    // PAR of the last driven clock, then the master releases PAR
    @(negedge clk);
    m_par    = ^{prev_ad, prev_cbe};
    m_par_oe = drove_prev;
    @(negedge clk);
    m_par_oe = 0;
  endtask

endmodule
