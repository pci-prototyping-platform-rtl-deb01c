// pci_parity: parity generation and checking for the PCI target.
//
// PCI parity is even over AD[31:0], C/BE#[3:0] and PAR: PAR is the XOR of
// the 36 AD and C/BE# bits and always follows them by one clock.
//
// Generation: while the target drives AD (read data), par_o is loaded each
// clock with the XOR of the driven AD value and the C/BE# lines the master
// drives, and par_oe follows ad_oe one clock late, so PAR is on the bus in
// the clock after its data.
//
// Checking: chk_addr marks an address phase, chk_data a write data phase
// whose data this target took. In that clock the XOR of AD and C/BE# is
// registered; in the next clock it is compared with PAR. A mismatch is
// reported in the clock after that (two clocks after the phase):
//   - det_perr pulses on any mismatch (Status bit 15, set whatever the
//     Command register says);
//   - a data-phase error drives PERR# low if Parity Error Response is set;
//     the target drives PERR# in that clock and, high, one clock more before
//     releasing it (a sustained tri-state signal);
//   - an address-phase error pulls SERR# low (serr_oe) for one clock if both
//     SERR# Enable and Parity Error Response are set, and pulses sig_serr.
//
// The original design says this block uses XOR gates to generate and check parity
// in the address and data phases; the PERR#/SERR# timing and enables follow
// the PCI specification.
module pci_parity (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] ad_i,       // AD as seen on the bus
  input  logic [3:0]  cbe_i,      // C/BE# as seen on the bus
  input  logic        par_i,      // PAR as seen on the bus
  input  logic [31:0] ad_o,       // AD value this target drives
  input  logic        ad_oe,      // this target drives AD in this clock
  input  logic        chk_addr,   // this clock is an address phase
  input  logic        chk_data,   // this clock is a write data transfer to us
  input  logic        per_en,     // Command: Parity Error Response
  input  logic        serr_en,    // Command: SERR# Enable
  output logic        par_o,
  output logic        par_oe,
  output logic        perr_n_o,
  output logic        perr_oe,
  output logic        serr_oe,    // open drain: 1 pulls SERR# low
  output logic        det_perr,   // pulse: parity error detected
  output logic        sig_serr    // pulse: SERR# asserted
);

  logic calc_par, pend_addr, pend_data;
  logic addr_err, data_err, perr_drv, perr_drv_d;
  logic mismatch;

  assign mismatch = calc_par ^ par_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_o      <= 1'b0;
      par_oe     <= 1'b0;
      calc_par   <= 1'b0;
      pend_addr  <= 1'b0;
      pend_data  <= 1'b0;
      addr_err   <= 1'b0;
      data_err   <= 1'b0;
      perr_drv   <= 1'b0;
      perr_drv_d <= 1'b0;
    end else begin
      // generation for the data we drive
      par_o      <= ^{ad_o, cbe_i};
      par_oe     <= ad_oe;
      // checking: stage 1 takes the phase, stage 2 compares with PAR
      calc_par   <= ^{ad_i, cbe_i};
      pend_addr  <= chk_addr;
      pend_data  <= chk_data;
      addr_err   <= pend_addr && mismatch;
      data_err   <= pend_data && mismatch;
      perr_drv   <= pend_data;
      perr_drv_d <= perr_drv;
    end
  end

  assign det_perr = addr_err || data_err;
  assign perr_oe  = perr_drv || perr_drv_d;
  assign perr_n_o = !(data_err && per_en);
  assign serr_oe  = addr_err && serr_en && per_en;
  assign sig_serr = serr_oe;

endmodule
