// pci_proto_top: PCI prototyping platform, a 32-bit 33 MHz target-only card.
//
// The card answers four PCI commands: Configuration Read and Write to its
// Type 0 header (pci_config_space), and I/O Read and I/O Write to three
// 32-bit prototyping registers (pci_io_regs) in the I/O window that the
// configuration software assigns through BAR0. pci_target_ctrl runs the bus
// protocol; pci_parity generates PAR for read data and checks PAR on address
// and write data phases, reporting errors on PERR# and SERR#.
//
// Bus pins are split into input, output and output-enable, so the pads (or a
// testbench) resolve the tri-state lines: AD[31:0], PAR, DEVSEL#, TRDY#,
// STOP# and PERR# are driven when their _oe is 1; SERR# is open drain and
// pulled low when serr_oe is 1. Two test inputs force lines to high
// impedance: tst_ad = 1 releases AD, tst_par = 1 releases PAR.
//
// Timing: medium DEVSEL# decode. For a transaction whose address phase is
// clock A, DEVSEL# and TRDY# are low in clock A+2 (with read data on AD),
// and stay low until IRDY# is sampled low; PAR follows AD by one clock;
// PERR#/SERR# appear two clocks after the phase in error. One data phase
// per transaction; a burst attempt is disconnected with STOP# after it.
//
// The components, the command set, the bus width and the test inputs follow
// the original design; decode timing, disconnect behaviour and the ID values are
// this design's own.
module pci_proto_top
  import pci_pkg::*;
#(
  parameter logic [15:0] VENDOR_ID    = 16'h1234,
  parameter logic [15:0] DEVICE_ID    = 16'h0001,
  parameter logic [7:0]  REVISION_ID  = 8'h01,
  parameter logic [23:0] CLASS_CODE   = 24'hFF0000,
  parameter int          NUM_REGS     = 3,
  parameter int          IO_SIZE_LOG2 = 4
) (
  input  logic        clk,        // PCI CLK, 33 MHz
  input  logic        rst_n,      // PCI RST#
  input  logic        frame_n,
  input  logic        irdy_n,
  input  logic        idsel,
  input  logic [31:0] ad_i,
  input  logic [3:0]  cbe_i,      // C/BE#[3:0]
  input  logic        par_i,
  input  logic        tst_ad,     // 1: AD lines tri-stated
  input  logic        tst_par,    // 1: PAR line tri-stated
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        par_o,
  output logic        par_oe,
  output logic        devsel_n_o,
  output logic        trdy_n_o,
  output logic        stop_n_o,
  output logic        ctl_oe,     // enable for DEVSEL#, TRDY#, STOP#
  output logic        perr_n_o,
  output logic        perr_oe,
  output logic        serr_oe     // 1: pull SERR# low
);

  reg_req_t    cfg_req, io_req;
  logic [5:0]  cfg_rd_dw, io_rd_idx;
  logic [31:0] cfg_rd_data, io_rd_data, io_base;
  logic        io_en, per_en, serr_en;
  logic        det_perr, sig_serr, chk_addr, chk_data;
  logic [31:0] ctrl_ad_o;
  logic        ctrl_ad_oe, par_drv_oe;

  pci_target_ctrl #(.IO_SIZE_LOG2(IO_SIZE_LOG2)) u_ctrl (
    .clk, .rst_n, .frame_n, .irdy_n, .idsel, .ad_i, .cbe_i,
    .ad_o(ctrl_ad_o), .ad_oe(ctrl_ad_oe),
    .devsel_n_o, .trdy_n_o, .stop_n_o, .ctl_oe,
    .io_en, .io_base, .cfg_req, .cfg_rd_dw, .cfg_rd_data,
    .io_req, .io_rd_idx, .io_rd_data, .chk_addr, .chk_data
  );

  pci_config_space #(
    .VENDOR_ID(VENDOR_ID), .DEVICE_ID(DEVICE_ID), .REVISION_ID(REVISION_ID),
    .CLASS_CODE(CLASS_CODE), .IO_SIZE_LOG2(IO_SIZE_LOG2)
  ) u_cfg (
    .clk, .rst_n, .req(cfg_req), .rd_dw(cfg_rd_dw), .rd_data(cfg_rd_data),
    .det_perr_set(det_perr), .sig_serr_set(sig_serr),
    .io_en, .per_en, .serr_en, .io_base
  );

  pci_io_regs #(.NUM_REGS(NUM_REGS)) u_regs (
    .clk, .rst_n, .req(io_req), .rd_idx(io_rd_idx), .rd_data(io_rd_data)
  );

  pci_parity u_par (
    .clk, .rst_n, .ad_i, .cbe_i, .par_i,
    .ad_o(ctrl_ad_o), .ad_oe(ctrl_ad_oe), .chk_addr, .chk_data,
    .per_en, .serr_en,
    .par_o, .par_oe(par_drv_oe), .perr_n_o, .perr_oe, .serr_oe,
    .det_perr, .sig_serr
  );

  // test controls: tri-state AD and PAR on request
  assign ad_o   = ctrl_ad_o;
  assign ad_oe  = ctrl_ad_oe && !tst_ad;
  assign par_oe = par_drv_oe && !tst_par;

endmodule
