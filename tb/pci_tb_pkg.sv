// pci_tb_pkg: types shared by the PCI testbenches.
//
// xres_t is what one bus transaction issued by pci_master_bfm reports:
// whether a target claimed it, the clocks from the address phase to DEVSEL#
// and to the first TRDY#, whether STOP# was seen, how many data phases
// transferred, and the data read in the first phase.
package pci_tb_pkg;
  typedef struct {
    bit          claimed;
    int          devsel_lat;   // clocks after the address phase
    int          trdy_lat;
    bit          stopped;
    int          nxfer;
    logic [31:0] rdata;
    int          cycles;       // clocks from address phase to bus idle
  } xres_t;
endpackage
