// pci_target_ctrl: transaction sequencer of the PCI target.
//
// Watches FRAME#/IRDY# for the start of a transaction (FRAME# asserted in
// the clock after an idle bus clock), registers the address, command and
// IDSEL of that address phase, and in the next clock decides whether to
// claim it:
//   - I/O Read / I/O Write when the Command register's I/O Space bit is set
//     and AD[31:IO_SIZE_LOG2] equals the BAR0 base;
//   - Configuration Read / Write (Type 0) when IDSEL was high and AD[1:0]
//     was 00.
// A claimed transaction has one data phase. DEVSEL# and TRDY# are asserted
// together two clocks after the address phase (medium decode); for a read
// the selected register's value is put on AD in that same clock, after the
// one turnaround clock the read needs. Data moves on the first clock edge
// with IRDY# and TRDY# both low; a write strobes req with the bus data and
// byte enables at that edge. If FRAME# is still asserted (the master wants a
// burst, which this target does not support) STOP# is asserted with TRDY#,
// a disconnect with data: after the one transfer the target holds STOP# and
// DEVSEL# until FRAME# goes high. DEVSEL#, TRDY# and STOP# are driven high
// for one clock before they are released (ctl_oe), as PCI requires for
// sustained tri-state signals.
//
// Interface: bus inputs are the sampled PCI lines; ad_o/ad_oe and the _n_o
// outputs with ctl_oe are the values and enables the pads drive. chk_addr
// and chk_data tell the parity checker which clocks to check. Timing: every
// output is registered except req, chk_addr, chk_data and the read indices,
// which are decoded from the current bus inputs and state. The two protocol
// assertions at the end use RST# in their disable condition, which is why a
// lint tool sees rst_n used both as an asynchronous reset and as a signal.
//
// The command set, the Type 0 configuration header and the 32-bit, target
// only operation come from the original design; the decode speed, the single data
// phase with disconnect, and the absence of fast back-to-back support (the
// original design lists burst and fast back-to-back transfers as future work) are
// this design's choices.
module pci_target_ctrl
  import pci_pkg::*;
#(
  parameter int IO_SIZE_LOG2 = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus (sampled)
  input  logic        frame_n,
  input  logic        irdy_n,
  input  logic        idsel,
  input  logic [31:0] ad_i,
  input  logic [3:0]  cbe_i,
  // PCI bus (driven)
  output logic [31:0] ad_o,
  output logic        ad_oe,
  output logic        devsel_n_o,
  output logic        trdy_n_o,
  output logic        stop_n_o,
  output logic        ctl_oe,
  // configuration space
  input  logic        io_en,
  input  logic [31:0] io_base,
  output reg_req_t    cfg_req,
  output logic [5:0]  cfg_rd_dw,
  input  logic [31:0] cfg_rd_data,
  // I/O registers
  output reg_req_t    io_req,
  output logic [5:0]  io_rd_idx,
  input  logic [31:0] io_rd_data,
  // parity checker
  output logic        chk_addr,
  output logic        chk_data
);

  typedef enum logic [2:0] {S_IDLE, S_DECODE, S_DATA, S_BACKOFF, S_TURN} state_e;
  state_e state;

  logic        prev_idle;
  logic [31:0] addr_q;
  pci_cmd_e    cmd_q;
  logic        idsel_q;
  logic        is_cfg_q;     // claimed transaction is a configuration access

  logic addr_phase;
  assign addr_phase = !frame_n && prev_idle;

  // decode, from the registered address phase
  logic cmd_is_io, cmd_is_cfg, hit_io, hit_cfg, is_write;
  assign cmd_is_io  = (cmd_q == CMD_IO_READ)  || (cmd_q == CMD_IO_WRITE);
  assign cmd_is_cfg = (cmd_q == CMD_CFG_READ) || (cmd_q == CMD_CFG_WRITE);
  assign hit_io     = cmd_is_io && io_en &&
                      (addr_q[31:IO_SIZE_LOG2] == io_base[31:IO_SIZE_LOG2]);
  assign hit_cfg    = cmd_is_cfg && idsel_q && (addr_q[1:0] == 2'b00);
  assign is_write   = cmd_q[0];

  assign cfg_rd_dw  = addr_q[7:2];
  assign io_rd_idx  = 6'(addr_q[IO_SIZE_LOG2-1:2]);

  // write transfer in this clock
  logic wr_xfer;
  assign wr_xfer = (state == S_DATA) && !irdy_n && is_write;

  always_comb begin
    cfg_req       = '0;
    io_req        = '0;
    cfg_req.dw    = addr_q[7:2];
    io_req.dw     = 6'(addr_q[IO_SIZE_LOG2-1:2]);
    cfg_req.be    = ~cbe_i;
    io_req.be     = ~cbe_i;
    cfg_req.wdata = ad_i;
    io_req.wdata  = ad_i;
    cfg_req.wr    = wr_xfer && is_cfg_q;
    io_req.wr     = wr_xfer && !is_cfg_q;
  end

  assign chk_addr = addr_phase && (state == S_IDLE);
  assign chk_data = wr_xfer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      prev_idle  <= 1'b0;
      addr_q     <= '0;
      cmd_q      <= CMD_INT_ACK;
      idsel_q    <= 1'b0;
      is_cfg_q   <= 1'b0;
      ad_o       <= '0;
      ad_oe      <= 1'b0;
      devsel_n_o <= 1'b1;
      trdy_n_o   <= 1'b1;
      stop_n_o   <= 1'b1;
      ctl_oe     <= 1'b0;
    end else begin
      prev_idle <= frame_n && irdy_n;
      unique case (state)
        S_IDLE: begin
          ctl_oe <= 1'b0;
          if (addr_phase) begin
            addr_q  <= ad_i;
            cmd_q   <= pci_cmd_e'(cbe_i);
            idsel_q <= idsel;
            state   <= S_DECODE;
          end
        end
        S_DECODE: begin
          if (hit_io || hit_cfg) begin
            is_cfg_q   <= hit_cfg;
            devsel_n_o <= 1'b0;
            trdy_n_o   <= 1'b0;
            stop_n_o   <= frame_n;      // FRAME# still low: disconnect
            ctl_oe     <= 1'b1;
            if (!is_write) begin
              ad_o  <= hit_cfg ? cfg_rd_data : io_rd_data;
              ad_oe <= 1'b1;
            end
            state <= S_DATA;
          end else begin
            state <= S_IDLE;            // not ours: another target or master abort
          end
        end
        S_DATA: begin
          if (!irdy_n) begin
            ad_oe    <= 1'b0;
            trdy_n_o <= 1'b1;
            if (frame_n) begin          // last data phase done
              devsel_n_o <= 1'b1;
              stop_n_o   <= 1'b1;
              state      <= S_TURN;
            end else begin
              state <= S_BACKOFF;       // burst refused, wait for FRAME# high
            end
          end
        end
        S_BACKOFF: begin
          if (frame_n) begin
            devsel_n_o <= 1'b1;
            stop_n_o   <= 1'b1;
            state      <= S_TURN;
          end
        end
        S_TURN: begin
          ctl_oe <= 1'b0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // TRDY# and STOP# are only asserted while DEVSEL# is
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ctl_oe && (!trdy_n_o || !stop_n_o)) |-> !devsel_n_o);
  // read data is only driven while the target holds DEVSEL#
  assert property (@(posedge clk) disable iff (!rst_n) ad_oe |-> (ctl_oe && !devsel_n_o));

endmodule
