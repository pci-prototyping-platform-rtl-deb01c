// tb_pci_parity: self-checking test of PAR generation and parity checking.
//
// Generation: random AD/C/BE# values driven with ad_oe = 1 must produce
// par_o equal to their even parity, and par_oe = 1, one clock later.
// Checking: random address and data phases are sent with correct or
// flipped PAR in the following clock; the test expects det_perr two clocks
// after the phase exactly when PAR was wrong, PERR# low only for a data
// error with Parity Error Response on, PERR# driven for the two clocks
// after, and SERR# only for an address error with both enables on.
module tb_pci_parity;
  logic clk = 0, rst_n = 0;
  logic [31:0] ad_i, ad_o;
  logic [3:0]  cbe_i;
  logic        par_i, ad_oe, chk_addr, chk_data, per_en, serr_en;
  logic        par_o, par_oe, perr_n_o, perr_oe, serr_oe, det_perr, sig_serr;
  int checks = 0, failures = 0;

  pci_parity dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    ad_i = '0; ad_o = '0; cbe_i = '0; par_i = 0; ad_oe = 0;
    chk_addr = 0; chk_data = 0; per_en = 0; serr_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // generation
    for (int n = 0; n < 200; n++) begin
      logic exp;
      @(negedge clk);
      ad_o = $urandom; cbe_i = 4'($urandom); ad_oe = 1;
      exp = ^{ad_o, cbe_i};
      @(negedge clk);
      chk(par_o == exp && par_oe, "generated PAR wrong");
      ad_oe = 0;
      @(negedge clk);
      chk(!par_oe, "par_oe not released");
    end

    // checking
    for (int n = 0; n < 400; n++) begin
      logic is_addr, bad;
      @(negedge clk);
      is_addr = 1'($urandom);
      bad     = ($urandom_range(0, 2) == 0);
      per_en  = 1'($urandom);
      serr_en = 1'($urandom);
      ad_i = $urandom; cbe_i = 4'($urandom);
      chk_addr = is_addr; chk_data = !is_addr;
      @(negedge clk);                       // phase + 1: PAR on the bus
      chk_addr = 0; chk_data = 0;
      par_i = ^{ad_i, cbe_i} ^ bad;
      ad_i = $urandom; cbe_i = 4'($urandom);
      chk(det_perr == 0, "early error report");
      @(negedge clk);                       // phase + 2: report
      chk(det_perr == bad, "det_perr wrong");
      chk(perr_oe == !is_addr, "PERR# enable wrong at +2");
      chk(perr_n_o == !(bad && !is_addr && per_en), "PERR# level wrong");
      chk(serr_oe == (bad && is_addr && per_en && serr_en), "SERR# wrong");
      chk(sig_serr == serr_oe, "sig_serr wrong");
      @(negedge clk);                       // phase + 3: PERR# driven high
      chk(perr_oe == !is_addr && perr_n_o, "PERR# not driven high at +3");
      chk(!serr_oe && !det_perr, "error held too long");
      @(negedge clk);
      chk(!perr_oe, "PERR# not released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
