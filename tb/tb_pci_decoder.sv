// Self-checking test of pci_decoder, acting as a PCI initiator.
// Runs configuration and I/O reads and writes, with and without initiator
// wait states, two-phase bursts that must end in a disconnect C after the
// first data phase, and accesses that must be ignored (other I/O base,
// memory command, configuration of another function or of type 1). Checks
// the DEVSEL timing (write: first clock after the address phase, read: one
// clock later), the register strobes, their byte enables and the registered
// address.
module tb_pci_decoder;
  import bridge_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_n = 1, irdy_n = 1, idsel = 0;
  logic [31:0] ad = 0;
  logic [3:0] cbe_n = 0;
  logic [31:4] bar0 = 28'h0000E10;
  logic io_enable = 1;
  logic trdy_n, stop_n, devsel_n, t_oe, rd_ad_oe;
  logic [31:0] qa;
  logic io_rd, io_wr, cfg_rd, cfg_wr;
  dec_state_t state;
  int checks = 0, failures = 0;

  pci_decoder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // strobe bookkeeping
  int n_iowr, n_cfgwr, n_iord_clk, n_cfgrd_clk, devsel_clk, stop_seen, transfers;
  logic [3:0] last_be;
  logic [31:0] last_qa;

  // One transaction. phases = data phases the initiator wants (1 or 2).
  // Returns after the bus is idle again.
  task automatic xact(input logic [3:0] cmd, input logic [31:0] addr, input logic sel,
                      input int phases, input int irdy_wait, input logic [3:0] be,
                      input bit expect_claim);
    int clk_no; bit done; bit stop_now;
    n_iowr = 0; n_cfgwr = 0; n_iord_clk = 0; n_cfgrd_clk = 0; devsel_clk = -1;
    stop_seen = 0; transfers = 0;
    @(negedge clk);
    frame_n = 0; ad = addr; cbe_n = cmd; idsel = sel;
    clk_no = 0; done = 0;
    while (!done) begin
      @(posedge clk);
      // sample
      if (!devsel_n && devsel_clk < 0) devsel_clk = clk_no;
      if (io_wr)  begin n_iowr++;  last_be = cbe_n; last_qa = qa; end
      if (cfg_wr) begin n_cfgwr++; last_be = cbe_n; last_qa = qa; end
      if (io_rd)  n_iord_clk++;
      if (cfg_rd) n_cfgrd_clk++;
      stop_now = !stop_n;
      if (!stop_n) stop_seen = 1;
      if (!irdy_n && !trdy_n) transfers++;
      if (!irdy_n && frame_n) done = (!trdy_n || !stop_n);   // final data phase completes
      if (!expect_claim && clk_no == 8) done = 1;              // master abort
      @(negedge clk);
      clk_no++;
      if (done) begin frame_n = 1; irdy_n = 1; break; end
      // drive next clock
      cbe_n = be; idsel = 0;
      ad = (cmd[0]) ? 32'hA5A5_0000 + clk_no : 32'h0;
      if (clk_no >= 1 + irdy_wait) irdy_n = 0;
      // deassert FRAME for the last data phase
      if (irdy_n == 0 && (transfers >= phases - 1 || stop_now || stop_seen)) frame_n = 1;
      if (!expect_claim && clk_no >= 1) frame_n = 1;
    end
    // let the target release the bus
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // I/O write, no wait: claimed in the first clock after the address phase
    xact(CMD_IOW, 32'h0000_E108, 0, 1, 0, 4'b1011, 1);
    check(devsel_clk == 1, "I/O write: DEVSEL in clock 1");
    check(n_iowr == 1 && last_be == 4'b1011 && last_qa == 32'h0000_E108, "I/O write strobe, BE and address");
    check(!stop_seen && transfers == 1, "I/O write: normal completion");
    check(state == DEC_A && t_oe == 0, "back to A, bus released");

    // I/O write with 3 initiator wait states
    xact(CMD_IOW, 32'h0000_E104, 0, 1, 3, 4'b0000, 1);
    check(n_iowr == 1 && transfers == 1 && last_qa[3:2] == 2'd1, "I/O write with IRDY wait states");

    // I/O read: DEVSEL one clock later (turnaround), read strobe while claimed
    xact(CMD_IOR, 32'h0000_E108, 0, 1, 0, 4'b0000, 1);
    check(devsel_clk == 2, "I/O read: DEVSEL in clock 2");
    check(n_iord_clk >= 1 && n_iowr == 0 && transfers == 1, "I/O read strobe");

    // configuration read and write, type 0, function 0, dword 15
    xact(CMD_CNFR, 32'h0000_003C, 1, 1, 1, 4'b0000, 1);
    check(n_cfgrd_clk >= 1 && devsel_clk == 2 && qa[7:2] == 6'd15, "configuration read");
    xact(CMD_CNFW, 32'h0000_0010, 1, 1, 0, 4'b0000, 1);
    check(n_cfgwr == 1 && last_qa[7:2] == 6'd4, "configuration write");

    // two-phase bursts: disconnect C after the first data phase
    xact(CMD_IOW, 32'h0000_E100, 0, 2, 0, 4'b0000, 1);
    check(stop_seen && n_iowr == 1 && transfers == 1, "burst I/O write: disconnect C, one write");
    xact(CMD_IOR, 32'h0000_E100, 0, 2, 0, 4'b0000, 1);
    check(stop_seen && transfers == 1, "burst I/O read: disconnect C");
    xact(CMD_CNFW, 32'h0000_0000, 1, 2, 1, 4'b0000, 1);
    check(stop_seen && n_cfgwr == 1, "burst configuration write: disconnect C");

    // not for this device
    xact(CMD_IOW, 32'h0000_E110, 0, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0 && n_iowr == 0, "other I/O base ignored");
    xact(CMD_MEMW, 32'h0000_E100, 0, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0 && n_iowr == 0, "memory command ignored");
    xact(CMD_CNFW, 32'h0000_0100, 1, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0 && n_cfgwr == 0, "function 1 ignored");
    xact(CMD_CNFR, 32'h0000_0001, 1, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0, "type 1 configuration ignored");
    xact(CMD_CNFR, 32'h0000_0000, 0, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0, "configuration without IDSEL ignored");
    io_enable = 0;
    xact(CMD_IOW, 32'h0000_E100, 0, 1, 0, 4'b0000, 0);
    check(devsel_clk < 0 && n_iowr == 0, "I/O disabled ignored");
    io_enable = 1;
    xact(CMD_IOW, 32'h0000_E10C, 0, 1, 0, 4'b0111, 1);
    check(n_iowr == 1 && last_be == 4'b0111, "claimed again after misses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
