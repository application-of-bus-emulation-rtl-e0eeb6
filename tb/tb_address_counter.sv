// Self-checking test of address_counter: programming the PC memory address
// through three byte positions and advancing it one double word per transfer,
// with the wrap inside the 64 KB page.
module tb_address_counter;
  logic clk = 0, rst_n = 0;
  logic wr_lo = 0, wr_hi = 0, wr_page = 0, inc = 0;
  logic [7:0] wr_byte_lo = 0, wr_byte_hi = 0, wr_byte_page = 0;
  logic [31:0] pci_addr;
  int checks = 0, failures = 0;

  address_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s addr=%h", what, pci_addr); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(pci_addr == 0, "reset");
    wr_lo = 1; wr_byte_lo = 8'h10; wr_hi = 1; wr_byte_hi = 8'h32; wr_page = 1; wr_byte_page = 8'h5A;
    @(negedge clk); wr_lo = 0; wr_hi = 0; wr_page = 0;
    check(pci_addr == 32'h005A_3210, "programmed address");
    for (int i = 1; i <= 20; i++) begin
      inc = 1; @(negedge clk); inc = 0;
      check(pci_addr == 32'h005A_3210 + 4 * i, "increment by a double word");
    end
    wr_lo = 1; wr_byte_lo = 8'hFC; wr_hi = 1; wr_byte_hi = 8'hFF; @(negedge clk); wr_lo = 0; wr_hi = 0;
    inc = 1; @(negedge clk); inc = 0;
    check(pci_addr == 32'h005A_0000, "wrap within page, page kept");
    wr_lo = 1; wr_byte_lo = 8'h03; @(negedge clk); wr_lo = 0;
    check(pci_addr[1:0] == 2'b00 && pci_addr[31:24] == 8'h00, "AD[1:0] and AD[31:24] zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
