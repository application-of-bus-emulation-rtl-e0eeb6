// Self-checking test of interrupt_control: target interrupt levels, the mask
// bit, the end-of-block request and the #INTA open-drain enable, and the
// status and control bytes read back by the interrupt service routine.
module tb_interrupt_control;
  logic clk = 0, rst_n = 0;
  logic [2:0] ipl_n = 3'b111;
  logic irqb = 0, wr_ictl = 0;
  logic [7:0] wr_byte = 0, status_byte, ictl_byte;
  logic irqa, inta_oe;
  int checks = 0, failures = 0;

  interrupt_control dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s status=%h ictl=%h", what, status_byte, ictl_byte); end
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
    check(!inta_oe && status_byte == 0, "idle after reset");
    ipl_n = 3'b010;   // level 5
    repeat (2) @(negedge clk);
    check(!irqa && !inta_oe, "masked after reset");
    check(ictl_byte == 8'h0A, "level 5 visible while masked");
    wr_ictl = 1; wr_byte = 8'h01; @(negedge clk); wr_ictl = 0;
    check(irqa && inta_oe && status_byte == 8'h01, "IRQA when enabled");
    check(ictl_byte == 8'h0B, "enable and level read back");
    for (int l = 0; l < 8; l++) begin
      ipl_n = ~3'(l); repeat (2) @(negedge clk);
      check(irqa == (l != 0), "IRQA follows level");
      check(ictl_byte[3:1] == 3'(l), "level read back");
    end
    ipl_n = 3'b111; @(negedge clk); @(negedge clk);
    irqb = 1; #1;
    check(inta_oe && status_byte == 8'h02 && !irqa, "IRQB alone");
    ipl_n = 3'b000; @(negedge clk); @(negedge clk);
    check(inta_oe && status_byte == 8'h03, "both sources");
    irqb = 0; wr_ictl = 1; wr_byte = 8'h00; @(negedge clk); wr_ictl = 0;
    check(!inta_oe && status_byte == 0, "all masked, no IRQB");
    wr_ictl = 1; wr_byte = 8'h01; @(negedge clk); wr_ictl = 0;
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    check(ictl_byte[0] == 0 && !irqa, "reset clears the mask bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
