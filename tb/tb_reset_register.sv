// Self-checking test of reset_register: #RESET is active after the PCI
// reset, released and re-asserted by software writes.
module tb_reset_register;
  logic clk = 0, rst_n = 0, wr = 0, reset_n;
  logic [7:0] wr_byte = 0;
  int checks = 0, failures = 0;

  reset_register dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);
    check(reset_n == 0, "active after PCI reset");
    wr = 1; wr_byte = 8'hFF; @(negedge clk); wr = 0;
    check(reset_n == 1, "released by writing 1");
    repeat (3) @(negedge clk);
    check(reset_n == 1, "held");
    wr = 1; wr_byte = 8'hFE; @(negedge clk); wr = 0;
    check(reset_n == 0, "asserted by writing 0");
    wr = 1; wr_byte = 8'h01; @(negedge clk); wr = 0;
    rst_n = 0; #1; check(reset_n == 0, "PCI reset asserts it"); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
