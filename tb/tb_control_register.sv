// Self-checking test of control_register: the READ bit is written, held,
// overwritten and cleared by reset.
module tb_control_register;
  logic clk = 0, rst_n = 0, wr = 0, read_dir;
  logic [7:0] wr_byte = 0;
  int checks = 0, failures = 0;

  control_register dut (.*);
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
    rst_n = 1;
    check(read_dir == 0, "reset value");
    for (int i = 0; i < 50; i++) begin
      logic [7:0] v; logic w; logic expect_v;
      expect_v = read_dir;
      v = 8'($urandom); w = 1'($urandom);
      wr = w; wr_byte = v; @(negedge clk); wr = 0;
      if (w) expect_v = v[0];
      check(read_dir == expect_v, "READ bit written only on a write");
    end
    wr = 1; wr_byte = 8'h01; @(negedge clk); wr = 0;
    rst_n = 0; #1; check(read_dir == 0, "cleared by reset"); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
