// Self-checking test of latency_counter: load of the Latency Timer value,
// one decrement per clock with dec, stop at zero and the #ZLTCONT flag.
module tb_latency_counter;
  logic clk = 0, rst_n = 0, ld = 0, dec = 0;
  logic [7:0] load_val = 0, count;
  logic zltcont;
  int checks = 0, failures = 0;

  latency_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s count=%0d", what, count); end
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
    check(zltcont, "zero after reset");
    for (int v = 0; v < 6; v++) begin
      int lv, cycles;
      lv = (v == 5) ? 255 : v * 7;
      load_val = lv[7:0]; ld = 1; @(negedge clk); ld = 0;
      check(count == lv[7:0], "loaded");
      cycles = 0;
      dec = 1;
      while (!zltcont && cycles < 300) begin @(negedge clk); cycles++; end
      check(cycles == lv, "expires after Latency Timer clocks");
      @(negedge clk);
      check(count == 0 && zltcont, "stays at zero");
      dec = 0;
    end
    load_val = 8'd9; ld = 1; dec = 1; @(negedge clk); ld = 0;
    check(count == 9, "load has priority");
    dec = 0; repeat (3) @(negedge clk);
    check(count == 9, "holds without dec");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
