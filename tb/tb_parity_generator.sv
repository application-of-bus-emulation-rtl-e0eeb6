// Self-checking test of parity_generator: PAR must make the number of ones
// on AD[31:0], C/#BE[3:0] and PAR even, one clock after the bridge drove AD,
// with the output enable following the drive signal by one clock.
module tb_parity_generator;
  logic clk = 0, rst_n = 0, drive = 0;
  logic [31:0] ad = 0;
  logic [3:0] cbe = 0;
  logic par, par_oe;
  int checks = 0, failures = 0;

  parity_generator dut (.*);
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
    for (int i = 0; i < 500; i++) begin
      logic [31:0] a; logic [3:0] c; logic d; int ones;
      a = $urandom; c = 4'($urandom); d = 1'($urandom);
      if (i == 0) begin a = 0; c = 0; end
      if (i == 1) begin a = 32'h1; c = 0; end
      ad = a; cbe = c; drive = d;
      @(negedge clk);
      ones = $countones({a, c, par});
      check(ones % 2 == 0, "even parity over AD, C/BE and PAR");
      check(par_oe == d, "PAR enable one clock after AD drive");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
