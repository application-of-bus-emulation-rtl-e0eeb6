// Self-checking test of access_counter: byte-wise programming of the word
// count, reload, decrement by one and by two with saturation at zero, and the
// look-ahead #ZCONT / #ULTRANSF flags against a reference computed here.
module tb_access_counter;
  logic clk = 0, rst_n = 0;
  logic wr_lo = 0, wr_hi = 0, ld = 0, dec1 = 0, dec2 = 0;
  logic [7:0] wr_byte_lo = 0, wr_byte_hi = 0;
  logic [15:0] count, init_val;
  logic zcont, ultransf;
  int checks = 0, failures = 0;
  int model;

  access_counter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (count=%0d model=%0d)", what, count, model); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int n;
      n = (t < 8) ? t : $urandom_range(0, 300);
      if (t == 39) n = 16'hFFFF;
      wr_lo = 1; wr_hi = 1; wr_byte_lo = n[7:0]; wr_byte_hi = n[15:8];
      @(negedge clk); wr_lo = 0; wr_hi = 0;
      check(init_val == n[15:0], "init value written");
      ld = 1; #1;
      check(zcont == (n == 0), "zcont look-ahead on load");
      @(negedge clk); ld = 0; model = n;
      check(count == n[15:0], "count loaded");
      // decrement in random steps, checking flags before each edge
      for (int s = 0; s < 400 && model > 0; s++) begin
        int nxt;
        if ($urandom_range(0, 1)) begin dec2 = 1; nxt = (model >= 2) ? model - 2 : 0; end
        else begin dec1 = 1; nxt = model - 1; end
        #1;
        check(zcont == (nxt == 0), "zcont");
        check(ultransf == (nxt == 1 || nxt == 2), "ultransf");
        @(negedge clk); dec1 = 0; dec2 = 0; model = nxt;
        check(count == model[15:0], "count after decrement");
      end
    end
    // reload restores the programmed value after use
    ld = 1; @(negedge clk); ld = 0;
    check(count == 16'hFFFF, "reload");
    // dec2 on a count of one saturates at zero
    wr_lo = 1; wr_hi = 1; wr_byte_lo = 1; wr_byte_hi = 0; @(negedge clk);
    wr_lo = 0; wr_hi = 0; ld = 1; @(negedge clk); ld = 0; model = 0;
    dec2 = 1; #1; check(zcont && !ultransf, "odd last double word flags");
    @(negedge clk); dec2 = 0;
    check(count == 0, "saturate at zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
