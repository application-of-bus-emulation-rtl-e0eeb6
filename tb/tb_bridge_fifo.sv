// Self-checking test of bridge_fifo: random pushes and pops against a queue
// reference model, the full and empty flags at a small depth, simultaneous
// push and pop, and the synchronous clear.
module tb_bridge_fifo;
  localparam int unsigned W = 32, D = 8;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  bridge_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // fill to full
    for (int i = 0; i < D + 2; i++) begin
      push = 1; wdata = $urandom; 
      if (q.size() < D) q.push_back(wdata);
      @(negedge clk);
    end
    push = 0;
    check(full && count == D, "full after D pushes, extra pushes ignored");
    // drain and compare
    while (q.size() > 0) begin
      check(rdata == q[0], "head data");
      pop = 1; @(negedge clk); pop = 0;
      void'(q.pop_front());
    end
    check(empty, "empty after draining");
    pop = 1; @(negedge clk); pop = 0;
    check(empty && count == 0, "pop on empty ignored");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      push = $urandom_range(0, 1); pop = $urandom_range(0, 1); wdata = $urandom;
      if (pop && q.size() > 0) check(rdata == q[0], "random head data");
      #1;
      begin
        bit do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < D;
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(wdata);
      end
      @(negedge clk);
      check(count == q.size(), "random count");
    end
    push = 0; pop = 0;
    // clear
    clr = 1; @(negedge clk); clr = 0; q.delete();
    check(empty && count == 0, "clear empties");
    push = 1; wdata = 32'hCAFE_0001; @(negedge clk); push = 0;
    check(rdata == 32'hCAFE_0001 && count == 1, "push after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
