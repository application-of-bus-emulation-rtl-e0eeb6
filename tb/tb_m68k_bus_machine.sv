// Self-checking test of m68k_bus_machine against a small MC68000 target
// model: asynchronous read and write word cycles with 0 to 3 wait states,
// byte cycles on even and odd addresses, and synchronous cycles answered with
// #VPA. Checks the data moved, the strobes, the length of a cycle (four clocks
// with no wait states: #AS low for two clocks, ad0 three clocks after #AS
// falls) and the E/#VMA relation of synchronous cycles. The start request is
// handled the way the control unit does it: raised, dropped after #AS goes
// low, and raised again after ad0.
module tb_m68k_bus_machine;
  logic clk = 0, reset68_n = 0;
  logic iow4s = 0, read = 1, word = 1, a0 = 0;
  logic [15:0] d_in;
  logic dtack_n, vpa_n;
  logic ad0, e, as_n, uds_n, lds_n, wr68_n, vma_n, d_oe;
  logic [15:0] rdata;
  int checks = 0, failures = 0;

  m68k_bus_machine dut (.*);
  always #62.5 clk = ~clk;    // 8 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  // target model: word memory, DTACK after a number of wait states, or VPA
  logic [15:0] mem [256];
  logic [7:0]  addr;
  logic [15:0] wdata;
  int          waits = 0, as_cnt = 0;
  bit          sync_dev = 0;
  int          vma_e_high_ok = 0;
  assign d_in    = mem[addr];
  assign dtack_n = !(!sync_dev && !as_n && as_cnt >= waits + 1);
  assign vpa_n   = !(sync_dev && !as_n);
  always @(posedge clk) begin
    if (!as_n) as_cnt <= as_cnt + 1; else as_cnt <= 0;
    if (!as_n && !wr68_n && d_oe && ((!dtack_n) || (!vma_n && e))) begin
      if (!uds_n) mem[addr][15:8] <= wdata[15:8];
      if (!lds_n) mem[addr][7:0]  <= wdata[7:0];
    end
  end

  // one bus cycle; returns clocks #AS was low and clocks from #AS fall to ad0
  task automatic cycle(input logic rd, input logic [7:0] a, input logic [15:0] wd,
                       output int as_low, output int to_ad0);
    int n;
    @(negedge clk);
    read = rd; addr = a; wdata = wd;
    iow4s = 1;
    n = 0;
    while (as_n) begin @(posedge clk); #1; n++; if (n > 50) break; end
    iow4s = 0;
    check(!ad0, "ad0 low while a cycle runs");
    as_low = 0; to_ad0 = 0;
    while (!ad0) begin
      if (!as_n) as_low++;
      @(posedge clk); #1; to_ad0++;
      if (to_ad0 > 200) break;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int al, ta;
    for (int i = 0; i < 256; i++) mem[i] = 16'(i * 16'h0101 ^ 16'h5A3C);
    addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    reset68_n = 1;
    repeat (2) @(negedge clk);
    check(as_n && uds_n && lds_n && wr68_n && vma_n && !d_oe, "idle bus after reset");

    // asynchronous reads, 0..3 wait states
    for (int w = 0; w < 4; w++) begin
      waits = w;
      cycle(1, 8'(10 + w), 16'h0, al, ta);
      check(rdata == mem[10 + w], "async read data");
      check(al == 2 + w, $sformatf("AS low %0d clocks with %0d wait states", al, w));
      check(ta == 3 + w, "ad0 three clocks after AS falls plus wait states");
    end
    waits = 0;
    // asynchronous word write
    cycle(0, 8'd20, 16'hBEEF, al, ta);
    check(mem[20] == 16'hBEEF, "async word write");
    check(ta == 3, "write cycle length");
    // byte writes
    word = 0; a0 = 0;
    cycle(0, 8'd21, 16'h1200, al, ta);
    word = 0; a0 = 1;
    cycle(0, 8'd21, 16'h0034, al, ta);
    check(mem[21] == 16'h1234, "byte writes with UDS then LDS");
    word = 1; a0 = 0;
    // synchronous cycles
    sync_dev = 1;
    for (int k = 0; k < 3; k++) begin
      cycle(1, 8'(30 + k), 16'h0, al, ta);
      check(rdata == mem[30 + k], "synchronous read data");
      check(ta >= 6 && ta <= 18, "synchronous cycle follows E");
    end
    cycle(0, 8'd33, 16'hC0DE, al, ta);
    check(mem[33] == 16'hC0DE, "synchronous write");
    check(vma_e_high_ok > 0, "VMA asserted while E high");
    sync_dev = 0;
    // reset in the middle of a cycle
    waits = 10;
    @(negedge clk); read = 1; iow4s = 1;
    repeat (4) @(negedge clk);
    reset68_n = 0; iow4s = 0; @(negedge clk); reset68_n = 1; @(negedge clk);
    check(as_n && uds_n && lds_n, "reset ends a cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // VMA asserted with E high when a synchronous device transfers
  always @(posedge clk) if (!vma_n && e && !as_n) vma_e_high_ok++;
endmodule
